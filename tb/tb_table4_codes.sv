// tb_table4_codes - the three-parallel syndrome block on codes of the
// iteration-count comparison: for each code the syndromes of random received
// words must be right and must take n/3 + 1 clocks (22 for n = 63, 86 for
// n = 255, 1081 for n = 3240).
//   (63,55)  RS over GF(2^6), 2t = 8      (63,15)  RS over GF(2^6), 2t = 48
//   (255,239) RS over GF(2^8), 2t = 16    (255,135) RS over GF(2^8), 2t = 120
//   (3240,3072) binary BCH shortened from GF(2^14), t = 12, 2t = 24
// The RS codes take 2t = n - k; the field and t of the (3240,3072) BCH code
// are those of its usual use in DVB-S2 short frames.
`timescale 1ns/1ps
module tb_table4_codes;
  localparam int NR = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  logic d [NR];
  int   c [NR], fl [NR], it [NR];
  int   exp_it [NR] = '{22, 22, 86, 86, 1081};

  tb_synd3_run #(.M(6),  .POLY('h43),   .N(63),   .TWO_T(8),   .EXP_ITER(22))   u_63_55 (
    .clk, .rst_n, .start, .done(d[0]), .checks(c[0]), .failures(fl[0]), .iterations(it[0]));
  tb_synd3_run #(.M(6),  .POLY('h43),   .N(63),   .TWO_T(48),  .EXP_ITER(22))   u_63_15 (
    .clk, .rst_n, .start, .done(d[1]), .checks(c[1]), .failures(fl[1]), .iterations(it[1]));
  tb_synd3_run #(.M(8),  .POLY('h11D),  .N(255),  .TWO_T(16),  .EXP_ITER(86))   u_255_239 (
    .clk, .rst_n, .start, .done(d[2]), .checks(c[2]), .failures(fl[2]), .iterations(it[2]));
  tb_synd3_run #(.M(8),  .POLY('h11D),  .N(255),  .TWO_T(120), .EXP_ITER(86))   u_255_135 (
    .clk, .rst_n, .start, .done(d[3]), .checks(c[3]), .failures(fl[3]), .iterations(it[3]));
  tb_synd3_run #(.M(14), .POLY('h4443), .N(3240), .TWO_T(24),  .EXP_ITER(1081), .BINARY(1)) u_3240 (
    .clk, .rst_n, .start, .done(d[4]), .checks(c[4]), .failures(fl[4]), .iterations(it[4]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    for (int i = 0; i < NR; i++) wait (d[i]);
    for (int i = 0; i < NR; i++) begin
      checks += c[i];
      failures += fl[i];
      $display("code %0d: %0d iterations (expected %0d)", i, it[i], exp_it[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    for (int i = 0; i < NR; i++) begin checks += c[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
