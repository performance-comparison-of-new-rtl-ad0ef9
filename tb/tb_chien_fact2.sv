// tb_chien_fact2 - self-checking test of the second-factorization Chien search.
//
// Runs the checker tb_chien_fact2_run on the odd and even degrees the circuit
// is drawn for (5 and 6 over GF(2^4)), on the smallest odd and even cases
// (3 and 4), and on degrees 7 and 8 over GF(2^8), the latter being the
// RS(255,239) configuration of the top.
`timescale 1ns/1ps
module tb_chien_fact2;
  localparam int NR = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  logic d [NR];
  int   c [NR], fl [NR], rt [NR];

  tb_chien_fact2_run #(.M(4), .POLY('h13),  .DEG(5)) u_5 (
    .clk, .rst_n, .start, .done(d[0]), .checks(c[0]), .failures(fl[0]), .roots_found(rt[0]));
  tb_chien_fact2_run #(.M(4), .POLY('h13),  .DEG(6)) u_6 (
    .clk, .rst_n, .start, .done(d[1]), .checks(c[1]), .failures(fl[1]), .roots_found(rt[1]));
  tb_chien_fact2_run #(.M(4), .POLY('h13),  .DEG(3)) u_3 (
    .clk, .rst_n, .start, .done(d[2]), .checks(c[2]), .failures(fl[2]), .roots_found(rt[2]));
  tb_chien_fact2_run #(.M(4), .POLY('h13),  .DEG(4)) u_4 (
    .clk, .rst_n, .start, .done(d[3]), .checks(c[3]), .failures(fl[3]), .roots_found(rt[3]));
  tb_chien_fact2_run #(.M(8), .POLY('h11D), .DEG(7)) u_7 (
    .clk, .rst_n, .start, .done(d[4]), .checks(c[4]), .failures(fl[4]), .roots_found(rt[4]));
  tb_chien_fact2_run #(.M(8), .POLY('h11D), .DEG(8)) u_8 (
    .clk, .rst_n, .start, .done(d[5]), .checks(c[5]), .failures(fl[5]), .roots_found(rt[5]));

  int checks = 0, failures = 0;
  int degs [NR] = '{5, 6, 3, 4, 7, 8};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    for (int i = 0; i < NR; i++) wait (d[i]);
    for (int i = 0; i < NR; i++) begin
      checks += c[i] + 1;
      failures += fl[i];
      if (rt[i] < degs[i]) begin
        failures++;
        $display("FAIL degree %0d: only %0d error positions found", degs[i], rt[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    failures = 1;
    for (int i = 0; i < NR; i++) begin checks += c[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
