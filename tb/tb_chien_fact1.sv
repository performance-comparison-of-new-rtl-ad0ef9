// tb_chien_fact1 - self-checking test of the first-factorization Chien search.
//
// Runs the checker tb_chien_fact1_run on three configurations: the default
// GF(2^4) with two factors (including the worked locator 14X^2 + 14X + 1,
// whose roots must be found at alpha^6 and alpha^13), GF(2^4) with five
// factors, and GF(2^8) with eight factors as used in the RS(255,239) top.
`timescale 1ns/1ps
module tb_chien_fact1;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  logic d [3];
  int   c [3], fl [3], rt [3];

  tb_chien_fact1_run #(.M(4), .POLY('h13),  .NF(2)) u_a (
    .clk, .rst_n, .start, .done(d[0]), .checks(c[0]), .failures(fl[0]), .roots_found(rt[0]));
  tb_chien_fact1_run #(.M(4), .POLY('h13),  .NF(5)) u_b (
    .clk, .rst_n, .start, .done(d[1]), .checks(c[1]), .failures(fl[1]), .roots_found(rt[1]));
  tb_chien_fact1_run #(.M(8), .POLY('h11D), .NF(8)) u_c (
    .clk, .rst_n, .start, .done(d[2]), .checks(c[2]), .failures(fl[2]), .roots_found(rt[2]));

  int checks, failures;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    wait (d[0] && d[1] && d[2]);
    checks   = c[0] + c[1] + c[2];
    failures = fl[0] + fl[1] + fl[2];
    checks++;
    if (rt[0] < 2 + 2 || rt[1] < 5 || rt[2] < 8) begin
      failures++;
      $display("FAIL too few error positions found: %0d %0d %0d", rt[0], rt[1], rt[2]);
    end
    $display("error positions found: %0d %0d %0d", rt[0], rt[1], rt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end
endmodule
