// tb_chien_fact2_run - checker for one chien_fact2 configuration, used by
// tb_chien_fact2.
//
// After `start` it runs full searches of 2^M - 1 steps:
//   1. a locator with DEG distinct roots alpha^(e_k) (built as
//      c * prod_k (x + alpha^(e_k)) with a random c != 0): eval must be zero,
//      and err_pos high, exactly at the steps j = e_k;
//   2. random coefficients and a random start value k_init: eval must equal
//      the plain sum_i A_i X^i with X = k_init * alpha^j.
// Reference values come from the table-based tb_gf_ref_pkg.
`timescale 1ns/1ps
module tb_chien_fact2_run #(
  parameter int M    = 4,
  parameter int POLY = 'h13,
  parameter int DEG  = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   roots_found
);
  import tb_gf_ref_pkg::*;

  localparam int Q = (1 << M) - 1;

  logic         load;
  logic [M-1:0] k_init;
  logic [M-1:0] coef [DEG+1];
  logic [M-1:0] x_reg, eval;
  logic         err_pos;

  chien_fact2 #(.M(M), .PRIM_POLY((M+1)'(POLY)), .DEG(DEG)) dut (
    .clk, .rst_n, .load, .k_init, .coef, .x_reg, .eval, .err_pos);

  gf_ref f;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL M=%0d DEG=%0d %s: got %0d expected %0d", M, DEG, what, got, exp);
    end
  endtask

  task automatic search(int k, int p [], output int zeros [$]);
    int x, e;
    zeros = {};
    k_init = M'(k);
    foreach (coef[i]) coef[i] = M'(p[i]);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int j = 1; j <= Q; j++) begin
      x = f.mul(k, f.pw(j));
      e = f.eval(p, x);
      check($sformatf("x_reg step %0d", j), int'(x_reg), x);
      check($sformatf("eval step %0d", j), int'(eval), e);
      check($sformatf("err_pos step %0d", j), int'(err_pos), int'(e == 0));
      if (err_pos) zeros.push_back(j);
      @(negedge clk);
    end
  endtask

  initial begin
    int p [], e [$], z [$];
    int r;
    checks = 0; failures = 0; roots_found = 0; done = 1'b0;
    load = 1'b0; k_init = '0;
    foreach (coef[i]) coef[i] = '0;
    f = new(M, POLY);
    wait (start);
    @(negedge clk);

    // 1. known roots
    p = new[1];
    p[0] = $urandom_range(Q, 1);
    e = {};
    for (int k = 0; k < DEG; k++) begin
      do r = $urandom_range(Q, 1); while (r inside {e});
      e.push_back(r);
      f.mul_root(p, f.pw(r));
    end
    search(1, p, z);
    e.sort();
    check("number of roots", z.size(), DEG);
    foreach (z[i]) if (i < e.size()) check("root position", z[i], e[i]);
    roots_found += z.size();

    // 2. random polynomial, random start
    for (int i = 0; i <= DEG; i++) p[i] = $urandom_range(Q, 0);
    search($urandom_range(Q, 1), p, z);
    roots_found += z.size();
    done = 1'b1;
  end
endmodule
