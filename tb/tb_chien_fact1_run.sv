// tb_chien_fact1_run - checker for one chien_fact1 configuration, used by
// tb_chien_fact1.
//
// After `start` it runs three searches over the full 2^M - 1 steps, each
// started by load with k_init = a:
//   1. beta_k = a * alpha^(e_k) for NF distinct e_k: eval must be zero, and
//      err_pos high, exactly at the steps j = e_k (X = alpha^j);
//   2. random a and random beta_k: eval must equal prod_k (a alpha^j + beta_k);
//   3. (GF(2^4), two factors only) the worked locator 14X^2 + 14X + 1, factored
//      by the testbench as (aX + a r1)(aX + a r2) with a^2 = 14 and r1, r2 its
//      roots: eval must equal the unfactored polynomial at every X.
// A reload after a partial search is checked to restart the sequence.
// Reference values come from the table-based tb_gf_ref_pkg.
`timescale 1ns/1ps
module tb_chien_fact1_run #(
  parameter int M    = 4,
  parameter int POLY = 'h13,
  parameter int NF   = 2
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
  logic [M-1:0] beta [NF];
  logic [M-1:0] x_reg, eval;
  logic         err_pos;

  chien_fact1 #(.M(M), .PRIM_POLY((M+1)'(POLY)), .NF(NF)) dut (
    .clk, .rst_n, .load, .k_init, .beta, .x_reg, .eval, .err_pos);

  gf_ref f;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL M=%0d NF=%0d %s: got %0d expected %0d", M, NF, what, got, exp);
    end
  endtask

  // run a search of `steps` steps and compare with prod_k (a X + beta_k)
  task automatic search(int a, int b [NF], int steps, output int zeros [$]);
    int e;
    zeros = {};
    k_init = M'(a);
    foreach (b[k]) beta[k] = M'(b[k]);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int j = 1; j <= steps; j++) begin
      e = 1;
      foreach (b[k]) e = f.mul(e, f.mul(a, f.pw(j)) ^ b[k]);
      check($sformatf("x_reg step %0d", j), int'(x_reg), f.mul(a, f.pw(j)));
      check($sformatf("eval step %0d", j), int'(eval), e);
      check($sformatf("err_pos step %0d", j), int'(err_pos), int'(e == 0));
      if (err_pos) zeros.push_back(j);
      @(negedge clk);
    end
  endtask

  initial begin
    int a, b [NF], e [$], z [$];
    int p, lam;
    checks = 0; failures = 0; roots_found = 0; done = 1'b0;
    load = 1'b0; k_init = '0;
    foreach (beta[k]) beta[k] = '0;
    f = new(M, POLY);
    wait (start);
    @(negedge clk);

    // 1. known roots
    a = $urandom_range(Q, 1);
    e = {};
    for (int k = 0; k < NF; k++) begin
      do p = $urandom_range(Q, 1); while (p inside {e});
      e.push_back(p);
      b[k] = f.mul(a, f.pw(p));
    end
    search(a, b, Q, z);
    e.sort();
    check("number of roots", z.size(), NF);
    foreach (z[i]) if (i < e.size()) check("root position", z[i], e[i]);
    roots_found += z.size();

    // partial search, then a reload must restart the register
    search(a, b, 7, z);

    // 2. random factors
    a = $urandom_range(Q, 1);
    foreach (b[k]) b[k] = $urandom_range(Q, 0);
    search(a, b, Q, z);
    roots_found += z.size();

    // 3. the worked degree-2 locator 14X^2 + 14X + 1 over GF(2^4)
    if (M == 4 && NF == 2) begin
      int lp [3] = '{1, 14, 14};
      int r [$];
      for (int x = 1; x <= Q; x++) if (f.mul(x, x) == 14) a = x;
      for (int j = 0; j < Q; j++) if (f.eval(lp, f.pw(j)) == 0) r.push_back(f.pw(j));
      check("worked locator has two roots", r.size(), 2);
      b[0] = f.mul(a, r[0]);
      b[1] = f.mul(a, r[1]);
      k_init = M'(a);
      foreach (b[k]) beta[k] = M'(b[k]);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int j = 1; j <= Q; j++) begin
        // register holds a * alpha^j, i.e. the factor form uses X = alpha^j
        lam = f.eval(lp, f.pw(j));
        check($sformatf("worked locator at alpha^%0d", j), int'(eval), lam);
        if (err_pos) roots_found++;
        @(negedge clk);
      end
    end
    done = 1'b1;
  end
endmodule
