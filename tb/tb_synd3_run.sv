// tb_synd3_run - checker for one synd3_block configuration, used by
// tb_table4_codes.
//
// After `start` it streams WORDS random received words of length N (binary
// symbols when BINARY = 1, as for a BCH code) without stalls, and checks for
// each that the TWO_T syndromes equal a table-based Horner evaluation of the
// word at alpha^0..alpha^(TWO_T-1), and that they arrive EXP_ITER clocks after
// the first triple is accepted.
`timescale 1ns/1ps
module tb_synd3_run #(
  parameter int M        = 8,
  parameter int POLY     = 'h11D,
  parameter int N        = 255,
  parameter int TWO_T    = 16,
  parameter int EXP_ITER = 86,
  parameter bit BINARY   = 0,
  parameter int WORDS    = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   iterations
);
  import tb_gf_ref_pkg::*;

  logic         in_valid, in_sop, synd_valid;
  logic [M-1:0] in_hi, in_mid, in_lo, synd_serial;
  logic [M-1:0] synd [TWO_T];

  synd3_block #(.M(M), .N(N), .TWO_T(TWO_T), .PRIM_POLY((M+1)'(POLY))) dut (
    .clk, .rst_n, .in_valid, .in_sop, .in_hi, .in_mid, .in_lo, .shift_en(1'b0),
    .synd, .synd_valid, .synd_serial);

  gf_ref f;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL N=%0d 2t=%0d %s: got %0d expected %0d", N, TWO_T, what, got, exp);
    end
  endtask

  initial begin
    int r [];
    int t0;
    checks = 0; failures = 0; iterations = 0; done = 1'b0;
    in_valid = 1'b0; in_sop = 1'b0; in_hi = '0; in_mid = '0; in_lo = '0;
    f = new(M, POLY);
    wait (start);
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      r = new[N];
      foreach (r[i]) r[i] = BINARY ? $urandom_range(1, 0) : $urandom_range((1 << M) - 1, 0);
      t0 = 0;
      for (int j = N / 3 - 1; j >= 0; j--) begin
        in_valid = 1'b1; in_sop = (j == N / 3 - 1);
        in_hi = M'(r[3*j+2]); in_mid = M'(r[3*j+1]); in_lo = M'(r[3*j]);
        @(negedge clk);
        t0++;
      end
      in_valid = 1'b0; in_sop = 1'b0;
      while (!synd_valid && t0 < N) begin @(negedge clk); t0++; end
      iterations = t0;
      check("iterations", t0, EXP_ITER);
      for (int i = 0; i < TWO_T; i++)
        check($sformatf("S%0d", i), int'(synd[i]), f.eval(r, f.pw(i)));
      @(negedge clk);
    end
    done = 1'b1;
  end
endmodule
