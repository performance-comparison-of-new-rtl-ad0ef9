// tb_synd3_cell - self-checking test of one three-parallel syndrome cell.
//
// Cell u_s1 evaluates at alpha^1 in GF(2^4) and is fed the 15-symbol word
// r14..r0 = 1,2,3,4,5,11,7,8,9,10,11,3,1,12,12 as five triples; its
// syndrome must be 3 (and 4 for u_s2 at alpha^2). Cell u_r at alpha^5 in
// GF(2^8) gets random 255-symbol words with random stall clocks, and its
// result is compared with a table-based Horner evaluation. The shift path
// (s_prev into register 2) and the priority of load over shift are checked
// too, as is the overlap of a new first triple with the load clock.
`timescale 1ns/1ps
module tb_synd3_cell;
  import tb_gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // GF(2^4) cells
  logic       en4, first4, load4, shift4;
  logic [3:0] hi4, mid4, lo4, prev4, s1_out, s2_out;
  synd3_cell #(.M(4), .ROOT_EXP(1)) u_s1 (
    .clk, .rst_n, .en(en4), .first(first4), .r_hi(hi4), .r_mid(mid4), .r_lo(lo4),
    .load(load4), .shift(shift4), .s_prev(prev4), .s_out(s1_out));
  synd3_cell #(.M(4), .ROOT_EXP(2)) u_s2 (
    .clk, .rst_n, .en(en4), .first(first4), .r_hi(hi4), .r_mid(mid4), .r_lo(lo4),
    .load(load4), .shift(shift4), .s_prev(s1_out), .s_out(s2_out));

  // GF(2^8) cell
  logic       en8, first8, load8, shift8;
  logic [7:0] hi8, mid8, lo8, prev8, s8_out;
  synd3_cell #(.M(8), .ROOT_EXP(5)) u_r (
    .clk, .rst_n, .en(en8), .first(first8), .r_hi(hi8), .r_mid(mid8), .r_lo(lo8),
    .load(load8), .shift(shift8), .s_prev(prev8), .s_out(s8_out));

  gf_ref f4, f8;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int w [15] = '{12, 12, 1, 3, 11, 10, 9, 8, 7, 11, 5, 4, 3, 2, 1};  // w[i] = r_i
    int r [];
    int exp8;
    f4 = new(4, 'h13);
    f8 = new(8, 'h11D);
    {en4, first4, load4, shift4, en8, first8, load8, shift8} = '0;
    {hi4, mid4, lo4, prev4, hi8, mid8, lo8, prev8} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // worked example, GF(2^4)
    for (int j = 4; j >= 0; j--) begin
      @(negedge clk);
      en4 = 1'b1; first4 = (j == 4);
      hi4 = 4'(w[3*j+2]); mid4 = 4'(w[3*j+1]); lo4 = 4'(w[3*j]);
    end
    @(negedge clk);
    en4 = 1'b0; first4 = 1'b0; load4 = 1'b1;
    @(negedge clk);
    load4 = 1'b0;
    check("S1 of example", int'(s1_out), 3);
    check("S2 of example", int'(s2_out), 4);
    // shift: S1 moves into the alpha^2 cell, s_prev=9 into the alpha^1 cell
    prev4 = 4'd9; shift4 = 1'b1;
    @(negedge clk);
    shift4 = 1'b0;
    check("shift into cell 2", int'(s2_out), 3);
    check("shift into cell 1", int'(s1_out), 9);
    // load has priority over shift
    load4 = 1'b1; shift4 = 1'b1;
    @(negedge clk);
    load4 = 1'b0; shift4 = 1'b0;
    check("load over shift", int'(s1_out), 3);

    // random words in GF(2^8), with stalls and back-to-back starts
    for (int n = 0; n < 20; n++) begin
      r = new[255];
      foreach (r[i]) r[i] = $urandom_range(255, 0);
      exp8 = f8.eval(r, f8.pw(5));
      for (int j = 84; j >= 0; j--) begin
        @(negedge clk);
        load8 = (j == 84) && (n > 0);   // previous word's load overlaps this first triple
        while ($urandom_range(3, 0) == 0 && j != 84) begin
          en8 = 1'b0; first8 = 1'b0;
          @(negedge clk);
          load8 = 1'b0;
        end
        en8 = 1'b1; first8 = (j == 84);
        hi8 = 8'(r[3*j+2]); mid8 = 8'(r[3*j+1]); lo8 = 8'(r[3*j]);
        if (j == 83) load8 = 1'b0;
        if (j == 83 && n > 0) check("syndrome of random word", int'(s8_out), exp8_prev);
      end
      exp8_prev = exp8;
    end
    @(negedge clk);
    en8 = 1'b0; first8 = 1'b0; load8 = 1'b1;
    @(negedge clk);
    load8 = 1'b0;
    check("syndrome of last random word", int'(s8_out), exp8_prev);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp8_prev = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
