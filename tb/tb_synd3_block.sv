// tb_synd3_block - self-checking test of the three-parallel syndrome block.
//
// u_small: RS(15,11) over GF(2^4), 4 syndromes. The received word
//   r14..r0 = 1,2,3,4,5,11,7,8,9,10,11,3,1,12,12 must give S0..S3 = 15,3,4,12.
// u_big: the default RS(255,239) over GF(2^8), 16 syndromes at alpha^0..15.
//   Words are valid codewords m(x)g(x) with 0..8 random symbol errors (and
//   fully random words); the expected syndromes are sum_k Y_k alpha^(i e_k)
//   for the injected errors, worked out apart from the received word. The
//   block must report them N/3 + 1 = 86 clocks after the first triple when no
//   stall is inserted, and stall clocks must only add to that count. Words
//   are sent back to back (new first triple on the load clock) and with
//   random gaps, and the serial chain output must give S15, S14, ..., S0.
`timescale 1ns/1ps
module tb_synd3_block;
  import tb_gf_ref_pkg::*;

  localparam int N = 255;
  localparam int TWO_T = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- small block: the worked example -----------------
  logic       v4, sop4, sh4, sv4;
  logic [3:0] hi4, mid4, lo4, ser4;
  logic [3:0] syn4 [4];
  synd3_block #(.M(4), .N(15), .TWO_T(4)) u_small (
    .clk, .rst_n, .in_valid(v4), .in_sop(sop4), .in_hi(hi4), .in_mid(mid4), .in_lo(lo4),
    .shift_en(sh4), .synd(syn4), .synd_valid(sv4), .synd_serial(ser4));

  // ---------------- default-size block -----------------
  logic       v8, sop8, sh8, sv8;
  logic [7:0] hi8, mid8, lo8, ser8;
  logic [7:0] syn8 [TWO_T];
  synd3_block u_big (
    .clk, .rst_n, .in_valid(v8), .in_sop(sop8), .in_hi(hi8), .in_mid(mid8), .in_lo(lo8),
    .shift_en(sh8), .synd(syn8), .synd_valid(sv8), .synd_serial(ser8));

  gf_ref f8;

  // expected results, queued by the driver, consumed by the monitor
  typedef struct {
    int s [TWO_T];
    int start_cycle;
    int stalls;
  } exp_t;
  exp_t exp_q [$];
  int words_checked = 0;
  int stall_total = 0;
  int b2b_total = 0;

  // monitor for u_big
  always @(negedge clk) begin
    if (rst_n && sv8) begin
      exp_t e;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected synd_valid");
      end else begin
        e = exp_q.pop_front();
        for (int i = 0; i < TWO_T; i++) check($sformatf("S%0d", i), int'(syn8[i]), e.s[i]);
        // last edge of synd_valid's rising was at cycle; first triple at start_cycle+1
        check("iterations", cycle - e.start_cycle, N / 3 + 1 + e.stalls);
        words_checked++;
      end
    end
  end

  // drive one 255-symbol word; r[i] = coefficient of x^i
  task automatic send_word(int r [], int max_gap, bit b2b);
    int stalls;
    stalls = 0;
    for (int j = N / 3 - 1; j >= 0; j--) begin
      if (j != N / 3 - 1) begin
        while (max_gap > 0 && $urandom_range(max_gap, 0) == 0) begin
          v8 = 1'b0; sop8 = 1'b0;
          @(negedge clk);
          stalls++;
        end
      end
      v8 = 1'b1; sop8 = (j == N / 3 - 1);
      hi8 = 8'(r[3*j+2]); mid8 = 8'(r[3*j+1]); lo8 = 8'(r[3*j]);
      if (j == N / 3 - 1) begin
        exp_q[exp_q.size()-1].start_cycle = cycle;
        if (b2b && sv8 == 1'b0 && u_big.load_q) b2b_total++;
      end
      @(negedge clk);
    end
    exp_q[exp_q.size()-1].stalls = stalls;
    stall_total += stalls;
    v8 = 1'b0; sop8 = 1'b0;
  endtask

  // build a word with nerr errors (nerr < 0: fully random) and queue its syndromes
  task automatic make_word(int nerr, output int r []);
    exp_t e;
    int pos [$];
    int p, y;
    if (nerr < 0) begin
      r = new[N];
      foreach (r[i]) r[i] = $urandom_range(255, 0);
      for (int i = 0; i < TWO_T; i++) e.s[i] = f8.eval(r, f8.pw(i));
    end else begin
      f8.rs_codeword(N, TWO_T, 0, r);
      for (int i = 0; i < TWO_T; i++) e.s[i] = 0;
      for (int k = 0; k < nerr; k++) begin
        do p = $urandom_range(N - 1, 0); while (p inside {pos});
        pos.push_back(p);
        y = $urandom_range(255, 1);
        r[p] ^= y;
        for (int i = 0; i < TWO_T; i++) e.s[i] ^= f8.mul(y, f8.pw(i * p));
      end
    end
    e.start_cycle = 0;
    e.stalls = 0;
    exp_q.push_back(e);
  endtask

  initial begin
    int w [15] = '{12, 12, 1, 3, 11, 10, 9, 8, 7, 11, 5, 4, 3, 2, 1};  // w[i] = r_i
    int ex [4] = '{15, 3, 4, 12};
    int r [];
    f8 = new(8, 'h11D);
    {v4, sop4, sh4, v8, sop8, sh8} = '0;
    {hi4, mid4, lo4, hi8, mid8, lo8} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // worked example
    for (int j = 4; j >= 0; j--) begin
      v4 = 1'b1; sop4 = (j == 4);
      hi4 = 4'(w[3*j+2]); mid4 = 4'(w[3*j+1]); lo4 = 4'(w[3*j]);
      @(negedge clk);
    end
    v4 = 1'b0; sop4 = 1'b0;
    check("small: valid after N/3+1", int'(sv4), 0);
    @(negedge clk);
    check("small: synd_valid", int'(sv4), 1);
    for (int i = 0; i < 4; i++) check($sformatf("small S%0d", i), int'(syn4[i]), ex[i]);
    // serial read-out: S3, S2, S1, S0, then zeros
    for (int i = 3; i >= 0; i--) begin
      check($sformatf("small serial S%0d", i), int'(ser4), ex[i]);
      sh4 = 1'b1;
      @(negedge clk);
      sh4 = 1'b0;
    end
    check("small serial empty", int'(ser4), 0);

    // default size: clean codeword, no stalls
    make_word(0, r);
    send_word(r, 0, 0);
    repeat (3) @(negedge clk);
    // words with errors and stalls
    for (int n = 0; n < 4; n++) begin
      make_word($urandom_range(8, 1), r);
      send_word(r, 4, 0);
      repeat ($urandom_range(4, 2)) @(negedge clk);
    end
    // back-to-back words: the next first triple on the load clock
    for (int n = 0; n < 4; n++) begin
      make_word((n == 3) ? -1 : n * 3, r);
      send_word(r, 0, n > 0);
    end
    repeat (3) @(negedge clk);
    // serial read-out of the last word
    begin
      int last [TWO_T];
      for (int i = 0; i < TWO_T; i++) last[i] = int'(syn8[i]);
      for (int i = TWO_T - 1; i >= 0; i--) begin
        check($sformatf("serial S%0d", i), int'(ser8), last[i]);
        sh8 = 1'b1;
        @(negedge clk);
        sh8 = 1'b0;
      end
    end
    repeat (3) @(negedge clk);

    check("words checked", words_checked, 9);
    if (stall_total == 0) begin failures++; $display("FAIL no stall happened"); end
    if (b2b_total != 3) begin failures++; $display("FAIL back-to-back starts %0d", b2b_total); end
    $display("stalls=%0d back_to_back=%0d words=%0d", stall_total, b2b_total, words_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
