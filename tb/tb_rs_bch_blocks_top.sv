// tb_rs_bch_blocks_top - end-to-end test of rs_bch_blocks_top at its default
// size: RS(255,239) over GF(2^8), t = 8.
//
// For each test word the bench builds a codeword m(x)g(x), adds nu random
// symbol errors Y_k at positions e_k and streams it, three symbols per clock,
// into the syndrome stage. The 16 syndromes must equal sum_k Y_k alpha^(i e_k)
// and arrive N/3 + 1 = 86 clocks after the first triple plus any stall clocks.
// The bench then plays the part of the key-equation solver, which is not in
// the design: it forms the error locator L(x) = prod_k (1 + alpha^(e_k) x)
// and gives it to both Chien searches, started with k_init = 1 (second
// factorization, L's coefficients) and with k_init = a, beta_k =
// a * alpha^(-e_k) (first factorization, nu = 8 only, as its factor count is
// fixed). Both must flag exactly the steps j with alpha^j = alpha^(-e_k).
//
// Mechanisms counted, each of which must occur: clean word (all-zero
// syndromes), word with errors, input stall, back-to-back words, serial
// syndrome read-out, Chien reload mid-search, error positions found by each
// Chien search.
`timescale 1ns/1ps
module tb_rs_bch_blocks_top;
  import tb_gf_ref_pkg::*;

  localparam int M = 8;
  localparam int N = 255;
  localparam int T = 8;
  localparam int Q = 255;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle++;

  logic         in_valid, in_sop, synd_shift, synd_valid;
  logic [M-1:0] in_hi, in_mid, in_lo, synd_serial;
  logic [M-1:0] synd [2*T];
  logic         c1_load, c1_err_pos, c2_load, c2_err_pos;
  logic [M-1:0] c1_k_init, c1_x, c1_eval, c2_k_init, c2_x, c2_eval;
  logic [M-1:0] c1_beta [T];
  logic [M-1:0] c2_coef [T+1];

  rs_bch_blocks_top dut (.*);

  gf_ref f;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_clean = 0, n_errored = 0, n_stall = 0, n_b2b = 0, n_serial = 0;
  int n_reload = 0, n_c1_pos = 0, n_c2_pos = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // received word r[i] (coefficient of x^i), error positions and values
  int r [];
  int epos [$];
  int eval_ [$];
  int exp_s [2*T];

  task automatic make_word(int nu);
    int p, y;
    f.rs_codeword(N, 2 * T, 0, r);
    epos = {};
    eval_ = {};
    foreach (exp_s[i]) exp_s[i] = 0;
    for (int k = 0; k < nu; k++) begin
      do p = $urandom_range(N - 1, 0); while (p inside {epos});
      y = $urandom_range(Q, 1);
      epos.push_back(p);
      eval_.push_back(y);
      r[p] ^= y;
      foreach (exp_s[i]) exp_s[i] ^= f.mul(y, f.pw(i * p));
    end
  endtask

  // stream the word; stall_pct: chance in percent of a stall before a triple
  task automatic send_word(int stall_pct, output int start_cycle, output int stalls);
    stalls = 0;
    for (int j = N / 3 - 1; j >= 0; j--) begin
      while (j != N / 3 - 1 && $urandom_range(99, 0) < stall_pct) begin
        in_valid = 1'b0; in_sop = 1'b0;
        @(negedge clk);
        stalls++;
      end
      in_valid = 1'b1; in_sop = (j == N / 3 - 1);
      in_hi = M'(r[3*j+2]); in_mid = M'(r[3*j+1]); in_lo = M'(r[3*j]);
      if (j == N / 3 - 1) start_cycle = cycle;
      @(negedge clk);
    end
    in_valid = 1'b0; in_sop = 1'b0;
    n_stall += stalls;
  endtask

  task automatic wait_check_synd(int start_cycle, int stalls);
    int guard;
    guard = 0;
    while (!synd_valid && guard < 400) begin @(negedge clk); guard++; end
    check("syndromes arrive", int'(synd_valid), 1);
    check("iterations", cycle - start_cycle, N / 3 + 1 + stalls);
    foreach (exp_s[i]) check($sformatf("S%0d", i), int'(synd[i]), exp_s[i]);
    if (epos.size() == 0) n_clean++; else n_errored++;
  endtask

  // expected Chien steps: alpha^j = alpha^(-e), j in 1..255
  function automatic void expected_steps(output int js [$]);
    js = {};
    foreach (epos[k]) js.push_back(((Q - epos[k]) % Q == 0) ? Q : (Q - epos[k]) % Q);
    js.sort();
  endfunction

  task automatic run_chien2(output int hits [$]);
    int lp [];
    lp = new[1];
    lp[0] = 1;
    // L(x) = prod (1 + X_k x) = prod X_k * (x + X_k^-1)
    foreach (epos[k]) begin
      f.mul_root(lp, f.pw(-epos[k]));
      foreach (lp[i]) lp[i] = f.mul(lp[i], f.pw(epos[k]));
    end
    foreach (c2_coef[i]) c2_coef[i] = (i < lp.size()) ? M'(lp[i]) : '0;
    c2_k_init = M'(1);
    c2_load = 1'b1;
    @(negedge clk);
    c2_load = 1'b0;
    hits = {};
    for (int j = 1; j <= Q; j++) begin
      check("c2 x", int'(c2_x), f.pw(j));
      check("c2 eval", int'(c2_eval), f.eval(lp, f.pw(j)));
      if (c2_err_pos) hits.push_back(j);
      @(negedge clk);
    end
  endtask

  task automatic run_chien1(output int hits [$]);
    int a;
    a = $urandom_range(Q, 1);
    foreach (c1_beta[k]) c1_beta[k] = M'(f.mul(a, f.pw(-epos[k])));
    c1_k_init = M'(a);
    c1_load = 1'b1;
    @(negedge clk);
    c1_load = 1'b0;
    hits = {};
    for (int j = 1; j <= Q; j++) begin
      check("c1 x", int'(c1_x), f.mul(a, f.pw(j)));
      if (c1_err_pos) hits.push_back(j);
      @(negedge clk);
    end
  endtask

  task automatic compare_steps(string who, int hits [$], int js [$]);
    check({who, " number of error positions"}, hits.size(), js.size());
    foreach (hits[i]) if (i < js.size()) check({who, " error position"}, hits[i], js[i]);
  endtask

  initial begin
    int sc, st, js [$], hits [$];
    int nus [8] = '{0, 3, 8, 1, 8, 5, 2, 8};
    f = new(M, 'h11D);
    {in_valid, in_sop, synd_shift, c1_load, c2_load} = '0;
    {in_hi, in_mid, in_lo, c1_k_init, c2_k_init} = '0;
    foreach (c1_beta[k]) c1_beta[k] = '0;
    foreach (c2_coef[i]) c2_coef[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    foreach (nus[w]) begin
      make_word(nus[w]);
      send_word((w % 2) ? 15 : 0, sc, st);
      wait_check_synd(sc, st);
      expected_steps(js);
      run_chien2(hits);
      compare_steps("chien2", hits, js);
      n_c2_pos += hits.size();
      if (nus[w] == T) begin
        run_chien1(hits);
        compare_steps("chien1", hits, js);
        n_c1_pos += hits.size();
      end
    end

    // two words back to back: the second starts on the load clock of the first
    begin
      int s_first [2*T];
      make_word(4);
      send_word(0, sc, st);
      s_first = exp_s;
      // dut loads on this clock; start the next word now
      check("back-to-back: load clock", int'(dut.u_synd.load_q), 1);
      make_word(6);
      fork
        begin
          int sc2, st2;
          send_word(0, sc2, st2);
          wait_check_synd(sc2, st2);
        end
        begin
          @(negedge clk);
          check("b2b first word valid", int'(synd_valid), 1);
          foreach (s_first[i]) check("b2b first word S", int'(synd[i]), s_first[i]);
          n_b2b++;
        end
      join
    end

    // serial read-out of the last syndromes: S15 first
    begin
      int last [2*T];
      foreach (last[i]) last[i] = int'(synd[i]);
      for (int i = 2 * T - 1; i >= 0; i--) begin
        check("serial syndrome", int'(synd_serial), last[i]);
        synd_shift = 1'b1;
        @(negedge clk);
        synd_shift = 1'b0;
      end
      n_serial++;
    end

    // Chien reload in the middle of a search restarts the register
    c2_k_init = M'(1);
    c2_load = 1'b1;
    @(negedge clk);
    c2_load = 1'b0;
    repeat (40) @(negedge clk);
    c2_load = 1'b1;
    c2_k_init = M'(7);
    @(negedge clk);
    c2_load = 1'b0;
    check("chien reload", int'(c2_x), f.mul(7, f.pw(1)));
    n_reload++;

    $display("clean=%0d errored=%0d stalls=%0d b2b=%0d serial=%0d reload=%0d c1_pos=%0d c2_pos=%0d",
             n_clean, n_errored, n_stall, n_b2b, n_serial, n_reload, n_c1_pos, n_c2_pos);
    if (n_clean == 0)   begin failures++; $display("FAIL no clean word"); end
    if (n_errored == 0) begin failures++; $display("FAIL no word with errors"); end
    if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back words"); end
    if (n_serial == 0)  begin failures++; $display("FAIL no serial read-out"); end
    if (n_reload == 0)  begin failures++; $display("FAIL no Chien reload"); end
    if (n_c1_pos == 0)  begin failures++; $display("FAIL first-factorization search found nothing"); end
    if (n_c2_pos == 0)  begin failures++; $display("FAIL second-factorization search found nothing"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
