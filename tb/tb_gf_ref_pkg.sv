// tb_gf_ref_pkg - reference GF(2^m) arithmetic for the testbenches.
//
// Works independently of the RTL's shift-and-add multiplier: the class builds
// exponent and logarithm tables by stepping an LFSR (multiply by x, reduce by
// the primitive polynomial) and multiplies through them. It also offers
// polynomial helpers used to build test data: Horner evaluation, products
// with (x + root) factors and RS codeword construction as m(x) * g(x).
package tb_gf_ref_pkg;

  class gf_ref;
    int m;
    int q;             // 2^m - 1, the order of alpha
    int exp_t [];
    int log_t [];

    function new(int m_in, int poly);
      int x;
      m = m_in;
      q = (1 << m) - 1;
      exp_t = new[2 * q];
      log_t = new[q + 1];
      x = 1;
      for (int i = 0; i < q; i++) begin
        exp_t[i] = x;
        log_t[x] = i;
        x = x << 1;
        if (x > q) x = x ^ poly;
      end
      for (int i = q; i < 2 * q; i++) exp_t[i] = exp_t[i - q];
      log_t[0] = 0;
    endfunction

    function int mul(int a, int b);
      if (a == 0 || b == 0) return 0;
      return exp_t[log_t[a] + log_t[b]];
    endfunction

    // alpha^e for any integer e (negative allowed)
    function int pw(int e);
      int r;
      r = e % q;
      if (r < 0) r = r + q;
      return exp_t[r];
    endfunction

    function int inv(int a);
      return exp_t[(q - log_t[a]) % q];
    endfunction

    // p[i] is the coefficient of x^i
    function int eval(int p [], int x);
      int s;
      s = 0;
      for (int i = p.size() - 1; i >= 0; i--) s = mul(s, x) ^ p[i];
      return s;
    endfunction

    // p(x) * (x + r)
    function void mul_root(ref int p [], input int r);
      int n [];
      n = new[p.size() + 1];
      foreach (n[i]) n[i] = 0;
      foreach (p[i]) begin
        n[i + 1] ^= p[i];
        n[i]     ^= mul(p[i], r);
      end
      p = n;
    endfunction

    // RS codeword of length n with 2t roots alpha^fcr..alpha^(fcr+2t-1):
    // c(x) = msg(x) * g(x). c[i] is the coefficient of x^i.
    function void rs_codeword(int n, int two_t, int fcr, ref int c []);
      int g [];
      int msg [];
      g = new[1];
      g[0] = 1;
      for (int i = 0; i < two_t; i++) mul_root(g, pw(fcr + i));
      msg = new[n - two_t];
      foreach (msg[i]) msg[i] = $urandom_range(q, 0);
      c = new[n];
      foreach (c[i]) c[i] = 0;
      foreach (msg[i])
        foreach (g[j]) c[i + j] ^= mul(msg[i], g[j]);
    endfunction
  endclass

endpackage
