// gf_pkg - Galois-field GF(2^m) arithmetic shared by the syndrome and
// Chien-search blocks.
//
// Field elements are polynomials over GF(2) in the polynomial basis, held in
// the low m bits of a GF_MAX_M-bit word; the field is fixed by m and by its
// primitive polynomial (bit m set). Addition is bitwise XOR. gf_mul is a
// shift-and-add multiplier with reduction by the primitive polynomial; when
// one operand is an elaboration-time constant it collapses to an XOR network,
// which is what the constant multipliers (alpha^i, alpha^2i, alpha^3i) of the
// circuits become. gf_pow gives alpha^e for the constants themselves.
//
// The document fixes the code sizes (GF(2^4) for RS(15,11), GF(2^8) for
// RS(255,239)) but not the primitive polynomials; default_poly returns the
// usual choices: x^4+x+1 (which reproduces the worked RS(15,11) syndromes
// S0=15, S1=3, S2=4, S3=12 with alpha = x) and x^8+x^4+x^3+x^2+1 for GF(2^8).
package gf_pkg;

  localparam int GF_MAX_M = 16;

  typedef logic [GF_MAX_M-1:0] gf_word_t;

  // Primitive polynomial (with the x^m term) commonly used for GF(2^m).
  function automatic logic [GF_MAX_M:0] default_poly(input int m);
    case (m)
      2:       return 17'h00007;  // x^2+x+1
      3:       return 17'h0000B;  // x^3+x+1
      4:       return 17'h00013;  // x^4+x+1
      5:       return 17'h00025;  // x^5+x^2+1
      6:       return 17'h00043;  // x^6+x+1
      7:       return 17'h00089;  // x^7+x^3+1
      8:       return 17'h0011D;  // x^8+x^4+x^3+x^2+1
      9:       return 17'h00211;  // x^9+x^4+1
      10:      return 17'h00409;  // x^10+x^3+1
      11:      return 17'h00805;  // x^11+x^2+1
      12:      return 17'h01053;  // x^12+x^6+x^4+x+1
      13:      return 17'h0201B;  // x^13+x^4+x^3+x+1
      14:      return 17'h04443;  // x^14+x^10+x^6+x+1
      15:      return 17'h08003;  // x^15+x+1
      16:      return 17'h1100B;  // x^16+x^12+x^3+x+1
      default: return 17'h00013;
    endcase
  endfunction

  // Product a*b in GF(2^m) with primitive polynomial poly.
  function automatic gf_word_t gf_mul(input gf_word_t a, input gf_word_t b,
                                      input int m, input logic [GF_MAX_M:0] poly);
    logic [GF_MAX_M:0] acc;
    logic [GF_MAX_M:0] sh;
    acc = '0;
    sh  = {1'b0, a};
    for (int i = 0; i < GF_MAX_M; i++) begin
      if (i < m) begin
        if (b[i]) acc = acc ^ sh;
        sh = sh << 1;
        if (sh[m]) sh = sh ^ poly;
      end
    end
    return acc[GF_MAX_M-1:0];
  endfunction

  // alpha^e in GF(2^m), alpha = x; e may be any non-negative integer.
  function automatic gf_word_t gf_pow(input int e, input int m,
                                      input logic [GF_MAX_M:0] poly);
    gf_word_t r;
    gf_word_t base;
    int       k;
    r    = gf_word_t'(1);
    base = gf_word_t'(2);
    k    = e % ((1 << m) - 1);
    for (int i = 0; i < 32; i++) begin
      if (k[i]) r = gf_mul(r, base, m, poly);
      base = gf_mul(base, base, m, poly);
    end
    return r;
  endfunction

endpackage
