// chien_fact1 - Chien search on an error locator polynomial given in
// factored form (first factorization method).
//
// The locator is written as a product of NF first-degree factors sharing one
// leading coefficient a:
//   L(X) = (aX + beta_0)(aX + beta_1) ... (aX + beta_{NF-1})
// so a single register suffices for the whole search: it holds a*X and is
// multiplied by alpha every clock. Each factor is then just one adder
// (register XOR beta_k), and the factor values are multiplied together by a
// chain of NF-1 general multipliers. The result is zero exactly when the
// current X is a root of L, i.e. marks an error position.
//
// Interface and timing: on a clock edge with load = 1 the register takes
// k_init * alpha, otherwise reg * alpha (the mux in front of the constant
// alpha multiplier). With k_init = a the register therefore runs through
// a*alpha^1, a*alpha^2, ... and after 2^M - 1 steps has visited every nonzero
// X once. eval and err_pos are combinational from the register and the beta
// inputs, so they describe X = alpha^j in the clock after the j-th edge since
// load. The register is cleared by the asynchronous active-low rst_n.
//
// Follows the document: register, alpha multiplier and load mux, one adder per
// factor and the multiplier chain to the error-position output. This design's
// own choices: the load signal, the reset, the zero-detect output err_pos
// and the default field GF(2^4) with two factors (the RS(15,11) example).
module chien_fact1
  import gf_pkg::*;
#(
  parameter int                M         = 4,
  parameter logic [GF_MAX_M:0] PRIM_POLY = default_poly(M),
  parameter int                NF        = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,           // start a new search from k_init
  input  logic [M-1:0] k_init,         // a, the shared leading coefficient
  input  logic [M-1:0] beta [NF],      // constant terms of the factors
  output logic [M-1:0] x_reg,          // a * alpha^j
  output logic [M-1:0] eval,           // L(alpha^j)
  output logic         err_pos         // eval == 0: alpha^j is a root
);

  localparam gf_word_t ALPHA = gf_pow(1, M, PRIM_POLY);

  logic [M-1:0] mux_out;
  logic [M-1:0] fac  [NF];   // value of factor k: aX + beta_k
  logic [M-1:0] prod [NF];   // product of factors 0..k

  assign mux_out = load ? k_init : x_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_reg <= '0;
    else        x_reg <= M'(gf_mul(gf_word_t'(mux_out), ALPHA, M, PRIM_POLY));
  end

  always_comb begin
    for (int k = 0; k < NF; k++) fac[k] = x_reg ^ beta[k];
    prod[0] = fac[0];
    for (int k = 1; k < NF; k++)
      prod[k] = M'(gf_mul(gf_word_t'(prod[k-1]), gf_word_t'(fac[k]), M, PRIM_POLY));
  end

  assign eval    = prod[NF-1];
  assign err_pos = (eval == '0);

endmodule
