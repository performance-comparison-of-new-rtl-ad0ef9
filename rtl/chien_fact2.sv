// chien_fact2 - Chien search on an error locator polynomial of degree DEG
// evaluated in paired form (second factorization method).
//
// The coefficients are grouped two by two, each pair sharing one power of X:
//   odd DEG:  L(X) = sum_{k} X^(2k)   (A_{2k+1} X + A_{2k})
//   even DEG: L(X) = sum_{k} X^(2k+1) (A_{2k+2} X + A_{2k+1})  + A_0
// e.g. degree 5: X^4(AX+B) + X^2(CX+D) + (EX+F). One register holds X and is
// multiplied by alpha every clock. A squarer-and-multiply chain builds the
// shared powers (X^2, X^4, ... or X, X^3, X^5, ...) once, and each pair costs
// one coefficient multiplier, one adder and one power multiplier, so about
// half the multipliers of the one-term-per-coefficient search remain.
// eval is zero exactly when X is a root, i.e. marks an error position.
//
// Interface and timing: on a clock edge with load = 1 the register takes
// k_init * alpha, otherwise reg * alpha. With k_init = 1 it visits alpha^1,
// alpha^2, ..., alpha^(2^M-1) = 1. coef[i] is A_i, the coefficient of X^i, and
// is held constant during a search. eval and err_pos are combinational from
// the register and coef. The register is cleared by the asynchronous
// active-low rst_n.
//
// Follows the document: the pairing of the coefficients for odd and even
// degree, the shared power chain, the register with its alpha multiplier and
// mux. This design's own choices: the load signal, the reset, err_pos, the
// order in which the powers are built, and the default field GF(2^4).
module chien_fact2
  import gf_pkg::*;
#(
  parameter int                M         = 4,
  parameter logic [GF_MAX_M:0] PRIM_POLY = default_poly(M),
  parameter int                DEG       = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] k_init,
  input  logic [M-1:0] coef [DEG+1],   // coef[i] = A_i
  output logic [M-1:0] x_reg,          // X = k_init * alpha^j
  output logic [M-1:0] eval,           // L(X)
  output logic         err_pos         // eval == 0
);

  localparam gf_word_t ALPHA = gf_pow(1, M, PRIM_POLY);
  localparam bit       ODD   = (DEG % 2) == 1;
  localparam int       NP    = (DEG + 1) / 2;   // number of coefficient pairs
  localparam int       OFF   = ODD ? 0 : 1;     // index of the lower coefficient of pair 0

  logic [M-1:0] mux_out;
  logic [M-1:0] x_sq;
  logic [M-1:0] pw   [NP];   // power of X multiplying pair k
  logic [M-1:0] pair [NP];   // A_hi X + A_lo of pair k
  logic [M-1:0] term [NP];   // pair k times its power of X
  logic [M-1:0] sum;

  assign mux_out = load ? k_init : x_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_reg <= '0;
    else        x_reg <= M'(gf_mul(gf_word_t'(mux_out), ALPHA, M, PRIM_POLY));
  end

  assign x_sq = M'(gf_mul(gf_word_t'(x_reg), gf_word_t'(x_reg), M, PRIM_POLY));

  for (genvar k = 0; k < NP; k++) begin : g_pair
    if (k == 0) begin : g_pw0
      assign pw[k] = ODD ? M'(1) : x_reg;
    end else begin : g_pwk
      assign pw[k] = M'(gf_mul(gf_word_t'(pw[k-1]), gf_word_t'(x_sq), M, PRIM_POLY));
    end
    assign pair[k] = M'(gf_mul(gf_word_t'(coef[2*k+OFF+1]), gf_word_t'(x_reg), M, PRIM_POLY))
                   ^ coef[2*k+OFF];
    if (k == 0 && ODD) begin : g_term0
      assign term[k] = pair[k];          // X^0: no power multiplier
    end else begin : g_termk
      assign term[k] = M'(gf_mul(gf_word_t'(pair[k]), gf_word_t'(pw[k]), M, PRIM_POLY));
    end
  end

  always_comb begin
    sum = ODD ? '0 : coef[0];
    for (int k = 0; k < NP; k++) sum = sum ^ term[k];
  end

  assign eval    = sum;
  assign err_pos = (eval == '0);

endmodule
