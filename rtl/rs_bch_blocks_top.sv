// rs_bch_blocks_top - the syndrome and Chien-search stages of an RS(255,239)
// decoder over GF(2^8) (t = 8), built from the reduced-complexity circuits:
//   * u_synd  - three-parallel syndrome block: 16 syndromes S_0..S_15 in
//               N/3 + 1 = 86 clocks per codeword instead of 256;
//   * u_chien1 - Chien search on the locator given as T first-degree factors
//               (aX + beta_k) sharing one stepping register;
//   * u_chien2 - Chien search on the locator given by its T+1 coefficients,
//               evaluated with coefficient pairs sharing powers of X.
// The stage that turns syndromes into a locator polynomial (a key-equation
// solver such as Berlekamp-Massey) is not part of this design, so the
// syndromes leave the top as outputs and the locator enters as inputs: the
// three blocks stand side by side, with their own ports, and share only the
// clock and the reset.
//
// Timing is that of the blocks: the syndrome block takes one triple
// (in_hi, in_mid, in_lo) = (r_{3j+2}, r_{3j+1}, r_{3j}) per clock with
// in_valid, starting each codeword with in_sop; synd_valid marks the clock
// in which synd[] holds S_0..S_15. Each Chien block starts a search on c*_load
// and steps its register by alpha every clock; c*_eval and c*_err_pos are
// combinational from that register. Reset is asynchronous, active low.
module rs_bch_blocks_top
  import gf_pkg::*;
#(
  parameter int                M         = 8,
  parameter int                N         = 255,
  parameter int                T         = 8,
  parameter int                FCR       = 0,
  parameter logic [GF_MAX_M:0] PRIM_POLY = default_poly(M)
) (
  input  logic         clk,
  input  logic         rst_n,
  // syndrome stage
  input  logic         in_valid,
  input  logic         in_sop,
  input  logic [M-1:0] in_hi,
  input  logic [M-1:0] in_mid,
  input  logic [M-1:0] in_lo,
  input  logic         synd_shift,
  output logic [M-1:0] synd [2*T],
  output logic         synd_valid,
  output logic [M-1:0] synd_serial,
  // Chien search, first factorization
  input  logic         c1_load,
  input  logic [M-1:0] c1_k_init,
  input  logic [M-1:0] c1_beta [T],
  output logic [M-1:0] c1_x,
  output logic [M-1:0] c1_eval,
  output logic         c1_err_pos,
  // Chien search, second factorization
  input  logic         c2_load,
  input  logic [M-1:0] c2_k_init,
  input  logic [M-1:0] c2_coef [T+1],
  output logic [M-1:0] c2_x,
  output logic [M-1:0] c2_eval,
  output logic         c2_err_pos
);

  synd3_block #(
    .M        (M),
    .N        (N),
    .TWO_T    (2 * T),
    .FCR      (FCR),
    .PRIM_POLY(PRIM_POLY)
  ) u_synd (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_sop     (in_sop),
    .in_hi      (in_hi),
    .in_mid     (in_mid),
    .in_lo      (in_lo),
    .shift_en   (synd_shift),
    .synd       (synd),
    .synd_valid (synd_valid),
    .synd_serial(synd_serial)
  );

  chien_fact1 #(
    .M        (M),
    .PRIM_POLY(PRIM_POLY),
    .NF       (T)
  ) u_chien1 (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (c1_load),
    .k_init (c1_k_init),
    .beta   (c1_beta),
    .x_reg  (c1_x),
    .eval   (c1_eval),
    .err_pos(c1_err_pos)
  );

  chien_fact2 #(
    .M        (M),
    .PRIM_POLY(PRIM_POLY),
    .DEG      (T)
  ) u_chien2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (c2_load),
    .k_init (c2_k_init),
    .coef   (c2_coef),
    .x_reg  (c2_x),
    .eval   (c2_eval),
    .err_pos(c2_err_pos)
  );

endmodule
