// synd3_cell - one cell of the three-parallel syndrome computation block.
//
// The cell evaluates the received polynomial R(x) at one root a = alpha^ROOT_EXP
// by Horner's rule taken three coefficients at a time:
//   acc <- acc * a^3 + r_hi * a^2 + r_mid * a + r_lo
// where (r_hi, r_mid, r_lo) = (r_{3j+2}, r_{3j+1}, r_{3j}) arrive together,
// highest degree first. acc is latch (1) of the cell; the start mux (3)
// replaces the fed-back term by 0 on the first triple of a codeword. After the
// last triple acc holds S = R(a). The output register (2) is fed by mux (4):
// on `load` it takes acc, on `shift` it takes s_prev, the output register of
// the previous cell, so the cells of a block form a shift chain that reads the
// syndromes out one per clock.
//
// Interface and timing: all registers change on the rising edge of clk and are
// cleared by the asynchronous active-low rst_n. acc updates on every edge with
// en = 1 and holds otherwise; s_out updates on load (priority) or shift.
//
// Follows the document: the multiplier set alpha^i, (alpha^i)^2, (alpha^i)^3,
// the start mux with its constant 0, the latch/register pair and the chain
// through S_{i-1}. This design's own choices: which input carries the highest
// degree symbol (taken from the written description of the first clocks), the
// enable that lets the accumulator hold through a gap in the input, the shift
// enable on register (2), and the reset.
module synd3_cell
  import gf_pkg::*;
#(
  parameter int                M         = 8,
  parameter logic [GF_MAX_M:0] PRIM_POLY = default_poly(M),
  parameter int                ROOT_EXP  = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,      // accept one triple this clock
  input  logic         first,   // the triple is the first of a codeword (mux 3)
  input  logic [M-1:0] r_hi,    // r_{3j+2}, multiplied by a^2
  input  logic [M-1:0] r_mid,   // r_{3j+1}, multiplied by a
  input  logic [M-1:0] r_lo,    // r_{3j},   added directly
  input  logic         load,    // mux 4: register (2) takes the accumulator
  input  logic         shift,   // register (2) takes s_prev
  input  logic [M-1:0] s_prev,  // register (2) of the previous cell
  output logic [M-1:0] s_out    // register (2): syndrome / shift chain
);

  localparam gf_word_t A1 = gf_pow(ROOT_EXP,     M, PRIM_POLY);
  localparam gf_word_t A2 = gf_pow(2 * ROOT_EXP, M, PRIM_POLY);
  localparam gf_word_t A3 = gf_pow(3 * ROOT_EXP, M, PRIM_POLY);

  logic [M-1:0] acc;      // latch (1): running Horner sum
  logic [M-1:0] fb;       // output of the start mux (3)
  logic [M-1:0] acc_nxt;

  always_comb begin
    fb      = first ? '0 : M'(gf_mul(gf_word_t'(acc), A3, M, PRIM_POLY));
    acc_nxt = fb
            ^ M'(gf_mul(gf_word_t'(r_hi),  A2, M, PRIM_POLY))
            ^ M'(gf_mul(gf_word_t'(r_mid), A1, M, PRIM_POLY))
            ^ r_lo;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      s_out <= '0;
    end else begin
      if (en)         acc   <= acc_nxt;
      if (load)       s_out <= acc;
      else if (shift) s_out <= s_prev;
    end
  end

endmodule
