// synd3_block - three-parallel syndrome computation block for an RS or BCH
// code of length N over GF(2^M).
//
// The received word r_{N-1} ... r_0 enters three symbols per clock, highest
// degree first: (r_{N-1}, r_{N-2}, r_{N-3}) on the first clock and
// (r_2, r_1, r_0) on the last. TWO_T cells (synd3_cell) evaluate R(x) at
// alpha^(FCR+i), i = 0..TWO_T-1, in parallel, so all syndromes are ready in
// N/3 clocks instead of the N of a one-symbol-per-clock circuit. On the next
// clock they are copied into the output registers (N/3 + 1 iterations in all)
// and synd_valid rises for one clock. Meanwhile the accumulators are free:
// the first triple of the next codeword may arrive on that same clock.
//
// Interface:
//   in_valid  - a triple is presented this clock; a clock without it is a
//               stall, during which the accumulators hold.
//   in_sop    - the triple is the first of a codeword (restarts the count).
//   in_hi/in_mid/in_lo - r_{3j+2}, r_{3j+1}, r_{3j}.
//   synd[i]   - output register of cell i, i.e. S_{FCR+i} while synd_valid is
//               high; it keeps its value until shift_en moves the chain.
//   shift_en  - moves the chain one place: synd[i] <= synd[i-1], synd[0] <= 0.
//   synd_serial - synd[TWO_T-1], the end of the chain: after a load it
//               shows S_{TWO_T-1}, then one lower syndrome per shift.
// Registers use clk's rising edge and the asynchronous active-low rst_n.
//
// Follows the document: the three-parallel cell, N/3 + 1 iterations, the
// chain of output registers with 0 entering the first cell, and the default
// RS(255,239) configuration with roots alpha^0..alpha^15. This design's own
// choices: the valid/start handshake, the stall, the shift enable, the
// primitive polynomial and the reset. N must be a multiple of 3 (a shortened
// code can be padded with leading zero symbols).
module synd3_block
  import gf_pkg::*;
#(
  parameter int                M         = 8,
  parameter int                N         = 255,
  parameter int                TWO_T     = 16,
  parameter int                FCR       = 0,
  parameter logic [GF_MAX_M:0] PRIM_POLY = default_poly(M)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_sop,
  input  logic [M-1:0] in_hi,
  input  logic [M-1:0] in_mid,
  input  logic [M-1:0] in_lo,
  input  logic         shift_en,
  output logic [M-1:0] synd [TWO_T],
  output logic         synd_valid,
  output logic [M-1:0] synd_serial
);

  localparam int NTRIP = N / 3;              // clocks of input per codeword
  localparam int CW    = $clog2(NTRIP + 1);

  if (N % 3 != 0) begin : g_bad_n
    $error("synd3_block: N must be a multiple of 3");
  end

  logic [CW-1:0] cnt;        // triples of the current codeword accepted so far
  logic          last_acc;   // the triple accepted now completes the codeword
  logic          load_q;     // copy accumulators to the output registers
  logic [M-1:0]  chain [TWO_T+1];

  assign last_acc = in_valid && (in_sop ? (NTRIP == 1) : (cnt == CW'(NTRIP - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      load_q     <= 1'b0;
      synd_valid <= 1'b0;
    end else begin
      if (in_valid) cnt <= last_acc ? '0 : (in_sop ? CW'(1) : cnt + 1'b1);
      load_q     <= last_acc;
      synd_valid <= load_q;
    end
  end

  assign chain[0] = '0;

  for (genvar i = 0; i < TWO_T; i++) begin : g_cell
    synd3_cell #(
      .M        (M),
      .PRIM_POLY(PRIM_POLY),
      .ROOT_EXP (FCR + i)
    ) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (in_valid),
      .first (in_sop),
      .r_hi  (in_hi),
      .r_mid (in_mid),
      .r_lo  (in_lo),
      .load  (load_q),
      .shift (shift_en),
      .s_prev(chain[i]),
      .s_out (chain[i+1])
    );
    assign synd[i] = chain[i+1];
  end

  assign synd_serial = chain[TWO_T];

  // A triple that is not the start of a codeword must continue one.
  a_sop_first: assert property (@(posedge clk) disable iff (!rst_n)
                                (in_valid && !in_sop) |-> (cnt != '0))
    else $error("synd3_block: triple without in_sop outside a codeword");

endmodule
