// Clock-enable generation for one subword of a subword-partitioned register.
//
// A subword carries no information (NOI) when all its bits equal the sign bit
// and every more significant subword carries none either. The enable is the
// inverse of NOI, built as in the reference circuit from four terms ORed
// together:
//   - OR of the subword bits while the sign is 0 (a positive word with a one
//     somewhere in this subword),
//   - NAND of the subword bits while the sign is 1 (a negative word with a
//     zero somewhere in this subword),
//   - sign bit XOR a flip-flop copy of the previous sign bit (the word crossed
//     zero, so every subword must be reloaded),
//   - the enable of the next higher subword (en_above), which makes the
//     enables cascade from the top subword down.
// The enable is combinational from the incoming word and is used on the same
// clock edge that loads that word (look-ahead gating). The sign flip-flop
// samples `sign` on every clock and resets to 0; the reset value is this
// design's own choice.
module sw_enable_gen #(
  parameter int unsigned M = sw_cg_pkg::SW_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] subword,
  input  logic         sign,
  input  logic         en_above,
  output logic         en
);

  logic sign_q;
  logic pos_info;
  logic neg_info;
  logic sign_flip;

  always_ff @(posedge clk) begin
    if (!rst_n) sign_q <= 1'b0;
    else        sign_q <= sign;
  end

  always_comb begin
    pos_info  = (|subword) & ~sign;
    neg_info  = ~(&subword) & sign;
    sign_flip = sign ^ sign_q;
    en        = en_above | pos_info | neg_info | sign_flip;
  end

endmodule
