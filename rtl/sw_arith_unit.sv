// Two-register arithmetic stage with subword clock gating.
//
// Operands a and b are each captured in an sw_cg_register (sign bit plus P
// gated subwords). The two registered words feed one combinational operator,
// an adder or a multiplier chosen by the OP parameter, whose result is the
// output. Small operands leave the upper subwords of their register unclocked,
// so the operator inputs do not toggle there either.
//
// Timing: a and b are sampled on a rising edge; result shows their sum or
// product (signed, 2*W bits) after that edge, combinationally from the
// registers. Operator choice by parameter and the 2*W result width are this
// design's own choices; the reference shows a combined "adder/multiplier"
// block without detail.
module sw_arith_unit
  import sw_cg_pkg::*;
#(
  parameter int unsigned W  = SW_W,
  parameter int unsigned P  = SW_P,
  parameter sw_gate_e    GATE = SW_GATE_ENABLE,
  parameter sw_op_e      OP = SW_OP_MUL
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] result,
  output logic [P-1:0]   a_en,
  output logic [P-1:0]   b_en
);

  logic [W-1:0] a_q;
  logic [W-1:0] b_q;

  sw_cg_register #(.W(W), .P(P), .GATE(GATE)) u_reg_a (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (a),
    .q    (a_q),
    .sw_en(a_en)
  );

  sw_cg_register #(.W(W), .P(P), .GATE(GATE)) u_reg_b (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (b),
    .q    (b_q),
    .sw_en(b_en)
  );

  always_comb begin
    if (OP == SW_OP_MUL) result = $signed(a_q) * $signed(b_q);
    else                 result = (2*W)'($signed(a_q)) + (2*W)'($signed(b_q));
  end

endmodule
