// Top level of the subword clock-gating design.
//
// Holds the two circuits built from the subword-gated register:
//   - u_fir: the transposed-form FIR filter whose shared input register is
//     subword clock gated (the main design; one sample per clock, 2 cycles
//     from x to y);
//   - u_arith: the two-register arithmetic stage (two gated operand registers
//     feeding a multiplier), a stand-alone example of the same register.
// The two share clock and reset but no data; each has its own ports. The
// subword enables of every gated register are brought out so their activity
// can be observed. GATE chooses, for every gated register, between load
// enables (default) and explicit clock-gating cells. rst_n is an active-low
// synchronous reset.
module sw_fir_top
  import sw_cg_pkg::*;
#(
  parameter int unsigned W      = SW_W,
  parameter int unsigned P      = SW_P,
  parameter sw_gate_e    GATE   = SW_GATE_ENABLE,
  parameter int unsigned N_TAPS = FIR_TAPS,
  parameter int unsigned COEF_W = FIR_COEF_W,
  parameter int unsigned Y_W    = SW_W,
  localparam int unsigned ACC_W = W + COEF_W + $clog2(N_TAPS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // FIR filter
  input  logic [W-1:0]                  x,
  input  logic [N_TAPS-1:0][COEF_W-1:0] coef,
  output logic [Y_W-1:0]                y,
  output logic [ACC_W-1:0]              y_full,
  output logic [P-1:0]                  x_sw_en,
  // Two-register arithmetic stage
  input  logic [W-1:0]                  op_a,
  input  logic [W-1:0]                  op_b,
  output logic [2*W-1:0]                op_result,
  output logic [P-1:0]                  op_a_en,
  output logic [P-1:0]                  op_b_en
);

  sw_fir_transposed #(
    .W(W), .P(P), .GATE(GATE), .N_TAPS(N_TAPS), .COEF_W(COEF_W), .Y_W(Y_W)
  ) u_fir (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (x),
    .coef   (coef),
    .y      (y),
    .y_full (y_full),
    .x_sw_en(x_sw_en)
  );

  sw_arith_unit #(.W(W), .P(P), .GATE(GATE), .OP(SW_OP_MUL)) u_arith (
    .clk   (clk),
    .rst_n (rst_n),
    .a     (op_a),
    .b     (op_b),
    .result(op_result),
    .a_en  (op_a_en),
    .b_en  (op_b_en)
  );

endmodule
