// Transposed-form FIR filter with a subword clock-gated input register.
//
// y[n] = sum_{k=0}^{N_TAPS-1} coef[k] * x[n-k].
// The input sample is captured in one sw_cg_register and broadcast to all
// N_TAPS multipliers, so a single enable generator serves every multiplier:
// for a small input the upper subwords of that register are not clocked and
// the multiplier inputs they drive stay still. Products are summed in the
// transposed order: the multiplier of the last coefficient feeds the first
// pipeline register, each later adder adds its product to the register before
// it, and the adder with coef[0] produces the output.
//
// Widths: pipeline registers hold ACC_W = W + COEF_W + clog2(N_TAPS) bits, so
// no sum overflows. y_full is the full sum; y is y_full shifted right by
// COEF_W-1 and cut to Y_W bits, which for Q1.15 coefficients puts y on the
// scale of x (wrapping if the filter gain exceeds one).
//
// Timing: one sample per clock. A sample on x at edge t is in y/y_full after
// edge t+1 (2 cycles: input register, output register). rst_n is an
// active-low synchronous reset clearing every register. The 16-bit input and
// output, the transposed structure and the single shared gated input register
// follow the reference design; the tap count, coefficient width, output
// register and output scaling are this design's own choices.
module sw_fir_transposed
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
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [W-1:0]                   x,
  input  logic [N_TAPS-1:0][COEF_W-1:0]  coef,
  output logic [Y_W-1:0]                 y,
  output logic [ACC_W-1:0]               y_full,
  output logic [P-1:0]                   x_sw_en
);

  if (N_TAPS < 2 || ACC_W < COEF_W - 1 + Y_W) begin : g_bad_size
    $error("sw_fir_transposed: need N_TAPS >= 2 and ACC_W >= COEF_W-1+Y_W");
  end

  logic [W-1:0] x_q;
  logic signed [W+COEF_W-1:0] prod [N_TAPS];
  logic signed [ACC_W-1:0]    acc_d [N_TAPS];
  logic [N_TAPS-1:0][ACC_W-1:0] acc_q;          // acc_q[0] is the output register

  sw_cg_register #(.W(W), .P(P), .GATE(GATE)) u_xreg (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (x),
    .q    (x_q),
    .sw_en(x_sw_en)
  );

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) begin
      prod[k] = $signed(x_q) * $signed(coef[k]);
    end
    acc_d[N_TAPS-1] = ACC_W'(prod[N_TAPS-1]);
    for (int k = N_TAPS - 2; k >= 0; k--) begin
      acc_d[k] = ACC_W'(prod[k]) + $signed(acc_q[k+1]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
    end else begin
      for (int k = 0; k < N_TAPS; k++) acc_q[k] <= acc_d[k];
    end
  end

  assign y_full = acc_q[0];
  assign y      = acc_q[0][COEF_W-1 +: Y_W];

endmodule
