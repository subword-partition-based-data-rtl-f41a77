// Shared constants and types of the subword-partitioned clock-gating design.
//
// A W-bit two's-complement word is seen as one sign bit plus P subwords of
// M = (W-1)/P magnitude bits each. The defaults are a 16-bit word in three
// 5-bit subwords, the sizes shown for the reference design; the 6-tap count
// and 16-bit coefficients are this design's own choice (one multiplier per
// DSP slice of the reference implementation).
package sw_cg_pkg;

  // Word width n+1, including the sign bit.
  localparam int unsigned SW_W     = 16;
  // Number of magnitude subwords p.
  localparam int unsigned SW_P     = 3;
  // Bits per subword m = n/p.
  localparam int unsigned SW_M     = (SW_W - 1) / SW_P;
  // FIR tap count and coefficient width.
  localparam int unsigned FIR_TAPS = 6;
  localparam int unsigned FIR_COEF_W = 16;

  // Operator of the two-register arithmetic stage.
  typedef enum logic {
    SW_OP_ADD = 1'b0,
    SW_OP_MUL = 1'b1
  } sw_op_e;

  // How a subword register is gated: a load enable on the common clock
  // (mapped to clock-gating cells or clock-enable pins by synthesis), or an
  // explicit latch-based clock-gating cell per subword.
  typedef enum logic {
    SW_GATE_ENABLE = 1'b0,
    SW_GATE_ICG    = 1'b1
  } sw_gate_e;

endpackage
