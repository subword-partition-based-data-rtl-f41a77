// Latch-based clock-gating cell.
//
// gclk = clk AND en_l, where en_l is a copy of en taken by a latch that is
// transparent while clk is low. Because en_l cannot change while clk is high,
// gclk has no glitches and no shortened pulses even if en settles late in the
// low phase. This is the usual integrated clock-gating cell; the latch is
// intended. en must be stable before the rising edge of clk (the same setup
// rule as a flip-flop); gclk rises with clk in the cycles where en was high.
module sw_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
