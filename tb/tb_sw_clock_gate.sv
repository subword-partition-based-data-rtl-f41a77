// Self-checking testbench for sw_clock_gate.
//
// Each clock period sets en to a random value during the low phase, then
// toggles en at random points of the high phase. The gated clock must be high
// throughout the high phase exactly when en was high at the rising edge, must
// not change while clk is high, and must be low while clk is low. Rising
// edges of gclk are counted and compared with the number of enabled cycles.
`timescale 1ns/1ps
module tb_sw_clock_gate;
  logic clk = 1'b0;
  logic en = 1'b0;
  logic gclk;

  int checks = 0;
  int failures = 0;
  int gclk_edges = 0;
  int expected_edges = 0;
  int glitch_tries = 0;

  sw_clock_gate dut (.clk, .en, .gclk);

  always @(posedge gclk) gclk_edges++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic want;
      // Low phase (10 ns): set the enable somewhere inside it.
      want = 1'($urandom);
      #(1 + $urandom % 7);
      en = want;
      #0.5;
      checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("gclk high while clk low");
      end
      @(posedge clk);
      if (want) expected_edges++;
      // High phase: toggle en and check that gclk stays put.
      for (int k = 0; k < 3; k++) begin
        #(1 + $urandom % 2);
        en = 1'($urandom);
        if (en != want) glitch_tries++;
        #0.5;
        checks++;
        if (gclk !== want) begin
          failures++;
          $display("gclk=%b during high phase, enable at edge was %b", gclk, want);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (gclk_edges != expected_edges) begin
      failures++;
      $display("gclk edges %0d, expected %0d", gclk_edges, expected_edges);
    end
    $display("enabled cycles %0d, en changes while clk high %0d", expected_edges, glitch_tries);
    if (glitch_tries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin
    #10 clk = 1'b1;
    #10 clk = 1'b0;
  end
endmodule
