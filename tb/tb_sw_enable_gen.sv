// Self-checking testbench for sw_enable_gen.
//
// Drives random and directed subword / sign / en_above values and compares
// the enable against a reference model: the subword is enabled when the
// stage above is enabled, when any of its bits differs from the sign bit, or
// when the sign differs from the sign seen on the previous clock (0 after
// reset). Each case of the four is counted and must occur.
module tb_sw_enable_gen;
  localparam int unsigned M = 5;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [M-1:0] subword;
  logic         sign;
  logic         en_above;
  logic         en;

  int checks = 0;
  int failures = 0;
  logic model_prev_sign;
  int n_above = 0, n_info = 0, n_flip = 0, n_gated = 0;

  sw_enable_gen #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [M-1:0] sw, input logic s, input logic ab);
    logic exp;
    @(negedge clk);
    subword  = sw;
    sign     = s;
    en_above = ab;
    #1;
    exp = ab | (sw != {M{s}}) | (s != model_prev_sign);
    if (ab) n_above++;
    if (sw != {M{s}}) n_info++;
    if (s != model_prev_sign) n_flip++;
    if (!exp) n_gated++;
    checks++;
    if (en !== exp) begin
      failures++;
      $display("mismatch sw=%b sign=%b above=%b prev=%b en=%b exp=%b",
               sw, s, ab, model_prev_sign, en, exp);
    end
    @(posedge clk);
    model_prev_sign = s;
  endtask

  initial begin
    rst_n = 1'b0; subword = '0; sign = 1'b0; en_above = 1'b0;
    repeat (2) @(posedge clk);
    model_prev_sign = 1'b0;
    rst_n = 1'b1;
    // Directed: positive zero subword gated, negative all-ones gated after flip.
    apply('0, 1'b0, 1'b0);
    apply(5'b00100, 1'b0, 1'b0);
    apply('1, 1'b1, 1'b0);     // sign flip
    apply('1, 1'b1, 1'b0);     // gated negative
    apply(5'b11011, 1'b1, 1'b0);
    apply('1, 1'b1, 1'b1);     // enabled from above
    apply('0, 1'b0, 1'b0);     // flip back
    apply('0, 1'b0, 1'b0);
    for (int i = 0; i < 2000; i++) begin
      logic s;
      logic [M-1:0] sw;
      s = 1'($urandom);
      // Bias toward words that are pure sign copies so gating happens often.
      sw = ($urandom % 3 == 0) ? M'($urandom) : {M{s}};
      apply(sw, s, ($urandom % 4) == 0);
    end
    if (n_above == 0 || n_info == 0 || n_flip == 0 || n_gated == 0) begin
      failures++;
      $display("a case never occurred: above=%0d info=%0d flip=%0d gated=%0d",
               n_above, n_info, n_flip, n_gated);
    end
    $display("cases: above=%0d info=%0d flip=%0d gated=%0d", n_above, n_info, n_flip, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
