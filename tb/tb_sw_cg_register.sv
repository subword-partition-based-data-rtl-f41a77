// Self-checking testbench for sw_cg_register.
//
// Three registers get the same words: the default build (3 subwords, gating
// by load enable), the same size built with explicit clock-gating cells, and
// a 5-subword build (3 bits per subword) to exercise the generic partition.
// It feeds the registers a sampled sine wave at three amplitudes (one needing only
// the lowest subword, one needing two, one needing all three), then random
// words of random size. Every cycle it checks that q equals the word applied
// on the previous clock and that sw_en matches a reference model of the
// enable cascade: subword i (i >= 1) is enabled when any subword j >= i
// differs from a copy of the sign bit, or when the sign differs from the
// previous word's sign. It counts cycles in which each upper subword was
// gated and enables caused by sign changes, and requires each to occur.
module tb_sw_cg_register;
  import sw_cg_pkg::*;
  localparam int unsigned W  = 16;
  localparam int unsigned P  = 3;
  localparam int unsigned M  = (W - 1) / P;
  localparam int unsigned P5 = 5;
  localparam int unsigned M5 = (W - 1) / P5;
  localparam real PI = 3.14159265358979;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] d;
  logic [W-1:0] q;
  logic [P-1:0] sw_en;
  logic [W-1:0] q_icg;
  logic [P-1:0] sw_en_icg;
  logic [W-1:0] q_p5;
  logic [P5-1:0] sw_en_p5;

  int checks = 0;
  int failures = 0;
  int gated [P];
  int gated5 [P5];
  int n_flip_only = 0;
  logic [W-1:0] prev_d;
  int phase = 0;

  sw_cg_register #(.W(W), .P(P)) dut (.*);
  sw_cg_register #(.W(W), .P(P), .GATE(SW_GATE_ICG)) dut_icg (
    .clk, .rst_n, .d, .q(q_icg), .sw_en(sw_en_icg)
  );
  sw_cg_register #(.W(W), .P(P5)) dut_p5 (
    .clk, .rst_n, .d, .q(q_p5), .sw_en(sw_en_p5)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference enables of a register with p subwords of m bits.
  function automatic logic [7:0] model_en(logic [W-1:0] w, logic prev_sign, int p, int m);
    logic [7:0] e;
    logic s;
    logic above;
    logic [W-1:0] mask;
    logic [W-1:0] sub;
    s = w[W-1];
    mask = (W'(1) << m) - 1;
    above = 1'b0;
    e = '0;
    for (int i = p - 1; i >= 1; i--) begin
      sub = (w >> (i * m)) & mask;
      above = above | (sub != (s ? mask : '0)) | (s != prev_sign);
      e[i] = above;
    end
    e[0] = 1'b1;
    return e;
  endfunction

  // Apply one word; check enables before the edge and q after it.
  task automatic apply(input logic [W-1:0] w);
    logic [P-1:0] exp_en;
    logic [P5-1:0] exp_en5;
    logic [2*M-1:0] held_ce, held_icg;
    @(negedge clk);
    d = w;
    #1;
    exp_en = P'(model_en(w, prev_d[W-1], P, M));
    exp_en5 = P5'(model_en(w, prev_d[W-1], P5, M5));
    checks += 3;
    if (sw_en !== exp_en || sw_en_icg !== exp_en) begin
      failures++;
      $display("enable mismatch d=%h prev=%h sw_en=%b icg=%b exp=%b",
               w, prev_d, sw_en, sw_en_icg, exp_en);
    end
    if (sw_en_p5 !== exp_en5) begin
      failures++;
      $display("5-subword enable mismatch d=%h sw_en=%b exp=%b", w, sw_en_p5, exp_en5);
    end
    for (int i = 1; i < P; i++) if (!exp_en[i]) gated[i]++;
    for (int i = 1; i < P5; i++) if (!exp_en5[i]) gated5[i]++;
    held_ce   = {dut.g_sub[2].r, dut.g_sub[1].r};
    held_icg  = {dut_icg.g_sub[2].r, dut_icg.g_sub[1].r};
    // Sign change with the new word small enough to be gated otherwise.
    if (w[W-1] != prev_d[W-1] && w[(P-1)*M +: M] == {M{w[W-1]}}) n_flip_only++;
    @(posedge clk);
    prev_d = w;
    #1;
    // A gated subword must keep its stored bits (its clock did not tick).
    for (int i = 1; i < P; i++) begin
      logic [M-1:0] now_ce, now_icg;
      now_ce  = (i == 1) ? dut.g_sub[1].r : dut.g_sub[2].r;
      now_icg = (i == 1) ? dut_icg.g_sub[1].r : dut_icg.g_sub[2].r;
      if (!exp_en[i]) begin
        checks++;
        if (now_ce !== held_ce[(i-1)*M +: M] || now_icg !== held_icg[(i-1)*M +: M]) begin
          failures++;
          $display("gated subword %0d changed", i);
        end
      end
    end
    checks += 3;
    if (q !== w || q_icg !== w || q_p5 !== w) begin
      failures++;
      $display("data mismatch q=%h icg=%h p5=%h exp=%h (phase %0d)", q, q_icg, q_p5, w, phase);
    end
  endtask

  initial begin
    for (int i = 0; i < P; i++) gated[i] = 0;
    for (int i = 0; i < P5; i++) gated5[i] = 0;
    rst_n = 1'b0;
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0 || q_icg !== '0 || q_p5 !== '0) begin
      failures++;
      $display("reset value wrong: %h", q);
    end
    rst_n = 1'b1;
    prev_d = '0;
    // Sine bursts at growing then shrinking amplitude.
    begin
      int amps [7] = '{10, 500, 15000, 500, 10, 15000, 10};
      for (int a = 0; a < 7; a++) begin
        phase = a;
        for (int n = 0; n < 200; n++) begin
          real v;
          v = real'(amps[a]) * $sin(2.0 * PI * real'(n) / 50.0);
          apply(W'($rtoi(v)));
        end
      end
    end
    // Random words of random magnitude.
    phase = 7;
    for (int n = 0; n < 3000; n++) begin
      int sh;
      logic [W-1:0] r;
      sh = $urandom % W;
      r = W'($signed(W'($urandom)) >>> sh);
      apply(r);
    end
    for (int i = 1; i < P; i++) begin
      $display("subword %0d gated in %0d cycles", i, gated[i]);
      if (gated[i] == 0) begin
        failures++;
        $display("subword %0d was never gated", i);
      end
    end
    for (int i = 1; i < P5; i++) begin
      $display("5-subword build: subword %0d gated in %0d cycles", i, gated5[i]);
      if (gated5[i] == 0) failures++;
    end
    $display("sign changes that forced small words to load: %0d", n_flip_only);
    if (n_flip_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
