// End-to-end testbench of sw_fir_top at its default sizes (16-bit words,
// three 5-bit subwords, 6 taps, 16-bit coefficients).
//
// The FIR filter gets a low-pass coefficient set (Q1.15, unit DC gain) and a
// sine in its passband plus approximately Gaussian noise, in segments of
// large, medium and small amplitude, so that the shared input register runs
// with all, two and one subwords clocked. Every output is compared with a
// direct-form reference over the input history (this also fixes the 2-clock
// latency). The same filter is also run, in the reference only, on the noise
// alone: the output noise power must be well below the input noise power, so
// the passband sine survives while the noise is attenuated.
// In parallel the two-register multiplier stage gets random operands and its
// products are checked.
// Mechanisms counted, each of which must occur at least once:
//   - upper subword 2 gated, subword 1 gated (input register),
//   - subword 1 loaded only because subword 2 above it was enabled (cascade),
//   - all subwords loaded because the sign changed while the word was small,
//   - gating in both operand registers of the multiplier stage.
module tb_sw_fir_top;
  localparam int unsigned W      = 16;
  localparam int unsigned P      = 3;
  localparam int unsigned M      = (W - 1) / P;
  localparam int unsigned N_TAPS = 6;
  localparam int unsigned COEF_W = 16;
  localparam int unsigned Y_W    = 16;
  localparam int unsigned ACC_W  = W + COEF_W + $clog2(N_TAPS);
  localparam real PI = 3.14159265358979;

  logic                          clk = 1'b0;
  logic                          rst_n;
  logic [W-1:0]                  x;
  logic [N_TAPS-1:0][COEF_W-1:0] coef;
  logic [Y_W-1:0]                y;
  logic [ACC_W-1:0]              y_full;
  logic [P-1:0]                  x_sw_en;
  logic [W-1:0]                  op_a, op_b;
  logic [2*W-1:0]                op_result;
  logic [P-1:0]                  op_a_en, op_b_en;

  int checks = 0;
  int failures = 0;
  int n_gate2 = 0, n_gate1 = 0, n_cascade = 0, n_signflip = 0;
  int n_op_a_gated = 0, n_op_b_gated = 0;
  longint hist [N_TAPS];
  longint nhist [N_TAPS];
  real in_noise_pow = 0.0, out_noise_pow = 0.0;

  sw_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int noise(int sigma4);
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom % (2 * sigma4 + 1)) - sigma4;
    return s / 2;
  endfunction

  function automatic logic [W-1:0] rand_word();
    return W'($signed(W'($urandom)) >>> ($urandom % W));
  endfunction

  initial begin
    int amps [3] = '{12000, 600, 25};
    logic prev_sign;
    coef = {16'sd1638, 16'sd6554, 16'sd8192, 16'sd8192, 16'sd6554, 16'sd1638};
    rst_n = 1'b0;
    x = '0;
    op_a = '0;
    op_b = '0;
    for (int k = 0; k < N_TAPS; k++) begin
      hist[k] = 0;
      nhist[k] = 0;
    end
    prev_sign = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int seg = 0; seg < 6; seg++) begin
      int amp;
      amp = amps[seg % 3];
      for (int n = 0; n < 1500; n++) begin
        real v;
        int nz;
        logic [W-1:0] xs, a_s, b_s;
        longint exp_y, exp_noise;
        logic signed [2*W-1:0] exp_prod;
        logic s;
        v = real'(amp) * $sin(2.0 * PI * real'(n) / 80.0);
        nz = noise(amp / 6 + 1);
        xs = W'($rtoi(v) + nz);
        a_s = rand_word();
        b_s = rand_word();
        @(negedge clk);
        x = xs;
        op_a = a_s;
        op_b = b_s;
        #1;
        // Mechanism counters, taken from the enables the design applies.
        s = xs[W-1];
        if (!x_sw_en[2]) n_gate2++;
        if (!x_sw_en[1]) n_gate1++;
        if (x_sw_en[1] && x_sw_en[2] && xs[M +: M] == {M{s}}
            && xs[2*M +: M] != {M{s}}) n_cascade++;
        if (s != prev_sign && x_sw_en == '1 && xs[2*M +: M] == {M{s}}
            && xs[M +: M] == {M{s}}) n_signflip++;
        if (op_a_en != '1) n_op_a_gated++;
        if (op_b_en != '1) n_op_b_gated++;
        prev_sign = s;
        exp_prod = (2*W)'($signed(a_s)) * (2*W)'($signed(b_s));
        @(posedge clk);
        #1;
        // FIR output for the samples applied before this one.
        exp_y = 0;
        exp_noise = 0;
        for (int k = 0; k < N_TAPS; k++) begin
          exp_y += longint'($signed(coef[k])) * hist[k];
          exp_noise += longint'($signed(coef[k])) * nhist[k];
        end
        checks++;
        if (longint'($signed(y_full)) != exp_y || y !== Y_W'(exp_y >>> (COEF_W - 1))) begin
          failures++;
          $display("FIR mismatch y_full=%0d exp=%0d", longint'($signed(y_full)), exp_y);
        end
        checks++;
        if (op_result !== exp_prod) begin
          failures++;
          $display("product mismatch got=%0d exp=%0d", $signed(op_result), exp_prod);
        end
        if (seg == 0 && n >= N_TAPS) begin
          in_noise_pow  += real'(nhist[0]) * real'(nhist[0]);
          out_noise_pow += (real'(exp_noise) / 32768.0) * (real'(exp_noise) / 32768.0);
        end
        for (int k = N_TAPS - 1; k > 0; k--) begin
          hist[k] = hist[k-1];
          nhist[k] = nhist[k-1];
        end
        hist[0] = longint'($signed(xs));
        nhist[0] = longint'(nz);
      end
    end

    $display("noise power in=%0.1f out=%0.1f (ratio %0.3f)",
             in_noise_pow, out_noise_pow, out_noise_pow / in_noise_pow);
    checks++;
    if (!(out_noise_pow < 0.5 * in_noise_pow)) begin
      failures++;
      $display("noise not attenuated");
    end
    $display("subword2 gated=%0d subword1 gated=%0d cascade=%0d signflip=%0d op_a gated=%0d op_b gated=%0d",
             n_gate2, n_gate1, n_cascade, n_signflip, n_op_a_gated, n_op_b_gated);
    if (n_gate2 == 0 || n_gate1 == 0 || n_cascade == 0 || n_signflip == 0
        || n_op_a_gated == 0 || n_op_b_gated == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
