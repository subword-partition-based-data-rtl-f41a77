// Self-checking testbench for sw_fir_transposed.
//
// Three parts:
//   1. impulse: a single non-zero sample; the first non-zero output must come
//      exactly 2 clocks after it is applied and equal coef[0]*x, the next ones
//      coef[1]*x, coef[2]*x, ...
//   2. a low-pass coefficient set and a passband sine plus approximately
//      Gaussian noise (sum of four uniform values), first at a large and then
//      at a small amplitude, so that the input register gates its upper
//      subwords;
//   3. random asymmetric coefficients and random inputs of random size.
// In parts 2 and 3 every output is compared with a direct-form reference
// sum over the input history. Gating of each upper subword must occur.
// A second filter built with explicit clock-gating cells runs on the same
// inputs and must give the same outputs.
module tb_sw_fir_transposed;
  localparam int unsigned W      = 16;
  localparam int unsigned P      = 3;
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
  logic [Y_W-1:0]                y_icg;
  logic [ACC_W-1:0]              y_full_icg;
  logic [P-1:0]                  x_sw_en_icg;

  int checks = 0;
  int failures = 0;
  int gated [P];
  longint hist [N_TAPS];   // hist[0] = most recent sample

  sw_fir_transposed #(.W(W), .P(P), .N_TAPS(N_TAPS), .COEF_W(COEF_W), .Y_W(Y_W)) dut (
    .clk, .rst_n, .x, .coef, .y, .y_full, .x_sw_en
  );
  sw_fir_transposed #(
    .W(W), .P(P), .GATE(sw_cg_pkg::SW_GATE_ICG), .N_TAPS(N_TAPS), .COEF_W(COEF_W), .Y_W(Y_W)
  ) dut_icg (
    .clk, .rst_n, .x, .coef, .y(y_icg), .y_full(y_full_icg), .x_sw_en(x_sw_en_icg)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_sum();
    longint s = 0;
    for (int k = 0; k < N_TAPS; k++) s += longint'($signed(coef[k])) * hist[k];
    return s;
  endfunction

  // Apply one sample; after the next edge the output holds the filter result
  // for the sample applied one clock earlier.
  task automatic step(input logic [W-1:0] sample, input bit check);
    longint exp;
    @(negedge clk);
    x = sample;
    #1;
    for (int i = 1; i < P; i++) if (!x_sw_en[i]) gated[i]++;
    @(posedge clk);
    #1;
    exp = ref_sum();
    if (check) begin
      checks++;
      if (y_full_icg !== y_full || y_icg !== y || x_sw_en_icg !== x_sw_en) begin
        failures++;
        $display("clock-gating-cell build differs: %0d vs %0d", longint'($signed(y_full_icg)),
                 longint'($signed(y_full)));
      end
      checks++;
      if (longint'($signed(y_full)) != exp || y !== Y_W'(exp >>> (COEF_W - 1))) begin
        failures++;
        $display("output mismatch y_full=%0d exp=%0d y=%0d", longint'($signed(y_full)), exp, $signed(y));
      end
    end
    for (int k = N_TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'($signed(sample));
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N_TAPS; k++) hist[k] = 0;
  endtask

  function automatic int noise(int sigma4);
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom % (2 * sigma4 + 1)) - sigma4;
    return s / 2;
  endfunction

  initial begin
    int amps [2] = '{8000, 20};
    for (int i = 0; i < P; i++) gated[i] = 0;
    // Low-pass, Q1.15, unit DC gain.
    coef = {16'sd1638, 16'sd6554, 16'sd8192, 16'sd8192, 16'sd6554, 16'sd1638};

    // 1. Impulse and latency.
    do_reset();
    begin
      int first = -1;
      int seen = 0;
      for (int n = 0; n < 12; n++) begin
        @(negedge clk);
        x = (n == 0) ? W'(1000) : '0;
        @(posedge clk);
        #1;
        if (y_full != '0 && first < 0) first = n;
        if (n >= 1 && n <= N_TAPS) begin
          checks++;
          seen++;
          if ($signed(y_full) != 1000 * longint'($signed(coef[n-1]))) begin
            failures++;
            $display("impulse tap %0d: got %0d", n - 1, $signed(y_full));
          end
        end
      end
      // Sample applied before edge 0 appears after edge 1: 2 clocks.
      checks++;
      if (first != 1) begin
        failures++;
        $display("latency wrong: first output after edge %0d", first);
      end
    end

    // 2. Sine in the passband plus noise, large then small amplitude.
    do_reset();
    for (int a = 0; a < 2; a++) begin
      for (int n = 0; n < 1000; n++) begin
        real v;
        v = real'(amps[a]) * $sin(2.0 * PI * real'(n) / 64.0);
        step(W'($rtoi(v) + noise(amps[a] / 8 + 1)), 1'b1);
      end
    end

    // 3. Random asymmetric coefficients and random inputs.
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < N_TAPS; k++) coef[k] = COEF_W'($urandom);
      do_reset();
      for (int n = 0; n < 1000; n++) begin
        step(W'($signed(W'($urandom)) >>> ($urandom % W)), 1'b1);
      end
    end

    for (int i = 1; i < P; i++) begin
      $display("subword %0d gated in %0d cycles", i, gated[i]);
      if (gated[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
