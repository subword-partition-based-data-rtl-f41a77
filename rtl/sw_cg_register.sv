// Subword-partitioned register with data-driven clock gating.
//
// The W-bit two's-complement word is held as a sign bit and P subwords of
// M = (W-1)/P bits. The sign bit and subword 0 (the least significant) load on
// every clock. Each higher subword i has its own enable EN_i from an
// sw_enable_gen instance; the instances are chained from subword P-1 down to
// subword 1, so a subword is loaded whenever it or any subword above it holds
// information, or when the sign changes. A subword whose enable is low keeps
// its old (stale) bits and its flip-flops see no clock edge.
//
// Because the true value of a gated subword is a copy of the sign bit, the
// register remembers, per gated subword, whether it was loaded on the last
// clock (a flag flip-flop holding the registered EN_i). The output drives the
// sign bit in place of the stored bits of a subword whose flag is low, so q is
// always exactly the word loaded on the previous clock. This output
// correction is this design's own addition: it costs P-1 flag flip-flops and
// a 2:1 multiplexer per gated bit.
//
// GATE selects how the gating is built. SW_GATE_ENABLE (default) writes it as
// a load condition per subword, which synthesis turns into clock-gating cells
// (ASIC) or clock-enable pins (FPGA). SW_GATE_ICG instantiates one
// latch-based clock-gating cell (sw_clock_gate) per gated subword, so the
// subword flip-flops get a clock that is the common clock ANDed with EN_i;
// this style contains latches and derived clocks by intent.
//
// Interface: d is sampled on the rising clock edge and appears on q one cycle
// later. sw_en shows the enables used on the current edge (bit 0 is always 1).
// rst_n is an active-low synchronous reset that clears the register to zero.
module sw_cg_register
  import sw_cg_pkg::*;
#(
  parameter int unsigned W    = SW_W,
  parameter int unsigned P    = SW_P,
  parameter sw_gate_e    GATE = SW_GATE_ENABLE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [P-1:0] sw_en
);

  localparam int unsigned M = (W - 1) / P;

  if ((W - 1) % P != 0 || P < 2) begin : g_bad_size
    $error("sw_cg_register: W-1 must split into P >= 2 equal subwords");
  end

  logic              sign_q;
  logic [P-1:0][M-1:0] sub_d;
  logic [P-1:0][M-1:0] sub_q;
  logic [P-1:0]      loaded_q;
  logic [P:0]        en_chain;

  assign sub_d = d[W-2:0];

  // Enable cascade: the top subword has no higher stage.
  assign en_chain[P] = 1'b0;
  assign en_chain[0] = 1'b1;

  for (genvar i = P - 1; i >= 1; i--) begin : g_en
    sw_enable_gen #(.M(M)) u_en (
      .clk     (clk),
      .rst_n   (rst_n),
      .subword (sub_d[i]),
      .sign    (d[W-1]),
      .en_above(en_chain[i+1]),
      .en      (en_chain[i])
    );
  end

  assign sw_en = en_chain[P-1:0];

  // Sign bit and the flags load every clock.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sign_q   <= 1'b0;
      loaded_q <= '1;
    end else begin
      sign_q   <= d[W-1];
      loaded_q <= sw_en;
    end
  end

  // One register per subword, each in its own scope. Subword 0 is always
  // clocked.
  for (genvar i = 0; i < P; i++) begin : g_sub
    logic [M-1:0] r;
    assign sub_q[i] = r;
    if (i == 0) begin : g_free
      always_ff @(posedge clk) begin
        if (!rst_n) r <= '0;
        else        r <= sub_d[i];
      end
    end else if (GATE == SW_GATE_ICG) begin : g_icg
      logic gclk;
      // The cell stays open during reset so the gated flip-flops clear too.
      sw_clock_gate u_cg (
        .clk (clk),
        .en  (sw_en[i] | ~rst_n),
        .gclk(gclk)
      );
      always_ff @(posedge gclk) begin
        if (!rst_n) r <= '0;
        else        r <= sub_d[i];
      end
    end else begin : g_ce
      always_ff @(posedge clk) begin
        if (!rst_n)        r <= '0;
        else if (sw_en[i]) r <= sub_d[i];
      end
    end
  end

  always_comb begin
    q[W-1] = sign_q;
    for (int i = 0; i < P; i++) begin
      q[i*M +: M] = loaded_q[i] ? sub_q[i] : {M{sign_q}};
    end
  end

endmodule
