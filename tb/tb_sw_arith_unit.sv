// Self-checking testbench for sw_arith_unit.
//
// Two instances are tested side by side: the default multiplier and an adder
// (OP = SW_OP_ADD). Each cycle both get the same random operand pair, with
// random magnitudes so that the upper subwords of the operand registers are
// often gated. After the clock edge each result must equal the product or sum
// of the pair applied before that edge. The testbench also requires that
// gating happened in both operand registers.
module tb_sw_arith_unit;
  import sw_cg_pkg::*;
  localparam int unsigned W = 16;
  localparam int unsigned P = 3;

  logic           clk = 1'b0;
  logic           rst_n;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] res_mul, res_add;
  logic [P-1:0]   a_en_m, b_en_m, a_en_s, b_en_s;

  int checks = 0;
  int failures = 0;
  int a_gated = 0, b_gated = 0;

  sw_arith_unit #(.W(W), .P(P)) dut_mul (
    .clk, .rst_n, .a, .b, .result(res_mul), .a_en(a_en_m), .b_en(b_en_m)
  );
  sw_arith_unit #(.W(W), .P(P), .OP(SW_OP_ADD)) dut_add (
    .clk, .rst_n, .a, .b, .result(res_add), .a_en(a_en_s), .b_en(b_en_s)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    return W'($signed(W'($urandom)) >>> ($urandom % W));
  endfunction

  initial begin
    rst_n = 1'b0;
    a = '0;
    b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      logic signed [2*W-1:0] exp_mul, exp_add;
      @(negedge clk);
      a = rand_word();
      b = rand_word();
      exp_mul = (2*W)'($signed(a)) * (2*W)'($signed(b));
      exp_add = (2*W)'($signed(a)) + (2*W)'($signed(b));
      #1;
      if (a_en_m != '1) a_gated++;
      if (b_en_m != '1) b_gated++;
      @(posedge clk);
      #1;
      checks += 2;
      if (res_mul !== exp_mul) begin
        failures++;
        $display("mul mismatch a=%0d b=%0d got=%0d exp=%0d",
                 $signed(a), $signed(b), $signed(res_mul), exp_mul);
      end
      if (res_add !== exp_add) begin
        failures++;
        $display("add mismatch a=%0d b=%0d got=%0d exp=%0d",
                 $signed(a), $signed(b), $signed(res_add), exp_add);
      end
    end
    $display("cycles with gating: a=%0d b=%0d", a_gated, b_gated);
    if (a_gated == 0 || b_gated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
