// tb_calc5_operand_regs: test of temp_reg and the two units' operand
// registers, in the clock-gated and in the ungated build side by side.
// Random load strobes and data are applied on the falling edge; a model of
// the five registers, updated on the rising edge, gives the expected unit
// operands, which are compared every cycle for both builds. The test counts
// loads of each group and cycles in which a group had to hold.
module tb_calc5_operand_regs;

  localparam int W = 8;

  logic         clk = 1'b0;
  logic         reset = 1'b0;
  logic [W-1:0] data_in;
  logic         temp_load, add_load, mul_load;
  logic signed [W-1:0] add1_g, add2_g, mult1_g, mult2_g;
  logic signed [W-1:0] add1_u, add2_u, mult1_u, mult2_u;
  logic [W-1:0] m_temp, m_add1, m_add2, m_mult1, m_mult2;

  int checks = 0, failures = 0;
  int n_temp = 0, n_add = 0, n_mul = 0, n_hold = 0;

  calc5_operand_regs #(.WIDTH(W)) dut_g (
    .clk, .reset, .data_in, .temp_load, .add_load, .mul_load,
    .add1(add1_g), .add2(add2_g), .mult1(mult1_g), .mult2(mult2_g));

  calc5_operand_regs #(.WIDTH(W), .CLOCK_GATING(1'b0)) dut_u (
    .clk, .reset, .data_in, .temp_load, .add_load, .mul_load,
    .add1(add1_u), .add2(add2_u), .mult1(mult1_u), .mult2(mult2_u));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic compare();
    chk("add1 gated", add1_g, m_add1);   chk("add1 ungated", add1_u, m_add1);
    chk("add2 gated", add2_g, m_add2);   chk("add2 ungated", add2_u, m_add2);
    chk("mult1 gated", mult1_g, m_mult1); chk("mult1 ungated", mult1_u, m_mult1);
    chk("mult2 gated", mult2_g, m_mult2); chk("mult2 ungated", mult2_u, m_mult2);
  endtask

  initial begin
    {temp_load, add_load, mul_load} = '0;
    data_in = '0;
    @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    {m_temp, m_add1, m_add2, m_mult1, m_mult2} = '0;
    compare();
    for (int c = 0; c < 2000; c++) begin
      data_in   = W'($urandom);
      temp_load = ($urandom_range(0, 2) == 0);
      case ($urandom_range(0, 3))
        0: {add_load, mul_load} = 2'b10;
        1: {add_load, mul_load} = 2'b01;
        default: {add_load, mul_load} = 2'b00;
      endcase
      @(posedge clk);
      if (add_load) begin m_add1 = m_temp; m_add2 = data_in; n_add++; end
      if (mul_load) begin m_mult1 = m_temp; m_mult2 = data_in; n_mul++; end
      if (temp_load) begin m_temp = data_in; n_temp++; end
      if (!add_load && !mul_load) n_hold++;
      @(negedge clk);
      compare();
    end
    checks++;
    if (n_temp == 0 || n_add == 0 || n_mul == 0 || n_hold == 0) failures++;
    $display("temp loads %0d add loads %0d mul loads %0d hold %0d", n_temp, n_add, n_mul, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
