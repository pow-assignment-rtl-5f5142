// tb_calc5_result: test of the result multiplexer, result register and output
// multiplexer, in the clock-gated and in the ungated build side by side.
// Random opcodes (null, add, multiply, undefined), unit outputs, load and
// word-select signals are applied on the falling edge. The expected register
// content is computed by the testbench (zero for null and undefined codes,
// the zero-extended sum for add, the product for multiply) and data_out is
// compared each cycle against its high or low word.
module tb_calc5_result;
  import calc5_pkg::*;

  localparam int W = 8;

  logic clk = 1'b0;
  logic reset = 1'b0;
  opcode_t opcode;
  logic signed [W-1:0]   adder_out;
  logic signed [2*W-1:0] mult_out;
  logic result_load, out_high;
  logic [W-1:0] out_g, out_u;
  logic [2*W-1:0] m_res;

  int checks = 0, failures = 0;
  int n_op [4] = '{default: 0};
  int n_high = 0;

  calc5_result #(.WIDTH(W)) dut_g (.clk, .reset, .opcode, .adder_out, .mult_out,
                                   .result_load, .out_high, .data_out(out_g));
  calc5_result #(.WIDTH(W), .CLOCK_GATING(1'b0)) dut_u (.clk, .reset, .opcode, .adder_out,
                                   .mult_out, .result_load, .out_high, .data_out(out_u));

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
      if (failures < 20) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [W-1:0] exp_out;
    int r;
    opcode = OPC_NULL; adder_out = '0; mult_out = '0; result_load = 1'b0; out_high = 1'b0;
    @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    m_res = '0;
    for (int c = 0; c < 2000; c++) begin
      r = $urandom_range(0, 9);
      opcode      = (r < 2) ? OPC_NULL : (r < 5) ? OPC_ADD : (r < 8) ? OPC_MUL : opcode_t'($urandom_range(3, 15));
      adder_out   = W'($urandom);
      mult_out    = (2*W)'($urandom);
      result_load = ($urandom_range(0, 2) == 0);
      out_high    = 1'($urandom);
      #1;
      exp_out = out_high ? m_res[2*W-1:W] : m_res[W-1:0];
      chk("data_out gated", out_g, exp_out);
      chk("data_out ungated", out_u, exp_out);
      @(posedge clk);
      if (result_load) begin
        if (opcode == OPC_ADD)      begin m_res = {8'h00, adder_out}; n_op[1]++; end
        else if (opcode == OPC_MUL) begin m_res = mult_out; n_op[2]++; end
        else if (opcode == OPC_NULL) begin m_res = '0; n_op[0]++; end
        else begin m_res = '0; n_op[3]++; end
      end
      if (out_high) n_high++;
      @(negedge clk);
    end
    checks++;
    if (n_op[0] == 0 || n_op[1] == 0 || n_op[2] == 0 || n_op[3] == 0 || n_high == 0) failures++;
    $display("null %0d add %0d mul %0d undefined %0d", n_op[0], n_op[1], n_op[2], n_op[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
