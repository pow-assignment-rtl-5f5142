// calc5_result: result multiplexer, result register and output multiplexer
// of the calc5 calculator.
//
// When result_load is high (in the opcode states that follow an operation)
// the register captures, chosen by the opcode of the finished operation:
//   null (0000)      zero
//   add  (0001)      the WIDTH-bit sum in the low word, zeros in the high word
//   multiply (0010)  the full 2*WIDTH-bit product
//   any other code   zero, like null
// data_out shows the low word of result_reg except when out_high is set (the
// FSM's READ_LEFT2 state), when it shows the high word; a product therefore
// leaves high word first, then low word. The register is 2*WIDTH bits,
// cleared by the asynchronous active-high reset. With CLOCK_GATING set it is
// clocked through a clock_gate enabled by result_load. That the high word of
// a sum is zero (not sign-extended) follows the calculator's description.
module calc5_result
  import calc5_pkg::*;
#(
  parameter int unsigned WIDTH        = 8,
  parameter bit          CLOCK_GATING = 1'b1
) (
  input  logic                      clk,
  input  logic                      reset,
  input  opcode_t                   opcode,
  input  logic signed [WIDTH-1:0]   adder_out,
  input  logic signed [2*WIDTH-1:0] mult_out,
  input  logic                      result_load,
  input  logic                      out_high,
  output logic        [WIDTH-1:0]   data_out
);

  logic [2*WIDTH-1:0] result_reg, result_nxt;
  logic               result_clk;

  always_comb begin
    unique case (opcode)
      OPC_ADD: result_nxt = {{WIDTH{1'b0}}, adder_out};
      OPC_MUL: result_nxt = mult_out;
      default: result_nxt = '0;  // null and undefined codes
    endcase
  end

  clock_gate #(.ENABLE(CLOCK_GATING)) u_cg_result (.clk, .en(result_load), .gclk(result_clk));

  always_ff @(posedge result_clk or posedge reset) begin
    if (reset)            result_reg <= '0;
    else if (result_load) result_reg <= result_nxt;
  end

  always_comb data_out = out_high ? result_reg[2*WIDTH-1:WIDTH] : result_reg[WIDTH-1:0];

endmodule
