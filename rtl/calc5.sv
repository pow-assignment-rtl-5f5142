// calc5: serial-in, serial-out calculator with one register pair per
// arithmetic unit and optional clock gating.
//
// The calculator takes one WIDTH-bit word per clock on data_in (req is always
// high: it wants a word every cycle). Each operation is three words: an opcode
// (low four bits: 0000 null, 0001 add, 0010 multiply, others act as null),
// then the left and the right operand. The left operand waits in temp_reg; on
// the right operand both are loaded at once into the dedicated registers of
// the selected unit only (add1/add2 for the adder, mult1/mult2 for the
// multiplier). In the next cycle, while the next opcode is read, the unit's
// output is captured in the 2*WIDTH-bit result_reg.
//
// Output timing (cycle = one data_in word; R = cycle of the right operand):
//   add / null : data_out = result (low word), ready = 1, in cycle R+2
//   multiply   : high word in R+2, low word in R+3, ready = 1 in both
// Operations follow each other back to back, so the calculator sustains one
// operation per three clocks for every opcode. Outside those cycles data_out
// keeps showing the low word of the last result and ready is 0.
//
// The datapath (temp_reg, unit registers, adder, multiplier, result and
// output multiplexers, opcode_reg), the FSM and WIDTH = 8 follow the
// calculator's description. CLOCK_GATING (default on) selects the gated
// version that was evaluated alongside the ungated one; the gates are
// explicit latch-based cells here rather than inserted by a synthesis tool.
// Reset is asynchronous and active high and clears every register.
module calc5
  import calc5_pkg::*;
#(
  parameter int unsigned WORD_LENGTH  = 8,
  parameter bit          CLOCK_GATING = 1'b1
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic [WORD_LENGTH-1:0] data_in,
  output logic [WORD_LENGTH-1:0] data_out,
  output logic                   req,
  output logic                   ready
);

  opcode_t opcode_reg;
  logic    opcode_load, temp_load, add_load, mul_load, result_load, out_high;

  logic signed [WORD_LENGTH-1:0]   add1, add2, mult1, mult2, adder_out;
  logic signed [2*WORD_LENGTH-1:0] mult_out;

  assign req = 1'b1;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)            opcode_reg <= OPC_NULL;
    else if (opcode_load) opcode_reg <= data_in[OPCODE_W-1:0];
  end

  calc5_fsm u_fsm (
    .clk, .reset,
    .opcode(opcode_reg),
    .state(),
    .ready,
    .opcode_load, .temp_load, .add_load, .mul_load, .result_load, .out_high
  );

  calc5_operand_regs #(.WIDTH(WORD_LENGTH), .CLOCK_GATING(CLOCK_GATING)) u_operands (
    .clk, .reset, .data_in,
    .temp_load, .add_load, .mul_load,
    .add1, .add2, .mult1, .mult2
  );

  calc5_adder #(.WIDTH(WORD_LENGTH)) u_adder (.a(add1), .b(add2), .sum(adder_out));

  calc5_multiplier #(.WIDTH(WORD_LENGTH)) u_mult (.a(mult1), .b(mult2), .product(mult_out));

  calc5_result #(.WIDTH(WORD_LENGTH), .CLOCK_GATING(CLOCK_GATING)) u_result (
    .clk, .reset,
    .opcode(opcode_reg),
    .adder_out, .mult_out,
    .result_load, .out_high,
    .data_out
  );

endmodule
