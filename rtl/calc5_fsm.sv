// calc5_fsm: control state machine of the calc5 calculator.
//
// Walks through opcode -> left operand -> right operand, one state per clock,
// and decodes from its state and the current opcode the load strobes of the
// datapath registers. Transitions:
//   READ_OPC_INIT            -> READ_LEFT1
//   READ_LEFT1, READ_LEFT2   -> READ_RIGHT
//   READ_RIGHT               -> READ_OPC_READY2 if the opcode is multiply,
//                               READ_OPC_READY1 otherwise
//   READ_OPC_READY1          -> READ_LEFT1
//   READ_OPC_READY2          -> READ_LEFT2
// Actions (all take effect at the next rising clock edge):
//   opcode_load  in the three opcode states: data_in goes to opcode_reg
//   temp_load    in READ_LEFT1/2 when the opcode is add or multiply: data_in
//                goes to temp_reg (null and undefined opcodes load nothing)
//   add_load     in READ_RIGHT for add: temp_reg and data_in go to the adder
//   mul_load     in READ_RIGHT for multiply: they go to the multiplier
//   result_load  in READ_OPC_READY1/2: the unit's output goes to result_reg
//   ready        registered; high in the cycle after READ_LEFT2 and after
//                the two READ_OPC_READY states, i.e. while data_out carries a
//                valid result word
//   out_high     in READ_LEFT2: data_out shows the high result word
// The state sequence, the actions of each state and the decision on the
// multiply opcode follow the calculator's description; the split into one
// FSM module with decoded strobes, the state encoding and the asynchronous
// active-high reset into READ_OPC_INIT with ready low are this design's
// packaging of it.
module calc5_fsm
  import calc5_pkg::*;
(
  input  logic    clk,
  input  logic    reset,        // asynchronous, active high
  input  opcode_t opcode,       // current content of opcode_reg
  output state_e  state,
  output logic    ready,
  output logic    opcode_load,
  output logic    temp_load,
  output logic    add_load,
  output logic    mul_load,
  output logic    result_load,
  output logic    out_high
);

  state_e state_nxt;
  logic   ready_nxt;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= S_READ_OPC_INIT;
      ready <= 1'b0;
    end else begin
      state <= state_nxt;
      ready <= ready_nxt;
    end
  end

  always_comb begin
    unique case (state)
      S_READ_OPC_INIT:   state_nxt = S_READ_LEFT1;
      S_READ_LEFT1,
      S_READ_LEFT2:      state_nxt = S_READ_RIGHT;
      S_READ_RIGHT:      state_nxt = (opcode == OPC_MUL) ? S_READ_OPC_READY2
                                                         : S_READ_OPC_READY1;
      S_READ_OPC_READY1: state_nxt = S_READ_LEFT1;
      S_READ_OPC_READY2: state_nxt = S_READ_LEFT2;
      default:           state_nxt = S_READ_OPC_INIT;
    endcase
  end

  always_comb begin
    opcode_load = state inside {S_READ_OPC_INIT, S_READ_OPC_READY1, S_READ_OPC_READY2};
    temp_load   = (state inside {S_READ_LEFT1, S_READ_LEFT2}) && opcode_uses_unit(opcode);
    add_load    = (state == S_READ_RIGHT) && (opcode == OPC_ADD);
    mul_load    = (state == S_READ_RIGHT) && (opcode == OPC_MUL);
    result_load = state inside {S_READ_OPC_READY1, S_READ_OPC_READY2};
    ready_nxt   = state inside {S_READ_LEFT2, S_READ_OPC_READY1, S_READ_OPC_READY2};
    out_high    = (state == S_READ_LEFT2);
  end

  // The two arithmetic units are never loaded in the same cycle.
  a_one_unit: assert property (@(posedge clk) disable iff (reset) !(add_load && mul_load));

endmodule
