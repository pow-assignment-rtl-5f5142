// calc5_pkg: types and constants shared by the calc5 serial calculator.
//
// The calculator reads one word per clock on data_in. An operation is an
// opcode word followed by a left and a right operand word. The opcode is the
// low four bits of its word, so up to 16 operations can be encoded; three are
// defined (null, add, multiply) and every other code behaves like null. The
// control FSM has six states: two opcode-reading states that also present a
// result (one for one-word results, one for two-word results), an initial
// opcode state that presents nothing, two left-operand states and one
// right-operand state.
package calc5_pkg;

  localparam int unsigned OPCODE_W = 4;

  typedef logic [OPCODE_W-1:0] opcode_t;

  localparam opcode_t OPC_NULL = 4'b0000;  // result is zero
  localparam opcode_t OPC_ADD  = 4'b0001;  // left + right, wraps around
  localparam opcode_t OPC_MUL  = 4'b0010;  // left * right, two output words

  typedef enum logic [2:0] {
    S_READ_OPC_INIT   = 3'd0,  // first opcode after reset, no result yet
    S_READ_LEFT1      = 3'd1,  // left operand, low result word on data_out
    S_READ_RIGHT      = 3'd2,  // right operand, operands go to their unit
    S_READ_OPC_READY1 = 3'd3,  // next opcode, one-word result captured
    S_READ_OPC_READY2 = 3'd4,  // next opcode, two-word result captured
    S_READ_LEFT2      = 3'd5   // left operand, high result word on data_out
  } state_e;

  // An opcode that loads operands into a unit (add or multiply).
  function automatic logic opcode_uses_unit(opcode_t opc);
    return (opc == OPC_ADD) || (opc == OPC_MUL);
  endfunction

endpackage
