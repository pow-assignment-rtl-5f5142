// tb_calc5_fsm: test of the calc5 control state machine.
//
// The testbench plays the part of opcode_reg: it presents a new random opcode
// (null, add, multiply or an undefined code) after each opcode state. The
// expected state and strobes are derived from the position in the word
// stream, not from a copy of the FSM: after reset, cycle 0 reads the first
// opcode, and operation k then occupies cycles 3k+1 (left), 3k+2 (right) and
// 3k+3 (next opcode, result captured). The left state is READ_LEFT2 when
// operation k-1 was a multiply, the opcode state is READ_OPC_READY2 when
// operation k is one. Every strobe and the registered ready are checked each
// cycle, and the run is reset twice in the middle.
module tb_calc5_fsm;
  import calc5_pkg::*;

  localparam int NOPS = 300;

  logic    clk = 1'b0;
  logic    reset = 1'b0;
  opcode_t opcode;
  state_e  state;
  logic    ready, opcode_load, temp_load, add_load, mul_load, result_load, out_high;

  int checks = 0, failures = 0;
  int n_ready2 = 0, n_ready1 = 0, n_left2 = 0, n_temp_skip = 0;

  calc5_fsm dut (.clk, .reset, .opcode, .state, .ready, .opcode_load, .temp_load,
                 .add_load, .mul_load, .result_load, .out_high);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  opcode_t opc [NOPS];

  task automatic chk(input string what, input int got, input int exp, input int c);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s cycle %0d: got %0d expected %0d", what, c, got, exp);
    end
  endtask

  task automatic run(input int nops);
    state_e exp_state, prev_state;
    int k, ph;
    logic is_mul, prev_mul, uses;
    for (int i = 0; i < nops; i++) begin
      int r = $urandom_range(0, 9);
      opc[i] = (r < 2) ? OPC_NULL : (r < 5) ? OPC_ADD : (r < 8) ? OPC_MUL : opcode_t'($urandom_range(3, 15));
    end
    @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    prev_state = S_READ_OPC_INIT;
    for (int c = 0; c < 3 * nops; c++) begin
      opcode = (c == 0) ? OPC_NULL : opc[(c - 1) / 3];
      k  = (c == 0) ? 0 : (c - 1) / 3;
      ph = (c == 0) ? -1 : (c - 1) % 3;
      is_mul   = (opc[k] == OPC_MUL);
      prev_mul = (k > 0) && (opc[k-1] == OPC_MUL);
      uses     = (opc[k] == OPC_ADD) || is_mul;
      case (ph)
        -1:      exp_state = S_READ_OPC_INIT;
        0:       exp_state = prev_mul ? S_READ_LEFT2 : S_READ_LEFT1;
        1:       exp_state = S_READ_RIGHT;
        default: exp_state = is_mul ? S_READ_OPC_READY2 : S_READ_OPC_READY1;
      endcase
      #4;
      chk("state", int'(state), int'(exp_state), c);
      chk("opcode_load", int'(opcode_load), int'(ph == -1 || ph == 2), c);
      chk("temp_load", int'(temp_load), int'(ph == 0 && uses), c);
      chk("add_load", int'(add_load), int'(ph == 1 && opc[k] == OPC_ADD), c);
      chk("mul_load", int'(mul_load), int'(ph == 1 && is_mul), c);
      chk("result_load", int'(result_load), int'(ph == 2), c);
      chk("out_high", int'(out_high), int'(ph == 0 && prev_mul), c);
      chk("ready", int'(ready), int'(prev_state inside {S_READ_LEFT2, S_READ_OPC_READY1, S_READ_OPC_READY2}), c);
      if (exp_state == S_READ_OPC_READY2) n_ready2++;
      if (exp_state == S_READ_OPC_READY1) n_ready1++;
      if (exp_state == S_READ_LEFT2) n_left2++;
      if (ph == 0 && !uses) n_temp_skip++;
      prev_state = exp_state;
      @(negedge clk);
    end
  endtask

  initial begin
    opcode = OPC_NULL;
    run(NOPS);
    run(50);
    run(NOPS);
    checks++;
    if (n_ready1 == 0 || n_ready2 == 0 || n_left2 == 0 || n_temp_skip == 0) failures++;
    $display("ready1 %0d ready2 %0d left2 %0d temp skipped %0d", n_ready1, n_ready2, n_left2, n_temp_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
