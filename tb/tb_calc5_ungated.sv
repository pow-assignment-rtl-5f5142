// tb_calc5_ungated: the end-to-end test of tb_calc5 run on the calculator
// built without clock gating (CLOCK_GATING = 0), which must behave the same
// cycle by cycle. Same streams (add8, mul8, mix8, null8), same cycle-exact
// model and the same mechanism counts, except the gated-clock ones.
module tb_calc5_ungated;

  localparam int W       = 8;
  localparam int NOPS    = 400;          // operations per stream
  localparam int NCYCLES = 3 * NOPS;     // checked cycles per stream

  logic         clk = 1'b0;
  logic         reset;
  logic [W-1:0] data_in;
  logic [W-1:0] data_out;
  logic         req, ready;

  int checks = 0, failures = 0;
  int n_add = 0, n_mul = 0, n_null = 0, n_undef = 0, n_two_word = 0;
  int n_reset = 0, n_hold = 0;

  calc5 #(.CLOCK_GATING(1'b0)) dut (.clk, .reset, .data_in, .data_out, .req, .ready);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  logic [3:0]         opc [NOPS];
  logic signed [W-1:0] lft [NOPS];
  logic signed [W-1:0] rgt [NOPS];
  logic [2*W-1:0]     res [NOPS];

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, $signed(got), $signed(exp), $time);
    end
  endtask

  // Model result of one operation.
  function automatic logic [2*W-1:0] model(input logic [3:0] o, input logic signed [W-1:0] a,
                                           input logic signed [W-1:0] b);
    logic signed [2*W-1:0] p;
    logic [W-1:0] s;
    case (o)
      4'd1: begin s = W'(a + b); return {{W{1'b0}}, s}; end
      4'd2: begin p = (2*W)'(a) * (2*W)'(b); return p; end
      default: return '0;
    endcase
  endfunction

  // kind: 0 add8, 1 mul8, 2 mix8, 3 null8
  task automatic make_stream(input int kind);
    for (int i = 0; i < NOPS; i++) begin
      case (kind)
        0: opc[i] = 4'd1;
        1: opc[i] = 4'd2;
        2: begin
          int r = $urandom_range(0, 9);
          opc[i] = (r < 3) ? 4'd0 : (r < 6) ? 4'd1 : (r < 9) ? 4'd2 : 4'($urandom_range(3, 15));
        end
        default: opc[i] = 4'd0;
      endcase
      lft[i] = W'($urandom);
      rgt[i] = W'($urandom);
    end
    if (kind < 2) begin
      logic [3:0] o = (kind == 0) ? 4'd1 : 4'd2;
      opc[0] = o; lft[0] = -105; rgt[0] = -64;
      opc[1] = o; lft[1] = 10;   rgt[1] = -26;
      opc[2] = o; lft[2] = -72;  rgt[2] = 4;
      opc[3] = o; lft[3] = 44;   rgt[3] = 117;
      opc[4] = o; lft[4] = 18;   rgt[4] = -87;
      opc[5] = o; lft[5] = 0;    rgt[5] = -98;
      opc[6] = o; lft[6] = 37;   rgt[6] = 40;
    end
    for (int i = 0; i < NOPS; i++) res[i] = model(opc[i], lft[i], rgt[i]);
  endtask

  function automatic logic [W-1:0] word(input int c);
    case (c % 3)
      0:       return W'(opc[c/3]) | (W'($urandom) & 8'hF0);  // upper bits ignored
      1:       return lft[c/3];
      default: return rgt[c/3];
    endcase
  endfunction

  task automatic run_stream(input int kind, input string name);
    logic [W-1:0] exp_out;
    logic         exp_rdy;
    logic [W-1:0] prev_mult1;
    logic [W-1:0] prev_add1;
    make_stream(kind);
    // reset
    @(negedge clk);
    reset = 1'b1;
    data_in = '0;
    @(negedge clk);
    @(negedge clk);
    reset = 1'b0;
    n_reset++;
    check({name, " ready after reset"}, W'(ready), '0);
    check({name, " data_out after reset"}, data_out, '0);
    for (int c = 0; c < NCYCLES; c++) begin
      data_in = (c < 3 * NOPS) ? word(c) : '0;
      prev_mult1 = dut.mult1;
      prev_add1  = dut.add1;
      // expected outputs for this cycle (checked just before the rising edge)
      exp_rdy = 1'b0;
      exp_out = '0;
      if (c >= 4) begin
        int j = (c - 4) / 3;  // last operation whose result is in result_reg
        if ((c - 4) % 3 == 0 && opc[j] == 4'd2) exp_out = res[j][2*W-1:W];
        else                                    exp_out = res[j][W-1:0];
        exp_rdy = ((c - 4) % 3 == 0) || ((c - 4) % 3 == 1 && opc[j] == 4'd2);
        if ((c - 4) % 3 == 0) begin
          case (opc[j])
            4'd0: n_null++;
            4'd1: n_add++;
            4'd2: begin n_mul++; n_two_word++; end
            default: n_undef++;
          endcase
        end
      end
      #4;
      check({name, " data_out"}, data_out, exp_out);
      check({name, " ready"}, W'(ready), W'(exp_rdy));
      check({name, " req"}, W'(req), 8'd1);
      @(negedge clk);
      // the unit not selected by an operation keeps its operands
      if (c % 3 == 2) begin
        if (opc[c/3] != 4'd2) begin check({name, " mult regs hold"}, dut.mult1, prev_mult1); n_hold++; end
        if (opc[c/3] != 4'd1) begin check({name, " add regs hold"},  dut.add1,  prev_add1);  n_hold++; end
      end
    end
  endtask

  // Results given by hand for the first operations of add8 and mul8.
  task automatic check_known(input int kind);
    if (kind == 0) begin
      check("add8 #0", res[0][W-1:0], 8'd87);
      check("add8 #1", res[1][W-1:0], W'(-16));
      check("add8 #2", res[2][W-1:0], W'(-68));
      check("add8 #3", res[3][W-1:0], W'(-95));
      check("add8 #4", res[4][W-1:0], W'(-69));
      check("add8 #5", res[5][W-1:0], W'(-98));
      check("add8 #6", res[6][W-1:0], 8'd77);
    end else begin
      check("mul8 #0 hi", res[0][2*W-1:W], 8'd26);
      check("mul8 #0 lo", res[0][W-1:0],   8'd64);
      check("mul8 #1 hi", res[1][2*W-1:W], W'(-2));
      check("mul8 #1 lo", res[1][W-1:0],   W'(-4));
      check("mul8 #2 hi", res[2][2*W-1:W], W'(-2));
      check("mul8 #2 lo", res[2][W-1:0],   W'(-32));
      check("mul8 #3 hi", res[3][2*W-1:W], 8'd20);
      check("mul8 #3 lo", res[3][W-1:0],   8'd28);
      check("mul8 #4 hi", res[4][2*W-1:W], W'(-7));
      check("mul8 #4 lo", res[4][W-1:0],   W'(-30));
      check("mul8 #5 hi", res[5][2*W-1:W], 8'd0);
      check("mul8 #5 lo", res[5][W-1:0],   8'd0);
      check("mul8 #6 hi", res[6][2*W-1:W], 8'd5);
      check("mul8 #6 lo", res[6][W-1:0],   W'(-56));
    end
  endtask

  task automatic count_mech(input string what, input int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    reset   = 1'b0;  // rises in run_stream: the asynchronous reset needs an edge
    data_in = '0;
    make_stream(0); check_known(0);
    make_stream(1); check_known(1);
    run_stream(0, "add8");
    run_stream(1, "mul8");
    run_stream(2, "mix8");
    run_stream(3, "null8");
    count_mech("additions", n_add);
    count_mech("multiplications", n_mul);
    count_mech("null operations", n_null);
    count_mech("undefined opcodes", n_undef);
    count_mech("two-word outputs", n_two_word);
    count_mech("idle unit held", n_hold);
    count_mech("resets", n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
