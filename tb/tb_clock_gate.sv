// tb_clock_gate: test of the latch-based clock gate.
// The enable is changed just after rising clock edges, as logic clocked on
// that edge would change it, and also wiggled during the high phase. The
// test checks that gclk follows clk in cycles whose enable was high at the
// rising edge, stays low otherwise, and never changes during the high phase
// (no glitches), and it counts gated and passed cycles.
module tb_clock_gate;

  logic clk = 1'b0;
  logic en = 1'b0;
  logic gclk;
  int checks = 0, failures = 0;
  int n_pass = 0, n_gated = 0, n_gclk_edges = 0;

  clock_gate #(.ENABLE(1'b1)) dut (.clk, .en, .gclk);

  always #5 clk = ~clk;

  always @(posedge gclk) n_gclk_edges++;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: gclk=%b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic en_at_edge;
    @(negedge clk);
    for (int c = 0; c < 500; c++) begin
      en = 1'($urandom);
      @(posedge clk);
      en_at_edge = en;
      #1 chk(gclk, en_at_edge, "high phase start");
      if (en_at_edge) n_pass++; else n_gated++;
      en = ~en;  // change during the high phase must not reach gclk
      #2 chk(gclk, en_at_edge, "high phase middle");
      en = ~en;
      #1 chk(gclk, en_at_edge, "high phase end");
      @(negedge clk);
      #1 chk(gclk, 1'b0, "low phase");
    end
    checks++;
    if (n_gclk_edges != n_pass) failures++;
    checks++;
    if (n_pass == 0 || n_gated == 0) failures++;
    $display("passed %0d gated %0d", n_pass, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
