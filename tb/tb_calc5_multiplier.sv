// tb_calc5_multiplier: exhaustive test of the 8 x 8 signed multiplier.
// Every pair of signed operands is applied and the 16-bit product compared
// with the integer product; a few products are also checked by hand value
// (-105 * -64 = 6720 = 0x1A40, 10 * -26 = -260 = 0xFEFC).
module tb_calc5_multiplier;

  localparam int W = 8;

  logic signed [W-1:0]   a, b;
  logic signed [2*W-1:0] product;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  calc5_multiplier #(.WIDTH(W)) dut (.a, .b, .product);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hand(input int x, input int y, input logic [2*W-1:0] exp);
    a = W'(x); b = W'(y); #1;
    checks++;
    if (product !== exp) begin
      failures++;
      $display("FAIL %0d * %0d = %h, expected %h", x, y, product, exp);
    end
  endtask

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (int'(product) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, product);
        end
      end
    end
    hand(-105, -64, 16'h1A40);
    hand(10, -26, 16'hFEFC);
    hand(-128, -128, 16'h4000);
    hand(127, -128, 16'hC080);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
