// tb_calc5_adder: exhaustive test of the 8-bit wrap-around adder.
// Every pair of signed operands is applied; the expected sum is computed as
// an integer and reduced modulo 256, so overflow must wrap (-105 + -64 = 87).
module tb_calc5_adder;

  localparam int W = 8;

  logic signed [W-1:0] a, b, sum;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  calc5_adder #(.WIDTH(W)) dut (.a, .b, .sum);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_int;
    int n_wrap = 0;
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        exp_int = i + j;
        if (exp_int > 127 || exp_int < -128) n_wrap++;
        exp_int = ((exp_int + 128) & 255) - 128;
        checks++;
        if (int'(sum) != exp_int) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d = %0d, expected %0d", i, j, sum, exp_int);
        end
      end
    end
    a = -105; b = -64; #1;
    checks++;
    if (sum !== 8'sd87) failures++;
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
