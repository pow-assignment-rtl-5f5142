// calc5_adder: the calculator's adder unit.
//
// Adds the two operand registers of the adder as signed two's-complement
// words of WIDTH bits. The sum wraps around on overflow: the carry out is
// dropped and the result has the operand width, so for 8-bit words
// -105 + -64 gives 87. Purely combinational; its operands come from the
// adder's own registers (add1_reg, add2_reg), which change only when an
// addition is loaded, so the adder does not toggle during other operations.
module calc5_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  output logic signed [WIDTH-1:0] sum
);

  always_comb sum = a + b;

endmodule
