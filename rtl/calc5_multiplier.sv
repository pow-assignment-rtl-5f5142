// calc5_multiplier: the calculator's multiplier unit.
//
// Multiplies the two operand registers of the multiplier as signed
// two's-complement words of WIDTH bits and gives the full signed product of
// 2*WIDTH bits, which cannot overflow (for 8-bit words -128 * -128 = 16384
// still fits). Purely combinational, one cycle: the product is captured in
// the result register in the cycle after the operands are loaded. Its
// operands come from the multiplier's own registers (mult1_reg, mult2_reg).
module calc5_multiplier #(
  parameter int unsigned WIDTH = 8
) (
  input  logic signed [WIDTH-1:0]   a,
  input  logic signed [WIDTH-1:0]   b,
  output logic signed [2*WIDTH-1:0] product
);

  always_comb product = a * b;

endmodule
