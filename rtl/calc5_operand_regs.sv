// calc5_operand_regs: temp_reg and the dedicated operand registers of the
// adder (add1_reg, add2_reg) and of the multiplier (mult1_reg, mult2_reg).
//
// The left operand is parked in temp_reg while the right operand is on
// data_in; in the next cycle both go at once into the registers of the unit
// the opcode selects (temp_reg -> add1/mult1, data_in -> add2/mult2). The
// other unit's registers hold, so its inputs, and hence the unit, do not
// toggle, and a unit never sees a new left operand paired with an old right
// one. All registers are WIDTH bits, cleared by the asynchronous active-high
// reset, and load on the rising clock edge when their strobe is high.
//
// With CLOCK_GATING set, each group (temp, adder pair, multiplier pair) is
// clocked through its own clock_gate driven by its load strobe; otherwise the
// strobes act as ordinary load enables on the free-running clock. Both
// versions behave identically cycle by cycle. The register set and its
// loading follow the calculator's architecture; grouping the gates by
// register group is this design's choice.
module calc5_operand_regs #(
  parameter int unsigned WIDTH        = 8,
  parameter bit          CLOCK_GATING = 1'b1
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic        [WIDTH-1:0] data_in,
  input  logic                    temp_load,
  input  logic                    add_load,
  input  logic                    mul_load,
  output logic signed [WIDTH-1:0] add1,
  output logic signed [WIDTH-1:0] add2,
  output logic signed [WIDTH-1:0] mult1,
  output logic signed [WIDTH-1:0] mult2
);

  logic signed [WIDTH-1:0] temp_reg;
  logic temp_clk, add_clk, mul_clk;

  clock_gate #(.ENABLE(CLOCK_GATING)) u_cg_temp (.clk, .en(temp_load), .gclk(temp_clk));
  clock_gate #(.ENABLE(CLOCK_GATING)) u_cg_add  (.clk, .en(add_load),  .gclk(add_clk));
  clock_gate #(.ENABLE(CLOCK_GATING)) u_cg_mul  (.clk, .en(mul_load),  .gclk(mul_clk));

  always_ff @(posedge temp_clk or posedge reset) begin
    if (reset)          temp_reg <= '0;
    else if (temp_load) temp_reg <= data_in;
  end

  always_ff @(posedge add_clk or posedge reset) begin
    if (reset) begin
      add1 <= '0;
      add2 <= '0;
    end else if (add_load) begin
      add1 <= temp_reg;
      add2 <= data_in;
    end
  end

  always_ff @(posedge mul_clk or posedge reset) begin
    if (reset) begin
      mult1 <= '0;
      mult2 <= '0;
    end else if (mul_load) begin
      mult1 <= temp_reg;
      mult2 <= data_in;
    end
  end

endmodule
