// clock_gate: latch-based integrated clock gate.
//
// Passes the clock to a group of registers only in cycles where they load.
// The enable is sampled by a latch that is transparent while clk is low, so
// it is stable for the whole high phase and the gated clock has no glitches:
// gclk = clk & en_latched. Drive en from logic clocked on the rising edge of
// clk; it takes effect on the next rising edge. When ENABLE is 0 the cell is
// left out and gclk is clk itself (no gating), so the same design can be
// built with and without clock gating.
//
// The latch is intended: it is the standard structure of a clock-gating
// cell. Area and power results for the gated calculator were obtained with
// gates of this kind; the cell itself is this design's choice, as a library
// ICG cell would be used in a real flow.
module clock_gate #(
  parameter bit ENABLE = 1'b1
) (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  if (ENABLE) begin : g_gate
    logic en_latched;
    always_latch begin
      if (!clk) en_latched = en;
    end
    assign gclk = clk & en_latched;
  end else begin : g_pass
    assign gclk = clk;
  end

endmodule
