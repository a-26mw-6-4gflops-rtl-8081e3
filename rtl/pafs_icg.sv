// Clock gating cell of the power-aware frequency scaling unit.
//
// A standard latch-based integrated clock gate: the enable is captured by a
// latch that is transparent while the clock is low, and the output clock is
// the input clock ANDed with the latched enable.  The enable therefore only
// takes effect between pulses and the gated clock never carries a glitch.
// The block diagram shows four such cells, one per gated domain; the latch-and-AND
// form is the usual glitch-free structure, chosen here.
// Circuit note: the level-sensitive latch is intended; it is the cell.
module pafs_icg (
  input  logic clk_in,
  input  logic en,
  output logic clk_out
);
  logic en_l;

  always_latch begin
    if (!clk_in) en_l = en;
  end

  assign clk_out = clk_in & en_l;
endmodule
