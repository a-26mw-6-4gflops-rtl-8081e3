// Clock divider (DIV) of the power-aware frequency scaling unit.
//
// Divides the PLL clock by 1, 2, 4 or 8 (ratio given as log2 in `ratio`).
// A free-running counter on the PLL clock supplies the divided clocks; the
// output is the PLL clock itself for ratio 0 and counter bit ratio-1
// otherwise.  A new ratio is taken only when the counter wraps, so a change
// never shortens a high or low phase below that of the faster setting.
// The divider cells come from the block diagram of the frequency scaling unit; the
// counter structure and the set of ratios (200 MHz down to 25 MHz, covering
// the 50-200 MHz range of the chip) are this design's choice.
// Circuit note: the output is a clock built from logic (a mux of the PLL
// clock and a counter bit); that is the purpose of the cell.
module pafs_div (
  input  logic       clk_in,
  input  logic       rst_n,
  input  logic [1:0] ratio,     // log2 of the division ratio
  output logic       clk_out,
  output logic [1:0] ratio_q    // ratio currently in effect
);
  logic [2:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      ratio_q <= '0;
    end else begin
      cnt <= cnt + 3'd1;
      if (&cnt) ratio_q <= ratio;
    end
  end

  always_comb begin
    unique case (ratio_q)
      2'd0:    clk_out = clk_in;
      2'd1:    clk_out = cnt[0];
      2'd2:    clk_out = cnt[1];
      default: clk_out = cnt[2];
    endcase
  end
endmodule
