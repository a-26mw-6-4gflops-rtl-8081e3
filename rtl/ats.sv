// Adaptive task scheduler (ATS).
//
// A graphics application is split into two cascaded sub-tasks: stage 0
// (vertex processing) reads the input partition of the memory array and
// writes the intermediate partition; stage 1 (pixel processing) reads the
// intermediate partition and writes the output partition.  The ATS decides,
// from the fill levels of those partitions, which stage each of the two
// unified stream kernels serves:
//   balanced      USK0 on stage 0, USK1 on stage 1
//   vertex-bound  both USKs on stage 0 (stage 1 is starved: the
//                 intermediate buffer is below LO_NUM/DEN of its size
//                 while stage-0 input waits)
//   pixel-bound   both USKs on stage 1 (the intermediate buffer is at or
//                 above HI_NUM/DEN of its size, or there is no stage-0
//                 input left while intermediate data waits)
// The decision is registered every cycle.  `route[k]` tells the memory array
// which partition feeds kernel k; every element carries its stage tag, so a
// kernel runs the program of the element it receives and a change of route
// never mixes the two programs.
// The three conditions and relocating kernels to the bottleneck stage follow
// the document; the fill-level thresholds are this design's own rule, as is
// `ats_en` (0 keeps the balanced assignment).
module ats
  import sp_pkg::*;
#(
  parameter int unsigned CW     = 9,   // width of partition counts
  parameter int unsigned HI_NUM = 3,
  parameter int unsigned LO_NUM = 1,
  parameter int unsigned DEN    = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ats_en,
  input  logic [CW-1:0] in_count,     // stage-0 input partition fill
  input  logic [CW-1:0] mid_count,    // intermediate partition fill
  input  logic [CW-1:0] mid_size,     // intermediate partition size
  output ats_mode_e     mode,
  output logic [1:0]    route,        // stage served by USK0 / USK1
  output logic [15:0]   switches      // number of mode changes
);
  ats_mode_e want;
  logic [CW+2:0] mid_x, hi_x, lo_x;

  assign mid_x = (CW+3)'(mid_count) * (CW+3)'(DEN);
  assign hi_x  = (CW+3)'(mid_size)  * (CW+3)'(HI_NUM);
  assign lo_x  = (CW+3)'(mid_size)  * (CW+3)'(LO_NUM);

  always_comb begin
    want = ATS_BALANCED;
    if (ats_en) begin
      if (mid_x >= hi_x || (in_count == '0 && mid_count != '0))
        want = ATS_PIXEL_BOUND;
      else if (mid_x < lo_x && in_count != '0)
        want = ATS_VERTEX_BOUND;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= ATS_BALANCED;
      switches <= '0;
    end else begin
      mode <= want;
      if (want != mode) switches <= switches + 16'd1;
    end
  end

  always_comb begin
    unique case (mode)
      ATS_VERTEX_BOUND: route = 2'b00;
      ATS_PIXEL_BOUND:  route = 2'b11;
      default:          route = 2'b10;
    endcase
  end
endmodule
