// Raster engine of the graphics specific engines (GSE).
//
// Scans the bounding box of each set-up triangle row by row, two
// horizontally adjacent pixels per cycle, and emits a fragment pair for
// every pixel pair that has at least one pixel inside the triangle (all
// three edge functions >= 0).  The edge functions are evaluated
// incrementally: once with multiplies at the box origin, then by adding
// 2A per step along a row and B per row.
// Fragment element layout: lane 0 = {covered flag in bit 31, x}, lane 1 y,
// lane 2 depth, lane 3 colour; thread A's element is the even pixel x,
// thread B's the odd pixel x+1.
// Interfaces: valid/ready in (from primitive setup) and out.  Timing: one
// pixel pair (two pixels) per cycle while the output is ready, i.e. 400
// Mpixels/s at 200 MHz, plus one cycle to start each triangle; pairs with
// no covered pixel cost a cycle but produce no output.
// Rasterisation as the engine's task is the document's; the edge-function
// scan and the two-pixel step (matching the quoted pixel rate) are this
// design's own.
module gse_raster
  import sp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [39:0] ea [3],
  input  logic signed [39:0] eb [3],
  input  logic signed [39:0] ec [3],
  input  logic [15:0]        x0, x1, y0, y1,
  input  logic [15:0]        z,
  input  word_t              color,
  output logic               out_valid,
  input  logic               out_ready,
  output pair_t              out_data,
  output logic               idle,
  output logic [31:0]        n_pairs       // fragment pairs emitted
);
  logic               busy;
  logic signed [39:0] a [3], b [3], e_row [3], e_cur [3];
  logic [15:0]        bx0, bx1, by1, x, y, zq;
  word_t              cq;
  logic               in0, in1, advance;
  logic signed [39:0] e0 [3];          // edge values at the box origin

  for (genvar i = 0; i < 3; i++) begin : g_e0
    assign e0[i] = ea[i] * 40'(x0) + eb[i] * 40'(y0) + ec[i];
  end

  always_comb begin
    in0 = 1'b1;
    in1 = (x + 16'd1 <= bx1);
    for (int i = 0; i < 3; i++) begin
      if (e_cur[i] < 0)        in0 = 1'b0;
      if (e_cur[i] + a[i] < 0) in1 = 1'b0;
    end
    out_valid = busy && (in0 || in1);
    for (int t = 0; t < 2; t++) begin
      out_data[t][0] = {(t == 0) ? in0 : in1, 15'd0, x + 16'(t)};
      out_data[t][1] = 32'(y);
      out_data[t][2] = 32'(zq);
      out_data[t][3] = cq;
    end
  end

  assign advance  = busy && (!out_valid || out_ready);
  assign in_ready = !busy;
  assign idle     = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      n_pairs <= '0;
      bx0 <= '0; bx1 <= '0; by1 <= '0; x <= '0; y <= '0; zq <= '0; cq <= '0;
      for (int i = 0; i < 3; i++) begin
        a[i] <= '0; b[i] <= '0; e_row[i] <= '0; e_cur[i] <= '0;
      end
    end else begin
      if (in_valid && in_ready) begin
        busy <= 1'b1;
        bx0 <= x0; bx1 <= x1; by1 <= y1;
        x <= x0; y <= y0; zq <= z; cq <= color;
        for (int i = 0; i < 3; i++) begin
          a[i] <= ea[i]; b[i] <= eb[i];
          e_row[i] <= e0[i]; e_cur[i] <= e0[i];
        end
      end else if (advance) begin
        if (out_valid) n_pairs <= n_pairs + 32'd1;
        if (x + 16'd2 > bx1) begin
          if (y == by1) busy <= 1'b0;
          y <= y + 16'd1;
          x <= bx0;
          for (int i = 0; i < 3; i++) begin
            e_row[i] <= e_row[i] + b[i];
            e_cur[i] <= e_row[i] + b[i];
          end
        end else begin
          x <= x + 16'd2;
          for (int i = 0; i < 3; i++) e_cur[i] <= e_cur[i] + 2 * a[i];
        end
      end
    end
  end
endmodule
