// Primitive setup engine of the graphics specific engines (GSE).
//
// Takes transformed vertices as element pairs (thread A's vertex first,
// then thread B's), groups every three consecutive vertices into a
// triangle (triangle list) and computes what the raster engine needs:
//   edge functions  E_i(x,y) = A_i*x + B_i*y + C_i for the three edges,
//                   with signs chosen so that the inside is E_i >= 0 for
//                   either winding
//   bounding box    the triangle's box clipped to the frame, its left edge
//                   rounded down to an even column (pixels go out in pairs)
//   attributes      depth and colour of the first vertex (flat shading)
// Triangles of zero area and triangles entirely off the frame are dropped.
// Vertex element layout: lane 0 x, lane 1 y (signed integer pixels, low 16
// bits used), lane 2 depth (low 16 bits), lane 3 colour (RGBA8888).
// Interfaces: valid/ready in and out; one vertex is taken per cycle, so a
// triangle is set up every three cycles; the result is held until the
// raster engine takes it.
// The engine's job (primitive setup for the rasteriser) is the document's;
// the edge-function formulation, flat attributes and data layout are this
// design's own.
module gse_setup
  import sp_pkg::*;
#(
  parameter int unsigned FB_W = 64,     // frame width in pixels
  parameter int unsigned FB_H = 64      // frame height in pixels
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  pair_t              in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic signed [39:0] ea [3],    // A coefficient of each edge
  output logic signed [39:0] eb [3],    // B coefficient
  output logic signed [39:0] ec [3],    // C coefficient
  output logic [15:0]        x0, x1, y0, y1,   // inclusive bounding box
  output logic [15:0]        z,
  output word_t              color,
  output logic               idle,
  output logic [31:0]        n_tri      // triangles passed to the raster
);
  logic               half;             // 0: next vertex is thread A's
  logic [1:0]         nv;               // vertices of the triangle so far
  logic signed [15:0] vx [3], vy [3];
  logic [15:0]        vz0;
  word_t              vc0;
  logic               take;
  logic signed [15:0] cur_x, cur_y;

  logic               hold;

  // the third vertex completes a triangle; hold input while output is full
  assign hold     = out_valid && !out_ready && nv == 2'd2;
  // a pair is consumed when its second vertex is taken
  assign take     = in_valid && !hold;
  assign in_ready = take && half;
  assign cur_x    = 16'(in_data[half][0]);
  assign cur_y    = 16'(in_data[half][1]);

  // triangle geometry of (vx[0], vx[1], current vertex)
  logic signed [39:0] ta [3], tb [3], tc [3], area;
  logic signed [15:0] px [3], py [3];
  logic signed [16:0] bx0, bx1, by0, by1;
  logic               keep;
  localparam logic signed [16:0] XMAX = 17'(FB_W - 1);
  localparam logic signed [16:0] YMAX = 17'(FB_H - 1);

  always_comb begin
    px[0] = vx[0]; py[0] = vy[0];
    px[1] = vx[1]; py[1] = vy[1];
    px[2] = cur_x; py[2] = cur_y;
    for (int i = 0; i < 3; i++) begin
      logic [1:0] j;
      j = (i == 2) ? 2'd0 : 2'(i + 1);
      ta[i] = 40'(py[i]) - 40'(py[j]);
      tb[i] = 40'(px[j]) - 40'(px[i]);
      tc[i] = 40'(px[i]) * 40'(py[j]) - 40'(px[j]) * 40'(py[i]);
    end
    area = tc[0] + tc[1] + tc[2];          // twice the signed area
    if (area < 0)
      for (int i = 0; i < 3; i++) begin
        ta[i] = -ta[i];
        tb[i] = -tb[i];
        tc[i] = -tc[i];
      end
    bx0 = 17'(px[0]); bx1 = 17'(px[0]);
    by0 = 17'(py[0]); by1 = 17'(py[0]);
    for (int i = 1; i < 3; i++) begin
      if (17'(px[i]) < bx0) bx0 = 17'(px[i]);
      if (17'(px[i]) > bx1) bx1 = 17'(px[i]);
      if (17'(py[i]) < by0) by0 = 17'(py[i]);
      if (17'(py[i]) > by1) by1 = 17'(py[i]);
    end
    keep = (area != 0) && bx1 >= 0 && by1 >= 0 &&
           bx0 <= XMAX && by0 <= YMAX;
    if (bx0 < 0) bx0 = '0;
    if (by0 < 0) by0 = '0;
    if (bx1 > XMAX) bx1 = XMAX;
    if (by1 > YMAX) by1 = YMAX;
    bx0[0] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half      <= 1'b0;
      nv        <= '0;
      out_valid <= 1'b0;
      n_tri     <= '0;
      for (int i = 0; i < 3; i++) begin
        vx[i] <= '0; vy[i] <= '0;
        ea[i] <= '0; eb[i] <= '0; ec[i] <= '0;
      end
      vz0 <= '0; vc0 <= '0;
      x0 <= '0; x1 <= '0; y0 <= '0; y1 <= '0; z <= '0; color <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        half <= ~half;
        if (nv == 2'd2) begin
          nv <= '0;
          if (keep) begin
            out_valid <= 1'b1;
            n_tri     <= n_tri + 32'd1;
            ea <= ta; eb <= tb; ec <= tc;
            x0 <= 16'(bx0); x1 <= 16'(bx1);
            y0 <= 16'(by0); y1 <= 16'(by1);
            z  <= vz0; color <= vc0;
          end
        end else begin
          vx[nv] <= cur_x;
          vy[nv] <= cur_y;
          if (nv == 2'd0) begin
            vz0 <= in_data[half][2][15:0];
            vc0 <= in_data[half][3];
          end
          nv <= nv + 2'd1;
        end
      end
    end
  end

  assign idle = !out_valid && nv == '0 && !half;
endmodule
