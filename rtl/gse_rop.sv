// ROP engine of the graphics specific engines (GSE): final depth and colour
// operations.
//
// Holds an on-chip frame of FB_W x FB_H pixels, stored as pixel pairs (one
// word per even column): a 16-bit depth and a 32-bit RGBA colour per pixel.
// For each incoming fragment pair (two adjacent pixels, layout as produced
// by the raster engine) it reads the stored depths, and for every covered
// pixel that passes the depth test (new depth < stored depth, or the test
// disabled) writes the new depth and colour; the other pixel of the pair is
// left untouched.  A clear command fills the frame with a colour and the
// maximum depth, one pixel pair per cycle.  A read port returns a stored
// pixel pair for display or for checking.
// Interfaces: fragment input valid/ready; clear request with a done flag;
// combinational read port.
// Timing: one fragment pair (two pixels) per cycle, read-modify-write in a
// single cycle; a clear takes FB_W*FB_H/2 cycles and blocks fragments.
// The engine's job (final colour/depth operations) is the document's; the
// frame size, test function and storage layout are this design's own.
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of the handshake assertion, which lint reports as a
// reset used both ways; the assertion is not hardware.
module gse_rop
  import sp_pkg::*;
#(
  parameter int unsigned FB_W = 64,
  parameter int unsigned FB_H = 64,
  localparam int unsigned NW  = FB_W * FB_H / 2,
  localparam int unsigned AW  = $clog2(NW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          z_test_en,
  // fragment pairs
  input  logic          in_valid,
  output logic          in_ready,
  input  pair_t         in_data,
  // clear
  input  logic          clear,          // pulse: start clearing
  input  word_t         clear_color,
  output logic          clearing,
  // read-back
  input  logic [AW-1:0] rd_addr,        // (y * FB_W + x) / 2
  output logic [31:0]   rd_depth,       // {odd pixel, even pixel}
  output word_t         rd_color [2],
  // status
  output logic          idle,
  output logic [31:0]   n_written,      // pixels written
  output logic [31:0]   n_rejected      // covered pixels failing the test
);
  logic [31:0]   zbuf [NW];
  word_t         cbuf [2][NW];
  logic [AW-1:0] clr_addr;
  word_t         clr_color;
  logic [AW-1:0] waddr;
  logic [31:0]   zold, znew;
  logic [1:0]    cov, pass;

  assign in_ready = !clearing;
  assign idle     = !clearing;
  assign waddr    = AW'((32'(in_data[0][1][15:0]) * FB_W + 32'(in_data[0][0][15:0])) >> 1);
  assign zold     = zbuf[waddr];

  always_comb begin
    znew = zold;
    for (int t = 0; t < 2; t++) begin
      cov[t]  = in_data[t][0][31];
      pass[t] = cov[t] && (!z_test_en ||
                in_data[t][2][15:0] < zold[16*t +: 16]);
      if (pass[t]) znew[16*t +: 16] = in_data[t][2][15:0];
    end
  end

  always_ff @(posedge clk) begin
    if (clearing) begin
      zbuf[clr_addr]    <= '1;
      cbuf[0][clr_addr] <= clr_color;
      cbuf[1][clr_addr] <= clr_color;
    end else if (in_valid) begin
      zbuf[waddr] <= znew;
      for (int t = 0; t < 2; t++)
        if (pass[t]) cbuf[t][waddr] <= in_data[t][3];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing   <= 1'b0;
      clr_addr   <= '0;
      clr_color  <= '0;
      n_written  <= '0;
      n_rejected <= '0;
    end else begin
      if (clear && !clearing) begin
        clearing  <= 1'b1;
        clr_addr  <= '0;
        clr_color <= clear_color;
      end else if (clearing) begin
        clr_addr <= clr_addr + 1'b1;
        if (32'(clr_addr) == NW - 1) clearing <= 1'b0;
      end else if (in_valid) begin
        n_written  <= n_written  + 32'(pass[0]) + 32'(pass[1]);
        n_rejected <= n_rejected + 32'(cov[0] && !pass[0]) + 32'(cov[1] && !pass[1]);
      end
    end
  end

  assign rd_depth    = zbuf[rd_addr];
  assign rd_color[0] = cbuf[0][rd_addr];
  assign rd_color[1] = cbuf[1][rd_addr];

  // a fragment pair starts on an even column inside the frame
  assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_ready |-> (in_data[0][0][0] == 1'b0 && in_data[0][0][15:0] < 16'(FB_W) &&
              in_data[0][1][15:0] < 16'(FB_H)))
        else $error("ROP: fragment pair outside the frame or misaligned");
endmodule
