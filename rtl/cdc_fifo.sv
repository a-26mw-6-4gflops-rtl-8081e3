// Dual-clock FIFO for the crossings between clock domains.
//
// The frequency scaling unit runs the bus/fetch, memory array and kernel
// domains at independent, gateable rates, so every stream that passes from
// one domain to the next goes through one of these FIFOs.  Standard
// structure: binary pointers with one wrap bit, Gray-coded copies
// synchronised by two flip-flops into the other domain.  Either clock may
// stop (be gated) at any time without loss.  The write side also reports
// whether the FIFO holds data as it sees it (`wr_nonempty`): that signal is
// valid while the read clock is stopped and serves as the wake-up condition
// for the read domain.
// Interfaces: valid/ready on both sides; `rd_data` is the head entry and is
// valid whenever `rd_valid` is high (first-word fall-through).
// The FIFO itself is not in the document, which gives the clock domains but
// not how data crosses them; it is this design's own.
module cdc_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4     // power of two
) (
  input  logic         rst_n,
  // write side
  input  logic         wr_clk,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [W-1:0] wr_data,
  output logic         wr_nonempty,
  // read side
  input  logic         rd_clk,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [W-1:0] rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;                 // binary, own domain
  logic [AW:0]  wgray, rgray;               // Gray, own domain
  logic [AW:0]  rgray_w1, rgray_w2;         // read pointer in write domain
  logic [AW:0]  wgray_r1, wgray_r2;         // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wgray = bin2gray(wptr);
  assign rgray = bin2gray(rptr);

  // write domain
  assign wr_ready    = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wr_nonempty = (wgray != rgray_w2);

  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_valid && wr_ready) wptr <= wptr + 1'b1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wptr[AW-1:0]] <= wr_data;
  end

  // read domain
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr     <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) rptr <= rptr + 1'b1;
    end
  end
endmodule
