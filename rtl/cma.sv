// Configurable memory array (CMA): the stream buffer between the stream
// fetch unit and the two unified stream kernels.
//
// One 10 KB array of element pairs (DEPTH entries of 2 x 128 bits) is cut
// into four ring-buffer partitions by software-written base/size registers:
//   P0  In$    stage-0 input, filled by the stream fetch unit
//   P1  mid    stage-0 output (the inter-level buffer)
//   P2  Out$   stage-1 output
//   P3  frag   graphics mode only: fragments from the graphics engines
// Stream mode (gfx = 0): stage 1 reads P1, and the stream fetch unit drains
// P2.  Graphics mode (gfx = 1): the graphics specific engines read the
// transformed vertices from P1 and write fragments to P3, stage 1 reads P3,
// and the ROP engine drains P2.
// Moving the partition boundaries gives the inter-level allocations of the
// balanced, vertex-bound and pixel-bound cases; entries outside the
// partitions are unused (kept for temporary data).  Writing a partition's
// registers empties it.
// Kernel ports: each kernel k reads the partition selected by route[k] from
// the task scheduler (0: P0, 1: stage-1 input) and receives the stage tag
// with the data; it writes pairs tagged with the stage they came from, and
// the tag picks the target partition (0: P1, 1: P2).  When both kernels
// address the same partition, a round-robin bit per partition alternates
// between them (a kernel that is not ready does not hold up the other).
// All ports are valid/ready; reads are first-word fall-through, and each
// partition accepts one push and one pop per cycle.
// The document gives the array, its 10 KB size, its use as a buffer between
// units and its re-partitioning; the ring-buffer organisation, the register
// interface and the arbitration are this design's own.  The cache mode that
// the document also mentions is not built.
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of the handshake assertion, which lint reports as a
// reset used both ways; the assertion is not hardware.
module cma
  import sp_pkg::*;
#(
  parameter int unsigned DEPTH = 320,          // 10 KB / 32 B per pair
  parameter int unsigned AW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic          gfx,                   // graphics mode
  input  logic          cfg_we,
  input  logic [1:0]    cfg_part,
  input  logic [AW-1:0] cfg_base,
  input  logic [AW-1:0] cfg_size,
  // stream fetch unit: push P0, pop P2 (stream mode)
  input  logic          sfu_wr_valid,
  output logic          sfu_wr_ready,
  input  pair_t         sfu_wr_data,
  output logic          sfu_rd_valid,
  input  logic          sfu_rd_ready,
  output pair_t         sfu_rd_data,
  // graphics engines: pop P1, push P3, ROP pops P2 (graphics mode)
  output logic          gse_rd_valid,
  input  logic          gse_rd_ready,
  output pair_t         gse_rd_data,
  input  logic          gse_wr_valid,
  output logic          gse_wr_ready,
  input  pair_t         gse_wr_data,
  output logic          rop_rd_valid,
  input  logic          rop_rd_ready,
  output pair_t         rop_rd_data,
  // kernels
  input  logic [1:0]    route,
  output logic [1:0]    usk_rd_valid,
  input  logic [1:0]    usk_rd_ready,
  output pair_t         usk_rd_data [2],
  output logic [1:0]    usk_rd_tag,
  input  logic [1:0]    usk_wr_valid,
  output logic [1:0]    usk_wr_ready,
  input  pair_t         usk_wr_data [2],
  input  logic [1:0]    usk_wr_tag,
  // status
  output logic [AW-1:0] count [4],
  output logic [AW-1:0] size  [4]
);
  pair_t         mem [DEPTH];
  logic [AW-1:0] base [4];
  logic [AW-1:0] rd_ptr [4], wr_ptr [4];

  logic [3:0]    push, pop;
  pair_t         push_data [4];
  logic [3:0]    rr;                 // round-robin bit per partition
  logic [1:0]    rd_gnt, wr_gnt;
  logic [3:0]    has_data, has_room;
  logic [1:0]    rp [2], wp [2];     // partition read / written by kernel k
  logic          same_rd, same_wr;

  for (genvar p = 0; p < 4; p++) begin : g_stat
    assign has_data[p] = count[p] != '0;
    assign has_room[p] = count[p] != size[p];
  end

  for (genvar k = 0; k < 2; k++) begin : g_part
    assign rp[k] = route[k] ? (gfx ? 2'd3 : 2'd1) : 2'd0;
    assign wp[k] = usk_wr_tag[k] ? 2'd2 : 2'd1;
  end

  assign same_rd = (rp[0] == rp[1]);
  assign same_wr = usk_wr_valid[0] && usk_wr_valid[1] && (wp[0] == wp[1]);

  // ---- read side --------------------------------------------------------
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      rd_gnt[k]       = !same_rd || (rr[rp[k]] == k[0]) || !usk_rd_ready[k^1];
      usk_rd_valid[k] = rd_gnt[k] && has_data[rp[k]];
      usk_rd_data[k]  = mem[rd_ptr[rp[k]]];
      usk_rd_tag[k]   = route[k];
    end
    sfu_rd_valid = !gfx && has_data[2];
    sfu_rd_data  = mem[rd_ptr[2]];
    rop_rd_valid = gfx && has_data[2];
    rop_rd_data  = mem[rd_ptr[2]];
    gse_rd_valid = gfx && has_data[1];
    gse_rd_data  = mem[rd_ptr[1]];
    pop    = '0;
    pop[2] = (sfu_rd_valid && sfu_rd_ready) || (rop_rd_valid && rop_rd_ready);
    pop[1] = gse_rd_valid && gse_rd_ready;
    for (int k = 0; k < 2; k++)
      if (usk_rd_valid[k] && usk_rd_ready[k]) pop[rp[k]] = 1'b1;
  end

  // ---- write side -------------------------------------------------------
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      wr_gnt[k]       = usk_wr_valid[k] && (!same_wr || rr[wp[k]] == k[0]);
      usk_wr_ready[k] = wr_gnt[k] && has_room[wp[k]];
    end
    sfu_wr_ready = has_room[0];
    gse_wr_ready = gfx && has_room[3];
    push         = '0;
    push_data[0] = sfu_wr_data;
    push_data[1] = usk_wr_data[0];
    push_data[2] = usk_wr_data[0];
    push_data[3] = gse_wr_data;
    push[0]      = sfu_wr_valid && sfu_wr_ready;
    push[3]      = gse_wr_valid && gse_wr_ready;
    for (int k = 0; k < 2; k++)
      if (usk_wr_valid[k] && usk_wr_ready[k]) begin
        push[wp[k]]      = 1'b1;
        push_data[wp[k]] = usk_wr_data[k];
      end
  end

  // ---- pointers, counts, round robin -------------------------------------
  function automatic logic [AW-1:0] bump(input logic [AW-1:0] ptr,
                                         input logic [AW-1:0] b,
                                         input logic [AW-1:0] s);
    return (ptr + 1'b1 == b + s) ? b : ptr + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 4; p++) begin
        base[p]   <= '0;
        size[p]   <= '0;
        rd_ptr[p] <= '0;
        wr_ptr[p] <= '0;
        count[p]  <= '0;
      end
      rr <= '0;
    end else begin
      for (int p = 0; p < 4; p++) begin
        if (push[p]) wr_ptr[p] <= bump(wr_ptr[p], base[p], size[p]);
        if (pop[p])  rd_ptr[p] <= bump(rd_ptr[p], base[p], size[p]);
        count[p] <= count[p] + AW'(push[p]) - AW'(pop[p]);
      end
      // alternate a shared partition's owner after each transfer
      for (int k = 0; k < 2; k++)
        if (same_rd && usk_rd_valid[k] && usk_rd_ready[k]) rr[rp[k]] <= ~k[0];
      if (same_wr && push[wp[0]])
        rr[wp[0]] <= ~rr[wp[0]];
      if (cfg_we) begin
        base[cfg_part]   <= cfg_base;
        size[cfg_part]   <= cfg_size;
        rd_ptr[cfg_part] <= cfg_base;
        wr_ptr[cfg_part] <= cfg_base;
        count[cfg_part]  <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++)
      if (push[p]) mem[wr_ptr[p]] <= push_data[p];
  end

  // configured partitions must lie inside the array
  assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> (32'(cfg_base) + 32'(cfg_size) <= DEPTH))
        else $error("CMA partition %0d exceeds the array", cfg_part);
endmodule
