// Multi-core stream processor: top level.
//
// Two unified stream kernels (USK0, USK1) run stream programs; a
// configurable memory array (CMA) buffers the streams between them; the
// stream fetch unit (SFU) moves streams between external memory and the
// array through the memory controller (MC); the graphics specific engines
// (primitive setup, raster, ROP) do the fixed graphics work between and
// after the kernels; the adaptive task scheduler (ATS) moves the kernels to
// the bottleneck stage; the power-aware frequency scaling unit (PAFS) makes
// the five clocks.  The RISC CPU is outside this module: its system-bus
// accesses arrive on the register port and its cache refills on MC port 1.
//
// Clock domains (from PAFS):
//   SCLK  never gated: PAFS control (and the external RISC CPU)
//   HCLK  register port, SFU, MC, external memory and RISC memory ports
//   GCLK  primitive setup, raster and ROP engines
//   CCLK  CMA and ATS
//   UCLK  USK0 and USK1
// Every data path between domains goes through a dual-clock FIFO.  Each
// domain reports idle to PAFS when its own units have nothing to do and no
// FIFO into or out of it holds data (as seen by the FIFO's writer, so the
// signal stays right while the reader's clock is gated); new data therefore
// restarts a gated clock, and a writer keeps its clock until it has seen
// its FIFO drained.  Mode and configuration bits (CTRL, STAGE_PC, PAFS_*) go to
// the other domains without synchronisers and must be changed only while
// the units using them are idle; `run` is synchronised into UCLK.  The ROP
// frame read-back is to be used while the graphics engines are idle.
//
// Data flow, stream (video) mode: SFU load -> P0 -> stage-0 kernel -> P1 ->
// stage-1 kernel -> P2 -> SFU store.  Graphics mode: SFU load (vertices) ->
// P0 -> stage-0 (vertex) kernel -> P1 -> primitive setup -> raster -> P3
// (fragments) -> stage-1 (pixel) kernel -> P2 -> ROP frame buffer.
//
// Register port (word addresses, valid/ready, reads combinational):
//   0x00 CTRL      [0] run [1] ats_en [2] scale_en [3] gate_en [4] gfx
//                  [5] z_test_en
//   0x01 STAGE_PC  [6:0] stage-0 entry, [14:8] stage-1 entry
//   0x02 CMA_CFG   write: [1:0] partition, [10:2] base, [19:11] size
//   0x03 SFU_BASE  word address of the stream
//   0x04 SFU_SP    [15:0] element stride (words), [31:16] element pairs
//   0x05 SFU_GO    write: start, [0] 1 = store; read: [0] SFU busy,
//                  [31:16] commands completed
//   0x06 PAFS_DIV  [7:0] nominal log2 ratios (2 bits per domain H,G,C,U),
//                  [15:8] low-power ratios, [19:16] low-priority mask
//   0x07 PAFS_COST four 8-bit power weights (H in [7:0] ... U in [31:24])
//   0x08 PAFS_BUDGET [9:0]
//   0x09 IM_LO / 0x0A IM_HI  instruction word halves
//   0x0B IM_WR     write: [6:0] address, [8] to USK0, [9] to USK1
//   0x0C ROP_CLEAR write: clear the frame to this colour
//   0x0D ROP_ADDR  pixel-pair address for read-back
//   0x0E / 0x0F ROP_COLOR0/1  read: colour of the even / odd pixel
//   0x10 ROP_DEPTH read: {odd, even} depth
//   0x11-0x19 read-only statistics: scheduler mode switches, ROP pixels
//             written, ROP pixels rejected, divider ratios in effect
//             ([7:0], 2 bits per domain H,G,C,U), instructions issued by
//             USK0 and USK1, kernel runs ({USK1, USK0} 16 bits each),
//             triangles set up, fragment pairs rasterised.  They are read
//             across domains unsynchronised: read them while idle.
// The set of units, their connections and the five clock domains follow
// the document's block diagrams; the register map, the partition-based data
// flow and the FIFO crossings are this design's own.
module sp_top
  import sp_pkg::*;
#(
  parameter int unsigned CMA_DEPTH = 320,    // element pairs (10 KB)
  parameter int unsigned IM_DEPTH  = 128,    // USK instruction words (1 KB)
  parameter int unsigned FB_W      = 64,
  parameter int unsigned FB_H      = 64,
  localparam int unsigned CAW      = $clog2(CMA_DEPTH + 1)
) (
  input  logic        clk_pll,
  input  logic        rst_n,
  output logic        sclk,
  output logic        hclk,
  // register port (HCLK)
  input  logic        bus_valid,
  output logic        bus_ready,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  word_t       bus_wdata,
  output word_t       bus_rdata,
  // RISC CPU memory port (HCLK)
  input  logic        risc_req_valid,
  output logic        risc_req_ready,
  input  mem_req_t    risc_req,
  output logic        risc_rsp_valid,
  output word_t       risc_rsp_data,
  // external memory bus (HCLK)
  output logic        ext_req_valid,
  input  logic        ext_req_ready,
  output mem_req_t    ext_req,
  input  logic        ext_rsp_valid,
  input  word_t       ext_rsp_data,
  // observation
  output logic [3:0]  clk_on,
  output logic        low_power,
  output ats_mode_e   ats_mode
);
  localparam int unsigned FAW = $clog2(FB_W * FB_H / 2);
  localparam int unsigned PW  = $bits(pair_t);

  logic [3:0] dclk, idle;
  logic       gclk, cclk, uclk;

  // ---------------------------------------------------------------- HCLK --
  logic        run, ats_en, scale_en, gate_en, gfx, z_test_en;
  logic [6:0]  stage_pc [2];
  word_t       sfu_base, sfu_sp, im_lo, im_hi, rop_addr_r;
  logic [1:0]  div_nom [4], div_low [4];
  logic [3:0]  low_prio;
  logic [7:0]  cost [4];
  logic [9:0]  budget;
  logic        sfu_cmd_ready;
  logic        cmd_pending, cmd_store, sfu_done, sfu_idle, mc_idle;
  logic [15:0] n_cmd;
  logic        wr_cfg, wr_im, wr_clr, wr_go;
  logic        cfg_wr_ready, clr_wr_ready;
  logic [1:0]  im_wr_ready;

  assign hclk = dclk[0];
  assign gclk = dclk[1];
  assign cclk = dclk[2];
  assign uclk = dclk[3];

  always_comb begin
    wr_cfg = bus_valid && bus_we && bus_addr == 8'h02;
    wr_go  = bus_valid && bus_we && bus_addr == 8'h05;
    wr_im  = bus_valid && bus_we && bus_addr == 8'h0b;
    wr_clr = bus_valid && bus_we && bus_addr == 8'h0c;
    unique case (1'b1)
      wr_cfg:  bus_ready = cfg_wr_ready;
      wr_go:   bus_ready = !cmd_pending;
      wr_im:   bus_ready = (!bus_wdata[8] || im_wr_ready[0]) &&
                           (!bus_wdata[9] || im_wr_ready[1]);
      wr_clr:  bus_ready = clr_wr_ready;
      default: bus_ready = 1'b1;
    endcase
  end

  always_ff @(posedge hclk or negedge rst_n) begin
    if (!rst_n) begin
      {run, ats_en, scale_en, gate_en, gfx, z_test_en} <= '0;
      stage_pc[0] <= '0; stage_pc[1] <= '0;
      sfu_base <= '0; sfu_sp <= '0; im_lo <= '0; im_hi <= '0; rop_addr_r <= '0;
      for (int i = 0; i < 4; i++) begin
        div_nom[i] <= '0; div_low[i] <= 2'd1; cost[i] <= 8'd16;
      end
      low_prio    <= '0;
      budget      <= '1;
      cmd_pending <= 1'b0;
      cmd_store   <= 1'b0;
      n_cmd       <= '0;
    end else begin
      if (bus_valid && bus_we && bus_ready) begin
        unique case (bus_addr)
          8'h00: {z_test_en, gfx, gate_en, scale_en, ats_en, run} <= bus_wdata[5:0];
          8'h01: begin stage_pc[0] <= bus_wdata[6:0]; stage_pc[1] <= bus_wdata[14:8]; end
          8'h03: sfu_base <= bus_wdata;
          8'h04: sfu_sp   <= bus_wdata;
          8'h05: begin cmd_pending <= 1'b1; cmd_store <= bus_wdata[0]; end
          8'h06: begin
            for (int i = 0; i < 4; i++) begin
              div_nom[i] <= bus_wdata[2*i +: 2];
              div_low[i] <= bus_wdata[8 + 2*i +: 2];
            end
            low_prio <= bus_wdata[19:16];
          end
          8'h07: for (int i = 0; i < 4; i++) cost[i] <= bus_wdata[8*i +: 8];
          8'h08: budget <= bus_wdata[9:0];
          8'h09: im_lo  <= bus_wdata;
          8'h0a: im_hi  <= bus_wdata;
          8'h0d: rop_addr_r <= bus_wdata;
          default: ;
        endcase
      end
      if (cmd_pending && sfu_cmd_ready) cmd_pending <= 1'b0;   // accepted
      if (sfu_done) n_cmd <= n_cmd + 16'd1;
    end
  end

  // read side
  logic [31:0] rop_depth;
  word_t       rop_color [2];
  logic [15:0] ats_switches;
  logic [1:0]  ratio_now [4];
  logic [31:0] n_rop_wr, n_rop_rej, n_tri, n_rpairs;
  logic [31:0] n_instr [2], n_runs [2];
  always_comb begin
    unique case (bus_addr)
      8'h00:   bus_rdata = 32'({z_test_en, gfx, gate_en, scale_en, ats_en, run});
      8'h01:   bus_rdata = {17'd0, stage_pc[1], 1'b0, stage_pc[0]};
      8'h03:   bus_rdata = sfu_base;
      8'h04:   bus_rdata = sfu_sp;
      8'h05:   bus_rdata = {n_cmd, 15'd0, cmd_pending || !sfu_idle};
      8'h08:   bus_rdata = 32'(budget);
      8'h0d:   bus_rdata = rop_addr_r;
      8'h0e:   bus_rdata = rop_color[0];
      8'h0f:   bus_rdata = rop_color[1];
      8'h10:   bus_rdata = rop_depth;
      8'h11:   bus_rdata = 32'(ats_switches);
      8'h12:   bus_rdata = n_rop_wr;
      8'h13:   bus_rdata = n_rop_rej;
      8'h14:   bus_rdata = {24'd0, ratio_now[3], ratio_now[2], ratio_now[1], ratio_now[0]};
      8'h15:   bus_rdata = n_instr[0];
      8'h16:   bus_rdata = n_instr[1];
      8'h17:   bus_rdata = {n_runs[1][15:0], n_runs[0][15:0]};
      8'h18:   bus_rdata = n_tri;
      8'h19:   bus_rdata = n_rpairs;
      default: bus_rdata = '0;
    endcase
  end

  // ---- SFU and MC -------------------------------------------------------
  logic     sfu_mreq_valid, sfu_mreq_ready, sfu_mrsp_valid;
  mem_req_t sfu_mreq;
  word_t    sfu_mrsp_data;
  logic     s2c_valid, s2c_ready, c2s_valid, c2s_ready;
  pair_t    s2c_data, c2s_data;
  logic     s2c_nonempty, c2s_nonempty;

  sfu u_sfu (
    .clk(hclk), .rst_n,
    .cmd_valid(cmd_pending), .cmd_ready(sfu_cmd_ready), .cmd_store,
    .cmd_base(sfu_base), .cmd_stride(sfu_sp[15:0]), .cmd_pairs(sfu_sp[31:16]),
    .idle(sfu_idle), .done(sfu_done),
    .mem_req_valid(sfu_mreq_valid), .mem_req_ready(sfu_mreq_ready),
    .mem_req(sfu_mreq), .mem_rsp_valid(sfu_mrsp_valid), .mem_rsp_data(sfu_mrsp_data),
    .cma_wr_valid(s2c_valid), .cma_wr_ready(s2c_ready), .cma_wr_data(s2c_data),
    .cma_rd_valid(c2s_valid), .cma_rd_ready(c2s_ready), .cma_rd_data(c2s_data)
  );

  logic     m_req_valid [2], m_req_ready [2], m_rsp_valid [2];
  mem_req_t m_req [2];
  word_t    m_rsp_data [2];
  assign m_req_valid[0] = sfu_mreq_valid;
  assign m_req[0]       = sfu_mreq;
  assign sfu_mreq_ready = m_req_ready[0];
  assign sfu_mrsp_valid = m_rsp_valid[0];
  assign sfu_mrsp_data  = m_rsp_data[0];
  assign m_req_valid[1] = risc_req_valid;
  assign m_req[1]       = risc_req;
  assign risc_req_ready = m_req_ready[1];
  assign risc_rsp_valid = m_rsp_valid[1];
  assign risc_rsp_data  = m_rsp_data[1];

  mc u_mc (
    .clk(hclk), .rst_n,
    .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp_data,
    .ext_req_valid, .ext_req_ready, .ext_req, .ext_rsp_valid, .ext_rsp_data,
    .idle(mc_idle)
  );

  // ---------------------------------------------------------------- CCLK --
  logic          cfg_valid, cma_gfx;
  logic [19:0]   cfg_data;
  logic          cfg_nonempty;
  logic          cs_wr_valid, cs_wr_ready, cs_rd_valid, cs_rd_ready;
  pair_t         cs_wr_data, cs_rd_data;
  logic          g_rd_valid, g_rd_ready, g_wr_valid, g_wr_ready;
  pair_t         g_rd_data, g_wr_data;
  logic          r_rd_valid, r_rd_ready;
  pair_t         r_rd_data;
  logic [1:0]    route, u_rd_valid, u_rd_ready, u_rd_tag;
  logic [1:0]    u_wr_valid, u_wr_ready, u_wr_tag;
  pair_t         u_rd_data [2], u_wr_data [2];
  logic [CAW-1:0] count [4], size [4];

  cdc_fifo #(.W(20)) u_cfg_fifo (
    .rst_n, .wr_clk(hclk), .wr_valid(wr_cfg), .wr_ready(cfg_wr_ready),
    .wr_data(bus_wdata[19:0]), .wr_nonempty(cfg_nonempty),
    .rd_clk(cclk), .rd_valid(cfg_valid), .rd_ready(1'b1), .rd_data(cfg_data)
  );

  cdc_fifo #(.W(PW)) u_s2c (
    .rst_n, .wr_clk(hclk), .wr_valid(s2c_valid), .wr_ready(s2c_ready),
    .wr_data(s2c_data), .wr_nonempty(s2c_nonempty),
    .rd_clk(cclk), .rd_valid(cs_wr_valid), .rd_ready(cs_wr_ready), .rd_data(cs_wr_data)
  );
  cdc_fifo #(.W(PW)) u_c2s (
    .rst_n, .wr_clk(cclk), .wr_valid(cs_rd_valid), .wr_ready(cs_rd_ready),
    .wr_data(cs_rd_data), .wr_nonempty(c2s_nonempty),
    .rd_clk(hclk), .rd_valid(c2s_valid), .rd_ready(c2s_ready), .rd_data(c2s_data)
  );

  assign cma_gfx = gfx;

  cma #(.DEPTH(CMA_DEPTH)) u_cma (
    .clk(cclk), .rst_n, .gfx(cma_gfx),
    .cfg_we(cfg_valid), .cfg_part(cfg_data[1:0]),
    .cfg_base(CAW'(cfg_data[10:2])), .cfg_size(CAW'(cfg_data[19:11])),
    .sfu_wr_valid(cs_wr_valid), .sfu_wr_ready(cs_wr_ready), .sfu_wr_data(cs_wr_data),
    .sfu_rd_valid(cs_rd_valid), .sfu_rd_ready(cs_rd_ready), .sfu_rd_data(cs_rd_data),
    .gse_rd_valid(g_rd_valid), .gse_rd_ready(g_rd_ready), .gse_rd_data(g_rd_data),
    .gse_wr_valid(g_wr_valid), .gse_wr_ready(g_wr_ready), .gse_wr_data(g_wr_data),
    .rop_rd_valid(r_rd_valid), .rop_rd_ready(r_rd_ready), .rop_rd_data(r_rd_data),
    .route, .usk_rd_valid(u_rd_valid), .usk_rd_ready(u_rd_ready),
    .usk_rd_data(u_rd_data), .usk_rd_tag(u_rd_tag),
    .usk_wr_valid(u_wr_valid), .usk_wr_ready(u_wr_ready),
    .usk_wr_data(u_wr_data), .usk_wr_tag(u_wr_tag),
    .count, .size
  );

  ats #(.CW(CAW)) u_ats (
    .clk(cclk), .rst_n, .ats_en,
    .in_count(count[0]),
    .mid_count(cma_gfx ? count[3] : count[1]),
    .mid_size(cma_gfx ? size[3] : size[1]),
    .mode(ats_mode), .route, .switches(ats_switches)
  );

  // ---------------------------------------------------------------- UCLK --
  logic [1:0]  k_in_valid, k_in_ready, k_in_tag, k_out_valid, k_out_ready, k_out_tag;
  pair_t       k_in_data [2], k_out_data [2];
  logic [1:0]  c2u_nonempty, u2c_nonempty, im_nonempty, k_boundary, k_iq_empty;
  logic [1:0]  iq_valid, iq_ready;
  logic [70:0] iq_data [2];
  logic        run_s1, run_s2;

  always_ff @(posedge uclk or negedge rst_n) begin
    if (!rst_n) {run_s2, run_s1} <= '0;
    else        {run_s2, run_s1} <= {run_s1, run};
  end

  for (genvar k = 0; k < 2; k++) begin : g_usk
    cdc_fifo #(.W(PW + 1)) u_c2u (
      .rst_n, .wr_clk(cclk), .wr_valid(u_rd_valid[k]), .wr_ready(u_rd_ready[k]),
      .wr_data({u_rd_tag[k], u_rd_data[k]}), .wr_nonempty(c2u_nonempty[k]),
      .rd_clk(uclk), .rd_valid(k_in_valid[k]), .rd_ready(k_in_ready[k]),
      .rd_data({k_in_tag[k], k_in_data[k]})
    );
    cdc_fifo #(.W(PW + 1)) u_u2c (
      .rst_n, .wr_clk(uclk), .wr_valid(k_out_valid[k]), .wr_ready(k_out_ready[k]),
      .wr_data({k_out_tag[k], k_out_data[k]}), .wr_nonempty(u2c_nonempty[k]),
      .rd_clk(cclk), .rd_valid(u_wr_valid[k]), .rd_ready(u_wr_ready[k]),
      .rd_data({u_wr_tag[k], u_wr_data[k]})
    );
    cdc_fifo #(.W(71)) u_im (
      .rst_n, .wr_clk(hclk), .wr_valid(wr_im && bus_ready && bus_wdata[8 + k]),
      .wr_ready(im_wr_ready[k]), .wr_data({bus_wdata[6:0], im_hi, im_lo}),
      .wr_nonempty(im_nonempty[k]),
      .rd_clk(uclk), .rd_valid(iq_valid[k]), .rd_ready(iq_ready[k]), .rd_data(iq_data[k])
    );
    usk #(.IM_DEPTH(IM_DEPTH)) u_usk (
      .clk(uclk), .rst_n, .run(run_s2), .stage_pc,
      .iq_valid(iq_valid[k]), .iq_ready(iq_ready[k]),
      .iq_addr(iq_data[k][70:64]), .iq_instr(instr_t'(iq_data[k][63:0])),
      .in_valid(k_in_valid[k]), .in_ready(k_in_ready[k]),
      .in_data(k_in_data[k]), .in_tag(k_in_tag[k]),
      .out_valid(k_out_valid[k]), .out_ready(k_out_ready[k]),
      .out_data(k_out_data[k]), .out_tag(k_out_tag[k]),
      .at_boundary(k_boundary[k]), .iq_empty(k_iq_empty[k]),
      .n_instr(n_instr[k]), .n_runs(n_runs[k])
    );
  end

  // ---------------------------------------------------------------- GCLK --
  logic               gs_valid, gs_ready, st_valid, st_ready, rs_valid, rs_ready;
  pair_t              gs_data, rs_data, ro_data;
  logic               ro_valid, ro_ready;
  logic signed [39:0] ea [3], eb [3], ec [3];
  logic [15:0]        bx0, bx1, by0, by1, tz;
  word_t              tcol, clr_color;
  logic               setup_idle, raster_idle, rop_idle, clr_valid, clearing;
  logic               c2g_nonempty, g2c_nonempty, c2r_nonempty, clr_nonempty;

  cdc_fifo #(.W(PW)) u_c2g (
    .rst_n, .wr_clk(cclk), .wr_valid(g_rd_valid), .wr_ready(g_rd_ready),
    .wr_data(g_rd_data), .wr_nonempty(c2g_nonempty),
    .rd_clk(gclk), .rd_valid(gs_valid), .rd_ready(gs_ready), .rd_data(gs_data)
  );

  gse_setup #(.FB_W(FB_W), .FB_H(FB_H)) u_setup (
    .clk(gclk), .rst_n, .in_valid(gs_valid), .in_ready(gs_ready), .in_data(gs_data),
    .out_valid(st_valid), .out_ready(st_ready),
    .ea, .eb, .ec, .x0(bx0), .x1(bx1), .y0(by0), .y1(by1), .z(tz), .color(tcol),
    .idle(setup_idle), .n_tri
  );

  gse_raster u_raster (
    .clk(gclk), .rst_n, .in_valid(st_valid), .in_ready(st_ready),
    .ea, .eb, .ec, .x0(bx0), .x1(bx1), .y0(by0), .y1(by1), .z(tz), .color(tcol),
    .out_valid(rs_valid), .out_ready(rs_ready), .out_data(rs_data),
    .idle(raster_idle), .n_pairs(n_rpairs)
  );

  cdc_fifo #(.W(PW)) u_g2c (
    .rst_n, .wr_clk(gclk), .wr_valid(rs_valid), .wr_ready(rs_ready),
    .wr_data(rs_data), .wr_nonempty(g2c_nonempty),
    .rd_clk(cclk), .rd_valid(g_wr_valid), .rd_ready(g_wr_ready), .rd_data(g_wr_data)
  );

  cdc_fifo #(.W(PW)) u_c2r (
    .rst_n, .wr_clk(cclk), .wr_valid(r_rd_valid), .wr_ready(r_rd_ready),
    .wr_data(r_rd_data), .wr_nonempty(c2r_nonempty),
    .rd_clk(gclk), .rd_valid(ro_valid), .rd_ready(ro_ready), .rd_data(ro_data)
  );

  cdc_fifo #(.W(32)) u_clr (
    .rst_n, .wr_clk(hclk), .wr_valid(wr_clr), .wr_ready(clr_wr_ready),
    .wr_data(bus_wdata), .wr_nonempty(clr_nonempty),
    .rd_clk(gclk), .rd_valid(clr_valid), .rd_ready(!clearing), .rd_data(clr_color)
  );

  gse_rop #(.FB_W(FB_W), .FB_H(FB_H)) u_rop (
    .clk(gclk), .rst_n, .z_test_en,
    .in_valid(ro_valid), .in_ready(ro_ready), .in_data(ro_data),
    .clear(clr_valid), .clear_color(clr_color), .clearing,
    .rd_addr(FAW'(rop_addr_r)), .rd_depth(rop_depth), .rd_color(rop_color),
    .idle(rop_idle), .n_written(n_rop_wr), .n_rejected(n_rop_rej)
  );

  // ---------------------------------------------------------------- SCLK --
  // A domain is busy while its units work, while a FIFO into it holds data
  // and while a FIFO out of it still holds data as its writer sees it (the
  // writer's view only clears once its own clock has seen the reader's
  // pointer, so its clock must keep running until then).
  assign idle[0] = !bus_valid && !risc_req_valid && sfu_idle && !cmd_pending &&
                   mc_idle && !c2s_nonempty &&
                   !cfg_nonempty && !s2c_nonempty && im_nonempty == '0 && !clr_nonempty;
  assign idle[1] = setup_idle && raster_idle && rop_idle && !c2g_nonempty &&
                   !c2r_nonempty && !clr_nonempty && !g2c_nonempty;
  assign idle[2] = count[0] == '0 && count[1] == '0 && count[2] == '0 &&
                   count[3] == '0 && !cfg_nonempty && !s2c_nonempty &&
                   !g2c_nonempty && u2c_nonempty == '0 &&
                   !c2s_nonempty && c2u_nonempty == '0 && !c2g_nonempty && !c2r_nonempty;
  assign idle[3] = &k_boundary && &k_iq_empty && c2u_nonempty == '0 &&
                   im_nonempty == '0 && u2c_nonempty == '0;

  pafs #(.NDOM(4)) u_pafs (
    .clk_pll, .rst_n, .scale_en, .gate_en, .div_nom, .div_low, .low_prio,
    .cost, .budget, .idle, .sclk, .dclk, .low_power, .clk_on, .ratio_now
  );
endmodule
