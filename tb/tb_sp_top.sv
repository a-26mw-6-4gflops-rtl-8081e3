// End-to-end testbench of the multi-core stream processor, at the default
// sizes (320-pair memory array, 128-word instruction memories, 64x64 frame).
//
// The testbench plays the RISC CPU: it programs the two kernels over the
// register port, sets up the array partitions and the clock controller,
// and runs two stream jobs and one graphics job.
//   stream jobs   192 elements are loaded from external memory, pass a
//                 stage-0 kernel (x*3, integer) and a stage-1 kernel (x+5),
//                 and are stored back.  Job 1 makes stage 1 slow, job 2
//                 makes stage 0 slow, so the task scheduler has to move the
//                 kernels both ways.  Every stored element is compared with
//                 the expected value (the two kernels may reorder pairs, so
//                 elements are matched by value).
//   graphics job  triangles are loaded as vertices, moved by (+2) in every
//                 lane by the vertex kernel, set up, rasterised, passed
//                 through the pixel kernel and depth-tested into the frame;
//                 the whole frame is read back and compared with a reference
//                 rasterisation.  Depths are distinct, so the result does
//                 not depend on the order of fragments.
// Meanwhile a second master on the memory controller issues random reads
// (the CPU's cache refills) and checks their data.
// Mechanism counters (each must be non-zero): vertex-bound and pixel-bound
// scheduler modes, clock gating of a domain, low-power state, frequency
// scaling of the low-priority domain, kernel output stalls (ST waiting), memory-controller contention, depth
// test rejections, stream load and store commands.
// Rate check: the two stream jobs must finish within a cycle bound derived
// from one instruction per kernel cycle.
module tb_sp_top;
  import sp_pkg::*;
  localparam int FB_W = 64, FB_H = 64;
  localparam int NPAIR = 96;                  // pairs per stream job
  localparam int NTRI = 8;

  logic     clk_pll = 1'b0, rst_n;
  logic     sclk, hclk;
  logic     bus_valid, bus_ready, bus_we;
  logic [7:0] bus_addr;
  word_t    bus_wdata, bus_rdata;
  logic     risc_req_valid, risc_req_ready, risc_rsp_valid;
  mem_req_t risc_req;
  word_t    risc_rsp_data;
  logic     ext_req_valid, ext_req_ready, ext_rsp_valid;
  mem_req_t ext_req;
  word_t    ext_rsp_data;
  logic [3:0] clk_on;
  logic     low_power;
  ats_mode_e ats_mode;

  int checks = 0, failures = 0;

  always #2 clk_pll = ~clk_pll;

  sp_top dut (.*);

  ext_mem_model #(.AW(14), .LAT(3), .STALL(1'b1)) mem (
    .clk(hclk), .req_valid(ext_req_valid), .req_ready(ext_req_ready), .req(ext_req),
    .rsp_valid(ext_rsp_valid), .rsp_data(ext_rsp_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ------------------------------------------------
  int n_vertex_bound = 0, n_pixel_bound = 0, n_gated = 0, n_low_power = 0;
  int n_scaled = 0, n_st_stall = 0, n_contention = 0;
  ats_mode_e mode_q = ATS_BALANCED;
  logic [3:0] clk_on_q = '0;
  logic low_power_q = 1'b0;

  always @(posedge sclk) begin
    if (rst_n) begin
      if (ats_mode != mode_q && ats_mode == ATS_VERTEX_BOUND) n_vertex_bound++;
      if (ats_mode != mode_q && ats_mode == ATS_PIXEL_BOUND)  n_pixel_bound++;
      for (int i = 0; i < 4; i++) if (clk_on_q[i] && !clk_on[i]) n_gated++;
      if (low_power && !low_power_q) n_low_power++;
      if (clk_on[1] && dut.ratio_now[1] == 2'd2) n_scaled++;
      mode_q = ats_mode; clk_on_q = clk_on; low_power_q = low_power;
    end
  end

  always @(posedge dut.uclk)
    for (int k = 0; k < 2; k++) begin
      if (dut.k_out_valid[k] && !dut.k_out_ready[k]) n_st_stall++;
    end

  always @(posedge hclk)
    if (dut.m_req_valid[0] && dut.m_req_valid[1]) n_contention++;

  // ---- register port -----------------------------------------------------
  task automatic bus_wr(input logic [7:0] a, input word_t d);
    bit ok;
    bus_valid = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    forever begin
      #0.1; ok = bus_ready;
      @(posedge hclk);
      if (ok) break;
    end
    #0.1; bus_valid = 0; bus_we = 0;
  endtask

  task automatic bus_rd(input logic [7:0] a, output word_t d);
    bus_valid = 1; bus_we = 0; bus_addr = a;
    @(posedge hclk); #0.1;
    d = bus_rdata;
    bus_valid = 0;
  endtask

  // wait until every domain has been idle for a while
  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 40) begin
      @(posedge sclk);
      if (dut.idle == 4'hf) quiet++; else quiet = 0;
    end
  endtask

  // ---- program loading -----------------------------------------------------
  function automatic slot_t sl(input logic [4:0] op, input int d, input int a, input int b);
    slot_t s;
    s = '{op: op, dst: 4'(d), a: 4'(a), b: 4'(b), c: 4'd0, rsvd: '0};
    return s;
  endfunction
  function automatic slot_t imm(input logic [4:0] op, input int d, input logic [18:0] v);
    slot_t s;
    s = '{op: op, dst: 4'(d), a: 4'd0, b: v[3:0], c: v[7:4], rsvd: v[18:8]};
    return s;
  endfunction
  task automatic im_wr(input int addr, input slot_t s0, input slot_t s1);
    instr_t w;
    w = '{s1: s1, s0: s0};
    bus_wr(8'h09, w[31:0]);
    bus_wr(8'h0a, w[63:32]);
    bus_wr(8'h0b, 32'(addr) | 32'h300);          // both kernels
  endtask
  // kernel: r3 = const, LD r1, r2 = op(r1, r3), nops, ST r2, END
  task automatic kernel(input int pc, input int k, input bit mul, input int nops);
    int a;
    a = pc;
    im_wr(a++, imm(S0_IMMI, 3, 19'(k)), sl(S1_NOP, 0, 0, 0));
    im_wr(a++, sl(S0_LD, 1, 0, 0), sl(S1_NOP, 0, 0, 0));
    if (mul) im_wr(a++, sl(S0_NOP, 0, 0, 0), sl(S1_IMUL, 2, 1, 3));
    else     im_wr(a++, sl(S0_IADD, 2, 1, 3), sl(S1_NOP, 0, 0, 0));
    for (int i = 0; i < nops; i++) im_wr(a++, sl(S0_NOP, 0, 0, 0), sl(S1_NOP, 0, 0, 0));
    im_wr(a++, sl(S0_ST, 0, 2, 0), sl(S1_NOP, 0, 0, 0));
    im_wr(a++, sl(S0_END, 0, 0, 0), sl(S1_NOP, 0, 0, 0));
  endtask

  // ---- SFU commands --------------------------------------------------------
  int n_cmd_issued = 0;
  task automatic sfu_cmd(input int base, input int pairs, input bit store);
    bus_wr(8'h03, 32'(base));
    bus_wr(8'h04, {16'(pairs), 16'd4});
    bus_wr(8'h05, 32'(store));
    n_cmd_issued++;
  endtask
  task automatic sfu_wait();
    word_t d;
    do bus_rd(8'h05, d); while (d[0] || int'(d[31:16]) != n_cmd_issued);
  endtask

  // ---- second memory master (CPU cache refills) ----------------------------
  bit    risc_on = 0;
  int    risc_reads = 0, risc_q [$];
  always @(posedge hclk) begin
    if (risc_rsp_valid) begin
      check(risc_q.size() > 0 && risc_rsp_data == mem.init_word(risc_q[0]),
            "CPU port read data");
      if (risc_q.size() > 0) risc_q.delete(0);
    end
    if (risc_req_valid && risc_req_ready) begin
      risc_q.push_back(int'(risc_req.addr));
      risc_reads++;
    end
  end
  initial begin
    risc_req_valid = 0; risc_req = '0;
    forever begin
      @(posedge hclk); #0.2;
      if (!risc_req_valid || risc_req_ready_q) begin
        risc_req_valid = risc_on && ($urandom_range(0, 3) == 0);
        risc_req = '{we: 1'b0, addr: 32'(14'h3000 + $urandom_range(0, 2047)), wdata: '0};
      end
    end
  end
  logic risc_req_ready_q;
  always @(posedge hclk) risc_req_ready_q <= risc_req_ready;

  // ---- watchdog --------------------------------------------------------------
  initial begin
    #20000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---- stream job ------------------------------------------------------------
  task automatic stream_job(input int in_base, input int out_base, input int pc0, input int pc1,
                            output longint unsigned cycles);
    int idx [int unsigned];
    longint unsigned t0;
    bus_wr(8'h01, 32'(pc0) | (32'(pc1) << 8));
    t0 = $time;
    sfu_cmd(in_base, NPAIR, 1'b0);
    sfu_cmd(out_base, NPAIR, 1'b1);
    sfu_wait();
    cycles = ($time - t0) / 4;
    for (int e = 0; e < 2 * NPAIR; e++) idx[mem.init_word(in_base + 4 * e) * 3 + 5] = e;
    for (int e = 0; e < 2 * NPAIR; e++) begin
      int src;
      word_t w0;
      w0 = mem.mem[out_base + 4 * e];
      check(idx.exists(w0), $sformatf("stored element %0d is one of the results", e));
      if (idx.exists(w0)) begin
        src = idx[w0];
        idx.delete(w0);
        for (int l = 1; l < 4; l++)
          check(mem.mem[out_base + 4 * e + l] == mem.init_word(in_base + 4 * src + l) * 3 + 5,
                $sformatf("stored element %0d lane %0d", e, l));
      end
    end
    check(idx.size() == 0, "every element stored once");
  endtask

  // ---- graphics reference ------------------------------------------------------
  logic [15:0] rz [FB_W][FB_H];
  word_t       rc [FB_W][FB_H];

  task automatic ref_triangle(input int px [3], input int py [3], input logic [15:0] z,
                              input word_t c);
    longint ea [3], eb [3], ec [3], area;
    int bx0, bx1, by0, by1;
    area = longint'(px[1]-px[0])*(py[2]-py[0]) - longint'(px[2]-px[0])*(py[1]-py[0]);
    if (area == 0) return;
    for (int i = 0; i < 3; i++) begin
      int j;
      j = (i + 1) % 3;
      ea[i] = py[i] - py[j]; eb[i] = px[j] - px[i];
      ec[i] = longint'(px[i]) * py[j] - longint'(px[j]) * py[i];
      if (area < 0) begin ea[i] = -ea[i]; eb[i] = -eb[i]; ec[i] = -ec[i]; end
    end
    bx0 = px[0]; bx1 = px[0]; by0 = py[0]; by1 = py[0];
    for (int i = 1; i < 3; i++) begin
      if (px[i] < bx0) bx0 = px[i];
      if (px[i] > bx1) bx1 = px[i];
      if (py[i] < by0) by0 = py[i];
      if (py[i] > by1) by1 = py[i];
    end
    for (int x = 0; x < FB_W; x++)
      for (int y = 0; y < FB_H; y++) begin
        bit in;
        in = x >= bx0 && x <= bx1 && y >= by0 && y <= by1;
        for (int i = 0; i < 3; i++) if (ea[i] * x + eb[i] * y + ec[i] < 0) in = 0;
        if (in && z < rz[x][y]) begin rz[x][y] = z; rc[x][y] = c; end
      end
  endtask

  // ---- main ----------------------------------------------------------------------
  initial begin
    longint unsigned cyc1, cyc2;
    word_t d, clr;
    int   vbase;
    rst_n = 0; bus_valid = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    #50;
    rst_n = 1;
    repeat (4) @(posedge sclk);

    // programs: stream stage 0 fast (0) and slow (64), stage 1 fast (16)
    // and slow (32); vertex kernel (96) and pixel kernel (112)
    kernel(0, 3, 1'b1, 0);
    kernel(64, 3, 1'b1, 20);
    kernel(16, 5, 1'b0, 0);
    kernel(32, 5, 1'b0, 20);
    kernel(96, 2, 1'b0, 0);
    im_wr(112, sl(S0_LD, 1, 0, 0), sl(S1_NOP, 0, 0, 0));
    im_wr(113, sl(S0_ST, 0, 1, 0), sl(S1_NOP, 0, 0, 0));
    im_wr(114, sl(S0_END, 0, 0, 0), sl(S1_NOP, 0, 0, 0));

    // partitions: P0 0..63, P1 64..127, P2 128..191, P3 192..319
    bus_wr(8'h02, 32'd0 | (32'd0 << 2)   | (32'd64 << 11));
    bus_wr(8'h02, 32'd1 | (32'd64 << 2)  | (32'd64 << 11));
    bus_wr(8'h02, 32'd2 | (32'd128 << 2) | (32'd64 << 11));
    bus_wr(8'h02, 32'd3 | (32'd192 << 2) | (32'd128 << 11));

    // clocks: full speed nominally; in low power the graphics domain (low
    // priority) runs at 1/4; budget below three busy domains at weight 16
    bus_wr(8'h06, (32'h2 << 10) | (32'b0010 << 16));
    bus_wr(8'h08, 32'd40);
    // run, ats_en, scale_en, gate_en
    bus_wr(8'h00, 32'b001111);
    risc_on = 1;

    $display("%0t: stream job 1", $time);
    stream_job(32'h0100, 32'h1000, 0, 32, cyc1);
    $display("%0t: stream job 2", $time);
    stream_job(32'h0800, 32'h1800, 64, 16, cyc2);
    // bound: each pair goes through both stages; the slow stage takes 25
    // kernel cycles per pair, shared by two kernels at best, plus slack for
    // fetch, transfers and the memory
    check(cyc1 < longint'(NPAIR) * 40 && cyc2 < longint'(NPAIR) * 40,
          $sformatf("stream jobs took %0d and %0d cycles for %0d pairs", cyc1, cyc2, NPAIR));
    wait_idle();
    risc_on = 0;

    // graphics: clear, load triangles, render
    $display("%0t: graphics job", $time);
    bus_wr(8'h00, 32'b111111);
    clr = 32'h1020_3040;
    bus_wr(8'h0c, clr);
    for (int x = 0; x < FB_W; x++)
      for (int y = 0; y < FB_H; y++) begin rz[x][y] = 16'hffff; rc[x][y] = clr; end
    wait_idle();
    vbase = 32'h2000;
    for (int t = 0; t < NTRI; t++) begin
      int px [3], py [3];
      logic [15:0] z;
      word_t c;
      z = 16'(1000 + 37 * t);
      c = $urandom;
      for (int i = 0; i < 3; i++) begin
        px[i] = int'($urandom_range(0, 76)) - 8;
        py[i] = int'($urandom_range(0, 76)) - 8;
        mem.mem[vbase + 4 * (3 * t + i) + 0] = 32'(px[i] - 2);
        mem.mem[vbase + 4 * (3 * t + i) + 1] = 32'(py[i] - 2);
        mem.mem[vbase + 4 * (3 * t + i) + 2] = 32'(z) - 2;
        mem.mem[vbase + 4 * (3 * t + i) + 3] = c - 2;
      end
      ref_triangle(px, py, z, c);
    end
    bus_wr(8'h01, 32'd96 | (32'd112 << 8));
    sfu_cmd(vbase, 3 * NTRI / 2, 1'b0);
    sfu_wait();
    wait_idle();
    $display("%0t: frame read-back", $time);
    for (int y = 0; y < FB_H; y++)
      for (int x = 0; x < FB_W; x += 2) begin
        word_t c0, c1;
        bus_wr(8'h0d, 32'((y * FB_W + x) / 2));
        bus_rd(8'h0e, c0);
        bus_rd(8'h0f, c1);
        bus_rd(8'h10, d);
        check(c0 == rc[x][y] && c1 == rc[x+1][y] && d == {rz[x+1][y], rz[x][y]},
              $sformatf("frame pixel pair (%0d,%0d)", x, y));
      end

    bus_rd(8'h12, d);
    begin
      int wr_px;
      wr_px = int'(d);
      bus_rd(8'h13, d);
      check(d > 0, "depth test rejected fragments");
      check(wr_px + int'(d) > 0 && int'(d) == int'(dut.u_rop.n_rejected), "ROP statistics registers");
    end
    bus_rd(8'h11, d);
    check(int'(d) > 2, "scheduler switch counter");
    check(n_cmd_issued == 5, "stream load and store commands");
    check(risc_reads > 20 && risc_q.size() == 0, "CPU port reads answered");
    $display("mechanisms: vertex_bound=%0d pixel_bound=%0d gated=%0d low_power=%0d scaled=%0d",
             n_vertex_bound, n_pixel_bound, n_gated, n_low_power, n_scaled);
    $display("            st_stall=%0d mc_contention=%0d depth_rejects=%0d cycles=%0d/%0d",
             n_st_stall, n_contention, dut.u_rop.n_rejected, cyc1, cyc2);
    check(n_vertex_bound > 0, "scheduler entered vertex-bound mode");
    check(n_pixel_bound > 0, "scheduler entered pixel-bound mode");
    check(n_gated > 0, "a clock domain was gated");
    check(n_low_power > 0, "low-power state entered");
    check(n_scaled > 0, "low-priority domain ran at the reduced frequency");
    check(n_st_stall > 0, "kernel waited for output space");
    check(n_contention > 0, "memory controller arbitrated between masters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
