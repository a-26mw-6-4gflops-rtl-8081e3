// Testbench for the configurable memory array.
// Keeps a reference queue per partition and checks every pair leaving the
// array against it, through all ports: stream fetch unit, both kernels
// (balanced and shared routes, round-robin sharing), graphics engines and
// ROP in graphics mode.  Also checks full/empty flow control, ring
// wrap-around, re-partitioning and the stage tags.
module tb_cma;
  import sp_pkg::*;
  localparam int AW = 9;
  logic          clk = 1'b0, rst_n;
  logic          gfx, cfg_we;
  logic [1:0]    cfg_part;
  logic [AW-1:0] cfg_base, cfg_size;
  logic          sfu_wr_valid, sfu_wr_ready, sfu_rd_valid, sfu_rd_ready;
  pair_t         sfu_wr_data, sfu_rd_data;
  logic          gse_rd_valid, gse_rd_ready, gse_wr_valid, gse_wr_ready;
  pair_t         gse_rd_data, gse_wr_data;
  logic          rop_rd_valid, rop_rd_ready;
  pair_t         rop_rd_data;
  logic [1:0]    route, usk_rd_valid, usk_rd_ready, usk_rd_tag;
  logic [1:0]    usk_wr_valid, usk_wr_ready, usk_wr_tag;
  pair_t         usk_rd_data [2], usk_wr_data [2];
  logic [AW-1:0] count [4], size [4];
  int checks = 0, failures = 0;
  pair_t q [4][$];
  int    serial = 1;

  always #5 clk = ~clk;
  cma dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic pair_t mk();
    pair_t p;
    for (int t = 0; t < 2; t++)
      for (int l = 0; l < 4; l++) p[t][l] = 32'(serial * 16 + t * 4 + l);
    serial++;
    return p;
  endfunction

  task automatic idle_ports();
    sfu_wr_valid = 0; sfu_rd_ready = 0; gse_rd_ready = 0; gse_wr_valid = 0;
    rop_rd_ready = 0; usk_rd_ready = '0; usk_wr_valid = '0; cfg_we = 0;
  endtask

  task automatic config_part(input int p, input int b, input int s);
    cfg_we = 1; cfg_part = 2'(p); cfg_base = AW'(b); cfg_size = AW'(s);
    @(posedge clk); #1; cfg_we = 0;
    q[p].delete();
  endtask

  // one cycle: SFU pushes a new pair into P0
  task automatic sfu_push(output bit ok);
    pair_t p = mk();
    sfu_wr_valid = 1; sfu_wr_data = p; #0;
    ok = sfu_wr_ready;
    @(posedge clk); #1;
    if (ok) q[0].push_back(p);
    sfu_wr_valid = 0;
  endtask

  // one cycle: kernel k pops from its routed partition
  task automatic usk_pop(input int k, input int part);
    pair_t e;
    usk_rd_ready[k] = 1; #1;
    check(usk_rd_valid[k] == (q[part].size() != 0), $sformatf("USK%0d valid on P%0d", k, part));
    if (usk_rd_valid[k]) begin
      e = q[part].pop_front();
      check(usk_rd_data[k] == e, $sformatf("USK%0d data from P%0d", k, part));
      check(usk_rd_tag[k] == route[k], "stage tag follows the route");
    end
    @(posedge clk); #1;
    usk_rd_ready[k] = 0;
  endtask

  // one cycle: kernel k pushes a pair tagged with stage tag
  task automatic usk_push(input int k, input bit tag);
    pair_t p = mk();
    int part = tag ? 2 : 1;
    usk_wr_valid[k] = 1; usk_wr_tag[k] = tag; usk_wr_data[k] = p; #1;
    if (usk_wr_ready[k]) q[part].push_back(p);
    @(posedge clk); #1;
    usk_wr_valid[k] = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    int acc;
    rst_n = 0; gfx = 0; route = 2'b10; usk_wr_tag = '0;
    sfu_wr_data = '0; gse_wr_data = '0; usk_wr_data[0] = '0; usk_wr_data[1] = '0;
    cfg_part = '0; cfg_base = '0; cfg_size = '0;
    idle_ports();
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    config_part(0, 0, 6);
    config_part(1, 6, 4);
    config_part(2, 10, 4);
    config_part(3, 14, 4);

    // fill P0 until full
    acc = 0;
    for (int i = 0; i < 8; i++) begin sfu_push(ok); acc += int'(ok); end
    check(acc == 6 && count[0] == 6, "P0 accepts exactly its size");
    // balanced: USK0 drains P0 while USK1 sees empty P1
    for (int i = 0; i < 3; i++) usk_pop(0, 0);
    usk_pop(1, 1);
    // wrap-around: refill and drain P0 twice over
    for (int r = 0; r < 10; r++) begin sfu_push(ok); usk_pop(0, 0); end
    while (q[0].size() != 0) usk_pop(0, 0);
    // USK0 produces stage-0 results into P1, USK1 consumes them
    for (int i = 0; i < 5; i++) usk_push(0, 0);
    check(count[1] == 4, "P1 stops at its size");
    for (int i = 0; i < 4; i++) usk_pop(1, 1);
    // USK1 produces stage-1 results into P2, SFU drains them
    for (int i = 0; i < 3; i++) usk_push(1, 1);
    sfu_rd_ready = 1;
    for (int i = 0; i < 3; i++) begin
      #1; check(sfu_rd_valid && sfu_rd_data == q[2].pop_front(), "SFU drains P2 in order");
      @(posedge clk);
    end
    #1; check(!sfu_rd_valid, "P2 empty after draining");
    sfu_rd_ready = 0;

    // vertex-bound: both kernels share P0 and alternate
    route = 2'b00;
    for (int i = 0; i < 4; i++) sfu_push(ok);
    usk_rd_ready = 2'b11;
    for (int i = 0; i < 4; i++) begin
      #1;
      check(usk_rd_valid[0] != usk_rd_valid[1], "one kernel granted on a shared partition");
      for (int k = 0; k < 2; k++)
        if (usk_rd_valid[k]) check(usk_rd_data[k] == q[0].pop_front(), "shared read order");
      check(usk_rd_valid[i % 2], $sformatf("round robin grants USK%0d", i % 2));
      @(posedge clk);
    end
    usk_rd_ready = 0;
    // both kernels write P1 in the same cycles: alternate, nothing lost
    usk_wr_valid = 2'b11; usk_wr_tag = 2'b00;
    acc = 0;
    for (int i = 0; i < 4; i++) begin
      pair_t p0 = mk(), p1 = mk();
      usk_wr_data[0] = p0; usk_wr_data[1] = p1; #1;
      check(!(usk_wr_ready[0] && usk_wr_ready[1]), "one write grant per partition");
      if (usk_wr_ready[0]) begin q[1].push_back(p0); acc |= 1; end
      if (usk_wr_ready[1]) begin q[1].push_back(p1); acc |= 2; end
      @(posedge clk);
    end
    usk_wr_valid = 0; #1;
    check(acc == 3, "both writers served");
    route = 2'b11;
    while (q[1].size() != 0) usk_pop(1, 1);

    // graphics mode: P1 -> GSE, GSE -> P3, stage 1 reads P3, ROP drains P2
    gfx = 1; route = 2'b10;
    for (int i = 0; i < 2; i++) usk_push(0, 0);
    gse_rd_ready = 1;
    for (int i = 0; i < 2; i++) begin
      #1; check(gse_rd_valid && gse_rd_data == q[1].pop_front(), "GSE reads P1");
      @(posedge clk);
    end
    gse_rd_ready = 0;
    for (int i = 0; i < 3; i++) begin
      pair_t p = mk();
      gse_wr_valid = 1; gse_wr_data = p; #1;
      if (gse_wr_ready) q[3].push_back(p);
      @(posedge clk);
    end
    gse_wr_valid = 0;
    for (int i = 0; i < 3; i++) usk_pop(1, 3);
    usk_push(1, 1);
    #1; check(!sfu_rd_valid && rop_rd_valid, "P2 goes to ROP in graphics mode");
    rop_rd_ready = 1; #1;
    check(rop_rd_data == q[2].pop_front(), "ROP reads P2");
    @(posedge clk); #1; rop_rd_ready = 0;

    // re-partition empties the partition
    gfx = 0;
    sfu_push(ok);
    config_part(0, 0, 100);
    check(count[0] == 0 && size[0] == 100, "re-partition resets P0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
