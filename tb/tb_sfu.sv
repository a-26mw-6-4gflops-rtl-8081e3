// Testbench for the stream fetch unit.
// Loads a strided stream from the external memory model into a sink that
// stands for the memory array and checks every pair against the memory's
// known contents; then stores pairs from a source back to another strided
// region and checks the memory words.  Also checks the request count and
// the cycle cost of a load with no memory stalls and no array back-pressure.
module tb_sfu;
  import sp_pkg::*;
  logic        clk = 1'b0, rst_n;
  logic        cmd_valid, cmd_ready, cmd_store, idle, done;
  logic [31:0] cmd_base;
  logic [15:0] cmd_stride, cmd_pairs;
  logic        mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t    mem_req;
  word_t       mem_rsp_data;
  logic        cma_wr_valid, cma_wr_ready, cma_rd_valid, cma_rd_ready;
  pair_t       cma_wr_data, cma_rd_data;
  int checks = 0, failures = 0;
  pair_t got [$];

  always #5 clk = ~clk;
  sfu dut (.*);
  ext_mem_model #(.LAT(3), .STALL(1'b0)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sink: accepts pairs with random back-pressure when bp is set
  bit bp = 0;
  always @(posedge clk) begin
    if (cma_wr_valid && cma_wr_ready) got.push_back(cma_wr_data);
    cma_wr_ready <= bp ? ($urandom_range(0, 1) == 1) : 1'b1;
  end
  // source: offers the queued pairs
  pair_t src_arr [4];
  int    src_n = 0, src_i = 0;
  assign cma_rd_valid = src_i < src_n;
  assign cma_rd_data  = src_arr[src_i % 4];
  always @(posedge clk) if (cma_rd_valid && cma_rd_ready) src_i <= src_i + 1;

  task automatic run_cmd(input bit st, input int base, input int stride, input int pairs,
                         output int cycles);
    cmd_valid = 1; cmd_store = st; cmd_base = 32'(base);
    cmd_stride = 16'(stride); cmd_pairs = 16'(pairs);
    cycles = 0;
    @(posedge clk); #1; cmd_valid = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, rd0;
    rst_n = 0; cmd_valid = 0; cmd_store = 0; cmd_base = 0; cmd_stride = 0; cmd_pairs = 0;
    cma_wr_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(idle && cmd_ready, "idle after reset");

    // load 6 pairs, stride 5 words, no back-pressure
    rd0 = u_mem.n_reads;
    run_cmd(0, 100, 5, 6, cyc);
    check(got.size() == 6, "six pairs loaded");
    check(u_mem.n_reads - rd0 == 48, "eight word reads per pair");
    // per pair: 8 request cycles, 3 cycles latency for the last, 1 push
    check(cyc <= 6 * 12 + 2, $sformatf("load cycle count %0d within 8+LAT+1 per pair", cyc));
    for (int i = 0; i < got.size(); i++)
      for (int t = 0; t < 2; t++)
        for (int l = 0; l < 4; l++)
          check(got[i][t][l] == u_mem.init_word(32'(100 + (2*i + t) * 5 + l)),
                $sformatf("pair %0d thread %0d lane %0d", i, t, l));

    // load with array back-pressure
    got.delete(); bp = 1;
    run_cmd(0, 3000, 4, 5, cyc);
    check(got.size() == 5, "five pairs under back-pressure");
    for (int i = 0; i < got.size(); i++)
      check(got[i][1][3] == u_mem.init_word(32'(3000 + (2*i + 1) * 4 + 3)), "back-pressure data");

    // store 4 pairs to a strided region
    for (int i = 0; i < 4; i++) begin
      pair_t p;
      for (int t = 0; t < 2; t++) for (int l = 0; l < 4; l++) p[t][l] = 32'(1000*i + 10*t + l);
      src_arr[i] = p;
    end
    src_n = 4; run_cmd(1, 8000, 6, 4, cyc);
    check(src_i == 4, "all store pairs taken");
    for (int i = 0; i < 4; i++)
      for (int t = 0; t < 2; t++)
        for (int l = 0; l < 4; l++)
          check(u_mem.mem[8000 + (2*i + t) * 6 + l] == 32'(1000*i + 10*t + l), "stored word");
    check(u_mem.mem[8000 + 4] == u_mem.init_word(8004), "gap between elements untouched");
    check(idle, "idle after the commands");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
