// Testbench for the memory controller.
// Two random masters issue reads and writes to disjoint address ranges
// through the controller into the external memory model (random stalls,
// three cycles of read latency).  Every read response must reach the master
// that asked, in order, with the right data; writes must land; when both
// masters keep requesting, grants must alternate.
module tb_mc;
  import sp_pkg::*;
  logic     clk = 1'b0, rst_n;
  logic     m_req_valid [2], m_req_ready [2], m_rsp_valid [2];
  mem_req_t m_req [2];
  word_t    m_rsp_data [2];
  logic     ext_req_valid, ext_req_ready, ext_rsp_valid, idle;
  mem_req_t ext_req;
  word_t    ext_rsp_data;
  int checks = 0, failures = 0;
  word_t    expect_q [2][$];
  word_t    shadow [int];
  int       n_rsp [2] = '{0, 0};
  int       both_req = 0, alternated = 0;
  logic     last_sel;
  bit       stop = 0;

  always #5 clk = ~clk;
  mc dut (.*);
  ext_mem_model #(.LAT(3), .STALL(1'b1)) u_mem (
    .clk, .req_valid(ext_req_valid), .req_ready(ext_req_ready), .req(ext_req),
    .rsp_valid(ext_rsp_valid), .rsp_data(ext_rsp_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t mem_now(input int a);
    return shadow.exists(a) ? shadow[a] : u_mem.init_word(32'(a));
  endfunction

  // masters: new random request whenever the last one was taken
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++) begin m_req_valid[p] <= 0; m_req[p] <= '0; end
      last_sel <= 1;
    end else begin
      if (m_req_valid[0] && m_req_valid[1]) begin
        for (int p = 0; p < 2; p++)
          if (m_req_ready[p]) begin
            both_req++;
            if (p[0] != last_sel) alternated++;
          end
      end
      for (int p = 0; p < 2; p++) begin
        if (m_req_valid[p] && m_req_ready[p]) begin
          last_sel <= p[0];
          if (m_req[p].we) shadow[int'(m_req[p].addr)] = m_req[p].wdata;
          else expect_q[p].push_back(mem_now(int'(m_req[p].addr)));
        end
        if (!m_req_valid[p] || m_req_ready[p]) begin
          m_req_valid[p]    <= !stop && $urandom_range(0, 4) != 0;
          m_req[p].we       <= $urandom_range(0, 2) == 0;
          m_req[p].addr     <= 32'(p * 4096 + $urandom_range(0, 63));
          m_req[p].wdata    <= $urandom;
        end
      end
      for (int p = 0; p < 2; p++)
        if (m_rsp_valid[p]) begin
          n_rsp[p]++;
          check(expect_q[p].size() != 0, $sformatf("port %0d: response expected", p));
          if (expect_q[p].size() != 0)
            check(m_rsp_data[p] == expect_q[p].pop_front(), $sformatf("port %0d: read data", p));
        end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    stop = 1;                // masters finish their last request and stop
    repeat (20) @(posedge clk);
    #1;
    check(n_rsp[0] > 100 && n_rsp[1] > 100, $sformatf("both ports served (%0d, %0d)", n_rsp[0], n_rsp[1]));
    check(expect_q[0].size() == 0 && expect_q[1].size() == 0, "no response lost");
    check(both_req > 50 && alternated == both_req,
          $sformatf("round robin under contention (%0d of %0d)", alternated, both_req));
    check(idle, "idle when drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
