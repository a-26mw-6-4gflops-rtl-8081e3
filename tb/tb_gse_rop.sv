// Testbench for the ROP engine.
// Keeps its own copy of the frame (depth and colour per pixel), clears the
// engine, sends random fragment pairs with random coverage and depths,
// with the depth test on and off, and compares every stored pixel and the
// written/rejected counters with the copy.  Checks the rate: a clear takes
// one cycle per pixel pair, and fragments are taken one pair per cycle.
module tb_gse_rop;
  import sp_pkg::*;
  localparam int W = 16, H = 8, NW = W * H / 2;
  localparam int AW = $clog2(NW);
  logic          clk = 1'b0, rst_n;
  logic          z_test_en, in_valid, in_ready, clear, clearing, idle;
  pair_t         in_data;
  word_t         clear_color;
  logic [AW-1:0] rd_addr;
  logic [31:0]   rd_depth, n_written, n_rejected;
  word_t         rd_color [2];
  int checks = 0, failures = 0;
  logic [15:0] mz [W][H];
  word_t       mc [W][H];
  int exp_w = 0, exp_r = 0;

  always #5 clk = ~clk;
  gse_rop #(.FB_W(W), .FB_H(H)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare_frame(input string when);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 2) begin
        rd_addr = AW'((y * W + x) / 2);
        #1;
        check(rd_depth == {mz[x+1][y], mz[x][y]} && rd_color[0] == mc[x][y] &&
              rd_color[1] == mc[x+1][y], $sformatf("%s: pixel pair (%0d,%0d)", when, x, y));
      end
  endtask

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int cyc;
    rst_n = 0; in_valid = 0; clear = 0; z_test_en = 1; clear_color = 0;
    in_data = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int pass_n = 0; pass_n < 3; pass_n++) begin
      word_t cc;
      cc = $urandom;
      clear_color = cc;
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      cyc = 0;
      while (clearing) begin @(posedge clk); #1; cyc++; end
      check(cyc == NW, $sformatf("clear took %0d cycles for %0d pairs", cyc, NW));
      for (int x = 0; x < W; x++)
        for (int y = 0; y < H; y++) begin mz[x][y] = 16'hffff; mc[x][y] = cc; end
      compare_frame("after clear");
      z_test_en = (pass_n != 2);
      cyc = 0;
      for (int f = 0; f < 400; f++) begin
        int x, y;
        x = 2 * int'($urandom_range(0, W / 2 - 1));
        y = int'($urandom_range(0, H - 1));
        for (int t = 0; t < 2; t++) begin
          in_data[t][0] = {($urandom_range(0, 3) != 0), 15'd0, 16'(x + t)};
          in_data[t][1] = 32'(y);
          in_data[t][2] = {16'd0, 16'($urandom_range(0, 65535))};
          in_data[t][3] = $urandom;
        end
        in_valid = 1;
        check(in_ready, "fragment pair taken without wait");
        for (int t = 0; t < 2; t++)
          if (in_data[t][0][31]) begin
            if (!z_test_en || in_data[t][2][15:0] < mz[x+t][y]) begin
              mz[x+t][y] = in_data[t][2][15:0];
              mc[x+t][y] = in_data[t][3];
              exp_w++;
            end else exp_r++;
          end
        @(posedge clk); #1;
        cyc++;
      end
      in_valid = 0;
      check(cyc == 400, "one pair per cycle");
      compare_frame($sformatf("after pass %0d", pass_n));
      check(int'(n_written) == exp_w, $sformatf("written %0d, expected %0d", n_written, exp_w));
      check(int'(n_rejected) == exp_r, $sformatf("rejected %0d, expected %0d", n_rejected, exp_r));
    end
    check(exp_r > 0 && exp_w > 0, "both passing and failing depth tests happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
