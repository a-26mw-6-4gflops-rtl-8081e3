// Testbench for the raster engine.
// For random triangles it computes edge functions and boxes itself, lets
// the engine scan them, and compares the covered-pixel map it emits with a
// brute-force inside test of every pixel of the frame.  Also checks the
// fragment layout (even/odd pixel in thread A/B, depth and colour carried)
// and the rate: one pixel pair per cycle when the output is always ready.
module tb_gse_raster;
  import sp_pkg::*;
  localparam int W = 64, H = 64;
  logic               clk = 1'b0, rst_n;
  logic               in_valid, in_ready, out_valid, out_ready, idle;
  logic signed [39:0] ea [3], eb [3], ec [3];
  logic [15:0]        x0, x1, y0, y1, z;
  word_t              color;
  pair_t              out_data;
  logic [31:0]        n_pairs;
  int checks = 0, failures = 0;
  bit  cov [W][H];
  bit  bp = 0;
  int  n_frag_pairs = 0;

  always #5 clk = ~clk;
  gse_raster dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      n_frag_pairs++;
      for (int t = 0; t < 2; t++) begin
        int x, y;
        x = int'(out_data[t][0][15:0]); y = int'(out_data[t][1]);
        if (out_data[t][0][31]) begin
          check(x < W && y < H && !cov[x][y], $sformatf("covered pixel inside frame, once (%0d,%0d)", x, y));
          if (x < W && y < H) cov[x][y] = 1;
        end
        check(out_data[t][2] == 32'(z) && out_data[t][3] == color, "attributes carried");
        check(x[0] == t[0], "thread A even pixel, thread B odd pixel");
      end
    end
    out_ready <= bp ? $urandom_range(0, 1) == 1 : 1'b1;
  end

  initial begin
    #5000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0;
    for (int i = 0; i < 3; i++) begin ea[i] = 0; eb[i] = 0; ec[i] = 0; end
    x0 = 0; x1 = 0; y0 = 0; y1 = 0; z = 0; color = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int tri_n = 0; tri_n < 30; tri_n++) begin
      int px [3], py [3], area, bx0, bx1, by0, by1, cyc, npairs;
      bit want;
      bp = (tri_n % 3 == 2);
      for (int i = 0; i < 3; i++) begin
        px[i] = int'($urandom_range(0, 80)) - 8;
        py[i] = int'($urandom_range(0, 80)) - 8;
      end
      area = (px[1]-px[0])*(py[2]-py[0]) - (px[2]-px[0])*(py[1]-py[0]);
      if (area == 0) continue;
      for (int i = 0; i < 3; i++) begin
        int j;
        j = (i + 1) % 3;
        ea[i] = 40'(py[i] - py[j]);
        eb[i] = 40'(px[j] - px[i]);
        ec[i] = 40'(px[i] * py[j] - px[j] * py[i]);
        if (area < 0) begin ea[i] = -ea[i]; eb[i] = -eb[i]; ec[i] = -ec[i]; end
      end
      bx0 = px[0]; bx1 = px[0]; by0 = py[0]; by1 = py[0];
      for (int i = 1; i < 3; i++) begin
        if (px[i] < bx0) bx0 = px[i];
        if (px[i] > bx1) bx1 = px[i];
        if (py[i] < by0) by0 = py[i];
        if (py[i] > by1) by1 = py[i];
      end
      if (bx1 < 0 || by1 < 0 || bx0 >= W || by0 >= H) continue;
      if (bx0 < 0) bx0 = 0;
      if (by0 < 0) by0 = 0;
      if (bx1 > W-1) bx1 = W-1;
      if (by1 > H-1) by1 = H-1;
      bx0 = bx0 & ~1;
      x0 = 16'(bx0); x1 = 16'(bx1); y0 = 16'(by0); y1 = 16'(by1);
      z = 16'($urandom); color = $urandom;
      for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) cov[x][y] = 0;
      in_valid = 1;
      #1;
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      in_valid = 0;
      cyc = 1;
      while (!idle) begin @(posedge clk); #1; cyc++; end
      for (int x = 0; x < W; x++)
        for (int y = 0; y < H; y++) begin
          want = 1;
          for (int i = 0; i < 3; i++)
            if (longint'(ea[i]) * x + longint'(eb[i]) * y + longint'(ec[i]) < 0) want = 0;
          if (x < bx0 || x > bx1 || y < by0 || y > by1) want = 0;
          check(cov[x][y] == want, $sformatf("tri %0d pixel (%0d,%0d) coverage", tri_n, x, y));
        end
      npairs = ((bx1 - bx0) / 2 + 1) * (by1 - by0 + 1);
      if (!bp) check(cyc == npairs + 1, $sformatf("tri %0d: %0d cycles for %0d pixel pairs", tri_n, cyc, npairs));
    end
    check(int'(n_pairs) == n_frag_pairs, "fragment pair counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
