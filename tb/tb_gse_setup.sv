// Testbench for the primitive setup engine.
// Sends random triangles (two vertices per element pair, triangle list) and
// checks each set-up triangle by its properties: every edge function is zero
// at the two vertices of its edge and equals twice the (positive) area at
// the third; the bounding box is the vertices' box clipped to the frame with
// an even left edge; depth and colour are the first vertex's.  Degenerate
// and off-frame triangles must be dropped.
module tb_gse_setup;
  import sp_pkg::*;
  localparam int W = 64, H = 64;
  logic               clk = 1'b0, rst_n;
  logic               in_valid, in_ready, out_valid, out_ready, idle;
  pair_t              in_data;
  logic signed [39:0] ea [3], eb [3], ec [3];
  logic [15:0]        x0, x1, y0, y1, z;
  word_t              color;
  logic [31:0]        n_tri;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gse_setup #(.FB_W(W), .FB_H(H)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int vx [$], vy [$], vz [$], vc [$];     // vertex stream
  int tri_keep [$];                      // index of first vertex of kept triangles

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // consumer with random back-pressure; checks each triangle
  int n_seen = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int b, px [3], py [3], area2, bx0, bx1, by0, by1;
      b = tri_keep[n_seen];
      for (int i = 0; i < 3; i++) begin px[i] = vx[b+i]; py[i] = vy[b+i]; end
      area2 = (px[1]-px[0])*(py[2]-py[0]) - (px[2]-px[0])*(py[1]-py[0]);
      if (area2 < 0) area2 = -area2;
      for (int i = 0; i < 3; i++) begin
        int j, k;
        longint ej, ek, ei;
        j = (i + 1) % 3; k = (i + 2) % 3;
        ei = longint'(ea[i]) * px[i] + longint'(eb[i]) * py[i] + longint'(ec[i]);
        ej = longint'(ea[i]) * px[j] + longint'(eb[i]) * py[j] + longint'(ec[i]);
        ek = longint'(ea[i]) * px[k] + longint'(eb[i]) * py[k] + longint'(ec[i]);
        check(ei == 0 && ej == 0, $sformatf("tri %0d edge %0d passes through its vertices", n_seen, i));
        check(ek == longint'(area2), $sformatf("tri %0d edge %0d opposite vertex = 2*area", n_seen, i));
      end
      bx0 = px[0]; bx1 = px[0]; by0 = py[0]; by1 = py[0];
      for (int i = 1; i < 3; i++) begin
        if (px[i] < bx0) bx0 = px[i];
        if (px[i] > bx1) bx1 = px[i];
        if (py[i] < by0) by0 = py[i];
        if (py[i] > by1) by1 = py[i];
      end
      if (bx0 < 0) bx0 = 0;
      if (by0 < 0) by0 = 0;
      if (bx1 > W-1) bx1 = W-1;
      if (by1 > H-1) by1 = H-1;
      bx0 = bx0 & ~1;
      check(int'(x0) == bx0 && int'(x1) == bx1 && int'(y0) == by0 && int'(y1) == by1,
            $sformatf("tri %0d bounding box", n_seen));
      check(int'(z) == vz[b] && int'(color) == vc[b], "flat attributes from vertex 0");
      n_seen++;
    end
    out_ready <= $urandom_range(0, 2) != 0;
  end

  initial begin
    int ntri;
    rst_n = 0; in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ntri = 60;          // even, so the vertex count fills whole pairs
    for (int t = 0; t < ntri; t++) begin
      int kind;
      kind = (t % 10 == 7) ? 1 : (t % 10 == 8) ? 2 : 0;
      for (int i = 0; i < 3; i++) begin
        case (kind)
          1: begin vx.push_back(5 + 3*i); vy.push_back(7 + 6*i); end          // collinear
          2: begin vx.push_back(100 + i); vy.push_back(10 + 20*i); end        // off frame
          default: begin
            vx.push_back(int'($urandom_range(0, 90)) - 13);
            vy.push_back(int'($urandom_range(0, 90)) - 13);
          end
        endcase
        vz.push_back(int'($urandom_range(0, 65535)));
        vc.push_back(int'($urandom));
      end
      begin
        int b, a2, mnx, mny, mxx, mxy;
        b = 3 * t;
        a2 = (vx[b+1]-vx[b])*(vy[b+2]-vy[b]) - (vx[b+2]-vx[b])*(vy[b+1]-vy[b]);
        mnx = vx[b]; mxx = vx[b]; mny = vy[b]; mxy = vy[b];
        for (int i = 1; i < 3; i++) begin
          if (vx[b+i] < mnx) mnx = vx[b+i];
          if (vx[b+i] > mxx) mxx = vx[b+i];
          if (vy[b+i] < mny) mny = vy[b+i];
          if (vy[b+i] > mxy) mxy = vy[b+i];
        end
        if (a2 != 0 && mxx >= 0 && mxy >= 0 && mnx < W && mny < H) tri_keep.push_back(b);
      end
    end
    for (int p = 0; p < vx.size() / 2; p++) begin
      for (int t = 0; t < 2; t++) begin
        in_data[t][0] = 32'(vx[2*p+t]);
        in_data[t][1] = 32'(vy[2*p+t]);
        in_data[t][2] = 32'(vz[2*p+t]);
        in_data[t][3] = 32'(vc[2*p+t]);
      end
      in_valid = 1;
      #1;
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      in_valid = 0;
    end
    repeat (20) @(posedge clk); #1;
    check(n_seen == tri_keep.size(), $sformatf("%0d of %0d kept triangles seen", n_seen, tri_keep.size()));
    check(int'(n_tri) == tri_keep.size(), "triangle counter");
    check(idle, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
