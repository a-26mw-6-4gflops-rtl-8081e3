// Testbench for the power-aware frequency scaling unit.
// Counts rising edges of each domain clock over fixed windows of PLL cycles
// and checks them against the divide ratios, the low-power scaling rule
// (estimate above budget scales the low-priority domains) and the idle
// gating (a gated domain shows no edges, SCLK never stops, the clock comes
// back when idle falls).
module tb_pafs;
  logic       clk_pll = 1'b0;
  logic       rst_n;
  logic       scale_en, gate_en;
  logic [1:0] div_nom [4], div_low [4];
  logic [3:0] low_prio, idle, dclk, clk_on;
  logic [7:0] cost [4];
  logic [9:0] budget;
  logic       sclk, low_power;
  logic [1:0] ratio_now [4];
  int         checks = 0, failures = 0;
  int         edges [5];

  always #5 clk_pll = ~clk_pll;

  pafs dut (.*);

  always @(posedge sclk)    edges[4]++;
  always @(posedge dclk[0]) edges[0]++;
  always @(posedge dclk[1]) edges[1]++;
  always @(posedge dclk[2]) edges[2]++;
  always @(posedge dclk[3]) edges[3]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count edges over n PLL cycles after letting changes settle
  task automatic window(input int n);
    repeat (40) @(posedge clk_pll);
    #1;
    for (int i = 0; i < 5; i++) edges[i] = 0;
    repeat (n) @(posedge clk_pll);
    #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; scale_en = 1'b0; gate_en = 1'b0; idle = '0;
    low_prio = '0; budget = 10'd1000;
    for (int i = 0; i < 4; i++) begin
      div_nom[i] = 2'(i); div_low[i] = 2'd3; cost[i] = 8'd20;
    end
    repeat (4) @(posedge clk_pll);
    rst_n = 1'b1;

    // nominal ratios 1, 2, 4, 8
    window(64);
    check(edges[4] == 64, "SCLK runs at the PLL rate");
    for (int i = 0; i < 4; i++)
      check(edges[i] == (64 >> i), $sformatf("domain %0d divides by %0d (%0d edges)", i, 1 << i, edges[i]));

    // level 1: estimate 80 > budget 50, domains 0 and 1 low priority
    for (int i = 0; i < 4; i++) div_nom[i] = 2'd0;
    scale_en = 1'b1; budget = 10'd50; low_prio = 4'b0011;
    window(64);
    check(low_power, "low-power state entered when over budget");
    check(edges[0] == 8 && edges[1] == 8, "low-priority domains scaled to /8");
    check(edges[2] == 64 && edges[3] == 64, "high-priority domains keep full rate");

    // back under budget: two domains idle (gating still off) -> estimate 40
    idle = 4'b1100;
    window(64);
    check(!low_power, "low-power state left under budget");
    check(edges[0] == 64 && edges[2] == 64, "idle domains run when gating is off");

    // level 2: gate the idle domains
    gate_en = 1'b1;
    window(64);
    check(clk_on == 4'b0011, "gate enables follow idle");
    check(edges[2] == 0 && edges[3] == 0, "idle domains gated");
    check(edges[0] == 64 && edges[4] == 64, "busy domain and SCLK keep running");

    // wake-up
    idle = 4'b0000; budget = 10'd1000;
    window(64);
    check(edges[2] == 64 && edges[3] == 64, "clocks return when idle falls");
    check(clk_on == 4'b1111, "all gates open");

    // gating latency: clock stops within 3 SCLK + 1 domain period
    idle[1] = 1'b1;
    repeat (3) @(posedge clk_pll);
    edges[1] = 0;
    repeat (20) @(posedge clk_pll);
    check(edges[1] <= 1, "gate closes within the stated latency");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
