// Power-aware frequency scaling (PAFS): the five clock domains of the chip.
//
// The PLL clock feeds a buffer that gives SCLK, the one clock that is never
// gated (RISC CPU wake-up logic and this unit itself run on it), and four
// divider (DIV) + clock gating cell pairs that give the gated domain clocks:
//   domain 0  HCLK  system bus, stream fetch unit, memory controller
//   domain 1  GCLK  graphics specific engines
//   domain 2  CCLK  configurable memory array
//   domain 3  UCLK  stream processing unit (the two USKs)
// Two levels of power saving, each with its own enable:
//   level 1, frequency scaling: the unit estimates the power drawn by the
//     busy domains at their nominal rates (sum of cost[i] over domains not
//     idle).  When the estimate exceeds the power budget the system is in
//     the low-power state and every domain marked low-priority runs at its
//     low-power divide ratio instead of its nominal one.
//   level 2, dynamic gating: a domain whose idle signal is high has its
//     clock gated; the clock returns once the idle signal falls.
// Idle inputs are synchronised into SCLK by two flip-flops.  Divider ratios
// change at the next wrap of the divider counter; gating takes effect at the
// next low phase of the domain clock, so from an idle edge to a stopped
// clock takes three SCLK cycles plus at most one domain clock period.
// The buffer/DIV/gating structure, SCLK without a gate, the two levels and
// their triggers and the clock names follow the document.  The
// estimate-versus-budget rule, the cost weights and the register interface
// are this design's own.
// Circuit note: the four latches synthesis reports here are the enable
// latches of the clock gating cells, as intended.
module pafs
#(
  parameter int unsigned NDOM = 4    // gated clock domains
) (
  input  logic                  clk_pll,
  input  logic                  rst_n,
  // configuration (SCLK domain, quasi-static)
  input  logic                  scale_en,           // level 1 enable
  input  logic                  gate_en,            // level 2 enable
  input  logic [1:0]            div_nom  [NDOM],    // log2 nominal ratio
  input  logic [1:0]            div_low  [NDOM],    // log2 low-power ratio
  input  logic [NDOM-1:0]       low_prio,           // scaled in low power
  input  logic [7:0]            cost     [NDOM],    // power weight at nominal
  input  logic [9:0]            budget,             // power budget, same unit
  // status from the function units (any domain)
  input  logic [NDOM-1:0]       idle,
  // clocks
  output logic                  sclk,
  output logic [NDOM-1:0]       dclk,               // gated domain clocks
  // observation
  output logic                  low_power,          // level 1 active
  output logic [NDOM-1:0]       clk_on,             // gate enables
  output logic [1:0]            ratio_now [NDOM]    // ratios in effect
);
  logic [NDOM-1:0] idle_s1, idle_s2;
  logic [9:0]      est;
  logic [NDOM-1:0] div_clk;

  assign sclk = clk_pll;   // clock buffer; SCLK has no gating cell

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      idle_s1   <= '0;
      idle_s2   <= '0;
      clk_on    <= '1;
      low_power <= 1'b0;
    end else begin
      idle_s1   <= idle;
      idle_s2   <= idle_s1;
      clk_on    <= gate_en ? ~idle_s2 : '1;
      low_power <= scale_en && (est > budget);
    end
  end

  always_comb begin
    est = '0;
    for (int i = 0; i < NDOM; i++)
      if (!idle_s2[i]) est = est + 10'(cost[i]);
  end

  for (genvar g = 0; g < NDOM; g++) begin : g_dom
    logic [1:0] ratio_sel;
    assign ratio_sel = (low_power && low_prio[g]) ? div_low[g] : div_nom[g];
    pafs_div u_div (
      .clk_in (clk_pll), .rst_n (rst_n), .ratio (ratio_sel),
      .clk_out(div_clk[g]), .ratio_q(ratio_now[g])
    );
    pafs_icg u_icg (.clk_in(div_clk[g]), .en(clk_on[g]), .clk_out(dclk[g]));
  end
endmodule
