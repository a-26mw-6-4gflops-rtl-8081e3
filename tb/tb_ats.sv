// Testbench for the adaptive task scheduler.
// Drives partition fill levels for the three pipeline conditions and checks
// the mode, the kernel-to-stage routing, the one-cycle decision latency,
// the ats_en override and the mode-change counter.
module tb_ats;
  import sp_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n, ats_en;
  logic [8:0] in_count, mid_count, mid_size;
  ats_mode_e  mode;
  logic [1:0] route;
  logic [15:0] switches;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ats dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference rule, written from the condition list
  function automatic ats_mode_e expect_mode(input int inc, input int mid,
                                            input int sz, input bit en);
    if (!en) return ATS_BALANCED;
    if (4 * mid >= 3 * sz || (inc == 0 && mid != 0)) return ATS_PIXEL_BOUND;
    if (4 * mid < sz && inc != 0) return ATS_VERTEX_BOUND;
    return ATS_BALANCED;
  endfunction

  task automatic apply(input int inc, input int mid, input bit en);
    ats_mode_e e;
    in_count = 9'(inc); mid_count = 9'(mid); ats_en = en;
    e = expect_mode(inc, mid, 64, en);
    @(posedge clk); #1;
    check(mode == e, $sformatf("mode %s for in=%0d mid=%0d en=%0d, got %s",
                               e.name(), inc, mid, en, mode.name()));
    case (e)
      ATS_BALANCED:     check(route == 2'b10, "balanced: USK0 stage 0, USK1 stage 1");
      ATS_VERTEX_BOUND: check(route == 2'b00, "vertex-bound: both on stage 0");
      default:          check(route == 2'b11, "pixel-bound: both on stage 1");
    endcase
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin

    rst_n = 1'b0; ats_en = 1'b1; in_count = '0; mid_count = '0; mid_size = 9'd64;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(mode == ATS_BALANCED && switches == 0, "reset state balanced");

    apply(10, 32, 1);          // balanced
    apply(10,  3, 1);          // vertex-bound: pixel stage starved
    apply(10, 48, 1);          // pixel-bound: intermediate buffer high
    apply( 0,  5, 1);          // pixel-bound: no vertex input left
    apply( 0,  0, 1);          // nothing to do: balanced
    apply(10, 48, 0);          // scheduler disabled
    check(switches == 3, $sformatf("three mode changes counted, got %0d", switches));
    // random sweep against the reference rule
    for (int i = 0; i < 200; i++)
      apply($urandom_range(0, 3) == 0 ? 0 : int'($urandom_range(1, 100)),
            int'($urandom_range(0, 64)), $urandom_range(0, 7) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
