// Testbench for a unified stream kernel.
// Loads two small stage programs through the instruction queue, then feeds
// tagged element pairs and checks that each pair runs the program of its
// stage on both threads, that results come out in order with the right tag
// and values (FP32 multiply-add on stage 0; integer add and multiply in the
// two slots of one word on stage 1), that LD and ST stall on empty input
// and full output, and that a stage-0 run costs its six instructions plus
// one boundary cycle.
module tb_usk;
  import sp_pkg::*;
  logic        clk = 1'b0, rst_n, run;
  logic [6:0]  stage_pc [2];
  logic        iq_valid, iq_ready, in_valid, in_ready, in_tag;
  logic        out_valid, out_ready, out_tag, at_boundary, iq_empty;
  logic [6:0]  iq_addr;
  instr_t      iq_instr;
  pair_t       in_data, out_data;
  logic [31:0] n_instr, n_runs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  usk dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic slot_t sl(input int op, input int d, input int a, input int b, input int c);
    slot_t s;
    s = '{op: 5'(op), dst: 4'(d), a: 4'(a), b: 4'(b), c: 4'(c), rsvd: '0};
    return s;
  endfunction
  function automatic slot_t imm(input int op, input int d, input logic [18:0] v);
    slot_t s;
    s = '{op: 5'(op), dst: 4'(d), a: 4'd0, b: v[3:0], c: v[7:4], rsvd: v[18:8]};
    return s;
  endfunction

  task automatic load(input int addr, input slot_t s0, input slot_t s1);
    iq_valid = 1; iq_addr = 7'(addr); iq_instr = '{s1: s1, s0: s0};
    do @(posedge clk); while (!iq_ready);
    #1; iq_valid = 0;
  endtask

  // reference values
  // binary32 <-> double, for the floating-point reference
  function automatic real f2d(input word_t f);
    logic [10:0] e11;
    if (f[30:23] == 8'd0) return 0.0;
    e11 = 11'(f[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({f[31], e11, f[22:0], 29'd0});
  endfunction

  function automatic word_t d2f(input real r);       // round to nearest even
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mr;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    mr = {1'b0, m[52:29]} + 25'(m[28] && ((|m[27:0]) || m[29]));
    if (mr[24]) begin mr = mr >> 1; e++; end
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  // stage-0 program: x * 2.0 + 1.0 (exact in double for the operand range)
  function automatic word_t stage0_ref(input word_t x);
    return d2f(f2d(x) * 2.0 + 1.0);
  endfunction

  function automatic pair_t ref_pair(input pair_t p, input int kind);
    pair_t e;
    for (int t = 0; t < 2; t++)
      for (int l = 0; l < 4; l++)
        case (kind)
          0:       e[t][l] = stage0_ref(p[t][l]);
          1:       e[t][l] = p[t][l] + 32'd7;
          default: e[t][l] = p[t][l] * p[t][l];
        endcase
    return e;
  endfunction

  pair_t  exp_arr [256];
  logic   exp_tag [256];
  int     exp_wr = 0, exp_rd = 0;

  task automatic expect_out(input pair_t e, input logic tag);
    exp_arr[exp_wr % 256] = e;
    exp_tag[exp_wr % 256] = tag;
    exp_wr++;
  endtask
  int     n_out = 0;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      check(exp_rd < exp_wr, "output expected");
      if (exp_rd < exp_wr) begin
        check(out_data == exp_arr[exp_rd % 256],
              $sformatf("output %0d data %h want %h", n_out, out_data, exp_arr[exp_rd % 256]));
        check(out_tag == exp_tag[exp_rd % 256], $sformatf("output %0d tag", n_out));
        exp_rd++;
      end
      n_out++;
    end
  end

  bit bp = 0;
  always @(posedge clk) out_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic feed(input bit tag, input pair_t p);
    in_valid = 1; in_tag = tag; in_data = p;
    #1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int t0, cyc;
    pair_t p;
    bit    tag;
    rst_n = 0; run = 0; iq_valid = 0; in_valid = 0; in_tag = 0; in_data = '0;
    iq_addr = '0; iq_instr = '0;
    stage_pc[0] = 7'd0; stage_pc[1] = 7'd16;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // stage 0: r2 = r1 * 2.0 + 1.0
    load(0, imm(S0_IMMF, 3, 19'h20000), sl(S1_NOP, 0, 0, 0, 0));   // 2.0
    load(1, imm(S0_IMMF, 4, 19'h1fc00), sl(S1_NOP, 0, 0, 0, 0));   // 1.0
    load(2, sl(S0_LD, 1, 0, 0, 0),      sl(S1_NOP, 0, 0, 0, 0));
    load(3, sl(S0_NOP, 0, 0, 0, 0),     sl(S1_FMAD, 2, 1, 3, 4));
    load(4, sl(S0_ST, 0, 2, 0, 0),      sl(S1_NOP, 0, 0, 0, 0));
    load(5, sl(S0_END, 0, 0, 0, 0),     sl(S1_NOP, 0, 0, 0, 0));
    // stage 1: r2 = r1 + 7 and r6 = r1 * r1 in one word; output both
    load(16, imm(S0_IMMI, 5, 19'd7),    sl(S1_NOP, 0, 0, 0, 0));
    load(17, sl(S0_LD, 1, 0, 0, 0),     sl(S1_NOP, 0, 0, 0, 0));
    load(18, sl(S0_IADD, 2, 1, 5, 0),   sl(S1_IMUL, 6, 1, 1, 0));
    load(19, sl(S0_ST, 0, 2, 0, 0),     sl(S1_NOP, 0, 0, 0, 0));
    load(20, sl(S0_ST, 0, 6, 0, 0),     sl(S1_NOP, 0, 0, 0, 0));
    load(21, sl(S0_END, 0, 0, 0, 0),    sl(S1_NOP, 0, 0, 0, 0));
    repeat (3) @(posedge clk); #1;
    check(iq_empty && at_boundary && n_instr == 0, "programs loaded, kernel idle without run");

    run = 1;
    for (int i = 0; i < 40; i++) begin
      tag = $urandom_range(0, 1);
      for (int t = 0; t < 2; t++)
        for (int l = 0; l < 4; l++)
          p[t][l] = tag ? $urandom_range(0, 60000)
                        : {1'($urandom), 8'($urandom_range(115, 140)), 23'($urandom)};
      if (!tag) begin
        expect_out(ref_pair(p, 0), 1'b0);
      end else begin
        expect_out(ref_pair(p, 1), 1'b1);
        expect_out(ref_pair(p, 2), 1'b1);
      end
      bp = 1;                // output back-pressure now and then
      feed(tag, p);
    end
    bp = 0;
    repeat (20) @(posedge clk); #1;
    check(exp_rd == exp_wr, "every expected output produced");
    check(n_runs == 40, $sformatf("40 kernel runs, got %0d", n_runs));

    // rate: stage-0 runs back to back take 6 instructions + 1 boundary cycle
    for (int i = 0; i < 10; i++) begin
      pair_t e;
      for (int t = 0; t < 2; t++) for (int l = 0; l < 4; l++) e[t][l] = 32'h40400000;  // 3.0
      expect_out(e, 1'b0);
    end
    in_valid = 1; in_tag = 0; in_data = '0;
    for (int t = 0; t < 2; t++) for (int l = 0; l < 4; l++) in_data[t][l] = 32'h3f800000;
    @(posedge clk); #1;
    t0 = int'(n_runs);
    cyc = 0;
    while (int'(n_runs) < t0 + 10) begin @(posedge clk); #1; cyc++; end
    in_valid = 0;
    check(cyc >= 69 && cyc <= 71, $sformatf("10 stage-0 runs in %0d cycles (7 each)", cyc));
    repeat (20) @(posedge clk);
    // LD stalls with no input
    #1;
    check(at_boundary, "waits at the boundary with no input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
