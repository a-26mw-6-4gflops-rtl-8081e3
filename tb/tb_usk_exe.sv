// Testbench for the thread execution unit (four processing element lanes).
// Random operands for every operation of both slots; floating-point results
// are checked bit-exactly against a reference that computes in double
// precision (exact for these operand ranges) and rounds to single precision
// to nearest even; integer, 8-bit SIMD, conversion and move results against
// plain integer arithmetic.
module tb_usk_exe;
  import sp_pkg::*;
  s0_op_e op0;
  s1_op_e op1;
  vec_t   s0_a, s0_b, s1_a, s1_b, s1_c, ld_data, s0_y, s1_y;
  logic [18:0] imm;
  int checks = 0, failures = 0;

  usk_exe dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // round an (exactly representable) double to binary32, nearest even
  function automatic word_t d2f(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mr;
    int          e;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    g  = m[28];
    st = |m[27:0];
    mr = {1'b0, m[52:29]} + 25'(g && (st || m[29]));
    if (mr[24]) begin mr = mr >> 1; e++; end
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic real f2d(input word_t f);
    logic [10:0] e11;
    if (f[30:23] == 8'd0) return 0.0;
    e11 = 11'(f[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({f[31], e11, f[22:0], 29'd0});
  endfunction

  function automatic word_t rnd_float();
    return {1'($urandom), 8'($urandom_range(110, 144)), 23'($urandom)};
  endfunction

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    op0 = S0_NOP; op1 = S1_NOP; imm = '0;
    for (int it = 0; it < 400; it++) begin
      for (int l = 0; l < 4; l++) begin
        s0_a[l] = rnd_float(); s0_b[l] = rnd_float();
        s1_a[l] = rnd_float(); s1_b[l] = rnd_float(); s1_c[l] = rnd_float();
        ld_data[l] = $urandom;
      end
      // floating point: FADD/FSUB and FMUL/FMAD in the same cycle
      op0 = (it % 2 == 0) ? S0_FADD : S0_FSUB;
      op1 = (it % 3 == 0) ? S1_FMAD : S1_FMUL;
      #1;
      for (int l = 0; l < 4; l++) begin
        real ra, rb, prod;
        word_t p32, e0, e1;
        ra = f2d(s0_a[l]); rb = f2d(s0_b[l]);
        e0 = d2f((op0 == S0_FADD) ? ra + rb : ra - rb);
        check(s0_y[l] == e0, $sformatf("%s lane %0d: %h %h -> %h, want %h",
              op0.name(), l, s0_a[l], s0_b[l], s0_y[l], e0));
        prod = f2d(s1_a[l]) * f2d(s1_b[l]);
        p32  = d2f(prod);
        e1   = (op1 == S1_FMUL) ? p32 : d2f(f2d(p32) + f2d(s1_c[l]));
        check(s1_y[l] == e1, $sformatf("%s lane %0d: -> %h, want %h", op1.name(), l, s1_y[l], e1));
      end
      // integer and SIMD: IADD/ISUB/ADD8/ABS8 with IMUL
      for (int l = 0; l < 4; l++) begin
        s0_a[l] = $urandom; s0_b[l] = $urandom; s1_a[l] = $urandom; s1_b[l] = $urandom;
      end
      op1 = S1_IMUL;
      for (int k = 0; k < 4; k++) begin
        op0 = (k == 0) ? S0_IADD : (k == 1) ? S0_ISUB : (k == 2) ? S0_ADD8 : S0_ABS8;
        #1;
        for (int l = 0; l < 4; l++) begin
          word_t e;
          case (op0)
            S0_IADD: e = s0_a[l] + s0_b[l];
            S0_ISUB: e = s0_a[l] - s0_b[l];
            default:
              for (int b = 0; b < 4; b++) begin
                int x, y;
                x = int'(s0_a[l][8*b +: 8]);
                y = int'(s0_b[l][8*b +: 8]);
                e[8*b +: 8] = (op0 == S0_ADD8) ? 8'(x + y) : 8'(x > y ? x - y : y - x);
              end
          endcase
          check(s0_y[l] == e, $sformatf("%s lane %0d", op0.name(), l));
          check(s1_y[l] == s1_a[l] * s1_b[l], "IMUL low word");
        end
      end
      // MOV, LD, F2I
      op0 = S0_MOV; op1 = S1_NOP; #1;
      check(s0_y == s0_a && s1_y == '0, "MOV copies, slot-1 NOP gives zero");
      op0 = S0_LD; #1;
      check(s0_y == ld_data, "LD passes the stream element");
      imm = 19'($urandom);
      op0 = S0_IMMF; #1;
      check(s0_y[2] == {imm, 13'd0} && s0_y[0] == s0_y[3], "IMMF constant in every lane");
      op0 = S0_IMMI; #1;
      check(s0_y[1] == {{13{imm[18]}}, imm}, "IMMI sign-extended constant");
      for (int l = 0; l < 4; l++) begin
        int v;
        v = int'($urandom_range(0, 200000)) - 100000;
        s0_a[l] = d2f(real'(v) + 0.25 * real'($urandom_range(0, 3)));
      end
      op0 = S0_F2I; #1;
      for (int l = 0; l < 4; l++)
        check(s0_y[l] == word_t'(int'($rtoi(f2d(s0_a[l])))),
              $sformatf("F2I lane %0d: %h -> %0d", l, s0_a[l], int'(s0_y[l])));
    end
    // peak-rate arithmetic: per thread EXE and cycle, FMAD = 4 lanes x 2 flops
    check(LANES * 2 * THREADS * 2 * 200 == 6400, "2 USK x 2 threads x 4 lanes x MAD at 200 MHz = 6.4 GFLOPS");
    check((LANES * 4 + LANES) * THREADS * 2 * 200 == 16000, "16 byte adds + 4 multiplies = 16 GOPS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
