// Thread execution unit (EXE) of a unified stream kernel: four processing
// element lanes for one thread.
//
// Each lane has a fixed/floating-point reconfigurable datapath with two
// VLIW slots that work in the same cycle:
//   slot 0  FP32 add/subtract, 32-bit integer add/subtract, four 8-bit
//           wrap-around adds (video), four 8-bit absolute differences,
//           FP32-to-integer conversion (toward zero, saturating), move,
//           immediate constants, and the load value for LD
//   slot 1  FP32 multiply, FP32 multiply-add (a*b+c, rounded twice),
//           32-bit integer multiply (low half)
// Per cycle a thread thus does 8 floating-point operations (4 lanes x MAD),
// or 16 8-bit adds plus 4 32-bit multiplies.  Two threads in each of two
// kernels at 200 MHz give the 6.4 GFLOPS and 16 GOPS peak figures.
// Purely combinational: the kernel registers the results (write-back).
// The operation mix follows the document's peak-rate figures and its
// fixed/floating reconfigurable elements; the exact operation set is this
// design's own.
module usk_exe
  import sp_pkg::*;
(
  input  s0_op_e op0,
  input  s1_op_e op1,
  input  vec_t   s0_a,
  input  vec_t   s0_b,
  input  vec_t   s1_a,
  input  vec_t   s1_b,
  input  vec_t   s1_c,
  input  vec_t   ld_data,
  input  logic [18:0] imm,
  output vec_t   s0_y,
  output vec_t   s1_y
);
  function automatic word_t f2i(input word_t f);
    logic [7:0]  e;
    logic [54:0] m;
    word_t       v;
    e = f[30:23];
    m = 55'({1'b1, f[22:0]}) << 31;
    if (e < 8'd127)       v = '0;
    else if (e > 8'd157)  v = 32'h7fff_ffff;
    else                  v = 32'(m >> (8'd181 - e));
    return f[31] ? -v : v;
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    word_t fadd_y, fmul_y, fmad_y;
    word_t imul_full;

    fp_add u_add (.a(s0_a[l]), .b(s0_b[l]), .sub(op0 == S0_FSUB), .y(fadd_y));
    fp_mul u_mul (.a(s1_a[l]), .b(s1_b[l]), .y(fmul_y));
    fp_add u_mad (.a(fmul_y), .b(s1_c[l]), .sub(1'b0), .y(fmad_y));
    assign imul_full = s1_a[l] * s1_b[l];

    always_comb begin
      unique case (op0)
        S0_FADD, S0_FSUB: s0_y[l] = fadd_y;
        S0_IADD: s0_y[l] = s0_a[l] + s0_b[l];
        S0_ISUB: s0_y[l] = s0_a[l] - s0_b[l];
        S0_ADD8: for (int k = 0; k < 4; k++)
                   s0_y[l][8*k +: 8] = s0_a[l][8*k +: 8] + s0_b[l][8*k +: 8];
        S0_ABS8: for (int k = 0; k < 4; k++)
                   s0_y[l][8*k +: 8] = (s0_a[l][8*k +: 8] > s0_b[l][8*k +: 8]) ?
                                       s0_a[l][8*k +: 8] - s0_b[l][8*k +: 8] :
                                       s0_b[l][8*k +: 8] - s0_a[l][8*k +: 8];
        S0_F2I:  s0_y[l] = f2i(s0_a[l]);
        S0_IMMF: s0_y[l] = {imm, 13'd0};
        S0_IMMI: s0_y[l] = 32'(signed'(imm));
        S0_MOV:  s0_y[l] = s0_a[l];
        S0_LD:   s0_y[l] = ld_data[l];
        default: s0_y[l] = '0;
      endcase
      unique case (op1)
        S1_FMUL: s1_y[l] = fmul_y;
        S1_FMAD: s1_y[l] = fmad_y;
        S1_IMUL: s1_y[l] = imul_full;
        default: s1_y[l] = '0;
      endcase
    end
  end
endmodule
