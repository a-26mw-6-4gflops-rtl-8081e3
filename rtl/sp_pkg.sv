// Shared types and constants of the multi-core stream processor.
//
// A stream element is one 128-bit vector of four 32-bit lanes (a vertex
// attribute, four pixels, or sixteen 8-bit samples).  The two threads of a
// unified stream kernel (USK) run in lockstep on two elements, so the
// configurable memory array (CMA) and the stream ports move element pairs.
// The USK instruction is a two-slot VLIW word: slot 0 is the add/load/store
// slot, slot 1 the multiply slot.  Field layouts and opcode values are this
// design's own; the four-lane, two-thread, two-slot shape is chosen so that
// two USKs at 200 MHz reach the 6.4 GFLOPS and 16 GOPS peak figures.
package sp_pkg;

  localparam int unsigned LANES      = 4;    // 32-bit lanes per thread
  localparam int unsigned THREADS    = 2;    // Thread A and Thread B
  localparam int unsigned NREGS      = 16;   // vector registers per thread

  typedef logic [31:0]           word_t;
  typedef word_t [LANES-1:0]     vec_t;      // one stream element
  typedef vec_t  [THREADS-1:0]   pair_t;     // element pair, [0] = thread A

  // ---- USK instruction set (this design's own encoding) -------------------
  typedef enum logic [4:0] {
    S0_NOP  = 5'd0,
    S0_FADD = 5'd1,   // d = a + b        (FP32, per lane)
    S0_FSUB = 5'd2,   // d = a - b        (FP32)
    S0_IADD = 5'd3,   // d = a + b        (32-bit integer / fixed point)
    S0_ISUB = 5'd4,   // d = a - b        (32-bit integer)
    S0_ADD8 = 5'd5,   // d = a + b        (four 8-bit adds per lane, wrap)
    S0_MOV  = 5'd6,   // d = a
    S0_LD   = 5'd7,   // d = next input element (thread A gets [0], B [1])
    S0_ST   = 5'd8,   // output element pair <- register a of each thread
    S0_END  = 5'd9,   // end of kernel: restart at the task's entry point
    S0_ABS8 = 5'd10,  // d = |a - b|      (four 8-bit lanes, video SAD step)
    S0_F2I  = 5'd11,  // d = int(a)       (FP32 to signed 32-bit, toward 0)
    S0_IMMF = 5'd12,  // d = {imm, 13'b0} in every lane (FP32 constant)
    S0_IMMI = 5'd13   // d = sign-extended imm in every lane
  } s0_op_e;

  typedef enum logic [4:0] {
    S1_NOP  = 5'd0,
    S1_FMUL = 5'd1,   // d = a * b        (FP32)
    S1_FMAD = 5'd2,   // d = a * b + c    (FP32, two roundings)
    S1_IMUL = 5'd3    // d = low 32 bits of a * b
  } s1_op_e;

  typedef struct packed {
    logic [4:0]  op;
    logic [3:0]  dst;
    logic [3:0]  a;
    logic [3:0]  b;
    logic [3:0]  c;
    logic [10:0] rsvd;
  } slot_t;                              // 32 bits
  // 19-bit immediate of S0_IMMF / S0_IMMI: {rsvd, c, b}

  typedef struct packed {
    slot_t s1;                           // bits 63:32, multiply slot
    slot_t s0;                           // bits 31:0,  add/ld/st slot
  } instr_t;                             // 64 bits

  // ---- adaptive task scheduling -------------------------------------------
  typedef enum logic [1:0] {
    ATS_BALANCED     = 2'd0,  // USK0 on stage 0, USK1 on stage 1
    ATS_VERTEX_BOUND = 2'd1,  // both USKs on stage 0
    ATS_PIXEL_BOUND  = 2'd2   // both USKs on stage 1
  } ats_mode_e;

  // ---- external memory request (memory controller ports) ------------------
  typedef struct packed {
    logic        we;
    logic [31:0] addr;     // word address
    logic [31:0] wdata;
  } mem_req_t;

endpackage
