// Unified stream kernel (USK): one of the two programmable stream cores.
//
// Blocks, in program order:
//   instruction queue controller  accepts (address, instruction) writes
//                                 from the system bus into a 4-entry queue
//                                 and drains one per cycle into the
//                                 instruction memory
//   instruction memory (1 KB)     128 x 64-bit VLIW words, one read and one
//                                 write port, registered read
//   instruction fetch             program counter; fetches the next word
//                                 every cycle unless the kernel stalls
//   DEC                           splits the word into its two slots and
//                                 reads the operands of both threads
//   Thread A / Thread B EXE       two four-lane execution units (usk_exe)
//                                 running the same instruction on their own
//                                 registers and their own stream element
//   Thread A / Thread B WB        write both slot results back to the
//                                 thread's 16 x 128-bit register file
// Stream model: a kernel program serves one pipeline stage.  At a task
// boundary the kernel waits for an input element pair, takes the stage tag
// that comes with it and starts the program at stage_pc[tag].  LD pops the
// pair (thread A takes element 0, thread B element 1); ST pushes register
// a of both threads as an output pair carrying the same tag; END returns
// to the boundary.  So the adaptive task scheduler, by steering which
// partition feeds this kernel, decides which program it runs next.
// A program should load its pair with one LD; a second LD in the same run
// reads the next pair of whichever stage then feeds the kernel.
// Timing: one instruction per cycle; LD stalls while no input is valid and
// ST while the output is not ready; a kernel run costs one fetch cycle on
// top of its instructions (the boundary cycle).  Both slots write in the
// cycle after issue; if both name the same register, slot 1 wins.
// The block list, the 1 KB instruction memory and the two threads follow
// the document; the instruction set, the stage-tag mechanism and the
// lockstep thread pair are this design's own.
module usk
  import sp_pkg::*;
#(
  parameter int unsigned IM_DEPTH = 128     // 1 KB of 64-bit words
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,                  // start kernels at boundaries
  input  logic [6:0]  stage_pc [2],         // entry point of each stage
  // instruction queue (system bus side)
  input  logic        iq_valid,
  output logic        iq_ready,
  input  logic [6:0]  iq_addr,
  input  instr_t      iq_instr,
  // stream input (from the memory array)
  input  logic        in_valid,
  output logic        in_ready,
  input  pair_t       in_data,
  input  logic        in_tag,
  // stream output (to the memory array)
  output logic        out_valid,
  input  logic        out_ready,
  output pair_t       out_data,
  output logic        out_tag,
  // status
  output logic        at_boundary,
  output logic        iq_empty,
  output logic [31:0] n_instr,              // instructions issued
  output logic [31:0] n_runs                // kernel runs completed
);
  // ---- instruction queue controller + instruction memory -------------------
  typedef struct packed { logic [6:0] addr; instr_t instr; } iq_entry_t;

  iq_entry_t iq [4];
  logic [2:0] iq_wr, iq_rd;
  instr_t     im [IM_DEPTH];
  instr_t     im_q;
  logic       im_re;
  logic [6:0] im_raddr;

  assign iq_ready = (iq_wr - iq_rd) != 3'd4;
  assign iq_empty = (iq_wr == iq_rd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iq_wr <= '0;
      iq_rd <= '0;
    end else begin
      if (iq_valid && iq_ready) iq_wr <= iq_wr + 3'd1;
      if (!iq_empty)            iq_rd <= iq_rd + 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (iq_valid && iq_ready) iq[iq_wr[1:0]] <= '{addr: iq_addr, instr: iq_instr};
    if (!iq_empty) im[iq[iq_rd[1:0]].addr] <= iq[iq_rd[1:0]].instr;
    if (im_re)     im_q <= im[im_raddr];
  end

  // ---- fetch and decode -----------------------------------------------------
  logic       ir_valid;        // im_q holds the instruction at ir_pc
  logic [6:0] ir_pc;
  logic       cur_tag;
  logic       stall, issue, start;
  s0_op_e     op0;
  s1_op_e     op1;
  vec_t       rf [THREADS][NREGS];
  vec_t       s0_y [THREADS], s1_y [THREADS];

  assign op0   = s0_op_e'(im_q.s0.op);
  assign op1   = s1_op_e'(im_q.s1.op);
  assign stall = (op0 == S0_LD && !in_valid) || (op0 == S0_ST && !out_ready);
  assign issue = ir_valid && !stall;
  assign start = !ir_valid && run && in_valid;
  assign at_boundary = !ir_valid;

  always_comb begin
    im_re    = 1'b0;
    im_raddr = ir_pc + 7'd1;
    if (start) begin
      im_re    = 1'b1;
      im_raddr = stage_pc[in_tag];
    end else if (issue && op0 != S0_END) begin
      im_re = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_valid <= 1'b0;
      ir_pc    <= '0;
      cur_tag  <= 1'b0;
      n_instr  <= '0;
      n_runs   <= '0;
    end else begin
      if (start) begin
        ir_valid <= 1'b1;
        ir_pc    <= im_raddr;
        cur_tag  <= in_tag;
      end else if (issue) begin
        n_instr <= n_instr + 32'd1;
        if (op0 == S0_END) begin
          ir_valid <= 1'b0;
          n_runs   <= n_runs + 32'd1;
        end else begin
          ir_pc <= ir_pc + 7'd1;
        end
      end
    end
  end

  // ---- stream ports --------------------------------------------------------
  assign in_ready  = ir_valid && op0 == S0_LD;
  assign out_valid = ir_valid && op0 == S0_ST;
  assign out_tag   = cur_tag;

  // ---- two thread EXE + WB ----------------------------------------------------
  for (genvar t = 0; t < THREADS; t++) begin : g_thr
    usk_exe u_exe (
      .op0    (op0),
      .op1    (op1),
      .s0_a   (rf[t][im_q.s0.a]),
      .s0_b   (rf[t][im_q.s0.b]),
      .s1_a   (rf[t][im_q.s1.a]),
      .s1_b   (rf[t][im_q.s1.b]),
      .s1_c   (rf[t][im_q.s1.c]),
      .ld_data(in_data[t]),
      .imm    ({im_q.s0.rsvd, im_q.s0.c, im_q.s0.b}),
      .s0_y   (s0_y[t]),
      .s1_y   (s1_y[t])
    );
    assign out_data[t] = rf[t][im_q.s0.a];

    always_ff @(posedge clk) begin
      if (issue) begin
        if (op0 inside {S0_FADD, S0_FSUB, S0_IADD, S0_ISUB, S0_ADD8, S0_ABS8, S0_F2I,
                        S0_IMMF, S0_IMMI,
                        S0_MOV, S0_LD})
          rf[t][im_q.s0.dst] <= s0_y[t];
        if (op1 != S1_NOP)
          rf[t][im_q.s1.dst] <= s1_y[t];
      end
    end
  end
endmodule
