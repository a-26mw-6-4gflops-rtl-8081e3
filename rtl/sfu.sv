// Stream fetch unit (SFU): moves streams between external memory and the
// configurable memory array.
//
// A command names a direction (load or store), a base word address, an
// element stride in words and a number of element pairs.  An element is four
// consecutive 32-bit words (one 128-bit vector); element e of the stream
// starts at base + e*stride, and elements 2i and 2i+1 form pair i (thread A
// and thread B).  A load issues the eight word reads of a pair through the
// memory controller, collects the in-order responses and pushes the pair
// into the array; a store pops a pair from the array and issues its eight
// word writes.  One pair is in flight at a time.
// Interfaces: command valid/ready; memory requests valid/ready with read
// data returned in request order on `mem_rsp_valid`; array ports valid/ready.
// `idle` is high when no command is in progress.
// Timing: a load pair takes 8 request cycles (plus memory latency) and one
// push cycle, a store pair one pop cycle and 8 write cycles.
// The document gives the unit's job (stream load/store commands with an
// access pattern, through the memory controller, into the array); the
// strided-element pattern and the command format are this design's own.
module sfu
  import sp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_store,     // 0: load into the array, 1: store
  input  logic [31:0] cmd_base,
  input  logic [15:0] cmd_stride,
  input  logic [15:0] cmd_pairs,
  output logic        idle,
  output logic        done,          // one-cycle pulse at command end
  // memory controller
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_req_t    mem_req,
  input  logic        mem_rsp_valid,
  input  word_t       mem_rsp_data,
  // configurable memory array
  output logic        cma_wr_valid,
  input  logic        cma_wr_ready,
  output pair_t       cma_wr_data,
  input  logic        cma_rd_valid,
  output logic        cma_rd_ready,
  input  pair_t       cma_rd_data
);
  typedef enum logic [2:0] {S_IDLE, S_LREQ, S_LPUSH, S_SPOP, S_SWR} state_e;

  state_e      state;
  logic        store;
  logic [15:0] stride, pairs_left;
  logic [31:0] elem_addr [2];        // start of the current pair's elements
  logic [2:0]  req_idx;              // word of the pair being requested
  logic [3:0]  rsp_cnt;              // responses received for this pair
  word_t       buf_w [8];            // pair being assembled / written
  logic        issued_all;           // all 8 reads of the pair are out

  assign cmd_ready = (state == S_IDLE);
  assign idle      = (state == S_IDLE);

  always_comb begin
    mem_req_valid = (state == S_LREQ && !issued_all) || (state == S_SWR);
    mem_req.we    = (state == S_SWR);
    mem_req.addr  = elem_addr[req_idx[2]] + 32'(req_idx[1:0]);
    mem_req.wdata = buf_w[req_idx];
    cma_wr_valid  = (state == S_LPUSH);
    cma_rd_ready  = (state == S_SPOP);
    for (int t = 0; t < 2; t++)
      for (int l = 0; l < 4; l++) cma_wr_data[t][l] = buf_w[t*4 + l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      store      <= 1'b0;
      stride     <= '0;
      pairs_left <= '0;
      req_idx    <= '0;
      rsp_cnt    <= '0;
      issued_all <= 1'b0;
      done       <= 1'b0;
      elem_addr[0] <= '0;
      elem_addr[1] <= '0;
      for (int i = 0; i < 8; i++) buf_w[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          store        <= cmd_store;
          stride       <= cmd_stride;
          pairs_left   <= cmd_pairs;
          elem_addr[0] <= cmd_base;
          elem_addr[1] <= cmd_base + 32'(cmd_stride);
          req_idx      <= '0;
          rsp_cnt      <= '0;
          issued_all   <= 1'b0;
          if (cmd_pairs == '0) done <= 1'b1;
          else state <= cmd_store ? S_SPOP : S_LREQ;
        end
        S_LREQ: begin
          if (mem_req_valid && mem_req_ready) begin
            req_idx <= req_idx + 3'd1;
            if (req_idx == 3'd7) issued_all <= 1'b1;
          end
          if (mem_rsp_valid) begin
            buf_w[rsp_cnt[2:0]] <= mem_rsp_data;
            rsp_cnt <= rsp_cnt + 4'd1;
            if (rsp_cnt == 4'd7) state <= S_LPUSH;
          end
        end
        S_LPUSH: if (cma_wr_ready) next_pair();
        S_SPOP: if (cma_rd_valid) begin
          for (int t = 0; t < 2; t++)
            for (int l = 0; l < 4; l++) buf_w[t*4 + l] <= cma_rd_data[t][l];
          req_idx <= '0;
          state   <= S_SWR;
        end
        S_SWR: if (mem_req_ready) begin
          req_idx <= req_idx + 3'd1;
          if (req_idx == 3'd7) next_pair();
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // advance to the next pair or finish the command
  task automatic next_pair();
    elem_addr[0] <= elem_addr[0] + 32'(stride) * 2;
    elem_addr[1] <= elem_addr[1] + 32'(stride) * 2;
    pairs_left   <= pairs_left - 16'd1;
    req_idx      <= '0;
    rsp_cnt      <= '0;
    issued_all   <= 1'b0;
    if (pairs_left == 16'd1) begin
      state <= S_IDLE;
      done  <= 1'b1;
    end else begin
      state <= store ? S_SPOP : S_LREQ;
    end
  endtask
endmodule
