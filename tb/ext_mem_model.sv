// Behavioural model of the external memory on the memory controller's bus
// (used by the testbenches only).  AW-bit word-addressed memory, reads
// answered in order after LAT cycles, request ready dropped at random when
// STALL is set.  Initial contents: word a holds init_word(a), a fixed hash
// that testbenches recompute to check what was read.
module ext_mem_model
  import sp_pkg::*;
#(
  parameter int unsigned AW    = 14,
  parameter int unsigned LAT   = 3,
  parameter bit          STALL = 1'b1
) (
  input  logic     clk,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output word_t    rsp_data
);
  word_t mem [1 << AW];
  logic  pipe_v [LAT];
  word_t pipe_d [LAT];
  int    n_reads = 0, n_writes = 0;

  function automatic word_t init_word(input int unsigned a);
    return (a * 32'h9e37_79b1) ^ 32'h5a5a_0f0f;
  endfunction

  initial begin
    for (int unsigned a = 0; a < (1 << AW); a++) mem[a] = init_word(a);
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
    req_ready = 1'b1;
  end

  assign rsp_valid = pipe_v[LAT-1];
  assign rsp_data  = pipe_d[LAT-1];

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= 1'b0;
    if (req_valid && req_ready) begin
      if (req.we) begin
        mem[req.addr[AW-1:0]] <= req.wdata;
        n_writes++;
      end else begin
        pipe_v[0] <= 1'b1;
        pipe_d[0] <= mem[req.addr[AW-1:0]];
        n_reads++;
      end
    end
    req_ready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
  end
endmodule
