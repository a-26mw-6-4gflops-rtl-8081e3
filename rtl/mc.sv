// Memory controller (MC): shares the external memory bus between the stream
// fetch unit (port 0) and the system bus side of the RISC CPU (port 1).
//
// Requests are granted round-robin: when both ports request, the port that
// was not served last wins.  A granted request is passed to the external
// bus in the same cycle.  For every read the controller records which port
// issued it in a small in-order queue; the external memory returns read data
// in request order, and each response is steered to the port at the head of
// the queue.  New reads wait while the queue is full.  Writes have no
// response.
// Interfaces: valid/ready requests on both sides (mem_req_t: we, word
// address, write data); responses are single-cycle `rsp_valid` pulses.
// The document names the controller and its place between the stream fetch
// unit and external memory; arbitration and response tracking are this
// design's own.
// Lint note: rst_n is the asynchronous reset of the flops and also the
// disable condition of the handshake assertion, which lint reports as a
// reset used both ways; the assertion is not hardware.
module mc
  import sp_pkg::*;
#(
  parameter int unsigned OUTSTANDING = 8     // reads in flight, power of two
) (
  input  logic     clk,
  input  logic     rst_n,
  // masters
  input  logic     m_req_valid [2],
  output logic     m_req_ready [2],
  input  mem_req_t m_req       [2],
  output logic     m_rsp_valid [2],
  output word_t    m_rsp_data  [2],
  // external memory bus
  output logic     ext_req_valid,
  input  logic     ext_req_ready,
  output mem_req_t ext_req,
  input  logic     ext_rsp_valid,
  input  word_t    ext_rsp_data,
  output logic     idle
);
  localparam int unsigned QW = $clog2(OUTSTANDING);

  logic          last;                 // port served last
  logic          sel;                  // port granted this cycle
  logic [QW:0]   q_wr, q_rd;
  logic          q_id [OUTSTANDING];
  logic          q_full;

  assign q_full = (q_wr[QW] != q_rd[QW]) && (q_wr[QW-1:0] == q_rd[QW-1:0]);

  always_comb begin
    if (m_req_valid[0] && m_req_valid[1]) sel = ~last;
    else                                  sel = m_req_valid[1];
    ext_req       = m_req[sel];
    ext_req_valid = m_req_valid[sel] && (m_req[sel].we || !q_full);
    for (int p = 0; p < 2; p++) begin
      m_req_ready[p] = (sel == p[0]) && ext_req_ready && (m_req[p].we || !q_full);
      m_rsp_valid[p] = ext_rsp_valid && (q_id[q_rd[QW-1:0]] == p[0]);
      m_rsp_data[p]  = ext_rsp_data;
    end
    idle = (q_wr == q_rd) && !m_req_valid[0] && !m_req_valid[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= 1'b1;
      q_wr <= '0;
      q_rd <= '0;
      for (int i = 0; i < OUTSTANDING; i++) q_id[i] <= 1'b0;
    end else begin
      if (ext_req_valid && ext_req_ready) begin
        last <= sel;
        if (!ext_req.we) begin
          q_id[q_wr[QW-1:0]] <= sel;
          q_wr <= q_wr + 1'b1;
        end
      end
      if (ext_rsp_valid) q_rd <= q_rd + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    !(ext_rsp_valid && q_wr == q_rd))
      else $error("MC: read response with no read outstanding");
endmodule
