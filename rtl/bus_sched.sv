// bus_sched: data bus schedule of the memory subsystem.
//
// Three masters share the path to the address translation machine: the
// de-blocking module (DB, writes the reconstructed block), the de-interlacer
// (DEI, reads decoded fields) and data fetch for motion compensation (MC,
// reads reference blocks).  Within each 8x8 pipeline stage the bus is granted
// in the fixed turn DB -> DEI -> MC.  A master keeps the bus for as many block
// requests as it needs and gives it up with the request that carries
// m_last, or at once by raising m_none when it has nothing to do in this
// stage.  After MC the bus stays idle until stage_start begins the next
// stage; stage_done tells that all three turns are over.
//
// Interface: per master valid/ready with a request descriptor (packed in
// m_req); the granted request is passed to the ATM on out_valid/out_ready
// with the master's index.  Combinational from request to output, so a
// request goes through in the clock it is accepted.
//
// The turn order follows the document's description of the data bus
// schedule; the handshake and the last/none signalling are this design's.
module bus_sched #(
  parameter int unsigned REQ_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stage_start,
  output logic             stage_done,
  input  logic [2:0]       m_valid,          // 0 DB, 1 DEI, 2 MC
  output logic [2:0]       m_ready,
  input  logic [2:0]       m_last,
  input  logic [2:0]       m_none,
  input  logic [REQ_W-1:0] m_req [3],
  output logic             out_valid,
  input  logic             out_ready,
  output logic [1:0]       out_master,
  output logic [REQ_W-1:0] out_req
);

  typedef enum logic [1:0] { T_DB = 2'd0, T_DEI = 2'd1, T_MC = 2'd2, T_DONE = 2'd3 } turn_e;
  turn_e turn;

  logic cur_valid, cur_last, cur_none;
  always_comb begin
    cur_valid = 1'b0; cur_last = 1'b0; cur_none = 1'b0;
    out_req   = '0;
    if (turn != T_DONE) begin
      cur_valid = m_valid[turn];
      cur_last  = m_last[turn];
      cur_none  = m_none[turn];
      out_req   = m_req[turn];
    end
  end

  assign out_valid  = cur_valid && !cur_none;
  assign out_master = turn;
  assign stage_done = (turn == T_DONE);

  always_comb begin
    m_ready = '0;
    if (turn != T_DONE) m_ready[turn] = out_ready && !cur_none;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) turn <= T_DONE;
    else if (stage_start) turn <= T_DB;
    else if (turn != T_DONE) begin
      if (cur_none || (out_valid && out_ready && cur_last)) turn <= turn_e'(turn + 2'd1);
    end
  end

endmodule
