// emi_rdata_fifo: read-data FIFO of the EMI, RATE*n bits in, n bits out.
//
// The DRAM side writes RATE words per clock while a read burst returns (two
// for a double-data-rate device); the system bus side takes one n-bit word per
// cycle, so the FIFO fills when the DRAM streams data.  `free' tells the FSM
// how many words still fit; the FSM counts the reads already in flight
// against it and stalls the next READ when the FIFO is going to be full.
// A push is always accepted: the FSM guarantees the room.
//
// Interface: push (RATE words, first word in the low bits), pop_valid /
// pop_ready with pop_data the oldest word.  Default DEPTH 32 words.
module emi_rdata_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned RATE  = 2,
  parameter int unsigned DEPTH = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  logic [RATE*W-1:0]            push_data,
  output logic                         pop_valid,
  input  logic                         pop_ready,
  output logic [W-1:0]                 pop_data,
  output logic [$clog2(DEPTH+1)-1:0]   free,
  output logic                         overflow   // push without room (sticky)
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] cnt;
  logic          do_push, do_pop;

  assign do_pop  = pop_ready && (cnt != 0);
  assign do_push = push && ((cnt - (do_pop ? CW'(1) : CW'(0))) <= CW'(DEPTH - RATE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) begin
        for (int i = 0; i < RATE; i++)
          mem[PW'((32'(wr_ptr) + i) % DEPTH)] <= push_data[i*W +: W];
        wr_ptr <= PW'((32'(wr_ptr) + RATE) % DEPTH);
      end
      if (push && !do_push) overflow <= 1'b1;
      if (do_pop) rd_ptr <= PW'((32'(rd_ptr) + 1) % DEPTH);
      cnt <= cnt + (do_push ? CW'(RATE) : CW'(0)) - (do_pop ? CW'(1) : CW'(0));
    end
  end

  assign pop_valid = (cnt != 0);
  assign pop_data  = mem[rd_ptr];
  assign free      = CW'(DEPTH) - cnt;

endmodule
