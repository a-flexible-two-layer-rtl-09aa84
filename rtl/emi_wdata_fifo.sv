// emi_wdata_fifo: write-data FIFO of the EMI, n bits in, RATE*n bits out.
//
// The system bus side pushes one n-bit word per cycle.  The DRAM side takes
// RATE words per clock (RATE = 2 for a double-data-rate device, whose pad
// sends the two halves on the two clock edges; RATE = 1 for SDR).  The first
// word of a beat is in the low bits of rd_data.  The FSM reads `level' and
// holds a WRITE command back until a whole burst is waiting ("the write-data
// FIFO is going to be empty"), so the DRAM never runs out of write data in the
// middle of a burst.
//
// Interface: push_valid/push_ready, pop takes RATE words and is only legal
// when level >= RATE.  Storage is a circular buffer of DEPTH words, DEPTH a
// multiple of RATE.  Default DEPTH 32 is the larger of the two buffer sizes
// chosen for the decoder (16 or 32 words); 8 and 16 are the other options.
module emi_wdata_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned RATE  = 2,
  parameter int unsigned DEPTH = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push_valid,
  output logic                         push_ready,
  input  logic [W-1:0]                 push_data,
  input  logic                         pop,
  output logic [RATE*W-1:0]            rd_data,
  output logic [$clog2(DEPTH+1)-1:0]   level
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] cnt;
  logic          do_push, do_pop;

  assign push_ready = (cnt < CW'(DEPTH));
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop && (cnt >= CW'(RATE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= push_data;
        wr_ptr      <= PW'((32'(wr_ptr) + 1) % DEPTH);
      end
      if (do_pop) rd_ptr <= PW'((32'(rd_ptr) + RATE) % DEPTH);
      cnt <= cnt + (do_push ? CW'(1) : CW'(0)) - (do_pop ? CW'(RATE) : CW'(0));
    end
  end

  always_comb begin
    for (int i = 0; i < RATE; i++)
      rd_data[i*W +: W] = mem[PW'((32'(rd_ptr) + i) % DEPTH)];
  end

  assign level = cnt;

endmodule
