// emi_cmd_fifo: command FIFO of the EMI with a previous-address register and a
// hit bit per entry.
//
// Each entry holds one burst access (read/write, bank, row, column).  When a
// command is pushed, its bank and row are compared with the previous-address
// register, which holds the command pushed before it.  If that previous
// command is still waiting in the FIFO, its entry learns about its successor:
//   hit        - successor goes to the same bank and the same row
//   nxt_known  - a successor exists (otherwise the FSM has no information)
//   nxt_bank   - successor goes to the same bank (row hit or row miss)
// The FSM uses these bits to decide on auto-precharge for the head command.
// A previous command that has already left the FIFO is not changed: it was
// issued without knowledge of its successor, which is the case the dynamic
// auto-precharge methods treat as "master is changing".
//
// The FIFO also shows its second entry (nxt_*) so the schedule block can
// prepare that command's bank while the head command waits.
//
// Interface: valid/ready push, head_valid/pop at the head.  A push and a pop
// may happen in the same cycle.  The head is visible in the cycle after the
// push (registered storage, combinational read).
//
// Comparing bank and row follows the document's statement that a hit bit of 1
// means "the row address of next command is same as current command"; the
// register widths, the depth and the extra nxt_known / nxt_bank bits are this
// design's choices.  The second entry is shown without its hit bits (the
// schedule block needs only its address), so lint reports those bits of
// the second entry as unused.
module emi_cmd_fifo #(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned BANK_W = 2,
  parameter int unsigned ROW_W  = 12,
  parameter int unsigned COL_W  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // push side
  input  logic              push_valid,
  output logic              push_ready,
  input  logic              push_rw,      // 1 = write
  input  logic [BANK_W-1:0] push_bank,
  input  logic [ROW_W-1:0]  push_row,
  input  logic [COL_W-1:0]  push_col,
  // head entry
  output logic              head_valid,
  output logic              head_rw,
  output logic [BANK_W-1:0] head_bank,
  output logic [ROW_W-1:0]  head_row,
  output logic [COL_W-1:0]  head_col,
  output logic              head_hit,
  output logic              head_nxt_known,
  output logic              head_nxt_bank,
  input  logic              pop,
  // second entry, for the schedule block
  output logic              nxt_valid,
  output logic              nxt_rw,
  output logic [BANK_W-1:0] nxt_bank,
  output logic [ROW_W-1:0]  nxt_row,
  output logic [COL_W-1:0]  nxt_col,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  typedef struct packed {
    logic              rw;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic              hit;
    logic              known;
    logic              same_bank;
  } entry_t;

  entry_t            mem [DEPTH];
  logic [PW-1:0]     rd_ptr, wr_ptr, last_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  // previous-address register
  logic [BANK_W-1:0] prev_bank;
  logic [ROW_W-1:0]  prev_row;

  logic do_push, do_pop, prev_in_fifo;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign push_ready = (cnt < ($clog2(DEPTH+1))'(DEPTH));
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop && (cnt != 0);
  // the youngest entry is still there after this cycle's pop
  assign prev_in_fifo = (cnt > 1) || ((cnt == 1) && !do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      last_ptr  <= '0;
      cnt       <= '0;
      prev_bank <= '0;
      prev_row  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= '{rw: push_rw, bank: push_bank, row: push_row, col: push_col,
                         hit: 1'b0, known: 1'b0, same_bank: 1'b0};
        if (prev_in_fifo) begin
          mem[last_ptr].known     <= 1'b1;
          mem[last_ptr].same_bank <= (push_bank == prev_bank);
          mem[last_ptr].hit       <= (push_bank == prev_bank) && (push_row == prev_row);
        end
        prev_bank <= push_bank;
        prev_row  <= push_row;
        last_ptr  <= wr_ptr;
        wr_ptr    <= inc(wr_ptr);
      end
      if (do_pop) rd_ptr <= inc(rd_ptr);
      cnt <= cnt + (do_push ? CW'(1) : CW'(0)) - (do_pop ? CW'(1) : CW'(0));
    end
  end

  entry_t h, n;
  assign h = mem[rd_ptr];
  assign n = mem[inc(rd_ptr)];

  assign head_valid     = (cnt != 0);
  assign head_rw        = h.rw;
  assign head_bank      = h.bank;
  assign head_row       = h.row;
  assign head_col       = h.col;
  assign head_hit       = h.hit;
  assign head_nxt_known = h.known;
  assign head_nxt_bank  = h.same_bank;

  assign nxt_valid = (cnt > 1);
  assign nxt_rw    = n.rw;
  assign nxt_bank  = n.bank;
  assign nxt_row   = n.row;
  assign nxt_col   = n.col;
  assign count     = cnt;

endmodule
