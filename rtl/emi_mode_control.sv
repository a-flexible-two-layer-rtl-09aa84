// emi_mode_control: bank state and open-row bookkeeping of the EMI.
//
// For each bank it keeps a state register (idle: no row open, active: one row
// open) and a row register (the open row).  The FSM updates them with three
// strobes: ACT opens row act_row in bank act_bank, PR closes bank pr_bank (or
// every bank with pr_all), RA marks a read/write with auto-precharge, after
// which the bank is idle.  Two address ports are classified at once, the
// command at the FIFO head (a_*) and the one behind it (b_*), as
//   bank miss - the bank is idle,
//   row hit   - the bank is active with the same row,
//   row miss  - the bank is active with another row.
// The classification is combinational from the registers; updates take
// effect on the next clock edge.  All banks start idle after reset.
//
// The registers, the three strobes and the three statuses follow the
// document; the second query port for the schedule block is this design's.
module emi_mode_control
  import emi_pkg::*;
#(
  parameter int unsigned BANKS  = 4,
  parameter int unsigned ROW_W  = 12,
  localparam int unsigned BANK_W = $clog2(BANKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // updates from the FSM
  input  logic              act,
  input  logic [BANK_W-1:0] act_bank,
  input  logic [ROW_W-1:0]  act_row,
  input  logic              pr,
  input  logic              pr_all,
  input  logic [BANK_W-1:0] pr_bank,
  input  logic              ra,
  input  logic [BANK_W-1:0] ra_bank,
  // query ports
  input  logic [BANK_W-1:0] a_bank,
  input  logic [ROW_W-1:0]  a_row,
  output access_status_e    a_status,
  input  logic [BANK_W-1:0] b_bank,
  input  logic [ROW_W-1:0]  b_row,
  output access_status_e    b_status,
  output logic [BANKS-1:0]  bank_active
);

  bank_state_e      state   [BANKS];
  logic [ROW_W-1:0] row_reg [BANKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BANKS; i++) begin
        state[i]   <= BANK_IDLE;
        row_reg[i] <= '0;
      end
    end else begin
      for (int i = 0; i < BANKS; i++) begin
        if ((pr && (pr_all || pr_bank == BANK_W'(i))) || (ra && ra_bank == BANK_W'(i)))
          state[i] <= BANK_IDLE;
        if (act && act_bank == BANK_W'(i)) begin
          state[i]   <= BANK_ACTIVE;
          row_reg[i] <= act_row;
        end
      end
    end
  end

  function automatic access_status_e classify(input logic [BANK_W-1:0] b, input logic [ROW_W-1:0] r);
    if (state[b] == BANK_IDLE)   return ST_BANK_MISS;
    else if (row_reg[b] == r)    return ST_ROW_HIT;
    else                         return ST_ROW_MISS;
  endfunction

  assign a_status = classify(a_bank, a_row);
  assign b_status = classify(b_bank, b_row);

  always_comb
    for (int i = 0; i < BANKS; i++) bank_active[i] = (state[i] == BANK_ACTIVE);

endmodule
