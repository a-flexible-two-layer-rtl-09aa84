// emi: external memory interface, layer 0 of the memory controller.
//
// The EMI takes burst accesses (read or write, bank, row, column) from the
// system side and drives one SDR or DDR SDRAM.  Inside it are the five parts
// of the design: the command FIFO with its hit bits, the write-data and
// read-data FIFOs, the mode control block (bank state and row registers), the
// counters and timing checker, and the FSM with its schedule block.
//
// System side: a command is pushed on cmd_valid/cmd_ready.  For a write, BL
// words of write data go in on wdata_valid/wdata_ready in the same order as
// the write commands; the FSM waits for a whole burst before it issues the
// WRITE.  Read data comes back in command order on rdata_valid/rdata_ready,
// BL words per read.  apc_method selects the auto-precharge method at run
// time.
//
// DRAM side: registered command pins (CKE, CS#, RAS#, CAS#, WE#, BA, A) and
// a data path of RATE*DQ_W bits per clock, RATE = 2 for DDR.  The DDR pad
// cells that put the two halves on the two clock edges are outside this
// module.  The first word of a beat is in the low half.
//
// The configuration follows the settings the EMI offers its user: data rate
// (DDR), data bus width (x8/x16/x32), rows and columns, burst length, burst
// type, CAS latency, PASR, TCSR, drive strength, buffer size and the timing
// parameters.  The defaults are the decoder's configuration: DDR, x32, burst
// length 2, CAS latency 3, 32-word data FIFOs, and the Micron Mobile-DDR
// timing at 162 MHz.  Rows, columns, tRFC, the power-up time, the refresh
// interval and the depth of the command FIFO are this design's values for a
// 256 Mb x32 device.
//
// Lint notes that stand: the command FIFO's second-entry column and read/write
// bit, its entry count and the mode control's bank_active are outputs of
// those blocks that this FSM does not need; they are left open here.
module emi
  import emi_pkg::*;
#(
  parameter int unsigned DQ_W       = 32,
  parameter bit          DDR        = 1'b1,
  parameter int unsigned BANKS      = 4,
  parameter int unsigned ROW_W      = 12,
  parameter int unsigned COL_W      = 9,
  parameter int unsigned A_W        = 12,
  parameter int unsigned BL         = 2,
  parameter int unsigned CL         = 3,
  parameter int unsigned BURST_TYPE = 0,
  parameter int unsigned PASR       = 0,
  parameter int unsigned TCSR       = 0,
  parameter int unsigned DS         = 0,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned CMD_DEPTH  = 8,
  parameter int unsigned T_RCD      = 3,
  parameter int unsigned T_RP       = 3,
  parameter int unsigned T_RAS      = 7,
  parameter int unsigned T_RC       = 10,
  parameter int unsigned T_RRD      = 2,
  parameter int unsigned T_WR       = 2,
  parameter int unsigned T_WTR      = 1,
  parameter int unsigned T_DQSS     = 1,
  parameter int unsigned T_MRD      = 2,
  parameter int unsigned T_RFC      = 12,
  parameter int unsigned T_POWERUP  = 32400,
  parameter int unsigned T_REFI     = 2528,
  parameter int unsigned PD_IDLE    = 64,
  localparam int unsigned BANK_W    = $clog2(BANKS),
  localparam int unsigned RATE      = DDR ? 2 : 1,
  localparam int unsigned DW        = RATE * DQ_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  apc_method_e       apc_method,
  // system side
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_rw,        // 1 = write
  input  logic [BANK_W-1:0] cmd_bank,
  input  logic [ROW_W-1:0]  cmd_row,
  input  logic [COL_W-1:0]  cmd_col,
  input  logic              wdata_valid,
  output logic              wdata_ready,
  input  logic [DQ_W-1:0]   wdata,
  output logic              rdata_valid,
  input  logic              rdata_ready,
  output logic [DQ_W-1:0]   rdata,
  // DRAM side
  output logic              dram_cke,
  output logic              dram_cs_n,
  output logic              dram_ras_n,
  output logic              dram_cas_n,
  output logic              dram_we_n,
  output logic [BANK_W-1:0] dram_ba,
  output logic [A_W-1:0]    dram_a,
  output logic [DW-1:0]     dram_dq_out,
  output logic              dram_dq_oe,
  input  logic [DW-1:0]     dram_dq_in,
  // status and events
  output logic              init_done,
  output logic              in_power_down,
  output logic              ev_stall_rd,
  output logic              ev_stall_wr,
  output logic              ev_sched,
  output logic              ev_refresh,
  output logic              ev_status_valid,
  output access_status_e    ev_status,
  output logic              rd_overflow
);

  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);

  // command FIFO
  logic              h_valid, h_rw, h_hit, h_known, h_same_bank, h_pop;
  logic [BANK_W-1:0] h_bank, n_bank;
  logic [ROW_W-1:0]  h_row, n_row;
  logic [COL_W-1:0]  h_col, n_col;
  logic              n_valid, n_rw;
  logic [$clog2(CMD_DEPTH+1)-1:0] c_count;

  emi_cmd_fifo #(.DEPTH(CMD_DEPTH), .BANK_W(BANK_W), .ROW_W(ROW_W), .COL_W(COL_W)) u_cmd_fifo (
    .clk, .rst_n,
    .push_valid(cmd_valid), .push_ready(cmd_ready), .push_rw(cmd_rw),
    .push_bank(cmd_bank), .push_row(cmd_row), .push_col(cmd_col),
    .head_valid(h_valid), .head_rw(h_rw), .head_bank(h_bank), .head_row(h_row),
    .head_col(h_col), .head_hit(h_hit), .head_nxt_known(h_known),
    .head_nxt_bank(h_same_bank), .pop(h_pop),
    .nxt_valid(n_valid), .nxt_rw(n_rw), .nxt_bank(n_bank), .nxt_row(n_row),
    .nxt_col(n_col), .count(c_count)
  );

  // data FIFOs
  logic           wf_pop, rf_push;
  logic [DW-1:0]  wf_data, rf_data;
  logic [FCW-1:0] wf_level, rf_free;

  emi_wdata_fifo #(.W(DQ_W), .RATE(RATE), .DEPTH(FIFO_DEPTH)) u_wdata_fifo (
    .clk, .rst_n,
    .push_valid(wdata_valid), .push_ready(wdata_ready), .push_data(wdata),
    .pop(wf_pop), .rd_data(wf_data), .level(wf_level)
  );

  emi_rdata_fifo #(.W(DQ_W), .RATE(RATE), .DEPTH(FIFO_DEPTH)) u_rdata_fifo (
    .clk, .rst_n,
    .push(rf_push), .push_data(rf_data),
    .pop_valid(rdata_valid), .pop_ready(rdata_ready), .pop_data(rdata),
    .free(rf_free), .overflow(rd_overflow)
  );

  // mode control
  logic              mc_act, mc_pr, mc_pr_all, mc_ra;
  logic [BANK_W-1:0] mc_act_bank, mc_pr_bank, mc_ra_bank;
  logic [ROW_W-1:0]  mc_act_row;
  access_status_e    a_status, b_status;
  logic [BANKS-1:0]  bank_active;

  emi_mode_control #(.BANKS(BANKS), .ROW_W(ROW_W)) u_mode_control (
    .clk, .rst_n,
    .act(mc_act), .act_bank(mc_act_bank), .act_row(mc_act_row),
    .pr(mc_pr), .pr_all(mc_pr_all), .pr_bank(mc_pr_bank),
    .ra(mc_ra), .ra_bank(mc_ra_bank),
    .a_bank(h_bank), .a_row(h_row), .a_status(a_status),
    .b_bank(n_bank), .b_row(n_row), .b_status(b_status),
    .bank_active(bank_active)
  );

  // counters and timing checker
  logic              issue, issue_ap;
  dram_cmd_e         issue_cmd;
  logic [BANK_W-1:0] issue_bank;
  logic [BANKS-1:0]  ok_act, ok_pre, ok_rd, ok_wr;
  logic              ok_ref;

  emi_timing_checker #(
    .BANKS(BANKS), .BEATS(BL / RATE), .CL(CL), .T_RCD(T_RCD), .T_RP(T_RP),
    .T_RAS(T_RAS), .T_RC(T_RC), .T_RRD(T_RRD), .T_WR(T_WR), .T_WTR(T_WTR),
    .T_DQSS(T_DQSS), .T_MRD(T_MRD), .T_RFC(T_RFC)
  ) u_timing (
    .clk, .rst_n,
    .issue(issue), .issue_cmd(issue_cmd), .issue_bank(issue_bank), .issue_ap(issue_ap),
    .ok_act(ok_act), .ok_pre(ok_pre), .ok_rd(ok_rd), .ok_wr(ok_wr), .ok_ref(ok_ref)
  );

  // FSM with schedule block
  emi_fsm #(
    .BANKS(BANKS), .ROW_W(ROW_W), .COL_W(COL_W), .A_W(A_W), .W(DQ_W), .RATE(RATE),
    .BL(BL), .CL(CL), .T_DQSS(T_DQSS), .BURST_TYPE(BURST_TYPE), .PASR(PASR),
    .TCSR(TCSR), .DS(DS), .T_POWERUP(T_POWERUP), .T_REFI(T_REFI),
    .PD_IDLE(PD_IDLE), .FIFO_CW(FCW)
  ) u_fsm (
    .clk, .rst_n, .apc_method,
    .head_valid(h_valid), .head_rw(h_rw), .head_bank(h_bank), .head_row(h_row),
    .head_col(h_col), .head_hit(h_hit), .head_nxt_known(h_known),
    .head_nxt_bank(h_same_bank), .head_pop(h_pop),
    .nxt_valid(n_valid), .nxt_bank(n_bank), .nxt_row(n_row),
    .a_status(a_status), .b_status(b_status),
    .mc_act(mc_act), .mc_act_bank(mc_act_bank), .mc_act_row(mc_act_row),
    .mc_pr(mc_pr), .mc_pr_all(mc_pr_all), .mc_pr_bank(mc_pr_bank),
    .mc_ra(mc_ra), .mc_ra_bank(mc_ra_bank),
    .ok_act(ok_act), .ok_pre(ok_pre), .ok_rd(ok_rd), .ok_wr(ok_wr), .ok_ref(ok_ref),
    .issue(issue), .issue_cmd(issue_cmd), .issue_bank(issue_bank), .issue_ap(issue_ap),
    .wr_level(wf_level), .wr_pop(wf_pop), .wr_data(wf_data),
    .rd_free(rf_free), .rd_push(rf_push), .rd_data(rf_data),
    .dram_cke, .dram_cs_n, .dram_ras_n, .dram_cas_n, .dram_we_n, .dram_ba, .dram_a,
    .dram_dq_out, .dram_dq_oe, .dram_dq_in,
    .init_done, .in_power_down, .ev_stall_rd, .ev_stall_wr, .ev_sched, .ev_refresh,
    .ev_status_valid, .ev_status
  );

endmodule
