// emi_fsm: the command finite state machine of the EMI, with its schedule
// block.
//
// One FSM serves all banks, because the DRAM accepts one command per clock.
// It issues exactly one command per clock on the registered DRAM command pins
// (NOP when nothing may go).
//
// Initialization: wait T_POWERUP clocks with NOP, precharge all banks, two
// auto refreshes, then LMR_1 (mode register: burst length, burst type, CAS
// latency) and LMR_2 (extended mode register of mobile DRAM: PASR, TCSR,
// drive strength).  Each step waits for the timing checker.
//
// Access: the command at the head of the command FIFO is classified by the
// mode control block.  A bank miss issues ACT, a row miss issues PRE, a row
// hit issues READ or WRITE once the timing checker allows it.  The READ or
// WRITE carries auto-precharge (A10) according to the method chosen on
// apc_method:
//   row-close  always;              row-open  never;
//   dynamic 1  unless the next command is a row hit or a bank miss;
//   dynamic 2  unless the next command is a row hit.
// With no known next command both dynamic methods precharge (the master is
// probably changing).  Stalls: a READ waits while the read-data FIFO could
// not hold its burst on top of the reads still in flight; a WRITE waits until
// its whole burst is in the write-data FIFO, beyond the words that WRITEs
// already issued will still take from it.
//
// Schedule block: in a clock where the head command cannot issue anything,
// the second FIFO entry, if it goes to another bank, may get its ACT (bank
// miss) or PRE (row miss) issued now, so its row opens while the head waits.
// Column accesses stay in FIFO order, so data order is never changed.
//
// Refresh: every T_REFI clocks all banks are precharged and one auto refresh
// is issued.  Power down: after PD_IDLE idle clocks with nothing queued, CKE
// goes low; a new command or a due refresh brings it back after one clock.
//
// Data timing: a READ registered at clock edge t is sampled by the DRAM at
// t+1 and its data is captured at edge t+1+CL, BEATS clocks of RATE words.
// Write data is driven T_DQSS clocks after the WRITE is on the pins.
// The DRAM read data pass through this module to the read-data FIFO
// (rd_data), which captures them when rd_push is high; ev_status is the mode
// control's classification of the head command, passed on for statistics.
//
// The state sequence of initialization, the power-down behaviour, the
// auto-precharge methods, the stalls and the schedule block follow the
// document.  The exact priority of refresh, the mode-register encodings
// (JEDEC), power-down thresholds and refresh period are this design's.
module emi_fsm
  import emi_pkg::*;
#(
  parameter int unsigned BANKS     = 4,
  parameter int unsigned ROW_W     = 12,
  parameter int unsigned COL_W     = 9,
  parameter int unsigned A_W       = 12,
  parameter int unsigned W         = 32,
  parameter int unsigned RATE      = 2,
  parameter int unsigned BL        = 2,
  parameter int unsigned CL        = 3,
  parameter int unsigned T_DQSS    = 1,
  parameter int unsigned BURST_TYPE = 0,
  parameter int unsigned PASR      = 0,
  parameter int unsigned TCSR      = 0,
  parameter int unsigned DS        = 0,
  parameter int unsigned T_POWERUP = 32400,
  parameter int unsigned T_REFI    = 2528,
  parameter int unsigned PD_IDLE   = 64,
  parameter int unsigned FIFO_CW   = 6,
  localparam int unsigned BANK_W   = $clog2(BANKS),
  localparam int unsigned BEATS    = BL / RATE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  apc_method_e       apc_method,
  // command FIFO
  input  logic              head_valid,
  input  logic              head_rw,
  input  logic [BANK_W-1:0] head_bank,
  input  logic [ROW_W-1:0]  head_row,
  input  logic [COL_W-1:0]  head_col,
  input  logic              head_hit,
  input  logic              head_nxt_known,
  input  logic              head_nxt_bank,
  output logic              head_pop,
  input  logic              nxt_valid,
  input  logic [BANK_W-1:0] nxt_bank,
  input  logic [ROW_W-1:0]  nxt_row,
  // mode control
  input  access_status_e    a_status,
  input  access_status_e    b_status,
  output logic              mc_act,
  output logic [BANK_W-1:0] mc_act_bank,
  output logic [ROW_W-1:0]  mc_act_row,
  output logic              mc_pr,
  output logic              mc_pr_all,
  output logic [BANK_W-1:0] mc_pr_bank,
  output logic              mc_ra,
  output logic [BANK_W-1:0] mc_ra_bank,
  // timing checker
  input  logic [BANKS-1:0]  ok_act,
  input  logic [BANKS-1:0]  ok_pre,
  input  logic [BANKS-1:0]  ok_rd,
  input  logic [BANKS-1:0]  ok_wr,
  input  logic              ok_ref,
  output logic              issue,
  output dram_cmd_e         issue_cmd,
  output logic [BANK_W-1:0] issue_bank,
  output logic              issue_ap,
  // data FIFOs
  input  logic [FIFO_CW-1:0] wr_level,
  output logic              wr_pop,
  input  logic [RATE*W-1:0] wr_data,
  input  logic [FIFO_CW-1:0] rd_free,
  output logic              rd_push,
  output logic [RATE*W-1:0] rd_data,
  // DRAM pins (pad side)
  output logic              dram_cke,
  output logic              dram_cs_n,
  output logic              dram_ras_n,
  output logic              dram_cas_n,
  output logic              dram_we_n,
  output logic [BANK_W-1:0] dram_ba,
  output logic [A_W-1:0]    dram_a,
  output logic [RATE*W-1:0] dram_dq_out,
  output logic              dram_dq_oe,
  input  logic [RATE*W-1:0] dram_dq_in,
  // status
  output logic              init_done,
  output logic              in_power_down,
  output logic              ev_stall_rd,    // a READ was held back by the read-data FIFO
  output logic              ev_stall_wr,    // a WRITE was held back by the write-data FIFO
  output logic              ev_sched,       // the schedule block issued a command
  output logic              ev_refresh,     // an auto refresh was issued after init
  output logic              ev_status_valid, // head command classified (once per command)
  output access_status_e    ev_status
);

  typedef enum logic [3:0] {
    S_PWRUP, S_INIT_PALL, S_INIT_REF1, S_INIT_REF2, S_LMR1, S_LMR2,
    S_ACCESS, S_REF_PALL, S_REF, S_PDOWN, S_PD_EXIT
  } state_e;

  state_e state;
  logic [$clog2(T_POWERUP+2)-1:0] pwr_cnt;
  logic [$clog2(T_REFI+2)-1:0]    ref_cnt;
  logic                           ref_due;
  logic [$clog2(PD_IDLE+2)-1:0]   idle_cnt;
  logic [FIFO_CW:0]               rd_inflight;   // words of issued reads not yet captured
  logic [CL+BEATS:0]              rd_pipe;
  logic [T_DQSS+BEATS:0]          wr_pipe;
  logic [FIFO_CW:0]               wr_resv;       // words of issued writes not yet popped
  logic                           head_seen;

  // mode register contents (JEDEC layout)
  function automatic logic [2:0] bl_code(input int unsigned b);
    case (b)
      1: return 3'd0;
      2: return 3'd1;
      4: return 3'd2;
      8: return 3'd3;
      default: return 3'd4;
    endcase
  endfunction
  localparam logic [A_W-1:0] MR_VAL  = A_W'({3'(CL), 1'(BURST_TYPE), bl_code(BL)});
  localparam logic [A_W-1:0] EMR_VAL = A_W'({2'(DS), 2'(TCSR), 3'(PASR)});

  // ---------------------------------------------------------------- decide
  dram_cmd_e         n_cmd;
  logic [BANK_W-1:0] n_bank;
  logic [A_W-1:0]    n_a;
  logic              n_ap, n_pop, n_sched;
  logic              want_ap, rd_room, wr_ready, all_pre_ok;
  logic              stall_rd, stall_wr;

  always_comb begin
    unique case (apc_method)
      APC_ROW_CLOSE: want_ap = 1'b1;
      APC_ROW_OPEN:  want_ap = 1'b0;
      APC_DYN1:      want_ap = !head_nxt_known || (head_nxt_bank && !head_hit);
      APC_DYN2:      want_ap = !head_nxt_known || !head_hit;
      default:       want_ap = 1'b0;
    endcase
  end

  assign rd_room  = ({1'b0, rd_free} >= rd_inflight + (FIFO_CW+1)'(BL));
  // a WRITE needs a whole burst beyond the words earlier WRITEs still take
  assign wr_ready = ({1'b0, wr_level} >= wr_resv + (FIFO_CW+1)'(BL));
  assign all_pre_ok = &ok_pre;

  always_comb begin
    n_cmd   = CMD_NOP;
    n_bank  = '0;
    n_a     = '0;
    n_ap    = 1'b0;
    n_pop   = 1'b0;
    n_sched = 1'b0;
    stall_rd = 1'b0;
    stall_wr = 1'b0;
    unique case (state)
      S_INIT_PALL, S_REF_PALL: if (all_pre_ok) begin
        n_cmd = CMD_PRE; n_ap = 1'b1; n_a[10] = 1'b1;
      end
      S_INIT_REF1, S_INIT_REF2, S_REF: if (ok_ref) n_cmd = CMD_REF;
      S_LMR1: if (ok_ref) begin n_cmd = CMD_LMR; n_bank = BANK_W'(0); n_a = MR_VAL; end
      S_LMR2: if (ok_ref) begin n_cmd = CMD_LMR; n_bank = BANK_W'(2); n_a = EMR_VAL; end
      S_ACCESS: if (!ref_due && head_valid) begin
        unique case (a_status)
          ST_BANK_MISS: if (ok_act[head_bank]) begin
            n_cmd = CMD_ACT; n_bank = head_bank; n_a = A_W'(head_row);
          end
          ST_ROW_MISS: if (ok_pre[head_bank]) begin
            n_cmd = CMD_PRE; n_bank = head_bank;
          end
          default: begin // row hit
            if (!head_rw) begin
              if (!rd_room) stall_rd = 1'b1;
              else if (ok_rd[head_bank]) begin
                n_cmd = CMD_READ; n_bank = head_bank; n_ap = want_ap; n_pop = 1'b1;
              end
            end else begin
              if (!wr_ready) stall_wr = 1'b1;
              else if (ok_wr[head_bank]) begin
                n_cmd = CMD_WRITE; n_bank = head_bank; n_ap = want_ap; n_pop = 1'b1;
              end
            end
            n_a = A_W'(head_col);
            n_a[10] = n_ap;
          end
        endcase
        // schedule block: prepare the next command's bank
        if (n_cmd == CMD_NOP && nxt_valid && nxt_bank != head_bank) begin
          if (b_status == ST_BANK_MISS && ok_act[nxt_bank]) begin
            n_cmd = CMD_ACT; n_bank = nxt_bank; n_a = A_W'(nxt_row); n_sched = 1'b1;
          end else if (b_status == ST_ROW_MISS && ok_pre[nxt_bank]) begin
            n_cmd = CMD_PRE; n_bank = nxt_bank; n_a = '0; n_sched = 1'b1;
          end
        end
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- state
  logic cmd_fifo_idle;
  assign cmd_fifo_idle = !head_valid && (rd_inflight == 0) && (wr_pipe == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_PWRUP;
      pwr_cnt   <= '0;
      ref_cnt   <= '0;
      ref_due   <= 1'b0;
      idle_cnt  <= '0;
      head_seen <= 1'b0;
    end else begin
      // refresh interval counter, runs once initialization is done
      if (state inside {S_ACCESS, S_REF_PALL, S_REF, S_PDOWN, S_PD_EXIT}) begin
        if (ref_cnt >= ($bits(ref_cnt))'(T_REFI - 1)) begin
          ref_cnt <= '0;
          ref_due <= 1'b1;
        end else ref_cnt <= ref_cnt + 1'b1;
      end
      if (head_pop) head_seen <= 1'b0;
      else if (state == S_ACCESS && head_valid && !ref_due) head_seen <= 1'b1;
      unique case (state)
        S_PWRUP:     if (pwr_cnt >= ($bits(pwr_cnt))'(T_POWERUP)) state <= S_INIT_PALL;
                     else pwr_cnt <= pwr_cnt + 1'b1;
        S_INIT_PALL: if (n_cmd == CMD_PRE) state <= S_INIT_REF1;
        S_INIT_REF1: if (n_cmd == CMD_REF) state <= S_INIT_REF2;
        S_INIT_REF2: if (n_cmd == CMD_REF) state <= S_LMR1;
        S_LMR1:      if (n_cmd == CMD_LMR) state <= S_LMR2;
        S_LMR2:      if (n_cmd == CMD_LMR) state <= S_ACCESS;
        S_ACCESS: begin
          if (ref_due) state <= S_REF_PALL;
          else if (cmd_fifo_idle) begin
            if (idle_cnt >= ($bits(idle_cnt))'(PD_IDLE)) begin
              state    <= S_PDOWN;
              idle_cnt <= '0;
            end else idle_cnt <= idle_cnt + 1'b1;
          end else idle_cnt <= '0;
        end
        S_REF_PALL:  if (n_cmd == CMD_PRE) state <= S_REF;
        S_REF:       if (n_cmd == CMD_REF) begin state <= S_ACCESS; ref_due <= 1'b0; end
        S_PDOWN:     if (head_valid || ref_due) state <= S_PD_EXIT;
        S_PD_EXIT:   state <= S_ACCESS;
        default:     state <= S_PWRUP;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  assign issue      = (n_cmd != CMD_NOP);
  assign issue_cmd  = n_cmd;
  assign issue_bank = n_bank;
  assign issue_ap   = n_ap;
  assign head_pop   = n_pop;

  assign mc_act      = (n_cmd == CMD_ACT);
  assign mc_act_bank = n_bank;
  assign mc_act_row  = ROW_W'(n_a);
  assign mc_pr       = (n_cmd == CMD_PRE);
  assign mc_pr_all   = n_ap;
  assign mc_pr_bank  = n_bank;
  assign mc_ra       = (n_cmd == CMD_READ || n_cmd == CMD_WRITE) && n_ap;
  assign mc_ra_bank  = n_bank;

  assign ev_stall_rd     = stall_rd;
  assign ev_stall_wr     = stall_wr;
  assign ev_sched        = n_sched;
  assign ev_refresh      = (state == S_REF) && (n_cmd == CMD_REF);
  assign ev_status_valid = (state == S_ACCESS) && head_valid && !ref_due && !head_seen;
  assign ev_status       = a_status;
  assign init_done       = !(state inside {S_PWRUP, S_INIT_PALL, S_INIT_REF1, S_INIT_REF2, S_LMR1, S_LMR2});
  assign in_power_down   = (state == S_PDOWN);

  // CKE is low for as long as the FSM sits in power down
  assign dram_cke = (state != S_PDOWN);

  // registered command pins
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= CMD_NOP;
      dram_ba    <= '0;
      dram_a     <= '0;
    end else begin
      {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= n_cmd;
      dram_ba  <= n_bank;
      dram_a   <= n_a;
    end
  end

  // ---------------------------------------------------------------- data
  logic rd_cap;
  always_comb begin
    rd_cap = 1'b0;
    for (int i = CL; i < CL + BEATS; i++) rd_cap |= rd_pipe[i];
  end
  assign rd_push = rd_cap;
  assign rd_data = dram_dq_in;
  assign wr_pop  = |wr_pipe[T_DQSS-1 +: BEATS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pipe     <= '0;
      wr_pipe     <= '0;
      rd_inflight <= '0;
      wr_resv     <= '0;
      dram_dq_out <= '0;
      dram_dq_oe  <= 1'b0;
    end else begin
      rd_pipe <= {rd_pipe[CL+BEATS-1:0], (n_cmd == CMD_READ)};
      wr_pipe <= {wr_pipe[T_DQSS+BEATS-1:0], (n_cmd == CMD_WRITE)};
      rd_inflight <= rd_inflight + ((n_cmd == CMD_READ) ? (FIFO_CW+1)'(BL) : '0)
                                 - (rd_cap ? (FIFO_CW+1)'(RATE) : '0);
      wr_resv     <= wr_resv + ((n_cmd == CMD_WRITE) ? (FIFO_CW+1)'(BL) : '0)
                             - (wr_pop ? (FIFO_CW+1)'(RATE) : '0);
      dram_dq_oe  <= wr_pop;
      if (wr_pop) dram_dq_out <= wr_data;
    end
  end

  initial begin
    assert (BL % RATE == 0 && BEATS >= 1) else $error("BL must be a multiple of the data rate");
    assert (A_W >= 11 && COL_W <= 10) else $error("A10 must be free for auto-precharge");
    assert (T_DQSS >= 1) else $error("T_DQSS must be at least one clock");
  end

endmodule
