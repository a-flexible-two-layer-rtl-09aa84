// emi_timing_checker: counters and timing checker of the EMI.
//
// Every command the FSM issues is reported on issue/issue_cmd/issue_bank/
// issue_ap.  Down-counters then start, one set per bank and one for the
// device, and the ok_* outputs stay low until the DRAM timing parameters
// between that command and the next one are met.  While an ok_* output the
// FSM needs is low, the FSM sends NOP.  A counter loaded with N-1 in the cycle
// of a command at clock t lets the next command go at clock t+N.
//
//   per bank : ACT->READ/WRITE  tRCD       ACT->PRE      tRAS
//              ACT->ACT         tRC        PRE->ACT      tRP
//              READ->PRE        one burst  WRITE->PRE    tDQSS+burst+tWR
//              READ/WRITE with auto-precharge: the internal precharge starts
//              when tRAS and the read/write-recovery condition are met, and
//              the bank may be activated tRP after that
//   device   : ACT->ACT (other bank) tRRD, WRITE->READ tDQSS+burst+tWTR,
//              READ->WRITE CL+burst+1-tDQSS (one idle clock on DQ),
//              REF->any tRFC, LMR->any tMRD
//
// Timing values are in clocks.  The defaults are those of the Micron
// Mobile-DDR device at 162 MHz (6.17 ns clock): tRCD 3, tRP 3, tRAS 7 and
// CL 3 as given; tWR 12 ns, tRRD 12 ns, tRC 60 ns, tMRD 2 and tWTR 1 converted
// to clocks.  tRFC (72 ns -> 12 clocks) and tDQSS rounded to 1 clock are this
// design's values.  BEATS is the number of clocks one burst takes on DQ.
module emi_timing_checker
  import emi_pkg::*;
#(
  parameter int unsigned BANKS  = 4,
  parameter int unsigned BEATS  = 1,
  parameter int unsigned CL     = 3,
  parameter int unsigned T_RCD  = 3,
  parameter int unsigned T_RP   = 3,
  parameter int unsigned T_RAS  = 7,
  parameter int unsigned T_RC   = 10,
  parameter int unsigned T_RRD  = 2,
  parameter int unsigned T_WR   = 2,
  parameter int unsigned T_WTR  = 1,
  parameter int unsigned T_DQSS = 1,
  parameter int unsigned T_MRD  = 2,
  parameter int unsigned T_RFC  = 12,
  localparam int unsigned BANK_W = $clog2(BANKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              issue,
  input  dram_cmd_e         issue_cmd,
  input  logic [BANK_W-1:0] issue_bank,
  input  logic              issue_ap,     // A10: auto-precharge / precharge all
  output logic [BANKS-1:0]  ok_act,
  output logic [BANKS-1:0]  ok_pre,
  output logic [BANKS-1:0]  ok_rd,
  output logic [BANKS-1:0]  ok_wr,
  output logic              ok_ref        // also for LMR and precharge-all follow-ups
);

  localparam int unsigned CW = 8;
  typedef logic [CW-1:0] cnt_t;

  cnt_t c_rcd [BANKS];
  cnt_t c_act [BANKS];
  cnt_t c_pre [BANKS];
  cnt_t c_ras [BANKS];
  cnt_t c_rrd, c_rd, c_wr, c_dev;

  function automatic cnt_t dec(input cnt_t c);
    return (c != 0) ? c - 1'b1 : c;
  endfunction
  function automatic cnt_t mx(input cnt_t a, input cnt_t b);
    return (a > b) ? a : b;
  endfunction
  function automatic cnt_t cv(input int unsigned v);
    return (v == 0) ? cnt_t'(0) : cnt_t'(v - 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BANKS; i++) begin
        c_rcd[i] <= '0; c_act[i] <= '0; c_pre[i] <= '0; c_ras[i] <= '0;
      end
      c_rrd <= '0; c_rd <= '0; c_wr <= '0; c_dev <= '0;
    end else begin
      // default: count down
      for (int i = 0; i < BANKS; i++) begin
        c_rcd[i] <= dec(c_rcd[i]);
        c_act[i] <= dec(c_act[i]);
        c_pre[i] <= dec(c_pre[i]);
        c_ras[i] <= dec(c_ras[i]);
      end
      c_rrd <= dec(c_rrd);
      c_rd  <= dec(c_rd);
      c_wr  <= dec(c_wr);
      c_dev <= dec(c_dev);
      if (issue) begin
        unique case (issue_cmd)
          CMD_ACT: begin
            c_rcd[issue_bank] <= cv(T_RCD);
            c_ras[issue_bank] <= cv(T_RAS);
            c_pre[issue_bank] <= mx(dec(c_pre[issue_bank]), cv(T_RAS));
            c_act[issue_bank] <= cv(T_RC);
            c_rrd             <= cv(T_RRD);
          end
          CMD_PRE: begin
            for (int i = 0; i < BANKS; i++)
              if (issue_ap || issue_bank == BANK_W'(i))
                c_act[i] <= mx(dec(c_act[i]), cv(T_RP));
          end
          CMD_READ: begin
            c_rd <= cv(BEATS);
            c_wr <= cnt_t'(CL + BEATS - T_DQSS);
            c_pre[issue_bank] <= mx(dec(c_pre[issue_bank]), cv(BEATS));
            if (issue_ap)
              c_act[issue_bank] <= mx(dec(c_act[issue_bank]),
                                      cnt_t'(mx(c_ras[issue_bank], cnt_t'(BEATS)) + cnt_t'(T_RP) - 1'b1));
          end
          CMD_WRITE: begin
            c_wr <= cv(BEATS);
            c_rd <= cv(T_DQSS + BEATS + T_WTR);
            c_pre[issue_bank] <= mx(dec(c_pre[issue_bank]), cv(T_DQSS + BEATS + T_WR));
            if (issue_ap)
              c_act[issue_bank] <= mx(dec(c_act[issue_bank]),
                                      cnt_t'(mx(c_ras[issue_bank], cnt_t'(T_DQSS + BEATS + T_WR))
                                             + cnt_t'(T_RP) - 1'b1));
          end
          CMD_REF: c_dev <= cv(T_RFC);
          CMD_LMR: c_dev <= cv(T_MRD);
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    ok_ref = (c_dev == 0);
    for (int i = 0; i < BANKS; i++) begin
      ok_act[i] = (c_act[i] == 0) && (c_rrd == 0) && (c_dev == 0);
      ok_pre[i] = (c_pre[i] == 0) && (c_dev == 0);
      ok_rd[i]  = (c_rcd[i] == 0) && (c_rd == 0) && (c_dev == 0);
      ok_wr[i]  = (c_rcd[i] == 0) && (c_wr == 0) && (c_dev == 0);
      ok_ref    = ok_ref && (c_act[i] == 0);
    end
  end

endmodule
