// tb_emi_timing_checker: self-checking testbench of the EMI counters and
// timing checker.
//
// A stream of legal DRAM commands is issued, each at a random clock at or
// after the clock the checker allows it (as the FSM does).  An independent
// model keeps, in absolute clock numbers, the earliest clock at which each
// command may follow (tRCD, tRAS, tRC, tRP, tRRD, write recovery, tWTR, the
// read-to-write bus turnaround, tRFC, tMRD and the auto-precharge start).
// Before every clock edge each ok_* output must equal "this clock is at or
// after the earliest clock", so the checker is neither early nor late by a
// single clock.
module tb_emi_timing_checker;
  import emi_pkg::*;
  localparam int BEATS = 1, CL = 3, T_RCD = 3, T_RP = 3, T_RAS = 7, T_RC = 10, T_RRD = 2;
  localparam int T_WR = 2, T_WTR = 1, T_DQSS = 1, T_MRD = 2, T_RFC = 12;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic issue = 0, issue_ap = 0;
  dram_cmd_e issue_cmd = CMD_NOP;
  logic [1:0] issue_bank = 0;
  logic [3:0] ok_act, ok_pre, ok_rd, ok_wr;
  logic ok_ref;

  emi_timing_checker dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  longint act_e [4], pre_e [4], rcd_e [4], ras_e [4];
  longint rrd_e = 0, rdg_e = 0, wrg_e = 0, dev_e = 0;
  bit open_b [4];
  longint cyc = 0;
  int n_cmd [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  int n_ap = 0;

  function automatic longint mx(longint a, longint b);
    return (a > b) ? a : b;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    for (int i = 0; i < 4; i++) begin act_e[i] = 0; pre_e[i] = 0; rcd_e[i] = 0; ras_e[i] = 0; open_b[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      longint c;
      int b, pick;
      bit ok [8];
      @(negedge clk);
      c = cyc + 1;               // the clock edge that comes next
      for (int k = 0; k < 4; k++) begin
        check(ok_act[k] == (c >= act_e[k] && c >= rrd_e && c >= dev_e), $sformatf("ok_act[%0d] at %0d", k, c));
        check(ok_pre[k] == (c >= pre_e[k] && c >= dev_e), $sformatf("ok_pre[%0d] at %0d", k, c));
        check(ok_rd[k] == (c >= rcd_e[k] && c >= rdg_e && c >= dev_e), $sformatf("ok_rd[%0d] at %0d", k, c));
        check(ok_wr[k] == (c >= rcd_e[k] && c >= wrg_e && c >= dev_e), $sformatf("ok_wr[%0d] at %0d", k, c));
      end
      check(ok_ref == (c >= dev_e && c >= act_e[0] && c >= act_e[1] && c >= act_e[2] && c >= act_e[3]),
            $sformatf("ok_ref at %0d", c));
      // choose a legal, allowed command or none
      issue = 0; issue_ap = 0;
      b = $urandom_range(3);
      pick = $urandom_range(9);
      if ($urandom_range(2) != 0) begin
        if (!open_b[b] && ok_act[b] && pick < 5) begin issue = 1; issue_cmd = CMD_ACT; end
        else if (open_b[b] && pick < 4 && ok_rd[b]) begin issue = 1; issue_cmd = CMD_READ; issue_ap = ($urandom_range(3) == 0); end
        else if (open_b[b] && pick < 8 && ok_wr[b]) begin issue = 1; issue_cmd = CMD_WRITE; issue_ap = ($urandom_range(3) == 0); end
        else if (open_b[b] && ok_pre[b]) begin issue = 1; issue_cmd = CMD_PRE; issue_ap = ($urandom_range(5) == 0); end
        else if (!(open_b[0] || open_b[1] || open_b[2] || open_b[3]) && ok_ref && pick == 9) begin
          issue = 1; issue_cmd = ($urandom_range(3) == 0) ? CMD_LMR : CMD_REF;
        end
      end
      issue_bank = 2'(b);
      @(posedge clk);
      cyc++;
      if (issue) begin
        longint t;
        t = cyc;
        n_cmd[int'(issue_cmd) & 7]++;
        case (issue_cmd)
          CMD_ACT: begin
            rcd_e[b] = t + T_RCD; ras_e[b] = t + T_RAS; pre_e[b] = mx(pre_e[b], t + T_RAS);
            act_e[b] = t + T_RC; rrd_e = t + T_RRD; open_b[b] = 1;
          end
          CMD_PRE: for (int k = 0; k < 4; k++) if (issue_ap || k == b) begin
            if (open_b[k]) act_e[k] = mx(act_e[k], t + T_RP);
            else act_e[k] = mx(act_e[k], t + T_RP);
            open_b[k] = 0;
          end
          CMD_READ: begin
            rdg_e = t + BEATS; wrg_e = t + CL + BEATS - T_DQSS + 1;
            pre_e[b] = mx(pre_e[b], t + BEATS);
            if (issue_ap) begin act_e[b] = mx(act_e[b], mx(ras_e[b], t + BEATS) + T_RP); open_b[b] = 0; n_ap++; end
          end
          CMD_WRITE: begin
            wrg_e = t + BEATS; rdg_e = t + T_DQSS + BEATS + T_WTR;
            pre_e[b] = mx(pre_e[b], t + T_DQSS + BEATS + T_WR);
            if (issue_ap) begin act_e[b] = mx(act_e[b], mx(ras_e[b], t + T_DQSS + BEATS + T_WR) + T_RP); open_b[b] = 0; n_ap++; end
          end
          CMD_REF: dev_e = t + T_RFC;
          CMD_LMR: dev_e = t + T_MRD;
          default: ;
        endcase
      end
    end
    check(n_cmd[int'(CMD_ACT)] > 0 && n_cmd[int'(CMD_READ)] > 0 && n_cmd[int'(CMD_WRITE)] > 0 &&
          n_cmd[int'(CMD_PRE)] > 0 && n_cmd[int'(CMD_REF)] > 0 && n_cmd[int'(CMD_LMR)] > 0 && n_ap > 0,
          "every command kind issued");
    $display("tb_emi_timing_checker: act=%0d rd=%0d wr=%0d pre=%0d ref=%0d lmr=%0d ap=%0d",
             n_cmd[int'(CMD_ACT)], n_cmd[int'(CMD_READ)], n_cmd[int'(CMD_WRITE)], n_cmd[int'(CMD_PRE)],
             n_cmd[int'(CMD_REF)], n_cmd[int'(CMD_LMR)], n_ap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
