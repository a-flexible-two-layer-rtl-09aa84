// tb_emi_fsm: self-checking testbench of the EMI finite state machine.
//
// The FSM is exercised inside the EMI, with its own FIFOs, mode control and
// timing checker around it as in the design, driving the Mobile-DDR model;
// the testbench watches the DRAM command pins.  Checked:
//  - initialization order PALL, REF, REF, LMR (mode register), LMR (extended
//    mode register), not before the power-up wait, with tRP, tRFC and tMRD
//    kept between the steps, and the register contents (CL, BL, burst type);
//  - the auto-precharge decision (A10 of the first READ) for every method and
//    every kind of next command: row hit, row miss in the same bank, other
//    bank, no next command;
//  - the schedule block: while a row miss waits for tRP in bank 0, the ACT of
//    the next command's bank 1 goes out in between;
//  - refresh: REF at least every T_REFI (+ the clocks to close the banks)
//    while traffic runs, each preceded by a precharge of all banks;
//  - power down: CKE goes low PD_IDLE to PD_IDLE+11 clocks after the last
//    command (the idle count starts when the last burst's data is done) and
//    comes back for a new command, which then completes;
//  - no protocol or timing violation in the DRAM model.
module tb_emi_fsm;
  import emi_pkg::*;
  localparam int T_POWERUP = 50, T_REFI = 300, PD_IDLE = 16;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  apc_method_e apc = APC_ROW_OPEN;
  logic cmd_valid = 0, cmd_ready, cmd_rw = 0;
  logic [1:0] cmd_bank = 0;
  logic [11:0] cmd_row = 0;
  logic [8:0] cmd_col = 0;
  logic wdata_valid = 0, wdata_ready, rdata_valid, rdata_ready = 1;
  logic [31:0] wdata = 0, rdata;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba;
  logic [11:0] a;
  logic [63:0] dq_to_dram, dq_from_dram;
  logic init_done, in_pd, ev_stall_rd, ev_stall_wr, ev_sched, ev_refresh, ev_sv, rd_ovf;
  access_status_e ev_status;

  emi #(.T_POWERUP(T_POWERUP), .T_REFI(T_REFI), .PD_IDLE(PD_IDLE)) dut (
    .clk, .rst_n, .apc_method(apc),
    .cmd_valid, .cmd_ready, .cmd_rw, .cmd_bank, .cmd_row, .cmd_col,
    .wdata_valid, .wdata_ready, .wdata, .rdata_valid, .rdata_ready, .rdata,
    .dram_cke(cke), .dram_cs_n(cs_n), .dram_ras_n(ras_n), .dram_cas_n(cas_n),
    .dram_we_n(we_n), .dram_ba(ba), .dram_a(a), .dram_dq_out(dq_to_dram),
    .dram_dq_oe(dq_oe), .dram_dq_in(dq_from_dram),
    .init_done, .in_power_down(in_pd), .ev_stall_rd, .ev_stall_wr, .ev_sched,
    .ev_refresh, .ev_status_valid(ev_sv), .ev_status, .rd_overflow(rd_ovf)
  );

  mddr_model #(.NAME("mddr")) u_dram (
    .clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a,
    .dq_in(dq_to_dram), .dq_oe, .dq_out(dq_from_dram)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  // command trace at the pins
  typedef struct { longint t; dram_cmd_e c; int b; bit a10; } tr_t;
  tr_t tr [$];
  longint cyc = 0, t_rst = 0;
  always @(posedge clk) begin
    cyc++;
    if (cke && !cs_n && {ras_n, cas_n, we_n} != 3'b111) tr.push_back('{cyc, dram_cmd_e'({cs_n, ras_n, cas_n, we_n}), int'(ba), a[10]});
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input bit rw, input int b, input int r, input int c);
    @(negedge clk);
    cmd_valid = 1; cmd_rw = rw; cmd_bank = 2'(b); cmd_row = 12'(r); cmd_col = 9'(c);
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
  endtask

  task automatic settle();
    repeat (40) @(posedge clk);
  endtask

  // first READ in the trace from index k on
  function automatic int first_read(int k);
    for (int i = k; i < tr.size(); i++) if (tr[i].c == CMD_READ) return i;
    return -1;
  endfunction

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; t_rst = cyc;
    wait (init_done);
    repeat (3) @(posedge clk);

    // ---- initialization
    check(tr.size() == 5, $sformatf("%0d commands during initialization, expected 5", tr.size()));
    if (tr.size() >= 5) begin
      check(tr[0].c == CMD_PRE && tr[0].a10, "first command is precharge all");
      check(tr[0].t - t_rst >= T_POWERUP, $sformatf("precharge all %0d clocks after reset, power-up wait %0d", tr[0].t - t_rst, T_POWERUP));
      check(tr[1].c == CMD_REF && tr[2].c == CMD_REF, "two auto refreshes");
      check(tr[1].t - tr[0].t >= 3, "tRP before the first refresh");
      check(tr[2].t - tr[1].t >= 12, "tRFC between refreshes");
      check(tr[3].c == CMD_LMR && tr[3].b == 0 && tr[4].c == CMD_LMR && tr[4].b == 2, "LMR_1 then LMR_2");
      check(tr[3].t - tr[2].t >= 12, "tRFC before LMR_1");
      check(tr[4].t - tr[3].t >= 2, "tMRD between LMRs");
    end
    check(u_dram.mr[6:4] == 3'd3 && u_dram.mr[2:0] == 3'd1 && u_dram.mr[3] == 1'b0, "mode register: CL 3, BL 2, sequential");

    // ---- auto-precharge decisions: (method, next command kind) -> A10 of first READ
    // next kind: 0 row hit, 1 row miss (same bank), 2 other bank, 3 none
    for (int m = 0; m < 4; m++)
      for (int nk = 0; nk < 4; nk++) begin
        int k, i, r0;
        bit exp_ap;
        apc = apc_method_e'(m);
        r0 = 100 + m * 8 + nk * 2;   // a fresh row each time: the first READ needs an ACT
        settle();
        k = tr.size();
        fork
          push(0, 0, r0, 0);
          begin
            @(negedge clk); @(negedge clk);
            if (nk == 0) push(0, 0, r0, 8);
            else if (nk == 1) push(0, 0, r0 + 1, 8);
            else if (nk == 2) push(0, 1, r0, 8);
          end
        join
        settle();
        case (apc_method_e'(m))
          APC_ROW_CLOSE: exp_ap = 1;
          APC_ROW_OPEN:  exp_ap = 0;
          APC_DYN1:      exp_ap = (nk == 1) || (nk == 3);
          default:       exp_ap = (nk != 0);
        endcase
        i = first_read(k);
        check(i >= 0, "READ missing");
        if (i >= 0) check(tr[i].a10 == exp_ap, $sformatf("method %0d next kind %0d: A10=%0d expected %0d", m, nk, tr[i].a10, exp_ap));
      end

    // ---- schedule block: bank 0 row miss, next command opens bank 1 meanwhile
    begin
      int k, i_pre0, i_act1, i_act0;
      apc = APC_ROW_OPEN;
      push(0, 0, 300, 0); push(0, 1, 300, 0);       // both rows open
      settle();
      k = tr.size();
      push(0, 0, 301, 0); push(0, 1, 302, 0);       // both row misses
      settle();
      i_pre0 = -1; i_act1 = -1; i_act0 = -1;
      for (int i = k; i < tr.size(); i++) begin
        if (tr[i].c == CMD_PRE && tr[i].b == 0 && i_pre0 < 0) i_pre0 = i;
        if (tr[i].c == CMD_ACT && tr[i].b == 0 && i_act0 < 0) i_act0 = i;
      end
      for (int i = k; i < tr.size(); i++)
        if (tr[i].c == CMD_PRE && tr[i].b == 1 && i_act1 < 0) i_act1 = i;
      check(i_pre0 >= 0 && i_act0 > i_pre0 && i_act1 > i_pre0 && i_act1 < i_act0,
            "bank 1 precharged by the schedule block while bank 0 waits for tRP");
    end

    // ---- refresh under traffic
    begin
      longint last_ref;
      int n_ref, worst;
      last_ref = -1; n_ref = 0; worst = 0;
      fork
        for (int i = 0; i < 900; i++) push($urandom_range(1), $urandom_range(3), $urandom_range(3), $urandom_range(255));
        forever begin
          @(negedge clk);
          wdata_valid = 1; wdata = $urandom;
        end
      join_any
      settle();
      for (int i = 0; i < tr.size(); i++)
        if (tr[i].c == CMD_REF && tr[i].t > tr[4].t) begin
          check(i > 0 && tr[i - 1].c == CMD_PRE && tr[i - 1].a10, "refresh preceded by precharge all");
          if (last_ref >= 0 && int'(tr[i].t - last_ref) > worst) worst = int'(tr[i].t - last_ref);
          last_ref = tr[i].t; n_ref++;
        end
      check(n_ref >= 3, $sformatf("only %0d refreshes", n_ref));
      check(worst <= T_REFI + 12, $sformatf("refresh interval %0d clocks, limit %0d", worst, T_REFI + 12));
      $display("tb_emi_fsm: refreshes=%0d longest interval=%0d", n_ref, worst);
    end

    // ---- power down: count clocks from the last command to CKE low
    begin
      longint t_last, t_pd;
      // the EMI is idle from the clock after the last READ/WRITE data
      while (tr[tr.size() - 1].t + 8 > cyc) @(posedge clk);
      t_last = tr[tr.size() - 1].t;
      while (cke) @(posedge clk);
      t_pd = cyc;
      check(t_pd - t_last >= PD_IDLE && t_pd - t_last <= PD_IDLE + 3 + 8,
            $sformatf("CKE low %0d clocks after the last command, expected %0d..%0d", t_pd - t_last, PD_IDLE, PD_IDLE + 11));
      begin
        int k;
        k = tr.size();
        push(0, 2, 7, 0);
        repeat (20) @(posedge clk);
        k = first_read(k);
        check(k >= 0 && tr[k].b == 2, "woke up and read after power down");
      end
      check(u_dram.n_pd_entries > 0, "DRAM saw power-down entry");
    end
    check(u_dram.errors == 0, $sformatf("DRAM model reported %0d violations", u_dram.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
