// Shared body of the EMI testbenches (tb_emi: the decoder's DDR x32 burst-2
// configuration; tb_emi_cfg: SDR x16 burst-4).  The including module imports
// emi_pkg, sets DQ_W, DDR, BL and CL, and has the watchdog; the timing
// parameters stay at their defaults.  The checks are described in tb_emi.sv.

  localparam int unsigned RATE = DDR ? 2 : 1;
  localparam int unsigned T_RCD = 3, T_RP = 3, T_RAS = 7;
  localparam int unsigned ROW_W = 12, COL_W = 9;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  apc_method_e apc;
  logic cmd_valid = 0, cmd_ready, cmd_rw = 0;
  logic [1:0] cmd_bank = 0;
  logic [ROW_W-1:0] cmd_row = 0;
  logic [COL_W-1:0] cmd_col = 0;
  logic wdata_valid = 0, wdata_ready;
  logic [DQ_W-1:0] wdata = 0;
  logic rdata_valid, rdata_ready = 0;
  logic [DQ_W-1:0] rdata;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba;
  logic [11:0] a;
  logic [RATE*DQ_W-1:0] dq_to_dram, dq_from_dram;
  logic init_done, in_pd, ev_stall_rd, ev_stall_wr, ev_sched, ev_refresh, ev_sv, rd_ovf;
  access_status_e ev_status;

  emi #(.DQ_W(DQ_W), .DDR(DDR), .BL(BL), .CL(CL),
        .T_POWERUP(20), .T_REFI(400), .PD_IDLE(16)) dut (
    .clk, .rst_n, .apc_method(apc),
    .cmd_valid, .cmd_ready, .cmd_rw, .cmd_bank, .cmd_row, .cmd_col,
    .wdata_valid, .wdata_ready, .wdata, .rdata_valid, .rdata_ready, .rdata,
    .dram_cke(cke), .dram_cs_n(cs_n), .dram_ras_n(ras_n), .dram_cas_n(cas_n),
    .dram_we_n(we_n), .dram_ba(ba), .dram_a(a), .dram_dq_out(dq_to_dram),
    .dram_dq_oe(dq_oe), .dram_dq_in(dq_from_dram),
    .init_done, .in_power_down(in_pd), .ev_stall_rd, .ev_stall_wr, .ev_sched,
    .ev_refresh, .ev_status_valid(ev_sv), .ev_status, .rd_overflow(rd_ovf)
  );

  mddr_model #(.DQ_W(DQ_W), .RATE(RATE), .BL(BL), .CL(CL), .NAME("mddr")) u_dram (
    .clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a,
    .dq_in(dq_to_dram), .dq_oe, .dq_out(dq_from_dram)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // event counters
  int n_stall_rd = 0, n_stall_wr = 0, n_sched = 0, n_ref = 0, n_pd = 0;
  int n_hit = 0, n_miss = 0, n_bmiss = 0;
  always @(posedge clk) begin
    n_stall_rd += int'(ev_stall_rd);
    n_stall_wr += int'(ev_stall_wr);
    n_sched    += int'(ev_sched);
    n_ref      += int'(ev_refresh);
    if (in_pd) n_pd++;
    if (ev_sv) case (ev_status)
      ST_ROW_HIT:  n_hit++;
      ST_ROW_MISS: n_miss++;
      default:     n_bmiss++;
    endcase
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", msg);
    end
  endtask

  // reference memory and expected read data
  logic [DQ_W-1:0] ref_mem [longint unsigned];
  logic [DQ_W-1:0] exp_q [$];
  logic [DQ_W-1:0] wq [$];
  int rd_ready_pct = 100;
  int wr_gap_pct = 0;
  bit wr_hold = 0;              // holds the write data back

  function automatic longint unsigned ad(int b, int r, int c);
    return (longint'(b) << (ROW_W + COL_W)) | (longint'(r) << COL_W) | longint'(c);
  endfunction

  // push one burst command; write data is queued for the write driver
  task automatic push_cmd(input bit rw, input int b, input int r, input int c);
    c = c & ~(BL - 1);
    if (rw) begin
      for (int i = 0; i < BL; i++) begin
        logic [DQ_W-1:0] d;
        d = $urandom;
        ref_mem[ad(b, r, c + i)] = d;
        wq.push_back(d);
      end
    end else begin
      for (int i = 0; i < BL; i++)
        exp_q.push_back(ref_mem.exists(ad(b, r, c + i)) ? ref_mem[ad(b, r, c + i)] : '0);
    end
    @(negedge clk);
    cmd_valid = 1; cmd_rw = rw; cmd_bank = 2'(b); cmd_row = ROW_W'(r); cmd_col = COL_W'(c);
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // write data driver
  initial begin
    forever begin
      @(negedge clk);
      if (wdata_valid && wdata_ready_q) void'(wq.pop_front());
      wdata_valid = !wr_hold && (wq.size() > 0) && ($urandom_range(99) >= wr_gap_pct);
      wdata = (wq.size() > 0) ? wq[0] : '0;
    end
  end
  logic wdata_ready_q;
  always @(posedge clk) wdata_ready_q <= wdata_ready;

  // read data checker
  always @(posedge clk) begin
    if (rdata_valid && rdata_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected read data");
      else begin
        logic [DQ_W-1:0] e;
        e = exp_q.pop_front();
        check(rdata === e, $sformatf("read data %h expected %h", rdata, e));
      end
    end
  end
  always @(negedge clk) rdata_ready = ($urandom_range(99) < rd_ready_pct);

  task automatic drain();
    int guard = 0;
    while ((exp_q.size() != 0 || wq.size() != 0) && guard < 20000) begin
      @(posedge clk); guard++;
    end
    check(guard < 20000, "traffic did not drain");
  endtask

  // latency of one read from push to first data word
  task automatic read_latency(input int b, input int r, input int c, output int lat);
    longint t0;
    push_cmd(0, b, r, c);
    t0 = cycle;
    // push_cmd returns at the negedge after the accepting edge
    while (!(rdata_valid && rdata_ready)) @(posedge clk);
    lat = int'(cycle - t0);
    repeat (2) @(posedge clk);
  endtask

  // command trace on the pins: ACT and WRITE to bank 3, for the block write
  longint t_act3 = -1;
  longint t_wr3 [$];
  always @(posedge clk)
    if (cke && !cs_n && ba == 2'd3) begin
      if ({ras_n, cas_n, we_n} == 3'b011) t_act3 = cycle;
      if ({ras_n, cas_n, we_n} == 3'b100) t_wr3.push_back(cycle);
    end


  initial begin
    int lat;
    #1 rst_n = 0;      // a reset edge before the first clock
    apc = APC_ROW_OPEN;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    repeat (3) @(posedge clk);
    check(u_dram.n_ref == 2 && u_dram.n_lmr == 2 && u_dram.n_pre == 1,
          $sformatf("init sequence ref=%0d lmr=%0d pre=%0d", u_dram.n_ref, u_dram.n_lmr, u_dram.n_pre));
    check(u_dram.mr[6:4] == 3'(CL) && u_dram.mr[2:0] == 3'($clog2(BL)), "mode register value");
    repeat (5) @(posedge clk);

    // ---- latency (row-open method, idle EMI)
    // bank miss: FIFO 1 + ACT->READ tRCD + pin register 1 + CL + capture 1
    //            counted from the clock after the accepting edge: T_RCD + CL + 2
    read_latency(1, 5, 0, lat);
    check(lat == T_RCD + CL + 2, $sformatf("bank-miss latency %0d, expected %0d", lat, T_RCD + CL + 2));
    // row hit: CL + 2
    read_latency(1, 5, 8, lat);
    check(lat == CL + 2, $sformatf("row-hit latency %0d, expected %0d", lat, CL + 2));
    // row miss: PRE, tRP, ACT, tRCD, READ: T_RP + T_RCD + CL + 2 (tRAS already met)
    repeat (10) @(posedge clk);
    read_latency(1, 6, 0, lat);
    check(lat == T_RP + T_RCD + CL + 2, $sformatf("row-miss latency %0d, expected %0d", lat, T_RP + T_RCD + CL + 2));

    // ---- a block of four bursts written into an idle bank, with its data
    // already in the write-data FIFO (for DDR x32, burst 2: an 8x4-byte
    // block).  ACT, tRCD - 1 NOPs, then four WRITEs one burst apart: ACT,
    // NOP, NOP, WRITE x4 and the data in the clocks after, 8 clocks in all.
    begin
      int ref0;
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < BL; k++) begin
          logic [DQ_W-1:0] d;
          d = $urandom;
          ref_mem[ad(3, 7, i * BL + k)] = d;
          wq.push_back(d);
        end
      repeat (4 * BL + 4) @(posedge clk);
      ref0 = n_ref;
      @(negedge clk);
      cmd_valid = 1; cmd_rw = 1; cmd_bank = 2'd3; cmd_row = ROW_W'(7);
      for (int i = 0; i < 4; i++) begin
        cmd_col = COL_W'(i * BL);
        do @(posedge clk); while (!cmd_ready);
        @(negedge clk);
      end
      cmd_valid = 0;
      drain();
      repeat (40) @(posedge clk);        // the last WRITEs go after the data left the queue
      if (t_wr3.size() == 4)
        $display("block write: ACT at %0d, WRITEs at +%0d +%0d +%0d +%0d", t_act3,
                 t_wr3[0] - t_act3, t_wr3[1] - t_act3, t_wr3[2] - t_act3, t_wr3[3] - t_act3);
      if (n_ref == ref0) begin
        check(t_wr3.size() == 4, $sformatf("block write: %0d WRITEs seen", t_wr3.size()));
        if (t_wr3.size() == 4) begin
          check(t_wr3[0] == t_act3 + T_RCD, $sformatf("block write: first WRITE %0d clocks after ACT", t_wr3[0] - t_act3));
          for (int i = 1; i < 4; i++)
            check(t_wr3[i] == t_wr3[i - 1] + BL / RATE, "block write: WRITEs not one burst apart");
          // ACT to the last data beat, counting both ends: the document's 8 clocks for DDR x32 burst 2
          if (DDR && BL == 2)
            check(t_wr3[3] + 1 - t_act3 + 1 == 8, $sformatf("block write took %0d clocks", t_wr3[3] + 2 - t_act3));
        end
      end
      t_wr3.delete();
    end

    // ---- a WRITE whose data come late: the FSM must wait (write-FIFO stall)
    begin
      int st0;
      st0 = n_stall_wr;
      wr_hold = 1;
      push_cmd(1, 2, 3, 0);
      repeat (12) @(posedge clk);
      wr_hold = 0;
      drain();
      repeat (20) @(posedge clk);
      check(n_stall_wr > st0, "a WRITE without its data did not stall");
    end

    // ---- random traffic under each auto-precharge method
    for (int m = 0; m < 4; m++) begin
      int a0, a1;
      apc = apc_method_e'(m);
      a0 = u_dram.n_rw_ap;
      rd_ready_pct = (m % 2) ? 25 : 100;
      wr_gap_pct   = (m % 2) ? 0 : 60;
      for (int i = 0; i < 300; i++) begin
        int b, r, c;
        b = $urandom_range(3);
        r = $urandom_range(2);
        c = $urandom_range(63);
        push_cmd($urandom_range(1), b, r, c);
      end
      // a read stream to fill the read-data FIFO
      for (int i = 0; i < 40; i++) push_cmd(0, 0, 1, i * 2);
      drain();
      a1 = u_dram.n_rw_ap;
      if (m == int'(APC_ROW_OPEN)) check(a1 == a0, "row-open method used auto-precharge");
      else check(a1 > a0, $sformatf("method %0d never used auto-precharge", m));
      rd_ready_pct = 100;
    end

    // ---- power down and wake-up
    repeat (40) @(posedge clk);
    check(n_pd > 0, "power down never entered");
    push_cmd(1, 2, 9, 4);
    push_cmd(0, 2, 9, 4);
    drain();

    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "read data missing");
    check(u_dram.errors == 0, $sformatf("DRAM model reported %0d violations", u_dram.errors));
    check(!rd_ovf, "read-data FIFO overflow");
    check(n_stall_rd > 0, "read-FIFO stall never happened");
    check(n_stall_wr > 0, "write-FIFO stall never happened");
    check(n_sched > 0, "schedule block never issued a command");
    check(n_ref > 0, "refresh never happened");
    check(n_hit > 0 && n_miss > 0 && n_bmiss > 0, "not all access statuses seen");
    $display("tb_emi: hit=%0d miss=%0d bankmiss=%0d stall_rd=%0d stall_wr=%0d sched=%0d ref=%0d pd_cycles=%0d act=%0d pre=%0d",
             n_hit, n_miss, n_bmiss, n_stall_rd, n_stall_wr, n_sched, n_ref, n_pd, u_dram.n_act, u_dram.n_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

