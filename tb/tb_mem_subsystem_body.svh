// Shared body of the end-to-end testbenches of mem_subsystem (tb_mem_subsystem
// with shortened power-up / refresh / power-down times, tb_mem_subsystem_full
// with the design's own values).  The including module declares the clock,
// the DUT named `dut' with all its ports on the signals below, and WATCHDOG.
//
// Four Mobile-DDR models hang on the four DRAM ports.  The test runs like the
// decoder would:
//  A  a whole picture (256x128, luma and chroma) is written into frame store
//     0 by the de-blocking master with 16x16 blocks, through the write stream;
//  B  60 pipeline stages: in each, DB writes an 8x8 luma and chroma block into
//     frame store 1, DEI reads a 16x8 field block from frame store 0 (or has
//     nothing to do), MC reads two luma blocks with random motion vectors
//     (some pointing out of the picture) and one chroma block.  The read data
//     of a stage is collected in the synchronization buffer; after a swap the
//     testbench reads it back from the other SRAM while the next stage runs,
//     and compares every word with the picture content;
//  B2 four worst-case stages: MC reads a bi-predicted 8x8 block at
//     quarter-pel (two 13x13 luma and two chroma regions), DEI a 16x9 luma
//     and an 8x5 chroma field block; about 300 read words, which must fit
//     the buffer and arrive at one word per clock;
//  C  the blocks written in B are read back from frame store 1 and compared.
// Between phases the bus stays idle long enough for power down.  Every
// mechanism is counted and the test fails if one never happened: FIFO stalls,
// schedule-block commands, refresh, power down, row hit / row miss / bank
// miss, auto-precharge, each bus master's turn, a skipped turn, field and
// chroma requests, clipping at the picture edge and buffer swaps.  The
// DRAM models must report no protocol or timing violation.
// Cycle check: a stage's work is measured from stage_start to the last read
// word in the buffer.  Of the stages in which no DRAM was refreshed, every
// fourth stage uses whole-pel motion vectors (a nominal 8x8 stage) and must
// finish within the 165-clock budget of one 8x8 block at 162 MHz; every stage
// must finish within its number of read words (the read data reach the
// buffer one word per clock) plus 70 clocks for the DB turn and latency.

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  localparam int PW = 256, PH = 128;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- DRAM models
  int d_errors [4], d_ap [4];
  bit d_init [4];
  for (genvar i = 0; i < 4; i++) begin : g_dram
    mddr_model #(.NAME($sformatf("dram%0d", i))) u_dram (
      .clk, .cke(dram_cke[i]), .cs_n(dram_cs_n[i]), .ras_n(dram_ras_n[i]), .cas_n(dram_cas_n[i]),
      .we_n(dram_we_n[i]), .ba(dram_ba[i]), .a(dram_a[i]), .dq_in(dram_dq_out[i]),
      .dq_oe(dram_dq_oe[i]), .dq_out(dram_dq_in[i])
    );
    always @(posedge clk) begin
      d_errors[i] = u_dram.errors;
      d_init[i]   = u_dram.initialised;
      d_ap[i]     = u_dram.n_rw_ap;
    end
  end

  // ---------------------------------------------------------------- picture content
  function automatic logic [7:0] pix(int slot, bit chroma, int x, int y);
    return 8'((x * 7 + y * 13 + slot * 101 + int'(chroma) * 53) ^ ((y >> 2) * 29) ^ (x >> 3));
  endfunction

  function automatic logic [31:0] word_of(int slot, bit chroma, int y, int cx, int half);
    logic [31:0] w;
    for (int b = 0; b < 4; b++) w[b*8 +: 8] = pix(slot, chroma, cx * 8 + half * 4 + b, y);
    return w;
  endfunction

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  // bursts of a request, in the order the address translation walks them;
  // each burst gives two words, appended to q
  typedef struct { int y; int cx; } burst_t;
  task automatic bursts(input blk_req_t r, input bit rw, input int slot, ref logic [31:0] q [$],
                        output bit clipped);
    int x0, y0, x1, y1, ww, hh, step, par, ph, minr, maxr, fx, fy, lastcx;
    int mvx, mvy, field;
    bit chroma;
    mvx = int'(r.mv_x); mvy = int'(r.mv_y); field = int'(r.field); chroma = r.chroma;
    step = (field >= 2) ? 2 : 1;
    par = field % 2;
    ph = chroma ? PH / 2 : PH;
    if (!chroma) begin
      fx = (!rw && (mvx % 4 != 0)) ? 1 : 0;
      fy = (!rw && (mvy % 4 != 0)) ? 1 : 0;
      x0 = int'(r.x) + (rw ? 0 : fdiv(mvx, 4)) - 2 * fx; ww = int'(r.w) + 5 * fx;
      y0 = int'(r.y) + (rw ? 0 : fdiv(mvy, 4)) - 2 * fy; hh = int'(r.h) + 5 * fy;
    end else begin
      fx = (!rw && (mvx % 8 != 0)) ? 1 : 0;
      fy = (!rw && (mvy % 8 != 0)) ? 1 : 0;
      x0 = 2 * (int'(r.x) / 2 + (rw ? 0 : fdiv(mvx, 8))); ww = 2 * (int'(r.w) / 2 + fx);
      y0 = int'(r.y) / 2 + (rw ? 0 : fdiv(mvy, 8)); hh = int'(r.h) / 2 + fy;
    end
    if (step == 2) y0 = 2 * y0 + par;
    x1 = x0 + ww - 1;
    y1 = y0 + (hh - 1) * step;
    minr = (step == 2) ? par : 0;
    maxr = (step == 2) ? ph - 2 + par : ph - 1;
    clipped = (x0 < 0 || x1 > PW - 1 || y0 < minr || y1 > maxr);
    if (x0 < 0) x0 = 0;
    if (x0 > PW - 1) x0 = PW - 1;
    if (x1 > PW - 1) x1 = PW - 1;
    if (x1 < x0) x1 = x0;
    if (y0 < minr) y0 = minr;
    if (y0 > maxr) y0 = maxr;
    if (y1 > maxr) y1 = maxr;
    if (y1 < y0) y1 = y0;
    for (int yy = y0; yy <= y1; yy += step)
      for (int cx = x0 / 8; cx <= x1 / 8; cx++) begin
        q.push_back(word_of(slot, chroma, yy, cx, 0));
        q.push_back(word_of(slot, chroma, yy, cx, 1));
      end
  endtask

  // ---------------------------------------------------------------- masters
  blk_req_t mq [3][$];
  bit       mq_none [3];
  logic [31:0] wq [$];          // write stream
  int wd_gap_pct = 30;

  // requests change at the falling edge, after the rising edge took one
  always @(negedge clk) begin
    for (int i = 0; i < 3; i++) begin
      m_valid[i] = mq[i].size() > 0;
      m_last[i]  = mq[i].size() == 1;
      m_none[i]  = mq_none[i] && mq[i].size() == 0;
      m_req[i]   = (mq[i].size() > 0) ? mq[i][0] : '0;
    end
  end
  int n_grant [3] = '{0, 0, 0};
  int n_none = 0;
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++)
      if (m_valid[i] && m_ready[i]) begin
        n_grant[i]++;
        void'(mq[i].pop_front());
      end
    for (int i = 0; i < 3; i++)
      if (m_none[i] && u_dut_turn_is(i)) begin
        n_none++;
        mq_none[i] = 0;
      end
  end
  function automatic bit u_dut_turn_is(int i);
    return int'(dut.u_bus_sched.turn) == i;
  endfunction

  // write stream driver
  always @(posedge clk) begin
    if (wd_valid && wd_ready) void'(wq.pop_front());
  end
  always @(negedge clk) begin
    wd_valid = (wq.size() > 0) && ($urandom_range(99) >= wd_gap_pct);
    wd_data  = (wq.size() > 0) ? wq[0] : '0;
  end

  // ---------------------------------------------------------------- counters
  int n_stall_rd = 0, n_stall_wr = 0, n_sched = 0, n_ref = 0, n_pd = 0;
  int n_hit = 0, n_miss = 0, n_bmiss = 0, n_swap = 0, n_field = 0, n_chroma = 0, n_clip = 0;
  longint cycle = 0;
  always @(posedge clk) begin
    cycle++;
    for (int i = 0; i < 4; i++) begin
      n_stall_rd += int'(ev_stall_rd[i]);
      n_stall_wr += int'(ev_stall_wr[i]);
      n_sched    += int'(ev_sched[i]);
      n_ref      += int'(ev_refresh[i]);
      n_pd       += int'(in_power_down[i]);
      if (ev_status_valid[i]) case (ev_status[i])
        ST_ROW_HIT:  n_hit++;
        ST_ROW_MISS: n_miss++;
        default:     n_bmiss++;
      endcase
    end
    n_swap += int'(sb_swap);
  end

  task automatic cfg(input int ad, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = 2'(ad); cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic blk_req_t mk(int x, int y, int mvx, int mvy, int w, int h, int field, bit chroma);
    blk_req_t r;
    r.x = 12'(x); r.y = 12'(y); r.mv_x = 14'(mvx); r.mv_y = 14'(mvy);
    r.w = 5'(w); r.h = 5'(h); r.field = 2'(field); r.chroma = chroma;
    return r;
  endfunction

  // run one stage: requests per master, expected read words; returns the
  // clocks from stage_start to the last read word in the buffer
  logic [31:0] exp_rd [$];
  task automatic stage(output int clocks);
    longint t0;
    int guard;
    @(negedge clk); stage_start = 1;
    t0 = cycle;
    @(negedge clk); stage_start = 0;
    guard = 0;
    while (!(stage_done && !rd_pending && wq.size() == 0 && int'(sb_fill_count) == exp_rd.size())
           && guard < 20000) begin
      @(negedge clk); guard++;
    end
    clocks = int'(cycle - t0);
    check(guard < 20000, $sformatf("stage did not finish: fill %0d expected %0d", sb_fill_count, exp_rd.size()));
    check(!sb_overflow, "synchronization buffer overflow");
  endtask

  // swap the buffer and check the drained SRAM against exp (in the background)
  logic [31:0] drain_q [$];
  bit draining = 0;
  task automatic swap_and_drain();
    @(negedge clk); sb_swap = 1;
    @(negedge clk); sb_swap = 0;
    drain_q = exp_rd;
    exp_rd.delete();
    draining = 1;
    fork
      begin
        for (int k = 0; k < drain_q.size(); k++) begin
          sb_rd_addr = 9'(k);
          @(negedge clk);
          check(sb_rd_data === drain_q[k], $sformatf("buffer word %0d: %h expected %h", k, sb_rd_data, drain_q[k]));
        end
        draining = 0;
      end
    join_none
  endtask

  initial begin
    int clocks, max_clocks, n_budget, n_stages, n_clean, n_over, max_slack, rd_words;
    int n_worst;
    bit clip;
    #1 rst_n = 0;      // a reset edge before the first clock
    apc_method = APC_DYN1;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; stage_start = 0; sb_swap = 0; sb_rd_addr = 0;
    wd_valid = 0; wd_data = 0;
    for (int i = 0; i < 3; i++) mq_none[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg(0, PW); cfg(1, PH); cfg(2, 0); cfg(3, 0);
    wait (init_done);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 4; i++)
      check(d_init[i], $sformatf("DRAM %0d not initialised", i));

    // ---- A: write frame store 0
    for (int by = 0; by < PH; by += 16)
      for (int bx = 0; bx < PW; bx += 16) begin
        blk_req_t r;
        r = mk(bx, by, 0, 0, 16, 16, 0, 0);
        mq[0].push_back(r); bursts(r, 1, 0, wq, clip);
        r = mk(bx, by, 0, 0, 16, 16, 0, 1);
        mq[0].push_back(r); bursts(r, 1, 0, wq, clip);
      end
    mq_none[1] = 1; mq_none[2] = 1;
    stage(clocks);
    $display("phase A: picture written in %0d clocks", clocks);
    repeat (200) @(posedge clk);      // idle: power down
    check(n_pd > 0, "no power down after the picture was written");

    // ---- B: decoding stages
    cfg(2, 0); cfg(3, 1);
    n_worst = 0;
    max_clocks = 0; n_budget = 0; n_stages = 0; n_clean = 0; n_over = 0; max_slack = 0;
    for (int s = 0; s < 60; s++) begin
      int bx, by, ref0;
      blk_req_t r;
      bx = (s % 32) * 8; by = (s / 32) * 64 + 8 * (s % 4);
      // DB: an 8x8 luma block and its chroma
      r = mk(bx, by, 0, 0, 8, 8, 0, 0); mq[0].push_back(r); bursts(r, 1, 1, wq, clip);
      r = mk(bx, by, 0, 0, 8, 8, 0, 1); mq[0].push_back(r); bursts(r, 1, 1, wq, clip);
      // DEI: a 16x8 field block, or nothing
      if (s % 5 == 4) mq_none[1] = 1;
      else begin
        r = mk((s * 16) % PW, (s * 8) % (PH / 2), 0, 0, 16, 8, 2 + s % 2, 0);
        mq[1].push_back(r); bursts(r, 0, 0, exp_rd, clip); n_field++;
      end
      // MC: two luma blocks and a chroma block with random motion vectors
      for (int k = 0; k < 3; k++) begin
        int mvx, mvy;
        mvx = int'($urandom_range(160)) - 80;
        mvy = int'($urandom_range(160)) - 80;
        if (s % 4 == 0) begin mvx = mvx & ~7; mvy = mvy & ~7; end   // nominal stage: whole-pel
        r = mk(bx, by, mvx, mvy, 8, 8, 0, k == 2);
        mq[2].push_back(r); bursts(r, 0, 0, exp_rd, clip);
        n_clip += int'(clip);
        n_chroma += int'(k == 2);
      end
      ref0 = n_ref;
      rd_words = exp_rd.size();
      stage(clocks);
      n_stages++;
      if (n_ref == ref0) begin
        // read data return one word per clock: the stage cannot be shorter
        // than its read words, and may take at most 70 clocks more (the DB turn with its
        // write stream comes first, then the read latency)
        if (clocks - rd_words > max_slack) max_slack = clocks - rd_words;
        if (clocks > rd_words + 70) n_budget++;
        if (s % 4 == 0) begin
          if (clocks > max_clocks) max_clocks = clocks;
          if (clocks > 165) n_over++;
          n_clean++;
        end
      end
      while (draining) @(negedge clk);
      swap_and_drain();
    end
    while (draining) @(negedge clk);
    check(n_budget == 0, $sformatf("%0d stages took more than their read words + 70 clocks (max slack %0d)", n_budget, max_slack));
    check(n_clean > 0 && n_over == 0, $sformatf("%0d of %0d whole-pel stages took more than 165 clocks (max %0d)", n_over, n_clean, max_clocks));
    $display("phase B: %0d stages; whole-pel stages without refresh: %0d, longest %0d clocks; max slack over read words %0d",
             n_stages, n_clean, max_clocks, max_slack);
    repeat (200) @(posedge clk);

    // ---- B2: worst-case stages: MC fetches a bi-predicted 8x8 block (two
    // 13x13 luma regions at quarter-pel, two chroma regions at fractional
    // vectors), DEI reads a 16x9 luma and an 8x5 chroma field block, all off
    // the burst grid: 2 x 13 x 3 x 2 + 2 x 5 x 2 x 2 + 9 x 3 x 2 + 5 x 3 x 2 =
    // 280 words (a 10-byte chroma row starts on an even byte, so it spans
    // two bursts, not three).  The read data are counted against the 512-word
    // buffer; the stage time is reported against the 165-clock budget
    // (the single-word return path needs about one clock per word).
    for (int s = 0; s < 4; s++) begin
      int bx, by, ref0;
      blk_req_t r;
      bx = 64 + 32 * s; by = 40;
      r = mk(bx, by, 0, 0, 8, 8, 0, 0); mq[0].push_back(r); bursts(r, 1, 1, wq, clip);
      r = mk(bx, by, 0, 0, 8, 8, 0, 1); mq[0].push_back(r); bursts(r, 1, 1, wq, clip);
      r = mk(bx + 4, 20, 0, 0, 16, 9, 2 + s % 2, 0); mq[1].push_back(r); bursts(r, 0, 0, exp_rd, clip);
      r = mk(bx + 4, 20, 0, 0, 16, 10, 2 + s % 2, 1); mq[1].push_back(r); bursts(r, 0, 0, exp_rd, clip);
      for (int k = 0; k < 4; k++) begin
        // luma x offset mv/4 - 2 = 4 or 5 puts 13 bytes across three bursts
        r = mk(bx, by, (k % 2) ? 29 : 25, 13 - 6 * k, 8, 8, 0, k >= 2);
        mq[2].push_back(r); bursts(r, 0, 0, exp_rd, clip);
      end
      ref0 = n_ref;
      rd_words = exp_rd.size();
      check(rd_words >= 270 && rd_words <= 512,
            $sformatf("worst-case stage has %0d read words, expected about 300 and at most 512", rd_words));
      stage(clocks);
      if (n_ref == ref0)
        check(clocks >= rd_words && clocks <= rd_words + 70,
              $sformatf("worst-case stage: %0d clocks for %0d read words", clocks, rd_words));
      n_worst++;
      $display("phase B2: worst-case stage %0d: %0d read words in %0d clocks (budget 165)", s, rd_words, clocks);
      while (draining) @(negedge clk);
      swap_and_drain();
    end
    while (draining) @(negedge clk);
    repeat (200) @(posedge clk);

    // ---- C: read back what DB wrote into frame store 1
    cfg(2, 1);
    for (int s = 0; s < 60; s += 6) begin
      blk_req_t r;
      int bx, by;
      bx = (s % 32) * 8; by = (s / 32) * 64 + 8 * (s % 4);
      r = mk(bx, by, 0, 0, 8, 8, 0, 0); mq[2].push_back(r); bursts(r, 0, 1, exp_rd, clip);
      r = mk(bx, by, 0, 0, 8, 8, 0, 1); mq[2].push_back(r); bursts(r, 0, 1, exp_rd, clip);
      mq_none[0] = 1; mq_none[1] = 1;
      stage(clocks);
      swap_and_drain();
      while (draining) @(negedge clk);
    end

    repeat (20) @(posedge clk);
    for (int i = 0; i < 4; i++)
      check(d_errors[i] == 0, $sformatf("DRAM %0d reported %0d violations", i, d_errors[i]));
    check(!(|rd_overflow), "EMI read FIFO overflow");
    begin
      int ap;
      ap = 0;
      for (int i = 0; i < 4; i++) ap += d_ap[i];
      check(ap > 0, "auto-precharge never used");
      $display("mem_subsystem: hit=%0d miss=%0d bankmiss=%0d stall_rd=%0d stall_wr=%0d sched=%0d ref=%0d pd_clocks=%0d ap=%0d",
               n_hit, n_miss, n_bmiss, n_stall_rd, n_stall_wr, n_sched, n_ref, n_pd, ap);
    end
    $display("mem_subsystem: grants DB=%0d DEI=%0d MC=%0d none=%0d field=%0d chroma=%0d clipped=%0d swaps=%0d",
             n_grant[0], n_grant[1], n_grant[2], n_none, n_field, n_chroma, n_clip, n_swap);
    check(n_stall_rd > 0, "read-FIFO stall never happened");
    check(n_stall_wr > 0, "write-FIFO stall never happened");
    check(n_sched > 0, "schedule block never issued a command");
    check(n_ref > 0, "refresh never happened");
    check(n_pd > 0, "power down never happened");
    check(n_hit > 0 && n_miss > 0 && n_bmiss > 0, "not every access status seen");
    check(n_grant[0] > 0 && n_grant[1] > 0 && n_grant[2] > 0, "a master never had the bus");
    check(n_none > 0, "no turn was skipped");
    check(n_field > 0 && n_chroma > 0 && n_clip > 0, "field, chroma or clipped request missing");
    check(n_swap > 0, "buffer never swapped");
    check(n_worst == 4, "worst-case stages not run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
