// tb_emi_workload: the EMI under the two command streams used to judge it,
// with every parameter at its default (decoder configuration, dynamic 1
// auto-precharge).
//
//  random process : 20,000 burst commands with random bank, row (of 4096)
//                   and column, half reads and half writes;
//  video process  : 20,000 burst commands as a video module issues them:
//                   runs of 64 bursts along one row at consecutive columns,
//                   each run in a random bank and row, half reads and half writes.
//
// Commands are offered one per clock whenever the command FIFO takes them,
// write data are always ready and read data always taken, so the clocks a
// stream needs are the EMI's own.  The testbench counts the row-hit /
// row-miss / bank-miss status of every command and the clocks from the
// first command to the last read word, and checks: all read data against a
// reference memory, no protocol or timing violation in the DRAM model, a
// random stream in which most commands find their row closed or another row
// open, a video stream in which over 90 % find it open, a video stream that
// runs within 1.25 clocks per data word (the system side moves one word per
// clock) and at least twice as fast as the random one.  The status is taken
// when a command reaches the head of the command FIFO, so a random command
// whose row the schedule block opened early counts as a row hit.  The two
// status mixes and the run times are printed.
module tb_emi_workload;
  import emi_pkg::*;

  localparam int unsigned DQ_W = 32, BL = 2, ROW_W = 12, COL_W = 9;
  localparam int N_CMD = 20000;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  apc_method_e apc;
  logic cmd_valid = 0, cmd_ready, cmd_rw = 0;
  logic [1:0] cmd_bank = 0;
  logic [ROW_W-1:0] cmd_row = 0;
  logic [COL_W-1:0] cmd_col = 0;
  logic wdata_valid, wdata_ready;
  logic [DQ_W-1:0] wdata;
  logic rdata_valid, rdata_ready;
  logic [DQ_W-1:0] rdata;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba;
  logic [11:0] a;
  logic [2*DQ_W-1:0] dq_to_dram, dq_from_dram;
  logic init_done, in_pd, ev_stall_rd, ev_stall_wr, ev_sched, ev_refresh, ev_sv, rd_ovf;
  access_status_e ev_status;

  emi dut (
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

  longint cycle = 0;
  always @(posedge clk) cycle++;

  int n_st [3];
  always @(posedge clk)
    if (ev_sv) n_st[int'(ev_status)]++;

  // reference memory, write data queue, expected read data
  logic [DQ_W-1:0] ref_mem [longint unsigned];
  logic [DQ_W-1:0] wq [$];
  logic [DQ_W-1:0] exp_q [$];
  function automatic longint unsigned ad(int b, int r, int c);
    return (longint'(b) << (ROW_W + COL_W)) | (longint'(r) << COL_W) | longint'(c);
  endfunction

  // write data always offered, read data always taken
  assign wdata_valid = wq.size() > 0;
  assign wdata       = (wq.size() > 0) ? wq[0] : '0;
  assign rdata_ready = 1'b1;
  always @(posedge clk) begin
    if (wdata_valid && wdata_ready) void'(wq.pop_front());
    if (rdata_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected read data");
      else begin
        logic [DQ_W-1:0] e;
        e = exp_q.pop_front();
        check(rdata === e, $sformatf("read data %h expected %h", rdata, e));
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one stream; returns its clocks and status counts
  typedef struct { bit rw; int b, r, c; } cmd_t;
  task automatic run(input bit video, output longint clocks, output int st [3]);
    cmd_t cq [$];
    int b, r, c;
    longint t0;
    b = 0; r = 0; c = 0;
    for (int i = 0; i < N_CMD; i++) begin
      cmd_t x;
      if (!video) begin
        b = $urandom_range(3); r = $urandom_range(4095); c = $urandom_range(511) & ~(BL - 1);
      end else if (i % 64 == 0) begin
        b = $urandom_range(3); r = $urandom_range(4095); c = 0;
      end else c = c + BL;
      x.rw = $urandom_range(1); x.b = b; x.r = r; x.c = c;
      cq.push_back(x);
    end
    for (int k = 0; k < 3; k++) n_st[k] = 0;
    @(negedge clk);
    t0 = cycle;
    foreach (cq[i]) begin
      cmd_valid = 1; cmd_rw = cq[i].rw; cmd_bank = 2'(cq[i].b);
      cmd_row = ROW_W'(cq[i].r); cmd_col = COL_W'(cq[i].c);
      for (int k = 0; k < BL; k++) begin
        longint unsigned adr;
        adr = ad(cq[i].b, cq[i].r, cq[i].c + k);
        if (cq[i].rw) begin
          logic [DQ_W-1:0] d;
          d = $urandom;
          ref_mem[adr] = d;
          wq.push_back(d);
        end else exp_q.push_back(ref_mem.exists(adr) ? ref_mem[adr] : '0);
      end
      do @(posedge clk); while (!cmd_ready);
      @(negedge clk);
    end
    cmd_valid = 0;
    while (exp_q.size() != 0 || wq.size() != 0) @(negedge clk);
    clocks = cycle - t0;
    repeat (20) @(posedge clk);
    st = n_st;
  endtask

  initial begin
    longint c_rand, c_video;
    int st_rand [3], st_video [3];
    #1 rst_n = 0;
    apc = APC_DYN1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    repeat (10) @(posedge clk);

    run(0, c_rand, st_rand);
    run(1, c_video, st_video);

    $display("random process: row hit %0d, row miss %0d, bank miss %0d, %0d clocks (%0d ns at 162 MHz)",
             st_rand[ST_ROW_HIT], st_rand[ST_ROW_MISS], st_rand[ST_BANK_MISS], c_rand, c_rand * 617 / 100);
    $display("video process : row hit %0d, row miss %0d, bank miss %0d, %0d clocks (%0d ns at 162 MHz)",
             st_video[ST_ROW_HIT], st_video[ST_ROW_MISS], st_video[ST_BANK_MISS], c_video, c_video * 617 / 100);
    check(st_rand[0] + st_rand[1] + st_rand[2] == N_CMD, "random process: not every command classified");
    check(st_video[0] + st_video[1] + st_video[2] == N_CMD, "video process: not every command classified");
    check(st_rand[ST_ROW_MISS] + st_rand[ST_BANK_MISS] > N_CMD / 2, "random process: too many row hits");
    check(st_video[ST_ROW_HIT] > N_CMD * 9 / 10, "video process: too few row hits");
    // the system side moves one word per clock: BL words per command
    check(c_video < longint'(N_CMD * BL) * 5 / 4, "video process slower than 1.25 clocks per data word");
    check(c_video * 2 < c_rand, "video process not twice as fast as random");
    check(u_dram.errors == 0, $sformatf("DRAM model reported %0d violations", u_dram.errors));
    check(!rd_ovf, "read-data FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
