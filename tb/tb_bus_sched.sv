// tb_bus_sched: self-checking testbench of the data bus schedule.
//
// Each of 200 stages gives each master a random number of requests (0 means
// the master raises m_none).  The receiver is randomly slow.  Checked: only
// the master whose turn it is gets m_ready; all DB requests of a stage pass
// before any DEI request and all DEI before any MC; every request passes
// exactly once, in order, with its master index; stage_done follows the
// last MC request; a skipped turn costs one clock; with a ready receiver and
// one request per master the stage takes exactly three clocks.
module tb_bus_sched;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic stage_start = 0, stage_done, out_valid, out_ready = 1;
  logic [2:0] m_valid, m_ready, m_last, m_none;
  logic [15:0] m_req [3];
  logic [1:0] out_master;
  logic [15:0] out_req;

  bus_sched #(.REQ_W(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  logic [15:0] q [3][$];
  bit none_f [3];
  int last_m;
  int n_req = 0, n_none = 0;

  always @(negedge clk) begin
    for (int i = 0; i < 3; i++) begin
      m_valid[i] = q[i].size() > 0;
      m_last[i]  = q[i].size() == 1;
      m_none[i]  = none_f[i];
      m_req[i]   = (q[i].size() > 0) ? q[i][0] : '0;
    end
  end

  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (m_ready[i] && int'(out_master) != i) check(0, "ready to a master out of turn");
      if (m_valid[i] && m_ready[i]) begin
        check(out_valid && out_ready && out_req == q[i][0] && int'(out_master) == i, "request passed unchanged");
        check(i >= last_m, $sformatf("master %0d served after master %0d", i, last_m));
        last_m = i;
        void'(q[i].pop_front());
        n_req++;
      end
      if (none_f[i] && int'(dut.turn) == i) begin none_f[i] = 0; n_none++; end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    for (int i = 0; i < 3; i++) none_f[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(stage_done && !out_valid, "idle after reset");
    for (int s = 0; s < 200; s++) begin
      int clocks;
      bit timed;
      timed = (s % 10 == 0);
      for (int i = 0; i < 3; i++) begin
        int n;
        n = timed ? 1 : $urandom_range(3);
        if (n == 0) none_f[i] = 1;
        for (int k = 0; k < n; k++) q[i].push_back(16'((s << 6) | (i << 4) | k));
      end
      last_m = 0;
      @(negedge clk); stage_start = 1; @(negedge clk); stage_start = 0;
      clocks = 1;
      while (!stage_done && clocks < 200) begin
        out_ready = timed ? 1'b1 : ($urandom_range(99) < 60);
        @(negedge clk); clocks++;
      end
      out_ready = 1;
      check(clocks < 200, "stage never ended");
      check(q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0, "requests left at stage_done");
      if (timed) check(clocks == 4, $sformatf("one request per master took %0d clocks, expected 3 + 1", clocks));
    end
    check(n_none > 0, "no skipped turn");
    $display("tb_bus_sched: requests=%0d skipped turns=%0d", n_req, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
