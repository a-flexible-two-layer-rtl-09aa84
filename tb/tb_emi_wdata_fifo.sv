// tb_emi_wdata_fifo: self-checking testbench of the EMI write-data FIFO
// (one word in per clock, RATE = 2 words out per pop).
//
// A word queue is the model.  Random pushes and pops (a pop only when the
// FIFO holds RATE words, as the FSM guarantees), with phases that fill it to
// the top and drain it.  Checked after every clock: level, push_ready (low
// exactly when 32 words wait) and the two oldest words on rd_data, first word
// in the low half.  Latency: a pushed word counts in level one clock later.
module tb_emi_wdata_fifo;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic push_valid = 0, push_ready, pop = 0;
  logic [31:0] push_data = 0;
  logic [63:0] rd_data;
  logic [5:0] level;

  emi_wdata_fifo dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  logic [31:0] q [$];
  int n_full = 0, n_pop = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(level == 0 && push_ready, "empty after reset");
    push_valid = 1; push_data = 32'h1234_5678;
    @(posedge clk); #1 push_valid = 0;
    check(level == 1, "level one clock after a push");
    q.push_back(32'h1234_5678);
    for (int i = 0; i < 6000; i++) begin
      bit dp, dq;
      int ppush, ppop;
      ppush = ((i / 400) % 2) ? 90 : 40;
      ppop  = ((i / 400) % 2) ? 20 : 60;
      @(negedge clk);
      push_valid = ($urandom_range(99) < ppush);
      push_data = $urandom;
      pop = (level >= 2) && ($urandom_range(99) < ppop);
      if (pop) check(rd_data == {q[1], q[0]}, $sformatf("rd_data %h expected %h%h", rd_data, q[1], q[0]));
      @(posedge clk);
      dp = push_valid && push_ready;
      dq = pop;
      check(push_ready == (q.size() < 32), "push_ready");
      if (push_valid && !push_ready) n_full++;
      if (dq) begin void'(q.pop_front()); void'(q.pop_front()); n_pop++; end
      if (dp) q.push_back(push_data);
      #1 check(int'(level) == q.size(), $sformatf("level %0d expected %0d", level, q.size()));
    end
    check(n_full > 0 && n_pop > 0, "full and pop cases seen");
    $display("tb_emi_wdata_fifo: full=%0d pops=%0d", n_full, n_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
