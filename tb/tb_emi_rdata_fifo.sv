// tb_emi_rdata_fifo: self-checking testbench of the EMI read-data FIFO
// (RATE = 2 words in per push, one word out per clock).
//
// A word queue is the model.  Pushes come while free >= 2 (as the FSM
// guarantees by holding READs back) and the consumer is randomly slow, so the
// FIFO runs full; at the end one push is made into a full FIFO, which must be
// dropped and raise the sticky overflow.  Checked after every clock: free,
// pop_valid and pop_data in order.  Latency: pushed data can be popped one
// clock later.
module tb_emi_rdata_fifo;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic push = 0, pop_valid, pop_ready = 0, overflow;
  logic [63:0] push_data = 0;
  logic [31:0] pop_data;
  logic [5:0] free;

  emi_rdata_fifo dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  logic [31:0] q [$];
  int n_zero = 0;

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
    check(free == 32 && !pop_valid && !overflow, "empty after reset");
    for (int i = 0; i < 6000; i++) begin
      int pp, pr;
      pp = ((i / 300) % 2) ? 90 : 30;
      pr = ((i / 300) % 2) ? 15 : 90;
      @(negedge clk);
      push = (free >= 2) && ($urandom_range(99) < pp);
      push_data = {$urandom, $urandom};
      pop_ready = ($urandom_range(99) < pr);
      if (pop_ready && pop_valid) check(pop_data == q[0], $sformatf("pop_data %h expected %h", pop_data, q[0]));
      @(posedge clk);
      if (pop_ready && q.size() > 0) void'(q.pop_front());
      if (push) begin q.push_back(push_data[31:0]); q.push_back(push_data[63:32]); end
      #1;
      check(int'(free) == 32 - q.size(), $sformatf("free %0d expected %0d", free, 32 - q.size()));
      check(pop_valid == (q.size() > 0), "pop_valid");
      if (free == 0) n_zero++;
    end
    check(n_zero > 0, "FIFO never ran full");
    check(!overflow, "overflow without a push into a full FIFO");
    // fill completely, then push once more
    @(negedge clk); pop_ready = 0;
    while (free >= 2) begin
      push = 1; push_data = {$urandom, $urandom};
      @(posedge clk); q.push_back(push_data[31:0]); q.push_back(push_data[63:32]);
      @(negedge clk);
    end
    push = 1; @(posedge clk); #1 push = 0;
    check(overflow && int'(free) == 32 - q.size(), "push into a full FIFO must be dropped and flagged");
    $display("tb_emi_rdata_fifo: clocks full=%0d", n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
