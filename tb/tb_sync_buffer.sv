// tb_sync_buffer: self-checking testbench of the two-SRAM synchronization
// buffer.
//
// 40 stages: in each, a random number of words is written into the fill SRAM
// with random gaps, while the words of the previous stage are read back from
// the drain SRAM at the same time and compared (one clock read latency).
// fill_count must follow the writes and restart at zero after a swap.  At
// the end the fill SRAM is written past its 512 words: the extra words must
// be dropped and overflow set.
module tb_sync_buffer;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic swap = 0, wr_en = 0, overflow;
  logic [31:0] wr_data = 0, rd_data;
  logic [9:0] fill_count;
  logic [8:0] rd_addr = 0;

  sync_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  logic [31:0] cur [$], prev [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      int n;
      n = (s == 5) ? 512 : $urandom_range(1, 500);
      cur.delete();
      fork
        begin   // fill
          while (cur.size() < n) begin
            @(negedge clk);
            wr_en = ($urandom_range(99) < 70);
            wr_data = $urandom;
            @(posedge clk);
            if (wr_en) cur.push_back(wr_data);
            #1 check(int'(fill_count) == cur.size(), "fill_count");
          end
          @(negedge clk); wr_en = 0;
        end
        begin   // drain the previous stage
          for (int k = 0; k < prev.size(); k++) begin
            @(negedge clk); rd_addr = 9'(k);
            @(posedge clk); #1;
            check(rd_data == prev[k], $sformatf("stage %0d word %0d: %h expected %h", s, k, rd_data, prev[k]));
          end
        end
      join
      @(negedge clk); swap = 1;
      @(negedge clk); swap = 0;
      check(fill_count == 0, "fill_count restarts after swap");
      prev = cur;
    end
    check(!overflow, "overflow without cause");
    for (int k = 0; k < 520; k++) begin
      @(negedge clk); wr_en = 1; wr_data = k;
    end
    @(negedge clk); wr_en = 0;
    check(overflow && fill_count == 512, "writes past the end dropped and flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
