// tb_emi_cmd_fifo: self-checking testbench of the EMI command FIFO.
//
// Random pushes and pops (including both in one clock and pushes into a full
// FIFO) against a queue model that also computes the hit, nxt_known and
// nxt_bank bits: an entry learns its successor only if it is still in the
// FIFO when the successor is pushed.  After every clock the head, the second
// entry, the count and push_ready are compared with the model.  Latency: a
// command pushed into an empty FIFO is at the head one clock later.
module tb_emi_cmd_fifo;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic push_valid = 0, push_ready, push_rw = 0, pop = 0;
  logic [1:0] push_bank = 0;
  logic [11:0] push_row = 0;
  logic [8:0] push_col = 0;
  logic head_valid, head_rw, head_hit, head_nxt_known, head_nxt_bank;
  logic [1:0] head_bank;
  logic [11:0] head_row;
  logic [8:0] head_col;
  logic nxt_valid, nxt_rw;
  logic [1:0] nxt_bank;
  logic [11:0] nxt_row;
  logic [8:0] nxt_col;
  logic [3:0] count;

  emi_cmd_fifo dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  typedef struct { bit rw; int bank, row, col; bit known, hit, same; } ent_t;
  ent_t q [$];
  int n_hit = 0, n_full = 0, n_unknown_pop = 0;

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
    check(!head_valid && count == 0 && push_ready, "empty after reset");
    // latency: push into an empty FIFO, head valid one clock later
    push_valid = 1; push_rw = 1; push_bank = 2; push_row = 7; push_col = 4;
    @(posedge clk); #1 push_valid = 0;
    check(head_valid && head_bank == 2 && head_row == 7 && head_col == 4 && head_rw, "head one clock after push");
    check(!head_nxt_known, "single entry has no successor");
    q.push_back('{1, 2, 7, 4, 0, 0, 0});
    for (int i = 0; i < 5000; i++) begin
      bit dp, dq;
      @(negedge clk);
      push_valid = ($urandom_range(99) < ((i / 500) % 2 ? 80 : 45));
      push_rw = $urandom_range(1);
      push_bank = 2'($urandom_range(3));
      push_row = 12'($urandom_range(2));
      push_col = 9'($urandom_range(511));
      pop = ($urandom_range(99) < ((i / 500) % 2 ? 30 : 60));
      @(posedge clk);
      dp = push_valid && push_ready;
      dq = pop && head_valid;
      check(push_ready == (q.size() < 8), "push_ready");
      if (push_valid && !push_ready) n_full++;
      if (dp && (q.size() - int'(dq)) > 0) begin
        q[q.size() - 1].known = 1;
        q[q.size() - 1].same = (q[q.size() - 1].bank == int'(push_bank));
        q[q.size() - 1].hit = q[q.size() - 1].same && (q[q.size() - 1].row == int'(push_row));
      end
      if (dq) begin
        if (!q[0].known) n_unknown_pop++;
        void'(q.pop_front());
      end
      if (dp) q.push_back('{push_rw, int'(push_bank), int'(push_row), int'(push_col), 0, 0, 0});
      #1;
      check(int'(count) == q.size(), $sformatf("count %0d expected %0d", count, q.size()));
      check(head_valid == (q.size() > 0), "head_valid");
      if (q.size() > 0) begin
        check(head_rw == q[0].rw && int'(head_bank) == q[0].bank && int'(head_row) == q[0].row &&
              int'(head_col) == q[0].col, "head entry");
        check(head_nxt_known == q[0].known, "nxt_known");
        if (q[0].known) begin
          check(head_hit == q[0].hit, $sformatf("hit bit %0d expected %0d", head_hit, q[0].hit));
          check(head_nxt_bank == q[0].same, "nxt_bank");
          n_hit += int'(q[0].hit);
        end
      end
      check(nxt_valid == (q.size() > 1), "nxt_valid");
      if (q.size() > 1)
        check(nxt_rw == q[1].rw && int'(nxt_bank) == q[1].bank && int'(nxt_row) == q[1].row &&
              int'(nxt_col) == q[1].col, "second entry");
    end
    check(n_full > 0 && n_hit > 0 && n_unknown_pop > 0, "full, hit and unknown-successor cases all seen");
    $display("tb_emi_cmd_fifo: full=%0d hit_checks=%0d popped_without_successor=%0d", n_full, n_hit, n_unknown_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
