// tb_emi_mode_control: self-checking testbench of the EMI mode control block.
//
// Random ACT, PR (one bank or all), and read/write-with-auto-precharge (RA)
// updates drive the bank state and row registers; a model keeps the same
// state.  Both query ports are given random bank/row pairs every clock and
// their status (row hit, row miss, bank miss) and bank_active are compared
// with the model.  Updates are seen by the queries one clock later.
module tb_emi_mode_control;
  import emi_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic act = 0, pr = 0, pr_all = 0, ra = 0;
  logic [1:0] act_bank = 0, pr_bank = 0, ra_bank = 0, a_bank = 0, b_bank = 0;
  logic [11:0] act_row = 0, a_row = 0, b_row = 0;
  access_status_e a_status, b_status;
  logic [3:0] bank_active;

  emi_mode_control dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  bit m_act [4];
  int m_row [4];
  int n_st [3] = '{0, 0, 0};

  function automatic access_status_e model(int b, int r);
    if (!m_act[b]) return ST_BANK_MISS;
    return (m_row[b] == r) ? ST_ROW_HIT : ST_ROW_MISS;
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    for (int i = 0; i < 4; i++) begin m_act[i] = 0; m_row[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int op;
      @(negedge clk);
      op = $urandom_range(9);
      act = 0; pr = 0; ra = 0; pr_all = 0;
      // one command per clock, as on the DRAM command bus
      if (op < 4) begin
        act = 1; act_bank = 2'($urandom_range(3)); act_row = 12'($urandom_range(3));
      end else if (op < 6) begin
        pr = 1; pr_all = ($urandom_range(4) == 0); pr_bank = 2'($urandom_range(3));
      end else if (op < 7) begin
        ra = 1; ra_bank = 2'($urandom_range(3));
      end
      a_bank = 2'($urandom_range(3)); a_row = 12'($urandom_range(3));
      b_bank = 2'($urandom_range(3)); b_row = 12'($urandom_range(3));
      #1;
      check(a_status == model(a_bank, a_row), $sformatf("port a bank %0d row %0d: %s", a_bank, a_row, a_status.name()));
      check(b_status == model(b_bank, b_row), "port b status");
      for (int k = 0; k < 4; k++) check(bank_active[k] == m_act[k], "bank_active");
      n_st[int'(a_status)]++;
      @(posedge clk);
      if (act) begin m_act[act_bank] = 1; m_row[act_bank] = int'(act_row); end
      if (pr) for (int k = 0; k < 4; k++) if (pr_all || k == int'(pr_bank)) m_act[k] = 0;
      if (ra) m_act[ra_bank] = 0;
    end
    check(n_st[0] > 0 && n_st[1] > 0 && n_st[2] > 0, "all three statuses seen");
    $display("tb_emi_mode_control: status counts %0d %0d %0d", n_st[0], n_st[1], n_st[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
