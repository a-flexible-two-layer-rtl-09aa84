// tb_atm: self-checking testbench of the address translation machine.
//
// A reference model written with plain integer arithmetic (division and
// modulo rather than bit slices) computes, for each request, the region the
// block needs, clips it to the picture, walks it pixel by pixel and lists the
// 8-byte DRAM bursts in first-touch order.  The DUT's access stream must match
// it entry by entry, end with out_last, and run at one access per clock.
// Requests: random luma/chroma, read/write, frame/field blocks with random
// motion vectors including ones that point outside the picture, and the two
// worst cases named for the decoder (4x4 and 8x8 with quarter-pel vectors,
// which need 9x9 and 13x13 pixels).
module tb_atm;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0;
  logic [1:0] cfg_addr = 0;
  logic [15:0] cfg_wdata = 0;
  logic req_valid = 0, req_ready;
  logic [11:0] req_x = 0, req_y = 0;
  logic signed [13:0] req_mv_x = 0, req_mv_y = 0;
  logic [4:0] req_w = 8, req_h = 8;
  logic [1:0] req_field = 0;
  logic req_rw = 0, req_chroma = 0;
  logic out_valid, out_ready = 1, out_rw, out_last;
  logic [1:0] out_mem, out_bank;
  logic [11:0] out_row;
  logic [8:0] out_col;

  atm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL: %s", msg); end
  endtask

  int W = 1920, H = 1088, P1 = 3, P2 = 5;

  typedef struct packed { logic [1:0] mem, bank; logic [11:0] row; logic [8:0] col; } acc_t;

  function automatic int fdiv(int a, int b);   // floor division
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  function automatic acc_t addr_of(int x, int y, bit chroma, int slot);
    acc_t r;
    int tx, ty, tpr, rpf;
    tx = x / 64; ty = y / 64;
    tpr = (W + 127) / 128;
    rpf = chroma ? ((H / 2 + 127) / 128) * tpr : ((H + 127) / 128) * tpr;
    r.mem  = {chroma, 1'((y / 2) % 2)};
    r.bank = 2'((ty % 2) * 2 + (tx % 2));
    r.row  = 12'(slot * rpf + (ty / 2) * tpr + tx / 2);
    r.col  = 9'(((((y % 64) / 4) * 2 + (y % 2)) * 8 + (x % 64) / 8) * 2);
    return r;
  endfunction

  acc_t exp_q [$];
  int n_exp;

  task automatic model(input int x, input int y, input int mvx, input int mvy, input int w, input int h,
                       input int field, input bit rw, input bit chroma);
    int x0, y0, x1, y1, ww, hh, step, pw, ph, par, minr, maxr, slot;
    step = (field >= 2) ? 2 : 1;
    par = field % 2;
    pw = W; ph = chroma ? H / 2 : H;
    slot = rw ? P2 : P1;
    if (!chroma) begin
      int fx, fy;
      fx = (!rw && (mvx % 4 != 0)) ? 1 : 0;
      fy = (!rw && (mvy % 4 != 0)) ? 1 : 0;
      x0 = x + (rw ? 0 : fdiv(mvx, 4)) - 2 * fx; ww = w + 5 * fx;
      y0 = y + (rw ? 0 : fdiv(mvy, 4)) - 2 * fy; hh = h + 5 * fy;
    end else begin
      int fx, fy;
      fx = (!rw && (mvx % 8 != 0)) ? 1 : 0;
      fy = (!rw && (mvy % 8 != 0)) ? 1 : 0;
      x0 = 2 * (x / 2 + (rw ? 0 : fdiv(mvx, 8))); ww = 2 * (w / 2 + fx);
      y0 = y / 2 + (rw ? 0 : fdiv(mvy, 8)); hh = h / 2 + fy;
    end
    if (step == 2) y0 = 2 * y0 + par;
    x1 = x0 + ww - 1;
    y1 = y0 + (hh - 1) * step;
    minr = (step == 2) ? par : 0;
    maxr = (step == 2) ? ph - 2 + par : ph - 1;
    if (x0 < 0) x0 = 0;
    if (x0 > pw - 1) x0 = pw - 1;
    if (x1 > pw - 1) x1 = pw - 1;
    if (x1 < x0) x1 = x0;
    if (y0 < minr) y0 = minr;
    if (y0 > maxr) y0 = maxr;
    if (y1 > maxr) y1 = maxr;
    if (y1 < y0) y1 = y0;
    exp_q.delete();
    for (int yy = y0; yy <= y1; yy += step) begin
      acc_t last;
      bit have = 0;
      for (int xx = x0; xx <= x1; xx++) begin
        acc_t a;
        a = addr_of(xx, yy, chroma, slot);
        if (!have || a != last) exp_q.push_back(a);
        last = a; have = 1;
      end
    end
    n_exp = exp_q.size();
  endtask

  task automatic cfg(input int ad, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = 2'(ad); cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  bit bp = 0;
  int n_blocks = 0, n_outside = 0, n_field = 0, n_chroma = 0, n_write = 0;

  task automatic run(input int x, input int y, input int mvx, input int mvy, input int w, input int h,
                     input int field, input bit rw, input bit chroma, output int n_got);
    int cyc, k;
    model(x, y, mvx, mvy, w, h, field, rw, chroma);
    @(negedge clk);
    req_valid = 1; req_x = 12'(x); req_y = 12'(y); req_mv_x = 14'(mvx); req_mv_y = 14'(mvy);
    req_w = 5'(w); req_h = 5'(h); req_field = 2'(field); req_rw = rw; req_chroma = chroma;
    @(posedge clk);
    check(req_ready, "request not accepted when idle");
    @(negedge clk); req_valid = 0;
    cyc = 0; k = 0;
    forever begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        acc_t got;
        got = '{out_mem, out_bank, out_row, out_col};
        if (k < n_exp) check(got == exp_q[k], $sformatf("access %0d: got mem%0d b%0d r%0d c%0d expected mem%0d b%0d r%0d c%0d",
                                                 k, got.mem, got.bank, got.row, got.col,
                                                 exp_q[k].mem, exp_q[k].bank, exp_q[k].row, exp_q[k].col));
        check(out_rw == rw, "out_rw");
        check(out_last == (k == n_exp - 1), $sformatf("out_last at %0d of %0d", k, n_exp));
        k++;
        if (out_last) break;
      end
      cyc++;
      if (cyc > 2000) begin check(0, "generator did not finish"); break; end
    end
    check(k == n_exp, $sformatf("got %0d accesses, expected %0d", k, n_exp));
    // one access per clock: the last access comes k-1 clocks after the first
    if (!bp) check(cyc == k - 1, $sformatf("%0d accesses took %0d clocks", k, cyc + 1));
    n_got = k;
    n_blocks++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cfg(0, W); cfg(1, H); cfg(2, P1); cfg(3, P2);

    // worst cases: a 4x4 block at quarter-pel needs 9x9 pixels, 8x8 needs 13x13
    run(100, 200, 1, 1, 4, 4, 0, 0, 0, n);     // x 97..105: chunks 12,13 -> 9 rows x 2
    check(n == 18, $sformatf("4x4 quarter-pel block: %0d accesses, expected 18", n));
    run(64, 64, 2, 3, 8, 8, 0, 0, 0, n);       // x 62..74 -> chunks 7..9, 13 rows
    check(n == 39, $sformatf("8x8 quarter-pel block: %0d accesses, expected 39", n));
    // de-blocking write of an aligned 8x8 luma block: 8 rows of one burst
    run(64, 64, 0, 0, 8, 8, 0, 1, 0, n);
    check(n == 8, "8x8 write");
    run(0, 0, 0, 0, 16, 16, 0, 0, 0, n);
    check(n == 32, "16x16 integer-pel read");

    // random blocks
    for (int i = 0; i < 400; i++) begin
      int x, y, mvx, mvy, w, h, field;
      bit rw, chroma;
      w = 4 << $urandom_range(2); h = 4 << $urandom_range(2);
      x = $urandom_range(W / 4 - 1) * 4;
      y = $urandom_range(H / 4 - 1) * 4;
      rw = $urandom_range(3) == 0;
      chroma = $urandom_range(1);
      field = ($urandom_range(3) == 0) ? 2 + $urandom_range(1) : 0;
      if (field >= 2) y = y / 2;
      mvx = int'($urandom_range(800)) - 400;
      mvy = int'($urandom_range(800)) - 400;
      if (x + mvx / 4 < 0 || y + mvy / 4 < 0 || x + mvx / 4 + w > W || y + mvy / 4 + h > H) n_outside++;
      n_field += (field >= 2);
      n_chroma += chroma;
      n_write += rw;
      out_ready = 1;
      run(x, y, mvx, mvy, w, h, field, rw, chroma, n);
    end
    // with back-pressure
    bp = 1;
    fork
      begin
        for (int i = 0; i < 30; i++) run(1800, 1000, 7, -5, 16, 16, 0, 0, i % 2, n);
      end
      begin
        repeat (3000) begin @(negedge clk); out_ready = $urandom_range(1); end
        out_ready = 1;
      end
    join_any
    out_ready = 1;
    check(n_outside > 0 && n_field > 0 && n_chroma > 0 && n_write > 0, "coverage of request kinds");
    $display("tb_atm: blocks=%0d outside=%0d field=%0d chroma=%0d write=%0d", n_blocks, n_outside, n_field, n_chroma, n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
