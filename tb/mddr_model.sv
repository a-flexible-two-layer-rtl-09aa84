// mddr_model: behavioural model of a Mobile-DDR SDRAM (four banks), seen at
// the controller clock through an ideal DDR pad.  Testbench use only.
//
// It decodes {CS#, RAS#, CAS#, WE#} at each rising clock edge while CKE is
// high, keeps the bank state (idle / active row), stores written data in a
// sparse array and returns read data so that the controller samples the first
// beat CL clocks after the edge that took the READ.  Write data is taken
// T_DQSS clocks after the WRITE.  Every beat carries RATE words, the first in
// the low half.  Bursts are sequential from the column aligned to BL.
//
// It checks the protocol and the timing the controller must keep: ACT only to
// an idle bank, READ/WRITE only to an active bank and not before tRCD,
// PRE not before tRAS / write recovery, ACT not before tRP / tRC / tRRD,
// REF and LMR only with all banks idle, data bus turnaround, commands during
// power down, and access before initialization.  Violations are counted in
// `errors' and printed.  It also counts the commands it received.
module mddr_model #(
  parameter int unsigned BANKS  = 4,
  parameter int unsigned ROW_W  = 12,
  parameter int unsigned COL_W  = 9,
  parameter int unsigned A_W    = 12,
  parameter int unsigned DQ_W   = 32,
  parameter int unsigned RATE   = 2,
  parameter int unsigned BL     = 2,
  parameter int unsigned CL     = 3,
  parameter int unsigned T_DQSS = 1,
  parameter int unsigned T_RCD  = 3,
  parameter int unsigned T_RP   = 3,
  parameter int unsigned T_RAS  = 7,
  parameter int unsigned T_RC   = 10,
  parameter int unsigned T_RRD  = 2,
  parameter int unsigned T_WR   = 2,
  parameter int unsigned T_RFC  = 12,
  parameter string       NAME   = "dram"
) (
  input  logic                     clk,
  input  logic                     cke,
  input  logic                     cs_n,
  input  logic                     ras_n,
  input  logic                     cas_n,
  input  logic                     we_n,
  input  logic [$clog2(BANKS)-1:0] ba,
  input  logic [A_W-1:0]           a,
  input  logic [RATE*DQ_W-1:0]     dq_in,    // from the controller
  input  logic                     dq_oe,
  output logic [RATE*DQ_W-1:0]     dq_out    // to the controller
);

  localparam int unsigned BEATS = BL / RATE;
  // signed copies of the timing values for the clock arithmetic below
  localparam longint L_RCD = longint'(T_RCD), L_RP = longint'(T_RP), L_RAS = longint'(T_RAS);
  localparam longint L_RC = longint'(T_RC), L_RRD = longint'(T_RRD), L_RFC = longint'(T_RFC);
  localparam longint L_WREC = longint'(T_DQSS + BEATS + T_WR), L_BEATS = longint'(BEATS);

  longint unsigned cyc = 0;
  int errors = 0;
  int n_act = 0, n_pre = 0, n_rd = 0, n_wr = 0, n_ref = 0, n_lmr = 0, n_rw_ap = 0;
  int n_pd_entries = 0;
  bit initialised = 0;
  int refs_before_lmr = 0;
  logic [A_W-1:0] mr = '0, emr = '0;

  bit              active [BANKS];
  int unsigned     open_row [BANKS];
  longint          t_act [BANKS];
  longint          t_idle [BANKS];     // clock from which the bank counts as precharged
  longint          t_pre_ok [BANKS];   // earliest PRE
  longint          t_last_act = -1000;
  longint          t_ref_done = 0;
  bit              prev_cke = 1;

  logic [DQ_W-1:0]          mem [longint unsigned];
  logic [RATE*DQ_W-1:0]     rd_beat [longint unsigned];
  bit                       rd_busy [longint unsigned];
  longint unsigned          wr_addr [longint unsigned];  // capture clock -> first word address

  initial begin
    for (int i = 0; i < BANKS; i++) begin
      active[i] = 0; open_row[i] = 0; t_act[i] = -1000; t_idle[i] = -1000; t_pre_ok[i] = -1000;
    end
    dq_out = '0;
  end

  function automatic longint unsigned addr_of(int unsigned b, int unsigned r, int unsigned c);
    return (longint'(b) << (ROW_W + COL_W)) | (longint'(r) << COL_W) | longint'(c);
  endfunction

  task automatic fail(input string msg);
    errors++;
    if (errors <= 10) $display("%s ERROR at clock %0d: %s", NAME, cyc, msg);
  endtask

  task automatic close_bank(int b, longint when);
    active[b] = 0;
    t_idle[b] = when;
  endtask

  always @(posedge clk) begin
    logic [3:0] cmd;
    int b;
    cyc++;
    cmd = {cs_n, ras_n, cas_n, we_n};
    b = int'(ba);
    // read data for this clock
    if (rd_beat.exists(cyc)) begin
      dq_out <= rd_beat[cyc];
      rd_beat.delete(cyc);
    end
    // write data capture
    if (wr_addr.exists(cyc)) begin
      if (!dq_oe) fail("write data not driven");
      for (int i = 0; i < RATE; i++) mem[wr_addr[cyc] + longint'(i)] = dq_in[i*DQ_W +: DQ_W];
      wr_addr.delete(cyc);
    end else if (dq_oe && rd_busy.exists(cyc)) fail("controller drives DQ during read data");
    if (rd_busy.exists(cyc)) rd_busy.delete(cyc);
    if (!cke && prev_cke) n_pd_entries++;
    if (!cke) begin
      if (cmd != 4'b0111 && !cs_n) fail("command during power down");
    end else if (!cs_n) begin
      case (cmd)
        4'b0011: begin // ACT
          if (!initialised) fail("ACT before initialization");
          if (active[b]) fail($sformatf("ACT to active bank %0d", b));
          if (longint'(cyc) < t_idle[b] + L_RP) fail($sformatf("tRP violated on bank %0d", b));
          if (longint'(cyc) < t_act[b] + L_RC) fail($sformatf("tRC violated on bank %0d", b));
          if (longint'(cyc) < t_last_act + L_RRD) fail("tRRD violated");
          if (longint'(cyc) < t_ref_done) fail("ACT during tRFC");
          active[b] = 1; open_row[b] = int'(a[ROW_W-1:0]);
          t_act[b] = longint'(cyc); t_last_act = longint'(cyc); t_pre_ok[b] = longint'(cyc) + L_RAS;
          n_act++;
        end
        4'b0101, 4'b0100: begin // READ / WRITE
          longint unsigned base;
          int unsigned col;
          bit is_wr, ap;
          is_wr = (cmd == 4'b0100);
          ap = a[10];
          col = int'(a[COL_W-1:0]) & ~(BL - 1);
          if (!active[b]) fail($sformatf("%s to idle bank %0d", is_wr ? "WRITE" : "READ", b));
          if (longint'(cyc) < t_act[b] + L_RCD) fail($sformatf("tRCD violated on bank %0d", b));
          base = addr_of(b, open_row[b], col);
          if (is_wr) begin
            n_wr++;
            for (int k = 0; k < BEATS; k++) wr_addr[cyc + T_DQSS + k] = base + longint'(k * RATE);
            if (t_pre_ok[b] < longint'(cyc) + L_WREC) t_pre_ok[b] = longint'(cyc) + L_WREC;
          end else begin
            n_rd++;
            for (int k = 0; k < BEATS; k++) begin
              logic [RATE*DQ_W-1:0] beat;
              for (int i = 0; i < RATE; i++) begin
                longint unsigned ad;
                ad = base + longint'(k * RATE + i);
                beat[i*DQ_W +: DQ_W] = mem.exists(ad) ? mem[ad] : '0;
              end
              rd_beat[cyc + CL - 1 + k] = beat;
              rd_busy[cyc + CL + k] = 1;
              rd_busy[cyc + CL + k - 1] = 1;
            end
            if (t_pre_ok[b] < longint'(cyc) + L_BEATS) t_pre_ok[b] = longint'(cyc) + L_BEATS;
          end
          if (ap) begin
            n_rw_ap++;
            close_bank(b, t_pre_ok[b]);
          end
        end
        4'b0010: begin // PRE
          for (int i = 0; i < BANKS; i++)
            if (a[10] || i == b) begin
              if (active[i] && longint'(cyc) < t_pre_ok[i]) fail($sformatf("PRE too early on bank %0d", i));
              if (active[i]) close_bank(i, longint'(cyc));
            end
          n_pre++;
        end
        4'b0001: begin // REF
          for (int i = 0; i < BANKS; i++) begin
            if (active[i]) fail("REF with a bank active");
            if (longint'(cyc) < t_idle[i] + L_RP) fail("REF before tRP");
          end
          if (longint'(cyc) < t_ref_done) fail("REF during tRFC");
          t_ref_done = longint'(cyc) + L_RFC;
          n_ref++;
          if (!initialised) refs_before_lmr++;
        end
        4'b0000: begin // LMR
          for (int i = 0; i < BANKS; i++) if (active[i]) fail("LMR with a bank active");
          if (longint'(cyc) < t_ref_done) fail("LMR during tRFC");
          if (b == 0) mr = a;
          else if (b == 2) begin
            emr = a;
            if (refs_before_lmr < 2) fail("fewer than two refreshes before initialization ended");
            if (int'(mr[6:4]) != CL) fail("mode register CAS latency differs");
            if ((1 << int'(mr[2:0])) != BL) fail("mode register burst length differs");
            initialised = 1;
          end
          n_lmr++;
        end
        default: ;
      endcase
    end
    prev_cke = cke;
  end

  // backdoor access for testbenches
  function automatic logic [DQ_W-1:0] peek(int unsigned b, int unsigned r, int unsigned c);
    longint unsigned ad;
    ad = addr_of(b, r, c);
    return mem.exists(ad) ? mem[ad] : '0;
  endfunction

endmodule
