// mem_subsystem: the two-layer external memory manager of the H.264 decoder.
//
// Layer 1 is the address translation machine (ATM); layer 0 is one external
// memory interface (EMI) per DRAM.  Four Mobile-DDR SDRAMs hold the frame
// stores: DRAM 0/1 luma and DRAM 2/3 chroma, so that luma and chroma are
// accessed at the same time.
//
//   masters (DB, DEI, MC) -> bus_sched -> atm -> steering -> emi[0..3] -> DRAM
//   emi[0..3] read data -> in-order return -> sync_buffer -> decoder
//
// bus_sched grants the data bus DB -> DEI -> MC within each 8x8 pipeline
// stage.  The ATM turns each block request into DRAM burst accesses.  The
// steering logic sends each access to the EMI of its DRAM:
//  - a read is pushed into that EMI's command FIFO and its DRAM index is
//    recorded in the return-order FIFO;
//  - a write pushes the command together with the first of its BL words
//    of the de-blocking write stream (wd_*) and then moves the remaining
//    words into that EMI's write-data FIFO; the ATM access is released with
//    the last word.  If the stream is slow, the EMI holds the WRITE until
//    its write-data FIFO has the whole burst (write-FIFO stall).
// The return logic takes BL words at a time from the EMI named at the head of
// the return-order FIFO, so read data leave in request order although the
// four EMIs run independently, and writes them into the synchronization
// buffer.  The decoder reads the previous stage's data from the other SRAM of
// the buffer and swaps the two at the stage boundary (sb_swap).
//
// Timing: a request reaches the ATM in the clock it is granted; the ATM
// issues one burst per clock; an EMI command FIFO accepts one command per
// clock.  Read latency through an EMI is given in emi.sv; one more clock goes
// from the EMI read FIFO into the synchronization buffer.
//
// The partition into ATM and EMIs, the four-DRAM organization, the bus order
// and the two-SRAM buffer follow the document.  The write-data stream
// interface, the return-order FIFO and its depth (ORD_DEPTH) are this
// design's, since the document connects the masters through a bus it does
// not detail.
module mem_subsystem
  import emi_pkg::*;
  import mem_pkg::*;
#(
  parameter int unsigned DQ_W       = 32,
  parameter int unsigned ROW_W      = 12,
  parameter int unsigned COL_W      = 9,
  parameter int unsigned A_W        = 12,
  parameter int unsigned BL         = 2,
  parameter int unsigned CL         = 3,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned CMD_DEPTH  = 8,
  parameter int unsigned T_RCD      = 3,
  parameter int unsigned T_RP       = 3,
  parameter int unsigned T_RAS      = 7,
  parameter int unsigned T_RC       = 10,
  parameter int unsigned T_RRD      = 2,
  parameter int unsigned T_WR       = 2,
  parameter int unsigned T_WTR      = 1,
  parameter int unsigned T_DQSS     = 1,
  parameter int unsigned T_MRD      = 2,
  parameter int unsigned T_RFC      = 12,
  parameter int unsigned T_POWERUP  = 32400,
  parameter int unsigned T_REFI     = 2528,
  parameter int unsigned PD_IDLE    = 64,
  parameter int unsigned SB_DEPTH   = 512,
  parameter int unsigned ORD_DEPTH  = 64,
  localparam int unsigned N_MEM     = 4,
  localparam int unsigned DW        = 2 * DQ_W,
  localparam int unsigned SB_AW     = $clog2(SB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  apc_method_e       apc_method,
  // control bus of the ATM: 0 width, 1 height, 2 POC_1, 3 POC_2
  input  logic              cfg_we,
  input  logic [1:0]        cfg_addr,
  input  logic [15:0]       cfg_wdata,
  // data bus: masters 0 DB (writes), 1 DEI, 2 MC (reads)
  input  logic              stage_start,
  output logic              stage_done,
  input  logic [2:0]        m_valid,
  output logic [2:0]        m_ready,
  input  logic [2:0]        m_last,
  input  logic [2:0]        m_none,
  input  blk_req_t          m_req [3],
  // de-blocking write data, in access order, BL words per burst
  input  logic              wd_valid,
  output logic              wd_ready,
  input  logic [DQ_W-1:0]   wd_data,
  // synchronization buffer, decoder side
  input  logic              sb_swap,
  output logic [SB_AW:0]    sb_fill_count,
  input  logic [SB_AW-1:0]  sb_rd_addr,
  output logic [DQ_W-1:0]   sb_rd_data,
  output logic              sb_overflow,
  output logic              rd_pending,      // read data still owed by the DRAMs
  output logic              blk_done,        // last burst of a block request accepted
  // four DRAMs
  output logic [N_MEM-1:0]  dram_cke,
  output logic [N_MEM-1:0]  dram_cs_n,
  output logic [N_MEM-1:0]  dram_ras_n,
  output logic [N_MEM-1:0]  dram_cas_n,
  output logic [N_MEM-1:0]  dram_we_n,
  output logic [1:0]        dram_ba [N_MEM],
  output logic [A_W-1:0]    dram_a [N_MEM],
  output logic [DW-1:0]     dram_dq_out [N_MEM],
  output logic [N_MEM-1:0]  dram_dq_oe,
  input  logic [DW-1:0]     dram_dq_in [N_MEM],
  // status
  output logic              init_done,
  output logic [N_MEM-1:0]  in_power_down,
  output logic [N_MEM-1:0]  ev_stall_rd,
  output logic [N_MEM-1:0]  ev_stall_wr,
  output logic [N_MEM-1:0]  ev_sched,
  output logic [N_MEM-1:0]  ev_refresh,
  output logic [N_MEM-1:0]  ev_status_valid,
  output access_status_e    ev_status [N_MEM],
  output logic [N_MEM-1:0]  rd_overflow
);

  localparam int unsigned OAW = $clog2(ORD_DEPTH);
  localparam int unsigned BLW = (BL > 1) ? $clog2(BL) : 1;

  // ---------------------------------------------------------------- bus schedule
  logic            bs_valid, bs_ready;
  logic [1:0]      bs_master;
  logic [$bits(blk_req_t)-1:0] bs_req_bits;
  logic [$bits(blk_req_t)-1:0] m_req_bits [3];
  blk_req_t        bs_req;

  for (genvar i = 0; i < 3; i++) begin : g_mreq
    assign m_req_bits[i] = m_req[i];
  end
  assign bs_req = blk_req_t'(bs_req_bits);

  bus_sched #(.REQ_W($bits(blk_req_t))) u_bus_sched (
    .clk, .rst_n, .stage_start, .stage_done,
    .m_valid, .m_ready, .m_last, .m_none, .m_req(m_req_bits),
    .out_valid(bs_valid), .out_ready(bs_ready), .out_master(bs_master), .out_req(bs_req_bits)
  );

  // ---------------------------------------------------------------- address translation
  logic             a_valid, a_ready, a_rw, a_last;
  logic [1:0]       a_mem, a_bank;
  logic [ROW_W-1:0] a_row;
  logic [COL_W-1:0] a_col;

  atm #(.ROW_W(ROW_W), .COL_W(COL_W)) u_atm (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .req_valid(bs_valid), .req_ready(bs_ready),
    .req_x(bs_req.x), .req_y(bs_req.y), .req_mv_x(bs_req.mv_x), .req_mv_y(bs_req.mv_y),
    .req_w(bs_req.w), .req_h(bs_req.h), .req_field(bs_req.field),
    .req_rw(bs_master == 2'(M_DB)), .req_chroma(bs_req.chroma),
    .out_valid(a_valid), .out_ready(a_ready), .out_rw(a_rw), .out_mem(a_mem), .out_bank(a_bank),
    .out_row(a_row), .out_col(a_col), .out_last(a_last)
  );

  // ---------------------------------------------------------------- steering
  logic [N_MEM-1:0] e_cmd_valid, e_cmd_ready, e_wd_valid, e_wd_ready, e_rd_valid, e_rd_ready;
  logic [DQ_W-1:0]  e_rdata [N_MEM];
  logic [N_MEM-1:0] e_init_done;
  logic [BLW-1:0]   wbeat;
  logic             wfirst, wlast, ord_full;

  assign wfirst   = (wbeat == '0);
  assign wlast    = (wbeat == BLW'(BL - 1));
  assign blk_done = a_valid && a_ready && a_last;

  always_comb begin
    e_cmd_valid = '0;
    e_wd_valid  = '0;
    a_ready     = 1'b0;
    wd_ready    = 1'b0;
    if (a_valid) begin
      if (!a_rw) begin
        e_cmd_valid[a_mem] = !ord_full;
        a_ready            = !ord_full && e_cmd_ready[a_mem];
      end else begin
        // the command goes in with the first word of its burst
        wd_ready           = e_wd_ready[a_mem] && (!wfirst || e_cmd_ready[a_mem]);
        e_wd_valid[a_mem]  = wd_valid && (!wfirst || e_cmd_ready[a_mem]);
        e_cmd_valid[a_mem] = wfirst && wd_valid && e_wd_ready[a_mem];
        a_ready            = wlast && wd_valid && e_wd_ready[a_mem] && (!wfirst || e_cmd_ready[a_mem]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbeat <= '0;
    else if (wd_valid && wd_ready) wbeat <= wlast ? '0 : wbeat + 1'b1;
  end

  // ---------------------------------------------------------------- EMIs
  for (genvar i = 0; i < N_MEM; i++) begin : g_emi
    emi #(
      .DQ_W(DQ_W), .DDR(1'b1), .BANKS(4), .ROW_W(ROW_W), .COL_W(COL_W), .A_W(A_W),
      .BL(BL), .CL(CL), .FIFO_DEPTH(FIFO_DEPTH), .CMD_DEPTH(CMD_DEPTH),
      .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_RC(T_RC), .T_RRD(T_RRD), .T_WR(T_WR),
      .T_WTR(T_WTR), .T_DQSS(T_DQSS), .T_MRD(T_MRD), .T_RFC(T_RFC),
      .T_POWERUP(T_POWERUP), .T_REFI(T_REFI), .PD_IDLE(PD_IDLE)
    ) u_emi (
      .clk, .rst_n, .apc_method,
      .cmd_valid(e_cmd_valid[i]), .cmd_ready(e_cmd_ready[i]), .cmd_rw(a_rw),
      .cmd_bank(a_bank), .cmd_row(a_row), .cmd_col(a_col),
      .wdata_valid(e_wd_valid[i]), .wdata_ready(e_wd_ready[i]), .wdata(wd_data),
      .rdata_valid(e_rd_valid[i]), .rdata_ready(e_rd_ready[i]), .rdata(e_rdata[i]),
      .dram_cke(dram_cke[i]), .dram_cs_n(dram_cs_n[i]), .dram_ras_n(dram_ras_n[i]),
      .dram_cas_n(dram_cas_n[i]), .dram_we_n(dram_we_n[i]), .dram_ba(dram_ba[i]),
      .dram_a(dram_a[i]), .dram_dq_out(dram_dq_out[i]), .dram_dq_oe(dram_dq_oe[i]),
      .dram_dq_in(dram_dq_in[i]),
      .init_done(e_init_done[i]), .in_power_down(in_power_down[i]),
      .ev_stall_rd(ev_stall_rd[i]), .ev_stall_wr(ev_stall_wr[i]), .ev_sched(ev_sched[i]),
      .ev_refresh(ev_refresh[i]), .ev_status_valid(ev_status_valid[i]),
      .ev_status(ev_status[i]), .rd_overflow(rd_overflow[i])
    );
  end
  assign init_done = &e_init_done;

  // ---------------------------------------------------------------- return order
  logic [1:0]   ord_mem [ORD_DEPTH];
  logic [OAW:0] ord_cnt;
  logic [OAW-1:0] ord_wp, ord_rp;
  logic [BLW-1:0] rbeat;
  logic         ord_push, ord_pop, ord_valid, rd_take;
  logic [1:0]   ord_head;

  assign ord_full  = (ord_cnt == (OAW+1)'(ORD_DEPTH));
  assign ord_valid = (ord_cnt != '0);
  assign ord_head  = ord_mem[ord_rp];
  assign ord_push  = a_valid && a_ready && !a_rw;

  always_comb begin
    e_rd_ready = '0;
    if (ord_valid) e_rd_ready[ord_head] = 1'b1;
  end
  assign rd_take = ord_valid && e_rd_valid[ord_head];
  assign ord_pop = rd_take && (rbeat == BLW'(BL - 1));

  always_ff @(posedge clk) begin
    if (ord_push) ord_mem[ord_wp] <= a_mem;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ord_cnt <= '0; ord_wp <= '0; ord_rp <= '0; rbeat <= '0;
    end else begin
      if (ord_push) ord_wp <= ord_wp + 1'b1;
      if (ord_pop)  ord_rp <= ord_rp + 1'b1;
      ord_cnt <= ord_cnt + (OAW+1)'(ord_push) - (OAW+1)'(ord_pop);
      if (rd_take) rbeat <= (rbeat == BLW'(BL - 1)) ? '0 : rbeat + 1'b1;
    end
  end
  assign rd_pending = ord_valid;

  // ---------------------------------------------------------------- synchronization buffer
  logic          sb_wr_en;
  logic [DQ_W-1:0] sb_wr_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb_wr_en   <= 1'b0;
      sb_wr_data <= '0;
    end else begin
      sb_wr_en   <= rd_take;
      sb_wr_data <= e_rdata[ord_head];
    end
  end

  sync_buffer #(.W(DQ_W), .DEPTH(SB_DEPTH)) u_sync_buffer (
    .clk, .rst_n, .swap(sb_swap), .wr_en(sb_wr_en), .wr_data(sb_wr_data),
    .fill_count(sb_fill_count), .rd_addr(sb_rd_addr), .rd_data(sb_rd_data), .overflow(sb_overflow)
  );

endmodule
