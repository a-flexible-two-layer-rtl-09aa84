// Signals of the memory subsystem ports, shared by its two end-to-end
// testbenches.
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  apc_method_e apc_method;
  logic cfg_we;
  logic [1:0] cfg_addr;
  logic [15:0] cfg_wdata;
  logic stage_start, stage_done;
  logic [2:0] m_valid, m_ready, m_last, m_none;
  blk_req_t m_req [3];
  logic wd_valid, wd_ready;
  logic [31:0] wd_data;
  logic sb_swap, sb_overflow, rd_pending, blk_done;
  logic [9:0] sb_fill_count;
  logic [8:0] sb_rd_addr;
  logic [31:0] sb_rd_data;
  logic [3:0] dram_cke, dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n, dram_dq_oe;
  logic [1:0] dram_ba [4];
  logic [11:0] dram_a [4];
  logic [63:0] dram_dq_out [4], dram_dq_in [4];
  logic init_done;
  logic [3:0] in_power_down, ev_stall_rd, ev_stall_wr, ev_sched, ev_refresh, ev_status_valid, rd_overflow;
  access_status_e ev_status [4];
