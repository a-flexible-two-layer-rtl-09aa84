// tb_mem_subsystem: end-to-end testbench of the memory subsystem with four
// Mobile-DDR models, with the power-up wait, refresh interval and power-down
// idle time shortened so that every mechanism shows up in a short run.  The
// test itself is described in tb_mem_subsystem_body.svh.
module tb_mem_subsystem;
  import emi_pkg::*;
  import mem_pkg::*;
  localparam int WATCHDOG = 400000;
`include "tb_mem_subsystem_decl.svh"
  mem_subsystem #(.T_POWERUP(20), .T_REFI(400), .PD_IDLE(16)) dut (.*);
`include "tb_mem_subsystem_body.svh"
endmodule
