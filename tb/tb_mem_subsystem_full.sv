// tb_mem_subsystem_full: the end-to-end test of tb_mem_subsystem run on the
// memory subsystem exactly as configured for the decoder, with no parameter
// changed: 200 us power-up wait (32400 clocks at 162 MHz), the 64 ms / 4096
// refresh interval (2528 clocks) and the power-down idle time of 64 clocks.
module tb_mem_subsystem_full;
  import emi_pkg::*;
  import mem_pkg::*;
  localparam int WATCHDOG = 2000000;
`include "tb_mem_subsystem_decl.svh"
  mem_subsystem dut (.*);
`include "tb_mem_subsystem_body.svh"
endmodule
