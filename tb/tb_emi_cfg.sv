// tb_emi_cfg: the EMI testbench run on another of the configurations the EMI
// offers: single data rate, x16 data bus, burst length 4, CAS latency 2.
// The checks are the same as in tb_emi:
//
// The EMI drives the Mobile-DDR model.  The testbench checks
//  - initialization: power-up wait, precharge, two refreshes, both LMRs,
//  - the access latency of a row hit, a bank miss and a row miss against
//    the timing parameters (cycle counts worked out in tb_emi_body.svh),
//  - a block of four bursts written into an idle bank, WRITEs one burst apart,
//  - a WRITE whose data are held back waits for them (write-FIFO stall),
//  - data integrity of random write/read traffic under all four
//    auto-precharge methods, with a slow read consumer and a gappy write
//    producer so that both FIFO stalls happen,
//  - that the schedule block, refresh and power down all occur,
//  - that the DRAM model saw no protocol or timing violation.
module tb_emi_cfg;
  import emi_pkg::*;

  localparam int unsigned DQ_W = 16, BL = 4, CL = 2;
  localparam bit DDR = 1'b0;

`include "tb_emi_body.svh"

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
