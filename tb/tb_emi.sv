// tb_emi: self-checking testbench of the external memory interface.
//
// The EMI drives the Mobile-DDR model.  The testbench checks
//  - initialization: power-up wait, precharge, two refreshes, both LMRs,
//  - the access latency of a row hit, a bank miss and a row miss against
//    the timing parameters (cycle counts worked out below),
//  - a block of four bursts written into an idle bank: ACT, then WRITEs
//    one burst apart from tRCD on (8 clocks from ACT to the last data beat
//    for DDR x32 burst 2),
//  - a WRITE whose data are held back waits for them (write-FIFO stall),
//  - data integrity of random write/read traffic under all four
//    auto-precharge methods, with a slow read consumer and a gappy write
//    producer so that both FIFO stalls happen,
//  - that the schedule block, refresh and power down all occur,
//  - that the DRAM model saw no protocol or timing violation.
module tb_emi;
  import emi_pkg::*;

  localparam int unsigned DQ_W = 32, BL = 2, CL = 3;
  localparam bit DDR = 1'b1;

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
