// emi_pkg: types and constants shared by the external memory interface (EMI,
// layer 0) and the address translation machine (ATM, layer 1).
//
// The DRAM command encoding is the JEDEC SDRAM / Mobile-DDR one on
// {CS#, RAS#, CAS#, WE#}.  The four auto-precharge methods are the ones the
// EMI offers to its user: row-close, row-open and the two dynamic methods that
// use the hit bit of the command FIFO.  The bank-state encoding follows the
// two-state bank diagram (idle / active).
package emi_pkg;

  // DRAM command on {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_LMR   = 4'b0000,   // load mode register (BA selects MR / EMR)
    CMD_REF   = 4'b0001,   // auto refresh
    CMD_PRE   = 4'b0010,   // precharge (A10 = 1: all banks)
    CMD_ACT   = 4'b0011,   // activate row
    CMD_WRITE = 4'b0100,   // write (A10 = 1: with auto-precharge)
    CMD_READ  = 4'b0101,   // read  (A10 = 1: with auto-precharge)
    CMD_BST   = 4'b0110,   // burst terminate (never issued)
    CMD_NOP   = 4'b0111    // no operation
  } dram_cmd_e;

  // auto-precharge method chosen by the user
  typedef enum logic [1:0] {
    APC_ROW_CLOSE = 2'd0,  // every access with auto-precharge
    APC_ROW_OPEN  = 2'd1,  // never auto-precharge, close a row only on a row miss
    APC_DYN1      = 2'd2,  // dynamic 1: next access is a bank miss -> keep row open
    APC_DYN2      = 2'd3   // dynamic 2: next access is a bank miss -> auto-precharge
  } apc_method_e;

  // status of an access against the open rows
  typedef enum logic [1:0] {
    ST_ROW_HIT  = 2'd0,
    ST_ROW_MISS = 2'd1,
    ST_BANK_MISS = 2'd2
  } access_status_e;

  // per-bank state register
  typedef enum logic {
    BANK_IDLE   = 1'b0,
    BANK_ACTIVE = 1'b1
  } bank_state_e;

endpackage
