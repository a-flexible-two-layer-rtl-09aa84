// mem_pkg: types of the memory subsystem.
//
// blk_req_t is the block-level request a decoder master gives the address
// translation machine over the data bus: block position (X, Y) in luma
// pixels, motion vector in quarter-pel luma units, block width and height,
// frame or field (0 frame, 2 top field, 3 bottom field) and luma or chroma.
// Read or write is implied by the master (the de-blocking module writes, the
// other two read).  The signal list follows the document's block-level
// signals; the packing and widths are this design's.
// M_DB is read by the top module only, so a lint run of this package on its
// own reports it as unused.
package mem_pkg;

  typedef struct packed {
    logic [11:0]        x;
    logic [11:0]        y;
    logic signed [13:0] mv_x;
    logic signed [13:0] mv_y;
    logic [4:0]         w;
    logic [4:0]         h;
    logic [1:0]         field;
    logic               chroma;
  } blk_req_t;

  // bus master 0, the de-blocking module, is the one that writes; the data
  // bus serves masters 0 (DB), 1 (DEI), 2 (MC) in this order in a stage
  localparam int unsigned M_DB  = 0;

endpackage
