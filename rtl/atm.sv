// atm: address translation machine, layer 1 of the memory controller.
//
// The ATM turns one block request of the decoder into the list of DRAM burst
// accesses that cover it, in the memory map built for the decoder.
//
// Control registers (slice level, written over the control bus): picture
// width and height in luma pixels, POC_1 and POC_2.  POC_1 selects the frame
// store read by motion compensation and de-interlacing, POC_2 the frame store
// written by de-blocking; both are frame-store indices here.
//
// Block request (block level, over the data bus): position (X, Y), motion
// vector (quarter-pel luma units), block width and height, frame or field
// (top/bottom), read or write, and luma or chroma.  For a read with a
// fractional motion vector component the region grows by the interpolation
// support: 5 luma pixels (six-tap filter: a 4x4 block needs 9x9) or one
// chroma sample (bilinear).  The region is clipped to the picture, since
// motion vectors may point over the picture edge.
//
// Memory map (four-DRAM, "simultaneous" organization): luma goes to DRAM 0/1,
// chroma (Cb and Cr interleaved byte by byte, half height) to DRAM 2/3, so a
// luma and a chroma access proceed at the same time.  The picture is cut into
// 64x64-byte tiles; one tile is one DRAM row.  Tiles take banks 0,1 along a
// tile row and 2,3 on the next tile row, so neighbouring tiles never share a
// bank and a block that crosses a tile edge sees bank misses, not row misses.
// Inside a tile the two DRAMs of a pair alternate every two pixel rows, so
// one DRAM row holds 32 pixel rows x 64 bytes = 2 KB (512 x32 columns).
//
//   bank   = {tile_y[0], tile_x[0]}
//   row    = frame_store * rows_per_frame + (tile_y>>1) * ceil(width/128) + (tile_x>>1)
//   dram   = {chroma, y[1]}
//   column = {y[5:2], y[0], x[5:3], 0}      (one burst = 8 bytes)
//
// Output: one burst access per clock on out_valid/out_ready, row by row,
// left to right; out_last marks the last access of a block.  A new request
// is accepted when the previous one is finished.
//
// The tiling into banks 0/1/2/3, the 64x64 tile per DRAM row, the switch of
// DRAM every two pixel rows, the luma/chroma split over the two DRAM pairs and
// the control signals follow the document.  The control bus is 16 bits wide;
// the upper bits of a register write beyond the register width are ignored
// (a lint note on cfg_wdata stands for that reason).  The exact address bit layout,
// the chroma format in memory and the meaning of POC_1 / POC_2 as frame-store
// indices are this design's choices.
module atm #(
  parameter int unsigned ROW_W  = 12,
  parameter int unsigned COL_W  = 9,
  parameter int unsigned C_W    = 12,   // picture coordinate width (up to 4095)
  parameter int unsigned MV_W   = 14    // motion vector component, quarter pel
) (
  input  logic              clk,
  input  logic              rst_n,
  // control bus: 0 width, 1 height, 2 POC_1, 3 POC_2
  input  logic              cfg_we,
  input  logic [1:0]        cfg_addr,
  input  logic [15:0]       cfg_wdata,
  // block request
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [C_W-1:0]    req_x,
  input  logic [C_W-1:0]    req_y,
  input  logic signed [MV_W-1:0] req_mv_x,
  input  logic signed [MV_W-1:0] req_mv_y,
  input  logic [4:0]        req_w,        // luma block width, 4..16
  input  logic [4:0]        req_h,
  input  logic [1:0]        req_field,    // 0 frame, 2 top field, 3 bottom field
  input  logic              req_rw,       // 1 = write
  input  logic              req_chroma,
  // burst accesses
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_rw,
  output logic [1:0]        out_mem,
  output logic [1:0]        out_bank,
  output logic [ROW_W-1:0]  out_row,
  output logic [COL_W-1:0]  out_col,
  output logic              out_last
);

  localparam int unsigned SW = C_W + 2;     // signed working width
  typedef logic signed [SW-1:0] sc_t;

  // ---------------------------------------------------------------- control registers
  logic [C_W-1:0] width, height;
  logic [7:0]     poc_1, poc_2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width  <= C_W'(1920);
      height <= C_W'(1088);
      poc_1  <= '0;
      poc_2  <= '0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        2'd0: width  <= cfg_wdata[C_W-1:0];
        2'd1: height <= cfg_wdata[C_W-1:0];
        2'd2: poc_1  <= cfg_wdata[7:0];
        default: poc_2 <= cfg_wdata[7:0];
      endcase
    end
  end

  // tiles of 128 bytes x 128 rows per DRAM row of every bank
  logic [C_W-7:0] tiles2_x;                 // ceil(width / 128)
  logic [C_W-7:0] tiles2_y_l, tiles2_y_c;   // ceil(height / 128), ceil(height / 256)
  assign tiles2_x   = (C_W-6)'((width + C_W'(127)) >> 7);
  assign tiles2_y_l = (C_W-6)'((height + C_W'(127)) >> 7);
  assign tiles2_y_c = (C_W-6)'((height + C_W'(255)) >> 8);

  // ---------------------------------------------------------------- region
  sc_t rx0, ry0, rx1, ry1;         // inclusive region in plane bytes / plane rows
  sc_t plane_w, plane_h;
  logic [1:0] fstep;               // row step: 1 frame, 2 field

  always_comb begin
    sc_t x, y, w, h, mvx_i, mvy_i, maxrow, minrow;
    logic fx, fy;
    plane_w = sc_t'(width);
    plane_h = req_chroma ? (sc_t'(height) >> 1) : sc_t'(height);
    fstep   = req_field[1] ? 2'd2 : 2'd1;
    if (!req_chroma) begin
      mvx_i = req_rw ? '0 : sc_t'(req_mv_x >>> 2);
      mvy_i = req_rw ? '0 : sc_t'(req_mv_y >>> 2);
      fx = !req_rw && (req_mv_x[1:0] != 2'b00);
      fy = !req_rw && (req_mv_y[1:0] != 2'b00);
      x = sc_t'(req_x) + mvx_i - (fx ? sc_t'(2) : sc_t'(0));
      w = sc_t'(req_w) + (fx ? sc_t'(5) : sc_t'(0));
      h = sc_t'(req_h) + (fy ? sc_t'(5) : sc_t'(0));
      if (req_field[1]) y = (sc_t'(req_y) + mvy_i - (fy ? sc_t'(2) : sc_t'(0))) * 2 + sc_t'(req_field[0]);
      else              y = sc_t'(req_y) + mvy_i - (fy ? sc_t'(2) : sc_t'(0));
    end else begin
      // chroma sample = luma / 2, Cb/Cr interleaved: byte x = 2 * chroma x
      mvx_i = req_rw ? '0 : sc_t'(req_mv_x >>> 3);
      mvy_i = req_rw ? '0 : sc_t'(req_mv_y >>> 3);
      fx = !req_rw && (req_mv_x[2:0] != 3'b000);
      fy = !req_rw && (req_mv_y[2:0] != 3'b000);
      x = ((sc_t'(req_x) >> 1) + mvx_i) * 2;
      w = ((sc_t'(req_w) >> 1) + (fx ? sc_t'(1) : sc_t'(0))) * 2;
      h = (sc_t'(req_h) >> 1) + (fy ? sc_t'(1) : sc_t'(0));
      if (req_field[1]) y = ((sc_t'(req_y) >> 1) + mvy_i) * 2 + sc_t'(req_field[0]);
      else              y = (sc_t'(req_y) >> 1) + mvy_i;
    end
    rx0 = x;
    rx1 = x + w - 1;
    ry0 = y;
    ry1 = y + (h - 1) * sc_t'(fstep);
    // clip to the plane; a field keeps its row parity
    maxrow = req_field[1] ? plane_h - 2 + sc_t'(req_field[0]) : plane_h - 1;
    minrow = req_field[1] ? sc_t'(req_field[0]) : sc_t'(0);
    if (rx0 < 0) rx0 = 0;
    if (rx0 > plane_w - 1) rx0 = plane_w - 1;
    if (rx1 > plane_w - 1) rx1 = plane_w - 1;
    if (rx1 < rx0) rx1 = rx0;
    if (ry0 < minrow) ry0 = minrow;
    if (ry0 > maxrow) ry0 = maxrow;
    if (ry1 > maxrow) ry1 = maxrow;
    if (ry1 < ry0) ry1 = ry0;
  end

  // ---------------------------------------------------------------- generator
  logic                busy;
  logic                g_rw, g_chroma;
  logic [1:0]          g_step;
  logic [C_W-4:0]      g_cx, g_cx0, g_cx1;   // 8-byte chunk index
  logic [C_W-1:0]      g_y, g_y1;
  logic [ROW_W-1:0]    g_base;

  logic [ROW_W-1:0] base_c;
  always_comb begin
    logic [7:0]     slot;
    logic [C_W-7:0] tiles2_y;
    slot     = req_rw ? poc_2 : poc_1;
    tiles2_y = req_chroma ? tiles2_y_c : tiles2_y_l;
    base_c   = ROW_W'(ROW_W'(slot) * ROW_W'(tiles2_y) * ROW_W'(tiles2_x));
  end

  assign req_ready = !busy;

  logic last_chunk, last_row;
  assign last_chunk = (g_cx == g_cx1);
  assign last_row   = (g_y + C_W'(g_step) > g_y1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      g_rw <= 1'b0; g_chroma <= 1'b0; g_step <= 2'd1;
      g_cx <= '0; g_cx0 <= '0; g_cx1 <= '0; g_y <= '0; g_y1 <= '0; g_base <= '0;
    end else if (!busy) begin
      if (req_valid) begin
        busy     <= 1'b1;
        g_rw     <= req_rw;
        g_chroma <= req_chroma;
        g_step   <= fstep;
        g_cx     <= (C_W-3)'(rx0 >>> 3);
        g_cx0    <= (C_W-3)'(rx0 >>> 3);
        g_cx1    <= (C_W-3)'(rx1 >>> 3);
        g_y      <= C_W'(ry0);
        g_y1     <= C_W'(ry1);
        g_base   <= base_c;
      end
    end else if (out_ready) begin
      if (!last_chunk) g_cx <= g_cx + 1'b1;
      else begin
        g_cx <= g_cx0;
        if (last_row) busy <= 1'b0;
        else g_y <= g_y + C_W'(g_step);
      end
    end
  end

  // address of the current chunk
  logic [C_W-7:0] tx, ty;
  assign tx = g_cx[C_W-4:3];
  assign ty = g_y[C_W-1:6];

  assign out_valid = busy;
  assign out_rw    = g_rw;
  assign out_mem   = {g_chroma, g_y[1]};
  assign out_bank  = {ty[0], tx[0]};
  assign out_row   = g_base + ROW_W'(ty[C_W-7:1]) * ROW_W'(tiles2_x) + ROW_W'(tx[C_W-7:1]);
  assign out_col   = COL_W'({g_y[5:2], g_y[0], g_cx[2:0], 1'b0});
  assign out_last  = busy && last_chunk && last_row;

endmodule
