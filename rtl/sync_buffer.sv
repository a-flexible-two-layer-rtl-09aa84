// sync_buffer: synchronization buffer between DRAM and the decoder pipeline.
//
// Two SRAMs are used in turn.  While the data of one 8x8 stage arrive from the
// DRAMs and are written into the "fill" SRAM, the decoder reads the data of
// the previous stage from the other, "drain", SRAM; so DRAM access and video
// decoding overlap.  swap exchanges the two at a stage boundary and restarts
// the fill address at zero.
//
// Fill side: wr_en writes wr_data at the next sequential address; fill_count
// tells how many words the current stage has written.  Drain side: rd_addr is
// read with one clock of latency (synchronous SRAM read) into rd_data.
// A write past the end of the SRAM is dropped and raises the sticky overflow.
//
// The two-SRAM organization follows the document.  The size of each SRAM for
// the 8x8 granularity is not given there; 512 words of 32 bits (2 KB) is this
// design's choice.  It holds the worst-case read data of one 8x8 stage: two
// 13x13 luma regions for a B block (2 x 13 rows x 3 bursts x 2 words = 156
// words), their two chroma regions (2 x 5 rows x 3 bursts x 2 = 60) and the
// de-interlacer's 16x9 luma and 8x5 chroma field blocks (54 + 30), 300 words
// (280 in this memory map, where a chroma row of 10 bytes spans two bursts).
module sync_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic [AW:0]   fill_count,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic          overflow
);

  logic [W-1:0] sram0 [DEPTH];
  logic [W-1:0] sram1 [DEPTH];
  logic         fill_sel;          // SRAM being filled
  logic [AW:0]  wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_sel <= 1'b0;
      wptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (swap) begin
        fill_sel <= !fill_sel;
        wptr     <= '0;
      end else if (wr_en) begin
        if (wptr < (AW+1)'(DEPTH)) wptr <= wptr + 1'b1;
        else overflow <= 1'b1;
      end
    end
  end

  // SRAM 0
  always_ff @(posedge clk) begin
    if (wr_en && !swap && !fill_sel && wptr < (AW+1)'(DEPTH)) sram0[wptr[AW-1:0]] <= wr_data;
  end
  // SRAM 1
  always_ff @(posedge clk) begin
    if (wr_en && !swap && fill_sel && wptr < (AW+1)'(DEPTH)) sram1[wptr[AW-1:0]] <= wr_data;
  end

  logic [W-1:0] q0, q1;
  logic         rd_sel;
  always_ff @(posedge clk) begin
    q0 <= sram0[rd_addr];
    q1 <= sram1[rd_addr];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_sel <= 1'b1;
    else        rd_sel <= !fill_sel;
  end
  assign rd_data    = rd_sel ? q1 : q0;
  assign fill_count = wptr;

endmodule
