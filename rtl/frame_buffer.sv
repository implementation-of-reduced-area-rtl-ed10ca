// frame_buffer: on-chip image memory holding one RGB frame.
//
// The frame is stored as two banks, one for even columns and one for odd
// columns, each WIDTH*HEIGHT/2 words of 24 bits (R, G, B). Pixel n of the
// raster (n = WIDTH*row + col) lives in bank n[0] at word n >> 1, so the
// pixels at col and col+1 of a row (col even) always share one word address
// and are read together: the read port returns a whole pixel pair per clock.
//
// Write port: one pixel per clock, wr_en/wr_addr (raster index)/wr_pix,
//   written on the rising edge.
// Read port: rd_en/rd_addr (pair index = raster index of the even pixel / 2),
//   rd_data is registered and valid one clock after rd_en (block-RAM style).
//   rd_data holds its value when rd_en is low.
// A raster memory indexed WIDTH*row + col that yields columns col and col+1
// together follows the source; the two-bank organisation, the synchronous
// read and the one-pixel write port are this design's choices. The memory
// has no reset, like a block RAM: a frame must be written before it is read.
module frame_buffer
  import img_pkg::*;
#(
  parameter int unsigned WIDTH  = 768,
  parameter int unsigned HEIGHT = 512,
  localparam int unsigned NPIX  = WIDTH * HEIGHT,
  localparam int unsigned NPAIR = NPIX / 2,
  localparam int unsigned AW    = $clog2(NPIX),
  localparam int unsigned PAW   = $clog2(NPAIR)
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [AW-1:0]  wr_addr,
  input  rgb_t           wr_pix,
  input  logic           rd_en,
  input  logic [PAW-1:0] rd_addr,
  output rgb_pair_t      rd_data
);

  rgb_t mem_even [NPAIR];
  rgb_t mem_odd  [NPAIR];

  logic [PAW-1:0] wr_word;
  assign wr_word = wr_addr[AW-1:1];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_addr[0]) mem_even[wr_word] <= wr_pix;
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr[0]) mem_odd[wr_word] <= wr_pix;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data.p0 <= mem_even[rd_addr];
      rd_data.p1 <= mem_odd[rd_addr];
    end
  end

  initial begin
    assert (WIDTH % 2 == 0) else $error("frame_buffer: WIDTH must be even");
  end

endmodule
