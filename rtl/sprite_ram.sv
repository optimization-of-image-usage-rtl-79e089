// sprite_ram: the FPGA internal memory that holds the sprite images.
//
// Several sprite images are stored side by side as arrays of 32-bit pixels;
// the drawing hardware addresses an image by its first word (the sprite
// offset).  The memory has one read port, used by the drawing hardware, and
// one write port, used by the DMA controller that replaces images, so that
// an image can be replaced while another one is being drawn.
//
// Timing: a read issued with rd_en at one clock edge returns rd_data after
// that edge (one-cycle latency, block-RAM style); rd_data holds its value
// when rd_en is low.  A write happens at the clock edge with we high.  A read
// of the word written in the same cycle returns the old contents.  Writes at
// or beyond DEPTH are dropped.
//
// The default size is the 560 KB of internal memory of the evaluated FPGA,
// i.e. 143360 words, room for 17 images of 128 x 64 pixels.  The two-port
// organisation is this design's choice; the document shows both the drawing
// hardware and the DMA controller connected to the memory.
module sprite_ram #(
  parameter int unsigned DEPTH = sprite_pkg::SPRITE_MEM_WORDS_DEFAULT,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  // read port (drawing hardware)
  input  logic                    rd_en,
  input  logic [AW-1:0]           rd_addr,
  output sprite_pkg::pixel_t      rd_data,
  // write port (DMA controller)
  input  logic                    we,
  input  logic [AW-1:0]           wr_addr,
  input  sprite_pkg::pixel_t      wr_data
);
  sprite_pkg::pixel_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (we && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end
endmodule
