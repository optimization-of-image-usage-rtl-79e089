// sprite_pkg: types and constants shared by the sprite drawing system.
//
// Pixels are 32-bit words and a pixel value of zero means "transparent"
// (no colour data), as in the drawing algorithm: a non-zero sprite pixel is
// drawn, a zero one lets the background through.  External memory is
// addressed in 32-bit words; the three pictures in it (background, processed
// picture, sprite images) are plain arrays of pixels, a screen row being
// SCREEN_W pixels.  Coordinates and sizes are 16-bit, as in the drawing
// routine's argument list.  The screen width and the widest sprite are this
// design's choices (640 pixels, 128 pixels: the widest sprite evaluated).
// The internal memory size, 560 KB, is that of the evaluated FPGA.
package sprite_pkg;

  localparam int unsigned PIX_W        = 32;   // bits per pixel word
  localparam int unsigned EXT_AW       = 32;   // external word address width
  localparam int unsigned COORD_W      = 16;   // x, y, w, h

  // Defaults of the parameters of the modules.
  localparam int unsigned SCREEN_W_DEFAULT         = 640;
  localparam int unsigned MAX_SPRITE_WIDTH_DEFAULT = 128;
  // 560 KB of internal memory in 32-bit words: 560 * 1024 / 4.
  localparam int unsigned SPRITE_MEM_WORDS_DEFAULT = 143360;

  typedef logic [PIX_W-1:0]   pixel_t;
  typedef logic [EXT_AW-1:0]  ext_addr_t;
  typedef logic [COORD_W-1:0] coord_t;

  // One sprite drawing command: the arguments of the drawing routine.
  typedef struct packed {
    logic [31:0] sp_ofst;   // first word of the sprite image in internal memory
    coord_t      x;         // screen column of the sprite's left edge
    coord_t      y;         // screen row of the sprite's top edge
    coord_t      w;         // sprite width in pixels (1..MAX_SPRITE_WIDTH)
    coord_t      h;         // sprite height in pixels (>= 1)
    ext_addr_t   bg_base;   // word address of the background picture
    ext_addr_t   fg_base;   // word address of the processed picture
  } draw_cmd_t;

  // One image replacement command for the DMA controller.
  typedef struct packed {
    ext_addr_t   src;       // word address of the image in external memory
    logic [31:0] dst;       // first word in internal memory
    logic [31:0] len;       // number of words to copy (>= 1)
  } dma_cmd_t;

endpackage
