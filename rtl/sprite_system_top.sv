// sprite_system_top: sprite drawing with background image replacement.
//
// The sprite drawing hardware reads its sprites from FPGA internal memory,
// which is fast but small (560 KB: 17 images of 128 x 64 pixels).  To use
// more images than fit, a DMA controller copies the next needed image from
// external memory into an unused part of the internal memory while the
// current sprite is being drawn, so the replacement time hides behind the
// drawing time.  This top holds the drawing hardware (sprite_draw_hw), the
// internal memory (sprite_ram) and the DMA controller (dmac).
//
// External connections:
//  * port 1 of the external-memory interface: read channel (p1_rd_*) for
//    background pixels and write channel (p1_wr_*) for the processed picture;
//  * port 2: read channel (p2_rd_*) for the DMA controller;
//  * command inputs of the processor: draw_start/draw_cmd and
//    dma_start/dma_cmd, with busy/done outputs for each.
// Read channels: a request moves on req_valid && req_ready, responses come
// back in order and move on resp_valid && resp_ready.  Write channel: a
// write moves on wr_valid && wr_ready.
//
// Which part of the internal memory is free is up to the software: an
// assertion flags a DMA write into the image being drawn.  The organisation
// follows the document's hardware-based replacement system; port widths,
// handshakes and command formats are this design's choices.
module sprite_system_top
  import sprite_pkg::*;
#(
  parameter int unsigned SCREEN_W    = SCREEN_W_DEFAULT,
  parameter int unsigned MAX_W       = MAX_SPRITE_WIDTH_DEFAULT,
  parameter int unsigned MEM_WORDS   = SPRITE_MEM_WORDS_DEFAULT,
  parameter int unsigned OUTSTANDING = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  // drawing command
  input  logic      draw_start,
  input  draw_cmd_t draw_cmd,
  output logic      draw_busy,
  output logic      draw_done,
  // image replacement command
  input  logic      dma_start,
  input  dma_cmd_t  dma_cmd,
  output logic      dma_busy,
  output logic      dma_done,
  // external memory port 1, read channel (background)
  output logic      p1_rd_req_valid,
  input  logic      p1_rd_req_ready,
  output ext_addr_t p1_rd_req_addr,
  input  logic      p1_rd_resp_valid,
  output logic      p1_rd_resp_ready,
  input  pixel_t    p1_rd_resp_data,
  // external memory port 1, write channel (processed picture)
  output logic      p1_wr_valid,
  input  logic      p1_wr_ready,
  output ext_addr_t p1_wr_addr,
  output pixel_t    p1_wr_data,
  // external memory port 2, read channel (DMA controller)
  output logic      p2_rd_req_valid,
  input  logic      p2_rd_req_ready,
  output ext_addr_t p2_rd_req_addr,
  input  logic      p2_rd_resp_valid,
  output logic      p2_rd_resp_ready,
  input  pixel_t    p2_rd_resp_data
);
  localparam int unsigned SP_AW = $clog2(MEM_WORDS);

  mem_rd_if bg_if  (.clk, .rst_n);
  mem_wr_if fg_if  (.clk, .rst_n);
  mem_rd_if dma_if (.clk, .rst_n);

  assign p1_rd_req_valid    = bg_if.req_valid;
  assign p1_rd_req_addr     = bg_if.req_addr;
  assign p1_rd_resp_ready   = bg_if.resp_ready;
  assign bg_if.req_ready    = p1_rd_req_ready;
  assign bg_if.resp_valid   = p1_rd_resp_valid;
  assign bg_if.resp_data    = p1_rd_resp_data;

  assign p1_wr_valid        = fg_if.valid;
  assign p1_wr_addr         = fg_if.addr;
  assign p1_wr_data         = fg_if.data;
  assign fg_if.ready        = p1_wr_ready;

  assign p2_rd_req_valid    = dma_if.req_valid;
  assign p2_rd_req_addr     = dma_if.req_addr;
  assign p2_rd_resp_ready   = dma_if.resp_ready;
  assign dma_if.req_ready   = p2_rd_req_ready;
  assign dma_if.resp_valid  = p2_rd_resp_valid;
  assign dma_if.resp_data   = p2_rd_resp_data;

  logic             spr_rd_en, spr_we;
  logic [SP_AW-1:0] spr_rd_addr, spr_wr_addr;
  pixel_t           spr_rd_data, spr_wr_data;

  sprite_draw_hw #(.SCREEN_W(SCREEN_W), .MAX_W(MAX_W), .SP_AW(SP_AW),
                   .OUTSTANDING(OUTSTANDING)) u_draw (
    .clk, .rst_n,
    .start(draw_start), .cmd(draw_cmd), .busy(draw_busy), .done(draw_done),
    .spr_rd_en, .spr_rd_addr, .spr_rd_data,
    .bg(bg_if), .fg(fg_if)
  );

  sprite_ram #(.DEPTH(MEM_WORDS)) u_sprite_ram (
    .clk,
    .rd_en(spr_rd_en), .rd_addr(spr_rd_addr), .rd_data(spr_rd_data),
    .we(spr_we), .wr_addr(spr_wr_addr), .wr_data(spr_wr_data)
  );

  dmac #(.SP_AW(SP_AW)) u_dmac (
    .clk, .rst_n,
    .start(dma_start), .cmd(dma_cmd), .busy(dma_busy), .done(dma_done),
    .src(dma_if),
    .spr_we, .spr_wr_addr, .spr_wr_data
  );

  // Region of internal memory in use by the drawing in progress.
  logic [31:0] draw_lo, draw_hi;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draw_lo <= '0;
      draw_hi <= '0;
    end else if (draw_start && !draw_busy) begin
      draw_lo <= draw_cmd.sp_ofst;
      draw_hi <= draw_cmd.sp_ofst + 32'(draw_cmd.w) * 32'(draw_cmd.h);
    end
  end

  a_replace_unused: assert property (@(posedge clk) disable iff (!rst_n)
    spr_we && draw_busy |-> (32'(spr_wr_addr) < draw_lo) || (32'(spr_wr_addr) >= draw_hi))
    else $error("sprite_system_top: image replaced while it is being drawn");
endmodule
