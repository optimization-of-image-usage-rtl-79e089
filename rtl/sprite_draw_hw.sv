// sprite_draw_hw: sprite drawing hardware with sprites in internal memory.
//
// It draws one sprite of w x h pixels at screen position (x, y): each pixel
// of the processed picture is the sprite pixel where that is non-zero and
// the background pixel where the sprite is transparent (zero).  Sprite
// pixels come from the internal memory, starting at word sp_ofst; the
// background and the processed picture are SCREEN_W-wide pixel arrays in
// external memory, the background read through bg and the result written
// through fg (read and write channel of the same external-memory port).
//
// Organisation: a row loop drives two stages that run concurrently as a
// dataflow pipeline.  draw_stage1 composes sprite row i into one bank of a
// ping-pong line buffer while draw_stage2 writes row i-1 from the other bank
// to external memory.  A stage stalls when the bank it needs is not ready.
// The two-stage split, the line buffer and the pixel rule follow the
// document; the ping-pong line buffer, the handshakes and the queue depths
// are this design's choices.
//
// Interface: start (one cycle, ignored while busy) begins a drawing with
// the arguments in cmd; busy stays high until done pulses, which is when
// the last pixel write has been accepted.  sp_ofst is truncated to SP_AW
// bits.  Latency per sprite, with a memory that takes one request per cycle
// and answers after L cycles: about h * (w + L + 1) + w cycles.
module sprite_draw_hw
  import sprite_pkg::*;
#(
  parameter int unsigned SCREEN_W    = SCREEN_W_DEFAULT,
  parameter int unsigned MAX_W       = MAX_SPRITE_WIDTH_DEFAULT,
  parameter int unsigned SP_AW       = $clog2(SPRITE_MEM_WORDS_DEFAULT),
  parameter int unsigned OUTSTANDING = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  draw_cmd_t        cmd,
  output logic             busy,
  output logic             done,
  // internal memory read port
  output logic             spr_rd_en,
  output logic [SP_AW-1:0] spr_rd_addr,
  input  pixel_t           spr_rd_data,
  // external memory port: background reads and processed-picture writes
  mem_rd_if.master         bg,
  mem_wr_if.master         fg
);
  localparam int unsigned IW = $clog2(MAX_W);

  logic          s1_busy, s1_done, s2_busy, s2_done, go;
  logic          lb_free, lb_wr_en, lb_commit, lb_avail, lb_rd_en, lb_release;
  logic [IW-1:0] lb_wr_idx, lb_rd_idx;
  pixel_t        lb_wr_data, lb_rd_data;

  assign busy = s1_busy || s2_busy;
  assign done = s2_done;
  assign go   = start && !busy;

  draw_stage1 #(.SCREEN_W(SCREEN_W), .MAX_W(MAX_W), .SP_AW(SP_AW),
                .OUTSTANDING(OUTSTANDING)) u_stage1 (
    .clk, .rst_n, .start(go), .cmd, .busy(s1_busy), .done(s1_done),
    .spr_rd_en, .spr_rd_addr, .spr_rd_data,
    .bg,
    .lb_free, .lb_wr_en, .lb_wr_idx, .lb_wr_data, .lb_commit
  );

  line_buffer #(.MAX_W(MAX_W)) u_line_buffer (
    .clk, .rst_n,
    .prod_free(lb_free), .prod_bank(),
    .wr_en(lb_wr_en), .wr_idx(lb_wr_idx), .wr_data(lb_wr_data),
    .prod_commit(lb_commit),
    .cons_avail(lb_avail), .cons_bank(),
    .rd_en(lb_rd_en), .rd_idx(lb_rd_idx), .rd_data(lb_rd_data),
    .cons_release(lb_release)
  );

  draw_stage2 #(.SCREEN_W(SCREEN_W), .MAX_W(MAX_W)) u_stage2 (
    .clk, .rst_n, .start(go), .cmd, .busy(s2_busy), .done(s2_done),
    .lb_avail, .lb_rd_en, .lb_rd_idx, .lb_rd_data, .lb_release,
    .fg
  );

  // The first stage always finishes before the second, never in the same
  // cycle (its last row still has to be written out).
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
    s2_done |-> !s1_busy && !s1_done) else $error("sprite_draw_hw: stage 2 ended before stage 1");
endmodule
