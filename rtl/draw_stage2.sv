// draw_stage2: second stage of the sprite drawing hardware (write a row).
//
// For every completed row i in the line buffer it writes pixel j to the
// processed picture in external memory at fg_base + (y+i)*SCREEN_W + x + j,
// then releases the line-buffer bank to the first stage.  It runs at the
// same time as the first stage, one row behind it.
//
// Pipelining: line-buffer reads have one cycle of latency, so read data goes
// through a two-entry queue in front of the write channel; a read is issued
// while the queue (counting the read in flight and the entry leaving this
// cycle) has room.  With a write channel that is always ready the row is
// written at one pixel per clock.
//
// Interface: start (one cycle, ignored while busy) latches cmd; done pulses
// in the cycle the last write of the last row is accepted.  Only x, y, w, h
// and fg_base of cmd are used here; the rest belongs to the first stage.  The address
// formula follows the document; the rest is this design's choice.
module draw_stage2
  import sprite_pkg::*;
#(
  parameter int unsigned SCREEN_W = SCREEN_W_DEFAULT,
  parameter int unsigned MAX_W    = MAX_SPRITE_WIDTH_DEFAULT,
  parameter int unsigned IW       = $clog2(MAX_W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  draw_cmd_t     cmd,
  output logic          busy,
  output logic          done,
  // line buffer, consumer side
  input  logic          lb_avail,
  output logic          lb_rd_en,
  output logic [IW-1:0] lb_rd_idx,
  input  pixel_t        lb_rd_data,
  output logic          lb_release,
  // processed-picture writes to external memory
  mem_wr_if.master      fg
);
  localparam int unsigned QD = 2;

  typedef enum logic [1:0] {S_IDLE, S_WAIT_ROW, S_ROW} state_t;
  state_t state;

  coord_t    w_q, h_q, row_q;
  coord_t    j_rd, j_wr;
  ext_addr_t fg_row;
  logic      inflight;

  logic       q_pop, q_empty;
  logic [1:0] q_count;
  logic       wr_fire, last_pix;

  sync_fifo #(.WIDTH(PIX_W), .DEPTH(QD)) u_outq (
    .clk, .rst_n,
    .push(inflight), .wr_data(lb_rd_data),
    .pop(q_pop), .rd_data(fg.data),
    .empty(q_empty), .full(), .count(q_count)
  );

  always_comb begin
    fg.valid   = (state == S_ROW) && !q_empty;
    fg.addr    = fg_row + EXT_AW'(j_wr);
    wr_fire    = fg.valid && fg.ready;
    q_pop      = wr_fire;
    lb_rd_en   = (state == S_ROW) && (j_rd < w_q) &&
                 ((32'(q_count) + 32'(inflight) - 32'(q_pop)) < QD);
    lb_rd_idx  = IW'(j_rd);
    last_pix   = wr_fire && (j_wr == w_q - 1'b1);
    lb_release = last_pix;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      w_q      <= '0;
      h_q      <= '0;
      row_q    <= '0;
      j_rd     <= '0;
      j_wr     <= '0;
      fg_row   <= '0;
      inflight <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      inflight <= lb_rd_en;
      unique case (state)
        S_IDLE: if (start) begin
          w_q    <= cmd.w;
          h_q    <= cmd.h;
          row_q  <= '0;
          fg_row <= cmd.fg_base + EXT_AW'(cmd.y) * EXT_AW'(SCREEN_W) + EXT_AW'(cmd.x);
          if (cmd.w == '0 || cmd.h == '0) done  <= 1'b1;
          else                            state <= S_WAIT_ROW;
        end
        S_WAIT_ROW: if (lb_avail) begin
          j_rd  <= '0;
          j_wr  <= '0;
          state <= S_ROW;
        end
        S_ROW: begin
          if (lb_rd_en) j_rd <= j_rd + 1'b1;
          if (wr_fire)  j_wr <= j_wr + 1'b1;
          if (last_pix) begin
            row_q  <= row_q + 1'b1;
            fg_row <= fg_row + EXT_AW'(SCREEN_W);
            if (row_q == h_q - 1'b1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_WAIT_ROW;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
