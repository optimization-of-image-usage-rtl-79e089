// draw_stage1: first stage of the sprite drawing hardware (compose a row).
//
// For every pixel j of sprite row i it reads the sprite pixel from internal
// memory at sp_ofst + i*w + j and the background pixel from external memory
// at bg_base + (y+i)*SCREEN_W + x + j.  A non-zero sprite pixel is written to
// the line buffer; a zero (transparent) one is replaced by the background
// pixel.  A completed row is handed to the second stage through the line
// buffer's ping-pong banks; the stage waits while both banks are full.
//
// Pipelining: background reads are issued back to back, up to OUTSTANDING of
// them in flight.  The sprite pixel for a request is read from internal
// memory in the same cycle the request is accepted and queued, so that it
// meets its background pixel when the in-order response returns.  With a
// memory that accepts a request and returns a response every cycle the row
// runs at one pixel per clock; between rows the pipe drains (the row loop
// itself is not overlapped, only the two stages are).
//
// Interface: start (one cycle, ignored while busy) latches cmd; done pulses
// in the cycle the last row is committed.  w and h must be at least 1 and w
// at most MAX_W; a command with w or h of zero finishes at once.  The
// fg_base field of cmd belongs to the second stage and is not used here.
// The pixel rule and address formulas follow the document; the handshakes,
// the queueing and the row hand-over are this design's choices.
module draw_stage1
  import sprite_pkg::*;
#(
  parameter int unsigned SCREEN_W    = SCREEN_W_DEFAULT,
  parameter int unsigned MAX_W       = MAX_SPRITE_WIDTH_DEFAULT,
  parameter int unsigned SP_AW       = $clog2(SPRITE_MEM_WORDS_DEFAULT),
  parameter int unsigned OUTSTANDING = 16,
  parameter int unsigned IW          = $clog2(MAX_W)
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
  // background reads from external memory
  mem_rd_if.master         bg,
  // line buffer, producer side
  input  logic             lb_free,
  output logic             lb_wr_en,
  output logic [IW-1:0]    lb_wr_idx,
  output pixel_t           lb_wr_data,
  output logic             lb_commit
);
  localparam int unsigned CW = $clog2(OUTSTANDING + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_BANK, S_ROW} state_t;
  state_t state;

  coord_t      w_q, h_q, row_q;
  coord_t      j_req, j_wr;
  ext_addr_t   bg_row;        // address of pixel 0 of the row in the background
  logic [31:0] sp_row;        // address of pixel 0 of the row in internal memory
  logic        inflight;      // internal-memory read issued last cycle

  logic          q_push, q_pop, q_empty;
  logic [CW-1:0] q_count;
  pixel_t        q_sp;
  logic          req_fire, resp_fire, last_pix;

  // Queue of sprite pixels waiting for their background pixel.
  sync_fifo #(.WIDTH(PIX_W), .DEPTH(OUTSTANDING)) u_spq (
    .clk, .rst_n,
    .push(q_push), .wr_data(spr_rd_data),
    .pop(q_pop), .rd_data(q_sp),
    .empty(q_empty), .full(), .count(q_count)
  );

  // A request may be issued while the queue has room for its sprite pixel.
  always_comb begin
    bg.resp_ready = (state == S_ROW) && !q_empty;
    resp_fire     = bg.resp_valid && bg.resp_ready;
    q_pop         = resp_fire;
    bg.req_valid = (state == S_ROW) && (j_req < w_q) &&
                   ((32'(q_count) + 32'(inflight) - 32'(q_pop)) < OUTSTANDING);
    bg.req_addr  = bg_row + EXT_AW'(j_req);
    req_fire     = bg.req_valid && bg.req_ready;

    spr_rd_en    = req_fire;
    spr_rd_addr  = SP_AW'(sp_row + 32'(j_req));
    q_push       = inflight;

    lb_wr_en   = resp_fire;
    lb_wr_idx  = IW'(j_wr);
    lb_wr_data = (q_sp != '0) ? q_sp : bg.resp_data;   // transparent -> background
    last_pix   = resp_fire && (j_wr == w_q - 1'b1);
    lb_commit  = last_pix;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      w_q      <= '0;
      h_q      <= '0;
      row_q    <= '0;
      j_req    <= '0;
      j_wr     <= '0;
      bg_row   <= '0;
      sp_row   <= '0;
      inflight <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      inflight <= req_fire;
      unique case (state)
        S_IDLE: if (start) begin
          w_q    <= cmd.w;
          h_q    <= cmd.h;
          row_q  <= '0;
          bg_row <= cmd.bg_base + EXT_AW'(cmd.y) * EXT_AW'(SCREEN_W) + EXT_AW'(cmd.x);
          sp_row <= cmd.sp_ofst;
          if (cmd.w == '0 || cmd.h == '0) done  <= 1'b1;
          else                            state <= S_WAIT_BANK;
        end
        S_WAIT_BANK: if (lb_free) begin
          j_req <= '0;
          j_wr  <= '0;
          state <= S_ROW;
        end
        S_ROW: begin
          if (req_fire)  j_req <= j_req + 1'b1;
          if (resp_fire) j_wr  <= j_wr + 1'b1;
          if (last_pix) begin
            row_q  <= row_q + 1'b1;
            bg_row <= bg_row + EXT_AW'(SCREEN_W);
            sp_row <= sp_row + 32'(w_q);
            if (row_q == h_q - 1'b1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_WAIT_BANK;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_width: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_IDLE && start |-> 32'(cmd.w) <= MAX_W)
    else $error("draw_stage1: sprite wider than the line buffer");
endmodule
