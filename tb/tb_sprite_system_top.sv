// tb_sprite_system_top: end-to-end test of the sprite drawing system with
// image replacement, at the default sizes (640-pixel screen, 560 KB of
// internal memory divided into 17 slots of 128 x 64 pixels).
//
// 21 distinct sprite images, more than the internal memory holds, live in
// the external-memory model, cycling through the six evaluated sizes
// (32x32, 64x32, 32x64, 64x64, 128x64, 64x128).  The processor's part is
// played here: it first loads image 0, then for every k starts drawing
// image k and, in the same cycle, the DMA copy of image k+1 into the next
// slot, so replacement runs behind drawing; slots are reused once all 17
// are used.  Every drawing is compared pixel by pixel with a reference
// composition of the image and the background, with an untouched border.
// The first half runs with a memory that never stalls; the second
// half stalls all memory channels at random.  From the first half it
// checks that replacing an image is faster than drawing one of the same
// size, so it can be hidden behind the drawing.  It counts how often each
// mechanism happened and fails if one never did: transparent and opaque
// pixels, overlap of the two drawing stages, the first stage waiting for a
// line-buffer bank, read and write back-pressure, DMA writes during a
// drawing, hidden replacements and slot reuse.
module tb_sprite_system_top;
  import sprite_pkg::*;
  localparam int unsigned SCREEN_W = SCREEN_W_DEFAULT;
  localparam int unsigned SCREEN_H = 480;
  localparam int unsigned SLOT     = 128 * 64;
  localparam int unsigned N_SLOTS  = SPRITE_MEM_WORDS_DEFAULT / SLOT;   // 17
  localparam int unsigned N_IMG    = 21;
  localparam int unsigned MAW      = 21;
  localparam int unsigned BG       = 0;
  localparam int unsigned FG       = 1 << 19;
  localparam int unsigned IMG      = 1 << 20;
  localparam logic [31:0] FILL     = 32'h6600_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic      draw_start = 0, draw_busy, draw_done, dma_start = 0, dma_busy, dma_done;
  draw_cmd_t draw_cmd;
  dma_cmd_t  dma_cmd;
  logic      p1_rd_req_valid, p1_rd_req_ready, p1_rd_resp_valid, p1_rd_resp_ready;
  logic      p1_wr_valid, p1_wr_ready;
  logic      p2_rd_req_valid, p2_rd_req_ready, p2_rd_resp_valid, p2_rd_resp_ready;
  ext_addr_t p1_rd_req_addr, p1_wr_addr, p2_rd_req_addr;
  pixel_t    p1_rd_resp_data, p1_wr_data, p2_rd_resp_data;
  int        checks = 0, failures = 0;

  sprite_system_top u_dut (
    .clk, .rst_n,
    .draw_start, .draw_cmd, .draw_busy, .draw_done,
    .dma_start, .dma_cmd, .dma_busy, .dma_done,
    .p1_rd_req_valid, .p1_rd_req_ready, .p1_rd_req_addr,
    .p1_rd_resp_valid, .p1_rd_resp_ready, .p1_rd_resp_data,
    .p1_wr_valid, .p1_wr_ready, .p1_wr_addr, .p1_wr_data,
    .p2_rd_req_valid, .p2_rd_req_ready, .p2_rd_req_addr,
    .p2_rd_resp_valid, .p2_rd_resp_ready, .p2_rd_resp_data);

  ext_mem_model #(.AW(MAW), .LATENCY(8)) u_mem (
    .clk, .rst_n,
    .a_req_valid(p1_rd_req_valid), .a_req_ready(p1_rd_req_ready), .a_req_addr(p1_rd_req_addr),
    .a_resp_valid(p1_rd_resp_valid), .a_resp_ready(p1_rd_resp_ready), .a_resp_data(p1_rd_resp_data),
    .b_req_valid(p2_rd_req_valid), .b_req_ready(p2_rd_req_ready), .b_req_addr(p2_rd_req_addr),
    .b_resp_valid(p2_rd_resp_valid), .b_resp_ready(p2_rd_resp_ready), .b_resp_data(p2_rd_resp_data),
    .w_valid(p1_wr_valid), .w_ready(p1_wr_ready), .w_addr(p1_wr_addr), .w_data(p1_wr_data));

  // the six evaluated sprite sizes, width x height
  int sz_w [6] = '{32, 64, 32, 64, 128, 64};
  int sz_h [6] = '{32, 32, 64, 64, 64, 128};

  // mechanism counters
  int n_overlap = 0, n_bank_wait = 0, n_dma_during_draw = 0, n_hidden = 0;
  int n_transparent = 0, n_opaque = 0, n_slot_reuse = 0;
  int draw_time [6], dma_time [6];   // cycles per size, memory without stalls
  always @(posedge clk) begin
    if (p1_rd_resp_valid && p1_rd_resp_ready && p1_wr_valid) n_overlap++;
    if (u_dut.u_draw.s1_busy && !u_dut.u_draw.lb_free)       n_bank_wait++;
    if (u_dut.spr_we && draw_busy)                            n_dma_during_draw++;
  end

  task automatic check_picture(int k, int x, int y, int w, int h);
    int a, img;
    logic [31:0] s, e;
    img = IMG + k * SLOT;
    for (int r = y - 1; r <= y + h; r++)
      for (int c = x - 1; c <= x + w; c++) begin
        if (r < 0 || c < 0 || c >= int'(SCREEN_W) || r >= int'(SCREEN_H)) continue;
        a = r * SCREEN_W + c;
        if (r >= y && r < y + h && c >= x && c < x + w) begin
          s = u_mem.mem[img + (r - y) * w + (c - x)];
          if (s == 0) n_transparent++; else n_opaque++;
          e = (s != 0) ? s : u_mem.mem[BG + a];
        end else e = FILL | 32'(a);
        checks++;
        if (u_mem.mem[FG + a] !== e) begin
          failures++;
          if (failures < 10)
            $display("FAIL image %0d pixel (%0d,%0d): got %08x expected %08x",
                     k, c, r, u_mem.mem[FG + a], e);
        end
      end
  endtask

  // restore the processed picture around the last sprite for the next check
  task automatic clear_picture(int x, int y, int w, int h);
    for (int r = y - 1; r <= y + h; r++)
      for (int c = x - 1; c <= x + w; c++)
        if (r >= 0 && c >= 0 && c < int'(SCREEN_W) && r < int'(SCREEN_H))
          u_mem.mem[FG + r * SCREEN_W + c] = FILL | 32'(r * SCREEN_W + c);
  endtask

  function automatic dma_cmd_t replace_cmd(int k);
    return '{src: 32'(IMG + k * SLOT), dst: 32'((k % N_SLOTS) * SLOT),
             len: 32'(sz_w[k % 6] * sz_h[k % 6])};
  endfunction

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, w, h, t_draw, t_dma;
    bit dma_seen, draw_seen;
    for (int a = 0; a < int'(SCREEN_W * SCREEN_H); a++) begin
      u_mem.mem[BG + a] = $urandom | 32'h1;
      u_mem.mem[FG + a] = FILL | 32'(a);
    end
    for (int k = 0; k < int'(N_IMG); k++)
      for (int p = 0; p < int'(SLOT); p++)
        u_mem.mem[IMG + k * SLOT + p] = (($urandom % 3) == 0) ? 32'd0 : ($urandom | 32'h1);
    draw_cmd = '0;
    dma_cmd  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // image 0 before the first drawing
    dma_cmd = replace_cmd(0);
    dma_start = 1;
    @(negedge clk); dma_start = 0;
    while (!dma_done) @(negedge clk);

    for (int z = 0; z < 6; z++) begin draw_time[z] = 0; dma_time[z] = 1 << 30; end
    for (int k = 0; k < int'(N_IMG); k++) begin
      w = sz_w[k % 6];
      h = sz_h[k % 6];
      x = (k * 37) % (SCREEN_W - 128);
      y = (k * 23) % (SCREEN_H - 128);
      if (k == int'(N_IMG) / 2) begin
        u_mem.stall_pct = 30;
        $display("memory stalls switched on");
      end
      if (k + 1 >= int'(N_SLOTS)) n_slot_reuse++;
      draw_cmd = '{sp_ofst: 32'((k % N_SLOTS) * SLOT), x: 16'(x), y: 16'(y),
                   w: 16'(w), h: 16'(h), bg_base: 32'(BG), fg_base: 32'(FG)};
      draw_start = 1;
      if (k + 1 < int'(N_IMG)) begin
        dma_cmd   = replace_cmd(k + 1);
        dma_start = 1;
      end
      @(negedge clk);
      draw_start = 0;
      dma_start  = 0;
      t_draw = 1; t_dma = 1;
      draw_seen = 0; dma_seen = (k + 1 >= int'(N_IMG));
      while (!draw_seen || !dma_seen) begin
        if (draw_done) draw_seen = 1;
        if (dma_done)  dma_seen = 1;
        @(negedge clk);
        if (!draw_seen) t_draw++;
        if (!dma_seen)  t_dma++;
      end
      if (k + 1 < int'(N_IMG))
        $display("image %0d (%0dx%0d): drawing %0d cycles; replacement by image %0d (%0dx%0d): %0d cycles",
                 k, w, h, t_draw, k + 1, sz_w[(k + 1) % 6], sz_h[(k + 1) % 6], t_dma);
      else
        $display("image %0d (%0dx%0d): drawing %0d cycles", k, w, h, t_draw);
      if (u_mem.stall_pct == 0) begin
        draw_time[k % 6] = t_draw;
        if (k + 1 < int'(N_IMG)) dma_time[(k + 1) % 6] = t_dma;
      end
      check_picture(k, x, y, w, h);
      clear_picture(x, y, w, h);
    end

    // image replacement must be faster than drawing an image of the same size
    for (int z = 0; z < 6; z++) begin
      checks++;
      if (dma_time[z] < draw_time[z]) n_hidden++;
      else begin
        failures++;
        $display("FAIL %0dx%0d: replacement %0d cycles, drawing %0d cycles",
                 sz_w[z], sz_h[z], dma_time[z], draw_time[z]);
      end
      $display("%0dx%0d: drawing %0d cycles, replacement %0d cycles",
               sz_w[z], sz_h[z], draw_time[z], dma_time[z]);
    end
    $display("transparent %0d opaque %0d stage overlap %0d bank waits %0d",
             n_transparent, n_opaque, n_overlap, n_bank_wait);
    $display("read stalls %0d/%0d write stalls %0d dma during draw %0d hidden %0d slot reuse %0d",
             u_mem.a_stalls, u_mem.b_stalls, u_mem.w_stalls, n_dma_during_draw, n_hidden,
             n_slot_reuse);
    checks++;
    if (n_transparent == 0 || n_opaque == 0 || n_overlap == 0 || n_bank_wait == 0 ||
        u_mem.a_stalls == 0 || u_mem.b_stalls == 0 || u_mem.w_stalls == 0 ||
        n_dma_during_draw == 0 || n_hidden == 0 || n_slot_reuse == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
