// tb_sprite_draw_hw: self-checking test of the complete sprite drawing
// hardware (both stages and the ping-pong line buffer) with the internal
// sprite memory and a model of the external memory.
// Each drawing is compared pixel by pixel with a reference composition
// worked out here: the sprite pixel where it is non-zero, the background
// elsewhere, and an untouched border around the sprite.  One case is a 4 x 4
// sprite at (2, 2) with a transparent pixel 0 and an opaque pixel 1, checked
// at named screen positions.  It also checks that the two stages really
// overlap (a background read returns in the same cycle as a picture write),
// that write back-pressure occurred, and the drawing time without stalls.
module tb_sprite_draw_hw;
  import sprite_pkg::*;
  localparam int unsigned SCREEN_W = 48;
  localparam int unsigned MAX_W    = 32;
  localparam int unsigned SP_AW    = 12;
  localparam int unsigned MAW      = 13;
  localparam int unsigned LAT      = 3;
  localparam int unsigned BG       = 0;
  localparam int unsigned FG       = 4096;
  localparam logic [31:0] FILL     = 32'h7700_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic             start = 0, busy, done, spr_rd_en;
  draw_cmd_t        cmd;
  logic [SP_AW-1:0] spr_rd_addr;
  pixel_t           spr_rd_data;
  int               checks = 0, failures = 0;

  mem_rd_if bg (.clk, .rst_n);
  mem_wr_if fg (.clk, .rst_n);

  sprite_draw_hw #(.SCREEN_W(SCREEN_W), .MAX_W(MAX_W), .SP_AW(SP_AW), .OUTSTANDING(8)) u_dut (
    .clk, .rst_n, .start, .cmd, .busy, .done, .spr_rd_en, .spr_rd_addr, .spr_rd_data,
    .bg, .fg);

  logic nc_we = 1'b0;
  sprite_ram #(.DEPTH(2**SP_AW)) u_ram (
    .clk, .rd_en(spr_rd_en), .rd_addr(spr_rd_addr), .rd_data(spr_rd_data),
    .we(nc_we), .wr_addr('0), .wr_data('0));

  logic        nc_b_req_ready, nc_b_resp_valid;
  logic [31:0] nc_b_resp_data;
  ext_mem_model #(.AW(MAW), .LATENCY(LAT)) u_mem (
    .clk, .rst_n,
    .a_req_valid(bg.req_valid), .a_req_ready(bg.req_ready), .a_req_addr(bg.req_addr),
    .a_resp_valid(bg.resp_valid), .a_resp_ready(bg.resp_ready), .a_resp_data(bg.resp_data),
    .b_req_valid(1'b0), .b_req_ready(nc_b_req_ready), .b_req_addr(32'd0),
    .b_resp_valid(nc_b_resp_valid), .b_resp_ready(1'b0), .b_resp_data(nc_b_resp_data),
    .w_valid(fg.valid), .w_ready(fg.ready), .w_addr(fg.addr), .w_data(fg.data));

  int overlap = 0, n_transparent = 0, n_opaque = 0;
  always @(posedge clk)
    if (bg.resp_valid && bg.resp_ready && fg.valid) overlap++;

  task automatic draw(int ofst, int x, int y, int w, int h, output int cycles,
                      input bit example = 0);
    for (int k = 0; k < 2**SP_AW; k++)
      u_ram.mem[k] = (($urandom % 3) == 0) ? 32'd0 : ($urandom | 32'h1);
    // worked example: a 4 x 4 sprite whose pixel 0 is transparent and whose
    // other pixels carry colours 0xC0000001..0xC000000F
    if (example)
      for (int k = 0; k < 16; k++) u_ram.mem[ofst + k] = (k == 0) ? 32'd0 : (32'hC000_0000 | 32'(k));
    for (int k = 0; k < 4096; k++) begin
      u_mem.mem[BG + k] = $urandom | 32'h1;
      u_mem.mem[FG + k] = FILL | 32'(k);
    end
    cmd = '{sp_ofst: 32'(ofst), x: 16'(x), y: 16'(y), w: 16'(w), h: 16'(h),
            bg_base: 32'(BG), fg_base: 32'(FG)};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    for (int r = y - 1; r <= y + h; r++)
      for (int c = x - 1; c <= x + w; c++) begin
        logic [31:0] e, s;
        int a;
        if (r < 0 || c < 0 || c >= SCREEN_W) continue;
        a = r * SCREEN_W + c;
        if (r >= y && r < y + h && c >= x && c < x + w) begin
          s = u_ram.mem[ofst + (r - y) * w + (c - x)];
          if (s == 0) n_transparent++; else n_opaque++;
          e = (s != 0) ? s : u_mem.mem[BG + a];
        end else e = FILL | 32'(a);
        checks++;
        if (u_mem.mem[FG + a] !== e) begin
          failures++;
          $display("FAIL pixel (%0d,%0d): got %08x expected %08x", c, r, u_mem.mem[FG + a], e);
        end
      end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    cmd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    draw(100, 4, 2, 32, 32, cyc);
    $display("32x32 sprite: %0d cycles", cyc);
    // per row: one cycle to claim a bank, w requests, the memory latency and
    // the hand-over; stage 2 adds the last row's writes
    checks++;
    if (cyc < 32 * 32 || cyc > 32 * (32 + LAT + 4) + 32 + 8) begin
      failures++;
      $display("FAIL drawing time %0d cycles out of range", cyc);
    end
    // 4 x 4 sprite at screen position (2, 2): the screen pixel under sprite
    // pixel 0 keeps the background, the one under pixel 1 gets its colour
    draw(50, 2, 2, 4, 4, cyc, 1);
    checks++;
    if (u_mem.mem[FG + 2 * SCREEN_W + 2] !== u_mem.mem[BG + 2 * SCREEN_W + 2] ||
        u_mem.mem[FG + 2 * SCREEN_W + 3] !== 32'hC000_0001 ||
        u_mem.mem[FG + 5 * SCREEN_W + 5] !== 32'hC000_000F) begin
      failures++;
      $display("FAIL worked example: (2,2)=%08x (3,2)=%08x (5,5)=%08x",
               u_mem.mem[FG + 2 * SCREEN_W + 2], u_mem.mem[FG + 2 * SCREEN_W + 3],
               u_mem.mem[FG + 5 * SCREEN_W + 5]);
    end
    draw(0, 0, 0, 1, 1, cyc);
    draw(7, 40, 10, 8, 20, cyc);
    u_mem.stall_pct = 45;
    draw(1000, 13, 30, 27, 11, cyc);
    draw(2000, 16, 5, 32, 9, cyc);
    checks++;
    if (overlap == 0 || n_transparent == 0 || n_opaque == 0 || u_mem.w_stalls == 0) begin
      failures++;
      $display("FAIL not exercised: overlap %0d transparent %0d opaque %0d write stalls %0d",
               overlap, n_transparent, n_opaque, u_mem.w_stalls);
    end
    $display("overlap %0d transparent %0d opaque %0d write stalls %0d",
             overlap, n_transparent, n_opaque, u_mem.w_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
