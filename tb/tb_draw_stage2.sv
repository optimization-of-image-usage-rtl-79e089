// tb_draw_stage2: self-checking test of the second drawing stage.
// A model of the line buffer offers rows (at random moments in the second
// half) and answers reads one cycle late; the stage writes them into the
// external-memory model, whose write channel stalls at random in the second
// half.  Afterwards the picture is compared word by word, including a
// border around the sprite that must stay untouched.  Without stalls the
// time is checked against one pixel per cycle plus a fixed per-row cost.
module tb_draw_stage2;
  import sprite_pkg::*;
  localparam int unsigned SCREEN_W = 40;
  localparam int unsigned MAX_W    = 16;
  localparam int unsigned IW       = $clog2(MAX_W);
  localparam int unsigned MAW      = 12;
  localparam logic [31:0] FILL     = 32'h5A5A_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic          start = 0, busy, done;
  draw_cmd_t     cmd;
  logic          lb_avail, lb_rd_en, lb_release;
  logic [IW-1:0] lb_rd_idx;
  pixel_t        lb_rd_data;
  int            checks = 0, failures = 0;

  mem_wr_if fg (.clk, .rst_n);

  draw_stage2 #(.SCREEN_W(SCREEN_W), .MAX_W(MAX_W)) u_dut (
    .clk, .rst_n, .start, .cmd, .busy, .done,
    .lb_avail, .lb_rd_en, .lb_rd_idx, .lb_rd_data, .lb_release, .fg);

  logic        nc_a_req_ready, nc_a_resp_valid, nc_b_req_ready, nc_b_resp_valid;
  logic [31:0] nc_a_resp_data, nc_b_resp_data;
  ext_mem_model #(.AW(MAW)) u_mem (
    .clk, .rst_n,
    .a_req_valid(1'b0), .a_req_ready(nc_a_req_ready), .a_req_addr(32'd0),
    .a_resp_valid(nc_a_resp_valid), .a_resp_ready(1'b0), .a_resp_data(nc_a_resp_data),
    .b_req_valid(1'b0), .b_req_ready(nc_b_req_ready), .b_req_addr(32'd0),
    .b_resp_valid(nc_b_resp_valid), .b_resp_ready(1'b0), .b_resp_data(nc_b_resp_data),
    .w_valid(fg.valid), .w_ready(fg.ready), .w_addr(fg.addr), .w_data(fg.data));

  // line buffer model: rows[i] is the content of sprite row i
  pixel_t rows [64][MAX_W];
  int     rows_offered = 0, rows_taken = 0, delay = 0, max_delay = 0, row_waits = 0;
  assign lb_avail = (rows_taken < rows_offered);
  always_ff @(posedge clk) if (lb_rd_en) lb_rd_data <= rows[rows_taken][lb_rd_idx];
  always @(posedge clk) begin
    if (lb_release) rows_taken++;
    if (busy && !lb_avail) row_waits++;
    if (rows_offered < int'(cmd.h) && (rows_offered - rows_taken) < ((max_delay > 0) ? 1 : 2)) begin
      if (delay == 0) begin
        rows_offered++;
        delay = (max_delay > 0) ? int'($urandom % max_delay) : 0;
      end else delay--;
    end
  end

  task automatic draw(int x, int y, int w, int h, int fg_base, output int cycles);
    for (int i = 0; i < h; i++)
      for (int j = 0; j < MAX_W; j++) rows[i][j] = $urandom;
    for (int k = 0; k < 2**MAW; k++) u_mem.mem[k] = FILL | 32'(k);
    cmd = '{sp_ofst: 32'd0, x: 16'(x), y: 16'(y), w: 16'(w), h: 16'(h),
            bg_base: 32'd0, fg_base: 32'(fg_base)};
    @(negedge clk);
    rows_offered = 0; rows_taken = 0; delay = 0;
    start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    for (int r = y - 1; r <= y + h; r++)
      for (int c = x - 1; c <= x + w; c++) begin
        int a;
        logic [31:0] e;
        if (r < 0 || c < 0 || c >= SCREEN_W) continue;
        a = fg_base + r * SCREEN_W + c;
        e = (r >= y && r < y + h && c >= x && c < x + w) ? rows[r - y][c - x] : (FILL | 32'(a));
        checks++;
        if (u_mem.mem[a] !== e) begin
          failures++;
          $display("FAIL picture (%0d,%0d): got %08x expected %08x", c, r, u_mem.mem[a], e);
        end
      end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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
    draw(5, 3, 16, 6, 200, cyc);
    $display("16x6 row writes: %0d cycles", cyc);
    checks++;
    if (cyc < 6 * 16 || cyc > 6 * (16 + 4) + 2) begin
      failures++;
      $display("FAIL write time %0d cycles out of range", cyc);
    end
    draw(0, 0, 1, 4, 0, cyc);
    u_mem.stall_pct = 40;
    max_delay = 15;
    draw(20, 7, 13, 9, 333, cyc);
    draw(24, 2, 16, 3, 40, cyc);
    checks++;
    if (u_mem.w_stalls == 0 || row_waits == 0) begin
      failures++;
      $display("FAIL not exercised: write stalls %0d row waits %0d", u_mem.w_stalls, row_waits);
    end
    $display("write stalls %0d row waits %0d", u_mem.w_stalls, row_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
