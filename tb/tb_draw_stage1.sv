// tb_draw_stage1: self-checking test of the first drawing stage.
// A sprite with about 40 % transparent (zero) pixels sits in a model of the
// internal memory; the background is random in the external-memory model.
// Every row the stage commits to the (modelled) line buffer is compared with
// the composition worked out here.  The line buffer model withholds its free
// bank at random after each row, and the memory model stalls requests at
// random in the second half.  Without stalls the drawing time is checked
// against one pixel per cycle plus a fixed per-row cost.
module tb_draw_stage1;
  import sprite_pkg::*;
  localparam int unsigned SCREEN_W = 40;
  localparam int unsigned MAX_W    = 16;
  localparam int unsigned SP_AW    = 10;
  localparam int unsigned LAT      = 3;
  localparam int unsigned IW       = $clog2(MAX_W);

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic             start = 0, busy, done;
  draw_cmd_t        cmd;
  logic             spr_rd_en;
  logic [SP_AW-1:0] spr_rd_addr;
  pixel_t           spr_rd_data;
  logic             lb_free, lb_wr_en, lb_commit;
  logic [IW-1:0]    lb_wr_idx;
  pixel_t           lb_wr_data;
  int               checks = 0, failures = 0;

  mem_rd_if bg (.clk, .rst_n);

  draw_stage1 #(.SCREEN_W(SCREEN_W), .MAX_W(MAX_W), .SP_AW(SP_AW), .OUTSTANDING(4)) u_dut (
    .clk, .rst_n, .start, .cmd, .busy, .done,
    .spr_rd_en, .spr_rd_addr, .spr_rd_data, .bg,
    .lb_free, .lb_wr_en, .lb_wr_idx, .lb_wr_data, .lb_commit);

  logic        nc_b_req_ready, nc_b_resp_valid, nc_w_ready;
  logic [31:0] nc_b_resp_data;
  ext_mem_model #(.AW(12), .LATENCY(LAT)) u_mem (
    .clk, .rst_n,
    .a_req_valid(bg.req_valid), .a_req_ready(bg.req_ready), .a_req_addr(bg.req_addr),
    .a_resp_valid(bg.resp_valid), .a_resp_ready(bg.resp_ready), .a_resp_data(bg.resp_data),
    .b_req_valid(1'b0), .b_req_ready(nc_b_req_ready), .b_req_addr(32'd0),
    .b_resp_valid(nc_b_resp_valid), .b_resp_ready(1'b0), .b_resp_data(nc_b_resp_data),
    .w_valid(1'b0), .w_ready(nc_w_ready), .w_addr(32'd0), .w_data(32'd0));

  // internal memory model, one cycle of read latency
  pixel_t spr [2**SP_AW];
  always_ff @(posedge clk) if (spr_rd_en) spr_rd_data <= spr[spr_rd_addr];

  // line buffer model: captures the row; after a commit the bank may stay
  // busy for a few cycles
  pixel_t row [MAX_W];
  int     block_cnt = 0, max_block = 0, bank_waits = 0, rows_seen = 0;
  assign lb_free = (block_cnt == 0);
  always @(posedge clk) begin
    if (lb_wr_en) row[lb_wr_idx] = lb_wr_data;
    if (lb_commit) begin
      check_row(rows_seen);
      rows_seen++;
      block_cnt = (max_block > 0) ? int'($urandom % max_block) : 0;
    end else if (block_cnt > 0) block_cnt--;
    if (u_dut.state == 2'd1 /* S_WAIT_BANK */ && !lb_free) bank_waits++;
  end

  int n_transparent = 0, n_opaque = 0;
  task automatic check_row(int i);
    for (int j = 0; j < int'(cmd.w); j++) begin
      pixel_t s, b, e;
      s = spr[SP_AW'(cmd.sp_ofst + 32'(i) * cmd.w + 32'(j))];
      b = u_mem.mem[12'(cmd.bg_base + (32'(cmd.y) + 32'(i)) * SCREEN_W + 32'(cmd.x) + 32'(j))];
      e = (s != 0) ? s : b;
      if (s == 0) n_transparent++; else n_opaque++;
      checks++;
      if (row[j] !== e) begin
        failures++;
        $display("FAIL row %0d pixel %0d: got %08x expected %08x", i, j, row[j], e);
      end
    end
  endtask

  task automatic draw(int ofst, int x, int y, int w, int h, output int cycles);
    cmd = '{sp_ofst: 32'(ofst), x: 16'(x), y: 16'(y), w: 16'(w), h: 16'(h),
            bg_base: 32'd100, fg_base: 32'd0};
    rows_seen = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (rows_seen != ((w == 0) ? 0 : h)) begin
      failures++;
      $display("FAIL rows committed %0d expected %0d", rows_seen, h);
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
    for (int k = 0; k < 2**SP_AW; k++) spr[k] = (($urandom % 10) < 4) ? 32'd0 : $urandom | 32'h1;
    for (int k = 0; k < 2**12; k++) u_mem.mem[k] = $urandom | 32'h1;
    cmd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // full-width sprite, no stalls: check the rate
    draw(7, 3, 2, 16, 6, cyc);
    $display("16x6 sprite: %0d cycles", cyc);
    checks++;
    if (cyc < 6 * 16 || cyc > 6 * (16 + LAT + 4) + 2) begin
      failures++;
      $display("FAIL drawing time %0d cycles out of range", cyc);
    end
    draw(300, 0, 0, 1, 3, cyc);
    draw(40, 20, 5, 9, 4, cyc);
    // back-pressure from memory and from the line buffer
    u_mem.stall_pct = 35;
    max_block = 12;
    draw(500, 11, 1, 13, 7, cyc);
    draw(2, 24, 9, 16, 5, cyc);
    // empty command finishes at once
    draw(0, 0, 0, 0, 4, cyc);
    checks++;
    if (cyc > 2) begin failures++; $display("FAIL empty command took %0d cycles", cyc); end
    checks++;
    if (n_transparent == 0 || n_opaque == 0 || bank_waits == 0 || u_mem.a_stalls == 0) begin
      failures++;
      $display("FAIL not exercised: transparent %0d opaque %0d bank waits %0d mem stalls %0d",
               n_transparent, n_opaque, bank_waits, u_mem.a_stalls);
    end
    $display("transparent %0d opaque %0d bank waits %0d mem stalls %0d",
             n_transparent, n_opaque, bank_waits, u_mem.a_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
