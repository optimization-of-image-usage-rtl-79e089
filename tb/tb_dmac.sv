// tb_dmac: self-checking test of the image replacement DMA controller.
// Copies images of several lengths from the external-memory model into a
// model of the internal memory and compares every word, plus one word on
// each side that must stay untouched.  Without stalls the copy time is
// checked against one word per cycle plus the memory latency; then the
// memory stalls requests at random.
module tb_dmac;
  import sprite_pkg::*;
  localparam int unsigned SP_AW = 12;
  localparam int unsigned LAT   = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic             start = 0, busy, done, spr_we;
  dma_cmd_t         cmd;
  logic [SP_AW-1:0] spr_wr_addr;
  pixel_t           spr_wr_data;
  int               checks = 0, failures = 0;

  mem_rd_if src (.clk, .rst_n);

  dmac #(.SP_AW(SP_AW)) u_dut (.clk, .rst_n, .start, .cmd, .busy, .done, .src,
                               .spr_we, .spr_wr_addr, .spr_wr_data);

  logic        nc_b_req_ready, nc_b_resp_valid, nc_w_ready;
  logic [31:0] nc_b_resp_data;
  ext_mem_model #(.AW(14), .LATENCY(LAT)) u_mem (
    .clk, .rst_n,
    .a_req_valid(src.req_valid), .a_req_ready(src.req_ready), .a_req_addr(src.req_addr),
    .a_resp_valid(src.resp_valid), .a_resp_ready(src.resp_ready), .a_resp_data(src.resp_data),
    .b_req_valid(1'b0), .b_req_ready(nc_b_req_ready), .b_req_addr(32'd0),
    .b_resp_valid(nc_b_resp_valid), .b_resp_ready(1'b0), .b_resp_data(nc_b_resp_data),
    .w_valid(1'b0), .w_ready(nc_w_ready), .w_addr(32'd0), .w_data(32'd0));

  pixel_t spr [2**SP_AW];
  always_ff @(posedge clk) if (spr_we) spr[spr_wr_addr] <= spr_wr_data;

  task automatic copy(int s, int d, int n, output int cycles);
    for (int k = 0; k < 2**SP_AW; k++) spr[k] = 32'hEEEE_0000 | 32'(k);
    cmd = '{src: 32'(s), dst: 32'(d), len: 32'(n)};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    for (int k = d - 1; k <= d + n; k++) begin
      logic [31:0] e;
      if (k < 0 || k >= 2**SP_AW) continue;
      e = (k >= d && k < d + n) ? u_mem.mem[s + k - d] : (32'hEEEE_0000 | 32'(k));
      checks++;
      if (spr[k] !== e) begin
        failures++;
        $display("FAIL word %0d: got %08x expected %08x", k, spr[k], e);
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
    for (int k = 0; k < 2**14; k++) u_mem.mem[k] = $urandom;
    cmd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    copy(1000, 0, 1024, cyc);      // a 32 x 32 image
    $display("1024-word copy: %0d cycles", cyc);
    checks++;
    if (cyc < 1024 || cyc > 1024 + LAT + 4) begin
      failures++;
      $display("FAIL copy time %0d cycles, expected about one word per cycle", cyc);
    end
    copy(5, 2048, 1, cyc);
    copy(9000, 1500, 777, cyc);
    u_mem.stall_pct = 50;
    copy(3333, 100, 2048, cyc);    // a 64 x 32 image
    copy(0, 3000, 0, cyc);         // empty command
    checks++;
    if (cyc > 2 || u_mem.a_stalls == 0) begin
      failures++;
      $display("FAIL empty command %0d cycles, stalls %0d", cyc, u_mem.a_stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
