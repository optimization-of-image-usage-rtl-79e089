// tb_line_buffer: self-checking test of the ping-pong line buffer.
// Fills rows through the producer side and drains them through the consumer
// side, checking the data, the bank alternation, that the producer sees no
// free bank once two rows wait, and that a released bank is free again.
module tb_line_buffer;
  import sprite_pkg::*;
  localparam int unsigned MAX_W = MAX_SPRITE_WIDTH_DEFAULT;
  localparam int unsigned IW    = $clog2(MAX_W);

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic          prod_free, prod_bank, cons_avail, cons_bank;
  logic          wr_en = 0, prod_commit = 0, rd_en = 0, cons_release = 0;
  logic [IW-1:0] wr_idx = '0, rd_idx = '0;
  pixel_t        wr_data = '0, rd_data;
  int            checks = 0, failures = 0;
  pixel_t        rows [4][MAX_W];
  int            n_fill = 0, n_drain = 0;

  line_buffer u_dut (.clk, .rst_n, .prod_free, .prod_bank, .wr_en, .wr_idx, .wr_data,
                     .prod_commit, .cons_avail, .cons_bank, .rd_en, .rd_idx, .rd_data,
                     .cons_release);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic fill_row(int w);
    for (int j = 0; j < w; j++) begin
      rows[n_fill % 4][j] = $urandom;
      @(negedge clk); wr_en = 1; wr_idx = IW'(j); wr_data = rows[n_fill % 4][j];
      prod_commit = (j == w - 1);
    end
    @(negedge clk); wr_en = 0; prod_commit = 0;
    n_fill++;
  endtask

  task automatic drain_row(int w);
    for (int j = 0; j < w; j++) begin
      @(negedge clk); rd_en = 1; rd_idx = IW'(j);
      cons_release = 0;
      @(negedge clk); rd_en = 0;
      check($sformatf("row %0d data %0d", n_drain, j), rd_data, rows[n_drain % 4][j]);
    end
    cons_release = 1;
    @(negedge clk); cons_release = 0;
    n_drain++;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("free after reset", prod_free, 1);
    check("nothing available after reset", cons_avail, 0);
    fill_row(MAX_W);
    check("row 0 available", cons_avail, 1);
    check("producer moved to bank 1", prod_bank, 1);
    check("bank 1 free", prod_free, 1);
    fill_row(17);
    check("both banks full", prod_free, 0);
    check("consumer on bank 0", cons_bank, 0);
    drain_row(MAX_W);
    check("bank 0 free again", prod_free, 1);
    check("consumer on bank 1", cons_bank, 1);
    check("row 1 available", cons_avail, 1);
    fill_row(5);
    drain_row(17);
    drain_row(5);
    check("empty at the end", cons_avail, 0);
    check("free at the end", prod_free, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
