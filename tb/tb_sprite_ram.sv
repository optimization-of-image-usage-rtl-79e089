// tb_sprite_ram: self-checking test of the internal sprite memory.
// Writes random words at random addresses (including the last word), reads
// them back with one cycle of latency, checks that a read in the cycle of a
// write to the same word returns the old contents, that rd_data holds while
// rd_en is low, and that a write beyond the last word does not wrap around.
module tb_sprite_ram;
  import sprite_pkg::*;
  localparam int unsigned DEPTH = SPRITE_MEM_WORDS_DEFAULT;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = !clk;

  logic          rd_en = 0, we = 0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  pixel_t        rd_data, wr_data = '0;
  int            checks = 0, failures = 0;

  sprite_ram u_dut (.clk, .rd_en, .rd_addr, .rd_data, .we, .wr_addr, .wr_data);

  pixel_t        ref_data [int];
  logic [AW-1:0] addrs [64];

  task automatic check(string what, pixel_t got, pixel_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08x expected %08x", what, got, exp);
    end
  endtask

  task automatic write_word(logic [AW-1:0] a, pixel_t d);
    @(negedge clk); we = 1; wr_addr = a; wr_data = d;
    @(negedge clk); we = 0;
  endtask

  task automatic read_word(logic [AW-1:0] a, output pixel_t d);
    @(negedge clk); rd_en = 1; rd_addr = a;
    @(negedge clk); rd_en = 0; d = rd_data;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t d;
    for (int k = 0; k < 64; k++) begin
      addrs[k] = (k == 0) ? AW'(DEPTH - 1) : AW'($urandom % DEPTH);
      ref_data[int'(addrs[k])] = $urandom;
      write_word(addrs[k], ref_data[int'(addrs[k])]);
    end
    for (int k = 0; k < 64; k++) begin
      read_word(addrs[k], d);
      check($sformatf("readback @%0d", addrs[k]), d, ref_data[int'(addrs[k])]);
    end
    // read during write of the same word returns the old value
    @(negedge clk); rd_en = 1; rd_addr = addrs[5]; we = 1; wr_addr = addrs[5]; wr_data = 32'hCAFE_0001;
    @(negedge clk); rd_en = 0; we = 0;
    check("read-during-write old data", rd_data, ref_data[int'(addrs[5])]);
    // output holds while rd_en is low
    repeat (3) @(negedge clk);
    check("hold while idle", rd_data, ref_data[int'(addrs[5])]);
    ref_data[int'(addrs[5])] = 32'hCAFE_0001;
    read_word(addrs[5], d);
    check("new data after write", d, 32'hCAFE_0001);
    // a write beyond the last word must not change word 0 or word 1
    write_word(AW'(0), 32'h1111_1111);
    write_word(AW'(1), 32'h2222_2222);
    write_word(AW'(DEPTH), 32'hDEAD_BEEF);
    write_word(AW'(DEPTH + 1), 32'hDEAD_BEEF);
    read_word(AW'(0), d);
    check("no wrap word 0", d, 32'h1111_1111);
    read_word(AW'(1), d);
    check("no wrap word 1", d, 32'h2222_2222);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
