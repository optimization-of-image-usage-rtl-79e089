// line_buffer: ping-pong row buffer between the two drawing stages.
//
// The drawing routine passes one sprite row from its first loop (compose)
// to its second loop (write out) through an array of MAX_W pixels, and the
// two loops run as a dataflow pipeline.  This block gives that array two
// banks so the first stage can fill one row while the second stage drains
// the previous one.
//
// Bank hand-over: the producer fills bank prod_bank, which it may do only
// while prod_free is high, and pulses prod_commit when the row is complete;
// the bank then becomes available to the consumer and the producer moves to
// the other bank.  The consumer reads bank cons_bank while cons_avail is
// high and pulses cons_release when done; the bank becomes free again.
// Both sides walk the banks in the same alternating order.
//
// Timing: writes take effect at the clock edge; a read issued with rd_en
// returns rd_data one cycle later.  A commit or release takes effect at the
// clock edge and is seen by the other side in the next cycle.
module line_buffer #(
  parameter int unsigned MAX_W = sprite_pkg::MAX_SPRITE_WIDTH_DEFAULT,
  parameter int unsigned IW    = $clog2(MAX_W)
) (
  input  logic               clk,
  input  logic               rst_n,
  // producer (first stage)
  output logic               prod_free,
  output logic               prod_bank,
  input  logic               wr_en,
  input  logic [IW-1:0]      wr_idx,
  input  sprite_pkg::pixel_t wr_data,
  input  logic               prod_commit,
  // consumer (second stage)
  output logic               cons_avail,
  output logic               cons_bank,
  input  logic               rd_en,
  input  logic [IW-1:0]      rd_idx,
  output sprite_pkg::pixel_t rd_data,
  input  logic               cons_release
);
  sprite_pkg::pixel_t mem [2][MAX_W];
  logic [1:0] full_q;   // bank holds a completed row not yet released

  assign prod_free  = !full_q[prod_bank];
  assign cons_avail =  full_q[cons_bank];

  always_ff @(posedge clk) begin
    if (wr_en) mem[prod_bank][wr_idx] <= wr_data;
    if (rd_en) rd_data <= mem[cons_bank][rd_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q    <= '0;
      prod_bank <= 1'b0;
      cons_bank <= 1'b0;
    end else begin
      if (prod_commit) begin
        full_q[prod_bank] <= 1'b1;
        prod_bank         <= !prod_bank;
      end
      if (cons_release) begin
        full_q[cons_bank] <= 1'b0;
        cons_bank         <= !cons_bank;
      end
    end
  end

  a_commit_free:  assert property (@(posedge clk) disable iff (!rst_n)
    prod_commit |-> prod_free) else $error("line_buffer: commit into a full bank");
  a_write_free:   assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> prod_free) else $error("line_buffer: write into a full bank");
  a_release_full: assert property (@(posedge clk) disable iff (!rst_n)
    cons_release |-> cons_avail) else $error("line_buffer: release of an empty bank");
endmodule
