// mem_wr_if: posted write channel into external memory, used by the drawing
// hardware's second stage to write the processed picture.
//
// A write (addr, data) is transferred when valid and ready are both high and
// is complete from the master's point of view at that edge.  The master
// holds valid, addr and data until ready; the assertion checks that rule.
interface mem_wr_if
  import sprite_pkg::*;
(
  input logic clk,
  input logic rst_n
);
  logic      valid;
  logic      ready;
  ext_addr_t addr;
  pixel_t    data;

  modport master (output valid, addr, data, input  ready);
  modport slave  (input  valid, addr, data, output ready);

  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    valid && !ready |=> valid && $stable(addr) && $stable(data))
    else $error("mem_wr_if: write dropped or changed before acceptance");
endinterface
