// mem_rd_if: read channel into external memory, used by the drawing
// hardware's first stage (background reads) and by the DMA controller.
//
// A request (addr) is transferred when req_valid and req_ready are both high;
// responses come back in request order and are transferred when resp_valid
// and resp_ready are both high.  Any number of requests may be outstanding.
// A master holds req_valid and addr until the request is taken; a slave holds
// resp_valid and data until the response is taken.  The assertions check
// those two rules in simulation.
interface mem_rd_if
  import sprite_pkg::*;
(
  input logic clk,
  input logic rst_n
);
  logic      req_valid;
  logic      req_ready;
  ext_addr_t req_addr;
  logic      resp_valid;
  logic      resp_ready;
  pixel_t    resp_data;

  modport master (output req_valid, req_addr, resp_ready,
                  input  req_ready, resp_valid, resp_data);
  modport slave  (input  req_valid, req_addr, resp_ready,
                  output req_ready, resp_valid, resp_data);

  // Request held until accepted.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid && $stable(req_addr))
    else $error("mem_rd_if: request dropped or changed before acceptance");
  // Response held until accepted.
  a_resp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid && !resp_ready |=> resp_valid && $stable(resp_data))
    else $error("mem_rd_if: response dropped or changed before acceptance");
endinterface
