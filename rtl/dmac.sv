// dmac: DMA controller that replaces a sprite image in internal memory.
//
// Given a command (src, dst, len) it copies len 32-bit words from external
// memory, starting at word address src, into the internal sprite memory,
// starting at word dst, without the processor touching the data.  It works
// while the drawing hardware draws another image from the same internal
// memory, so image replacement is hidden behind drawing.
//
// How it works: read requests for src, src+1, ... are issued back to back
// on its own external-memory read port; responses arrive in order and each
// is written straight into internal memory through the memory's write
// port, at dst, dst+1, ...  Responses are always accepted, so any number of
// reads may be in flight.  With a memory that takes a request every cycle
// the copy runs at one word per clock plus the memory latency.
//
// Interface: start (one cycle, ignored while busy) latches cmd; busy stays
// high until done pulses, in the cycle after the last word is written.
// len of zero finishes at once.  The document names the DMA controller and
// what it does; its command format and internals are this design's own.
module dmac
  import sprite_pkg::*;
#(
  parameter int unsigned SP_AW = $clog2(SPRITE_MEM_WORDS_DEFAULT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  dma_cmd_t         cmd,
  output logic             busy,
  output logic             done,
  // reads from external memory
  mem_rd_if.master         src,
  // internal memory write port
  output logic             spr_we,
  output logic [SP_AW-1:0] spr_wr_addr,
  output pixel_t           spr_wr_data
);
  logic        active;
  ext_addr_t   rd_addr;
  logic [31:0] n_req, n_wr, len_q, dst_q;
  logic        resp_fire;

  always_comb begin
    src.req_valid  = active && (n_req < len_q);
    src.req_addr   = rd_addr;
    src.resp_ready = active;
    resp_fire      = src.resp_valid && src.resp_ready;
    spr_we         = resp_fire;
    spr_wr_addr    = SP_AW'(dst_q + n_wr);
    spr_wr_data    = src.resp_data;
  end

  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      done    <= 1'b0;
      rd_addr <= '0;
      n_req   <= '0;
      n_wr    <= '0;
      len_q   <= '0;
      dst_q   <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          rd_addr <= cmd.src;
          dst_q   <= cmd.dst;
          len_q   <= cmd.len;
          n_req   <= '0;
          n_wr    <= '0;
          if (cmd.len == '0) done   <= 1'b1;
          else               active <= 1'b1;
        end
      end else begin
        if (src.req_valid && src.req_ready) begin
          rd_addr <= rd_addr + 1'b1;
          n_req   <= n_req + 1'b1;
        end
        if (resp_fire) begin
          n_wr <= n_wr + 1'b1;
          if (n_wr == len_q - 1) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  a_no_spurious_resp: assert property (@(posedge clk) disable iff (!rst_n)
    src.resp_valid |-> active) else $error("dmac: response while idle");
endmodule
