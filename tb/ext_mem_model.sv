// ext_mem_model: behavioural model of the external (DRAM) memory and its
// interface ports, for simulation only.
//
// One word-addressed array of 2**AW 32-bit words serves two read channels
// (a and b) and one write channel (w).  A read request accepted at a clock
// edge reads the array then and its response is presented LATENCY cycles
// later; responses of a channel come back in request order and are held
// until taken.  Each channel's ready input is low, at random, in STALL_PCT
// percent of the cycles (stall_pct, which a testbench may change while
// running), to exercise back-pressure.  Writes land in the
// array at the edge where w_valid and w_ready are both high.  Testbenches
// preload and inspect the array directly through the name mem.
// The counters report how often a master was held off by a low ready.
module ext_mem_model #(
  parameter int unsigned AW        = 16,
  parameter int unsigned LATENCY   = 3,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_req_valid,
  output logic        a_req_ready,
  input  logic [31:0] a_req_addr,
  output logic        a_resp_valid,
  input  logic        a_resp_ready,
  output logic [31:0] a_resp_data,
  input  logic        b_req_valid,
  output logic        b_req_ready,
  input  logic [31:0] b_req_addr,
  output logic        b_resp_valid,
  input  logic        b_resp_ready,
  output logic [31:0] b_resp_data,
  input  logic        w_valid,
  output logic        w_ready,
  input  logic [31:0] w_addr,
  input  logic [31:0] w_data
);
  typedef struct {
    logic [31:0] data;
    longint      due;
  } entry_t;

  logic [31:0] mem [2**AW];
  entry_t      qa[$], qb[$];
  longint      cyc;
  int unsigned a_stalls, b_stalls, w_stalls, n_writes;
  int unsigned stall_pct = STALL_PCT;   // may be changed by a testbench at run time

  function automatic logic rnd_ready();
    return ($urandom % 100) >= stall_pct;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qa.delete();
      qb.delete();
      cyc          <= 0;
      a_req_ready  <= 1'b0;
      b_req_ready  <= 1'b0;
      w_ready      <= 1'b0;
      a_resp_valid <= 1'b0;
      b_resp_valid <= 1'b0;
      a_resp_data  <= '0;
      b_resp_data  <= '0;
      a_stalls     <= 0;
      b_stalls     <= 0;
      w_stalls     <= 0;
      n_writes     <= 0;
    end else begin
      cyc <= cyc + 1;
      // responses taken at this edge
      if (a_resp_valid && a_resp_ready) void'(qa.pop_front());
      if (b_resp_valid && b_resp_ready) void'(qb.pop_front());
      // requests taken at this edge
      if (a_req_valid && a_req_ready) qa.push_back('{mem[a_req_addr[AW-1:0]], cyc + longint'(LATENCY)});
      if (b_req_valid && b_req_ready) qb.push_back('{mem[b_req_addr[AW-1:0]], cyc + longint'(LATENCY)});
      if (w_valid && w_ready) begin
        mem[w_addr[AW-1:0]] <= w_data;
        n_writes <= n_writes + 1;
      end
      if (a_req_valid && !a_req_ready) a_stalls <= a_stalls + 1;
      if (b_req_valid && !b_req_ready) b_stalls <= b_stalls + 1;
      if (w_valid && !w_ready)         w_stalls <= w_stalls + 1;
      // outputs for the next cycle
      a_resp_valid <= (qa.size() > 0) && (qa[0].due <= cyc + 1);
      a_resp_data  <= (qa.size() > 0) ? qa[0].data : '0;
      b_resp_valid <= (qb.size() > 0) && (qb[0].due <= cyc + 1);
      b_resp_data  <= (qb.size() > 0) ? qb[0].data : '0;
      a_req_ready  <= rnd_ready();
      b_req_ready  <= rnd_ready();
      w_ready      <= rnd_ready();
    end
  end
endmodule
