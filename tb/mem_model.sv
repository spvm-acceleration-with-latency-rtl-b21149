// mem_model: behavioural model of the platform memory system seen by the
// kernel (memory controllers, crossbar and DRAM). Not synthesizable.
//
// NCH independent channels share one sparse, word-addressed memory. Each
// channel accepts at most one request per cycle when req_ready is high
// (ready is random, READY_PCT percent of cycles by default and settable per
// channel through rdy_pct, to model back-pressure).
// A write stores its word at once and returns nothing. A read returns its
// word on rsp_valid/rsp_data LAT to LAT+JIT cycles later, never before an
// earlier read of the same channel: data come back in request order, as
// the real crossbar guarantees. Testbenches fill and inspect the memory
// with poke() and peek(), and may change the latency while running.
module mem_model
  import mtfpga_pkg::*;
#(
  parameter int unsigned NCH       = 3,
  parameter int unsigned LAT       = 60,
  parameter int unsigned JIT       = 40,
  parameter int unsigned READY_PCT = 90
) (
  input  logic                clk,
  input  logic [NCH-1:0]      req_valid,
  input  mem_req_t [NCH-1:0]  req,
  output logic [NCH-1:0]      req_ready,
  output logic [NCH-1:0]      rsp_valid,
  output word_t [NCH-1:0]     rsp_data
);

  typedef struct { longint unsigned t; word_t d; } pend_t;

  word_t            mem [longint unsigned];
  pend_t            q [NCH][$];
  longint unsigned  last_t [NCH];
  longint unsigned  now = 0;
  int unsigned      lat = LAT;
  int unsigned      jit = JIT;
  int unsigned      rdy_pct [NCH];     // per-channel ready rate, percent
  longint unsigned  reads = 0, writes = 0;
  int unsigned      max_outstanding = 0;

  function automatic void poke(addr_t a, word_t d);
    mem[longint'(a >> 3)] = d;
  endfunction

  function automatic word_t peek(addr_t a);
    if (mem.exists(longint'(a >> 3))) return mem[longint'(a >> 3)];
    return '0;
  endfunction

  initial begin
    req_ready = '0;
    rsp_valid = '0;
    rsp_data  = '0;
    for (int c = 0; c < NCH; c++) begin
      last_t[c]  = 0;
      rdy_pct[c] = READY_PCT;
    end
  end

  always @(posedge clk) begin
    now++;
    for (int c = 0; c < NCH; c++) begin
      if (req_valid[c] && req_ready[c]) begin
        if (req[c].write) begin
          poke(req[c].addr, req[c].wdata);
          writes++;
        end else begin
          pend_t p;
          longint unsigned t;
          t = now + lat + (jit > 0 ? $urandom % (jit + 1) : 0);
          if (t <= last_t[c]) t = last_t[c] + 1;
          last_t[c] = t;
          p.t = t;
          p.d = peek(req[c].addr);
          q[c].push_back(p);
          reads++;
          if (q[c].size() > max_outstanding) max_outstanding = q[c].size();
        end
      end
      if (q[c].size() > 0 && q[c][0].t <= now) begin
        pend_t p;
        p = q[c].pop_front();
        rsp_valid[c] <= 1'b1;
        rsp_data[c]  <= p.d;
      end else begin
        rsp_valid[c] <= 1'b0;
      end
      req_ready[c] <= ($urandom % 100) < rdy_pct[c];
    end
  end

endmodule
