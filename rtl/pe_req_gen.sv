// pe_req_gen: thread front end of a PE.
//
// Accepts one thread (row index and the range [start, stop) of its
// non-zeros) from the thread management unit, raises busy, and then walks
// b = start .. stop-1, issuing for every b a read of col[b] and a read of
// val[b]. busy drops as soon as the last pair of requests has been issued,
// before any data of the thread has returned, so the PE can be given its
// next thread while the previous one is still in flight; this follows the
// PE description. After a thread is accepted the generator spends one
// cycle loading its counter (the short thread start-up the kernel pays per
// row) before the first request.
//
// This design's choices: the column and value requests of one element are
// issued in the same cycle, which needs both channels ready and room in the
// PE's buffers (can_issue). For every element a tag (row, last-of-row) and
// the half-word select of the 32-bit column index are handed to the PE
// (tag_push). A thread with no non-zeros issues no reads; instead it asks
// for a zero result (zero_valid/zero_ready).
module pe_req_gen
  import mtfpga_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  addr_t     col_base,
  input  addr_t     val_base,
  // thread assignment
  input  logic      thr_valid,
  input  thread_t   thr,
  output logic      busy,
  // requests
  output logic      col_req_valid,
  output mem_req_t  col_req,
  input  logic      col_req_ready,
  output logic      val_req_valid,
  output mem_req_t  val_req,
  input  logic      val_req_ready,
  input  logic      can_issue,
  // per element bookkeeping for the PE
  output logic      tag_push,
  output elem_tag_t tag,
  output logic      col_sel,
  // empty row
  output logic      zero_valid,
  output idx_t      zero_row,
  input  logic      zero_ready
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_ISSUE, S_ZERO} state_e;

  state_e  st_q;
  thread_t thr_q;
  idx_t    b_q;
  logic    fire;
  addr_t   col_addr;

  assign busy     = (st_q != S_IDLE);
  assign col_addr = idx_addr(col_base, b_q);

  assign col_req_valid = (st_q == S_ISSUE) && can_issue && val_req_ready;
  assign val_req_valid = (st_q == S_ISSUE) && can_issue && col_req_ready;
  assign col_req       = '{write: 1'b0, addr: col_addr, wdata: '0};
  assign val_req       = '{write: 1'b0, addr: dbl_addr(val_base, b_q), wdata: '0};
  assign fire          = (st_q == S_ISSUE) && can_issue && col_req_ready && val_req_ready;

  assign tag_push = fire;
  assign tag      = '{row: thr_q.row, last: (b_q + 1) == thr_q.stop};
  assign col_sel  = col_addr[2];

  assign zero_valid = (st_q == S_ZERO);
  assign zero_row   = thr_q.row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= S_IDLE;
      thr_q <= '0;
      b_q   <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (thr_valid) begin
          thr_q <= thr;
          st_q  <= (thr.start == thr.stop) ? S_ZERO : S_INIT;
        end
        S_INIT: begin
          b_q  <= thr_q.start;
          st_q <= S_ISSUE;
        end
        S_ISSUE: if (fire) begin
          b_q <= b_q + 1;
          if ((b_q + 1) == thr_q.stop) st_q <= S_IDLE;
        end
        S_ZERO: if (zero_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  a_thread_order: assert property (@(posedge clk) disable iff (!rst_n)
                                   (st_q == S_IDLE && thr_valid) |-> (thr.start <= thr.stop));

endmodule
