// tmu: thread management unit of one application engine.
//
// Creates the threads of the SpMV kernel and keeps NPE processing elements
// supplied with them, as the kernel description lays out:
//  * Row-pointer stream. After start the TMU reads row_ptr[0..length], one
//    read per entry. Reads return in order, so the i-th word returned holds
//    row_ptr[i] (its half is picked from the address of entry i). Each pair
//    of neighbouring entries makes a thread: row i-1, range
//    [row_ptr[i-1], row_ptr[i]).
//  * Thread buffer. Threads wait in a FIFO of THR_DEPTH entries (they are
//    "back-loaded" while all PEs are busy). A row-pointer read is only
//    issued while the buffer has room for its thread.
//  * Dispatch. The buffer head goes to a PE whose busy flag is low,
//    searching round robin from the PE after the last one served; at most
//    one thread is handed out per cycle. Threads leave in row order but may
//    finish in any order.
//  * Output streams. Each PE has an output buffer of RES_DEPTH results.
//    When a result is written to out[row] the PE gets a credit back
//    (pe_res_free).
//  * Control unit (tmu_chan_arb). Output writes and row-pointer reads share
//    one memory channel; writes win.
// done rises once all `length` results have been written and stays high
// until the next start. Buffer sizes and the dispatch order are this
// design's choices.
module tmu
  import mtfpga_pkg::*;
#(
  parameter int unsigned NPE       = 5,
  parameter int unsigned THR_DEPTH = 128,
  parameter int unsigned RES_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // job control
  input  logic                 start,
  input  idx_t                 length,
  input  addr_t                row_base,
  input  addr_t                out_base,
  output logic                 done,
  // memory channel
  output logic                 ch_req_valid,
  output mem_req_t             ch_req,
  input  logic                 ch_req_ready,
  input  logic                 ch_rsp_valid,
  input  word_t                ch_rsp_data,
  // PEs
  output logic [NPE-1:0]       pe_thr_valid,
  output thread_t              pe_thr,
  input  logic [NPE-1:0]       pe_busy,
  input  logic [NPE-1:0]       pe_res_valid,
  input  result_t [NPE-1:0]    pe_res,
  output logic [NPE-1:0]       pe_res_free
);

  localparam int unsigned TW = $clog2(THR_DEPTH + 1);
  localparam int unsigned PW = (NPE > 1) ? $clog2(NPE) : 1;

  // ---------------- job state ----------------
  logic  run_q, done_q;
  idx_t  len_q;
  addr_t row_base_q, out_base_q;
  idx_t  rd_idx_q;        // next row_ptr entry to read
  idx_t  rsp_idx_q;       // row_ptr entry of the next read response
  idx_t  prev_ptr_q;      // previous row_ptr entry
  idx_t  written_q;       // results written
  logic [TW-1:0] rd_out_q; // row_ptr reads in flight

  assign done = done_q;

  // ---------------- row-pointer reads ----------------
  logic     rd_valid, rd_grant;
  mem_req_t rd_req;
  logic     thr_push, thr_pop, thr_empty, thr_full;
  thread_t  thr_din, thr_head;
  logic [TW-1:0] thr_cnt;
  idx_t     cur_ptr;
  addr_t    rsp_addr;

  // room for the thread of every read in flight
  assign rd_valid = run_q && (rd_idx_q <= len_q) &&
                    ((thr_cnt + rd_out_q) < TW'(THR_DEPTH));
  assign rd_req   = '{write: 1'b0, addr: idx_addr(row_base_q, rd_idx_q), wdata: '0};

  assign rsp_addr = idx_addr(row_base_q, rsp_idx_q);
  assign cur_ptr  = idx_select(ch_rsp_data, rsp_addr[2]);
  assign thr_push = ch_rsp_valid && (rsp_idx_q != 0);
  assign thr_din  = '{row: rsp_idx_q - 1, start: prev_ptr_q, stop: cur_ptr};

  sync_fifo #(.T(thread_t), .DEPTH(THR_DEPTH)) u_thr_fifo (
    .clk, .rst_n, .push(thr_push), .din(thr_din), .pop(thr_pop),
    .dout(thr_head), .empty(thr_empty), .full(thr_full), .count(thr_cnt));

  // ---------------- dispatch ----------------
  logic [PW-1:0] disp_rr_q, disp_pick;
  logic          disp_any;

  always_comb begin
    disp_any  = 1'b0;
    disp_pick = '0;
    for (int k = 1; k <= NPE; k++) begin
      int unsigned i;
      i = (int'(disp_rr_q) + k) % NPE;
      if (!disp_any && !pe_busy[i]) begin
        disp_any  = 1'b1;
        disp_pick = PW'(i);
      end
    end
  end

  assign thr_pop = !thr_empty && disp_any;
  assign pe_thr  = thr_head;
  always_comb begin
    pe_thr_valid = '0;
    if (thr_pop) pe_thr_valid[disp_pick] = 1'b1;
  end

  // ---------------- output streams ----------------
  logic [NPE-1:0]     out_empty, out_full, wr_grant;
  result_t [NPE-1:0]  out_head;
  mem_req_t [NPE-1:0] wr_req;

  for (genvar p = 0; p < NPE; p++) begin : g_out
    logic [$clog2(RES_DEPTH+1)-1:0] cnt_unused;
    sync_fifo #(.T(result_t), .DEPTH(RES_DEPTH)) u_out_fifo (
      .clk, .rst_n, .push(pe_res_valid[p]), .din(pe_res[p]), .pop(wr_grant[p]),
      .dout(out_head[p]), .empty(out_empty[p]), .full(out_full[p]), .count(cnt_unused));
    assign wr_req[p] = '{write: 1'b1, addr: dbl_addr(out_base_q, out_head[p].row),
                         wdata: out_head[p].sum};
  end

  assign pe_res_free = wr_grant;

  // ---------------- control unit ----------------
  tmu_chan_arb #(.NW(NPE)) u_arb (
    .clk, .rst_n,
    .wr_valid(~out_empty), .wr_req, .wr_grant,
    .rd_valid, .rd_req, .rd_grant,
    .ch_req_valid, .ch_req, .ch_req_ready);

  // ---------------- sequencing ----------------
  logic [$clog2(NPE+1)-1:0] n_written;
  always_comb begin
    n_written = '0;
    for (int p = 0; p < NPE; p++) n_written += $bits(n_written)'(wr_grant[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q      <= 1'b0;
      done_q     <= 1'b0;
      len_q      <= '0;
      row_base_q <= '0;
      out_base_q <= '0;
      rd_idx_q   <= '0;
      rsp_idx_q  <= '0;
      prev_ptr_q <= '0;
      written_q  <= '0;
      rd_out_q   <= '0;
      disp_rr_q  <= PW'(NPE - 1);
    end else begin
      if (start) begin
        run_q      <= 1'b1;
        done_q     <= 1'b0;
        len_q      <= length;
        row_base_q <= row_base;
        out_base_q <= out_base;
        rd_idx_q   <= '0;
        rsp_idx_q  <= '0;
        written_q  <= '0;
      end else if (run_q) begin
        if (rd_grant) rd_idx_q <= rd_idx_q + 1;
        if (ch_rsp_valid) begin
          rsp_idx_q  <= rsp_idx_q + 1;
          prev_ptr_q <= cur_ptr;
        end
        written_q <= written_q + idx_t'(n_written);
        if ((written_q + idx_t'(n_written)) == len_q && rsp_idx_q == len_q + 1) begin
          run_q  <= 1'b0;
          done_q <= 1'b1;
        end
      end
      rd_out_q <= rd_out_q + TW'(rd_grant) - TW'(ch_rsp_valid);
      if (thr_pop) disp_rr_q <= disp_pick;
    end
  end

  a_thr_room:  assert property (@(posedge clk) disable iff (!rst_n) thr_push |-> !thr_full);
  a_out_room:  assert property (@(posedge clk) disable iff (!rst_n) (pe_res_valid & out_full) == '0);
  a_rsp_known: assert property (@(posedge clk) disable iff (!rst_n) ch_rsp_valid |-> rd_out_q != 0);

endmodule
