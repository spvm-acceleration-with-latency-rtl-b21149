// spmv_pe: SpMV processing element.
//
// Runs many rows (threads) at once to hide memory latency. A thread from
// the thread management unit (TMU) is turned by pe_req_gen into one column
// read and one value read per non-zero. Read data come back in request
// order and are queued: column indices in the column FIFO, values in the
// value FIFO. Each column index is turned into a read of vec[col]; those
// data are queued in the vector FIFO. The thread id (row index) and a
// last-of-row flag of every element wait in the tag FIFO. When a value and
// its vector element are both present they are multiplied (fp64_mul) and
// the product, with its tag, enters the summation unit (sum_unit), which
// hands the row's sum to the TMU. All of this follows the PE description;
// the FIFO depth and the credit scheme below are this design's choices.
//
// Flow control. Responses cannot be refused, so a read is only issued when
// room for its data is reserved: column and value reads are limited to
// FIFO_DEPTH outstanding (issued but not yet consumed), and so are vector
// reads. The TMU's output buffer for this PE has RES_DEPTH entries; the PE
// keeps a credit count of it, spends a credit when the last element of a
// row enters the multiplier (or an empty row is answered with 0.0) and gets
// one back on res_free when the TMU forwards a result.
//
// Channels: *_req_valid/_req/_req_ready per channel, and *_rsp_valid/
// *_rsp_data for read data, one word per cycle, in order. Results:
// res_valid/res (no back-pressure, covered by the credits).
module spmv_pe
  import mtfpga_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned RES_DEPTH  = 16,
  parameter int unsigned MUL_LAT    = 6,
  parameter int unsigned ADD_LAT    = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  addr_t    col_base,
  input  addr_t    val_base,
  input  addr_t    vec_base,
  // thread assignment from the TMU
  input  logic     thr_valid,
  input  thread_t  thr,
  output logic     busy,
  // column channel
  output logic     col_req_valid,
  output mem_req_t col_req,
  input  logic     col_req_ready,
  input  logic     col_rsp_valid,
  input  word_t    col_rsp_data,
  // value channel
  output logic     val_req_valid,
  output mem_req_t val_req,
  input  logic     val_req_ready,
  input  logic     val_rsp_valid,
  input  word_t    val_rsp_data,
  // vector channel
  output logic     vec_req_valid,
  output mem_req_t vec_req,
  input  logic     vec_req_ready,
  input  logic     vec_rsp_valid,
  input  word_t    vec_rsp_data,
  // results to the TMU
  output logic     res_valid,
  output result_t  res,
  input  logic     res_free
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned RW = $clog2(RES_DEPTH + 1);

  typedef struct packed {
    elem_tag_t t;
    logic      sel;
  } gen_tag_t;

  // ---------------- thread front end ----------------
  logic      can_issue, tag_push, col_sel;
  elem_tag_t gen_tag;
  logic      zero_valid, zero_ready;
  idx_t      zero_row;

  pe_req_gen u_gen (
    .clk, .rst_n, .col_base, .val_base,
    .thr_valid, .thr, .busy,
    .col_req_valid, .col_req, .col_req_ready,
    .val_req_valid, .val_req, .val_req_ready,
    .can_issue,
    .tag_push, .tag(gen_tag), .col_sel,
    .zero_valid, .zero_row, .zero_ready
  );

  // ---------------- column path ----------------
  logic [CW-1:0] sel_cnt, tag_cnt, vec_cnt_unused;
  logic          sel_empty, sel_full, sel_dout, tag_full, tag_empty;
  logic          colf_empty, colf_full;
  word_t         colf_dout;
  logic [CW-1:0] colf_cnt;
  logic          vec_pop_col;
  elem_tag_t     tag_head;

  // half-word select of each column read, in request order
  sync_fifo #(.T(logic), .DEPTH(FIFO_DEPTH)) u_sel_fifo (
    .clk, .rst_n, .push(tag_push), .din(col_sel), .pop(vec_pop_col),
    .dout(sel_dout), .empty(sel_empty), .full(sel_full), .count(sel_cnt));

  // column FIFO: returned column words
  sync_fifo #(.T(word_t), .DEPTH(FIFO_DEPTH)) u_col_fifo (
    .clk, .rst_n, .push(col_rsp_valid), .din(col_rsp_data), .pop(vec_pop_col),
    .dout(colf_dout), .empty(colf_empty), .full(colf_full), .count(colf_cnt));

  // tag FIFO: thread id and last flag of every element in flight
  logic mul_fire;
  sync_fifo #(.T(elem_tag_t), .DEPTH(FIFO_DEPTH)) u_tag_fifo (
    .clk, .rst_n, .push(tag_push), .din(gen_tag), .pop(mul_fire),
    .dout(tag_head), .empty(tag_empty), .full(tag_full), .count(tag_cnt));

  // sel_cnt counts column reads not yet consumed, tag_cnt value reads
  assign can_issue = !sel_full && !tag_full;

  // ---------------- vector requests ----------------
  logic [CW-1:0] vec_out_q;     // vector reads issued and not yet consumed
  logic          vec_issue, vecf_pop;
  idx_t          col_idx;

  assign col_idx       = idx_select(colf_dout, sel_dout);
  assign vec_req_valid = !colf_empty && (vec_out_q < CW'(FIFO_DEPTH));
  assign vec_req       = '{write: 1'b0, addr: dbl_addr(vec_base, col_idx), wdata: '0};
  assign vec_issue     = vec_req_valid && vec_req_ready;
  assign vec_pop_col   = vec_issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vec_out_q <= '0;
    else        vec_out_q <= vec_out_q + CW'(vec_issue) - CW'(vecf_pop);
  end

  // ---------------- value and vector FIFOs ----------------
  logic  valf_empty, valf_full, vecf_empty, vecf_full;
  word_t valf_dout, vecf_dout;
  logic [CW-1:0] valf_cnt;

  sync_fifo #(.T(word_t), .DEPTH(FIFO_DEPTH)) u_val_fifo (
    .clk, .rst_n, .push(val_rsp_valid), .din(val_rsp_data), .pop(mul_fire),
    .dout(valf_dout), .empty(valf_empty), .full(valf_full), .count(valf_cnt));

  sync_fifo #(.T(word_t), .DEPTH(FIFO_DEPTH)) u_vec_fifo (
    .clk, .rst_n, .push(vec_rsp_valid), .din(vec_rsp_data), .pop(vecf_pop),
    .dout(vecf_dout), .empty(vecf_empty), .full(vecf_full), .count(vec_cnt_unused));

  // ---------------- result credits ----------------
  logic [RW-1:0] cred_q;
  logic          sum_v;
  logic          mul_ok, zero_take;

  assign mul_ok    = !valf_empty && !vecf_empty && (!tag_head.last || cred_q != 0);
  assign mul_fire  = mul_ok;
  assign vecf_pop  = mul_ok;
  // an empty row needs a free credit (after the multiplier's) and a free slot
  assign zero_take = zero_valid && !sum_v &&
                     (cred_q > RW'(mul_fire && tag_head.last));
  assign zero_ready = zero_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cred_q <= RW'(RES_DEPTH);
    else cred_q <= cred_q + RW'(res_free)
                          - RW'(mul_fire && tag_head.last) - RW'(zero_take);
  end

  // ---------------- multiply pipeline and summation unit ----------------
  logic      prod_v;
  word_t     prod;
  elem_tag_t prod_tag;
  idx_t      sum_row;
  word_t     sum_val;

  fp64_mul #(.LAT(MUL_LAT), .TAG_W($bits(elem_tag_t))) u_mul (
    .clk, .rst_n, .in_valid(mul_fire), .a(valf_dout), .b(vecf_dout), .in_tag(tag_head),
    .out_valid(prod_v), .y(prod), .out_tag(prod_tag));

  sum_unit #(.ADD_LAT(ADD_LAT)) u_sum (
    .clk, .rst_n, .in_valid(prod_v), .in_val(prod), .in_row(prod_tag.row),
    .in_last(prod_tag.last), .out_valid(sum_v), .out_row(sum_row), .out_sum(sum_val));

  assign res_valid = sum_v || zero_take;
  assign res       = sum_v ? '{row: sum_row, sum: sum_val} : '{row: zero_row, sum: '0};

  // responses always find room, by the credits
  a_col_room: assert property (@(posedge clk) disable iff (!rst_n) col_rsp_valid |-> !colf_full);
  a_val_room: assert property (@(posedge clk) disable iff (!rst_n) val_rsp_valid |-> !valf_full);
  a_vec_room: assert property (@(posedge clk) disable iff (!rst_n) vec_rsp_valid |-> !vecf_full);
  a_cred_max: assert property (@(posedge clk) disable iff (!rst_n) cred_q <= RW'(RES_DEPTH));

endmodule
