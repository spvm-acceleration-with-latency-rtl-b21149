// sum_unit: summation unit (reduction circuit) of a PE.
//
// Reduces a stream of double-precision products, each tagged with its
// thread id (the row index) and a last-of-row flag, to one sum per row. It
// takes a new element every cycle with no back-pressure, keeps several rows
// in flight at once, and relies on the elements of one row arriving
// together, before the next row begins (the PE guarantees this).
//
// Inner workings (this design's own; only the function is given):
//  * Accumulation loop. One pipelined adder of latency ADD_LAT whose output
//    is fed back. An element of the row that is still open is added to the
//    partial sum of that row leaving the adder in the same cycle; if none
//    leaves, it starts a new partial sum (added to +0). A partial of the
//    open row that leaves while no element arrives goes round again with +0.
//    A row therefore owns at most ADD_LAT partial sums.
//  * Drain. Once a row's last element has entered, its partials leave the
//    loop one by one as they come out of the adder. A small table indexed
//    by a local row sequence number counts the partials each row created
//    and drained, which marks the last partial of each row. Rows drain in
//    order.
//  * Merge tree. ceil(log2(ADD_LAT)) levels, each a pipelined adder that
//    adds consecutive partials of the same row in pairs (an odd one out is
//    added to +0), halving the number of partials per row. After the last
//    level each row has one value: its sum.
// Sums leave in row order. Because additions are re-associated, a sum can
// differ from a strictly sequential sum in the last bits.
//
// Interface: in_valid/in_val/in_row/in_last; out_valid/out_row/out_sum.
module sum_unit
  import mtfpga_pkg::*;
#(
  parameter int unsigned ADD_LAT = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_val,
  input  idx_t  in_row,
  input  logic  in_last,
  output logic  out_valid,
  output idx_t  out_row,
  output word_t out_sum
);

  localparam int unsigned SW   = $clog2(ADD_LAT) + 2;       // local row sequence
  localparam int unsigned NSEQ = 1 << SW;
  localparam int unsigned CNTW = $clog2(ADD_LAT + 1) + 1;
  localparam int unsigned NLEV = (ADD_LAT > 1) ? $clog2(ADD_LAT) : 1;

  typedef struct packed {
    idx_t          row;
    logic [SW-1:0] seq;
  } acc_tag_t;

  typedef struct packed {
    idx_t row;
    logic last;
  } mrg_tag_t;

  // ---------------- accumulation loop ----------------
  logic          open_q;
  logic [SW-1:0] open_seq_q, next_seq_q;
  logic [CNTW-1:0] created_q [NSEQ];
  logic [CNTW-1:0] drained_q [NSEQ];

  logic     a_in_v, y_v;
  word_t    a_op0, a_op1, y_val;
  acc_tag_t a_tag, y_tag;
  logic     recirc, x_new, drain_v, drain_last;
  logic [SW-1:0] x_seq;

  assign x_seq  = open_q ? open_seq_q : next_seq_q;
  assign recirc = y_v && open_q && (y_tag.seq == open_seq_q);
  // an arriving element starts a new partial unless it meets its row's one
  assign x_new  = in_valid && !recirc;

  always_comb begin
    a_in_v = 1'b0;
    a_op0  = in_val;
    a_op1  = '0;
    a_tag  = '{row: in_row, seq: x_seq};
    if (in_valid) begin
      a_in_v = 1'b1;
      a_op1  = recirc ? y_val : '0;
    end else if (recirc) begin
      a_in_v = 1'b1;
      a_op0  = y_val;
      a_tag  = y_tag;
    end
  end

  fp64_add #(.LAT(ADD_LAT), .TAG_W($bits(acc_tag_t))) u_acc (
    .clk, .rst_n,
    .in_valid (a_in_v), .a(a_op0), .b(a_op1), .in_tag(a_tag),
    .out_valid(y_v), .y(y_val), .out_tag(y_tag)
  );

  assign drain_v    = y_v && !recirc;
  assign drain_last = (drained_q[y_tag.seq] + CNTW'(1)) == created_q[y_tag.seq];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q     <= 1'b0;
      open_seq_q <= '0;
      next_seq_q <= '0;
      for (int i = 0; i < NSEQ; i++) begin
        created_q[i] <= '0;
        drained_q[i] <= '0;
      end
    end else begin
      if (drain_v) drained_q[y_tag.seq] <= drained_q[y_tag.seq] + CNTW'(1);
      if (in_valid) begin
        if (!open_q) begin
          // first element of a row: claim a fresh sequence number
          created_q[x_seq] <= CNTW'(1);
          drained_q[x_seq] <= '0;
          next_seq_q       <= next_seq_q + SW'(1);
        end else if (x_new) begin
          created_q[x_seq] <= created_q[x_seq] + CNTW'(1);
        end
        open_q     <= !in_last;
        open_seq_q <= x_seq;
      end
    end
  end

  // ---------------- merge tree ----------------
  logic     [NLEV:0] m_v;
  word_t    [NLEV:0] m_val;
  mrg_tag_t [NLEV:0] m_tag;

  assign m_v[0]   = drain_v;
  assign m_val[0] = y_val;
  assign m_tag[0] = '{row: y_tag.row, last: drain_last};

  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    logic     held_v_q;
    word_t    held_q;
    logic     add_v;
    word_t    add_a, add_b;
    mrg_tag_t add_t;

    always_comb begin
      add_v = 1'b0;
      add_a = m_val[l];
      add_b = '0;
      add_t = m_tag[l];
      if (m_v[l] && (held_v_q || m_tag[l].last)) begin
        add_v = 1'b1;
        if (held_v_q) add_b = held_q;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        held_v_q <= 1'b0;
        held_q   <= '0;
      end else if (m_v[l]) begin
        if (held_v_q) begin
          held_v_q <= 1'b0;
        end else if (!m_tag[l].last) begin
          held_v_q <= 1'b1;
          held_q   <= m_val[l];
        end
      end
    end

    fp64_add #(.LAT(ADD_LAT), .TAG_W($bits(mrg_tag_t))) u_add (
      .clk, .rst_n,
      .in_valid (add_v), .a(add_a), .b(add_b), .in_tag(add_t),
      .out_valid(m_v[l+1]), .y(m_val[l+1]), .out_tag(m_tag[l+1])
    );
  end

  assign out_valid = m_v[NLEV];
  assign out_row   = m_tag[NLEV].row;
  assign out_sum   = m_val[NLEV];

  // after the last level every row is down to one value
  a_one_per_row: assert property (@(posedge clk) disable iff (!rst_n)
                                  m_v[NLEV] |-> m_tag[NLEV].last);

endmodule
