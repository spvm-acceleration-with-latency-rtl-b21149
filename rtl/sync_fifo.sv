// sync_fifo: synchronous first-in first-out buffer.
//
// Used for every buffer of the kernel: the column, value and vector FIFOs
// and the tag FIFO inside a PE, and the thread buffer and output buffers of
// the thread management unit. The storage is a register array of DEPTH
// entries of type T with read and write pointers. The head entry is shown
// on dout whenever empty is low (first-word fall-through), so a pop takes
// effect on the clock edge where pop is high. push while full and pop while
// empty are protocol errors and are flagged by assertions; a push and a
// pop in the same cycle are allowed, also when full.
module sync_fifo #(
  parameter type         T     = logic [63:0],
  parameter int unsigned DEPTH = 16,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  T              din,
  input  logic          pop,
  output T              dout,
  output logic          empty,
  output logic          full,
  output logic [CW-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   rd_q, wr_q;
  logic [CW-1:0]   cnt_q;
  logic            do_push, do_pop;

  assign empty   = (cnt_q == 0);
  assign full    = (cnt_q == CW'(DEPTH));
  assign count   = cnt_q;
  assign dout    = mem[rd_q];
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= nxt(wr_q);
      if (do_pop)  rd_q <= nxt(rd_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
