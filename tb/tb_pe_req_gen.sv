// tb_pe_req_gen: self-checking test of the PE thread front end.
//
// Hands random threads (including empty ones) to pe_req_gen as soon as busy
// is low, with random channel ready and can_issue. Checks every column and
// value request address, the tag and column half select of each element,
// that no request is issued unless all three enables are high, that busy
// drops in the cycle after the last request of a thread, that the first
// request can come two cycles after the thread is accepted, and that an
// empty thread yields one zero result request and no reads.
module tb_pe_req_gen;
  import mtfpga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  addr_t col_base = 48'h1000_0004, val_base = 48'h2000_0000;
  logic thr_valid, busy;
  thread_t thr;
  logic col_req_valid, col_req_ready, val_req_valid, val_req_ready, can_issue;
  mem_req_t col_req, val_req;
  logic tag_push, col_sel, zero_valid, zero_ready;
  elem_tag_t tag;
  idx_t zero_row;
  int checks = 0, failures = 0;
  int zeros = 0, fast_starts = 0;

  typedef struct { idx_t row; idx_t b; logic last; } exp_t;
  exp_t exp_q[$];
  idx_t exp_zero[$];
  int unsigned cyc = 0, accept_cyc = 0;
  logic first_pending = 0;

  always #5 clk = ~clk;

  pe_req_gen dut (.*);

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail @%0d: %s", cyc, what); end
  endtask

  // monitor on the falling edge: outputs are settled, inputs set for this cycle
  always @(negedge clk) if (rst_n) begin
    logic fire;
    cyc++;
    fire = col_req_valid && col_req_ready && val_req_valid && val_req_ready;
    check(col_req_valid == val_req_valid || !(col_req_ready && val_req_ready), "valids paired");
    check(!(col_req_valid && !can_issue), "issue without room");
    check(tag_push == fire, "tag_push on issue");
    if (fire) begin
      exp_t e;
      if (exp_q.size() == 0) begin
        check(0, "request with nothing expected");
      end else begin
        e = exp_q.pop_front();
        check(!col_req.write && !val_req.write, "reads");
        check(col_req.addr == col_base + 48'(e.b) * 4, "col address");
        check(val_req.addr == val_base + 48'(e.b) * 8, "val address");
        check(tag.row == e.row && tag.last == e.last, "tag");
        check(col_sel == col_req.addr[2], "col half");
        if (first_pending) begin
          if (cyc - accept_cyc == 2) fast_starts++;
          check(cyc - accept_cyc >= 2, "start-up cycle");
          first_pending = 0;
        end
      end
    end
    if (thr_valid && !busy) accept_cyc = cyc;
    if (zero_valid && zero_ready) begin
      zeros++;
      check(exp_zero.size() > 0 && zero_row == exp_zero.pop_front(), "zero row");
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    col_req_ready = ($urandom % 4) != 0;
    val_req_ready = ($urandom % 4) != 0;
    can_issue     = ($urandom % 5) != 0;
    zero_ready    = ($urandom % 2) != 0;
  end

  initial begin
    thr_valid = 0; thr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      idx_t s, n;
      s = $urandom % 1000;
      n = (t % 9 == 0) ? 0 : 1 + $urandom % 20;
      do begin @(posedge clk); #2; end while (busy);
      thr_valid = 1;
      thr = '{row: idx_t'(t * 3), start: s, stop: s + n};
      for (idx_t b = s; b < s + n; b++) exp_q.push_back('{row: idx_t'(t * 3), b: b, last: b == s + n - 1});
      if (n == 0) exp_zero.push_back(idx_t'(t * 3));
      else first_pending = 1;
      @(posedge clk);
      #2;
      thr_valid = 0;
      check(busy, "busy after accept");
      // busy must drop right after the last request
      if (n != 0) begin
        while (exp_q.size() != 0) @(negedge clk);
        @(posedge clk);
        #2;
        check(!busy, "busy low after last request");
      end
    end
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0 && exp_zero.size() == 0, "all requests seen");
    check(zeros > 0 && fast_starts > 0, "empty rows and fast starts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
