// tb_tmu: self-checking test of the thread management unit.
//
// The TMU runs against the behavioural memory (one channel) and five
// simple stand-ins for the processing elements. A stand-in accepts a thread
// when its busy flag is low, stays busy for a random time that grows with
// the row length, and later returns a result whose value encodes the row,
// start and stop it was given; it never has more results outstanding than
// the TMU's output buffer holds (credits returned on pe_res_free).
// Checks: threads are handed out in row order with the right ranges, every
// out[row] holds the expected value, done rises exactly when all rows are
// written, and a second job after the first works too. Mechanisms that must
// be seen: threads buffered while every PE was busy, a row-pointer read held
// back by a write, and every PE given work.
module tb_tmu;
  import mtfpga_pkg::*;
  localparam int unsigned NPE = 5, RES_DEPTH = 4, THR_DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, done;
  idx_t length;
  addr_t row_base, out_base;
  logic ch_req_valid, ch_req_ready, ch_rsp_valid;
  mem_req_t ch_req;
  word_t ch_rsp_data;
  logic [NPE-1:0] pe_thr_valid, pe_busy, pe_res_valid, pe_res_free;
  thread_t pe_thr;
  result_t [NPE-1:0] pe_res;

  int checks = 0, failures = 0;
  int backloads = 0, wr_wins = 0;
  int per_pe [NPE];
  idx_t next_row;
  idx_t rp [$];

  always #5 clk = ~clk;

  mem_model #(.NCH(1), .LAT(30), .JIT(20), .READY_PCT(80)) u_mem (
    .clk, .req_valid(ch_req_valid), .req(ch_req), .req_ready(ch_req_ready),
    .rsp_valid(ch_rsp_valid), .rsp_data(ch_rsp_data));

  tmu #(.NPE(NPE), .THR_DEPTH(THR_DEPTH), .RES_DEPTH(RES_DEPTH)) dut (.*);

  function automatic word_t code(thread_t t);
    return {t.row[23:0], t.start[19:0], t.stop[19:0]};
  endfunction

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  // PE stand-ins
  int      busy_left [NPE];
  result_t pend [NPE][$];
  int      cred [NPE];
  for (genvar p = 0; p < NPE; p++) begin : g_pe
    assign pe_busy[p] = busy_left[p] > 0;
    always @(posedge clk) begin
      if (!rst_n) begin
        busy_left[p] = 0;
        cred[p] = RES_DEPTH;
        pe_res_valid[p] <= 1'b0;
      end else begin
        if (pe_res_free[p]) cred[p]++;
        if (pe_thr_valid[p]) begin
          check(!pe_busy[p], "thread to a busy PE");
          check(pe_thr.row == next_row, "row order");
          check(pe_thr.start == rp[pe_thr.row] && pe_thr.stop == rp[pe_thr.row + 1], "thread range");
          next_row++;
          per_pe[p]++;
          busy_left[p] = 2 + int'(pe_thr.stop - pe_thr.start) + int'($urandom % 8);
          pend[p].push_back('{row: pe_thr.row, sum: code(pe_thr)});
        end else if (busy_left[p] > 0) busy_left[p]--;
        if (pend[p].size() > 0 && cred[p] > 0 && ($urandom % 6 == 0)) begin
          pe_res_valid[p] <= 1'b1;
          pe_res[p]       <= pend[p].pop_front();
          cred[p]--;
        end else pe_res_valid[p] <= 1'b0;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (!dut.thr_empty && pe_busy == '1) backloads++;
    if (dut.rd_valid && dut.out_empty != '1) wr_wins++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_job(int rows, addr_t rb, addr_t ob);
    idx_t p;
    int cycles;
    rp.delete();
    p = $urandom % 50;
    for (int i = 0; i <= rows; i++) begin
      addr_t a;
      word_t w;
      rp.push_back(p);
      a = rb + 48'(i) * 4;
      w = u_mem.peek(a);
      if (a[2]) w[63:32] = p; else w[31:0] = p;
      u_mem.poke(a, w);
      p = p + ((i % 13 == 4) ? 0 : $urandom % 30);
    end
    next_row = 0;
    @(negedge clk);
    start = 1; length = idx_t'(rows); row_base = rb; out_base = ob;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(next_row == idx_t'(rows), "all threads dispatched");
    for (int r = 0; r < rows; r++) begin
      thread_t t;
      t = '{row: idx_t'(r), start: rp[r], stop: rp[r+1]};
      check(u_mem.peek(ob + 48'(r) * 8) == code(t), $sformatf("out[%0d]", r));
    end
    $display("job of %0d rows done in %0d cycles", rows, cycles);
  endtask

  initial begin
    start = 0; length = 0; row_base = 0; out_base = 0;
    for (int p = 0; p < NPE; p++) per_pe[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(600, 48'h4000_0000, 48'h5000_0000);
    run_job(37, 48'h4100_0004, 48'h5100_0000);
    for (int p = 0; p < NPE; p++) check(per_pe[p] > 0, "every PE used");
    check(backloads > 0, "threads buffered while all PEs busy");
    check(wr_wins > 0, "write won over a row-pointer read");
    $display("backloads=%0d write-wins=%0d", backloads, wr_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
