// tb_spmv_pe: self-checking test of one processing element.
//
// Builds a random CSR matrix (rows of 0 to 40 non-zeros) and a dense vector
// in the behavioural memory, plays the thread management unit (hands out
// rows in order whenever busy is low, takes results and returns their
// output-buffer credits after a random delay, with one long pause) and
// checks every row sum against a reference. Values are small integers times
// powers of two, so every sum is exact in any order of addition.
// Mechanisms that must be seen: a thread accepted while an earlier one
// still has data in flight, an empty row, running out of result credits,
// and column reads held back because the PE's buffers were full.
module tb_spmv_pe;
  import mtfpga_pkg::*;
  localparam int unsigned ROWS = 400, NCOLS = 500;
  localparam int unsigned FIFO_DEPTH = 32, RES_DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  addr_t col_base = 48'h10_0000, val_base = 48'h20_0000, vec_base = 48'h30_0000;
  logic thr_valid, busy;
  thread_t thr;
  logic [2:0] req_valid, req_ready, rsp_valid;
  mem_req_t [2:0] req;
  word_t [2:0] rsp_data;
  logic res_valid, res_free;
  result_t res;

  int checks = 0, failures = 0;
  int overlaps = 0, empties = 0, cred_stalls = 0, full_stalls = 0;
  idx_t rp [ROWS+1];
  real  ref_sum [ROWS];
  bit   seen [ROWS];
  int   got = 0, outstanding_res = 0;
  int   free_delay[$];
  bit   pause = 0;

  always #5 clk = ~clk;

  mem_model #(.NCH(3), .LAT(50), .JIT(30), .READY_PCT(85)) u_mem (
    .clk, .req_valid, .req, .req_ready, .rsp_valid, .rsp_data);

  spmv_pe #(.FIFO_DEPTH(FIFO_DEPTH), .RES_DEPTH(RES_DEPTH)) dut (
    .clk, .rst_n, .col_base, .val_base, .vec_base,
    .thr_valid, .thr, .busy,
    .col_req_valid(req_valid[0]), .col_req(req[0]), .col_req_ready(req_ready[0]),
    .col_rsp_valid(rsp_valid[0]), .col_rsp_data(rsp_data[0]),
    .val_req_valid(req_valid[1]), .val_req(req[1]), .val_req_ready(req_ready[1]),
    .val_rsp_valid(rsp_valid[1]), .val_rsp_data(rsp_data[1]),
    .vec_req_valid(req_valid[2]), .vec_req(req[2]), .vec_req_ready(req_ready[2]),
    .vec_rsp_valid(rsp_valid[2]), .vec_rsp_data(rsp_data[2]),
    .res_valid, .res, .res_free);

  function automatic real rnd_val();
    return real'(int'($urandom % 33) - 16) * real'(1 << ($urandom % 3));
  endfunction

  task automatic put_idx(addr_t base, idx_t i, idx_t v);
    addr_t a;
    word_t w;
    a = base + 48'(i) * 4;
    w = u_mem.peek(a);
    if (a[2]) w[63:32] = v; else w[31:0] = v;
    u_mem.poke(a, w);
  endtask

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  // results and credit return
  always @(negedge clk) if (rst_n) begin
    res_free = 0;
    if (free_delay.size() > 0 && !pause) begin
      if (free_delay[0] == 0) begin
        void'(free_delay.pop_front());
        res_free = 1;
        outstanding_res--;
      end else free_delay[0]--;
    end
    if (res_valid) begin
      got++;
      outstanding_res++;
      check(outstanding_res <= RES_DEPTH, "output buffer overrun");
      free_delay.push_back($urandom % 4);
      if (res.row >= ROWS || seen[res.row]) check(0, "bad or repeated row");
      else begin
        seen[res.row] = 1;
        checks++;
        if ($bitstoreal(res.sum) != ref_sum[res.row]) begin
          failures++;
          $display("row %0d: %f expected %f", res.row, $bitstoreal(res.sum), ref_sum[res.row]);
        end
      end
    end
    if (thr_valid && !busy && dut.u_tag_fifo.count != 0) overlaps++;
    if (dut.u_gen.zero_valid && dut.zero_ready) empties++;
    if (dut.valf_empty == 0 && dut.vecf_empty == 0 && dut.tag_head.last && dut.cred_q == 0) cred_stalls++;
    if (dut.u_gen.st_q == 2'd2 && !dut.can_issue) full_stalls++;
  end

  // one long pause in returning credits, while threads keep coming
  initial begin
    repeat (3000) @(posedge clk);
    pause = 1;
    repeat (400) @(posedge clk);
    pause = 0;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d rows done", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vec [NCOLS];
    idx_t nz;
    thr_valid = 0; thr = '0; res_free = 0;
    for (int c = 0; c < NCOLS; c++) begin
      vec[c] = rnd_val();
      u_mem.poke(vec_base + 48'(c) * 8, $realtobits(vec[c]));
    end
    nz = 0;
    for (int r = 0; r < ROWS; r++) begin
      int n;
      rp[r] = nz;
      n = (r % 11 == 5) ? 0 : int'($urandom % 41);
      ref_sum[r] = 0.0;
      seen[r] = 0;
      for (int k = 0; k < n; k++) begin
        idx_t c;
        real v;
        c = $urandom % NCOLS;
        v = rnd_val();
        put_idx(col_base, nz, c);
        u_mem.poke(val_base + 48'(nz) * 8, $realtobits(v));
        ref_sum[r] = ref_sum[r] + v * vec[c];
        nz++;
      end
    end
    rp[ROWS] = nz;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      do begin @(posedge clk); #2; end while (busy);
      thr_valid = 1;
      thr = '{row: idx_t'(r), start: rp[r], stop: rp[r+1]};
      @(posedge clk);
      #2;
      thr_valid = 0;
    end
    while (got < ROWS) @(posedge clk);
    repeat (50) @(posedge clk);
    check(got == ROWS, "row count");
    check(overlaps > 0, "threads overlapped");
    check(empties > 0, "empty rows answered");
    check(cred_stalls > 0, "result credits ran out");
    check(full_stalls > 0, "requests held for buffer room");
    $display("overlaps=%0d empties=%0d cred_stalls=%0d full_stalls=%0d", overlaps, empties, cred_stalls, full_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
