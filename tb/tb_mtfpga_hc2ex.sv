// tb_mtfpga_hc2ex: end-to-end test of the whole accelerator at its default
// size (4 application engines of 5 PEs each, 64 memory channels).
//
// The behavioural memory holds a CSR matrix and the dense vector; the test
// plays the host: it splits the rows into one range per AE, writes each AE's
// control registers (length and base addresses shifted to the range),
// starts all AEs, waits until none is busy and compares every out[row]
// with a reference. Values are small integers times powers of two, so the
// sums are exact whatever the order of addition. Three jobs run:
//  1. a random sparse matrix, 0 to 60 non-zeros per row, including empty
//     rows, with random memory back-pressure and latency and slow vector
//     channels;
//  2. a dense 200 x 400 matrix with memory always ready: the rate must
//     reach 0.75 multiply-adds per PE per cycle (the sustained fraction of
//     peak the kernel is reported to reach);
//  3. very short rows with a slow TMU channel, so output buffers fill and
//     threads pile up.
// Each mechanism of the design must occur at least once: a PE taking a new
// thread while an earlier one is in flight, threads back-loaded while all
// PEs are busy, a write winning the TMU channel over a row-pointer read,
// an empty row, column/value reads held back by full buffers, and several
// rows in flight in one summation unit. (How often a PE ran out of result
// credits is reported too; at the default buffer sizes it is rare.)
module tb_mtfpga_hc2ex;
  import mtfpga_pkg::*;
  localparam int unsigned NAE = 4, NPE = 5, NCH = 3 * NPE + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NAE-1:0] reg_we, busy;
  logic [NAE-1:0][2:0] reg_addr;
  word_t [NAE-1:0] reg_wdata, reg_rdata;
  logic [NAE-1:0][NCH-1:0] mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t [NAE-1:0][NCH-1:0] mem_req;
  word_t [NAE-1:0][NCH-1:0] mem_rsp_data;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  mem_model #(.NCH(NAE * NCH), .LAT(80), .JIT(40), .READY_PCT(90)) u_mem (
    .clk, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  mtfpga_hc2ex dut (.*);

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_overlap = 0, n_backload = 0, n_wrwin = 0, n_empty = 0;
  int n_nocred = 0, n_full = 0, max_rows_sum = 0;

  for (genvar a = 0; a < NAE; a++) begin : g_mon
    for (genvar p = 0; p < NPE; p++) begin : g_pe
      int rows_in_sum = 0;
      always @(negedge clk) if (rst_n) begin
        if (dut.g_ae[a].u_ae.g_pe[p].u_pe.thr_valid && !dut.g_ae[a].u_ae.g_pe[p].u_pe.busy &&
            dut.g_ae[a].u_ae.g_pe[p].u_pe.u_tag_fifo.count != 0) n_overlap++;
        if (dut.g_ae[a].u_ae.g_pe[p].u_pe.zero_take) n_empty++;
        if (dut.g_ae[a].u_ae.g_pe[p].u_pe.cred_q == 0) n_nocred++;
        if (dut.g_ae[a].u_ae.g_pe[p].u_pe.u_gen.st_q == 2'd2 &&
            !dut.g_ae[a].u_ae.g_pe[p].u_pe.can_issue) n_full++;
        if (dut.g_ae[a].u_ae.g_pe[p].u_pe.u_sum.in_valid &&
            (dut.g_ae[a].u_ae.g_pe[p].u_pe.u_sum.open_q == 0)) rows_in_sum++;
        if (dut.g_ae[a].u_ae.g_pe[p].u_pe.u_sum.out_valid) rows_in_sum--;
        if (rows_in_sum > max_rows_sum) max_rows_sum = rows_in_sum;
      end
    end
    always @(negedge clk) if (rst_n) begin
      if (!dut.g_ae[a].u_ae.u_tmu.thr_empty && dut.g_ae[a].u_ae.u_tmu.pe_busy == '1) n_backload++;
      if (dut.g_ae[a].u_ae.u_tmu.rd_valid && dut.g_ae[a].u_ae.u_tmu.out_empty != '1) n_wrwin++;
    end
  end

  // ---------------- host side ----------------
  task automatic reg_write(int a, logic [2:0] addr, word_t d);
    @(negedge clk);
    reg_we[a] = 1; reg_addr[a] = addr; reg_wdata[a] = d;
    @(negedge clk);
    reg_we[a] = 0;
  endtask

  function automatic real rnd_val();
    return real'(int'($urandom % 33) - 16) * real'(1 << ($urandom % 3));
  endfunction

  task automatic put_idx(addr_t base, idx_t i, idx_t v);
    addr_t ad;
    word_t w;
    ad = base + 48'(i) * 4;
    w = u_mem.peek(ad);
    if (ad[2]) w[63:32] = v; else w[31:0] = v;
    u_mem.poke(ad, w);
  endtask

  // mode 0: random sparse, 1: dense, 2: 1-2 non-zeros per row
  task automatic run_job(int mode, int rows, int cols, addr_t seg, output longint unsigned cycles,
                         output longint unsigned nnz_out);
    addr_t rb, cb, vb, xb, ob;
    idx_t nz;
    real  x [];
    real  ref_sum [];
    longint unsigned t0;
    rb = seg; cb = seg + 48'h0100_0000; vb = seg + 48'h0200_0000;
    xb = seg + 48'h0300_0000; ob = seg + 48'h0400_0000;
    x = new[cols];
    ref_sum = new[rows];
    for (int c = 0; c < cols; c++) begin
      x[c] = rnd_val();
      u_mem.poke(xb + 48'(c) * 8, $realtobits(x[c]));
    end
    nz = 0;
    for (int r = 0; r < rows; r++) begin
      int n;
      put_idx(rb, idx_t'(r), nz);
      case (mode)
        0: n = (r % 17 == 3) ? 0 : int'($urandom % 61);
        1: n = cols;
        default: n = 1 + int'($urandom % 2);
      endcase
      ref_sum[r] = 0.0;
      for (int k = 0; k < n; k++) begin
        idx_t c;
        real v;
        c = (mode == 1) ? idx_t'(k) : idx_t'($urandom % cols);
        v = rnd_val();
        put_idx(cb, nz, c);
        u_mem.poke(vb + 48'(nz) * 8, $realtobits(v));
        ref_sum[r] = ref_sum[r] + v * x[c];
        nz++;
      end
      u_mem.poke(ob + 48'(r) * 8, 64'hDEAD_BEEF_DEAD_BEEF);
    end
    put_idx(rb, idx_t'(rows), nz);
    nnz_out = nz;
    // one row range per AE
    for (int a = 0; a < NAE; a++) begin
      int r0, r1;
      r0 = rows * a / NAE;
      r1 = rows * (a + 1) / NAE;
      reg_write(a, 3'd0, word_t'(r1 - r0));
      reg_write(a, 3'd1, word_t'(rb + 48'(r0) * 4));
      reg_write(a, 3'd2, word_t'(cb));
      reg_write(a, 3'd3, word_t'(vb));
      reg_write(a, 3'd4, word_t'(xb));
      reg_write(a, 3'd5, word_t'(ob + 48'(r0) * 8));
    end
    @(negedge clk);
    for (int a = 0; a < NAE; a++) begin
      reg_we[a] = 1; reg_addr[a] = 3'd6; reg_wdata[a] = 64'd1;
    end
    t0 = cyc;
    @(negedge clk);
    reg_we = '0;
    while (busy != '0) @(negedge clk);
    cycles = cyc - t0;
    for (int a = 0; a < NAE; a++) begin
      reg_addr[a] = 3'd6;
      #1;
      check(reg_rdata[a] == 64'd1, "status done");
    end
    for (int r = 0; r < rows; r++) begin
      word_t got;
      got = u_mem.peek(ob + 48'(r) * 8);
      checks++;
      if ($bitstoreal(got) != ref_sum[r] || got == 64'hDEAD_BEEF_DEAD_BEEF) begin
        failures++;
        if (failures < 10) $display("job %0d row %0d: %h expected %f", mode, r, got, ref_sum[r]);
      end
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned cycles, nnz;
    real rate;
    reg_we = '0; reg_addr = '0; reg_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // slow vector channels: column data back up and the PEs must wait
    for (int a = 0; a < NAE; a++)
      for (int p = 0; p < NPE; p++) u_mem.rdy_pct[a * NCH + 3 * p + 2] = 20;
    run_job(0, 1500, 3000, 48'h1000_0000, cycles, nnz);
    $display("sparse: %0d rows, %0d non-zeros, %0d cycles", 1500, nnz, cycles);

    u_mem.jit = 20;
    for (int c = 0; c < NAE * NCH; c++) u_mem.rdy_pct[c] = 100;
    run_job(1, 200, 400, 48'h2000_0000, cycles, nnz);
    rate = real'(nnz) / real'(cycles) / real'(NAE * NPE);
    $display("dense: %0d non-zeros, %0d cycles, %0.3f multiply-adds per PE per cycle", nnz, cycles, rate);
    check(rate >= 0.75, "dense rate");

    for (int a = 0; a < NAE; a++) u_mem.rdy_pct[a * NCH + 3 * NPE] = 15;
    run_job(2, 3000, 1000, 48'h3000_0000, cycles, nnz);
    $display("short rows: %0d rows, %0d cycles", 3000, cycles);

    $display("overlap=%0d backload=%0d write-wins=%0d empty=%0d no-credit=%0d buffers-full=%0d max-rows-in-sum=%0d",
             n_overlap, n_backload, n_wrwin, n_empty, n_nocred, n_full, max_rows_sum);
    check(n_overlap > 0, "thread overlap in a PE");
    check(n_backload > 0, "threads back-loaded");
    check(n_wrwin > 0, "write won the TMU channel");
    check(n_empty > 0, "empty row");
    check(n_full > 0, "reads held for buffer room");
    check(max_rows_sum >= 2, "several rows in one summation unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
