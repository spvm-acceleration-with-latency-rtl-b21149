// tb_dense_workload: the dense-matrix throughput experiment at full size.
//
// The whole accelerator at its default size (4 AEs x 5 PEs) multiplies a
// dense 2,000 x 2,000 matrix (4 million non-zeros) stored in CSR form by a
// vector, with the rows split evenly over the AEs, as in the scaling
// experiment that the kernel was evaluated with. The behavioural memory
// has a 80 to 100 cycle latency and is always ready. The test checks every
// output row exactly and that the sustained rate reaches 0.75 multiply-adds
// per PE per cycle, the fraction of peak the kernel is reported to sustain
// on this experiment (4.5 of 6 GFLOPS at 150 MHz), and reports the
// equivalent double-precision GFLOPS at 150 MHz.
module tb_dense_workload;
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

  mem_model #(.NCH(NAE * NCH), .LAT(80), .JIT(20), .READY_PCT(100)) u_mem (
    .clk, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  mtfpga_hc2ex dut (.*);

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

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

  // mode 1: dense rows x cols; mode 3: nnz_in non-zeros spread evenly over
  // the rows at random columns
  task automatic run_job(int mode, int rows, int cols, longint unsigned nnz_in, addr_t seg,
                         output longint unsigned cycles, output longint unsigned nnz_out);
    addr_t rb, cb, vb, xb, ob;
    idx_t nz;
    real  x [];
    real  ref_sum [];
    longint unsigned t0;
    rb = seg; cb = seg + 48'h1000_0000; vb = seg + 48'h2000_0000;
    xb = seg + 48'h3000_0000; ob = seg + 48'h4000_0000;
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
      if (mode == 1) n = cols;
      else n = int'(nnz_in * longint'(r + 1) / rows - nnz_in * longint'(r) / rows);
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
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned cycles, nnz;
    real rate;
    reg_we = '0; reg_addr = '0; reg_wdata = '0;
    u_mem.jit = 20;
    for (int c = 0; c < NAE * NCH; c++) u_mem.rdy_pct[c] = 100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(1, 2000, 2000, 0, 48'h1000_0000, cycles, nnz);
    rate = real'(nnz) / real'(cycles) / real'(NAE * NPE);
    $display("dense 2000 x 2000: %0d non-zeros in %0d cycles, %0.3f multiply-adds per PE per cycle, %0.2f GFLOPS at 150 MHz",
             nnz, cycles, rate, 2.0 * real'(nnz) / real'(cycles) * 0.15);
    check(nnz == 4000000, "matrix size");
    check(rate >= 0.75, "sustained rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
