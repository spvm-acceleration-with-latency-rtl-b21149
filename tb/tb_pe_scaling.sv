// tb_pe_scaling: one application engine with 1 to 5 PEs on a dense matrix.
//
// Five engines (mtfpga_ae with NPE = 1, 2, 3, 4 and 5, so 4 to 16 memory
// channels) each multiply the same dense 100 x 1,000 CSR matrix, stored in
// a memory model of their own, as in the scaling experiment the kernel was
// evaluated with. Checks every output of every engine, that each engine
// sustains at least 0.75 multiply-adds per PE per cycle, and that the
// throughput grows with the PE count. Reports GFLOPS at 150 MHz.
module tb_pe_scaling;
  import mtfpga_pkg::*;
  localparam int unsigned ROWS = 100, COLS = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  real  x [COLS];
  real  a_val [ROWS][COLS];
  real  ref_sum [ROWS];
  logic [5:1] go = '0, fin = '0;
  longint unsigned cycles [5:1];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  function automatic real rnd_val();
    return real'(int'($urandom % 33) - 16) * real'(1 << ($urandom % 3));
  endfunction

  for (genvar n = 1; n <= 5; n++) begin : g_cfg
    localparam int unsigned NCH = 3 * n + 1;
    logic reg_we, busy;
    logic [2:0] reg_addr;
    word_t reg_wdata, reg_rdata;
    logic [NCH-1:0] mem_req_valid, mem_req_ready, mem_rsp_valid;
    mem_req_t [NCH-1:0] mem_req;
    word_t [NCH-1:0] mem_rsp_data;

    mem_model #(.NCH(NCH), .LAT(80), .JIT(20), .READY_PCT(100)) u_mem (
      .clk, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
      .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

    mtfpga_ae #(.NPE(n)) u_ae (.*);

    task automatic reg_write(logic [2:0] ad, word_t d);
      @(negedge clk);
      reg_we = 1; reg_addr = ad; reg_wdata = d;
      @(negedge clk);
      reg_we = 0;
    endtask

    initial begin
      longint unsigned t0;
      addr_t rb, cb, vb, xb, ob;
      reg_we = 0; reg_addr = 0; reg_wdata = 0;
      rb = 48'h100_0000; cb = 48'h200_0000; vb = 48'h300_0000;
      xb = 48'h400_0000; ob = 48'h500_0000;
      wait (go[n]);
      for (int c = 0; c < COLS; c++) u_mem.poke(xb + 48'(c) * 8, $realtobits(x[c]));
      for (int r = 0; r <= ROWS; r++) begin
        addr_t ad;
        word_t w;
        ad = rb + 48'(r) * 4;
        w = u_mem.peek(ad);
        if (ad[2]) w[63:32] = idx_t'(r * COLS); else w[31:0] = idx_t'(r * COLS);
        u_mem.poke(ad, w);
      end
      for (int k = 0; k < ROWS * COLS; k++) begin
        addr_t ad;
        word_t w;
        ad = cb + 48'(k) * 4;
        w = u_mem.peek(ad);
        if (ad[2]) w[63:32] = idx_t'(k % COLS); else w[31:0] = idx_t'(k % COLS);
        u_mem.poke(ad, w);
        u_mem.poke(vb + 48'(k) * 8, $realtobits(a_val[k / COLS][k % COLS]));
      end
      reg_write(3'd0, word_t'(ROWS));
      reg_write(3'd1, word_t'(rb));
      reg_write(3'd2, word_t'(cb));
      reg_write(3'd3, word_t'(vb));
      reg_write(3'd4, word_t'(xb));
      reg_write(3'd5, word_t'(ob));
      reg_write(3'd6, 64'd1);
      t0 = cyc - 1;
      while (busy) @(negedge clk);
      cycles[n] = cyc - t0;
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if ($bitstoreal(u_mem.peek(ob + 48'(r) * 8)) != ref_sum[r]) begin
          failures++;
          if (failures < 10) $display("%0d PEs, row %0d wrong", n, r);
        end
      end
      fin[n] = 1'b1;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real prev;
    for (int c = 0; c < COLS; c++) x[c] = rnd_val();
    for (int r = 0; r < ROWS; r++) begin
      ref_sum[r] = 0.0;
      for (int c = 0; c < COLS; c++) begin
        a_val[r][c] = rnd_val();
        ref_sum[r] = ref_sum[r] + a_val[r][c] * x[c];
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    go = '1;
    wait (fin == '1);
    prev = 0.0;
    for (int n = 1; n <= 5; n++) begin
      real rate, gf;
      rate = real'(ROWS * COLS) / real'(cycles[n]) / real'(n);
      gf   = 2.0 * real'(ROWS * COLS) / real'(cycles[n]) * 0.15;
      $display("%0d PE(s), %2d channels: %0d cycles, %0.3f multiply-adds per PE per cycle, %0.2f GFLOPS at 150 MHz",
               n, 3 * n + 1, cycles[n], rate, gf);
      check(rate >= 0.75, "sustained rate per PE");
      check(gf > prev, "throughput grows with PEs");
      prev = gf;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
