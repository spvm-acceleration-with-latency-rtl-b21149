// tb_mtfpga_ae: test of one application engine (TMU, five PEs, control
// registers) against the behavioural memory on its 16 channels.
//
// Runs two SpMV jobs back to back through the register interface: a random
// sparse matrix with empty rows and rows up to 80 non-zeros, then a second
// matrix at other addresses, each time polling STATUS until done and
// comparing every out[row] with an exact reference. It also checks that
// all 16 channels were used and that every PE received threads, and that
// threads were back-loaded in the TMU and a write beat a row-pointer read.
module tb_mtfpga_ae;
  import mtfpga_pkg::*;
  localparam int unsigned NPE = 5, NCH = 3 * NPE + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_we, busy;
  logic [2:0] reg_addr;
  word_t reg_wdata, reg_rdata;
  logic [NCH-1:0] mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t [NCH-1:0] mem_req;
  word_t [NCH-1:0] mem_rsp_data;

  int checks = 0, failures = 0;
  int used [NCH];
  int n_backload = 0, n_wrwin = 0;

  always #5 clk = ~clk;

  mem_model #(.NCH(NCH), .LAT(100), .JIT(50), .READY_PCT(85)) u_mem (
    .clk, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  mtfpga_ae dut (.*);

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) if (mem_req_valid[c] && mem_req_ready[c]) used[c]++;
    if (!dut.u_tmu.thr_empty && dut.u_tmu.pe_busy == '1) n_backload++;
    if (dut.u_tmu.rd_valid && dut.u_tmu.out_empty != '1) n_wrwin++;
  end

  task automatic reg_write(logic [2:0] addr, word_t d);
    @(negedge clk);
    reg_we = 1; reg_addr = addr; reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
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

  task automatic run_job(int rows, int cols, int maxnz, addr_t seg);
    addr_t rb, cb, vb, xb, ob;
    idx_t nz;
    real x [];
    real ref_sum [];
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
      n = (r % 13 == 7) ? 0 : int'($urandom % (maxnz + 1));
      ref_sum[r] = 0.0;
      for (int k = 0; k < n; k++) begin
        idx_t c;
        real v;
        c = $urandom % cols;
        v = rnd_val();
        put_idx(cb, nz, c);
        u_mem.poke(vb + 48'(nz) * 8, $realtobits(v));
        ref_sum[r] = ref_sum[r] + v * x[c];
        nz++;
      end
    end
    put_idx(rb, idx_t'(rows), nz);
    reg_write(3'd0, word_t'(rows));
    reg_write(3'd1, word_t'(rb));
    reg_write(3'd2, word_t'(cb));
    reg_write(3'd3, word_t'(vb));
    reg_write(3'd4, word_t'(xb));
    reg_write(3'd5, word_t'(ob));
    reg_write(3'd6, 64'd1);
    reg_addr = 3'd6;
    #1;
    check(reg_rdata == 64'd2, "busy after start");
    do @(negedge clk); while (reg_rdata != 64'd1);
    for (int r = 0; r < rows; r++) begin
      checks++;
      if ($bitstoreal(u_mem.peek(ob + 48'(r) * 8)) != ref_sum[r]) begin
        failures++;
        if (failures < 10) $display("row %0d: %h expected %f", r, u_mem.peek(ob + 48'(r) * 8), ref_sum[r]);
      end
    end
    $display("job: %0d rows, %0d non-zeros", rows, nz);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0;
    for (int c = 0; c < NCH; c++) used[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(700, 2000, 80, 48'h1000_0000);
    run_job(300, 500, 10, 48'h2000_0004);
    for (int c = 0; c < NCH; c++) check(used[c] > 0, $sformatf("channel %0d used", c));
    check(n_backload > 0, "threads back-loaded");
    check(n_wrwin > 0, "write won the TMU channel");
    $display("backload=%0d write-wins=%0d", n_backload, n_wrwin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
