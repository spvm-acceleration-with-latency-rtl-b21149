// tb_ae_ctrl: self-checking test of the AE control registers.
//
// Writes every job register and reads it back, checks the job outputs,
// starts a job and checks the one-cycle start pulse, the busy flag, that a
// second start while busy is ignored, and that busy falls and STATUS shows
// done once the kernel reports done.
module tb_ae_ctrl;
  import mtfpga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_we, done, start, busy;
  logic [2:0] reg_addr;
  word_t reg_wdata, reg_rdata;
  job_t job;
  int checks = 0, failures = 0, starts = 0;
  word_t vals [6];

  always #5 clk = ~clk;
  ae_ctrl dut (.*);

  always @(negedge clk) if (start) starts++;

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  task automatic wr(logic [2:0] a, word_t d);
    @(negedge clk);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; done = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 6; i++) begin
        vals[i] = (i == 0) ? word_t'(32'($urandom)) : word_t'({16'($urandom), 32'($urandom)});
        wr(3'(i), vals[i]);
      end
      for (int i = 0; i < 6; i++) begin
        reg_addr = 3'(i);
        #1;
        check(reg_rdata == vals[i], "register read back");
      end
      check(job.length == vals[0][31:0] && job.row_base == vals[1][47:0] &&
            job.col_base == vals[2][47:0] && job.val_base == vals[3][47:0] &&
            job.vec_base == vals[4][47:0] && job.out_base == vals[5][47:0], "job outputs");
      starts = 0;
      wr(3'd6, 64'd1);
      #1;
      check(busy, "busy after start");
      check(starts == 1, "one start pulse");
      done = 0;
      wr(3'd6, 64'd1);          // ignored while busy
      repeat (5) @(negedge clk);
      check(starts == 1, "no second start while busy");
      reg_addr = 3'd6;
      #1;
      check(reg_rdata == 64'd2, "status busy");
      done = 1;
      @(negedge clk);
      check(!busy, "busy falls at done");
      reg_addr = 3'd6;
      #1;
      check(reg_rdata == 64'd1, "status done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
