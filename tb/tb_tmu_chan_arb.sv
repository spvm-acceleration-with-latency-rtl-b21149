// tb_tmu_chan_arb: self-checking test of the TMU channel control unit.
//
// Random request patterns from five write sources and one read source,
// with random channel ready. A reference model computes which source must
// be granted (writes before the read, round robin among writes) and the
// test checks the grants, the request shown on the channel, and that a
// read was held back by a write at least once.
module tb_tmu_chan_arb;
  import mtfpga_pkg::*;
  localparam int unsigned NW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NW-1:0] wr_valid, wr_grant;
  mem_req_t [NW-1:0] wr_req;
  logic rd_valid, rd_grant, ch_req_valid, ch_req_ready;
  mem_req_t rd_req, ch_req;
  int checks = 0, failures = 0, conflicts = 0;
  int last = NW - 1;

  always #5 clk = ~clk;

  tmu_chan_arb #(.NW(NW)) dut (.*);

  task automatic check(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("fail: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_valid = 0; ch_req_ready = 0; wr_req = '0; rd_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int exp_w;
      @(negedge clk);
      for (int i = 0; i < NW; i++) begin
        wr_valid[i] = ($urandom % 100) < 25;
        wr_req[i] = '{write: 1'b1, addr: 48'(i * 8 + 8), wdata: 64'($urandom)};
      end
      rd_valid = ($urandom % 2) == 1;
      rd_req = '{write: 1'b0, addr: 48'h100, wdata: '0};
      ch_req_ready = ($urandom % 100) < 70;
      #1;
      exp_w = -1;
      for (int k = 1; k <= NW; k++)
        if (exp_w < 0 && wr_valid[(last + k) % NW]) exp_w = (last + k) % NW;
      check(ch_req_valid == (wr_valid != 0 || rd_valid), "channel valid");
      if (exp_w >= 0) begin
        check(ch_req == wr_req[exp_w], "write request on channel");
        check(wr_grant == (ch_req_ready ? NW'(1) << exp_w : '0), "write grant");
        check(!rd_grant, "read held");
        if (rd_valid) conflicts++;
        if (ch_req_ready) last = exp_w;
      end else begin
        check(wr_grant == 0, "no write grant");
        if (rd_valid) check(ch_req == rd_req, "read request on channel");
        check(rd_grant == (rd_valid && ch_req_ready), "read grant");
      end
    end
    check(conflicts > 0, "read/write conflict seen");
    $display("conflicts resolved for writes: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
