// tb_sync_fifo: self-checking test of sync_fifo.
//
// Random pushes and pops (never a push to a full or a pop from an empty
// FIFO) against a queue model; checks dout, empty, full and count every
// cycle, including simultaneous push and pop while full.
module tb_sync_fifo;
  localparam int unsigned DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, empty, full;
  logic [15:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [15:0] model[$];
  int checks = 0, failures = 0;
  int fulls = 0;

  always #5 clk = ~clk;

  sync_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

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
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(count == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "dout");
      if (full) fulls++;
      pop  = (model.size() > 0) && ($urandom % 100 < ((i / 2000) % 2 ? 30 : 70));
      push = ((model.size() < DEPTH) || pop) && ($urandom % 100 < ((i / 2000) % 2 ? 70 : 30));
      din  = 16'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(fulls > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
