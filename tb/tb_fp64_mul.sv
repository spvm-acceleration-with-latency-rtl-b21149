// tb_fp64_mul: self-checking test of fp64_mul.
//
// Drives one operation per cycle: random normal doubles with exponents kept
// well inside the normal range (so no result is subnormal), operands with
// short significands (exact rounding ties) and a few special values. Every result is compared with the simulator's own IEEE-754 double
// arithmetic, and each result must appear exactly LAT cycles after its
// operands, which the tag carries as the issue cycle.
module tb_fp64_mul;
  localparam int unsigned LAT = 6;
  localparam int unsigned N   = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [63:0] a, b, y;
  logic [31:0] in_tag, out_tag;
  logic out_valid;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  logic [63:0] exp_q[$];

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  fp64_mul #(.LAT(LAT), .TAG_W(32)) dut (
    .clk, .rst_n, .in_valid, .a, .b, .in_tag, .out_valid, .y, .out_tag);

  function automatic logic [63:0] rnd_dbl(int unsigned emin, int unsigned espan);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(emin + ($urandom % espan));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  function automatic logic [63:0] ref_op(logic [63:0] x, logic [63:0] z);
    real r;
    r = $bitstoreal(x) * $bitstoreal(z);
    return $realtobits(r);
  endfunction

  // result comparison: all NaNs are equal
  function automatic logic same(logic [63:0] p, logic [63:0] q);
    logic pn, qn;
    pn = (p[62:52] == 11'h7FF) && (p[51:0] != 0);
    qn = (q[62:52] == 11'h7FF) && (q[51:0] != 0);
    if (pn || qn) return pn && qn;
    return p == q;
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      logic [63:0] e;
      e = exp_q.pop_front();
      checks++;
      if (!same(y, e)) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h expected %h", y, e);
      end
      checks++;
      if (cycle - out_tag != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - out_tag, LAT);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, z;
    in_valid = 0; a = 0; b = 0; in_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N + 8; i++) begin
      @(negedge clk);
      case (i % 4)
        0: begin x = rnd_dbl(1023 - 200, 400); z = rnd_dbl(1023 - 200, 400); end
        1: begin x = rnd_dbl(1000, 48); z = rnd_dbl(1000, 48); end
        // short significands (27 and 28 bits): the exact product has at
        // most 55 bits, so it often lies exactly half way between two
        // doubles and the tie must go to the even one
        2: begin x = rnd_dbl(1000, 48); z = rnd_dbl(1000, 48);
                 x[25:0] = '0; z[24:0] = '0; end
        default: begin x = rnd_dbl(1023, 2); z = rnd_dbl(1023, 2); end
      endcase
      if (i >= N) begin
        case (i - N)
          0: begin x = 64'h7FF0_0000_0000_0000; z = 64'h3FF0_0000_0000_0000; end
          1: begin x = 64'h7FF0_0000_0000_0000; z = 64'hFFF0_0000_0000_0000; end
          2: begin x = 64'h0000_0000_0000_0000; z = 64'h4000_0000_0000_0000; end
          3: begin x = 64'h3FF0_0000_0000_0000; z = 64'hBFF0_0000_0000_0000; end
          4: begin x = 64'h7FE0_0000_0000_0000; z = 64'h7FE0_0000_0000_0000; end
          5: begin x = 64'h7FF8_0000_0000_0000; z = 64'h3FF0_0000_0000_0000; end
          6: begin x = 64'h4340_0000_0000_0000; z = 64'h3FF0_0000_0000_0001; end
          default: begin x = 64'h3FF0_0000_0000_0001; z = 64'h3FFF_FFFF_FFFF_FFFF; end
        endcase
      end
      in_valid = 1; a = x; b = z; in_tag = cycle;
      exp_q.push_back(ref_op(x, z));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
