// tb_sum_unit: self-checking test of the summation unit.
//
// Streams random rows (1 to 3*ADD_LAT+4 elements, row ids increasing with
// gaps) into sum_unit, some back to back at one element per cycle and some
// with idle cycles between elements. Element values are small integers
// times small powers of two, so every sum is exact whatever the order of
// the additions, and the expected sums are computed with the simulator's
// real arithmetic. Checks each row id, its sum and the output order, and
// that several rows were in flight at once.
module tb_sum_unit;
  import mtfpga_pkg::*;
  localparam int unsigned ADD_LAT = 8;
  localparam int unsigned NROWS   = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_last, out_valid;
  word_t in_val, out_sum;
  idx_t in_row, out_row;
  int checks = 0, failures = 0;
  int in_flight = 0, max_in_flight = 0;
  idx_t  exp_row[$];
  real   exp_sum[$];

  always #5 clk = ~clk;

  sum_unit #(.ADD_LAT(ADD_LAT)) dut (.*);

  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (exp_row.size() == 0) begin
        failures++;
        $display("unexpected output row %0d", out_row);
      end else begin
        idx_t r;
        real s;
        r = exp_row.pop_front();
        s = exp_sum.pop_front();
        if (out_row != r || $bitstoreal(out_sum) != s) begin
          failures++;
          if (failures < 10)
            $display("row %0d sum %f, expected row %0d sum %f", out_row, $bitstoreal(out_sum), r, s);
        end
      end
      in_flight--;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx_t row;
    row = 0;
    in_valid = 0; in_val = 0; in_row = 0; in_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NROWS; r++) begin
      int n;
      real s;
      bit gappy;
      n = ((r % 7) == 0) ? 1 : 1 + int'($urandom % (3 * ADD_LAT + 4));
      gappy = ((r / 200) % 2) == 1;
      row = row + 1 + ($urandom % 3);
      s = 0.0;
      for (int i = 0; i < n; i++) begin
        real v;
        v = real'(int'($urandom % 129) - 64) * real'(1 << ($urandom % 4));
        s = s + v;
        @(negedge clk);
        in_valid = 1; in_val = $realtobits(v); in_row = row; in_last = (i == n - 1);
        if (i == 0) begin
          exp_row.push_back(row);
          exp_sum.push_back(0.0);
          in_flight++;
          if (in_flight > max_in_flight) max_in_flight = in_flight;
        end
        if (gappy && ($urandom % 3 == 0)) begin
          @(negedge clk);
          in_valid = 0;
        end
      end
      exp_sum[exp_sum.size() - 1] = s;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20 * ADD_LAT) @(posedge clk);
    checks++;
    if (exp_row.size() != 0) begin
      failures++;
      $display("%0d rows never came out", exp_row.size());
    end
    checks++;
    if (max_in_flight < 3) begin
      failures++;
      $display("at most %0d rows in flight", max_in_flight);
    end
    $display("max rows in flight: %0d", max_in_flight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
