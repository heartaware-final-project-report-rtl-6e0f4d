// tb_hr_moving_average: sends random heart rates and compares each output with the sum of the
// last 16 inputs (zeros before the first 16) divided by 16, one cycle after the input.
// The 16-value average is the original design's.
module tb_hr_moving_average;
  logic clk = 0, rst = 1;
  logic [7:0] in_hr, avg;
  logic in_valid = 0, avg_valid;
  int checks = 0, failures = 0;
  int hist [$];

  hr_moving_average dut (.clk, .rst, .in_hr, .in_valid, .avg, .avg_valid);

  always #5 clk = !clk;

  initial begin
    in_hr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int sum;
      logic [7:0] v;
      sum = 0;
      v = (i < 100) ? 8'($urandom_range(40, 199)) : 8'($urandom);
      hist.push_front(v);
      if (hist.size() > 16) void'(hist.pop_back());
      foreach (hist[j]) sum += hist[j];
      in_hr    <= v;
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      @(posedge clk);
      checks++;
      if (!avg_valid || avg != 8'(sum / 16)) begin
        failures++;
        $display("avg %0d valid %0d expected %0d", avg, avg_valid, sum / 16);
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
