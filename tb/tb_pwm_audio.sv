// tb_pwm_audio: for a series of sample values, counts the high cycles in whole 256-cycle PWM
// periods; each must equal the sample value (the duty cycle is sample / 256).
// The 8-bit PWM is the original design's; the counter-compare form checked is this design's.
module tb_pwm_audio;
  logic clk = 0, rst = 1;
  logic [7:0] sample;
  logic pwm_out;
  int checks = 0, failures = 0;

  pwm_audio dut (.clk, .rst, .sample, .pwm_out);

  always #5 clk = !clk;

  initial begin
    int vals [8] = '{0, 1, 64, 128, 200, 254, 255, 37};
    sample = 8'h80;
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (vals[i]) begin
      int high;
      sample = 8'(vals[i]);
      repeat (600) @(posedge clk);        // let the new value take effect
      @(posedge clk iff dut.count == 8'h01);
      high = 0;
      repeat (256) begin
        @(posedge clk);
        #1;
        high += pwm_out;
      end
      checks++;
      if (high != vals[i]) begin failures++; $display("sample %0d high %0d", vals[i], high); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
