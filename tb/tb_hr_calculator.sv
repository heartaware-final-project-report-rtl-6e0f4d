// tb_hr_calculator: drives pulse trains of known period P samples. After the first beat,
// every beat must report hr = 6000 / P (rounded down), and rates above 199 must read 199.
// Each value must appear 16 cycles after its peak pulse (13 divider steps plus 3 registers).
// The 6000 / interval rule is the original design's; the first-beat and clamping rules are this design's.
module tb_hr_calculator;
  logic clk = 0, rst = 1;
  logic [22:0] in_sample;
  logic in_valid = 0, peak, plateau, hr_valid;
  logic [7:0] hr;
  int checks = 0, failures = 0;
  int expected_hr = -1;
  int values = 0;
  int peak_cyc = -1, cyc = 0;

  hr_calculator dut (.clk, .rst, .in_sample, .in_valid, .peak, .plateau, .hr, .hr_valid);

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc++;
    if (peak && !rst) peak_cyc = cyc;
    if (hr_valid && !rst) begin
      values++;
      checks++;
      if (expected_hr >= 0 && hr != 8'(expected_hr)) begin
        failures++;
        $display("hr %0d expected %0d", hr, expected_hr);
      end
      checks++;
      if (cyc - peak_cyc != 16) begin
        failures++;
        $display("hr %0d cycles after the peak", cyc - peak_cyc);
      end
    end
  end

  task automatic send(input int v);
    in_sample <= 23'(v);
    in_valid  <= 1;
    @(posedge clk);
    in_valid  <= 0;
    repeat (19) @(posedge clk);
  endtask

  // `beats` pulses of period p: a smooth bump of width 16 on a flat base.
  task automatic train(input int p, input int beats);
    for (int b = 0; b < beats; b++)
      for (int i = 0; i < p; i++)
        send(1000 + ((i < 16) ? 5000 * (8 - ((i > 8) ? i - 8 : 8 - i)) : 0));
  endtask

  initial begin
    int n_values;
    in_sample = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    expected_hr = -1;
    train(75, 2);
    expected_hr = 80;   train(75, 4);     // 6000/75
    expected_hr = -1;   train(60, 2);     // transition beat
    expected_hr = 100;  train(60, 4);     // 6000/60
    expected_hr = -1;   train(52, 2);
    expected_hr = 115;  train(52, 4);     // 6000/52 = 115.4
    expected_hr = -1;   train(26, 2);
    expected_hr = 199;  train(26, 4);     // 6000/26 = 230 -> clamped
    n_values = values;
    checks++;
    if (n_values < 16) begin
      failures++;
      $display("only %0d heart-rate values", n_values);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
