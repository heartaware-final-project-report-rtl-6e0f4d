// tb_signal_processing: the whole signal chain on a synthetic pulse-oximeter waveform (a
// fast rise, a slow fall with a small second bump, a little noise), one sample every 200
// clock cycles.
//   1. Low-pass signal straight into the peak detector, 80 beats per minute (75 samples).
//   2. A template is recorded, the matched filter is switched in, still 80 per minute.
//   3. Matched filter, heart rate changed to 100 per minute (60 samples).
// In each phase, once it has settled, every heart-rate value must be within 3 of the true rate
// and the 16-value average within 2 of it. The latencies of the low-pass (33 cycles) and
// matched filter (130 cycles) stages are checked on every sample.
// The chain (low-pass, matched filter, peaks, 6000 / interval, 16-value average) is the original
// design's; the test waveform is synthetic.
module tb_signal_processing;
  logic clk = 0, rst = 1;
  logic [7:0] in_sample, lp_sample, hr, avg_hr;
  logic in_valid = 0, capture = 0, use_lp_direct = 1;
  logic lp_valid, match_valid, has_template, peak, plateau, hr_valid, avg_valid;
  logic [22:0] match_sum;
  int checks = 0, failures = 0;
  int true_hr = 0, settle = 0, hr_seen = 0, cyc = 0, in_cyc = 0, lp_cyc = 0;
  int noise_seed = 1;

  signal_processing dut (.clk, .rst, .in_sample, .in_valid, .capture, .use_lp_direct,
    .lp_sample, .lp_valid, .match_sum, .match_valid, .has_template, .peak, .plateau,
    .hr, .hr_valid, .avg_hr, .avg_valid);

  always #5 clk = !clk;

  always @(posedge clk) begin
    cyc++;
    if (in_valid) in_cyc = cyc;
    if (lp_valid && !rst) begin
      lp_cyc = cyc;
      checks++;
      if (cyc - in_cyc != 33) begin failures++; $display("lp latency %0d", cyc - in_cyc); end
    end
    if (match_valid && !rst) begin
      checks++;
      if (cyc - lp_cyc != 130) begin failures++; $display("match latency %0d", cyc - lp_cyc); end
    end
    if (hr_valid && !rst) begin
      hr_seen++;
      if (settle > 0) settle--;
      else if (true_hr > 0) begin
        checks++;
        if (int'(hr) < true_hr - 3 || int'(hr) > true_hr + 3) begin
          failures++;
          $display("hr %0d, true %0d", hr, true_hr);
        end
      end
    end
  end

  function automatic int shape(input int i, input int p);
    int v;
    if (i < 8) v = 40 + 150 * i / 8;                       // rise
    else v = 190 - 150 * (i - 8) / (p - 8);                // fall
    if (i >= p / 3 && i < p / 3 + 8) v += 15 - 4 * ((i - p / 3 > 4) ? i - p / 3 - 4 : 4 - (i - p / 3));
    return v;
  endfunction

  task automatic beats(input int p, input int n);
    for (int b = 0; b < n; b++)
      for (int i = 0; i < p; i++) begin
        int v = shape(i, p) + $urandom_range(0, 6) - 3;
        in_sample <= 8'((v < 0) ? 0 : (v > 255 ? 255 : v));
        in_valid  <= 1;
        @(posedge clk);
        in_valid  <= 0;
        repeat (199) @(posedge clk);
      end
  endtask

  task automatic check_avg(input int t);
    checks++;
    if (int'(avg_hr) < t - 2 || int'(avg_hr) > t + 2) begin
      failures++;
      $display("average %0d, true %0d", avg_hr, t);
    end
  endtask

  initial begin
    in_sample = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    // 1. low-pass straight to the detector
    true_hr = 80; settle = 2;
    beats(75, 22);
    check_avg(80);
    // 2. record a template (it holds the last 128 low-pass samples) and use the matched filter
    capture <= 1; @(posedge clk); capture <= 0;
    beats(75, 1);
    checks++;
    if (!has_template) begin failures++; $display("no template"); end
    use_lp_direct = 0; settle = 3;
    beats(75, 20);
    check_avg(80);
    // 3. faster heart
    true_hr = 100; settle = 3;
    beats(60, 24);
    check_avg(100);
    checks++;
    if (hr_seen < 50) begin failures++; $display("only %0d values", hr_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
