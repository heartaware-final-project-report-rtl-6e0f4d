// tb_fir128_match: feeds random samples, records a template part-way through, and compares
// every output with a reference correlation: zero before the first capture, afterwards the sum
// over k of template[k] * x[n-k], where template[k] is the sample k steps before the newest
// one at the capture. It also checks the 130-cycle latency and that a signal equal to the
// template gives the largest output.
// The 128 taps and the template taken from the low-pass samples are the original design's.
module tb_fir128_match;
  logic clk = 0, rst = 1;
  logic [7:0]  in_sample;
  logic        in_valid = 0, capture = 0;
  logic [22:0] out_sum;
  logic        out_valid, has_template;
  int checks = 0, failures = 0;
  int hist [$];
  int tmpl [128];
  bit have_tmpl = 0;

  fir128_match dut (.clk, .rst, .in_sample, .in_valid, .capture, .out_sum, .out_valid,
                    .has_template);

  always #5 clk = !clk;

  function automatic longint reference();
    longint acc = 0;
    if (!have_tmpl) return 0;
    for (int k = 0; k < 128; k++) acc += longint'(tmpl[k]) * ((k < hist.size()) ? hist[k] : 0);
    return acc;
  endfunction

  task automatic push(input logic [7:0] v, input bit cap, output longint got);
    int lat = 0;
    hist.push_front(v);
    if (cap) begin
      for (int k = 0; k < 128; k++) tmpl[k] = (k < hist.size()) ? hist[k] : 0;
      have_tmpl = 1;
      capture <= 1;
      @(posedge clk);
      capture <= 0;
    end
    in_sample <= v;
    in_valid  <= 1;
    @(posedge clk);
    in_valid  <= 0;
    while (!out_valid) begin
      @(posedge clk);
      lat++;
    end
    got = out_sum;
    checks++;
    if (longint'(out_sum) != reference()) begin
      failures++;
      $display("out %0d expected %0d", out_sum, reference());
    end
    checks++;
    if (lat != 130) begin
      failures++;
      $display("latency %0d expected 130", lat);
    end
  endtask

  initial begin
    longint got, best, at_match;
    int pat [128];
    in_sample = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    for (int i = 0; i < 150; i++) push(8'($urandom), 0, got);
    // A 128-sample pattern, captured when complete.
    for (int i = 0; i < 128; i++) pat[i] = (i % 40 < 8) ? 200 + i % 8 : 10 + (i % 5);
    for (int i = 0; i < 128; i++) push(8'(pat[i]), i == 127, got);
    checks++;
    if (!has_template) begin
      failures++;
      $display("has_template not set");
    end
    // Replay the pattern after some noise: the output is largest when it is complete.
    best = 0;
    for (int i = 0; i < 60; i++) begin
      push(8'($urandom_range(0, 30)), 0, got);
      if (got > best) best = got;
    end
    for (int i = 0; i < 128; i++) begin
      push(8'(pat[i]), 0, got);
      if (i < 127 && got > best) best = got;
    end
    at_match = got;
    checks++;
    if (at_match <= best) begin
      failures++;
      $display("aligned output %0d not above %0d", at_match, best);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
