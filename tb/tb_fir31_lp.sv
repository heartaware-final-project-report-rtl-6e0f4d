// tb_fir31_lp: feeds random samples and compares every output with a reference sum of the 31
// most recent inputs weighted by the triangular window 1..16..1, divided by 256. It also checks
// the 33-cycle latency from in_valid to out_valid, and the DC gain with a constant input.
// The 31 taps are the original design's; the triangular coefficients checked are this design's.
module tb_fir31_lp;
  logic clk = 0, rst = 1;
  logic [7:0] in_sample, out_sample;
  logic in_valid = 0, out_valid;
  int checks = 0, failures = 0;
  int hist [$];

  fir31_lp dut (.clk, .rst, .in_sample, .in_valid, .out_sample, .out_valid);

  always #5 clk = !clk;

  function automatic int reference();
    int acc = 0;
    for (int k = 0; k < 31; k++) begin
      int c = (k <= 15) ? k + 1 : 31 - k;
      int x = (k < hist.size()) ? hist[k] : 0;
      acc += c * x;
    end
    return acc / 256;
  endfunction

  task automatic push(input logic [7:0] v);
    int lat = 0;
    hist.push_front(v);
    in_sample <= v;
    in_valid  <= 1;
    @(posedge clk);
    in_valid  <= 0;
    while (!out_valid) begin
      @(posedge clk);
      lat++;
    end
    checks++;
    if (out_sample !== 8'(reference())) begin
      failures++;
      $display("out %0d expected %0d", out_sample, reference());
    end
    checks++;
    if (lat != 33) begin
      failures++;
      $display("latency %0d expected 33", lat);
    end
    repeat ($urandom_range(0, 5)) @(posedge clk);
  endtask

  initial begin
    in_sample = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    for (int i = 0; i < 200; i++) push(8'($urandom));
    for (int i = 0; i < 40; i++) push(8'd200);
    checks++;
    if (out_sample !== 8'd200) begin
      failures++;
      $display("DC gain: %0d for 200", out_sample);
    end
    for (int i = 0; i < 40; i++) push(8'd255);
    checks++;
    if (out_sample !== 8'd254 && out_sample !== 8'd255) begin
      failures++;
      $display("full scale: %0d", out_sample);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
