// tb_peak_detector: drives triangular pulses whose apex positions are known, one of them with
// a flat top of 6 equal samples, and a flat stretch with no pulse. Every pulse must give
// exactly one peak, MID = 25 samples after its apex (the first sample of the flat top), with
// `plateau` set only for the flat one; the flat stretch must give none. The step from the
// reset value up to the base level also counts once, as a flat-topped maximum.
// The 50-sample window and the plateau handling are the original design's; the exact plateau rule is
// this design's reading of it.
module tb_peak_detector;
  localparam int MID = 25;
  logic clk = 0, rst = 1;
  logic [15:0] in_sample;
  logic in_valid = 0, peak, plateau;
  int checks = 0, failures = 0;
  int n = 0;                 // index of the last sample sent
  int expect_at [$];         // sample index at which a peak must be reported
  bit expect_plateau [$];
  int peaks = 0, plateaus = 0;

  peak_detector #(.W(16), .DEPTH(50)) dut (.clk, .rst, .in_sample, .in_valid, .peak, .plateau);

  always #5 clk = !clk;

  task automatic send(input int v);
    in_sample <= 16'(v);
    in_valid  <= 1;
    @(posedge clk);
    in_valid  <= 0;
    n++;
    repeat (3) @(posedge clk);
  endtask

  // Peaks are checked as they come.
  always @(posedge clk) begin
    if (peak && !rst) begin
      peaks++;
      if (plateau) plateaus++;
      checks++;
      if (expect_at.size() == 0 || expect_at[0] != n) begin
        failures++;
        $display("unexpected peak after sample %0d", n);
      end else begin
        checks++;
        if (plateau != expect_plateau[0]) begin
          failures++;
          $display("plateau flag %0d at sample %0d", plateau, n);
        end
        void'(expect_at.pop_front());
        void'(expect_plateau.pop_front());
      end
    end
  end

  // A pulse of half-width hw and height h over base b, its apex flat for `flat` samples.
  task automatic pulse(input int b, input int h, input int hw, input int flat, input int gap);
    for (int i = 0; i < hw; i++) send(b + h * i / hw);
    expect_at.push_back(n + 1 + MID);
    expect_plateau.push_back(flat > 1);
    for (int i = 0; i < flat; i++) send(b + h);
    for (int i = hw - 1; i >= 0; i--) send(b + h * i / hw);
    for (int i = 0; i < gap; i++) send(b);
  endtask

  initial begin
    in_sample = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    // The step from the reset value 0 up to 100 is itself a maximum held flat: one peak.
    expect_at.push_back(1 + MID);
    expect_plateau.push_back(1);
    for (int i = 0; i < 60; i++) send(100);
    pulse(100, 400, 12, 1, 30);
    pulse(100, 300, 10, 1, 40);
    pulse(100, 500, 14, 6, 30);   // flat top
    pulse(100, 250, 8, 1, 45);
    for (int i = 0; i < 80; i++) send(100);
    checks++;
    if (expect_at.size() != 0 || peaks != 5 || plateaus != 2) begin
      failures++;
      $display("peaks %0d plateaus %0d missing %0d", peaks, plateaus, expect_at.size());
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
