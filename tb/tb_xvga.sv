// tb_xvga: runs just over one full 1024x768 frame and measures the timing against the VESA
// 60 Hz numbers: 1344 clocks per line with a 136-clock hsync starting 24 clocks after the
// visible part, 806 lines per frame with a 6-line vsync starting 3 lines after it, and
// exactly 1024 x 768 unblanked pixels per frame, each with hcount < 1024 and vcount < 768.
// The 1024x768 at 60 Hz, 65 MHz format is the original design's; the VESA porches are standard.
module tb_xvga;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;
  longint visible = 0;
  int cyc = 0, hs_fall = -1, hs_low = 0, vs_lines = 0, frames = 0, line_len = 0;

  xvga dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  always #5 clk = !clk;

  initial begin
    logic hs_prev = 1, vs_prev = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    // Wait for the start of a frame.
    @(posedge clk iff (hcount == 0 && vcount == 0));
    for (int i = 0; i < 1344 * 806; i++) begin
      @(posedge clk);
      if (!blank) begin
        visible++;
        if (hcount >= 1024 || vcount >= 768) begin
          failures++; checks++;
          $display("unblanked at %0d,%0d", hcount, vcount);
        end
      end
      if (!hsync) hs_low++;
      if (hs_prev && !hsync) begin
        checks++;
        if (hcount != 1024 + 24) begin failures++; $display("hsync starts at %0d", hcount); end
        if (hs_fall >= 0) begin
          checks++;
          if (i - hs_fall != 1344) begin failures++; $display("line %0d clocks", i - hs_fall); end
        end
        hs_fall = i;
      end
      if (!hsync && hcount == 0) vs_lines += 0;
      if (!vsync && hcount == 0) vs_lines++;
      if (vs_prev && !vsync) begin
        checks++;
        if (vcount != 768 + 3 || hcount != 0) begin failures++; $display("vsync at %0d,%0d", hcount, vcount); end
      end
      hs_prev = hsync;
      vs_prev = vsync;
    end
    checks++;
    if (visible != 1024 * 768) begin failures++; $display("visible %0d", visible); end
    checks++;
    if (hs_low != 806 * 136) begin failures++; $display("hsync low %0d", hs_low); end
    checks++;
    if (vs_lines != 6) begin failures++; $display("vsync lines %0d", vs_lines); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
