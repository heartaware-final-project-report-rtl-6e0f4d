// tb_blob: gives the rectangle random positions, sizes, colors and visibility, drives random
// scan positions (plus the four corners and the pixels just outside them) and compares each
// pixel, three cycles later, with a direct inside-the-rectangle test.
// The rectangle with enable, size and color is the original design's; the 3-cycle latency is this design's.
module tb_blob;
  logic clk = 0;
  logic enable;
  logic [10:0] x, width, hcount;
  logic [9:0] y, height, vcount;
  logic [11:0] color, pixel;
  int checks = 0, failures = 0;
  logic [11:0] expq [$];

  blob dut (.clk, .enable, .x, .y, .width, .height, .color, .hcount, .vcount, .pixel);

  always #5 clk = !clk;

  function automatic logic [11:0] model(input int h, input int v);
    return (enable && h >= x && h < x + width && v >= y && v < y + height) ? color : 12'h000;
  endfunction

  task automatic probe(input int h, input int v);
    hcount <= 11'(h);
    vcount <= 10'(v);
    expq.push_back(model(h, v));
    @(posedge clk);
    #1;
    if (expq.size() > 2) begin
      logic [11:0] e;
      e = expq.pop_front();
      checks++;
      if (pixel !== e) begin failures++; $display("pixel %h expected %h", pixel, e); end
    end
  endtask

  initial begin
    hcount = 0; vcount = 0; enable = 0; x = 0; y = 0; width = 0; height = 0; color = 0;
    for (int r = 0; r < 40; r++) begin
      // hold the rectangle still while the pipeline drains
      enable = ($urandom_range(0, 4) != 0);
      x = 11'($urandom_range(0, 900)); y = 10'($urandom_range(0, 700));
      width = 11'($urandom_range(1, 200)); height = 10'($urandom_range(1, 100));
      color = 12'($urandom_range(1, 4095));
      expq.delete();
      repeat (4) probe(0, 0);
      for (int dx = -1; dx <= 1; dx++)
        for (int dy = -1; dy <= 1; dy++) begin
          probe(int'(x) + dx, int'(y) + dy);
          probe(int'(x) + int'(width) - 1 + dx, int'(y) + int'(height) - 1 + dy);
        end
      repeat (100) probe($urandom_range(0, 1100), $urandom_range(0, 800));
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
