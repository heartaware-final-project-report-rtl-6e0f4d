// tb_waveform: writes random samples (more than 1024, so the buffer wraps), then probes scan
// positions and compares each pixel, three cycles later, with a model: column h shows the
// sample written 1024 - h writes ago (the oldest at the left edge), at row 575 - (d + d/2).
// Probes aim at the expected row, one row off it, and random rows; columns past 1023 and a
// disabled trace must stay dark. A second round writes more samples to check the scrolling.
// The 1,024-sample rolling plot over the middle half of the screen is the original design's; the
// exact row formula checked is this design's.
module tb_waveform;
  logic clk = 0, rst = 1;
  logic [7:0] sample;
  logic sample_valid = 0, enable = 1;
  logic [11:0] color = 12'hABC, pixel;
  logic [10:0] hcount;
  logic [9:0] vcount;
  int checks = 0, failures = 0, lit = 0;
  int written [$];
  logic [11:0] expq [$];

  waveform dut (.clk, .rst, .sample, .sample_valid, .enable, .color, .hcount, .vcount, .pixel);

  always #5 clk = !clk;

  function automatic int row_of(input int h);
    int d;
    d = written[written.size() - 1024 + h];
    return 575 - (d + d / 2);
  endfunction

  task automatic probe(input int h, input int v);
    hcount <= 11'(h);
    vcount <= 10'(v);
    expq.push_back((enable && h < 1024 && v == row_of(h % 1024)) ? color : 12'h000);
    @(posedge clk);
    #1;
    if (expq.size() > 2) begin
      logic [11:0] e;
      e = expq.pop_front();
      checks++;
      if (e != 0) lit++;
      if (pixel !== e) begin failures++; $display("pixel %h expected %h", pixel, e); end
    end
  endtask

  task automatic write_n(input int n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      written.push_back(v);
      sample <= v;
      sample_valid <= 1;
      @(posedge clk);
      sample_valid <= 0;
      @(posedge clk);
    end
    expq.delete();
  endtask

  task automatic probe_round();
    repeat (3) probe(0, 0);
    for (int i = 0; i < 1500; i++) begin
      int h = $urandom_range(0, 1023);
      case (i % 3)
        0: probe(h, row_of(h));
        1: probe(h, row_of(h) + 1);
        default: probe($urandom_range(0, 1300), $urandom_range(0, 800));
      endcase
    end
    repeat (3) probe(0, 0);
  endtask

  initial begin
    hcount = 0; vcount = 0; sample = 0;
    // The RAM starts at zero: model that as 1024 zero samples.
    for (int i = 0; i < 1024; i++) written.push_back(0);
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    write_n(1100);
    probe_round();
    write_n(37);
    probe_round();
    enable = 0;
    probe_round();
    checks++;
    if (lit < 500) begin failures++; $display("only %0d lit pixels checked", lit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
