// tb_sprite_brom: writes a pseudo-random bit pattern through the load port at the full
// 217,514-bit depth, then reads random addresses and both ends back, checking the one-cycle
// read latency, and that addresses past the end read zero.
// The 217,514 x 1-bit size is the original design's; the load port is this design's.
module tb_sprite_brom;
  localparam int DEPTH = 217514;
  logic clk = 0;
  logic [17:0] pixel_addr, load_addr;
  logic pixel_data, load_en = 0, load_data;
  int checks = 0, failures = 0;

  sprite_brom dut (.clk, .pixel_addr, .pixel_data, .load_en, .load_addr, .load_data);

  always #5 clk = !clk;

  function automatic logic pattern(input int a);
    return ((a * 7 + (a >> 3)) % 5) < 2;
  endfunction

  task automatic check(input int a, input logic want);
    pixel_addr <= 18'(a);
    @(posedge clk);
    #1;
    checks++;
    if (pixel_data !== want) begin failures++; $display("addr %0d read %b", a, pixel_data); end
  endtask

  initial begin
    pixel_addr = 0;
    load_addr = 0;
    load_data = 0;
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      load_en   <= 1;
      load_addr <= 18'(a);
      load_data <= pattern(a);
      @(posedge clk);
    end
    load_en <= 0;
    check(0, pattern(0));
    check(DEPTH - 1, pattern(DEPTH - 1));
    for (int i = 0; i < 2000; i++) begin
      int a = $urandom_range(0, DEPTH - 1);
      check(a, pattern(a));
    end
    check(DEPTH, 1'b0);
    check(262143, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
