// tb_main_display: the composed screen in all four states. The sprite ROM is filled with ones,
// so every visible sprite area shows as a solid block of its color. Chosen pixels of each
// screen (progress bar, boot text, logo, heart-rate box and digits, status bar and its text,
// waveform rows, error box) are compared with the colors that layer should give, four
// cycles after the scan position; blanking and the delayed sync outputs are checked too.
// While paused, new samples must not move the frozen waveform.
// The element counts are the original design's; positions and colors checked are this design's layout.
module tb_main_display;
  import heartaware_pkg::*;
  logic clk = 0, rst = 1;
  system_status_t status;
  logic [7:0] boot_progress, hr, lp_sample;
  logic lp_valid = 0;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  logic [17:0] pixel_addr, load_addr;
  logic pixel_data, load_en = 0;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs;
  int checks = 0, failures = 0;
  logic [13:0] expq [$];   // {hs, vs, rgb}

  main_display dut (.clk, .rst, .status, .boot_progress, .hr, .lp_sample, .lp_valid,
    .hcount, .vcount, .hsync, .vsync, .blank, .pixel_addr, .pixel_data,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);
  sprite_brom rom (.clk, .pixel_addr, .pixel_data, .load_en, .load_addr, .load_data(1'b1));

  always #5 clk = !clk;

  task automatic probe(input int h, input int v, input logic [11:0] want,
                       input logic bl = 0, input logic hs = 1, input logic vs = 1);
    hcount <= 11'(h); vcount <= 10'(v); blank <= bl; hsync <= hs; vsync <= vs;
    expq.push_back({hs, vs, bl ? 12'h000 : want});
    @(posedge clk);
    #1;
    if (expq.size() > 3) begin
      logic [13:0] e;
      e = expq.pop_front();
      checks++;
      if ({vga_hs, vga_vs, vga_r, vga_g, vga_b} !== e) begin
        failures++;
        $display("state %0d: got %b %b %h expected %b %b %h", status, vga_hs, vga_vs,
                 {vga_r, vga_g, vga_b}, e[13], e[12], e[11:0]);
      end
    end
  endtask

  task automatic flush();
    repeat (4) probe(1023, 767, 12'h000, 1);
    expq.delete();
  endtask

  task automatic samples(input logic [7:0] v, input int n);
    for (int i = 0; i < n; i++) begin
      lp_sample <= v;
      lp_valid  <= 1;
      @(posedge clk);
      lp_valid  <= 0;
      @(posedge clk);
    end
  endtask

  initial begin
    hcount = 0; vcount = 0; blank = 1; hsync = 1; vsync = 1;
    status = ST_BOOT; boot_progress = 8'd100; hr = 8'd97; lp_sample = 0;
    // Fill the sprite ROM with ones.
    for (int a = 0; a < BROM_DEPTH; a++) begin
      load_en   <= 1;
      load_addr <= 18'(a);
      @(posedge clk);
    end
    load_en <= 0;
    rst = 0;
    @(posedge clk);

    // BOOT
    flush();
    probe(200, 310, C_WHITE | C_DARK);   // progress bar over its track
    probe(600, 310, C_DARK);             // track beyond 4 * 100 pixels
    probe(500, 220, C_WHITE);            // "booting..."
    probe(50, 50, C_RED);                // heart logo
    probe(200, 60, C_RED);               // "HeartAware"
    probe(500, 720, 12'h000);            // no status bar yet
    probe(900, 50, 12'h000);             // no heart rate yet
    probe(500, 500, 12'h000, 1);         // blanked
    probe(10, 10, C_RED, 0, 0, 1);       // hsync low passes through
    probe(10, 10, C_RED, 0, 1, 0);       // vsync low passes through
    flush();

    // CAPTURING, heart rate 97, a flat trace at 100
    status = ST_CAPTURING;
    samples(8'd100, 1024);
    flush();
    probe(100, 720, C_BLUE);             // status bar
    probe(700, 720, C_WHITE | C_BLUE);   // "collecting data..."
    probe(835, 140, C_RED);              // heart-rate box
    probe(850, 50, C_RED);               // hundreds hidden for 97
    probe(890, 50, C_WHITE | C_RED);     // tens
    probe(930, 50, C_WHITE | C_RED);     // ones
    probe(900, 110, C_WHITE | C_RED);    // "BPM"
    probe(500, 425, C_WHITE);            // trace: 575 - 150
    probe(500, 426, C_WHITE);            // second trace, one row lower
    probe(500, 424, 12'h000);
    probe(500, 427, 12'h000);
    probe(500, 220, 12'h000);            // boot text gone
    flush();
    hr = 8'd123;
    @(posedge clk);
    flush();
    probe(850, 50, C_WHITE | C_RED);     // hundreds shown for 123

    // PAUSED: frozen trace and heart rate, grey box and bar
    flush();
    status = ST_PAUSED;
    hr = 8'd7;
    samples(8'd200, 50);
    flush();
    probe(100, 720, C_GREY);
    probe(700, 720, C_GREY);             // "collecting data..." hidden
    probe(900, 720, C_WHITE | C_GREY);   // "paused."
    probe(835, 140, C_GREY);
    probe(850, 50, C_WHITE | C_GREY);    // still 123
    probe(500, 425, C_WHITE);            // trace not moved
    probe(1000, 425, C_WHITE);
    flush();

    // ERROR
    status = ST_ERROR;
    flush();
    probe(320, 300, C_RED);              // error box
    probe(500, 380, C_WHITE | C_RED);    // "error."
    probe(500, 425, C_RED);              // trace hidden, box shows
    probe(100, 425, 12'h000);            // trace hidden
    probe(100, 720, C_GREY);
    probe(890, 50, C_GREY);              // digits hidden
    flush();
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
