// tb_heartaware_full: the top at its real parameters (65 MHz, 100 Hz sampling, 10 ms debounce
// and boot bar steps, 32 kHz audio, 100 MHz PWM), run for about 1.7 s of simulated time with
// the model SD reader. The ADC input is a clean pulse every 32 samples (187 beats per minute,
// the fastest rate that fits in a short run) and the low-pass path feeds the peak detector.
// Checks:
//   - ADC samples are taken exactly every 650,000 clocks (100 Hz);
//   - the boot bar steps every 650,000 clocks while booting, and the system enters capturing
//     when the card is ready; the jingle's first block is read from its slot;
//   - every heart-rate value after the first is 6000 / 32 = 187;
//   - audio pops come exactly 3,125 PWM clocks apart (32 kHz) while playing, and each carries
//     the next byte the SD card gave;
//   - VGA lines are 1,344 clocks and frames 1,344 x 806 clocks (1024x768 at 60 Hz, 65 MHz);
//   - a 3 ms press of the left button is ignored, a 15 ms press pauses, and down resumes.
// All rates checked (100 Hz, 32 kHz, 1024x768 at 65 MHz, 6000 / interval) are the original design's.
`timescale 1ns / 1ps
module tb_heartaware_full;
  import heartaware_pkg::*;

  logic clk65 = 0, clk25 = 0, clk100 = 0, rst = 1;
  logic [7:0] adc_data = 8'd40;
  logic btn_left = 0, btn_up = 0, btn_down = 0, sw_template = 0, sw_lp_direct = 1;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, aud_pwm;
  logic sd_ready, sd_rd, sd_byte_available;
  logic [31:0] sd_address, last_address;
  logic [7:0] sd_dout, avg_hr;
  logic sprite_load_en = 0, sprite_load_data = 0;
  logic [17:0] sprite_load_addr = 0;
  system_status_t status;
  int reads;

  heartaware dut (
    .clk_65mhz(clk65), .clk_25mhz(clk25), .clk_100mhz(clk100), .rst,
    .adc_data, .btn_left, .btn_up, .btn_down, .sw_template, .sw_lp_direct,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .aud_pwm,
    .sd_ready, .sd_rd, .sd_address, .sd_dout, .sd_byte_available,
    .sprite_load_en, .sprite_load_addr, .sprite_load_data, .status, .avg_hr);

  sd_reader_model #(.INIT_CYCLES(1_000_000), .LATENCY(100), .BYTE_GAP(4)) sd (
    .clk(clk25), .rst, .ready(sd_ready), .rd(sd_rd), .address(sd_address), .dout(sd_dout),
    .byte_available(sd_byte_available), .reads, .last_address);

  always #7.692 clk65  = !clk65;
  always #20    clk25  = !clk25;
  always #5     clk100 = !clk100;

  int checks = 0, failures = 0;
  longint c65 = 0, c100 = 0;
  longint last_sample = -1, last_step = -1, last_hs = -1, last_vs = -1, last_pop = -1;
  int n_samples = 0, n_steps = 0, n_hr = 0, n_lines = 0, n_frames = 0, n_pops = 0;
  int n_jingle = 0;
  logic prev_hs = 1, prev_vs = 1;
  logic [7:0] prev_progress = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  // 65 MHz side: sampling, boot bar, heart rate, VGA timing.
  always @(posedge clk65) begin
    c65++;
    if (!dut.rst65) begin
      if (dut.sample_valid) begin
        if (last_sample >= 0) begin
          checks++;
          if (c65 - last_sample != 650_000) fail($sformatf("sample spacing %0d", c65 - last_sample));
        end
        last_sample = c65;
        n_samples++;
      end
      if (dut.boot_progress != prev_progress) begin
        if (last_step >= 0) begin
          checks++;
          if (c65 - last_step != 650_000) fail($sformatf("boot step spacing %0d", c65 - last_step));
        end
        last_step = c65;
        n_steps++;
      end
      prev_progress <= dut.boot_progress;
      if (dut.hr_valid) begin
        n_hr++;
        $display("heart rate %0d at %0t", dut.hr, $time);
        if (n_hr > 1) begin
          checks++;
          if (dut.hr != 8'd187) fail($sformatf("heart rate %0d, expected 187", dut.hr));
        end
      end
      if (!vga_hs && prev_hs) begin
        if (last_hs >= 0) begin
          checks++;
          if (c65 - last_hs != 1344) fail($sformatf("line %0d clocks", c65 - last_hs));
        end
        last_hs = c65;
        n_lines++;
      end
      if (!vga_vs && prev_vs) begin
        if (last_vs >= 0) begin
          checks++;
          if (c65 - last_vs != 1344 * 806) fail($sformatf("frame %0d clocks", c65 - last_vs));
        end
        last_vs = c65;
        n_frames++;
      end
      prev_hs <= vga_hs;
      prev_vs <= vga_vs;
    end
  end

  // SD and FIFO.
  logic [7:0] fifo_model [$];
  always @(posedge clk25) begin
    if (!rst) begin
      if (sd_rd && sd_ready) begin
        if (reads == 0) begin
          checks++;
          if (sd_address != SLOT_JINGLE * SLOT_BYTES) fail($sformatf("first read at %h", sd_address));
        end
        if (sd_address / SLOT_BYTES >= SLOT_JINGLE) n_jingle++;
      end
      if (dut.fifo_wr_en) fifo_model.push_back(dut.fifo_din);
    end
  end

  logic pop_pending = 0;
  always @(posedge clk100) begin
    c100++;
    if (!rst) begin
      if (pop_pending) begin
        checks++;
        if (fifo_model.size() == 0) fail("pop with nothing written");
        else begin
          if (dut.fifo_dout !== fifo_model[0]) fail("FIFO byte out of order");
          void'(fifo_model.pop_front());
        end
      end
      pop_pending <= dut.fifo_rd_en;
      if (dut.fifo_rd_en) begin
        if (last_pop >= 0) begin
          checks++;
          if (c100 - last_pop != 3125) fail($sformatf("pop spacing %0d", c100 - last_pop));
        end
        last_pop = c100;
        n_pops++;
      end
    end
  end

  // ADC: a clean pulse every 32 samples, a new value every 10 ms.
  initial begin
    int i = 0;
    forever begin
      int v;
      if (i < 6) v = 40 + 25 * i;
      else v = 190 - 150 * (i - 6) / 26;
      adc_data <= 8'(v);
      i = (i + 1) % 32;
      repeat (650_000) @(posedge clk65);
    end
  end

  task automatic hold(ref logic b, input int ms);
    b = 1;
    repeat (ms * 65_000) @(posedge clk65);
    b = 0;
  endtask

  initial begin
    repeat (10) @(posedge clk65);
    rst = 0;
    @(posedge clk65 iff status == ST_CAPTURING);
    $display("capturing at %0t, %0d boot steps", $time, n_steps);
    wait (n_hr >= 4);
    hold(btn_left, 3);
    repeat (20 * 65_000) @(posedge clk65);
    checks++;
    if (status != ST_CAPTURING) fail("a 3 ms press changed the state");
    hold(btn_left, 15);
    checks++;
    if (status != ST_PAUSED) fail("a 15 ms press did not pause");
    hold(btn_down, 15);
    checks++;
    if (status != ST_CAPTURING) fail("down did not resume");
    $display("samples %0d steps %0d hr %0d lines %0d frames %0d pops %0d jingle blocks %0d",
             n_samples, n_steps, n_hr, n_lines, n_frames, n_pops, n_jingle);
    checks++;
    if (n_steps < 2 || n_frames < 10 || n_pops < 1000 || n_jingle == 0 || n_hr < 4)
      fail("too little activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_500_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
