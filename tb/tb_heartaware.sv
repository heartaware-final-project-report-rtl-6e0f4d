// tb_heartaware: end-to-end test of the top with its slow rates shortened: one sample every
// 200 clocks (SAMPLE_DIV), 4-cycle debounce, a short boot bar, an announcement every 2000
// samples and a 25 MHz audio sample rate (AUDIO_DIV = 4, as fast as the model card delivers), with a model SD reader
// (sd_reader_model) and the sprite bitmap loaded through the load port at the start.
//
// The ADC input is a synthetic pulse waveform, one new value per sample period:
//   phase 1  low-pass path straight to the peak detector, 60 per minute, flat-topped pulses
//            (plateau peaks); the buttons are then pressed: pause, back, error, back;
//   phase 2  a template is recorded (switch 13), the matched filter is switched in and the
//            rate is 100 per minute with a rounded pulse;
// then it runs on until an announcement, the error sound and a beep have all been read.
//
// Each mechanism is counted and the test fails any that never happened, besides the direct
// checks made on the way: boot bar progress, boot to capturing, jingle blocks, pause, error
// with its "system error" blocks, return to capturing, plateau peaks, beep blocks, beeps
// dropped during an announcement, an announcement whose first word matches the heart rate
// being announced, template capture, the averaged rate within 3 of the true rate on both
// paths, the FIFO carrying exactly the bytes the SD card gave in order (checked at every pop),
// playback priming, PWM activity, VGA sync pulses, white waveform pixels and red sprite
// pixels inside the logo and heart areas.
// The mechanisms counted are the original design's; the rates are shortened for simulation speed.
`timescale 1ns / 1ps
module tb_heartaware;
  import heartaware_pkg::*;
  localparam int SDIV = 200;

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

  heartaware #(.SAMPLE_DIV(SDIV), .DEBOUNCE(4), .PROGRESS_DIV(500), .ANNOUNCE_SAMPLES(2000),
               .AUDIO_DIV(4), .PEAK_DEPTH(50)) dut (
    .clk_65mhz(clk65), .clk_25mhz(clk25), .clk_100mhz(clk100), .rst,
    .adc_data, .btn_left, .btn_up, .btn_down, .sw_template, .sw_lp_direct,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .aud_pwm,
    .sd_ready, .sd_rd, .sd_address, .sd_dout, .sd_byte_available,
    .sprite_load_en, .sprite_load_addr, .sprite_load_data, .status, .avg_hr);

  sd_reader_model #(.INIT_CYCLES(100000), .LATENCY(20), .BYTE_GAP(1)) sd (
    .clk(clk25), .rst, .ready(sd_ready), .rd(sd_rd), .address(sd_address), .dout(sd_dout),
    .byte_available(sd_byte_available), .reads, .last_address);

  always #7.692 clk65  = !clk65;
  always #20    clk25  = !clk25;
  always #5     clk100 = !clk100;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_progress = 0, n_capture = 0, n_pause = 0, n_error = 0, n_back = 0;
  int n_jingle = 0, n_syserr = 0, n_beep = 0, n_bpm = 0, n_dropped = 0, n_announce = 0;
  int n_plateau = 0, n_template = 0, n_hr_lp = 0, n_hr_match = 0, n_pops = 0, n_prime = 0;
  int n_pwm = 0, n_hs = 0, n_vs = 0, n_wave_px = 0, n_sprite_px = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // ------------------------------------------------------------ SD blocks and announcements
  int expect_word = -1;   // first word slot of a pending announcement, -1 if none
  logic prev_annc = 0;
  function automatic int first_word_slot(input int n);
    if (n >= 100) return SLOT_HUNDRED;
    if (n >= 20 || n == 10) return SLOT_TENS + n / 10 - 1;
    if (n >= 11) return SLOT_TEENS + n - 11;
    return SLOT_DIGITS + n;
  endfunction

  always @(posedge clk25) begin
    if (!rst) begin
      if (dut.u_actl.beep_dropped) n_dropped++;
      if (sd_rd && sd_ready) begin
        int slot;
        slot = int'(sd_address / SLOT_BYTES);
        if (sd_address % 512 != 0) fail("unaligned SD address");
        if (slot >= SLOT_JINGLE && slot < SLOT_JINGLE + 7) n_jingle++;
        if (slot == SLOT_SYSERR || slot == SLOT_SYSERR + 1) n_syserr++;
        if (slot == SLOT_BEEP) n_beep++;
        if (slot == SLOT_BPM || slot == SLOT_BPM + 1) n_bpm++;
        if (expect_word >= 0) begin
          checks++;
          if (slot != expect_word) fail($sformatf("announcement starts at slot %0d, expected %0d",
                                                  slot, expect_word));
          else n_announce++;
          expect_word = -1;
        end
      end
      if (dut.u_actl.announcing && !prev_annc) begin
        expect_word = first_word_slot(int'(dut.announce_hr));
        checks++;
        if (int'(dut.announce_hr) < 57 || int'(dut.announce_hr) > 103)
          fail($sformatf("announced rate %0d", dut.announce_hr));
      end
      prev_annc <= dut.u_actl.announcing;
    end
  end

  // ------------------------------------------------------------ FIFO scoreboard
  logic [7:0] fifo_model [$];
  logic pop_pending = 0;
  always @(posedge clk25) begin
    if (!rst && dut.fifo_wr_en) begin
      if (dut.fifo_full) fail("write to a full FIFO");
      fifo_model.push_back(dut.fifo_din);
    end
  end
  logic prev_playing = 0, prev_pwm = 0;
  always @(posedge clk100) begin
    if (!rst) begin
      if (pop_pending) begin
        checks++;
        if (fifo_model.size() == 0) fail("pop with nothing written");
        else begin
          if (dut.fifo_dout !== fifo_model[0])
            fail($sformatf("FIFO gave %h, expected %h", dut.fifo_dout, fifo_model[0]));
          void'(fifo_model.pop_front());
        end
        n_pops++;
      end
      pop_pending <= dut.fifo_rd_en;
      if (dut.playing && !prev_playing) begin
        n_prime++;
        checks++;
        if (dut.fifo_rd_count < 512) fail("playback started before 512 samples");
      end
      prev_playing <= dut.playing;
      if (aud_pwm != prev_pwm) n_pwm++;
      prev_pwm <= aud_pwm;
    end
  end

  // ------------------------------------------------------------ controller and signal chain
  system_status_t prev_status = ST_BOOT;
  logic prev_tmpl = 0;
  always @(posedge clk65) begin
    if (!rst) begin
      if (dut.boot_progress != 0 && status == ST_BOOT) n_progress++;
      if (status != prev_status) begin
        if (status == ST_CAPTURING && prev_status == ST_BOOT) n_capture++;
        if (status == ST_PAUSED) n_pause++;
        if (status == ST_ERROR) n_error++;
        if (status == ST_CAPTURING && prev_status != ST_BOOT) n_back++;
      end
      prev_status <= status;
      if (dut.plateau) n_plateau++;
      if (dut.has_template && !prev_tmpl) n_template++;
      prev_tmpl <= dut.has_template;
    end
  end

  // ------------------------------------------------------------ VGA
  // Screen position of the pixel on the VGA pins: the scan counters four clocks earlier.
  logic [10:0] hq [5];
  logic [9:0]  vq [5];
  logic prev_hs = 1, prev_vs = 1;
  always @(posedge clk65) begin
    for (int i = 4; i > 0; i--) begin hq[i] <= hq[i-1]; vq[i] <= vq[i-1]; end
    hq[0] <= dut.hcount;
    vq[0] <= dut.vcount;
    if (!rst) begin
      if (!vga_hs && prev_hs) n_hs++;
      if (!vga_vs && prev_vs) n_vs++;
      prev_hs <= vga_hs;
      prev_vs <= vga_vs;
      if (status == ST_CAPTURING && vga_r == 4'hF && vga_g == 4'hF && vga_b == 4'hF &&
          vq[4] > 200 && vq[4] < 690 && hq[4] < 1024)
        n_wave_px++;
      if (status == ST_CAPTURING && vga_r == 4'hC && vga_g == 4'h2 && vga_b == 4'h3 &&
          ((hq[4] >= 14 && hq[4] < 130 && vq[4] >= 14 && vq[4] < 130) ||
           (hq[4] >= 144 && hq[4] < 490 && vq[4] >= 44 && vq[4] < 94)))
        n_sprite_px++;
    end
  end

  // ------------------------------------------------------------ stimulus
  int period = 100, flat = 40, noise = 0;
  function automatic int pulse_shape(input int i);
    int v;
    if (flat > 0) begin
      // rise over 8 samples, flat top, then a straight fall
      if (i < 8) v = 40 + 150 * i / 8;
      else if (i < 8 + flat) v = 190;
      else v = 190 - 150 * (i - 8 - flat) / (period - 8 - flat);
    end else begin
      if (i < 8) v = 40 + 150 * i / 8;
      else v = 190 - 150 * (i - 8) / (period - 8);
    end
    return v;
  endfunction

  // A new ADC value every sample period, free running.
  initial begin
    int i = 0;
    forever begin
      int v;
      repeat (SDIV) @(posedge clk65);
      v = pulse_shape(i) + ((noise > 0) ? $urandom_range(0, 2 * noise) - noise : 0);
      adc_data <= 8'((v < 0) ? 0 : (v > 255 ? 255 : v));
      i = (i + 1 >= period) ? 0 : i + 1;
    end
  end

  task automatic press(ref logic b);
    b = 1;
    repeat (40) @(posedge clk65);
    b = 0;
    repeat (40) @(posedge clk65);
  endtask

  task automatic wait_samples(input int n);
    repeat (n * SDIV) @(posedge clk65);
  endtask

  task automatic check_rate(input int t, ref int counter);
    checks++;
    if (int'(avg_hr) < t - 3 || int'(avg_hr) > t + 3)
      fail($sformatf("average rate %0d, true %0d", avg_hr, t));
    else counter++;
  endtask

  initial begin
    repeat (5) @(posedge clk65);
    rst = 0;
    // Load the sprite bitmap: a fixed pattern with about a third of the bits set.
    for (int a = 0; a < BROM_DEPTH; a++) begin
      sprite_load_en   <= 1;
      sprite_load_addr <= 18'(a);
      sprite_load_data <= (a % 3 == 0);
      @(posedge clk65);
    end
    sprite_load_en <= 0;
    @(posedge clk65 iff status == ST_CAPTURING);
    checks++;
    if (n_progress == 0) fail("boot bar never moved");

    // Phase 1: low-pass path, 60 per minute, flat tops.
    wait_samples(25 * 100);
    check_rate(60, n_hr_lp);
    press(btn_left);
    checks++;
    if (status != ST_PAUSED) fail("left did not pause");
    wait_samples(200);
    press(btn_down);
    checks++;
    if (status != ST_CAPTURING) fail("down did not resume");
    press(btn_up);
    checks++;
    if (status != ST_ERROR) fail("up did not enter the error state");
    wait_samples(200);
    press(btn_down);
    checks++;
    if (status != ST_CAPTURING) fail("down did not leave the error state");

    // Phase 2: rounded pulses at 100 per minute, template, matched filter.
    flat = 0;
    period = 60;
    noise = 3;
    wait_samples(5 * 60);
    sw_template = 1;
    wait_samples(20);
    checks++;
    if (!dut.has_template) fail("no template recorded");
    sw_lp_direct = 0;
    wait_samples(25 * 60);
    check_rate(100, n_hr_match);
    wait_samples(10 * 60);
    check_rate(100, n_hr_match);

    // Keep going until an announcement, the whole "system error" clip and a beep have been
    // read, and the reader is idle.
    fork
      wait (n_announce > 0 && n_syserr == 100 && n_beep > 0 && !dut.u_actl.busy);
      #25_000_000;
    join_any
    disable fork;
    $display("end of stimulus at %0t", $time);
    repeat (20000) @(posedge clk65);

    checks++;
    if (fifo_model.size() != 0 && !dut.playing) fail("bytes left in the FIFO with playback stopped");
    $display("progress %0d capture %0d pause %0d error %0d back %0d", n_progress, n_capture,
             n_pause, n_error, n_back);
    $display("jingle %0d syserr %0d beep %0d bpm %0d dropped %0d announce %0d", n_jingle,
             n_syserr, n_beep, n_bpm, n_dropped, n_announce);
    $display("plateau %0d template %0d hr_lp %0d hr_match %0d pops %0d prime %0d pwm %0d",
             n_plateau, n_template, n_hr_lp, n_hr_match, n_pops, n_prime, n_pwm);
    $display("hs %0d vs %0d wave_px %0d sprite_px %0d", n_hs, n_vs, n_wave_px, n_sprite_px);
    check_seen("boot bar progress", n_progress);
    check_seen("boot to capturing", n_capture);
    check_seen("pause", n_pause);
    check_seen("error state", n_error);
    check_seen("return to capturing", n_back);
    check_seen("boot jingle", n_jingle);
    check_seen("system error sound", n_syserr);
    check_seen("beep", n_beep);
    check_seen("beats per minute words", n_bpm);
    check_seen("beep dropped during announcement", n_dropped);
    check_seen("announcement", n_announce);
    check_seen("plateau peak", n_plateau);
    check_seen("template capture", n_template);
    check_seen("rate on low-pass path", n_hr_lp);
    check_seen("rate on matched-filter path", n_hr_match);
    check_seen("FIFO pops", n_pops);
    check_seen("playback priming", n_prime);
    check_seen("PWM output", n_pwm);
    check_seen("horizontal sync", n_hs);
    check_seen("vertical sync", n_vs);
    check_seen("waveform pixels", n_wave_px);
    check_seen("sprite pixels", n_sprite_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(input string what, input int n);
    checks++;
    if (n == 0) fail({what, " never happened"});
  endtask

  initial begin
    #80_000_000;
    fail("watchdog");
    $display("jingle %0d syserr %0d beep %0d bpm %0d dropped %0d announce %0d busy %b state %0d",
             n_jingle, n_syserr, n_beep, n_bpm, n_dropped, n_announce, dut.u_actl.busy,
             dut.u_actl.state);
    $display("reads %0d last %h bytes %0d sd_ready %b time %0t", reads, last_address, dut.u_actl.bytes, sd_ready, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
