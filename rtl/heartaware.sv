// heartaware: top level of the HeartAware pulse oximeter.
//
// A finger clip and an analog front end (off chip) produce a pulse waveform that an ADC0804
// turns into 8-bit values on a Pmod port. This top samples them at 100 Hz, filters them,
// finds heart beats and averages the heart rate (signal_processing); draws the live
// waveform, the heart rate and the state of the system on a 1024x768 VGA screen
// (main_display); beeps at every beat, plays a jingle when the system is ready and speaks the
// heart rate every ANNOUNCE_SAMPLES samples (audio_controller, audio_fifo, audio_playback);
// and runs the four-state controller BOOT / CAPTURING / PAUSED / ERROR (system_fsm).
//
// Clock domains: clk_65mhz (pixel clock, signal processing, controller), clk_25mhz (SD card
// reader side of the audio FIFO) and clk_100mhz (audio sample rate and PWM). Events cross from
// the 65 MHz domain to the 25 MHz domain through event_sync; the heart rate to be announced is
// held stable in a register while its event crosses. `rst` may be asynchronous; each domain
// has its own reset_sync.
//
// Outside this top: the SD card reader (ready / rd / address / dout / byte_available), the
// clock generator, and the loading of the sprite bitmap into the sprite ROM through the
// sprite_load port. Buttons: left pauses, up enters the error screen, down returns to
// capturing. Switch 13 (`sw_template`) records a new matched-filter template when it is
// turned on; `sw_lp_direct` makes the peak detector use the low-pass signal instead of the
// matched-filter output. `status` and `avg_hr` are brought out for LEDs and test.
//
// From the original design: the three clocks, the 100 Hz sampling, the block structure, the
// button and switch functions, the four states and the sounds played. This design's own
// choices: the reset and clock-crossing scheme, the 10 ms debounce, the 10 s announcement
// period, the sound priority (jingle, then error sound, then beep) and loading the sprite
// bitmap through a port.
module heartaware
  import heartaware_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV       = 650_000,  // 65 MHz / 100 Hz
  parameter int unsigned DEBOUNCE         = 650_000,  // 10 ms at 65 MHz
  parameter int unsigned PROGRESS_DIV     = 650_000,  // boot bar step, 10 ms
  parameter int unsigned ANNOUNCE_SAMPLES = 1000,     // speak every 10 s of samples
  parameter int unsigned AUDIO_DIV        = 3125,     // 100 MHz / 32 kHz
  parameter int unsigned PEAK_DEPTH       = 50
) (
  input  logic                 clk_65mhz,
  input  logic                 clk_25mhz,
  input  logic                 clk_100mhz,
  input  logic                 rst,
  // ADC0804 on the Pmod port
  input  logic [7:0]           adc_data,
  // user controls
  input  logic                 btn_left,
  input  logic                 btn_up,
  input  logic                 btn_down,
  input  logic                 sw_template,
  input  logic                 sw_lp_direct,
  // VGA
  output logic [3:0]           vga_r,
  output logic [3:0]           vga_g,
  output logic [3:0]           vga_b,
  output logic                 vga_hs,
  output logic                 vga_vs,
  // mono audio out
  output logic                 aud_pwm,
  // SD card reader (25 MHz domain)
  input  logic                 sd_ready,
  output logic                 sd_rd,
  output logic [SD_ADDR_W-1:0] sd_address,
  input  logic [7:0]           sd_dout,
  input  logic                 sd_byte_available,
  // sprite bitmap loading (65 MHz domain)
  input  logic                 sprite_load_en,
  input  logic [17:0]          sprite_load_addr,
  input  logic                 sprite_load_data,
  // status
  output system_status_t       status,
  output logic [7:0]           avg_hr
);
  // ---------------------------------------------------------------- resets
  logic rst65, rst25, rst100;
  reset_sync u_rs65  (.clk(clk_65mhz),  .rst_in(rst), .rst_out(rst65));
  reset_sync u_rs25  (.clk(clk_25mhz),  .rst_in(rst), .rst_out(rst25));
  reset_sync u_rs100 (.clk(clk_100mhz), .rst_in(rst), .rst_out(rst100));

  // ---------------------------------------------------------------- user inputs
  logic left_p, up_p, down_p, tmpl_p, lp_direct;
  logic left_l, up_l, down_l, tmpl_l, lp_p;
  sync_debounce #(.STABLE(DEBOUNCE)) u_db_left (.clk(clk_65mhz), .rst(rst65), .raw(btn_left),     .level(left_l),    .rise(left_p));
  sync_debounce #(.STABLE(DEBOUNCE)) u_db_up   (.clk(clk_65mhz), .rst(rst65), .raw(btn_up),       .level(up_l),      .rise(up_p));
  sync_debounce #(.STABLE(DEBOUNCE)) u_db_down (.clk(clk_65mhz), .rst(rst65), .raw(btn_down),     .level(down_l),    .rise(down_p));
  sync_debounce #(.STABLE(DEBOUNCE)) u_db_tmpl (.clk(clk_65mhz), .rst(rst65), .raw(sw_template),  .level(tmpl_l),    .rise(tmpl_p));
  sync_debounce #(.STABLE(DEBOUNCE)) u_db_lp   (.clk(clk_65mhz), .rst(rst65), .raw(sw_lp_direct), .level(lp_direct), .rise(lp_p));

  // SD ready into the 65 MHz domain (a slow level).
  logic sd_ready_s1, sd_ready_65;
  always_ff @(posedge clk_65mhz) begin
    if (rst65) begin
      sd_ready_s1 <= 1'b0;
      sd_ready_65 <= 1'b0;
    end else begin
      sd_ready_s1 <= sd_ready;
      sd_ready_65 <= sd_ready_s1;
    end
  end

  // ---------------------------------------------------------------- system controller
  logic [7:0] boot_progress;
  logic       boot_done, error_entered;
  system_fsm #(.PROGRESS_DIV(PROGRESS_DIV)) u_fsm (
    .clk(clk_65mhz), .rst(rst65), .sd_loaded(sd_ready_65),
    .btn_left(left_p), .btn_up(up_p), .btn_down(down_p),
    .status, .boot_progress, .boot_done, .error_entered
  );

  // ---------------------------------------------------------------- signal processing
  logic [7:0]  sample, lp_sample, hr;
  logic        sample_valid, lp_valid, hr_valid, avg_valid, peak, plateau, has_template;
  logic [22:0] match_sum;
  logic        match_valid;

  adc_sampler #(.SAMPLE_DIV(SAMPLE_DIV)) u_adc (
    .clk(clk_65mhz), .rst(rst65), .adc_data, .sample, .sample_valid
  );

  signal_processing #(.PEAK_DEPTH(PEAK_DEPTH)) u_sp (
    .clk(clk_65mhz), .rst(rst65), .in_sample(sample), .in_valid(sample_valid),
    .capture(tmpl_p), .use_lp_direct(lp_direct),
    .lp_sample, .lp_valid, .match_sum, .match_valid, .has_template,
    .peak, .plateau, .hr, .hr_valid, .avg_hr, .avg_valid
  );

  // ---------------------------------------------------------------- display
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  logic [17:0] pixel_addr;
  logic        pixel_data;

  xvga u_xvga (.clk(clk_65mhz), .rst(rst65), .hcount, .vcount, .hsync, .vsync, .blank);

  sprite_brom u_brom (
    .clk(clk_65mhz), .pixel_addr, .pixel_data,
    .load_en(sprite_load_en), .load_addr(sprite_load_addr), .load_data(sprite_load_data)
  );

  main_display u_disp (
    .clk(clk_65mhz), .rst(rst65), .status, .boot_progress, .hr(avg_hr),
    .lp_sample, .lp_valid, .hcount, .vcount, .hsync, .vsync, .blank,
    .pixel_addr, .pixel_data, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs
  );

  // ---------------------------------------------------------------- audio events (65 MHz)
  logic        beep_ev, announce_ev;
  logic [15:0] announce_count;
  logic [7:0]  announce_hr;

  assign beep_ev = peak && (status == ST_CAPTURING);

  always_ff @(posedge clk_65mhz) begin
    if (rst65) begin
      announce_count <= '0;
      announce_ev    <= 1'b0;
      announce_hr    <= '0;
    end else begin
      announce_ev <= 1'b0;
      if (status != ST_CAPTURING) begin
        announce_count <= '0;
      end else if (sample_valid) begin
        if (announce_count == 16'(ANNOUNCE_SAMPLES - 1)) begin
          announce_count <= '0;
          announce_ev    <= 1'b1;
          announce_hr    <= avg_hr;
        end else begin
          announce_count <= announce_count + 16'd1;
        end
      end
    end
  end

  logic jingle_25, beep_25, syserr_25, announce_25;
  event_sync u_es_jingle (.src_clk(clk_65mhz), .src_rst(rst65), .src_pulse(boot_done),
                          .dst_clk(clk_25mhz), .dst_rst(rst25), .dst_pulse(jingle_25));
  event_sync u_es_beep   (.src_clk(clk_65mhz), .src_rst(rst65), .src_pulse(beep_ev),
                          .dst_clk(clk_25mhz), .dst_rst(rst25), .dst_pulse(beep_25));
  event_sync u_es_syserr (.src_clk(clk_65mhz), .src_rst(rst65), .src_pulse(error_entered),
                          .dst_clk(clk_25mhz), .dst_rst(rst25), .dst_pulse(syserr_25));
  event_sync u_es_annc   (.src_clk(clk_65mhz), .src_rst(rst65), .src_pulse(announce_ev),
                          .dst_clk(clk_25mhz), .dst_rst(rst25), .dst_pulse(announce_25));

  // ---------------------------------------------------------------- audio (25 / 100 MHz)
  sound_t      sound_id;
  logic        sound_req;
  logic        fifo_wr_en, fifo_full, fifo_rd_en, fifo_empty;
  logic [7:0]  fifo_din, fifo_dout, audio_sample;
  logic [11:0] fifo_count;
  logic [12:0] fifo_rd_count;
  logic        audio_busy, announcing, beep_dropped, playing;

  always_comb begin
    sound_req = jingle_25 | beep_25 | syserr_25;
    if (jingle_25)      sound_id = SND_JINGLE;
    else if (syserr_25) sound_id = SND_SYSERR;
    else                sound_id = SND_BEEP;
  end

  audio_controller u_actl (
    .clk(clk_25mhz), .rst(rst25), .sound_req, .sound_id,
    .announce_req(announce_25), .announce_hr,
    .sd_ready, .sd_rd, .sd_address, .sd_dout, .sd_byte_available,
    .fifo_wr_en, .fifo_din, .fifo_count,
    .busy(audio_busy), .announcing, .beep_dropped
  );

  audio_fifo u_fifo (
    .wr_clk(clk_25mhz), .wr_rst(rst25), .wr_en(fifo_wr_en), .din(fifo_din),
    .full(fifo_full), .fifo_count,
    .rd_clk(clk_100mhz), .rd_rst(rst100), .rd_en(fifo_rd_en), .dout(fifo_dout),
    .empty(fifo_empty), .rd_count(fifo_rd_count)
  );

  audio_playback #(.SAMPLE_DIV(AUDIO_DIV)) u_play (
    .clk(clk_100mhz), .rst(rst100), .fifo_empty, .fifo_rd_count, .fifo_dout,
    .fifo_rd_en, .playing, .sample(audio_sample), .pwm_out(aud_pwm)
  );
endmodule
