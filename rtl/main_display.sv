// main_display: the HeartAware user interface, composed pixel by pixel.
//
// Seventeen elements are drawn from the current scan position: two waveform traces (one row
// apart, giving a two-pixel line) of the low-pass signal, five blobs and ten sprite areas
// served by one scanning sprite block and the shared sprite ROM. Which elements are visible
// and their colors depend on the system state:
//   BOOT       logo, "booting..." and a progress bar that grows with `boot_progress`
//   CAPTURING  logo, rolling waveform, heart rate in a red box with "BPM", blue status bar
//              with "collecting data..."
//   PAUSED     as CAPTURING but frozen (no new samples, heart rate held), grey box and bar,
//              "paused."
//   ERROR      logo, red box with "error.", grey heart-rate box and status bar
// The heart rate is split into decimal digits by bin_to_bcd, and display_sprite_map turns each
// digit into its place in the sprite map; a leading zero in the hundreds place is hidden.
//
// There is no transparency: the colors of overlapping elements are ORed. Every element's
// pixel lags the scan position by three cycles and the mix is registered once more, so hsync,
// vsync and blank are delayed by four cycles to stay aligned with the color. The element
// counts, the per-state screens and the absence of transparency follow the document; the
// screen coordinates, the map coordinates of the sprites and the colors are this design's.
module main_display
  import heartaware_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  system_status_t status,
  input  logic [7:0]     boot_progress,
  input  logic [7:0]     hr,
  input  logic [7:0]     lp_sample,
  input  logic           lp_valid,
  input  logic [10:0]    hcount,
  input  logic [9:0]     vcount,
  input  logic           hsync,
  input  logic           vsync,
  input  logic           blank,
  output logic [17:0]    pixel_addr,
  input  logic           pixel_data,
  output logic [3:0]     vga_r,
  output logic [3:0]     vga_g,
  output logic [3:0]     vga_b,
  output logic           vga_hs,
  output logic           vga_vs
);
  localparam int unsigned LAT = 4;

  logic capturing, paused, error, booting, live;
  assign booting   = (status == ST_BOOT);
  assign capturing = (status == ST_CAPTURING);
  assign paused    = (status == ST_PAUSED);
  assign error     = (status == ST_ERROR);
  assign live      = capturing || paused;

  // Heart rate on screen: follows the input while capturing, held otherwise.
  logic [7:0] shown_hr;
  always_ff @(posedge clk) begin
    if (rst) shown_hr <= '0;
    else if (capturing) shown_hr <= hr;
  end

  logic [3:0]  d_h, d_t, d_o;
  logic [17:0] a_h, a_t, a_o;
  bin_to_bcd u_bcd (.bin(shown_hr), .hundreds(d_h), .tens(d_t), .ones(d_o));
  display_sprite_map u_map_h (.number(d_h), .addr_location(a_h), .addr_end());
  display_sprite_map u_map_t (.number(d_t), .addr_location(a_t), .addr_end());
  display_sprite_map u_map_o (.number(d_o), .addr_location(a_o), .addr_end());

  // Waveforms.
  logic [11:0] px_w0, px_w1;
  waveform #(.Y_OFFSET(0)) u_wave0 (
    .clk, .rst, .sample(lp_sample), .sample_valid(lp_valid && capturing),
    .enable(live), .color(C_WHITE), .hcount, .vcount, .pixel(px_w0)
  );
  waveform #(.Y_OFFSET(1)) u_wave1 (
    .clk, .rst, .sample(lp_sample), .sample_valid(lp_valid && capturing),
    .enable(live), .color(C_WHITE), .hcount, .vcount, .pixel(px_w1)
  );

  // Blobs.
  logic [11:0] px_b [5];
  logic [11:0] box_color;
  assign box_color = capturing ? C_RED : C_GREY;

  blob u_track (.clk, .enable(booting), .x(11'd2), .y(10'd300), .width(11'd1020),
                .height(10'd24), .color(C_DARK), .hcount, .vcount, .pixel(px_b[0]));
  blob u_bar   (.clk, .enable(booting), .x(11'd2), .y(10'd300),
                .width({1'b0, boot_progress, 2'b00}), .height(10'd24), .color(C_WHITE),
                .hcount, .vcount, .pixel(px_b[1]));
  blob u_hrbox (.clk, .enable(!booting), .x(11'd830), .y(10'd20), .width(11'd140),
                .height(10'd130), .color(box_color), .hcount, .vcount, .pixel(px_b[2]));
  blob u_stat  (.clk, .enable(!booting), .x(11'd0), .y(10'd700), .width(11'd1024),
                .height(10'd68), .color(capturing ? C_BLUE : C_GREY), .hcount, .vcount,
                .pixel(px_b[3]));
  blob u_errbx (.clk, .enable(error), .x(11'd312), .y(10'd284), .width(11'd400),
                .height(10'd200), .color(C_RED), .hcount, .vcount, .pixel(px_b[4]));

  // Sprite areas: {en, x, y, w, h, base = map_y*MAP_W + map_x, color}.
  sprite_t sprites [N_SPRITES];
  always_comb begin
    sprites[0] = '{en: 1'b1,              x: 11'd140, y: 10'd40,  w: 10'd355, h: 9'd58,
                   base: 18'(0 * MAP_W + 250),   color: C_RED};    // "HeartAware"
    sprites[1] = '{en: 1'b1,              x: 11'd10,  y: 10'd10,  w: 10'd125, h: 9'd125,
                   base: 18'(225 * MAP_W + 0),   color: C_RED};    // heart outline
    sprites[2] = '{en: live,              x: 11'd870, y: 10'd100, w: 10'd75,  h: 9'd35,
                   base: 18'(185 * MAP_W + 150), color: C_WHITE};  // "BPM"
    sprites[3] = '{en: live && d_h != 0,  x: 11'd840, y: 10'd30,  w: 10'd40,  h: 9'd56,
                   base: a_h,                     color: C_WHITE};  // hundreds
    sprites[4] = '{en: live && (d_h != 0 || d_t != 0),
                                          x: 11'd880, y: 10'd30,  w: 10'd40,  h: 9'd56,
                   base: a_t,                     color: C_WHITE};  // tens
    sprites[5] = '{en: live,              x: 11'd920, y: 10'd30,  w: 10'd40,  h: 9'd56,
                   base: a_o,                     color: C_WHITE};  // ones
    sprites[6] = '{en: capturing,         x: 11'd650, y: 10'd704, w: 10'd360, h: 9'd60,
                   base: 18'(60 * MAP_W + 245),  color: C_WHITE};  // "collecting data..."
    sprites[7] = '{en: paused,            x: 11'd830, y: 10'd704, w: 10'd175, h: 9'd60,
                   base: 18'(120 * MAP_W + 245), color: C_WHITE};  // "paused."
    sprites[8] = '{en: error,             x: 11'd437, y: 10'd354, w: 10'd150, h: 9'd60,
                   base: 18'(120 * MAP_W + 430), color: C_WHITE};  // "error."
    sprites[9] = '{en: booting,           x: 11'd392, y: 10'd200, w: 10'd240, h: 9'd60,
                   base: 18'(180 * MAP_W + 230), color: C_WHITE};  // "booting..."
  end

  logic [11:0] px_s;
  sprite_scanner u_sprites (
    .clk, .rst, .sprites, .hcount, .vcount, .pixel_addr, .pixel_data, .pixel(px_s)
  );

  // Mix and align the sync signals.
  logic [LAT-1:0] hs_d, vs_d, bl_d;
  logic [11:0]    mix;
  assign mix = px_w0 | px_w1 | px_b[0] | px_b[1] | px_b[2] | px_b[3] | px_b[4] | px_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d  <= '1;
      vs_d  <= '1;
      bl_d  <= '1;
      vga_r <= '0;
      vga_g <= '0;
      vga_b <= '0;
    end else begin
      hs_d  <= {hs_d[LAT-2:0], hsync};
      vs_d  <= {vs_d[LAT-2:0], vsync};
      bl_d  <= {bl_d[LAT-2:0], blank};
      vga_r <= bl_d[LAT-2] ? 4'h0 : mix[11:8];
      vga_g <= bl_d[LAT-2] ? 4'h0 : mix[7:4];
      vga_b <= bl_d[LAT-2] ? 4'h0 : mix[3:0];
    end
  end
  assign vga_hs = hs_d[LAT-1];
  assign vga_vs = vs_d[LAT-1];
endmodule
