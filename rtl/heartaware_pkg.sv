// heartaware_pkg: types and constants shared by the HeartAware pulse-oximeter modules.
//
// It holds the four-state system status of the top-level controller, the layout of the
// audio recording on the SD card and the sample widths of the signal-processing chain.
//
// Audio layout. The recording is one mono, unsigned 8-bit, 32 kHz file written raw to the
// card from byte 0, so a sound that starts at t seconds starts at byte t*32000. Reads must
// start on a 512-byte boundary, so every sound is given here as a whole number of 512-byte
// blocks. The only address pair fixed from outside is "fifty": 'h25800 to 'h2BC00 (4.8 s to
// 5.6 s). This package assumes the rest of the file is cut into equal 0.8 s slots of 25,600
// bytes (50 blocks): "one hundred" takes two slots, then ten..ninety, eleven..nineteen,
// zero..nine, "beats per minute" (two slots), "system error" (two slots), the boot jingle
// (seven slots) and the beep tone (one slot). That order puts "fifty" exactly at slot 6.
// A different recording only needs new numbers here.
// The "fifty" addresses, the 32 kHz 8-bit format and the 512-byte rule follow the original design;
// the slot order and the extra clips are this design's.
package heartaware_pkg;

  // Top-level controller states (the system_status variable).
  typedef enum logic [1:0] {
    ST_BOOT      = 2'd0,
    ST_CAPTURING = 2'd1,
    ST_PAUSED    = 2'd2,
    ST_ERROR     = 2'd3
  } system_status_t;

  // SD card addresses are byte addresses.
  localparam int unsigned SD_ADDR_W  = 32;
  localparam int unsigned SLOT_BYTES = 25600;  // 0.8 s at 32 kHz, 50 blocks

  // One sound on the card: first byte and the byte after the last one.
  typedef struct packed {
    logic [SD_ADDR_W-1:0] start_addr;
    logic [SD_ADDR_W-1:0] end_addr;
  } clip_t;

  function automatic clip_t slot_clip(input int unsigned first_slot, input int unsigned n_slots);
    clip_t c;
    c.start_addr = SD_ADDR_W'(first_slot * SLOT_BYTES);
    c.end_addr   = SD_ADDR_W'((first_slot + n_slots) * SLOT_BYTES);
    return c;
  endfunction

  // Slot numbers of the recording.
  localparam int unsigned SLOT_HUNDRED = 0;   // "one hundred", 2 slots
  localparam int unsigned SLOT_TENS    = 2;   // "ten" at 2, "twenty" at 3, ... "ninety" at 10
  localparam int unsigned SLOT_TEENS   = 11;  // "eleven" at 11 ... "nineteen" at 19
  localparam int unsigned SLOT_DIGITS  = 20;  // "zero" at 20 ... "nine" at 29
  localparam int unsigned SLOT_BPM     = 30;  // "beats per minute", 2 slots
  localparam int unsigned SLOT_SYSERR  = 32;  // "system error", 2 slots
  localparam int unsigned SLOT_JINGLE  = 34;  // boot jingle, 7 slots
  localparam int unsigned SLOT_BEEP    = 41;  // beep tone, 1 slot

  // Sounds the audio controller can be asked to play on its own.
  typedef enum logic [1:0] {
    SND_JINGLE = 2'd0,
    SND_BEEP   = 2'd1,
    SND_SYSERR = 2'd2
  } sound_t;

  // Display: sprite map geometry and one sprite area of the scanning sprite block.
  localparam int unsigned MAP_W      = 609;      // sprite map width in pixels
  localparam int unsigned MAP_H      = 356;      // sprite map height in pixels
  localparam int unsigned BROM_DEPTH = 217_514;  // bits in the 1-bit-wide sprite ROM
  localparam int unsigned N_SPRITES  = 10;

  typedef struct packed {
    logic        en;     // visible
    logic [10:0] x;      // screen position of the top-left corner
    logic [9:0]  y;
    logic [9:0]  w;      // size in pixels
    logic [8:0]  h;
    logic [17:0] base;   // map address of the top-left pixel: map_y * MAP_W + map_x
    logic [11:0] color;  // color of the set pixels
  } sprite_t;

  // 12-bit RGB colors of the user interface.
  localparam logic [11:0] C_WHITE = 12'hFFF;
  localparam logic [11:0] C_RED   = 12'hC23;
  localparam logic [11:0] C_BLUE  = 12'h09B;
  localparam logic [11:0] C_GREY  = 12'h666;
  localparam logic [11:0] C_DARK  = 12'h333;

endpackage
