// sprite_brom: the 1-bit-wide block memory that holds the sprite map.
//
// DEPTH (217,514) one-bit words, one per pixel of the monochrome sprite map, read with one
// cycle of latency: `pixel_data` is the bit at the `pixel_addr` of the previous clock. The
// memory has one write port, `load_en`/`load_addr`/`load_data`, through which the bitmap is
// written after power-up; on an FPGA the same array can instead be initialised from the
// bitmap when the device is configured. The depth and the one-bit width follow the document.
// The bitmap itself (icons, the logo, the words of the interface and the digits) is artwork,
// not logic, and is not part of this RTL; until it is loaded the memory reads as zero.
module sprite_brom
  import heartaware_pkg::*;
#(
  parameter int unsigned DEPTH = BROM_DEPTH
) (
  input  logic        clk,
  input  logic [17:0] pixel_addr,
  output logic        pixel_data,
  input  logic        load_en,
  input  logic [17:0] load_addr,
  input  logic        load_data
);
  logic mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = 1'b0;

  always_ff @(posedge clk) begin
    if (load_en && load_addr < 18'(DEPTH)) mem[load_addr] <= load_data;
  end

  always_ff @(posedge clk) begin
    pixel_data <= (pixel_addr < 18'(DEPTH)) ? mem[pixel_addr] : 1'b0;
  end
endmodule
