// display_sprite_map: finds the digit sprites of the heart-rate readout in the sprite map.
//
// The sprite map is one monochrome MAP_W x MAP_H image stored row by row, so the pixel at
// (x, y) has address y*MAP_W + x. Its bottom row holds the digits in the order 1 2 3 4 5 6 7 8
// 9 0, each in a DIGIT_W x DIGIT_H slot, the first slot starting at (DIGIT_X0, DIGIT_Y).
// For a digit 0..9 the module returns the address of the top-left pixel of its slot
// (`addr_location`) and of the bottom-right pixel (`addr_end`). Inputs above 9 give the
// slot of 0. The digit order is the one printed in the sprite map; the slot size and
// position are this design's, chosen to fit that row into a 609 x 356 map.
module display_sprite_map
  import heartaware_pkg::*;
#(
  parameter int unsigned DIGIT_X0 = 150,
  parameter int unsigned DIGIT_Y  = 296,
  parameter int unsigned DIGIT_W  = 40,
  parameter int unsigned DIGIT_H  = 56
) (
  input  logic [3:0]  number,
  output logic [17:0] addr_location,
  output logic [17:0] addr_end
);
  logic [3:0] slot;

  always_comb begin
    slot          = (number >= 4'd1 && number <= 4'd9) ? number - 4'd1 : 4'd9;
    addr_location = 18'(DIGIT_Y * MAP_W + DIGIT_X0) + 18'(slot) * 18'(DIGIT_W);
    addr_end      = addr_location + 18'((DIGIT_H - 1) * MAP_W + DIGIT_W - 1);
  end
endmodule
