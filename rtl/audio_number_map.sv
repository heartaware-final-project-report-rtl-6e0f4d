// audio_number_map: picks the next word of a spoken heart rate.
//
// Given the part of the number still to be said, it returns the SD card address range of the
// next word and what remains after it:
//   100..199  "one hundred"          remaining = number - 100
//    20..99   "twenty".."ninety"     remaining = number mod 10
//    11..19   "eleven".."nineteen"   remaining = 0
//    10       "ten"                  remaining = 0
//     1..9    "one".."nine"          remaining = 0
//     0       "beats per minute"     `last` = 1
// So 83 gives "eighty" with 3 remaining, then "three" with 0 remaining, then "beats per
// minute". Inputs above 199 are treated as 199. The rule (largest part first, the rest fed
// back, "beats per minute" at zero) follows the document; the addresses come from the slot
// layout in heartaware_pkg. Purely combinational.
module audio_number_map
  import heartaware_pkg::*;
(
  input  logic [7:0] number,
  output clip_t      clip,
  output logic [7:0] remaining,
  output logic       last
);
  logic [7:0] n;
  logic [3:0] tens_digit;

  always_comb begin
    n          = (number > 8'd199) ? 8'd199 : number;
    tens_digit = 4'(n / 8'd10);
    last       = 1'b0;
    remaining  = '0;
    if (n >= 8'd100) begin
      clip      = slot_clip(SLOT_HUNDRED, 2);
      remaining = n - 8'd100;
    end else if (n >= 8'd20) begin
      clip      = slot_clip(SLOT_TENS + 32'(tens_digit) - 1, 1);
      remaining = n - 8'(tens_digit) * 8'd10;
    end else if (n >= 8'd11) begin
      clip      = slot_clip(SLOT_TEENS + 32'(n) - 11, 1);
    end else if (n == 8'd10) begin
      clip      = slot_clip(SLOT_TENS, 1);
    end else if (n >= 8'd1) begin
      clip      = slot_clip(SLOT_DIGITS + 32'(n), 1);
    end else begin
      clip      = slot_clip(SLOT_BPM, 2);
      last      = 1'b1;
    end
  end
endmodule
