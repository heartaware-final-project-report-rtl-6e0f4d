// sprite_scanner: the scanning sprite block. One shared sprite ROM serves N_SPRITES screen
// areas.
//
// For every pixel of the scan the block checks the current (hcount, vcount) against each
// enabled sprite area. If the pixel lies in one (the lowest-numbered one wins where areas
// overlap), the ROM address of the matching map pixel is
//   base + (vcount - y) * MAP_W + (hcount - x)
// and is sent to the ROM; the returned bit decides whether `pixel` shows the sprite's color
// or 0. Because only one area can be drawn at a time, one ROM port is enough, however many
// sprites are on screen.
//
// Timing: the address is registered (cycle 1), the ROM answers one cycle later (cycle 2), and
// `pixel` is registered (cycle 3), so `pixel` lags (hcount, vcount) by three clock cycles like
// every other display element. The scanning scheme, the ten areas and the 18-bit ROM address
// follow the document; the priority order and the pipeline are this design's choices.
module sprite_scanner
  import heartaware_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  sprite_t     sprites [N_SPRITES],
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [17:0] pixel_addr,
  input  logic        pixel_data,
  output logic [11:0] pixel
);
  logic        hit, hit1, hit2;
  logic [17:0] addr;
  logic [11:0] color, color1, color2;

  always_comb begin
    hit   = 1'b0;
    addr  = '0;
    color = '0;
    for (int i = N_SPRITES - 1; i >= 0; i--) begin
      if (sprites[i].en
          && hcount >= sprites[i].x && hcount < sprites[i].x + 11'(sprites[i].w)
          && vcount >= sprites[i].y && vcount < sprites[i].y + 10'(sprites[i].h)) begin
        hit   = 1'b1;
        color = sprites[i].color;
        addr  = sprites[i].base
              + 18'(vcount - sprites[i].y) * 18'(MAP_W)
              + 18'(hcount - sprites[i].x);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pixel_addr <= '0;
      hit1       <= 1'b0;
      hit2       <= 1'b0;
      color1     <= '0;
      color2     <= '0;
      pixel      <= '0;
    end else begin
      pixel_addr <= addr;
      hit1       <= hit;
      color1     <= color;
      hit2       <= hit1;
      color2     <= color1;
      pixel      <= (hit2 && pixel_data) ? color2 : 12'h000;
    end
  end
endmodule
