// blob: draws a filled rectangle.
//
// The rectangle covers x <= hcount < x+width and y <= vcount < y+height. Inside it, and while
// `enable` is high, `pixel` carries `color`; everywhere else it is 0. Position, size, color and
// visibility are inputs, so a blob can move, grow (the boot progress bar) or hide at run time.
// `pixel` lags (hcount, vcount) by three clock cycles, the latency shared by every HeartAware
// display element. The rectangle and its dynamic width, color and visibility follow the
// document; the three-cycle latency is this design's choice.
module blob (
  input  logic        clk,
  input  logic        enable,
  input  logic [10:0] x,
  input  logic [9:0]  y,
  input  logic [10:0] width,
  input  logic [9:0]  height,
  input  logic [11:0] color,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [11:0] pixel
);
  logic in_rect;
  logic [11:0] p1, p2;

  assign in_rect = enable
               && ({1'b0, hcount} >= {1'b0, x}) && ({1'b0, hcount} < {1'b0, x} + {1'b0, width})
               && ({1'b0, vcount} >= {1'b0, y}) && ({1'b0, vcount} < {1'b0, y} + {1'b0, height});

  always_ff @(posedge clk) begin
    p1    <= in_rect ? color : 12'h000;
    p2    <= p1;
    pixel <= p2;
  end
endmodule
