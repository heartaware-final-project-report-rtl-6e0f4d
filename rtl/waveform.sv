// waveform: rolling plot of the most recent low-pass samples across the screen.
//
// A dual-port RAM keeps the last 1024 samples; `sample_valid` writes `sample` into slot wptr
// and advances wptr, so wptr always points at the oldest sample. The read side runs at the
// pixel clock: screen column hcount shows the sample at address hcount + wptr (the "sliding"
// address), which puts the oldest sample at the left edge and the newest at the right, and
// every new sample moves the whole trace one pixel to the left.
//
// The 8-bit value d is drawn at row Y_BOTTOM + Y_OFFSET - (d + d/2), which spreads 0..255 over
// the middle half of a 768-line screen (rows 575 down to 193). A pixel is lit in `color` when
// vcount equals that row and `enable` is high. Y_OFFSET shifts the trace down by whole rows;
// two instances one row apart draw a two-pixel-thick line. `pixel` lags (hcount, vcount) by
// three clock cycles. The 1024-sample RAM, the sliding read address and the middle-half
// mapping follow the document; the exact scale factor 1.5 and the latency are this design's
// choices.
module waveform #(
  parameter int unsigned Y_BOTTOM = 575,
  parameter int unsigned Y_OFFSET = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  sample,
  input  logic        sample_valid,
  input  logic        enable,
  input  logic [11:0] color,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [11:0] pixel
);
  logic [7:0]  mem [1024];
  logic [9:0]  wptr;
  logic [7:0]  rd_data;
  logic [10:0] h1;
  logic [9:0]  v1, row;
  logic [11:0] p2;

  initial for (int i = 0; i < 1024; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (sample_valid) mem[wptr] <= sample;
  end

  always_ff @(posedge clk) begin
    if (rst) wptr <= '0;
    else if (sample_valid) wptr <= wptr + 10'd1;
  end

  // Stage 1: read the sample for this column.
  always_ff @(posedge clk) begin
    rd_data <= mem[hcount[9:0] + wptr];
    h1      <= hcount;
    v1      <= vcount;
  end

  assign row = 10'(Y_BOTTOM + Y_OFFSET) - (10'(rd_data) + 10'(rd_data[7:1]));

  // Stages 2 and 3: compare with the scan line, then align with the other elements.
  always_ff @(posedge clk) begin
    p2    <= (enable && h1 < 11'd1024 && v1 == row) ? color : 12'h000;
    pixel <= p2;
  end
endmodule
