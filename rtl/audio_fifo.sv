// audio_fifo: dual-clock FIFO of 8-bit audio samples between the SD card reader and the
// PWM audio output.
//
// DEPTH (4096) bytes of dual-port RAM. The write side runs on the SD clock, the read side on
// the audio clock. Each side keeps a binary pointer one bit wider than the address and shares
// its Gray-coded copy with the other side through two flip-flops, the standard asynchronous
// FIFO. A side therefore sees the other's progress two or three cycles late, which only makes
// `full` and `empty` cautious, never wrong.
//
// Write side: `wr_en` stores `din` (ignored when `full`); `fifo_count` is the write side's view
// of how many bytes are stored, saturated to 12 bits (4095), and is what the SD reader uses to
// decide whether another 512-byte block fits. Read side: `rd_en` (ignored when `empty`) pops
// one byte, which appears on `dout` on the next read clock; `rd_count` is the read side's view
// of the fill level. The 4096-byte depth, the 8-bit data, the 12-bit count and the
// asynchronous interface follow the document; the Gray-code construction is this design's.
module audio_fifo #(
  parameter int unsigned AW = 12
) (
  input  logic          wr_clk,
  input  logic          wr_rst,
  input  logic          wr_en,
  input  logic [7:0]    din,
  output logic          full,
  output logic [11:0]   fifo_count,
  input  logic          rd_clk,
  input  logic          rd_rst,
  input  logic          rd_en,
  output logic [7:0]    dout,
  output logic          empty,
  output logic [AW:0]   rd_count
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [7:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  logic [AW:0] rptr, rptr_gray, wptr_gray_r1, wptr_gray_r2, wptr_r;

  // Write side.
  logic [AW:0] wptr, wptr_gray, rptr_gray_w1, rptr_gray_w2, rptr_w, wcount;
  assign rptr_w = gray2bin(rptr_gray_w2);
  assign wcount = wptr - rptr_w;
  assign full   = (wcount == (AW+1)'(DEPTH));
  assign fifo_count = (wcount > (AW+1)'(4095)) ? 12'd4095 : 12'(wcount);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wptr         <= '0;
      wptr_gray    <= '0;
      rptr_gray_w1 <= '0;
      rptr_gray_w2 <= '0;
    end else begin
      rptr_gray_w1 <= rptr_gray;
      rptr_gray_w2 <= rptr_gray_w1;
      if (wr_en && !full) begin
        wptr      <= wptr + 1'b1;
        wptr_gray <= bin2gray(wptr + 1'b1);
      end
    end
  end

  // Read side.
  assign wptr_r   = gray2bin(wptr_gray_r2);
  assign rd_count = wptr_r - rptr;
  assign empty    = (rd_count == '0);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr         <= '0;
      rptr_gray    <= '0;
      wptr_gray_r1 <= '0;
      wptr_gray_r2 <= '0;
      dout         <= 8'h80;
    end else begin
      wptr_gray_r1 <= wptr_gray;
      wptr_gray_r2 <= wptr_gray_r1;
      if (rd_en && !empty) begin
        dout      <= mem[rptr[AW-1:0]];
        rptr      <= rptr + 1'b1;
        rptr_gray <= bin2gray(rptr + 1'b1);
      end
    end
  end

  assert property (@(posedge wr_clk) disable iff (wr_rst) !(wr_en && full))
    else $error("audio_fifo: write to a full FIFO");
endmodule
