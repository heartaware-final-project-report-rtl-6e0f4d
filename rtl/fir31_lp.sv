// fir31_lp: 31-tap low-pass FIR filter for the 100 Hz pulse-oximeter samples.
//
// Each new sample is written into a 32-entry circular buffer. The filter then runs one
// multiply-accumulate per clock over the 31 most recent samples, and the result appears with
// a one-cycle `out_valid` 33 clock cycles after `in_valid` (31 products, one cycle to load
// the new sample and one to register the output). At the
// 65 MHz system clock this is far inside one 10 ms sample period; a new `in_valid` must not
// arrive while a result is being computed (an assertion checks this).
//
// The document fixes the tap count (31) and the serial structure but not the coefficient
// values. This design uses a triangular (Bartlett) window: c[k] = 16 - |k - 15|, which is
// 1, 2, ..., 16, ..., 2, 1. The coefficients are all positive and add up to 256, so the
// output is the accumulator shifted right by 8: unity gain at DC, the full 0..255 input range
// maps onto the full output range, and the response has no overshoot. The first null of the
// response is at 100/16 = 6.25 Hz, above the heart-rate band (below about 3.3 Hz) and below most
// of the noise.
module fir31_lp (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] in_sample,
  input  logic       in_valid,
  output logic [7:0] out_sample,
  output logic       out_valid
);
  localparam int unsigned TAPS = 31;

  function automatic logic [4:0] coeff(input logic [4:0] k);
    return (k <= 5'd15) ? (5'd1 + k) : (5'd31 - k);
  endfunction

  logic [7:0]  samples [32];
  logic [4:0]  wptr;     // slot of the newest sample
  logic [4:0]  k;        // tap index: coefficient k multiplies x[n-k]
  logic        busy;
  logic [16:0] acc;      // at most 255 * 256

  initial for (int i = 0; i < 32; i++) samples[i] = '0;

  always_ff @(posedge clk) begin
    if (in_valid) samples[wptr + 5'd1] <= in_sample;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr       <= '0;
      k          <= '0;
      busy       <= 1'b0;
      acc        <= '0;
      out_sample <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        wptr <= wptr + 5'd1;
        k    <= '0;
        acc  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc <= acc + 17'(samples[wptr - k]) * 17'(coeff(k));
        if (k == 5'(TAPS - 1)) begin
          busy <= 1'b0;
        end
        k <= k + 5'd1;
      end else if (k == 5'(TAPS)) begin
        out_sample <= acc[15:8];
        out_valid  <= 1'b1;
        k          <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) in_valid |-> !busy)
    else $error("fir31_lp: new sample while the previous one is still being filtered");
endmodule
