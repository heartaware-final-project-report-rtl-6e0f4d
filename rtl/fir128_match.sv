// fir128_match: 128-tap matched filter that correlates the low-pass signal with a template
// pulse recorded from the user.
//
// The 128 most recent low-pass samples are kept in a circular history RAM. A second RAM holds
// the 128 coefficients, the template in reverse time order: coefficient k is the sample that
// was k steps old when the template was taken, so that
//   y[n] = sum_{k=0..127} h[k] * x[n-k]
// is largest when the last 128 samples line up with the template. For every new sample the
// filter walks k = 0..127, one 8x8-bit unsigned multiply-accumulate per clock, and presents
// the 23-bit sum 130 cycles after `in_valid` with a one-cycle `out_valid`.
//
// Recording the template: a one-cycle pulse on `capture` (from switch 13 turning on) is held
// until the next sample arrives. The walk that follows copies each history sample into
// coefficient k as it reads it, and uses the new coefficient in the same pass, so the template
// is the 128 most recent samples including the new one. Until the first capture the
// coefficients are zero and the output is zero.
//
// The tap count, the template source, the reverse-order storage in block RAM and the serial
// multiply at the fast clock follow the document. Unsigned arithmetic, the 23-bit full-precision
// output and the hold-until-next-sample capture are this design's choices.
module fir128_match #(
  parameter int unsigned TAPS = 128
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  in_sample,
  input  logic        in_valid,
  input  logic        capture,
  output logic [22:0] out_sum,
  output logic        out_valid,
  output logic        has_template
);
  localparam int unsigned AW = $clog2(TAPS);

  logic [7:0]    history [TAPS];
  logic [7:0]    coeffs  [TAPS];
  logic [AW-1:0] wptr;
  logic [AW-1:0] k;
  logic          busy, tail;
  logic          capture_pending, capturing;
  logic [22:0]   acc;
  logic [7:0]    x_k, h_k;

  initial begin
    for (int i = 0; i < TAPS; i++) begin
      history[i] = '0;
      coeffs[i]  = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) history[wptr + 1'b1] <= in_sample;
  end

  always_ff @(posedge clk) begin
    if (busy && capturing) coeffs[k] <= x_k;
  end

  assign x_k = history[wptr - k];
  assign h_k = capturing ? x_k : coeffs[k];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr            <= '0;
      k               <= '0;
      busy            <= 1'b0;
      tail            <= 1'b0;
      capture_pending <= 1'b0;
      capturing       <= 1'b0;
      has_template    <= 1'b0;
      acc             <= '0;
      out_sum         <= '0;
      out_valid       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      tail      <= 1'b0;
      if (capture) capture_pending <= 1'b1;
      if (in_valid) begin
        wptr      <= wptr + 1'b1;
        k         <= '0;
        acc       <= '0;
        busy      <= 1'b1;
        capturing <= capture_pending | capture;
        capture_pending <= 1'b0;
      end else if (busy) begin
        acc <= acc + 23'(x_k) * 23'(h_k);
        k   <= k + 1'b1;
        if (k == AW'(TAPS - 1)) begin
          busy <= 1'b0;
          tail <= 1'b1;
          if (capturing) has_template <= 1'b1;
          capturing <= 1'b0;
        end
      end else if (tail) begin
        out_sum   <= acc;
        out_valid <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) in_valid |-> !busy)
    else $error("fir128_match: new sample while the previous one is still being correlated");
endmodule
