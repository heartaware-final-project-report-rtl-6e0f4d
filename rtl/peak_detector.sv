// peak_detector: finds local maxima in a smooth sample stream.
//
// The DEPTH (50) most recent samples sit in a shift register, window[0] the newest. After each
// new sample the element in the middle, window[MID] with MID = DEPTH/2, is called a peak when
//   - it is at least as large as every other element of the window, and
//   - it is strictly larger than the sample just before it (window[MID+1]).
// The first rule is the document's "larger than the surrounding 49". Using "at least" rather
// than "strictly" lets a maximum that stays flat for several samples count; the second rule
// then makes such a plateau fire once, on its first sample, and keeps a flat line from firing
// at all. A plateau is found as long as it is shorter than the DEPTH-MID newer samples.
// `peak` is a one-cycle pulse two clocks after the `in_valid` that completed the window; it
// marks the sample MID steps before the newest one, so every peak is reported a fixed MID
// samples late, which leaves the spacing between peaks unchanged. `plateau` is high with
// `peak` when the peak value is repeated by the next-newer sample.
module peak_detector #(
  parameter int unsigned W     = 23,
  parameter int unsigned DEPTH = 50
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_sample,
  input  logic         in_valid,
  output logic         peak,
  output logic         plateau
);
  localparam int unsigned MID = DEPTH / 2;

  logic [W-1:0] window [DEPTH];
  logic         is_max;

  always_comb begin
    is_max = window[MID] > window[MID+1];
    for (int i = 0; i < DEPTH; i++) begin
      if (window[i] > window[MID]) is_max = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) window[i] <= '0;
    end else if (in_valid) begin
      window[0] <= in_sample;
      for (int i = 1; i < DEPTH; i++) window[i] <= window[i-1];
    end
  end

  // The window is stable one cycle after in_valid; judge it then.
  logic judge;
  always_ff @(posedge clk) begin
    if (rst) begin
      judge   <= 1'b0;
      peak    <= 1'b0;
      plateau <= 1'b0;
    end else begin
      judge   <= in_valid;
      peak    <= judge && is_max;
      plateau <= judge && is_max && (window[MID-1] == window[MID]);
    end
  end
endmodule
