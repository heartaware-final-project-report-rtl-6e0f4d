// hr_calculator: turns the filtered pulse signal into one heart-rate value per beat.
//
// A peak_detector marks each beat. Between beats a counter counts 100 Hz samples; at each
// beat the count is the beat-to-beat interval and a serial divider computes
//   hr = SAMPLES_PER_MIN / interval      (6000 / interval at 100 Hz)
// in 13 clock cycles; `hr_valid` pulses with `hr` for one cycle 16 cycles after `peak`. The first beat
// after reset only starts the count and gives no value. A rate above HR_MAX (an interval under
// 31 samples) is reported as HR_MAX, so the value always fits the 0..199 range that the
// display and the announcer handle; an interval past the counter's range (82 s) is held there
// and gives 0. `peak` and `plateau` are the detector's pulses, brought out for the beep and for
// test.
//
// The peak detector, the interval counter and the division of 6000 by the interval follow the
// document; the clamp to HR_MAX, the suppressed first beat and the counter width are this
// design's choices.
module hr_calculator #(
  parameter int unsigned W               = 23,
  parameter int unsigned DEPTH           = 50,
  parameter int unsigned SAMPLES_PER_MIN = 6000,
  parameter int unsigned HR_MAX          = 199
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_sample,
  input  logic         in_valid,
  output logic         peak,
  output logic         plateau,
  output logic [7:0]   hr,
  output logic         hr_valid
);
  localparam int unsigned W_DIV = 13;   // holds 6000 and intervals up to 8191 samples

  logic [W_DIV-1:0] interval;
  logic             have_prev;
  logic             div_start, div_done, div_busy;
  logic [W_DIV-1:0] div_den, quotient;

  peak_detector #(.W(W), .DEPTH(DEPTH)) u_peak (
    .clk, .rst, .in_sample, .in_valid, .peak, .plateau
  );

  seq_divider #(.W(W_DIV)) u_div (
    .clk, .rst,
    .start(div_start), .numerator(W_DIV'(SAMPLES_PER_MIN)), .denominator(div_den),
    .quotient, .done(div_done), .busy(div_busy)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      interval  <= '0;
      have_prev <= 1'b0;
      div_start <= 1'b0;
      div_den   <= '1;
    end else begin
      div_start <= 1'b0;
      if (peak) begin
        if (have_prev && interval != '0 && !div_busy) begin
          div_den   <= interval;
          div_start <= 1'b1;
        end
        have_prev <= 1'b1;
        interval  <= in_valid ? W_DIV'(1) : '0;
      end else if (in_valid && interval != '1) begin
        interval <= interval + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hr       <= '0;
      hr_valid <= 1'b0;
    end else begin
      hr_valid <= div_done;
      if (div_done) begin
        if (div_den == '1)                 hr <= '0;
        else if (quotient > W_DIV'(HR_MAX)) hr <= 8'(HR_MAX);
        else                               hr <= quotient[7:0];
      end
    end
  end
endmodule
