// signal_processing: the HeartAware signal chain, from 100 Hz ADC samples to an averaged heart
// rate.
//
//   sample -> fir31_lp -> fir128_match -> hr_calculator -> hr_moving_average -> avg_hr
//                 |                           ^
//                 +------ (use_lp_direct) ----+
//
// The low-pass output also leaves the block for the waveform display. The matched filter's
// template is recorded from the low-pass output when `capture` pulses. When `use_lp_direct` is
// high the matched filter is bypassed and the peak detector looks at the low-pass signal
// itself (zero-extended to the detector's width), which works for users whose pulses are sharp
// enough. Each stage computes serially at the system clock within one sample period; the
// match output arrives 130 cycles after the low-pass output, which arrives 33 cycles after
// the input sample. All stage choices follow the document; the bypass being a level input is
// this design's choice.
module signal_processing #(
  parameter int unsigned PEAK_DEPTH      = 50,
  parameter int unsigned SAMPLES_PER_MIN = 6000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  in_sample,
  input  logic        in_valid,
  input  logic        capture,
  input  logic        use_lp_direct,
  output logic [7:0]  lp_sample,
  output logic        lp_valid,
  output logic [22:0] match_sum,
  output logic        match_valid,
  output logic        has_template,
  output logic        peak,
  output logic        plateau,
  output logic [7:0]  hr,
  output logic        hr_valid,
  output logic [7:0]  avg_hr,
  output logic        avg_valid
);
  logic [22:0] det_sample;
  logic        det_valid;

  fir31_lp u_lp (
    .clk, .rst, .in_sample, .in_valid, .out_sample(lp_sample), .out_valid(lp_valid)
  );

  fir128_match u_match (
    .clk, .rst, .in_sample(lp_sample), .in_valid(lp_valid), .capture,
    .out_sum(match_sum), .out_valid(match_valid), .has_template
  );

  always_comb begin
    if (use_lp_direct) begin
      det_sample = 23'(lp_sample);
      det_valid  = lp_valid;
    end else begin
      det_sample = match_sum;
      det_valid  = match_valid;
    end
  end

  hr_calculator #(.W(23), .DEPTH(PEAK_DEPTH), .SAMPLES_PER_MIN(SAMPLES_PER_MIN)) u_hr (
    .clk, .rst, .in_sample(det_sample), .in_valid(det_valid), .peak, .plateau, .hr, .hr_valid
  );

  hr_moving_average u_avg (
    .clk, .rst, .in_hr(hr), .in_valid(hr_valid), .avg(avg_hr), .avg_valid
  );
endmodule
