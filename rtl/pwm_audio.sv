// pwm_audio: turns 8-bit audio samples into a pulse-width-modulated output bit.
//
// An 8-bit counter runs freely at the PWM clock (100 MHz). The output is high while the
// counter is below the current sample, so over each 256-cycle period the duty cycle is
// sample/256 and the PWM frequency is 100 MHz / 256 = 390.6 kHz, far above the audio band; the
// board's analog low-pass filter recovers the waveform. `sample` is taken at the start of
// each period so that a change in the middle of a period cannot produce a glitch. The 8-bit
// input, the duty-cycle principle and the 100 MHz clock follow the document; the counter
// scheme and the sampling at the period start are this design's.
module pwm_audio (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] sample,
  output logic       pwm_out
);
  logic [7:0] count, level;

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      level   <= 8'h80;
      pwm_out <= 1'b0;
    end else begin
      count   <= count + 8'd1;
      if (count == 8'hFF) level <= sample;
      pwm_out <= (count < level);
    end
  end
endmodule
