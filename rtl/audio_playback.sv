// audio_playback: the read side of the audio path, from the FIFO to the PWM output.
//
// A strobe_gen divides the 100 MHz PWM clock by SAMPLE_DIV (3125) into the 32 kHz sample
// rate. Playback is "primed" once the FIFO holds at least PRIME (512) samples and stays
// primed until the FIFO runs empty; while primed, every 32 kHz strobe pops one sample and
// passes it to pwm_audio. While not primed the output rests at mid-scale (128), the silence
// level of unsigned 8-bit audio. Waiting for 512 samples before the first pop gives the SD
// reader a whole block of slack, as the document describes; the pop happens on the strobe and
// the sample reaches the PWM block two PWM clocks later. `playing` is high while primed.
module audio_playback #(
  parameter int unsigned SAMPLE_DIV = 3125,
  parameter int unsigned PRIME      = 512,
  parameter int unsigned AW         = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fifo_empty,
  input  logic [AW:0] fifo_rd_count,
  input  logic [7:0]  fifo_dout,
  output logic        fifo_rd_en,
  output logic        playing,
  output logic [7:0]  sample,
  output logic        pwm_out
);
  logic tick, popped;

  strobe_gen #(.DIV(SAMPLE_DIV)) u_tick (.clk, .rst, .tick);

  assign fifo_rd_en = tick && playing && !fifo_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      playing <= 1'b0;
      popped  <= 1'b0;
      sample  <= 8'h80;
    end else begin
      if (!playing && fifo_rd_count >= (AW+1)'(PRIME)) playing <= 1'b1;
      else if (playing && fifo_empty)                   playing <= 1'b0;
      popped <= fifo_rd_en;
      if (popped)        sample <= fifo_dout;
      else if (!playing && tick) sample <= 8'h80;
    end
  end

  pwm_audio u_pwm (.clk, .rst, .sample, .pwm_out);
endmodule
