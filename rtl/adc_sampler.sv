// adc_sampler: takes the ADC0804's 8-bit parallel output off the Pmod port and produces the
// 100 Hz sample stream that feeds the signal-processing chain.
//
// The ADC bus is asynchronous to the FPGA clock, so it passes through two flip-flop stages
// first. A strobe_gen divides the 65 MHz system clock by SAMPLE_DIV (650,000 gives 100 Hz);
// on each strobe the synchronised value is latched into `sample` and `sample_valid` pulses for
// one cycle, one cycle after the strobe. The 100 Hz rate and the 8-bit width are the
// document's. The ADC is taken to run free (it converts continuously and its bus is simply
// read); the double synchroniser is this design's choice. A value that changes while it is
// latched may be torn between two conversions; the document gives no handshake with the
// converter.
module adc_sampler #(
  parameter int unsigned SAMPLE_DIV = 650_000,
  parameter int unsigned W          = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] adc_data,
  output logic [W-1:0] sample,
  output logic         sample_valid
);
  logic [W-1:0] sync1, sync2;
  logic         tick;

  strobe_gen #(.DIV(SAMPLE_DIV)) u_tick (.clk(clk), .rst(rst), .tick(tick));

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1        <= '0;
      sync2        <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sync1        <= adc_data;
      sync2        <= sync1;
      sample_valid <= tick;
      if (tick) sample <= sync2;
    end
  end
endmodule
