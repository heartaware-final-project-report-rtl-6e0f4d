// event_sync: carries one-cycle event pulses from one clock domain to another.
//
// Each `src_pulse` flips a toggle flip-flop in the source domain. The toggle crosses into the
// destination domain through two flip-flops, and every change seen there becomes a one-cycle
// `dst_pulse`. Pulses must be at least three destination cycles apart to be counted
// separately. Data that goes with the event must be held stable in the source domain until
// the next event. This helper is this design's choice.
module event_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic toggle;
  logic s1, s2, s3;

  always_ff @(posedge src_clk) begin
    if (src_rst) toggle <= 1'b0;
    else if (src_pulse) toggle <= !toggle;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      s1        <= 1'b0;
      s2        <= 1'b0;
      s3        <= 1'b0;
      dst_pulse <= 1'b0;
    end else begin
      s1        <= toggle;
      s2        <= s1;
      s3        <= s2;
      dst_pulse <= s2 ^ s3;
    end
  end
endmodule
