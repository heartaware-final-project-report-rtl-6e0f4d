// reset_sync: makes a reset that is safe to use as a synchronous reset in one clock domain.
//
// The output is high at once while `rst_in` is high (so it is already asserted at the first
// clock edge after power-up) and stays high for two more clock edges after `rst_in` falls, so
// every flip-flop in the domain leaves reset on the same edge. This helper is this design's;
// the document does not describe reset.
module reset_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic r1, r2;
  always_ff @(posedge clk) begin
    r1 <= rst_in;
    r2 <= r1;
  end
  assign rst_out = rst_in | r1 | r2;
endmodule
