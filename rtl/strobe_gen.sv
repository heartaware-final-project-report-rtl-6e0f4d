// strobe_gen: divides a clock into a one-cycle enable pulse.
//
// A counter runs from 0 to DIV-1 and `tick` is high for the single clock cycle in which it
// wraps, so one tick arrives every DIV cycles (the first DIV cycles after reset). The
// HeartAware design runs each slow rate (100 Hz samples, 32 kHz audio) as an enable of a fast
// clock rather than as a clock of its own; this is a choice of this design.
module strobe_gen #(
  parameter int unsigned DIV = 650_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(DIV - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end
endmodule
