// sync_debounce: brings a push button or switch into the clock domain and debounces it.
//
// Two flip-flops synchronise the raw input. The debounced level `level` only takes a new value
// after the synchronised input has held it for STABLE consecutive clock cycles (650,000, that
// is 10 ms at 65 MHz). `rise` pulses for one cycle when `level` goes high. The document does
// not describe how the buttons are read; this circuit is this design's choice.
module sync_debounce #(
  parameter int unsigned STABLE = 650_000
) (
  input  logic clk,
  input  logic rst,
  input  logic raw,
  output logic level,
  output logic rise
);
  localparam int unsigned CW = (STABLE > 1) ? $clog2(STABLE + 1) : 1;
  logic          s1, s2;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1    <= 1'b0;
      s2    <= 1'b0;
      count <= '0;
      level <= 1'b0;
      rise  <= 1'b0;
    end else begin
      s1   <= raw;
      s2   <= s1;
      rise <= 1'b0;
      if (s2 == level) begin
        count <= '0;
      end else if (count == CW'(STABLE - 1)) begin
        count <= '0;
        level <= s2;
        rise  <= s2;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
