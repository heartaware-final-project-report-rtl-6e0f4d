// hr_moving_average: mean of the last 16 heart-rate values (a 16-tap moving-average FIR).
//
// The values sit in a 16-entry circular buffer next to their running sum. For each new value
// the oldest one is taken off the sum and the new one added, and the average is the sum
// shifted right by 4 (rounded down). `avg_valid` pulses one cycle after `in_valid`. The window
// of 16 follows the document. The buffer and sum start at zero after reset, so the first 15
// averages are pulled towards zero; this is this design's choice.
module hr_moving_average #(
  parameter int unsigned W    = 8,
  parameter int unsigned LOG2 = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_hr,
  input  logic         in_valid,
  output logic [W-1:0] avg,
  output logic         avg_valid
);
  localparam int unsigned N = 1 << LOG2;

  logic [W-1:0]      values [N];
  logic [LOG2-1:0]   ptr;
  logic [W+LOG2-1:0] sum, next_sum;

  assign next_sum = sum + (W+LOG2)'(in_hr) - (W+LOG2)'(values[ptr]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) values[i] <= '0;
      ptr       <= '0;
      sum       <= '0;
      avg       <= '0;
      avg_valid <= 1'b0;
    end else begin
      avg_valid <= in_valid;
      if (in_valid) begin
        values[ptr] <= in_hr;
        ptr         <= ptr + 1'b1;
        sum         <= next_sum;
        avg         <= next_sum[W+LOG2-1:LOG2];
      end
    end
  end
endmodule
