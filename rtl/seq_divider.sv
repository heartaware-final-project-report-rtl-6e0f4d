// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A `start` pulse loads the numerator and denominator; W cycles later `done` pulses for one
// cycle with `quotient` = numerator / denominator. A zero denominator gives an all-ones
// quotient. `start` while busy is ignored.
// The original design only says that 6000 is divided by the beat interval; using a serial
// restoring divider for it is this design's choice.
module seq_divider #(
  parameter int unsigned W = 13
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] numerator,
  input  logic [W-1:0] denominator,
  output logic [W-1:0] quotient,
  output logic         done,
  output logic         busy
);
  localparam int unsigned CW = $clog2(W + 1);
  logic [W-1:0]  num, den;
  logic [W-1:0]  rem;
  logic [CW-1:0] step;
  logic [W:0]    trial;

  assign trial = {rem, num[W-1]} - {1'b0, den};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
      num      <= '0;
      den      <= '0;
      rem      <= '0;
      step     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num  <= numerator;
        den  <= denominator;
        rem  <= '0;
        step <= CW'(W);
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          num <= {num[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], num[W-1]};
          num <= {num[W-2:0], 1'b0};
        end
        step <= step - 1'b1;
        if (step == CW'(1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= (!trial[W]) ? {num[W-2:0], 1'b1} : {num[W-2:0], 1'b0};
        end
      end
    end
  end
endmodule
