// xvga: timing generator for a 1024x768, 60 Hz XVGA display with a 65 MHz pixel clock.
//
// hcount runs 0..H_TOTAL-1 across a line and vcount 0..V_TOTAL-1 down a frame; pixels with
// hcount < H_ACTIVE and vcount < V_ACTIVE are visible and `blank` is high everywhere else.
// hsync and vsync are active low and registered together with the counters, so all outputs
// change on the same clock edge. The default numbers are the standard VESA 1024x768 at 60 Hz
// timing (1344 x 806 total, sync pulses of 136 pixels and 6 lines); the document only names
// the resolution, the refresh rate and the pixel clock. The parameters allow a small screen in
// simulation.
module xvga #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FRONT  = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BACK   = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FRONT  = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BACK   = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FRONT + V_SYNC + V_BACK;

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = hcount + 11'd1;
    v_next = vcount;
    if (hcount == 11'(H_TOTAL - 1)) begin
      h_next = '0;
      v_next = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !(h_next >= 11'(H_ACTIVE + H_FRONT) && h_next < 11'(H_ACTIVE + H_FRONT + H_SYNC));
      vsync  <= !(v_next >= 10'(V_ACTIVE + V_FRONT) && v_next < 10'(V_ACTIVE + V_FRONT + V_SYNC));
      blank  <= (h_next >= 11'(H_ACTIVE)) || (v_next >= 10'(V_ACTIVE));
    end
  end
endmodule
