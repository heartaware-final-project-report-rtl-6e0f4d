// system_fsm: the four-state top-level controller (system_status).
//
//   BOOT      --sd_loaded-->  CAPTURING
//   CAPTURING --left-->       PAUSED      PAUSED --down--> CAPTURING
//   CAPTURING --up-->         ERROR       ERROR  --down--> CAPTURING
//
// The system waits in BOOT until the SD card reports it is ready (`sd_loaded`), then shows live
// data in CAPTURING. The button inputs are one-cycle pulses from debounced buttons; a button
// that has no transition in the present state is ignored. While in BOOT, `boot_progress`
// counts up by one every PROGRESS_DIV cycles (10 ms at 65 MHz) and stops at 255; it sets the
// length of the loading bar. `boot_done` and `error_entered` pulse for one cycle on entering
// CAPTURING from BOOT and on entering ERROR. The states and transitions are the document's; the
// progress counter and the event pulses are this design's choices.
module system_fsm
  import heartaware_pkg::*;
#(
  parameter int unsigned PROGRESS_DIV = 650_000
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           sd_loaded,
  input  logic           btn_left,
  input  logic           btn_up,
  input  logic           btn_down,
  output system_status_t status,
  output logic [7:0]     boot_progress,
  output logic           boot_done,
  output logic           error_entered
);
  system_status_t next;
  logic           tick;

  strobe_gen #(.DIV(PROGRESS_DIV)) u_tick (.clk, .rst, .tick);

  always_comb begin
    next = status;
    unique case (status)
      ST_BOOT:      if (sd_loaded) next = ST_CAPTURING;
      ST_CAPTURING: if (btn_left)  next = ST_PAUSED;
                    else if (btn_up) next = ST_ERROR;
      ST_PAUSED:    if (btn_down)  next = ST_CAPTURING;
      ST_ERROR:     if (btn_down)  next = ST_CAPTURING;
      default:      next = ST_BOOT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      status        <= ST_BOOT;
      boot_progress <= '0;
      boot_done     <= 1'b0;
      error_entered <= 1'b0;
    end else begin
      status        <= next;
      boot_done     <= (status == ST_BOOT) && (next == ST_CAPTURING);
      error_entered <= (status != ST_ERROR) && (next == ST_ERROR);
      if (status == ST_BOOT && tick && boot_progress != 8'hFF)
        boot_progress <= boot_progress + 1'b1;
    end
  end
endmodule
