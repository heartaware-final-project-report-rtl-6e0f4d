// tb_system_fsm: walks the controller through every transition and tries every button in
// every state, comparing the state after each step with a table of the expected next states.
// It also checks the boot progress counter (one step every PROGRESS_DIV cycles, held after
// boot) and the boot_done / error_entered pulses.
// The four states and their button transitions are the original design's.
module tb_system_fsm;
  import heartaware_pkg::*;
  localparam int PDIV = 4;
  logic clk = 0, rst = 1;
  logic sd_loaded = 0, btn_left = 0, btn_up = 0, btn_down = 0;
  system_status_t status;
  logic [7:0] boot_progress;
  logic boot_done, error_entered;
  int checks = 0, failures = 0, done_pulses = 0, err_pulses = 0;

  system_fsm #(.PROGRESS_DIV(PDIV)) dut (.clk, .rst, .sd_loaded, .btn_left, .btn_up, .btn_down,
    .status, .boot_progress, .boot_done, .error_entered);

  always #5 clk = !clk;
  always @(posedge clk) if (!rst) begin
    done_pulses += boot_done;
    err_pulses  += error_entered;
  end

  // 0 = left, 1 = up, 2 = down
  task automatic press(input int b, input system_status_t want);
    btn_left <= (b == 0); btn_up <= (b == 1); btn_down <= (b == 2);
    @(posedge clk);
    btn_left <= 0; btn_up <= 0; btn_down <= 0;
    @(posedge clk);
    checks++;
    if (status != want) begin
      failures++;
      $display("button %0d: state %0d expected %0d", b, status, want);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    // Boot ignores the buttons.
    press(0, ST_BOOT); press(1, ST_BOOT); press(2, ST_BOOT);
    repeat (40) @(posedge clk);
    checks++;
    if (boot_progress < 8'd10 || boot_progress > 8'd13) begin
      failures++;
      $display("boot progress %0d after ~46 cycles", boot_progress);
    end
    sd_loaded <= 1;
    @(posedge clk); @(posedge clk);
    checks++;
    if (status != ST_CAPTURING) begin failures++; $display("no boot exit"); end
    // Capturing: down does nothing, left pauses.
    press(2, ST_CAPTURING);
    press(0, ST_PAUSED);
    press(0, ST_PAUSED); press(1, ST_PAUSED);
    press(2, ST_CAPTURING);
    press(1, ST_ERROR);
    press(0, ST_ERROR); press(1, ST_ERROR);
    press(2, ST_CAPTURING);
    press(1, ST_ERROR);
    press(2, ST_CAPTURING);
    begin
      logic [7:0] p;
      p = boot_progress;
      repeat (20) @(posedge clk);
      checks++;
      if (boot_progress != p) begin failures++; $display("progress moved after boot"); end
    end
    checks++;
    if (done_pulses != 1 || err_pulses != 2) begin
      failures++;
      $display("boot_done %0d error_entered %0d", done_pulses, err_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
