// tb_audio_playback: the playback side with a short sample period (SAMPLE_DIV = 8) and a
// small priming level (PRIME = 16) against a single-clock FIFO model (one-cycle read latency,
// as in audio_fifo). Checks:
//   - nothing is popped and the output rests at 128 until the FIFO holds PRIME samples;
//   - once primed, pops come exactly SAMPLE_DIV cycles apart, never from an empty FIFO;
//   - each popped byte reaches `sample` two cycles after the pop, in order;
//   - playback continues below PRIME until the FIFO is empty, then stops and returns to 128;
//   - the PWM output averages to the sample held (128 gives half duty over 256 cycles).
// The 512-sample priming and one pop per sample period are the original design's.
module tb_audio_playback;
  localparam int DIV = 8, PRIME = 16;
  logic clk = 0, rst = 1;
  logic fifo_empty, fifo_rd_en, playing, pwm_out;
  logic [12:0] fifo_rd_count;
  logic [7:0] fifo_dout = 8'h80, sample;
  logic [7:0] q [$];
  logic [7:0] popped [$];
  int checks = 0, failures = 0, pops = 0, pushes = 0, last_pop = -1, cyc = 0;

  audio_playback #(.SAMPLE_DIV(DIV), .PRIME(PRIME)) dut (.clk, .rst, .fifo_empty, .fifo_rd_count,
    .fifo_dout, .fifo_rd_en, .playing, .sample, .pwm_out);

  always #5 clk = !clk;

  assign fifo_empty    = (q.size() == 0);
  assign fifo_rd_count = 13'(q.size());

  // FIFO model and pop checks.
  logic [1:0] pend;
  logic [7:0] pend_v [2];
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      // A byte popped two cycles ago must now be on `sample`.
      if (pend[1]) begin
        checks++;
        if (sample !== pend_v[1]) begin
          failures++;
          $display("sample %h expected %h", sample, pend_v[1]);
        end
      end
      pend[1]   <= pend[0];
      pend_v[1] <= pend_v[0];
      pend[0]   <= 1'b0;
      if (fifo_rd_en) begin
        checks++;
        if (q.size() == 0) begin failures++; $display("pop from empty FIFO"); end
        else begin
          if (last_pop >= 0 && cyc - last_pop != DIV) begin
            failures++;
            $display("pop spacing %0d", cyc - last_pop);
          end
          last_pop  = cyc;
          fifo_dout <= q[0];
          pend[0]   <= 1'b1;
          pend_v[0] <= q[0];
          void'(q.pop_front());
          pops++;
        end
      end
    end
  end

  task automatic push_n(input int n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      @(negedge clk);
      q.push_back(v);
      pushes++;
    end
  endtask

  task automatic check_silent(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (fifo_rd_en || playing || sample !== 8'h80) begin
        failures++;
        $display("not silent: rd_en %b playing %b sample %h", fifo_rd_en, playing, sample);
      end
    end
  endtask

  initial begin
    int high;
    pend = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    check_silent(100);
    push_n(PRIME - 1);
    check_silent(200);
    push_n(1);
    repeat (3) @(posedge clk);
    checks++;
    if (!playing) begin failures++; $display("not primed at %0d samples", PRIME); end
    // Keep topping the FIFO up for a while, then let it run dry.
    for (int r = 0; r < 20; r++) begin
      push_n($urandom_range(1, 4));
      repeat ($urandom_range(0, 40)) @(posedge clk);
    end
    wait (q.size() == 0);
    repeat (DIV + 4) @(posedge clk);
    last_pop = -1;
    check_silent(100);
    // Silence gives half duty on the PWM output.
    high = 0;
    repeat (256) begin @(posedge clk); #1; if (pwm_out) high++; end
    checks++;
    if (high < 126 || high > 130) begin failures++; $display("silence duty %0d/256", high); end
    // A second clip, started by priming again.
    push_n(PRIME + 5);
    wait (q.size() == 0);
    repeat (DIV + 4) @(posedge clk);
    checks++;
    if (pops != pushes || playing) begin
      failures++;
      $display("%0d pops, playing %b", pops, playing);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
