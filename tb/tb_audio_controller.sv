// tb_audio_controller: the controller against a model SD reader and a FIFO model drained at
// a steady rate (slower than the reader, so the FIFO fills and the controller must wait for
// room). The list of block addresses requested is compared with the expected sounds:
//   boot jingle (slots 34..40), then "eighty" "three" "beats per minute" for 83 with two beep
//   requests during it that must be dropped, then a beep (slot 41), then an announcement
//   requested while that beep plays, which must follow it: "one hundred" "twelve" "beats per
//   minute" for 112.
// Every byte written to the FIFO must be the card's byte at the requested address, the FIFO
// must never overflow, and requests must only be made with room for a whole block.
// The 512-byte blocks, the 4096-byte FIFO and the beep lockout are the original design's; the
// clip layout checked is this design's.
module tb_audio_controller;
  import heartaware_pkg::*;
  logic clk = 0, rst = 1;
  logic sound_req = 0, announce_req = 0;
  sound_t sound_id = SND_BEEP;
  logic [7:0] announce_hr = 0;
  logic sd_ready, sd_rd, sd_byte_available, fifo_wr_en, busy, announcing, beep_dropped;
  logic [31:0] sd_address, last_address;
  logic [7:0] sd_dout, fifo_din;
  logic [11:0] fifo_count;
  int reads;
  int checks = 0, failures = 0, dropped = 0, max_fill = 0;
  int blocks [$];
  logic [7:0] fifo_q [$];
  logic [7:0] expect_q [$];

  audio_controller dut (.clk, .rst, .sound_req, .sound_id, .announce_req, .announce_hr,
    .sd_ready, .sd_rd, .sd_address, .sd_dout, .sd_byte_available,
    .fifo_wr_en, .fifo_din, .fifo_count, .busy, .announcing, .beep_dropped);

  sd_reader_model sd (.clk, .rst, .ready(sd_ready), .rd(sd_rd), .address(sd_address),
    .dout(sd_dout), .byte_available(sd_byte_available), .reads, .last_address);

  always #20 clk = !clk;

  assign fifo_count = (fifo_q.size() > 4095) ? 12'd4095 : 12'(fifo_q.size());

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (beep_dropped) dropped++;
      if (sd_rd && sd_ready) begin
        blocks.push_back(int'(sd_address));
        checks++;
        if (fifo_q.size() > 4096 - 512) begin failures++; $display("request without room"); end
        for (int i = 0; i < 512; i++) begin
          logic [31:0] a;
          a = sd_address + 32'(i);
          expect_q.push_back(a[7:0] ^ a[15:8] ^ a[23:16]);
        end
      end
      if (fifo_wr_en) begin
        checks++;
        if (expect_q.size() == 0 || fifo_din !== expect_q[0]) begin
          failures++;
          $display("byte %h unexpected", fifo_din);
        end
        if (expect_q.size() != 0) void'(expect_q.pop_front());
        fifo_q.push_back(fifo_din);
        if (fifo_q.size() > 4096) begin failures++; $display("FIFO overflow"); end
      end
      if (cyc % 3 == 0 && fifo_q.size() > 0) void'(fifo_q.pop_front());
      if (fifo_q.size() > max_fill) max_fill = fifo_q.size();
    end
  end

  task automatic pulse_sound(input sound_t id);
    sound_id  <= id;
    sound_req <= 1;
    @(posedge clk);
    sound_req <= 0;
    @(posedge clk);
  endtask

  task automatic pulse_announce(input int hr);
    announce_hr  <= 8'(hr);
    announce_req <= 1;
    @(posedge clk);
    announce_req <= 0;
    @(posedge clk);
  endtask

  task automatic expect_slots(inout int idx, input int first, input int n);
    for (int b = 0; b < n * 50; b++) begin
      checks++;
      if (idx >= blocks.size() || blocks[idx] != first * 25600 + b * 512) begin
        failures++;
        $display("block %0d: got %h expected %h", idx,
                 (idx < blocks.size()) ? blocks[idx] : -1, first * 25600 + b * 512);
        return;
      end
      idx++;
    end
  endtask

  initial begin
    int idx = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk iff sd_ready);
    pulse_sound(SND_JINGLE);
    @(posedge clk iff !busy);
    pulse_announce(83);
    repeat (2000) @(posedge clk);
    checks++;
    if (!announcing) begin failures++; $display("not announcing"); end
    pulse_sound(SND_BEEP);
    repeat (5000) @(posedge clk);
    pulse_sound(SND_BEEP);
    @(posedge clk iff !busy);
    pulse_sound(SND_BEEP);
    repeat (3000) @(posedge clk);
    pulse_announce(112);
    @(posedge clk iff !busy);
    repeat (10) @(posedge clk);
    checks++;
    if (!busy) begin failures++; $display("announcement not started after beep"); end
    @(posedge clk iff !busy);
    repeat (100) @(posedge clk);
    expect_slots(idx, 34, 7);   // jingle
    expect_slots(idx, 9, 1);    // eighty
    expect_slots(idx, 23, 1);   // three
    expect_slots(idx, 30, 2);   // beats per minute
    expect_slots(idx, 41, 1);   // beep
    expect_slots(idx, 0, 2);    // one hundred
    expect_slots(idx, 12, 1);   // twelve
    expect_slots(idx, 30, 2);   // beats per minute
    checks++;
    if (idx != blocks.size() || dropped != 2) begin
      failures++;
      $display("%0d blocks of %0d expected, %0d beeps dropped", blocks.size(), idx, dropped);
    end
    checks++;
    if (max_fill < 3500) begin failures++; $display("FIFO never filled (%0d)", max_fill); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
