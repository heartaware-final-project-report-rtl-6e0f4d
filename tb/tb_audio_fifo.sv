// tb_audio_fifo: a 25 MHz writer and a 100 MHz reader move 20,000 bytes through the FIFO in
// bursts, the writer filling it to full at one point. Every byte must come out once and in
// order; `full` must appear at 4096 stored bytes, with fifo_count at its 4095 ceiling, and
// `empty` must be seen when the reader catches up.
// The 4096-byte depth and 12-bit fill count are the original design's; the clock ratio is this test's.
module tb_audio_fifo;
  logic wr_clk = 0, rd_clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [7:0] din, dout;
  logic [11:0] fifo_count;
  logic [12:0] rd_count;
  int checks = 0, failures = 0;
  int nw = 0, nr = 0, full_seen = 0, empty_seen = 0;
  bit reader_on = 0;
  logic popped = 0;

  audio_fifo dut (.wr_clk, .wr_rst(rst), .wr_en, .din, .full, .fifo_count,
                  .rd_clk, .rd_rst(rst), .rd_en, .dout, .empty, .rd_count);

  always #20 wr_clk = !wr_clk;
  always #5  rd_clk = !rd_clk;

  function automatic logic [7:0] data(input int i);
    return 8'((i * 37) ^ (i >> 8));
  endfunction

  // Reader: pops when enabled and not empty, checks the byte on the next clock.
  always @(posedge rd_clk) begin
    if (!rst) begin
      if (popped) begin
        checks++;
        if (dout !== data(nr)) begin failures++; $display("byte %0d: %h", nr, dout); end
        nr++;
      end
      if (reader_on && empty && nw > 0) empty_seen++;
      popped <= rd_en && !empty;
      rd_en  <= reader_on && ($urandom_range(0, 3) != 0);
    end
  end

  task automatic write_burst(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge wr_clk);
      if (full) begin
        full_seen++;
        i--;
        wr_en = 0;
      end else begin
        din   = data(nw);
        wr_en = 1;
        nw++;
      end
      @(posedge wr_clk);
      #1 wr_en = 0;
    end
  endtask

  initial begin
    repeat (4) @(posedge wr_clk);
    rst = 0;
    repeat (4) @(posedge wr_clk);
    // Fill without reading.
    write_burst(4096);
    repeat (4) @(posedge wr_clk);
    checks++;
    if (!full || fifo_count != 12'd4095) begin
      failures++;
      $display("after 4096 writes: full %b count %0d", full, fifo_count);
    end
    checks++;
    if (rd_count != 13'd4096) begin failures++; $display("rd_count %0d", rd_count); end
    reader_on = 1;
    write_burst(15904);
    repeat (30000) @(posedge rd_clk);
    checks++;
    if (nr != 20000 || empty_seen == 0) begin
      failures++;
      $display("read %0d of %0d, empty seen %0d", nr, nw, empty_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge rd_clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
