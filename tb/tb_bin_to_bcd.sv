// tb_bin_to_bcd: all 256 inputs against division by 100 and 10.
// The 0-199 display range is the original design's; all 256 inputs are checked.
module tb_bin_to_bcd;
  logic [7:0] bin;
  logic [3:0] hundreds, tens, ones;
  int checks = 0, failures = 0;

  bin_to_bcd dut (.bin, .hundreds, .tens, .ones);

  initial begin
    for (int i = 0; i < 256; i++) begin
      bin = 8'(i);
      #1;
      checks++;
      if (hundreds != 4'(i / 100) || tens != 4'((i / 10) % 10) || ones != 4'(i % 10)) begin
        failures++;
        $display("%0d -> %0d %0d %0d", i, hundreds, tens, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
