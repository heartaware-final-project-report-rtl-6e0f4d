// tb_adc_sampler: checks that the ADC bus is sampled once every SAMPLE_DIV cycles and that the
// latched value is the one on the bus. The bus changes right after each sample, so every
// sample must return the value set after the previous one.
// The 100 Hz rate checked is the original design's; the shortened divider is for speed only.
module tb_adc_sampler;
  localparam int DIV = 10;
  logic clk = 0, rst = 1;
  logic [7:0] adc_data, sample;
  logic sample_valid;
  int checks = 0, failures = 0;
  int last_t = -1, cyc = 0;
  logic [7:0] expected;

  adc_sampler #(.SAMPLE_DIV(DIV)) dut (.clk, .rst, .adc_data, .sample, .sample_valid);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  initial begin
    adc_data = 8'h5A;
    expected = 8'h5A;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (40) begin
      @(posedge clk iff sample_valid);
      checks++;
      if (sample !== expected) begin
        failures++;
        $display("sample %h expected %h", sample, expected);
      end
      if (last_t >= 0) begin
        checks++;
        if (cyc - last_t != DIV) begin
          failures++;
          $display("sample spacing %0d expected %0d", cyc - last_t, DIV);
        end
      end
      last_t   = cyc;
      adc_data = 8'($urandom);
      expected = adc_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
