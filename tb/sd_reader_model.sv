// sd_reader_model: behavioural model of the SD card block reader, for simulation only.
//
// It has the reader's user-side interface: while `ready` is high, a one-cycle `rd` with a
// 512-aligned byte `address` starts a block read. `ready` drops on the next clock, and after
// LATENCY clocks the model delivers 512 bytes, one every BYTE_GAP clocks, each with a one-cycle
// `byte_available`; then `ready` rises again. Byte i of the card holds data_at(i), a fixed
// function of the address, so a testbench can check what arrives. `ready` first rises
// INIT_CYCLES clocks after reset, like a card that takes time to initialise. `reads` counts
// block reads and `last_address` holds the latest one.
// The interface is modelled on common SPI SD block readers; the original design used a third-party
// reader whose timing is not published, so LATENCY, BYTE_GAP and INIT_CYCLES are this model's.
module sd_reader_model #(
  parameter int INIT_CYCLES = 50,
  parameter int LATENCY     = 20,
  parameter int BYTE_GAP    = 2
) (
  input  logic        clk,
  input  logic        rst,
  output logic        ready,
  input  logic        rd,
  input  logic [31:0] address,
  output logic [7:0]  dout,
  output logic        byte_available,
  output int          reads,
  output logic [31:0] last_address
);
  function automatic logic [7:0] data_at(input logic [31:0] a);
    return a[7:0] ^ a[15:8] ^ a[23:16];
  endfunction

  initial begin
    ready = 0;
    byte_available = 0;
    dout = 0;
    reads = 0;
    last_address = 0;
    forever begin
      @(posedge clk);
      if (rst) begin
        ready = 0;
        repeat (INIT_CYCLES) @(posedge clk iff !rst);
        ready <= 1;
      end else if (ready && rd) begin
        logic [31:0] a;
        a = address;
        reads++;
        last_address = a;
        ready <= 0;
        repeat (LATENCY) @(posedge clk);
        for (int i = 0; i < 512; i++) begin
          dout           <= data_at(a + i);
          byte_available <= 1;
          @(posedge clk);
          if (BYTE_GAP > 1) begin
            byte_available <= 0;
            repeat (BYTE_GAP - 1) @(posedge clk);
          end
        end
        byte_available <= 0;
        ready <= 1;
      end
    end
  end
endmodule
