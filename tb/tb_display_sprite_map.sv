// tb_display_sprite_map: the start and end addresses of all ten digit cells against a table
// written out by hand for a 609-pixel-wide map whose bottom row holds 1..9,0 in 40 x 56
// cells from (150, 296): the start of cell c is 296*609 + 150 + 40*c = 180414 + 40*c.
// The digit-to-address function is the original design's; the digit positions checked are this design's.
module tb_display_sprite_map;
  logic [3:0] number;
  logic [17:0] addr_location, addr_end;
  int checks = 0, failures = 0;
  int start_tab [10] = '{180774, 180414, 180454, 180494, 180534, 180574, 180614, 180654,
                         180694, 180734};

  display_sprite_map dut (.number, .addr_location, .addr_end);

  initial begin
    for (int d = 0; d < 10; d++) begin
      number = 4'(d);
      #1;
      checks++;
      if (addr_location != 18'(start_tab[d])) begin
        failures++;
        $display("digit %0d start %0d expected %0d", d, addr_location, start_tab[d]);
      end
      checks++;
      if (addr_end != 18'(start_tab[d] + 55 * 609 + 39)) begin
        failures++;
        $display("digit %0d end %0d", d, addr_end);
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
