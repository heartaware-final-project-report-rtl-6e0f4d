// tb_sprite_scanner: ten sprite areas, some overlapping and some hidden, over a ROM model
// holding a pseudo-random map. Random scan positions, and positions at area corners, are
// compared three cycles later with a model that picks the lowest-numbered enabled area
// containing the pixel and reads map bit base + dy*609 + dx.
// The ten sprite areas and the 609-pixel bitmap rows are the original design's.
module tb_sprite_scanner;
  import heartaware_pkg::*;
  logic clk = 0, rst = 1;
  sprite_t sprites [N_SPRITES];
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [17:0] pixel_addr;
  logic pixel_data;
  logic [11:0] pixel;
  int checks = 0, failures = 0, hits = 0;
  logic [11:0] expq [$];

  sprite_scanner dut (.clk, .rst, .sprites, .hcount, .vcount, .pixel_addr, .pixel_data, .pixel);

  function automatic logic map_bit(input int a);
    return ((a * 13 + (a >> 4)) % 3) == 0;
  endfunction

  // ROM model: one cycle of latency.
  always_ff @(posedge clk) pixel_data <= map_bit(int'(pixel_addr));

  always #5 clk = !clk;

  function automatic logic [11:0] model(input int h, input int v);
    for (int i = 0; i < N_SPRITES; i++) begin
      if (sprites[i].en && h >= sprites[i].x && h < sprites[i].x + sprites[i].w
          && v >= sprites[i].y && v < sprites[i].y + sprites[i].h)
        return map_bit(int'(sprites[i].base) + (v - int'(sprites[i].y)) * 609
                       + (h - int'(sprites[i].x))) ? sprites[i].color : 12'h000;
    end
    return 12'h000;
  endfunction

  task automatic probe(input int h, input int v);
    hcount <= 11'(h);
    vcount <= 10'(v);
    expq.push_back(model(h, v));
    @(posedge clk);
    #1;
    if (expq.size() > 2) begin
      logic [11:0] e;
      e = expq.pop_front();
      checks++;
      if (e != 0) hits++;
      if (pixel !== e) begin failures++; $display("pixel %h expected %h", pixel, e); end
    end
  endtask

  initial begin
    hcount = 0; vcount = 0;
    for (int i = 0; i < N_SPRITES; i++) begin
      sprites[i].en    = (i != 4);
      sprites[i].x     = 11'(60 + 90 * i);
      sprites[i].y     = 10'(50 + 60 * (i % 4));
      sprites[i].w     = 10'(40 + 17 * i);
      sprites[i].h     = 9'(30 + 9 * i);
      sprites[i].base  = 18'($urandom_range(0, 150000));
      sprites[i].color = 12'(16 * i + 1);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) probe(0, 0);
    for (int i = 0; i < N_SPRITES; i++) begin
      probe(sprites[i].x, sprites[i].y);
      probe(sprites[i].x + sprites[i].w - 1, sprites[i].y + sprites[i].h - 1);
      probe(sprites[i].x + sprites[i].w, sprites[i].y);
      probe(sprites[i].x - 1, sprites[i].y + sprites[i].h - 1);
    end
    for (int i = 0; i < 20000; i++) probe($urandom_range(0, 1100), $urandom_range(0, 400));
    repeat (3) probe(0, 0);
    checks++;
    if (hits < 1000) begin failures++; $display("only %0d lit pixels", hits); end
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
