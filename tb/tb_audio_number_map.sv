// tb_audio_number_map: for every number 0..199 the word chain is followed until "beats per
// minute". The words' values (read back from their slot in the recording) must add up to the
// number, there must be at most three words before the phrase, every address must be a
// multiple of 512, and the word "fifty" must sit at 'h25800..'h2BC00. A few chains are also
// compared word by word with hand-written expectations.
// The word-by-word scheme is the original design's; the clip layout checked is this design's.
module tb_audio_number_map;
  import heartaware_pkg::*;
  logic [7:0] number, remaining;
  clip_t clip;
  logic last;
  int checks = 0, failures = 0;

  audio_number_map dut (.number, .clip, .remaining, .last);

  // Value of the word stored at a start address, -1 for the closing phrase.
  function automatic int word_value(input int start);
    int slot = start / 25600;
    if (slot == 0) return 100;
    if (slot >= 2 && slot <= 10) return 10 * (slot - 1);
    if (slot >= 11 && slot <= 19) return slot;
    if (slot >= 20 && slot <= 29) return slot - 20;
    if (slot == 30) return -1;
    return -1000;
  endfunction

  task automatic chain(input int n, output int words [$]);
    int guard = 0;
    words.delete();
    number = 8'(n);
    forever begin
      #1;
      words.push_back(int'(clip.start_addr));
      checks++;
      if (clip.start_addr % 512 != 0 || clip.end_addr % 512 != 0 || clip.end_addr <= clip.start_addr) begin
        failures++;
        $display("%0d: bad range %h..%h", n, clip.start_addr, clip.end_addr);
      end
      if (last) break;
      number = remaining;
      guard++;
      if (guard > 5) begin failures++; $display("%0d: chain too long", n); break; end
    end
  endtask

  initial begin
    int words [$];
    for (int n = 0; n <= 199; n++) begin
      int sum;
      sum = 0;
      chain(n, words);
      for (int i = 0; i < words.size() - 1; i++) sum += word_value(words[i]);
      checks++;
      if (sum != n || word_value(words[words.size() - 1]) != -1 || words.size() > 4) begin
        failures++;
        $display("%0d: %0d words adding to %0d", n, words.size(), sum);
      end
    end
    // "fifty"
    number = 8'd50;
    #1;
    checks++;
    if (clip.start_addr != 32'h25800 || clip.end_addr != 32'h2BC00 || remaining != 0) begin
      failures++;
      $display("fifty at %h..%h", clip.start_addr, clip.end_addr);
    end
    // 83 -> eighty, three, phrase
    chain(83, words);
    checks++;
    if (words.size() != 3 || word_value(words[0]) != 80 || word_value(words[1]) != 3) begin
      failures++;
      $display("83 spoken wrongly");
    end
    // 115 -> one hundred, fifteen, phrase
    chain(115, words);
    checks++;
    if (words.size() != 3 || word_value(words[0]) != 100 || word_value(words[1]) != 15) begin
      failures++;
      $display("115 spoken wrongly");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
