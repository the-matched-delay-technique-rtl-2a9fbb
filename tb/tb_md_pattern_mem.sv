// tb_md_pattern_mem: loads all 512 samples (8 words of 64 bits) with
// random data, then plays patterns of 7 words, the full memory, 1 word and
// 4 words, each several times round, reloads the memory in reverse address
// order and plays it once more. It checks that the words come out one per
// clock in address order from 0 to last_addr, that wrap marks exactly the last word, that
// playback starts one clock after play rises, and that the output is zero
// while play is low.
module tb_md_pattern_mem;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 64, SAMPLES = 512, WORDS = SAMPLES / N, AW = $clog2(WORDS);
  localparam int unsigned T_PS = 6400;

  logic clk = 1'b0, rst_n = 1'b1;
  logic we = 1'b0, play = 1'b0, wrap;
  logic [AW-1:0] waddr = '0, last_addr = '0;
  logic [N-1:0] wdata = '0, word;
  logic [N-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0, wraps = 0;

  md_pattern_mem dut (.*);

  always #(T_PS / 2) clk = ~clk;

  task automatic play_pattern(input int unsigned last, input int unsigned rounds);
    last_addr = AW'(last);
    play = 1'b1;
    for (int r = 0; r < rounds; r++) begin
      for (int unsigned a = 0; a <= last; a++) begin
        @(negedge clk);
        checks++;
        if (word !== ref_mem[a] || wrap !== (a == last)) begin
          failures++;
          if (failures < 10) $display("round %0d addr %0d: word %h wrap %b expected %h %b", r, a, word, wrap, ref_mem[a], a == last);
        end
        if (wrap) wraps++;
      end
    end
    play = 1'b0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (word !== '0 || wrap !== 1'b0) failures++;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < WORDS; a++) begin
      ref_mem[a] = N'({$urandom, $urandom});
      we = 1'b1;
      waddr = AW'(a);
      wdata = ref_mem[a];
      @(negedge clk);
      checks++;
      if (word !== '0) failures++;  // idle while loading
    end
    we = 1'b0;
    play_pattern(6, 3);
    play_pattern(WORDS - 1, 2);
    play_pattern(0, 4);  // one-word pattern: wrap on every word
    play_pattern(3, 3);
    // reload the whole memory while idle and play it again
    for (int a = 0; a < WORDS; a++) begin
      ref_mem[WORDS - 1 - a] = N'({$urandom, $urandom});
      we = 1'b1;
      waddr = AW'(WORDS - 1 - a);
      wdata = ref_mem[WORDS - 1 - a];
      @(negedge clk);
      checks++;
      if (word !== '0) failures++;  // idle while loading
    end
    we = 1'b0;
    play_pattern(WORDS - 1, 4);
    checks++;
    if (wraps != 3 + 2 + 4 + 3 + 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400 * T_PS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
