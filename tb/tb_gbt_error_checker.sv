// tb_gbt_error_checker: error counting against the test patterns.
//
// Feeds correct constant words and flying-bit sequences (starting at an
// arbitrary position), with gaps in valid, and injects known wrong bits in
// chosen words.  The three counters must match the counts kept here: checked
// words (the first word after a gap is not checked in flying mode), words in
// error and wrong bits.
module tb_gbt_error_checker;
  import gbt_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  pattern_mode_e mode;
  logic [79:0]   const_word, data;
  logic          valid;
  logic [31:0]   words_checked, word_errors, bit_errors;
  int            checks = 0, failures = 0;
  int            e_checked = 0, e_words = 0, e_bits = 0;

  gbt_error_checker dut (.clk, .rst, .mode, .const_word, .valid, .data,
                         .words_checked, .word_errors, .bit_errors);

  task automatic send(input logic [79:0] w, input int nflip, input bit counted);
    logic [79:0] m = '0;
    for (int i = 0; i < nflip; i++) m[(i * 37 + 5) % 80] = 1'b1;
    @(negedge clk);
    valid = 1'b1;
    data  = w ^ m;
    if (counted) begin
      e_checked++;
      if (nflip > 0) begin e_words++; e_bits += nflip; end
    end
  endtask

  task automatic check_counts(input string where);
    @(posedge clk); #1;
    checks++;
    if (words_checked != 32'(e_checked) || word_errors != 32'(e_words) || bit_errors != 32'(e_bits)) begin
      failures++;
      $display("%s: counters %0d/%0d/%0d expected %0d/%0d/%0d", where, words_checked, word_errors,
               bit_errors, e_checked, e_words, e_bits);
    end
  endtask

  task automatic gap();
    @(negedge clk); valid = 1'b0; data = '0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [79:0] w;
    mode = PAT_CONSTANT; const_word = {$urandom, $urandom, 16'($urandom)};
    valid = 0; data = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 50; i++) begin
      send(const_word, (i % 9 == 3) ? 2 : 0, 1);
      check_counts("constant");
    end
    gap();
    mode = PAT_FLYING;
    gap();
    for (int rep = 0; rep < 3; rep++) begin
      automatic int start = $urandom_range(0, 79);
      for (int i = 0; i < 100; i++) begin
        w = 80'd1 << ((start + i) % 80);
        // flips only in words whose successor is checked against the true pattern
        send(w, (i % 13 == 7) ? 1 : 0, i > 0);
        if (i % 13 == 7) begin
          // next word: reference is the corrupted word; skip by a gap
          gap();
          i++;
          send(80'd1 << ((start + i) % 80), 0, 0);
        end
      end
      gap();
      check_counts("flying");
    end
    gap();
    checks++;
    if (words_checked != 32'(e_checked) || word_errors != 32'(e_words) || bit_errors != 32'(e_bits)) begin
      failures++;
      $display("counters %0d/%0d/%0d expected %0d/%0d/%0d", words_checked, word_errors, bit_errors,
               e_checked, e_words, e_bits);
    end
    checks++;
    if (e_words == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
