// tb_gbt_pattern_gen: constant words and flying bits of the test generator.
//
// In constant mode every word must equal const_word (changed at run time).
// In flying-bit mode the words must be 1, 2, 4, ... with the one moving up a
// bit per clock and wrapping from bit 79 to bit 0; switching back to flying
// restarts it at bit 0.  The header must be the data header throughout.
module tb_gbt_pattern_gen;
  import gbt_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  pattern_mode_e mode;
  logic [79:0]   const_word, data;
  logic [3:0]    hdr, sc;
  logic          valid;
  int            checks = 0, failures = 0;

  gbt_pattern_gen dut (.clk, .rst, .mode, .const_word, .hdr, .sc, .data, .valid);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = PAT_CONSTANT; const_word = 80'h0123_4567_89ab_cdef_5a5a;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        if (i == 10) const_word = {$urandom, $urandom, 16'($urandom)};
        @(posedge clk); #1;
        checks++;
        if (data !== const_word || !valid || hdr !== HDR_DATA || sc !== '0) begin
          failures++; $display("constant word wrong: %h", data);
        end
      end
      @(negedge clk); mode = PAT_FLYING;
      for (int i = 0; i < 200; i++) begin
        @(posedge clk); #1;
        checks++;
        if (data !== (80'd1 << (i % 80)) || hdr !== HDR_DATA) begin
          failures++; $display("flying bit %0d wrong: %h", i, data);
        end
      end
      @(negedge clk); mode = PAT_CONSTANT;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
