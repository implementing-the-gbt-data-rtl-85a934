// tb_gbt_barrel_shifter: checks the 40-bit window selection.
//
// A random word stream is fed in; for every shift value 0..39 (held for a
// few words, then changed) the output must be the 40 stream bits that start
// 'shift' bits after the start of the previous word, one clock later.
module tb_gbt_barrel_shifter;
  import gbt_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [39:0] word_in, word_out;
  logic [5:0]  shift;
  int          checks = 0, failures = 0;

  gbt_barrel_shifter dut (.clk, .rst, .word_in, .shift, .word_out);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] prev, expect_w;
    word_in = 0; shift = 0; prev = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      word_in = {$urandom, 8'($urandom)};
      if (t % 4 == 0) shift = 6'($urandom_range(0, 39));
      for (int i = 0; i < 40; i++) begin
        automatic int p = i + shift;     // stream bit p after the start of prev
        expect_w[39 - i] = (p < 40) ? prev[39 - p] : word_in[39 - (p - 40)];
      end
      @(posedge clk); #1;
      if (t > 0) begin
        checks++;
        if (word_out !== expect_w) begin
          failures++; $display("t=%0d shift=%0d got %h expected %h", t, shift, word_out, expect_w);
        end
      end
      prev = word_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
