// tb_gbt_rx_gearbox: word-to-frame demultiplexing across the two clocks.
//
// Words arrive at the word clock (8 ns) with word_sof on the first of every
// three, at a word phase relative to the frame clock (24 ns) that the test
// changes between runs.  Every complete frame must come out whole on the
// frame clock, in order, with frame_valid equal to the locked input given
// with its words.
module tb_gbt_rx_gearbox;
  import gbt_pkg::*;

  logic clk_frame = 1'b0, clk_word = 1'b0, rst = 1'b1;
  always #12 clk_frame = ~clk_frame;
  always #4  clk_word  = ~clk_word;

  logic [39:0]  word;
  logic         word_sof, locked;
  logic [119:0] frame;
  logic         frame_valid;
  int           checks = 0, failures = 0, got_frames = 0;

  gbt_rx_gearbox dut (.clk_word, .clk_frame, .rst, .word, .word_sof, .locked, .frame, .frame_valid);

  logic [119:0] sent [$];

  initial begin
    repeat (6000) @(posedge clk_word);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [119:0] f;
    word = 0; word_sof = 0; locked = 0;
    repeat (3) @(posedge clk_frame);
    rst <= 1'b0;
    for (int run = 0; run < 3; run++) begin
      // unlocked frames first: they must not come out valid
      for (int n = 0; n < 6 + run; n++) begin
        @(negedge clk_word); word_sof = (n % 3 == 0); locked = 0; word = 40'($urandom);
      end
      for (int n = 0; n < 100; n++) begin
        f = {$urandom, $urandom, $urandom, 24'($urandom)};
        sent.push_back(f);
        for (int w = 0; w < 3; w++) begin
          @(negedge clk_word);
          word_sof = (w == 0);
          locked   = 1'b1;
          word     = f[119 - 40*w -: 40];
        end
      end
      repeat (12) @(negedge clk_word);
    end
    repeat (10) @(posedge clk_frame);
    checks++;
    if (sent.size() != 0 || got_frames != 300) begin
      failures++; $display("%0d frames left, %0d received", sent.size(), got_frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_frame) begin
    #1;
    if (frame_valid) begin
      checks++;
      got_frames++;
      if (sent.size() == 0) begin
        failures++; $display("unexpected frame");
      end else begin
        automatic logic [119:0] e = sent.pop_front();
        if (frame !== e) begin failures++; $display("frame mismatch"); end
      end
    end
  end
endmodule
