// tb_gbt_tx_gearbox: frame-to-word multiplexing across the two clocks.
//
// Frame clock 24 ns and word clock 8 ns, rising together.  Random frames are
// presented on every frame clock; the words must come out three per frame,
// most significant first, with word_sof on the first, in the same order as
// the frames and with word 0 one word clock after the frame clock edge that
// registered the frame.
module tb_gbt_tx_gearbox;
  import gbt_pkg::*;

  logic clk_frame = 1'b0, clk_word = 1'b0, rst = 1'b1;
  always #12 clk_frame = ~clk_frame;
  always #4  clk_word  = ~clk_word;

  logic         frame_valid;
  logic [119:0] frame;
  logic [39:0]  word;
  logic         word_sof;
  int           checks = 0, failures = 0;

  gbt_tx_gearbox dut (.clk_frame, .clk_word, .rst, .frame_valid, .frame, .word, .word_sof);

  logic [119:0] sent [$];
  time          sent_t [$];

  initial begin
    repeat (3000) @(posedge clk_word);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver: a new frame at every frame clock edge
  initial begin
    frame_valid = 0; frame = 0;
    repeat (3) @(posedge clk_frame);
    rst <= 1'b0;
    for (int f = 0; f < 300; f++) begin
      @(negedge clk_frame);
      frame       = {$urandom, $urandom, $urandom, 24'($urandom)};
      frame_valid = 1'b1;
      @(posedge clk_frame);
      sent.push_back(frame);
      sent_t.push_back($time);
    end
    @(negedge clk_frame);
    frame_valid = 0;
    repeat (4) @(posedge clk_frame);
    checks++;
    if (sent.size() != 0) begin failures++; $display("%0d frames never sent", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  initial begin
    logic [119:0] got;
    forever begin
      @(posedge clk_word); #1;
      if (word_sof) begin
        automatic time t0 = $time;
        got[119:80] = word;
        @(posedge clk_word); #1;
        checks++;
        if (word_sof) begin failures++; $display("sof on word 1"); end
        got[79:40] = word;
        @(posedge clk_word); #1;
        got[39:0] = word;
        checks++;
        if (sent.size() == 0) begin
          failures++; $display("unexpected frame");
        end else begin
          automatic logic [119:0] e  = sent.pop_front();
          automatic time          te = sent_t.pop_front();
          if (got !== e) begin failures++; $display("frame mismatch %h vs %h", got, e); end
          checks++;
          if (t0 - 1 - te != 8) begin
            failures++; $display("latency %0t", t0 - 1 - te);
          end
        end
      end
    end
  end
endmodule
