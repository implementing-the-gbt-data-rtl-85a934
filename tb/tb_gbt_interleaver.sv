// tb_gbt_interleaver: checks the nibble interleaving of two codewords.
//
// Frame nibbles, counted from the most significant (first sent) end, must
// alternate A14, B14, A13, B13, ... A0, B0.  Both the interleaver and the
// deinterleaver are checked, and that one undoes the other.
module tb_gbt_interleaver;
  import gbt_pkg::*;

  logic [59:0]  a, b, a2, b2;
  logic [119:0] frame;
  int           checks = 0, failures = 0;
  logic         clk = 1'b0;
  always #5 clk = ~clk;

  gbt_interleaver   dut  (.code_a(a), .code_b(b), .frame);
  gbt_deinterleaver dut2 (.frame, .code_a(a2), .code_b(b2));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      a = {$urandom, 28'($urandom)};
      b = {$urandom, 28'($urandom)};
      #1;
      for (int k = 0; k < 30; k++) begin      // k = position on the line, 0 first
        automatic logic [3:0] exp_nib = (k % 2 == 0) ? a[(14 - k/2)*4 +: 4] : b[(14 - k/2)*4 +: 4];
        checks++;
        if (frame[119 - 4*k -: 4] !== exp_nib) begin
          failures++; $display("t=%0d line nibble %0d wrong", t, k);
        end
      end
      checks++;
      if (a2 !== a || b2 !== b) begin failures++; $display("t=%0d round trip wrong", t); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
