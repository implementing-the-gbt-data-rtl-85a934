// tb_gbt_deinterleaver: checks that a frame is split into its two codewords.
//
// For random frames, symbol s of codeword A must be frame nibble 2s+1 and
// symbol s of codeword B frame nibble 2s (nibbles counted from bit 0).
module tb_gbt_deinterleaver;
  import gbt_pkg::*;

  logic [119:0] frame;
  logic [59:0]  a, b;
  int           checks = 0, failures = 0;
  logic         clk = 1'b0;
  always #5 clk = ~clk;

  gbt_deinterleaver dut (.frame, .code_a(a), .code_b(b));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      frame = {$urandom, $urandom, $urandom, 24'($urandom)};
      #1;
      for (int s = 0; s < 15; s++) begin
        checks++;
        if (a[4*s +: 4] !== frame[8*s + 4 +: 4] || b[4*s +: 4] !== frame[8*s +: 4]) begin
          failures++; $display("t=%0d symbol %0d wrong", t, s);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
