// tb_gbt_rs_encoder: checks the two RS(15,11) codewords of a frame.
//
// For random headers and scrambled words: codeword A must carry {hdr,
// scr[83:44]} and codeword B scr[43:0] in their top 11 symbols, both must
// equal the long-division reference encoding, and all four syndromes
// (evaluation at a^1..a^4) of both must be zero.
module tb_gbt_rs_encoder;
  import gbt_pkg::*;
  import tb_rs_ref_pkg::*;

  logic [3:0]  hdr;
  logic [83:0] scr;
  logic [59:0] code_a, code_b;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;
  always #5 clk = ~clk;

  gbt_rs_encoder dut (.hdr, .scr, .code_a, .code_b);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int t = 0; t < 500; t++) begin
      hdr = 4'($urandom);
      scr = {$urandom, $urandom, 20'($urandom)};
      if (t == 0) begin hdr = '0; scr = '0; end
      #1;
      checks++;
      if (code_a[59:16] !== {hdr, scr[83:44]} || code_b[59:16] !== scr[43:0]) begin
        failures++; $display("t=%0d message part wrong", t);
      end
      checks++;
      if (code_a !== encode({hdr, scr[83:44]}) || code_b !== encode(scr[43:0])) begin
        failures++; $display("t=%0d parity wrong: %h %h", t, code_a, encode({hdr, scr[83:44]}));
      end
      for (int j = 1; j <= 4; j++) begin
        checks++;
        if (syndrome(code_a, j) != 0 || syndrome(code_b, j) != 0) begin
          failures++; $display("t=%0d syndrome %0d nonzero", t, j);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
