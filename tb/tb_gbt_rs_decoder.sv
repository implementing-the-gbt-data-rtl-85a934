// tb_gbt_rs_decoder: error correction of the frame decoder.
//
// Codewords are made by the reference encoder of tb_rs_ref_pkg.  Each frame
// gets 0, 1 or 2 random symbol errors in each codeword (up to 4 per frame),
// and sometimes a burst of wrong consecutive bits in the interleaved frame
// order: 16 bits starting on a nibble boundary, or 13 bits at any offset
// (the longest bursts that touch at most four nibbles).  The decoder must return the original header and scrambled bits one
// clock later, with corrected set exactly when an error was injected.  Frames
// with 3 errors in one codeword must not come out flagged as clean.
module tb_gbt_rs_decoder;
  import gbt_pkg::*;
  import tb_rs_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid, out_valid, corrected, uncorrectable;
  logic [59:0] code_a, code_b;
  logic [3:0]  hdr;
  logic [83:0] scr;
  int          checks = 0, failures = 0;
  int          n_corr = 0, n_burst = 0, n_unc = 0;

  gbt_rs_decoder dut (.clk, .rst, .in_valid, .code_a, .code_b, .hdr, .scr,
                      .out_valid, .corrected, .uncorrectable);

  function automatic logic [59:0] add_errors(logic [59:0] c, int n);
    int pos [3];
    for (int e = 0; e < n; e++) begin
      bit again;
      do begin
        pos[e] = $urandom_range(0, 14);
        again = 0;
        for (int p = 0; p < e; p++) if (pos[p] == pos[e]) again = 1;
      end while (again);
      c[pos[e]*4 +: 4] ^= 4'($urandom_range(1, 15));
    end
    return c;
  endfunction

  // Flip a burst of len line bits starting at line bit 'start' (0 = first sent).
  function automatic void burst(inout logic [59:0] a, inout logic [59:0] b, input int start,
                                input int len);
    for (int k = start; k < start + len; k++) begin
      int nib = 29 - k / 4;          // frame nibble
      int bit_in = 3 - k % 4;
      if (nib % 2 == 1) a[(nib - 1) / 2 * 4 + bit_in] ^= 1'b1;
      else              b[nib / 2 * 4 + bit_in] ^= 1'b1;
    end
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [87:0] info;
    int          ea, eb;
    bit          is_burst;
    init();
    in_valid = 0; code_a = 0; code_b = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      info     = {$urandom, $urandom, 24'($urandom)};
      ea       = $urandom_range(0, 2);
      eb       = $urandom_range(0, 2);
      is_burst = (t % 5 == 4);
      code_a   = encode(info[87:44]);
      code_b   = encode(info[43:0]);
      if (is_burst) begin
        if (t % 2 == 0) burst(code_a, code_b, 4 * $urandom_range(0, 26), 16);
        else            burst(code_a, code_b, $urandom_range(0, 107), 13);
        n_burst++;
      end else if (t % 7 == 6) begin
        code_a = add_errors(code_a, 3);
        ea = 3;
      end else begin
        code_a = add_errors(code_a, ea);
        code_b = add_errors(code_b, eb);
      end
      in_valid = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (!out_valid) begin failures++; $display("t=%0d no out_valid", t); end
      if (ea == 3 && !is_burst) begin
        checks++;
        if (!corrected && !uncorrectable) begin failures++; $display("t=%0d 3 errors unseen", t); end
        if (uncorrectable) n_unc++;
      end else begin
        checks++;
        if ({hdr, scr} !== info) begin
          failures++; $display("t=%0d wrong data ea=%0d eb=%0d burst=%0d", t, ea, eb, is_burst);
        end
        checks++;
        if (corrected !== (is_burst || ea + eb > 0) || uncorrectable) begin
          failures++; $display("t=%0d wrong flags", t);
        end
        if (corrected) n_corr++;
      end
    end
    $display("corrected frames %0d, bursts %0d, 3-error words flagged uncorrectable %0d",
             n_corr, n_burst, n_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
