// gbt_interleaver: symbol interleaving of the two RS codewords into a frame.
//
// The 4-bit symbols of codewords A and B alternate on the line, A first:
// frame nibble 29-2i is symbol 14-i of A and nibble 28-2i is symbol 14-i of
// B.  A burst of up to 16 wrong consecutive bits then touches at most two
// symbols of each codeword, which each RS(15,11) code can correct.  As a
// result the frame reads header, scrambled SC and D, then the 32 parity bits.
// Purely combinational.
module gbt_interleaver
  import gbt_pkg::*;
(
  input  logic [RS_CODE_W-1:0] code_a,
  input  logic [RS_CODE_W-1:0] code_b,
  output logic [FRAME_W-1:0]   frame
);

  always_comb begin
    for (int s = 0; s < RS_N; s++) begin
      frame[(2*s+1)*RS_SYM +: RS_SYM] = code_a[s*RS_SYM +: RS_SYM];
      frame[(2*s)*RS_SYM   +: RS_SYM] = code_b[s*RS_SYM +: RS_SYM];
    end
  end

endmodule
