// gbt_deinterleaver: splits a received frame into its two RS codewords.
//
// Inverse of gbt_interleaver: odd frame nibbles (counting from 0 at the
// least significant end) belong to codeword A, even nibbles to codeword B.
// Purely combinational.
module gbt_deinterleaver
  import gbt_pkg::*;
(
  input  logic [FRAME_W-1:0]   frame,
  output logic [RS_CODE_W-1:0] code_a,
  output logic [RS_CODE_W-1:0] code_b
);

  always_comb begin
    for (int s = 0; s < RS_N; s++) begin
      code_a[s*RS_SYM +: RS_SYM] = frame[(2*s+1)*RS_SYM +: RS_SYM];
      code_b[s*RS_SYM +: RS_SYM] = frame[(2*s)*RS_SYM   +: RS_SYM];
    end
  end

endmodule
