// gbt_rs_encoder: forward-error-correction encoder of the GBT transmitter.
//
// The 88 protected bits, the header followed by the 84 scrambled bits, are
// split into two 44-bit messages, A = {hdr, scr[83:44]} and B = scr[43:0],
// and each is encoded into a 60-bit RS(15,11) codeword (rs_encoder_15_11).
// Together they add the 32 parity bits of the frame.  The split keeps the
// header as the first symbol of codeword A, so that after interleaving it is
// the first nibble on the line.  Purely combinational.
module gbt_rs_encoder
  import gbt_pkg::*;
(
  input  logic [HDR_W-1:0]     hdr,
  input  logic [USER_W-1:0]    scr,
  output logic [RS_CODE_W-1:0] code_a,
  output logic [RS_CODE_W-1:0] code_b
);

  logic [INFO_W-1:0] info;
  assign info = {hdr, scr};

  rs_encoder_15_11 u_enc_a (.msg(info[INFO_W-1 -: RS_MSG_W]), .code(code_a));
  rs_encoder_15_11 u_enc_b (.msg(info[RS_MSG_W-1:0]),         .code(code_b));

endmodule
