// rs_encoder_15_11: systematic Reed-Solomon RS(15,11) encoder over GF(16).
//
// The 11 message symbols (4 bits each, msg[43:40] the highest-degree symbol)
// are divided by the generator g(x) = (x+a)(x+a^2)(x+a^3)(x+a^4) in an
// unrolled linear-feedback division; the 4 remainder symbols are appended
// below the message: code = {msg, p3, p2, p1, p0}.  Any two wrong symbols in
// the 15 can then be corrected.  Purely combinational.
module rs_encoder_15_11
  import gbt_pkg::*;
(
  input  logic [RS_MSG_W-1:0]  msg,
  output logic [RS_CODE_W-1:0] code
);

  gf_t p [4];

  always_comb begin
    automatic gf_t fb;
    for (int i = 0; i < 4; i++) p[i] = '0;
    for (int s = RS_K - 1; s >= 0; s--) begin
      fb   = msg[s*RS_SYM +: RS_SYM] ^ p[3];
      p[3] = p[2] ^ gf_mul(fb, RS_G3);
      p[2] = p[1] ^ gf_mul(fb, RS_G2);
      p[1] = p[0] ^ gf_mul(fb, RS_G1);
      p[0] = gf_mul(fb, RS_G0);
    end
    code = {msg, p[3], p[2], p[1], p[0]};
  end

endmodule
