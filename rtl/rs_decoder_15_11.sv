// rs_decoder_15_11: combinational RS(15,11) decoder over GF(16), t = 2.
//
// Works in four steps, all in one combinational cone:
//  1. Syndromes S1..S4 = r(a^1)..r(a^4) of the received word r(x), symbol i
//     of code[] being the coefficient of x^i.
//  2. Error locator L(x) = 1 + s1 x + s2 x^2 solved directly (Peterson):
//     with D = S1 S3 + S2^2, two errors if D != 0, giving
//     s1 = (S1 S4 + S2 S3)/D and s2 = (S2 S4 + S3^2)/D; otherwise one error
//     with s1 = S2/S1 and s2 = 0.
//  3. Chien search: position i is in error when L(a^-i) = 0.
//  4. Forney: the error value there is (S1 + (S2 + S1 s1) a^-i) / s1.
// If the number of roots found differs from the number of errors assumed,
// or the syndromes are not all zero but S1 = D = 0, the word has more than
// two wrong symbols: it is passed through unchanged and uncorrectable is set.
// corrected is set when one or two symbols were repaired.
module rs_decoder_15_11
  import gbt_pkg::*;
(
  input  logic [RS_CODE_W-1:0] code,
  output logic [RS_MSG_W-1:0]  msg,
  output logic                 corrected,
  output logic                 uncorrectable
);

  gf_t                 syn [4];
  gf_t                 sig1, sig2, det, om1, inv_sig1;
  logic [RS_N-1:0]     root;
  gf_t                 errval [RS_N];
  logic [RS_CODE_W-1:0] fixed;
  logic                nz_syn, two_err, locator_ok;
  int unsigned         nroots;

  always_comb begin
    // 1. syndromes, evaluated by Horner's rule from the top symbol down
    for (int j = 0; j < 4; j++) begin
      automatic gf_t acc = '0;
      automatic gf_t aj  = gf_alpha_pow(j + 1);
      for (int i = RS_N - 1; i >= 0; i--)
        acc = gf_mul(acc, aj) ^ code[i*RS_SYM +: RS_SYM];
      syn[j] = acc;
    end
    nz_syn = (syn[0] | syn[1] | syn[2] | syn[3]) != '0;

    // 2. error locator
    det     = gf_mul(syn[0], syn[2]) ^ gf_mul(syn[1], syn[1]);
    two_err = det != '0;
    if (two_err) begin
      sig1 = gf_mul(gf_mul(syn[0], syn[3]) ^ gf_mul(syn[1], syn[2]), gf_inv(det));
      sig2 = gf_mul(gf_mul(syn[1], syn[3]) ^ gf_mul(syn[2], syn[2]), gf_inv(det));
    end else begin
      sig1 = gf_mul(syn[1], gf_inv(syn[0]));
      sig2 = '0;
    end
    locator_ok = two_err || (syn[0] != '0);

    // 3./4. Chien search and Forney values
    om1      = syn[1] ^ gf_mul(syn[0], sig1);
    inv_sig1 = gf_inv(sig1);
    nroots   = 0;
    for (int i = 0; i < RS_N; i++) begin
      automatic gf_t xinv  = gf_alpha_pow((RS_N - i) % RS_N);   // a^-i
      automatic gf_t xinv2 = gf_mul(xinv, xinv);
      root[i]   = (4'b0001 ^ gf_mul(sig1, xinv) ^ gf_mul(sig2, xinv2)) == '0;
      errval[i] = gf_mul(syn[0] ^ gf_mul(om1, xinv), inv_sig1);
      if (root[i]) nroots++;
    end

    uncorrectable = nz_syn && (!locator_ok || nroots != (two_err ? 2 : 1));
    corrected     = nz_syn && !uncorrectable;

    fixed = code;
    if (corrected)
      for (int i = 0; i < RS_N; i++)
        if (root[i]) fixed[i*RS_SYM +: RS_SYM] = code[i*RS_SYM +: RS_SYM] ^ errval[i];
    msg = fixed[RS_CODE_W-1 -: RS_MSG_W];   // the parity symbols are dropped
  end

endmodule
