// gbt_rs_decoder: forward-error-correction decoder of the GBT receiver.
//
// Decodes the two deinterleaved RS(15,11) codewords of a frame, each with a
// combinational rs_decoder_15_11 that repairs up to two wrong 4-bit symbols.
// Because the two codes are interleaved nibble by nibble, up to four wrong
// symbols, or any burst of 16 wrong consecutive line bits, are repaired per
// frame.  The corrected header and 84 scrambled bits are registered, so the
// block has one frame clock of latency and accepts one frame per clock.
// corrected / uncorrectable report what the two codeword decoders did
// (status flags added by this design for monitoring).
module gbt_rs_decoder
  import gbt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [RS_CODE_W-1:0] code_a,
  input  logic [RS_CODE_W-1:0] code_b,
  output logic [HDR_W-1:0]     hdr,
  output logic [USER_W-1:0]    scr,
  output logic                 out_valid,
  output logic                 corrected,
  output logic                 uncorrectable
);

  logic [RS_MSG_W-1:0] msg_a, msg_b;
  logic                cor_a, cor_b, unc_a, unc_b;

  rs_decoder_15_11 u_dec_a (.code(code_a), .msg(msg_a), .corrected(cor_a), .uncorrectable(unc_a));
  rs_decoder_15_11 u_dec_b (.code(code_b), .msg(msg_b), .corrected(cor_b), .uncorrectable(unc_b));

  always_ff @(posedge clk) begin
    if (rst) begin
      hdr           <= '0;
      scr           <= '0;
      out_valid     <= 1'b0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        {hdr, scr}    <= {msg_a, msg_b};
        corrected     <= cor_a | cor_b;
        uncorrectable <= unc_a | unc_b;
      end
    end
  end

endmodule
