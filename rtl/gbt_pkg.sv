// gbt_pkg: constants, types and GF(16) arithmetic shared by the GBT link.
//
// The GBT frame is 120 bits long and is sent once per 25 ns bunch crossing
// (40 MHz), giving 4.8 Gb/s on the line.  Its fields, first-transmitted
// first, are a 4-bit header H, a 4-bit slow-control field SC, 80 data bits D
// and 32 bits of Reed-Solomon parity.  Header, SC and D (88 bits) are
// protected by two interleaved RS(15,11) codes over GF(16), each correcting
// two 4-bit symbols.  These sizes are the protocol's own.
//
// Choices of this implementation (the protocol fixes them but they are not
// restated here from a source): the field GF(16) is built on the primitive
// polynomial x^4 + x + 1, the code generator has the roots alpha^1..alpha^4,
// the data header is 4'b0101 and the idle header 4'b0110.
package gbt_pkg;

  localparam int unsigned FRAME_W  = 120;  // bits per frame
  localparam int unsigned HDR_W    = 4;    // header
  localparam int unsigned SC_W     = 4;    // slow-control field
  localparam int unsigned DATA_W   = 80;   // data field
  localparam int unsigned USER_W   = SC_W + DATA_W;   // 84 scrambled bits
  localparam int unsigned INFO_W   = HDR_W + USER_W;  // 88 protected bits
  localparam int unsigned FEC_W    = 32;
  localparam int unsigned WORD_W   = 40;   // transceiver word at 120 MHz
  localparam int unsigned WORDS_PER_FRAME = FRAME_W / WORD_W;  // 3

  localparam int unsigned SCR_LANES  = 4;  // parallel scramblers
  localparam int unsigned SCR_LANE_W = USER_W / SCR_LANES;     // 21

  localparam int unsigned RS_N   = 15;     // symbols per codeword
  localparam int unsigned RS_K   = 11;     // message symbols per codeword
  localparam int unsigned RS_SYM = 4;      // bits per symbol
  localparam int unsigned RS_MSG_W  = RS_K * RS_SYM;   // 44
  localparam int unsigned RS_CODE_W = RS_N * RS_SYM;   // 60

  localparam logic [3:0] HDR_DATA = 4'b0101;
  localparam logic [3:0] HDR_IDLE = 4'b0110;

  typedef logic [3:0]          gf_t;
  typedef logic [FRAME_W-1:0]  frame_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [RS_CODE_W-1:0] codeword_t;
  typedef logic [RS_MSG_W-1:0]  message_t;

  // Test-generator modes (constant words or a flying bit).
  typedef enum logic [0:0] {PAT_CONSTANT = 1'b0, PAT_FLYING = 1'b1} pattern_mode_e;

  function automatic logic hdr_valid(input logic [3:0] h);
    return (h == HDR_DATA) || (h == HDR_IDLE);
  endfunction

  // Multiply by alpha (x) modulo x^4 + x + 1.
  function automatic gf_t gf_xtime(input gf_t a);
    return {a[2:0], 1'b0} ^ (a[3] ? 4'b0011 : 4'b0000);
  endfunction

  // Carry-less shift-and-add multiplication in GF(16).
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t r = '0;
    gf_t t = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= t;
      t = gf_xtime(t);
    end
    return r;
  endfunction

  // alpha^e for e in 0..14.
  function automatic gf_t gf_alpha_pow(input int unsigned e);
    gf_t r = 4'b0001;
    for (int i = 0; i < 15; i++)
      if (i < int'(e % 15)) r = gf_xtime(r);
    return r;
  endfunction

  // Inverse as a^14 (a^15 = 1 for a != 0); inverse of 0 is returned as 0.
  function automatic gf_t gf_inv(input gf_t a);
    gf_t a2  = gf_mul(a, a);
    gf_t a4  = gf_mul(a2, a2);
    gf_t a8  = gf_mul(a4, a4);
    gf_t a12 = gf_mul(a8, a4);
    return gf_mul(a12, a2);
  endfunction

  // Coefficients g3..g0 of g(x) = (x+a)(x+a^2)(x+a^3)(x+a^4) = x^4 + g3 x^3 + ... + g0.
  localparam gf_t RS_G3 = 4'd13;  // alpha^13
  localparam gf_t RS_G2 = 4'd12;  // alpha^6
  localparam gf_t RS_G1 = 4'd8;   // alpha^3
  localparam gf_t RS_G0 = 4'd7;   // alpha^10

endpackage
