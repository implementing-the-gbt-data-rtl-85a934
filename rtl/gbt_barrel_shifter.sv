// gbt_barrel_shifter: bit alignment of the deserialized words.
//
// The deserializer delivers 40-bit words with an arbitrary bit offset from
// the frame boundary.  This block keeps the previous word and outputs the
// 40-bit window of the two-word stream {prev, cur} that starts "shift" bits
// after the start of prev (bit 79 of the pair being the first received):
//     aligned = {prev, cur}[79-shift -: 40],  shift = 0..39.
// Raising shift by one delays the frame boundary by one bit, which is how
// the pattern search state machine's bit-slip command acts.  The output is
// registered: one word clock of latency on top of the one-word window.
module gbt_barrel_shifter
  import gbt_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [WORD_W-1:0]  word_in,
  input  logic [5:0]         shift,      // 0..WORD_W-1
  output logic [WORD_W-1:0]  word_out
);

  logic [WORD_W-1:0]   prev;
  logic [2*WORD_W-1:0] pair;

  assign pair = {prev, word_in};

  always_ff @(posedge clk) begin
    if (rst) begin
      prev     <= '0;
      word_out <= '0;
    end else begin
      prev     <= word_in;
      word_out <= pair[7'(2*WORD_W-1) - 7'(shift) -: WORD_W];
    end
  end

endmodule
