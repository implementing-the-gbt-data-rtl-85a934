// gbt_tx_gearbox: frame-to-word multiplexer and clock-domain crossing.
//
// The transmitter works on 120-bit frames at the 40 MHz frame clock; the
// serializer takes 40-bit words at 120 MHz.  Each valid frame is stored in
// the frame domain and a toggle flag is flipped.  The word domain sees the
// flag change one word clock later, loads the whole frame into its own
// shift register and sends it as three words, most significant first
// (word 0 = frame[119:80], which starts with the header).
//
// The two clocks are assumed to come from the same PLL, phase aligned, the
// word clock exactly three times the frame clock; the frame is read by the
// word domain in the word clock after it was written, well inside the frame
// period, and copied whole so it is never read while being rewritten.
// word_sof marks word 0 of a frame.  Latency: frame edge to word 0 on the
// output is one word clock.  rst is synchronous and must be held for at
// least one frame clock; it is sampled in both domains.
module gbt_tx_gearbox
  import gbt_pkg::*;
(
  input  logic               clk_frame,
  input  logic               clk_word,
  input  logic               rst,
  input  logic               frame_valid,
  input  logic [FRAME_W-1:0] frame,
  output logic [WORD_W-1:0]  word,
  output logic               word_sof
);

  logic [FRAME_W-1:0] frame_q;
  logic               toggle_f;

  always_ff @(posedge clk_frame) begin
    if (rst) begin
      frame_q  <= '0;
      toggle_f <= 1'b0;
    end else if (frame_valid) begin
      frame_q  <= frame;
      toggle_f <= ~toggle_f;
    end
  end

  logic                       toggle_w;
  logic [FRAME_W-WORD_W-1:0]  rest;

  always_ff @(posedge clk_word) begin
    if (rst) begin
      toggle_w <= 1'b0;
      rest     <= '0;
      word     <= '0;
      word_sof <= 1'b0;
    end else begin
      toggle_w <= toggle_f;
      if (toggle_w != toggle_f) begin
        word     <= frame_q[FRAME_W-1 -: WORD_W];
        rest     <= frame_q[FRAME_W-WORD_W-1:0];
        word_sof <= 1'b1;
      end else begin
        word     <= rest[FRAME_W-WORD_W-1 -: WORD_W];
        rest     <= {rest[FRAME_W-2*WORD_W-1:0], {WORD_W{1'b0}}};
        word_sof <= 1'b0;
      end
    end
  end

endmodule
