// gbt_rx_gearbox: word-to-frame demultiplexer and clock-domain crossing.
//
// In the word domain (120 MHz) the aligned 40-bit words are gathered into a
// 120-bit frame, starting with the word marked word_sof (the one carrying
// the header).  A complete frame is written into one of two frame buffers,
// alternately, and a toggle flag is set to the index of the buffer just
// written.  The frame domain (40 MHz) registers the flag twice; when the two
// copies differ it reads the buffer the flag names.  A buffer is read at
// most two frame clocks after it was written and is rewritten only two
// frames later, so the read never meets a write.  As for the transmitter,
// both clocks are assumed to come from one PLL with a 3:1 ratio.
//
// frame_valid is high for one frame clock with each new frame while the
// pattern search is locked (locked is carried with the frame).  Latency from
// the third word to the frame output: two to three frame clocks.
// rst is synchronous and sampled in both domains.
module gbt_rx_gearbox
  import gbt_pkg::*;
(
  input  logic               clk_word,
  input  logic               clk_frame,
  input  logic               rst,
  input  logic [WORD_W-1:0]  word,
  input  logic               word_sof,
  input  logic               locked,
  output logic [FRAME_W-1:0] frame,
  output logic               frame_valid
);

  // word domain
  logic [FRAME_W-WORD_W-1:0] partial;
  logic [1:0]                idx;
  logic [FRAME_W-1:0]        bank [2];
  logic                      bank_locked [2];
  logic                      last_bank;

  always_ff @(posedge clk_word) begin
    if (rst) begin
      idx            <= '0;
      partial        <= '0;
      last_bank      <= 1'b0;
      bank[0]        <= '0;
      bank[1]        <= '0;
      bank_locked[0] <= 1'b0;
      bank_locked[1] <= 1'b0;
    end else begin
      if (word_sof) begin
        partial <= {word, {WORD_W{1'b0}}};
        idx     <= 2'd1;
      end else if (idx == 2'd1) begin
        partial[WORD_W-1:0] <= word;
        idx                 <= 2'd2;
      end else if (idx == 2'd2) begin
        bank[~last_bank]        <= {partial, word};
        bank_locked[~last_bank] <= locked;
        last_bank               <= ~last_bank;
        idx                     <= 2'd0;
      end
    end
  end

  // frame domain
  logic sel_q1, sel_q2;

  always_ff @(posedge clk_frame) begin
    if (rst) begin
      sel_q1      <= 1'b0;
      sel_q2      <= 1'b0;
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      sel_q1      <= last_bank;
      sel_q2      <= sel_q1;
      frame_valid <= 1'b0;
      if (sel_q1 != sel_q2) begin
        frame       <= bank[sel_q1];
        frame_valid <= bank_locked[sel_q1];
      end
    end
  end

endmodule
