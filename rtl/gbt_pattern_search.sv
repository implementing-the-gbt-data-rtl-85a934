// gbt_pattern_search: frame-lock state machine of the receiver.
//
// Works on the 40-bit aligned words from gbt_barrel_shifter at the word
// clock.  A counter of the word position in the frame (slot 0..2) marks the
// word that should start a frame; the 4 bits at the top of that word are the
// header position and are checked once per frame against the two valid
// headers (data 4'b0101, idle 4'b0110).
//
// OUT_OF_LOCK (acquisition): a valid header increments a count of
// consecutive valid headers; LOCK_FRAMES (23) in a row switch to IN_LOCK.
// An invalid header clears the count and issues a bit slip: the barrel
// shifter's shift goes up by one, so the candidate boundary moves one bit
// later.  When shift wraps from 39 to 0 the slot counter also holds for one
// word, so that successive slips walk through all 120 bit positions of the
// frame.  The header check after a slip is skipped once while the new shift
// reaches the output of the barrel shifter.
//
// IN_LOCK (tracking): the first invalid header opens a window of
// WINDOW_FRAMES (64) frames, itself included.  If more than BAD_LIMIT (4)
// invalid headers fall in the window, the machine returns to OUT_OF_LOCK;
// at the end of the window the count is cleared and tracking goes on.
//
// Outputs, one word clock after the input: the word itself, word_sof on
// slot 0, and locked.  Synchronous active-high reset.
module gbt_pattern_search
  import gbt_pkg::*;
#(
  parameter int unsigned LOCK_FRAMES   = 23,
  parameter int unsigned WINDOW_FRAMES = 64,
  parameter int unsigned BAD_LIMIT     = 4
)(
  input  logic               clk,
  input  logic               rst,
  input  logic [WORD_W-1:0]  word_in,
  output logic [5:0]         shift,      // to the barrel shifter
  output logic [WORD_W-1:0]  word_out,
  output logic               word_sof,
  output logic               locked,
  output logic               bitslip     // pulses with each bit slip
);

  typedef enum logic {OUT_OF_LOCK, IN_LOCK} lock_state_e;

  lock_state_e state;
  logic [1:0]  slot;
  logic        settle;
  logic [$clog2(LOCK_FRAMES+1)-1:0]   good_cnt;
  logic                                win_open;
  logic [$clog2(WINDOW_FRAMES+1)-1:0] win_cnt;
  logic [$clog2(WINDOW_FRAMES+1)-1:0] bad_cnt;

  logic hdr_ok;
  assign hdr_ok = hdr_valid(word_in[WORD_W-1 -: HDR_W]);
  assign locked = (state == IN_LOCK);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= OUT_OF_LOCK;
      slot     <= '0;
      shift    <= '0;
      settle   <= 1'b1;
      good_cnt <= '0;
      win_open <= 1'b0;
      win_cnt  <= '0;
      bad_cnt  <= '0;
      word_out <= '0;
      word_sof <= 1'b0;
      bitslip  <= 1'b0;
    end else begin
      word_out <= word_in;
      word_sof <= (slot == 2'd0);
      bitslip  <= 1'b0;
      slot     <= (slot == 2'(WORDS_PER_FRAME - 1)) ? 2'd0 : slot + 2'd1;

      if (slot == 2'd0) begin
        unique case (state)
          OUT_OF_LOCK: begin
            if (settle) begin
              settle <= 1'b0;
            end else if (hdr_ok) begin
              if (good_cnt == $bits(good_cnt)'(LOCK_FRAMES - 1)) begin
                state    <= IN_LOCK;
                good_cnt <= '0;
                win_open <= 1'b0;
                win_cnt  <= '0;
                bad_cnt  <= '0;
              end else begin
                good_cnt <= good_cnt + 1'b1;
              end
            end else begin
              good_cnt <= '0;
              bitslip  <= 1'b1;
              settle   <= 1'b1;
              if (shift == 6'(WORD_W - 1)) begin
                shift <= '0;
                slot  <= slot;          // move the frame start one word later
              end else begin
                shift <= shift + 6'd1;
              end
            end
          end
          IN_LOCK: begin
            if (!win_open) begin
              if (!hdr_ok) begin
                win_open <= 1'b1;
                win_cnt  <= 1;
                bad_cnt  <= 1;
              end
            end else begin
              if (!hdr_ok && bad_cnt + 1'b1 > $bits(bad_cnt)'(BAD_LIMIT)) begin
                state    <= OUT_OF_LOCK;
                good_cnt <= '0;
                win_open <= 1'b0;
                settle   <= 1'b0;
              end else if (win_cnt == $bits(win_cnt)'(WINDOW_FRAMES - 1)) begin
                win_open <= 1'b0;
                bad_cnt  <= '0;
                win_cnt  <= '0;
              end else begin
                win_cnt  <= win_cnt + 1'b1;
                if (!hdr_ok) bad_cnt <= bad_cnt + 1'b1;
              end
            end
          end
          default: state <= OUT_OF_LOCK;
        endcase
      end
    end
  end

endmodule
