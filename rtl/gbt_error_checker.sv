// gbt_error_checker: error counters for the received test pattern.
//
// Checks each valid received 80-bit data word against what gbt_pattern_gen
// sends: in PAT_CONSTANT mode it must equal const_word; in PAT_FLYING mode it
// must be the previous valid word rotated up by one bit, and hold exactly
// one set bit.  The first valid word after reset, after a gap in valid or
// after a mode change only loads the reference (the checker synchronises
// itself to the incoming pattern, whatever the link latency).  Counts
// checked words, words in error and wrong bits.  One frame clock latency.
module gbt_error_checker
  import gbt_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  pattern_mode_e       mode,
  input  logic [DATA_W-1:0]   const_word,
  input  logic                valid,
  input  logic [DATA_W-1:0]   data,
  output logic [31:0]         words_checked,
  output logic [31:0]         word_errors,
  output logic [31:0]         bit_errors
);

  logic [DATA_W-1:0] prev;
  logic              have_prev;
  pattern_mode_e     mode_q;
  logic [DATA_W-1:0] expected;
  logic [DATA_W-1:0] diff;
  logic [7:0]        ndiff;
  logic              onehot;

  always_comb begin
    expected = (mode == PAT_CONSTANT) ? const_word : {prev[DATA_W-2:0], prev[DATA_W-1]};
    diff     = data ^ expected;
    ndiff    = '0;
    for (int i = 0; i < DATA_W; i++) ndiff += 8'(diff[i]);
    onehot   = (data != '0) && ((data & (data - 1'b1)) == '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev          <= '0;
      have_prev     <= 1'b0;
      mode_q        <= PAT_CONSTANT;
      words_checked <= '0;
      word_errors   <= '0;
      bit_errors    <= '0;
    end else begin
      mode_q <= mode;
      if (!valid || mode != mode_q) begin
        have_prev <= 1'b0;
      end else begin
        prev      <= data;
        have_prev <= 1'b1;
        if (mode == PAT_CONSTANT || have_prev) begin
          words_checked <= words_checked + 1;
          if (diff != '0 || (mode == PAT_FLYING && !onehot)) begin
            word_errors <= word_errors + 1;
            bit_errors  <= bit_errors + 32'(ndiff);
          end
        end
      end
    end
  end

endmodule
