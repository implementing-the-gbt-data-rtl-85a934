// gbt_pattern_gen: test data generator for the link.
//
// Produces one 80-bit data word per frame clock (40 MHz), either a constant
// word (mode PAT_CONSTANT, the word on const_word) or a flying bit (mode
// PAT_FLYING): a single one that moves up by one bit position every frame,
// from bit 0 to bit 79 and round again.  The header is the data header and
// the slow-control field is held at zero.  Changing the mode restarts the
// flying bit at bit 0.  One word per clock, registered outputs.
module gbt_pattern_gen
  import gbt_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  pattern_mode_e       mode,
  input  logic [DATA_W-1:0]   const_word,
  output logic [HDR_W-1:0]    hdr,
  output logic [SC_W-1:0]     sc,
  output logic [DATA_W-1:0]   data,
  output logic                valid
);

  pattern_mode_e mode_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      mode_q <= PAT_CONSTANT;
      data   <= '0;
      valid  <= 1'b0;
      hdr    <= HDR_IDLE;
      sc     <= '0;
    end else begin
      mode_q <= mode;
      valid  <= 1'b1;
      hdr    <= HDR_DATA;
      sc     <= '0;
      if (mode == PAT_CONSTANT)
        data <= const_word;
      else if (mode_q != PAT_FLYING || data == '0)
        data <= DATA_W'(1);
      else
        data <= {data[DATA_W-2:0], data[DATA_W-1]};
    end
  end

endmodule
