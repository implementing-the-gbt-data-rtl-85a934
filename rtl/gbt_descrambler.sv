// gbt_descrambler: inverse of gbt_scrambler in the receiver.
//
// Four 21-bit lanes, each undoing the self-synchronising rule
//     d[n] = s[n] ^ s[n-19] ^ s[n-21]
// with bit j of a lane word being element n = 21*t + j of the lane stream
// (the same order and polynomial as the transmitter; both are choices of
// this design).  The state is the previous frame's scrambled input, so the
// output is right from the second frame received after a reset or after a
// break in the stream, with no shared reset with the transmitter.  A frame
// whose predecessor was not valid cannot be descrambled and comes out with
// out_valid low.
//
// Timing: one frame clock of latency.  in_valid marks frames to use; the
// state only advances on valid frames.  Synchronous active-high reset.
module gbt_descrambler
  import gbt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [HDR_W-1:0]     hdr_in,
  input  logic [USER_W-1:0]    scr_in,      // scrambled {sc, data}
  output logic [HDR_W-1:0]     hdr_out,
  output logic [SC_W-1:0]      sc_out,
  output logic [DATA_W-1:0]    data_out,
  output logic                 out_valid
);

  logic [USER_W-1:0] prev_scr;
  logic              primed;      // prev_scr holds the frame just before
  logic [USER_W-1:0] user_next;

  always_comb begin
    for (int k = 0; k < SCR_LANES; k++) begin
      for (int j = 0; j < SCR_LANE_W; j++) begin
        automatic logic tap19 = (j >= 19) ? scr_in[k*SCR_LANE_W + j - 19]
                                          : prev_scr[k*SCR_LANE_W + j + 2];
        user_next[k*SCR_LANE_W + j] = scr_in[k*SCR_LANE_W + j] ^ tap19
                                    ^ prev_scr[k*SCR_LANE_W + j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_scr  <= '0;
      primed    <= 1'b0;
      hdr_out   <= '0;
      sc_out    <= '0;
      data_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && primed;
      primed    <= in_valid;
      if (in_valid) begin
        prev_scr             <= scr_in;
        hdr_out              <= hdr_in;
        {sc_out, data_out}   <= user_next;
      end
    end
  end

endmodule
