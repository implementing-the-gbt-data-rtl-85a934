// gbt_scrambler: DC-balancing scrambler of the transmitter.
//
// The 84 bits of the slow-control and data fields are split into four lanes
// of 21 bits, each scrambled by its own self-synchronising scrambler, as in
// the four parallel scramblers of the GBT encoder.  The header is not
// scrambled; it is delayed by the same register so that it stays with its
// frame.  Lane k takes bits {sc,data}[21k+20:21k].
//
// Each lane applies, 21 bits per frame, the serial rule
//     s[n] = d[n] ^ s[n-19] ^ s[n-21]      (polynomial 1 + x^19 + x^21)
// where bit j of a lane word is element n = 21*t + j of the lane's stream.
// The previous frame's scrambled lane word is the scrambler state, so a
// descrambler using the same rule recovers the data after one frame without
// any reset shared with the transmitter.  The polynomial and the bit order
// are choices of this design; the protocol requires only that the SC and D
// fields are scrambled in four 21-bit scramblers.
//
// Timing: one frame clock (40 MHz) of latency; one frame per clock when
// frame_valid is high.  Synchronous active-high reset clears the state.
module gbt_scrambler
  import gbt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 frame_valid,
  input  logic [HDR_W-1:0]     hdr_in,
  input  logic [SC_W-1:0]      sc_in,
  input  logic [DATA_W-1:0]    data_in,
  output logic [HDR_W-1:0]     hdr_out,
  output logic [USER_W-1:0]    scr_out,    // scrambled {sc, data}
  output logic                 out_valid
);

  logic [USER_W-1:0] user;
  logic [USER_W-1:0] scr_next;

  assign user = {sc_in, data_in};

  // Bits 19 and 20 of a lane depend on bits 0 and 1 of the same frame, so
  // each lane is computed in index order in a local variable.
  always_comb begin
    automatic logic [USER_W-1:0] s = '0;
    for (int k = 0; k < SCR_LANES; k++) begin
      for (int j = 0; j < SCR_LANE_W; j++) begin
        automatic logic tap19 = (j >= 19) ? s[k*SCR_LANE_W + j - 19]
                                          : scr_out[k*SCR_LANE_W + j + 2];
        s[k*SCR_LANE_W + j] = user[k*SCR_LANE_W + j] ^ tap19 ^ scr_out[k*SCR_LANE_W + j];
      end
    end
    scr_next = s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scr_out   <= '0;
      hdr_out   <= HDR_IDLE;
      out_valid <= 1'b0;
    end else begin
      out_valid <= frame_valid;
      if (frame_valid) begin
        scr_out <= scr_next;
        hdr_out <= hdr_in;
      end
    end
  end

endmodule
