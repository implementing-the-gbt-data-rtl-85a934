// gbt_shared_rs_decoder: one Reed-Solomon decoder shared by three links.
//
// The RS decoder is the largest part of a GBT receiver.  Here one pair of
// combinational rs_decoder_15_11 (codewords A and B) serves N_LINKS = 3
// links by running at the 120 MHz word clock, three times the frame rate:
//  - x3 mux: each frame, the three links' deinterleaved codewords are
//    registered in the frame domain; in the word domain a phase counter,
//    started by a toggle from the frame domain, feeds link 0, 1 and 2 to the
//    decoder in three successive word clocks;
//  - x3 demux: each result is registered into that link's result slot, and
//    the three slots are copied together into a hold register on the word
//    clock that starts the next frame; the frame domain reads the hold
//    register on every frame clock.
// As in the gearboxes, the two clocks are assumed to come from one PLL with
// a ratio of exactly three, which is why N_LINKS cannot exceed 3.  Latency:
// two frame clocks from the input to the output registers (one more than the
// unshared gbt_rs_decoder).  Status flags as in gbt_rs_decoder.
module gbt_shared_rs_decoder
  import gbt_pkg::*;
#(
  parameter int unsigned N_LINKS = 3
)(
  input  logic                 clk_frame,
  input  logic                 clk_word,
  input  logic                 rst,
  input  logic                 in_valid      [N_LINKS],
  input  logic [RS_CODE_W-1:0] code_a        [N_LINKS],
  input  logic [RS_CODE_W-1:0] code_b        [N_LINKS],
  output logic [HDR_W-1:0]     hdr           [N_LINKS],
  output logic [USER_W-1:0]    scr           [N_LINKS],
  output logic                 out_valid     [N_LINKS],
  output logic                 corrected     [N_LINKS],
  output logic                 uncorrectable [N_LINKS]
);

  typedef struct packed {
    logic              valid;
    logic              corrected;
    logic              uncorrectable;
    logic [INFO_W-1:0] info;      // {hdr, scr}
  } result_t;

  initial assert (N_LINKS >= 1 && N_LINKS <= WORDS_PER_FRAME)
    else $error("gbt_shared_rs_decoder: N_LINKS must be 1..%0d", WORDS_PER_FRAME);

  // frame domain: input registers and frame toggle
  logic                 val_q [N_LINKS];
  logic [RS_CODE_W-1:0] a_q   [N_LINKS];
  logic [RS_CODE_W-1:0] b_q   [N_LINKS];
  logic                 tog_f;

  always_ff @(posedge clk_frame) begin
    if (rst) begin
      tog_f <= 1'b0;
      for (int l = 0; l < N_LINKS; l++) begin
        val_q[l] <= 1'b0;
        a_q[l]   <= '0;
        b_q[l]   <= '0;
      end
    end else begin
      tog_f <= ~tog_f;
      for (int l = 0; l < N_LINKS; l++) begin
        val_q[l] <= in_valid[l];
        a_q[l]   <= code_a[l];
        b_q[l]   <= code_b[l];
      end
    end
  end

  // word domain: x3 mux, shared decoder, x3 demux
  logic        tog_w, start;
  logic [1:0]  phase, sel;
  result_t     res  [N_LINKS];
  result_t     hold [N_LINKS];

  logic [RS_CODE_W-1:0] mux_a, mux_b;
  logic                 mux_v;
  logic [RS_MSG_W-1:0]  msg_a, msg_b;
  logic                 cor_a, cor_b, unc_a, unc_b;

  assign start = (tog_w != tog_f);
  assign sel   = start ? 2'd0 : phase;

  always_comb begin
    mux_a = '0;
    mux_b = '0;
    mux_v = 1'b0;
    for (int l = 0; l < N_LINKS; l++)
      if (sel == 2'(l)) begin
        mux_a = a_q[l];
        mux_b = b_q[l];
        mux_v = val_q[l];
      end
  end

  rs_decoder_15_11 u_dec_a (.code(mux_a), .msg(msg_a), .corrected(cor_a), .uncorrectable(unc_a));
  rs_decoder_15_11 u_dec_b (.code(mux_b), .msg(msg_b), .corrected(cor_b), .uncorrectable(unc_b));

  always_ff @(posedge clk_word) begin
    if (rst) begin
      tog_w <= 1'b0;
      phase <= 2'd3;
      for (int l = 0; l < N_LINKS; l++) begin
        res[l]  <= '0;
        hold[l] <= '0;
      end
    end else begin
      tog_w <= tog_f;
      if (start) begin
        for (int l = 0; l < N_LINKS; l++) hold[l] <= res[l];
        phase <= 2'd1;
      end else if (phase != 2'd3) begin
        phase <= phase + 2'd1;
      end
      for (int l = 0; l < N_LINKS; l++)
        if (sel == 2'(l) && (start || phase != 2'd3))
          res[l] <= '{valid: mux_v, corrected: cor_a | cor_b,
                      uncorrectable: unc_a | unc_b, info: {msg_a, msg_b}};
    end
  end

  // frame domain: outputs
  always_ff @(posedge clk_frame) begin
    if (rst) begin
      for (int l = 0; l < N_LINKS; l++) begin
        hdr[l]           <= '0;
        scr[l]           <= '0;
        out_valid[l]     <= 1'b0;
        corrected[l]     <= 1'b0;
        uncorrectable[l] <= 1'b0;
      end
    end else begin
      for (int l = 0; l < N_LINKS; l++) begin
        {hdr[l], scr[l]} <= hold[l].info;
        out_valid[l]     <= hold[l].valid;
        corrected[l]     <= hold[l].corrected;
        uncorrectable[l] <= hold[l].uncorrectable;
      end
    end
  end

endmodule
