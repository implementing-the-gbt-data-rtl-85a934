// gbt_fpga_top: GBT link endpoints (transmitter and receiver) for an FPGA.
//
// Each of NUM_LINKS links has a full transmit and receive chain:
//   TX: source (user data, or the test generator) -> gbt_scrambler ->
//       gbt_rs_encoder -> gbt_interleaver -> gbt_tx_gearbox -> tx_word
//   RX: rx_word -> gbt_barrel_shifter <-> gbt_pattern_search ->
//       gbt_rx_gearbox -> gbt_deinterleaver -> RS decoder ->
//       gbt_descrambler -> user data, and gbt_error_checker
// The transceiver's serializer and deserializer are outside: tx_word and
// rx_word are their 40-bit parallel words at the 120 MHz word clock.  The
// frame clock (40 MHz) and word clock (120 MHz) must come from one PLL,
// phase aligned.  rst is synchronous, held for at least two frame clocks.
//
// The RS decoder is either one gbt_rs_decoder per link (SHARED_DECODER = 0,
// the default) or one gbt_shared_rs_decoder per group of three links, run
// at the word clock (SHARED_DECODER = 1, NUM_LINKS a multiple of 3).
// The default, one link without sharing, is the basic link; the shared
// decoder is the resource-saving variant for several links.
//
// TX latency: user data taken at a frame clock edge is scrambled by the next
// edge and leaves as three words, the first one word clock after that edge.
// RX latency depends on the bit offset of the incoming stream; in loopback
// with no line delay, user data comes back about 8 frame clocks after it was
// taken (with the shared decoder, one more).
module gbt_fpga_top
  import gbt_pkg::*;
#(
  parameter int unsigned NUM_LINKS      = 1,
  parameter bit          SHARED_DECODER = 1'b0
)(
  input  logic                clk_frame,
  input  logic                clk_word,
  input  logic                rst,
  // test generator / error checker control, common to all links
  input  logic                use_generator,
  input  pattern_mode_e       gen_mode,
  input  logic [DATA_W-1:0]   gen_const,
  // user transmit data, taken every frame clock when use_generator = 0
  input  logic [DATA_W-1:0]   tx_data     [NUM_LINKS],
  input  logic [SC_W-1:0]     tx_sc       [NUM_LINKS],
  input  logic                tx_idle     [NUM_LINKS],  // send the idle header
  // transceiver parallel words
  output logic [WORD_W-1:0]   tx_word     [NUM_LINKS],
  input  logic [WORD_W-1:0]   rx_word     [NUM_LINKS],
  // receive side
  output logic [HDR_W-1:0]    rx_hdr      [NUM_LINKS],
  output logic [SC_W-1:0]     rx_sc       [NUM_LINKS],
  output logic [DATA_W-1:0]   rx_data     [NUM_LINKS],
  output logic                rx_valid    [NUM_LINKS],
  output logic                rx_locked   [NUM_LINKS],
  output logic                rx_bitslip  [NUM_LINKS],
  output logic                rx_corrected     [NUM_LINKS],
  output logic                rx_uncorrectable [NUM_LINKS],
  output logic [31:0]         words_checked [NUM_LINKS],
  output logic [31:0]         word_errors   [NUM_LINKS],
  output logic [31:0]         bit_errors    [NUM_LINKS]
);

  initial assert (!SHARED_DECODER || (NUM_LINKS % WORDS_PER_FRAME == 0))
    else $error("gbt_fpga_top: a shared decoder needs NUM_LINKS to be a multiple of 3");

  // receive-side signals that cross between the per-link chains and the decoders
  logic                 dec_in_valid [NUM_LINKS];
  logic [RS_CODE_W-1:0] dec_code_a   [NUM_LINKS];
  logic [RS_CODE_W-1:0] dec_code_b   [NUM_LINKS];
  logic [HDR_W-1:0]     dec_hdr      [NUM_LINKS];
  logic [USER_W-1:0]    dec_scr      [NUM_LINKS];
  logic                 dec_valid    [NUM_LINKS];

  // test generator (the same pattern is sent on every link)
  logic [HDR_W-1:0]  gen_hdr;
  logic [SC_W-1:0]   gen_sc;
  logic [DATA_W-1:0] gen_data;
  logic              gen_valid;

  gbt_pattern_gen u_gen (
    .clk(clk_frame), .rst(rst), .mode(gen_mode), .const_word(gen_const),
    .hdr(gen_hdr), .sc(gen_sc), .data(gen_data), .valid(gen_valid)
  );

  for (genvar l = 0; l < NUM_LINKS; l++) begin : g_link
    // ---------------- transmitter ----------------
    logic [HDR_W-1:0]     src_hdr;
    logic [SC_W-1:0]      src_sc;
    logic [DATA_W-1:0]    src_data;
    logic                 src_valid;
    logic [HDR_W-1:0]     scr_hdr;
    logic [USER_W-1:0]    scr_user;
    logic                 scr_valid;
    logic [RS_CODE_W-1:0] enc_a, enc_b;
    logic [FRAME_W-1:0]   tx_frame;
    logic                 tx_sof;

    always_comb begin
      if (use_generator) begin
        src_hdr   = gen_hdr;
        src_sc    = gen_sc;
        src_data  = gen_data;
        src_valid = gen_valid;
      end else begin
        src_hdr   = tx_idle[l] ? HDR_IDLE : HDR_DATA;
        src_sc    = tx_sc[l];
        src_data  = tx_data[l];
        src_valid = 1'b1;
      end
    end

    gbt_scrambler u_scr (
      .clk(clk_frame), .rst(rst), .frame_valid(src_valid),
      .hdr_in(src_hdr), .sc_in(src_sc), .data_in(src_data),
      .hdr_out(scr_hdr), .scr_out(scr_user), .out_valid(scr_valid)
    );

    gbt_rs_encoder u_enc (.hdr(scr_hdr), .scr(scr_user), .code_a(enc_a), .code_b(enc_b));

    gbt_interleaver u_il (.code_a(enc_a), .code_b(enc_b), .frame(tx_frame));

    gbt_tx_gearbox u_txgb (
      .clk_frame(clk_frame), .clk_word(clk_word), .rst(rst),
      .frame_valid(scr_valid), .frame(tx_frame),
      .word(tx_word[l]), .word_sof(tx_sof)
    );

    // ---------------- receiver ----------------
    logic [5:0]           shift;
    logic [WORD_W-1:0]    aligned, ps_word;
    logic                 ps_sof, ps_locked;
    logic [FRAME_W-1:0]   rx_frame;
    logic                 rx_frame_valid;

    gbt_barrel_shifter u_bs (
      .clk(clk_word), .rst(rst), .word_in(rx_word[l]), .shift(shift), .word_out(aligned)
    );

    gbt_pattern_search u_ps (
      .clk(clk_word), .rst(rst), .word_in(aligned), .shift(shift),
      .word_out(ps_word), .word_sof(ps_sof), .locked(ps_locked), .bitslip(rx_bitslip[l])
    );

    gbt_rx_gearbox u_rxgb (
      .clk_word(clk_word), .clk_frame(clk_frame), .rst(rst),
      .word(ps_word), .word_sof(ps_sof), .locked(ps_locked),
      .frame(rx_frame), .frame_valid(rx_frame_valid)
    );

    gbt_deinterleaver u_dil (.frame(rx_frame), .code_a(dec_code_a[l]), .code_b(dec_code_b[l]));
    assign dec_in_valid[l] = rx_frame_valid;

    gbt_descrambler u_dscr (
      .clk(clk_frame), .rst(rst), .in_valid(dec_valid[l]),
      .hdr_in(dec_hdr[l]), .scr_in(dec_scr[l]),
      .hdr_out(rx_hdr[l]), .sc_out(rx_sc[l]), .data_out(rx_data[l]), .out_valid(rx_valid[l])
    );

    // the lock status as seen in the frame domain
    always_ff @(posedge clk_frame) begin
      if (rst) rx_locked[l] <= 1'b0;
      else     rx_locked[l] <= ps_locked;
    end

    gbt_error_checker u_chk (
      .clk(clk_frame), .rst(rst), .mode(gen_mode), .const_word(gen_const),
      .valid(rx_valid[l]), .data(rx_data[l]),
      .words_checked(words_checked[l]), .word_errors(word_errors[l]), .bit_errors(bit_errors[l])
    );
  end

  // ---------------- Reed-Solomon decoders ----------------
  if (SHARED_DECODER) begin : g_shared
    for (genvar g = 0; g < NUM_LINKS / WORDS_PER_FRAME; g++) begin : g_grp
      localparam int unsigned N = WORDS_PER_FRAME;
      logic                 v_in [N];
      logic [RS_CODE_W-1:0] a    [N];
      logic [RS_CODE_W-1:0] b    [N];
      logic [HDR_W-1:0]     h    [N];
      logic [USER_W-1:0]    s    [N];
      logic                 v    [N];
      logic                 c    [N];
      logic                 u    [N];
      for (genvar k = 0; k < N; k++) begin : g_k
        assign v_in[k] = dec_in_valid[g*N + k];
        assign a[k]    = dec_code_a[g*N + k];
        assign b[k]    = dec_code_b[g*N + k];
        assign dec_hdr[g*N + k]          = h[k];
        assign dec_scr[g*N + k]          = s[k];
        assign dec_valid[g*N + k]        = v[k];
        assign rx_corrected[g*N + k]     = c[k];
        assign rx_uncorrectable[g*N + k] = u[k];
      end
      gbt_shared_rs_decoder #(.N_LINKS(N)) u_sdec (
        .clk_frame(clk_frame), .clk_word(clk_word), .rst(rst),
        .in_valid(v_in), .code_a(a), .code_b(b),
        .hdr(h), .scr(s), .out_valid(v), .corrected(c), .uncorrectable(u)
      );
    end
  end else begin : g_dedicated
    for (genvar l = 0; l < NUM_LINKS; l++) begin : g_dec
      gbt_rs_decoder u_dec (
        .clk(clk_frame), .rst(rst), .in_valid(dec_in_valid[l]),
        .code_a(dec_code_a[l]), .code_b(dec_code_b[l]),
        .hdr(dec_hdr[l]), .scr(dec_scr[l]), .out_valid(dec_valid[l]),
        .corrected(rx_corrected[l]), .uncorrectable(rx_uncorrectable[l])
      );
    end
  end

endmodule
