// tb_gbt_fpga_top_shared: twelve links, each three sharing one RS decoder.
//
// The top is built with NUM_LINKS = 12 and SHARED_DECODER = 1, so each group
// of three receivers uses one gbt_shared_rs_decoder (four decoders for the
// twelve links, the multi-link arrangement of the resource study).  Each link has its own channel
// model with its own bit offset.  All links must lock; with the flying-bit
// test pattern, 16-bit bursts on nibble boundaries are injected on every link
// and must be corrected (corrected frames seen on each link) with no errors
// at any checker; then user data sent on the links must arrive each on
// its own link.
module tb_gbt_fpga_top_shared;
  import gbt_pkg::*;

  localparam int L = 12;
  logic clk_frame = 1'b0, clk_word = 1'b0, rst = 1'b1;
  always #12 clk_frame = ~clk_frame;
  always #4  clk_word  = ~clk_word;

  logic          use_generator;
  pattern_mode_e gen_mode;
  logic [79:0]   gen_const;
  logic [79:0]   tx_data [L];
  logic [3:0]    tx_sc   [L];
  logic          tx_idle [L];
  logic [39:0]   tx_word [L];
  logic [39:0]   rx_word [L];
  logic [3:0]    rx_hdr  [L];
  logic [3:0]    rx_sc   [L];
  logic [79:0]   rx_data [L];
  logic          rx_valid [L], rx_locked [L], rx_bitslip [L];
  logic          rx_corrected [L], rx_uncorrectable [L];
  logic [31:0]   words_checked [L], word_errors [L], bit_errors [L];

  gbt_fpga_top #(.NUM_LINKS(L), .SHARED_DECODER(1'b1)) dut (
    .clk_frame, .clk_word, .rst, .use_generator, .gen_mode, .gen_const,
    .tx_data, .tx_sc, .tx_idle, .tx_word, .rx_word,
    .rx_hdr, .rx_sc, .rx_data, .rx_valid, .rx_locked, .rx_bitslip,
    .rx_corrected, .rx_uncorrectable, .words_checked, .word_errors, .bit_errors
  );

  int checks = 0, failures = 0;
  int n_corr [L] = '{default: 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // channel models: bit queues, a burst armed on the next frame start
  bit line [L][$];
  int flip_skip [L] = '{default: -1};
  int flip_len  [L] = '{default: 0};

  for (genvar l = 0; l < L; l++) begin : g_ch
    always @(posedge clk_word) begin
      #1;
      for (int i = 39; i >= 0; i--) begin
        automatic bit b = tx_word[l][i];
        if (flip_skip[l] == 0 && flip_len[l] > 0) begin b = ~b; flip_len[l]--; end
        else if (flip_skip[l] > 0) flip_skip[l]--;
        line[l].push_back(b);
      end
    end
    always @(negedge clk_word)
      if (line[l].size() >= 40)
        for (int i = 39; i >= 0; i--) rx_word[l][i] = line[l].pop_front();
    always @(posedge clk_frame) begin
      #2;
      if (!rst && rx_valid[l] && rx_corrected[l]) n_corr[l]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk_frame);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e0 [L];
    use_generator = 1; gen_mode = PAT_FLYING; gen_const = '0;
    for (int l = 0; l < L; l++) begin
      tx_data[l] = '0; tx_sc[l] = '0; tx_idle[l] = 0; rx_word[l] = '0;
      for (int i = 0; i < (17 + 37 * l) % 120; i++) line[l].push_back(1'($urandom));
    end
    repeat (4) @(posedge clk_frame);
    rst = 1'b0;
    repeat (400) @(posedge clk_frame);
    for (int l = 0; l < L; l++) check(rx_locked[l], $sformatf("link %0d locked", l));
    repeat (20) @(posedge clk_frame);
    for (int l = 0; l < L; l++) e0[l] = word_errors[l];
    for (int k = 0; k < 27; k++) begin
      for (int l = 0; l < L; l++) begin
        // a burst on nibble boundaries: 16 bits, starting 4*k bits into a word
        flip_skip[l] = 4 * (k % 6); flip_len[l] = 16;
      end
      repeat (16) @(posedge clk_frame);
    end
    for (int l = 0; l < L; l++) begin
      check(rx_locked[l], $sformatf("link %0d kept lock", l));
      check(word_errors[l] == e0[l], $sformatf("link %0d no errors after bursts", l));
      check(words_checked[l] > 300, $sformatf("link %0d words checked", l));
      check(n_corr[l] >= 20, $sformatf("link %0d corrected %0d frames", l, n_corr[l]));
    end
    // user data: each link sends its own constant word
    use_generator = 0;
    for (int l = 0; l < L; l++) tx_data[l] = 80'h1234_5678_9abc_def0_0000 + 80'(l);
    repeat (20) @(posedge clk_frame);
    for (int i = 0; i < 20; i++) begin
      @(posedge clk_frame); #1;
      for (int l = 0; l < L; l++)
        check(rx_valid[l] && rx_data[l] == tx_data[l], $sformatf("link %0d user data", l));
    end
    for (int l = 0; l < L; l++) $display("link %0d: corrected frames %0d", l, n_corr[l]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
