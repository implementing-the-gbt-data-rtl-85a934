// tb_gbt_fpga_top: end-to-end test of one GBT link in loopback.
//
// The transmitter's 40-bit words are turned into a bit stream, delayed by a
// random number of bits (the unknown phase of a real link), optionally
// corrupted, and cut again into 40-bit words for the receiver, as a
// serializer, fibre and deserializer would.  The top runs with its default
// parameters (one link, dedicated decoder).  Phases:
//  1. test generator, constant words: frame lock is acquired after bit
//     slips; the error checker counts words and no errors;
//  2. switch to flying bits: still no errors;
//  3. bursts of 16 wrong bits on nibble boundaries and of 13 wrong bits at
//     any offset: corrected by the RS decoder, no errors at the checker;
//  4. ten frames of inverted line bits: the lock is lost (bad headers) and
//     regained, and the error counters stay still once it is back;
//  5. user data with data and idle headers: every frame comes out unchanged
//     (header, SC and D) with a constant latency.
// Each mechanism (bit slip, lock, correction, loss of lock, relock, mode
// switch, idle header) is counted and must have happened.
module tb_gbt_fpga_top;
  import gbt_pkg::*;

  logic clk_frame = 1'b0, clk_word = 1'b0, rst = 1'b1;
  always #12 clk_frame = ~clk_frame;
  always #4  clk_word  = ~clk_word;

  logic          use_generator;
  pattern_mode_e gen_mode;
  logic [79:0]   gen_const;
  logic [79:0]   tx_data [1];
  logic [3:0]    tx_sc   [1];
  logic          tx_idle [1];
  logic [39:0]   tx_word [1];
  logic [39:0]   rx_word [1];
  logic [3:0]    rx_hdr  [1];
  logic [3:0]    rx_sc   [1];
  logic [79:0]   rx_data [1];
  logic          rx_valid [1], rx_locked [1], rx_bitslip [1];
  logic          rx_corrected [1], rx_uncorrectable [1];
  logic [31:0]   words_checked [1], word_errors [1], bit_errors [1];

  gbt_fpga_top dut (
    .clk_frame, .clk_word, .rst, .use_generator, .gen_mode, .gen_const,
    .tx_data, .tx_sc, .tx_idle, .tx_word, .rx_word,
    .rx_hdr, .rx_sc, .rx_data, .rx_valid, .rx_locked, .rx_bitslip,
    .rx_corrected, .rx_uncorrectable, .words_checked, .word_errors, .bit_errors
  );

  int checks = 0, failures = 0;
  int n_slips = 0, n_locks = 0, n_unlocks = 0, n_corrected = 0, n_mode_switch = 0, n_idle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- channel model ----------------
  bit line [$];
  int flip_skip = -1, flip_len = 0;   // armed burst: skip bits, then flip flip_len
  bit arm_on_sof = 0;
  int arm_skip = 0, arm_len = 0;
  int invert_frames = 0;

  always @(posedge clk_word) begin
    #1;
    if (arm_on_sof && dut.g_link[0].tx_sof) begin
      arm_on_sof = 0;
      flip_skip  = arm_skip;
      flip_len   = arm_len;
    end
    if (invert_frames > 0 && dut.g_link[0].tx_sof) invert_frames--;
    for (int i = 39; i >= 0; i--) begin
      automatic bit b = tx_word[0][i];
      if (invert_frames > 0) b = ~b;
      if (flip_skip == 0 && flip_len > 0) begin
        b = ~b;
        flip_len--;
      end else if (flip_skip > 0) begin
        flip_skip--;
      end
      line.push_back(b);
    end
  end

  always @(negedge clk_word) begin
    if (line.size() >= 40)
      for (int i = 39; i >= 0; i--) rx_word[0][i] = line.pop_front();
  end

  task automatic burst_aligned(input int nibble);   // 16 bits from nibble 0..26
    arm_skip = 4 * nibble; arm_len = 16; arm_on_sof = 1;
    while (arm_on_sof || flip_len > 0) @(posedge clk_word);
  endtask

  task automatic burst_any(input int len);
    flip_skip = $urandom_range(0, 39); flip_len = len;
    while (flip_len > 0) @(posedge clk_word);
  endtask

  // ---------------- event counters ----------------
  logic locked_q = 0;
  always @(posedge clk_frame) begin
    #2;
    if (!rst) begin
      if (rx_locked[0] && !locked_q) n_locks++;
      if (!rx_locked[0] && locked_q) n_unlocks++;
      if (rx_valid[0] && rx_corrected[0]) n_corrected++;
      if (rx_valid[0] && rx_hdr[0] == HDR_IDLE) n_idle++;
    end
    locked_q = rx_locked[0];
  end
  always @(posedge clk_word) if (!rst && rx_bitslip[0]) n_slips++;

  task automatic frames(input int n);
    repeat (n) @(posedge clk_frame);
  endtask

  initial begin
    repeat (40000) @(posedge clk_frame);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off;
    logic [31:0] e0, c0, b0;
    use_generator = 1; gen_mode = PAT_CONSTANT; gen_const = 80'hC0FFEE_0123_4567_89AB_CD;
    tx_data[0] = '0; tx_sc[0] = '0; tx_idle[0] = 0; rx_word[0] = '0;
    off = $urandom_range(1, 119);
    for (int i = 0; i < off; i++) line.push_back(1'($urandom));
    frames(4);
    rst = 1'b0;

    // 1. lock with constant words
    begin
      int n = 0;
      while (!rx_locked[0] && n < 400) begin frames(1); n++; end
      $display("locked after %0d frames, line offset %0d bits, %0d bit slips", n, off, n_slips);
    end
    check(rx_locked[0], "frame lock acquired");
    frames(60);
    check(words_checked[0] > 40, "constant words checked");
    check(word_errors[0] == 0, "no errors with constant words");

    // 2. flying bits
    // words still in flight when the mode changes are checked against the
    // new pattern and count as errors; count from when they have drained
    gen_mode = PAT_FLYING; n_mode_switch++;
    frames(20);
    c0 = words_checked[0]; e0 = word_errors[0];
    frames(200);
    // rate: one 120-bit frame, hence one checked word, per frame clock
    check(words_checked[0] == c0 + 200,
          $sformatf("one word per frame clock (%0d in 200)", words_checked[0] - c0));
    check(word_errors[0] == e0, "no errors with flying bits");

    // 3. burst errors, 16 frames apart so that no more than 4 headers in
    //    64 frames are hit and the lock is kept
    for (int k = 0; k < 27; k++) begin
      burst_aligned(k);
      frames(16);
    end
    for (int k = 0; k < 20; k++) begin
      burst_any(13);
      frames(16);
    end
    frames(5);
    check(n_corrected >= 40, $sformatf("bursts corrected (%0d frames)", n_corrected));
    check(word_errors[0] == e0, "no errors after correctable bursts");
    check(rx_locked[0], "lock kept through bursts");

    // 4. loss of lock and relock
    invert_frames = 10;
    frames(15);
    check(n_unlocks == 1, "lock lost on bad headers");
    begin
      int n = 0;
      while (!rx_locked[0] && n < 400) begin frames(1); n++; end
    end
    check(rx_locked[0] && n_locks == 2, "lock regained");
    frames(5);
    e0 = word_errors[0]; c0 = words_checked[0]; b0 = bit_errors[0];
    frames(100);
    check(word_errors[0] == e0 && bit_errors[0] == b0, "no new errors after relock");
    check(words_checked[0] > c0 + 90, "checking resumed after relock");

    // 5. user data
    use_generator = 0; n_mode_switch++;
    begin
      typedef struct packed { logic [3:0] h; logic [3:0] sc; logic [79:0] d; } uw_t;
      uw_t sent [$];
      int  lat = -1, matched = 0, sent_cnt = 0;
      fork
        begin
          for (int f = 0; f < 300; f++) begin
            @(negedge clk_frame);
            tx_data[0] = {$urandom, $urandom, 16'($urandom)};
            tx_sc[0]   = 4'($urandom);
            tx_idle[0] = ($urandom_range(0, 3) == 0);
            sent.push_back('{h: tx_idle[0] ? HDR_IDLE : HDR_DATA, sc: tx_sc[0], d: tx_data[0]});
            sent_cnt++;
          end
        end
        begin
          for (int f = 0; f < 300; f++) begin
            @(posedge clk_frame); #1;
            if (rx_valid[0]) begin
              automatic uw_t got = '{h: rx_hdr[0], sc: rx_sc[0], d: rx_data[0]};
              if (lat < 0) begin
                // the first user word to arrive fixes the latency
                for (int i = 0; i < sent.size(); i++)
                  if (sent[i] == got) begin lat = sent_cnt - i; sent = sent[i:$]; break; end
              end
              if (lat >= 0) begin
                automatic uw_t e = sent.pop_front();
                checks++;
                if (e != got) begin failures++; $display("user frame %0d mismatch", matched); end
                else matched++;
                if (sent_cnt - sent.size() - 1 != 0 && sent.size() + 1 != lat) begin
                  failures++; $display("latency changed: %0d frames queued, expected %0d",
                                       sent.size() + 1, lat);
                end
              end
            end
          end
        end
      join
      $display("user data: %0d frames matched, latency %0d frame clocks", matched, lat);
      check(matched > 250, "user data received");
    end

    $display("bit slips %0d, locks %0d, unlocks %0d, corrected frames %0d, mode switches %0d, idle headers %0d",
             n_slips, n_locks, n_unlocks, n_corrected, n_mode_switch, n_idle);
    check(n_slips > 0, "bit slip happened");
    check(n_locks >= 2, "lock happened twice");
    check(n_unlocks >= 1, "unlock happened");
    check(n_corrected > 0, "correction happened");
    check(n_mode_switch >= 2, "mode switches happened");
    check(n_idle > 0, "idle headers received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
