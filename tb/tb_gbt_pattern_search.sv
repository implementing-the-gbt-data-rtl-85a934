// tb_gbt_pattern_search: frame-lock acquisition and tracking.
//
// A frame source builds 120-bit frames {header, 20-bit frame number, random
// bits}, with a valid header unless the test marks the frame bad, and sends
// them as a bit stream cut into 40-bit words, starting at a random bit offset.
// The pattern search drives a gbt_barrel_shifter as in the receiver.
// Checked, for several offsets:
//  - lock is reached, no sooner than 23 header checks after the last bit slip
//    and within the time of one full 120-position search;
//  - once locked, every word_sof word starts a frame (its frame number follows
//    the previous one);
//  - 4 bad headers within 64 frames keep the lock, also twice in a row in
//    separate windows; 5 bad headers within 64 frames lose it; the lock is
//    then regained without further bit slips.
module tb_gbt_pattern_search;
  import gbt_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #4 clk = ~clk;

  logic [39:0] raw, aligned, word_out;
  logic [5:0]  shift;
  logic        word_sof, locked, bitslip;
  int          checks = 0, failures = 0;

  gbt_barrel_shifter u_bs (.clk, .rst, .word_in(raw), .shift, .word_out(aligned));
  gbt_pattern_search dut (.clk, .rst, .word_in(aligned), .shift, .word_out, .word_sof,
                          .locked, .bitslip);

  // ---------------- frame source ----------------
  bit  bits [$];
  int  fno = 0;
  bit  bad [int];

  function automatic void push_frame();
    logic [119:0] f;
    f = {$urandom, $urandom, $urandom, 24'($urandom)};
    f[119:116] = bad.exists(fno) ? 4'b1111 : (($urandom_range(0, 1) != 0) ? HDR_DATA : HDR_IDLE);
    f[115:96]  = 20'(fno);
    for (int i = 119; i >= 0; i--) bits.push_back(f[i]);
    fno++;
  endfunction

  always @(negedge clk) begin
    while (bits.size() < 40) push_frame();
    for (int i = 39; i >= 0; i--) raw[i] = bits.pop_front();
  end

  // ---------------- monitor ----------------
  int   since_slip = 0;       // word clocks since the last bit slip
  int   slips = 0, lock_events = 0, unlock_events = 0;
  logic locked_q = 0;
  logic [119:0] asm_f;
  int   widx = -1;
  int   last_fn = -1;

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      since_slip++;
      if (bitslip) begin slips++; since_slip = 0; end
      if (locked && !locked_q) begin
        lock_events++;
        checks++;
        if (since_slip < 3 * 23) begin
          failures++; $display("locked only %0d words after a bit slip", since_slip);
        end
        last_fn = -1;
      end
      if (!locked && locked_q) unlock_events++;
      locked_q = locked;
      // frame boundary check while locked
      if (word_sof) widx = 0;
      else if (widx >= 0) widx++;
      if (widx >= 0 && widx < 3) asm_f[119 - 40*widx -: 40] = word_out;
      if (widx == 0 && locked) begin
        automatic int fn = int'(word_out[35:16]);
        checks++;
        if (last_fn >= 0 && fn != last_fn + 1) begin
          failures++; $display("frame number %0d after %0d", fn, last_fn);
        end
        last_fn = fn;
      end
    end
  end

  task automatic wait_lock(input int max_words);
    int n = 0;
    while (!locked && n < max_words) begin @(posedge clk); n++; end
    checks++;
    if (!locked) begin failures++; $display("no lock after %0d words", max_words); end
  endtask

  task automatic mark_bad(input int first, input int count, input int spacing);
    for (int i = 0; i < count; i++) bad[first + i * spacing] = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int offs [4] = '{0, 1, 41, 119};
    raw = '0;
    for (int run = 0; run < 6; run++) begin
      automatic int off = (run < 4) ? offs[run] : $urandom_range(0, 119);
      automatic int slips0, unl0;
      rst = 1'b1;
      bits.delete();
      bad.delete();
      for (int i = 0; i < off; i++) bits.push_back(1'($urandom));
      repeat (4) @(posedge clk);
      rst = 1'b0;
      // worst case: 120 positions, two frames each, then 23 good frames
      wait_lock(3 * (2 * 121 + 30));
      repeat (3 * 70) @(posedge clk);
      checks++;
      if (!locked) begin failures++; $display("run %0d: lock not kept", run); end

      // 4 bad headers in 64 frames, twice (second time in a new window): keep lock
      slips0 = slips; unl0 = unlock_events;
      mark_bad(fno + 20, 4, 10);
      repeat (3 * 130) @(posedge clk);
      mark_bad(fno + 20, 4, 15);
      repeat (3 * 130) @(posedge clk);
      checks++;
      if (!locked || unlock_events != unl0) begin
        failures++; $display("run %0d: lost lock with 4 bad headers", run);
      end

      // 5 bad headers in 64 frames: lose lock, then regain it in place
      mark_bad(fno + 20, 5, 12);
      repeat (3 * 90) @(posedge clk);
      checks++;
      if (unlock_events != unl0 + 1) begin
        failures++; $display("run %0d: lock not lost with 5 bad headers", run);
      end
      wait_lock(3 * 40);
      checks++;
      if (slips != slips0) begin
        failures++; $display("run %0d: %0d bit slips while relocking", run, slips - slips0);
      end
    end
    $display("lock events %0d, unlock events %0d, bit slips %0d", lock_events, unlock_events, slips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
