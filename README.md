# GBT link endpoints for FPGAs

The GBT protocol carries timing, trigger, data-acquisition and slow-control
traffic over one bidirectional 4.8 Gb/s optical link between radiation-hard
front-end electronics and the counting room. Every 25 ns (one 40 MHz bunch
crossing) it sends a 120-bit frame: a 4-bit header, 84 bits of user payload
and 32 bits of Reed-Solomon parity. The FPGA transceivers at the
counting-room end serialize words but know neither the GBT line code nor how
to find the frame boundary. Everything between the transceiver's parallel
words and the user's 84 bits is therefore done in FPGA logic:

* scrambling for DC balance,
* interleaved Reed-Solomon encoding and decoding,
* frame alignment by searching for the header.

This repository has that logic in synthesizable SystemVerilog. It also has a
test-pattern generator with matching error counters, and a variant in which
three links share one RS decoder to save logic.

## The frame

| line order | field | bits | contents |
|---|---|---|---|
| first | H | 4 | header: `0101` data, `0110` idle (not scrambled) |
| | SC | 4 | slow control: 2 bits for link control, 2 user bits (scrambled) |
| | D | 80 | user data (scrambled) |
| last | FEC | 32 | Reed-Solomon parity |

User bandwidth is 82 bits per 25 ns (D plus the 2 user SC bits). The
link-control use of the other 2 SC bits is not defined here: all 4 SC bits are
passed between `tx_sc` and `rx_sc` unchanged. In the
120-bit vector `frame[119:0]`, bit 119 is sent first. The transceiver word is
40 bits at 120 MHz, three words per frame, and word 0 is `frame[119:80]`.

How the 88 protected bits become a frame:

1. `{SC, D}` (84 bits) is split into four 21-bit lanes. Each lane goes
   through its own scrambler.
2. `{H, scrambled[83:44]}` forms message A and `scrambled[43:0]` forms
   message B, each 44 bits = 11 four-bit symbols.
3. Each message is encoded into a systematic RS(15,11) codeword of 60 bits:
   11 message symbols followed by 4 parity symbols.
4. The two codewords are interleaved nibble by nibble, A first:
   A14 B14 A13 B13 … A0 B0. Frame nibble 29 (bits 119:116) is A14, which is
   the header, so the header sits at the start of the frame on the line.

## Frame alignment (the receiver's hard part)

The deserializer delivers 40-bit words at an unknown bit offset from the
frame, and the frame spans three words. So the receiver has to find both:

* the bit offset within a word (0..39), and
* which of three consecutive words starts a frame.

That gives 120 candidate positions. Two blocks search them together:

* `gbt_barrel_shifter` keeps the previous raw word. It outputs a 40-bit
  window of the stream `{prev, cur}` starting `shift` bits into `prev`.
* `gbt_pattern_search` counts word slots 0, 1, 2. On slot 0 it checks the
  top four bits of the aligned word against the two valid headers.

The lock state machine has two states.

**OUT_OF_LOCK (acquisition)**

* A valid header increments a run counter. 23 valid headers in a row
  (`LOCK_FRAMES`) give lock.
* An invalid header clears the counter and makes a bit slip: `shift` goes up
  by one, which moves the candidate boundary one bit later.
* When `shift` wraps from 39 to 0, the slot counter also stays on the same
  value for one word. Without this, the wrap would move the boundary back
  by 39 bits instead of forward by one. With it, successive slips walk
  through all 120 positions in order.
* After a slip, the next header check is skipped, because the new shift is
  not yet at the barrel shifter's output.
* Worst case: about 2 × 120 frames of search plus 23 frames of confirmation.
  That is 6–7 µs at 40 MHz.

Random payload bits match a valid header often, so a single good header
means nothing. The 23-frame rule makes a false lock negligible.

**IN_LOCK (tracking)**

* Single corrupted headers are tolerated. The header is inside the RS
  codeword, so the decoder repairs it like any other symbol.
* The first invalid header opens a window of 64 frames (`WINDOW_FRAMES`),
  counting itself.
* If more than 4 invalid headers (`BAD_LIMIT`) fall inside the window, lock
  is dropped and acquisition restarts from the current position. No slip is
  made until a header actually fails.
* Otherwise the window closes after 64 frames and the count starts again.

One reading of the unlock rule says "four invalid headers within 64 frames"
rather than "more than four". Setting `BAD_LIMIT = 3` gives that behaviour.

## Forward error correction

Each codeword is RS(15,11) over GF(16). This design uses:

* field polynomial x⁴ + x + 1;
* generator g(x) = (x+α)(x+α²)(x+α³)(x+α⁴) = x⁴ + α¹³x³ + α⁶x² + α³x + α¹⁰.

The code corrects any two wrong symbols per codeword. With interleaving, up
to four wrong nibbles per frame are corrected, alternating between the two
codewords. How that translates into bursts of wrong bits on the line:

* a burst of 16 bits that starts on a nibble boundary is always corrected;
* a 16-bit burst at another offset touches five nibbles, three of them in
  one codeword, and may not be corrected;
* at any offset, bursts of up to 13 bits are always corrected.

The encoder (`rs_encoder_15_11`) is an unrolled LFSR division and is purely
combinational.

The decoder (`rs_decoder_15_11`) is also one combinational cone:

1. It computes the syndromes S1..S4.
2. It solves the error locator directly for up to two errors:
   * if D = S1·S3 + S2² ≠ 0, it assumes two errors;
   * otherwise it assumes one error, with σ1 = S2/S1.
3. A Chien search checks all 15 positions for roots of the locator.
4. Forney's formula gives each error value as (S1 + (S2 + S1σ1)·α⁻ⁱ)/σ1.

If the number of roots found does not match the number of errors assumed,
the decoder raises `uncorrectable` and passes the word through unchanged.
Three or more errors can still be miscorrected, as with any distance-5 code.

`gbt_rs_decoder` registers the result (one frame clock of latency) and
reports `corrected` and `uncorrectable` per frame. It is the largest block,
at roughly two thirds of the cells of a whole link.

## Scrambler

Each 21-bit lane is a self-synchronising scrambler with the rule
s[n] = d[n] ⊕ s[n−19] ⊕ s[n−21]. Bit j of a lane word is element 21t + j of
the lane's stream. All 21 bits are computed in one frame clock; bits 19 and
20 depend on bits 0 and 1 of the same frame.

The descrambler applies the same taps to the received scrambled bits. It
needs no reset shared with the transmitter, and is correct from the second
consecutive valid frame. A frame that follows a gap is marked not valid
rather than delivered wrong.

## Clocks and crossings

There are two clocks, from one PLL, phase aligned, with an exact 3:1 ratio:

* `clk_frame` at 40 MHz;
* `clk_word` at 120 MHz.

Transmit side (`gbt_tx_gearbox`):

* The frame domain registers the frame and flips a toggle.
* The word domain sees the toggle on its next edge and copies the whole frame
  into its own shift register.
* It then sends the three words. Word 0 leaves one word clock after the
  frame edge.

Receive side (`gbt_rx_gearbox`):

* The word domain gathers three words, starting at the slot-0 word, into one
  of two frame buffers, alternately.
* It flips a flag naming the buffer just written.
* The frame domain double-registers the flag and reads the named buffer.
* A buffer is always read before it is written again.

These handovers rely on the clock relationship. They are not meant for
unrelated clocks.

## Sharing one decoder among three links

Because the decoder dominates the area, several links can share one.
`gbt_shared_rs_decoder` does this for three links:

* It registers the three links' codewords at the frame clock.
* It feeds them through one decoder pair in three consecutive 120 MHz cycles
  (the x3 multiplexer).
* It writes each result into that link's slot (the x3 demultiplexer).
* It copies all three results to a hold register at the start of the next
  frame.

The cost is one extra frame clock of latency (two in total) and the mux/demux
registers. The decoder must close timing at 120 MHz, against 40 MHz when it is
not shared. In `gbt_fpga_top`, set `SHARED_DECODER = 1` with `NUM_LINKS` a
multiple of 3.

## Test generator and error counters

`gbt_pattern_gen` sends 80-bit words, one per frame, in one of two modes:

* constant: a fixed word;
* flying bit: a single one that moves up one bit per frame and wraps from
  bit 79 to bit 0.

`gbt_error_checker` counts checked words, words in error and wrong bits:

* in constant mode it compares each word with the constant;
* in flying-bit mode it compares each word with the previous received word
  rotated by one bit, so it needs no knowledge of the link latency.

Words that are in flight when the mode changes are counted as errors.

## Top level: `gbt_fpga_top`

Parameters:

* `NUM_LINKS` (default 1);
* `SHARED_DECODER` (default 0).

Per link, the ports are unpacked arrays of size `NUM_LINKS`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk_frame`, `clk_word`, `rst` | in | 1 | 40 MHz, 120 MHz, synchronous reset (hold ≥ 2 frame clocks) |
| `use_generator`, `gen_mode`, `gen_const` | in | 1, 1, 80 | send the test pattern instead of user data |
| `tx_data`, `tx_sc`, `tx_idle` | in | 80, 4, 1 | user D, SC, and a request for the idle header; sampled every frame clock |
| `tx_word` | out | 40 | to the transceiver's serializer, 120 MHz |
| `rx_word` | in | 40 | from the deserializer, 120 MHz, any bit offset |
| `rx_hdr`, `rx_sc`, `rx_data`, `rx_valid` | out | 4, 4, 80, 1 | received frame |
| `rx_locked`, `rx_bitslip` | out | 1 | frame-lock status, bit-slip pulse |
| `rx_corrected`, `rx_uncorrectable` | out | 1 | FEC status of the frame |
| `words_checked`, `word_errors`, `bit_errors` | out | 32 | error counters |

The transmitter sends a frame every frame clock. In loopback with no line
delay, user data comes back about 8 frame clocks later (measured), and one
frame clock later still with the shared decoder.

## What is fixed by the protocol and what is chosen here

Taken from the protocol:

* the 120-bit frame and its field sizes;
* four 21-bit scramblers;
* two interleaved RS(15,11) codes with 4-bit symbols;
* 40-bit words at 120 MHz;
* the lock rules: 23 good headers to lock, invalid headers counted over 64
  frames, limit 4;
* the header pattern `0101`;
* the x3 decoder sharing;
* the constant and flying-bit test patterns.

Chosen here, where no source fixed them:

* the scrambler polynomial and bit order;
* the GF(16) field and generator polynomial;
* the nibble interleaving order and how the 88 bits split into the two
  messages;
* the idle header `0110`;
* how the bit slip walks the 120 positions, and the skipped check after a
  slip;
* the clock-crossing schemes;
* the decoder algorithm and its status flags;
* the exact flying-bit pattern;
* the descrambler's handling of gaps.

Because of these choices, the design interoperates with itself. It will only
interoperate with a real GBT chip if those choices match that chip's line
code.

Not included:

* the transceiver's serializer, deserializer and PLLs, which are vendor hard
  blocks;
* the optical module;
* the front-end GBT chip;
* the hard word aligner that some devices cannot bypass. The pattern search
  here does all of the alignment.

## Simulation

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog. Build and run one
with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/gbt_pkg.sv tb/tb_gbt_fpga_top.sv --top-module tb_gbt_fpga_top
obj_dir/Vtb_gbt_fpga_top
```

The testbenches:

* `tb_gbt_fpga_top` runs one link end to end at its default parameters,
  with a channel model that delays the bit stream by a random offset and can
  flip bits. It covers:
  * lock acquisition through bit slips;
  * constant and flying-bit patterns;
  * 47 correctable bursts;
  * loss of lock on a run of bad headers, and relock;
  * user data with data and idle headers at a constant latency.
* `tb_gbt_fpga_top_shared` runs twelve links with one shared decoder per
  three.
* `tb_rs_ref_pkg` is an independent table-based GF(16)/RS reference used by
  the FEC testbenches.
* The other testbenches exercise one block each:
  * `tb_gbt_pattern_search` covers several offsets, and lock kept or lost
    for 4 or 5 bad headers in 64 frames;
  * `tb_gbt_rs_decoder` covers 0–2 symbol errors per codeword, aligned
    16-bit bursts and 13-bit bursts.

Simulations use a 24 ns / 8 ns clock pair (not 25 / 8.33 ns) so that the
edges coincide exactly.

## Files

* `rtl/gbt_pkg.sv` — frame sizes, header codes, GF(16) helpers.
* Transmit path: `gbt_scrambler`, `rs_encoder_15_11`, `gbt_rs_encoder`,
  `gbt_interleaver`, `gbt_tx_gearbox`.
* Receive path: `gbt_barrel_shifter`, `gbt_pattern_search`, `gbt_rx_gearbox`,
  `gbt_deinterleaver`, `rs_decoder_15_11`, `gbt_rs_decoder`,
  `gbt_shared_rs_decoder`, `gbt_descrambler`.
* Test logic: `gbt_pattern_gen`, `gbt_error_checker`.
* Top: `gbt_fpga_top`.
