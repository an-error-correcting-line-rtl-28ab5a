# Error-correcting line code for a radiation-hard multi-gigabit optical link

This is synthesizable SystemVerilog for a line code. The code carries 64 user bits
in an 88-bit frame over a serial optical link, one frame per 25 ns LHC bunch
crossing, which is 3.52 Gb/s. It targets links inside particle detectors. There, the
dominant error source is an ionizing particle hitting the receiving photodiode,
which flips one bit, or two adjacent bits if the hit spans two bit periods. The
code must therefore do four things:

* keep the line DC-balanced and rich in transitions, for AC coupling and clock
  recovery;
* let the receiver find frame boundaries without a special sync sequence;
* correct any single upset per frame, even one spread over two bits;
* spend only a couple of frame times on encoding and decoding, because trigger
  information rides on the link.

The code does this by chaining three steps, in this order:

1. **Scrambling.** The 64 user bits pass through a self-synchronizing scrambler
   of order 63.
2. **Reed–Solomon coding.** The scrambled word is split into two 32-bit blocks.
   Each block is encoded with a single-error-correcting Reed–Solomon code over
   GF(16): RS(15,13) shortened to RS(10,8), which adds two 4-bit parity symbols.
   The 20 symbols of the two codewords are interleaved.
3. **Header.** An 8-bit DC-balanced header is put in front. It marks the frame
   as data or idle and is recognised even with two flipped bits.

The order matters. Scrambling comes before the RS code so that the descrambler
cannot multiply line errors before the RS decoder has corrected them. The RS code
is systematic, so the scrambled data bits go on the line unchanged and stay
balanced, and the parity symbols computed from random-looking data are
random-looking too.

```
 frame on the line, first bit first (88 bits):

 | header (8) | A9 B9 A8 B8 A7 B7 ... A1 B1 A0 B0 |   each Ai, Bi = 4-bit symbol
              |<------- 80-bit RS field -------->|
 A = codeword of scrambled bits [63:32] + 2 parity symbols (A1, A0)
 B = codeword of scrambled bits [31:0]  + 2 parity symbols (B1, B0)
```

| quantity | value |
|---|---|
| user bits per frame | 64 |
| RS symbol width, field | 4 bits, GF(16), x^4 + x + 1 |
| RS blocks per frame, code | 2, RS(10,8) shortened from RS(15,13) |
| header | 8 bits: data `0111_0100`, idle `1000_1011` |
| frame length | 88 bits (efficiency 72.7 %) |
| line rate at 40 MHz frames | 3.52 Gb/s |

## How an upset is corrected

Symbols of the two codewords alternate on the line. Two adjacent bits either
fall in the same symbol or in two neighbouring symbols, and neighbouring symbols
belong to different codewords. Either way each codeword sees at most one bad
symbol, and a t = 1 RS code corrects it. A hit in the header is absorbed by the
header's tolerance, because the two patterns are 8 bits apart and up to 2 flipped
bits are accepted.

The decoder (`rs_decoder`) computes the syndromes S1 = r(α) and S2 = r(α²),
where the generator is g(x) = (x+α)(x+α²). A single error of value e at
position i gives S1 = e·α^i and S2 = e·α^(2i). The decoder therefore takes the
locator X = S2/S1, its logarithm as the position, and e = S1/X as the value.
Inversion and logarithm are small lookup functions. The code is shortened, so
positions 10–14 are known zeros. A locator that points there shows that more
than one symbol is wrong, and so does a case where exactly one syndrome is zero.
Such a block is flagged `uncorrectable` and passed through unchanged. This is
the extra error detection that zero padding buys.

Two independent bit errors in one frame are corrected when they fall in
different codewords, in one symbol, or partly in the header. For this layout
that is 62.4 % of random double errors. The count is 1 − (80·79)/(88·87) ×
1440/3160: both bits land in the RS field in 80·79 of the 88·87 ordered pairs,
and 1440 of the 3160 pairs in that field hit one codeword in two different
symbols. `tb_wl_double_errors` measures 62.6 %.

When a frame cannot be corrected, the damage carries into the next frame. The
descrambler uses the last 63 received bits, so the first 63 bits of the
following frame are descrambled with bad history. After that the receiver is
clean again, with no resynchronization step.

## Scrambler

`scrambler` computes S[k] = D[k] ⊕ S[k−5] ⊕ S[k−63]. This is the recursion of
the primitive trinomial x^63 + x^58 + 1. `descrambler` inverts it with
D[k] = S[k] ⊕ S[k−5] ⊕ S[k−63], a pure function of received bits, so it locks
on by itself after 63 bits. A single line error becomes at most three user-bit
errors, at k, k+5 and k+63. Both blocks handle a whole 64-bit word per clock.
Bit 0 is the earliest bit in scrambler order, and the recursion inside one word
is unrolled combinationally.

Two choices here were made to keep the line balanced for any traffic:

* **Tap position.** Taps at 62 and 63 were tried first. With all-zero or idle
  input they left about 5 % baseline wander for millions of bits. Taps at 5 and
  63 give the same wander as random data (see *Measured line properties*).
* **Reset seed.** The reset value `SEED` alternates bits. An all-zero history is
  a fixed point for all-zero input (idle frames), and an all-one history is a
  fixed point for all-one input.

Like any multiplicative scrambler, it can still be pushed into a constant output
by data built for the purpose: the user data would have to equal the scrambler's
own feedback for 63 bits.

## Frame synchronization

`frame_sync` shifts the serial input into an 88-bit window and runs a
three-state machine:

* **HUNT**: tests the header field on every clock, which slides the boundary by
  one bit per clock, and waits for an *exact* header pattern.
* **VERIFY**: tests once per frame. `LOCK_N` = 4 exact headers in a row give
  lock. Any other header returns to HUNT.
* **LOCKED**: uses the tolerant match, with up to `HDR_TOL` = 2 flipped bits.
  `UNLOCK_N` = 4 invalid headers in a row drop back to HUNT.

The header patterns were chosen so that a copy shifted by one or two bits
differs from both patterns in at least 3 of its known bits. A receiver that has
slipped a bit therefore sees invalid headers and relocks, instead of reading
shifted data headers as tolerable idle headers.

## Blocks and timing

Each clock cycle is one line bit, and a frame is 88 clocks.

| module | role |
|---|---|
| `linecode_pkg` | sizes, header patterns, `hdr_kind_t`, GF(16) functions, interleave and deinterleave |
| `byte_loader` | byte-wide user input with valid/ready; holds one pending word while the next is gathered |
| `scrambler` / `descrambler` | 64-bit parallel, order 63, self-synchronizing |
| `rs_encoder` | two parity symbols, an unrolled division shift register |
| `rs_decoder` | syndromes, locator, value, zero-padding check |
| `serializer` | 88-bit parallel to serial, MSB (header) first |
| `header_detect` | data / idle / invalid with 2-bit tolerance, plus exact match |
| `frame_sync` | serial to parallel and frame lock |
| `byte_unloader` | decoded word out as 8 bytes on consecutive clocks |
| `line_encoder` | byte_loader → scrambler → 2× rs_encoder → interleave + header → serializer |
| `line_decoder` | frame_sync → deinterleave → 2× rs_decoder → register → descrambler → byte_unloader |
| `gbt_linecode_top` | encoder and decoder side by side, each with its own line port |

**Encoder.** On the last clock of each frame, the encoder takes the pending
word. If no word is complete, it uses all zeros and an idle header. The word is
encoded combinationally and loaded into the serializer. The 88 bits leave on the
next 88 clocks, with `tx_sof` on the header's first bit, so encoding takes one
frame time. Idle frames still advance the scrambler, which keeps the receiver's
descrambler in step.

**Decoder.** A frame is decoded on the clock after its last bit arrives and is
registered. Its first byte appears one clock later. From the first line bit of a
frame to its last output byte takes 98 clocks, within two frame times (176).
Only data frames received while locked produce bytes. The `corrected`,
`uncorrectable` and `hdr_error` outputs pulse once per affected frame.

**Test modes.** `scr_bypass` and `rs_bypass` switch off scrambling and RS
coding. In RS bypass the parity symbols are sent as zeros and nothing is
corrected. Both link ends must use the same setting, and it should only be
changed under reset.

## Measured line properties

`tb_wl_line_stats` runs 5,000,000-bit streams of random data, all-zero words,
all-one words and idle frames through the encoder. It models the receiver's AC
coupling as a first-order 100 kHz high-pass filter at 3.52 Gb/s. For every
stream:

* baseline wander: sigma 0.44–0.46 % of the signal amplitude, mean within
  0.05 %;
* ones: 50.0 % of all bits;
* run length: 1.98 bits on average, at most about 30 bits.

The code's structure alone bounds the longest run to one RS field plus parts of
the header.

## What this RTL does not include

* **The second coding option.** That option uses 3-bit symbols, four RS(7,5)
  blocks, a 6-bit header and a 90-bit frame. It corrects 81 % of double errors
  at lower efficiency. Only the 88-bit option is built, and its sizes are fixed
  in `linecode_pkg`.
* **A trigger-data frame type.** Only data and idle headers exist.
* **Analog parts of the link.** The laser driver, laser, photodiode, amplifier
  and clock-and-data recovery are not included. The decoder expects bits that
  are already recovered and synchronous to its clock.
* **A two-clock structure.** A real chip would run a 40 MHz frame clock and a
  fast serializer clock. Here one clock runs at the bit rate with a modulo-88
  counter.
* **Radiation hardening of the logic itself.** There is no triple modular
  redundancy.

The following are this implementation's own choices, not fixed by the
underlying scheme:

* the field polynomial, the generator roots α and α², and the scrambler taps
  and seed;
* the header patterns, the tolerance and the lock and unlock counts;
* the interleaving order and the header position;
* the byte handshake and the byte order;
* the idle payload, which is scrambled zeros.

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The reference models in `tb/tb_ref_pkg.sv` are
written independently of the RTL:

* GF(16) arithmetic from log tables;
* RS parity found by exhaustive search for zero syndromes;
* a bit-serial scrambler;
* frame assembly from a list of symbols.

To build and run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv --top-module tb_gbt_linecode_top \
    rtl/linecode_pkg.sv tb/tb_ref_pkg.sv tb/tb_gbt_linecode_top.sv
./obj_dir/Vtb_gbt_linecode_top
```

The packages go first on the command line. Verilator finds every other module
through `-y` by its file name.

The block testbenches are `tb_<module>`. Three testbenches go beyond single
blocks:

* `tb_gbt_linecode_top` is the end-to-end test at full size. It loops the
  encoder into the decoder through a channel that injects errors. It makes every
  mechanism happen and counts it:
  * lock, idle frames and input back-pressure;
  * 1-bit and 2-bit corrections;
  * uncorrectable double errors;
  * tolerated header upsets;
  * lock loss and relock;
  * both bypass modes.
* `tb_wl_double_errors` measures the double-error correction rate.
* `tb_wl_line_stats` takes about 15 s and measures wander and run length.
