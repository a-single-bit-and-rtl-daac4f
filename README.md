# Parallel single-error-correcting decoder for 16-bit words

A 16-bit message is protected by 6 parity bits, giving a 22-bit code word.
On the receiving side every bit of the word is checked and, if needed,
corrected in the same step: a syndrome generator recomputes the parity check
sums, one small correction unit per code word bit tests whether the syndrome
points at its bit, and an error detector sorts the result into "no error",
"single error corrected" or "uncorrectable error detected". Nothing is
iterated or searched serially, so the decoder is one combinational path of a
few XOR levels plus a 6-bit comparator.

Around this decoder the RTL builds a complete link: encoder, a transmit shift
register that sends the code word one bit per cycle over a serial line, an
injection point for channel errors, a receive shift register and a result
register.

## The code

Code word layout, MSB first:

| bits  | 21 .. 6        | 5 .. 0        |
|-------|----------------|---------------|
| field | message[15:0]  | parity[5:0]   |

Each parity bit is the XOR of a fixed set of message bits:

| parity | message bits XORed                      |
|--------|-----------------------------------------|
| 0      | 15 13 11 10 8 6 4 3 1 0                 |
| 1      | 13 12 10 9 6 5 3 2 0                    |
| 2      | 15 14 10 9 8 7 3 2 1                    |
| 3      | 10 9 8 7 6 5 4                          |
| 4      | 15 14 13 12 11                          |
| 5      | all sixteen                             |

Parity bits 0..4 are the check bits of a shortened Hamming code: place
message bit i at position 3, 5, 6, 7, 9, 10, ..., 15, 17, ..., 21 (the numbers
1..21 that are not powers of two, in order); parity bit k then covers the
message bits whose position has bit k set. Parity bit 5 is the parity of the
message alone. Example: message `1111111111111000` gives parity `111110`, code
word `1111111111111000111110`.

The table lives once, as `CHECK_ROW` in `rtl/bch_pkg.sv`; encoder and syndrome
generator both evaluate it through `check_sums()`.

## Decoding

**Syndrome.** `s = check_sums(received message) XOR received parity`. A valid
code word gives `s = 0`. Because the code is linear, an error pattern gives the
XOR of the parity-check columns of the flipped bits, independent of the
message.

**Columns.** A single error on parity bit k gives `s = 1 << k`. A single error
on message bit i gives `s = {1, Hamming position of i}`, i.e. bit 5 set and a
5-bit value that is 3..21 and not a power of two. These 22 values are all
different and nonzero, so every single error can be located
(`bch_pkg::h_column`).

**Correction units.** `bch_error_corrector` has 22 comparators, one per code
word bit, each asking `s == column(j)`. Their outputs form the error pattern
`e` (one-hot or zero); the output is `v XOR e`, plus the index `j` of the
corrected bit (`err_loc`, with `loc_valid`). Index 21..6 are message bits
15..0, index 5..0 are parity bits 5..0.

**Detector.** `bch_error_detector`: `s == 0` is `ST_NO_ERROR`; `s != 0` with a
matching unit is `ST_CORRECTED`; `s != 0` with no match is `ST_UNCORRECTABLE`,
and the word is passed on uncorrected.

### What the code can and cannot do

Read this before trusting the status output for anything beyond single
errors.

* Every single-bit error in any of the 22 bits is corrected and located.
* Multi-bit errors are not corrected. Six check bits give 64 syndromes;
  correcting all patterns of up to two errors in 22 bits would need 254.
* Multi-bit errors are only partly detected. Parity bit 5 covers the message
  bits but not the other parity bits, so the code is not a full SEC-DED code.
  Counting all patterns:

  | errors | flagged uncorrectable | miscorrected as a single error | invisible (valid code word) |
  |--------|-----------------------|--------------------------------|-----------------------------|
  | 2      | 165 of 231            | 66                             | 0                           |
  | 3      | 986 of 1540           | 532                            | 22                          |
  | 4      | 4684 of 7315          | 2498                           | 133                         |

* Double-adjacent errors are not corrected either, and cannot be added on top
  of this parity table: for example message bits 3 and 2 flipped together give
  syndrome `000001`, the same as a single error on parity bit 0.

Making parity bit 5 the parity of all 21 other bits would turn this into a
proper SEC-DED code (all double errors detected). That changes the code
word. This design keeps the published parity equations instead.

## The link (`bch_codec_top`)

```
in_message -> bch_encoder -> bch_shift_reg (tx) --line--(^chan_flip)--> bch_shift_reg (rx) -> bch_parallel_decoder -> out_* registers
```

A three-state sequencer (idle, shift, decode) runs the transfer:

| cycle after the accepting edge | what happens                                                       |
|--------------------------------|--------------------------------------------------------------------|
| 0 (edge)                       | `in_valid && in_ready`: message encoded, code word loaded into tx  |
| 1 .. 22                        | `shift_active`; in cycle k the line carries code word bit 22-k     |
| 23                             | decode cycle; outputs registered at its closing edge               |
| 24                             | `out_valid` high for one cycle, `in_ready` high again              |

So the latency is 23 clock edges from acceptance to the registered result,
and a new word can start every 24 cycles. `in_ready` is low for the whole
transfer; a message offered meanwhile waits. Results stay on `out_*` until the
next word's decode cycle. Reset is synchronous and active low.

`chan_flip` models the noisy channel. While `shift_active` is high, driving it
high inverts the bit on the line in that cycle. `line_bit` shows the line
after the flip. A testbench flips code word bit j by raising `chan_flip` in
shift cycle 22-j.

Outputs: `out_message` (corrected message), `out_status` (`status_e`),
`out_err_loc`/`out_loc_valid`, `out_syndrome`, and `out_rx_word` (the word as
received, before correction).

The serial transfer, the handshake and the sequencer are choices of this
design. Only the chain itself (encoder, shift register, parity check
equations, correction) and the code are specified for it. The decoder is
fully parallel and does not depend on the serial link. To decode words that
arrive in parallel, use `bch_parallel_decoder` on its own.

## Modules

| file                         | contents                                                        |
|------------------------------|-----------------------------------------------------------------|
| `rtl/bch_pkg.sv`             | sizes (K=16, R=6, N=22), types, `status_e`, check-sum table, `check_sums()`, `h_column()` |
| `rtl/bch_encoder.sv`         | combinational encoder                                           |
| `rtl/bch_syndrome_gen.sv`    | combinational syndrome generator                                |
| `rtl/bch_error_corrector.sv` | 22 correction units, error pattern, corrected word, location    |
| `rtl/bch_error_detector.sv`  | status classification                                           |
| `rtl/bch_parallel_decoder.sv`| the three decoder parts wired together                          |
| `rtl/bch_shift_reg.sv`       | W-bit shift register, parallel load, MSB-first serial out       |
| `rtl/bch_codec_top.sv`       | the complete link                                               |

The sizes are fixed by the code. `K`, `R` and `N` are package constants,
not module parameters, because the check-sum table only fits them. The shift
register's width `W` is a parameter (default 22).

## Verification

Every module has a self-checking testbench in `tb/`. They all use
`tb/bch_ref_pkg.sv`, a reference model written a different way. It encodes
from the Hamming bit positions rather than from the RTL's table. It decodes by
brute force: a word is correctable when exactly one single-bit flip makes it
a code word.

| testbench                    | what it covers                                                              |
|------------------------------|-----------------------------------------------------------------------------|
| `tb_bch_encoder`             | the example word above; all 65536 messages                                  |
| `tb_bch_syndrome_gen`        | clean words; every single flip; 4000 words with 1–4 random flips (expected syndrome by linearity) |
| `tb_bch_error_corrector`     | all 64 syndromes on random words                                            |
| `tb_bch_error_detector`      | all 64 syndromes, with and without a matching unit                          |
| `tb_bch_parallel_decoder`    | received `1111111111110000` + parity `111110` corrected to `1111111111111000`, location 9; all 22 single errors on 100 words; 3000 words with 2–4 errors against the brute-force decoder |
| `tb_bch_shift_reg`           | load, hold, load-over-shift priority, serial out MSB first, serial in, reset |
| `tb_bch_codec_top`           | 600 transfers at the default size. Checks the line bit order, the 23-edge latency, the one-cycle `out_valid` and every output against the reference. Requires at least one of each: clean word, corrected message bit, corrected parity bit, uncorrectable word, input held off while busy, back-to-back words, idle gaps |

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/bch_pkg.sv tb/bch_ref_pkg.sv tb/tb_bch_codec_top.sv --top-module tb_bch_codec_top
./obj_dir/Vtb_bch_codec_top
```

The top carries SystemVerilog assertions: `out_valid` is a single-cycle
pulse, the input is never ready during a transfer, and the bit counter stays
in range.

## Departures and open points

* Only single-error correction is implemented. Correction of double,
  double-adjacent, three- and four-bit errors was the stated goal, but as shown
  above six check bits cannot provide it.
* The syndrome is the standard one for the given parity equations: each
  check sum recomputed and XORed with its received parity bit. Syndrome
  equations that check only part of the code word cannot locate every single
  error and are not used.
* Channel model, serial link, handshake, reset style, status and location
  encodings are this design's own.
* No clock rate or power figures are claimed. The decoder's critical path is
  one 17-input XOR tree (parity bit 5 and its received value), a 6-bit compare and a 22-way OR for the location and
  status logic.
