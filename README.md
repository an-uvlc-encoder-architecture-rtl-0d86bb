# UVLC encoder for H.26L

The H.26L test model (TML8) codes almost every syntax element with one
universal variable-length code (UVLC). Every UVLC codeword has the same shape:

```
1
0 x0 1
0 x1 0 x0 1
0 x2 0 x1 0 x0 1
...
```

Each information bit `xi` has a `0` in front of it, and the codeword ends in
a `1`. Symbols are first mapped to a *code number* by table lookups that sit
outside this encoder. The encoder turns each code number into its codeword and
packs the codewords into a stream of 16-bit words.

This RTL implements a small architecture for that encoder, with no tables in
it. One code number goes in per clock and up to 16 bits come out per clock.
There are 55 flip-flops: a 48-bit buffer, a 6-bit length register and an
output-enable bit.

## The key idea: modified code numbers

If a code number is taken from the standard table and **1 is added to it**,
its binary form already contains the codeword:

| table number | modified | binary  | codeword |
|--------------|----------|---------|----------|
| 0            | 1        | `00001` | `1`      |
| 1            | 2        | `00010` | `001`    |
| 2            | 3        | `00011` | `011`    |
| 3            | 4        | `00100` | `00001`  |
| 6            | 7        | `00111` | `01011`  |
| 7            | 8        | `01000` | `0000001`|

Say the leading 1 of the modified number is at bit `p`. Then:

* the codeword length is `2p + 1`;
* the `p` bits below that leading 1 are `x(p-1) .. x0`.

So the tables upstream store `number + 1`, which costs nothing, and the encoder
needs no lookup at all. **The encoder's input is the modified number.** A
modified number of 0 is illegal, and an assertion flags it.

**Headers.** The picture header is a 31-bit UVLC pattern with 15 free
information bits: TR (8 bits), picture QP (5), format (1) and end of sequence
(1). To send one, set bit 15 of the input and put the 15 header bits in bits
14..0. The length is then 31, and the same datapath handles the header. The
encoder does not fix the order of the header fields; the source packs them.

## Datapath

```
code_num ─┬─> first-1 detector ──length──> length accumulator ──oe──────────┐
          │                                  │ shift_ctrl (fill+length)     │
          └─> code splitter ──31b──> barrel shifter (48b) ──> OR ─> DE mux ─> buffer reg ─> out_word
                                                               ^             │
                                                               └── OE mux <──┘
```

| module | role |
|---|---|
| `uvlc_first1_detector` | Priority encoder. Gives length `2p+1` (1..31). |
| `uvlc_code_splitter` | Wiring only. Drops bit 15, puts a 0 in front of each of bits 14..0, and appends a 1. Output is 31 bits. |
| `uvlc_length_accumulator` | Adder and length register. Also does byte alignment and makes `oe`. |
| `uvlc_shifter` | 48-bit barrel shifter in log stages. Moves the codeword to the free end of the buffer. |
| `uvlc_code_mux_output` | OR plane, DE mux, OE mux and the 48-bit buffer register. |
| `uvlc_encoder` | Top level. Wires the five blocks together. |
| `uvlc_pkg` | Default sizes and width functions. |

### The redundant leading 1 and the OR plane

The code splitter does not mask the leading 1 of the number. Its output is the
codeword **with one extra 1 just above it**. For example, number 3 (`011`)
comes out as `1011`.

The shifter places this pattern so that the extra 1 lands on the *last bit
already in the buffer*. That bit is the end bit of the previous codeword, and
it is always 1. The OR plane merges new and old bits, so the extra 1
disappears with no logic spent on it. Example: the buffer holds `001 1 01011`
and `1011` arrives. The result is `001 1 01011 011`.

There are two edge cases:

* **Empty buffer.** The extra 1 falls off the top of the 48-bit shifter.
* **After a byte alignment that added padding.** The last buffer bit is now a
  padding 0, and the OR sets it to 1. The padding then reads `0…01` instead of
  all zeros. This happens only if that bit has not yet left the buffer. The
  design keeps this behaviour on purpose: it is a consequence of the OR-plane
  scheme. A decoder that needs all-zero padding would require a mask here,
  which this design does not have.

### Buffer bookkeeping and timing

Codewords fill the buffer from the MSB downwards. The buffer stays zero below
its valid bits, which is why a plain OR is enough.

The length register (`fill`) counts the valid bits that follow the word now
shown on `out_word`. Each cycle the adder forms `fill + length`. That sum is
where the new codeword ends, and it is also the shifter control.

The byte-align stage then chooses the new count:

* `fill + length` when a symbol arrives;
* `fill` rounded up to a multiple of 8 when `byte_align` is high;
* `fill` unchanged when there is no input.

If the new count is 16 or more, `oe` is set for the next cycle and 16 is
subtracted. In that next cycle the OE mux shifts the buffer left by 16 while
the next codeword is ORed in. As a result, output continues at one word per
cycle even when no symbols arrive.

Timing:

* A symbol given in cycle *t* is in the buffer register at *t+1*.
* A word is flagged by `oe` in the first cycle after its last bit arrived.
* At most one word is flagged per cycle.
* Example: a header, then a 19-bit codeword, then an idle cycle. This gives
  words in three consecutive cycles and leaves 2 bits in the buffer.

### Flow control: the source must throttle

Nothing can stall the source. The buffer holds the flagged word plus `fill`
bits, so every cycle must satisfy `fill + length <= 48`. The `fill` output is
provided so the source can check this. An assertion in
`uvlc_length_accumulator` reports an overflow.

Peak output is 16 bits per clock. One symbol per clock is sustainable only
while the average codeword is at most 16 bits. The 48-bit width gives room for
a 31-bit header behind up to 17 waiting bits.

There is no flush. Bits short of a full word wait for more input. To push them
out, follow them with a byte alignment and enough further codewords.

## Interface (`uvlc_encoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `code_num` is valid this cycle |
| `code_num` | in | 16 | modified code number; bit 15 set means header |
| `byte_align` | in | 1 | pad to a multiple of 8 bits; a symbol in the same cycle is ignored |
| `oe` | out | 1 | `out_word` holds the next 16 stream bits |
| `out_word` | out | 16 | stream bits, the first at bit 15 |
| `fill` | out | 6 | bits waiting behind the flagged word (for throttling) |

Parameters, with defaults in `uvlc_pkg`:

| parameter | default | meaning |
|---|---|---|
| `CODE_W` | 16 | input width; the maximum codeword is `2*CODE_W-1` bits |
| `BUF_W` | 48 | buffer and shifter width |
| `OUT_W` | 16 | output word width |
| `ALIGN` | 8 | byte-alignment granule |

## What comes from the architecture and what is this design's choice

These parts follow the published architecture:

* the modified code numbers;
* the five blocks and how they connect;
* the zero-interleaving splitter with its extra leading 1, absorbed by the OR
  plane;
* the 16-entry length rule;
* the 48-bit buffer and shifter, and 16-bit output words;
* the OR / DE-mux / OE-mux buffer loop;
* byte alignment by rounding the length register up to a multiple of 8;
* header handling through bit 15.

These are this design's own choices:

* The asynchronous active-low reset.
* The `in_valid` strobe and the `fill` output.
* The rule that `byte_align` wins over a symbol in the same cycle.
* Length 1 for an (illegal) zero input.
* The shifter's internals (a log-stage left shift by `48 - (fill+length)`).
* How OE is made. The classic packer uses the adder's carry-out. Codewords
  here can be longer than a word, so OE is the test `count >= 16`, and it is
  registered next to the length register.
* The exact OE threshold. The architecture says "larger than 16", but a
  buffer holding exactly 16 bits already holds a complete word, so OE is
  raised at 16.

Not included: the probability-transform tables that produce the code numbers.
They belong to the video coder, not to this encoder.

The published implementation was about 980 gates in a 0.35 µm library, with a
critical path under 6 ns. This RTL has the same register set. Its gate count
and timing have not been measured here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_uvlc_first1_detector`: every 16-bit input.
* `tb_uvlc_code_splitter`: a worked example (`0x10AF` becomes
  `0000010000000001000100010101011`), the code table, and random inputs
  decoded back.
* `tb_uvlc_shifter`: all end positions against a wide-vector reference.
* `tb_uvlc_length_accumulator`: cycle-accurate counter model, with random
  lengths, idle cycles and alignments.
* `tb_uvlc_code_mux_output`: a bit-array buffer model, plus the OR-plane
  example.
* `tb_uvlc_encoder`: end to end at the default sizes. A bit-level reference
  stream checks every output word and the `oe` timing. The codes 0..8 must
  give the published table. A run of 256 back-to-back 15-bit codewords checks
  the one-symbol-per-clock rate. It then runs 100,000 random cycles with headers, idle
  cycles and byte alignments, throttled to the 48-bit limit. It counts each
  mechanism (header, leading 1 absorbed, leading 1 dropped, padding and no
  padding, padding bit set, word out on an idle cycle, back-to-back words,
  backlog) and fails if any of them never happens.

Running one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_uvlc_encoder \
    rtl/uvlc_pkg.sv tb/tb_uvlc_encoder.sv -o sim && obj_dir/sim
```
