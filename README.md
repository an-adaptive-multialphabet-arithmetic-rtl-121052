# Adaptive multialphabet arithmetic codec with a weighted history model

This is a lossless entropy coder for byte-wide video data: quantizer indices,
pixels and similar. It codes each 8-bit symbol with an arithmetic code over a
256-symbol alphabet, and it adapts to the data as it goes. Two ideas keep the
hardware small and fast.

- **Weighted history model.** Symbol probabilities are not kept as ever-growing
  counts. They come from the last M symbols only, each counted with a weight W
  that is a power of two. The model total is fixed at `256 + M·W`, itself a
  power of two, so the coder needs no divider. A model update touches only two
  symbols: the one entering the history and the one leaving it.
- **Multibase cumulative occurrence array.** A 256-symbol adaptive model
  normally needs 256 cumulative counters that all change together, and 256
  comparators to decode. The array splits the alphabet into 16 banks. One
  update then changes one "base" counter per bank plus one bank's worth of
  differences. Decoding is a two-level search with 30 comparators instead of 256.

The coder is a multiplication-free arithmetic code in the style of Rissanen and
Mohiuddin. The range register A is kept near 1.0, so a width of
`probability × A` is approximated by a shift of the model's frequency count.
The leftover range goes to one chosen "last" symbol.

The top level, `ac_top`, holds two complete codecs (encoder and decoder each)
side by side:

| codec   | alphabet | model                           | M   | W  | total | rate                        |
|---------|----------|---------------------------------|-----|----|-------|-----------------------------|
| `big`   | 256      | banked array, 16 banks × 16     | 112 | 16 | 2048  | 1 symbol / 2 cycles per path |
| `small` | 16       | one up/down counter per symbol  | 127 | 16 | 2048  | 1 symbol / cycle per path    |

The 256-symbol codec is the main design. The 16-symbol codec is the simple
direct form of the same model, which is practical only for small alphabets.

## Symbol frequencies from a weighted history

Let `O(x)` be how often symbol x occurs among the M most recent symbols. The
model gives x the frequency

    n(x) = O(x)·W + 1          out of          N = NSYM + M·W

The `+1` ensures that a symbol absent from the history can still be coded. The
cumulative frequency, the sum of `n(y)` over all `y < x`, splits the same way:

    Q(x) = cum(x)·W + x,       cum(x) = number of history entries below x

W is a power of two, so the low `log2 W` bits of Q are simply the symbol index
and never change. Only `cum(x)` must be stored, and it never exceeds M: 7 bits
for M = 112. In this design the counters hold `cum(x)` and the symbol index is
appended as wires.

When a symbol enters the history, the oldest one leaves. Only these two
symbols' occurrences change: the new one by +1, the old one by −1. Every
`cum(x)` above each of them changes by the same step. If both are the same
symbol, nothing changes.

`hist_buf` is the history: a shift register of M symbols whose last entry is
the symbol about to leave. At reset, and on `clear`, it holds an evenly spread
sequence. Entry i holds `floor(i·NSYM/M)`. The counters start at the counts of
that sequence, so the model starts at a near-uniform distribution.

## The multibase cumulative occurrence array (`mbca`)

This is the hardest part of the design and the reason a 256-symbol adaptive
model fits in hardware.

**Layout.** Symbol x = `{b, j}` with b = bank (upper 4 bits) and j = offset
(lower 4 bits). Each bank keeps:

- a *base*: `cum(16·b)`, the cumulative occurrence of its first symbol, in an
  up/down counter;
- 15 *differences*: `cum(16·b + j) − base` for j = 1..15. They are stored in
  one wide word per bank, which could be a RAM row.

`cum(x)` is the bank's base plus the difference for offset j; the difference
for j = 0 is zero. Each read port therefore has one adder.

**Update (one clock).** If symbol `{b, j}` gains or loses one occurrence, every
`cum(x)` for x above it changes by one. With the base/difference split:

- every base of a bank *above* b changes. One 4-to-16 decoder forms that
  "banks above b" mask, and those 0–15 base counters count in parallel;
- inside bank b only the differences for offsets *above* j change. A second
  4-to-16 decoder forms that mask. The bank's word is read, up to 15
  difference counters update, and the word is written back;
- no other bank's differences change, because they are relative to their own
  base.

So one update touches at most 15 base counters and 15 difference counters, not 256
counters. All counters and differences are `CNT_W` = 7 bits wide.

**Search (decoder).** The decoder needs the largest x with `Q(x) ≤ T`:

1. 16 comparators test `Q(16·b) ≤ T` for every bank base. The highest bank
   that passes is the bank.
2. 15 comparators test `Q({b, j}) ≤ T` inside that bank. The highest offset
   that passes is the symbol.

The two levels are combinational in series. They use 30 comparators, against
256 for a flat search. Bank 0's base is always 0, and offset 0 of a bank is
its base, so neither needs a comparator.

**Ordering.** In the original formulation the counters count occurrences of symbols *above* x.
Here they count the symbols *below* x, so Q rises with the symbol index. The
two are mirror images of the same structure: reverse the alphabet and one
becomes the other. Read ports: `a_*` and `b_*` give Q and n of a symbol for
the encoder, the decoder and the last symbol; `c_*` gives an occurrence count
for the last-symbol tracker.

## Two updates per coded symbol (`whm_model`)

A coded symbol changes two occurrences, and the array changes one per clock.
The model therefore takes two cycles per symbol:

| cycle | array operation                         | `busy` |
|-------|-----------------------------------------|--------|
| 1     | leaving symbol (history tail): −1       | 0      |
| 2     | new symbol: +1                          | 1      |

Taking the −1 first keeps every count in 0..M. The history shift and the
last-symbol update happen in cycle 1. The coder has already used the model's
values for the new symbol within cycle 1, before either change. `busy` holds
the encoder or decoder for cycle 2. This is why the 256-symbol codec runs at
one symbol per 2 cycles.

`whm_direct`, the 16-symbol model, has one up/down counter per symbol. When
the new symbol `cur` differs from the leaving symbol `prev`, the counters
from just above the lower of the two up to and including the higher change by
one in a single clock. They count down if `cur` is the higher symbol and up
if it is the lower. It therefore needs no second cycle and runs at one
symbol per cycle. This is the direct structure the banked array replaces:
fine for tens of symbols, too costly for 256.

## The coder: arithmetic with shifts

Numbers are fixed point with 1.0 = `16'h8000`. The range A is kept in
[0.75, 1.5), that is `16'h6000 ≤ A < 16'hC000`. The model total N = 2^11 is
mapped onto the range by a shift instead of a multiply:

    sh = 4  if A ≥ 1.0   (N·2^sh = 1.0)
    sh = 3  if A < 1.0   (N·2^sh = 0.5)
    E  = A − N·2^sh      (leftover range, ≥ 0)

E is what the shift approximation leaves over. It is given in full to one
symbol, the *last symbol* m. For the coded symbol x:

| case   | C (code) increases by | new A              |
|--------|-----------------------|--------------------|
| x < m  | `Q(x)·2^sh`           | `n(x)·2^sh`        |
| x = m  | `Q(m)·2^sh`           | `n(m)·2^sh + E`    |
| x > m  | `Q(x)·2^sh + E`       | `n(x)·2^sh`        |

Symbols keep their natural order. Those above m are shifted up by E, so the
intervals still tile [C, C + A) exactly and decoding is exact. The shift's error
E, up to a third of A, lands on m. If m is the most
frequent symbol, little is wasted. That is why the design works to keep the
largest-count symbol as m.

The shift choice, the leftover rule and keeping m in its natural position are
this design's reading of the multiplication-free code. They are exact and
fully tested (encode, then decode), but the compression is not guaranteed to
match the original coder bit for bit.

### The last symbol (`mps_tracker`)

`mps_tracker` stands in for the "dynamic lookup table". At each model update it
computes the new symbol's count after the update and the current m's count
after the update. If the new symbol now occurs more often, it becomes m. This
follows the maximum without scanning all 256 counts. It can lag: when m's own
count falls because it leaves the history, m is not replaced until some
symbol overtakes it. Only compression suffers. Encoder and decoder run the
same rule on the same data, so they always agree on m.

## Renormalization (`renorm`, `arb_chain`)

After a step the new A is one symbol's width, often far below 0.75. The
renormalizer shifts A and C left together by

    s = (leading zeros of A) − (bit just below A's leading one)

This first puts the leading one at the top (A' in [1, 2)). It then backs off
one place if the next bit is 1, which brings A into [0.75, 1.5). The leading
one is found by `arb_chain`, a ripple chain in the style of a bus arbiter. Each
cell passes a "taken" signal down from the MSB and grants the first set bit.
The one-hot grant gives s. C shifts by the same s. The bits leaving C's top are
the code bits (encoder). In the decoder, bits from the code stream enter C's
bottom (`fill`).

## Encoder registers and the code stream (`ac_encoder`, `bit_packer`)

C is 64 bits: 16 low bits with a 16-bit adder, and a 48-bit *guard register*
above them. The guard is a counter whose only input is the adder's carry. A
carry therefore never ripples through a 64-bit adder. It is absorbed by the
counter, long before its bits leave the register.

The first 48 bits that leave C are always zero, because C starts at 0 and its
top bits count only carries. The encoder skips them. If a carry ever reached
past all 48 guard bits, the sticky output `enc_carry_lost` would rise. Bit
stuffing for that case is not built. With 48 guard bits it needs a run of 48
one-bits in C, and it never occurred in testing.

`bit_packer` gathers the 0–15 bits per step into 16-bit words, MSB first, with
valid/ready on the word side. The encoder stalls (`enc_ready` low) when the
packer is full and the word output is not accepted.

**End of stream.** Raise `enc_flush` with `enc_valid`. The encoder sends all 64
bits of C, the packer pads the last word with zeros, and encoder and model
return to their reset state. The next symbol starts a new, independent stream.
A flush takes 4 cycles.

## Decoder (`ac_decoder`, `bit_unpacker`)

The decoder keeps A and C in 16-bit registers. Here C is the distance of the
code point from the bottom of the current range, always below A. It starts
by loading 16 code bits. Each step then:

1. computes `sh` and `E` from A exactly as the encoder does;
2. checks whether C lies in m's widened interval
   `[Q(m)·2^sh, (Q(m)+n(m))·2^sh + E)`. If so, the symbol is m;
3. otherwise removes E when C lies above that interval. It shifts the result
   right by `sh` to get the target `T` in model units, and asks the array for
   the largest x with `Q(x) ≤ T`. A single shift of C serves every comparator;
4. subtracts the symbol's addend from C, sets A to its width (the encoder's
   table), and renormalizes. The new low bits of C come from the stream.

`bit_unpacker` accepts 16-bit words and shows the next 16 code bits as a
window. The decoder waits when fewer bits are held than a step will consume.
The decoder needs `clear` between streams. The words after a flush belong to
the next stream, and the padding at the end of a stream is never consumed in
full.

## Interface of `ac_top`

All signals are synchronous to `clk`. `rst_n` is an active-low asynchronous
reset. Each codec has the same set of ports, prefixed `big_` or `small_`:

| port              | dir | width  | meaning |
|-------------------|-----|--------|---------|
| `clear`           | in  | 1      | restart encoder, decoder and both models |
| `enc_valid`       | in  | 1      | symbol (or flush) offered |
| `enc_flush`       | in  | 1      | with `enc_valid`: end the stream instead of coding a symbol |
| `enc_sym`         | in  | 8 / 4  | symbol to code |
| `enc_ready`       | out | 1      | encoder takes the offer this cycle |
| `enc_wd_valid/data/ready` | out/out/in | 1/16/1 | code words out, MSB first |
| `enc_carry_lost`  | out | 1      | sticky: a carry ran past the guard register |
| `dec_wd_valid/data/ready` | in/in/out | 1/16/1 | code words in |
| `dec_valid/sym/ready` | out/out/in | 1/(8 / 4)/1 | decoded symbols |

A transfer happens on a rising edge where valid and ready are both high.
Encoder and decoder of one codec share nothing but `clear`. One codec can
encode one stream while decoding another.

## Module map

| module         | role |
|----------------|------|
| `ac_pkg`       | shared widths and fixed-point constants |
| `ac_top`       | the two codecs side by side |
| `ac_codec`     | encoder path and decoder path, each with its own model; `DIRECT` selects the model type |
| `ac_encoder`   | A/C registers, guard counter, coding step, flush |
| `ac_decoder`   | decoding step and code-stream fill |
| `renorm`       | shift count and the A and C shifters |
| `arb_chain`    | leading-one finder |
| `whm_model`    | banked weighted history model: history, array, last symbol, two-cycle update |
| `mbca`         | multibase cumulative occurrence array |
| `whm_direct`   | 16-symbol weighted history model with per-symbol counters |
| `hist_buf`     | shift-register history of M symbols |
| `mps_tracker`  | last-symbol (largest count) register |
| `bit_packer`   | code bits to 16-bit words |
| `bit_unpacker` | 16-bit words to a code-bit window |

Model sizes are parameters: `HIST_LEN` (M), `W_LOG2` (log2 W), `NBANK` and
`BSIZE`. `NSYM + M·W` must be a power of two, and elaboration stops
otherwise. For example, a 256-symbol model with M = 24 and W = 32 (total
1024, 5-bit counters) is `HIST_LEN=24, W_LOG2=5`. A 16-symbol model with
M = 30 and W = 8 (total 256) is `DIRECT=1, HIST_LEN=30, W_LOG2=3`.

## Simulation

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and ends. Example with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_ac_top rtl/ac_pkg.sv tb/ac_ref_pkg.sv tb/tb_ac_top.sv
    ./obj_dir/Vtb_ac_top

`tb/ac_ref_pkg.sv` has a software model of the weighted history model and of
the encoder (classes `ref_model` and `ref_encoder`). The block testbenches
compare against it.

- `tb_ac_top` runs both codecs at their default sizes. Each encodes three
  streams of 1,200 symbols with random back-pressure, decodes them and
  compares every symbol. It counts each mechanism and fails if any never
  happened: the last symbol, symbols below and above it, changes of the last
  symbol, both scalings, guard carries, skipped leading bits, stalls on
  either side, flushes, updates across banks, and up and down counting in
  the small model. It also checks the 2-cycle and 1-cycle rates.
- `tb_workload` codes streams of 103,026, 23,107, 35,256 and 51,513 bytes
  (the lengths of an image file and of vector-quantizer outputs this coder is
  meant for). It uses both codecs at default sizes. The bytes are generated:
  a smooth synthetic picture and skewed index streams. Each stream must
  decode exactly, and the 256-symbol encoder must accept one byte every
  2 cycles throughout. It prints bits per symbol and the proportion remaining.
  These are not comparable with results on real video data.
- `tb_alt_configs` runs `ac_codec` in two other sizes: 256 symbols with
  M = 24, W = 32 (total 1024), and 16 symbols with M = 30, W = 8 (total 256).
  Both round trips must be exact, and both must compress.
- `tb_ac_encoder` checks A after every step and the exact bit stream against
  the reference encoder. `tb_ac_decoder` decodes reference-encoded streams
  through a starving window port.
- `tb_mbca`, `tb_whm_model`, `tb_whm_direct`, `tb_hist_buf` and
  `tb_mps_tracker` check every Q, n, search result and last-symbol choice
  against the reference model after random updates. `tb_arb_chain` is
  exhaustive. `tb_renorm` covers every A value. The packer and unpacker tests
  check bit order, masking and handshakes.

## Where this design departs from its source, and limits

- **Coder equations.** The scaling rule, the leftover term E and m's place in
  the symbol order are this design's reconstruction of the multiplication-free
  code. The code is decodable by construction and verified by round trips.
  Its efficiency is close to, but not proven equal to, the original's.
- **Last symbol.** The source keeps the largest-count symbol last with a
  "dynamic lookup table". Here a single register follows the maximum
  incrementally and can lag behind it (see `mps_tracker`). Symbols are never
  relabelled.
- **Counter orientation.** The cumulative counts are mirrored: they count
  symbols below x, not above.
- **Carry overflow.** Bit stuffing past the 48-bit guard is not built. A lost
  carry is only flagged.
- **Word interface.** The 16-bit word size, valid/ready handshakes, flush
  padding and the skipping of the first 48 zero bits are this design's own.
- **Timing.** The array's read, search and update are single-cycle
  combinational paths. No clock-frequency target was set, and no pipelining
  was added.
- **Not built.** The adaptive frequency-count model with halving, and the
  other coders the weighted history model was compared with, are not part of
  this design.
