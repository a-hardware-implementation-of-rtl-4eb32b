# Punctured convolutional codec for a rate-1/2 Viterbi decoder

A rate-1/2, constraint-length-7 convolutional code with a Viterbi decoder is a
workhorse of satellite and radio links. Puncturing gives higher code rates
from the same code. The transmitter deletes some of the coded symbols in a
fixed periodic pattern. The receiver puts a neutral "don't know" value back in
their place, so the unchanged rate-1/2 Viterbi decoder can still decode the
stream. This RTL provides the logic around such a decoder:

* **Transmit path:** differential encoder, then K=7 rate-1/2 convolutional
  encoder, then puncturer.
* **Receive path:** depuncturer (symbol inserter), then an external Viterbi
  core, then differential decoder.

Eleven rates are available: 1/2 (no puncturing) and 2/3, 3/4, 4/5, 5/6, 6/7,
7/8, 11/12, 12/13, 15/16, 16/17. You can also load your own pattern with a
period of up to 16 symbol pairs. The puncturer and the depuncturer each
handle one symbol position per clock.

## Signal chain

```
 data ─► diff_encoder ─► conv_encoder ─► punct_encoder ─► (Symbol_1, Symbol_2) ─► QPSK modulator
         └──────────────────── pcc_encoder ───────────────┘

 QPSK demod (I, Q soft) ─► symbol_inserter ─► [Viterbi core, external] ─► diff_decoder ─► data
```

`pcc_top` holds both paths side by side. They share the clock and reset, and
each has its own pattern control. The external Viterbi core's input
(`vit_valid`, `vit_c1`, `vit_c2`) and output (`vit_bit_valid`, `vit_bit`) are
ports of `pcc_top`.

## The convolutional code

`conv_encoder` shifts each data bit into a 7-stage register. Stage 1 holds the
newest bit. Two modulo-2 adders form the channel symbols:

| symbol | stages tapped | generator (octal, stage 1 = MSB) |
|--------|---------------|----------------------------------|
| U0     | 1, 4, 5, 6, 7 | 117                              |
| U1     | 1, 2, 4, 5, 7 | 155                              |

This is the familiar (171, 133) K=7 code with its stages numbered from the
other end, so free distance is 10. Both generators have odd weight. As a
result, inverting every channel symbol decodes to the inverted data. The
differential encoder and decoder turn that inversion back into correct data.
This is how the chain tolerates the 180-degree phase ambiguity of a PSK
receiver.

The generators are parameters (`G0`, `G1`). The source this design follows
writes the first generator as 113 octal in its text, but its encoder drawing
taps five stages (1, 4, 5, 6, 7), which is 117. The drawing is followed here.

## Puncturing patterns

A pattern of period P spans P input bits, so it covers 2P coded positions in
the order U0(0), U1(0), U0(1), U1(1), and so on. For rate P/(P+1) it keeps
P+1 of those positions. Each pattern has two rows: X says which U0 symbols
are sent and Y says which U1 symbols are sent, both read left to right in
time.

| rate  | P  | X (U0)           | Y (U1)           | free distance |
|-------|----|------------------|------------------|---------------|
| 1/2   | 1  | 1                | 1                | 10            |
| 2/3   | 2  | 10               | 11               | 6             |
| 3/4   | 3  | 101              | 011              | 5             |
| 4/5   | 4  | 1000             | 1111             | 4             |
| 5/6   | 5  | 10101            | 01011            | 4             |
| 6/7   | 6  | 101001           | 010111           | 3             |
| 7/8   | 7  | 1010001          | 0101111          | 3             |
| 11/12 | 11 | 11101011111      | 10010100000      | 3             |
| 12/13 | 12 | 100010101011     | 111101010100     | 3             |
| 15/16 | 15 | 110100101001111  | 101011010110000  | 3             |
| 16/17 | 16 | 1011001110100100 | 1100110001011011 | 3             |

The rates are fixed by the design's requirements. The source does not print
the patterns, so they are this design's own choice:

* **2/3 to 7/8:** the widely published patterns for the (171,133) code. They
  are time-reversed to match this encoder's stage order.
* **The four long periods:** found by a search over patterns that keep both
  symbols of the first pair and exactly one symbol of each other pair. The
  search kept a non-catastrophic pattern with the largest free distance.
  The simpler "X = 100…0, Y = 111…1" family reaches only distance 2 at
  periods 15 and 16.

The table lives in `pcc_pkg::rate_pattern()`. `pcc_pkg::make_pattern()` builds
each entry from its two rows.

**Rate codes** (`rate_t`): 0 = 1/2, 1 … 10 = 2/3 … 16/17 in the order of the
table, 15 = user pattern.

**User pattern** (`pattern_t`, 37 bits):

* `period` (5 bits): P, from 1 to 16.
* `keep` (32 bits): bit i is 1 when position i of the period is sent.

Both ends of a link must select the same pattern, and both must restart
(`enc_write` / `dec_start`) at the same point in the stream.

## How the puncturer works (`punct_encoder`)

The puncturer sits between two clocks: a pair arrives at the input data
clock, and a pair leaves at the *rate clock*. For rate 3/4, three input pairs
(six symbols) become four symbols, which is two output pairs. The output pair
rate is therefore 2/3 of the input pair rate. In general it is (P+1)/(2P).

Everything here runs on one system clock, and the two data clocks are
enables:

* **Write side:** `in_valid` marks an input pair. U0 and U1 are written into a
  32-bit symbol memory at the write counter, and the counter advances by two.
* **Pattern memory:** a 37-bit register holds the active pattern. A pattern
  counter walks its 2P positions.
* **Selector:** every clock, if the memory holds an unread symbol, the
  selector reads one symbol at the read counter. If the pattern bit for the
  current position is 1, the symbol goes into the output pair register.
  Otherwise it is dropped. Both counters then advance.
* **Output:** when two kept symbols are collected, `sym_valid` rises.
  Downstream takes the pair by asserting `sym_ready`, which is the rate clock
  enable. `symbol_1` is the earlier kept symbol. A new symbol can be collected
  in the same cycle the pair is taken.
* **Control:** `write` loads the pattern register and presets all counters.
  The pattern comes from the table selected by `rate`, or from `pattern` when
  `rate` is `RATE_USER`.

Because the selector handles one symbol per clock and each input pair brings
two symbols, input pairs may arrive at most every second clock on average.
Bursts are absorbed by the 32-symbol memory. If the memory would overflow, the
incoming pair is dropped and the sticky `overflow` flag is set. Only reset or
`write` clears the flag.

## How depuncturing works (`symbol_inserter`)

The depuncturer is the mirror image of the puncturer:

* Received (I, Q) soft pairs are written into a 32-entry memory of 3-bit
  symbols. I is the earlier symbol and Q the later one.
* A pattern counter walks the 2P positions, one per clock.
  * At a kept position, the MUX passes the next stored symbol, and the
    position waits if none is stored yet.
  * At a deleted position, the MUX passes the dummy value `DUMMY` (default
    `3'b100`).
* Every two positions form a (C1, C2) pair for the Viterbi decoder. C1 is the
  U0 position and C2 the U1 position. The pair is presented as a one-cycle
  `out_valid` pulse, at most every second clock.
* `start` loads the pattern (same `rate` / `pattern` choice as the
  transmitter) and presets the counters.
* Dummies are produced only once data has arrived since `start`.

**Soft values.** They are 3-bit offset binary: `000` is a confident 0, `111` a
confident 1, and `011` / `100` are the two weakest values. For the dummy to be
neutral, the Viterbi core should give `011` and `100` (nearly) the same cost
for either bit. `DUMMY` is a parameter in case the core expects another
value.

**Throughput.** At high rates nearly every received pair expands to about
four output positions, so received pairs should come at most every fourth
clock. The memory absorbs bursts, and `overflow` flags a lost pair.

## Differential coding (`diff_encoder`, `diff_decoder`)

* **Encoder:** b_k = a_k xor b_(k-1). A 1 toggles the line level and a 0
  keeps it. The output is combinational, in the same cycle as the input.
* **Decoder:** a_k = b_k xor b_(k-1). The output is registered, one clock
  later.

Both hold their previous value in a single flip-flop that resets to 0. With
that reset value, the input 1 0 1 1 0 0 0 1 1 0 1 encodes to 1 1 0 1 1 1 1 0
1 1 0.

## Timing summary

| block           | input strobe        | output             | latency                          |
|-----------------|---------------------|--------------------|----------------------------------|
| diff_encoder    | `in_valid`          | `dout`             | 0 (combinational)                |
| conv_encoder    | `in_valid`          | `out_valid`/u0/u1  | 1 clock                          |
| punct_encoder   | `in_valid`          | `sym_valid` pair   | ≥ 2 clocks, 1 symbol/clock       |
| symbol_inserter | `in_valid` (I,Q)    | `out_valid` C1/C2  | ≥ 2 clocks, 1 position/clock     |
| diff_decoder    | `in_valid`          | `out_valid`/dout   | 1 clock                          |

Reset is synchronous and active low (`rst_n`) in every module.

## What is not here

* **Viterbi decoder.** The rate-1/2 K=7 soft-decision decoder is a separate,
  existing core; only its connection points are provided. The end-to-end
  testbench uses a software Viterbi decoder in its place.
* **BER monitor.** A bit-error-rate monitor belongs next to the decoder in a
  complete system. It is not specified well enough to build here.

## Departures and design choices

Most of these are choices where the source leaves the detail open:

* **Clocking:** one system clock with enables, instead of separate input-data
  and rate clocks. The rate clock appears as a `sym_valid`/`sym_ready`
  handshake.
* **Puncturing patterns:** see the table above. None were given.
* **Encoder symbol memory:** a 32-symbol circular buffer. It holds 2P symbols
  for every P up to 16, and it is not split into per-period halves.
* **Added inputs and flags:**
  * `rate` on the depuncturer, next to `pattern` and `start`.
  * The encoding of `pattern_t` and of the rate codes.
  * The overflow flags.
* **Depuncturer values and mapping:**
  * The dummy value `100` and the offset-binary reading of soft values.
  * The I-earlier / Q-later mapping.
* **Encoder generator:** 117 octal for U0 (see above).

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. A shared package, `tb/tb_ref_pkg.sv`, holds
the reference models:

* the pattern rows as strings;
* a tap-list encoder;
* a differential model;
* a soft-decision Viterbi decoder with full traceback.

Example with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pcc_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/pcc_pkg.sv tb/tb_ref_pkg.sv tb/tb_pcc_top.sv
./obj_dir/Vtb_pcc_top
```

**`tb_pcc_top`** runs the top at its default sizes through a full link:

* source (AAh byte pattern or random bits), transmitter, QPSK soft mapping,
  channel, depuncturer, software Viterbi, differential decoder, compare;
* every rate noise-free with both data types, plus a user pattern;
* sparse weak symbol errors at rates 1/2 to 4/5;
* a Gaussian channel at Eb/N0 = 6 dB for rates 2/3, 3/4 and 4/5, with
  4,000 to 8,000 bits each;
* a phase-inverted link.

It checks that symbols were deleted and dummies inserted, that the user
pattern decodes, and that errors were corrected. It also checks the expected
channel-symbol count, (P+1)/P symbols per data bit.

The unit testbenches cover:

* the reference waveform and random data for the differential blocks;
* the impulse response and random data for the encoder;
* all patterns with full-rate input, gaps and back-pressure, and the overflow
  flag, for the puncturer and the depuncturer.

## Files

| file                      | contents                                                    |
|---------------------------|-------------------------------------------------------------|
| `rtl/pcc_pkg.sv`          | rate codes, pattern type, pattern table, soft-symbol type   |
| `rtl/diff_encoder.sv`     | differential encoder                                        |
| `rtl/conv_encoder.sv`     | K=7 rate-1/2 convolutional encoder                          |
| `rtl/punct_encoder.sv`    | puncturer                                                   |
| `rtl/pcc_encoder.sv`      | transmit chain                                              |
| `rtl/symbol_inserter.sv`  | depuncturer                                                 |
| `rtl/diff_decoder.sv`     | differential decoder                                        |
| `rtl/pcc_top.sv`          | both chains, Viterbi core connection points                 |
| `tb/tb_*.sv`              | testbenches and the reference-model package                 |
