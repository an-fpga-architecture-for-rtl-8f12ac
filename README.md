# Code-specific LDPC encoder and decoder

Low-density parity-check (LDPC) codes are linear block codes defined by a sparse parity-check
matrix H with r rows (checks) and n columns (symbols). Sharing one generic datapath between many
such codes is costly, so this design goes the other way. The hardware is generated for **one
code**: every generator column becomes its own XOR tree, and every row and column of H becomes
its own check or symbol node. Each check and symbol node is sized to that row or column. To use
another code, build the design again with another H. An FPGA can hold several such builds and
load the one that suits the channel.

The RTL has two independent halves behind one top module, `ldpc_codec_top`:

* an **encoder** that turns m-bit source words into n-bit codewords (m = n − r), and
* a **decoder** that takes n-bit received hard-decision words, corrects them by iterative
  min-sum message passing, and returns the m source bits.

Both halves talk to the outside through Q-bit buses, because the words are far wider than any
practical data bus.

## How a code is described

The only description of a code is the parameter `H`, declared as
`logic [0:R-1][0:N-1]` so that `H[i][j]` is row i, column j, as the matrix is written on paper.
H must be in systematic form `H = [P | I]`: the right r×r block is the identity. The encoder
checks this when it is elaborated. The generator matrix is then `G = [I | P^T]`. It is never
stored; the encoder derives each of its columns from H when the design is elaborated.

Data words use ordinary descending vectors: bit j of a word is symbol j. Codeword bits 0 to m−1
are the source bits; bits m to n−1 are the parity bits.

The default code is a small (7,4) example code with three checks:

```
        S0 S1 S2 S3 S4 S5 S6
   C0 [  1  1  1  0  1  0  0 ]     C0 = S0+S1+S2+S4
   C1 [  1  1  0  1  0  1  0 ]     C1 = S0+S1+S3+S5
   C2 [  1  0  1  1  0  0  1 ]     C2 = S0+S2+S3+S6
```

For example, the source word X = [1 0 1 1] encodes to Y = [1 0 1 1 0 0 1].

## Encoder (`ldpc_encoder`)

```
 Q-bit bus ─► bus_deserializer (m bits) ─► n × xor_tree ─► bus_serializer (n bits) ─► Q-bit bus
```

Codeword bit k is an `xor_tree`: the modulo-2 sum of the source bits selected by column k of G.
For k < m the mask is one-hot and the tree is a wire. For k = m+i the mask is row i of P. The
trees are purely combinational. Synthesis is free to share common sub-sums between them, and for
large, dense G matrices that sharing decides the area. No hand pre-factoring of the parity
equations is done.

## Decoder (`ldpc_decoder`)

### The graph in hardware

Every 1 in H is an edge of the Tanner graph between check i and symbol j. The decoder builds:

* one `check_node` per row i, with degree equal to the number of ones in the row;
* one `symbol_node` per column j, with degree equal to the number of ones in the column;
* one `quantizer`.

Edges are numbered row by row. Constant functions in `ldpc_decoder` map the k-th port of check i
and the k-th port of symbol j to their edge numbers. Each edge carries two W-bit signed messages:

* `v2c[e]`, symbol → check: these are **registers**, and they are the whole decoding state;
* `c2v[e]`, check → symbol: combinational.

### One iteration per clock

When a received word is taken, every `v2c[e]` is loaded with the channel LLR of its symbol's
received bit. After that, each clock cycle is one complete iteration:

1. The check nodes compute `c2v` from the `v2c` registers.
2. The symbol nodes compute the next `v2c` values and each symbol's total LLR `ybar` from `c2v`.
3. The quantizer makes hard decisions from the signs of `ybar` and checks them against H.
4. The new `v2c` values are clocked in.

The loop stops in either of two ways:

* If the quantizer's `done` is high, the first m hard-decision bits are the result, and
  `converged` = 1.
* If `MAX_ITER` iterations pass without a valid codeword, the first m **received** bits are
  released unchanged, and `converged` = 0.

At least one iteration always runs, even when the received word is already a codeword.

Timing, counting clock edges from the edge that takes the last input beat (edge 0):

| edge | event |
|------|-------|
| 1 | word taken from the input register, messages initialised |
| 1+k | iteration k clocked (k = 1 … iterations) |
| 2+iterations | result loaded into the output register; first output beat offered from here |

`converged` and `iterations` describe the word in the output register. They change when a result
is loaded and hold until the next one is loaded. While the decoder iterates, the next word's
beats can already be filling the input register. The decoder does not take that word until the
current result has moved into the output register.

### Check node: sign-min

A check node does not compute `2·atanh(∏ tanh(x/2))`. It uses the sign-min approximation. The
message back to input k is

    y[k] = (product of the signs of all x[j], j ≠ k) × (minimum of |x[j]|, j ≠ k)

Every output has its own XOR of the other sign bits and its own minimum tree over the other
magnitudes. Input k feeds every unit except those of output k. A zero message counts as
positive. The minimum is not scaled.

### Symbol node: total minus own

A symbol node adds the channel LLR (from `llr_lut`) and all incoming check messages into one
total. The message back to check i is the total less what check i sent. The total itself is
`ybar`, the a-posteriori LLR, so the quantizer gets it at no extra cost. The total is kept at
`W + clog2(DEG+1)` bits, so it cannot overflow. Outgoing messages saturate to W bits.

### Quantizer

The hard decision for symbol j is 1 when `ybar[j] < 0` and 0 otherwise, which is just the sign
bit. One `xor_tree` per row of H computes the syndrome, and `done` is the NOR of all syndrome
bits. Only sign bits are used, so the quantizer's size does not depend on the message width.

### Number format

Messages are W-bit two's complement, kept in the symmetric range ±(2^(W−1) − 1). Check nodes read
the one code outside that range, −2^(W−1), as the largest magnitude. The channel is treated as a
binary symmetric channel: a received 0 maps to `LLR0` and a received 1 to `LLR1`. The defaults
are ±2^(W−3), which is +32/−32 at 8 bits. Min-sum is insensitive to the LLR scale, apart from
saturation. To match a bit-error probability p, set the parameters in proportion to
ln((1−p)/p).

## Buses (`bus_deserializer`, `bus_serializer`)

All four buses use valid/ready handshakes, with a transfer on each rising edge where both are
high. A w-bit word takes ceil(w/Q) beats, least significant beat first: beat b carries bits
`[b*Q +: Q]`.

* **Input:** padding bits in the last beat are ignored. The input register refuses beats
  (`in_ready` low) while it holds a complete word that has not been taken.
* **Output:** the last beat is zero-padded. A beat that is offered stays unchanged until it is
  taken; an assertion in `bus_serializer` checks this. The output register accepts a new word
  only once it is empty.

With the defaults (Q = 4, n = 7, m = 4), the encoder takes 1 beat in and sends 2 beats out. The
decoder takes 2 beats in and sends 1 beat out. The encoder's codeword is loaded into its output
register one clock edge after the last input beat is taken.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`, `R`, `H` | 7, 3, the (7,4) example | code length, number of checks, parity-check matrix `[P \| I]` |
| `Q` | 4 | bus width in bits, the same for all four buses |
| `W` | 8 | bits per message |
| `MAX_ITER` | 8 | iteration limit of the decoder |
| `LLR0`, `LLR1` | +2^(W−3), −2^(W−3) | channel LLR of a received 0 / 1 (decoder, symbol node) |

Shared defaults live in `rtl/ldpc_pkg.sv`.

## Files

| file | contents |
|------|----------|
| `rtl/ldpc_pkg.sv` | default code, default sizes, small helpers |
| `rtl/ldpc_codec_top.sv` | encoder and decoder side by side |
| `rtl/ldpc_encoder.sv` | encoder |
| `rtl/ldpc_decoder.sv` | decoder: graph wiring, edge registers, control |
| `rtl/check_node.sv`, `rtl/symbol_node.sv`, `rtl/llr_lut.sv`, `rtl/quantizer.sv` | decoder units |
| `rtl/xor_tree.sv` | masked parity, used for G columns and H rows |
| `rtl/bus_deserializer.sv`, `rtl/bus_serializer.sv` | input / output shift registers |
| `tb/ldpc_ref_pkg.sv` | behavioural encoder, syndrome check and min-sum decoder, written independently of the RTL |
| `tb/tb_*.sv` | self-checking testbenches |
| `tb/codec_bench.sv` | parameterised end-to-end bench with a generated code, used by `tb_ldpc_codec_large` |

## Verification

Every testbench checks the hardware against values it computes on its own, prints
`TB_RESULT checks=N failures=F`, and has a watchdog.

* **Unit benches:**
  * `tb_xor_tree` is exhaustive.
  * `tb_check_node` and `tb_symbol_node` run at all nine sizes: degree 4, 8 and 16, each with 4,
    8 and 16 bits per message.
  * `tb_quantizer` checks all 16 codewords and random LLR vectors.
  * The bus benches use random gaps and back-pressure.
* **`tb_ldpc_encoder`:** all 16 source words, the latency, and a streamed run with
  back-pressure.
* **`tb_ldpc_decoder`:** all 128 possible received words against the reference min-sum model.
  It checks the decoded bits, `converged`, `iterations`, and the latency of `iterations + 2`
  edges.
* **`tb_ldpc_codec_top`:** end to end at the default parameters. Words go source → encoder →
  channel with 0–2 flipped bits → decoder, with all four buses busy at once. It also counts
  these mechanisms and fails if any never occurs:
  * a word valid as received;
  * a word corrected by iteration;
  * a word released at the iteration limit;
  * multi-beat words;
  * back-pressure stalls;
  * the decoder refusing input while busy;
  * the encoder overlapping input and output.
* **`tb_ldpc_codec_large`:** the same bench (`tb/codec_bench.sv`) at two practical sizes.
  Each size uses a code the bench generates itself: every column of P has three ones, in
  pseudo-random rows.
  * n = 96, m = 48: 150 words, 0–6 flipped bits per word.
  * n = 204, m = 102: 60 words, 0–8 flipped bits per word.

  The two run concurrently. Building takes one to two minutes, and the run takes about half a
  minute.

To simulate with Verilator 5, for example the decoder bench:

```
verilator --binary --timing --assert --top-module tb_ldpc_decoder \
  -y rtl -y tb +libext+.sv -Irtl rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder.sv
./obj_dir/Vtb_ldpc_decoder
```

Replace the module and file name for any other bench. The packages must come first on the
command line. The RTL uses no vendor primitives.

## What is and is not here

* **Codes.** Only the (7,4) example code is built in. The design is meant to be used with
  practical codes of 96, 204 or 1008 bits, whose matrices are not included. Any systematic H can
  be supplied as a parameter. The 96- and 204-bit sizes are exercised with generated codes.
* **Very large codes.** At n = 1008 the packed `H` parameter would be 508,032 bits. That exceeds
  Verilator's default maximum packed width, so such codes need H passed in another form (for
  example, an array of rows). The largest size simulated is (204,102).
* **Fully parallel decoder.** The decoder is fully parallel, one iteration per clock. The
  critical path runs through a check node, a symbol node and the quantizer. That is fine for
  small codes; for large ones the clock rate is set by this path. The symbol-node adders are
  plain adders. A carry-look-ahead version would shorten the path without changing the function.
* **Choices made here.** The following are this design's choices:
  * the iteration limit;
  * the bus width and handshakes;
  * the LLR values;
  * the fixed-point format;
  * the status outputs;
  * the one-iteration-per-clock schedule.
* **Behaviour at the iteration limit.** An undecodable word is released as received, not as the
  last hard decision.
* **Code selection.** Selecting among codes at run time happens outside this RTL. A small
  controller loads a different FPGA configuration, built with a different H, from a
  configuration flash. Neither the controller nor the flash is part of this design.
