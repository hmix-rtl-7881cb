# HMix: a quantized MLP-Mixer accelerator in SystemVerilog

The design runs both MLPs of an MLP-Mixer layer on one 16×16 INT8 systolic
array. There are two main ideas.

**Two layers without storing the hidden layer.** The first MLP layer runs
output-stationary. Its 256 accumulators are shifted out through GELU and
REQUANT, and the INT8 hidden values are shifted straight back into the
array's input registers. The second layer then runs input-stationary on
those held values. Its psums are accumulated in the output memory, on top of
the previous MLP's output, so the residual addition costs no extra memory.

**A stall-free transpose.** Token mixing and channel mixing read the
activation along orthogonal dimensions. The activation is spread over 16
banks, and bank k sees the shared address k cycles after bank 0. One address
stream then serves both mixing directions. In token mixing, a small
rotating transpose unit puts each bank's word on the right array row.

The default parameters are those of Mixer-B/16 at 224×224:

| Parameter | Value |
|---|---|
| Tokens | 196 |
| Channels | 768 |
| Token-mixing hidden size | 384 |
| Channel-mixing hidden size | 3072 |

Arithmetic is INT8×INT8 with INT32 accumulation.

## Top level (`hmix_top`)

One `start` pulse runs one MLP (token mixing or channel mixing, chosen by
`mode`). That covers LayerNorm, both layers, GELU, the residual and the final
requantization. The input and the result are both in OBRAM. One mixer layer
is a token-mixing start followed by a channel-mixing start, so twelve layers
are 24 starts.

The host has three jobs:

- It writes the first activation into OBRAM through the host port. Values
  are INT8, sign-extended to 32 bits. Padded token rows 196..207 must be
  zero.
- It streams weight tiles into the double-buffered weight memory. It pulses
  `w_tile_loaded` after each tile, and `w_tile_consumed` tells it when a
  half is free again. The loaded count is cleared on `start`, so tiles for a
  run are loaded after its start pulse.
- It reads the result back from OBRAM once `done` pulses.

The quantization constants come in as one packed struct, `qp`
(`hmix_pkg::qparams_t`). They are computed offline:

- GELU: `qb`, `qc`, `q1` and the clip level.
- REQUANT: `b` and `c` for the hidden layer and for the output.
- SCALE: `b` and `c`.
- LayerNorm: the two shifts.

Patch embedding, the last LayerNorm, pooling and the classifier stay on the
host.

## Memories and layout (`hmix_banked_mem`)

There are three memories, each made of 16 banks:

| Memory | Width | Depth | Holds |
|---|---|---|---|
| IBRAM | 8 bit | 9984 | LayerNorm output, the array's input |
| OBRAM | 32 bit | 9984 | previous output, psums, then the new INT8 output |
| WBRAM | 8 bit | 3072 | two halves of 1536 words per bank |

Each memory has one read and one write address line. Both are staggered: the
address and enable pass through a one-cycle register per bank. A bank that
is not read returns zero, so the array's operands are flushed with zeros
when a tile ends.

Token p lives in bank `p % 16` at address `(p / 16) * C + channel`. With
this layout:

- Channel mixing on row group g reads address `g*C + s` at stream step s.
  Each bank yields its own token, so no reordering is needed.
- Token mixing on channel group g reads `(s/16)*C + g*16 + s%16`. Every bank
  then sees a different token at the same time, and the transpose unit
  rotates the lanes.

A weight tile is 16 hidden units: 16 columns of the first weight matrix and
16 rows of the second. Column n goes to bank n at `base + k`; row n goes to
bank n at `base + K + j`. The base is the tile's half.

## Transpose unit (`hmix_transpose_unit`)

In cycle t, output lane r takes input lane `(t - r) mod 16` and registers
it, so the latency is one cycle. A `sync` input from the controller marks
t = 0. With `permute` low, the unit passes the lanes straight through; this
is used for channel mixing and for LayerNorm. There are three instances:

- IBRAM output, 8 bit.
- OBRAM input, 32 bit.
- OBRAM output, 32 bit.

## Processing element and array (`hmix_pe`, `hmix_systolic_array`)

Each PE holds an 8-bit weight, an 8-bit input and a 32-bit psum register.
Weights move down the array, inputs move right and psums move right. It has
three modes:

- **OS accumulate:** `psum += w*i`, and inputs shift right.
- **Drain:** the psum register takes the left neighbour's psum. The right
  edge therefore emits columns 15, 14, … of each row. At the same time,
  hidden values from REQUANT enter on the left input path. After 16 cycles
  they sit in the input registers.
- **IS:** the input register holds. The PE adds `w*i` to the psum arriving
  from the left and passes the sum on. The psum that leaves the right edge
  is the row's new partial output.

## Controller (`hmix_controller`)

For each 16-row group, LayerNorm runs three steps:

1. Pass 1 reads OBRAM and accumulates the statistics.
2. It waits until all 16 lanes have a reciprocal.
3. Pass 2 writes the normalized INT8 rows into IBRAM.

Then, for each weight tile and each row group, the controller runs:

| Phase | Length | What happens |
|---|---|---|
| OS | K + 2N + 2 cycles | K is the reduction length: 196 or 768 |
| drain | 21 cycles | through GELU (3 cycles) and REQUANT (2 cycles) |
| IS | — | OBRAM is read, passed through SCALE and the array, and written back |

Write addresses are the read addresses delayed by the datapath latency:

- 22 cycles on the IS path.
- 4 cycles on the LayerNorm path.

The first tile rescales the previous INT8 output into the psum domain
(SCALE). Later tiles pass the stored psum through unchanged. The last tile
requantizes to INT8 before writing.

If the next weight tile has not been loaded, the controller waits in a
dedicated state. In the tests, the host always loads ahead, so no such wait
occurs.

## Non-linear and scaling units

- **GELU (`hmix_gelu`):** the integer-only I-GELU. It computes:
  - `a = min(|q|, clip)`
  - `L = (a + qb)^2 + qc`
  - `erf = sign(q)·L`
  - `out = q·(erf + q1)`, saturated to 64 bits.

  It has 3 pipeline stages, and the top uses 16 lanes.
- **REQUANT (`hmix_requant`):** `sat8((x·b) >>> c)`, 2 stages.
- **SCALE (`hmix_scale`):** `(o·b) >>> c` on the INT8 word, or a bypass.
  1 stage.
- **LayerNorm (`hmix_layernorm`):** one lane per token of the row group.
  - Pass 1 computes `S1 = Σq` and `S2 = Σq²`.
  - `σ = isqrt(C·S2 − S1²)`, computed bit-serially in 32 cycles.
  - The reciprocal `(2 << b)/σ` comes from a 33-cycle restoring division.
  - Pass 2 outputs `sat8(((C·q − S1)·recip) >>> out_sh)`, 2 cycles after
    each input.

## Where this design chooses for itself

- **Shift direction:** the requantization formula is written with a left
  shift, but a scale ratio below one needs a right shift. Both REQUANT and
  SCALE shift right arithmetically, truncating toward minus infinity.
- **LayerNorm:** there is no learnable gain or bias. Any affine factor must
  be folded into the following weights and requantization constants.
- **No overlap between phases:** LayerNorm, OS, drain and IS run one after
  another, with pipeline-fill gaps between them. A full token-mixing plus
  channel-mixing layer takes about 4.88 M cycles, about 24 ms at 200 MHz.
  That is roughly 3.4 frames/s for 12 layers, ignoring host transfers.
- **Biases:** none are applied.
- **Saturation:** the saturation points and widths (GELU 64-bit, SCALE
  32-bit wrap) are this design's choices.
- **Square root and division:** the integer square root and the division are
  plain bit-serial circuits.
- **Memory sizes:** the memories are sized for 208 padded tokens, so IBRAM
  is 156 KB, OBRAM 624 KB and WBRAM 48 KB.

## Verification

Every module has a self-checking testbench in `tb/`:

| Testbench | What it covers |
|---|---|
| PE | all three modes |
| Array | a complete two-layer MLP on 16×16 tiles: OS, drain with hidden load, IS |
| Transpose unit | the rotation rule, the 4-lane example and identity mode |
| GELU, REQUANT, SCALE | random values against a reference model, plus latency |
| LayerNorm | random rows and constant rows, plus latency |
| Banked memory | the stagger on reads and writes, and host priority |
| Controller | every read and write address, phase lengths and handshakes |

The end-to-end tests load a random activation, weights and constants. They
run mixer layers: a token-mixing MLP, then a channel-mixing MLP on the result
left in OBRAM. After each layer they compare OBRAM bit-exactly with a
reference model written in the testbench. The constants keep values spread
over the INT8 range. The tests fail if more than a quarter of the hidden
values or outputs saturate, or if more than a quarter of the outputs are
zero. They also count each mechanism:

- TU permutations
- drain cycles
- OS→IS switches
- SCALE and bypass writes
- final REQUANT writes
- LayerNorm writes
- weight loads overlapping compute
- stalls, which must be zero

There are two end-to-end tests:

- `tb_hmix_top` uses 20 tokens, 32 channels and hidden sizes of 32 and 48.
  It chains three mixer layers in about 8200 cycles.
- `tb_hmix_top_full` runs one layer at the default B/16 size. It makes
  about 163,000 checks over about 4.9 M cycles. At that size 0.8% of the
  outputs saturate.

For every module there is a deliberately broken copy, and its testbench
fails against that copy.

To run a test with Verilator:

    verilator --binary --timing -Irtl -Itb rtl/hmix_pkg.sv tb/tb_hmix_top.sv --top-module tb_hmix_top
    ./obj_dir/Vtb_hmix_top
