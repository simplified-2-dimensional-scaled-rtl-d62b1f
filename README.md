# S2DS min-sum LDPC decoder

An iterative decoder for low-density parity-check (LDPC) codes. It uses the
*simplified 2-dimensional scaled* (S2DS) min-sum rule in its check nodes.
Plain min-sum overestimates the check-to-variable messages. Scaled variants
fix that by multiplying the message by a factor below one, and the
2-dimensional variant uses two factors: one for the smallest input
magnitude (min1) and one for the second smallest (min2). S2DS makes that
correction cheap:

* The two factors are 0.75 for min1 and 0.875 for min2. Both can be made
  from shifts and adds.
* 0.875·min2 is replaced by 0.75·min1 + Δmin, where Δmin = min2 − min1.
  This works because min1 and Δmin tend to be of similar size.

So a check node needs one shift-and-add scaling unit (for 0.75·min1), one
subtraction (for Δmin) and one addition. It never multiplies.

The RTL is written in SystemVerilog (IEEE 1800-2017). It is synthesizable,
and every module has a self-checking testbench that runs under Verilator.

## The check-node rule

For check node *j*, with incoming variable-to-check (VTC) messages
L(i→j), the decoder computes:

| quantity | how |
|---|---|
| sign of the message to edge i | XOR of all input signs, XORed with the sign of input i |
| min1, index of min1 | smallest \|L(i→j)\|; ties go to the lowest edge position |
| min2 | second smallest \|L(i→j)\| (equal to min1 if the minimum occurs twice) |
| m1s | floor(0.75·min1), computed as (min1 + min1>>1) >> 1 |
| Δmin | min2 − min1 |

The check node stores and sends only **{signs, index of min1, m1s, Δmin}**.
This is the compressed check-to-variable (CTV) message. Edge *i* then
receives this magnitude:

```
|L(j→i)| = m1s + Δmin   if i is the min1 edge      (stands in for 0.875·min2)
|L(j→i)| = m1s          otherwise                   (0.75·min1)
```

m1s + Δmin = min2 − min1/4 (up to truncation). It is never larger than min2,
so it never overflows the message width.

The 0.75 factor is evaluated as (x + x/2)/2 instead of x/2 + x/4. It is still
two shifts and one adder, but the adder keeps one extra bit, so the result is
exactly floor(3x/4). Truncating x/2 and x/4 separately can lose more than one
LSB: for x = 3 it gives 1 where 0.75·3 = 2.25.

## Number formats

| what | format |
|---|---|
| channel LLR F, VTC and CTV messages | Q2.3: 5 magnitude bits (2 integer, 3 fraction) plus a sign. The range is kept symmetric, −31…+31 in LSBs (±3.875) |
| min1, min2, m1s, Δmin | 5-bit unsigned |
| a-posteriori sum z | full width, 6 + ⌈log2(d_v+1)⌉ bits, so it never overflows |

* The variable node passes messages on in two's complement. The check node
  works on sign-magnitude; `s2ds_pkg::to_sm` and `s2ds_pkg::from_sm` convert
  between the two.
* VTC messages are saturated to ±31. They do not wrap around.
* A zero counts as positive. The hard decision is 1 exactly when z < 0.
* The channel LLR is taken straight from the received value (F = y, as
  min-sum allows). It is quantized to Q2.3 before it reaches the decoder.

## Decoder architecture and timing

`s2ds_decoder` is fully parallel and uses a flooding schedule: it runs **one
complete iteration per clock cycle**. It has one check-node unit per row of H
and one variable-node unit per column, wired together at elaboration time
from the matrix parameter.

The only state is the compressed CTV message of each check node (registers),
plus the loaded F values and an iteration counter. Everything else is
combinational from those registers: CTV expansion, the variable-node sums,
the hard decisions and the syndrome.

```
           +--------------------- compressed CTV registers ----------------------+
           |  {signs, idx, 0.75*min1, dmin} per check node                       |
           v                                                                     |
   s2ds_ctv_expand (per edge) --> s2ds_vnu (per bit) --VTC--> s2ds_cnu (per check)+
                                   |  z, hard decision
                                   v
                             s2ds_syndrome --> stop?   (all parities 0, or 20 iterations)
```

Decoding runs as follows:

1. `start_i` loads F and clears the stored CTV messages. The first VTC
   messages are therefore F itself.
2. On each following clock edge the decoder does one of two things:
   * It stops if at least one iteration has run and the syndrome H·ĉᵀ of
     the current hard decisions is zero, or if `MAX_IT` (20) iterations have
     run. It then latches the result and pulses `done_o`.
   * Otherwise it stores the new check-node outputs, which is one iteration.

### Ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start_i` | in | 1 | start a frame; only while `busy_o` is low (an assertion checks this) |
| `llr_i` | in | N × 6 | channel LLRs, Q2.3 two's complement; sampled on the start edge |
| `busy_o` | out | 1 | decoding in progress |
| `done_o` | out | 1 | one-cycle pulse; the outputs below stay valid until the next start |
| `codeword_o` | out | N | decoded hard decisions, bit c = column c of H |
| `iter_o` | out | ⌈log2(MAX_IT+1)⌉ | iterations run, 1…MAX_IT |
| `parity_ok_o` | out | 1 | the syndrome of `codeword_o` is zero |

**Latency:** `done_o` rises `iter_o` + 1 clock edges after the edge that
sampled `start_i`. A new frame can be started in the cycle after `done_o`.
Assertions check that `done_o` lasts a single cycle and that the iteration
counter never passes `MAX_IT`.

## Giving the parity-check matrix

H is described in quasi-cyclic form, which is how the IEEE 802.11n/ad codes
are specified. It takes four parameters:

* `Z`: the block size.
* `MB`: the number of block rows. There are M = MB·Z checks.
* `NB`: the number of block columns. There are N = NB·Z code bits.
* `SHIFT[MB][NB]`: one entry per block.
  * −1 is an all-zero block.
  * s ≥ 0 is the Z×Z identity matrix cyclically shifted by s. Row *a* of the
    block has its 1 in column (a + s) mod Z.

Any matrix can be written with `Z = 1` and 0/−1 entries. The default is the
4×6 textbook example, written that way:

```
H = 1 0 0 1 0 0        SHIFT = '{'{ 0,-1,-1, 0,-1,-1},
    0 1 0 0 1 0                  '{-1, 0,-1,-1, 0,-1},
    1 0 1 0 1 0                  '{ 0,-1, 0,-1, 0,-1},
    0 0 1 0 0 1                  '{-1,-1, 0,-1,-1, 0}}
```

Rows and columns may have different weights (irregular codes). Each unit is
sized to its own degree. Every row and column must contain at least one 1.

With Verilator, pass an array override through a named localparam, as
`tb/tb_s2ds_decoder_qc.sv` does (`.SHIFT(QC_SHIFT)`). An inline `'{...}`
pattern is checked against the default dimensions.

## Modules

| file | role |
|---|---|
| `rtl/s2ds_pkg.sv` | widths (Q2.3), the 20-iteration limit, the sign-magnitude message type, conversions |
| `rtl/s2ds_two_min.sv` | min1, min2 and the index of min1, by a tournament over inputs padded to a power of two |
| `rtl/s2ds_scale075.sv` | the 0.75 shift-and-add scaler |
| `rtl/s2ds_cnu.sv` | check-node unit: signs, two-minimum finder, scaler, Δmin |
| `rtl/s2ds_ctv_expand.sv` | turns a compressed CTV message into one edge's signed message |
| `rtl/s2ds_vnu.sv` | variable-node unit: z = F + ΣCTV, extrinsic VTC = z − CTV (saturated), hard decision |
| `rtl/s2ds_syndrome.sv` | H·ĉᵀ and the all-zero flag, for the same quasi-cyclic description |
| `rtl/s2ds_decoder.sv` | top level: graph wiring, message registers, iteration control |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_s2ds_two_min` | 6- and 5-input finders against a linear scan; ties, padding, random inputs |
| `tb_s2ds_scale075` | all 32 inputs: floor(3x/4), and within one LSB of 0.75x |
| `tb_s2ds_cnu` | extrinsic signs, index, m1s, Δmin, against the min-sum equations |
| `tb_s2ds_ctv_expand` | all (min1, min2) pairs, min1 edge and other edges, both signs |
| `tb_s2ds_vnu` | sums, hard decision, saturation in both directions |
| `tb_s2ds_syndrome` | all 64 vectors of the example code (which has exactly 4 codewords) |
| `tb_s2ds_decoder` | default build, end to end (see below) |
| `tb_s2ds_decoder_qc` | a (3,6)-regular code with N = 408, M = 204, end to end (see below) |

### End-to-end tests

**`tb_s2ds_decoder`** runs the default build with no parameter overrides.
It decodes 4000 frames. Each frame is a random codeword sent through a
BPSK/AWGN channel, at five noise levels.

**`tb_s2ds_decoder_qc`** uses a (3,6)-regular code with N = 408 and M = 204.
This is a common size and degree profile for regular test codes, but the
matrix is this design's own: 3×6 circulant blocks with Z = 68 and shifts
chosen so that the graph has no 4-cycles. The testbench sends the all-zero
codeword at Eb/N0 = 1.0…3.0 dB.

Both tests compare the RTL with a behavioural model in
`tb/s2ds_ref_pkg.sv`. That model is written edge by edge from the equations
and shares no code with the RTL. For every frame the tests check:

* the codeword
* the iteration count
* the parity flag
* `busy_o`
* the exact latency

Both tests also fail unless each of these mechanisms happened at least once:

* early stop on a zero syndrome
* stop at the iteration limit
* VTC saturation
* the m1s + Δmin magnitude on a min1 edge
* a frame whose channel decisions failed parity but which decoded to a codeword

The QC test prints the error counts per SNR point. It also prints the mean
magnitudes of min1, min2 and Δmin, which show how well the min1 ≈ Δmin
assumption holds. In one run of 40 frames per point:

* Errors fell from 32 failed frames at 1.0 dB to none at 2.5 and 3.0 dB.
* The mean min1 was 0.49 to 0.68 LLR units and the mean Δmin about 0.45. Its Verilator build takes
about a minute, because the design is fully parallel.

To run a testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/s2ds_pkg.sv tb/s2ds_ref_pkg.sv tb/tb_s2ds_decoder.sv \
    --top-module tb_s2ds_decoder -o sim
./obj_dir/sim
```

For a testbench that does not use the reference model, leave out
`tb/s2ds_ref_pkg.sv`.

## Choices and limits

These are the design's own decisions where the algorithm leaves freedom.
Check them before reuse:

* **Architecture.** The algorithm does not fix one. Fully parallel flooding
  at one iteration per cycle is simple and fast, but its area grows with N.
  A 672-bit code needs 672 variable-node units and up to 336 check-node
  units. A partially parallel (layered or folded) version would reuse the
  same `s2ds_cnu`, `s2ds_ctv_expand` and `s2ds_vnu`.
* **Two-minimum finder.** This is a tournament. A comparator tree finds min1.
  Multiplexers then pick the log2(d_c) values that met min1 on its way up,
  and a second small tree finds min2 among them. For power-of-two d_c that is
  d_c + log2(d_c) − 2 comparisons. The two stages are in series, which
  lengthens the combinational path. A merge tree that tracks (min1, min2)
  at every node would be faster but needs more comparators.
* **Stored signs.** The signs field holds each edge's outgoing sign.
* **Δmin width.** Δmin is kept at 5 bits, the same as the other messages.
  Narrower Δmin formats cost decoding performance.
* **Rounding and saturation.** Truncation in the scaler and clamping to ±31
  in the variable node are choices of this design.
* **Stopping.** The syndrome is checked only after each iteration, never on
  the raw channel decisions. A frame therefore always takes at least one
  iteration.
* **Codes.** The standard codes this decoder targets (IEEE 802.11ad N = 672
  at rates 1/2, 5/8, 3/4, 13/16, and IEEE 802.11n N = 1296/1944) are not
  included, because their base matrices are not reproduced here. Enter them
  as `Z`/`SHIFT` parameters. The 672-bit codes use Z = 42 with 16 block
  columns.
* **Not included.** The decoder has no check-node variant with the exact
  0.875·min2 product. That variant would time-share one shift-and-add unit
  between min1 and min2, but S2DS makes it unnecessary. Runtime switching
  between code rates is also left out: a multi-rate decoder could still use
  the same single 0.75 unit, because the S2DS scaling does not depend on the
  rate.
* **The QC test code.** The N = 408 code of `tb_s2ds_decoder_qc` is a
  structured stand-in, so its error rates are not comparable to published
  curves for other (408,204) codes. Its frame counts are also far too small
  for BER measurements. It checks bit-exactness, not coding gain.
