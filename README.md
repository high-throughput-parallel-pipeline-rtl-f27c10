# Parallel-pipeline 8x8 2-D DCT / IDCT processor

This is a streaming 8x8 two-dimensional discrete cosine transform and its
inverse, in SystemVerilog. Pixels or coefficients enter at one word per clock
cycle, and the results leave at the same rate. A new 8x8 block can start
every 64 cycles, with no gap between blocks. One control input selects the
forward or the inverse transform.

Most of the design runs at half the input rate:

- The 1-D transforms and the transpose memory handle two words per slow
  cycle, so all adders and multipliers in them run at fs/2.
- Only the normalisation multiplier, at the very edge of the datapath, runs
  at the full rate fs.
- The datapath has no general multipliers and no RAM. Constants are
  hardwired shift-and-add networks, and the transpose memory is eight
  flip-flop shift registers.

The inverse transform meets the IEEE Std 1180-1990 accuracy limits. The
measured figures are in [Accuracy](#accuracy).

## The factorisation behind the datapath

The 8-point DCT with its rows put in the order 0,4,2,6,1,5,3,7 (the
bit-reversed order) factors as

    S_R8 = P_R8 * J_R8
    J_R8 = blockdiag( J_SE4 * Q_R4 ,  J_O4B * J_O4C * J_O4D ) * Q_R8

- `P_R8 = 1/2 * diag(C4, C4, C2, C2, C1, C5, C5, C1)`, with
  `Ci = cos(i*pi/16)`. It holds all the irrational scale factors.
- `J_R8` holds only additions and three kinds of constant products.

The factors are sparse 4x4 or 8x8 matrices. Here `v` is the 4-point input of
a basic processor.

| factor | outputs for input v (forward) | symmetric? |
|---|---|---|
| Q_R8 | `x_j + x_{7-j}` (j=0..3), `x_{3-j} - x_{4+j}` | yes |
| Q_R4 | `v0+v3, v1+v2, v1-v2, v0-v3` | yes |
| J_SE4 | `v0+v1, v0-v1, T2*v2+v3, T2*v3-v2` | no |
| J_O4D | `v0, C4*(v2-v1), C4*(v1+v2), v3` | yes |
| J_O4C | `v0+v1, v0-v1, v3-v2, v2+v3` | yes |
| J_O4B | `T1*v0+v3, T5*v1+v2, T5*v2-v1, T1*v3-v0` | no |

The three ratios are `T1 = C7/C1`, `T2 = C6/C2` and `T5 = C3/C5`.

The inverse 1-D transform is `J_R8^t`. Its factors are the same matrices,
transposed and applied in reverse order. Four of them are symmetric, so only
J_SE4 and J_O4B need an F/I (forward/inverse) control. For those two, the
inverse just swaps the sign of the added term.

In two dimensions, with `x` the pixel block:

    forward:  X = K8 .* (J_R8 * x * J_R8^t)
    inverse:  x = J_R8^t * (K8 .* X) * J_R8
    K8(k,l)   = p(k) * p(l) / 4      (p = diagonal of 2*P_R8)

All normalisation is gathered into the element-wise product with K8. K8 has
only ten distinct values CiCj, held as 13-bit fractions of 8192. It is applied
once, to the output in the forward direction and to the input in the inverse.
The K8 stage can be dropped entirely if the surrounding codec folds it into
its quantisation tables. This RTL keeps it.

## Dataflow

    din -> [K8, inverse only] -> D-S => J_R8 => TB => J_R8 => U-S -> [K8, forward only] -> dout

`=>` is a pair of streams at fs/2, and `->` is one stream at fs.

**Down-sampler (`down_sampler`).** This stage re-issues each 8-word vector
as four pairs `(x_j, x_{4+j})`, one pair per slow cycle. It starts as soon as
word 4 has arrived. In the inverse direction it also reorders the
coefficients from natural order into the processor order 0,4,2,6 | 1,5,3,7.

**1-D processor (`jr8_proc`).**

- The processor is a double-input Q_R8 stage followed by two chains working
  in parallel:
  - the even chain: Q_R4, then J_SE4;
  - the odd chain: J_O4D, then J_O4C, then J_O4B.
- In the inverse direction, multiplexers reverse the order: J_SE4^t then Q_R4,
  J_O4B^t then J_O4C then J_O4D, and Q_R8 last.
- Every basic processor (`*_proc`) takes a 4-point vector as four serial words
  and returns four serial words, one per slow cycle. This lets the next
  processor consume them directly.
- Each basic processor has one arithmetic unit, busy in every slow cycle. The
  unit is a carry incrementer adder or a configurable hardwired multiplier.
- A basic processor has a latency of 5 slow cycles. The even chain is one
  processor shorter than the odd one, so a 5-cycle delay line balances the
  two.
- The whole 1-D processor takes 20 slow cycles, in either direction.

**Transpose buffer (`transpose_buffer`).** This stage stores the 64
intermediate words and returns them transposed. See the next section.

**Up-sampler (`up_sampler`).** This stage merges the two streams back into
one word per fast cycle, starting once three of the four pairs have arrived.
In the forward direction it restores the natural element order.

**Normalisation (`k8_multiplier`).** This stage multiplies every word by its
K8 constant.

The slow clock is a clock enable, `en2`, high on every other cycle of the
single clock. Every stream word carries a small tag (`dct_pkg::tag_t`):

- `v`: the word is valid;
- `sov`: the word is the first of a vector;
- `sob`: the word is the first of a block.

Each unit frames its work from these tags, so no central sequencer is needed.

## The transpose buffer

The transpose buffer is the least obvious part. It holds one 8x8 block in
eight shift registers SR0..SR7 of eight words each, and has no addressable
memory. The buffer is written and read in the same slow cycle. While block n
is written, block n-1 leaves it transposed, from the same registers. The
write direction alternates from block to block.

**Row mode (block written row-wise).**

- Vector j is written into SR_j.
- The register acts as two 4-word halves: elements 0..3 come from the first
  stream and elements 4..7 from the second.
- During these four cycles only SR_j shifts (write select W_j is one-hot).
- The two half-ends of SR_j are read at the same time. They hold column j of
  the previous block, which was written column-wise.

**Column mode (block written column-wise).**

- In the i-th cycle of every vector, SR_i and SR_{i+4} each shift in one word
  as 8-word chains: element i goes into SR_i and element i+4 into SR_{i+4}.
- After 32 cycles, SR_i holds column i and SR_{i+4} holds column i+4.
- In the same cycles, the chain ends of SR_i and SR_{i+4} are read. They hold
  the previous block's row i, stored row-wise, as two halves.

Reading a register while shifting into it frees each word exactly when a new
one needs its place. The output is therefore a continuous stream of
transposed blocks, in the same two-stream format as the input.

A 5-bit counter decodes the write selects W_1..W_8 and the read selects
R_1..R_3 for the 32 cycles of a block. The `sob` tag re-synchronises this
counter.

The output is registered. Vector k of a block leaves 33 slow cycles after
vector k of that block entered.

## Arithmetic units

**Carry incrementer adder (`cia`).**

- A 20-bit adder made of ripple-carry blocks of 2, 3, 4, 5 and 6 bits, from
  the least significant end.
- Each block adds with carry-in 0.
- An incrementer then adds the true incoming carry. The incrementer is an
  AND chain over the block's sum bits, XORed into them.
- The block carry-out is `c0_block | (all sum bits & c_in)`. This gives O(n)
  area and a delay that grows roughly with sqrt(n).

**Double carry incrementer adder (`dcia`).**

- The same block structure as the CIA, but the increment between blocks can
  be 0, 1 or 2.
- It serves as the final adder with rounding.

**Rounding final adder (`round_adder`).**

- A multiplier produces its result in carry-save form, as two words `a` and
  `b`. This adder drops the low DROP bits of `a + b` with round-half-up.
- A carry generator finds the carry `c` out of the bits below the first
  dropped bit, A/B (the first dropped bits of `a` and `b`).
- The rounding half, added at that bit, turns A, B and `c` into an increment:
  - +1 when `A | B | c`;
  - +2 when `A & B & c`.
- The DCIA applies this increment to the kept bits.

**Hardwired multipliers (`hwmul_t1t5`, `hwmul_t2`, `hwmul_c4`).**

- Each computes `P = di * coefficient +/- dj` with 12-bit coefficients:

  | coefficient | value | signed-digit form |
  |---|---|---|
  | T1 | 815/4096 | `3*2^-4 + 3*2^-8 - 2^-12` |
  | T5 | 6130/4096 | `3*2^-1 - 2^-8 + 2^-11` |
  | T2 | 1696/4096 | `2^-2 + 2^-3 + 2^-5 + 2^-7` |
  | C4 | 2896/4096 | `2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8` |

- For T1 and T5, the multiple 3x is formed first in a CIA.
- `hwmul_t2` also offers the coefficient 1, which makes it a plain
  adder/subtracter. J_SE4 needs this for its first two rows.
- The shifted terms and the addend are reduced by a carry-save tree
  (`csa_tree`, 3:2 compressors). The rounding final adder then brings the
  result back to 20 bits.

**Normalisation multiplier (`k8_multiplier`).** This unit runs at the full
rate, one word per cycle, in 17 pipeline stages:

1. **Constant select.** A 6-bit position counter, restarted by `sob`, picks
   the constant. Word n of a block gets
   `p(frequency n%8) * p(position n/8)`. The same rule holds for the
   column-wise forward output and the inverse input.
2. **Booth decoder.** The 13-bit constant is recoded into seven radix-4
   digits in {-2..2}. The input is pre-shifted left by `24 - shift`, so the
   final adder can always drop 24 bits. The +1 corrections of the negative
   digits form the initial carry-save word.
3. **Seven carry-save stages (3-9).** Each stage adds one partial product to
   the running sum and carry with a row of 3:2 compressors.
4. **Final adder (stage 10).** The rounding final adder (carry generator plus
   DCIA).
5. **Delay line (stages 11-17).** A short delay line completes the 17 cycles.

## Fixed-point format

- All internal words are 20-bit two's complement.
- The binary point differs by direction:
  - forward: 4 fractional bits (`FRAC`). The largest unnormalised 2-D value,
    about `9.23^2 * 256`, still fits.
  - inverse: 7 fractional bits (`FRAC_I`). Inverse values are smaller, and
    the IEEE 1180 limits need the extra precision.
- The K8 multiplier performs the format change. It shifts right by
  `2 + 13 + FRAC` in the forward direction and by `2 + 13 - FRAC_I` in the
  inverse.
- Forward output is saturated to 12 bits.
- Inverse output is rounded half away from zero and saturated to 9 bits
  ([-256, 255]).
- Every multiplier output is rounded, never truncated. This is what lets a
  20-bit datapath pass the accuracy test.

## Interface and timing (`dct2d_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock fs; one word per cycle |
| `rst_n` | in | 1 | synchronous active-low reset |
| `fwd` | in | 1 | 1: forward DCT, 0: inverse; change only when the pipeline is empty |
| `in_valid` | in | 1 | high for the 64 words of a block |
| `din` | in | 12 | DCT: signed 9-bit pixel in bits [8:0]; IDCT: signed 12-bit coefficient |
| `blk_sync` | out | 1 | high in the cycle where the first word of a block must be presented |
| `out_valid` | out | 1 | output word valid |
| `out_sob` | out | 1 | first output word of a block |
| `dout` | out | 12 | DCT: 12-bit coefficient; IDCT: 9-bit pixel, sign-extended |

A free-running 64-cycle counter defines the block slots, and `blk_sync`
marks each slot start. The caller aligns a block's first word with
`blk_sync` and keeps `in_valid` high for 64 cycles. The next block may follow
immediately.

**Data order.**

- **DCT input:** pixels row by row, `x(0,0..7), x(1,0..7), ...`.
- **DCT output:** column by column. The columns (horizontal frequency l) come
  in the order 0,4,2,6,1,5,3,7, and within a column the vertical frequency k
  runs 0..7.
- **IDCT input:** coefficients in exactly the DCT output layout.
- **IDCT output:** pixels row by row.

So a DCT followed by an IDCT is a straight pipe. A codec that wants natural
column order must reorder outside this block.

**Latency** is measured from the first input word to the first output word:

| direction | latency (cycles) | stage breakdown (cycles) |
|---|---|---|
| DCT | 176 | D-S 7 + J_R8 40 + TB 66 + J_R8 40 + U-S 5 + K8 17 + output register 1 |
| IDCT | 177 | K8 17 + D-S 8 + J_R8 40 + TB 66 + J_R8 40 + U-S 5 + output register 1 |

The D-S starts issuing pairs as soon as word 4 of a vector is stored. Its
figure depends on the Clk2 phase, which differs between the two directions.
The U-S starts serialising once pair 2 is stored.

Throughput is one block per 64 cycles in both directions.

## Accuracy

`tb/ieee1180_idct_tb.sv` runs the procedure of IEEE Std 1180-1990 in full.
It uses six sets of 10,000 random blocks, with its own `$urandom` generator
rather than the standard's.

| pixel range | peak err | PMSE (<0.06) | OMSE (<0.02) | PME (<0.015) | OME (<0.0015) |
|---|---|---|---|---|---|
| [-256,255] | 1 | 0.0191 | 0.0142 | 0.0033 | 0.00000 |
| [-256,255] negated | 1 | 0.0173 | 0.0141 | 0.0046 | 0.00017 |
| [-300,300] | 1 | 0.0154 | 0.0130 | 0.0030 | 0.00014 |
| [-300,300] negated | 1 | 0.0168 | 0.0131 | 0.0029 | 0.00012 |
| [-5,5] | 1 | 0.0120 | 0.0100 | 0.0030 | 0.00014 |
| [-5,5] negated | 1 | 0.0127 | 0.0101 | 0.0021 | 0.00002 |

An all-zero block returns all zeros.

The forward transform stays within 1 of the rounded double-precision DCT in
`tb/dct2d_top_tb.sv`.

## Where this RTL departs from the original chip

- **Latency.** The original chip quotes 172 cycles for the DCT and 178 for
  the IDCT, split into 45 + 63 cycles and 67 + 47 cycles for the two 1-D
  halves. This RTL needs 176 and 177 cycles. Counting the transpose buffer
  separately, its 1-D halves take 47 + 63 forward and 65 + 46 inverse. The
  transpose buffer takes 66 cycles here, because its read-while-shift output
  is registered.
- **Transpose-buffer word width.** The original describes the buffer's shift
  registers as 16 bits wide, while the datapath is 20 bits. A 16-bit store
  with this fixed-point format failed the IEEE 1180 inverse test in
  simulation, so the buffer stores full 20-bit words by default. The
  parameters `TB_W` and `TB_SHIFT` still allow a narrower store: with
  `TB_W=16, TB_SHIFT=1`, every forward-transform intermediate still fits.
- **Clocking.** The original uses a second clock at fs/2 and multiplexer
  select signals at fs/4 and fs/8. Here the slow clock is a clock enable,
  and the selects come from the stream tags.
- **Basic processor internals.** The basic processors keep the serial-4
  in/out format and one busy arithmetic unit each. Their register placement
  is this design's own. As a result, the 1-D processor uses five adders and
  three hardwired multipliers:
  - two adders in Q_R8;
  - one adder each in Q_R4, J_O4C and J_O4D;
  - one multiplier each in J_SE4, J_O4D and J_O4B.
  The original counts six adders and three multipliers.
- **Multiplier trees.** The trees use 3:2 compressors rather than 4:2/5:3
  compressors. The constant multipliers are combinational, and each basic
  processor's output register is their pipeline register.
- **K8 multiplier.** This RTL uses plain radix-4 Booth recoding. The original
  optimises its Booth decoder by sharing common terms among the ten
  constants, which this RTL does not do. The 17-cycle latency is kept, but
  seven of its cycles are a plain delay after the final adder.
- **Physical design.** Process, standard cells, pads and layout are outside
  the RTL.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends, and has a watchdog. With Verilator 5:

    verilator --binary --timing -Irtl -y rtl rtl/dct_pkg.sv tb/dct2d_top_tb.sv \
              --top-module dct2d_top_tb -o sim
    ./obj_dir/sim

To run another testbench, replace the testbench file and top module.

- `tb/dct2d_top_tb.sv` is the end-to-end test, with every parameter at its
  default. It streams 12 forward blocks back to back, switches F/I, and
  streams 12 inverse blocks. It checks every output word, the latency and
  the throughput.
- It also counts each mechanism and fails if one never occurs:
  - forward and inverse blocks;
  - transpose-buffer blocks written row-wise and column-wise;
  - back-to-back blocks;
  - the F/I switch;
  - output clipping.
- `tb/ieee1180_idct_tb.sv` is the 60,000-block accuracy test. It runs in
  about 10 s.
- The unit testbenches `tb/<module>_tb.sv` compare each block against an
  independent model written in the testbench:
  - the adders are checked against the `+` operator, on corner cases whose
    carries run through every block and on random 20-bit operands;
  - each processor is checked against its matrix. The 1-D processor is
    checked against a DCT matrix computed from cosines, within 4 LSB;
  - the transpose buffer is checked against a transposed copy;
  - the K8 multiplier is checked against `round(x * K8)`.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | widths, stream tag type, coefficient constants, K8 table |
| `rtl/dct2d_top.sv` | top level: slot counter, K8 placement, output rounding |
| `rtl/jr8_proc.sv` | 1-D J_R8 / J_R8^t processor |
| `rtl/qr8_proc.sv`, `rtl/qr4_proc.sv`, `rtl/jse4_proc.sv`, `rtl/jo4b_proc.sv`, `rtl/jo4c_proc.sv`, `rtl/jo4d_proc.sv` | basic processors |
| `rtl/ser4_frame.sv` | shared serial-in / serial-out framing of the basic processors |
| `rtl/transpose_buffer.sv` | shift-register transpose buffer |
| `rtl/down_sampler.sv`, `rtl/up_sampler.sv` | rate conversion fs <-> two streams at fs/2 |
| `rtl/k8_multiplier.sv` | pipelined Booth normalisation multiplier |
| `rtl/hwmul_t1t5.sv`, `rtl/hwmul_t2.sv`, `rtl/hwmul_c4.sv` | hardwired constant multipliers |
| `rtl/csa_tree.sv` | carry-save (3:2) reduction tree |
| `rtl/cia.sv`, `rtl/dcia.sv`, `rtl/round_adder.sv` | carry incrementer adder, double carry incrementer adder, rounding final adder |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `ieee1180_idct_tb.sv` |
