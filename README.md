# Bit-serial floating-point neural network (2-15-1, IEEE-754 single precision)

This is a small feed-forward neural network in hardware. It takes two inputs, has
15 hidden neurons and one output, and does all of its arithmetic in IEEE-754
single precision. The network classifies iris flowers from petal length and
petal width. Its main idea is to do every floating-point multiplication on a
bit-serial significand multiplier instead of an array multiplier. An array
multiplier for the 24-bit significands needs 24 x 24 AND gates and about as
many full adders. The bit-serial one has one AND gate and one full adder per
bit of the parallel operand (24 of each). It takes one bit of the other
operand per clock cycle. The network has 45 multipliers, so area and switching
power drop a great deal. The price is 24 cycles per multiplication.
Floating point was chosen over fixed point so that trained weights can be used
as they are, without rescaling or re-quantising, and with a wide dynamic range.

The design is after "VLSI Implementation of Neural Network" by J. R. Shinde and
S. Salankar. The structure and the block names follow that design. Some of the
RTL is this design's own: the sequencing, the sample table, the default
weights and several corrections to the arithmetic. Those choices are listed in
[How far this follows the original](#how-far-this-follows-the-original).

## Data flow

```
            in1 (petal length)                     in2 (petal width)
                 |                                        |
      fsf1: 15 x fp_mul_bs  (in1 * FW11[i])   fsf2: 15 x fp_mul_bs (in2 * FW22[i])
                 |  p1[i]                                 |  p2[i]
                 +--------------> fsfas1: 15 x fp_add <---+
                                        |  h[i] = p1[i] + p2[i]
                               fsf3: 15 x fp_mul_bs (h[i] * FW33[i])
                                        |  p3[i]
                               fsfas2: chain of 14 fp_add
                                        |  ((p3[0]+p3[1])+p3[2])+...
                                     Q register (lc3)
```

The network computes `Q = sum_i FW33[i] * (FW11[i]*in1 + FW22[i]*in2)`. Each
operation is rounded as the blocks below describe. The hardware has no
activation function and no bias input. The network is therefore linear in its
inputs, and its weights act only through the two products
`sum FW33*FW11` and `sum FW33*FW22`. The weights are module parameters
(`bsfnn1.FW11/FW22/FW33`), one IEEE-754 word per neuron.

Top level `bsfnn1_test1` contains:

| instance | module | job |
|---|---|---|
| `u_fsm` | `fsm_bsfnn2` | controller: load and step enables, serial bit index |
| `u_gen` | `framgen1` | sample table, one (length, width) pair at a time |
| `u_cnt` | `cnt81` | 8-bit count of outputs produced (`val`) |
| `u_nn` | `bsfnn1` | the network above |

Top ports: `clk`, `rst` (synchronous, active high), `Q[31:0]` (network output)
and `val[7:0]`. When `Q` is updated, `val` increments on the same edge. After
the k-th output, `val = k` and `Q` belongs to sample k (1-based). Samples 1-50
are setosa, 51-100 versicolour and 101-150 virginica.

## The bit-serial significand multiplier (`bs_mul24`)

This is the part that needs the most care. Operand `b` (24 bits) is held in
parallel. Operand `a` arrives on `a_bit`, least significant bit first, one bit
per `step`. Bit position i is a cell with one AND gate (`pp[i] = b[i] & a_bit`)
and one full adder. The cell has a sum register `s[i]` and a carry register
`c[i]`. In each step, cell i adds three bits:

* its partial-product bit `pp[i]`;
* the previous sum of cell i+1, `s[i+1]`, because the partial sum moves one
  place right per step;
* its own previous carry, `c[i]`, which has the weight of bit i+1 in the old
  frame and so the weight of bit i after the shift.

No carry ripples across cells within a cycle. The critical path is one AND gate
and one full adder, whatever the width.

The new sum of cell 0 is a finished product bit. It is shifted into `lo` from
the top, so after 24 steps `lo` holds product bits 23..0. The upper half is
still split between `s` and `c`. A single 24-bit adder resolves it
combinationally: `hi = (s >> 1) + c`. The output is `p = {hi, lo}`. The
invariant behind this: before a step the pending value is
`V = sum s[i]*2^i + sum c[i]*2^(i+1)`. A step turns it into
`a_bit*b + (V - s[0]) / 2`, and the dropped `s[0]` is the product bit already
emitted.

Timing rules:

* `clr` (the multiplier's `load`) clears `s`, `c` and `lo`.
* Exactly 24 steps must follow, with the bits in order.
* `p` is valid from the next cycle until the next `clr`.
* A 25th step would shift the result. The controller stops at 24.

## Floating-point multiplier (`fp_mul_bs`)

`load` captures `a` (the serial operand) and `b` (the parallel operand, the
weight). During each step, `sel` selects which significand bit of the captured
`a` goes into the core. The controller counts `sel` from 0 to 23. The rest of
the multiplier is combinational around the core:

1. `unpack_fp` (x2): sign, exponent, and a 32-bit significand
   `{hidden bit, fraction, 8'b0}`. It also flags infinity, NaN and zero.
   Denormal inputs are classed as zero.
2. `fp_mul_logic`: NaN if either input is NaN or for infinity x zero. Otherwise
   infinity if either input is infinite. Otherwise zero if either input is
   zero.
3. `exp_adder`: `ea + eb - 127`, as a signed 10-bit value.
4. `bs_mul24`: the 48-bit significand product.
5. `fp_normalize` (48 bits in): the product lies in [1,4). If it is 2 or more,
   it moves one place right and the exponent goes up by one. The result is a
   28-bit significand: leading one at bit 26, fraction at 25..3, two more bits,
   and a sticky bit at 0.
6. `fp_round`: if bit 2 is set, add one at bit 3, then clear bits 2..0. This is
   round-half-up. It differs from IEEE round-to-nearest-even only on exact
   ties.
7. `fp_normalize` again (28 bits in): handles the case where rounding carried
   into bit 27.
8. `pack_fp`: applies the class flags. Exponent >= 255 gives infinity.
   Exponent <= 0 or a zero significand gives a signed zero (underflow is
   flushed). NaN is `0x7FC00000`.

Latency: 1 load cycle plus 24 step cycles. The result holds until the next load.

## Floating-point adder (`fp_add`)

The adder is combinational and built from the blocks of the original adder:

| block | job |
|---|---|
| `bigfp_fps` | `big_op` = operand of larger magnitude, `small_op` = the other |
| `absdiff1` | larger exponent, absolute exponent difference |
| `decsel1` | implicit bit added to `small_op` (24 bits); shift amount clamped to 24 |
| `barrel_shift_r` | aligns `small_op`'s mantissa (5-stage log shifter) |
| `intadd23` | 24-bit add, or subtract by two's complement, when the signs differ; 25-bit result |
| `readj_m1` | leading-one search; renormalizes and outputs the exponent correction `onethloc` with its direction `addsub` |
| `expadder1` | big exponent +/- correction, underflow and overflow flags |

The result takes `big_op`'s sign. Bits shifted out during alignment are
dropped. There is no rounding stage, so a sum can be up to about one unit in
the last place below the exact result. Special cases work as follows:

* NaN in, or infinities of opposite sign, gives NaN.
* An infinite operand is passed on.
* A zero or underflowing result gives +0.
* Overflow gives infinity.

`fsfas2` adds its 15 inputs in a fixed chain order. Floating-point addition is
not associative, so this order is part of the specified result.

## Control and timing (`fsm_bsfnn2`)

One sample takes 51 cycles:

| cycle in period | signals | effect |
|---|---|---|
| 0 | `lc1` | stage-1 multipliers (fsf1, fsf2) capture `in1`/`in2`, cores cleared |
| 1-24 | `clk1`, `sel1 = 0..23` | stage-1 serial steps |
| 25 | `lc2` | stage-2 multipliers (fsf3) capture the hidden sums |
| 26-49 | `clk2`, `sel2 = 0..23` | stage-2 serial steps |
| 50 | `lc3`, `clk_data` | `Q` loads; sample generator and counter advance |

`clk1`, `clk2` and `clk_data` keep the names of the original controller's
outputs. Here they are one-cycle clock enables of the single clock `clk`, not
derived clocks, so the whole design is synchronous, resets included. The two
stages run one after the other and are not overlapped. A full pass over the
150 samples takes 7650 cycles.

## Sample table and weights

`framgen1` holds 150 pairs of petal length and petal width, in cm, as
IEEE-754 words. A constant function computes the table at elaboration, so no
data file is needed and the ROM synthesizes. The pairs come in groups of 50
per species. Each value is a whole number t of tenths of a centimetre, drawn
from the species' typical range:

| species | length (cm) | width (cm) |
|---|---|---|
| setosa | 1.0-1.9 | 0.1-0.6 |
| versicolour | 3.0-5.1 | 1.0-1.8 |
| virginica | 4.5-6.9 | 1.4-2.5 |

The draws come from the linear congruential generator
`x <- 1664525*x + 1013904223` (seed 1), with
`t = low + (x >> 16) mod (high - low + 1)`. Each t is stored as the correctly
rounded single-precision value of t/10.
These values stand in for the measured iris data set. They are not its
published measurements. To run real data, replace `gen_table` in `framgen1`
with a table of measured values.

The default weights are not trained values either:

* FW11 and FW22 are arbitrary values of either sign in +-[0.1, 1.5].
* FW33 is the minimum-norm solution that makes the network compute
  `Q ~ 0.5835*length - 0.1836*width`. That is the least-squares linear map,
  with no offset, of the species' mean petal dimensions to 1, 2 and 3.

On the sample table, the mean outputs are about 0.78, 2.09 and 2.84 for the
three species. To use trained weights, override the three parameters of
`bsfnn1`.

## How far this follows the original

Taken from the original design:

* the 2-15-1 structure, and the multiplier banks and adder banks with their
  names and widths;
* IEEE-754 single precision throughout;
* the bit-serial multiplier with 24 AND gates on a 24-bit bus;
* the steps of the multiplier: unpack, class logic, exponent adder, normalize,
  the bit-2 rounding rule, normalize, pack;
* the block split of the adder and the behaviour of each block;
* the top-level blocks (controller, sample generator, 8-bit counter) with their
  port names.

This design's own choices, or departures from the original:

* **Operand order in the adder.** The original orders the two addends by signed
  value. When the signs differ, that can send the operand with the smaller
  exponent down the unshifted path, which gives wrong sums. `bigfp_fps` here
  orders by magnitude.
* **The mantissa adder** is read as adding the implicit bit on both operands.
  Because of the magnitude ordering its difference is never negative, so no
  final complement is needed.
* **Denormals** are flushed to zero on input and on output.
* **The adder** truncates and has no rounding stage, as in the original block
  structure.
* **Cell arrangement.** The carry-save cell arrangement of `bs_mul24`, and
  keeping the low half of the product for rounding, are choices made here. The
  original shows only a 4-bit example whose register placement cannot be
  recovered in full.
* **Operand roles.** The data word is the serial operand and the weight the
  parallel one. In stage 1, one input therefore feeds 15 multipliers. `sel` is
  used as the serial bit index.
* **The controller's schedule** (51 cycles, stages not overlapped) is this
  design's. The original controller is given only by name and ports. Two
  network inputs of the original, `clk3` and `sel3`, have no known function and
  are left out. `lc3` loads the output register.
* **Hidden layer.** There is no activation function, matching the original
  network's block diagram; the weights were trained in software with a sigmoid
  hidden layer.
* **Weights and sample data** are stand-ins, as described above.
* **Not built.** The array-multiplier network and the digit-serial multiplier
  served only as comparisons and are not built. The original adder's
  schematic also shows a block named `fnd_one` whose function is not
  described; leading-one detection lives in `readj_m1` here.

Synthesis with a generic flow gives about 5,000 word-level cells and 3,800
flip-flop bits for the whole top level. The stage-1 capture registers of the
15 lanes that share an input merge into one.

## Files

`rtl/`, one module or package per file:

* `fp_pkg` (types, constants)
* `unpack_fp`, `fp_mul_logic`, `exp_adder`, `bs_mul24`, `fp_normalize`,
  `fp_round`, `pack_fp`, `fp_mul_bs`: the multiplier
* `bigfp_fps`, `absdiff1`, `decsel1`, `barrel_shift_r`, `intadd23`,
  `readj_m1`, `expadder1`, `fp_add`: the adder
* `fsf`, `fsfas1`, `fsfas2`, `bsfnn1`: the network
* `fsm_bsfnn2`, `framgen1`, `cnt81`,
  `bsfnn1_test1` (top)

`tb/`:

* `fp_ref_pkg` is an independent integer model of the multiplier and adder
  rules, plus the network (`ref_net`). It also counts how often each arithmetic
  case occurs.
* Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
  They are `tb_bs_mul24`, `tb_fp_mul_bs`, `tb_fp_add`, `tb_fsf`, `tb_fsfas`,
  `tb_fsm_bsfnn2`, `tb_framgen1`, `tb_cnt81`, `tb_bsfnn1` and
  `tb_bsfnn1_test1`.
* `tb_bsfnn1_test1` runs the full-size top through all 150 samples and the
  wrap-around. It checks every output bit-exactly, checks the 51-cycle output
  period, and checks that the species outputs are ordered. It also requires
  that every arithmetic case occurs in the data, except the rare rounding
  carry, which `tb_fp_mul_bs` covers with a directed case.

## Simulating

All ten testbenches pass with Verilator 5, each in seconds.

Run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_bsfnn1_test1.sv \
    --top-module tb_bsfnn1_test1 -Mdir obj_top
./obj_top/Vtb_bsfnn1_test1
```

Any other testbench runs the same way with its name substituted; the simulator
finds the other modules through `-Irtl`. Lint one module with
`verilator --lint-only -Wall -Irtl rtl/fp_pkg.sv rtl/<module>.sv`. The
full-size end-to-end run takes a few seconds.
