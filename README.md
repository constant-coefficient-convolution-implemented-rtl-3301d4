# IDAC: a multiplier-free FIR filter built from irregular distributed-arithmetic LUTs

This is the RTL of one constant-coefficient FIR filter,

    y(i) = 59 x(i) + 183 x(i-1) + 162 x(i-2) - 7 x(i-3) - 48 x(i-4)
           + 12 x(i-5) + 9 x(i-6) + 2 x(i-7)

on 4-bit unsigned samples. It is built as an **Irregular Distributed Arithmetic
Convolver (IDAC)**. The filter takes one sample per clock. There are no
multipliers. The coefficients are folded into seven small ROMs (4 address
lines each, the size of an FPGA's 16x1 logic LUT) and one adder tree.

## The idea: distributed arithmetic, made irregular

A sum of products `sum_i h_i * a_i` can be taken apart bit by bit. Write each
sample as `a_i = sum_j 2^j a_ij`. Then

    sum_i h_i a_i = sum_j 2^j * ( sum_i h_i a_ij )

The inner sum depends only on one bit of each sample. A ROM addressed by those
bits can hold it. A *regular* DA convolver builds one ROM per bit plane: ROM j
sees bit j of every sample. The adder tree then sums the ROM outputs, each
shifted by j. All lines of a ROM have the same significance. This keeps the
ROM words narrow, but it also fixes which bits may share a ROM.

The *irregular* variant drops that rule. Any bit of any sample may go to any
ROM line. A ROM line carrying bit j of an input with coefficient c simply has
the weight `c * 2^(j - base)`. Here `base` is the lowest significance among
that ROM's lines, and the ROM output is shifted left by `base` in the adder
tree. A ROM entry is the sum of the weights of the lines that are set. Bits
are grouped so that the ROM words and adders stay narrow.

## From coefficients to DA inputs

Two rewrites happen before any bit is assigned to a ROM.

**Similar coefficients are merged.** -48 and 12 differ only by a factor of -4,
so

    -48 x(i-4) + 12 x(i-5) = 12 * (x(i-5) - 4 x(i-4))

The pre-adder `sco_preadder` computes `D8 = x(i-5) - 4 x(i-4)`. D8 is a 7-bit
two's complement value in the range -60..15. It is multiplied once, by 12. One
DA input is saved.

**Every coefficient is made odd.** A coefficient is shifted right until it is
odd, and the shift is added to the significance of its input bits. This
removes constant-zero LSBs from the ROM words: 162 becomes 81 with shift 1,
2 becomes 1 with shift 1, and 12 becomes 3 with shift 2.

That leaves these DA inputs:

| Input | Sample            | Coefficient | Shift | Bits (significance)        |
|-------|-------------------|-------------|-------|----------------------------|
| D0    | x(i)              | 59          | 0     | 0..3                       |
| D1    | x(i-1)            | 183         | 0     | 0..3                       |
| D2    | x(i-2)            | 81          | 1     | 1..4                       |
| D3    | x(i-3)            | -7          | 0     | 0..3                       |
| D6    | x(i-6)            | 9           | 0     | 0..3                       |
| D7    | x(i-7)            | 1           | 1     | goes straight to the adders |
| D8    | x(i-5) - 4 x(i-4) | 3           | 2     | 2..8, bit 8 is the sign     |

D7's coefficient is a power of two, so it needs no ROM. It enters the adder
tree as `x(i-7) << 1`.

## The ROM assignment

This table is the core of the design. It lives in `rtl/idac_pkg.sv` as
`LUT_MAP`. Each ROM has four address lines, 0..3. An entry gives the input bit
on that line, with the bit's significance after the shift. The ROMs are
numbered 9..15, following the numbering of the signals in the design this
follows.

| ROM | line 0  | line 1  | line 2  | line 3  | base | line weights     | output range | word         |
|-----|---------|---------|---------|---------|------|------------------|--------------|--------------|
| 9   | D6 s0   | D3 s0   | D0 s0   | D1 s0   | 0    | 9, -7, 59, 183   | -7..251      | 9 b signed   |
| 10  | D6 s1   | D3 s1   | D0 s1   | D2 s1   | 1    | 9, -7, 59, 81    | -7..149      | 9 b signed   |
| 11  | D1 s1   | D8 s2   | D6 s2   | D3 s2   | 1    | 183, 6, 18, -14  | -14..207     | 9 b signed   |
| 12  | D0 s2   | D2 s2   | D1 s2   | D8 s3   | 2    | 59, 81, 183, 6   | 0..329       | 9 b unsigned |
| 13  | D6 s3   | D3 s3   | D0 s3   | D2 s3   | 3    | 9, -7, 59, 81    | -7..149      | 9 b signed   |
| 14  | D1 s3   | D8 s4   | D2 s4   | D8 s5   | 3    | 183, 6, 162, 12  | 0..363       | 9 b unsigned |
| 15  | D8 s6   | D8 s7   | D8 s8   | unused  | 6    | 3, 6, -12, 0     | -12..9       | 5 b signed   |

ROMs 11, 12 and 14 mix significances: ROM 11 holds D1 at significance 1 with
three bits at significance 2. A regular DA convolver cannot do this.

ROM 15 holds the sign bit of D8. That line has a negative weight.

A ROM whose weights are all non-negative (12 and 14) has an unsigned output
and is zero-extended. The others are two's complement and are sign-extended.

Nothing in the RTL hard-codes ROM contents. `idac_pkg` derives each line's
weight, each ROM's base and each word width from `LUT_MAP` and the coefficient
table. `da_lut` fills its table at elaboration: entry `a` holds
`sum over k of a[k] * WEIGHT[k]`. Changing the assignment means editing
`LUT_MAP`. The tables, the widths and the adder alignment follow from it.
Elaboration fails if `LUT_MAP` leaves out or repeats an input bit. It also
fails if a `da_lut` word width cannot hold that ROM's range.
Choosing a good assignment is a design-time search and is not part of this
RTL.

The output y is 14-bit two's complement. Its range is -825..6405: every
negative tap at 15 and the rest at 0 gives -825, and the reverse gives 6405.

## Pipelining and feeding-point relocation

`idac_convolver` has one parameter, `PIPELINED`.

* `PIPELINED = 0`: no pipeline registers. `y_out` is combinational from `x_in`
  and seven delay taps. The only flip-flops are the 7 x 4 = 28 delay-line bits.
  The latency is 0.
* `PIPELINED = 1` (the default): a register follows the pre-adder, every ROM
  and each of the three adder-tree levels. There is at most one logic stage
  between registers. The latency is **4**: x(i) is sampled at one clock edge,
  and y(i) appears after the third edge after it.

The adder tree is balanced, and all eight operands sit at the same depth. Two
operands arrive at the tree by a different route than the ROM outputs:

* D8 passes through the registered pre-adder before it reaches ROM addresses.
* D7 bypasses the ROMs.

No alignment registers are added for them. Each takes its samples from a
different point of the delay line instead:

* The registered pre-adder reads x(i-4) and x(i-3) instead of x(i-5) and
  x(i-4). One clock later its register holds exactly D8 of the current sample.
* D7 is read from an eighth delay tap, x(i-8). It then lines up with the ROM
  outputs, which are one clock late.

## Blocks

| Module           | Role |
|------------------|------|
| `idac_pkg`       | Filter coefficients, DA inputs, the ROM assignment table, and constant functions for weights, bases and widths. |
| `tap_delay_line` | z^-1 chain. `taps[0]` is `x_in`, and `taps[k]` is the sample k clocks old. Asynchronous reset to zero. |
| `sco_preadder`   | `a +/- (b << B_SHIFT)`, optionally registered. The defaults give D8. |
| `da_lut`         | One DA ROM built from a list of line weights, optionally registered. |
| `adder_tree`     | Balanced tree of two-input adders, optionally with a register after every level. |
| `idac_convolver` | Top. It instantiates the blocks, routes each DA input bit to its ROM line, and aligns and sums the ROM outputs. |

### Interface of `idac_convolver`

| Port    | Dir | Width | Meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | Clock. One sample per cycle, no enable. |
| `rst_n` | in  | 1     | Asynchronous, active low. Clears every register, so the history starts at zero. |
| `x_in`  | in  | 4     | Sample x(i), unsigned. |
| `y_out` | out | 14    | y(i), two's complement. Latency is 4 clocks with `PIPELINED = 1`, and the output is combinational with `PIPELINED = 0`. |

## Size

This is the synthesized size with the defaults, counted as generic cells
before FPGA mapping:

* 7 ROMs of 16 words. Their word widths are 9, 9, 9, 9, 9, 9 and 5 bits, so
  59 bits per address and 944 ROM bits in all. Mapped to 16x1 LUTs, that is
  59 LUTs.
* About 130 flip-flop bits.
* One 7-bit subtractor and seven 14-bit adders.

The unpipelined build has 28 flip-flops.

The adders are all 14 bits wide. A tree optimised for area would size each
adder to its operands and pair operands more cleverly. The sum would be the
same. That search is not done here, and synthesis trims only the constant
bits.

## How far it can be trusted

Both builds are checked every cycle against a direct-form sum of products:

* An impulse, whose response must be the eight coefficients in order at the
  stated latency.
* A step.
* The patterns that give the extreme outputs, 6405 and -825.
* 20,000 random samples.

Each block also has a self-checking unit testbench. Every testbench was also
run against a deliberately broken copy of its block and reported failures.

### Choices made here

These are choices made here, not taken from the design being followed:

* **Sample format.** Samples are 4-bit unsigned. The bit ranges in the
  assignment and the 28-flip-flop count of the unpipelined build imply 4 bits.
  The signedness is an assumption. With signed samples, every bit-3 line would
  need a negative weight.
* **Adder tree.** The tree is a balanced full-width binary tree, not an
  area-optimised one.
* **Register placement.** The exact placement of the pipeline registers is
  chosen here. The original pipelined build reports more flip-flops, 179
  against about 130.
* **Reset.** The asynchronous reset is chosen here.
* **Output width.** The 14-bit output width is chosen here.
* **ROM width reductions.** Each ROM is a word-wide table. Per-bit
  reductions are left to synthesis. Some output bits of a ROM depend on fewer
  address lines, and some bits are duplicates that could share a LUT.

### Not included

* The greedy search that produces the ROM assignment. The assignment is used
  as a fixed table.
* The other convolver architectures that this one is an alternative to:
  * per-tap constant multipliers, either shift-and-add or LUT-based,
  * the LUT-based convolver,
  * the regular DA convolver.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For
example, to run the end-to-end test of both builds:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_idac_convolver \
      rtl/idac_pkg.sv rtl/tap_delay_line.sv rtl/sco_preadder.sv rtl/da_lut.sv \
      rtl/adder_tree.sv rtl/idac_convolver.sv tb/tb_idac_convolver.sv
    ./obj_dir/Vtb_idac_convolver

These are the testbenches:

| Testbench                | What it checks |
|--------------------------|----------------|
| `tb_idac_convolver`      | Both builds side by side. It also counts the events that must occur at least once: negative and positive D8, a non-zero direct input, a negative output, both output extremes, and the impulse at the right latency. |
| `tb_idac_convolver_full` | The default build, on a long stream. |
| `tb_tap_delay_line`      | The delay chain. |
| `tb_sco_preadder`        | The pre-adder, exhaustively. |
| `tb_da_lut`              | The DA ROM, exhaustively, on three ROMs: signed, unsigned, and with a sign-bit line. |
| `tb_adder_tree`          | The adder tree, with random operands, pipelined and combinational. |

For a unit testbench, compile `rtl/idac_pkg.sv`, the block's file and the
testbench.
