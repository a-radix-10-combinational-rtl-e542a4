# Radix-10 combinational multiplier (16 × 16 BCD digits)

This design multiplies two 16-digit decimal numbers held in BCD (four bits per
digit, 0–9) and returns the exact 32-digit BCD product. There is no rounding
or truncation. It is a parallel (combinational) unit, like a binary tree
multiplier, and not the usual digit-by-digit sequential decimal multiplier.
Registers can be inserted at eleven places to pipeline it for a target clock.

Three ideas make decimal multiplication work in a tree:

1. **Only 2x and 5x are precomputed, and neither needs a carry chain.** Each
   multiplier digit is split into a multiple of five and a small signed
   correction. Every partial product then picks one multiple from
   {0, 5x, 10x} and one from {−2x, −x, 0, x, 2x}.
2. **Partial products are kept in radix-10 carry-save form.** Each position
   holds one BCD digit plus one carry bit. A radix-10 carry-save adder (CSA)
   adds two digit vectors and one bit vector without any carry propagation.
3. **Carry bits left over by the CSAs are counted, not added.** A carry
   counter turns up to eight carry bits of equal weight into a single BCD
   digit. This replaces a decimal 4:2 compressor.

A single carry-propagating step at the end turns the carry-save product into
BCD. It is a parallel-prefix decimal adder.

```
 x (16 digits)              y (16 digits)
      |                          |
 precompute 2x, 5x,         one recoder per digit y_i
 9's compl. of x, 2x             |
      |                          |
      +---> 16 partial-product generators (mux, mux, CSA) --> 16 x (17 digits + 17 bits)
                                   |
                 adder tree: 6 levels of CSAs + 2 carry counters
                                   |
                     32 digits + 32 bits (carry-save)
                                   |
                 carry-save -> BCD converter (parallel prefix)
                                   |
                            p (32 digits)
```

## Operands and number format

`x` and `y` are packed arrays `logic [15:0][3:0]`, with digit 0 least
significant. The product `p` is `logic [31:0][3:0]`. The unit works on
magnitudes only. For sign-and-magnitude operands, the product's sign is the
XOR of the operand signs, and that gate belongs outside this unit.

**The multiplicand `x` must have a nonzero leading digit.** This means a
normalized fraction in [0.1, 1). The multiplier `y` may be any BCD value.
The section on partial products below explains the restriction. A zero or
unnormalized `x` can give a wrong product. Zero and denormal operands have to
be handled around the unit, as a decimal floating-point unit does anyway.

## Precomputation without carry propagation

* **2x** (`r10_times2`). Doubling digit `x_i` gives an even units digit
  `2x_i mod 10` and a carry of 1 when `x_i ≥ 5`. An even digit plus 1 never
  exceeds 9, so the carry stops in the next digit. Digit `i` of 2x is
  `(2x_i mod 10) + [x_(i-1) ≥ 5]`.
* **5x** (`r10_times5`). 5x equals 10x / 2. Shift x up one digit, then halve
  every digit on its own. An odd digit leaves a half, which is worth 5 in the
  digit below. Digit `i` of 5x is `floor(x_(i-1)/2) + 5·[x_i odd]`. The
  largest value is 4 + 5 = 9, so no carry can occur.
* **−x and −2x** (`r10_nines_comp`). These are 10's complements over 17
  digits. The unit forms the 9's complement digit by digit. The missing +1
  travels as a carry bit, described in the next section.
* **10x** is x shifted up one digit, with no logic.

All five multiples are 17 digits wide and shared by the 16 partial-product
generators.

## Partial-product generation and the top-digit fold

`r10_recoder` splits each multiplier digit as follows:

| y_i | 0 | 1 | 2 | 3  | 4  | 5 | 6 | 7 | 8  | 9  |
|-----|---|---|---|----|----|---|---|---|----|----|
| y_H | 0 | 0 | 0 | 5  | 5  | 5 | 5 | 5 | 10 | 10 |
| y_L | 0 | 1 | 2 | −2 | −1 | 0 | 1 | 2 | −2 | −1 |

`r10_pp_gen` does the following for one digit:

* A 3:1 digit mux picks `x·y_H` from {10x, 5x, 0}.
* A 5:1 digit mux picks `x·y_L` from {2x, x, 0, 9's(x), 9's(2x)}.
* One 17-digit radix-10 CSA adds the two terms.
* The CSA never produces a carry into position 0. That empty slot of the
  carry vector receives the +1 of the 10's complement (`neg`). So the
  complement costs no extra adder input.

The true partial product `x·y_i` is positive and below 10^17. With a
complemented term, however, the digit sum is `x·y_i + 10^17`. The excess
10^17 is removed safely only when it appears as the carry out of the top
digit. In carry-save form it can also arrive as a top digit of 9 plus an
incoming carry bit from the digit below. For example, 0.10 × 4 = 5x − x
gives top digit 9 and carry 1. Dropping only the top carry-out would then
leave the partial product 10^17 too large.

This design therefore **folds the top position's carry bit into the top
digit**: `s_16 := (s_16 + c_16) mod 10`, `c_16 := 0`. The fold is a one-digit
operation next to the CSA, with no carry chain. It is exact whenever the
leading digit of `x` is nonzero. This was checked exhaustively on small
widths, and the testbenches exercise it thousands of times. With a leading
zero in `x`, the top digit would have to be −1, which carry-save form cannot
represent. Hence the normalization requirement above.

No sign extension is needed beyond this: every partial product is a
non-negative 17-digit carry-save number.

## The adder tree

`r10_adder_tree` reduces 16 carry-save numbers, partial product `i` weighted
10^i, to one 32-digit carry-save number. A radix-10 CSA (`r10_csa`) takes
two digit vectors and one bit vector, so two carry-save operands always leave
one carry vector over. The tree handles that as follows:

| level | work | live width (digits) |
|-------|------|---------------------|
| 1 | 8 CSAs: `pp(2j+1).s + pp(2j).s + pp(2j).c`. The 8 carry vectors `pp(2j+1).c` go to carry counter 1 (`r10_cc`), working in parallel. | 18 |
| 2 | 4 CSAs on pairs of level-1 results. The odd operand's carry vector is set aside. | 20 |
| 3 | 2 CSAs, same rule | 24 |
| 4 | 1 CSA, same rule | 32 |
| 5 | 1 CSA adds counter 1's output to the level-4 result. In parallel, carry counter 2 counts the 7 vectors set aside at levels 2–4; its eighth input is 0. | 32 |
| 6 | 1 CSA adds counter 2's output | 32 |

A carry counter's output digit is the number of ones in its column, 0 to 8,
so it is a valid BCD digit that a CSA can add.

In the RTL every vector lives in a 32-digit frame at its true weight. The
growing widths (18, 20, 24, 32) therefore need no realignment. The digits
outside them are constant zero and vanish in synthesis. The carry out of the
32nd digit is dropped at every CSA, which is safe because the product is
below 10^32. The tree is written for N = 4, 8 or 16.

## Carry-save to BCD converter

`r10_cs2bcd` takes digit `a_i` and bit `d_i` at each position, with
`t_i = a_i + d_i ≤ 10`. It works in three steps:

1. Per digit, it computes propagate `p_i = (t_i = 9)` and generate
   `g_i = (t_i = 10)`. It also computes both candidate results,
   `s0_i = t_i mod 10` and `s1_i = (t_i + 1) mod 10`.
2. A Kogge-Stone prefix network produces the carry into every digit in
   log2(32) = 5 levels.
3. Each digit selects `s1_i` when a carry enters it, else `s0_i`.

The same converter behind a CSA without its bit input makes a general BCD
carry-propagate adder (`r10_bcd_cpa`). The carry-in goes into the CSA's
empty carry slot. The top module exposes a 16-digit instance of it on the
`add_*` ports, independent of the multiplier.

## Pipelining

`dec_mult` has a parameter `PIPE_CUTS`, an 11-bit mask of register positions
defined in `dec_pkg`:

| bit | register after | delay of the logic before it (ns, 90 nm estimate) |
|-----|----------------|------|
| 0 | precomputation of 2x, 5x | 0.20 |
| 1 | partial-product muxes | 0.21 |
| 2 | partial-product CSA (+ fold) | 0.29 |
| 3–8 | adder-tree levels 1–6 | 0.26, 0.27, 0.21, 0.27, 0.29, 0.21 |
| 9 | converter prefix network | part of 0.40 |
| 10 | converter (output register) | rest of 0.40 |

The total is about 2.65 ns combinational. The latency in cycles equals the
number of bits set. A new operation can enter every cycle, and nothing
stalls. `in_valid` travels through the same number of registers and comes
out as `out_valid`. Only that valid chain is reset (asynchronous, active-low
`rst_n`). There are three presets:

* `CUTS_COMB` (default): no registers. `p` follows the inputs, and
  `out_valid = in_valid`. `clk` and `rst_n` are unused.
* `CUTS_4_STAGE`: cuts after bits 2, 5, 8 and 10. The stages take about
  0.70, 0.74, 0.77 and 0.40 ns, each within 80 % of a 1 ns clock. Latency is
  4 cycles.
* `CUTS_11_STAGE`: every cut. Latency is 11 cycles, for a clock of about
  0.4 ns. The converter is split in two because 0.40 ns alone exceeds 80 %
  of that period.

The delay figures are synthesis estimates for a 90 nm standard-cell library.
They guided the choice of cuts but are not reproduced by this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/dec_pkg.sv` | digit width constant, recoder enums, cut-mask positions and presets |
| `rtl/dec_mult.sv` | top: complete multiplier plus the side-by-side BCD adder |
| `rtl/r10_times2.sv`, `rtl/r10_times5.sv` | carry-free 2x and 5x |
| `rtl/r10_nines_comp.sv` | digit-wise 9's complement |
| `rtl/r10_recoder.sv` | y_i → (y_H, y_L) |
| `rtl/r10_pp_gen.sv` | one partial-product generator |
| `rtl/r10_csa.sv` | W-digit radix-10 carry-save adder |
| `rtl/r10_cc.sv` | radix-10 carry counter (8 vectors → 1 digit vector) |
| `rtl/r10_adder_tree.sv` | six-level reduction tree |
| `rtl/r10_cs2bcd.sv` | carry-save → BCD converter |
| `rtl/r10_bcd_cpa.sv` | BCD carry-propagate adder (CSA + converter) |
| `rtl/dec_pipe_reg.sv` | register that is either a flip-flop stage or a wire |
| `tb/tb_bcd_pkg.sv` | reference arithmetic for the testbenches (128-bit integers) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two top-level ones |

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops, and each has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/dec_pkg.sv tb/tb_bcd_pkg.sv tb/tb_dec_mult.sv --top-module tb_dec_mult
./obj_dir/Vtb_dec_mult
```

Replace `tb_dec_mult` with any other testbench name. The packages must be
listed first. All testbenches run in seconds.

* `tb_dec_mult_full`: the top exactly as delivered (16 digits,
  combinational). It runs 0.1963 × 0.8145 = 0.15988635, the extreme operands
  and 1000 random products, and checks the adder on the same operands.
* `tb_dec_mult`: the combinational, 4-stage and 11-stage versions side by
  side, on more than 3000 operations issued back to back with random
  bubbles. It checks every product and the exact latency. It also counts
  that each mechanism occurred: negative recoding, the 10x shift, the
  top-digit fold, the carry counters holding counts of 4 or more, carry
  chains of 8 or more digits in the converter, back-to-back issue, bubbles,
  reset, and adder carry-out.
* Block testbenches check each module against integer arithmetic. For
  example, `tb_r10_adder_tree` feeds random carry-save operands, including a
  fully registered N = 4 tree. `tb_r10_cs2bcd` includes the full 32-digit
  carry chain.

## How far it can be trusted

* **Verified by simulation.** Bit-exact products for random normalized
  operands and corner cases, in all three pipeline presets. Every submodule
  is also checked against a reference model, over ranges that include its
  corner cases.
* **Not verified.** Timing, area and clock rate. No synthesis to a cell
  library was done. The delay breakdown above comes from published
  estimates, not from this RTL.
* **Own design choices** where the description of the architecture leaves
  room:
  * the top-digit fold in partial-product generation;
  * the recoder's select encodings;
  * the plain population count inside the carry counter;
  * the Kogge-Stone prefix topology;
  * the exact pipeline cut positions and the valid/reset scheme;
  * the converter's internal cut point;
  * the 16-digit width of the standalone BCD adder.
* **Differences from a complete arithmetic unit.** There is no sign
  handling, no special handling of zero or unnormalized multiplicands, and
  no rounding of the 32-digit product to 16 digits.
