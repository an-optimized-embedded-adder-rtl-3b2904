# PRO-FA arithmetic: carry select adder/subtractors, a Booth multiplier and a 4-tap FIR filter

This is synthesizable SystemVerilog for a small family of DSP arithmetic
units that are all built from one full-adder cell. The cell forms the partial
sum `F = A xor B` once and reuses it twice:

* the sum is `F xor CIN`;
* the carry is a 2:1 selection steered by `F`. When A and B differ (`F = 1`)
  the carry input passes through. When they agree (`F = 0`) the carry is A.

In silicon this cell is a 13-transistor mix of transmission gates and pass
transistors. In this RTL it appears as those logic equations. Four units are
built on top of it:

1. A **carry select adder/subtractor (CSLAS)** in two forms, *linear*
   (equal 4-bit groups) and *square-root* (growing groups). One mode input
   selects addition or subtraction.
2. An **8x8 signed modified Booth multiplier**. It has Booth encoders and
   decoders, a carry-save tree of full-adder cells, and a 16-bit CSLAS as the
   final adder.
3. A **4-tap transposed-form FIR filter** made of four of those multipliers,
   three registers and ripple adders of the same cell.
4. A top, `dsp_top`, that puts the filter and one of each CSLAS side by side.

Everything is combinational except the filter's three delay registers.

## The full-adder cell and its half adder

| module   | function                                                                |
|----------|-------------------------------------------------------------------------|
| `pro_fa` | `f = a ^ b`, `sum = f ^ cin`, `carry = f ? cin : a`. `f` is a port because the cell's partial-sum node is shared. |
| `pro_ha` | `sum = a ^ b`, `carry = a & b`. This is the carry-in-0 version, used as bit 0 of the `rcaha` adders. |

`rca` is an N-bit ripple chain of `pro_fa` cells with a carry input.
`rcaha` is the same chain with a half adder in bit 0, so its carry input is
always 0.

## Carry select adder/subtractor

This is the part of the design that takes the most care to follow.
`cslas_linear` and `cslas_sqrt` compute

```
cin = 0:  {carry, s} = x + b
cin = 1:  {carry, s} = x + ~b + 1 = x - b      (carry = 1 means no borrow, x >= b unsigned)
```

They work in four phases.

1. **addsub.** Every 4-bit slice of `b` is XORed with `cin`, which gives
   `y = b` or `~b`. `cin` is both the mode and the carry into bit 0. That one
   carry supplies the `+1` of the two's complement.
2. **Ripple adders.** The lowest group is an `rca` that takes `cin` as its
   carry input. Every other group is an `rcaha`: it adds its slice of `x` and
   `y` as if its carry input were 0. It produces a group-wide word
   `r0 = {carry, sum}`.
3. **bec (binary to excess-1).** This turns `r0` into `r0 + 1`, the same
   group's result for a carry input of 1. It uses XOR and AND gates only:
   bit i flips when all bits below it are 1. This is cheaper than a second
   ripple adder.
4. **Multiplexer.** The carry out of the group below picks `r0` or `r0 + 1`.
   The top bit of the chosen word is this group's carry out, and it drives
   the next group's multiplexer.

After the first group, the carry passes through one multiplexer per group.
It no longer ripples through every bit.

### Group layouts of a 16-bit section

| adder       | groups (bits)                    | bec widths  | multiplexers              |
|-------------|----------------------------------|-------------|---------------------------|
| linear      | 3:0 (rca), 7:4, 11:8, 15:12      | 5, 5, 5     | 10:5, 10:5, 10:5          |
| square-root | 1:0 (rca), 3:2, 6:4, 10:7, 15:11 | 3, 4, 5, 6  | 6:3, 8:4, 10:5, 12:6      |

In the square-root layout each group is one bit longer than the one below
it. A group's ripple delay then roughly matches the time the carry takes to
reach its multiplexer. The addsub stage works on 4-bit slices in both
layouts.

### Wider adders

`WIDTH` must be a multiple of 16. The default is 16. A 32- or 64-bit adder is
a cascade of 16-bit sections:

* the lowest group of each section is again an `rca`, whose carry input is
  the carry out of the section below;
* `cin` still drives every addsub slice.

This reading of the wider versions matches their published gate and
transistor counts, which are exact multiples of the 16-bit counts. The
original description does not spell the cascade out, so it is this design's
choice. The testbenches simulate the cascade at 32 and 64 bits.

## Modified Booth multiplier

`booth_multiplier` computes `p = x * y` for signed 8-bit `x` and `y`. It has
three stages.

* **`booth_ppg`** splits `x` into the four overlapping groups
  `(0, x0, x1)`, `(x1, x2, x3)`, `(x3, x4, x5)` and `(x5, x6, x7)`. Each group
  goes to a `booth_encoder`, and each encoder drives a `booth_decoder` that is
  shared with `y`.
  * The encoder turns group `{g2, g1, g0}` into the digit
    `-2*g2 + g1 + g0`, in {-2..2}. The digit is sent as three lines
    (`booth_pkg::booth_digit_t`): `one` = `g1 ^ g0`,
    `two` = `(g2 ^ g1) & ~one` and `neg` = `g2 & ~(g1 & g0)`. The group `111`
    therefore gives a plain zero.
  * The decoder produces the 9-bit row `PP0..PP8`. Bit j is `y[j]` (digit
    ±1) or `y[j-1]` (digit ±2), XORed with `neg`. A negative row is thus
    the ones' complement, and its `+1` is still owed.
* **`wallace_tree`** sign-extends the four rows to 16 bits and shifts row i
  by 2i. It adds a fifth row that holds the four `neg` bits at positions 0,
  2, 4 and 6. Three layers of 3:2 carry-save rows of `pro_fa` cells reduce
  the five rows to two: rows 0-2, then row 3, then the `neg` row.
* **Final adder.** A 16-bit `cslas_linear` in add mode adds the last two
  rows.

Four Booth rows cover two's-complement operands only. An unsigned 8-bit
multiply would need a fifth row, and this design does not provide one.

## 4-tap FIR filter

`fir4` implements `y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3]` in
transposed form:

```
z3 <= h3*x        z2 <= h2*x + z3        z1 <= h1*x + z2        y = h0*x + z1
```

The four multipliers see the same sample. Their products are summed along a
chain of three `tg_dff` registers and 18-bit `rca` adders. The longest path
is one multiplier plus one adder, whatever the number of taps.

Timing and sizes:

* **Output timing.** `y_out` is combinational in `x_in` of the same cycle,
  so an impulse on `x_in` returns h0, h1, h2 and h3 on four consecutive
  cycles.
* **Sample rate.** The filter takes one sample per clock.
* **Samples and coefficients.** Both are 8-bit two's complement. The
  coefficients are input ports because their values come from the filter
  design.
* **Accumulator.** It is 18 bits wide (`ACC_W`), which is enough for any
  sum of four 8x8 products: |sum| <= 65536.
* **Coefficient changes.** Each partial sum already in the chain keeps the
  coefficient that was in force when its sample entered.
* **Reset.** `rst_n` is asynchronous and active low, and clears the three
  registers.

## Top level: `dsp_top`

| ports                                              | unit                          |
|----------------------------------------------------|-------------------------------|
| `clk`, `rst_n`, `fir_x[7:0]`, `fir_h[4][7:0]` → `fir_y[ACC_W-1:0]` | FIR filter       |
| `lin_x`, `lin_b`, `lin_cin` → `lin_s`, `lin_carry` | linear CSLAS, `CSLAS_W` bits  |
| `sq_x`, `sq_b`, `sq_cin` → `sq_s`, `sq_carry`      | square-root CSLAS, `CSLAS_W` bits |

The parameters are `CSLAS_W = 16` (a multiple of 16) and `ACC_W = 18`. The
units share no signals.

## How far the RTL follows the original circuit, and where it departs

These parts follow the original description:

* the cell equations;
* the group layouts of both adders (widths, the rca/rcaha split, bec widths,
  multiplexer sizes);
* the use of the mode input as the first carry;
* the Booth grouping and the encoder/decoder split;
* the 4-tap transposed structure with three registers.

These parts are this design's own choices:

* **Transistor level.** It is not modelled. Sizing, voltage swing,
  low-voltage operation, power and delay have no RTL meaning here.
* **Cascade for 32/64 bits.** Explained above.
* **Booth details.** The names and exact gate form of the encoder outputs,
  and the use of a separate `neg` row for the `+1` corrections.
* **Booth direction.** The operand fed to the encoders is `x`; the one fed
  to the decoders is `y`.
* **Carry-save tree.** Its shape, including the sign extension.
* **Final adder.** The multiplier uses the linear CSLAS rather than the
  square-root one.
* **Filter.** Its word widths and reset, coefficients as ports, and
  `pro_fa` ripple adders between the taps.
* **Signedness.** The multiplier is signed only. The original material
  claims signed and unsigned use but shows four Booth rows.
* **Radix.** The original calls the multiplier "radix-2". The recoding
  actually built is the usual modified Booth (radix-4) recoding: 3-bit
  groups into {-2..2}, four rows for 8 bits.
* **Not built.** The comparison designs are absent: conventional carry
  select adders, other published full-adder cells, and the array and plain
  Wallace tree multipliers.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>.sv`.
`tb_fir4_lowpass.sv` adds a low-pass run of the filter.
Each one ends by printing `TB_RESULT checks=N failures=M`.

| testbench           | what it checks                                                              |
|---------------------|-----------------------------------------------------------------------------|
| `pro_fa`, `pro_ha`, `addsub`, `bec`, `rcaha`, `booth_encoder` | exhaustive                        |
| `rca`               | exhaustive at 4 bits, random at 11 bits                                      |
| `cslas_linear`, `cslas_sqrt` | 16, 32 and 64 bits against integer add/subtract: random operands, plus carries that run through every group |
| `booth_decoder`     | every `y` with every digit                                                   |
| `booth_ppg`, `booth_multiplier` | all 65536 signed operand pairs                                   |
| `wallace_tree`      | random rows, compared modulo 2^16                                            |
| `fir4`              | an impulse response (one tap per cycle), random data with changing coefficients including -128 and 127, and a reset |
| `fir4_lowpass`      | the filter as a low-pass filter with example coefficients (32, 96, 96, 32): DC gain 256, exact null at half the sample rate |
| `dsp_top`           | the whole top at default parameters (see below)                              |

`tb_dsp_top` runs at the default parameters. It counts each mechanism and
fails if any never occurs:

* addition, subtraction, carry out and borrow;
* the excess-1 path being selected in both adders;
* every Booth digit from -2 to +2;
* filter sums that need more than 16 bits;
* a filter reset.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_fir4 \
    rtl/booth_pkg.sv tb/tb_fir4.sv -Mdir obj_fir4
./obj_fir4/Vtb_fir4
```

`-Irtl` lets Verilator find each module in `rtl/<module>.sv`. Every
testbench finishes in well under a minute.
