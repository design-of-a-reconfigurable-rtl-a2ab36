# Reconfigurable variable-precision array multiplier

An ordinary N x N array multiplier always works at full width. When the
operands are narrow, most of its cells are busy adding zeros. This design keeps
the same array of one-bit cells, but gives every column a *vertical* control bit
`V[i]` and every row a *horizontal* control bit `H[j]`. A cell adds its partial
product only when `V[i] XOR H[j]` is 1. Choosing V and H splits the single wide
multiplier into independent narrower multipliers that run in parallel in the
same pass. For example, one 16 x 16 array can do two 8 x 8 products, a 4 x 4
product beside a 10 x 4 product, or one 16 x 16 product.

The RTL has two parts:

* `rm_array`: the reconfigurable multiplier. It is combinational, unsigned and
  16 bits wide by default.
* `rm_fir4`: a 4-tap FIR filter. Its four multiplications run on two
  reconfigurable multipliers, each split into two products.

`rm_top` puts the stand-alone multiplier and the FIR filter side by side.

## The cell

Each one-bit cell (`rm_cell`) contains an XOR, a three-input AND and a full
adder (`rm_fa`):

```
en    = v ^ h
pp    = a & b & en
{c_out, s_out} = pp + s_in + c_in
```

A cell whose enable is 0 is *disabled*. Its partial product is forced to 0, so
its adder just passes the incoming sum and carry on to its neighbours. There is
no separate bypass multiplexer. A disabled cell is an ordinary cell that adds
nothing.

## The array and how the control words split it

`rm_array` is the classic ripple-carry array multiplier:

* Row `j` adds `a & b[j]` to the running sum of the rows above it, shifted down
  by one place. Cell `(i, j)` takes its sum-in from cell `(i+1, j-1)`.
* The leftmost cell of a row takes the carry-out of the leftmost cell of the
  row above.
* Carries ripple from right to left along each row.
* Row `j < W-1` delivers product bit `j` from its rightmost cell. The last row
  delivers bits `W-1 .. 2W-2`, and its final carry is bit `2W-1`.

The longest path runs along row 0 and then down the left edge, about `2W`
full-adder delays.

Disabled cells add 0, and an array multiplier is just an adder of partial
products. So for **any** V and H the output is exactly

```
p = sum over (i, j) with V[i] != H[j] of  a[i] * b[j] * 2^(i+j)
```

The useful settings are those where the enabled cells form separate
rectangles whose results land in bit ranges that do not overlap:

| Use | V (bit W-1 .. 0) | H (bit W-1 .. 0) | Result in `p` |
|---|---|---|---|
| one full W x W product | all 0 | all 1 | `a * b` |
| same, other polarity | all 1 | all 0 | `a * b` |
| two-way split at bit K | 1 for bits >= K | 1 for bits < K | `{a[W-1:K]*b[W-1:K], a[K-1:0]*b[K-1:0]}`: the low product in `p[2K-1:0]`, the high one in `p[2W-1:2K]` |
| 8-bit array, 4 / 4 | `11110000` | `00001111` | `{a[7:4]*b[7:4], a[3:0]*b[3:0]}` |
| 8-bit array, 3 / 5 | `11111000` | `00000111` | `{a[7:3]*b[7:3], a[2:0]*b[2:0]}` (6-bit low result) |
| 16-bit array, 4x4 beside 10x4 | `FFF0` | `000F` | `{a[13:4]*b[7:4], a[3:0]*b[3:0]}`; operand bits `a[15:14]` and `b[15:8]` must be 0 |

In a two-way split the low product is at most `(2^K-1)^2 < 2^(2K)`, so it can
never carry into the high product. That is why the two results come out
unmixed, even though every disabled cell's adder stays on the carry chains.

One V/H bit per line gives only two groups of enabled cells: columns with
`V = 0` paired with rows that have `H = 1`, and columns with `V = 1` paired with
rows that have `H = 0`. To use fewer bits than a group holds, set the unused
operand bits to 0, as in the 4x4 + 10x4 row above. The helper functions
`rm_pkg::split_v(K, W)` and `rm_pkg::split_h(K, W)` build the two-way-split
words. `K = W` gives the full-precision setting.

A worked example on the 16-bit array with split point 2 and 4-bit operands:
`a = 10 (10|10)`, `b = 7 (01|11)`. The low product is `10 x 11 = 0110` and the
high product is `10 x 01 = 0010`, so `p = 0010_0110 = 38`. With `a = b = 15`
the result is `1001_1001 = 153`, which is two 3 x 3 products.

### Interface of `rm_array`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `a` | in | `WIDTH` | multiplicand; bit `i` drives column `i` |
| `b` | in | `WIDTH` | multiplier; bit `j` drives row `j` |
| `v` | in | `WIDTH` | vertical control, one bit per column |
| `h` | in | `WIDTH` | horizontal control, one bit per row |
| `p` | out | `2*WIDTH` | product, or packed sub-products |

The array is purely combinational and has no clock. Parameter `WIDTH`
defaults to 16 and must be at least 2.

## FIR filter on split multipliers (`rm_fir4`)

```
y(t) = c0*x(t) + c1*x(t-1) + c2*x(t-2) + c3*x(t-3)
```

The filter has three delay registers behind the input. Two 16-bit
`rm_array`s are both split at bit 8:

* multiplier 0 gets `a = {x(t-1), x(t)}` and `b = {c1, c0}`;
* multiplier 1 gets `a = {x(t-3), x(t-2)}` and `b = {c3, c2}`.

The four 16-bit halves of the two products are added into `y`. So four
multiplications per sample need only two multipliers. For other even values of
`TAPS`, the filter uses `TAPS/2` multipliers in the same way.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset that clears the delay line and the output |
| `in_valid` | in | 1 | `x_in` carries a new sample at this rising edge |
| `x_in` | in | `DATA_W` (8) | sample, unsigned |
| `coef[TAPS]` | in | `DATA_W` each | coefficients `c0..c3`, unsigned, held static |
| `out_valid` | out | 1 | `y` carries a new result |
| `y` | out | `2*DATA_W + clog2(TAPS)` (18) | filter output, exact, no overflow |

Timing: at a rising edge with `in_valid = 1`, the sample is shifted into the
delay line. The result that uses it is registered at the same edge. `y` and
`out_valid` therefore appear one clock after the sample, and the filter takes
one sample per clock. Clocks with `in_valid = 0` leave the delay line and `y`
unchanged, and drop `out_valid`.

## Top level (`rm_top`)

`rm_top` holds one `rm_array` (WIDTH 16) with its ports `mul_a`, `mul_b`,
`mul_v`, `mul_h` and `mul_p` brought out directly. This is the multiplier as
it sits on a test chip, where outside equipment drives the pins. Next to it is
one `rm_fir4` with ports `fir_*`. The two parts share only `clk`/`rst_n`, and
the multiplier does not use them.

## What follows the original design and what is this implementation's choice

Taken from the published design:

* the cell: XOR of the two controls into a three-input AND, then a full adder;
* the array topology, with per-column V and per-row H;
* the control words `11110000` / `00001111` for a 4/4 split of an 8-bit array;
* the 3/5 split;
* the 16-bit default width;
* the 4-tap FIR with two multipliers pairing c0/c1 and c2/c3;
* the test values listed under Verification below.

Choices of this implementation:

* **Control-word bit order.** The printed words are read with the leftmost
  digit as the most significant bit. Reading them the other way round also
  gives a valid split (the roles of the two groups swap).
* **Unsigned arithmetic** throughout. Signed operands would need a different
  array (for example Baugh-Wooley).
* **Disabled cells** are ordinary cells with a zero partial product. This
  matches the description that they pass sum and carry on. A gate-level bypass
  around the adder, which would save power in silicon, is not modelled.
* **FIR widths, handshake, reset and output register** are this design's own:
  8-bit samples and coefficients, `in_valid`/`out_valid`, asynchronous
  active-low reset, and latency 1. Only "a 16-bit multiplier split in two" was
  given, which implies 8-bit operands.
* **Coefficients** are an input port because no coefficient values are given.
* **Not modelled:** propagation delay (about 22.5 ns worst case on a 0.35 um
  full-custom chip), power, and the FPGA comparison figures. The conventional
  fixed-width multiplier and the conventional FIR are comparison baselines.
  They are not included. The conventional array is `rm_array` with V = 0 and
  H = all ones.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
an independently computed reference and prints
`TB_RESULT checks=N failures=M`.

* `tb_rm_fa`: all 8 input combinations of the full adder.
* `tb_rm_cell`: all 64 input combinations, including disabled cells whose
  operand bits are both 1.
* `tb_rm_array` tests a 16-bit and an 8-bit instance against the bit-level
  masked-sum formula and against packed products:
  * full precision in both polarities;
  * splits at every point K;
  * random V/H;
  * 4x4 + 10x4;
  * the 8-bit 4/4 and 3/5 splits;
  * the 4-bit sequences `A = 15..9` times 9 at full precision;
  * `A = 15..6` with `B = 7` at split point 2, expecting
    `57 54 51 48 41 38 35 32 25 22`, and `15 x 15 -> 153`.
* `tb_rm_fir4`: random streams with and without idle cycles, the all-ones
  maximum, reset, and the one-clock latency.
* `tb_rm_top` is the end-to-end test at default sizes. It drives both halves
  and counts each mechanism: full-precision products, split products, disabled
  cells with both operand bits 1, FIR outputs, FIR idle cycles and FIR reset.
  It fails if any count is zero.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb +libext+.sv rtl/rm_pkg.sv \
          tb/tb_rm_top.sv --top-module tb_rm_top -o sim --Mdir obj
./obj/sim
```

Replace `tb_rm_top` with any other testbench name to run it. Each
testbench finishes in well under a second.

## Files

| File | Contents |
|---|---|
| `rtl/rm_pkg.sv` | `split_v` / `split_h` control-word helpers |
| `rtl/rm_fa.sv` | full adder |
| `rtl/rm_cell.sv` | one-bit reconfigurable cell |
| `rtl/rm_array.sv` | WIDTH x WIDTH reconfigurable array multiplier |
| `rtl/rm_fir4.sv` | FIR filter on split multipliers |
| `rtl/rm_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
