# Radix-4 Booth multiplier with an N/2-row partial product array

A two's complement N-bit multiplier with radix-4 Modified Booth Encoding
(MBE) produces N/2 partial product rows. Each negative row also needs a +1 in
its least significant column (its "negative bit"), so the array ends up
N/2 + 1 rows high. The negative bits of rows 0 .. N/2-2 fit into empty
positions of the row below them. The negative bit of the *last* row has no
empty position, and it alone adds the extra row. With N a power of two (8,
16, ...), that extra row costs a full compression level. Four rows need one
level of 4:2 compressors; five need two.

This design removes that row. The last row's negative bit sits in column
N-2. It is added into the **first** row with a 3-bit adder over the first
row's weights N-2, N-1 and N. The first row is cheap to generate because its
Booth window is (y1, y0, 0). The short addition therefore runs in parallel
with the generation of the other rows, and the partial product stage gets no
slower. The array is N/2 rows high. For the default 8 × 8 multiplier that is
four rows, which a single level of 4:2 compressors reduces to carry-save
form.

The default configuration is an 8 × 8 signed multiplier. It registers a
16-bit product and an 8-bit rounded ("fixed-width") product every clock.

## Module hierarchy

```
two_comp_mul            top: output registers, clock, reset
├── mbe_mult_core       combinational multiplier
│   ├── pp_array        N/2-row partial product array
│   │   ├── first_row_gen          row 0 + folded last negative bit
│   │   ├── booth_encoder  (×N/2-1)  one/two/neg per Booth window
│   │   └── booth_pp_row   (×N/2-1)  rows 1 .. N/2-1
│   ├── pp_reduction_tree   rows -> carry-save pair
│   │   ├── compressor_4to2 (rows of)   built from two full_adder
│   │   └── full_adder      (rows of, for a leftover group of three)
│   └── final_adder     carry-propagate adder
└── fixed_width_round   +1 at the top truncated column, keep FW bits
mbe_pkg                 digit-select struct, tree sizing functions
```

## Booth digits and the ordinary rows

The multiplier is scanned in overlapping windows (y[2i+1], y[2i], y[2i-1]),
with y[-1] = 0. Each window gives a digit d = −2·y[2i+1] + y[2i] + y[2i-1]
in {−2, −1, 0, +1, +2}. `booth_encoder` turns it into three select lines:

| window | d  | one | two | neg |
|--------|----|-----|-----|-----|
| 000    | 0  | 0   | 0   | 0   |
| 001, 010 | +1 | 1 | 0   | 0   |
| 011    | +2 | 0   | 1   | 0   |
| 100    | −2 | 0   | 1   | 1   |
| 101, 110 | −1 | 1 | 0   | 1   |
| 111    | −0 | 0   | 0   | 1   |

`booth_pp_row` forms bit j of an (M+1)-bit row as
`((one & x[j]) | (two & x[j-1])) ^ neg`. For negative digits this is the
one's complement of |d|·X, and the neg bit completes the two's complement.
The window 111 gives an all-ones row plus neg = 1, which is zero. It needs no
special case.

Sign extension uses the usual constant scheme:

* Row i ≥ 1 has its sign bit inverted and a constant 1 above it.
* Row 0 carries the pattern ~s s s in columns M+2 .. M.

These constants add up to 2^(M+N), which disappears modulo the product width.

## The first row and the folded negative bit (`first_row_gen`)

The first window is (y1, y0, 0), so its digit is 0, +1, −1 or −2. The
encoder folds into the bit cell:

    pp[j] = (y0 & (x[j] ^ y1)) | (~y0 & y1 & ~x[j-1])

Bits 0 .. N-3 leave the cell as they are. Bits N-2 .. M form an unsigned
(M−N+3)-bit number, 3 bits when M = N. The last row's negative bit is added
to it. The carry c of that addition goes into the sign-extension pair above:

    column M+1 = s ^ c
    column M+2 = ~s | c        (s = pp[M], the row's original sign)

The formulas follow from adding c to the value 2·(~s) + s held in columns
M+2 and M+1.

Net result: row 0 stands for 2^(M+2) + (d0·X − y1) + neg_last·2^(N−2).
The first row's own negative bit (y1) goes into column 0 of row 1. The
negative bit of row i−1 goes into column 2(i−1) of row i. Nothing sits
outside the N/2 row vectors. `tb_pp_array` checks this exhaustively for
8 × 8 and measures the maximum column height, which is 4.

For a rectangular (N+m0) × N multiplier (M = N + m0) the short adder
becomes m0+3 bits wide. The parameters handle this; it is tested at 12 × 8
and 10 × 6.

## Reduction and final addition

`pp_reduction_tree` works on whole rows. At each level it does three things:

* Groups of four rows go through a row of 4:2 compressors. The lateral cout
  of column j feeds cin of column j+1; cout does not depend on cin, so no
  carry ripples.
* A leftover group of three goes through a row of full adders.
* One or two leftover rows pass through unchanged.

Levels are added until two rows remain. The level count and the rows per
level come from functions in `mbe_pkg`, evaluated at elaboration. Constant
zero inputs (the empty corners of the array) are left for synthesis to
remove.

`final_adder` is a plain `+`, so FPGA tools can map it onto the carry chain.

## Fixed-width output (`fixed_width_round`)

The carry-save pair, a rounding 1 in column W−FW−1 and a row of full adders
feed one more carry-propagate addition. The top FW bits are kept. The result
is `floor((P + 2^(W−FW−1)) / 2^(W−FW))`: the product rounded to FW bits,
with half-way cases rounded up. The whole array is kept, so this rounding is
exact. A truncated-array fixed-width multiplier is smaller: it drops the
low-order partial product bits and adds an error-compensation term. It is
**not** built, because its truncation and compensation rules are not
defined here.

## Top level and timing (`two_comp_mul`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock |
| `rst_n`   | in  | 1     | asynchronous active-low reset of the outputs |
| `x`       | in  | M     | multiplicand, two's complement |
| `y`       | in  | N     | multiplier, two's complement (N even, 4 ≤ N ≤ M) |
| `p`       | out | M+N   | x·y |
| `p_fixed` | out | FW    | x·y rounded to FW bits |

Parameters are `M = 8`, `N = 8` and `FW = 8`. The operands are not registered
and the outputs are. The product of the operands applied before a rising
edge appears after that edge: latency one clock, and a new pair every clock.

## Where this design makes its own choices

The technique fixes the partial product array. These parts are choices of
this design:

* **Register placement and reset.** The outputs are registered and the reset
  is asynchronous and active low.
* **Reduction tree.** It is row-wise and built from 4:2 compressors. The
  technique only promises a shorter array, and the best tree depends on N.
* **Gates of the row-0 cell and the sign-bit update.** They are derived from
  the arithmetic above.
* **Booth encoding of 111.** The encoder gives neg = y[2i+1] even for 111,
  which yields −0.
* **Fixed-width output.** It uses exact post-truncation rounding, not a
  truncated array.

The conventional N/2+1-row multiplier and one alternative are not built. The
alternative generates the last row directly in two's complement, with a
3-5 decoder and 4-1 multiplexers. Both serve only as points of comparison
for this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F`:

| testbench | what it checks |
|-----------|----------------|
| `tb_booth_encoder` | all 8 windows against the digit arithmetic |
| `tb_booth_pp_row` | every digit × every 8-bit X, row value as a signed number |
| `tb_first_row_gen` | exhaustive 8 × 8 row value including the folded bit; random 12 × 8; fold-in carry occurs |
| `tb_pp_array` | exhaustive 8 × 8: rows sum to X·Y; maximum column height = N/2; random 10 × 6 |
| `tb_full_adder`, `tb_compressor_4to2` | exhaustive; cout independent of cin |
| `tb_pp_reduction_tree` | 1, 3, 4, 5 and 7 rows, random |
| `tb_final_adder`, `tb_fixed_width_round` | random and corner cases, rounding against `floor((P+128)/256)` |
| `tb_mbe_mult_core` | exhaustive 8 × 8, random 16 × 16 and 12 × 8 |
| `tb_two_comp_mul` | see below |

`tb_two_comp_mul` runs the top at its default parameters, in about 0.1 s:

* It applies all 65,536 operand pairs, one per clock.
* It checks `p` and `p_fixed` one clock later, and that `p` does not change
  before the edge.
* It also checks the two reference vectors 11110000 × 00001111 and
  01010101 × 01010101, and an asynchronous reset in mid-run.
* It counts every Booth digit class in every row, the folded negative bit,
  the fold-in carry and rounding that changes the kept bits. It fails if
  any of them never happens.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
          rtl/mbe_pkg.sv tb/tb_two_comp_mul.sv --top-module tb_two_comp_mul
./obj_dir/Vtb_two_comp_mul
```

To change the size, set `M`, `N` and `FW` on `two_comp_mul`. N must be even
and at most M.
