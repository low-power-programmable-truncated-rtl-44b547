# Programmable truncated multiplier with error-tolerant adders

This is an 8 x 8 two's complement multiplier that trades accuracy for power
in two independent ways:

* **Programmable truncation.** Every partial-product bit is gated by an
  enable for its product column. A 15-bit vector `t` chooses at run time
  which columns of the partial-product matrix are computed. Switched-off
  columns are held at 0 and do not toggle.
* **Error-tolerant addition.** The partial-product rows are summed by
  error-tolerant adders (ETAs). An ETA adds its upper bits exactly. Its
  lower bits are added without any carry chain, using a rule that keeps the
  error small. No carry passes between the two parts, so the long carry
  path and the glitching it causes are gone.

The RTL follows the architecture published by N. Hemalatha and K. Kavitha,
"Low Power Programmable Truncated Multiplier Using Error Tolerant Adder"
(2018). That description leaves several points open: how the ETAs are
arranged in the multiplier, the width of their inexact part, and the clocking.
The choices made here are listed in
[What follows the published design and what does not](#what-follows-the-published-design-and-what-does-not).

## The error-tolerant adder (`eta`)

A W-bit ETA is split at bit M:

```
            W-1 ............ M | M-1 ............ 0
 accurate part: ripple-carry    | inaccurate part: control block
 adder, carry-in = 0            | + carry-free addition block
 -> sum[W:M] (with carry out)   | -> sum[M-1:0]
```

* **Accurate part** (`eta_rca`). A plain ripple-carry adder whose carry-in
  is tied to 0. It is the lowest-power conventional adder. Speed does not
  matter here because this part is not the critical path.
* **Inaccurate part.** The bits are scanned from the most significant bit
  downwards. While the two operand bits are not both 1, the sum bit is
  `a ^ b`. At the first position where both bits are 1, that sum bit and
  every lower sum bit are set to 1.
  * `eta_control` computes the force vector
    `ctl[i] = OR over j >= i of (a[j] & b[j])` as one AND-OR chain running
    from MSB to LSB.
  * `eta_cfa` then computes `s = ctl | (a ^ b)`.

The carry out of the inaccurate part is simply dropped. Setting the low bits
to all ones partly makes up for it. The result is never larger than the true
sum, and it is smaller by less than 2^M.

Worked example, 16 bits split 8/8: 45978 + 26899.

```
   10110011 | 10011010
 + 01101001 | 00010011
  ---------------------
  100011100 | 10011111    = 72863   (exact sum: 72877, error 14)
                ^ first position where both bits are 1; bits below forced to 1
```

The default `eta` is the 32-bit design point: `W = 32` and `M = 20`, so 12
accurate bits and 20 inaccurate bits. The split is sized by an acceptance
rule: at least 98% of all inputs must reach better than 95% accuracy, where accuracy is
1 - |error| / exact sum. With `M = 0` the ETA becomes an exact adder.

## Programmable partial-product matrix (`ptm_ppgen`)

The matrix uses the modified Baugh-Wooley form, so that every bit is
positive. For an N x N multiplier (N = 8):

| term (i, j), weight 2^(i+j)          | value             |
|--------------------------------------|-------------------|
| i < N-1 and j < N-1                  | `x[i] & y[j]`     |
| exactly one of i, j equal to N-1     | `~(x[i] & y[j])`  |
| i = j = N-1                          | `x[i] & y[j]`     |
| constants                            | 2^N and 2^(2N-1)  |

Each term is ANDed with `t[i+j]`. A 2-input AND becomes a 3-input AND, and a
NAND term becomes a NAND followed by an AND with `t`.

The two constants are never gated. They do not toggle, so they cost no
dynamic power.

With `t` all ones the matrix adds up to the exact product modulo 2^16. Some
useful settings:

| `t` (15 bits) | active columns | meaning                                         |
|---------------|----------------|-------------------------------------------------|
| `0x7FFF`      | 0..14          | full-precision product                          |
| `0x7F80`      | 7..14          | the N-1 low columns off                         |
| `0x7F00`      | 8..14          | half of the matrix off; like direct truncation, with a negative bias |

## Summing the rows: a linear array of ETAs (`ptm`)

This is the least obvious part of the design. The eight rows are added by a
linear array of seven 8-bit ETAs. Each ETA produces a 9-bit result:

```
a[0] = {1, row0}                      // the 2^N constant fills the free top bit
a[k] = ETA( a[k-1][8:1], row k )      // k = 1..7, 9-bit result
p[k-1]    = a[k-1][0]                 // one final product bit per stage
p[14:7]   = a[7][7:0]
p[15]     = ~a[7][8]                  // adds the 2^(2N-1) constant, mod 2^16
```

Stage k works on product columns k to k+8. Its inaccurate part therefore
covers columns k to k+M-1. The later stages put their inexact bits high in
the product:

* The last stage's inaccurate part covers columns 7 to 9.
* So even with every column enabled, the product is approximate unless
  M = 0.
* Because every ETA only ever drops value, the error is always negative or
  zero when all columns are enabled.

`M` is 3 by default. Applied to an 8-bit ETA over all 65536 input pairs, the
acceptance rule above gives:

| M | pairs above 95% accuracy |
|---|--------------------------|
| 3 | 98.4% (the largest M that passes) |
| 4 | 93.5%                    |

Error of the signed product at the default `M = 3`, measured over all 65536
operand pairs (in units of the product LSB; the product range is ±2^14):

| `t`      | mean error | largest error |
|----------|-----------:|--------------:|
| `0x7FFF` | -475.9     | 1764          |
| `0x7F80` | -596.3     | 2017          |
| `0x7F00` | -809.8     | 2373          |

To trade less accuracy, lower `M`. `M = 0` gives an exact multiplier
whenever `t` is all ones.

## Clocked top (`ptm_top`)

| port        | dir | width | meaning                                      |
|-------------|-----|-------|----------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                           |
| `rst_n`     | in  | 1     | asynchronous active-low reset, clears every register |
| `in_valid`  | in  | 1     | `x`, `y`, `t` are presented this cycle       |
| `x`, `y`    | in  | N     | two's complement operands                    |
| `t`         | in  | 2N-1  | column enables; bit k enables product column k |
| `out_valid` | out | 1     | `p` holds a new result                       |
| `p`         | out | 2N    | product                                      |
| `mul_op`    | out | N     | `p[2N-1:N]`, the fixed-width result          |

Timing:

* The input stage registers `x`, `y` and `t` together. Each operation
  therefore uses its own truncation vector, and `t` can change on every
  cycle.
* The output stage registers the product one clock edge after the operation
  is accepted.
* A new operation can be issued on every cycle.

Parameters: `N = 8` (operand width) and `M = 3` (inaccurate bits in each row
adder).

## Module hierarchy

```
ptm_top            registers, valid flags, mul_op
└── ptm            row array, Baugh-Wooley constants
    ├── ptm_ppgen  gated partial-product matrix
    └── eta x (N-1)
        ├── eta_rca      accurate part
        ├── eta_control  inaccurate part: force vector
        └── eta_cfa      inaccurate part: carry-free sums
```

All modules are combinational except `ptm_top`. Every parameter has a
default, so each module can be elaborated on its own.

## What follows the published design and what does not

Taken from the published design:

* The ETA arithmetic and its two-part structure: a grounded-carry
  ripple-carry adder above, and a control block feeding a carry-free
  addition block below.
* The 32-bit ETA example.
* The acceptance rule for sizing the split.
* The modified Baugh-Wooley matrix with NAND terms and constants at 2^N and
  2^(2N-1).
* Column gating with 3-input ANDs, one enable per product column.
* Ungated constants.
* The 8 x 8 size and the 15-bit `t`.
* The use of ETAs to add the partial products.

This design's own choices:

* **Row adders.** The ETAs form a linear row array of seven 8-bit adders
  with 9-bit results. The names and widths of the signals shown for the
  reference implementation suggest this arrangement, but the connection is
  not specified.
* **ETA width in the multiplier.** `M = 3` comes from applying the
  published acceptance rule to one 8-bit row adder.
* **Control block.** Its internal circuit is not specified. It is built here
  as the simplest structure that does the job: one AND-OR chain from MSB to
  LSB.
* **Equation form.** One form of the partial-product equations uses
  complemented inputs (`~x & ~y`) in place of NAND terms. The NAND form,
  with constants at 2^N and 2^(2N-1), is used here because it is the one
  that yields the exact two's complement product.
* **Clocked top.** The register stages, the one-cycle latency, the
  `in_valid`/`out_valid` flags, the reset, and `mul_op` = upper half of the
  product are all choices made here.
* **Not built.** The carry-save-adder multiplier that the design was
  compared against is not built. Neither are the fixed-width compensation
  schemes (`f(IC)`) that were discussed only as earlier work. The published
  power, area and delay figures (34 mW against 40 mW, 0.19 ns against
  0.68 ns) depend on a process and a flow, and are not reproduced.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. The testbenches import the reference
models in `tb/ptm_ref_pkg.sv`, so compile that file first:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    tb/ptm_ref_pkg.sv tb/tb_ptm_top.sv --top-module tb_ptm_top
./obj_dir/Vtb_ptm_top
```

`-Wno-fatal` is needed only because the reference functions take 64-bit
arguments, and Verilator warns when narrower values are passed to them.
The RTL itself lints cleanly with `-Wall`.

| testbench        | what it covers |
|------------------|----------------|
| `tb_eta_rca`     | ripple adder against integer addition |
| `tb_eta_control` | force vector against an MSB-first scan |
| `tb_eta_cfa`     | carry-free sums |
| `tb_eta`         | 32-bit ETA against a reference model, the error bound, the accuracy rule on random inputs, the 16-bit worked example, and `M = 0` exactness |
| `tb_ptm_ppgen`   | matrix sum equals the signed product for all 65536 pairs; each gated term |
| `tb_ptm`         | exact instance (`M = 0`): signed product and enabled-matrix sums; default instance: ETA row-array model, all pairs, random `t` |
| `tb_ptm_top`     | end to end at the default size: streaming with idle cycles, `t` changing between operations, half-matrix truncation, a reset with operations in flight, latency, and `mul_op`; counts each of these and fails if one never happens |
| `tb_ptm_error`   | the error table above: no overshoot at full precision, and a growing negative bias with truncation |

The reference models in `ptm_ref_pkg` are written as bit-serial loops, not
as copies of the RTL structure:

* `eta_ref`: ETA addition.
* `matrix_ref`: exact sum of the enabled matrix.
* `ptm_ref`: the ETA row array.
* `smul_ref`: signed product.

To explore other design points, override `N` and `M` on `ptm` or
`ptm_top`. `ptm_ref(x, y, t, N, M)` gives the expected product for any
values.
