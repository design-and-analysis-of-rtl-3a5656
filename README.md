# PPI-MO floating point matrix multiplier (single and double precision)

This RTL multiplies two N x N matrices of IEEE-754 floating point numbers,
C = A x B, with a fully parallel array: N² floating point multipliers,
N² product registers and N² − N floating point adders. Matrix A stays put in
the array, matrix B is streamed in one column per clock, and one complete
column of C comes out per clock, so an N x N product takes N cycles of input
("parallel-parallel input, multi output", PPI-MO). Each floating point
multiplier forms its significand product by cutting both significands into
four groups and summing the 16 group products, and adds exponents with
carry select adders that use a binary to excess-1 converter (BEC).

The default size is N = 3. The top level, `matmul_top`, holds one array for
single precision (8-bit exponent, 23-bit fraction) and one for double
precision (11-bit exponent, 52-bit fraction), side by side.

## How a product moves through the array

Number the multipliers M[i][j] by row i and column j (0-based here).

* Every multiplier in row i gets the same streamed operand: element i of the
  current column of B, `b_col[i]` = b[i][k].
* M[i][j] gets the fixed operand a[j][i]. The matrix A is therefore laid
  into the array transposed.
* The adder under column j sums that column's products:
  Σ_i a[j][i]·b[i][k] = c[j][k].

So when column k of B enters, the N column adders produce column k of C,
element j from adder j. C leaves in column-major order, one column per
cycle.

```
cycle        t          t+1         t+2         t+3
in_valid     1          1           1           0
b_col        B[:,0]     B[:,1]      B[:,2]
out_valid    0          1           1           1
c_col                   C[:,0]      C[:,1]      C[:,2]
out_col                 0           1           2 (out_last)
```

The products are captured in the N² registers on the clock edge that takes
`b_col`. The column adders work combinationally from those registers, so each
column of C is valid one cycle after its column of B. `in_valid` may stay
high: products can follow each other with no gap. `in_valid` may also drop
for any number of cycles between columns. A counter labels each output
column with its index k and raises `out_last` for k = N − 1. The counter
wraps after N columns, so a stream must send whole matrices.

A is a plain input. It must stay stable from the first column of B until the
last column of that product has been clocked in. Nothing in the array loads
or stores A.

## The floating point multiplier (`fp_multiplier`)

The three fields of a product are handled separately:

* **Sign**: XOR of the two sign bits.
* **Significand**: `partition_multiplier` multiplies the two significands,
  each with its hidden 1 (24 bits in single precision, 53 in double). Each
  operand is zero-extended to a multiple of four bits and cut into four equal
  groups: 6 bits for single precision, 14 bits for double (53 is padded to
  56). The product of group i of one operand and group j of the other is
  shifted left by (i + j) group widths, and all 16 shifted products are
  added. The result is the exact 48-bit or 106-bit product.
* **Normalisation**: both significands lie in [1, 2), so the product lies in
  [1, 4). If its top bit is set, the fraction is taken one bit lower and the
  normalisation increment NE is 1. Otherwise NE is 0. The bits below the
  leading 1 are truncated to the fraction width.
* **Exponent**: three carry select adders in a row compute
  E_a + E_b, then subtract the bias, then add NE.

The exponent adders have **no carry out**, so the exponent arithmetic runs
modulo 2^E (E = exponent width). The bias is subtracted by adding its two's
complement, 2^E − bias. For every result whose exponent is in range, the
modulo result equals the true one: for example 130 + 130 = 260 wraps to 4,
and 4 + 129 = 133 = 260 − 127. Only out-of-range exponents are lost. These
are caught by a separate, wider signed sum that only decides
overflow/underflow; the delivered exponent always comes from the carry
select adders.

## The exponent adders (`parallel_adder`, `bec`, `csa_adder`)

`parallel_adder` is a ripple carry adder. Bit 0 takes a carry input and acts
as a half adder when that input is 0. With `MODIFIED = 1` the top cell is a
bare XOR with no carry out. This is the form the exponent path uses, since
its carry out is never needed.

`csa_adder` is a carry select adder. The low half of the operands goes
through a ripple adder that does produce a carry. The high half is added once
with carry 0 by a modified ripple adder. The carry-1 result comes from a BEC
(`bec`, b + 1, built from an inverter and an XOR/AND chain), and the low carry
picks between the two. With `USE_BEC = 0` a second ripple adder with carry
input 1 replaces the BEC; this is the dual-ripple variant, the larger of the
two. The BEC form is the default. The split is W/2 low bits: 4 + 4 for the
8-bit exponent, 5 + 6 for the 11-bit one.

## Summing the products (`column_adder`, `fp_adder`)

Each column adder is a chain of N − 1 two-input floating point adders,
((p0 + p1) + p2) + …, in row order. The chain order fixes the order of the
truncations. Results are therefore exactly reproducible, but they can differ
in the last bit from a tree sum.

`fp_adder` is a conventional adder:

1. Put the operands in order of magnitude.
2. Extend the smaller significand by guard, round and sticky bits and shift it
   right by the exponent difference. Every bit shifted past the round position
   is ORed into the sticky bit.
3. Add the two significands, or subtract them when the signs differ.
4. Normalise, either one place right or as many places left as the
   cancellation needs.
5. Truncate.

With the sticky bit, this truncation is exactly the round-toward-zero value
of the true sum.

## Number conventions

These rules hold in the multiplier and the adder alike. They are this
design's own choices, made for a datapath meant for normalised numbers.

* Rounding is toward zero (truncation) everywhere.
* An exponent field of 0 reads as zero. Subnormal inputs are flushed to
  zero.
* Underflow: a result exponent below 1 gives a zero that keeps the sign and
  raises `underflow`.
* Overflow: a result exponent of 2^E − 1 or more gives an infinity that keeps
  the sign and raises `overflow`.
* An infinite operand gives an infinity without raising a flag. An overflow
  found in a multiplier therefore survives the column sum. In a product, a
  zero operand wins over an infinite one.
* NaN is never produced. A NaN input is treated as an infinity, and
  inf − inf gives an infinity.
* A sum that cancels exactly is +0.

At the array outputs, `c_overflow[j]` and `c_underflow[j]` report whether any
multiplier or adder behind element j of the current column raised that flag.

## Modules

| module | role |
|---|---|
| `fp_pkg` | format widths, `sp_t`/`dp_t` word structs, `fp_bias()` |
| `parallel_adder` | ripple carry adder, optionally without carry out |
| `bec` | binary to excess-1 converter |
| `csa_adder` | carry select adder (BEC or dual ripple), no carry out |
| `partition_multiplier` | 4 x 4 group significand multiplier |
| `fp_multiplier` | IEEE-754 multiplier, combinational |
| `fp_adder` | IEEE-754 adder, combinational |
| `column_adder` | N − 1 chained adders for one array column |
| `ppi_mo_matmul` | the N x N array with registers and control |
| `matmul_top` | single and double precision arrays side by side |

Parameters: `N` (matrix size, default 3), and `EXP_W`/`MAN_W` (default 8/23)
on every floating point module. In `matmul_top` the single precision array
uses 8/23 and the double precision array 11/52. The arrays scale with N².

`matmul_top` ports, for each of the prefixes `sp_` and `dp_`:
`a[N][N]` (row, column), `in_valid`, `b_col[N]`, `out_valid`, `out_col`,
`out_last`, `c_col[N]`, `c_overflow[N]`, `c_underflow[N]`. The words are
packed structs `{sign, exp, man}`. `clk` and `rst_n` are shared. The reset is
synchronous and active low. It clears the output valid flag and the column
counter; the data registers are not reset.

## Timing and cost

The only registers are the N² product registers (plus their flags) and the
small control. A column of C therefore passes in one clock period through the
column adder chain. The critical path runs from those registers through
N − 1 floating point adders. A multiplier in front of the registers is a
second long path: the significand product, then normalisation. If a higher
clock is needed, the usual step is to register the column adder outputs or
pipeline the adder chain. That step would change the one-cycle latency above.

At N = 3 and both precisions, generic synthesis of `matmul_top` gives about
3,400 word-level cells and 910 flip-flops.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

* `fp_ref_pkg` is the reference. It computes products and sums exactly, with
  integers up to 2304 bits wide, and then truncates. It follows the number
  conventions above and shares no structure with the RTL.
* `tb_parallel_adder`, `tb_bec`, `tb_csa_adder` and `tb_partition_multiplier`
  compare against integer arithmetic. The 8-bit cases are exhaustive; the 11-,
  24- and 53-bit cases use random operands.
* `tb_fp_multiplier` and `tb_fp_adder` run single and double precision against
  the reference: random operands, near and exact cancellation, zeros,
  overflow and underflow.
* `tb_column_adder` checks the chained sum.
* `mm_stream_checker` streams matrix pairs into an array. It predicts every
  column of C and checks its value, flags, index, last marker, and arrival
  exactly one cycle after its column of B.
  - It mixes idle cycles with back-to-back products.
  - It cycles through matrix kinds that force overflow, underflow, exact
    cancellation in a column sum, and zero operands.
  - It counts each of these events, and the testbench fails if one never
    happens.
* `tb_ppi_mo_matmul` runs this checker at N = 3 in single precision and at
  N = 4 in double precision.
* `tb_matmul_top` runs the top at its default size, with both precisions at
  once.
* `tb_workload_3x3` multiplies small integer matrices whose product is
  known by hand, checks every element of C in both precisions, and checks
  that each 3 x 3 product is finished three clocks after its first column
  of B went in.

To run one with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_matmul_top.sv --top-module tb_matmul_top
./obj_dir/Vtb_matmul_top
```

Replace `tb_matmul_top` with the testbench you want. Each one runs in
seconds.

## Where this departs from, or adds to, the described architecture

The array shape, the operand mapping, the column-per-cycle dataflow, the
register and adder counts, the four-group significand multiplier and the
carry select exponent adders with BEC all follow the architecture this design
implements. The following are additions or interpretations:

* **Choices of this design, absent from the architecture:**
  - the floating point adder and its chain order
  - rounding and the special-value rules above
  - the valid/index/last interface
  - keeping A as a stable input
  - the one-cycle latency
* **Significand padding:** the partition scheme is generalised from a
  two-way split to four equal groups. A width that does not divide by four
  is zero-padded.
* **Carry input:** the ripple adder's bit 0 takes a carry input, so the same
  cell serves the dual-ripple carry select variant.
* **Range check:** the wide exponent range check exists only because the
  exponent adders drop their carry.
* **Not built:** a carry skip adder is a known alternative for the exponent
  path but is not used here.
* **Not reproduced:** FPGA figures (slices, LUTs, path delay) for an older
  device family. The RTL is technology-independent and carries no such
  numbers.
