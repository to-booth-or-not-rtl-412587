# Booth-2 versus plain partial products: four unsigned multiplier reduction networks

A fixed-point multiplier spends most of its area and delay in the network that
adds the partial products. Radix-4 (Booth-2) recoding of the multiplier
operand halves the number of partial products, at the price of a more complex
generator in front of the adders. Whether that trade pays off depends on how
the partial products are added. This RTL implements the four combinations so
they can be compared and reused side by side:

| module              | partial products        | reduction network                 |
|---------------------|-------------------------|-----------------------------------|
| `array_mul`         | m rows of AND gates     | linear array of m-2 3/2-adders    |
| `booth_array_mul`   | m' = ceil((m+1)/2) Booth rows | linear array of m'-2 3/2-adders |
| `tree42_mul`        | m rows of AND gates     | 4/2-adder tree                    |
| `booth_tree42_mul`  | m' Booth rows           | 4/2-adder tree                    |

All four take unsigned operands `a` (N bits) and `b` (M bits) and return the
product in carry-save form: `sum + carry == a * b` (mod 2^(N+M), and since
the product is below 2^(N+M) this is exact). The final carry-propagate adder
is deliberately not part of these blocks; the comparison is about partial
product generation and reduction. The default size is N = M = 53, the
double-precision mantissa. Everything is combinational: there is no clock,
no reset and no handshake.

`mul_top` instantiates the four designs on shared inputs and brings out all
eight result words.

## Reading the cost model

The circuits are written so that their structure matches a simple gate model
used to compare them: full adder cost 14, delay 6; AND cost 2, delay 2;
Booth decoder cost 11, delay 3; Booth selection cell cost 10, delay 4. In that
model, for n = m = 53, the Booth array costs about 82 % and takes about 51 %
of the delay of the plain array, while the Booth 4/2-tree costs about 81 %
but still takes about 89 % of the delay of the plain tree, because Booth
recoding removes only one level from a logarithmic tree. The RTL does not
compute these numbers; it provides the netlists they describe. The gate
structure of the decoder and selection cell in this RTL is a plain
sum-of-products choice and will not reproduce the quoted costs exactly.

## Booth-2 partial products (`booth_pp_gen`, `booth_decoder`, `booth_select`)

This is the least obvious part of the design.

The multiplier is cut into overlapping triples b[2j+1], b[2j], b[2j-1]
(with b[-1] = b[M] = b[M+1] = 0), giving m' = ceil((M+1)/2) digits
B_j = -2 b[2j+1] + b[2j] + b[2j-1] in {-2, -1, 0, 1, 2}, and
<b> = sum B_j 4^j. Because b is unsigned and padded with zeros, the top digit
is never negative.

* `booth_decoder` turns a triple into three control lines: `b1` (|B| = 1),
  `b2` (|B| = 2) and `s` (B < 0). The triple 111 is the digit 0, so it gives
  s = 0.
* `booth_select` forms one bit of d = <a>·|B| (N+1 bits) and inverts it when
  the digit is negative: `g = ((a[i+1] & b1) | (a[i] & b2)) ^ s`, the
  shift by one for |B| = 2 coming from taking a[i] instead of a[i+1]. Each
  row uses N+1 of these cells.

A negative row would need sign extension across the full product width. That
is avoided by adding a constant to every row so that it stays positive, and
folding the constants into a few leading bits; the constants added over all
rows sum to 2^(N+1+2m'), which is zero modulo 2^(N+M). The +1 of each two's
complement negation is not added in its own row but dropped into two spare
low-order bits of the next row. Written most-significant bit first:

    row 0  :  ~s0  s0  s0 | d0 ^ s0                         at bit 0
    row j  :    1 ~sj     | dj ^ sj | 0 | s(j-1)            at bit 2j-2

so row j is N+5 bits wide (row 0 is N+3 bits at bit 0) and rows are
2 bits apart. Every row is delivered as an (N+M)-bit word; bits above N+M-1
are dropped.

## Linear array (`csa_array`)

The first 3/2-adder adds rows 0, 1 and 2; every following 3/2-adder adds the
next row to the running sum and carry words. K rows need K-2 adders in a
chain, so delay grows linearly with K. With Booth rows K is about half, which
is why the Booth array is almost twice as fast.

## 4/2-adder tree (`tree42`)

For K rows let M = 2^ceil(log2 K) and mu = log2(M/4).

* **Top level**, M/4 nodes. When 3M/4 <= K <= M, the a = K - 3M/4 rightmost
  nodes are 4/2-adders on four rows each and the other M/4 - a nodes are
  3/2-adders on three rows each. When M/2 < K < 3M/4, the K - M/2 rightmost
  nodes are 3/2-adders and the remaining rows are passed down unchanged, two
  rows forming one carry-save pair.
* **Lower part**: a complete binary tree of 4/2-adders with mu levels. Node i
  of a level adds its right son 2i and its left son 2i+1.

Row 0 enters at the rightmost node. This ordering means that at every node
the left son sums no more rows than the right son, which is the property the
full-adder count of these trees depends on (the tree needs n·m + O(n·m)
full adders). Examples, all checked in `tb_tree42`:

| rows K              | M  | 3/2-leaves | 4/2-leaves | mu |
|---------------------|----|-----------:|-----------:|---:|
| 53 (plain, m = 53)  | 64 | 11 | 5 | 4 |
| 27 (Booth, m = 53)  | 32 | 5  | 3 | 3 |
| 24 (plain, m = 24)  | 32 | 8  | 0 | 3 |
| 13 (Booth, m = 24)  | 16 | 3  | 1 | 2 |

In adder stages every tree uses exactly K-2 3/2-adder levels' worth of
reduction (a 4/2-adder counts as two), the same as the array, but arranged in
depth 2(mu+1) full adders.

## Building blocks

* `full_adder` — XOR/majority full adder.
* `csa` — K-bit 3/2-adder. The carry word comes out already shifted to its
  weight (bit 0 is always 0), and the carry out of the top bit is dropped.
* `adder42` — K-bit 4/2-adder: one 3/2-adder on a, b, c, a second one adding
  d to its result.
* `pp_and_gen` — the N·M AND gates of the plain multiplier; row j is
  `(a & {N{b[j]}}) << j`.
* `mul_pkg` — elaboration-time functions for m' and for the tree shape.

## Where this RTL departs from the analysed circuits

* **Width of the adders.** The analysed adders only span the bit positions
  where a row can be nonzero, and the 4/2-trees have a small, counted number
  of "excess" full adders where partial sums of different length meet. Here
  every adder is the full N+M bits wide and works modulo 2^(N+M). The extra
  full adders see constant zeros and are removed by constant propagation in
  synthesis; before synthesis the instance count is therefore higher than
  the cost model's.
* **Carry-out widths.** A k-bit 4/2-adder is described as having k+1-bit
  outputs; here outputs are k bits, correct modulo 2^k, which is all the
  multipliers need.
* **Wiring inside a 4/2-adder and the order of rows into a 3/2-adder** are
  unspecified in the analysis and chosen here (first adder a, b, c; then d).
* **Layout.** The analysis also places full adders, selection cells and wire
  channels in a specific floorplan to estimate wire delay. A floorplan has no
  RTL form, so only the logic is given here; wire-delay results depend on a
  placement this RTL does not constrain.
* The lowest bit of every `carry` output is constant 0, as a consequence of
  the carry word being at its weight.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `*_mul`, `mul_top`, `pp_and_gen`, `booth_pp_gen` | `N`, `M` | 53, 53 | operand widths |
| `csa_array`, `tree42` | `K`, `W` | 53, 106 | number of rows, row width |
| `csa`, `adder42` | `K` | 106 | word width |

The reduction networks need K >= 3 rows, so the Booth designs need M >= 4
and the plain ones M >= 3 (an elaboration error reports smaller values).
Any N >= 1 works.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv` that compares
against arithmetic done in the testbench itself (integer addition and
128/256-bit multiplication, digit decoding from b):

* cells (`full_adder`, `booth_decoder`, `booth_select`) exhaustively;
* `csa`, `adder42`, `csa_array` with random and all-ones words;
* `pp_and_gen` and `booth_pp_gen` row by row, plus the sum of all rows;
  `tb_booth_pp_gen` recomputes each Booth row from the digit value;
* `tree42` at 13 row counts covering both top-level shapes, plus the shape
  table above;
* each multiplier at 53 x 53 (random and extreme operands), exhaustively at
  6 x 6, and randomly at 12 x 9;
* `tb_mul_top` runs all four designs at the default 53 x 53 and counts that
  every Booth mechanism occurred: each digit value -2..+2, the zero digit
  from 111, and a negative digit's +1 moved into the next row;
* `tb_mul_sizes` runs `mul_top` at n = m = 8, 13, 15, 16, 17, 24 and 64.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if it hangs. To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/mul_pkg.sv \
        tb/tb_mul_top.sv --top-module tb_mul_top -o sim
    ./obj_dir/sim

The full 53 x 53 top takes under a minute to build and under a second to run.
Only functional behaviour is checked; gate counts and delays of the cost
model are not measured by the testbenches.
