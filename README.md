# RAD2^k: a signed multiplier with hybrid high-radix encoding

Many signal-processing and machine-learning workloads tolerate small
arithmetic errors. This multiplier uses that tolerance to cut the number of
partial products. It does so without touching the accumulation tree or the
final adder. The multiplier operand B is split in two:

* its **upper N-k bits** are encoded exactly, with ordinary radix-4 (modified
  Booth) digits in {0, ±1, ±2};
* its **lower k bits** are treated as one single high-radix digit y0
  (radix 2^k), which is *rounded to the nearest power of two*. The
  candidates are 0, ±2^(k-4), ±2^(k-3), ±2^(k-2) and ±2^(k-1).

Exact radix-4 encoding of the low k bits would take k/2 partial-product rows.
Here they take one row. That row is only A shifted by one of four amounts,
and possibly inverted, so its generator is as cheap as a radix-4 generator.
The variants are named after the radix of the approximate digit: RAD64
(k = 6), RAD256 (k = 8), RAD1024 (k = 10) and RAD4096 (k = 12). Larger k
gives fewer rows and more error.

The result is simple to state:

    p = A * (B - y0 + round(y0))

Here y0 is the value of b[k-1:0] read as a k-bit two's-complement number. The
error depends only on A and on the k low bits of B. It is zero whenever y0 is
already 0 or a candidate power of two. Its size is at most |A| * 2^(k-3).

The default build is a 16 x 16 RAD256 multiplier (N = 16, K = 8). It is
purely combinational.

## How B is cut into digits

The whole design depends on the two encodings fitting together exactly. For
an N-bit two's-complement B:

* Radix-4 digits: y_j = -2 b[2j+1] + b[2j] + b[2j-1], for
  j = k/2 .. N/2-1, with weight 4^j. The lowest of them uses b[k-1] as its
  overlap bit b[2j-1].
* High-radix digit: y0 = -2^(k-1) b[k-1] + sum_{i<k-1} b[i] 2^i, with weight 1.

Summing the radix-4 digits gives the upper part of B plus 2^k b[k-1]. The
high-radix digit contributes -2^(k-1) b[k-1]. That is exactly what is needed
to correct it, so sum_j y_j 4^j + y0 = B with no approximation. All the error
comes from replacing y0 by round(y0).

### Rounding rule (`hr_encoder`)

The encoder takes |y0| and compares it with the midpoints between adjacent
candidates. A tie goes to the larger magnitude. For k = 8:

| y0 (magnitude) | round(y0) magnitude | select |
|---|---|---|
| 0 .. 7    | 0   | none  |
| 8 .. 23   | 16  | x[0]  |
| 24 .. 47  | 32  | x[1]  |
| 48 .. 95  | 64  | x[2]  |
| 96 .. 128 | 128 | x[3]  |

In general, the thresholds on |y0| are 2^(k-5), 3·2^(k-5), 3·2^(k-4) and
3·2^(k-3). The sign output is b[k-1]. A small negative y0 that rounds to 0
therefore leaves `neg` set with no select. That row is all ones, and its sign
factor cancels it.

The outputs are four one-hot selects and a sign (`rad2k_pkg::hr_sel_t`).
Select x[i] always means "2^(k-4+i) times A", so the row generator is the
same circuit for every k.

## Partial product rows

There are (N-k)/2 + 2 rows, summed in a 2N-bit field:

| row | generator | bits | lowest weight |
|---|---|---|---|
| 0 | `hr_ppg`: pp[i] = (x[3]&a[i-3] \| x[2]&a[i-2] \| x[1]&a[i-1] \| x[0]&a[i]) ^ neg | N+3 | 2^(k-4) |
| 1 .. (N-k)/2 | `radix4_ppg`: pp[i] = (x1&a[i] \| x2&a[i-1]) ^ neg | N+1 | 2^(2j), j = k/2 .. |
| last | correction: sign factors OR constant | 2N | — |

For a negative digit, each generator gives the one's complement of |digit|·A.
The missing +1 is that row's **sign factor**, `neg`, placed at the row's
lowest weight. The high-radix row starts at weight 2^(k-4). Every bit below
that weight would just equal `neg`, so those bits are dropped and its sign
factor goes in at 2^(k-4). Both give the same value.

No row is sign-extended. Each row stores its top (sign) bit inverted. The
identity -2^m s = 2^m (1-s) - 2^m turns the sign extension into a constant,
-2^m. The constants of all rows are added once, at elaboration time, into
`CONST`. The sign factors sit at weights up to 2^(N-2). The constant has no
bit below 2^(N+k-2). Because the two never overlap, they are ORed into a
single correction row.

For the default N = 16, K = 8 there are 6 rows: one high-radix row, four
radix-4 rows and the correction row. An exact radix-4 multiplier would need
8 rows plus sign factors.

## Accumulation and final addition

* `wallace_tree` reduces the rows to two, sum and carry. It works in layers
  of 3:2 carry-save adders (`csa_3to2`, one full adder per column) and
  groups rows in threes, as Wallace's scheme does. Rows left over pass to the
  next layer unchanged. A layer of r rows becomes 2·floor(r/3) + r mod 3
  rows. Six rows take three layers. The tree works on whole rows, so columns
  that hold only constant zeros get full adders too, and synthesis removes
  them. A bit-level tree with half adders in the short columns would give the
  same sum.
* `prefix_adder` adds the two rows with a Kogge-Stone carry network
  (log2(2N) = 5 levels for 32 bits). It has no carry-in, and its carry-out is
  dropped.

The approximate product always fits in 2N bits: |round(y0)| never exceeds
2^(k-1), so |B - y0 + round(y0)| <= 2^(N-1). Arithmetic modulo 2^(2N) is
therefore exact.

## Accuracy

The end-to-end testbench measures the error over 200,000 random operand
pairs. MRED is the mean of |exact - approximate| / |exact|.

| variant | MRED | mean error (signed) |
|---|---|---|
| RAD64 (k = 6)    | 0.081 % | -164 |
| RAD256 (k = 8)   | 0.28 %  | +511 |
| RAD1024 (k = 10) | 0.94 %  | +1679 |
| RAD4096 (k = 12) | 3.0 %   | -6634 |

The mean error is tiny compared with the typical product magnitude of about
2^28, because rounding up and rounding down occur about equally often. The
error is a deterministic function of A and of b[k-1:0]. It can therefore be
predicted for a known input distribution without simulating the circuit.

## Modules

| module | role |
|---|---|
| `rad2k_pkg` | select-signal structs `r4_sel_t` {neg, x1, x2} and `hr_sel_t` {neg, x[3:0]} |
| `radix4_encoder` | triplet b[2j+1:2j-1] to radix-4 selects |
| `radix4_ppg` | one radix-4 partial product row (N+1 bits) |
| `hr_encoder` #(K) | b[K-1:0] to the rounded high-radix selects |
| `hr_ppg` | the high-radix partial product row (N+3 bits) |
| `csa_3to2` | one layer of full adders |
| `wallace_tree` #(ROWS, W) | carry-save reduction to two rows |
| `prefix_adder` #(W) | Kogge-Stone final adder |
| `rad2k_multiplier` #(N, K) | top: a[N-1:0], b[N-1:0] to p[2N-1:0], all two's complement |

Parameter limits: N even; K even, with 4 <= K <= N-2. Elaboration reports an
error otherwise. At N = 16, K = 8, generic synthesis gives about 840
word-level cells and no flip-flops.

## Where this departs from, or adds to, the published scheme

The published scheme defines the digit sets, the four-way shift selection of
the high-radix generator, the Wallace tree plus prefix adder structure and
the 16-bit evaluation size. The following are choices made in this RTL:

* **Encoded operand.** B is the operand that is encoded, and A is the one
  whose multiples form the rows.
* **Tie rule and rounding circuit.** Ties round to the larger magnitude. The
  encoder is built as absolute value plus threshold comparators. It computes
  the nearest power of two exactly, but it is not a minimal gate-level
  encoder. A hand-optimised encoder would give the same function in less
  area.
* **Correction term layout.** The sign factors and the constant are merged
  into one row, as described above.
* **Tree granularity.** The Wallace tree works on whole rows, with full
  adders everywhere, rather than following a hand-drawn bit-level dot
  diagram.
* **Final adder.** The adder is Kogge-Stone; the published scheme asks only
  for a prefix adder.
* **Timing.** There are no pipeline registers.
* **Default k.** The default is k = 8. The other published variants are
  selected with the `K` parameter.

The exact radix-4 multiplier that the scheme is compared against is not
included.

## Simulating

Each testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.
For example, with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/rad2k_pkg.sv tb/tb_rad2k_full.sv \
        --top-module tb_rad2k_full
    ./obj_dir/Vtb_rad2k_full

| testbench | what it covers |
|---|---|
| `tb_rad2k_full` | default 16 x 16, K = 8 build: all 65536 values of b for 256 values of a (including the corners), against the formula above; exactness for candidate digits; error bound (about 10 s) |
| `tb_rad2k_multiplier` | K = 6, 8, 10, 12 side by side: corners, every b for four values of a, and 200,000 random pairs. It counts each rounding case (each select, rounding to zero, ties, exact digits, negative digits, each radix-4 digit kind), fails if any never occurs, and prints MRED |
| `tb_hr_encoder` | every input of the encoder for K = 6, 8, 10, 12 against a brute-force nearest-candidate search |
| `tb_radix4_encoder`, `tb_radix4_ppg`, `tb_hr_ppg` | exhaustive over the select inputs, random multiplicands |
| `tb_wallace_tree` | 2, 3, 4, 6, 7, 9 rows, random data |
| `tb_prefix_adder` | exhaustive at 8 bits; random data and full carry chains at 17 and 32 bits |

To change the variant, set `K` on `rad2k_multiplier`. The reference models in
the testbenches take K as an argument.
