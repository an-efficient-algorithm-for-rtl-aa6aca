# Multiplierless 2-D linear transform generator

This design computes a constant matrix-vector product, `y = K x`, without a single
multiplier. Every coefficient product becomes hardwired shifts plus adders and
subtracters. The adder network is not written by hand: the RTL works it out from the
coefficient matrix while it is elaborated. It applies the decomposition of A. Yurdakul's
algorithm for multiplierless 2-D linear transforms ("An Efficient Algorithm for the
Multiplierless Realization of 2-D Linear Transforms"), which aims at few adders and
shares partial sums between rows and coefficients wherever it can.

By default the matrix is the orthonormal 8-point DCT with 8-bit coefficients, and
8-bit signed inputs. The generated network uses **68 adders**. A direct realization
needs **200**: one CSD shift-and-add multiplier per coefficient, plus the adders that
sum each row. The published result of the algorithm for the same case is 86 adders.

Multiplierless adder networks like this are used where power and area matter more
than being able to change the coefficients: battery-powered DSP, and fixed transforms
in codecs and filter banks. With reconfigurable routing, the shifts can also be
reprogrammed.

## How a coefficient matrix becomes an adder network

Let `K` be an M x N matrix of integers. Think of the entries as fixed-point
coefficients scaled by `2^W`. The generator goes through five stages. Each stage turns
into a layer of hardware.

```
 x[0..N-1]
    |
    |  (3') shared two-terms: t_k = s_a +/- (s_b << d), one adder each
    v
 basis adder banks            s_r = k_r . x       entries 0 or +/-2^s  (pow2_adder_bank)
    |
    v
 alpha scaling                alpha_p * s_r       CSD shift-add chains (csd_const_mult)
    |
    v
 rowwise adder banks          y_m = sum beta * (alpha_p * s_r)        (pow2_adder_bank)
    |
    v
 output register              y[0..M-1], out_valid
```

**1. Coefficient quantization.** The default matrix is

    K[m][n] = floor( c(m) * cos((2n+1) m pi / 2N) * 2^W + 0.5 ),
    c(0) = sqrt(1/N),  c(m>0) = sqrt(2/N)

Constants are implemented in canonic signed digit (CSD) form. This is the
non-adjacent form: digits are -1, 0 or +1, and no two neighbouring digits are nonzero.
A constant with k nonzero digits costs k-1 adders.

**2. Matrix decomposition, `K = sum_p alpha_p K_p`.** Every nonzero coefficient is
written as `sign * alpha * 2^s` with `alpha` odd. Each distinct `alpha` is one
`alpha_p`. Its sub-matrix `K_p` holds the coefficients with that odd part, reduced to
their sign and shift. So `K_p` contains only 0 and +/-2^s: it needs wiring and adders,
never a multiplier. The DCT-8 at W = 8 has 7 distinct odd parts.

**3. Basis rows.** Row m of `K_p` (call it `k_{p,m}`) is compared with all rows found
before it. If it is a shifted and/or negated copy of an earlier row `k_r`, that is
`k_{p,m} = beta * k_r` with `beta = +/-2^b`, then it needs no hardware of its own. The
bank that computes `s_r = k_r . x` already produces it, and `beta` becomes wiring later.
The DCT-8 needs only 8 basis rows for the 22 nonempty rows of its seven sub-matrices.

**3'. Two-terms shared between basis rows** (parameter `SHARE`, on by default). A
*two-term* is a pair of nonzero entries in one basis row, for example `x_0 - 4 x_7`.
Two-terms in different rows match if they use the same two inputs with the same
relative shift and sign, so that one is a shifted and/or negated copy of the other.
The extraction works greedily:

1. Find the two-term with the most matches.
2. Build it once as a new signal `t = s_a +/- (s_b << d)`. This costs one adder.
3. In every matching row, replace the pair with a single term on `t`.
4. Repeat until no two-term matches in two or more rows.

Shared signals can themselves be part of later two-terms. For the DCT-8 this finds 6
shared two-terms: the four butterfly sums `x_n + x_{7-n}`, and then
`(x_0+x_7) + (x_3+x_4)` and `(x_1+x_6) + (x_2+x_5)`. They save 10 adders, because most
of them are reused in more than one row. Each bank then sums
only the terms that remain.

**4. Scaling, in one of two directions.**
- *Horizontal*: each basis output `s_r` is multiplied by each `alpha_p` it is needed
  with, once per distinct (`alpha_p`, r) pair: 22 pairs for the DCT-8.
- *Vertical*: there are no basis banks. Each input `x_n` is multiplied by each
  `alpha_p` that occurs in column n.

Each scaling is written as the CSD digits of its constant, i.e. terms
`+/- signal * 2^position`. With `SHARE = 1`, two-terms of consecutive nonzero digits
are shared the same way as between basis rows. Two-terms match when they apply the
same signals at the same distance with the same relative sign, inside one constant or
across constants. For the DCT-8, 6 such two-terms are shared. Each scaling is then
one `pow2_adder_bank`. With `SHARE = 0`, each scaling is a plain `csd_const_mult`
chain. The search runs only for a direction that `DIR` allows; with a forced
direction, the count of the other one leaves out scaling two-terms.

The generator counts the adders of both directions. With `DIR = DIR_AUTO` it builds
the cheaper one. For the DCT-8 that is horizontal: 68 adders against 144.

**5. Rowwise sums.** Output `y_m` is the sum of the scaled signals it needs, each with
its `beta` (horizontal) or its coefficient's sign and shift (vertical) as fixed wiring.
This is one `pow2_adder_bank` per output.

Counts of the DCT-8 network at W = 8:

| part | adders |
|---|---|
| 6 shared two-terms between basis rows | 6 |
| 8 basis banks (terms left after sharing) | 8 |
| 6 shared two-terms inside the scaling constants | 6 |
| 22 alpha-scaling banks (terms left after sharing) | 34 |
| 8 rowwise sums | 14 |
| **total** | **68** |

With `SHARE = 0` the same network needs 84 adders.

All of this runs in constant functions at elaboration. The per-step state of the
two-term extraction is a chain of localparams (`CSE0` to `CSE` between basis rows, 16
steps; `SH0` to `SCH` and `SV0` to `SCV` inside the scaling constants, 24 steps), so
each step is a separate, small constant evaluation. That keeps elaboration within the
per-evaluation work limits of some tools. The caps only limit how much is shared. If
one is reached, the remaining terms are summed directly, and the
result is still exact.

## Results across wordlengths

The direct counts below are exact for this coefficient set. The "published" column is
the algorithm's own CSD result for the same DCT case.

| coefficient wordlength W | direct CSD realization | this generator | published |
|---|---|---|---|
| 8  | 200 | 68  | 86  |
| 12 | 264 | 78  | 110 |
| 16 | 344 | 100 | 154 |
| 24 | 536 | 140 | 211 |

The generator does not share inside rowwise sums and does not search the
decomposition (see below). Its gain comes from grouping by odd part, which makes many
DCT rows collapse into a few basis rows, and from sharing the scaling two-terms across
constants as well as within them.

## Interface and timing

`mlt2d_transform` (top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset of the output register |
| `in_valid` | in | 1 | `x` holds a vector this clock |
| `x` | in | `XW` x N (unpacked) | signed input vector |
| `out_valid` | out | 1 | `y` holds the result of the vector given one clock earlier |
| `y` | out | `YW` x M (unpacked) | signed `K x`, exact |

- The adder network is combinational.
- Only `y` and `out_valid` are registered, so the latency is one clock.
- The design accepts one vector per clock and never stalls.
- `y` holds its value while `in_valid` is low.
- There is no pipelining inside the network. Its critical path is the longest chain
  of adders: a shared two-term, a basis bank, a CSD chain, then a rowwise bank.

Parameters:

| name | default | meaning |
|---|---|---|
| `M`, `N` | 8, 8 | matrix size |
| `W` | 8 | coefficient wordlength; DCT entries carry W fractional bits |
| `XW` | 8 | input width |
| `SRC` | `COEF_DCT` | `COEF_USER` takes the matrix from `KUSER` |
| `KUSER` | 0 | packed `[M*N-1:0][31:0]`; entry `m*N+n` is `K[m][n]` as a signed 32-bit integer |
| `DIR` | `DIR_AUTO` | `DIR_HORIZONTAL` or `DIR_VERTICAL` forces a direction |
| `SHARE` | 1 | two-term extraction between basis rows and inside the scaling constants |
| `YW` | `XW+W+clog2(N)+1` | output width |

Arithmetic and width:
- Every internal signal is `YW` bits wide, and all arithmetic is modulo `2^YW`.
- Intermediate values may wrap, but the final result is exact whenever it fits in
  `YW` bits.
- The default `YW` is enough for any matrix whose entries lie in `[-2^W, 2^W]`.
- Elaboration stops with an error if the given matrix could overflow a narrower `YW`.
- The outputs are `K x` at full precision. For the DCT they are scaled by `2^W`;
  any rounding or truncation is left to the user.

Localparams readable from a testbench: `ADDERS_DIRECT`, `ADDERS_H`, `ADDERS_V`,
`NUM_ADDERS` (the built network), `NSHARED`, `NSHARED_SH`, `NSHARED_SV`, `NP` (number
of alphas) and `NB` (number of basis rows).

### Building blocks

- **`pow2_adder_bank`**: `y = sum_t w_t * in_t` with `w_t` in {0, +2^s, -2^s}, given by
  the parameters `NZ`, `NEG` and `SH`. It is a chain that starts from the first
  positive input, so no negation is needed unless all weights are negative. It has
  (inputs - 1) adders and is combinational.
- **`csd_const_mult`**: `y = C * x` for an integer constant `C`. It is a CSD chain
  from the most significant digit down, with (nonzero digits - 1) adders, and is
  combinational.
- **`mlt_pkg`**: the enums for `SRC` and `DIR`, the term and node structs of the
  extraction, CSD recoding, odd part and shift of an integer, and the DCT formula.

## Where this departs from the published algorithm

- **Matrix decomposition.** The published method finds the sub-matrices with the
  adder tree of an earlier 1-D multiple-constant algorithm, which is not reproduced
  here. This design groups coefficients by odd part instead. That meets the same end
  condition: all `alpha_p` are distinct, one of them is 1 when a power-of-two entry
  exists, and all `K_p` entries are shifts and negations.
- **Sharing in rowwise sums.** The published method also applies two-term sharing to
  the rowwise sums. Here each rowwise sum is a plain chain.
- **Two-terms.** Between basis rows, a two-term is any pair of nonzero entries of a
  row. Inside scaling constants, it is a pair of consecutive nonzero CSD digits. Ties
  go to the first pair found. Extraction stops after 16 (basis rows) or 24 (scaling)
  shared two-terms.
- **Not specified by the method, chosen here:** the input width, the chain structure
  of the banks (a balanced tree would have the same adder count and less delay), the
  output register, the valid handshake and the reset.
- **DCT size and scaling.** The method's DCT example states only the wordlengths. The
  orthonormal 8-point DCT scaled by `2^W` used here reproduces the published
  direct-realization counts exactly at all four wordlengths (200, 264, 344, 536).
- **Not built:** the CSD-4 (radix-4 signed digit) coefficient representation. The
  method also evaluates it, but takes it from elsewhere without defining its digit
  set. The eight-branch polyphase filter example is not included either, because its
  coefficients are not available. Any integer matrix can be supplied through `KUSER`.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=... failures=...` line.

| testbench | what it checks |
|---|---|
| `tb_mlt2d_full` | the top with every parameter at its default. 1000 vectors, including the extreme ones, with idle clocks. Every output is compared with `K x` computed from the cosine formula. Checks the one-clock latency and 68/200 adders. |
| `tb_mlt2d_transform` | the default top next to forced horizontal, forced vertical, unshared (84 adders) and a 3x4 user matrix. The user matrix has negative, zero, power-of-two and repeated-odd-part entries and an all-zero row. Also checks the valid timing, holding, a reset in mid-stream, and the adder and sharing counts. It counts each mechanism: horizontal, vertical, shared two-terms between basis rows, shared two-terms inside scaling constants, automatic choice, idle clocks and reset. |
| `tb_dct_wordlengths` | W = 12, 16 and 24, horizontal style forced: adder counts (direct 264/344/536, built 78/100/140) and outputs. |
| `tb_pow2_adder_bank` | mixed signs and shifts, all weights negative, and no inputs, with random and extreme vectors. |
| `tb_csd_const_mult` | eight constants (positive, negative, zero, a power of two, long runs of ones) on every 8-bit input. |

Run one with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb rtl/mlt_pkg.sv \
    tb/tb_mlt2d_full.sv --top-module tb_mlt2d_full
./obj_dir/Vtb_mlt2d_full
```

Replace `tb_mlt2d_full` with any other testbench name. Elaboration of the default top
takes a few seconds. The two-term extraction grows with (basis rows x row length)^2
per step, so very large user matrices elaborate slowly.

## Changing it

- **Another matrix:** set `SRC` to `COEF_USER`, and `M`, `N` and `KUSER`, with `W`
  large enough that every entry lies in `[-2^W, 2^W]` (or set `YW` yourself). Read
  `NUM_ADDERS` to see what was built.
- **Another DCT size or precision:** change `N`, `M` and `W`.
- **Deeper pipelining:** the natural cut points are the stage boundaries inside
  `g_horizontal` / `g_vertical`: after the shared two-terms, after the basis banks
  and after the scaling.
