# Odd-time generalized Hartley transform on two band-correlation systolic arrays

This design computes the odd-time generalized discrete Hartley transform (GDHT)
of a block of N real samples, for a prime N:

    Y(k) = sum_{i=0}^{N-1} x(i) * cas((2i+1) k pi / N),   cas(t) = cos(t) + sin(t),   k = 0 .. N-1

The direct form needs N^2 multiplications and an irregular data flow. The
architecture here restructures the transform so that almost all of the work
becomes two *band-correlations* of length (N-1)/2. A band-correlation has the
regular, local data movement of a circular correlation, so it maps onto a
linear systolic array of (N-1)/2 identical processing elements. The two
band-correlations are independent and run on two arrays side by side. A small
pre-processing step before the arrays and a small post-processing step after
them complete the transform.

The default configuration is N = 13 with primitive root G = 2. All
modules are parameterised by N and G, and the test suite also runs N = 5, 7,
11 and 17.

## The restructured algorithm

Let M = (N-1)/2 and alpha = pi/N.

**1. Two auxiliary input sequences.** They are built by backward recurrences:

    x_C(N-1) = x(N-1),   x_C(i) = x(i) - x_C(i+1)
    x_S(N-1) = x(N-1),   x_S(i) = x(i) + x_S(i+1)        i = N-2 .. 0

**2. Two band-correlations.** For k = 1 .. M:

    T_C(k) = sum_{i=1}^{M} cos(2 pi k i / N) * (x_C(i) + x_C(N-i))
    T_S(k) = sum_{i=1}^{M} cos(2 pi k i / N) * (x_S(i) + x_S(N-i))

**3. Post-processing.**

    H_C(k) = x_C(0) + 2 T_C(k)        H_S(k) = x_S(0) + 2 T_S(k)
    Y(k)   =  H_C(k) cos(k alpha) + H_S(k) sin(k alpha)
    Y(N-k) = -H_C(k) cos(k alpha) + H_S(k) sin(k alpha)
    Y(0)   =  x_S(0)        (the sum of all samples)

**Why step 2 is a band-correlation.** Because N is prime, every index
1 .. N-1 is a power of the primitive root G modulo N. Number both the output
index k and the column index i by powers of G, and fold each power g into
1..M (g if g <= M, otherwise N-g; cos does not change). Row j then belongs to
k = fold(G^(j+1)) and column m to i = fold(G^(m+1)). The matrix entry
cos(2 pi k i / N) becomes c(G^(j+m+2) mod N), with c(v) = cos(2 pi v / N).
Each entry therefore depends only on j+m: the M x M matrix is a window that
slides one step per row along a single sequence of 2M-1 = N-2 coefficients.

For N = 13, G = 2:

| | order |
|---|---|
| rows (output index k) | 2, 4, 5, 3, 6, 1 |
| columns (operand pair i, N-i) | (2,11) (4,9) (5,8) (3,10) (6,7) (1,12) |
| coefficient sequence c(v), v = | 4, 8, 3, 6, 12, 11, 9, 5, 10, 7, 1 |

Row j uses coefficients j .. j+5 of that sequence.

## Block structure

```
 x_i[N] ──► input_restructure ──uc[M],us[M],x_C(0),x_S(0)──► band_stream_ctrl
                                                               │ c, tag (shared)
                                           operand stream C ───┼──► band_corr_array (C) ──T_C──┐
                                           operand stream S ───┴──► band_corr_array (S) ──T_S──┤
                                     frame, x_C(0), x_S(0) (delayed) ──────────────────────► gdht_post ──► y_o[N]
```

| module | role |
|---|---|
| `gdht_pkg` | defaults, index arithmetic (powers of G, folding, primitive-root test), quantised coefficients, derived widths |
| `input_restructure` | step 1 and the folded, permuted operand vectors; combinational |
| `band_stream_ctrl` | plays the coefficient, tag-bit and operand streams into both arrays; handshake; delays the per-block side data |
| `band_corr_array` | one band-correlation: M `gdht_pe` elements in a line |
| `gdht_pe` | processing element: multiplexer, multiplier, adder |
| `gdht_post` | step 3, one row per cycle; collects the output vector |
| `gdht_odd_top` | wires the above together: one restructure unit, one stream controller, two arrays, one output stage |

## The systolic array

This is the least obvious part of the design.

### Processing element

Each `gdht_pe` has four channels. All of them flow in the same direction,
from element 1 towards element M:

* operand `xe` and coefficient `c` pass through **two** registers;
* tag bit `tc` and partial result `y` pass through **one** register;
* `xi` is a local register that holds the element's operand.

Every cycle:

    if tc: xi <= xe;  y_out <= y_in + xe * c
    else:             y_out <= y_in + xi * c

Operands and coefficients therefore move at half the speed of the partial
results. A partial result overtakes the coefficient stream. On its way through
the array it meets coefficient s at element 1, s-1 at element 2, and so on.

### Loading the operands with a tag bit

All inputs enter at element 1 as a stream of N-2 elements, one per cycle.
Element s carries:

* coefficient c(G^(s+2) mod N);
* operand u[s] for s < M, and 0 after that;
* tag bit 1 only for s = M-1.

The tag moves twice as fast as the operands. It catches up with operand
u[M-p] exactly at element p, so element p stores u[M-p]. The stored operands
are reversed along the array: element 1 holds u[M-1] and element M holds
u[0]. No element needs its own load signal, and all input channels stay at one
end of the array.

### When each row comes out

Count cycle 0 as the cycle in which stream element 0 is at element 1.

* Element p loads its operand in cycle M+p-2.
* The partial result that enters element 1 in cycle t0 = M-1+j accumulates
  sum_m c[j+m] * u[m], which is row j.
* Row j leaves element M in cycle **j + 2M - 1**.
* The first useful partial result meets every element exactly in the cycle
  in which that element loads. This is why the element multiplies the
  *passing* operand when the tag is set.

For N = 13: elements load in cycles 5..10, and rows 0..5 (k = 2, 4, 5, 3, 6, 1)
leave in cycles 11..16. Partial results leaving in other cycles are not
used.

### Back-to-back blocks

An element's stored operand is last used in cycle 2M+p-3. The next block's
tag reaches it in cycle 3M+p-3 when the next stream starts right after the
current one (N-2 cycles later). Blocks therefore need no gap.

## Stream controller and output stage

`band_stream_ctrl` holds the operand vectors of the current block and steps a
counter through the N-2 stream elements. The coefficients come from a constant
table computed at elaboration. Both arrays share the coefficient and tag
streams; only the operand streams differ. A block is taken when the
controller is idle or is playing the last element of the previous stream.

x_C(0) and x_S(0) are needed only when the results leave the arrays, and by
then the next block may already be streaming. So they go through a 2M-stage
delay line, together with a frame marker. The marker arrives exactly with
row 0.

`gdht_post` processes one row per cycle with two multipliers and three adders
shared by all rows. Per row, the row counter selects the output index k and
the constants cos(k alpha) and sin(k alpha). The stage writes Y(k) and
Y(N-k) into the output register vector, and Y(0) is written with the frame
marker.

Two assertions guard the control timing:

* in `band_stream_ctrl`: a block is never taken in the middle of a stream;
* in `gdht_post`: a new frame never starts while rows of the previous frame
  are still pending.

## Interface and timing (`gdht_odd_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | synchronous reset, active low; clears every register |
| `in_valid` | in | 1 | `x_i` holds a block |
| `in_ready` | out | 1 | the block is taken on this edge if `in_valid` |
| `x_i` | in | N x XW, signed | samples x(0..N-1) |
| `out_valid` | out | 1 | one-cycle pulse: `y_o` holds a complete transform |
| `y_o` | out | N x (XW + clog2(N) + 1), signed | Y(0..N-1), rounded to integers |

* **Throughput:** one block every N-2 cycles when `in_valid` stays high
  (11 cycles for N = 13).
* **Latency:** `out_valid` comes 3(N-1)/2 cycles after the edge that took the
  block (18 cycles for N = 13).
* **Holding the result:** `y_o` stays unchanged from `out_valid` until the
  next block's results start to arrive, at least (N-3)/2 cycles later. There
  is no output back-pressure.

## Number format

| parameter | default | meaning |
|---|---|---|
| `N` | 13 | transform length, prime |
| `G` | 2 | primitive root of N; elaboration fails otherwise |
| `XW` | 16 | sample width (signed integers) |
| `CW` | 16 | coefficient width |
| `CF` | 14 | coefficient fraction bits; must be at most CW-2 |

The internal widths are derived so that nothing can overflow. For the
defaults:

| quantity | width |
|---|---|
| x_C, x_S | XW + clog2(N) = 20 bits |
| array operands | 21 bits |
| band-correlation results | 40 bits, CF fraction bits |
| outputs | 21 bits |

The coefficients cos(2 pi v/N), cos(k pi/N) and sin(k pi/N) are rounded to CF
fraction bits at elaboration. The products carry 2CF fraction bits and are
rounded half-up to integers at the output. Against the exact transform, the
error for full-scale 16-bit inputs stays within the bound the testbenches use,
2N^2 2^(XW-1-CF) + 2.

## What is taken from the published design and what is not

**Followed:**

* the restructured algorithm (steps 1-3 and the index permutation);
* the two arrays of (N-1)/2 elements working in parallel;
* the element function (multiplexer, multiplier, adder, operand capture by a
  tag bit);
* operands and coefficients moving at half the speed of the partial results;
* all inputs entering at one end;
* the order of the input stream, of the coefficients and of the tag bits in
  the N = 13 example.

**Choices of this design:**

* all word widths and the fixed-point format, with rounding to nearest;
* the reset;
* the block handshake and the parallel block input and output;
* back-to-back streaming and the side-data delay line;
* a combinational restructure stage;
* the output stage shared by all rows, including how Y(0) is produced.

**Points to know:**

* The H_S term uses x_S(0). Only that form satisfies the transform
  definition; this was checked numerically and is checked by the testbenches.
* Y(0) = x_S(0) follows directly from the definition at k = 0; the
  restructured equations cover k = 1 .. N-1 only.
* The two arrays could be merged into one shared array to save hardware,
  using a hardware-sharing technique from other work. That variant is not
  built; here the two arrays are separate.

## Verification

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_gdht_odd_top` | Default size (N = 13), 60 blocks. Some blocks are isolated, some back to back, some with random gaps. The inputs include impulses, full-scale positive and negative values, alternating full scale and random data. Each result is checked bit-exactly against an integer model that evaluates the cos-sum form of step 2 directly, without any permutation or array. Each result is also checked against the real-valued transform definition within the quantisation bound. It further checks latency and interval, and that back-to-back blocks, restarts from idle, input waits and full-scale inputs all occurred. |
| `tb_gdht_odd_sizes` (with helper `gdht_size_check`) | The same bit-exact and real-valued checks at N = 5, 7, 11 and 17. |
| `tb_gdht_pe` | The element against a cycle model. |
| `tb_band_corr_array` | Random operands and random coefficients; each row at its exact cycle. |
| `tb_input_restructure` | The operand pairs in the order listed above. |
| `tb_band_stream_ctrl` | The stream contents cycle by cycle, the handshake and the frame alignment. |
| `tb_gdht_post` | The output equations and pulse timing. |
| `tb_gdht_pkg` | The index orders and coefficient values. |

To run one with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/gdht_pkg.sv tb/tb_gdht_odd_top.sv --top-module tb_gdht_odd_top
    ./obj_dir/Vtb_gdht_odd_top

`gdht_pkg.sv` must come first on the command line; every other file is found
by its module name. For another size, set `N` and `G` on `gdht_odd_top`, for
example `#(.N(17), .G(3))`, and `XW`, `CW` and `CF` for other precisions.
