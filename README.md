# Parallel FIR filters for symmetric coefficients, built from fast-FIR structures

A linear-phase FIR filter has symmetric coefficients, h(i) = h(N-1-i). In a
plain direct-form filter that symmetry halves the multipliers, because two
taps with the same coefficient can share one product. An L-parallel filter
takes L samples per clock. It is usually built with *fast FIR algorithms*
(FFAs): the filter is split into L polyphase components, and the products of
sums of components stand in for some of the L^2 component products. That
split normally destroys the symmetry, so the sub-filters can no longer share
products.

The structures here rearrange the FFA so that as many sub-filters as possible
keep a symmetric or antisymmetric coefficient set. The rearrangement uses sums
*and differences* of polyphase components. Each such sub-filter then needs
only half its multipliers. The cost is a few extra pre- and post-processing
adders, and their number does not grow with the filter length.

The RTL contains three filters that share the same building blocks:

| filter | samples/clock | default taps | sub-filters | (anti)symmetric sub-filters | multipliers |
|---|---|---|---|---|---|
| `fir_l2_prop` | 2 | 12 | 3 of length N/2 | 2 | 12 |
| `fir_l3_prop` | 3 | 27 | 6 of length N/3 | 4 | 38 |
| `fir_l4_prop` | 4 | 24 | 9 of length N/4 | 4 | 42 |

The multiplier column counts what a generic synthesis of the RTL infers, so
the sharing inside the symmetric sub-filters shows up in hardware, not only
in an estimate.

`ffa_fir_top` places the three filters side by side. All of them use 8-bit
two's-complement samples and coefficients and compute the exact result at
full precision.

## Notation

- For an L-parallel filter, `Xp` is the stream of samples x(Lk+p), one per
  clock.
- `Hp` is the polyphase component {h(p), h(p+L), h(p+2L), ...}. Each component
  has M = N/L taps.
- `Yp` is the output stream y(Lk+p).
- A product such as `(H0+H1)(X0+X1)` means "the sub-filter whose coefficients
  are H0+H1, fed with the sample stream X0+X1".
- `D` is a delay of one clock, which is one block of L samples.

Symmetry makes the components mirror each other:

- L = 2, N even: H1 = reverse(H0).
- L = 3, N a multiple of 3: H2 = reverse(H0), and H1 = reverse(H1).
- L = 4, N a multiple of 4: H3 = reverse(H0) and H2 = reverse(H1).

Any sum of mirrored components is therefore symmetric, and any difference of
them is antisymmetric.

## Two-parallel filter (`fir_l2_prop`, `ffa2_proposed`)

The classic 2x2 FFA (`ffa2_existing`) uses the sub-filters H0, H1 and H0+H1.
Only H0+H1 is symmetric. The symmetric form uses H0+H1, H0-H1 and H1 instead:

```
a = (H0+H1)(X0+X1)   symmetric          a + b = 2(H0X0 + H1X1)
b = (H0-H1)(X0-X1)   antisymmetric      a - b = 2(H0X1 + H1X0)
c = H1 X1

Y0 = (a+b)/2 - c + D{c}       = H0X0 + D{H1X1}
Y1 = (a-b)/2                  = H0X1 + H1X0
```

`ffa2_proposed` is this core. Its coefficient sets G0 and G1 are generic
inputs, and the symmetry class of its sum and difference sub-filters is set by
the parameters `SYM_SUM` and `SYM_DIFF`. The four-parallel filter needs both
orientations of the core. `fir_l2_prop` adds input and output registers to the
core and builds H0 and H1 from the coefficient port.

## Three-parallel filter (`fir_l3_prop`)

The filter has six sub-filters. Four of them have coefficient sets that are
symmetric (S) or antisymmetric (A):

```
R = (H0+H1)(X0+X1)           S = (H0-H1)(X0-X1)
P = (H0+H2)(X0+X2)   [S]     Q = (H0-H2)(X0-X2)   [A]
U = H1 X1            [S]     T = (H0+H1+H2)(X0+X1+X2)   [S]

r+ = (R+S)/2 = H0X0 + H1X1      r- = (R-S)/2 = H0X1 + H1X0
p+ = (P+Q)/2 = H0X0 + H2X2      p- = (P-Q)/2 = H0X2 + H2X0

Y0 = (r+ - U) + D{T - P - U - r-}      = H0X0 + D{H1X2 + H2X1}
Y1 = r-       + D{p+ - r+ + U}         = H0X1 + H1X0 + D{H2X2}
Y2 = p- + U                            = H0X2 + H1X1 + H2X0
```

N may be odd (the default is 27). Pre-processing takes five adders. The
X0+X1+X2 adder reuses X0+X1.

## Four-parallel filter (`fir_l4_prop`): the cascade

This is the hardest part to follow. The four-parallel filter is a two-parallel
filter whose every product is itself computed by a two-parallel filter.

**First stage.** It splits the filter into even and odd taps,
H'0 = H0 + z^-2 H2 and H'1 = H1 + z^-2 H3, with inputs
X'0 = X0 + z^-2 X2 and X'1 = X1 + z^-2 X3. It then applies the symmetric 2x2
form to them. This needs three products, each a stream with two phases
(e = even, o = odd):

- A' = (H'0+H'1)(X'0+X'1)
- B' = (H'0-H'1)(X'0-X'1)
- C' = H'1 X'1

**Second stage.** Each of these products is itself a two-parallel filter at
the block rate:

| product | core | coefficient pair | sub-filters |
|---|---|---|---|
| A' | `ffa2_proposed` | G0 = H0+H1, G1 = H2+H3 | H0+H1+H2+H3 [S], H0+H1-H2-H3 [A], H2+H3 |
| B' | `ffa2_proposed` (roles swapped) | K0 = H0-H1, K1 = H2-H3 | H0-H1+H2-H3 [A], H0-H1-H2+H3 [S], H2-H3 |
| C' | `ffa2_existing` | H1, H3 | H1, H3, H1+H3 |

C' uses the classic core because H1 and H3 have no symmetry to exploit, and
the classic core needs fewer adders. The cascade has nine sub-filters, four
of them shared-multiplier ones.

**First-stage post-processing.** The z^-2 of the first stage is one
*phase* step. On the odd phase it costs no delay. On the even phase it becomes
one clock of the odd phase:

```
Y0 = (A'e + B'e)/2 - C'e + D{C'o}        Y1 = (A'e - B'e)/2
Y2 = (A'o + B'o)/2 - C'o + C'e           Y3 = (A'o - B'o)/2
```

There are four delay elements in all: one in each second-stage core and one
in the first stage.

## The factor 1/2

Every "/2" above acts on a sum that is even by construction, such as
a+b = 2(H0X0+H1X1). The RTL therefore keeps the integer coefficient sets
(H0+H1, H0-H1, ...) in the sub-filters. It halves the butterfly outputs with
a one-bit arithmetic right shift, which is exact. Nowhere is precision lost,
and no rounding is done: the outputs equal the mathematical convolution
bit for bit.

## Sub-filters with shared multipliers (`sym_subfilter`)

Each sub-filter is a transposed direct-form FIR, so all taps multiply the
same current sample. With a symmetric set, the products of taps j and M-1-j
are equal. With an antisymmetric set they differ only in sign. So only
ceil(M/2) products are formed, and each feeds two tap adders. With an
antisymmetric set, the mirrored tap subtracts its product instead of adding
it.

`SYM` (`SYM_NONE`, `SYM_EVEN`, `SYM_ODD`) selects the mode. In a shared mode,
the upper half of the coefficient port is not read: the sub-filter trusts the
symmetry and does not check it. Tap adders are ripple-carry adders.

## Adders (`rca_adder`, `add_tree`)

The pre- and post-processing adders come in two styles, selected by `ARCH`
(type `ffa_pkg::adder_arch_e`):

- `ADD_RCA`: a chain of ripple-carry adders, one per extra operand.
- `ADD_CSA` (the default): a chain of 3:2 carry-save compressors closed by one
  ripple-carry adder.

A subtracted operand is inverted. Its +1 goes into the free least significant
bit of a compressor's carry word, or into a carry-in. `rca_adder` is written
out as a full-adder chain, so the ripple-carry structure is explicit.

## Interface and timing

Every filter has the same port shape:

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | block clock; asynchronous active-low reset that clears all state |
| `x[L]` | W each | one block x(Lk)..x(Lk+L-1), oldest in element 0 |
| `h[ceil(N/2)]` | W each | h(0)..h(ceil(N/2)-1); the rest is mirrored inside |
| `y[L]` | AW each | y(Lk)..y(Lk+L-1) |

- One block enters and one block leaves every clock. There is no valid
  signal and no stall.
- The output block appears **two clocks** after the clock edge that samples
  its input block. The input and the output are each registered once, and
  everything between them is one combinational stage.
- `h` must be held constant while the filter runs. The coefficient sums are
  computed from it combinationally, so they reduce to constants when `h` is
  tied off.
- AW defaults to `ffa_pkg::acc_width(W, N)` = 2W + clog2(N) + 6 bits. That is
  26 or 27 bits at the defaults, enough for every internal sum without
  overflow.
- N must be a multiple of L. An elaboration error reports any other value.

Parameters: `W` (8), `N` (12 / 27 / 24), `ARCH` (`ADD_CSA`), `AW`. On the top
they are `W`, `N2`, `N3`, `N4`, `ARCH` and `AW2..AW4`.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. All of them compare
against a direct convolution, y(n) = sum h(i) x(n-i), computed in the
testbench from the full coefficient set.

- `tb_ffa_fir_top` runs the three filters at their default sizes.
  - It uses three random symmetric coefficient sets, with resets in between,
    issued while the filters hold state.
  - It mixes in bursts of extreme samples (-128 and +127).
  - It checks that outputs depending on earlier blocks (through the delays),
    extreme bursts, resets and outputs wider than 16 bits all occurred.
- `tb_fir_l2_prop`, `tb_fir_l3_prop` and `tb_fir_l4_prop` each run three
  instances:
  - the default length with carry-save adders,
  - the default length with ripple-carry adders,
  - a second length: 10 taps for L=2, 12 for L=3 and 20 for L=4, which gives
    odd or even sub-filter lengths.

  Each run also includes extreme coefficient sets. Every output is checked at
  exactly two clocks of latency.
- `tb_table1_lengths` runs 24 and 36 taps for L=2, and 36 taps for L=3 and
  L=4.
- `tb_ffa2_proposed`, `tb_ffa2_existing`, `tb_sym_subfilter`, `tb_add_tree`
  and `tb_rca_adder` test the building blocks on their own, including both
  orientations of the symmetric core and odd sub-filter lengths.

Run one testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/ffa_pkg.sv tb/tb_ffa_fir_top.sv --top-module tb_ffa_fir_top
./obj_dir/Vtb_ffa_fir_top
```

Replace the testbench name to run another one. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/ffa_pkg.sv rtl/<module>.sv`.

## Size and limits

**Logic size.** After a generic, technology-independent synthesis, the
default filters come to about 2.4k (L=2), 7.7k (L=3) and 8.2k (L=4) word- and
bit-level cells. The bit-level adders make up most of that count.

**Long filters.** They elaborate with `N` set (e.g. 512 or 1024 taps).
However, the bit-level adder loops make the Verilator C++ model very slow to
compile at those lengths. The longest filters simulated are 36 taps
(`tb_table1_lengths`).

**Multiplier counts** of this RTL for other lengths:

| filter | multipliers | example |
|---|---|---|
| L=2 | M + 2·ceil(M/2) | 24 for 24 taps |
| L=3 | 2M + 4·ceil(M/2) | 48 for 36 taps |
| L=4 | 5M + 4·ceil(M/2) | 896 for 512 taps |

## Where this RTL departs from the published structures

- **Where the 1/2 is applied.** The published drawings halve in different
  places: sub-filters labelled "1/2(H0+H1)", a "<<1" in the three-parallel
  drawing, and ">>1" shifts on the four inputs of the four-parallel drawing.
  Halving there truncates. This RTL halves after the butterflies instead,
  where the result is exact.
- **Two-parallel output labels.** The two-parallel drawing labels its
  outputs the other way round from its equation. The RTL follows the
  equation, which is the correct convolution.
- **Classic 2x2 equation.** As printed, the classic 2x2 equation carries
  H0X1 in its delayed term. The RTL uses H1X1, which is what the drawing and
  the algebra require.
- **Four-parallel post-processing.** The published wiring is hard to read,
  and it shows three delay elements. The RTL derives the post-processing from
  the algebra above and has four delay elements.
- **Adder and multiplier counts.** The published adder overhead for L=4 is
  stated as both 9+21 and 11. The published multiplier tables do not match
  these structures' own counts either. The RTL is built from the structure,
  not tuned to those numbers.
- **Placement of the carry-save adders.** It is not specified. Here they form
  the multi-operand pre/post-processing adders; the tap adders stay
  ripple-carry.
- **The design's own choices.** Pipelining, reset, the coefficient interface
  and the word lengths other than the 8-bit samples and coefficients are
  choices made for this RTL.
- **Not built.** The six- and eight-parallel filters are described only
  through their counts, so they are not built. Nor are the classic two-,
  three- and four-parallel FFA filters they are compared with, except for the
  2x2 core that the four-parallel filter uses.
