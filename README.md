# Simplified n-input max* for low-complexity Log-MAP turbo decoders

Log-MAP turbo decoders spend most of their logic on the max* operator:

    max*(x1..xn) = log(exp(x1) + ... + exp(xn))

The usual hardware applies the two-input max*, `max(a,b) + log(1 + exp(-|a-b|))`,
n-1 times. This design replaces that chain with a single approximation:

    max*(x1..xn) ≈ z = y1 + f_c(y1 - y2)
    f_c(delta) = 3/8 if delta < 2.0, else 0

Here y1 and y2 are the largest and second-largest inputs. The correction term
takes two values, so it is just a bit, `c0`. That bit is found inside the
comparator tree that already finds y1 and y2, using the differences the tree
computes anyway. The whole max* is then the two-maximum tree, a few
multiplexers and NOR gates, and one adder.

This repository contains:

* The max* operator itself (`nmax_star`), parameterized in the number of
  inputs `N` and the word width `P`.
* Its building blocks: `mvu`, `mvg2`, `mvg_merge` and `nmvg`.
* An a posteriori (APO) unit for a binary MAP decoder (`apo_unit`, the top
  level). It uses two instances of the operator, configured by default for
  the 16-state CCSDS component code.
* Self-checking testbenches for all of the above.

## Number format and the correction bit

All metrics are `P`-bit two's-complement numbers with 3 fractional bits, so
one LSB is 1/8 and 2.0 is `16` LSB. The correction constant 3/8 is the word
`0...0011`. Since `delta = y1 - y2 >= 0`, the test `delta < 2.0` only needs
the integer bits above bit 3. It is true when bits `P-2 .. 4` of delta are
all zero. Bit `P-1` is zero because delta is non-negative. So:

    c0 = NOR(delta[P-2:4])
    correction word = {0, ..., 0, c0, c0}
    z = y1 + correction

This needs `P >= 6`. The tested sizes are P = 8, 11, 12 and 16.

## The comparator tree and where c0 comes from

The hardest part to follow is how one flag bit travels up the tree.

**MVU (`mvu.sv`).** Given A and B, it forms `d = A - B` modulo 2^P and takes
the sign `s = d[P-1]`. It outputs `y1 = s ? B : A` and the flag
`c0 = NOR(|d|[P-2:4])`, which says whether A and B are less than 2.0 apart.
The flag is taken from the magnitude `|d|` so that it is exact in both
directions.

**2-MVG (`mvg2.sv`).** This is an MVU plus a second multiplexer,
`y2 = s ? A : B`. It gives (y1, y2, c0) for two inputs.

**Merge stage (`mvg_merge.sv`).** It combines the results of two sub-trees,
(y1a, y2a, c0a) and (y1b, y2b, c0b), using three MVUs:

| MVU  | compares   | used for                                  |
|------|------------|-------------------------------------------|
| MVU1 | y1a vs y1b | overall y1 and the select `s`             |
| MVU2 | y1a vs y2b | y2 when `s = 1` (the b side holds the max) |
| MVU3 | y2a vs y1b | y2 when `s = 0` (the a side holds the max) |

The outputs are `y1 = MVU1.y1` and `y2 = s ? MVU2.y1 : MVU3.y1`.

The flag needs no new subtractor. The pair (y1, y2) is always one of three
pairs, and each of those pairs already has its flag:

| s | MVU2.s / MVU3.s | y2 is | delta is          | c0 taken from |
|---|-----------------|-------|-------------------|---------------|
| 0 | MVU3.s = 0      | y2a   | y1a - y2a         | c0a           |
| 0 | MVU3.s = 1      | y1b   | y1a - y1b         | MVU1.c0       |
| 1 | MVU2.s = 0      | y1a   | y1b - y1a         | MVU1.c0       |
| 1 | MVU2.s = 1      | y2b   | y1b - y2b         | c0b           |

This is two 2:1 multiplexers plus a third one driven by `s`. The flags of
MVU2 and MVU3 are never needed.

**n-MVG (`nmvg.sv`).** The tree is naturally recursive: an N-MVG is two
N/2-MVGs followed by a merge stage. The RTL unrolls this into levels:

* Level 0 has N/2 2-MVGs on the pairs (x[2g], x[2g+1]).
* Each later level merges pairs of groups from the level below.
* The last level has a single group, which gives the outputs.

The hardware is the same as in the recursive form, and x[0..N/2-1] is still
the first half of the top split. N must be a power of two. The delay is
log2(N) MVU stages plus multiplexers.

If the maximum occurs twice, y2 = y1, delta = 0 and c0 = 1. Ties are
resolved toward the A operand. This does not change any output value.

## Wrapped metrics

All comparisons use the difference modulo 2^P. This lets the operator run
directly on state metrics that are normalised by letting them wrap around
(modulo arithmetic), with no rescaling. The results are exact as long as
the true spread of the values in one max* is below 2^(P-1). The final adder
also wraps.

## APO unit (`apo_unit.sv`, top level)

For one trellis step of a binary rate-1/2 recursive systematic code, the
unit does the following:

1. **Branch metrics.** It forms `gamma(u,c) = u*(La+Ls) + c*Lp` for the four
   (u, c) combinations. It takes the W-bit LLR inputs and sign-extends them
   to P bits.
2. **Transition metrics.** For every start state s' and input u it adds
   `alpha(s') + gamma(u, c) + beta(s)`. The trellis (next state s and parity
   c) is computed at elaboration time from the polynomial parameters
   `GFB`/`GFF` by the functions in `maxstar_pkg.sv`. By default these are
   23/33 octal with memory 4 (16 states).
3. **max*.** Two `nmax_star` instances with N = NS reduce the u = 1 and
   u = 0 sets.
4. **Lapo.** One subtractor gives `Lapo = z1 - z0`, modulo 2^P.
5. **Extrinsic (`extrinsic_unit.sv`).** It computes
   `Le = sat_W(sc * (Lapo - La - Ls))`. The subtraction is done in P+2 bits.
   `sc = SC_NUM / 2^SC_FRAC` (default 205/256 ≈ 0.8) is applied with an
   arithmetic right shift, which rounds toward minus infinity. The result is
   saturated to the W-bit LLR range, and `ext_sat` flags a clipped value.

Timing: the datapath is combinational into one register stage. Results
appear one clock after `in_valid` (`out_valid`), and the unit accepts one
trellis step per cycle. `rst_n` is an asynchronous, active-low reset that
clears the outputs. The outputs `c0_one`/`c0_zero` show whether each max*
applied its correction.

The polynomial parameters are written MSB = D^0 coefficient, with state bit 0
holding the newest register bit. For example, `GFB = 'o13, GFF = 'o15,
MEM = 3, NS = 8` gives the 8-state UMTS/LTE component code.

## Parameters

| Module         | Parameter | Default | Meaning |
|----------------|-----------|---------|---------|
| `nmvg`, `nmax_star` | `N` | 16 | inputs (power of two) |
| all datapath   | `P`       | 16      | metric width, 3 fractional bits |
| `apo_unit`     | `NS`, `MEM` | 16, 4 | trellis states, encoder memory |
| `apo_unit`     | `GFB`, `GFF` | 'o23, 'o33 | feedback / feedforward polynomial |
| `apo_unit`, `extrinsic_unit` | `W` | 10 | LLR width (La, Ls, Lp, Le) |
| `apo_unit`, `extrinsic_unit` | `SC_NUM`, `SC_FRAC` | 205, 8 | extrinsic scale 205/256 |

## What follows the published architecture, and what is local choice

These parts follow the published architecture:

* the approximation `y1 + f_c(y1 - y2)`
* the constant 3/8 and the NOR rule for its bit
* the tree of 2-MVGs and three-MVU merge stages
* the c0 selection by multiplexers
* the final adder
* the operation list of the APO unit (metric additions, two n-input max*
  operations, one subtraction)
* the 16-state code and the scale factor 0.8
* extended-width subtraction with saturation of the extrinsic value

These are local choices:

* The MVU flag reads the magnitude `|A-B|`, which keeps it exact when B > A.
* The exact operand-to-pin assignment inside the merge stage.
* Wrap-around (rather than saturation) at the max* adder.
* The 0/1 branch-metric form.
* W = 10.
* The two guard bits in the extrinsic subtraction.
* Floor rounding of the scaling.
* The single pipeline register and the reset behaviour.

The metric width used inside full MAP decoders is not specified, so the
operator's largest evaluated width, P = 16, is used.

Not included:

* Double-binary (Wi-MAX style) state-metric and APO units. These need the
  standard's trellis.
* The rest of a MAP/turbo decoder: state-metric recursions for binary codes,
  memories, windowing, interleaver and control.

## Simulation

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -y rtl rtl/maxstar_pkg.sv \
        tb/tb_apo_unit.sv --top-module tb_apo_unit -Mdir obj_apo
    ./obj_apo/Vtb_apo_unit

The testbenches:

* **`tb_mvu`, `tb_mvg2`:** random and threshold cases (|A-B| = 15 and 16
  LSB in both directions, wrap-around).
* **`tb_nmvg`:** N = 16/P = 16 and N = 4/P = 8. It also checks that, at the
  last merge, the two maxima came from the first half, from the second half
  and from both halves, so every c0 multiplexer path is exercised.
* **`tb_nmax_star`:** (16,16), (8,12) and (4,8).
* **`tb_table2_sweep`:** all nine (N, P) combinations of N ∈ {4, 8, 16},
  P ∈ {8, 12, 16}, plus (16, 11).
* **`tb_extrinsic_unit`:** scaling, rounding and saturation at two widths.
* **`tb_apo_unit`:** the top level at its default size (16 states). The
  reference uses its own encoder model and unwrapped integer metrics. It
  checks the one-cycle latency and idle cycles. It requires that correction
  on/off occurs in both max* operations, and that extrinsic saturation and
  metric wrap-around both happen.
* **`tb_apo_lte`:** the same test for the 8-state 13/15 code.

All of them pass. Each testbench has also been shown to fail against a copy of
its module with one deliberate defect.

The reference models check the approximation as defined above, bit-exactly.
They do not measure how close it is to the exact max*, nor bit-error-rate
behaviour in a complete decoder.
