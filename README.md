# Stochastic-computing units for elementary functions

This RTL evaluates eight elementary functions of an input x in [0, 1):
ln(1+x), tanh(x), sigmoid(x), sin(x), e^-2x, cos(x), e^-x and sin(πx)/π.
It uses **stochastic computing** instead of binary arithmetic. A number p in
[0, 1] is a bit stream in which a fraction p of the bits are 1. On such streams
an AND gate multiplies, and a NAND gate computes 1 − a·b. Each function unit
needs only a few gates, two small tables, two or three random-number
comparators and one counter.

The approximation is **piecewise linear**. The range [0, 1) is cut into 8 equal
segments, selected by the three MSBs of x. In segment i, f(x) ≈ a_i·x + b_i.
The coefficients come from a Lagrange fit through Chebyshev nodes on each
segment. A stochastic stream cannot hold a negative number or a number above 1.
So the tables do not store a_i and b_i directly. They store ratios of them,
chosen so that every stored value is a probability and the line can be built
from NAND/AND gates alone, with no adder. How each function does this is the
core of the design. It is explained below.

## Number format and one conversion

* x is a 10-bit unsigned fraction: value = x/1024.
* Every table word is also a 10-bit fraction.
* A **stochastic number generator (SNG)** compares its 10-bit value b with a
  fresh 10-bit pseudo-random number r every clock and outputs `r < b`.
* One conversion runs **1024 clock cycles**, one stream bit per cycle. A
  counter adds up the ones of the final stream. The 10-bit result y means
  f(x) ≈ y/1024. The count saturates at 1023, because an all-ones stream
  (f = 1) would need an 11th bit.

The random source is a 10-bit Fibonacci shift register whose feedback is also
inverted when the low nine bits are zero. This adds the all-zero state to the
maximal-length cycle, so the register visits all 1024 values once every 1024
cycles. After a reseed, a 1024-bit stream for value b therefore holds
**exactly** b ones. The only stochastic error left comes from correlation
between the streams that meet at a gate. To keep that low, the up to three SNGs
of a unit use different primitive polynomials:

| SNG feeding | polynomial | `TAPS` |
|---|---|---|
| x | x^10 + x^7 + 1 | `10'h240` |
| LUT-A | x^10 + x^3 + 1 | `10'h204` |
| LUT-B | x^10 + x^9 + x^8 + x^5 + 1 | `10'h390` |

All three are seeded with 1 at every start. A given x therefore always gives
the same y.

## The four circuit forms

Notation: a_i and b_i are the line coefficients of segment i, and c_i = 1 − b_i.
Every ratio is stored as round(1024·ratio), clipped to 1023.

### One NAND: e^-x, cos(x) — `sc_unit_nand`

Here every slope a_i is negative and |a_i| < b_i, so r_i = |a_i|/b_i is a
probability. LUT-A holds r_i. The unit computes

    y = NAND(x-stream, r_i-stream)  →  1 − r_i·x

This equals the segment line b_i − |a_i|·x divided by b_i. In other words, the
unit leaves out the factor b_i. That is close for e^-x, whose tabulated
coefficients fit this form well (measured error 0.013). It is not close for
cos(x), whose b_i grow to 1.35, so the output at x → 1 is about 0.40 where
cos(1) = 0.54. The form is built as specified, without an extra multiplier.

### Two cascaded NANDs: ln(1+x), tanh(x), sigmoid(x), sin(x) — `sc_unit_2nand`

Here a_i and b_i are both in [0, 1], and

    a_i·x + b_i = 1 − c_i·(1 − (a_i/c_i)·x)

LUT-A holds a_i/c_i and LUT-B holds c_i. The inner NAND of x and LUT-A gives
1 − (a_i/c_i)·x. The outer NAND of that stream with the c_i stream gives the
line exactly. This is the most accurate form: the error against the true
function is 0.003–0.004. For sin(x), segments 1 and 2 have a_i slightly
larger than c_i (1023 vs 1022). Those ratios are clipped to 1023/1024.

### Two halves with a multiplexer: sin(πx)/π — `sc_unit_sinpi`

The slope is positive in segments 0–3 and negative in segments 4–7. The unit
builds both forms and lets the MSB of x choose between them:

* X1, used for segments 0–3 (MSB = 0): the two-NAND form. LUT-A holds
  a_i/c_i and LUT-B holds c_i.
* X2, used for segments 4–7 (MSB = 1): the one-NAND form. LUT-A holds
  |a_i|/b_i, and the LUT-B words are zero.

X2 has the same missing b_i factor as the one-NAND unit. This shows up as a
large error in segments 4–6.

### AND, one-bit delay and XOR: e^-2x — `sc_unit_exp2x`

In segments 0–3, |a_i|/b_i lies between 1 and 2 and cannot be a probability.
It is halved instead. LUT-A holds h_i = |a_i|/(2b_i), and the wanted value is
1 − 2·h_i·x. An AND gate forms p = h_i·x. A flip-flop delays p by one cycle, to
decorrelate the copy. An XOR of p and delayed p is the subtraction stage (X1).
In segments 4–7, LUT-A holds |a_i|/b_i and a NAND forms X2 = 1 − (|a_i|/b_i)·x.
The MSB selects the path.

Caution: for two independent streams an XOR gives 2p(1 − p), not 1 − 2p. The
X1 path therefore follows the specified gate, not the intended value. The e^-2x
unit is the least accurate one (see below). The delay flip-flop is cleared at
every start and advances only on stream cycles.

## Measured accuracy

The end-to-end testbench sweeps all 1024 inputs. For each function it reports
the mean absolute error of y/1024 against the exact function:

| function | MAE | circuit form |
|---|---|---|
| ln(1+x) | 0.0034 | two NAND |
| tanh(x) | 0.0037 | two NAND |
| sigmoid(x) | 0.0040 | two NAND |
| sin(x) | 0.0031 | two NAND |
| e^-x | 0.0129 | one NAND |
| cos(x) | 0.0825 | one NAND (missing b_i factor) |
| sin(πx)/π | 0.0781 | mux, upper half one NAND |
| e^-2x | 0.3043 | mux, lower half AND/delay/XOR |

The first four are as accurate as the piecewise-linear fit allows at 10 bits
and 1024-bit streams. The last three are limited by the circuit forms noted
above, not by the stochastic arithmetic. If accuracy matters more than gate
count, these are the places to change (see "Changing the design").

## 8 or 16 segments

`SEGS` (on the top, the units and the tables) selects the number of segments.
The default is 8, and the table words then come from the published 8-segment
coefficients. With `SEGS = 16`, four MSBs address 16-entry tables. No
16-segment coefficients are published, so `sc_pkg::fit_coef` computes them
during elaboration. Each segment gets the line through the function at its two
Chebyshev nodes, centre ± 0.354·width, rounded to 1/1024. On 8 segments this
fit reproduces the published table to within a few LSBs for six of the eight
functions. The exceptions are sin(x) and e^-x, whose published coefficients
were tuned further. The multiplexer units still switch on the MSB, that is, on
the two halves of the input range.

Measured with 1024-bit streams over all 1024 inputs:

| function | 8 segments | 16 segments |
|---|---|---|
| ln(1+x) | 0.0034 | 0.0030 |
| tanh(x) | 0.0037 | 0.0033 |
| sigmoid(x) | 0.0040 | 0.0044 |
| sin(x) | 0.0031 | 0.0033 |
| e^-x | 0.0129 | 0.0634 |
| cos(x) | 0.0825 | 0.0833 |
| sin(πx)/π | 0.0781 | 0.0803 |
| e^-2x | 0.3043 | 0.3032 |

At this stream length, noise from the stochastic streams dominates the
approximation error. Doubling the segments therefore gains little for the
exact two-NAND forms. e^-x gets worse, because the fitted lines are true lines.
They are not tuned to the one-NAND form, which leaves out the factor b_i.

## Timing and interface

All units and the top share one handshake:

| signal | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; one stream bit per cycle |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | begin a conversion; `x` is sampled in this cycle |
| `x` | in | 10 | input, x/1024 |
| `busy` | out | 1 | conversion running; `start` is ignored while high |
| `done` | out | 1 | result valid; stays high until the next start |
| `y` | out | 10 (top: array of 8) | result, f(x)·1024, saturated at 1023 |

A start seen while idle makes a one-cycle internal `load`. In that cycle x is
registered, every SNG is reseeded and the counter is cleared. The next 1024
cycles generate and count the stream. `done` is high **1025 cycles after the
start cycle**. That gives one result per 1025 cycles per unit. Within a unit,
the path from the registers through table, comparator and gates to the counter
is combinational. There is no pipelining.

In `sc_func_top` all eight units run side by side on the same x and start.
`y[k]` is indexed by `sc_pkg::func_e`:
`FN_LN1P`=0, `FN_TANH`=1, `FN_SIGMOID`=2, `FN_SIN`=3, `FN_EXP2`=4, `FN_COS`=5,
`FN_EXP1`=6, `FN_SINPI`=7. `busy` is the OR of the units and `done` the AND.
The units are independent circuits. A design that needs only one function
instantiates only that unit.

## Files

| file | content |
|---|---|
| `rtl/sc_pkg.sv` | widths, `func_e`, the line coefficients a_i/b_i of all functions, and `lut_value()`, which derives every table word from them at elaboration |
| `rtl/sc_lfsr.sv` | de Bruijn shift-register random source |
| `rtl/sc_sng.sv` | stochastic number generator (random source + comparator) |
| `rtl/sc_coef_lut.sv` | 8-entry LUT-A or LUT-B of one function |
| `rtl/sc_counter.sv` | saturating ones counter (stream → binary) |
| `rtl/sc_seq.sv` | start/load/1024-cycle/done sequencer |
| `rtl/sc_unit_nand.sv` | one-NAND unit (e^-x, cos) |
| `rtl/sc_unit_2nand.sv` | two-NAND unit (ln(1+x), tanh, sigmoid, sin) |
| `rtl/sc_unit_sinpi.sv` | sin(πx)/π unit |
| `rtl/sc_unit_exp2x.sv` | e^-2x unit |
| `rtl/sc_func_top.sv` | all eight units |
| `tb/sc_tb_pkg.sv` | independent reference model: hand-computed tables, its own random sequences and gate networks, ideal values, exact functions |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_sc_func_top_seg16` repeats the end-to-end sweep with 16 segments |

The table words follow from the coefficients by the formulas above (round to
nearest, clip to 1023). `tb/sc_tb_pkg.sv` lists the 8-segment words once more,
worked out separately, and fits the 16-segment ones with its own code.
`tb_sc_coef_lut` compares both with the RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5, for example the end-to-end test:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/sc_pkg.sv tb/sc_tb_pkg.sv tb/tb_sc_func_top.sv --top-module tb_sc_func_top
    ./obj_dir/Vtb_sc_func_top

It runs all 1024 inputs at the default size (about a million cycles, seconds
of run time). It checks every result bit-exactly against the reference model,
checks the 1025-cycle latency and prints the error table above. It also counts
how often each mechanism was exercised, and fails if one never was: all 8
segments, both multiplexer paths, the delay element, counter saturation (x = 0
in the one-NAND units gives an all-ones stream), and a start that was ignored
because a conversion was running.

The unit testbenches (`tb_sc_unit_*`) use 26 inputs: both ends of every
segment plus random values. Each result must match the reference model
exactly, and must also lie within a tolerance of the circuit's ideal expected
value. That second check keeps a reference model with the same mistake as the
RTL from passing unnoticed. The block testbenches check the SNG stream bit by
bit and its exact count of ones, every table word, counter saturation, and the
sequencer's window length.

## Changing the design

* **Another function**: add coefficient rows to `sc_pkg`, extend `func_e`,
  `coef_a`, `coef_b`, and `uses_two_nand`/`lut_value` if it needs a new form.
  Then instantiate the matching unit.
* **Fixing the one-NAND forms**: to get b_i − |a_i|·x exactly, AND the output
  of the NAND with a stream of b_i. This needs b_i ≤ 1, so it works for e^-x
  but not for cos(x). That change is not made here.
* **Stream length / width**: `W` sets the word width, and the window is 2^W
  cycles. The tables and the reference model are written for W = 10.
* **Own coefficients**: with a `SEGS` other than 8, the tables are fitted
  from `eval_fn`. To use a different table, edit `line_a`/`line_b`.

## Deviations and open points

* The handshake, reset, random sources, seeds, rounding of table words and
  counter saturation are choices of this implementation.
* The one-NAND paths (e^-x, cos, upper half of sin(πx)/π) compute
  1 − (|a_i|/b_i)·x, and so differ from the fitted line by the factor b_i.
* The XOR subtraction in e^-2x yields 2p(1 − p) rather than 1 − 2p.
* Which multiplexer input the MSB selects is taken as MSB = 0 → lower-half
  path.
* The 16-segment tables are fitted by this design (Chebyshev nodes, no
  further optimisation). They are not published values.
