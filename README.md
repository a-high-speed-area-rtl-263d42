# Reverse carry propagate adders: cell, adder, multiplier and FIR filter

In an ordinary ripple-carry adder the carry runs upwards, and the last sum bits
wait for the whole chain. A *reverse carry propagate adder* (RCPA) runs the carry
the other way, from the most significant bit down to the least significant one.
Every bit *guesses* the carry it will receive from below, using a cheap
**forecast** signal. It tells the bit beneath it what it assumed, and that bit
then has to make the assumption come true. Most of the time it can. When it
cannot, the result is off by one unit at that bit's weight. The upper bits of
the result are the ones that settle first and are the most trustworthy. This
makes the adder an *approximate* adder meant for error-tolerant arithmetic such
as digital filtering.

This repository holds synthesizable SystemVerilog for:

| module | what it is |
|---|---|
| `rcpa_pkg` | the forecast-rule enum shared by all modules |
| `rcpfa` | the one-bit reverse carry propagate full-adder cell |
| `rcpa` | a `WIDTH`-bit RCPA, with the forecast rule as a parameter |
| `rcpa_multiplier` | a pipelined unsigned shift-and-add multiplier with one RCPA per stage |
| `rcpa_fir` | a direct-form FIR filter made of those multipliers and RCPA adders |
| `rcpa_three_operand_adder` | `a + b + c + cin` as a carry-save row followed by an RCPA |
| `rcpa_top` | the filter and the three-operand adder side by side |

## How the reverse carry works

Call `C_{i+1}` the carry that bit `i+1` has *already counted*: it assumed that
bit `i` would send it a carry. Bit `i` must therefore produce

    S_i - C_i = A_i + B_i - 2*C_{i+1}

where `C_i` is the carry that bit `i` in turn assumes from bit `i-1`. The sum
`S_i` and the carry `C_i` are both single bits. Going through the eight cases of
`(A_i, B_i, C_{i+1})` gives this:

| case | what bit `i` does |
|---|---|
| `A_i != B_i` | the carry passes through: `C_i = C_{i+1}`, `S_i = !C_{i+1}` |
| `A_i = B_i = C_{i+1}` | either `C_i` works; the forecast decides: `C_i = F_i`, `S_i = F_i` |
| `A_i = B_i = 1`, `C_{i+1} = 0` | cannot be met: `S_i = 1`, `C_i = 0`, result is 2^i too small |
| `A_i = B_i = 0`, `C_{i+1} = 1` | cannot be met: `S_i = 0`, `C_i = 1`, result is 2^i too large |

The cell (`rcpfa.sv`) implements this in two-level form:

    X_i = C_{i+1} & ~(A_i & B_i)        Y_i = C_{i+1} | (~A_i & ~B_i)
    S_i = F_i & ~X_i | ~Y_i             C_i = F_i & Y_i | X_i

The two error rows are the only source of inaccuracy. How often they occur
depends only on how the forecast `F_i` is made.

## Forecast rules

`F_i` is meant to predict the true carry into bit `i`. Each cell makes the
forecast for the cell above it (output `f_hi`), so forecasts travel upwards
while carries travel downwards. The `FORECAST` parameter of `rcpfa` and `rcpa`
(type `rcpa_pkg::forecast_e`) selects the rule. `F_0` is always the adder's
carry-in.

| `FORECAST` | rule for `F_{i+1}` | cell name | P(C_{i+1}=0 given A_i=B_i=1) | P(C_{i+1}=1 given A_i=B_i=0) |
|---|---|---|---|---|
| `FC_I` | `A_i` | RCPFA-I | (1 - 4^(i-n+1)) / 3 | (1 - 4^(i-n+1)) / 3 |
| `FC_II` (default) | `A_i & B_i` | RCPFA-II | 2(1 - 4^(i-n+1)) / 3 | 0 |
| `FC_III` | `A_i \| B_i` | RCPFA-III | 0 | 2(1 - 4^(i-n+1)) / 3 |
| `FC_EXACT` | true carry into bit `i+1` | – | 0 | 0 |

The probabilities assume uniformly random `n`-bit operands. They are the
published error statistics of the three RCPFA variants. The rules in the second
column were chosen because they reproduce those statistics exactly when every
operand pair is enumerated. The published text does not spell the rules out in
a readable form, so treat this mapping as a reconstruction, backed by the
match. Each error event at bit `i` weighs `2^i`, so the mean error is

    mean(approx - exact) = sum_i 2^i * [P(error, A_i=B_i=0) - P(error, A_i=B_i=1)]

RCPFA-I is unbiased. RCPFA-II only errs low and RCPFA-III only errs high, apart from the `+c_lsb` term of the identity given in the next section.
Over all 8-bit operand pairs the testbench measures the following mean relative
error distances: 0.085 for I, 0.067 for II and 0.105 for III.

`FC_EXACT` makes the RCPA exact, but it needs an ordinary forward carry chain to
build the forecast, so it has no speed advantage. It exists for the places
where this design needs exact sums (the multiplier, below) and as a reference.
It is an addition of this design and is not one of the published variants.

## The adder row (`rcpa`)

`WIDTH` cells sit in a row. The carry input of the most significant cell,
`C_WIDTH`, is tied to the forecast `F_WIDTH` made from the top operand bits,
and that same signal is the carry-out. The result is `{cout, sum}`, which
approximates `a + b + cin`. The output `c_lsb` is `C_0`, the carry the
least significant cell asked for. When it differs from `cin`, the lowest cell's
assumption was not met and contributes `c_lsb - cin` to the error. The exact
identity is

    {cout, sum} = a + b + c_lsb + sum_i e_i * 2^i      (e_i in {-1, 0, +1})

The critical path starts at the forecast of the top bit, enters the top cell as
`C_WIDTH`, runs down the carry chain and ends at `S_0`. The module is purely
combinational. `WIDTH` defaults to 8 and `FORECAST` to `FC_II`. RCPFA-II is
the variant with the lowest power and energy-delay product in the published
cell comparison.

## Pipelined shift-and-add multiplier (`rcpa_multiplier`)

This unit computes `y = a * b` for unsigned `WIDTH`-bit operands. Bit `k` of
`a` gates `b` into a partial product (`anded`). An RCPA adds it to the running
upper half, which gives a `WIDTH+1`-bit sum (`added`). The lowest bit of that
sum is final and goes to bit `k` of the lower product half (`lsbed`, `reglsb`).
The other `WIDTH` bits become the next upper half (`regadd`). The operands travel
down the pipeline with their partial results (`aregs`, `bregs`), and the first
stage starts from zero.

`LEVELS` partial products are handled per stage, so there are
`STAGES = WIDTH / LEVELS` stages, each closed by a register. At the defaults
(`WIDTH = 8`, `LEVELS = 1`, so 8 stages) the unit accepts one operand pair per
clock. Each product appears on `y` with `out_valid` exactly 8 clocks after the
cycle in which `in_valid` was high. `rst` is synchronous and active high.

The multiplier uses `FORECAST = FC_EXACT` by default. Its sums feed each other:
a wrong bit in the upper half is shifted down and added again. With the
approximate rules the products degrade badly: 20 × 122 comes out as 8192 (I),
2024 (II) or 16384 (III) instead of 2440. The reference simulation of this unit
shows the exact 2440. Any other rule can still be selected.

## FIR filter (`rcpa_fir`)

    y(n) = sum_{i=0}^{TAPS-1} x(n-i) * h(i)

The filter is built as follows:

- A delay line holds `x(n-1) .. x(n-TAPS+1)`, and `x(n)` feeds tap 0 directly.
- Every tap has its own `rcpa_multiplier`.
- A chain of `OUT_W`-bit RCPAs sums the products.
- An output register holds the result.

The defaults are 4 taps, 8-bit unsigned samples and coefficients, and an
18-bit output, wide enough for the exact maximum 4·255·255. The products are
exact (`MUL_FORECAST = FC_EXACT`). The summing adders use RCPFA-II
(`ADD_FORECAST = FC_II`), so the filter output is approximate. In random
tests it differs from the exact convolution on nearly every sample, and the
error is mostly towards smaller values. Set `ADD_FORECAST = FC_EXACT` for an exact filter.

Timing: at most one sample per clock. A sample is taken when `in_valid` is high,
and only accepted samples shift the delay line. `y(n)` appears with `out_valid`
exactly 9 clocks after its sample: 8 multiplier stages plus the output register.
Hold the coefficients `h` steady while samples that use them are in flight.
`rst` clears the delay line, the pipelines and the output.

## Three-operand adder (`rcpa_three_operand_adder`)

Three-operand addition (`a + b + c`) is the core operation of modular
arithmetic in several cryptographic and pseudorandom-bit-generator algorithms.
This unit adds three `WIDTH`-bit words (default 16) and a carry-in:

- A row of full adders turns `a`, `b` and `c` into a partial-sum vector and a
  carry vector (carry-save form).
- A `WIDTH+1`-bit RCPA adds the partial sum and the carry vector shifted up by
  one place. `cin` enters as that RCPA's forecast `F_0`.

The result `{cout, sum}` has `WIDTH+2` bits. The unit is combinational, and its
default forecast is `FC_II`.

A property of RCPFA-II to keep in mind: the forecast `A_i & B_i` is 0 wherever
either operand bit is a zero pad. So `cout` (result bit 17) is constantly 0 in
this unit, and bit 17 of the filter output is also always 0. Results that
should reach those bits come out too small. Over random operands the mean
relative error is about 0.06 for the three-operand adder and about 0.16 for the
4-tap filter sum. These figures come from a model of the adder. RCPFA-II still
gives the smallest filter error of the three approximate rules: RCPFA-I gives
about 0.67 and RCPFA-III about 0.99.

## Top level (`rcpa_top`)

The filter ports are `fir_*` and the three-operand adder ports are `toa_*`.
The two units share only `clk` and `rst`, which the adder does not use. All
parameters pass through to the two units with the same defaults.

## Where this design makes its own choices

The following come from the published description:

- the cell equations
- the direction of carry and forecast signals in the adder row
- the 8-bit adder width
- the 16-bit three-operand width
- the filter structure and its 4 taps
- the multiplier's signal names, its sizes (8 bits, 8 stages, 1 level) and its
  example product

These are choices of this design:

- **Forecast rules**: reconstructed from the error statistics, as explained
  above. `FC_EXACT` is added.
- **MSB carry input**: tied to the top forecast, which is read from the
  critical-path drawing of the adder row. The LSB-side input of that drawing is
  taken to be the carry-in.
- **Default variant**: RCPFA-II is the default everywhere an approximate adder
  is used. One published summary names variant I as the best in
  power-delay product, but the published table favours II. The table was
  followed.
- **Multiplier internals**: the valid handshake, the synchronous reset, the
  meaning of `LEVELS` (partial products per stage) and the exact forecast.
  The reference waveform keeps the collected low product bits one position
  higher, in a register one bit wider; the product is the same.
- **Filter details**: unsigned arithmetic, the widths, the handshake, the reset
  behaviour, coefficients as input ports and the output register.
- **Three-operand adder**: only its operands and width are described. The
  carry-save front end is this design's structure.

The transistor-level hybrid full-adder circuits that the published power, delay
and area numbers describe are not modelled. Only their logic function is, in
`rcpfa`.

## Simulating

Every testbench in `tb/` checks itself and ends with the line
`TB_RESULT checks=N failures=M`. The shared reference model is in
`tb/rcpa_ref_pkg.sv`. It works from the case table above rather than from the
gate equations, and it takes the exact forecast from integer addition.

| testbench | what it checks |
|---|---|
| `tb_rcpfa` | all 16 cell input patterns, with the forecast output of all four rules |
| `tb_rcpa` | all 2^17 operand/carry-in combinations of the 8-bit adder, all four forecast rules, the total error against the closed form above; prints MRED |
| `tb_rcpa_multiplier` | 20 × 122 = 2440, then 2000 random products, with bursts and gaps, 8-clock latency; a `LEVELS = 2` instance with 4-clock latency; an RCPFA-II instance against the model |
| `tb_rcpa_fir` | 1000 samples, two coefficient sets, reset in between; default instance against the model, exact instance against the convolution; 9-clock latency |
| `tb_rcpa_three_operand_adder` | corner cases and 50 000 random operand sets, exact and RCPFA-II |
| `tb_rcpa_top` | the whole top at default parameters. It checks 20 × 122 through the filter, random traffic with bursts, gaps, a full pipeline and a reset with data in flight, and the adder in parallel. It counts each of these events and fails if one never happens |

To run one with plain Verilator:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/rcpa_pkg.sv tb/rcpa_ref_pkg.sv tb/tb_rcpa_top.sv --top-module tb_rcpa_top
    ./obj_dir/Vtb_rcpa_top

Each testbench finishes in well under a second.

## How far to trust it

- The cell, the adder row and the error statistics are checked exhaustively
  against an independent model and against the closed-form mean error.
- The multiplier, the filter and the three-operand adder are checked with random
  and directed stimuli against the same model.
- Nothing here has been checked against the original circuits' timing, power or
  area, and the forecast rules are a reconstruction.
