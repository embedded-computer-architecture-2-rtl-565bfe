# Direct, symmetric, transposed and recursive filters in SystemVerilog

This is a set of fixed-coefficient digital filters. Each one shows a different way
to arrange the same multiply-accumulate work in hardware. A filter output is a
weighted sum of input samples, `y = sum_k h[k] * x[n-k]`, plus, for a recursive
filter, weighted past outputs. The arrangements differ in three things: how many
multipliers they need, how many registers they need, and how long their longest
combinational path is. Every filter here takes one sample per clock (the parallel
ones take a whole input vector) and gives one output per clock.

| Module            | Structure                                   | Taps | Width | Multipliers | Registers | Longest path                  |
|-------------------|---------------------------------------------|------|-------|-------------|-----------|-------------------------------|
| `fir_par`         | parallel inputs, adder chain                | 6    | 8     | 6           | none      | 1 multiplier + 5 adders       |
| `fir_par_large`   | same, scaled up                             | 100  | 18    | 100         | none      | 1 multiplier + 99 adders      |
| `fir_shift`       | input delay line, adder chain (direct form) | 6    | 8     | 6           | 6 x 8     | 1 multiplier + 5 adders       |
| `fir_shift_large` | same, scaled up                             | 100  | 18    | 100         | 100 x 18  | 1 multiplier + 99 adders      |
| `fir_sym`         | delay line, pre-add of mirrored taps        | 6    | 8     | 3           | 6 x 8     | pre-adder + multiplier + 2 adders |
| `fir_sym_large`   | same, scaled up                             | 100  | 18    | 50          | 100 x 18  | pre-adder + multiplier + 49 adders |
| `fir_transposed`  | broadcast input, partial-sum register chain | 6    | 8     | 6           | 6 x 8     | 1 multiplier + 1 adder        |
| `iir3`            | third-order recursive, direct form II       | 3rd order | 18 | 7        | 3 x 18    | 2 multipliers + adders        |

`filters_top` puts all eight side by side. They share only the clock and the
reset, and each has its own ports.

## The FIR arrangements

**Parallel (`fir_par`).** All N samples arrive together on `x[0..N-1]`. Each sample
is multiplied by its own constant, and the products go down a chain of adders:
`((x0*h0 + x1*h1) + x2*h2) + ...`. There are no registers. The output follows the
input in the same cycle. The path from `x[0]` through every adder sets the speed,
so this form slows down in step with the tap count.

**Direct form with a delay line (`fir_shift`).** This uses the same multiply/adder
chain, fed from an N-deep shift register instead of N input ports. `r[0]` holds
the newest sample. The output is combinational from the registers:

    y[n] = sum_{i=0}^{N-1} H[i] * x[n-1-i]

So a sample first shows on `y` one clock after it is presented. The critical
path is the same as in the parallel form.

**Symmetric (`fir_sym`).** When the taps mirror, `h[i] = h[N-1-i]`, the sum can be
factored:

    y = h0*(r0 + r5) + h1*(r1 + r4) + h2*(r2 + r3)

N/2 pre-adders feed N/2 multipliers, so this form needs half the multipliers.
Its output, latency and throughput match the direct form with the mirrored taps
`2,4,3,3,4,2`. The longest path is one pre-adder, one multiplier and the product
adders.

**Transposed (`fir_transposed`).** This is the retimed form of the same symmetric
filter. The input goes to all N multipliers at once. The partial sums move through
a chain of registers toward the output:

    s[N-1] <= H[N-1]*x
    s[k]   <= s[k+1] + H[k]*x      (k = N-2 .. 0)
    y       = s[0]

Every register-to-register path is one multiplier and one adder, however many
taps there are. The output comes straight from a register. The input/output
behaviour is exactly that of `fir_sym`: `y[n] = sum_k H[k] x[n-1-k]`. The cost is
that each tap has its own multiplier (six, not three), because in this form the
pre-add cannot share products.

The testbenches check that these equivalences hold bit for bit. `fir_par` fed with
`fir_shift`'s delay line matches `fir_shift`, and `fir_transposed` matches
`fir_sym` on every cycle of a random stream.

## The recursive filter (`iir3`)

`iir3` is a third-order IIR low-pass in direct form II. It has three state
registers `w1..w3`:

    w = x - a1*w1 - a2*w2 - a3*w3
    y = b0*w + b1*w1 + b2*w2 + b3*w3
    w1 <= w, w2 <= w1, w3 <= w2

That is seven multipliers and 3 x 18 register bits. `y` depends on `x` in the same
cycle. The longest path goes through a feedback multiplier, the feedback
subtractions, `b0` and the output adders. The default coefficients give a
third-order Butterworth low-pass. It comes from the bilinear transform with
`K = tan(pi*fc/fs) = 0.57`, so `fc` is about 0.16 of the sample rate:

| b0      | b1      | b2      | b3      | a1       | a2      | a3       |
|---------|---------|---------|---------|----------|---------|----------|
| 0.06225 | 0.18675 | 0.18675 | 0.06225 | -0.98643 | 0.59354 | -0.10911 |

These real values are in `filt_pkg` and are rounded to Q3.14 when the module is
elaborated. The impulse response is a short pulse with a peak of about 0.39 and
one small undershoot. The testbench checks it against a double-precision model
to within 0.01. The step response settles to a DC gain of 1.

Scope and limits:

- The order, the register count, the multiplier count and the one-output-per-clock
  rate are those of the filter this set reproduces.
- Its exact signal-flow arrangement and coefficients were not available. Direct
  form II and the Butterworth coefficients are this design's own choice, made to
  match that size.
- A retimed ("transformed") version of this IIR filter, with the same response and
  a longer critical path, belongs in the set. It is not provided: its structure
  was not available.

## Arithmetic

All arithmetic is signed two's complement and wraps at the data width.

**`fxp_mul`.** Every multiplier is an instance of `fxp_mul`. It forms the full
2W-bit product, shifts it right arithmetically by `FRAC` (truncating, not
rounding), and keeps the low W bits. Adders are W bits wide and also wrap.

**8-bit filters** (`FRAC = 0`). These are integer filters. A product or sum that
overflows 8 bits simply wraps, exactly like an 8x8 multiplier whose low byte
feeds an 8-bit adder. Overflow is normal with the default coefficients and random
inputs, and the testbenches exercise it. Use a wider `W` if you need
non-wrapping results.

**18-bit filters** (`FRAC = 14`). These use fixed point Q3.14, which covers the
range [-8, 8) with a step of 2^-14.

Where truncation happens changes results at the LSB level:

- `fir_sym_large` truncates after the pre-add.
- `fir_shift_large` truncates each tap separately.

So the two can differ by a few LSBs on the same input, even though their
coefficients are identical.

## Coefficients

| Filter | Coefficients | Source |
|---|---|---|
| `fir_par`, `fir_shift` | `2, 4, 3, 2, 7, 6` (`H[0]` applies to the newest sample / `x[0]`) | reference design |
| `fir_sym` | `2, 4, 3` (h0 on the outer pair); effective taps `2,4,3,3,4,2` | reference design |
| `fir_transposed` | `2, 4, 3, 3, 4, 2` | reference design |
| `*_large` | triangular low-pass window, `h[k] = round(2^14 * min(k+1, 100-k) / 2550)` | this design's choice |

For the large filters, 2550 is the sum of the window, so the DC gain is 1.0
within rounding. The symmetric version uses the first 50 values. The function
`filt_pkg::tri_coef` computes the window at elaboration, so no table file is
needed.

The original 100-tap coefficient values were not available. The window stands
in for them: it is a smooth, symmetric low-pass, and every tap has a distinct
value, so the tests can catch an indexing mistake.

Every coefficient is a parameter (`H`, or `B`/`A` for `iir3`), so you can
substitute other values.

## Interfaces and timing

All clocked filters have the ports `clk`, `rst`, `x` and `y`. `filters_top` brings
out every filter's `x`/`y` under a prefix: `par_`, `parl_`, `sh_`, `shl_`,
`sym_`, `syml_`, `tr_` and `iir_`.

| Module | Latency from `x` to its first effect on `y` | Throughput |
|---|---|---|
| `fir_par*` | 0 (combinational) | one vector per cycle |
| `fir_shift*`, `fir_sym*` | 1 clock (output is combinational from the delay line) | one sample per clock |
| `fir_transposed` | 1 clock (output is a register) | one sample per clock |
| `iir3` | 0 (the `b0` path is combinational) | one sample per clock |

There is no valid/ready handshake and no clock enable. A new sample is taken on
every rising edge.

The reset is asynchronous and active high. It clears every delay-line, partial-sum
and state register to zero. This reset style is this design's choice.

Parameters, with their defaults:

| Module | Parameters |
|---|---|
| `fir_par`, `fir_shift`, `fir_transposed` | `N`, `W`, `FRAC`, `H[N]` |
| `fir_sym` | `N` (even), `W`, `FRAC`, `H[N/2]` |
| `*_large` | `N` (100), `W` (18), `FRAC` (14); coefficients generated |
| `iir3` | `W` (18), `FRAC` (14), `B[4]`, `A[3]` (a1..a3) |

When you override `N` on a small filter, give a matching `H` too. The defaults
are 6-entry arrays.

## Files

- `rtl/filt_pkg.sv`: window function, IIR coefficient constants, real-to-fixed conversion
- `rtl/fxp_mul.sv`: fixed-point multiplier used by every tap
- `rtl/fir_par.sv`, `fir_shift.sv`, `fir_sym.sv`, `fir_transposed.sv`, `iir3.sv`: the filter structures
- `rtl/fir_par_large.sv`, `fir_shift_large.sv`, `fir_sym_large.sv`: 100-tap, 18-bit configurations that generate their coefficients
- `rtl/filters_top.sv`: all filters side by side
- `tb/tb_<module>.sv`: one self-checking testbench per module
- `tb/tb_workload_sine.sv`: the 100-tap filters on one second of a 1 Hz sine with a 100 Hz ripple, sampled at an assumed 2 kHz. The output must follow the clean sine, delayed by the 50.5-sample group delay, to within 0.03.

## Verification

Each testbench compares its filter against a reference model written separately
in the testbench itself. For example, `tb_fir_par_large` rebuilds the window
coefficients from the formula with real arithmetic. Each testbench covers:

- reset;
- an impulse, which checks every coefficient, the one-clock latency and one output per clock;
- a long random stream compared every cycle;
- DC gain;
- a reset in mid-stream.

`tb_filters_top` runs the whole top at its default sizes with the cross-checks
described above. It counts these events and fails if any never happens:

- the one-clock delay-line response;
- symmetric/transposed agreement;
- 8-bit wrap-around;
- the IIR ringing on after its input returns to zero;
- reset.

Each testbench ends with a `TB_RESULT checks=<n> failures=<n>` line. A watchdog
stops it if it hangs.

To run one with Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_filters_top \
        -y rtl -y tb +libext+.sv rtl/filt_pkg.sv tb/tb_filters_top.sv
    ./obj_dir/Vtb_filters_top

Every testbench finishes in well under a second of run time.

Expected lint warnings:

- `UNUSEDSIGNAL` on the discarded upper product bits in `fxp_mul`. Dropping them is deliberate: it is the wrap-around.
- `UNUSEDPARAM` on the IIR constants in `filt_pkg` when a file that does not use them is linted alone.
