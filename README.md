# LMS and NLMS adaptive FIR filters in 16-bit fixed point

An adaptive filter learns the impulse response of an unknown system while it
runs. Both filters here are direct-form FIR filters with 64 coefficients. Each
one takes an input sample `x(n)` and a desired sample `d(n)` per clock. It
outputs the error `e(n) = d(n) - y(n)`, where `y(n)` is its own estimate of
`d(n)`. It then moves every coefficient a small step in the direction that
reduces the squared error. Typical uses are system identification and noise
or echo cancellation. In a noise canceller, `e(n)` is the cleaned signal.

Two update rules are built:

* **LMS**: `h(n+1) = h(n) + mu * e(n) * x(n)`, with a fixed step `mu`.
* **NLMS**: `h(n+1) = h(n) + mu * e(n) * x(n) / (||x(n)||^2 + C)`. The step
  is divided by the energy of the samples in the filter window. Convergence
  then no longer depends on the input level. `C` is a small constant that
  keeps the division finite when the window holds only zeros.

The design aims at low logic use. Ports and coefficients are 16 bits wide,
and internal products and sums are 32 bits. The structure is the plain direct
form: one multiplier per tap for filtering and one per tap for the update. It
has no pipelining and no time-multiplexing. A whole sample is handled in one
clock cycle.

## Number formats

Getting the fixed-point scaling right is the hardest part of this design.
Everything else is a straightforward multiply-accumulate.

| quantity | width | format | range |
|---|---|---|---|
| `x`, `d`, `e`, coefficients `h` | 16 bit signed | 14 fraction bits | -2.0 .. +2.0 |
| tap product `h*x`, sum `y` | 32 bit signed | 28 fraction bits | -8.0 .. +8.0 |
| step code `mu` | 4 bit unsigned | 3 fraction bits | 0 .. 1.875, code 0001 = 0.125 |
| step factor `g` (mu or normalised mu) | 16 bit unsigned | 14 fraction bits | 0 .. 4.0 |
| window energy `||x||^2` | 38 bit unsigned | 28 fraction bits | exact sum of 64 squares |

The signal path for one sample (`adaptive_pkg.sv` holds the constants):

1. `y = sum h_i * x(n-i)` in 32 bits. The sum wraps beyond ±8.0, a level an
   identified system never reaches.
2. `e = sat16(d - (y >>> 14))`.
3. `es = sat16((g * e) >>> 14)`. For LMS, `g = mu`. For NLMS,
   `g = mu / (||x||^2 + C)`.
4. For every tap: `h_i <= sat16(h_i + sat16((es * x(n-i) + 2^13) >>> 14))`.

The coefficient increment is **rounded to nearest**, not truncated.
Truncation (`>>>` alone) rounds toward minus infinity. That pulls every
coefficient down by half an LSB per sample on average. With a 64- or 128-tap
filter, a 0.125 step and an input of ±0.25, this bias left a steady error
about 80 times larger than with rounding. Coefficients, increments and the
error saturate instead of wrapping.

## The LMS filter (`lms_filter`)

Built from four parts:

* `tap_delay_line`: tap 0 is the input itself, and taps 1..63 are registers.
  One extra register at the end holds `x(n-64)`, the sample that has just
  left the window. Only NLMS uses it.
* `fir_dot_product`: 64 multipliers of 16 × 16 bits and one adder, giving `y`.
* `error_step`: the subtractor that forms `e`, and the single multiplier that
  scales `e` by the step factor.
* `coeff_cell` (×64): a multiplier for `es * x(n-i)`, an adder and the
  coefficient register.

The step is the parameter `MU_CODE`, 0001 (0.125) by default. Code 0011
(0.375) gives faster adaptation. It is still stable for inputs of ±0.25, but
near the limit for ±0.5. The usual LMS bound is
`mu < 2 / (taps * E[x^2])`.

## The NLMS filter (`nlms_filter`)

It reuses all the LMS parts. What changes is the factor fed to the error
multiplier. Two blocks produce it.

**`power_estimator`** keeps `||x(n)||^2`, the sum of the squares of the 64
samples in the window. It does not square 64 taps every cycle. When `x(n)`
enters and `x(n-64)` leaves, the sum changes by

    x(n)^2 - x(n-64)^2 = (x(n) - x(n-64)) * (x(n) + x(n-64))

The block needs one subtractor, one adder, one multiplier and the running
register. The register keeps every fraction bit of the squares (38 bits for
64 taps). Each update is then exact, and the running sum equals the true sum
of squares forever. A register cut to 32 bits would drift, because the
truncation errors of the differences do not cancel. For this to hold, the
delay line and the running sum must be reset together. In simulation, an
assertion in the block reports it if the running sum ever goes negative. The block also outputs
`Px`, the mean power `||x||^2 / 64` in sample format, saturated at 2.0.

**`nlms_normalizer`** computes `g = mu / ((||x||^2 >> 14) + C)` with one
combinational divider. `C` is in units of 2^-14, 16 by default (about 0.001).
The quotient saturates at 0xFFFF (≈4.0). That only happens when the window is
almost empty, as it is just after reset.

The default NLMS step is 0.5 (code 0100). Every 4-bit code lies inside the
NLMS stability range `0 < mu < 2`, except code 0000, which stops adaptation.

## Ports and timing

`lms_filter` has ports `c` (clock), `rst`, `ce`, `x[15:0]`, `dd[15:0]` and
`er[15:0]`. `nlms_filter` has the same ports, plus the `Px[15:0]` output.
`adaptive_filter_top` places the two filters side by side. They share `c`
and `rst` only, and every other port carries an `lms_` or `nlms_` prefix.

* **Throughput.** One sample per clock cycle in which `ce` is high.
* **Latency.** Zero. `er` (and `Px`) are combinational from the inputs of
  the same cycle and the stored state. Present `x(n)` and `d(n)`, read
  `e(n)`, then clock.
* **Update.** On the rising edge with `ce` high, the coefficients take their
  new values, the delay line shifts and the NLMS energy register advances.
* **Stall.** With `ce` low, nothing changes.
* **Reset.** `rst` is synchronous and active high. It clears the
  coefficients, the delay line and the energy register.

Because of the zero latency, the critical path is long. It runs from `x`
through a tap multiplier and the 64-input adder to `e`. From there it goes
through the step multiplier (and, for NLMS, the divider) and a coefficient
multiplier and adder. Nothing here was timed for an FPGA. Reaching high clock
rates would need pipeline registers, which is a delayed-LMS variant that
changes the algorithm's behaviour.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `lms_filter`, `nlms_filter`, top | `N_TAPS` | 64 | number of coefficients; the `Px` mean divides by the next power of two |
| `lms_filter`, top `LMS_MU_CODE` | `MU_CODE` | 4'b0001 | step 0.125 |
| `nlms_filter`, top `NLMS_MU_CODE` | `MU_CODE` | 4'b0100 | step 0.5 |
| `nlms_filter`, top `NLMS_C_REG` | `C_REG` | 16 | C in units of 2^-14; must be at least 1 (0 stops elaboration with an error) |

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`. The
testbenches compare the design, bit for bit and every cycle, against a
step-by-step model in `tb/tb_ref_pkg.sv`. That model is written separately
from the RTL, with 64-bit integers. Each testbench prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/adaptive_pkg.sv tb/tb_ref_pkg.sv tb/adaptive_filter_top_tb.sv \
      --top-module adaptive_filter_top_tb -o sim
    ./obj_dir/sim

* `adaptive_filter_top_tb` runs the top at its defaults. Both 64-tap filters
  identify a 64-tap system from white noise. The run starts from an empty
  window (the path where `C` alone is the divisor), inserts clock-enable
  stalls, changes the system abruptly (the error peaks, then settles again)
  and cuts the input to a quarter of its level. It counts each of these
  events. The mean |error| drops from about 500 LSB to 1–2 LSB. At the
  reduced level, NLMS settles to 0 LSB while LMS stays at about 16 LSB.
* `adaptive_workloads_tb` runs 48,000 samples through five configurations:
  LMS with 64 taps at steps 0.125 and 0.375, LMS with 3 and 128 taps, and
  NLMS with 64 taps. It checks that each one settles, and that the larger
  LMS step settles faster.
* `noise_canceller_tb` uses both default filters as noise cancellers. The
  desired input carries a weak tone plus noise that passed through an
  unknown 64-tap path, and the filter input is the noise reference. After
  20,000 samples, the error outputs follow the tone with about 7 times less
  noise than the desired input (mean deviation 312 LSB for LMS and 250 for
  NLMS, against 2159). A tone as strong as the noise would leave more
  residual: it perturbs the coefficients like measurement noise, in
  proportion to the step size.
* The block testbenches use small sizes (5–8 taps) and push saturation,
  wrap-around and clock-enable holds.

## Departures and open points

* The 16-bit word width, the 32-bit internal width, the 64-tap size, the
  direct form, the port names and the step codes come from the original
  description of the design. The binary point (14 fraction bits) and the
  4-bit step format with 3 fraction bits are inferred from the signal levels
  and the quoted step codes.
* The NLMS energy is computed by the difference-of-squares recursion. In the
  original drawing, a further multiply-and-subtract stage with two
  unexplained inputs follows it. Here that stage is replaced by an exact
  divider. It may have been an incremental, division-free approximation of
  `mu / ||x||^2`, which would use less logic.
* The energy register is 38 bits wide. It is the only value wider than
  32 bits, kept so that the running sum is exact.
* Chosen here: the meaning of `Px` as mean window power, the value of `C`,
  the NLMS step of 0.5, the rounding and saturation rules, the reset and
  the zero-latency timing.
* Coefficients start at zero after reset, not at small random values.
* The subtraction order `e = d - y` follows the equations. The error port
  carries `e`, not `mu * e`.
