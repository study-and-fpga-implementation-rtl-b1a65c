// lms_filter: adaptive direct-form FIR filter trained by the LMS rule
// h(n+1) = h(n) + mu * e(n) * x(n), with e(n) = d(n) - h(n)^T x(n).
//
// One sample pair (x, dd) is taken per clock-enabled cycle. The tap delay
// line feeds N_TAPS tap multipliers and one adder (the FIR output y, 32
// bits); a subtractor forms the 16-bit error, one multiplier scales it by
// the constant step mu, and each tap's coefficient cell adds mu*e*x(n-i) to
// its coefficient. The port names (x, dd, c, ce, er), the 16-bit ports, the
// 64-tap default and the step code 0001 (mu = 0.125) follow the design
// description. The synchronous reset `rst` is an addition of this design;
// it clears the coefficients to zero (the algorithm as usually stated starts
// from small random values).
//
// Timing: `er` is combinational from `x`, `dd` and the stored state, so the
// error of sample n is valid in the same cycle the sample is presented. On
// the rising edge of `c` with `ce` high the coefficients take their updated
// values and the delay line shifts; with `ce` low the filter holds. Throughput
// is one sample per enabled clock, latency zero cycles.
module lms_filter
  import adaptive_pkg::*;
#(
  parameter int unsigned N_TAPS  = 64,
  parameter mu_code_t    MU_CODE = 4'b0001
) (
  input  logic    c,
  input  logic    rst,
  input  logic    ce,
  input  sample_t x,
  input  sample_t dd,
  output sample_t er
);

  sample_t taps [N_TAPS];
  sample_t h    [N_TAPS];
  sample_t x_oldest_unused;
  acc_t    y;
  sample_t es;

  tap_delay_line #(.N_TAPS(N_TAPS)) u_taps (
    .clk(c), .rst, .ce, .x_in(x), .taps, .x_oldest(x_oldest_unused)
  );

  fir_dot_product #(.N_TAPS(N_TAPS)) u_fir (.h, .x(taps), .y);

  error_step u_err (.y, .d(dd), .g(mu_to_gain(MU_CODE)), .e(er), .es);

  for (genvar i = 0; i < int'(N_TAPS); i++) begin : g_cell
    coeff_cell u_cell (.clk(c), .rst, .ce, .es, .x_tap(taps[i]), .h(h[i]));
  end

endmodule
