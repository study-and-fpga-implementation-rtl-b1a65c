// nlms_filter: adaptive direct-form FIR filter trained by the normalised
// LMS rule h(n+1) = h(n) + mu * e(n) * x(n) / (||x(n)||^2 + C).
//
// The filtering half (tap delay line, N_TAPS tap multipliers, one adder,
// error subtractor) and the coefficient cells are those of the LMS filter.
// What differs is the factor that scales the error: instead of the constant
// mu it is g = mu / (||x(n)||^2 + C). The squared norm of the tap window is
// kept by a running difference-of-squares estimator (one multiplier per
// sample, not one per tap), and a divider forms g from it. The port names
// (x, dd, er, Px, c, ce), the 16-bit ports and the 64-tap default follow the
// design description; the step code 0100 (mu = 0.5, inside 0 < mu < 2), C,
// the meaning of Px as mean window power and the reset (which clears the
// coefficients to zero rather than to small random values) are choices of
// this design.
//
// Timing: `er` and `Px` are combinational from `x`, `dd` and the stored
// state, valid in the cycle the sample is presented. On the rising edge of
// `c` with `ce` high the coefficients, the delay line and the stored norm
// advance; with `ce` low everything holds. One sample per enabled clock.
module nlms_filter
  import adaptive_pkg::*;
#(
  parameter int unsigned N_TAPS  = 64,
  parameter mu_code_t    MU_CODE = 4'b0100,
  parameter int unsigned C_REG   = 16
) (
  input  logic    c,
  input  logic    rst,
  input  logic    ce,
  input  sample_t x,
  input  sample_t dd,
  output sample_t er,
  output sample_t Px
);

  localparam int unsigned POWER_W = 2 * SAMPLE_W + $clog2(N_TAPS);

  sample_t            taps [N_TAPS];
  sample_t            h    [N_TAPS];
  sample_t            x_oldest;
  logic [POWER_W-1:0] power;
  gain_t              g;
  acc_t               y;
  sample_t            es;

  tap_delay_line #(.N_TAPS(N_TAPS)) u_taps (
    .clk(c), .rst, .ce, .x_in(x), .taps, .x_oldest
  );

  power_estimator #(.N_TAPS(N_TAPS), .POWER_W(POWER_W)) u_pow (
    .clk(c), .rst, .ce, .x_new(x), .x_old(x_oldest), .power, .px(Px)
  );

  nlms_normalizer #(.POWER_W(POWER_W), .MU_CODE(MU_CODE), .C_REG(C_REG)) u_norm (
    .power, .g
  );

  fir_dot_product #(.N_TAPS(N_TAPS)) u_fir (.h, .x(taps), .y);

  error_step u_err (.y, .d(dd), .g, .e(er), .es);

  for (genvar i = 0; i < int'(N_TAPS); i++) begin : g_cell
    coeff_cell u_cell (.clk(c), .rst, .ce, .es, .x_tap(taps[i]), .h(h[i]));
  end

endmodule
