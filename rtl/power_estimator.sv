// power_estimator: running squared norm ||x(n)||^2 of the N_TAPS samples in
// the NLMS filter's tap window, kept up to date with one multiplier.
//
// When x(n) enters the window, x(n-N_TAPS) leaves it, so the norm changes by
// x(n)^2 - x(n-N_TAPS)^2 = (x(n) - x(n-N_TAPS)) * (x(n) + x(n-N_TAPS)).
// A subtractor and an adder fed by the newest and the leaving sample and one
// multiplier of their results form that change; it is added to the stored
// norm of the previous window. This difference-of-squares recursion is the
// one drawn for the NLMS structure. The norm is kept with all 28 fraction
// bits of the squares (POWER_W = 32 + log2(N_TAPS) bits, 38 for 64 taps), so
// the running sum never drifts from the true sum of squares; it is the one
// register of the design wider than 32 bits, a choice of this design.
//
// `power` is the norm of the current window, x(n) included, combinationally
// from the input. `px` is the mean power, power / 2^ceil(log2 N_TAPS), in
// the 16-bit sample format and saturated: an exact mean when N_TAPS is a
// power of two (64, 128). The mean-power output is this design's reading of
// the filter's power output port.
//
// Timing: the stored norm takes `power` on a rising edge of `clk` with `ce`
// high; a synchronous `rst` clears it. The tap delay line must be cleared by
// the same reset, so that stored norm and window agree.
module power_estimator
  import adaptive_pkg::*;
#(
  parameter int unsigned N_TAPS  = 64,
  parameter int unsigned POWER_W = 2 * SAMPLE_W + $clog2(N_TAPS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  sample_t              x_new,     // x(n)
  input  sample_t              x_old,     // x(n - N_TAPS)
  output logic [POWER_W-1:0]   power,     // ||x(n)||^2, 28 fraction bits
  output sample_t              px         // mean power, 14 fraction bits
);

  localparam int unsigned MEAN_SHIFT = FRAC + $clog2(N_TAPS);

  logic        [POWER_W-1:0] power_q;
  logic signed [SAMPLE_W:0]  dif, sum;
  logic signed [2*SAMPLE_W+1:0] delta;
  logic        [POWER_W-1:0] mean;
  logic signed [POWER_W:0]   next_s;  // running sum with a sign bit, for the check

  always_comb begin
    dif   = (SAMPLE_W+1)'(x_new) - (SAMPLE_W+1)'(x_old);
    sum   = (SAMPLE_W+1)'(x_new) + (SAMPLE_W+1)'(x_old);
    delta = (2*SAMPLE_W+2)'(dif) * (2*SAMPLE_W+2)'(sum);
    next_s = $signed({1'b0, power_q}) + (POWER_W+1)'(delta);
    power  = next_s[POWER_W-1:0];
    mean   = power >> MEAN_SHIFT;
    px     = (mean > POWER_W'(SAMPLE_MAX)) ? SAMPLE_MAX : sample_t'(mean[SAMPLE_W-1:0]);
  end

  always_ff @(posedge clk) begin
    if (rst)     power_q <= '0;
    else if (ce) power_q <= power;
  end

  // A sum of squares cannot be negative; it would be if the window and the
  // stored norm ever disagreed (for example, reset separately).
  always_ff @(posedge clk) begin
    if (!rst && ce) assert (next_s >= 0) else $error("window energy went negative");
  end

endmodule
