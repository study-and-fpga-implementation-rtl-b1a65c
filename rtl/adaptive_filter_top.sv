// adaptive_filter_top: the two adaptive filters of the design, LMS and
// NLMS, side by side on one clock. Each is a 64-tap direct-form adaptive FIR
// filter with 16-bit sample, desired-signal and error ports; they share
// nothing but the clock and the reset, and each has its own clock enable and
// data ports, so they can be driven with the same or with different signals
// and their errors compared.
//
// Timing: as for each filter, one sample per enabled clock, errors valid
// combinationally in the cycle the sample is presented.
module adaptive_filter_top
  import adaptive_pkg::*;
#(
  parameter int unsigned N_TAPS       = 64,
  parameter mu_code_t    LMS_MU_CODE  = 4'b0001,
  parameter mu_code_t    NLMS_MU_CODE = 4'b0100,
  parameter int unsigned NLMS_C_REG   = 16
) (
  input  logic                       c,
  input  logic                       rst,
  // LMS filter
  input  logic                       lms_ce,
  input  logic signed [SAMPLE_W-1:0] lms_x,
  input  logic signed [SAMPLE_W-1:0] lms_dd,
  output logic signed [SAMPLE_W-1:0] lms_er,
  // NLMS filter
  input  logic                       nlms_ce,
  input  logic signed [SAMPLE_W-1:0] nlms_x,
  input  logic signed [SAMPLE_W-1:0] nlms_dd,
  output logic signed [SAMPLE_W-1:0] nlms_er,
  output logic signed [SAMPLE_W-1:0] nlms_px
);

  lms_filter #(.N_TAPS(N_TAPS), .MU_CODE(LMS_MU_CODE)) u_lms (
    .c, .rst, .ce(lms_ce), .x(lms_x), .dd(lms_dd), .er(lms_er)
  );

  nlms_filter #(.N_TAPS(N_TAPS), .MU_CODE(NLMS_MU_CODE), .C_REG(NLMS_C_REG)) u_nlms (
    .c, .rst, .ce(nlms_ce), .x(nlms_x), .dd(nlms_dd), .er(nlms_er), .Px(nlms_px)
  );

endmodule
