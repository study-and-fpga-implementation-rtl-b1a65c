// nlms_normalizer: the normalised step factor of the NLMS update,
// g = mu / (||x(n)||^2 + C), where C keeps the quotient finite when the
// window holds only zeros.
//
// The squared norm arrives with 28 fraction bits and is cut to 14 fraction
// bits, then C (in units of 2^-14) is added; the step code mu (3 fraction
// bits) is aligned so the unsigned quotient carries 14 fraction bits, the
// format of the step factor the error multiplier takes. Quotients above the
// 16-bit range (a near-empty window) saturate at 0xFFFF, i.e. about 4.0.
// The normalisation follows the NLMS update rule; computing it with one
// exact combinational divider, rather than an incremental approximation,
// is this design's choice. The value of C is not given by the design
// description and is a parameter here.
//
// Interface and timing: purely combinational.
module nlms_normalizer
  import adaptive_pkg::*;
#(
  parameter int unsigned POWER_W = 38,
  parameter mu_code_t    MU_CODE = 4'd4,
  parameter int unsigned C_REG   = 16
) (
  input  logic [POWER_W-1:0] power,
  output gain_t              g
);

  if (C_REG == 0) begin : g_c_check
    $error("C_REG must be at least 1: it is what keeps the divisor above zero");
  end

  localparam int unsigned NUM_SHIFT = 2 * FRAC - MU_FRAC;

  logic [POWER_W-1:0] num;
  logic [POWER_W-1:0] den;
  logic [POWER_W-1:0] quo;

  always_comb begin
    num = POWER_W'(MU_CODE) << NUM_SHIFT;
    den = (power >> FRAC) + POWER_W'(C_REG);
    quo = num / den;
    g   = (quo > POWER_W'({GAIN_W{1'b1}})) ? {GAIN_W{1'b1}} : quo[GAIN_W-1:0];
  end

endmodule
