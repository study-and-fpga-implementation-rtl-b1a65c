// error_step: the error path of the adaptive filter. It forms the error
// e(n) = d(n) - y(n) and the step-scaled error es(n) = g * e(n) that every
// coefficient cell multiplies by its tap sample.
//
// y(n) arrives as the 32-bit sum of products with 28 fraction bits; it is
// brought to the 14-fraction-bit sample format by an arithmetic shift, the
// subtraction is done wide and the result saturates to 16 bits, giving the
// 16-bit error of the structure. The step factor g is unsigned with 14
// fraction bits: the constant mu for LMS, mu / (||x||^2 + C) for NLMS. The
// product g * e is shifted back by 14 bits and saturated to 16 bits.
//
// Interface and timing: purely combinational.
module error_step
  import adaptive_pkg::*;
(
  input  acc_t    y,
  input  sample_t d,
  input  gain_t   g,
  output sample_t e,
  output sample_t es
);

  logic signed [47:0] diff;
  logic signed [47:0] scaled;

  always_comb begin
    diff   = 48'(d) - 48'(y >>> FRAC);
    e      = sat_sample(diff);
    scaled = 48'(e) * $signed({32'd0, g});
    es     = sat_sample(scaled >>> FRAC);
  end

endmodule
