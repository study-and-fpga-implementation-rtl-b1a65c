// adaptive_pkg: shared number formats and arithmetic helpers of the LMS and
// NLMS adaptive FIR filters.
//
// Samples, the desired signal, the error and the coefficients are 16-bit
// two's complement words; the wider internal results (tap products and the
// filter output sum) are 32 bits. The 16-bit word width and the 32-bit limit
// for internal results follow the design's specification. The binary point
// (14 fractional bits, range -2.0 .. +2.0) and the 4-bit step code with 3
// fractional bits (code 0001 = 0.125, 0011 = 0.375) are this design's
// reading of the test signals and of the quoted step codes.
//
// The step factor handed to the error multiplier is an unsigned 16-bit value
// with FRAC fractional bits: for LMS it is the constant mu, for NLMS it is
// mu / (||x||^2 + C).
package adaptive_pkg;

  localparam int unsigned SAMPLE_W = 16;  // I/O and coefficient width
  localparam int unsigned ACC_W    = 32;  // product and output-sum width
  localparam int unsigned FRAC     = 14;  // fractional bits of a sample
  localparam int unsigned MU_W     = 4;   // width of the step-size code
  localparam int unsigned MU_FRAC  = 3;   // fractional bits of the step code
  localparam int unsigned GAIN_W   = 16;  // width of the step factor

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic        [GAIN_W-1:0]   gain_t;
  typedef logic        [MU_W-1:0]     mu_code_t;

  localparam sample_t SAMPLE_MAX = sample_t'(16'sh7FFF);
  localparam sample_t SAMPLE_MIN = sample_t'(16'sh8000);

  // Clamp a wide signed value into the 16-bit sample range.
  function automatic sample_t sat_sample(input logic signed [47:0] v);
    if (v > 48'sd32767)       return SAMPLE_MAX;
    else if (v < -48'sd32768) return SAMPLE_MIN;
    else                      return sample_t'(v[SAMPLE_W-1:0]);
  endfunction

  // Step factor of the plain LMS filter: the step code rescaled to FRAC
  // fractional bits (code * 2^(FRAC - MU_FRAC)).
  function automatic gain_t mu_to_gain(input mu_code_t code);
    return gain_t'({12'd0, code} << (FRAC - MU_FRAC));
  endfunction

endpackage
