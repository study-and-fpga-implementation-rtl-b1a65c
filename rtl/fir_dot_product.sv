// fir_dot_product: the filtering half of the adaptive filter, the output
// y(n) = sum_i h_i(n) * x(n-i) of a direct-form FIR filter.
//
// Each tap has its own 16 x 16 multiplier giving a 32-bit product, and one
// adder sums all products into the 32-bit output, as in the direct
// structure. Products and sum carry 28 fraction bits, so the 32-bit sum
// covers -8.0 .. +8.0 in sample units and wraps beyond that; an identified
// system whose output stays inside the 16-bit sample range never gets there.
//
// Interface and timing: purely combinational, N_TAPS products per sample.
module fir_dot_product
  import adaptive_pkg::*;
#(
  parameter int unsigned N_TAPS = 64
) (
  input  sample_t h [N_TAPS],
  input  sample_t x [N_TAPS],
  output acc_t    y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < int'(N_TAPS); i++) y += acc_t'(h[i]) * acc_t'(x[i]);
  end

endmodule
