// coeff_cell: the update unit of one filter coefficient, h_i(n+1) =
// h_i(n) + es(n) * x(n-i), where es(n) is the error already multiplied by
// the step factor.
//
// It is one row of the update column of the LMS structure: a multiplier that
// forms es * x(n-i), an adder that adds it to the stored coefficient and a
// register holding the coefficient, all 16 bits wide as in the structure.
// The 32-bit product is brought back to the 16-bit format by rounding to
// the nearest step (add half an LSB, then drop FRAC fraction bits). Plain
// truncation would pull every coefficient down by half an LSB per sample on
// average, which with small inputs and a small step leaves a large residual
// error. Both the increment and the new coefficient saturate at the 16-bit
// limits instead of wrapping. Rounding and saturation are this design's
// choices.
//
// Interface and timing: `h` is the registered coefficient. It takes its new
// value on a rising edge of `clk` with `ce` high and holds otherwise; a
// synchronous `rst` clears it to zero.
module coeff_cell
  import adaptive_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  sample_t es,     // step-scaled error
  input  sample_t x_tap,  // x(n-i)
  output sample_t h
);

  localparam acc_t HALF = acc_t'(1) <<< (FRAC - 1);

  acc_t    prod;
  sample_t delta;
  sample_t h_next;

  always_comb begin
    prod   = acc_t'(es) * acc_t'(x_tap);
    delta  = sat_sample(48'(prod + HALF) >>> FRAC);
    h_next = sat_sample(48'(h) + 48'(delta));
  end

  always_ff @(posedge clk) begin
    if (rst)     h <= '0;
    else if (ce) h <= h_next;
  end

endmodule
