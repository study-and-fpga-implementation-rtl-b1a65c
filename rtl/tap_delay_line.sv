// tap_delay_line: the chain of unit delays (z^-1) of a direct-form FIR filter.
//
// Tap 0 is the present input sample x(n) itself, taken straight from the
// input as in the direct structure; tap k (k >= 1) is x(n-k), held in a
// register. One register more than the filter needs is kept at the end of
// the chain, so `x_oldest` is x(n-N_TAPS), the sample that has just left the
// N_TAPS-sample window (the NLMS power estimator subtracts it; the LMS filter
// leaves it open).
//
// Interface and timing: on a rising edge of `clk` with `ce` high the chain
// shifts by one sample; with `ce` low it holds. A synchronous, active-high
// `rst` clears every register (the clearing reset is this design's choice).
module tap_delay_line
  import adaptive_pkg::*;
#(
  parameter int unsigned N_TAPS = 64
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  sample_t x_in,
  output sample_t taps [N_TAPS],
  output sample_t x_oldest
);

  sample_t dly [N_TAPS];  // dly[k] = x(n-1-k)

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(N_TAPS); k++) dly[k] <= '0;
    end else if (ce) begin
      dly[0] <= x_in;
      for (int k = 1; k < int'(N_TAPS); k++) dly[k] <= dly[k-1];
    end
  end

  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k < int'(N_TAPS); k++) taps[k] = dly[k-1];
  end

  assign x_oldest = dly[N_TAPS-1];

endmodule
