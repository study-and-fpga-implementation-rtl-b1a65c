// lms_filter_tb: 8-tap LMS filter (step code 0001, mu = 0.125) identifying an unknown
// 8-tap FIR system from white-noise input. Every cycle the error output
// is compared with a bit-exact step-by-step model of the filter. The clock enable is dropped at random
// so held cycles are covered, the unknown system is changed abruptly halfway
// (the error must jump and then settle again), and the mean absolute error
// at the end of each half must be well below the one at its start. Samples
// are presented for one cycle each, so the error is checked in the cycle
// its sample is applied (zero latency).
module lms_filter_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 8;
  logic    c = 0, rst = 1, ce = 0;
  sample_t x = '0, dd = '0, er;

  int      checks = 0, failures = 0;
  int      held = 0;
  longint  w [N];
  longint  xh [N];
  filter_model model;

  lms_filter #(.N_TAPS(N)) dut (.c, .rst, .ce, .x, .dd, .er);

  always #5 c = ~c;

  initial begin
    repeat (400000) @(posedge c);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_system();
    for (int i = 0; i < N; i++) w[i] = longint'($signed($urandom % 6554)) - 3277;  // +-0.2
  endtask

  initial begin
    longint d, err_start, err_end;
    model = new(N, 0, 1, 16);
    foreach (xh[i]) xh[i] = 0;
    new_system();
    @(posedge c); @(posedge c);
    #1 rst = 0;
    for (int half = 0; half < 2; half++) begin
      err_start = 0; err_end = 0;
      if (half == 1) new_system();
      for (int n = 0; n < 6000; n++) begin
        x  = sample_t'($signed($urandom % 16384) - 8192);  // uniform +-0.5
        d  = 0;
        for (int i = 0; i < N; i++) d += w[i] * ((i == 0) ? longint'(x) : xh[i-1]);
        dd = sample_t'(fdiv(d, 14));
        ce = ($urandom % 8) != 0;
        #1;
        checks++;
        if (longint'(er) != model.err(longint'(x), longint'(dd))) begin
          failures++; if (failures < 10) $display("n=%0d er=%0d want %0d", n, er, model.err(longint'(x), longint'(dd)));
        end

        if (n < 200)   err_start += (er < 0) ? -longint'(er) : longint'(er);
        if (n >= 5800) err_end   += (er < 0) ? -longint'(er) : longint'(er);
        @(posedge c);
        if (ce) begin
          model.update(longint'(x), longint'(dd));
          for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
          xh[0] = longint'(x);
        end else held++;
        #1;
      end
      $display("half %0d: mean |e| first 200 = %0d, last 200 = %0d (LSB)", half, err_start / 200, err_end / 200);
      checks++;
      if (err_end * 4 > err_start) begin failures++; $display("no convergence in half %0d", half); end
    end
    checks++;
    if (held == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
