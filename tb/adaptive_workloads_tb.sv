// adaptive_workloads_tb: the filter configurations the design was evaluated
// with, run side by side on one white-noise input of 48,000 samples, each
// identifying its own unknown FIR system of its own length:
//   - LMS, 64 taps, step 0.125 (code 0001)
//   - LMS, 64 taps, step 0.375 (code 0011)
//   - LMS,  3 taps, step 0.125
//   - LMS, 128 taps, step 0.125
//   - NLMS, 64 taps, step 0.5
// Each error output is compared every cycle with a bit-exact model, and
// every configuration must settle: mean |e| over the last 1000 samples at
// most a fifth of that over the first 100. The larger LMS step must also
// settle faster (lower mean |e| over samples 300..600) than the smaller one.
// The input is uniform in +-0.25 so that the 64-tap, 0.375 step
// configuration stays inside the LMS stability bound
// mu < 2 / (N * E[x^2]) = 2 / (64 * 0.0208) = 1.5.
module adaptive_workloads_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS      = 48000;
  localparam int NCFG    = 5;
  localparam int LEN [NCFG] = '{64, 64, 3, 128, 64};
  localparam int MUC [NCFG] = '{1, 3, 1, 1, 4};
  localparam bit NRM [NCFG] = '{0, 0, 0, 0, 1};

  logic    c = 0, rst = 1, ce = 0;
  sample_t x = '0;
  sample_t dd [NCFG];
  sample_t er [NCFG];
  sample_t px_unused;
  int      checks = 0, failures = 0;

  longint      w  [NCFG][128];
  longint      xh [128];
  filter_model mdl [NCFG];

  lms_filter  #(.N_TAPS(64),  .MU_CODE(4'b0001)) u_lms64a (.c, .rst, .ce, .x, .dd(dd[0]), .er(er[0]));
  lms_filter  #(.N_TAPS(64),  .MU_CODE(4'b0011)) u_lms64b (.c, .rst, .ce, .x, .dd(dd[1]), .er(er[1]));
  lms_filter  #(.N_TAPS(3),   .MU_CODE(4'b0001)) u_lms3   (.c, .rst, .ce, .x, .dd(dd[2]), .er(er[2]));
  lms_filter  #(.N_TAPS(128), .MU_CODE(4'b0001)) u_lms128 (.c, .rst, .ce, .x, .dd(dd[3]), .er(er[3]));
  nlms_filter #(.N_TAPS(64),  .MU_CODE(4'b0100)) u_nlms64 (.c, .rst, .ce, .x, .dd(dd[4]), .er(er[4]), .Px(px_unused));

  always #5 c = ~c;

  initial begin
    repeat (NS + 1000) @(posedge c);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e_first [NCFG], e_last [NCFG], e_mid [NCFG];
    longint d, ae;
    for (int k = 0; k < NCFG; k++) begin
      mdl[k] = new(LEN[k], NRM[k], MUC[k], 16);
      e_first[k] = 0; e_last[k] = 0; e_mid[k] = 0;
      for (int i = 0; i < 128; i++)
        w[k][i] = (i < LEN[k]) ? (longint'($signed($urandom % 6554)) - 3277) / longint'(1 + i / 8) : 0;
    end
    // the two 64-tap LMS runs identify the same system, so their speeds compare
    for (int i = 0; i < 128; i++) w[1][i] = w[0][i];
    foreach (xh[i]) xh[i] = 0;
    foreach (dd[k]) dd[k] = '0;
    @(posedge c); @(posedge c);
    #1 rst = 0;
    ce = 1;
    for (int n = 0; n < NS; n++) begin
      x = sample_t'(longint'($urandom % 8192) - 4096);
      for (int k = 0; k < NCFG; k++) begin
        d = 0;
        for (int i = 0; i < LEN[k]; i++) d += w[k][i] * ((i == 0) ? longint'(x) : xh[i-1]);
        dd[k] = sample_t'(fdiv(d, 14));
      end
      #1;
      for (int k = 0; k < NCFG; k++) begin
        checks++;
        if (longint'(er[k]) != mdl[k].err(longint'(x), longint'(dd[k]))) begin
          failures++;
          if (failures < 10) $display("cfg %0d n=%0d er=%0d want %0d", k, n, er[k], mdl[k].err(longint'(x), longint'(dd[k])));
        end
        ae = (er[k] < 0) ? -longint'(er[k]) : longint'(er[k]);
        if (n < 100) e_first[k] += ae;
        if (n >= 300 && n < 600) e_mid[k] += ae;
        if (n >= NS - 1000) e_last[k] += ae;
      end
      @(posedge c);
      for (int k = 0; k < NCFG; k++) mdl[k].update(longint'(x), longint'(dd[k]));
      for (int i = 127; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = longint'(x);
      #1;
    end
    for (int k = 0; k < NCFG; k++) begin
      $display("%s %0d taps, step code %0d: mean |e| first 100 = %0d, samples 300-600 = %0d, last 1000 = %0d (LSB of 2^-14)",
               NRM[k] ? "NLMS" : "LMS ", LEN[k], MUC[k], e_first[k] / 100, e_mid[k] / 300, e_last[k] / 1000);
      checks++;
      if (e_last[k] / 1000 * 5 > e_first[k] / 100) begin failures++; $display("configuration %0d did not settle", k); end
    end
    checks++;
    if (e_mid[1] >= e_mid[0]) begin failures++; $display("larger LMS step did not settle faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
