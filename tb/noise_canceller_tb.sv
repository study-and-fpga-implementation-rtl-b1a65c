// noise_canceller_tb: both 64-tap filters used as adaptive noise cancellers.
// The desired input is a wanted tone plus noise that reached it through an
// unknown 64-tap acoustic path; the filter input is the noise reference
// itself. Once the filter has learnt the path, its error output is the tone
// with the noise removed.
//
// Every cycle the error outputs are compared with bit-exact models. At the
// end, the mean deviation of each error output from the tone over the last
// 2000 samples must be below a third of the mean noise level in the desired
// input. The tone (amplitude 0.05) is weaker than the noise: being
// uncorrelated with the reference, it acts on the update like measurement
// noise, and at the default steps (LMS misadjustment about
// mu * N * E[x^2] / 2 = 0.33, NLMS about mu / 2 = 0.25) a strong tone would
// leave a large residual. Both filters run at their default parameters
// through the top.
module noise_canceller_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 64;
  localparam int NS = 20000;

  logic    c = 0, rst = 1, ce = 0;
  sample_t x = '0, dd = '0, lms_er, nlms_er, px;
  int      checks = 0, failures = 0;
  longint  w [N];
  longint  xh [N];
  filter_model m_lms, m_nlms;

  adaptive_filter_top dut (
    .c, .rst,
    .lms_ce(ce), .lms_x(x), .lms_dd(dd), .lms_er,
    .nlms_ce(ce), .nlms_x(x), .nlms_dd(dd), .nlms_er, .nlms_px(px)
  );

  always #5 c = ~c;

  initial begin
    repeat (NS + 1000) @(posedge c);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint noise_path, tone, dev_l = 0, dev_n = 0, noise_lvl = 0;
    m_lms  = new(N, 1'b0, 1, 16);
    m_nlms = new(N, 1'b1, 4, 16);
    foreach (xh[i]) xh[i] = 0;
    for (int i = 0; i < N; i++) w[i] = (longint'($urandom % 13108) - 6554) / longint'(1 + i / 4);  // +-0.4, decaying
    @(posedge c); @(posedge c);
    #1 rst = 0;
    ce = 1;
    for (int n = 0; n < NS; n++) begin
      x = sample_t'(longint'($urandom % 16384) - 8192);        // reference noise, +-0.5
      noise_path = 0;
      for (int i = 0; i < N; i++) noise_path += w[i] * ((i == 0) ? longint'(x) : xh[i-1]);
      noise_path = fdiv(noise_path, 14);
      tone = longint'($rtoi(819.0 * $sin(2.0 * 3.14159265 * n / 37.0)));  // 0.05 amplitude
      dd = sample_t'(tone + noise_path);
      #1;
      checks += 2;
      if (longint'(lms_er) != m_lms.err(longint'(x), longint'(dd)))   begin failures++; if (failures < 10) $display("n=%0d lms mismatch", n); end
      if (longint'(nlms_er) != m_nlms.err(longint'(x), longint'(dd))) begin failures++; if (failures < 10) $display("n=%0d nlms mismatch", n); end
      if (n >= NS - 2000) begin
        dev_l     += (longint'(lms_er) > tone)  ? longint'(lms_er) - tone  : tone - longint'(lms_er);
        dev_n     += (longint'(nlms_er) > tone) ? longint'(nlms_er) - tone : tone - longint'(nlms_er);
        noise_lvl += (noise_path < 0) ? -noise_path : noise_path;
      end
      @(posedge c);
      m_lms.update(longint'(x), longint'(dd));
      m_nlms.update(longint'(x), longint'(dd));
      for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = longint'(x);
      #1;
    end
    $display("mean noise in d = %0d, residual around the tone: LMS %0d, NLMS %0d (LSB of 2^-14)",
             noise_lvl / 2000, dev_l / 2000, dev_n / 2000);
    checks += 2;
    if (dev_l * 3 > noise_lvl) begin failures++; $display("LMS did not cancel the noise"); end
    if (dev_n * 3 > noise_lvl) begin failures++; $display("NLMS did not cancel the noise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
