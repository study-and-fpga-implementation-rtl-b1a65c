// adaptive_filter_top_tb: end-to-end run of both 64-tap filters at their
// default settings (LMS mu = 0.125, NLMS mu = 0.5), each identifying an
// unknown 64-tap FIR system from the same white-noise input.
//
// Every cycle both error outputs and the NLMS power output are compared with
// bit-exact step-by-step models. The run goes through these phases, and the
// mechanism each one exercises is counted (a mechanism never seen is a
// failure):
//   - start with an all-zero window: the NLMS divisor is C alone and the
//     step factor saturates (divide-by-zero guard);
//   - clock enable held low with the inputs held: no state may change, so
//     the errors must repeat (stall);
//   - convergence of both filters on a first unknown system;
//   - abrupt change of the unknown system: the error peaks and both filters
//     settle again (re-convergence after a peak);
//   - input level cut to a quarter: NLMS, normalised by the input power,
//     still settles within the phase.
module adaptive_filter_top_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  localparam int N     = 64;
  localparam int PHASE = 6000;

  logic    c = 0, rst = 1;
  logic    lms_ce = 0, nlms_ce = 0;
  sample_t lms_x = '0, lms_dd = '0, lms_er;
  sample_t nlms_x = '0, nlms_dd = '0, nlms_er, nlms_px;

  int checks = 0, failures = 0;
  int n_guard = 0, n_stall = 0, n_conv_lms = 0, n_conv_nlms = 0;
  int n_peak = 0, n_scaled = 0;

  longint w [N];
  longint xh [N];
  filter_model m_lms, m_nlms;

  adaptive_filter_top dut (
    .c, .rst,
    .lms_ce, .lms_x, .lms_dd, .lms_er,
    .nlms_ce, .nlms_x, .nlms_dd, .nlms_er, .nlms_px
  );

  always #5 c = ~c;

  initial begin
    repeat (200000) @(posedge c);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_system();
    // decaying random impulse response, |w_i| <= 0.2
    for (int i = 0; i < N; i++)
      w[i] = (longint'($signed($urandom % 6554)) - 3277) / longint'(1 + i / 8);
  endtask

  task automatic compare(int n);
    checks += 3;
    if (longint'(lms_er) != m_lms.err(longint'(lms_x), longint'(lms_dd))) begin
      failures++; if (failures < 10) $display("n=%0d lms_er=%0d want %0d", n, lms_er, m_lms.err(longint'(lms_x), longint'(lms_dd)));
    end
    if (longint'(nlms_er) != m_nlms.err(longint'(nlms_x), longint'(nlms_dd))) begin
      failures++; if (failures < 10) $display("n=%0d nlms_er=%0d want %0d", n, nlms_er, m_nlms.err(longint'(nlms_x), longint'(nlms_dd)));
    end
    if (longint'(nlms_px) != m_nlms.px(longint'(nlms_x))) begin
      failures++; if (failures < 10) $display("n=%0d px=%0d want %0d", n, nlms_px, m_nlms.px(longint'(nlms_x)));
    end
  endtask

  // One sample through both filters; returns |e| of each.
  task automatic run_sample(int n, longint amp, bit enable, output longint ae_lms, output longint ae_nlms);
    longint d, xs;
    if (amp == 0) xs = 0;
    else          xs = longint'($urandom % 32'(2 * amp)) - amp;
    d = 0;
    for (int i = 0; i < N; i++) d += w[i] * ((i == 0) ? xs : xh[i-1]);
    lms_x  = sample_t'(xs);  nlms_x  = sample_t'(xs);
    lms_dd = sample_t'(fdiv(d, 14)); nlms_dd = lms_dd;
    lms_ce = enable; nlms_ce = enable;
    #1;
    compare(n);
    if (enable && nlms_px == '0 && m_nlms.power(xs) == 0 && m_nlms.gain(xs) == 65535) n_guard++;
    ae_lms  = (lms_er  < 0) ? -longint'(lms_er)  : longint'(lms_er);
    ae_nlms = (nlms_er < 0) ? -longint'(nlms_er) : longint'(nlms_er);
    @(posedge c);
    if (enable) begin
      m_lms.update(longint'(lms_x), longint'(lms_dd));
      m_nlms.update(longint'(nlms_x), longint'(nlms_dd));
      for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = xs;
    end
    #1;
  endtask

  // A stall: hold the last inputs with ce low for a few cycles; both errors
  // must stay exactly as they were.
  task automatic stall(int n);
    sample_t e1, e2;
    lms_ce = 0; nlms_ce = 0;
    #1 e1 = lms_er; e2 = nlms_er;
    repeat (3) begin
      @(posedge c); #1;
      checks++;
      if (lms_er != e1 || nlms_er != e2) begin failures++; $display("n=%0d state moved during stall", n); end
    end
    n_stall++;
  endtask

  // Run one phase; returns mean |e| over the first and last 300 samples.
  task automatic phase(string name, longint amp, output longint s_l, output longint e_l,
                       output longint s_n, output longint e_n);
    longint al, an;
    s_l = 0; e_l = 0; s_n = 0; e_n = 0;
    for (int n = 0; n < PHASE; n++) begin
      run_sample(n, amp, 1'b1, al, an);
      if (n < 300)          begin s_l += al; s_n += an; end
      if (n >= PHASE - 300) begin e_l += al; e_n += an; end
      if (n % 997 == 500) stall(n);
    end
    s_l /= 300; e_l /= 300; s_n /= 300; e_n /= 300;
    $display("%s: LMS |e| %0d -> %0d, NLMS |e| %0d -> %0d (LSB of 2^-14)", name, s_l, e_l, s_n, e_n);
  endtask

  initial begin
    longint s_l, e_l, s_n, e_n, al, an;
    m_lms  = new(N, 1'b0, 1, 16);
    m_nlms = new(N, 1'b1, 4, 16);
    foreach (xh[i]) xh[i] = 0;
    new_system();
    @(posedge c); @(posedge c);
    #1 rst = 0;

    // all-zero window: divide-by-zero guard
    for (int n = 0; n < 4; n++) run_sample(n, 0, 1'b1, al, an);

    // first system, input uniform in +-0.5
    phase("converge", 8192, s_l, e_l, s_n, e_n);
    if (e_l * 5 < s_l) n_conv_lms++;
    if (e_n * 5 < s_n) n_conv_nlms++;

    // abrupt change of the unknown system
    new_system();
    phase("system change", 8192, s_l, e_l, s_n, e_n);
    if (s_l > 3 * e_l && s_n > 3 * e_n) n_peak++;
    if (e_l * 5 < s_l) n_conv_lms++;
    if (e_n * 5 < s_n) n_conv_nlms++;

    // input level cut to a quarter, with another new system
    new_system();
    phase("quarter level", 2048, s_l, e_l, s_n, e_n);
    if (e_n * 5 < s_n) n_scaled++;

    $display("mechanisms: guard=%0d stall=%0d conv_lms=%0d conv_nlms=%0d peak=%0d scaled=%0d",
             n_guard, n_stall, n_conv_lms, n_conv_nlms, n_peak, n_scaled);
    checks += 6;
    if (n_guard == 0)     failures++;
    if (n_stall == 0)     failures++;
    if (n_conv_lms < 2)   failures++;
    if (n_conv_nlms < 2)  failures++;
    if (n_peak == 0)      failures++;
    if (n_scaled == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
