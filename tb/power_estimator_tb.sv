// power_estimator_tb: feeds an 8-sample window with random samples
// (including bursts of full-scale values and of zeros) and a random clock
// enable, supplies the leaving sample from its own history, and checks the
// running norm against the directly computed sum of squares of the window,
// and Px against that sum divided by 8 (saturated), in every cycle.
module power_estimator_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 8;
  localparam int PW = 2 * SAMPLE_W + 3;
  logic    clk = 0, rst = 1, ce = 0;
  sample_t x_new = '0, x_old = '0;
  logic [PW-1:0] power;
  sample_t px;
  int      checks = 0, failures = 0;
  longint  hist [N+1];  // hist[k] = x(n-k) for k >= 1
  int      px_sat = 0;

  power_estimator #(.N_TAPS(N)) dut (.clk, .rst, .ce, .x_new, .x_old, .power, .px);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p, m;
    foreach (hist[k]) hist[k] = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 5000; n++) begin
      if ((n / 100) % 5 == 1)      x_new = (($urandom % 2) != 0) ? SAMPLE_MIN : SAMPLE_MAX;
      else if ((n / 100) % 5 == 3) x_new = '0;
      else                         x_new = sample_t'($urandom);
      x_old = sample_t'(hist[N]);
      ce = ($urandom % 4) != 0;
      #1;
      p = longint'(x_new) * longint'(x_new);
      for (int k = 1; k < N; k++) p += hist[k] * hist[k];
      m = p >> (FRAC + 3);
      if (m > 32767) begin m = 32767; px_sat++; end
      checks += 2;
      if (longint'(power) != p) begin failures++; if (failures < 10) $display("n=%0d power=%0d want %0d", n, power, p); end
      if (longint'(px) != m)    begin failures++; if (failures < 10) $display("n=%0d px=%0d want %0d", n, px, m); end
      @(posedge clk);
      if (ce) begin
        for (int k = N; k > 1; k--) hist[k] = hist[k-1];
        hist[1] = longint'(x_new);
      end
      #1;
    end
    checks++;
    if (px_sat == 0) begin failures++; $display("Px saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
