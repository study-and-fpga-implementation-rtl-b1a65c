// coeff_cell_tb: applies random step-scaled errors and tap samples, with a
// random clock enable and occasional extreme values that drive the
// coefficient into saturation, and compares the coefficient after every
// edge with h <= sat16(h + sat16(floor((es * x + 2^13) / 2^14))).
module coeff_cell_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 0, rst = 1, ce = 0;
  sample_t es = '0, x_tap = '0, h;
  int      checks = 0, failures = 0;
  longint  model = 0;
  int      sat_hits = 0;

  coeff_cell dut (.clk, .rst, .ce, .es, .x_tap, .h);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    checks++;
    if (h !== '0) failures++;
    for (int n = 0; n < 5000; n++) begin
      if (n % 500 < 50) begin  // push hard toward one limit
        es    = (n % 1000 < 500) ? SAMPLE_MAX : SAMPLE_MIN;
        x_tap = SAMPLE_MAX;
      end else begin
        es    = sample_t'($urandom);
        x_tap = sample_t'($urandom);
      end
      ce = ($urandom % 5) != 0;
      @(posedge clk);
      if (ce) model = sat16(model + sat16(fdiv(longint'(es) * longint'(x_tap) + 8192, 14)));
      if (model == 32767 || model == -32768) sat_hits++;
      #1;
      checks++;
      if (longint'(h) != model) begin
        failures++;
        if (failures < 10) $display("n=%0d h=%0d want %0d", n, h, model);
      end
    end
    checks++;
    if (sat_hits == 0) begin failures++; $display("saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
