// tap_delay_line_tb: drives a 5-tap delay line with random samples and a
// random clock enable and checks every tap and the leaving sample against a
// shift-register model kept in the testbench, after each edge.
module tap_delay_line_tb;
  import adaptive_pkg::*;

  localparam int N = 5;
  logic    clk = 0, rst = 1, ce = 0;
  sample_t x_in = '0;
  sample_t taps [N];
  sample_t x_oldest;
  int      checks = 0, failures = 0;
  int      model [N+1];  // model[k] = x(n-k), model[0] unused
  int      shifts = 0, holds = 0;

  tap_delay_line #(.N_TAPS(N)) dut (.clk, .rst, .ce, .x_in, .taps, .x_oldest);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    checks++;
    if (taps[0] !== x_in) begin failures++; $display("tap0 mismatch"); end
    for (int k = 1; k < N; k++) begin
      checks++;
      if (int'(taps[k]) != model[k]) begin
        failures++; $display("tap %0d: got %0d want %0d", k, taps[k], model[k]);
      end
    end
    checks++;
    if (int'(x_oldest) != model[N]) begin
      failures++; $display("oldest: got %0d want %0d", x_oldest, model[N]);
    end
  endtask

  initial begin
    foreach (model[k]) model[k] = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      x_in = sample_t'($urandom);
      ce   = ($urandom % 4) != 0;
      #1 check_all();
      @(posedge clk);
      if (ce) begin
        for (int k = N; k > 1; k--) model[k] = model[k-1];
        model[1] = int'(x_in);
        shifts++;
      end else holds++;
      #1;
    end
    checks++;
    if (shifts == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
