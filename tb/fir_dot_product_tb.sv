// fir_dot_product_tb: compares the 8-tap sum of products with a 64-bit
// reference wrapped to 32 bits, for random vectors and for all-extreme
// vectors (which exercise the 32-bit wrap).
module fir_dot_product_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 8;
  sample_t h [N];
  sample_t x [N];
  acc_t    y;
  int      checks = 0, failures = 0;

  fir_dot_product #(.N_TAPS(N)) dut (.h, .x, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_y;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < N; i++) begin
        if (n < 4) begin
          h[i] = n[0] ? SAMPLE_MIN : SAMPLE_MAX;
          x[i] = n[1] ? SAMPLE_MIN : SAMPLE_MAX;
        end else begin
          h[i] = sample_t'($urandom);
          x[i] = (n % 3 == 0) ? sample_t'($urandom % 4096) : sample_t'($urandom);
        end
      end
      #1;
      ref_y = 0;
      for (int i = 0; i < N; i++) ref_y += longint'(h[i]) * longint'(x[i]);
      ref_y = wrap32(ref_y);
      checks++;
      if (longint'(y) != ref_y) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d want %0d", n, y, ref_y);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
