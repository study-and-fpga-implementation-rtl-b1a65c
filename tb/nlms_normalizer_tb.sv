// nlms_normalizer_tb: checks g = min(65535, floor(mu * 2^25 / (floor(P/2^14)
// + C))) for a zero norm (where only C keeps the quotient finite), for norms
// spread over the whole range, and for every step code.
module nlms_normalizer_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  localparam int PW = 38;
  localparam int C  = 16;
  logic [PW-1:0] power;
  gain_t g_mu4, g_mu15;
  int    checks = 0, failures = 0;
  int    g_sat = 0;

  nlms_normalizer #(.POWER_W(PW), .MU_CODE(4'd4),  .C_REG(C)) dut4  (.power, .g(g_mu4));
  nlms_normalizer #(.POWER_W(PW), .MU_CODE(4'd15), .C_REG(C)) dut15 (.power, .g(g_mu15));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_g(int mu, longint p);
    longint q = (longint'(mu) << 25) / ((p >> 14) + C);
    return (q > 65535) ? 65535 : q;
  endfunction

  initial begin
    longint p, r4, r15;
    for (int n = 0; n < 4000; n++) begin
      if (n == 0) p = 0;
      else        p = (longint'($urandom) << ($urandom % 6)) >> ($urandom % 24);
      power = PW'(p);
      #1;
      r4  = ref_g(4, p);
      r15 = ref_g(15, p);
      if (r4 == 65535) g_sat++;
      checks += 2;
      if (longint'(g_mu4) != r4)   begin failures++; if (failures < 10) $display("p=%0d g=%0d want %0d", p, g_mu4, r4); end
      if (longint'(g_mu15) != r15) begin failures++; if (failures < 10) $display("p=%0d g15=%0d want %0d", p, g_mu15, r15); end
      #1;
    end
    checks++;
    if (g_sat == 0) begin failures++; $display("gain saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
