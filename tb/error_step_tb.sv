// error_step_tb: checks e = sat16(d - floor(y/2^14)) and
// es = sat16(floor(g*e/2^14)) for random operands, for small y that keep
// the error in range, and for large y and g that make both outputs
// saturate.
module error_step_tb;
  import adaptive_pkg::*;
  import tb_ref_pkg::*;

  acc_t    y;
  sample_t d;
  gain_t   g;
  sample_t e, es;
  int      checks = 0, failures = 0;
  int      e_sat = 0, es_sat = 0;

  error_step dut (.y, .d, .g, .e, .es);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint re, res;
    for (int n = 0; n < 5000; n++) begin
      case (n % 3)
        0: y = acc_t'($urandom);
        1: y = acc_t'($signed($urandom % (1 << 26)) - (1 << 25));
        default: y = acc_t'($signed($urandom % (1 << 30)) - (1 << 29));
      endcase
      d = sample_t'($urandom);
      g = (n % 4 == 0) ? gain_t'($urandom) : gain_t'($urandom % 4096);
      #1;
      re  = sat16(longint'(d) - fdiv(longint'(y), 14));
      res = sat16(fdiv(longint'(g) * re, 14));
      if (re == 32767 || re == -32768) e_sat++;
      if (res == 32767 || res == -32768) es_sat++;
      checks += 2;
      if (longint'(e) != re)  begin failures++; if (failures < 10) $display("e=%0d want %0d", e, re); end
      if (longint'(es) != res) begin failures++; if (failures < 10) $display("es=%0d want %0d", es, res); end
      #1;
    end
    checks++;
    if (e_sat == 0 || es_sat == 0) begin failures++; $display("saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
