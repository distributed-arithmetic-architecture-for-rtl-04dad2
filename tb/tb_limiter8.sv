// tb_limiter8: every 16-bit input value with the limiter enabled and a
// random sample with it disabled.  Enabled: values whose integer part
// (value / 32, rounded down) lies outside -128..127 become -128 or 127 with
// cleared fraction bits, all others pass unchanged.  Disabled: always pass.
`timescale 1ns/1ps
module tb_limiter8;
  import dct_pkg::*;
  logic    en;
  sample_t d, q;
  int checks = 0, failures = 0;

  limiter8 dut (.*);

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      int e, ip;
      en = 1;
      d  = sample_t'(v);
      #1;
      ip = (v >= 0) ? v / 32 : -((-v + 31) / 32);
      e  = (ip > 127) ? 127 * 32 : (ip < -128) ? -128 * 32 : v;
      checks++;
      if (int'(q) != e) begin
        failures++;
        $display("FAIL en d=%0d q=%0d expected %0d", v, q, e);
      end
      if (v % 8 == 0) begin
        en = 0;
        #1;
        checks++;
        if (int'(q) != v) begin
          failures++;
          $display("FAIL disabled d=%0d q=%0d", v, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
