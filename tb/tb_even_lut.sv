// tb_even_lut: rebuilds every entry of the four even tables from the DCT
// definition, Gamma[k][n] = 0.5 * c(k) * cos((2n+1) k pi / 16) with
// c(0) = 1/sqrt(2), each constant rounded to 15 fraction bits, and compares
// all 16 addresses of all four tables in both modes.
//   DCT : table r, address bit j -> Gamma[2r][j]   (bit j = x(j) + x(7-j))
//   IDCT: table n, address bit j -> Gamma[2j][n]   (bit j = y(2j))
`timescale 1ns/1ps
module tb_even_lut;
  import dct_pkg::*;
  logic [3:0] addr;
  logic       mode;
  lut_t       mem [4];
  int checks = 0, failures = 0;

  even_lut dut (.*);

  function automatic int coef(int k, int n);
    real x;
    x = 0.5 * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0) * 32768.0;
    if (k == 0) x = x / $sqrt(2.0);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  initial begin
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 16; a++) begin
        mode = 1'(m);
        addr = 4'(a);
        #1;
        for (int r = 0; r < 4; r++) begin
          int e;
          e = 0;
          for (int j = 0; j < 4; j++)
            if (a[j]) e += (m == 0) ? coef(2 * r, j) : coef(2 * j, r);
          checks++;
          if (int'(mem[r]) != e) begin
            failures++;
            $display("FAIL mode %0d table %0d address %0d: %0d expected %0d", m, r, a, mem[r], e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
