// tb_odd_lut: rebuilds the four odd tables from the DCT definition and checks
// all 16 addresses against both uses of the shared tables:
//   DCT : table r, address bit j -> Gamma[2r+1][j]  (bit j = x(j) - x(7-j))
//   IDCT: table n, address bit j -> Gamma[2j+1][n]  (bit j = y(2j+1))
// The two must give the same word, which is why one set of tables serves both.
`timescale 1ns/1ps
module tb_odd_lut;
  import dct_pkg::*;
  logic [3:0] addr;
  lut_t       mem [4];
  int checks = 0, failures = 0;

  odd_lut dut (.*);

  function automatic int coef(int k, int n);
    real x;
    x = 0.5 * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0) * 32768.0;
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      for (int r = 0; r < 4; r++) begin
        int e_dct, e_idct;
        e_dct = 0;
        e_idct = 0;
        for (int j = 0; j < 4; j++)
          if (a[j]) begin
            e_dct  += coef(2 * r + 1, j);
            e_idct += coef(2 * j + 1, r);
          end
        checks += 2;
        if (int'(mem[r]) != e_dct) begin
          failures++;
          $display("FAIL DCT table %0d address %0d: %0d expected %0d", r, a, mem[r], e_dct);
        end
        if (int'(mem[r]) != e_idct) begin
          failures++;
          $display("FAIL IDCT table %0d address %0d: %0d expected %0d", r, a, mem[r], e_idct);
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
