// tb_idct_bfly: random even/odd register contents, every seq value, both
// modes, rounding on and off.  Reference:
//   DCT : seq s gives y(s): even s from ev[s/2], odd s from od[s/2]; idx = s
//   IDCT: seq 0..3 gives x(s) = v(s) + v(s+4), idx = s
//         seq 4..7 gives x(7-(s-4)) = v(s-4) - v(s), idx = 7-(s-4)
// Rounding: to the nearest integer (1/32 units), halves away from zero,
// fraction bits cleared.
`timescale 1ns/1ps
module tb_idct_bfly;
  import dct_pkg::*;
  sample_t    ev [4];
  sample_t    od [4];
  logic [2:0] seq;
  logic       mode, round_en;
  sample_t    y;
  logic [2:0] idx;
  int checks = 0, failures = 0;

  idct_bfly dut (.*);

  function automatic int round32(int v);
    int a;
    a = (v < 0) ? -v : v;
    a = ((a + 16) / 32) * 32;
    return (v < 0) ? -a : a;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int e [4], o [4];
      for (int i = 0; i < 4; i++) begin
        e[i] = int'($urandom_range(32000)) - 16000;
        o[i] = int'($urandom_range(32000)) - 16000;
        if (t < 50) begin  // exact halves and near-halves
          e[i] = int'($urandom_range(40)) * 32 - 640 + 16 * int'($urandom_range(1));
          o[i] = int'($urandom_range(2)) - 1;
        end
        ev[i] = sample_t'(e[i]);
        od[i] = sample_t'(o[i]);
      end
      mode = 1'($urandom_range(1));
      round_en = 1'($urandom_range(1));
      for (int s = 0; s < 8; s++) begin
        int v, ei;
        seq = 3'(s);
        #1;
        if (!mode) begin
          v  = (s % 2 == 0) ? e[s / 2] : o[s / 2];
          ei = s;
        end else if (s < 4) begin
          v  = e[s] + o[s];
          ei = s;
        end else begin
          v  = e[s - 4] - o[s - 4];
          ei = 7 - (s - 4);
        end
        if (round_en) v = round32(v);
        checks += 2;
        if (int'(y) != v) begin
          failures++;
          $display("FAIL mode %0d round %0d seq %0d: y=%0d expected %0d", mode, round_en, s, y, v);
        end
        if (int'(idx) != ei) begin
          failures++;
          $display("FAIL mode %0d seq %0d: idx=%0d expected %0d", mode, s, idx, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
