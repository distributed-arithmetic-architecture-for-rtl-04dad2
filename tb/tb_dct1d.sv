// tb_dct1d: runs the 1-D core as it is used inside the 2-D design, one
// 8-point transform every 16 cycles, back to back, switching between DCT and
// IDCT at random.  The testbench supplies the 16-cycle timing itself.
// Samples of transform P are written in random order during period P; its
// eight results must come out during period P+2 (seq = cycle/2), i.e. 32 to
// 47 cycles after the period start.  Each result is compared with a
// floating-point 8-point DCT/IDCT (orthonormal, scaled by 1/2 on each 1-D
// pass as in the 2-D transform) to within 3/32: each accumulator truncates
// (error below 1/32), an IDCT output adds two accumulators, and the 15-bit
// constants add up to about 1/32 more at full input range.  With rounding on
// the bound grows by half an integer step (16/32).
`timescale 1ns/1ps
module tb_dct1d;
  import dct_pkg::*;
  logic clk = 0, rst = 1, lsb = 0, msb = 0, mode_in = 0, in_we = 0, round_en = 0;
  logic [2:0] in_idx = 0, seq = 0;
  sample_t in_data = 0, y;
  logic [2:0] y_idx;
  logic mode_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dct1d dut (.*);

  localparam int NP = 600;
  int  xin   [NP][8];
  int  pmode [NP];
  int  pround[NP];
  real ref_o [NP][8];

  function automatic real gam(int k, int n);
    real g;
    g = 0.5 * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0);
    return (k == 0) ? g / $sqrt(2.0) : g;
  endfunction

  initial begin
    int seen;
    for (int p = 0; p < NP; p++) begin
      pmode[p]  = (p < 8) ? (p % 2) : int'($urandom_range(1));
      pround[p] = int'($urandom_range(1));
      for (int i = 0; i < 8; i++) begin
        int r;
        r = int'($urandom_range(510)) - 255;
        if (p % 50 == 3) r = (i % 2 == 0) ? 255 : -255;
        xin[p][i] = r * 32 + int'($urandom_range(31));
      end
      for (int k = 0; k < 8; k++) begin
        ref_o[p][k] = 0.0;
        for (int n = 0; n < 8; n++)
          ref_o[p][k] += (pmode[p] == 0) ? gam(k, n) * xin[p][n] : gam(n, k) * xin[p][n];
      end
    end
    repeat (2) @(negedge clk);
    rst = 0;
    seen = 0;
    for (int t = 0; t < 16 * (NP + 2); t++) begin
      int c, p, po;
      c  = t % 16;
      p  = t / 16;
      po = p - 2;
      lsb = (c == 0);
      msb = (c == 15);
      seq = 3'(c / 2);
      // inputs of period p: one write per cycle for 8 of the 15 free cycles
      in_we = 0;
      if (p < NP) begin
        mode_in = pmode[p][0];
        if (c < 8) begin
          in_we   = 1;
          in_idx  = 3'((c * 5 + p) % 8);
          in_data = sample_t'(xin[p][(c * 5 + p) % 8]);
        end
      end
      round_en = (po >= 0) ? pround[po][0] : 1'b0;
      #1;
      if (po >= 0) begin
        real e, err, tol;
        int  k;
        k = int'(y_idx);
        e = ref_o[po][k];
        err = real'(y) - e;
        tol = pround[po] ? 19.0 : 3.0;
        checks += 3;
        if (err > tol || err < -tol) begin
          failures++;
          if (failures < 20) $display("FAIL transform %0d mode %0d round %0d out %0d: %0d expected %f", po, pmode[po], pround[po], k, y, e);
        end
        if (pround[po] && (y[4:0] != 0)) begin
          failures++;
          $display("FAIL transform %0d: rounded output %0d has fraction bits", po, y);
        end
        if (int'(mode_out) != pmode[po]) begin
          failures++;
          $display("FAIL transform %0d: mode_out %0d", po, mode_out);
        end
        // the order in which the outputs appear
        checks++;
        if (k != ((pmode[po] == 0 || c / 2 < 4) ? c / 2 : 7 - (c / 2 - 4))) begin
          failures++;
          $display("FAIL transform %0d cycle %0d: index %0d", po, c, k);
        end
        seen++;
      end
      @(negedge clk);
    end
    checks++;
    if (seen != NP * 16) begin
      failures++;
      $display("FAIL only %0d result cycles observed", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * (NP + 10)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
