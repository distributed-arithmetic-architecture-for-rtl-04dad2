// tb_input_regs: writes the eight samples of a row in random order and
// checks that each lands where the shift registers expect it: DCT order
// x0 x7 x1 x6 x2 x5 x3 x4, IDCT order y0..y7; also checks reset clearing and
// that registers hold when not written.
`timescale 1ns/1ps
module tb_input_regs;
  import dct_pkg::*;
  logic clk = 0, rst = 1, we = 0, mode = 0;
  logic [2:0] idx = 0;
  sample_t d = 0;
  sample_t q [8];
  int checks = 0, failures = 0;
  int dct_order [8] = '{0, 7, 1, 6, 2, 5, 3, 4};

  always #5 clk = ~clk;
  input_regs dut (.*);

  initial begin
    int val [8];
    int perm [8];
    @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (q[i] != 0) begin failures++; $display("FAIL reset q[%0d]=%0d", i, q[i]); end
    end
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      mode = 1'($urandom_range(1));
      for (int i = 0; i < 8; i++) begin perm[i] = i; val[i] = int'($urandom_range(65535)) - 32768; end
      perm.shuffle();
      for (int i = 0; i < 8; i++) begin
        we = 1; idx = 3'(perm[i]); d = sample_t'(val[perm[i]]);
        @(negedge clk);
        we = 0;
        if ($urandom_range(1) == 1) @(negedge clk);
      end
      for (int p = 0; p < 8; p++) begin
        int n;
        n = mode ? p : dct_order[p];
        checks++;
        if (int'(q[p]) != val[n]) begin
          failures++;
          $display("FAIL mode %0d position %0d holds %0d, expected x(%0d)=%0d", mode, p, q[p], n, val[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
