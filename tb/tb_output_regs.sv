// tb_output_regs: drives random accumulator sums and random msb pulses and
// checks that the eight registers take the low 16 bits of the sums exactly
// on msb, hold otherwise, and clear on reset.
`timescale 1ns/1ps
module tb_output_regs;
  import dct_pkg::*;
  logic clk = 0, rst = 1, msb = 0;
  acc_t sum [8];
  sample_t q [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  output_regs dut (.*);

  initial begin
    int model [8];
    for (int i = 0; i < 8; i++) begin sum[i] = acc_t'($urandom); model[i] = 0; end
    msb = 1;
    @(negedge clk);
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(q[i]) != model[i]) begin
          failures++;
          $display("FAIL step %0d q[%0d]=%0d expected %0d", t, i, q[i], model[i]);
        end
      end
      rst = ($urandom_range(99) == 0);
      msb = ($urandom_range(3) == 0);
      for (int i = 0; i < 8; i++) sum[i] = acc_t'($urandom);
      for (int i = 0; i < 8; i++)
        if (rst) model[i] = 0;
        else if (msb) model[i] = int'($signed(sum[i][15:0]));
      @(negedge clk);
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
