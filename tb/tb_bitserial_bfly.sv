// tb_bitserial_bfly: streams random 16-bit word pairs through the bit-serial
// butterfly, LSB first with lsb in the first cycle of each word, back to
// back, and checks the collected words: A+B and A-B (mod 2^16) in DCT mode,
// A and B unchanged in IDCT mode.
`timescale 1ns/1ps
module tb_bitserial_bfly;
  logic clk = 0, rst = 1, lsb = 0, mode = 0, a = 0, b = 0;
  logic s, d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bitserial_bfly dut (.*);

  initial begin
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 500; t++) begin
      logic [15:0] wa, wb, gs, gd, es, ed;
      wa = 16'($urandom);
      wb = 16'($urandom);
      if (t < 4) begin wa = 16'hFFFF; wb = 16'h0001; end
      mode = 1'($urandom_range(1));
      for (int k = 0; k < 16; k++) begin
        lsb = (k == 0);
        a = wa[k];
        b = wb[k];
        #1;
        gs[k] = s;
        gd[k] = d;
        @(negedge clk);
      end
      es = mode ? wa : wa + wb;
      ed = mode ? wb : wa - wb;
      checks += 2;
      if (gs != es) begin failures++; $display("FAIL mode %0d %h,%h: s=%h expected %h", mode, wa, wb, gs, es); end
      if (gd != ed) begin failures++; $display("FAIL mode %0d %h,%h: d=%h expected %h", mode, wa, wb, gd, ed); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
