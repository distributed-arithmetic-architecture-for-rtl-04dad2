// tb_piso_sr: loads eight random words and checks that during the next 16
// cycles bit b of every word appears on bits[] in cycle b, LSB first, and
// that a new load in cycle 15 starts the next word.
`timescale 1ns/1ps
module tb_piso_sr;
  import dct_pkg::*;
  logic clk = 0, rst = 1, load = 0;
  sample_t d [8];
  logic [7:0] bits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  piso_sr dut (.*);

  initial begin
    logic [15:0] cur [8];
    for (int i = 0; i < 8; i++) d[i] = '0;
    @(negedge clk);
    rst = 0;
    // first load
    for (int i = 0; i < 8; i++) begin cur[i] = 16'($urandom); d[i] = sample_t'(cur[i]); end
    load = 1;
    @(negedge clk);
    for (int t = 0; t < 100; t++) begin
      for (int b = 0; b < 16; b++) begin
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (bits[i] != cur[i][b]) begin
            failures++;
            $display("FAIL word %0d register %0d bit %0d: %b", t, i, b, bits[i]);
          end
        end
        load = (b == 15);
        if (b == 15) begin
          logic [15:0] nxt [8];
          for (int i = 0; i < 8; i++) begin nxt[i] = 16'($urandom); d[i] = sample_t'(nxt[i]); end
          @(negedge clk);
          cur = nxt;
        end else begin
          load = 0;
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
