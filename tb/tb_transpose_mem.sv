// tb_transpose_mem: writes an 8x8 block row by row (address {row, index})
// in random order, then reads it back column by column as the controller
// does, checking the registered read (data one cycle after re) and that the
// read register holds while re is low.  Writes of the next block overlap the
// reads of the current one at different addresses.
`timescale 1ns/1ps
module tb_transpose_mem;
  import dct_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  sample_t wdata = 0, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  transpose_mem dut (.*);

  initial begin
    int model [64];
    int order [64];
    @(negedge clk);
    for (int blk = 0; blk < 20; blk++) begin
      for (int i = 0; i < 64; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < 64; i++) begin
        we = 1;
        waddr = 6'(order[i]);
        model[order[i]] = int'($urandom_range(65535)) - 32768;
        wdata = sample_t'(model[order[i]]);
        @(negedge clk);
      end
      we = 0;
      for (int col = 0; col < 8; col++)
        for (int row = 0; row < 8; row++) begin
          int e;
          re = 1;
          raddr = {3'(row), 3'(col)};
          e = model[{row[2:0], col[2:0]}];
          // an unrelated write in the same cycle to an already read column
          if (col > 0) begin
            we = 1;
            waddr = {3'(row), 3'(col - 1)};
            wdata = sample_t'($urandom);
          end
          @(negedge clk);
          we = 0;
          re = 0;
          raddr = 6'($urandom);   // must not matter while re is low
          checks++;
          if (int'(rdata) != e) begin
            failures++;
            $display("FAIL row %0d col %0d: %0d expected %0d", row, col, rdata, e);
          end
          @(negedge clk);
          checks++;
          if (int'(rdata) != e) begin
            failures++;
            $display("FAIL read register did not hold at row %0d col %0d", row, col);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
