// tb_input_mux: checks that the input multiplexer passes the transpose
// memory word when cols_in is high and otherwise converts the 11-bit
// external integer to the 11.5 format (value * 32), over random values.
`timescale 1ns/1ps
module tb_input_mux;
  import dct_pkg::*;
  logic cols_in;
  logic signed [IW-1:0] ext_in;
  sample_t tm_in, y;
  int checks = 0, failures = 0;

  input_mux dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int e, expv;
      cols_in = 1'($urandom_range(1));
      e       = int'($urandom_range(2047)) - 1024;
      ext_in  = IW'(e);
      tm_in   = sample_t'($urandom);
      #1;
      expv = cols_in ? int'(tm_in) : e * 32;
      checks++;
      if (int'(y) != expv) begin
        failures++;
        $display("FAIL cols_in=%0d ext=%0d tm=%0d y=%0d", cols_in, e, tm_in, y);
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
