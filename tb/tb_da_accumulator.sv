// tb_da_accumulator: feeds back-to-back sequences of 16 random table words
// (word b belongs to bit b, LSB first; lsb marks b = 0, msb marks b = 15)
// and checks the sum presented in the msb cycle.  Expected value:
//   floor( sum_{b<15} m_b * 2^b / 2^15 ) - m_15
// computed with 64-bit integers, and it must lie within one LSB of the exact
// real value sum_{b<15} m_b 2^(b-15) - m_15.  Also checks that reset in the
// middle of a word clears the running sum.
`timescale 1ns/1ps
module tb_da_accumulator;
  import dct_pkg::*;
  logic clk = 0, rst = 1, lsb = 0, msb = 0;
  lut_t mem = '0;
  acc_t sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  da_accumulator dut (.*);

  task automatic run_word(input int m [16]);
    longint total;
    longint e;
    real    exact;
    total = 0;
    exact = 0.0;
    for (int b = 0; b < 15; b++) begin
      total += longint'(m[b]) <<< b;
      exact += m[b] * (2.0 ** (b - 15));
    end
    e = (total >>> 15) - m[15];
    exact -= m[15];
    for (int b = 0; b < 16; b++) begin
      lsb = (b == 0);
      msb = (b == 15);
      mem = lut_t'(m[b]);
      #1;
      if (b == 15) begin
        checks += 2;
        if (longint'(sum) != e) begin
          failures++;
          $display("FAIL sum %0d expected %0d", sum, e);
        end
        if (real'(sum) > exact + 1e-9 || real'(sum) < exact - 1.0) begin
          failures++;
          $display("FAIL sum %0d not within one LSB below %f", sum, exact);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int m [16];
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      for (int b = 0; b < 16; b++) begin
        case (t % 4)
          0: m[b] = int'($urandom_range(131070)) - 65535;   // full width
          1: m[b] = int'($urandom_range(84180)) - 42090;    // table range
          2: m[b] = (b == 15) ? -65535 : 65535;             // extremes
          default: m[b] = int'($urandom_range(200)) - 100;  // small
        endcase
      end
      run_word(m);
    end
    // reset while a word is half accumulated: the next word must not see it
    for (int b = 0; b < 8; b++) begin
      lsb = (b == 0); msb = 0; mem = lut_t'(40000);
      @(negedge clk);
    end
    rst = 1;
    lsb = 0; mem = '0;
    #1;
    checks++;
    if (sum != 0) begin failures++; $display("FAIL sum %0d during reset with zero input", sum); end
    @(negedge clk);
    rst = 0;
    for (int b = 0; b < 16; b++) m[b] = int'($urandom_range(2000)) - 1000;
    run_word(m);
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
