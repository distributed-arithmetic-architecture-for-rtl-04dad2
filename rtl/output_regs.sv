// output_regs: the eight output registers behind the accumulators.
//
// In the MSB cycle (the last of a 1-D transform) each register takes the
// low DW bits of its accumulator's SUM, the finished result in the 11.5
// format, and holds it for the 16 cycles in which the IDCT butterfly sends
// the results out one by one.  The enable is MSB or RST; in reset the
// registers load zero.
module output_regs
  import dct_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    msb,
  input  acc_t    sum [8],
  output sample_t q   [8]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) q[i] <= '0;
    end else if (msb) begin
      for (int i = 0; i < 8; i++) q[i] <= sample_t'(sum[i]);
    end
  end
endmodule
