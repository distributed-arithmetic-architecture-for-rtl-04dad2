// input_regs: the eight input registers in front of the PISO shift registers.
//
// Samples of the next 1-D transform are written one at a time, in any order,
// while the current transform runs; at the transform's last cycle the PISO
// registers copy all eight.  The registers are kept in the order the shift
// registers need: for the DCT the butterfly pairs x0,x7, x1,x6, x2,x5, x3,x4;
// for the IDCT simply y0..y7.  The write decoder (WR0..WR7) maps the sample
// index to that position using the mode of the transform being collected.
// A write takes effect at the clock edge; reset clears all registers.
module input_regs
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       we,
  input  logic [2:0] idx,
  input  logic       mode,     // 0 DCT, 1 IDCT
  input  sample_t    d,
  output sample_t    q [8]
);
  logic [2:0] pos;

  // DCT: x(n) for n < 4 goes to 2n, x(7-m) for m < 4 goes to 2m+1.
  always_comb begin
    if (mode)          pos = idx;
    else if (!idx[2])  pos = {idx[1:0], 1'b0};
    else               pos = {~idx[1:0], 1'b1};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) q[i] <= '0;
    end else if (we) begin
      q[pos] <= d;
    end
  end
endmodule
