// da_accumulator: shift-accumulate stage of distributed arithmetic.
//
// Each cycle the adder forms SUM = MEMx + ANSz, where ANSz is the stored sum
// shifted right one bit with sign extension (multiplication by 0.5) and MEMx
// is the lookup word.  In the LSB cycle ANSz is forced to zero, which starts
// a new transform.  In the MSB cycle (bit 15, the sign bit of the inputs)
// the word is inverted and the adder's carry-in set, so the word is
// subtracted.  After 16 cycles SUM holds the transform output in the 11.5
// format; the output register (output_regs) takes SUM in that same MSB
// cycle.  RST acts like LSB, and the lookup word is also zero in reset
// because the shift registers are, so the register clears.  The register is
// ACC_W = 18 bits wide, wider than the 16 bits the original design prints, so that
// partial sums cannot wrap.
module da_accumulator
  import dct_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic lsb,
  input  logic msb,
  input  lut_t mem,
  output acc_t sum
);
  acc_t ans, half, ansz, memx;

  always_comb begin
    memx = msb ? ~acc_t'(mem) : acc_t'(mem);
    half = ans >>> 1;                 // arithmetic: ans is signed
    ansz = (lsb || rst) ? '0 : half;
    sum  = memx + ansz + acc_t'(msb);
  end

  always_ff @(posedge clk) ans <= sum;
endmodule
