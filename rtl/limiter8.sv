// limiter8: 8-bit limiter on the second pass of the IDCT.
//
// When enabled (IDCT, second pass) it checks whether the integer part of
// the rounded result fits in 8 signed bits, i.e. whether integer bits 9..7
// all equal the sign bit (integer bit 10).  If not, the output is forced to
// +127 or -128 according to the sign.  When disabled the value passes.
// Combinational.  The original design describes comparing only bit 10 with bit 7;
// this design checks bits 9..7 too so that every overflow is caught.
module limiter8
  import dct_pkg::*;
(
  input  logic    en,
  input  sample_t d,
  output sample_t q
);
  logic [IW-1:0] ip;   // integer part
  logic          ovf;

  always_comb begin
    ip  = d[DW-1:FRAC];
    ovf = (ip[IW-1:7] != {(IW-7){ip[IW-1]}});
    if (en && ovf)
      q = ip[IW-1] ? sample_t'(-(128 << FRAC)) : sample_t'(127 << FRAC);
    else
      q = d;
  end
endmodule
