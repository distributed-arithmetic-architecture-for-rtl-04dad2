// input_mux: input multiplexer of the 2-D DCT/IDCT.
//
// Chooses where the next sample for the input registers comes from.  With
// cols_in low (first pass) it takes the external sample, an 11-bit signed
// integer, and places it in the 11.5 internal format by appending FRAC zero
// fraction bits.  With cols_in high (second pass) it takes the 16-bit word
// read from the transpose memory unchanged.  Purely combinational.  The
// selection rule and the format conversion follow the original design; the caller
// sign-extends 8-bit pixels to 11 bits.
module input_mux
  import dct_pkg::*;
(
  input  logic                 cols_in,
  input  logic signed [IW-1:0] ext_in,
  input  sample_t              tm_in,
  output sample_t              y
);
  always_comb begin
    if (cols_in) y = tm_in;
    else         y = {ext_in, {FRAC{1'b0}}};
  end
endmodule
