// odd_lut: the odd lookup memory, shared by the DCT and the IDCT.
//
// The matrix that maps the butterfly differences to y1, y3, y5, y7 in the
// DCT is the same one that maps y1, y3, y5, y7 to v4..v7 in the IDCT, so
// four tables serve both modes (the original design's removal of four tables).
// Word a of table r is the sum of the row-r constants whose address bit is
// set.  Combinational; 15 fraction bits.
module odd_lut
  import dct_pkg::*;
(
  input  logic [3:0] addr,
  output lut_t       mem [4]
);
  always_comb
    for (int r = 0; r < 4; r++)
      mem[r] = da_word(ODD[r], addr);
endmodule
