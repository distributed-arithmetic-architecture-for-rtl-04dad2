// even_lut: the even lookup memory, built from logic instead of ROM.
//
// Eight 16-word tables: four for the DCT (y0, y2, y4, y6 from the butterfly
// sums) and four for the IDCT (v0..v3 from y0, y2, y4, y6).  Word a of table
// r is the sum of the constants of row r whose address bit is set; MODE
// picks the DCT or IDCT set.  Each table is a constant function of its 4
// address bits, so synthesis reduces it to gates.  Combinational; the words
// have 15 fraction bits (see dct_pkg).
module even_lut
  import dct_pkg::*;
(
  input  logic [3:0] addr,
  input  logic       mode,  // 0 DCT, 1 IDCT
  output lut_t       mem [4]
);
  always_comb
    for (int r = 0; r < 4; r++)
      mem[r] = mode ? da_word(EVEN_IDCT[r], addr) : da_word(EVEN_DCT[r], addr);
endmodule
