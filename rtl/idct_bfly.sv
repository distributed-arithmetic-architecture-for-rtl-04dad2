// idct_bfly: IDCT butterfly, output multiplexer and rounding.
//
// The eight results held in the output registers leave one at a time,
// selected by seq (0..7).  ADDER1 adds the 5:1 multiplexer's word to a
// second operand from the 4:1 multiplexer, which is forced to zero for the
// DCT and inverted with carry-in (SUBTRACT) for the second half of the IDCT:
//   DCT : seq s gives y(s) unchanged.
//   IDCT: seq 0..3 gives x(s) = v(s) + v(s+4); seq 4..7 gives
//         x(11-s) = v(s-4) - v(s); so the order is x0 x1 x2 x3 x7 x6 x5 x4.
// In the second pass (round_en) ADDER2 adds 0.5 to a non-negative value or
// 0.5 - 2^-5 to a negative one and the fraction bits are cleared: rounding
// to the nearest integer, halves away from zero.  idx tells which sample
// the output is.  Combinational.  The low five bits of ADDER2 are replaced
// by zeros, which verilator reports as unused bits.  Sequence and constants follow the
// original design's figures.
module idct_bfly
  import dct_pkg::*;
(
  input  sample_t    ev [4],   // y0 y2 y4 y6  / v0 v1 v2 v3
  input  sample_t    od [4],   // y1 y3 y5 y7  / v4 v5 v6 v7
  input  logic [2:0] seq,
  input  logic       mode,     // 0 DCT, 1 IDCT
  input  logic       round_en,
  output sample_t    y,
  output logic [2:0] idx
);
  sample_t mux5, mux4, opb, add1, rnd, add2;
  logic    subtract;

  always_comb begin
    subtract = mode & seq[2];
    // 4:1 multiplexer
    mux4 = mode ? od[seq[1:0]] : od[seq[2:1]];
    // 5:1 multiplexer: input 4 is the 4:1 multiplexer (odd DCT outputs)
    if (!mode && seq[0]) mux5 = mux4;
    else if (mode)       mux5 = ev[seq[1:0]];
    else                 mux5 = ev[seq[2:1]];
    // second operand of ADDER1
    opb  = mode ? (subtract ? ~mux4 : mux4) : '0;
    add1 = mux5 + opb + sample_t'(subtract);
    // rounding
    rnd  = add1[DW-1] ? sample_t'((1 << (FRAC-1)) - 1) : sample_t'(1 << (FRAC-1));
    add2 = add1 + rnd;
    y    = round_en ? {add2[DW-1:FRAC], {FRAC{1'b0}}} : add1;
    // sample index of this output
    if (mode && seq[2]) idx = 3'd7 - {1'b0, seq[1:0]};
    else                idx = seq;
  end
endmodule
