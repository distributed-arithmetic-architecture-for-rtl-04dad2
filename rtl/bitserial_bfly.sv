// bitserial_bfly: one bit-serial DCT butterfly.
//
// A and B arrive one bit per cycle, LSB first.  A one-bit full adder forms
// A+B and a second one forms A-B as A + ~B + 1; each keeps its carry in a
// flip-flop for the next bit.  In the LSB cycle the adder's carry-in is
// forced to 0 and the subtractor's to 1, which starts a new word.  In DCT
// mode (mode = 0) the outputs are the sum (s) and difference (d) bits; in
// IDCT mode A and B pass through unchanged.  Words wrap at 16 bits.  The
// structure is the original design's; reset clearing the carry flops is this
// design's choice.
module bitserial_bfly (
  input  logic clk,
  input  logic rst,
  input  logic lsb,
  input  logic mode,
  input  logic a,
  input  logic b,
  output logic s,
  output logic d
);
  logic c_q, bw_q;       // stored carry of the adder and of the subtractor
  logic c_in, bw_in;
  logic sum, c_out, dif, bw_out;

  always_comb begin
    c_in   = lsb ? 1'b0 : c_q;
    bw_in  = lsb ? 1'b1 : bw_q;
    sum    = a ^ b ^ c_in;
    c_out  = (a & b) | (a & c_in) | (b & c_in);
    dif    = a ^ ~b ^ bw_in;
    bw_out = (a & ~b) | (a & bw_in) | (~b & bw_in);
    s      = mode ? a : sum;
    d      = mode ? b : dif;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c_q  <= 1'b0;
      bw_q <= 1'b1;
    end else begin
      c_q  <= c_out;
      bw_q <= bw_out;
    end
  end
endmodule
