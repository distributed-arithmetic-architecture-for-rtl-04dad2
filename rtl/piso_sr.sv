// piso_sr: eight 16-bit parallel-in serial-out shift registers.
//
// On load (the MSB cycle) all eight registers copy the input registers.  On
// every other cycle each register shifts right by one, so bit b of every
// sample appears on bits[] during cycle b of the next transform (cycle 0 =
// LSB, cycle 15 = sign bit).  bits[i] is bit 0 of register i, which forms the
// 8-bit bit-serial output of the original design's figure.  Reset clears them.
module piso_sr
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  sample_t    d [8],
  output logic [7:0] bits
);
  sample_t sr [8];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) sr[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 8; i++) sr[i] <= d[i];
    end else begin
      for (int i = 0; i < 8; i++) sr[i] <= sr[i] >>> 1;
    end
  end

  always_comb
    for (int i = 0; i < 8; i++) bits[i] = sr[i][0];
endmodule
