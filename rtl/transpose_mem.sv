// transpose_mem: 64-word transpose memory (logically 8x8).
//
// First-pass results are written at row*8 + column; second-pass inputs are
// read back at row*8 + column with the controller stepping the row fastest,
// which reads the stored matrix column by column.  One write port and one
// read port; the read data is registered and appears the cycle after re.
// Written as an array so synthesis can map it to a memory.
module transpose_mem
  import dct_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  sample_t                  wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output sample_t                  rdata
);
  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
