// dct1d: 8-point 1-D DCT/IDCT by distributed arithmetic, one transform every
// 16 cycles.
//
// Datapath: input registers -> PISO shift registers -> four bit-serial
// butterflies -> even and odd lookup tables -> eight shift-accumulators ->
// output registers -> IDCT butterfly.  Three transforms are in flight: the
// input registers collect the next one's samples (any order, write strobe
// in_we), the PISO/accumulators compute the current one bit by bit (cycle 0
// = LSB .. cycle 15 = sign bit, marked by lsb and msb from the controller),
// and the output registers hold the previous one's eight results, which the
// IDCT butterfly sends out one per seq value.  At each msb the input
// registers move into the PISO registers and the accumulator sums into the
// output registers, so a result leaves 16..32 cycles after the transform's
// last sample was written (48 cycles from the first write of a 16-cycle
// input period).
//
// DCT (mode 0): butterflies form x(n) +/- x(7-n) bit-serially; the even
// tables give y0,y2,y4,y6, the odd ones y1,y3,y5,y7.  IDCT (mode 1):
// butterflies pass y(k); the tables give v0..v7, which the IDCT butterfly
// combines into x0..x7.  The mode is registered with the data at each msb
// (mode_in -> PISO stage -> output stage), so every stage uses the mode of
// the transform it holds; that pipelining is this design's own addition.
module dct1d
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       lsb,
  input  logic       msb,
  input  logic       mode_in,
  input  logic       in_we,
  input  logic [2:0] in_idx,
  input  sample_t    in_data,
  input  logic [2:0] seq,
  input  logic       round_en,
  output sample_t    y,
  output logic [2:0] y_idx,
  output logic       mode_out
);
  sample_t    inreg [8];
  logic [7:0] bits;
  logic [3:0] addr_e, addr_o;
  lut_t       mem_e [4];
  lut_t       mem_o [4];
  acc_t       sums  [8];
  sample_t    oreg  [8];
  sample_t    ev [4];
  sample_t    od [4];
  logic       mode_x, mode_o;

  always_ff @(posedge clk) begin
    if (rst) begin
      mode_x <= 1'b0;
      mode_o <= 1'b0;
    end else if (msb) begin
      mode_x <= mode_in;
      mode_o <= mode_x;
    end
  end
  assign mode_out = mode_o;

  input_regs u_inregs (
    .clk, .rst, .we(in_we), .idx(in_idx), .mode(mode_in), .d(in_data), .q(inreg));

  piso_sr u_piso (.clk, .rst, .load(msb), .d(inreg), .bits(bits));

  for (genvar j = 0; j < 4; j++) begin : g_bfly
    bitserial_bfly u_bfly (
      .clk, .rst, .lsb, .mode(mode_x),
      .a(bits[2*j]), .b(bits[2*j+1]), .s(addr_e[j]), .d(addr_o[j]));
  end

  even_lut u_even (.addr(addr_e), .mode(mode_x), .mem(mem_e));
  odd_lut  u_odd  (.addr(addr_o), .mem(mem_o));

  for (genvar r = 0; r < 4; r++) begin : g_acc
    da_accumulator u_acc_e (.clk, .rst, .lsb, .msb, .mem(mem_e[r]), .sum(sums[r]));
    da_accumulator u_acc_o (.clk, .rst, .lsb, .msb, .mem(mem_o[r]), .sum(sums[4+r]));
  end

  output_regs u_oregs (.clk, .rst, .msb, .sum(sums), .q(oreg));

  always_comb
    for (int r = 0; r < 4; r++) begin
      ev[r] = oreg[r];
      od[r] = oreg[4+r];
    end

  idct_bfly u_ibfly (
    .ev, .od, .seq, .mode(mode_o), .round_en, .y, .idx(y_idx));
endmodule
