// dct2d_top: 8x8 2-D DCT/IDCT built from one distributed-arithmetic 1-D
// DCT/IDCT used twice, with a transpose memory between the passes.
//
// A block of 64 samples enters row by row: while in_ready is high the
// caller writes the eight samples of row row_num (in_we, in_idx, in_data;
// 11-bit signed integers, pixels sign-extended) in any order; row_start
// marks the first cycle of each row period.  The input multiplexer feeds
// these rows, then (cols_in) the columns read from the transpose memory,
// into the 1-D core.  First-pass results are written to the transpose
// memory in row order; second-pass results are rounded, limited to 8 bits
// for the IDCT and leave on out_data, one every two cycles, column by
// column (out_col, out_idx name the element).  For the DCT, out_col = j
// and out_idx = k give Y(k,j) of Y = G X G^T; for the IDCT they give
// X(n,j) of X = G^T Y G.  A block takes 272 cycles (17 slots of 16) and
// blocks follow back to back; MODE (0 DCT, 1 IDCT) is sampled per block.
// The first result of a block appears 178 cycles after its first row
// period begins.  Outputs are registered.
//
// Lint notes: the controller's cols_xform and stall outputs are not needed
// here (they serve its own schedule and its testbench), and the limiter's
// five fraction bits are dropped because the second-pass results are
// rounded integers; verilator reports these as unused signals.
module dct2d_top
  import dct_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 mode,
  output logic                 in_ready,
  output logic                 row_start,
  output logic [2:0]           row_num,
  input  logic                 in_we,
  input  logic [2:0]           in_idx,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [IW-1:0] out_data,
  output logic [2:0]           out_col,
  output logic [2:0]           out_idx,
  output logic                 out_mode
);
  ctl_t       ctl;
  logic       cols_in, cols_xform, cols_out, stall;
  sample_t    tm_rdata, mux_y, y1d, ylim;
  logic [2:0] y_idx;
  logic       mode_o;
  logic       we_1d;
  logic [2:0] idx_1d;

  dct_ctrl u_ctrl (
    .clk, .rst, .mode, .ctl, .cols_in, .cols_xform, .cols_out, .stall,
    .in_ready, .row_start, .row_num);

  input_mux u_inmux (.cols_in, .ext_in(in_data), .tm_in(tm_rdata), .y(mux_y));

  always_comb begin
    we_1d  = cols_in ? ctl.int_we  : (in_we && in_ready);
    idx_1d = cols_in ? ctl.int_idx : in_idx;
  end

  dct1d u_1d (
    .clk, .rst, .lsb(ctl.lsb), .msb(ctl.msb), .mode_in(ctl.mode_in),
    .in_we(we_1d), .in_idx(idx_1d), .in_data(mux_y),
    .seq(ctl.seq), .round_en(cols_out), .y(y1d), .y_idx, .mode_out(mode_o));

  transpose_mem u_tmem (
    .clk, .we(ctl.tm_we), .waddr({ctl.tm_wrow, y_idx}), .wdata(y1d),
    .re(ctl.tm_re), .raddr(ctl.tm_raddr), .rdata(tm_rdata));

  limiter8 u_lim (.en(mode_o && cols_out), .d(y1d), .q(ylim));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_col   <= '0;
      out_idx   <= '0;
      out_mode  <= 1'b0;
    end else begin
      out_valid <= ctl.out_en && ctl.strobe;
      out_data  <= ylim[DW-1:FRAC];
      out_col   <= ctl.out_col;
      out_idx   <= y_idx;
      out_mode  <= mode_o;
    end
  end
endmodule
