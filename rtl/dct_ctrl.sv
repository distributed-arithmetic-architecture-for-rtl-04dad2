// dct_ctrl: controller of the 2-D DCT/IDCT.
//
// A 4-bit cycle counter marks the 16 cycles of a 1-D transform (lsb in
// cycle 0, msb in cycle 15) and a slot counter runs 0..16, so one 8x8 block
// takes 17 x 16 = 272 cycles:
//   slots 0..7   input registers take rows R0..R7 from the external input
//   slot  8      stall: the last row has not been transformed yet
//   slots 9..16  input registers take columns C0..C7 from the transpose
//                memory (cols_in high)
// cols_xform and cols_out are cols_in delayed by one and two slots: the
// PISO registers and then the output registers hold second-pass data.
// Valid flags and the row/column number travel with the same one- and
// two-slot delays, so the output stage knows whether to write the
// transpose memory (first pass, rows 0..7) or drive the output (second
// pass, columns 0..7).  Blocks follow each other without a gap: the first
// rows of block k+1 enter while block k's last columns are computed.
// Transpose reads are issued in cycles 6..13 of a column slot (rows 0..7)
// and the data enters the input registers in cycles 7..14.  Results leave
// the IDCT butterfly two cycles each (seq = cycle/2) and are taken in the
// second cycle (strobe).  MODE is sampled at the start of each block.
module dct_ctrl
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       mode,
  output ctl_t       ctl,
  output logic       cols_in,
  output logic       cols_xform,
  output logic       cols_out,
  output logic       stall,
  output logic       in_ready,
  output logic       row_start,
  output logic [2:0] row_num
);
  localparam int SLOTS = 17;

  logic [3:0] cyc;
  logic [4:0] slot;
  logic       mode_blk;
  logic       in_valid, x_valid, o_valid;
  logic [2:0] in_index, x_index, o_index;
  logic       rd_q;
  logic [2:0] rd_row_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc  <= '0;
      slot <= '0;
    end else begin
      cyc <= cyc + 4'd1;
      if (cyc == 4'd15) slot <= (slot == 5'(SLOTS-1)) ? '0 : slot + 5'd1;
    end
  end

  // what the input registers are collecting in this slot
  always_comb begin
    cols_in  = (slot >= 5'd9);
    stall    = (slot == 5'd8);
    in_valid = !stall;
    in_index = cols_in ? 3'(slot - 5'd9) : slot[2:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mode_blk   <= mode;
      x_valid    <= 1'b0;
      o_valid    <= 1'b0;
      cols_xform <= 1'b0;
      cols_out   <= 1'b0;
      x_index    <= '0;
      o_index    <= '0;
    end else if (cyc == 4'd15) begin
      if (slot == 5'(SLOTS-1)) mode_blk <= mode;
      x_valid    <= in_valid;
      cols_xform <= cols_in;
      x_index    <= in_index;
      o_valid    <= x_valid;
      cols_out   <= cols_xform;
      o_index    <= x_index;
    end
  end

  // transpose memory read, one cycle ahead of the input register write
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q     <= 1'b0;
      rd_row_q <= '0;
    end else begin
      rd_q     <= ctl.tm_re;
      rd_row_q <= 3'(cyc - 4'd6);
    end
  end

  always_comb begin
    ctl          = '0;
    ctl.lsb      = (cyc == 4'd0);
    ctl.msb      = (cyc == 4'd15);
    ctl.mode_in  = mode_blk;
    ctl.tm_re    = cols_in && (cyc >= 4'd6) && (cyc <= 4'd13);
    ctl.tm_raddr = {3'(cyc - 4'd6), in_index};
    ctl.int_we   = rd_q;
    ctl.int_idx  = rd_row_q;
    ctl.seq      = cyc[3:1];
    ctl.strobe   = cyc[0];
    ctl.tm_we    = o_valid && !cols_out && cyc[0];
    ctl.tm_wrow  = o_index;
    ctl.out_en   = o_valid && cols_out;
    ctl.out_col  = o_index;
    in_ready     = !cols_in && !stall && (cyc != 4'd15);
    row_start    = !cols_in && !stall && (cyc == 4'd0);
    row_num      = slot[2:0];
  end

  // a block lasts 17 slots; the slot counter never leaves 0..16
  assert property (@(posedge clk) disable iff (rst) slot < 5'(SLOTS));
endmodule
