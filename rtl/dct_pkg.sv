// dct_pkg: shared widths, number format and cosine constants of the
// distributed-arithmetic (DA) 8x8 DCT/IDCT.
//
// Every internal sample is a 16-bit two's-complement fixed-point number with
// 11 integer bits (sign included) and 5 fraction bits ("11.5" format).  The
// lookup tables hold sums of the constants C_k = 0.5*cos(k*pi/16) with 15
// fraction bits; the largest sum (4*C4 = 1.414) needs 17 bits signed.  The
// DA accumulator keeps 18 bits so that its partial sums, which can reach
// twice the largest table word, never wrap.  The 11.5 format and the 16-bit
// sample width follow the original design; the table word format is this design's
// own choice.
//
// A module that uses only some of these constants makes verilator report
// the others as unused parameters when that module is linted on its own.
package dct_pkg;

  localparam int DW    = 16;  // sample width (M)
  localparam int FRAC  = 5;   // fraction bits of a sample
  localparam int IW    = DW - FRAC; // integer bits of a sample (11)
  localparam int LUT_W = 17;  // lookup table word width
  localparam int ACC_W = 18;  // accumulator register width

  typedef logic signed [DW-1:0]    sample_t;
  typedef logic signed [LUT_W-1:0] lut_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // C_k = round(0.5 * cos(k*pi/16) * 2^15): 15 fraction bits
  localparam int C1 = 16069;
  localparam int C2 = 15137;
  localparam int C3 = 13623;
  localparam int C4 = 11585;
  localparam int C5 = 9102;
  localparam int C6 = 6270;
  localparam int C7 = 3196;

  typedef int coef_row_t [4];
  typedef coef_row_t coef_mat_t [4];

  // Even outputs of the DCT: y(0), y(2), y(4), y(6) as functions of the
  // butterfly sums x(0)+x(7), x(1)+x(6), x(2)+x(5), x(3)+x(4).
  localparam coef_mat_t EVEN_DCT = '{
    '{ C4,  C4,  C4,  C4},
    '{ C2,  C6, -C6, -C2},
    '{ C4, -C4, -C4,  C4},
    '{ C6, -C2,  C2, -C6}};

  // Even part of the IDCT: v(0)..v(3) as functions of y(0), y(2), y(4), y(6).
  localparam coef_mat_t EVEN_IDCT = '{
    '{ C4,  C2,  C4,  C6},
    '{ C4,  C6, -C4, -C2},
    '{ C4, -C6, -C4,  C2},
    '{ C4, -C2,  C4, -C6}};

  // Odd part, shared: y(1), y(3), y(5), y(7) from the butterfly differences
  // (DCT) and v(4)..v(7) from y(1), y(3), y(5), y(7) (IDCT).
  localparam coef_mat_t ODD = '{
    '{ C1,  C3,  C5,  C7},
    '{ C3, -C7, -C1, -C5},
    '{ C5, -C1,  C7,  C3},
    '{ C7, -C5,  C3, -C1}};

  // Sum of the row's constants selected by the 4 address bits.
  function automatic lut_t da_word(coef_row_t row, logic [3:0] addr);
    int s;
    s = 0;
    for (int j = 0; j < 4; j++)
      if (addr[j]) s += row[j];
    return lut_t'(s);
  endfunction

  // Bundle of control signals the controller hands to the datapath.
  typedef struct packed {
    logic       lsb;        // first cycle of a 1-D transform
    logic       msb;        // last cycle of a 1-D transform
    logic       mode_in;    // mode of the block feeding the input registers
    logic       tm_re;      // read the transpose memory
    logic [5:0] tm_raddr;
    logic       tm_we;      // write a first-pass result to the transpose memory
    logic [2:0] tm_wrow;    // row being written
    logic [2:0] seq;        // output sequence number (held 2 cycles)
    logic       strobe;     // second cycle of a result: take it
    logic       int_we;     // write transpose data into the input registers
    logic [2:0] int_idx;
    logic       out_en;     // second-pass result is valid
    logic [2:0] out_col;    // column being output
  } ctl_t;

endpackage
