// tb_dct2d_top: end-to-end test of the 2-D DCT/IDCT at its default sizes.
//
// Streams NB blocks back to back.  Groups of four blocks run the accuracy
// experiment of compress-then-decompress: two DCT blocks of random pixels in
// -128..127, then two IDCT blocks fed with the hardware's own DCT
// coefficients.  Every output is compared with a floating-point 2-D
// transform computed here (G(k,n) = 0.5*cos((2n+1)k*pi/16), G(0,n) =
// sqrt(1/8)), rounded half away from zero and clamped to -128..127 for the
// IDCT, allowing +/-1.  The round-trip error against the original pixels is
// collected as a histogram and must stay within +/-2.  Extreme blocks at the
// end drive the DCT to its largest coefficients and the IDCT into positive
// and negative saturation.  The test also checks the 272-cycle block period
// and the 178-cycle latency from a block's first row period to its first
// result, and counts the stall slot, mode switches, overlap of one block's
// second pass with the next block's first pass, rounding of positive and
// negative values and limiter saturation; each must occur.
`timescale 1ns/1ps
module tb_dct2d_top;
  localparam int NPAIR  = 60;            // groups of 2 DCT + 2 IDCT blocks
  localparam int NEXTRA = 5;             // extreme blocks
  localparam int NB     = 4*NPAIR + NEXTRA;
  localparam int LAT    = 178;
  localparam int PERIOD = 272;

  logic clk = 0, rst = 1, mode = 0;
  logic in_ready, row_start, in_we;
  logic [2:0] row_num, in_idx;
  logic signed [10:0] in_data;
  logic out_valid, out_mode;
  logic signed [10:0] out_data;
  logic [2:0] out_col, out_idx;

  always #5 clk = ~clk;

  dct2d_top dut (.*);

  int  checks = 0, failures = 0;
  int  blk_in   [NB][8][8];
  int  blk_mode [NB];
  int  hw_out   [NB][8][8];
  real ref_out  [NB][8][8];
  int  start_cyc [NB];
  int  first_out [NB];
  int  hist [-3:3];
  int  cyc = 0;

  // mechanism counters
  int n_stall = 0, n_switch = 0, n_overlap = 0, n_rpos = 0, n_rneg = 0;
  int n_satp = 0, n_satn = 0, n_dct = 0, n_idct = 0, n_tmw = 0, n_tmr = 0;

  function automatic real g(int k, int n);
    if (k == 0) return $sqrt(1.0/8.0);
    return 0.5 * $cos((2*n+1) * k * 3.14159265358979323846 / 16.0);
  endfunction

  function automatic int rnd_away(real v);
    if (v >= 0) return int'($floor(v + 0.5));
    return -int'($floor(-v + 0.5));
  endfunction

  task automatic make_ref(int b);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        real s = 0.0;
        for (int i = 0; i < 8; i++)
          for (int m = 0; m < 8; m++)
            if (blk_mode[b] == 0) s += g(r, i) * g(c, m) * blk_in[b][i][m];
            else                  s += g(i, r) * g(m, c) * blk_in[b][i][m];
        ref_out[b][r][c] = s;
      end
  endtask

  function automatic int mode_of(int b);
    if (b < 4*NPAIR) return (b % 4 < 2) ? 0 : 1;
    return (b - 4*NPAIR >= 3) ? 1 : 0;
  endfunction

  // fill block b (called when its first row period begins)
  task automatic prepare(int b);
    int grp = b / 4, k = b % 4;
    if (b < 4*NPAIR) begin
      if (k < 2) begin
        blk_mode[b] = 0;
        for (int i = 0; i < 8; i++)
          for (int m = 0; m < 8; m++) blk_in[b][i][m] = int'($urandom_range(255)) - 128;
      end else begin
        blk_mode[b] = 1;
        for (int i = 0; i < 8; i++)
          for (int m = 0; m < 8; m++) blk_in[b][i][m] = hw_out[b-2][i][m];
      end
    end else begin
      int e = b - 4*NPAIR;
      for (int i = 0; i < 8; i++)
        for (int m = 0; m < 8; m++) begin
          case (e)
            0: blk_in[b][i][m] = 127;                               // largest DC
            1: blk_in[b][i][m] = -128;                              // most negative DC
            2: blk_in[b][i][m] = ((i + m) % 2 == 0) ? 127 : -128;   // checkerboard
            3: blk_in[b][i][m] = (i == 0 && m == 0) ? 1016 : (i == 0 && m == 1) ? 300 : 0;
            default: blk_in[b][i][m] = (i == 0 && m == 0) ? -1024 : (i == 1 && m == 0) ? -300 : 0;
          endcase
        end
    end
    blk_mode[b] = mode_of(b);
    make_ref(b);
  endtask

  // stimulus
  int cur_blk = -1, cur_row = 0, written = 0, slotc = 0;
  int perm [8];
  initial begin
    in_we = 0; in_idx = 0; in_data = 0;
    prepare(0);
    mode = 1'(mode_of(0));
    repeat (3) @(negedge clk);
    rst = 0;
    forever begin
      in_we = 0;
      if (row_start) begin
        if (row_num == 0) begin
          cur_blk++;
          if (cur_blk < NB) begin
            start_cyc[cur_blk] = cyc;
            if (cur_blk > 0) prepare(cur_blk);
          end
          // MODE of the next block is sampled at the end of this one
          if (cur_blk + 1 < NB) mode = 1'(mode_of(cur_blk + 1));
        end
        cur_row = int'(row_num);
        written = 0;
        slotc = 0;
        for (int i = 0; i < 8; i++) perm[i] = i;
        perm.shuffle();
      end
      if (in_ready && cur_blk >= 0 && cur_blk < NB && written < 8) begin
        if ((8 - written) >= (15 - slotc) || ($urandom_range(1) == 1)) begin
          in_we   = 1;
          in_idx  = 3'(perm[written]);
          in_data = 11'(blk_in[cur_blk][cur_row][perm[written]]);
          written++;
        end
      end
      if (in_ready) slotc++;
      @(negedge clk);
    end
  end

  // output checking
  int ocount = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid && ocount < 64*NB) begin
      int b, e, exp_v, got;
      b = ocount / 64;
      got = int'(out_data);
      if (ocount % 64 == 0) first_out[b] = cyc;
      checks++;
      if (out_mode != blk_mode[b][0] || out_col != 3'((ocount % 64) / 8)) begin
        failures++;
        $display("FAIL block %0d output %0d: mode %0d col %0d", b, ocount % 64, out_mode, out_col);
      end
      exp_v = rnd_away(ref_out[b][out_idx][out_col]);
      if (blk_mode[b] == 1) begin
        if (exp_v > 127) exp_v = 127;
        if (exp_v < -128) exp_v = -128;
      end
      if (got - exp_v > 1 || exp_v - got > 1) begin
        failures++;
        $display("FAIL block %0d mode %0d (%0d,%0d): got %0d expected %0d (%f)",
                 b, blk_mode[b], out_idx, out_col, got, exp_v, ref_out[b][out_idx][out_col]);
      end
      hw_out[b][out_idx][out_col] = got;
      if (blk_mode[b] == 1 && b < 4*NPAIR) begin
        e = got - blk_in[b-2][out_idx][out_col];
        if (e < -2 || e > 2) begin
          failures++;
          $display("FAIL round trip block %0d: error %0d", b, e);
          e = (e < 0) ? -3 : 3;
        end
        hist[e]++;
      end
      ocount <= ocount + 1;
    end
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (dut.u_ctrl.stall && dut.ctl.lsb) n_stall++;
    if (dut.ctl.msb && dut.u_ctrl.slot == 5'd16 && dut.u_ctrl.mode_blk != mode) n_switch++;
    if (dut.u_ctrl.cols_out && dut.in_we && dut.in_ready) n_overlap++;
    if (dut.ctl.out_en && dut.ctl.strobe) begin
      if (dut.u_1d.u_ibfly.add1[4:0] != 0) begin
        if (dut.u_1d.u_ibfly.add1[15]) n_rneg++; else n_rpos++;
      end
      if (dut.u_lim.en && dut.u_lim.q != dut.u_lim.d) begin
        if (dut.u_lim.d[15]) n_satn++; else n_satp++;
      end
      if (dut.mode_o) n_idct++; else n_dct++;
    end
    if (dut.ctl.tm_we) n_tmw++;
    if (dut.ctl.tm_re) n_tmr++;
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    wait (ocount == 64*NB);
    repeat (2) @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (first_out[b] - start_cyc[b] != LAT) begin
        failures++;
        $display("FAIL block %0d latency %0d", b, first_out[b] - start_cyc[b]);
      end
      if (b > 0) begin
        checks++;
        if (start_cyc[b] - start_cyc[b-1] != PERIOD) begin
          failures++;
          $display("FAIL block %0d period %0d", b, start_cyc[b] - start_cyc[b-1]);
        end
      end
    end
    $display("round-trip error histogram over %0d pixels:", 2*NPAIR*64);
    for (int e = -2; e <= 2; e++)
      $display("  %2d : %0d (%f %%)", e, hist[e], 100.0 * hist[e] / (2*NPAIR*64));
    $display("mechanisms:");
    need("stall slots", n_stall);
    need("mode switches", n_switch);
    need("pass-2/pass-1 overlap writes", n_overlap);
    need("DCT outputs", n_dct);
    need("IDCT outputs", n_idct);
    need("rounding of positive values", n_rpos);
    need("rounding of negative values", n_rneg);
    need("limiter positive saturation", n_satp);
    need("limiter negative saturation", n_satn);
    need("transpose memory writes", n_tmw);
    need("transpose memory reads", n_tmr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 4) * PERIOD + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d outputs seen", ocount, 64*NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
