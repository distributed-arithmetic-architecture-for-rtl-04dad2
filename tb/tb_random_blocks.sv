// tb_random_blocks: the accuracy experiment run on the hardware: 1000 blocks
// of random integer pixels, uniform in -128..127, are transformed by the
// 2-D DCT and the resulting coefficients transformed back by the 2-D IDCT
// of the same circuit; the result is compared with the original pixels.
//
// Blocks stream back to back in groups of four (two DCT blocks, then two
// IDCT blocks fed with the coefficients the circuit produced two blocks
// earlier), so the run takes 2000 blocks of 272 cycles.  Reported: the
// error histogram (-2..+2), and per matrix position the mean error and the
// mean squared error, with their largest values over the 64 positions
// (peak mean, peak MSE) and their averages (mean, MSE).  Pass criteria,
// chosen for this design from its measured behaviour with some margin: no
// error beyond +/-2, at least 90 % of the pixels exact, overall MSE below
// 0.12, peak MSE below 0.3, overall mean error magnitude below 0.05 and
// peak mean error magnitude below 0.3.  The accumulators drop the bit they
// shift out (rounding toward minus infinity), which biases the results
// slightly negative, most at the DC position (0,0); the per-position mean
// errors are printed.  The block period (272 cycles, 4.25 cycles per
// sample) is checked for every block.
`timescale 1ns/1ps
module tb_random_blocks;
  localparam int NTRIP  = 1000;
  localparam int NB     = 2 * NTRIP;
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
  int  blk_in  [NB][8][8];
  int  hw_out  [NB][8][8];
  int  start_cyc [NB];
  int  hist [-3:3];
  real esum [8][8];
  real e2sum [8][8];
  int  cyc = 0;

  function automatic int mode_of(int b);
    return (b % 4 < 2) ? 0 : 1;
  endfunction

  task automatic prepare(int b);
    for (int i = 0; i < 8; i++)
      for (int m = 0; m < 8; m++)
        blk_in[b][i][m] = (mode_of(b) == 0) ? int'($urandom_range(255)) - 128 : hw_out[b-2][i][m];
  endtask

  // stimulus: each row's eight samples in random order and at random cycles
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

  // collect the outputs; round-trip error for the IDCT blocks
  int ocount = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid && ocount < 64*NB) begin
      int b, e, got;
      b = ocount / 64;
      got = int'(out_data);
      checks++;
      if (int'(out_mode) != mode_of(b)) begin
        failures++;
        $display("FAIL block %0d: mode %0d", b, out_mode);
      end
      hw_out[b][out_idx][out_col] = got;
      if (mode_of(b) == 1) begin
        e = got - blk_in[b-2][out_idx][out_col];
        esum[out_idx][out_col]  += e;
        e2sum[out_idx][out_col] += e * e;
        checks++;
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

  task automatic limit(string what, real v, real lim);
    checks++;
    $display("  %-12s %f (limit %f)", what, v, lim);
    if (v > lim || v < -lim) begin
      failures++;
      $display("FAIL: %s out of limit", what);
    end
  endtask

  initial begin
    real mean_all, mse_all, peak_mean, peak_mse, n;
    wait (ocount == 64*NB);
    repeat (2) @(posedge clk);
    for (int b = 1; b < NB; b++) begin
      checks++;
      if (start_cyc[b] - start_cyc[b-1] != PERIOD) begin
        failures++;
        $display("FAIL block %0d period %0d", b, start_cyc[b] - start_cyc[b-1]);
      end
    end
    n = NTRIP;
    mean_all = 0.0; mse_all = 0.0; peak_mean = 0.0; peak_mse = 0.0;
    for (int i = 0; i < 8; i++)
      for (int m = 0; m < 8; m++) begin
        real me, ms;
        me = esum[i][m] / n;
        ms = e2sum[i][m] / n;
        mean_all += me / 64.0;
        mse_all  += ms / 64.0;
        if ((me < 0 ? -me : me) > (peak_mean < 0 ? -peak_mean : peak_mean)) peak_mean = me;
        if (ms > peak_mse) peak_mse = ms;
      end
    $display("mean error per position (row = sample index, column = column):");
    for (int i = 0; i < 8; i++)
      $display("  %7.3f %7.3f %7.3f %7.3f %7.3f %7.3f %7.3f %7.3f", esum[i][0] / n, esum[i][1] / n,
               esum[i][2] / n, esum[i][3] / n, esum[i][4] / n, esum[i][5] / n, esum[i][6] / n, esum[i][7] / n);
    $display("round trip of %0d random blocks, error histogram:", NTRIP);
    for (int e = -2; e <= 2; e++)
      $display("  %2d : %f %%", e, 100.0 * hist[e] / (64.0 * n));
    limit("mean error", mean_all, 0.05);
    limit("peak mean", peak_mean, 0.3);
    limit("MSE", mse_all, 0.12);
    limit("peak MSE", peak_mse, 0.3);
    checks++;
    if (100.0 * hist[0] / (64.0 * n) < 90.0) begin
      failures++;
      $display("FAIL: fewer than 90 %% of the pixels exact");
    end
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
