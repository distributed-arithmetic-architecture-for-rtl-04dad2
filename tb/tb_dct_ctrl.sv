// tb_dct_ctrl: compares every control output, every cycle, for ten blocks
// against a model written directly from the schedule: a block is 17 slots
// of 16 cycles (272 cycles); slots 0-7 take rows from outside, slot 8 is the
// stall, slots 9-16 take columns from the transpose memory.  The 1-D core
// transforms a slot's data one slot later and drives it out two slots later.
// Also checks that the mode is sampled only at block boundaries, that
// row 0 starts every 272 cycles, and that a reset in the middle of a block
// restarts the schedule from its first slot.
`timescale 1ns/1ps
module tb_dct_ctrl;
  import dct_pkg::*;
  logic clk = 0, rst = 1, mode = 0;
  ctl_t ctl;
  logic cols_in, cols_xform, cols_out, stall, in_ready, row_start;
  logic [2:0] row_num;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dct_ctrl dut (.*);

  task automatic chk(input string what, input int got, input int exp, input int t);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s=%0d expected %0d", t, what, got, exp);
    end
  endtask

  // slot number of period p (p counted from reset), -1 before the start
  function automatic int slot_of(int p);
    return (p < 0) ? -1 : p % 17;
  endfunction
  function automatic int idx_of(int s);
    return (s >= 9) ? s - 9 : s;
  endfunction

  initial begin
    int mb, last_start, prev_mode;
    // phase 0 stops 100 cycles into a block and resets; phase 1 must then
    // start again from slot 0, cycle 0
    for (int ph = 0; ph < 2; ph++) begin
      rst = 1;
      mode = 1'(ph == 0);
      repeat (3) @(negedge clk);
      mb = int'(mode);    // sampled during reset
      rst = 0;
      last_start = -1;
      for (int t = 0; t < ((ph == 0) ? 272 * 6 + 100 : 272 * 5); t++) begin
        int c, p, s, sx, so, ov;
        c  = t % 16;
        p  = t / 16;
        s  = slot_of(p);
        sx = slot_of(p - 1);
        so = slot_of(p - 2);
        ov = (so >= 0) && (so != 8);
        chk("lsb", ctl.lsb, c == 0, t);
        chk("msb", ctl.msb, c == 15, t);
        chk("seq", ctl.seq, c / 2, t);
        chk("strobe", ctl.strobe, c % 2, t);
        chk("cols_in", cols_in, s >= 9, t);
        chk("stall", stall, s == 8, t);
        chk("cols_xform", cols_xform, sx >= 9, t);
        chk("cols_out", cols_out, so >= 9, t);
        chk("in_ready", in_ready, s < 8 && c != 15, t);
        chk("row_start", row_start, s < 8 && c == 0, t);
        if (s < 8) chk("row_num", row_num, s, t);
        chk("tm_re", ctl.tm_re, s >= 9 && c >= 6 && c <= 13, t);
        if (s >= 9 && c >= 6 && c <= 13) chk("tm_raddr", ctl.tm_raddr, (c - 6) * 8 + (s - 9), t);
        chk("int_we", ctl.int_we, s >= 9 && c >= 7 && c <= 14, t);
        if (s >= 9 && c >= 7 && c <= 14) chk("int_idx", ctl.int_idx, c - 7, t);
        chk("tm_we", ctl.tm_we, ov && so < 8 && c % 2 == 1, t);
        if (ov && so < 8) chk("tm_wrow", ctl.tm_wrow, so, t);
        chk("out_en", ctl.out_en, ov && so >= 9, t);
        if (ov && so >= 9) chk("out_col", ctl.out_col, so - 9, t);
        chk("mode_in", ctl.mode_in, mb, t);
        if (row_start && row_num == 0) begin
          if (last_start >= 0) chk("block period", t - last_start, 272, t);
          last_start = t;
        end
        // change the mode at random times; the model takes it only at the
        // last cycle of a block
        prev_mode = mode;
        mode = ($urandom_range(7) == 0) ? !mode : mode;
        if (t % 272 == 271) mb = mode;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
