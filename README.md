# 8x8 DCT/IDCT by distributed arithmetic, without multipliers

This is a 2-D 8x8 Discrete Cosine Transform and inverse transform (DCT/IDCT), as used in JPEG and MPEG coders. Where most implementations use a multiplier, this one uses **distributed arithmetic** (DA): a multiply-accumulate against fixed cosine constants becomes a few small lookup tables and shift-accumulators, fed one bit per cycle. One 1-D 8-point DCT/IDCT circuit is used twice per block, once for the rows and once for the columns. A 64-word transpose memory sits between the two passes.

The circuit transforms one 8x8 block every 272 clock cycles (4.25 cycles per sample), and blocks follow each other without gaps. Each block can be a DCT or an IDCT. At 33 MHz that is 7.76 M samples/s. The internal word is 16 bits.

The architecture follows D. Poplin, *Distributed Arithmetic Architecture for the Discrete Cosine Transform* (1997). That work made four changes to a standard hybrid DA design:

- The DCT input butterfly is done bit-serially.
- The lookup tables are built from logic rather than ROM.
- The odd-coefficient tables are shared between DCT and IDCT, so 12 tables are needed instead of 16.
- The IDCT butterfly comes after the accumulators.

The RTL here is a new implementation of that architecture. Its interface, controller internals and a few details are this design's own; they are listed below.

## How distributed arithmetic computes a DCT point

An 8-point DCT output is an inner product with constant coefficients:

    y(k) = sum_n  G(k,n) * x(n),    G(k,n) = 0.5 * c(k) * cos((2n+1) k pi / 16),  c(0) = 1/sqrt(2), else 1

Write each 16-bit two's-complement input as bits, `x(n) = -x_n[15] + sum_{b<15} x_n[b] 2^(b-15)`, with the binary point placed for the argument. The sum can then be reordered:

    y(k) = sum_b 2^(b-15) * T_k( x_0[b], x_1[b], ..., x_7[b] )     (bit 15 with weight -1)

Here `T_k(a)` is the sum of the coefficients `G(k,n)` whose address bit `a_n` is 1. Every possible value of `T_k` can be stored in a table addressed by one bit of each input. The multiplication then becomes:

- Shift all inputs out one bit per cycle, LSB first.
- Look up `T_k` for that cycle's bit vector.
- Add the looked-up word to the running sum shifted right by one place.
- In the last cycle, which carries the sign bit, subtract instead of adding.

After 16 cycles the accumulator holds `y(k)`. Eight tables and eight accumulators working in parallel give all eight outputs in the same 16 cycles.

**Hybrid DA: butterflies make the tables small.** A table addressed by 8 bits would have 256 words. The DCT matrix, however, is symmetric around its middle:

- Even outputs depend only on the sums `x(n) + x(7-n)`.
- Odd outputs depend only on the differences `x(n) - x(7-n)`.

So a butterfly in front of the tables turns each output into a 4-input inner product, and each table needs only 16 words:

    y(2r)   = sum_{j<4} G(2r,   j) * (x(j) + x(7-j))          "even" tables, r = 0..3
    y(2r+1) = sum_{j<4} G(2r+1, j) * (x(j) - x(7-j))          "odd"  tables

The IDCT splits the same way, but the butterfly has to come after the inner products:

    v(n)   = sum_{j<4} G(2j,   n) * y(2j)       (n = 0..3)   even part
    v(4+n) = sum_{j<4} G(2j+1, n) * y(2j+1)                  odd part
    x(n)   = v(n) + v(4+n),   x(7-n) = v(n) - v(4+n)

**Shared odd tables.** Odd table `r` in DCT mode holds `G(2r+1, j)` for address bit `j`. In IDCT mode the same table needs `G(2j+1, r)`. Both are `0.5*cos((2r+1)(2j+1)pi/16)`, which is symmetric in `r` and `j`. One set of four odd tables therefore serves both modes. Only the even tables differ between DCT and IDCT, so 12 tables are needed instead of 16.

The table contents, written with `C_k = 0.5*cos(k*pi/16)` (rows are tables, columns are address bits 0..3):

| even, DCT (y0 y2 y4 y6) | even, IDCT (v0..v3) | odd, both (y1 y3 y5 y7 / v4..v7) |
|---|---|---|
| C4  C4  C4  C4 | C4  C2  C4  C6 | C1  C3  C5  C7 |
| C2  C6 -C6 -C2 | C4  C6 -C4 -C2 | C3 -C7 -C1 -C5 |
| C4 -C4 -C4  C4 | C4 -C6 -C4  C2 | C5 -C1  C7  C3 |
| C6 -C2  C2 -C6 | C4 -C2  C4 -C6 | C7 -C5  C3 -C1 |

Each table word is the sum of the constants whose address bit is set. The words are computed from the address bits by a function over the constants (`da_word` in `dct_pkg`). Synthesis turns each table into logic of its four address bits; there is no ROM.

**Bit-serial butterfly.** The DCT sums and differences are not computed as parallel words. Each of the four butterflies is:

- a one-bit full adder and a one-bit full subtractor;
- two flip-flops holding carry and borrow;
- resets at the first bit of every word (carry 0, borrow 1, with the subtrahend inverted).

Its outputs are already the bit streams the tables need. In IDCT mode the butterfly passes its inputs through unchanged.

## Number formats

| Quantity | Format |
|---|---|
| External inputs and outputs | 11-bit signed integers. Pixels are signed 8-bit values, sign-extended by the caller. |
| Internal samples | 16 bits, 11 integer bits and 5 fraction bits ("11.5"). External inputs are shifted left by 5 on entry. |
| Constants `C_k` | `round(0.5*cos(k*pi/16) * 2^15)`: 16069, 15137, 13623, 11585, 9102, 6270, 3196 |
| Table words | 17 bits signed. The largest word is 4*C4 = 1.414. |
| Accumulators | 18 bits signed. The sum of 16 shifted table words (sample LSB 2^-5, constant LSB 2^-15, shift 2^15) lands directly in 11.5 format. |

The two numbers that lose precision are the 15-bit constants and the accumulator, which drops the bit it shifts out every cycle. First-pass results keep their 5 fraction bits in the transpose memory.

The second pass rounds to an integer by adding 0.5 (positive values) or 0.5 - 2^-5 (negative values) and clearing the fraction, so halves round away from zero. After an IDCT the result is then limited to -128..127.

## The 1-D core and its 16-cycle pipeline

`dct1d` is three 16-cycle stages, so three 1-D transforms are in flight at once:

```
 input registers --MSB--> PISO shift regs -> 4 bit-serial butterflies -> 4 even + 4 odd tables
 (8 x 16 bit, written                           (DCT: sum/diff;              |
  in any order)                                  IDCT: pass)             8 shift-accumulators
                                                                             |  --MSB-->
                                                                     output registers (8 x 16)
                                                                             |
                                      IDCT butterfly / output mux / rounding -> one result per 2 cycles
```

**Period P.** The eight samples of a transform are written into the input registers in any order. For the DCT they are stored so that each butterfly sees a pair `x(j)`, `x(7-j)`; the register order is x0 x7 x1 x6 x2 x5 x3 x4. For the IDCT the order is y0..y7.

**Period P+1.** MSB, the last cycle of P, copies them into the PISO registers. They are shifted out LSB first through the butterflies and tables into the accumulators. LSB, the first cycle, clears the accumulator feedback. In the MSB cycle the accumulator subtracts the table word, computed as the inverted word plus a carry-in.

**Period P+2.** The next MSB moves the eight sums into the output registers, and `idct_bfly` presents them one every two cycles:
- DCT: y0..y7 in order.
- IDCT: v0+v4, v1+v5, v2+v6, v3+v7, then v0-v4 .. v3-v7. That is x0 x1 x2 x3 x7 x6 x5 x4.

The output index travels with each result.

The 1-D throughput is one transform per 16 cycles. The latency is 48 cycles from the start of the input period to the end of the output period.

The mode of a transform moves with it. It is sampled into the PISO stage and then into the output stage at each MSB. Consecutive transforms may therefore be of different kinds.

## The 2-D schedule: 17 slots per block

A block takes 272 cycles, counted as 17 slots of 16 cycles. Each stage of the 1-D core works one slot behind the stage before it:

| slot | input stage collects | transform stage works on | output stage delivers |
|---|---|---|---|
| 0 | row 0 from outside | column 7 of the previous block | column 6 of the previous block -> output |
| 1 | row 1 | row 0 | column 7 of the previous block -> output |
| 2-7 | rows 2-7 | rows 1-6 | rows 0-5 -> transpose memory |
| 8 | nothing (stall) | row 7 | row 6 -> transpose memory |
| 9 | column 0 from the transpose memory | nothing | row 7 -> transpose memory |
| 10 | column 1 | column 0 | nothing |
| 11-16 | columns 2-7 | columns 1-6 | columns 0-5 -> output |

First-pass results are written into the transpose memory at address `{row, index}`. The second pass reads `{row, column}` for rows 0..7 in cycles 6..13 of a column slot; the words reach the input registers one cycle later, in cycles 7..14. While a block's last columns are transformed and output, the next block's rows are already entering, so the pipeline is never drained between blocks.

**Why the stall slot.**
- Row 7's results are written into the memory during slot 9, one every two cycles in index order. Element (row 7, index 0) is written in cycle 1.
- Column 0 is read in slot 9, and row 7 of it in cycle 13, so the read finds the new value.
- Every later column is read in a later slot.
- Without the stall, column 0 would be read while row 7 was still in the accumulators.

**Timing of one block.**
- Row 0 enters in slot 0.
- Column 0 enters in slot 9 and is transformed in slot 10. Its first result is selected in cycles 0-1 of slot 11 and appears on the registered outputs 178 cycles after the block's first row period began.
- The last result leaves in slot 1 of the following block.

The controller (`dct_ctrl`) makes this schedule from a 4-bit cycle counter and a 0..16 slot counter. The signals `cols_in`, `cols_xform` and `cols_out` say whether the input, transform and output stages hold column data. They are the same flag delayed by one and two slots.

**Output orientation.** The outputs come column by column. The final transpose of a 2-D transform is left out, as image coders customarily do, so:
- DCT block X gives `out(k, j) = (G X Gᵀ)(k, j)` with `out_col = j`, `out_idx = k`.
- IDCT block Y gives `out(n, j) = (Gᵀ Y G)(n, j)`.

## Interface (`dct2d_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `mode` | in | 1 | 0 = DCT, 1 = IDCT. Sampled at the reset edge and in the last cycle of every block, for the block that follows. |
| `in_ready` | out | 1 | samples of row `row_num` may be written this cycle |
| `row_start` | out | 1 | first cycle of a row period |
| `row_num` | out | 3 | row being collected |
| `in_we`, `in_idx`, `in_data` | in | 1, 3, 11 | write sample `in_idx` of the current row (signed integer) |
| `out_valid` | out | 1 | `out_data` holds a result (one every 2 cycles during output slots) |
| `out_data` | out | 11 | rounded result; limited to -128..127 for the IDCT |
| `out_col`, `out_idx` | out | 3, 3 | position of that result: column, then index within the column |
| `out_mode` | out | 1 | mode of the block the result belongs to |

**Writing rows.**
- A row period is 16 cycles.
- `in_ready` is high in its first 15 cycles. The eight samples may be written in any of those cycles, in any order.
- A write while `in_ready` is low is ignored.
- Row periods 0..7 of a block follow `row_start` pulses with `row_num` = 0..7. Then come nine slots in which no external input is taken.
- `row_start` with `row_num == 0` marks the start of a block. The mode for the next block must be on `mode` by the end of the current block; holding it from that `row_start` on is enough.
- All outputs are registered.

The block is built from these modules (one per file in `rtl/`):

| module | role |
|---|---|
| `dct_pkg` | widths, the 11.5 format, constants, table matrices, `ctl_t` control bundle |
| `dct_ctrl` | slot/cycle counters, LSB/MSB, column flags, transpose addresses, output sequencing, mode sampling |
| `input_mux` | external row sample (shifted to 11.5) or transpose-memory word |
| `input_regs` | eight input registers in butterfly order |
| `piso_sr` | eight parallel-in serial-out registers, LSB first |
| `bitserial_bfly` | serial sum/difference (DCT) or pass-through (IDCT) |
| `even_lut`, `odd_lut` | the 4 + 4 constant tables |
| `da_accumulator` | shift-accumulator with sign-bit subtraction |
| `output_regs` | holds the eight sums for the output period |
| `idct_bfly` | IDCT butterfly, output selection, rounding |
| `limiter8` | 8-bit saturation of second-pass IDCT results |
| `transpose_mem` | 64 x 16 memory, one write and one registered read port |
| `dct1d` | the 1-D core built from the modules above |
| `dct2d_top` | 2-D transform: controller, input mux, 1-D core, transpose memory, limiter |

Generic synthesis of `dct2d_top` gives about 380 coarse cells, 453 flip-flop bits and a 1,152-bit memory (the 64 x 16 transpose memory plus its registered read).

## Accuracy

The constants carry 15 fraction bits, and the accumulators drop one bit per cycle, which rounds toward minus infinity. Against a floating-point 2-D transform rounded to integers:
- every output is within ±1;
- 1-D results are within 3/32.

The round-trip experiment uses 1000 blocks of random pixels in -128..127, transformed by the DCT and back by the IDCT of this circuit:

| error | -2 | -1 | 0 | +1 | +2 |
|---|---|---|---|---|---|
| share of pixels | 0 | 5.3 % | 91.1 % | 3.6 % | 0 |

The mean error is -0.018 and the MSE is 0.089. The truncation shows as a small negative bias, largest at the DC position (0,0), where the mean error is -0.21 and the MSE 0.215.

For comparison, the original work reports 95.1 % exact pixels at 16 bits on natural image data. Random data exercises the full range of every coefficient and is harder. An accumulator that started from half an LSB instead of zero would remove most of the bias; it is not done here so that the accumulator stays as described.

## Departures from the original and choices made here

- **Interface.** Only "input", "output" and a MODE signal are described. The handshake (`in_ready`, indexed writes, `out_col`/`out_idx`/`out_mode`) and the rule that the mode is sampled once per block are this design's own.
- **Controller.** Its internals are not described. The slot schedule, the stall slot, and the delays of the column flags follow the timing diagrams. The reads are placed in cycles 6..13 so that the input registers are written in cycles 7..14, as the diagrams show.
- **IDCT even tables.** These use the matrix that follows from the transform's definition. One printed version of the even IDCT equations has rows 1-3 in a different order, which does not agree with the definition or with the butterfly equations.
- **Odd tables.** The signs follow the DCT definition and the later, consistent printings of the shared matrix. An early printing differs in two rows.
- **Limiter.** The limiter is described as comparing the sign bit of the integer part with bit 7. That alone would let values such as 256 through, even though the limiter is also described as guaranteeing 8-bit outputs. Here bits 9..7 are all compared with the sign, so the guarantee holds.
- **Table width.** Words are 17 bits, since the largest table sum, 4*C4, does not fit 16 bits with 15 fraction bits.
- **Accumulator width.** The accumulator is 18 bits, so the partial sums cannot wrap.
- **Reset.** Reset clears all datapath registers and the controller. Reset values are not described otherwise.
- **Internal width.** M = 16 is fixed (`DW` in `dct_pkg`). The original evaluated 12 to 18 bits; other widths would need new table and accumulator widths and are not provided.
- **Not built.** The JPEG quantiser, the level shift of unsigned pixels (assumed done before the input, as in the original) and any latch-based area reduction are not part of this design.

Verilator's lint reports a few unused signals that are deliberate:
- the controller's `cols_xform` and `stall` outputs, which the top does not need;
- the limiter's fraction bits, dropped at the integer output;
- the low bits of the rounding adder, replaced by zeros.

The module headers note each of these.

## Testbenches and simulation

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs. Reference values are computed independently, from the cosine definition or from integer models:

| testbench | what it checks |
|---|---|
| `tb_dct2d_top` | 245 blocks end to end at full size; see below |
| `tb_random_blocks` | the 1000-block round-trip accuracy experiment above, with the 272-cycle period of every block |
| `tb_dct1d` | 600 back-to-back 1-D transforms, random modes, results in the right 16-cycle period, order, accuracy |
| `tb_dct_ctrl` | every control output, every cycle, for eleven blocks and across a reset in mid-block, against a slot-schedule model |
| `tb_even_lut`, `tb_odd_lut` | every table word against the cosine definition, both modes |
| `tb_da_accumulator` | floor-exact 64-bit model of the shift-accumulation, and distance from the exact value |
| `tb_bitserial_bfly` | serial sums and differences of random words |
| `tb_idct_bfly` | butterfly, output order, rounding including exact halves |
| `tb_limiter8` | all 65,536 input values |
| `tb_input_mux`, `tb_input_regs`, `tb_piso_sr`, `tb_output_regs`, `tb_transpose_mem` | the storage and steering blocks |

What `tb_dct2d_top` does:
- Streams DCT and IDCT blocks back to back, with random write order and timing.
- Compares every output with a floating-point 2-D transform, allowing ±1.
- Checks the round trip, the 272-cycle period and the 178-cycle latency.
- Counts each mechanism and fails if one never occurs: stall slots, mode switches, overlap of consecutive blocks, rounding of both signs, and limiter saturation in both directions.

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl rtl/dct_pkg.sv tb/tb_dct2d_top.sv \
          --top-module tb_dct2d_top -Mdir build
./build/Vtb_dct2d_top
```

Replace the testbench name to run another. `tb_dct2d_top` and `tb_random_blocks` each take a few seconds.
