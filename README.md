# C-slow retimed histogram array

This is a histogram engine for pixel streams. It computes an m-bin histogram
(m = 256 for 8-bit pixels) as the pixels stream past, one per clock cycle, with
no memory read-modify-write. It is a linear pipeline of m/2 identical cells.
Each cell owns two bins, compares every passing pixel with them, and
increments its own counters.

The main idea is **C-slow retiming with C = 2**. In a plain pipelined cell the
critical path runs through the compare, the hit logic and the accumulator's
adder in one cycle, because the accumulator is a feedback loop and a register
cannot simply be inserted into it. C-slowing puts two registers in the loop,
so the loop computes two independent interleaved sums. Retiming then moves
one of those registers to the front of the adder. The compare and logic
path and the adder become separate pipeline stages. A final adder per bin
merges the two interleaved sums back into one count. Every cell handles two
pixel lanes, so the array needs two input streams. A small demultiplexer
makes them from the single stream a camera sensor or an 8-bit bus delivers.

## The retimed accumulator (`cslow_acc`)

This is the part that takes a moment to see. Per bin:

```
u_q  <= u             input register; it splits the logic from the adder
r_q  <= u_q + rp_q    adder, then the first loop register
rp_q <= r_q           second loop register (r')
r_out = r_q + rp_q    merge adder, combinational
```

Each value goes around the loop in two cycles. So `r_q` and `rp_q` hold two
separate running sums: one over the increments of even cycles and one over
those of odd cycles. Neither alone is the bin count. Their sum is. Example:
the inputs u = 3, 5, 4, 1 in cycles 0..3 give

| cycle | 0 | 1 | 2 | 3 | 4  | 5  |
|-------|---|---|---|---|----|----|
| r     | 0 | 0 | 3 | 5 | 7  | 6  |
| r'    | 0 | 0 | 0 | 3 | 5  | 7  |
| r + r'| 0 | 0 | 3 | 8 | 12 | 13 |

Here r = 3, 5, 3+4, 5+1 is the even/odd interleaving. An increment applied in
cycle t is in `r_out` from cycle t+2. The cost is twice the registers in the
loop plus one extra adder per bin. In exchange, the loop's critical path is a
single adder.

Nothing in the design requires the two interleaved sums to come from
different input streams. Any increment sequence accumulates correctly,
including one where every cycle has a hit.

## The cell (`hist_cell`, `hist_logic`)

A cell receives:

- `sin`, the index of its even bin;
- two lanes of pixels, `x1_in` and `x2_in`, each with a valid bit.

Work done in one cycle:

1. Two comparators check pixel bits p-1..1 of each lane against `sin` bits p-1..1.
2. `hist_logic` uses each lane's compare result and pixel LSB to count the
   hits on the even bin (`v0`) and on the odd bin (`v1`). Each is 0, 1 or 2.
3. `v0` and `v1` go into two `cslow_acc` instances. The input register of
   `cslow_acc` is the pipeline register right after the logic.

The pixels, their valid bits and the bin index leave through two register
stages each. The second stage is the one C-slowing adds. The next cell gets
`sout = sin + 2`, so each cell spends two cycles on a pixel.

The cell's outputs are named after the accumulators. `r2_out` is the count of
bin `sin`, fed from `v0`. `r1_out` is the count of bin `sin + 1`, fed from
`v1`. A pixel on a lane input in cycle t is counted in cycle t+2. That is the
same cycle it appears on the lane output.

## The array and its timing (`hist_array`)

`hist_array` chains 2^PIX_W / 2 cells. The first cell gets `sin = 0`, and
bins 2k and 2k+1 come from cell k. All counts are brought out in parallel as
`hist[0 .. m-1]`. A pixel entering the first cell in cycle t:

- is counted in cell k from cycle t + 2k + 2;
- leaves the last cell in cycle t + m, when every bin includes it.

So a frame of n pixels, fed one per cycle, is complete n + m cycles after its
first pixel enters the array.

After reset the bin-index pipeline starts at zero and fills in 2 cycles per
cell. That is exactly as fast as pixels travel, so no pixel entering after
reset meets a cell whose index has not settled yet.

## Feeding two lanes from one stream (`stream_demux`)

The source architecture describes two ways of feeding the lanes, and they
disagree. One is a demultiplexer that samples on both clock edges, which
gives two pixels per clock. The other is the claim that the array takes one
pixel per clock and finishes in n + m cycles. The demultiplexer provides both,
chosen by `DUAL_EDGE`.

- **`DUAL_EDGE = 0` (default).** At most one pixel per cycle arrives on
  `s_data`/`s_valid`. Valid pixels go to lane 1 and lane 2 in turn, with the
  output registered. A frame takes n + m + 1 cycles from its first pixel.
  This is the one-pixel-per-clock operation.
- **`DUAL_EDGE = 1`.** The source presents one pixel around the rising edge
  and another around the falling edge. The rising-edge pixel goes to lane 1
  and the falling-edge pixel to lane 2. The array reads both on the next
  rising edge. A frame takes n/2 + m + 1 cycles. This mode uses a
  falling-edge flip-flop, so its timing constraints need the half-cycle path.

## Top level (`hist_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `clear` | in | 1 | zero all bins (synchronous) |
| `s_data`, `s_valid` | in | PIX_W, 1 | pixel stream |
| `hist` | out | COUNT_W x 2^PIX_W | bin counts |
| `retired` | out | 2 | {lane 2, lane 1}: a pixel leaves the array this cycle; every bin already includes it |

| parameter | default | meaning |
|-----------|---------|---------|
| `PIX_W` | 8 | pixel width p; m = 2^p bins in m/2 cells (at least 2) |
| `COUNT_W` | 24 | counter width; up to 16,777,215 pixels per bin |
| `DUAL_EDGE` | 0 | demultiplexer mode, see above |

To know when a frame is finished, count the `retired` pulses until they equal
the number of pixels sent. `clear` zeroes every counter at once, so assert it
only when no pixel is in flight, for example after the last retire.

At the defaults, yosys coarse synthesis gives about 19,400 flip-flops and 4,230
word-level cells. These are 512 24-bit adders, 254 comparators and the
pipeline registers.

## Choices made here, not in the source architecture

- Pixel width 8 and m = 2^p. The source targets 8-bit buses but gives no
  numbers for p or m.
- 24-bit counters, the reset, `clear`, and the lane valid bits. The valid bits
  stop an idle lane from being counted.
- What `hist_logic` does inside. Only its inputs and outputs are specified;
  this is the simplest logic that gives the hit counts.
- Readout. The source leaves out the pipelined readout of the bins, so all
  counts are parallel outputs here. If you need a serial readout, add it
  outside the cell.
- The single-edge alternating demultiplexer, which is the default, and the
  `retired` flags.
- The 282 MHz cell / 238 MHz array clock rates and gate counts reported for a
  0.35 um ASIC were not reproduced. RTL simulation says nothing about them.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|-----------|----------------|
| `tb_cslow_acc` | the table above cycle by cycle; 400 random increments against an even/odd model of r and r'; clear |
| `tb_hist_logic` | all 64 input combinations |
| `tb_hist_cell` | two-cycle pass-through, `sout = sin + 2`, both bin counts every cycle, both lanes hitting the same cell in one cycle, clear |
| `tb_hist_array` | 4-bit pixels: all 16 bins every cycle against a latency-exact model; a 40-pixel frame complete after exactly n + m cycles |
| `tb_stream_demux` | lane alternation with gaps (single-edge); rising/falling-edge capture (dual-edge) |
| `tb_hist_top` | both modes end to end over several frames, with and without gaps: bins, cycle counts (n + m + 1 and n/2 + m + 1) and clear; counts that lane 1, lane 2, both lanes at once and two non-zero interleaved partial sums all occur |
| `tb_hist_full` | default parameters: a 640 x 480 frame, all 256 bins, 307,457 = n + m + 1 cycles |
| `tb_hist_ddr_frame` | same frame with `DUAL_EDGE = 1`: 153,857 = n/2 + m + 1 cycles |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_hist_full \
  -y rtl -y tb +libext+.sv rtl/hist_pkg.sv tb/tb_hist_full.sv
./obj_dir/Vtb_hist_full
```

Replace `tb_hist_full` with any testbench name. The full-size frame runs in
about a second after a short build. `hist_pkg.sv` holds the shared defaults
and must be read first.
