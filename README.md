# VVC intra reference sample smoothing filter

Before a VVC (H.266) intra block is predicted with an angular mode, the
reconstructed neighbour samples it is predicted from are first smoothed
with a 3-tap `[1 2 1] / 4` filter. This RTL does that smoothing in
hardware, for every block size from 8x8 to 64x64. Thirty-three filter units
work in parallel. An 8x8 block (33 reference samples) therefore finishes
in one clock. A 64x64 block (257 samples) takes eight clocks.

Each unit computes `(A + 2B + C + 2) >> 2` with two 7-bit adders, one AND
gate and one OR gate, and it is bit-exact. The design comes from a
published FPGA architecture for this filter. The sections below say where
this RTL follows that architecture and where it makes its own choices.

## The reference line

A `W x H` block uses `2H` samples from the column to its left, `2W` samples
from the row above, and the top-left corner sample. The hardware treats all
of them as one line of `N = 2W + 2H + 1` samples:

```
position:  0           2H-1  2H      2H+1    2H+2W
sample:    Left[2H-1] ... Left[0]  corner  Top[0] ... Top[2W-1]
```

The corner's neighbours on this line are `Left[0]` and `Top[0]`. This is
exactly how the standard filters the corner, so left column, corner and top
row need no separate handling. Every sample except the two ends becomes

```
s'[p] = (s[p-1] + 2*s[p] + s[p+1] + 2) >> 2        0 < p < N-1
```

The end samples `s[0]` (`Left[2H-1]`) and `s[N-1]` (`Top[2W-1]`) have only
one neighbour each, so they are passed through unchanged. All outputs are
computed from the unfiltered input samples.

The filter is only applied to blocks of at least 8x8, with available
neighbours, coded with angular modes. That decision is not made here. The
block's source computes it and sends it in as `skip`.

## Segments and windows

The line is processed in segments of 33 output positions. Segment `k`
produces positions `33k ... 33k+32`. To do so it needs one extra sample on
each side, so its input is a window of 35 samples, positions
`33k-1 ... 33k+33`:

```
window lane j   : 0      1      2    ...  33       34
line position   : 33k-1  33k    33k+1 ... 33k+32   33k+33
output lane i   :        0      1    ...  32
```

Output lane `i` smooths window lanes `i`, `i+1` and `i+2`. Consecutive
windows overlap by two samples. A block takes `ceil((2W + 2H - 1) / 33)`
segments. That number is read from a 16-entry ROM, not computed:

| W \ H | 8 | 16 | 32 | 64 |
|------:|--:|---:|---:|---:|
| 8     | 1 | 2  | 3  | 5  |
| 16    | 2 | 2  | 3  | 5  |
| 32    | 3 | 3  | 4  | 6  |
| 64    | 5 | 5  | 6  | 8  |

The two end samples are handled by a pass-through multiplexer on two lanes:

- In segment 0, output lane 0 holds position 0.
- In the last segment, lane `(2W + 2H) mod 33` holds position `N-1`. The
  ROM stores this lane number next to the segment count.

Lanes after the last position carry no meaning. Window lanes outside the
line (position -1, and positions past `N-1`) are don't-care inputs.

## The smoothing unit

The unit (`rss_unit`) uses the identity

```
(A + 2B + C + 2) >> 2  ==  ( ((A + C) >> 1) + B + 1 ) >> 1
```

To see why it holds, write `A + C = 2q + r` with `r` in {0, 1}. The left
side is then `floor((q + B + 1 + r/2) / 2)`. For an integer `n`, adding
`r/2 <= 1/2` before halving never changes `floor(n / 2)`.

Each halving stage adds only the bits that survive the shift:

1. Add `A[7:1] + C[7:1]` in a 7-bit adder. Its carry-in is `A[0] & C[0]`,
   which is the carry the dropped bit 0 would have produced. The 7-bit sum
   plus its carry-out is the 8-bit value `h = (A + C) >> 1`.
2. Add `h[7:1] + B[7:1]` in a 7-bit adder. The rounding `+1` is a carry-in
   of 1 into bit 0. With that carry-in, the carry out of bit 0 is
   `h[0] | B[0]` (the full-adder carry `xy + cin(x^y)` with `cin = 1`).
   The 7-bit sum plus its carry-out is the 8-bit result.

A direct version needs an 8-bit adder and two 9-bit adders. This version
needs two 7-bit adders and two gates, and the carry chains are shorter.

## Sequencing and timing

The control unit (`rss_ctrl`) holds a segment counter and the ROM
(`rss_cycle_lut`). Each segment passes through three steps, one clock each:

```
clock        c          c+1              c+2
             start      (input buffer)   (output buffer)
segment 0    load  -->  filter     -->   out_valid, out_seg=0
segment 1               load       -->   filter  --> out_valid, out_seg=1
...
last                                                 out_valid + done
```

- **Load.** The start cycle is also the load of segment 0. On every cycle
  with `in_load` high, the source must drive `in_win` with the window of
  segment `in_seg`. The input buffer captures it at the clock edge.
- **Filter.** The 33 units smooth the input buffer. The result is written
  into the output buffer.
- **Output.** `out_samples` holds segment `out_seg`. `done` is high together
  with the block's last segment.

So a block of `n` segments has its last result `n + 1` clocks after
`start`. `ready` goes high again in the cycle after the block's last load,
and a new block can start then. Single-segment blocks can therefore start
on every clock, which is what makes the 8x8 worst case run at one block per
clock.

A block started with `skip` high takes one cycle, whatever its size.
Nothing is loaded or smoothed. Two clocks later `done` and `out_skipped`
are high and `out_valid` stays low. The prediction stage is expected to use
the unfiltered samples it already has.

Raising `start` while `ready` is low breaks the handshake. The request is
ignored, and an assertion in `rss_ctrl` reports it.

## Interface of `vvc_rss_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `start` | in | 1 | start a block (only while `ready`) |
| `skip` | in | 1 | the block is not to be filtered |
| `w_sel`, `h_sel` | in | 2 | `log2(W) - 3`, `log2(H) - 3` (type `rss_pkg::blk_size_e`) |
| `ready` | out | 1 | a block may start |
| `in_load` | out | 1 | present a window on `in_win` this cycle |
| `in_seg` | out | 4 | segment whose window is wanted |
| `in_win` | in | 35 x 8 | `in_win[j]` = line position `33*in_seg - 1 + j` |
| `out_valid` | out | 1 | `out_samples` holds smoothed samples |
| `out_seg` | out | 4 | `out_samples[i]` = smoothed position `33*out_seg + i` |
| `out_samples` | out | 33 x 8 | output buffer |
| `done` | out | 1 | the block's last segment is at the output, or a skipped block ended |
| `out_skipped` | out | 1 | with `done`: the block was skipped |

`in_load` and `in_seg` depend combinationally on `start` in the start
cycle. The source should therefore compute `in_win` from `in_seg`, for
example by indexing its sample memory with it.

## Cost and speed

- Input buffer: 35 samples (280 flip-flops).
- Output buffer: 33 samples (264 flip-flops).
- Control: 29 flip-flops.
- Datapath: 33 units, that is 66 7-bit adders, plus 33 pass-through
  multiplexers.

The published FPGA implementation reports 553 registers and 181.79 MHz.
This RTL has 573 flip-flops. The difference comes from the 35-sample input
buffer and the segment tags of the control pipeline.

Throughput is one 8x8 block per clock. With every block of a frame 8x8 and
filtered, the clock needed for real time is:

| video | blocks per frame | required clock |
|-------|-----------------:|---------------:|
| 4K (3840x2160), 30 fps | 129,600 | 3.89 MHz |
| 4K, 60 fps | 129,600 | 7.78 MHz |
| 8K (7680x4320), 30 fps | 518,400 | 15.55 MHz |
| 8K, 60 fps | 518,400 | 31.10 MHz |

These numbers match the published ones. `tb_rss_frame_rate` measures the
rate over a whole 8K frame of 8x8 blocks.

## Where this RTL departs from the published design, or fills gaps

- **Buffer sizes.** The published text gives the input buffer as 35
  samples, but also as 264 bits, which is 33 samples. This RTL uses 35
  samples for the input buffer and 33 for the output buffer. Filtering 33
  positions in one clock needs the two outer neighbours.
- **End samples.** The published text says the last sample of each array is
  left unfiltered, but not how. Here it is done with the per-lane
  pass-through and the ROM's second column (`last_lane`).
- **Interface and timing.** The load/transfer timing, `ready`, `in_seg`,
  `out_seg`, `out_skipped`, the size encoding and the reset are this
  design's own. The original does not document its interface.
- **Skip.** What a skipped block produces is not specified. Here it
  produces no samples and only a `done` pulse.
- **Not included.** Deciding whether a block is filtered (size, neighbour
  availability, angular mode) and fetching the reference samples belong to
  the surrounding decoder and are not part of this RTL. The naive
  three-adder filter used in the published comparison is not included
  either.
- **Parameters.** The constants live in `rss_pkg`: `SAMPLE_W = 8`,
  `LANES = 33`, `WIN = 35` and `SEG_W = 4`. `rss_unit` is written for any
  width `W`. The LUT table, however, is written for 33 lanes and sizes up
  to 64. Changing `LANES` means regenerating that table from the two
  formulas above.

## Files

| file | contents |
|------|----------|
| `rtl/rss_pkg.sv` | constants, `sample_t`, `blk_size_e` |
| `rtl/rss_unit.sv` | one smoothing unit (two-stage bit-level datapath) |
| `rtl/rss_filter_array.sv` | 33 units over a 35-sample window, end-sample pass-through |
| `rtl/rss_sample_buf.sv` | parallel-load sample register, used as input and output buffer |
| `rtl/rss_cycle_lut.sv` | ROM: segments per block size and lane of the last sample |
| `rtl/rss_ctrl.sv` | control unit: counter, load/transfer strobes, done, skip |
| `rtl/vvc_rss_top.sv` | top level |
| `tb/rss_ref_pkg.sv` | reference model (plain formula, shared by testbenches) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rss_frame_rate` |

## Verification

Every testbench checks itself, has a watchdog, and ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_rss_unit`: corner values, all `(A, C)` pairs, and 200,000 random
  triples, compared with the formula.
- `tb_rss_filter_array`: random windows with random first/last flags and
  last-lane positions.
- `tb_rss_sample_buf`: reset, load and hold.
- `tb_rss_cycle_lut`: all 16 sizes, compared with the two formulas.
- `tb_rss_ctrl`: a cycle-exact scoreboard of every strobe and tag over 400
  requests, including skipped blocks and back-to-back starts.
- `tb_vvc_rss_top`: 400 blocks end to end at the default sizes. It covers
  all 16 sizes, skipped blocks, a burst of 40 back-to-back 8x8 blocks (it
  checks that they take 40 clocks), and random gaps. Every output sample is
  compared with the reference, and every block's latency is checked. It
  fails if any of these never happened: multi-segment blocks, one-clock
  blocks, skips, back-to-back starts, end samples.
- `tb_rss_frame_rate`: a full 8K frame of 8x8 blocks, with the required
  clock derived from the measured rate.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rss_pkg.sv tb/rss_ref_pkg.sv tb/tb_vvc_rss_top.sv --top-module tb_vvc_rss_top
./obj_dir/Vtb_vvc_rss_top
```

Replace `tb_vvc_rss_top` with any other testbench name. Each runs in about
a second.
