# H.264 motion-estimation accelerator with a two-buffer memory pipeline

This is synthesizable SystemVerilog for a hardware motion estimator (ME) for
H.264/AVC encoders on embedded SoCs. The reference frames stay in external
SDRAM, behind an AHB system bus. The accelerator gives each 16x16 luma
macroblock (MB):

* the best of three reference frames,
* an integer motion vector for each of its sixteen 4x4 blocks,
* the H.264 partition that those vectors merge into (16x16 down to 4x4),
* a quarter-pel vector for each partition,
* the SADs behind these choices.

The main idea is to make memory bandwidth, not arithmetic, the thing that
sets the design's shape. Full search over several reference frames costs too
much. Instead the search is hierarchical in time and in space. The most
recent reference gets a coarse-to-fine search. Each older reference is
searched only near the vector found in the newer one. Only the best
reference is refined at 4x4 and sub-pel level. Two 48x48 search-window
buffers are scheduled so that loading the next window overlaps the search.

## Block diagram

```
   frame buffer (SDRAM, up to 4 luma frames)
        |  AHB (EBUS)
   +----v-----+      +------------------+
   | mem_ctrl |----->| search_window_buf A |--+--> bilinear_interp --+
   |          |----->| search_window_buf B |--+                    |
   |          |----->| cur_mb_buf (16x16)  |--------+              |
   +----^-----+      +------------------+           v              v
        |                                   +--------------------------+
        | commands                          | pe_array: 16 x sad4x4    |
   +----+--------------------------------+  | (4x4 SADs + 16x16 SAD)   |
   | search_ctrl (schedule + search)     |<-+--------------------------+
   |   partition_merge (mode decision)   |
   +----+--------------------------------+
        v
   me_info_mem (results, read by the host)      sixtap_interp (own ports)
```

| file | role |
|---|---|
| `rtl/me_pkg.sv` | constants (MB 16, range ±16, window 48, 3 references), vector and mode types, result-word layout |
| `rtl/me_top.sv` | top: wires the blocks below; host port, AHB master port, result read port |
| `rtl/search_ctrl.sv` | the controller: buffer schedule and the whole search algorithm |
| `rtl/mem_ctrl.sv` | AHB-Lite master; loads the current MB and 48x48 windows, with edge padding |
| `rtl/search_window_buf.sv` | 48x48-byte window buffer (two instances, A and B) |
| `rtl/cur_mb_buf.sv` | 16x16-byte current MB, two row read ports |
| `rtl/sad4x4.sv` | one 4x4 SAD processing element |
| `rtl/pe_array.sv` | 16 PEs, one per 4x4 block of the MB |
| `rtl/bilinear_interp.sv` | quarter-pel bilinear samples for the sub-pel search |
| `rtl/partition_merge.sv` | merges similar 4x4 vectors into H.264 partitions |
| `rtl/me_info_mem.sv` | 32-word result memory |
| `rtl/sixtap_interp.sv` | H.264 six-tap half-pel filter, standalone |

## The search, step by step

All vectors are relative to the co-located MB. Integer stages use integer
pels and the sub-pel stage uses quarter pels. A candidate is accepted only if
its SAD is strictly lower than the best so far, so ties keep the earlier
candidate.

1. **Reference 0 (the most recent).** A coarse grid of step 8 covers ±16:
   25 points in raster order, and the three best are kept. From each of the
   three, a three-step search runs with steps 3, 2 and 1. Each step evaluates
   the 8 neighbours of the current centre. The best result over the three
   refinements is reference 0's vector.
2. **References 1 and 2.** The search starts at the previous reference's
   vector and uses steps 2 and 1 only, which gives a ±3 window.
3. **Choose the reference** with the lowest 16x16 SAD.
4. **4x4 search.** All 25 displacements within ±2 of the chosen 16x16 vector
   are tried, centre first. The PE array produces all sixteen 4x4 SADs of a
   displacement at once, so each 4x4 block keeps its own best vector.
5. **Partition merge** (`partition_merge`). Two vectors are similar when
   `|dx|+|dy| <= merge_th`.
   * Inside each 8x8 quadrant the four 4x4 vectors become 8x8, 8x4, 4x8 or
     4x4.
   * If all quadrants became 8x8, the quadrants merge the same way into
     16x16, 16x8 or 8x16.
   * A merged partition takes the vector of its top-left block.
6. **Sub-pel refinement**, once per partition, over ±1 pel around the
   partition's integer vector:
   * the integer vector itself;
   * then the other 24 points of the 5x5 half-pel grid, in raster order;
   * then the 8 quarter-pel neighbours of the best point, skipping any that
     would leave the ±1-pel area.

   The partition SAD is the sum of its blocks' 4x4 SADs. Samples come from
   bilinear interpolation of the integer window. H.264's six-tap filter is not
   used here, so no sub-pel window has to be stored.

## The two-buffer schedule (`pipe` output)

This is the part of the design that is easiest to get wrong. A and B are the
two window buffers.

| pipe | loading | searching |
|---|---|---|
| 0 | current MB; reference 0 into A **and** B | — |
| 1 | — | reference 0, 16x16, reading A and B: **2 rows/cycle** |
| 2 | reference 1 into A and B | — |
| 3 | — | reference 1, 16x16, 2 rows/cycle |
| 4 | reference 2 into A | — |
| 5 | better of refs 0/1 into B | reference 2, 16x16, from A, 1 row/cycle |
| 6 | best reference into the *other* buffer | 4x4 ±2 search on the buffer holding the best reference, 1 row/cycle |
| 7 | — | merge, then sub-pel search: row y from A and row y+1 from B feed the interpolator |

The design study that this RTL follows specifies:
* which buffers are loaded with which reference, and when;
* which buffer feeds the SAD array.

This design chose *why* both buffers hold the same window in stages 1 and 3:
it reads two rows per cycle, so a 16x16 candidate takes 8 row cycles instead
of 16. In stage 7 the same pairing supplies the two rows that bilinear
interpolation needs.

## Timing

* **Candidates.** A candidate takes 8 (two lanes) or 16 (one lane) row cycles
  plus one evaluation cycle.
  * The PE array restarts its accumulators with `first`, so no clear cycle is
    needed.
  * Results are valid one clock after the last row.
* **Loads.** A window load is 576 32-bit words. At two bus cycles per word
  that is 1152 cycles without wait states.
* **Per MB.** A full MB takes about 10,500–18,000 cycles with 0–2 random wait
  states per transfer. Window loads and the
  sub-pel search are most of this; the more partitions, the longer.
* **Buffers.** Window and current-MB buffers are register files with
  asynchronous read. The result memory has a registered read.

## Interfaces

* **Host.**
  1. Set `mb_x`, `mb_y` (MB indices), `cur_frame` and `ref_frame[0..2]`
     (frame slots 0..3, `[0]` the most recent) and `merge_th`.
  2. Pulse `start`. The inputs are latched, so they may change afterwards.
  3. Wait for the one-cycle `done` pulse.
  4. Read words 0..19 through `info_re`/`info_raddr`. Data arrives on
     `info_rdata` one clock later.
* **Result words** (`me_pkg`):
  * words 0–15, per 4x4 block in raster order: `{mv.x, mv.y}` in quarter pels
    (signed 8-bit each), `part_id` (index of the partition's top-left block)
    and the 12-bit integer 4x4 SAD;
  * words 16–18, per reference: the integer 16x16 vector and 16-bit SAD;
  * word 19: best reference, MB mode (0 16x16, 1 16x8, 2 8x16, 3 8x8), four
    sub-modes (0 8x8, 1 8x4, 2 4x8, 3 4x4) and the number of partitions.
* **Frame buffer.**
  * One byte per luma pixel, row-major.
  * Frame `f` starts at `FB_BASE + f*FRAME_W*FRAME_H`.
  * Defaults: 384x320 and four slots.
* **Edge padding.** Window pixels outside the frame repeat the nearest edge
  pixel.
* **Bus.** AHB-Lite, read-only single transfers (`HTRANS` NONSEQ, then IDLE
  during the data phase). `hready` stretches either phase.
* **Reset.** `rst_n` is an asynchronous, active-low reset.

## How far to trust it, and where it departs from the source design

Verified in simulation:

* Each block has a self-checking testbench against values computed
  independently.
* `tb/me_top_tb.sv` runs the whole accelerator at the default sizes:
  * 384x320 frames, 8 MBs including all four frame corners;
  * every result word is compared with a behavioural model of the algorithm
    above;
  * every mechanism must occur: all 8 stages, two-row and one-row cycles,
    loads overlapping search, skipped out-of-window candidates, edge padding,
    bus wait states, 4x4 search from A and from B, and merged and split MBs.
* `tb/search_ctrl_tb.sv` checks the buffer schedule in the table above, load
  by load.

Choices made here because the source gives no details:
* row-serial PEs and two-row cycles;
* the reduced search in older references being steps 2/1;
* the similarity measure, which uses only vector distance and no SAD or
  vector-cost term, with `merge_th` as an input;
* the vector a merged partition inherits;
* tie breaking;
* the result memory layout;
* the AHB usage (single, non-pipelined transfers);
* edge padding;
* the bilinear weights;
* the order of the sub-pel search.

Known departures and gaps:

* **One candidate into the second stage.** Only the single best 16x16 vector
  goes on to the 4x4/sub-pel stage. The source allows M candidates, with M
  chosen at run time.
* **Quarter-pel positions searched hierarchically.** The source searches
  the half- and quarter-pel positions of a ±1-pel area. Here every half-pel
  position is tried, but only the quarter-pel positions next to the best
  half-pel one.
* **Six-tap interpolator not connected.** `sixtap_interp` is present because
  the block diagram has it, but nothing feeds it from the search. Its ports
  are brought out at the top. Its taps are the H.264 standard's.
* **No internal bus.** The internal bus of the block diagram is replaced by
  direct wiring. The system bus and the SDRAM are outside the design; the
  testbenches model them in `tb/ahb_mem_model.sv`.
* **Throughput not evaluated.** No clock frequency is stated, so real-time
  capability cannot be judged. For QCIF at 15 fps (1485 MB/s) 16–27 M
  cycles/s are needed at the measured cycle counts.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module me_top_tb rtl/me_pkg.sv tb/me_top_tb.sv --Mdir obj_top
./obj_top/Vme_top_tb
```

Replace `me_top_tb` by any other `tb/*_tb.sv` module to test one block.
`search_ctrl_tb` and `mem_ctrl_tb` use a 64x48 frame to stay short. The
full-size run takes well under a minute. To change the frame size, set
`FRAME_W`/`FRAME_H` on `me_top`. The window and MB sizes are package
constants in `me_pkg`. Changing the search range also changes the window
edge `SW = 16 + 2*SR` and the coarse-grid and clamping constants in
`search_ctrl`.
