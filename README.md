# DCE2: sequential pixel clustering in SystemVerilog

A pixel detector read out row by row produces mostly empty rows with a few hit pixels. The hits
that belong to one particle form a small connected group, a *cluster*. Sending a cluster as one
record (where it is, how many pixels, total charge) followed by its pixels saves bandwidth and
loses nothing. It also hands the next stage of data acquisition clusters that are already found.

DCE2 finds these clusters with very little logic. It has no clustering cell per pixel. A whole
row enters in parallel and is then handled **sequentially**: one hit pixel per core clock goes to
a small pool of **clustering agents**. Each agent owns one growing cluster. Agents that are free,
and agents whose cluster is finished, wait in queues. The core clock runs a fixed multiple of the
row clock (10 by default), so a row can carry about ten hits before the input buffer has to absorb
the excess.

This repository holds synthesizable RTL for:

* `dce2_core`: the 64-channel, 8-agent clustering core.
* `dce2_testchip`: a test chip around the core. It has JTAG-loadable test patterns, scan chains
  that observe the core's input and output, and a spy memory that records the output.

The block structure and the main sizes follow the published DCE2 description (A. Wassatsch, MPI
Semiconductor Laboratory, 2011). That description gives the blocks and the sizes, but not the
inner workings. The neighbourhood bookkeeping, merging, closing, encodings and handshakes are this
implementation's own. Each is listed below.

## Data path of the core

```
 row_stb, row_num,        +----------+    +-----------------+    +--------------------+
 row_adc[64] ------------>| din fifo |--->| input scheduler |--->| clustering control |
                          | (1 row)  |    | 1 hit / clock   |    +--------------------+
                          +----------+    +-----------------+      |   ^        |
                                                      commands     v   | status | close
                                                 +-------------------------+    v
                     free agent queue  <-------- | agent 0 ... agent 7     |  ready agent queue
                     (indices)                   | masks, record, 16-pixel |    |
                                                 | FIFO                    |    v
                                                 +-------------------------+  dout queue --> static
                                                                                          \-> pixel stream
```

| Parameter | Default | Meaning | Source |
|---|---|---|---|
| `NCH` | 64 | channels per row | published |
| `NAGENTS` / `NA` | 8 | clustering agents = clusters that can be open at once | published |
| `PIXFIFO_DEPTH` / `PDEP` | 16 | pixels an agent can store | published |
| `CNT_MAX` | 31 | range of the pixel counter | published |
| `DIN_DEPTH` / `DDEP` | 1 | rows buffered in front of the scheduler | published |
| `ROW_CLK_RATIO` | 10 | core clocks per row clock | published |
| `ADCW` | 8 | bits per ADC value | own choice |
| `ROWW` | 10 | bits of the row number | own choice |

The sizes live in `rtl/dce2_pkg.sv`. `NA`, `PDEP` and `DDEP` are also parameters of `dce2_core`.
The record types derive from the package values, so `NCH`, `ADCW` and `ROWW` must be changed in
the package.

### Input scheduler

The scheduler holds the current row and a mask of the hits not yet sent. A hit is any channel
with a non-zero ADC value. Each clock, a recursive binary tree (`dce2_tree_sel`) picks the lowest
remaining column and sends that pixel. When the last hit leaves, the next row is loaded from the
din FIFO in the same clock. A row of *k* hits therefore takes *k* clocks, and an empty row takes
one clock: it is sent as a single item without a pixel, so that clustering control still sees the
row number go by.

The first item of every row carries `row_start`.

If the din FIFO is full when a new row is strobed, that row is dropped and `ev_row_lost` pulses.
With the defaults, a row of up to 10 hits never causes this. One longer row is absorbed by the
one-row buffer, provided the following rows are short enough to catch up.

### Agents and the neighbourhood rule

This is the part that needs the most care. Pixels arrive in raster order: rows ascending, columns
ascending within a row. So when pixel (r, c) arrives, the only earlier pixels it can touch
(8-neighbourhood) are in row r at columns c-1..c+1, or in row r-1 at columns c-1..c+1. An agent
therefore only needs the last two rows of its cluster, not the whole cluster:

* `row_a`: the newest row that holds a pixel of the cluster;
* `mask_a`: the columns hit in `row_a`;
* `mask_b`: the columns hit in `row_a - 1`.

A pixel in row r touches an open agent in one of two cases:

* `row_a == r`, and `mask_a` or `mask_b` has a bit at c-1..c+1;
* `row_a == r-1`, and `mask_a` has a bit at c-1..c+1.

When a pixel is added in a new row, `mask_a` moves into `mask_b`, or is cleared if a row was
skipped. All eight agents are compared in parallel. Clustering control then acts on the result:

| Matching agents | Action |
|---|---|
| none | Take the head of the free agent queue and start a new cluster (`alloc`). |
| one | Add the pixel to that agent. |
| two or more | The clusters have met. The pixel joins the lowest-indexed match, the *primary*. The scheduler is then held while each other match is merged into the primary. |

A merge takes one clock per stored pixel of the merged agent, plus one more. In each of those
clocks, one stored pixel moves from the merged agent into the primary's FIFO. In the last clock,
the merged agent's record and masks are absorbed: masks are aligned by row, sizes and energies
add, and the earlier seed is kept. The merged agent then goes back to the free queue.

**Closing.** When the first item of row r appears, any open agent whose `row_a` is neither r nor
r-1 can never grow again. It is marked. Marked agents are closed one per clock and their indices
go to the ready queue. So a frame is ended by sending a row whose number is not adjacent to the
last one, for example an empty row two numbers later. A jump of the row number back to 0 at the
next frame has the same effect.

**Limits.** Each limit is reported, never silently ignored:

* **More than 16 pixels.** The agent keeps counting and summing energy, but stores only 16 pixels
  and sets `overflow` in the record.
* **More than 31 pixels.** The size saturates at 31. The energy sum saturates at 2^13-1.
* **No free agent.** If some agent is closed or closing, it will be read out and freed, so the
  pixel waits (`ev_stall`). If all eight agents hold open clusters, the pixel is dropped
  (`ev_pix_lost`).

### Output

For each finished cluster, `dce2_dout_queue` first sends a static record on the `st_*` port. It
then sends the cluster's stored pixels, oldest first, on the `px_*` port. `px_last` marks the
final pixel. Both ports use valid/ready handshakes. The agent is freed after the last pixel. Output
order is the order in which clusters closed.

| Word | Fields (MSB to LSB) | Bits |
|---|---|---|
| `cluster_info_t` | `seed_row[10]`, `seed_col[6]`, `size[5]`, `energy[13]`, `overflow[1]` | 35 |
| `out_pix_t` | `drow[5]`, `col[6]`, `adc[8]` | 19 |

The seed is the first pixel of the cluster in raster order. `drow` is the pixel's row minus the
seed row.

Timing: one clock to fetch an agent from the ready queue, then the record, then one pixel per
clock.

## Test chip

The test chip is pad-limited. Only the 8-channel input, the two output ports and JTAG have pins.
JTAG is oversampled by the core clock: TCK is synchronised and its edges become one-clock enables,
so the whole chip uses one clock. `clk` must be at least 4 × TCK. All chains shift LSB first.

| IR | Chain | Shifted word (MSB to LSB) | Capture | Update |
|---|---|---|---|---|
| `1` | IDCODE | 32 bits | `0x0DCE2001` | – |
| `2` | in chain | `ext_adc[8×8]`, `ctrl[17]` | current 8-channel input and control word | sets the control word |
| `3` | in mem chain | `data[512]`, `addr[5]`, `wr` | pattern row at the last `addr` | writes `data` to `addr` if `wr` |
| `4` | in pattern chain | `row_num[10]`, `row_adc[512]` | last row given to the core | – |
| `5` | core output chain | `record[35]`, `last+pixel[20]`, `clusters[16]`, `rows lost[8]`, `pixels lost[8]`, `merges[8]`, `stall clocks[8]` | last output words and saturating event counters | – |
| `6` | out mem chain | `dropped`, `count[7]`, `word[36]`, `addr[6]` | spy word at `addr` and fill state | sets `addr` |
| `F` | BYPASS | 1 bit | 0 | – |

To read a pattern-memory row or a spy word, scan once to set the address and once more to capture
the data.

The control word `ctrl_t` has these fields, MSB to LSB:

| Field | Bits | Meaning |
|---|---|---|
| `run` | 1 | enables the generator; a rising edge starts a pass |
| `src_mem` | 1 | 1 = rows come from the pattern memory |
| `loop` | 1 | replay the pattern continuously |
| `last` | 5 | index of the last pattern row |
| `grp_en` | 8 | channel groups the 8-channel input is copied into |
| `spy_clr` | 1 | empties the spy memory |

The pattern generator has two sources:

* **Pattern memory.** It replays rows 0..`last` of the 32 × 512-bit pattern memory, one row every
  `ROW_CLK_RATIO` clocks. Each row is numbered with its memory index. A single pass ends with an
  empty row numbered `last+2`, which completes every open cluster, and then raises `pg_done`.
* **8-channel input.** The eight input channels are copied into every group of eight core channels
  whose `grp_en` bit is set.

The spy memory records every record and pixel word accepted on the output pins, tagged 1 for a
record and 0 for a pixel. It holds 64 words, then stops and sets `dropped`.

Not part of this RTL: the LVDS transmitter that shared the die (a separate analog design), a PLL,
and the pad ring. The top-level ports stand for the pads, and the core clock is an input.

## Where this departs from, or adds to, the published design

* These parts are this implementation's own reading, because the original leaves them open:
  * the two-row mask scheme, the lowest-index priority and the merge procedure;
  * the close rule, and the stall-or-drop rule when agents run out;
  * the overflow behaviour beyond 16 pixels.
* The original lists "adapted relative address coding" as a future improvement. Here pixels carry
  a relative row and an absolute column.
* The original test chip's chain contents, instruction codes, memory sizes and the mapping of
  8 input channels to 64 core channels are not published. The ones here are own choices.
* The test chip runs JTAG oversampled on the core clock rather than on a separate TCK domain.
* The original design runs at 500 MHz in an ARM standard-cell library. No timing closure or area
  figure has been established for this RTL.
* ADC width (8 bits) and row-number width (10 bits) are assumptions.
* The original calls the scheme lossless when the parameters are well chosen. At the default
  parameters this core reports rare losses under a synthetic 5 % load (see `tb_dce2_occupancy`
  below). Every loss is reported; none is silent.

## Files

| File | Content |
|---|---|
| `rtl/dce2_pkg.sv`, `rtl/dce2_jtag_pkg.sv` | sizes, record types, instruction codes, control word |
| `rtl/dce2_core.sv` | core top level |
| `rtl/dce2_din_fifo.sv`, `rtl/dce2_input_sched.sv`, `rtl/dce2_tree_sel.sv` | input side |
| `rtl/dce2_cluster_ctrl.sv`, `rtl/dce2_agent.sv`, `rtl/dce2_agent_queue.sv` | clustering |
| `rtl/dce2_dout_queue.sv` | readout |
| `rtl/dce2_testchip.sv` | test chip top level |
| `rtl/dce2_jtag_tap.sv`, `rtl/dce2_scan_reg.sv`, `rtl/dce2_dpram.sv`, `rtl/dce2_pattern_gen.sv`, `rtl/dce2_spy_mem.sv` | test chip blocks |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dce2_occupancy.sv` | the core under a 5 % occupancy load |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each one has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_dce2_testchip \
          rtl/dce2_pkg.sv rtl/dce2_jtag_pkg.sv tb/tb_dce2_testchip.sv
./obj_dir/Vtb_dce2_testchip
```

Replace the testbench name to run any other one. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/dce2_pkg.sv rtl/dce2_jtag_pkg.sv rtl/<module>.sv`.

What the testbenches establish:

* **`tb_dce2_core`** computes a reference clustering of each frame by flood fill and compares
  every output cluster with it: seed, size, energy, overflow and each stored pixel. It uses
  directed frames and random frames at 3 % occupancy, under random output back-pressure. Its
  directed frames make each of these happen: a U-shaped cluster whose arms merge, a 24-pixel
  cluster (overflow), nine clusters in one row (a lost pixel), readout held off (a stall), and
  11 hits per row (lost rows). It also checks that 10 hits per row at the default clock ratio lose
  nothing.
* **`tb_dce2_testchip`** drives the chip through its pins at the default sizes. It loads a frame
  over JTAG, replays it, and compares the output with the reference clustering and with the spy
  memory contents read back over JTAG. It then forces stalls, lost pixels and lost rows and reads
  their counters from the output chain. It then checks the 8-channel input path, replays a
  pattern in loop mode (one cluster per pass, about 70 passes), and checks the bypass register.
  Each mechanism is counted: bypass, overflow, merge, stall, lost pixel, lost row and loop pass.
  One that never happens counts as a failure. The run takes about half a minute.
* **`tb_dce2_occupancy`** runs the load the core was sized for, at default sizes. Each frame is
  filled to 5 % with random groups of 1 to 5 touching pixels, with at most 19 hits in a row. It
  sends 30 frames of 40 rows with the receiver always ready. Every frame in which the core
  reported no loss must come out exactly as the reference. Across three seeds, 1 to 5 of 3840
  pixels (about 0.1 %) and 1 to 2 of 1200 rows were lost, each one reported by an event. A pixel is lost when more than eight groups are open at once. A row is
  lost when rows of 11 to 13 hits meet merge stalls, or meet stalls while waiting for readout.
  A trial with `DDEP` = 2 still lost a row on one of three seeds. The run also prints the output volume.
  With the record format used here, about 35 bits per cluster plus 19 per pixel, output is about
  25 % larger than sending each hit alone as 24 bits. The gain of the clustered format is that
  the clusters are already found. Bit savings would need the denser address coding that the
  original lists as future work.
* The **unit testbenches** compare each block with a model. Where a rate applies, they check it:
  one pixel per clock out of the scheduler and out of the readout, and row spacing in the pattern
  generator.

Warnings that Verilator's `-Wall` lint leaves are deliberate:

* unused bits of status records;
* unused update outputs of observe-only chains;
* the reset used both asynchronously and in assertion disable clauses;
* when `dce2_tree_sel` is linted on its own, Verilator reports its sub-tree outputs as undriven,
  because it does not expand a recursive module that is the top. Inside the core they are driven.
