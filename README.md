# H.264/AVC HP@L4.2 codec video subsystem: pipeline control and memory plane

One piece of hardware has to both encode and decode 1920x1088 video at
60 frames/s (High Profile, Level 4.2). That is 489,600 macroblocks per
second; at a 266 MHz clock the raw limit is 543 cycles per macroblock, and
after a margin for the header-parsing processor the design target is
**500 cycles per macroblock**. The architecture meets it with two nested
pipelines:

* a **slice-level pipeline**: a RISC processor parses the next slice's
  headers and loads its codec registers while the hardwired codec codes the
  current slice;
* a **macroblock-level pipeline** inside the codec: six stages when
  encoding, four when decoding, each working on a different macroblock and
  all advancing together once per slot of at most 500 cycles.

Most of what makes this work is not in the arithmetic engines. It is in
keeping every stage supplied on time. Reference pictures are pre-buffered
on chip one macroblock ahead, all external-memory traffic goes through one
arbitrated 64-bit AXI port, and the controller holds the stages in lock-step.
This RTL implements that control and memory plane. It also includes three
sub-modules: the encoder's colour-correction step, the motion vector
predictor (MVP), and the transform and quantisation unit (TNQ) with its
4x4, 8x8 and DC transforms. The motion-estimation, reconstruction,
deblocking and entropy engines attach through ports; they are not in this
RTL (see "What is outside the RTL").

All code is SystemVerilog-2017, synthesizable, with an asynchronous
active-low reset `rst_n` on every flip-flop.

## The two pipelines

### Slice level (`slice_pipe_ctrl`)

The RISC writes a **shadow register bank** through a simple write port
(`reg_we`, `reg_addr[2:0]`, `reg_wdata[31:0]`):

| addr | register  | contents |
|------|-----------|----------|
| 0    | CTRL      | bit 0 mode (0 encode, 1 decode), bits 2:1 slice type (I/P/B), bits 8:3 QP, bits 10:9 number of reference pictures (0-2) |
| 1    | FIRST_MB  | raster index of the slice's first macroblock |
| 2    | NUM_MBS   | macroblocks in the slice |
| 3    | CUR_BASE  | current (source) picture base address, encoder |
| 4, 5 | REF_BASE0/1 | reference picture base addresses |
| 6    | REC_BASE  | reconstructed picture base address |
| 7    | COMMIT    | any write closes the shadow bank |

A committed bank is copied to the **active bank** as soon as the coding side
is free, and coding starts one cycle later. Either side can stall the
other:
* After COMMIT, while the previous slice is still coding, the shadow bank is
  full. `reg_stall` is high and further writes are refused and counted. This
  is the parser waiting for the coder.
* While no bank is committed, the coder idles. This is the coder waiting for
  the parser.

Both stalls are counted (`parse_stall_cycles`, `code_idle_cycles`).

### Macroblock level (`mb_pipe_ctrl`)

| stage | encoder | decoder |
|-------|---------|---------|
| 1 | SDMA | SDMA + ENT |
| 2 | IPME (with rate control) | MCR |
| 3 | SPMES (with intra mode derivation) | RECON (INTD, TNQ, MCP) |
| 4 | SPMEM (CC, mode decision, MC) | DEBLK |
| 5 | RECON (INTD, TNQ, MVP) | |
| 6 | DEBLK + ENT | |

Time is divided into **slots**. In slot k, stage s holds macroblock
`FIRST_MB + k - s` if that macroblock belongs to the slice. At the start of a
slot every occupied stage gets a one-cycle `stage_start` and its macroblock
number. The slot ends when every occupied stage has raised `stage_done`. A
stage that finishes early waits for the slowest one; those waiting cycles
are counted as `stall_cycles`.

A slice of N macroblocks takes N + depth - 1 slots. The depth is 6 or 4 and
is chosen from the slice's mode bit. This is how one set of hardware is
rearranged for encoding or decoding, and a change of mode between slices
needs nothing more. Slots longer than the 500-cycle budget are counted in
`overrun_slots`. `buf_sel` toggles every slot and selects the half of a
double-buffered stage buffer that a stage writes, while the next stage reads
the other half.

`top_ctrl` joins the two levels: the macroblock pipeline's `done` ends the
slice in the slice pipeline, and the active bank feeds the mode, the first
macroblock and the count.

### When a stage counts as done (`h264_video_top`)

Most stages are done when their external engine says so. Two stages combine
several parts:
* **Stage 1** is done when SDMA has finished. When decoding, it also needs
  ENT (`ext_stage_done[0]`).
* **Stage 4** of an encoder P or B slice also waits for the colour
  correction result.

Parts that finish at different times are remembered until the whole stage
completes.

## Getting reference data on chip: SDMA and the RCB band

This is the least obvious part of the design. Motion estimation and
compensation read reference pictures many times over, so fetching from
DRAM on demand would swamp the bus and stall the pipeline. Instead, reference
data is **pre-buffered one macroblock ahead**, so a stage never waits for it.

**Search range.** Motion vectors reach -2048.75..+2047.75 pixels
horizontally and -56.75..+55.75 pixels vertically, with up to two reference
pictures.
* Horizontally, the range exceeds the 1920-pixel width, so a reference row is
  always needed across its full width.
* Vertically, a 16x16 block at macroblock row r displaced by the full range,
  plus the 6-tap interpolation filter's 2 pixels above and 3 below, spans
  pixel rows 16r-59 to 16r+74. That fits in **macroblock rows r-4 to r+4**,
  which cover 16r-64 to 16r+79.

**The band (`rcb`).** The reference cache-buffer keeps, for each reference,
`WIN_ROWS = 11` complete macroblock rows stored circularly (row r in slot
r mod 11), 120 macroblocks per row.
* Each macroblock is 48 words of 64 bits, the 384 bytes of a 4:2:0
  macroblock.
* The total is 11 x 120 x 2 x 384 bytes, about 1 Mbyte (8.1 Mbit).
* Every entry carries a tag (its picture row) and a valid bit, so a read
  reports a **hit** or a **miss**.

The 11 rows are:
* nine for the search band;
* one being filled for the next macroblock row;
* one still needed by macroblocks of the previous row that are in later
  pipeline stages (SPMEM of macroblock m-2 can still be on row r-1).

There are three read ports (IPME, SPMES, SPMEM when encoding; MCR when
decoding). Each returns the word and the hit flag one cycle after the
request.

**The schedule (`sdma`).**
* At the first macroblock (r, c) of a slice, SDMA has RCB **preload** rows
  r-4..r+4 of every active reference completely, plus row r+5 up to column c.
* After that, in every slot, SDMA has RCB **prefetch** exactly one
  macroblock per reference: (r+5, c). Row r+5 is therefore complete by the
  time the pipeline reaches row r+1, and the band slides down one row per
  row of the picture.
* Rows outside the picture are skipped. I slices fetch no reference data.
* When encoding, SDMA also loads the current macroblock (one 48-beat burst
  through BAM) and streams it out on `cur_valid/cur_word/cur_data` towards
  IPME.

**Cost.**
* In steady state, SDMA's stage-1 work with two references takes about 160
  cycles per macroblock at full size: two 48-beat fills plus the current
  macroblock.
* The preload at the start of a slice is much larger. A mid-picture slice
  with two references preloads about 2,400 macroblocks, which takes about
  127,000 cycles. That first slot always overruns the budget, and
  `overrun_slots` shows it.
* RCB is flushed at the first macroblock of every slice, so data from an
  earlier picture can never be mistaken for the new reference.

A reader that misses (a vector outside the band) must fetch directly from
external memory through BAM. In the decoder that is MCR's job.

## Memory traffic: BAM and BAP

External memory holds each picture as 512-byte slots, one per macroblock,
in raster order: `address = base + (row*120 + col)*512`. Every macroblock
transfer is one 48-beat burst that stays inside its slot and never crosses
a 4 KB boundary.

* **BAM** (`bam`, 4 clients: SDMA, MCR, DEBLK, ENT) passes one burst at a
  time downstream. Arbitration is round-robin: the search starts after the
  last client served, so no module can starve another.
* **BAP** (`bap`) is the AXI4 master on the 64-bit bus. It has two clients,
  RCB fills and BAM, and alternates between them when both wait.
  * Each request becomes an INCR burst with 8-byte beats: AR then R, or AW
    then W then B.
  * One burst is outstanding at a time.
  * The master has no IDs and ignores the response codes.

The client protocol is the same at both levels:
* `req_valid/req` are held until `req_ready`.
* Write data is presented continuously and taken while `wready` is high.
* Read beats arrive with `rvalid` and must be taken in that cycle.
* `done` pulses at the end of the burst.

Assertions check AXI address stability, the 4 KB rule and RLAST timing.

## Colour correction (`color_corr`)

Motion estimation searches on luma only. It can therefore pick a reference
block whose luma matches the current macroblock while its colour does not.
The colour error then lands in the chroma residual. The correction runs after
motion estimation, in stage 4 of the encoder, in three steps:

1. **Colour space conversion.** Each 4:2:0 sample group (a 2x2 luma block
   with its Cb and Cr) of the original and the predicted macroblock is
   converted to RGB. The BT.601 weights are scaled by 256: R = Y + 359 V,
   G = Y - 88 U - 183 V, B = Y + 454 U.
2. **Colour difference measure.** For each group the unit computes
   `|dR| + |dG| + |dB| - 3|dY|`, floored at 0 and scaled back to sample
   units. A pure luma difference moves R, G and B equally and cancels out, so
   what remains is colour error that the luma search could not see. The 64
   groups are summed into `color_dist`.
3. **Adjustment.** If `color_dist >= THRESH` (1024), the macroblock QP is
   lowered by `dqp = min(MAX_DQP, 1 + ((color_dist - THRESH) >> STEP_SHIFT))`,
   with `MAX_DQP = 6` and `STEP_SHIFT = 9`. The QP is floored at 0. A finer
   QP keeps more of the chroma residual.

The unit takes one group per cycle, and `done` comes 4 cycles after the last
group.

The three steps are the architecture's. The colour space, the measure and
all three constants are this design's choices and should be tuned against
picture quality. The architecture also shows the adjustment acting on chroma
coefficients, while another description of it names an MBQP change.
Lowering MBQP is how this RTL adjusts the chroma coefficients.

## Motion vector predictor (`mvp`)

An inter partition's motion vector is coded as a difference from a
predictor built from its neighbours. The neighbours are A (left), B (above),
C (above right) and D (above left). D replaces C when C is unavailable. The
unit applies the H.264 rules in order:

1. directional prediction for 16x8 and 8x16 partitions;
2. A alone when B and C are both unavailable;
3. the one neighbour with the same reference picture, if there is exactly
   one;
4. otherwise the median of each component.

The result comes one cycle after the request, and one request can be taken
every cycle. IPME supplies its intermediate vectors as neighbours, because
the final vectors of the neighbouring macroblocks are not ready when it
needs them.

## Transform and quantisation (`tnq`)

TNQ computes the standard H.264 4x4 integer path in two registered stages:

* **Cycle 1:** forward transform `Cf X Cf^T`, then quantisation with the MF
  table. The rounding offset is 1/3 for intra and 1/6 for inter. The levels
  come out here.
* **Cycle 2:** dequantisation with the V table and `<< QP/6`, then the
  inverse butterfly on rows and columns and `(x + 32) >> 6`. The result is
  clipped to 10 bits signed and comes out as the reconstructed residual.

In decode mode (`dec_mode`), levels from the entropy decoder replace the
forward half. One block goes in per cycle.

High Profile 8x8 blocks have their own port (`blk8_*` with `res8_in` or
`lvl8_in`) and the same two stages:

* **Cycle 1 (`tnq_fq8`):** the forward transform as the exact product
  `M X M^T` with the integer 8x8 matrix (rows 8 8 8 8 8 8 8 8,
  12 10 6 3 -3 -6 -10 -12, ...). Then quantisation with the MF8 table, with
  the `/64` of the transform folded into the shift `22 + QP/6`. The standard
  leaves MF8 to the encoder. The values used here satisfy
  `MF8 V8 ~ 2^24 / (n_i n_j)`, where `n` are the squared row norms of `M/8`;
  that is what makes QP 0 rebuild the input.
* **Cycle 2 (`tnq_idct8`):** dequantisation with the 8x8 norm table and a
  flat scaling matrix, as `(Z V8 << QP/6 + 2) >> 2`. Then the standard
  8-point butterfly on rows and columns and `(x + 32) >> 6`. The result is
  clipped like the 4x4 path.

The DC coefficients of an Intra16x16 luma macroblock (16 of them) and of
each chroma component (4) go through a second, Hadamard, transform. The
`tnq_dc` helper does it on the `dc_*` port in two registered stages, like
the 4x4 path:

* **Cycle 1:** `(H W H) >> 1` for luma, or `H2 W H2` for chroma. Then
  quantisation with twice the rounding offset and one more bit of shift.
* **Cycle 2:** the inverse Hadamard and dequantisation with the (0,0) scale.
  For luma this is `(F V0 << QP/6 + 2) >> 2`; for chroma,
  `(F V0 << QP/6) >> 1`.

The resulting DC values replace the dequantised DC of each 4x4 block before
its inverse transform. The caller supplies the chroma QP for chroma sets.
Scaling matrices other than the flat one are not supported.

## What is outside the RTL

The document names the arithmetic engines and gives their jobs in one line
each; how they work comes from the H.264 standard, not from this
architecture. Those engines are IPME, SPMES, SPMEM, MCR, RECON, DEBLK and
ENT, together with RC, INTE, MD, INTD and MCP inside them. The engines
connect to
`h264_video_top` through:

* `ext_stage_start/active/mb[6]` and `ext_stage_done[6]`, one set per stage,
  numbered as in the table above;
* `rcb_rd_*`: three cache read ports;
* `mem_*`: three BAM client ports (0 MCR, 1 DEBLK, 2 ENT);
* `cur_*`: the current macroblock from SDMA;
* `cc_*`: the colour-correction sample stream and its result. `cc_mbqp_in`
  is the macroblock QP from rate control.
* `mvp_*`: the predictor request port;
* `tnq_*`: the TNQ block ports used by RECON (4x4, DC set, 8x8).

Also outside: the RISC, whose register port is a top-level input; the AXI
bus fabric, DRAM controller and DRAM, behind the `m_axi_*` master port; the
audio and transport-stream subsystems; and the entropy accelerator. The last
exchanges data with the video subsystem through external memory, through
ENT's BAM port.

## Files

| file | contents |
|------|----------|
| `rtl/codec_pkg.sv` | constants (picture size, budget, stage counts, bus width), slice register and bus request types, macroblock address function |
| `rtl/slice_pipe_ctrl.sv` | slice pipeline, codec register bank |
| `rtl/mb_pipe_ctrl.sv` | macroblock slot sequencer |
| `rtl/top_ctrl.sv` | TOP: both pipelines joined |
| `rtl/sdma.sv` | stage-1 reference scheduling and current-MB load |
| `rtl/rcb.sv` | reference band buffer |
| `rtl/bam.sv`, `rtl/bap.sv` | memory arbitration and AXI master |
| `rtl/color_corr.sv` | colour correction |
| `rtl/mvp.sv` | motion vector predictor |
| `rtl/tnq.sv` | 4x4 transform, quantisation and their inverses |
| `rtl/tnq_fq8.sv` | forward 8x8 transform and quantisation |
| `rtl/tnq_idct8.sv` | 8x8 dequantisation and inverse transform |
| `rtl/tnq_dc.sv` | luma and chroma DC transforms |
| `rtl/h264_video_top.sv` | the video subsystem |
| `tb/axi_mem_model.sv` | behavioural AXI slave memory (unwritten words read as a fixed address pattern; optional random wait states) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run as a failure. With Verilator 5:

```
verilator --binary --timing rtl/codec_pkg.sv $(ls rtl/*.sv | grep -v codec_pkg) \
    tb/axi_mem_model.sv tb/tb_h264_video_top.sv --top-module tb_h264_video_top
./obj_dir/Vtb_h264_video_top
```

Replace the last testbench and top name to run another one. The package
must come first.

`tb_h264_video_top` runs the whole subsystem at its default full size
(120x68 macroblocks). Behavioural models stand in for the missing engines,
and a RISC model programs five slices:

| slice | mode | type | macroblocks | references | note |
|-------|------|------|-------------|------------|------|
| S1 | encode | I | 8 | 0 | |
| S2 | encode | P | 8 | 2 | crosses a macroblock row |
| S3 | decode | P | 8 | 1 | reference is S2's reconstruction |
| S4 | encode | B | 10 | 2 | one deliberately slow macroblock |
| S5 | decode | I | 6 | 0 | |

The testbench checks:
* the macroblock order in each stage and the slot count per slice;
* the 500-cycle budget in every slot that holds neither a preload nor the
  slow macroblock (the longest such slot was 424 cycles);
* the fill counts against the band formula;
* every cache and bus data word, including data read back that an earlier
  slice wrote;
* the colour-correction verdicts;
* the MVP results;
* the TNQ levels and residuals for one 4x4 block, one 8x8 block and one
  DC set per macroblock.

It also requires each mechanism to happen at least once: both stalls, the
refused write, macroblock stalls, overruns, both mode switches, preload,
prefetch, hits, misses, BAM and BAP contention, correction applied and not
applied, the MCR direct fetch, MVP predictions, and TNQ 4x4 blocks, 8x8
blocks and DC sets. It runs in well under a second.

The module testbenches cover more corner cases:
* round-robin order and client alternation under random AXI wait states;
* tag aliasing in the band;
* the preload at full size (rows at the picture edges are skipped);
* empty slices;
* the colour unit against an integer reference model;
* every MVP rule, plus 3000 random partitions against a model written the
  way the standard states the rules;
* TNQ against a matrix-product reference model: 800 random blocks over all
  QPs, in both encode and decode mode, issued one per cycle;
* the 8x8 path: the forward half against the integer matrix product, and the
  inverse against the standard's equations, with 300 random blocks each way
  over all QPs and the QP 0 round trip within 1;
* the DC transforms against Hadamard matrix products: 800 luma and chroma
  sets in both modes.

## Trust and limits

* The MVP and TNQ testbench models are written from the same standard rules
  as the RTL. A misreading common to both would not be caught. The
  independent checks are the QP 0 round trips of TNQ (4x4 and 8x8) and the
  hand-worked MVP cases.
* The stage grouping, the 500-cycle slot, the two-level pipeline, the
  stalls, the module set and the 64-bit AXI bus follow the architecture.
  Register map, handshakes, arbitration policies, band size, memory layout
  and the colour formulas are this design's own and are marked as such in
  each file's header.
* The stage timings in the end-to-end test come from behavioural models,
  not real engines. Published profiles put every encoder stage at or below
  488 cycles and every decoder stage at or below 340, inside the slot.
  SDMA's own steady-state work measured here is about 160 cycles.
* The slice-start preload is far longer than one slot, so the first slot of
  every inter slice overruns. A real system would preload during the
  previous slice, or accept the overrun against the per-picture margin.
  This RTL simply lets the slot run long.
* The band keeps two references of 120 columns. A different picture width
  changes `MB_COLS`; the vertical band depth (`WIN_ROWS`) follows the
  vertical search range.
* `SYNCASYNCNET` lint warnings come from assertions that use
  `disable iff (!rst_n)` next to flops with asynchronous reset. They are
  harmless.
