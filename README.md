# A memory-lean HEVC intra (I-frame) decoder core

In an HEVC intra decoder, most of the on-chip SRAM is not used for
arithmetic. It goes to line buffers that span the whole frame width:

- The intra predictor keeps the unfiltered bottom row of the macroblock row
  above, for its top reference samples.
- The deblocking filter keeps the last four rows of that macroblock row, to
  filter the horizontal edge between the two macroblock rows.

At 1920 pixels these buffers take about 9.5 KB. At 7680 pixels they take four
times as much.

This core removes most of that memory with two ideas:

1. **One shared line.** The deblocking filter's fourth row (the one next to
   the edge, still unfiltered in the vertical direction) is the same row the
   intra predictor keeps. So one frame-wide line (*B*) serves both users. A
   small repair step, *data recovery*, re-applies the vertical-edge filtering
   that this row missed.
2. **A predicted cache for the other three rows.** The remaining three
   deblocking rows (*A*) go to a small SRAM, one 12-byte segment per
   4 columns. Only segments whose edge below is *predicted* to be filtered
   are kept on chip. All others go to external memory. When the next
   macroblock row arrives:
   - a cached segment is a **hit**;
   - an uncached segment that the true decision needs is a **miss**, which
     fetches it from external memory;
   - an uncached segment that the filter does not need is a **skip**, which
     costs no traffic at all.

   The SRAM holds 1/`REDUCTION` (default 1/8) of the segments.

Throughput comes from **wavefront parallel processing (WPP)**:

- Four lanes decode four macroblock rows at once, each row two macroblocks
  behind the row above.
- The lanes share **one** inverse transform coder.

With the default `FRAME_WIDTH=7680`, the on-chip line memory is:

- 7680 B for the shared line;
- 2880 B for the cache (240 slots of 12 B);
- the tags and the decision line.

At 1920 pixels the pixel SRAM is 1920 + 720 = 2640 B, about 2.6 KB.

The core covers intra prediction, the inverse transform, deblocking and the
adaptive loop filter (ALF). It does not contain the following; their inputs
are ports of the top:

- entropy decoding;
- inverse quantisation;
- reference-sample selection;
- SAO;
- the macroblock-level sequencing that feeds deblocking and ALF from the stage
  buffers.

## Top level: `hevc_iframe_dec`

```
 TU stream (per lane) ──► decode_lane ×4 ──► pingpong_buf ×4 ──► (stage reader, port)
                            │   ▲
                 coefficients│   │residuals
                            ▼   │
                          it_share ── inv_transform ── it_unit8 ×4 ── idct4_pe
                                        (one for all lanes)
 wpp_scheduler ── mb_start/mb_done per lane

 last lane bottom row ─► shared_line_buffer (*B) ◄─ deblocking port (stalls on conflict)
                              └──► first lane reference reads

 per lane: df_edge_detect ─► df_filter4        alf_4x4
 last lane pred_on ─► pred_cache (*A) ◄─ first lane true decision ;  ext_* = external memory
 last lane vertical-edge decisions ─► df_recovery ─► re-filtered *B row
```

Parameters, with their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `LANES` | 4 | Number of WPP lanes |
| `FRAME_WIDTH` | 7680 | Frame width in pixels. Must be a multiple of 16. |
| `FRAME_HEIGHT` | 4320 | Frame height in pixels |
| `REDUCTION` | 8 | Cache slots = `FRAME_WIDTH/4/REDUCTION` |

Every unit that has no internal sequencing in this core has its own ports at
the top. This covers the deblocking units of each lane (`df_*`), the cache
(`pc_*`, `ext_*`), recovery (`rc_*`), ALF (`alf_*`) and the stage-buffer read
side (`pp_rd_*`).

There are two fixed couplings between lanes:

- **Cache store.** The cache's store prediction is the **last** lane's edge
  decision (`df_out_pred[LANES-1]`). Its load need is the **first** lane's
  decision (`df_out_dec[0].mode != DF_OFF`). The last lane decodes the row
  just above the first lane's next row.
- **Line buffer writes.** The line buffer is written by the last lane's
  reconstruction whenever a transform unit arrives with `tu_lb_store` set.
  The write address is `tu_lb_addr`, latched when the unit is accepted.

## Lanes and the shared transform coder

### `decode_lane`

Each lane takes one 4x4 transform unit at a time. A unit is:

- 16 coefficients;
- the intra mode;
- the luma/chroma flag;
- the DST flag (4x4 luma intra in HEVC);
- the 17 reference samples;
- the position `tu_blk` (0–15) inside the 16x16 macroblock.

The lane then works through these steps:

1. **REQ**: offers the coefficients to the shared transform.
2. **WAIT**: waits for the residual.
3. **PRED**: runs the intra predictor (5 cycles).
4. **WRITE**: shows the 16 reconstructed pixels on `rec_*` and writes them as
   four 32-bit words to stage-buffer address `4*tu_blk + row`.

`tu_last` commits the bank.

A unit takes about 15–16 cycles. A 16-unit macroblock measured at most 254
cycles in simulation.

### `it_share` and `inv_transform`

- **`it_share`** arbitrates the lanes round-robin. It tags each block with its
  lane and routes the residual back by tag. `conflicts` counts the cycles in
  which a request waits.
- **`inv_transform`** holds one whole block in a block register. It runs four
  1-D units twice:
  - first over the columns, then shift 7 and clip to 16 bits;
  - then over the rows, fed back from the block register, then shift 12.

  A 4x4 block needs one cycle per pass. An 8x8 block needs two per pass.
  Results come out 3 (4x4) or 5 (8x8) edges after acceptance. 4x4 blocks
  stream at one per 3 cycles, so a shared coder serves four lanes that each
  need one block per ~16 cycles.
- **`it_unit8`** builds the 8-point transform from an even half
  (`idct4_pe`: factors 64, 83, 36) and an odd half (89, 75, 50, 18). It also
  switches to the 4-point DST (`idst4_pe`).

### `wpp_scheduler`

Lane `l` takes rows `l, l+LANES, …`. Macroblock (r, c) may start when either:

- row r−1 has finished column c+1; or
- row r−1 is complete.

`waits` counts the cycles an idle lane is held back.

### `pingpong_buf`

Each lane's stage buffer has two 256-byte banks:

- The producer fills one bank and commits it.
- The consumer reads the committed bank and releases it.
- The producer stalls only while both banks are full.

## Intra prediction: `intra_pred` and `intra_filter_engine`

The predictor computes one line of four pixels per cycle with four filter
engines. Each engine computes `a + ((f*(b-a) + 16) >> 5)`, which is the HEVC
two-tap interpolation written with one multiplier.

- **Angular modes.** Vertical-class modes (18–34) produce rows. Horizontal
  modes (2–17) produce columns from the left samples, used as the main array.
  - Negative angles first project the side array onto positions −1…−4 of
    the main array, using the inverse angle (`(k*invAngle+128)>>8`).
  - The main array has 13 entries, indices −4…8. Reads beyond 8 clamp to the
    last sample.
- **Planar and DC.** These use the same engines, with weights chosen so the
  result equals the standard formulas.
- **Luma-only filters.** Luma gets the DC edge smoothing and the boundary
  filter of the pure vertical (26) and horizontal (10) modes. Chroma
  (`luma=0`) does not.
- **Timing.** With `start` at edge t, lines come at edges t+1…t+4. `done` is
  high after edge t+4, with the predicted and reconstructed pixels.

## Deblocking

### `df_edge_detect`

This unit makes the HEVC luma decisions for one 4-line edge segment:

- β and t<sub>C</sub> from the QP tables (`hevc_pkg::df_beta/df_tc`);
- `d = dp0+dq0+dp3+dq3 < β`;
- the strong/weak choice per line 0 and 3;
- dEp/dEq.

The result is a `df_dec_t` with mode off, weak or strong, dEp, dEq and
t<sub>C</sub>.

It also outputs the **prediction bit** `pred_on = bS≠0 && 2·(dp0+dp3) < β`.
This is an estimate of whether the edge will be filtered, computed from the p
side only. The p side is the one available when the row above is stored, so
the bit can steer the cache before the q side exists.

### `df_filter4`

This unit filters four lines in parallel:

- **Strong filter:** rewrites three samples per side.
- **Weak filter:** changes p0/q0 by Δ, clipped to ±t<sub>C</sub>, when
  |Δ| < 10·t<sub>C</sub>. It changes p1/q1 when dEp/dEq allow it.

Both filters are computed and the decision selects the output. In the top,
each lane registers the decision and the filtered pixels one cycle after
`df_valid`.

## The memory hierarchy of the boundary rows

### `shared_line_buffer` (*B*)

*B* is a single-port RAM of `FRAME_WIDTH/4` words of four pixels.

- The intra port has priority. It carries the last lane's writes and the
  first lane's reference reads.
- A deblocking request waits (`df_gnt` low, counted as a stall) while the
  intra port is busy. So the two never overlap.
- Read data returns one cycle after the grant, with `*_rvalid`.
- An assertion checks that only one port uses the RAM per cycle.

### `pred_cache` (*A*)

The cache has `SEGS = FRAME_WIDTH/4` segments and `SLOTS = SEGS/REDUCTION`
slots of 96 bits (3 rows × 4 pixels).

**Store** (one cycle). When the segment's prediction bit is set and a slot is
free, the lowest free slot takes the segment and the segment's tag records
the slot. Otherwise the segment is written to external memory (`ext_wr_*`).

**Load.** The response, `ld_resp`, is one of three:

- **Hit:** the tag is valid. Data comes from the SRAM one cycle later, and
  the slot is freed at once.
- **Miss:** the tag is invalid and `ld_need` is set. An external read
  (`ext_rd_*`) is issued, its data is forwarded on arrival, and `ld_ready`
  stays low until then.
- **Skip:** the tag is invalid and the segment is not needed. There is no
  traffic.

Counters `n_hit`, `n_miss` and `n_cached` are outputs.

Freeing a slot on its hit keeps the occupancy near the number of predicted
segments in flight. So 1/8 of the width suffices when predictions are
moderately sparse. If the SRAM is full, extra predicted segments go to
external memory and turn into misses.

### `df_recovery`

The *B* row is stored before its vertical edges are deblocked. So when the
deblocking filter reads it back for the horizontal edge, it must first redo
that filtering.

- When the last lane filters a vertical edge that touches the bottom row, it
  saves the decision (one `df_dec_t` per 8 columns).
- On recovery, the row's 8 samples across that edge are filtered again with
  `df_filter4`, one line enabled. The result is registered (one cycle).

## Adaptive loop filter: `alf_4x4`

The HEVC-draft ALF shape has 19 taps: a 7-row vertical line, a 9-column
horizontal line and the 3x3 centre, point-symmetric. It uses 10 coefficients,
with `coef[9]` at the centre. Filtering pixel by pixel reads 19 pixels per
output.

This unit filters a whole 4x4 block at once from a 12x10 window, of which 76
pixels are used. It works like this:

- The window is built from three 4-column chunk registers (left, current,
  right). Each input step shifts in one 10-row chunk.
- Each pixel is read from memory once per block instead of 19 times per
  output pixel.
- Output is `clip((Σ coef·(pair sum) + 128) >> 8)`.
- `alf_on=0` passes the block through.

## Verification

Each block has a self-checking testbench in `tb/`. The reference models are
in `tb/tb_ref_pkg.sv`:

- the transforms as integer matrix products with the standard matrices;
- intra prediction written directly from the HEVC equations;
- the deblocking decisions and filters;
- the ALF tap list.

Testbenches compare the RTL against these models on random and corner-case
inputs, and count checks and failures. Each block was also run with a
deliberately broken copy of its RTL, and its testbench detects the fault.

The end-to-end testbenches drive the top:

- **`tb_hevc_iframe_dec`** uses a reduced frame: 64x128, reduction 2.
- **`tb_hevc_iframe_dec_full`** uses the **default parameters** (7680x4320,
  reduction 8). It decodes the first eight macroblock rows, so each lane
  decodes two full 480-macroblock rows. It then exercises the line buffer,
  the cache and recovery across the full 7680-pixel width. Simulating a whole
  8K frame would take hours, so the full size is covered in width, not
  height.

Both testbenches work in two phases:

1. **Decode.** All lanes decode under the WPP scheduler. Every reconstructed
   block and every stage-buffer word is checked.
2. **Exercise the boundary units.** The testbench then:
   - reads the line buffer through the intra port while the deblocking port
     competes for it;
   - runs deblocking on every lane (off, weak and strong segments);
   - stores segments into the cache from the last lane and loads them with
     the first lane's decisions;
   - recovers *B* pixels with the saved decisions;
   - runs the ALF of every lane.

Each mechanism is counted, and the testbench fails if one never happens. The
mechanisms are WPP waits, transform conflicts, line-buffer stalls, cache
hits, misses and skips, each filter mode, recoveries, ALF blocks and
ping-pong swaps.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/hevc_pkg.sv tb/tb_ref_pkg.sv tb/tb_hevc_iframe_dec.sv \
  --top-module tb_hevc_iframe_dec -Mdir obj && ./obj/Vtb_hevc_iframe_dec
```

Each testbench ends with `TB_RESULT checks=N failures=M`.

## Throughput and memory at a glance

**8K luma.** 7680x4320 at 30 fps is 3.89 M macroblocks/s. Four lanes at
320 MHz allow 329 cycles per macroblock per lane. The 16 luma units of a
macroblock take ≤254 cycles here, so luma fits.

**8K with 4:2:0 chroma.** Chroma adds 8 units per macroblock, for about 384
cycles. At 320 MHz that does **not** fit: it would need about 370 MHz, or
overlapping the prediction of one unit with the transform of the next, which
this lane controller does not do.

**Line memory.** For 1920-wide video (`FRAME_WIDTH=1920`, `REDUCTION=8`) the
pixel SRAM is 1920 B + 60×12 B = 2.6 KB. On top of that come:

- the tags: 480 × 7 bits;
- the recovery decisions: 240 B.

## Where this design departs from the published architecture

- **Intra prediction is 4x4 only.** The 8x8 inverse transform is implemented
  and tested in `inv_transform`, but the lanes issue 4x4 units only. Larger
  prediction blocks are not supported.
- **Chroma:** `intra_pred` handles chroma 4x4 blocks (`luma=0`), but nothing
  in the core schedules chroma.
- **Transform throughput.** The engines and the feedback path follow the
  published four-engine structure. The block register and the
  one-pass-per-cycle timing (2 cycles of compute per 4x4 block) are this
  design's.
- **Fast 4x4 DST.** It uses 8 multiplications; the published version uses 9.
  The results are identical.
- **One stage buffer per lane.** The published pipeline has a double
  256-byte buffer between every pair of stages, 40 KB in all. Here only the
  buffer after reconstruction exists.
- **No macroblock-level deblocking/ALF sequencing.** The hybrid filtering
  order inside a macroblock is not built. The control that reads the stage
  buffers, runs vertical then horizontal edges, and feeds the ALF is left
  out. The deblocking, cache, recovery and ALF units are complete and are
  driven through the top's ports.
- **Own choices where the architecture gives none:**
  - the line buffer's fixed intra priority;
  - lowest-free-slot allocation and freeing a slot on its hit;
  - the recovery decision line (one byte-sized decision per 8 columns);
  - the ALF coefficient precision (8 fractional bits) and the chunk
    interface;
  - all valid/ready and start/done handshakes.

## Files

| File | Contents |
|---|---|
| `rtl/hevc_pkg.sv` | Types, the `df_dec_t` decision, clipping helpers, the intraPredAngle/invAngle tables, and the β and t<sub>C</sub> functions |
| `rtl/idct4_pe.sv`, `rtl/idst4_pe.sv`, `rtl/it_unit8.sv` | 1-D transform units |
| `rtl/inv_transform.sv`, `rtl/it_share.sv` | The 2-D transform coder and its lane arbiter |
| `rtl/intra_filter_engine.sv`, `rtl/intra_pred.sv` | Intra prediction |
| `rtl/df_edge_detect.sv`, `rtl/df_filter4.sv` | Deblocking decisions and filters |
| `rtl/shared_line_buffer.sv`, `rtl/pred_cache.sv`, `rtl/df_recovery.sv` | The boundary-row memory hierarchy |
| `rtl/alf_4x4.sv` | Adaptive loop filter |
| `rtl/pingpong_buf.sv`, `rtl/decode_lane.sv`, `rtl/wpp_scheduler.sv` | Lane pipeline and scheduling |
| `rtl/hevc_iframe_dec.sv` | Top level |
| `tb/tb_*.sv` | One testbench per block, the two end-to-end testbenches, and `tb_ref_pkg.sv` (the models) |
