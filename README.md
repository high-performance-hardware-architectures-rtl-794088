# IBC and palette coding hardware for HEVC screen content coding

Screen content (desktops, consoles, maps, slides, animation) repeats itself inside a
picture and uses few distinct colours. The HEVC screen content extension has two tools
for this. **Intra block copy (IBC)** predicts a block from an already coded area of the
same picture, pointed to by a *block vector* (BV). **Palette coding (PLT)** codes a block
as a small colour table plus one index per pixel. In a software encoder both tools use
searches and loops that depend on the previous block's reconstruction. That makes them
hard to run in real time.

This RTL follows a published architecture aimed at 1080p at 30 frames/s, about 0.45
pixels per clock. Its main idea is to move as much work as possible out of the
reconstruction feedback loop:

* **IBC is split in two.** The *estimation stage* searches on original samples. It has no
  feedback, so it can run ahead of the encoder. It delivers a short list of candidate
  vectors per CU. The *high throughput stage* is inside the loop. It only builds and
  scores the few predictions on that list, from reconstructed samples in DRAM.
* **Palette is split in three.** *Clustering* of raw pixels runs outside the loop. The
  *CU coders* build the palette, map the pixels and code the index runs inside the loop;
  they are pipelined for latency. The *entropy coding* afterwards needs no feedback. It is
  not part of this RTL.

Everything is written in synthesizable SystemVerilog-2017. Shared types live in
`rtl/scc_pkg.sv`. The top level `scc_top` places the three units, and the block vector
candidate unit `mv_candidate`, side by side. The
encoder control, the RD decision, the DRAMs and the palette entropy coder connect through
its ports.

```
            original samples                      reconstructed samples (DRAM)
                   |                                          ^      |
   +---------------v----------------+   lists   +-------------+------v-----------+
   | ibc_estimation                 |  ------>  | ibc_ht_stage                   |
   |  local_search (1-D, 2-D)       | (encoder  |  main controller + cfg FIFO    |
   |  hash_calc / hash_table_ctrl   |  control) |  ref_cache -> loader           |
   |  bv_valid_check, best_list     |           |  residual_generator -> RDOQ    |
   |  combine_lists -> out FIFO     |           |  write_to_ddr, ctu_tracker     |
   +--------------------------------+           +--------------------------------+

   +------------------------------------------------------------------------------+
   | plt_unit:  plt_clustering -> 8x8 plt_cu_coder    16x16 coder   32x32 coder   |
   |            plt_controller (palette predictor of each coder, RD update)       |
   |   plt_cu_coder: plt_entry_mapper -> plt_sorter -> plt_pixel_mapper           |
   |                 -> plt_index_coder                                           |
   +------------------------------------------------------------------------------+

   +------------------------------------------------------------------------------+
   | mv_candidate: mode/vector line buffer + left column buffer -> 2 candidates   |
   +------------------------------------------------------------------------------+
```

## IBC estimation stage (`ibc_estimation`)

The stage is driven by configuration packets in a FIFO, with three operations:

| op | meaning |
|----|---------|
| 0  | start of frame: the hash table's fill counters are cleared (8192 cycles) |
| 1  | estimate one 8x8 CU at `ctu + (cu_x, cu_y)` |
| 2  | CTU finished: hash its 64 8x8 blocks and insert them into the table |

For a CU, the local search and the hash search run at the same time. Their two sorted
lists of K=4 candidates are merged by `combine_lists` (lowest cost first, duplicates
dropped). The merged list (`cand_list_t`: CU position plus four `{valid, bv, cost}`)
goes to the output FIFO. The cost is the 8x8 luma SAD on original samples.

### Local search (`local_search`)

The search window holds the original samples of the CTU to the left and of the current
CTU (64x128 samples). The encoder loads it through `win_we/win_x/win_y/win_data`, eight
samples per write. One candidate is tried per cycle, with a full 8x8 SAD each:

1. **horizontal 1-D**: every column position, on the CU's own rows (121 candidates);
2. **vertical 1-D**: every row position, in the CU's own columns (57 candidates);
3. **2-D**: a grid with step `STEP2D` = 4 over the window (465 candidates). This pass runs
   only when the CU's luma activity exceeds **168**. Activity is the smaller of the summed
   horizontal and vertical neighbour differences.

Every candidate passes through `bv_valid_check`. A candidate is legal when its reference
block:

* is inside the picture;
* lies in an earlier CTU, or in the same CTU but earlier in z-scan order (both corners are
  checked);
* lies inside the 1x2 CTU window (in the local variant of the check).

Legal candidates go into a `best_list`. A CU takes 183 cycles without the 2-D pass and
648 cycles with it.

### Hash search (`hash_calc`, `hash_table_ctrl`)

The 13-bit key of an 8x8 block is

```
key = MSB3(DC0) << 10 | MSB3(DC1) << 7 | MSB3(DC2) << 4 | MSB3(DC3) << 1 | delta
```

* DC0..DC3 are the means of the four 4x4 quadrants.
* delta is 1 when the top four bits of the 8-bit block gradient are not all zero.
  The gradient is the mean of the summed horizontal and vertical absolute differences.
  In practice delta = 1 when `sum_h + sum_v >= 16*112`.

Dropping the gradient from 4 bits to 1 bit keeps the table eight times smaller and spreads
the keys more evenly than the 16-bit key of the reference software.

The table lives in external DRAM as 8192 buckets of `MAX_PER_KEY` = 100 words. Each word
holds the `{x, y}` position of one block. The fill count of each bucket is kept on chip.

* **Insert**: read the count, write slot `count`, then increment the count. When a bucket
  is full, further inserts are dropped and `ev_hash_drop` pulses.
* **Lookup**: issues the reads of the whole bucket back to back, so the DRAM latency is
  paid once. The returned positions go into a 128-deep FIFO.

For each returned position, the hash search in `ibc_estimation`:

1. forms the vector;
2. checks it against the whole coded area, not only the window;
3. fetches the eight reference rows from the original frame in DRAM (`fr_*` port);
4. accumulates the SAD row by row.

Only 8x8 CUs with a 2Nx2N partition use the hash search.

## IBC high throughput stage (`ibc_ht_stage`)

This is the part inside the reconstruction loop, and the one whose timing matters. A
configuration packet is `{CU x, CU y, log2 size (3..5), bv, last}`: one packet per candidate
prediction, with `last` set on the final candidate of a CU.

**Main controller and stalls.** Before a packet starts, `ctu_tracker` must report that its
whole reference area has already been written back to DRAM. Otherwise the head of the FIFO
waits, and `ev_stall` is high. The tracker keeps, for each CTU row:

* the count of complete CTUs;
* a 4-bit mask of the 32x32 blocks written so far in the CTU in progress.

An area is available when the CTU holding its bottom-right sample is complete, or when the
32x32 blocks of both corners are written in the CTU in progress. In the last CTU row of a
1080-line picture only the upper two 32x32 blocks exist. The tracker does not wait for the
other two.

**Reconstructed residual loader and cache.**

* A started packet is cut into chunks of eight samples, one chunk per cycle, row by row.
* Chunk byte address = `(ref_y + row) * PIC_W + ref_x + 8*chunk`.
* A chunk is served from one 32-byte cache line (`ref_cache`: direct mapped, 64 lines,
  256-bit lines to match the DRAM bus). When its offset in the line is above 24, it needs
  two lines and two cycles (`ev_split`).
* A hit answers in the next cycle. A miss blocks the cache until the DRAM returns the line.
* A small metadata FIFO tracks the offset and split state of each access, so the 64-bit
  prediction beats can be rebuilt in order.
* Requests are issued only while the prediction queue has room.

**Residual generator.** Each prediction beat is paired with the next beat of original
samples. The original samples come from a FIFO; the encoder must supply the CU once per
candidate. The generator registers eight signed 9-bit residuals for the transform path
(`res_*`) and sums their absolute values. At the last beat of a prediction the SAD is
compared with the best so far. After the candidate marked `last`, `cu_done` reports the
winning vector and its SAD. The first minimum wins on ties.

**Write-back.** `write_to_ddr` collects a 32x32 reconstructed block (128 beats of eight
samples) in a block buffer. It then writes the block as 32 rows of 256 bits
(`wr_addr = (y + r) * PIC_W + x`). After the last row it tells the tracker.

**Timing.** With a warm cache and no split chunks, an 8x8 prediction takes 8 cycles, back
to back across packets. Five predictions measure **40 cycles** from the first residual to
the last (the budget is 45; 140 are available per 8x8 CU at 1080p30). 16x16 and 32x32
predictions take 32 and 128 cycles each. So five of them need 160 and 640 cycles, against
the reference figures of 125 and 475 (560 and 2240 available). They fit the frame rate but
are slower than the reference timing.

## Palette unit (`plt_unit`)

### Clustering (`plt_clustering`)

The raw Y/U/V pixels of an 8x8 CU (one per cycle) are grouped into at most 64 clusters:

1. **Leader pass.** A pixel joins the nearest open cluster if its Y+U+V SAD to the leader
   is within `err_margin`; otherwise it opens a new cluster.
2. **Means.** The centre of each cluster is computed.
3. **Refinement.** One pass reassigns every pixel to its nearest centre and recomputes the
   means.

The refined centres stream out one per cycle and feed the 8x8 CU coder directly. The
centres for 16x16 and 32x32 CUs enter on their own ports (`new16_*`, `new32_*`).
`err_margin` is an input. In the reference encoder it is derived from QP.

### CU coder (`plt_cu_coder`)

Each coder works through four steps for one CU.

1. **Entry mapper** (`plt_entry_mapper`), a six-stage pipeline that accepts one cluster
   centre per cycle:
   * the Y/U/V SAD of the centre to all 64 predictor entries;
   * a three-stage tree of 4:1 comparators picks the closest entry;
   * the squared error to that entry is compared with `thr`. Above it, the centre becomes
     a new palette entry; otherwise the predictor entry is reused (and flagged in `reuse`).
   
   With n centres the list is complete in cycle n+6.
2. **Sorter** (`plt_sorter`). Reused and new entries arrive interleaved, but reused entries
   must come first. 32 two-input compare-exchange cells perform an odd-even transposition
   sort on the key `{is_new, arrival order}`, alternating between even and odd pairs.
   It takes 64 steps.
3. **Pixel mapper** (`plt_pixel_mapper`). Four lanes, each working through one horizontal
   band of the CU. Every pixel gets the index of the closest palette entry, or the escape
   index (= palette size) when even the closest is farther than `esc_thr`. It takes
   `CU_SIZE^2/4` input cycles plus two.
4. **Index coder** (`plt_index_coder`). It walks the index array in a traverse scan (rows
   alternate direction). At each position it measures both run types:
   * copy-index: the same index repeated;
   * copy-above: equal to the pixel above.
   
   It takes the longer run; ties go to copy-above. Instead of entropy coding, the bits are
   estimated from binary lengths:
   * one mode bit (outside the first row);
   * `bitlen(palette size)` for the index of a copy-index run;
   * `bitlen(run length)`.

The coder's bit estimate adds:

* the run bits;
* 24 bits per new entry;
* one reuse flag per predictor entry;
* 24 bits per escape pixel.

The result (`pal`, `pal_cnt`, `reuse`, the run stream and `bits`) is what an RD decision
and an entropy coder consume.

### Palette controller (`plt_controller`)

The controller holds a palette predictor (up to 64 colours) for each of the three coders.
When the RD decision picks one coder's result (`rd_valid`, `rd_sel`), it builds the new
predictor and writes it to all three coders:

1. the chosen palette;
2. then the old predictor entries that palette did not reuse, in their old order, up to
   64 entries.

The update takes 66 cycles.

## Block vector candidates (`mv_candidate`)

The reference names a motion vector candidate module with a vector line buffer and an
intra/IBC mode line buffer. It says only that the module gives the syntax generator its
parameters from the modes and vectors of neighbouring CUs. The rule built here is the
block vector predictor of the screen content coding drafts:

1. the left neighbour at (x-1, y+h-1), if it is IBC coded;
2. the above neighbour at (x+w-1, y-1), if it is IBC coded and differs from the left one;
3. then the last two coded vectors;
4. then (-2w, 0) and (-w, 0).

Modes and vectors are kept on an 8x8 grid:

* one entry per 8-sample column of the picture (the row above);
* eight entries for the CTU's left column.

A query is answered in one cycle. The encoder records each CU's final decision in coding
order.

## Top level (`scc_top`)

All ports are plain signals, structs and arrays.

| group | ports | notes |
|-------|-------|-------|
| IBC estimation | `est_cfg_*`, `est_win_*`, `est_out_*`, `ht_tab_*` (hash table DRAM), `fr_*` (original frame DRAM) | `est_events = {hash drop, hash hit, 2-D search}` |
| IBC high throughput | `ht_cfg_*`, `ht_orig_*`, `ht_res*`, `ht_cu_*`, `ht_rec_*`, `ht_mem_*` (line reads), `ht_wr_*` (row writes) | `ht_events = {split, miss, hit, stall}` |
| palette | `cl_*`, `new16_*`, `new32_*`, `plt_*[3]` (per coder: 8x8, 16x16, 32x32), `rd_valid/rd_sel`, `plt_ctl_busy` | thresholds `plt_thr`, `plt_esc_thr`, `err_margin` |
| vector candidates | `mvc_frame_start`, `mvc_q_*` (query), `mvc_out_valid`, `mvc_cand[2]`, `mvc_n_spatial`, `mvc_upd_*` (decision of a coded CU) | answer one cycle after the query |

DRAM ports follow one simple convention:

* hold `req` until `gnt`;
* reads return in order on `rvalid`;
* no burst or AXI response logic is modelled.

Positions are 12-bit picture coordinates. Vectors are signed 13-bit `{x, y}`. Reset is
asynchronous and active low.

Parameters with defaults:

| parameter | default |
|-----------|---------|
| `PIC_W` | 1920 |
| `PIC_H` | 1080 |
| `MAX_PER_KEY` | 100 |
| `ACT_THR` | 168 |
| palette size | 64 |
| predictor size | 64 |
| `LANES` | 4 |
| `K` | 4 |
| `STEP2D` | 4 |
| `CACHE_LINES` | 64 |

The 1280x720 and 1024x768 picture sizes need only `PIC_W`/`PIC_H` overrides.

## Where this RTL departs from the reference architecture

Built in simplified form:

* **Local search.** Only 8x8 CUs with a 2Nx2N partition are searched. One search engine is
  instantiated, where the reference uses four in parallel. The 2-D search uses a step of 4.
* **Clustering.** The histogram-based K-means clustering is reduced to one leader pass and
  one refinement pass.
* **16x16 and 32x32 IBC.** Predictions are slower than the reference timing (see above).

Not built:

* the 16x16 1-D search, the Nx2N/2NxN PU checks, and most-probable-candidate matching
  (the only search the reference applies to 32x32 CUs);
* removal of easily intra-predicted blocks from the hash table;
* 16x16/32x32 cluster means formed from 8x8 results;
* the "copy above final" flag with its reverse coding of segments;
* the split of a CU into four parts that are index-coded in parallel;
* the controller's scheduling of CU coders from the intra/IBC partitions;
* the palette entropy coder.

Own choices where the reference is silent:

* the candidate list length K = 4;
* the cache organisation;
* the packet formats;
* the escape rule and the bit-count formula;
* the handling of a full hash bucket (further inserts are dropped).

Each module's opening comment says what it takes from the reference and what it chooses
itself.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module against
values computed independently in the testbench, ends with
`TB_RESULT checks=N failures=M`, and has a watchdog. Shared helpers are in
`tb/tb_util.svh`. The DRAMs are behavioural models inside the testbenches, with random
grant and 2..8 cycle latency.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_hash_calc`, `tb_block_sad`, `tb_best_list`, `tb_sync_fifo`, `tb_combine_lists` | arithmetic, ordering and handshakes against reference models |
| `tb_bv_valid_check` | the legality rule against a z-scan model, all shapes and windows |
| `tb_hash_table_ctrl` | inserts, overflow drops and lookups against a model of the table |
| `tb_local_search` | planted copies are found; the 2-D pass runs only above the activity threshold; cycle counts |
| `tb_ibc_estimation` | over three CTUs, every listed vector is legal with its exact SAD; an out-of-window copy is found only by hashing; hash overflow happens |
| `tb_ref_cache`, `tb_residual_generator`, `tb_write_to_ddr`, `tb_ctu_tracker` | line data and hit/miss behaviour, residuals and SADs, written rows, availability answers |
| `tb_ibc_ht_stage` | stall until write-back, every residual and CU result, and the 40-cycle warm 8x8 case |
| `tb_plt_*` | entry mapper latency (n+6), sorter result and step count, nearest-entry mapping, index runs rebuilding the array, exact bit estimate, predictor update |
| `tb_mv_candidate` | random quadtree partitions over two CTU rows, against a full-picture map of modes and vectors |
| `tb_scc_top` | whole design at default size (1920x1080, 100 entries per key); see below |

`tb_scc_top` runs everything at the default size:

* it estimates CUs in five CTUs;
* it feeds the resulting lists to the high throughput stage;
* it codes a sequence of palette CUs;
* it asks for vector candidates of three IBC CUs.

It counts each mechanism and fails if any never happens: 2-D search, hash hit, hash bucket
overflow, stall, cache hit, cache miss, split chunk, reused and new palette entries, escape,
copy-above and index runs, predictor update, and a spatial vector candidate. It runs in well under a minute.

To simulate one testbench with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -I. --top-module tb_scc_top \
    rtl/scc_pkg.sv $(ls rtl/*.sv | grep -v scc_pkg) tb/tb_scc_top.sv
./obj_dir/Vtb_scc_top
```

The package must come first on the command line. Testbenches include `tb/tb_util.svh`
relative to that directory.
