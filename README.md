# H.264 high-profile macroblock encoder core

This is synthesizable SystemVerilog for the datapath of an H.264/AVC high-profile video
encoder aimed at 1080p. Three ideas make such an encoder affordable in hardware, and the
RTL is organised around them:

* **Motion search at three resolutions in parallel.** One macroblock (MB) is searched at
  three resolutions at once, each covering a wider range at a coarser step. All three run
  in the same 256 cycles.
  * Level 0 searches full resolution at ±8.
  * Level 1 searches 2:1-subsampled pixels at ±32.
  * Level 2 searches 4:1-subsampled pixels at ±128.
  * Only the level-0 window is stored at full pixel depth. The subsampled windows keep
    6-bit pixels, which gives about 6 KB of local memory for a ±128 range.
* **Refine only what is worth refining.** A mode filter keeps two of the seven block-size
  modes after integer search. The fractional search then tests six quarter-pel candidates
  per partition in a single pass, not in the usual half-pel then quarter-pel passes.
  Fractional search reads the same level-0 data as the integer search: three window banks
  rotate between loading, integer search and fractional search, so nothing is copied.
* **Cheap intra and shared back end.**
  * Intra 4x4 uses a modified three-step mode search.
  * Its cost is an "enhanced SATD" that transforms the residual with the integer DCT
    weights, not Hadamard.
  * Plane prediction is dropped.
  * The prediction generator makes eight pixels per cycle.
  * Intra and inter prediction share one transform / quantiser / reconstruction chain.
  * CABAC is split into three pipelined stages: binarisation, context modelling and
    arithmetic coding.
  * Deblocking interleaves vertical and horizontal edges so that one block row of context
    is enough.

The top level, `h264_hp_encoder`, ties these into a two-stage macroblock pipeline. It is a
simplified integration, not the full three-stage chip schedule; see
[Departures](#departures-from-the-original-architecture).

## Macroblock flow in `h264_hp_encoder`

```
 stage A (MB n+1)            stage B (MB n)
 ----------------            -------------------------------------------------------------
 pmrme_ime (258 cycles)      mode_filter -> FME sequencer (sifme per partition)   }   in
   on IME bank of              on FME bank of l0_pingpong                         } parallel
   l0_pingpong + L1/L2       intra 4x4: intra4_decision -> intra_pred_gen ->      }
   windows                     recon_chain, 16 blocks in raster order             }
                             decision (inter vs intra) -> inter reconstruction (fme_interp
                             prediction through the same recon_chain) -> CABAC syntax
                             (cabac_encoder) -> deblock_mb
```

The handshake works like this:
* `ready` is high when stage A is idle and stage B has finished.
* A pulse on `mb_start` while `ready` is high moves MB n from stage A into stage B. It also
  starts IME on the new MB in `cur_mb` if `cur_valid` is high.
* Before that pulse, the caller must have written two things:
  * the new MB's 37x37 level-0 window into the load bank (`l0_wr_*`, 16 pixels per write);
  * its subsampled 39x39 and 67x67 windows (`lx_wr_*`).
* The level-0 window is placed so that pixel (10,10) is the MB origin displaced by `mvp`.
* The neighbour pixels for intra prediction and deblocking of MB n (`nb_*`, `dbk_*`) are
  sampled at the same `mb_start`.
* A final `mb_start` with `cur_valid` low drains the pipeline.
* `mb_done` pulses when stage B has finished. At that point these outputs are valid:
  * the decision (`mb_is_inter`, modes, 16 motion vectors, 16 intra modes);
  * the undeblocked reconstruction (`mb_rec`);
  * the 20x20 deblocked area (`dbk_mb`).
* Bytes leave on `bs_valid`/`bs_ready`. A CABAC terminate with `slice_last` flushes the
  coder to a byte boundary.

The six `ev_*` outputs pulse once per occurrence of these events:
* bank rotation;
* an IME win from level 1 or 2;
* the split (8x8) mode kept by the mode filter;
* a refined vector outside the level-0 window;
* a CABAC same-context stall;
* a filtered deblocking segment.

Measured in the end-to-end test, stage B takes 736 to 2154 cycles per MB, depending on
the bin count and the number of FME partitions. Stage A takes 258.

## Integer motion estimation (`pmrme_ime`)

Every cycle the three levels evaluate candidates in lockstep:
* level 0 evaluates 1 candidate position, with a 16x16 current block;
* level 1 evaluates 4 positions, with an 8x8 subsampled current block;
* level 2 evaluates 16 positions, with a 4x4 current block.

Each level thus uses 64 four-pixel SAD units (`sad4p`, grouped in `ime_search_point`), and
the search takes 16x16 = 256 cycles.

Level 0 produces the 16 4x4 sub-SADs of each candidate. `vbs_sad_tree` adds them into the
41 partition SADs of the seven H.264 block modes, and a tracker per partition keeps the
minimum. Level 1 tracks partitions 0-8 (16x16, 16x8, 8x16, 8x8). Level 2 tracks only
16x16.

The merge works as follows:
* L1 and L2 SADs are scaled by 4 and 16 to full-resolution units.
* Per partition, the smallest SAD wins, and level 0 wins ties.
* Motion vectors come out in quarter-pel units.

`done` comes 258 cycles after `start`: one cycle to register the start, 256 search cycles
and one merge cycle.

Level-1/2 pixels are truncated to `PIXD` = 6 bits when they are written. This is the
source of the small level-1/2 memories, and it is why a vector found at those levels is
only approximate.

## Mode filtering and single-iteration FME (`mode_filter`, `sifme`, `fme_interp`, `satd4x4_pu`)

`mode_filter` looks only at the IME SADs. It outputs two modes:
* **A** is the cheapest of 16x16, 16x8 and 8x16.
* **B** is the cheapest of those three and the 8x8 split. The split is costed with the
  cheapest sub-mode (8x8, 8x4, 4x8 or 4x4) in each quadrant.

The FME sequencer in the top refines the partitions of mode A. When B is the split, it
also refines its up to 16 sub-partitions. The cheaper refined result is kept.

For each partition, `sifme` forms six candidates around the integer vector:
* (0,0);
* the predicted fraction `(mvp − mv) mod 4`;
* the four quarter-pel diamond neighbours of that fraction.

Six interpolators (`fme_interp`: 6-tap half-pel, bilinear quarter-pel) and six Hadamard
SATD units work in parallel, one 4x4 block per cycle. The result comes w4·h4+1 cycles
after start. The cost is SATD + λ·(|mvdx|+|mvdy|).

Out-of-window vectors are handled as follows:
* Reference data comes only from the FME bank of `l0_pingpong`.
* A vector from level 1 or 2 usually lies outside the 37x37 window. Its six-tap support
  would leave the window, so it is returned unrefined with `out_of_win` set.
* The top then chooses intra for that MB. An encoder with an external fetch path would
  refine it instead.

`l0_pingpong` has three banks whose roles (load, IME, FME) rotate on each MB advance. An
assertion checks that the roles stay distinct.

## Intra 4x4 path (`intra4_decision`, `intra_pred_gen`, `enh_satd`)

`intra_pred_gen` produces eight prediction pixels per step for four block types:
* 4x4 and 8x8 luma: all nine directions; 8x8 includes reference-sample filtering;
* 16x16 luma: vertical, horizontal and DC;
* 8x8 chroma: DC per 4x4 quadrant, horizontal and vertical.

Plane prediction is not generated.

`intra4_decision` runs the modified three-step search over the directional modes and picks
the cheapest by `enh_satd`. It takes 15 cycles per 4x4 block, and vertical wins ties.

The top uses only the 4x4 luma path. Blocks go in raster order, and each is reconstructed
before the next is predicted, because its pixels are the next block's neighbours.

## Transform, quantisation and reconstruction (`recon_chain` and parts)

`recon_chain` runs one 4x4 block through five steps:
1. `fwd_transform` (4x4 integer DCT);
2. `quant8` (two rows per cycle);
3. `dequant8`;
4. `inv_transform`;
5. `recon8` (clip to 0..255).

It takes nine cycles. Both intra and inter reconstruction use it. That is the
reconstruction sharing between the two prediction paths, done here sequentially.

The leaf blocks themselves support the high-profile sizes:
* `fwd_transform` and `inv_transform` also do 8x8 transforms and the 4x4 Hadamard;
* `quant8` and `dequant8` handle one 8x8 row or two 4x4 rows per cycle.

The quantiser multipliers and dequantiser scales come from `quant_tables_pkg`. The
rounding offset is 2^qbits/3 for intra and 2^qbits/6 for inter.

## CABAC (`cabac_binarizer`, `cabac_ctx_model`, `cabac_ac`, `byte_fifo`, `cabac_encoder`)

The three stages pass bins over valid/ready handshakes:
1. **Binariser.** Turns a syntax element into a bin string with context numbers. It
   supports fixed-length, truncated-unary, UEGk with sign, bypass and terminate bins.
2. **Context model.** Reads the context's 6-bit state and MPS from a `NCTX`-entry memory,
   writes the updated state back, and passes the bin on.
   * A bin that uses the context still being updated is held for one cycle, so it reads
     the new state.
   * This is the only stall in the CABAC pipeline.
3. **Arithmetic coder.** Takes one bin per cycle.
   * The range is renormalised in one step with a leading-zero count.
   * Outstanding bits are counted up to `MAX_OUTS` = 31, which an assertion checks.
   * Completed bytes are packed, up to 8 per cycle, into a 64-byte FIFO.
   * The coder stalls while the FIFO has fewer than eight free places.

The top codes these elements per MB:
* MB type;
* intra modes, or partition mode and sub-modes with motion-vector differences;
* a coded flag and 16 zig-zag levels per 4x4 block;
* a terminate bin.

This is a simplified macroblock layer with fixed context numbers. It exercises the coder
fully, but a standard decoder cannot parse it.

## Deblocking (`deblock_edge`, `deblock_mb`)

`deblock_mb` holds the MB with its four left columns and four top rows in a 20x20 buffer.
Four `deblock_edge` units filter one 4-line edge segment per cycle.

Within each block row, the order is:
1. vertical edges x0 and x4;
2. the top edge of block 0;
3. vertical edge x8, then the top edge of block 1;
4. vertical edge x12, then the top edges of blocks 2 and 3.

Each horizontal edge is filtered only after all vertical filtering that touches its
pixels, so the result equals the standard order (all vertical edges, then all
horizontal). Each MB takes 32 segment cycles, and `done` comes 33 cycles after `start`.

The top supplies the boundary strength:
* intra: bS 4 at MB edges, 3 inside;
* inter: bS 2 at MB edges or where coefficients are present, else 1 when the vectors
  differ by at least one pixel, else 0.

## Departures from the original architecture

* Two pipeline stages instead of three. Entropy coding and deblocking run at the end of
  stage B, and stage B's work is sequential, so a MB takes 740 to 2150 cycles. The 1080p30
  target needs about 590 cycles per MB at 145 MHz, so this integration does not meet
  it. The search ranges, memories and per-block rates do match the original.
* There is only one reference direction; bi-directional ME is not built.
* The top does not sequence intra 16x16, intra 8x8, chroma or 8x8 transforms. The blocks
  that support them are present and tested on their own.
* CAVLC is not built.
* The entropy syntax is simplified, as described above.
* Vectors outside the level-0 window are not refined. Those MBs become intra.
* The MV cost in FME, the IME tie rule and the rounding offsets are choices of this
  design.
* The context memory has 1024 entries. That is enough for the high-profile 8x8 residual
  contexts, more than the 461 the original main-profile numbering needs.
* Memories are register arrays, not SRAM macros.
* The frame-level memory system stays outside the core, reached through the window-write
  and byte-stream ports. That system is the external DRAM, the bus and the storage of
  neighbour rows.

## Verification

Each block has a self-checking testbench in `tb/tb_<block>.sv`. Each compares against
values computed independently inside the testbench:
* the standard interpolation and intra equations;
* matrix transforms;
* its own alpha/beta tables;
* a bit-serial CABAC reference coder (`tb/cabac_ref.svh`);
* a reference deblocking in the standard edge order.

The testbenches also check the latencies given above, and each counts the branches it must
reach. Each prints `TB_RESULT checks=N failures=M`.

`tb_h264_hp_encoder` runs the whole core at its default parameters. It encodes six
macroblocks cut from a random reference:
* an exact integer motion;
* four quadrants with different motion, so the 8x8 split must win;
* a flat block, so intra must win;
* a motion of (+40,+36) that only level 2 can find, so out-of-window handling applies;
* a noisy motion;
* a gradient, so intra must win.

It checks the decisions, the vectors and the reconstruction error, and that the stream
ends byte-aligned. It fails if any event counter stays at zero.

To run one testbench with Verilator from the repository root, list the packages first:

```
verilator --binary --assert --top-module tb_h264_hp_encoder -y rtl \
  rtl/h264_pkg.sv rtl/cabac_pkg.sv rtl/quant_tables_pkg.sv rtl/deblock_pkg.sv \
  tb/tb_h264_hp_encoder.sv
./obj_dir/Vtb_h264_hp_encoder
```

The CABAC and intra testbenches include `tb/*.svh` by paths relative to the repository
root, so run from there.

## Files

| Area | Modules |
|---|---|
| Packages | `h264_pkg` (pixel, MV, block-mode types), `cabac_pkg`, `quant_tables_pkg`, `deblock_pkg` |
| IME | `sad4p`, `ime_search_point`, `vbs_sad_tree`, `pmrme_ime`, `l0_pingpong` |
| FME | `mode_filter`, `sifme`, `fme_interp`, `satd4x4_pu` |
| Intra | `intra_pred_gen`, `enh_satd`, `intra4_decision` |
| Residual | `fwd_transform`, `quant8`, `dequant8`, `inv_transform`, `recon8`, `recon_chain` |
| Entropy | `cabac_binarizer`, `cabac_ctx_model`, `cabac_ac`, `byte_fifo`, `cabac_encoder` |
| Loop filter | `deblock_edge`, `deblock_mb` |
| Top | `h264_hp_encoder` |

Lint notes:
* Verilator reports `rst_n` as used both asynchronously and synchronously. This is because
  of the `disable iff (!rst_n)` in the FIFO's overflow assertion. It does not affect the
  logic.
* In the top, a few status outputs of sub-blocks are left unconnected on purpose.
