# DAVID II: a parallel rendering processor with per-rasterizer pixel caches

A single-chip rendering processor can render several triangles at once by giving it several
rasterizers. To keep up, each rasterizer needs its own pixel cache (a small local copy of depth
and colour for recently touched screen blocks). The trouble is that two rasterizers may then
hold, and change, the same screen block in two caches at once, so the copies disagree.

This design does not try to stop that. The rasterizers share nothing and never check for
dependences between triangles. Instead, the frame buffer is kept correct where the cached blocks
return to it. Every block a pixel cache gives up is merged into the frame buffer pixel by pixel
by a *consistency test* (C-test): a depth test followed by an alpha blend. This is the same work
the rasterizer already did against its cache. Whichever rasterizer's copy is nearer wins, and a
translucent copy is blended over what the frame buffer already holds.

The second idea follows from the first. A cache never has to fetch a block from the frame buffer,
so a pixel-cache miss has no latency. The rasterizer hands the victim block to the memory
interface unit (MIU) and goes on at once. The victim waits in the MIU's *pixel output queue*
until the C-test ALUs can merge it. A rasterizer stalls only when that queue is full.

The SystemVerilog here builds the whole path: fragment in, pixel in the frame buffer. It uses
the embedded-frame-buffer organisation at its default size: 16 rasterizers, a 1600x1200 screen,
a 128-entry queue and 8 cycles per C-test block.

## Block diagram and data flow

```
 fragments (one stream per rasterizer, triangles dealt round robin by the driver)
     |            |                      |
 +---v----+  +----v---+             +----v---+       rasterizer:
 | rast 0 |  | rast 1 |    . . .    | rast 15|         S1 texture read  (tex_cache)
 +---+----+  +---+----+             +---+----+         S2 filter, blend, alpha test
     |  ^        |  ^                   |  ^           S3 pixel cache: z-test, blend, write
     |  +--------+--+------ texels -----+--+---- texture_memory (round-robin rr_arbiter)
     |           |                      |
     +-----------+--- replaced blocks --+
                 v
        +-----------------+   miu: round-robin intake, one block per cycle
        | pixel output    |   128 entries, head/tail pointers
        | queue           |
        +--------+--------+
                 v
        +-----------------+   ctest_unit: 2 ctest_alu, 16 pixels in 8 cycles
        | C-test ALUs     |<--- read block ---+
        +--------+--------+                   |
                 +---- write merged block --> frame_buffer (120,000 blocks x 896 bits)
                                              display / read-out port
```

| Module | Role |
|---|---|
| `davidii_top` | Everything above. |
| `rasterizer` | Three-stage pixel pipeline of one rasterizer. |
| `tex_cache` | Local texture cache. It has 4 banks interleaved on texel-coordinate parity, so it returns a full 2x2 footprint of one mip level per cycle. |
| `tex_filter` | Bilinear filter of one mip level, or trilinear filter of two levels (four or eight texels). |
| `tex_blend` | Modulates the texel with the fragment colour, then premultiplies by alpha. |
| `alpha_test` | Discards a fragment whose alpha is below `alpha_ref`. |
| `pixel_cache` | Local depth and colour cache with the z-test and blend stages. Evicts on a miss without refilling. Flushes at end of frame. |
| `ctest_alu` | One pixel's z-test (less) and premultiplied *over* blend. Used by the pixel cache and by the C-test unit. |
| `miu` | Takes replaced blocks from all rasterizers into the pixel output queue. |
| `pixel_output_queue` | Circular FIFO with head and tail pointers. |
| `ctest_unit` | Merges queued blocks into the frame buffer, `CTEST_CYCLES` per block. |
| `frame_buffer` | On-chip frame buffer, one 4x4 block per word. Has a clear sweep and a read-out port. |
| `texture_memory` | Shared texture store holding one mip-mapped texture, written by the host. |
| `rr_arbiter` | Round-robin arbiter, used for the MIU intake and the texture memory. |
| `davidii_pkg` | Pixel, block and fragment types. The 8-bit multiply and the *over* blend. |

## The pixel cache: miss without refill

This is the part that differs most from an ordinary cache.

A line holds one 4x4 block: 16 x (24-bit z + 32-bit RGBA) plus a 16-bit *written mask*. The cache
is direct mapped on the block address `(y/4)*(SCREEN_W/4) + x/4`. It has 64 lines by default.

For each fragment, one per cycle, `pixel_cache` does the following:

1. **Hit.** It reads the pixel. An unwritten pixel reads as far depth and transparent black. It
   z-tests the fragment against that pixel. If the fragment passes, the cache writes the
   fragment's depth and the colour blended *over* the old colour, and sets the mask bit.
2. **Miss, victim line clean** (no mask bit set). The line is taken for the new block, with an
   empty mask. The fragment is processed into it in the same cycle.
3. **Miss, victim line written.** The victim `{address, mask, pixels}` is offered to the MIU
   (`out_valid`). In the cycle the MIU takes it, the line is reallocated empty and the fragment is
   processed, with no extra cycle. If the MIU cannot take it (queue full, or another rasterizer
   won the arbitration), `in_ready` drops and the pipeline stalls.

The cache never reads the frame buffer. That is why a miss costs nothing: there is nothing to
wait for. Each cache composites only the fragments its own rasterizer sent since the line was
allocated, on a transparent background. The frame buffer gets the rest of the picture later,
through the C-test.

`flush` at end of frame walks all lines and sends every written block to the MIU, taking
`PC_LINES` cycles plus any wait for the queue. The rasterizer holds the flush back until its
pipeline is empty.

## The C-test and why the result is consistent

`ctest_unit` takes the head block of the queue. It reads the frame-buffer block at that address
in the same cycle, because the embedded frame buffer has a combinational read. For each pixel
whose mask bit is set, it does:

```
if (cached.z < fb.z)  fb = { cached.z,  cached.rgba + fb.rgba * (255 - cached.a) / 255 }
```

It tests two pixels per cycle (`NUM_CTEST_ALUS = 2`), so 16 pixels take 8 cycles. The merged
block is written at the end of cycle `CTEST_CYCLES - 1`, and the next block is taken in the
following cycle. The unit therefore retires exactly one block every `CTEST_CYCLES` cycles. A
write always lands before the next read, so two queued blocks for the same address need no
bypass.

Why this gives the right picture:

* **Opaque geometry.** The z-test keeps the nearest fragment whatever the order, so the final
  frame is independent of the number of rasterizers, the cache size and the eviction order. The
  end-to-end testbenches check the whole frame buffer against a directly computed frame on
  exactly this property.
* **Translucent geometry.** Colours are kept premultiplied and blended with *over*, which is
  associative. Compositing a group of fragments in a cache and then compositing that group over
  the frame buffer is therefore, in exact arithmetic, the same as blending each fragment in
  turn. Two limits apply:
  * With 8-bit rounding, the two can differ in the lowest bit.
  * Blocks from different rasterizers merge in the order they reach the queue, not in triangle
    order. This is the triangle-level parallelism the architecture accepts.

  Depth is written only by a fragment that passes, as with the rasterizer's own z-test.

## Timing and throughput

* **Rasterizer.** One fragment per cycle when the texture footprint hits and the MIU takes any
  victim. A fragment reaches the pixel-cache write 3 cycles after it is accepted. A
  texture-cache miss stalls stage S1 for about 3 cycles per missing texel plus arbitration.
  A trilinear fragment stays two cycles in S1, one lookup per mip level, so trilinear
  fragments run at one per two cycles.
* **MIU.** Takes one block per cycle from one rasterizer, chosen round robin.
* **C-test.** One block per `CTEST_CYCLES` cycles: 8 for the embedded frame buffer. Use 12 to
  model C-RAM frame-buffer chips or 16 for conventional DRAM. The architecture's zero-latency
  goal holds as long as blocks are replaced no faster, on average, than one per `CTEST_CYCLES`
  cycles over all rasterizers together. The 128-entry queue absorbs bursts.
* **Frame-buffer clear.** One block per cycle: 120,000 cycles at full size.

At the default size, one test frame has 400 overlapping textured rectangles (196,691 fragments,
about half of them trilinear) in a 512x256 window. It finishes about 262,000 cycles after the
clear. The limit there is the shared, single-ported texture memory: about 242,000 texel
fetches, one per cycle. It is not the frame-buffer path: over the whole frame the pixel caches
waited on a full queue for only 259 cycles, for 13,093 evicted blocks. The architecture
assumes texture misses do not cost performance. In this RTL that assumption holds only if the
texture caches are large enough for the workload, or if the texture memory is widened.

## Parameters

| Parameter (`davidii_top`) | Default | Meaning |
|---|---|---|
| `NUM_RAST` | 16 | Rasterizers. Configurations of 1, 2, 4 and 8 are also meaningful. |
| `SCREEN_W`, `SCREEN_H` | 1600, 1200 | Screen size. Must be multiples of 4. At most 131,072 blocks (17-bit block address). |
| `OQ_DEPTH` | 128 | Pixel output queue entries. |
| `CTEST_CYCLES` | 8 | Cycles per block in the C-test unit. Must be at least `16 / NUM_CTEST_ALUS`. |
| `NUM_CTEST_ALUS` | 2 | C-test ALUs. Must divide 16. |
| `PC_LINES` | 64 | Pixel-cache lines of one 4x4 block. Power of two. |
| `TC_LINES` | 64 | Texture-cache lines per bank (4 banks, one texel per line). |
| `TEX_LOG` | 8 | Level 0 of the texture is 2^TEX_LOG squared texels (256x256), with a full mip chain down to 1x1 and wrap addressing at each level. |

Fixed in `davidii_pkg`: 24-bit depth, 8-bit RGBA, 4x4 blocks and 11-bit screen coordinates. The
texture coordinates are 8.8 fixed point in level-0 texel units. Each fragment also carries its
mip level `lod` and an 8-bit level fraction `lodf`. With `lodf = 0`, or at the last level, the
fragment is filtered bilinearly at level `lod`. Otherwise it is filtered trilinearly between
levels `lod` and `lod+1`, and `lodf` is the weight of the coarser level. At level L the
coordinate used is `u >> L`.

## Using the top

One frame goes through these steps:

1. Load the texture with `tex_wr_en` / `tex_wr_addr` / `tex_wr_data` (ARGB). Pulse
   `tex_invalidate`. The levels are stored one after another, starting with level 0. Level L
   starts at word `sum(4^(TEX_LOG-k), k < L)` and is stored row by row: texel (u, v) is at
   `start + v * 2^(TEX_LOG-L) + u`. The whole chain is `(4^(TEX_LOG+1) - 1) / 3` words.
2. Pulse `fb_clear` and wait for `fb_clear_busy` to fall.
3. Drive each rasterizer's `frag_valid` / `frag` stream. A fragment is taken in a cycle where
   `frag_valid && frag_ready`. Set `alpha_ref` (0 disables the alpha test).
4. When all fragments are taken, pulse `flush`. Wait for `idle`: all pipelines, caches, the
   queue and the C-test unit empty.
5. Read blocks on `disp_addr` / `disp_data`. Pixel `p` of a block is at `(x%4) + 4*(y%4)`.

`ev[r]` (`rast_ev_t`), `ev_oq_full`, `ev_ctest_block`, `ev_ctest_pass`, `ev_ctest_fail` and
`oq_count` are single-cycle pulses and levels for performance counters.

All flops use a synchronous active-low reset. The caches' data arrays, the queue storage, the
texture memory and the frame buffer are not reset: the valid bits, pointers and the clear sweep
take care of them.

## Departures from the architecture, and what is not here

* **Only pixel rasterization is built.** Geometry processing, triangle setup and edge walk are
  only named by the architecture. Each rasterizer takes already interpolated fragments, and the
  driver deals triangles to the rasterizers round robin.
* **Mip level selection is outside.** The rasterizer filters at the level it is given. Working
  out the level from the texture-coordinate derivatives belongs to setup and edge walk, which
  are not built.
* **Memory system.** Only the embedded-frame-buffer organisation is built as hardware. The
  organisations with external conventional DRAM or C-RAM chips differ in where the frame buffer
  and the C-test ALUs sit. Their effect on this design is the C-test time, `CTEST_CYCLES`. The
  external chips themselves are not modelled.
* **Texture memory.** Textures live in a separate single-port on-chip RAM, not in a unified
  graphics memory shared with the frame buffer.
* **Own choices.** These are not specified by the architecture:
  * block size, pixel format and the blend equation;
  * the depth function (less);
  * cache sizes and their direct mapping;
  * the texture-cache banking;
  * the mip-chain layout and the two-cycle trilinear lookup;
  * the modulate texture environment;
  * the alpha-test comparison (`>=`);
  * round-robin arbitration;
  * the number of C-test ALUs;
  * the frame-buffer clear.
* **The frame buffer is an array.** It is a plain memory array with a combinational 896-bit
  read. A real chip would use an embedded-DRAM macro in its place, with its own latency.

## Verification

Each module has a self-checking testbench in `tb/`. Reference results come from
`tb/tb_ref_pkg.sv`, which computes the arithmetic independently of the RTL. Each testbench
ends with a `TB_RESULT checks=N failures=M` line and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ctest_alu`, `tb_alpha_test`, `tb_tex_blend`, `tb_tex_filter` | Exhaustive or random arithmetic against the reference. |
| `tb_rr_arbiter` | Grant against a reference pointer, and the starvation bound. |
| `tb_pixel_output_queue` | Random push and pop against a reference queue, including push and pop while full. |
| `tb_texture_memory` | Write a whole mip chain, then read back with one cycle of latency. |
| `tb_frame_buffer` | Clear takes exactly `NUM_BLOCKS` cycles; both read ports work. |
| `tb_tex_cache` | Texels at random mip levels with wrap at each level, a warm lookup in 0 cycles, exactly four fetches when cold, and invalidate. |
| `tb_pixel_cache` | A cache reference model predicts every stall and every evicted block. The merged frame equals the directly computed one. A miss costs no cycle while the MIU is ready. Flush empties every written line. |
| `tb_rasterizer` | Textured (bilinear and trilinear, random levels), alpha-tested fragments, frame compared after flush, one fragment per cycle when warm. |
| `tb_miu` | Nothing lost or reordered per source; the full queue pushes back. |
| `tb_ctest_unit` | Merged frame buffer, write exactly `CTEST_CYCLES-1` cycles after take, one block per `CTEST_CYCLES`, `enable` respected. |
| `tb_davidii_top` | End to end at reduced size: 4 rasterizers, 64x32 screen, 4-entry queue. |
| `tb_davidii_full` | One complete frame at the default parameters, taking about 25 s of simulation. |
| `tb_davidii_memsys` | The memory-system study below, nine configurations of the top, each frame checked against the directly computed one. |

The two end-to-end benches compare the entire frame buffer with a frame computed directly from
the fragments. They count every mechanism and fail if any of these never happened:

* texture misses;
* alpha rejects;
* pixel-cache hits, misses and evictions;
* stalls on a full queue;
* z-test failures in the caches;
* a full queue;
* C-test passes and failures;
* flush write-backs;
* blocks shared between rasterizers.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/davidii_pkg.sv tb/tb_ref_pkg.sv tb/tb_davidii_top.sv --top-module tb_davidii_top
./obj_dir/Vtb_davidii_top
```

Substitute any other `tb_*` name. Add `+verilator+rand+reset+2` to start unreset state at random
values. The RTL also lints clean of errors with `verilator --lint-only -Wall` and elaborates
with the slang front end of yosys.

## Memory-system study

`tb_davidii_memsys` draws the same frame with 1, 4 and 16 rasterizers and C-test times of 16,
12 and 8 cycles. These stand for conventional DRAM, C-RAM chips and the embedded frame buffer.
The frame has 115,687 bilinear fragments in a 128x96 window of a 640x480 screen. Every
configuration is checked against the directly computed frame.

The table gives two numbers per configuration:

* **Reduction** is the share of C-test time hidden from the rasterizers:
  `1 - stall cycles / (evicting misses * CTEST_CYCLES)`. A cache that had to wait for every
  C-test would stall for `CTEST_CYCLES` cycles on each evicting miss.
* **AFPC** is the average number of fragments per cycle per rasterizer.

| Rasterizers | C-test 16 | C-test 12 | C-test 8 |
|---|---|---|---|
| 1 | 72.8 %, AFPC 0.72 | 96.2 %, AFPC 0.95 | 100 %, AFPC 0.99 |
| 4 | 0 %, AFPC 0.18 | 0 %, AFPC 0.24 | 0 %, AFPC 0.36 |
| 16 | 0 %, AFPC 0.05 | 0 %, AFPC 0.07 | 0 %, AFPC 0.10 |

With one rasterizer the queue hides the C-test almost completely once it takes 12 cycles or
fewer, as the architecture intends. With 4 and 16 rasterizers this small, dense window
replaces blocks much faster than one C-test unit can merge them. The queue then stays full and
the C-test rate alone sets the speed. A larger pixel cache, or a window where each rasterizer
revisits its blocks more often, would move these cases toward the one-rasterizer result.

