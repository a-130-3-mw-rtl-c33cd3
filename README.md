# A 16-core mobile GPU that shades fewer pixels, with less precision and smaller textures

This is the RTL of a small unified-shader GPU for mobile rendering. It reduces power with three
pixel approximation techniques:

- **Screen-space approximated lighting (SSAL).** Inside each 8x4 screen tile, only a subset of
  the covered pixels runs the pixel program. The others are rebuilt in the ROP from their shaded
  neighbours, by a plane fit, a two-sample average or a copy.
- **Approximated texturing (AT).** A 2-bit per-texel LOD bias map moves texture lookups to
  coarser mip levels wherever the texture has little detail.
- **Approximated precision shading (APS).** One of the four shader clusters computes with 16-bit
  truncated floats. The registers that carry positions and texture coordinates stay at 32 bits.

The design follows a published architecture: 4 clusters of 4 four-wide SIMD cores, a tile-based
raster, a task dispatcher, a shared 64 KB texture L2 and a ROP with a reconstruction unit. Where
that description stops (instruction encoding, number formats, cache organisation, memory
layouts), this design makes its own choices. They are marked as such below and in each file's
header comment.

## How a triangle is drawn

`gpu_top` draws one triangle at a time. The host streams in triangles as three 16-bit vertex
indices.

1. **Vertex phase (`task_dispatcher`, `data_fetch`, `task_buffer`).**
   - For each vertex *i*, four vec4 attributes are read from external memory at word address
     `vbase + 16*i`. The reads go line by line through the data fetch unit into the task buffer.
   - Three vertex threads start on full-precision cores. The APS cores (cores 12..15) are never
     used for vertex work.
   - Each vertex program must write:
     - `o0` = screen position (x, y, depth, w). x and y are pixels, depth is in [0, 1).
     - `o1`, `o2` = two vec4 varyings.
2. **Triangle setup (`triangle_setup`).**
   - Positions are truncated to integers.
   - Three edge functions `e = alpha*x + beta*y + gamma` are formed, oriented so that inside
     means `e >= 0`. Zero-area triangles are culled.
   - Each of the 9 scalars (depth plus 8 varying lanes) is given a plane `s(x,y) = M*x + N*y + C`.
     To get it, a 41-cycle restoring divider computes `2^40/|2*area|` once. The three
     coefficients then each cost one multiply. The planes are stored in the plane equation SRAM
     as Q24.24 numbers.
3. **Tile traversal (`tile_traversal`).**
   - The scan starts at the tile that holds the top vertex. It moves right, then left, along
     each tile row of the triangle's bounding box.
   - A row's scan stops at the first tile found outside after a covered one.
   - The next row starts below the last covered tile.
   - A tile counts as touched when, for every edge, at least one of its four corner pixels is
     inside. This test is conservative.
4. **Interior traversal and interpolation (`interior_traversal`, `interpolation_unit`).**
   - The exact 32-bit coverage map of the tile is built.
   - The scalars of the leftmost pixel column are stored in the tile scalar SRAM.
   - The interpolation unit produces one scalar for 16 pixels at a time as
     `s(x+i, y) = s(x, y) + i*M`, using shifts and adds only.
5. **Subdivision test (`ssal_subdivision_test`).** With SSAL on, each pixel of the tile gets a
   role: shade, plane, 2x2 average or splat (see below).
6. **Pixel phase (`task_dispatcher`).** The raster hands over one pixel per cycle.
   - **Pixels to shade** take a task ID from the free-ID queue. Their inputs go into the task
     buffer: `i0 = (x, y, depth, 1)` and `i1`, `i2` = varyings. The ID then enters the sampled
     pixel task queue.
   - **Pixels to approximate** go into the approximation position buffer as (x, y, depth, role).
   - Queued tasks are issued round robin to all 16 cores, including the APS cluster.
   - When a thread finishes, its `o0` (position, moved at full precision) and `o1` (colour,
     converted to RGBA8 as `floor(c*256)` clamped to 0..255) go to the ROP.
7. **Approximation phase (`rop_engine`, `ssal_reconstruction`).**
   - Once every shaded pixel of the tile has arrived, the dispatcher raises `approx_phase` and
     streams out the approximation position buffer.
   - The ROP rebuilds each of those pixels from the shaded colours of the same tile. It then
     applies the same depth and stencil tests as for shaded pixels.
   - The shaded colour buffer is cleared before the next tile.

## SSAL: which pixels are shaded and how the rest are rebuilt

A tile is two 4x4 sub-tiles. Pixel `(c, r)` has bit index `r*8 + c` in the coverage map.

Roles are decided from the tile's coverage map with fixed-position logic:

| Coverage | Pixels shaded | Other covered pixels |
|---|---|---|
| All four corners of a 4x4 sub-tile covered | The four corners | **Plane**: the other 12 pixels are filled from a least-squares plane |
| Otherwise, a 2x2 block with all 4 pixels covered | Its main diagonal (top-left, bottom-right) | **2x2 average** of the two diagonal pixels |
| A 2x2 block with 3 covered pixels, including the diagonal pair | The covered diagonal pair | **Partial 2x2**: the third pixel averages them |
| A 2x2 block with two adjacent covered pixels (1x2 or 2x1) | The first in raster order | **Splat**: the other copies it |
| A lone pixel, or a covered diagonal pair alone | Every covered pixel | None |

Which diagonal is sampled, which pixel of a pair is shaded, and shading a lone diagonal pair are
this design's choices.

The plane fit is the hardest arithmetic in the ROP. It is a least-squares plane through the
four corner samples I0 = (0,0), I1 = (3,0), I2 = (0,3), I3 = (3,3). Per colour channel:

```
S  = I0 + I1 + I2 + I3
Dx = (I1 + I3) - (I0 + I2)
Dy = (I2 + I3) - (I0 + I1)
12 * f(x, y) = 3*S + (2x - 3)*Dx + (2y - 3)*Dy        x, y in 0..3
```

The result is divided by 12, rounded and clamped to 0..255. Every factor is a small integer, so
the unit needs no general multiplier.

An approximated pixel should never arrive without its samples in the shaded colour buffer. If one
does, the ROP counts it in `n_missing`, and a simulation assertion flags it. The top-level test
checks that this counter stays zero.

## AT: biasing the LOD

Each cluster holds a complete LOD bias map for one texture, texture ID 0. The map has one 2-bit
value per texel of every mip level, packed 16 to a word. It uses the same level offsets as the
texture, `sum_{j<k} 4^(L-j)`. For a 256x256 texture this is 5,462 words.

When `at_en` is set and a TEX request names texture 0, the flow is:

1. The texture unit reads the bias for (integer LOD, texel). The read is registered and costs
   two extra cycles.
2. It adds the bias to the integer LOD and clamps the result to the coarsest level.
3. It filters at that level. The LOD fraction is kept.

Filtering works like this:

- An integer LOD fetches 4 texels for a bilinear blend.
- A fractional LOD also fetches 4 texels from the next coarser level and blends the two levels
  linearly. That is 8 texels in total.
- Weights are 8-bit. Texel coordinates are `u*size - 0.5` and wrap (repeat mode).

Textures are RGBA8, one texel per 32-bit word, with R in byte 0, laid out row by row per level.
The core receives channel *c* as the float `c/256`.

## APS: the approximated precision core

`shader_core #(.APS(1))` is the core of cluster 3.

- Registers R0..R13 keep only the upper 16 bits of a float: sign, 8 exponent bits and 7 mantissa
  bits.
- The ALU channels run with a 7-bit mantissa (`fp_alu_channel #(.MW(7))`). Every arithmetic
  result is truncated to that format and zero-padded back to 32 bits.
- R14 and R15, and MOV instructions, keep all 32 bits.

A pixel program meant for this cluster should therefore follow two rules:

- It should MOV the position into the output buffer.
- It should MOV the texture coordinate into R14 or R15 before TEX.

The test programs do both.

## Shader core and instruction set

Each core runs one thread at a time through Fetch, Decode, Execute and Write Back. Operands
come from:

- the register file (16 x vec4);
- the constant memory (16 x vec4);
- the input buffer (8 x vec4);
- the output buffer (8 x vec4).

Each source operand has a 2-bit-per-lane swizzle, and a write mask selects the lanes written.
Results are forwarded from Write Back, so back-to-back dependent instructions do not stall.

The 50-bit instruction word (`gpu_pkg::instr_t`) is this design's own encoding:

| Field | Bits | Meaning |
|---|---|---|
| op | 5 | NOP MOV ADD SUB MUL MIN MAX ABS SLT SGE AND OR XOR DP3 DP4 TEX JMP END |
| dst_out | 1 | 1 = write the output buffer, 0 = the register file |
| dst | 4 | destination index |
| wmask | 4 | lane enables |
| a, b | 2 x 14 | source select (reg/const/in/out), index, swizzle |
| imm | 8 | jump target or texture ID |

Notes on the instructions:

- DP3 and DP4 are the vector sum: they multiply, sum across lanes and broadcast the result.
- TEX sends lanes x, y, z of operand A as (u, v, LOD) and stalls the pipeline until the texel
  returns.
- JMP costs two bubble cycles.
- Throughput is one instruction per cycle otherwise. The testbenches check these cycle counts.

Floating point is IEEE single format, with these limits: it truncates instead of rounding,
flushes denormals to zero, and has no NaN or infinity handling.

## Memory system

| Block | Organisation (this design's choice unless noted) |
|---|---|
| Texture L1, one per cluster (`tex_cache`) | 256 lines x 4 words (4 KB), direct mapped, blocking. A hit answers 1 cycle after the request. |
| Texture L2 (`tex_l2_cache`) | 64 KB, the size the architecture gives. 4096 lines x 4 words, direct mapped. The four L1s are arbitrated round robin (`line_arbiter`). |
| Data fetch (`data_fetch`) | Two clients (L2 misses and the vertex fetch), fixed priority. A line is read as four single-word reads on a 32-bit bus, one read outstanding. |
| ROP buffer (`rop_engine`) | Full-screen on-chip colour (32 b), depth (16 b) and stencil (8 b) arrays. `clear_start` clears one pixel per cycle. Depth test is LESS, stencil test is EQUAL. Visible pixels replace the colour; there is no blending. |
| Task buffer (`task_buffer`) | 32 task IDs x 4 vec4. |
| Queues (`sync_fifo`) | Free task IDs, sampled pixel tasks and approximation positions. |

## Top-level interface and use

`gpu_top` parameters:

- `SCREEN_W` and `SCREEN_H` (512)
- `TEX_LOG2`, the bias map size (8)
- `L1_LINES` (256)
- `L2_LINES` (4096)
- `NTASK` (32)

The signals are plain, with no bus protocol:

- **Loading:** `prog_we/addr/data` and `const_*` are broadcast to all cores. `bias_*` is
  broadcast to the four bias buffers. `tex_flush` invalidates all texture caches.
- **Configuration:** `ssal_en`, `at_en`, `tex_base` (word address), `tex_log2`, `vs_pc`,
  `ps_pc`, `vbase`, `depth_en`, `stencil_en`, `stencil_ref` and the clear values.
- **Drawing:**
  - Start a clear with `clear_start` and wait for `clear_busy` to fall.
  - Then present triangles on `tri_valid`/`tri_ready`/`tri_idx`.
  - `idle` is high once the last triangle is fully written.
- **External memory:**
  - `ext_req_valid`/`ext_req_ready`/`ext_req_addr` carry word-address read requests.
  - Each request is answered by one `ext_rsp_valid` cycle with `ext_rsp_data`.
- **Read-back:**
  - `fb_rd_addr = y*SCREEN_W + x` reads `fb_rd_color` (RGBA8) and `fb_rd_depth`
    combinationally.
  - The `stat_*` outputs count threads, approximated pixels by kind, texture requests,
    biased requests, cache traffic and tiles.

To simulate the top-level test with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_gpu_top \
    rtl/gpu_pkg.sv tb/tb_pkg.sv tb/tb_gpu_top.sv
./obj_dir/Vtb_gpu_top
```

Any other testbench is built the same way by changing the top module name. Each one prints
`TB_RESULT checks=N failures=M`.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the block against an
independent model over thousands of random cases and has a watchdog. Where the design promises
a rate or latency, the testbench checks the cycle count:

- triangle setup finishes 41 + 9 cycles after accepting a triangle;
- the raster produces one pixel per cycle;
- cache hits answer in one cycle;
- shader timing is checked per instruction and for jumps;
- a ROP clear takes `SCREEN_W*SCREEN_H + 1` cycles.

`tb_gpu_top` runs the full-size design (512x512, 16 cores, 64 KB L2) on three triangles:

- one drawn with SSAL and AT on;
- one entirely behind it, which must be hidden by the depth test;
- one with SSAL off.

It checks the following:

- every pixel in the bounding boxes against an independent coverage and interpolation model:
  colour within 4 LSB per channel, to allow for APS, reconstruction and fixed-point rounding;
  depth exact; uncovered pixels keep the clear colour;
- that shaded plus reconstructed pixels equal covered pixels;
- that every mechanism actually happened: vertex threads, APS threads, each of the three
  approximation kinds, biased texture lookups, L1 and L2 misses, external reads and hidden
  pixels.

The task dispatcher is tested only through this top-level test.

## Where this design departs from the published chip

- **Throughput.**
  - The chip's figures are 350 MHz, 2.8 Gvertices/s and 5.6 Gpixels/s, which is 16 pixels per
    cycle.
  - Here the interpolation unit does compute 16 pixels at once. But the dispatcher accepts one
    pixel per cycle and keeps only one triangle and one tile in flight.
  - Sustained rates are therefore far lower. The large SSAL triangle in the top-level test
    (5,121 pixels) takes about 42,000 cycles.
- **A 768x768 screen** needs `SCREEN_W = SCREEN_H = 768`. The default ROP buffer holds 512x512.
- **Untimed.** No clock frequency, area or power target has been worked toward. The synthesis
  netlist is unconstrained.
- **Own formats.** Instruction encoding, fixed-point formats, texture and bias map layouts, cache
  organisations and the dispatcher's pixel ordering are all this design's own.
- **Not built.** Off-chip memory, the bus protocol, pads and clock generation. The testbenches
  model memory behaviourally.
