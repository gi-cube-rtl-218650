# GI-Cube: a ray-reordering volume ray tracer in SystemVerilog

Rendering a volume with global illumination means following many rays
(camera rays, light rays, scattered rays) through a voxel grid. If each ray
is traced on its own from start to end, consecutive samples hit unrelated
parts of the volume and every sample misses the cache. GI-Cube turns that
around. It cuts the volume into cubic **blocks**, keeps one **ray queue per
block**, and always works on a whole queue at once. While a processor works
through a queue, all its samples fall in the same block, so a cache that
holds one block serves almost every sample. A ray that leaves the block is
filed into the queue of the block it enters, and waits there until that
block's turn comes.

This RTL implements the ray-processing ASIC of that architecture: four
identical block processors, the links between them, and the ray bus to the
board controller (a DSP). It supports plain volume rendering, low-albedo and
high-albedo global illumination (light rays deposit energy into a per-voxel
irradiance field), hardware scattering, space leaping and early ray
termination.

Default sizes: a 256³ volume in blocks of 32³ (8×8×8 blocks), four
processors, 128 queues of 256 rays each per processor, 32-byte rays, 36-bit
voxels.

## Ray and voxel formats (`rtl/gicube_pkg.sv`)

A ray is a 256-bit packed struct (`ray_t`). It carries everything needed to
resume tracing it at any later time, in any processor:

| field | bits | meaning in this RTL |
|---|---|---|
| `pos_x/y/z` | 16 each | sample position, unsigned 8.8 voxels |
| `dir_x/y/z` | 16 each | direction, signed Q2.14, unit length |
| `dest_u/v` | 16 each | image pixel the ray contributes to |
| `lifetime` | 16 | steps left |
| `contribution` | 16 | weight of the ray in the image (used as queue importance) |
| `generation` | 8 | number of scattering events |
| `opacity` | 24 | accumulated opacity, 0.24 |
| `rtype` | 4 | bit 0 lighting ray, 1 irradiance carrier, 2 trapped for software, 3 finished |
| `red/green/blue` | 12 each | accumulated colour; for lighting rays `red` holds the energy |
| `interaction` | 16 | opacity (top 16 bits) at which the ray next interacts |
| `user` | 8 | free |

A voxel (`voxel_t`, 36 bits) holds a 12-bit density, a 2-bit material tag,
an 11-bit gradient index and an 11-bit irradiance. The gradient is stored as
an index into a table of quantised directions. The irradiance is written by
the hardware during the lighting pass and read back as the light level
during rendering.

## Who owns a ray: partitions and queue numbers (`queue_select`)

The blocks are divided among the processors in one of three ways, selected
at run time by `cfg.partition`:

* **simple slab**: each processor owns a contiguous slab of block columns
  along x;
* **repeated slab**: block column `bx` goes to processor `bx mod p`;
* **skewed block**: block `(bx,by,bz)` goes to processor `(bx+by+bz) mod p`.

Inside a processor, the queue number is `q = (local_x << 2·log2(B)) +
(by << log2(B)) + bz`, where B is the number of blocks per axis. With the
defaults this gives q = ((x>>5) mod 2)·64 + (y>>5)·8 + (z>>5).
`queue_select` is purely combinational. `ray_dispatch` uses three copies of
it: one for the broadcast bus and one for each bucketing slot.

## Picking the next queue: importance and the insertion sorter

Each queue has a scalar **importance**: either its ray count, or the sum of
its rays' `contribution` fields (`cfg.policy_contrib`). `ray_queues` keeps
both up to date incrementally: it adds on every write and subtracts on every
read. It flags each queue whose importance changed in that cycle.

`queue_sorter` is a pipelined insertion sorter with one rank per queue. Each
rank holds a *selected* item and a *comparison* item, each a (queue,
importance) pair. A changed queue is inserted at the top. In the same cycle,
its older copy is wiped from whichever rank holds it. In every cycle, every
rank keeps the larger of its two items and passes the smaller down one rank.
So the ordering improves by one step per cycle, without any global sort.

The top rank is the **active queue**. It counts as infinitely important and
stays there until it is empty. Then every rank moves up one place, and the
next queue becomes active. Several queues can change in the same cycle, but
only one item can enter per cycle. So the sorter keeps a pending bit per
queue and inserts the lowest-numbered pending queue first. The order is
therefore approximate for a few cycles after a burst of changes. That is
harmless: it only affects which queue comes next.

## The volume cache (`volume_cache`)

The cache stores voxels for the block being processed, plus one extra slice
on each axis. The trilinear neighbourhood of a sample at local coordinate 31
reaches coordinate 32, so a block needs 33³ voxel positions.

* **Eight-way interleaving.** Corner `(cx,cy,cz)` lives in bank
  `{cz[0],cy[0],cx[0]}` at index `(cz>>1, cy>>1, cx>>1)`. The eight corners
  of any neighbourhood therefore fall in eight different banks. All eight
  voxels are read in one cycle. Each bank holds 17³ entries.
* **Tags.** Every entry records the global block number that filled it. An
  entry filled by another block counts as a miss, so the cache is refilled
  lazily as rays touch new voxels.
* **Miss scheduler.** On a miss the ray waits in a holding register. The
  missing corners are requested one per cycle from the memory port. Answers
  come back in request order and are written both into their bank and into
  a bypass register. When the last missing corner arrives, the ray leaves
  with all eight voxels. Pending memory writes take priority over reads.
* **Irradiance read-modify-write.** An irradiance carrier ray (`rtype` bit
  1) is absorbed by the cache instead of being passed on. Its energy is
  weighted by the eight trilinear weights and added (with saturation) to the
  irradiance of the eight corners. The updated voxels are written into the
  cache and queued to memory through a 16-entry write queue.

Timing: a hit is answered in the cycle after the request. A miss costs
about one cycle per missing voxel plus the memory latency. `req_ready` is
low while a miss is outstanding, or while the write queue has fewer than
eight free places.

## The sample pipeline

Each stage is one register stage. A ray moves one stage per cycle; no stage
stalls, because a ray only enters the pipeline when every output queue has
room for all rays in flight.

1. **Gradient tables** (`gradient_lut`): eight copies of a 2048-entry table.
   Each copy turns one corner's gradient index into three signed 10-bit
   components.
2. **Resampler** (`resampler`): trilinear interpolation, as seven linear
   interpolations, of density, gradient and irradiance. It takes the
   material tag of the nearest corner.
3. **Segmentation** (`segmentation_unit`): a 16384-entry table indexed by
   {tag, density}. It gives colour, opacity, BSDF code, glossiness and
   scattering and diffuse coefficients.
4. **Spacing** (`spacing_unit`): the sample distance `d` is jittered by a
   factor `r = (256+j)/512`, between ½ and 1. `j` comes from a 256-entry
   table addressed by a hash of the ray's position and pixel. The opacity is
   corrected for the step length through a power table, `α' = 1−(1−α)^(d·r)`,
   and composited into the ray: `O += (1−O)·α'`.
5. **Shading** (`shading_unit`):
   - Normal mode uses a reflectance map: six faces of 128×128 intensities,
     addressed by the gradient direction and interpolated bilinearly.
   - Global-illumination mode uses `kd × irradiance` instead.
   - Rendering rays accumulate colour with the *over* operator.
6. **Scatter and splat** (`scatter_splat`):
   - *Low albedo*: at every sample a lighting ray leaves the absorbed part of
     its energy, `E·(1−Ks)·α'`, as a new carrier ray at the sample position.
     It keeps `E·(1−α')` for itself.
   - *High albedo* (photon mode): nothing is deposited until the ray's
     opacity reaches its interaction value. Then the photon either scatters
     (a random byte below `Ks`), with its opacity reset, or is absorbed: the
     ray itself becomes a carrier of all its energy.
   - *BSDFs* in hardware:
     - specular reflection;
     - dull reflection and dull scattering, `normalise(D + β·δ)`;
     - isotropic scattering, `δ`;
     - ideal diffuse, `δ` turned into the hemisphere facing back against the
       ray.

     `δ` is a unit vector from a 256-entry table. Codes 6 and 7 trap the ray
     (`rtype` bit 2) and send it to the board controller for software
     scattering.
   - *Advance*: the position moves by `D·d·r`. In a block that the driver
     has flagged empty (`empty_flags`), the step is stretched to the
     nearest block face instead (space leaping).
   - *Finish*: a ray is finished when it leaves the volume, uses up its
     lifetime, reaches the early-termination opacity (rendering rays), or
     runs out of energy (lighting rays).
7. **Bucketing** (`ray_dispatch`) runs at twice the pipeline rate, so it
   places two rays per cycle. Sources are taken in priority order: pipeline
   ray, pipeline carrier, left neighbour, right neighbour, broadcast bus.
   - Finished, trapped and outside rays go to the board controller.
   - Rays owned by another processor go round the ring the shorter way.
   - A processor's own rays go into their block queue. If that queue is
     full, the ray goes back to the board controller (overflow).

## Interconnect (`gicube_top`, `ray_fifo`, `ray_merge`)

* **Ring**: each processor has a left and a right output FIFO (64 rays,
  two write ports) feeding its neighbours' inputs.
* **Broadcast bus**: the board controller offers one ray at a time on
  `dsp_in_*`. The processor that owns the ray takes it; `dsp_in_ready` is
  the OR of the processors' ready signals.
* **Merge tree**: each processor's controller-bound FIFO feeds a binary tree
  of `ray_merge` nodes. Each node is a round-robin 2:1 merge with an output
  register. The root is `dsp_out_*`.
* **Memory**: each processor has its own voxel port (`mem_req`, `mem_ready`,
  `mem_rsp`), one 36-bit voxel per cycle, in-order read data. A voxel
  address is `{z,y,x}`, 8 bits each.

All streaming ports use valid/ready: a transfer happens in a cycle where
both are high.

## Configuration and tables

`cfg_t` selects:
- the partition;
- the importance policy;
- global-illumination shading;
- high-albedo mode;
- the sample distance (8.8 voxels);
- the early-termination opacity.

All tables are written through one port, `lut_wr`: `sel` names the table,
and `addr` and `data` give one entry per cycle. The tables are:

| `sel` | table | entries | entry |
|---|---|---|---|
| `LUT_GRAD` | gradient directions (all 8 copies at once) | 2048 | {gx,gy,gz} signed 10-bit |
| `LUT_SEG` | material classification | 16384, index {tag,density} | `seg_t`, 84 bits |
| `LUT_JITTER` | jitter factors | 256 | 8-bit `j` |
| `LUT_POWER` | corrected opacity | 16384, index {α[15:8], min(63, d·r/16)} | 16-bit `1−(1−α)^(s/16)` |
| `LUT_RDIR` | random unit directions | 256 | {dx,dy,dz} Q2.14 |
| `LUT_REFL` | reflectance map | 6·128·128, index {face,v,u} | 8-bit intensity |

The testbenches compute every table from these formulas in
`tb/tb_gicube_pkg.sv`.

## Departures from the original architecture and known limits

* The cache fills lazily: a voxel is fetched when a ray first needs it. The
  original fetches ahead of the pipeline. With sparse rays, most samples
  therefore stall.
* The memory port carries one voxel per cycle. The original streams up to
  four from fast memory.
* A voxel on a block face can be cached twice: as the extra slice of one
  block and as the first slice of the next. An irradiance update refreshes
  only the copy it used, so the other copy may be stale until it is evicted.
* Only two importance policies are built: ray count and total contribution.
* Fixed-point formats, table entry layouts, FIFO depths, the issue margin,
  the hash used for random numbers and all handshakes are this design's own
  choices.
* The 8.8 position format limits the volume to 256³. With 8 blocks per axis
  the simple slab partition needs NPROC ≤ 8.
* The DSP, the frame-buffer memory, the volume RDRAM and its interface
  cell, and the PCI interface are outside this RTL. Their connections are
  the top-level ports. `tb/rdram_model.sv` is a behavioural stand-in for the
  volume memory.

## Files

* `rtl/gicube_pkg.sv`: types, constants, helper functions (integer square
  root, vector normalisation, ray hash).
* `rtl/gicube_top.sv`: the top level (processors, ring, bus, merge tree).
* `rtl/block_processor.sv`: one processor.
* `rtl/queue_select.sv`, `rtl/ray_dispatch.sv`, `rtl/ray_queues.sv`,
  `rtl/queue_sorter.sv`: queueing and scheduling.
* `rtl/volume_cache.sv`, `rtl/gradient_lut.sv`, `rtl/resampler.sv`,
  `rtl/segmentation_unit.sv`, `rtl/spacing_unit.sv`, `rtl/shading_unit.sv`,
  `rtl/scatter_splat.sv`: the pipeline.
* `rtl/ray_fifo.sv`, `rtl/ray_merge.sv`: interconnect.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/tb_gicube_pkg.sv` holds the test volume and table formulas.
  `tb/rdram_model.sv` is the memory model.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/gicube_pkg.sv tb/tb_gicube_pkg.sv rtl/*.sv tb/rdram_model.sv \
  tb/tb_gicube_top.sv --top-module tb_gicube_top -Mdir obj_top
./obj_top/Vtb_gicube_top
```

Replace `tb_gicube_top` with any other testbench name.

`tb_gicube_top` runs the whole chip at its default sizes against a
synthetic 256³ volume. The volume has a dense sphere of two materials, a
slab of software-BSDF material, and empty border blocks. Loading the tables
takes 134k cycles. The test then runs four phases:

1. rendering rays with reflection, colour accumulation and trapping;
2. low-albedo lighting with irradiance write-back;
3. high-albedo photons;
4. global-illumination rendering under the skewed partition and the
   contribution policy, including a burst that overflows queues.

It checks that every ray comes back or is accounted for. It counts 16 event
kinds and fails if any never happened:
- cache miss stalls and bypasses;
- carrier absorption;
- queue overflow;
- left, right and controller traffic;
- queue switches;
- space leaps and early termination;
- photon absorption, traps and scattering;
- splatting;
- finished rays;
- issued rays.

It takes about 10 s of simulation. The unit testbenches use reduced sizes
where the defaults would be slow (for example a 64³ volume for the cache and
processor tests).
