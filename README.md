# DRPU: a ray-casting core for dynamic scenes

Ray tracing needs a spatial index over the scene. Rebuilding that index every
frame is too slow for animated geometry. This core avoids the rebuild by
using a **B-KD tree**. A B-KD tree is a binary bounding-volume hierarchy where
each node keeps bounds for its two children along one axis only. When
vertices move, the tree's shape stays the same and only the interval bounds
are refitted. Refitting needs nothing beyond min/max. Rays are traced in
**packets of four** that run in lock-step. Each packet shares its node
fetches, vertex fetches, loads and control flow.

The RTL covers these fixed-function parts of one core:

- the bound refit unit;
- the tree traversal engine;
- the ray/triangle unit;
- the first-level caches;
- the DRAM arbiter;
- the pixel scheduler;
- the two SIMD helpers that a packet-based shader core needs: branch masking and load combining.

The programmable shader core itself is not included. Its connections are
top-level ports.

## Block structure

```
                 host                       DRAM
                  |                          |
   frame_* ---> thread_scheduler      memory_interface (round robin, 1 read outstanding)
                  |  2x2 pixel quads     ^    ^    ^         ^
                  v                      |    |    |         |
   sp_pkt_* (to shader)         node$  vertex$ shader$   update_processor <--- up_*
                                  ^      ^       ^
 trace_* --> traversal_processor -+      |       +-- mem_packer <--- ld_*
              | 4 x tpu (comb.)          |
              +--> geometry_unit --------+
 br_* -----> simd_branch_unit
```

`drpu_top` holds one `thread_scheduler`, one `update_processor`, one
`memory_interface`, and `NUM_RU` rendering units. Each rendering unit contains:

- a `traversal_processor` with four `tpu` instances;
- a `geometry_unit`;
- three `l1_cache` instances: node, vertex and shader;
- a `mem_packer`;
- a `simd_branch_unit`.

The memory interface clients are numbered as follows:

- for unit *r*: the node cache is port 3r, the vertex cache is 3r+1, and the shader cache is 3r+2;
- the update processor is the last port.

Defaults are one rendering unit, 32 packet slots, a 1024x768 frame and
16 KB four-way caches of 128-bit words.

`drpu_pkg` holds the types shared by all blocks, the word layouts and the
floating-point functions.

## Memory words and the node format

Every memory access moves one 128-bit word, and addresses count words.

| word | contents |
|---|---|
| node, word A | `{c1_hi, c1_lo, c0_hi, c0_lo}`: the two child intervals on the split axis |
| node, word A+1 | `[1:0]` kind (0 inner, 1 leaf, 2 transformation), `[3:2]` axis (0 x, 1 y, 2 z) |
| inner | `[35:4]` address of child 0; child 1 is at child 0 + 2 |
| leaf | `[35:4]`, `[67:36]`, `[99:68]` vertex addresses; `[127:100]` primitive id |
| transformation | `[35:4]` root of the instanced object; `[67:36]` address of three matrix rows |
| matrix row | `{translation, m_z, m_y, m_x}`, three consecutive words mapping world to object space |
| vertex | `{unused, z, y, x}` |

A leaf holds exactly one triangle. Vertices are separate words, so triangles
that share a vertex also share its storage.

## Refitting: the update processor

The update processor runs a small program that the driver prepares for each
object. It has 64 vertex registers and 64 bound registers. A bound is a full
3-D box. Each instruction is one 128-bit word:

| op | name | effect |
|---|---|---|
| 0 | END | stop and pulse `done` |
| 1 | LDV | `vreg[dst] <- mem[addr]` |
| 2 | TRI | `breg[dst] <- box(vreg[a], vreg[b], vreg[c])` |
| 3 | MRG | `breg[dst] <- box(breg[a]) merged with box(breg[b])` |
| 4 | STN | `mem[addr] <- {breg[b].hi[axis], breg[b].lo[axis], breg[a].hi[axis], breg[a].lo[axis]}` |

The fields are `[3:0]` op, `[9:4]` dst, `[15:10]` a, `[21:16]` b, `[27:22]` c,
`[29:28]` axis and `[63:32]` addr.

A post-order walk of the tree produces the program:

- TRI for each leaf;
- MRG for each inner node;
- STN of the two child boxes on the node's axis, aimed at that node's bounds word.

Shared vertices are loaded once and stay in registers. Memory traffic is
therefore limited to instruction fetches, vertex loads and node stores.

## Traversal: the traversal processor and its TPUs

A trace request carries the following:

- a packet id and a root node address;
- an active-ray mask;
- four rays, each an origin and a direction;
- a far limit per ray.

On entry the unit does three things:

1. It computes the reciprocal directions. This is repeated only when the rays enter or leave an instanced object.
2. It sets each ray's interval to `[0, far]`.
3. It sets each ray's hit distance to the far limit, with no hit.

Each step fetches the node's kind word, and for inner nodes also the bounds word.

A `tpu` is purely combinational and works on one ray per step:

- it computes the two slab intervals `(lo - o) * inv` and `(hi - o) * inv`;
- it orders each pair by size;
- it intersects each slab with the ray's interval;
- it clips the far end to the closest hit so far;
- it reports whether the ray overlaps child 0 and child 1;
- it reports early termination, which happens when the closest hit lies before the interval's near end.

The traversal processor then handles the packet as a whole:

- **Child order.** If any active ray overlaps both children, the packet enters the *closer* child. The other child is pushed with each ray's interval for that child, and only rays that overlap it are kept in the pushed mask. The closer child is chosen from the direction sign of the lowest active ray on the split axis. With a positive sign it is the child whose slab starts first; with a negative sign it is the child whose slab ends last.
- **Dropping rays.** A ray that overlaps neither child drops out of the branch. A terminated ray drops out as well.
- **Leaves.** A leaf sends the triangle and the still-active rays to the geometry unit. Each ray's hit is updated when the new `t` is closer.
- **Ending a branch.** A branch ends with no active rays or after a leaf. It then pops the stack, and an empty stack completes the trace.
- **Instanced objects.** At a transformation node the geometry unit transforms all four rays into the object's space with the node's matrix. The world-space rays are saved in a register, a *restore marker* is pushed, and traversal continues at the object's root with the same intervals and hit distances. This works because the direction is not renormalised, so a distance `t` along the ray is the same in both spaces. When the marker is popped, the world rays and their reciprocals come back. Only one level of instancing is supported: a transformation node inside an object ends that branch.
- **Stack.** The stack holds `STACK_DEPTH` (32) entries. Each entry stores a node address, a mask and four intervals. A push into a full stack is dropped and sets the sticky `stack_overflow` flag.

Counters report steps, leaves, pushes, pops and early terminations.

## Intersection: the geometry unit

The geometry unit reads the three vertex words through the vertex cache. It
then takes two cycles per ray, which is eight cycles per packet, and computes
Möller-Trumbore:

- **Cycle 1:** the two edges, `s = o - v0`, `p = d x e2`, `q = s x e1` and the determinant.
- **Cycle 2:** `u`, `v` and `t` from one reciprocal of the determinant.

A hit requires all of the following:

- `det != 0`;
- `u >= 0`;
- `v >= 0`;
- `u + v <= 1`;
- `0 < t < tmax`, where `tmax` is the ray's current closest hit.

In mode 1 the same unit multiplies each ray by a 3x4 matrix, whose three rows
are read as three words. The origin takes the translation column and the
direction does not. The response arrives exactly eight cycles after the third
vertex word.

## Floating point

All arithmetic is binary32 in layout, with a simpler rounding model:

- results are truncated;
- denormals flush to zero;
- overflow gives infinity;
- NaNs are not handled specially;
- compares use the sign-magnitude order of the bits.

Division is a long division of the mantissas. The functions are in
`drpu_pkg` (`fp_add`, `fp_mul`, `fp_div`, `fp_lt`, ...). Expect results up to
one unit in the last place below correctly rounded IEEE results. The
testbenches compare against reference models with tolerances, and skip rays
that graze a triangle edge.

## Caches, arbiter and scheduler

- **`l1_cache`:**
  - 128-bit lines of one word each, with `SIZE_BYTES/16/WAYS` sets (256 by default);
  - the replacement victim is chosen round robin per set;
  - writes go through and do not allocate;
  - a read hit answers on the next cycle.
- **`memory_interface`:**
  - grants the DRAM port round robin;
  - keeps one read outstanding and routes its answer back to the client that asked.
- **`thread_scheduler`:**
  - splits the frame into 2x2 quads, issued row by row;
  - gives each quad to a free packet slot of a rendering unit, round robin among units;
  - a slot is free again when the shader reports it done;
  - `frame_done` pulses when every quad has been issued and all slots are free.
- **`mem_packer`:**
  - takes a packet load of four addresses;
  - each cycle issues one request for the lowest waiting thread;
  - that request serves every thread with the same address;
  - the number of requests therefore equals the number of distinct addresses.
- **`simd_branch_unit`:**
  - holds a packet's program counter and activity mask;
  - on a branch where the threads disagree, runs the taken threads first and pushes `{pc+1, not-taken mask}` on a 16-entry control stack;
  - `ret` resumes the next stack entry, or finishes the packet if the stack is empty.

## Memory port protocol

Every block uses the same port, `mem_req_t {valid, we, addr, wdata}`.

- A request is held until `ready` is high.
- A read is answered later by `mem_rsp_t {valid, rdata}`.
- Each requester has at most one access outstanding.

Assertions check that the update processor holds its request stable while it waits, that the branch unit gets one operation per cycle, and that the traversal stack never overflows.

## Where this design departs from the architecture it implements

- **No shader processor.** The programmable 4-wide SIMD shader processor, with its instruction set, register stack and trace instruction, is not built. Its ports on `drpu_top` are:
  - `sp_pkt_*`: new packets;
  - `sp_done_*`: finished slots;
  - `trace_*` and `res_*`: ray casts;
  - `ld_*`: loads;
  - `br_*`: control flow.

  Shader stores are not provided.
- **One packet in flight per traversal processor.** The architecture hides latency by interleaving many packets in the traversal unit. Here a trace runs alone from start to finish, and each step costs two node-cache round trips.
- **One level of instancing.** Transformation nodes are followed from the world tree into an object, but not from inside an object into another one.
- **Sizes chosen here:**
  - the traversal stack holds 32 entries;
  - the control stack holds 16 entries;
  - the program counter is 16 bits;
  - one triangle per leaf and two 128-bit words per node, as laid out above;
  - a tree deeper than the traversal stack raises `stack_overflow`, and the branches that could not be pushed are lost.
- **Truncating floating point** rather than round-to-nearest.
- **Geometry unit timing.** It takes two cycles per ray in sequence rather than a deep pipeline, which gives the same eight-cycle throughput for a packet.
- **Not modelled:** the skinning unit, the host bus (PCI and DMA), the SRAM macros and the pads.

## Parameters of `drpu_top`

| parameter | default | meaning |
|---|---|---|
| `NUM_RU` | 1 | rendering units |
| `NPKT` | 32 | packet slots per unit |
| `WIDTH`, `HEIGHT` | 1024, 768 | frame size in pixels; both must be even |
| `CACHE_BYTES`, `CACHE_WAYS` | 16384, 4 | size and associativity of each first-level cache |
| `STACK_DEPTH` | 32 | traversal stack entries |
| `CTL_DEPTH`, `PC_W` | 16, 16 | control stack entries, program counter width |

The update processor's register counts are parameters of `update_processor`
(`NUM_VREGS` and `NUM_BREGS`, both 64).

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/drpu_pkg.sv tb/tb_fp.sv tb/tb_scene.sv tb/tb_traversal_processor.sv \
    --top-module tb_traversal_processor -o sim
./obj_dir/sim
```

Replace the testbench name to run a different one. The testbenches are
`tb_update_processor`, `tb_tpu`, `tb_geometry_unit`, `tb_traversal_processor`,
`tb_l1_cache`, `tb_memory_interface`, `tb_thread_scheduler`,
`tb_simd_branch_unit`, `tb_mem_packer`, `tb_drpu_top` and `tb_drpu_scene512`.

The following files are testbench support:

- `tb_fp` converts between `real` and binary32;
- `tb_scene` builds a random triangle scene, its heap-ordered B-KD tree and the matching refit program, and provides a brute-force reference tracer;
- `tb_dram_model` is a DRAM with fixed latency and optional random stalls.

`tb_drpu_top` runs the whole core at its default parameters, with no
overrides:

1. It refits a 16-triangle scene whose node bounds start at zero, and checks every node.
2. It renders a complete 1024x768 frame, which is 196,608 packets. A small shader model traces one primary ray per pixel. The upper half of the frame sees the scene's own tree. The lower half sees a world of two instances of the scene, one shifted and one scaled, reached through transformation nodes. Every result is checked against the brute-force tracer. The model then loads one word per ray through the packer and the shader cache, and branches on the hit mask.

The test requires each of these events to happen at least once:

- stack pushes and pops;
- early terminations;
- leaf tests;
- hits and misses in every cache;
- combined loads;
- divergent branches;
- hits inside instanced objects.

It takes a little over a minute in Verilator. This full frame is the largest
configuration simulated.

`tb_drpu_scene512` runs the same test on a scene of 512 triangles, which is
the size of the simplest benchmark scene this architecture was evaluated on.
The tree has nine levels. The frame is 256x192, and its lower half again
goes through two instances. The refit step is skipped there, because its
simple per-node register allocation needs more than 64 bound registers for
a tree this large.
