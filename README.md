# Rime: a real-time k-d tree ray tracer in SystemVerilog

Rime renders a triangle scene by ray tracing, one primary ray per pixel, fast enough
to move a camera through the scene with a keyboard and watch the picture follow on a
VGA monitor. Every ray walks a k-d tree on its own, so thousands of rays are in flight at
once. The hard part is that a ray tracer is recursive while hardware wants a pipeline.
Here recursion is replaced by a *short stack* of four entries per ray plus a *restart
node*. Each ray becomes a small token (a ray ID and a node ID) that circulates through a
loop of fixed-function units until it is known to hit or miss.

The scene is prepared on a host. The host builds the k-d tree and turns every triangle
into the affine map that sends it onto the unit triangle. It sends the result over a
serial line with XMODEM. Everything then lives in on-chip block RAM. Only the two frame
buffers use external SRAM.

## Numbers

All geometry uses a 24-bit float: 1 sign bit, 8 exponent bits (bias 127), 15 mantissa
bits. That is the top 24 bits of an IEEE single. The arithmetic in `rtl/rt_pkg.sv` is
simple:
- denormals become zero;
- results are truncated;
- x/0 gives a signed infinity;
- overflow saturates to infinity.

Every unit uses the same combinational functions (`fp_add`, `fp_mul`, `fp_div`, `fp_lt`,
...) and registers their result. Comparisons use an ordering key, so a plain unsigned
compare sorts floats.

## The ray pipe (`raypipe`)

```
 prg ──> shader ──> scene_int ──miss──────────────────────────────────┐
           ^            │ hit: init short stack                       │
           │            v                                             │
           │   tarb ──> tcache ──> trav_unit ──push/restart──> shortstack
           │    ^                     │   │ leaf                 │  │ pop
           │    └──── next child ─────┘   v                      │  │
           │    └──────────── popped node / restart ─────────────┘  │
           │                         larb ─> lcache ─> icache ─> int_unit
           │                          ^                          │ next triangle
           │                          └──────────────────────────┘
           │                                list_unit <─ hits, last triangle
           └──── hit result / miss ─────────── list_unit, shortstack
```

A ray goes through these steps:

1. **Ray IDs.** The shader owns 512 ray IDs, kept in a FIFO. It gives one to each primary
   ray from the primary ray generator. It writes the ray's origin and direction into the
   *raystores*, which are per-ID memories, so later units carry only the ID. The pixel
   number is kept, indexed by ID, until the ray returns.
2. **Scene box.** `scene_int` clips the ray against the scene bounding box with a slab test.
   - A miss goes straight back to the shader.
   - A hit sets up the ray's short stack: empty stack, restart node = root, scene exit
     time = tmax. The token {ID, root, tmin, tmax} then goes to the traversal arbiter.
3. **Traversal** (`trav_unit`). The unit reads the node word from the traversal cache and
   does one step:
   - An interior node gives the plane crossing `tmid`. The near child continues
     round the loop.
   - If both children are crossed, the far child is pushed on the short stack.
   - The first time a ray has to cross both children, its restart-search bit is cleared.
     That node then becomes its restart node.
   - A leaf with triangles goes to the list arbiter and initialises the ray's entry in the
     list unit.
   - An empty leaf or an empty child asks the short stack for a pop.
4. **Triangles.** The list arbiter (`larb`) feeds the chain list cache → intersection cache
   → `int_unit`. The list cache turns the leaf's list index into a triangle ID. The
   intersection cache turns the triangle ID into its 3x4 transform.
   - The unit maps the ray into unit-triangle space and intersects it with the z = 0 plane:
     t = -o'z/d'z, u = o'x + t·d'x, v = o'y + t·d'y. It then tests u, v ≥ 0 and u + v ≤ 1.
   - Each triangle after the first in a leaf goes round the `larb` loop again.
   - Hits and the last-triangle flag go to the list unit.
   - A shadow ray (tmax = 1) that hits anything below t = 1 returns at once.
5. **Leaf exit** (`list_unit`). The list unit keeps the closest hit per ray.
   - After the last triangle, a hit no farther than the leaf's tmax finishes the ray. The
     unit computes the hit point o + t·d and returns the result to the shader.
   - Otherwise the ray asks the short stack for a pop, at t = leaf tmax.
6. **Pop** (`shortstack`). A pop returns the top entry if there is one.
   - With an empty stack, a ray whose pop time has reached the scene exit time is a miss.
   - Otherwise the ray restarts at its restart node over [pop t, scene tmax].
   - A push onto a full stack drops the oldest entry. This is why the restart node exists:
     nothing is lost for good, it is only found again by a longer walk.
7. **Colour** (`shader`). A returning ray frees its ID. The shader writes the pixel's
   RGB565 colour to the pixel buffer: a fixed hash of the triangle ID for a hit, the
   background colour for a miss.

All units talk with valid/ready handshakes. Merges use fair round-robin arbiters
(`arbiter`). Feedback paths are decoupled by FIFOs (`fifo`), so the loops cannot
deadlock. A ray holds one ID and is exactly one token in the loop at any time.

## Around the pipe

- **Scene download.**
  - `uart_rx` receives 8N1 bytes at 115,200 baud; with a 50 MHz clock, `CLKS_PER_BIT = 434`.
  - `uart_tx` sends the replies.
  - `xmodem` runs the protocol. It sends NAK until the first block arrives. It checks the
    block number, its complement and the 8-bit checksum. It replies ACK or NAK and ends on EOT.
  - `scene_loader` writes the five scene sections into the caches and the bounding-box
    registers.
  - Bytes of a block are used as they arrive. If the block then turns out bad, the
    loader's whole state goes back to a checkpoint taken after the last good block, and the
    resent block simply overwrites the same memory words.
- **Camera** (`ps2_rx`, `camera_ctl`).
  - The keyboard moves the camera: W/S, A/D and Q/E move it along its three axes.
  - While a movement key is held, each new frame moves the camera by a distance
    proportional to the time since the last move. Keys 7, 8, 9 and 0 select 1, 2, 4 or
    8 units/s.
  - J/L, I/K and U/O turn the camera 45° (yaw, pitch, roll). A rotation needs only adds and
    one multiply by 1/√2.
  - Any change requests a new frame. A request never overlaps a frame in flight.
- **Primary rays** (`prg`). Switch setting k renders (640>>k)×(480>>k) rays, for k = 0..5
  (640×480 down to 20×15). The rays leave in 20×15 blocks, so neighbouring rays travel
  together. The direction is W + sx·U + sy·V, for a screen 2 units wide at distance 1.
- **Frame buffers** (`pixel_buffer`, `fb_handler`, `vga`).
  - Finished pixels queue in the pixel buffer. When it is full, it stalls the ray pipe.
  - The frame buffer handler shares one 1M×16 asynchronous SRAM between two jobs: reading
    the displayed buffer for the VGA scan-out, and writing pixels into the other buffer.
  - VGA reads have priority.
  - A frame rendered at lower resolution is stretched on output: each stored pixel covers
    2^k × 2^k screen pixels.
  - When the last pixel of a frame has been written, the buffers swap at the next vertical
    blanking, and the camera may start the next frame.
  - `vga` makes standard 640×480 / 60 Hz timing from a pixel every second clock.

## Scene format

Five sections, each preceded by its byte count in 4 bytes. All values are sent least
significant byte first.

| section | element | layout |
|---|---|---|
| k-d nodes | 48 bits | interior: axis[47:46], left-empty, right-empty, split (fp24), right child ID; left child = node + 1. Leaf: tag 2'b11, triangle count (≤ 63), list index |
| triangle lists | 16 bits | triangle IDs, one run per leaf |
| transforms | 288 bits | rows of M then c, twelve fp24 values, mapping the triangle onto the unit triangle |
| shading | 160 bits | per-triangle colour, normal and specular record (stored, unused by this shader) |
| bounding box | 6 × 32-bit float | min x, y, z then max x, y, z |

## Where this design departs from the original

- **Shader.** Only the simple shader (colour from triangle ID) is built. The second
  shader was never finished. That is the one with shadow rays, reflections, direct
  lighting and colour conversion. Shadow-ray support (tmax = 1, early exit) is in the pipe,
  but nothing sends shadow rays yet. The shading records are loaded, and their memory's
  read port is brought out of the top for a future shader.
- **Number of units.** There is one traversal unit and one intersection unit. The
  original design allows several. Arbitration in the short stack and the list unit uses
  fixed priority, where the original is fair.
- **Math latency.** Each math unit works in a single registered stage, where the original
  used multi-cycle pipelines. A synthesis for speed would want the float functions
  pipelined.
- **Inputs and memory.** There is no mouse input and no SDRAM: the scene sits in block RAM.
- **This design's own choices:**
  - the camera key mapping;
  - the screen geometry;
  - the colour hash;
  - the exact scene byte layout;
  - the FIFO and buffer depths: `PB_DEPTH` 256; node, list and triangle memories of
    2048, 4096 and 2048 entries.

## Using it

The top is `rime_top`, with these ports:
- clock, reset;
- serial RX/TX;
- PS/2 clock/data;
- 3 switch bits for the resolution level;
- the SRAM bus;
- VGA RGB/hsync/vsync;
- the shading-memory read port.

With every default the top expects a 50 MHz clock.

Simulate with plain Verilator, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/rt_pkg.sv tb/tb_fp_pkg.sv \
          tb/tb_scene_pkg.sv tb/tb_rime_top.sv --top-module tb_rime_top
./obj_dir/Vtb_rime_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. Unit
testbenches exist for every module: `tb/tb_<module>.sv`.

- `tb_rime_top` runs the whole design at reduced sizes: 1 MHz clock, 64 ray IDs, small
  memories, a 2-deep short stack and a 4-entry pixel buffer, so that stack overflow and
  pixel-buffer stalls happen often. It does these steps:
  - uploads a generated 12-triangle scene over XMODEM, with one block corrupted so that it
    is retransmitted;
  - renders frames;
  - checks every pixel against a software ray tracer in the testbench;
  - checks the picture on the VGA pins;
  - presses movement, speed and rotation keys.
  - It counts each mechanism at least once: retransmission, rollback, pops, restarts,
    stack overflow, pixel-buffer stall, buffer swap, and more.
- `tb_rime_top_full` does one complete upload and frame with every parameter at its
  default, at 640×480.
- `sram_model` is a behavioural model of the external SRAM.
