# Region growing for binary images: filling enclosed holes at video rate

When round, shiny particles (blood cells, beads, powder grains) are lit from
above and thresholded, each particle tends to come out as a ring: the bright
specular centre falls on the wrong side of the threshold and leaves a hole.
Before particles can be measured, those holes have to be filled.

This design fills them without a seed point. It starts from the opposite
side: the **background that touches the image border** is the only
background that is real. An auxiliary image starts out as "everything is
object" except a one-pixel frame of background around the edge, and is then
eroded from that frame inwards, but only through pixels that are background
in the binary image. Object pixels stop the erosion. When nothing changes any
more, every pixel still set in the auxiliary image is either object or a hole
enclosed by object, which is the filled image.

The hardware does one erosion pass per video frame, reading a 320 x 240
binary image and its auxiliary image from external-style 128K x 8 single-port
memories and streaming the result out as it goes.

## The growing rule

For each pixel (x = column, y = line), in raster order:

```
if aux(x,y) != 0 and bin(x,y) == 0
   and (aux(x,y-1) == 0 or aux(x+1,y) == 0 or aux(x,y+1) == 0 or aux(x-1,y) == 0)
       aux(x,y) := 0
else   aux(x,y) keeps its value
```

Initial auxiliary image: 0 on the outer border row/column, 255 everywhere
else. Pixels are 8 bits; 0 is background, any other value is object. The
auxiliary image only ever uses 0 and 255.

Because each new value is written back immediately, a pass sees the updated
values of the pixel's left and upper neighbours: background leaks rightwards
and downwards across the whole frame in a single pass, but travels only one
pixel per pass upwards or leftwards. A simple blob converges in two passes;
a shape whose background channel winds up and to the left (a spiral, a
"C" opening to the top-left) needs one pass per pixel of such travel. The
`converged` output tells when a pass changed nothing.

A consequence of the initial border: pixels on the outermost row and column
are always 0 in the result, even if they are object in the input.

## Architecture

```
            video ─────────┐
                           ▼
 vsync ──┬────────► ┌─────────────┐  add, rw   ┌──────────────┐
         │          │  reg_grow   │──────────► │ image memory │──► data_i
         │          │ (engine)    │──────────► │ aux memory   │──► data_a
         │          │             │ data_a_wr ─┼──────────────┼────────────┐
         │          └─────────────┘            └──────────────┘            │
         │            ▲ v1 v2 v3 v4                                        ▼
         │            │                         ┌──────────────────────────────┐
         └──► nbr_addr_gen ── add1..add4 ─────► │ memories N1, N2, N3, N4       │
                                                 │ (four copies of aux)          │
                                                 └──────────────────────────────┘
                             out, out_valid, frame_done, converged ◄── reg_grow
```

* **`reg_grow`** is the engine. It runs the raster scan, applies the rule,
  and writes back the new auxiliary pixel.
* **Neighbour memories N1..N4** are four extra copies of the auxiliary image.
  A single-port memory gives one word per access. The rule needs five
  auxiliary pixels at once, so the centre comes from the aux memory and each
  neighbour comes from its own copy: N1 above, N2 right, N3 below, N4 left.
  Every write goes to all five aux copies, so they stay identical.
* **`nbr_addr_gen`** drives the four copies' addresses. It runs its own scan
  counter, restarted by the same vsync edge as the engine's, so the two stay
  in lock-step without an address bus between them.
* **`frame_mem`** is the memory: 2^17 x 8 bits, one address bus, one R/W line
  (1 = read, 0 = write). Reads are asynchronous, like an asynchronous SRAM.
  Writes happen on the clock edge. Six instances are used.
* **`raster_counter`** is the shared scan sequencer. It holds the line,
  column, phase and address.

Addresses follow `Add = COLS * i + j + 1` (line i, column j), so a
320 x 240 frame uses addresses 1 to 76,800 and address 0 is never used. The
neighbour addresses are `Add - COLS`, `Add + 1`, `Add + COLS` and `Add - 1`,
computed modulo 2^17. For border pixels they point outside the frame, but
those reads do not matter because the border of aux is 0 and such pixels are
never changed.

## Timing: the two-clock pixel slot

Each memory has only one address, but each pixel needs N1..N4 to be read at
the neighbours' addresses and then written at the pixel's own address. So
every pixel takes two clocks:

| clock | rw | image/aux address | N1..N4 addresses | what happens |
|---|---|---|---|---|
| read phase  | 1 | Add | Add-COLS, Add+1, Add+COLS, Add-1 | bin, aux, V1..V4 read; new aux value computed and registered |
| write phase | 0 | Add | Add (all four) | new value written to aux and N1..N4; bin written back unchanged; `out` valid |

Count rising clock edges from the one that first sees vsync high (edge 0).
The read phase of pixel k ends on edge 2k+1 and its write phase ends on
edge 2k+2. `frame_done`
and the updated `converged` appear 2 x COLS x ROWS clocks after the edge.
At 320 x 240 that is 153,600 clocks. A 13.5 MHz pixel clock gives 225,000
clocks per 1/60 s field, so there is one full pass per frame at 60 frames/s,
with about 30 % to spare.

A single-cycle pixel with one address increment per clock would need memories
that can be read and written at different addresses in the same cycle. The
two-clock slot keeps every memory a plain single-port SRAM.

## Operating it

1. Hold `rst_n` low for a few clocks. This puts the scan counters in the
   idle state. The memories are not reset.
2. **Load frame:** hold `load` high when vsync rises. During that frame,
   `video` is sampled once per pixel slot, on edge 2k+1 for pixel k
   (the end of its read phase). The sample is stored in the image
   memory. Aux and N1..N4 receive the initial image. `out_valid` stays low.
3. **Grow passes:** keep `load` low. Every vsync rising edge runs one pass,
   and `out` streams the new aux pixels with `out_valid` high.
4. After the first pass that changes nothing, `converged` goes high together
   with `frame_done`. The stream of the next pass (or of that pass) is the
   filled image. Load a new image at any vsync edge.

A vsync edge that comes while a frame is still running restarts the scan.
Vsync must therefore be at least 2 x COLS x ROWS + 1 clocks apart.

## How far it follows the original design

Taken from the original design: the growing rule and the initial auxiliary
image; the 320 x 240 frame at 60 frames/s with a 13.5 MHz clock; the 8-bit
pixels and the 0/255 values; the 17-bit addresses and 128K x 8 memories; the
address expression; one image memory, one auxiliary memory and four
neighbour memories with a separate device addressing the neighbour memories;
restarting the addressing on the vsync rising edge; and repeating passes
frame after frame until convergence.

This design's own choices:

* **Two clocks per pixel.** The original advances the address every clock.
  Here it advances every second clock, as explained above.
* **The load frame and the `load` input.** The original says that the image
  is stored and the auxiliary and neighbour memories are initialised, but not
  how this is done.
* **Convergence detection.** The `converged` output and its per-pass
  "changed" flag are added. The original only says that passes repeat until
  convergence.
* **Sync.** Only vertical sync is used. The address is a counter, so
  horizontal sync is not needed. The video is not thresholded: a nonzero
  pixel is object.
* **Out.** `out` is the new auxiliary pixel.
* **Memory write timing.** Memory writes happen on the clock edge, not on a
  separate write strobe.
* **Reset.** A synchronous, active-low reset is added.

Not included, and left at the ports:

* the camera or video source;
* the converter that turns its RGB stream into the 8-bit monochrome `video`
  input, whose conversion is not specified;
* the DAC and control logic that turn `out` into a composite video signal.

## Files

| file | contents |
|---|---|
| `rtl/regrow_pkg.sv` | frame size, widths, phase and mode enums |
| `rtl/raster_counter.sv` | vsync-started scan: line, column, phase, address |
| `rtl/reg_grow.sv` | the engine: rule, load/grow modes, write-back, status |
| `rtl/nbr_addr_gen.sv` | neighbour-memory address generator |
| `rtl/frame_mem.sv` | 128K x 8 single-port memory |
| `rtl/regrow_top.sv` | the system: engine, address generator, six memories |
| `tb/regrow_ref_pkg.sv` | software reference: one raster pass, flood-fill result, image generators |
| `tb/frame_mem_tb.sv` | memory read/write/no-write-on-read test |
| `tb/nbr_addr_gen_tb.sv` | neighbour addresses per phase over two frames of a 7 x 5 raster |
| `tb/reg_grow_tb.sv` | engine with modelled memories: 5 x 5 diamond, random rings, spiral (47 passes) |
| `tb/regrow_top_tb.sv` | whole system at 320 x 240, two images, until convergence |
| `tb/regrow_diamond_tb.sv` | whole system at 5 x 5: a diamond with a one-pixel hole, checked pixel by pixel against a hand-written result |

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The engine and system benches compare every
pass's output with a software pass of the same rule. They also compare the
final image with an independent breadth-first flood fill. They check that a
pass takes exactly 2 x COLS x ROWS clocks. The system bench also counts how
often each mechanism occurs, and fails if one never does: the load frame, a
pass that clears pixels, clearing in a later pass, clearing that depends on a
neighbour cleared earlier in the same pass, filled holes, convergence, and a
reload.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/regrow_pkg.sv tb/regrow_ref_pkg.sv tb/regrow_top_tb.sv \
    --top-module regrow_top_tb -Mdir obj_top
./obj_top/Vregrow_top_tb
```

Swap in another testbench the same way. The ones that use the reference
need `tb/regrow_ref_pkg.sv` on the command line. The full-size system test
simulates about 6 million clocks (two images, 19 passes each) and runs in
under a minute. For a quicker run on other images, give `regrow_top` smaller
`COLS`/`ROWS`. `AW` must still cover `COLS*ROWS + 1` addresses.

The memories are plain arrays. A synthesis tool maps them to block RAM, or
they can be replaced by a wrapper around external SRAM with the same single
address and R/W interface. The asynchronous read is on the critical path: the
read phase contains the memory access, the four-way zero test and the
register setup.
