# Sprite drawing from on-chip memory with background image replacement

A game screen is built by laying sprites over a background: wherever a
sprite pixel carries colour it wins, wherever it is transparent the
background shows through. This RTL does that compositing in hardware, with
the sprite images kept in FPGA block RAM instead of external DRAM, so the
only external traffic is the background read and the processed-picture
write.

Block RAM is small. The target device has 560 KB of it, enough for 17
sprites of 128 x 64 pixels at 32 bits per pixel. A game needs more images
than that. The way out is to treat the block RAM as a set of slots and
refill them while drawing runs. A DMA controller copies the image needed
next from external memory into a slot that is not in use, while the drawing
hardware draws the current sprite from another slot. Copying an image is
faster than drawing one of the same size, so the copy hides completely
behind the drawing:

```
time  ->  | draw sprite 1        | draw sprite 2        | draw sprite 3 ...
          | copy image 2 (DMA)   | copy image 3 (DMA)   | copy image 4 ...
```

The design follows a published high-level-synthesis design (a C routine
turned into hardware by an HLS tool, plus a DMA controller). Here it is
written directly as SystemVerilog RTL. The algorithm, the two-stage
structure, the address formulas and the memory size come from that source.
The port protocols, the command formats, the line-buffer organisation and
all the pipelining details are this implementation's own choices.

## Pixel rule and memory layout

* A pixel is one 32-bit word. The value `0` means *transparent*. Any other
  value is a colour and is drawn.
* The background and the processed picture are arrays of `SCREEN_W` pixels
  per row in external memory, at word addresses `bg_base` and `fg_base`.
  Pixel (c, r) is at `base + r*SCREEN_W + c`.
* A sprite of `w x h` pixels is stored row after row in the internal memory,
  starting at word `sp_ofst`. Pixel (j, i) is at `sp_ofst + i*w + j`.
* Drawing at screen position (x, y) produces, for every sprite pixel (j, i):

  ```
  fg[(y+i)*SCREEN_W + x + j] = sp[sp_ofst + i*w + j] != 0 ? sp[...]
                                                          : bg[(y+i)*SCREEN_W + x + j]
  ```

  Pixels of the processed picture outside the sprite rectangle are not
  written. The caller initialises them, for example by copying the
  background.

External memory is addressed in 32-bit words throughout. A byte-addressed
bus needs a shift by two at the boundary.

## The drawing pipeline (`sprite_draw_hw`)

Drawing is split into two stages that hand over whole rows.

1. **Compose: `draw_stage1`.** For row i, it issues one background read per
   pixel to external memory. It reads the matching sprite pixel from
   internal memory in the same cycle the background request is accepted.
   The sprite pixel waits in a small queue (`OUTSTANDING` entries, default
   16) until its background pixel returns; responses come back in order.
   The stage then applies the pixel rule and writes the result into the line
   buffer. The queue is what lets up to 16 background reads be in flight,
   which hides the DRAM latency. Once the last pixel of the row is written,
   the stage *commits* the row.
2. **Write out: `draw_stage2`.** It takes a committed row from the line
   buffer and writes it to the processed picture. A two-entry queue absorbs
   the one-cycle read latency of the buffer, so one write can leave every
   cycle. After the row's last write is accepted, the stage releases the
   bank.

**`line_buffer`** sits between the two stages. It is a **ping-pong buffer**:
two banks of `MAX_W` pixels with a full/empty flag each.

* The composer fills one bank while the writer drains the other. The two
  stages therefore work on neighbouring rows at the same time.
* Each side steps through the banks in strict alternation, so no bank
  number has to be passed between the stages.
* A stage that reaches a bank which is not ready simply waits: the composer
  when both banks hold unwritten rows, the writer when no row is complete.

This is the hardest part to follow when reading the RTL. `prod_commit` and
`cons_release` are the only signals that synchronise the two stages.

Within a row a stage handles one pixel per cycle as long as memory keeps up.
Between rows the composer lets its read pipeline drain before it claims the
next bank. That costs about one memory latency per row. Rows are
independent, so overlapping them would be a possible extension. It is not
done, to keep the stages simple.

`sprite_draw_hw` starts both stages on the same `start` pulse and reports
`done` when the writer has finished. It ignores `start` while `busy`.

## Image replacement (`dmac`, `sprite_ram`)

`sprite_ram` is the on-chip sprite memory. It has 143360 words (560 KB), one
read port for the drawing hardware and one write port for the DMA
controller, so that drawing and replacement never compete for a port. Reads
have one cycle of latency. Reading a word in the same cycle it is written
returns the old contents.

`dmac` takes a command `{src, dst, len}`. It issues reads of `len`
consecutive words from external memory, starting at `src`, on its own
memory port. It writes each returning word straight into `sprite_ram` at
`dst, dst+1, ...`. The controller always accepts responses, so with a
pipelined memory the copy runs at one word per clock plus one memory
latency.

**Choosing a free slot is up to software.** The hardware does not check
whether the DMA overwrites the sprite being drawn. `sprite_system_top`
contains a simulation assertion that flags a DMA write into the address
range `[sp_ofst, sp_ofst + w*h)` of the drawing in progress. A simple scheme
is to divide the memory into 17 slots of 128 x 64 words, draw from slot k,
and load the next image into slot k+1 (mod 17). The end-to-end testbench
does exactly that.

## Top level (`sprite_system_top`)

| Port group | Direction | Meaning |
|---|---|---|
| `draw_start`, `draw_cmd` (`draw_cmd_t`), `draw_busy`, `draw_done` | in/out | drawing command from the processor |
| `dma_start`, `dma_cmd` (`dma_cmd_t`), `dma_busy`, `dma_done` | in/out | image replacement command from the processor |
| `p1_rd_*` | request out, response in | external memory port 1, read channel: background pixels |
| `p1_wr_*` | out | external memory port 1, write channel: processed picture |
| `p2_rd_*` | request out, response in | external memory port 2, read channel: DMA source |

The command structures are defined in `sprite_pkg`:

* `draw_cmd_t = {sp_ofst[32], x[16], y[16], w[16], h[16], bg_base[32], fg_base[32]}`
* `dma_cmd_t = {src[32], dst[32], len[32]}`

Constraints on commands:

* `w` must be at most `MAX_W`. An assertion checks this.
* A command with `w`, `h` or `len` of zero completes at once.
* A start pulse while the block is busy is ignored.

**Memory channel protocol**, the same on all three channels:

* A read request moves when `req_valid && req_ready`.
* Responses return in request order and move when `resp_valid && resp_ready`.
* Any number of reads may be outstanding. The memory side must not drop
  responses.
* A write moves when `valid && ready` and is considered done at that edge.
* Valid and payload are held until accepted. The interfaces `mem_rd_if` and
  `mem_wr_if` used inside the design assert this.

In the original system these ports sit on the processor system's memory
ports. The processor, the memory controller and the DRAM are outside this
RTL.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `MEM_WORDS` / `DEPTH` | 143360 (560 KB) | internal memory of the target FPGA, from the source |
| `SCREEN_W` | 640 | assumed; the source uses a screen-width constant without giving its value |
| `MAX_W` | 128 | assumed; the widest sprite in the evaluation |
| `OUTSTANDING` | 16 | assumed; background reads in flight |

## Timing

The following figures were measured in simulation with a memory latency of
8 cycles and no back-pressure. They show the time from the start pulse to
the done pulse. At 100 MHz (the clock of the original board), 1000 cycles
are 10 µs.

| Sprite | Drawing (cycles) | Replacing an image of that size (cycles) |
|---|---|---|
| 32 x 32 | 1348 | 1033 |
| 64 x 32 | 2404 | 2057 |
| 32 x 64 | 2660 | 2057 |
| 64 x 64 | 4740 | 4105 |
| 128 x 64 | 8900 | 8201 |
| 64 x 128 | 9412 | 8201 |

* **Drawing** takes about `h*(w + L + 1) + w` cycles for a memory latency
  `L`.
* **Replacement** takes about `w*h + L`.

So replacement always hides behind drawing a sprite of the same size. A
larger image loaded behind a smaller sprite does not hide fully: the
drawing is then simply finished first. The margin shrinks as the memory
latency shrinks. The original HLS implementation has its own, longer
timings, which this RTL does not try to reproduce.

## Where this departs from the source

* **Protocols.** The source's hardware uses AXI master ports and an HLS
  block-RAM port. Here they are simple valid/ready word channels, without
  bursts.
* **Sprite memory ports.** The source declares the sprite memory port as
  single-port, yet it also connects both the drawing hardware and the DMA
  controller to that memory and has them work at the same time. This RTL
  uses a memory with separate read and write ports.
* **Sprite offset width.** The source gives the sprite offset as 16 bits in
  one place and 32 bits in another. 32 bits is used, since 16 bits cannot
  address 560 KB.
* **Line buffer.** The source uses a single row buffer between two stages
  that run in parallel. It is built here as two banks.
* **Software-based replacement.** The source also describes a version in
  which the processor copies images itself. It is the slower baseline and
  is not part of this RTL.
* **Reset.** Reset is asynchronous and active low. The memories are not
  reset.

## Files

* `rtl/sprite_pkg.sv`: shared types (`pixel_t`, `draw_cmd_t`, `dma_cmd_t`)
  and default sizes.
* `rtl/mem_rd_if.sv`, `rtl/mem_wr_if.sv`: memory channel interfaces with
  handshake assertions.
* `rtl/sprite_system_top.sv`: the complete system.
* `rtl/sprite_draw_hw.sv`, `rtl/draw_stage1.sv`, `rtl/draw_stage2.sv`,
  `rtl/line_buffer.sv`: the drawing hardware.
* `rtl/sprite_ram.sv`: the on-chip sprite memory.
* `rtl/dmac.sv`: the DMA controller.
* `rtl/sync_fifo.sv`: a small queue used by both stages.
* `tb/ext_mem_model.sv`: a behavioural external memory with latency and
  random back-pressure, used by the testbenches.
* `tb/tb_*.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

Each testbench compiles with Verilator 5. Put the package first and let
Verilator find the other modules by name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_sprite_system_top rtl/sprite_pkg.sv tb/tb_sprite_system_top.sv
obj_dir/Vtb_sprite_system_top
```

`tb_sprite_system_top` runs the whole system at its default sizes. It uses a
640 x 480 background and 21 distinct images cycling through the sizes
32x32, 64x32, 32x64, 64x64, 128x64 and 64x128, more images than the 17
slots hold, so slots are reused. Each drawing overlaps the copy of the next
image.

* **Pixel check.** Every drawing is compared pixel by pixel against a
  reference, including an untouched border around the sprite.
* **Timing check.** The testbench checks that replacement is faster than
  drawing for every size.
* **Coverage.** It counts transparent and opaque pixels, stage overlap,
  line-buffer waits, back-pressure on each channel, DMA writes during
  drawing and slot reuse. It fails if any of these never happened.
* **Phases.** The first half runs without memory stalls. The second half
  stalls every channel at random.

The run takes a few seconds.

To change a size, override the parameters of `sprite_system_top`. When
changing `MEM_WORDS`, keep in mind that the slot layout lives in the
software (or in the testbench).
