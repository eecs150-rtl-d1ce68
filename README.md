# SRAM framebuffer and SVGA video

A display needs its pixels exactly when the raster reaches them, while the
things that draw (a CPU and a line-drawing engine) write single pixels whenever
they like. This design keeps one whole 800x600 frame in an external 256K x 32
ZBT SRAM and lets three users share that single-ported memory:

* the **video interface** reads the frame in raster order at the display rate
  and produces 24-bit RGB with SVGA 800x600 @ 75 Hz timing;
* the **CPU** writes one pixel per store through its memory map;
* the **Line Engine** writes one pixel per request through its own port.

Writes go through per-writer queues, an arbiter picks one user per cycle with
video first, and a pipelined SRAM controller turns that into one SRAM access
per cycle. The CPU and the Line Engine themselves are not part of this RTL;
their ports are the top module's ports.

```
 CPU store ──> fb_mmio ──> write_fifos ─┐                      ┌──> SRAM pins
                           (CPU queue)  ├─> fb_arbiter ─> sram_ctrl
 Line Engine ────────────> write_fifos ─┘      ^   (coord_to_addr)    │
                           (LE queue)          │                      │ read data
                                        Address/AddressValid    Pixels/PixelsValid
                                               │                      v
                                               └────────── video ──> rgb, hsync, vsync, de
```

## Frame layout in the SRAM

* A pixel is 16-bit RGB565. 800 x 600 = 480,000 pixels need 240,000 32-bit
  words, which fits in the 262,144 words of the SRAM (the 4 parity bits are
  unused).
* Pixels are stored in raster order, two per word: pixel (Y,X) has the raster
  index `S = 800*Y + X`, lives in word `S/2`, and is the **even** pixel
  (bits 15:0) if `S` is even, the **odd** pixel (bits 31:16) otherwise. This
  way the video side reads two neighbouring pixels with one access.
* Writers address pixels by coordinate. `coord_to_addr` computes
  `800*Y` as `512*Y + 256*Y + 32*Y` (shifts and adds, no multiplier), adds X,
  and derives the word address and a byte mask (`0011` for the even pixel,
  `1100` for the odd one). The color is copied into both halves of the write
  word; the SRAM's byte write enables keep the neighbouring pixel intact, so a
  single-pixel write never needs a read-modify-write.
* The CPU sees the frame at byte addresses `{8'h80, 2'b00, Y[9:0], X[9:0], 2'b00}`,
  i.e. 0x8000_0000 to 0x803F_FFFC, with the color in bits 15:0 of the store
  data. Giving Y and X ten bits each wastes address space but makes software
  simple.
* A queued write whose coordinate is outside 800x600 is taken from its queue
  and discarded (`wr_dropped` pulses), so it cannot land on another pixel.

## Sharing the SRAM

`fb_arbiter` is combinational and has a fixed priority:

1. a video read (`AddressValid`) always wins and is never refused;
2. otherwise the head of the CPU queue is written (`CPUTake`);
3. otherwise the head of the Line Engine queue is written (`LETake`).

A take dequeues the head on the same `fb_clk` edge at which the SRAM controller
accepts the request. Only one `coord_to_addr` exists, after the write-source
multiplexer.

Bandwidth budget at the default clocks: the display needs 49.5 MHz / 2 =
24.75 M word reads per second, one per two pixel clocks and none during
blanking. With `fb_clk` at 100 MHz and one access per cycle, video uses about
one cycle in four, and at least 75 M pixel writes per second remain for the two
writers. A writer that offers more than that finds its queue full and stalls:
the CPU through `cpu_stall` (it must hold all its pipeline registers, the store
included), the Line Engine through `le_ready` low. Because CPU writes outrank
Line Engine writes, a CPU writing at full speed can starve the Line Engine; no
fairness is added.

## The SRAM controller pipeline

A ZBT ("zero bus turnaround") SRAM accepts a read or a write on every clock,
in any order, and uses its shared data bus exactly two clock edges after the
command edge in both directions. `sram_ctrl` keeps that rhythm, so no idle
cycles are ever inserted between reads and writes. All SRAM pins come from
flip-flops, which adds one cycle in front:

| edge | what happens |
|------|--------------|
| t    | request accepted; address, CE#, WE#, BW# registered onto the pins |
| t+1  | SRAM samples the command |
| t+2  | for a write: data driven onto the bus (`sram_dq_oe` high, OE# high) |
| t+3  | SRAM samples write data; for a read the controller samples the bus |
| t+3 → t+4 | `resp_valid` high with `resp_rdata` |

So a read returns **3 cycles** after it was accepted, and responses come back
in request order. A read followed by a write uses the bus in consecutive
cycles, SRAM first and controller second, and a write followed by a read the
other way round; the two drivers are never on together (the testbenches
check this). Since every read belongs to the video interface, `resp_valid` is
wired directly to the video's `PixelsValid`.

The request port is a packed struct `sram_req_t` (`write`, 18-bit `addr`,
32-bit `wdata`, 4-bit `bmask`) plus `req_valid`; there is no ready because the
SRAM never refuses.

Board wiring not in this RTL: the bidirectional data bus is split into
`sram_dq_o` / `sram_dq_oe` / `sram_dq_i` for a tri-state I/O buffer; the SRAM
clock output, ADV/LD# (tie low), CKE# (tie low), MODE and the parity pins are
outside.

## Video read-out across two clocks

`video` works in two clock domains.

*Framebuffer side (`fb_clk`).* An address generator walks the pair addresses
0 .. 239,999 and wraps. It keeps `buffer occupancy + reads in flight` at or
below the depth of a 16-word dual-clock buffer, and raises `AddressValid` for
one cycle per read while there is room. Because the arbiter grants every video
read at once, the buffer can never overflow, and reads are issued only as fast
as the display drains them.

*Pixel side (`pix_clk`).* Counters run the raster: 800 visible + 16 front
porch + 80 sync + 160 back porch = 1056 clocks per line, and 600 + 1 + 3 + 21 =
625 lines per frame, sync pulses active high (the VESA 800x600 @ 75 Hz mode).
In the active area each word is shown as its even pixel and then its odd pixel,
after which it is dequeued. A pixel is widened to 24 bits with its color bits
at the top: `{R[4:0],3'b0, G[5:0],2'b0, B[4:0],3'b0}`. `rgb`, `hsync`, `vsync`
and `de` are registered and change together.

*Start-up and underflow.* After reset the raster counters start on the first
line below the visible area, so the buffer fills during vertical blanking
before pixel (0,0) is due; word 0 is therefore always shown at the top left.
If the buffer is ever empty when a pixel is due, black is shown and the sticky
`underflow` output goes high; the picture would then stay shifted until reset,
as nothing re-aligns the address generator to the raster. At the default clocks
this does not happen (the buffer refills in a few `fb_clk` cycles).

## Write queues and clocks

`write_fifos` holds two independent dual-clock FIFOs (16 entries each), one
per writer. A writer enqueues with `WriteEnable` while `WriteReady` is high;
`WriteEnable` while `WriteReady` is low is ignored, since the writer is
stalled and will present the same write again. The framebuffer side sees the
head entry combinationally (`CoordOut`, `DataOut`, `ValidRequest`) and removes
it with `Take` at a rising edge of `fb_clk`. Pointers cross between clocks in
Gray code through two-flop synchronizers (`async_fifo`). Apart from the clock
crossing, the queue lets the CPU carry on while the SRAM is busy with video.

Clocks of `fb_system`: `fb_clk` (arbiter, controller, SRAM; 100 MHz),
`cpu_clk`, `le_clk` (may be the same net as `fb_clk`) and `pix_clk` (49.5 MHz).
`rst` is active high, sampled synchronously in every domain; hold it for a few
cycles of the slowest clock.

## Files

| file | contents |
|------|----------|
| `rtl/fb_pkg.sv` | frame geometry, `coord_t`, `pix_write_t`, `sram_req_t` |
| `rtl/fb_system.sv` | top level |
| `rtl/fb_mmio.sv` | CPU memory-map decode and stall |
| `rtl/write_fifos.sv`, `rtl/async_fifo.sv` | write queues |
| `rtl/fb_arbiter.sv`, `rtl/coord_to_addr.sv` | arbitration and address translation |
| `rtl/sram_ctrl.sv` | ZBT SRAM controller |
| `rtl/video.sv` | address generator, pixel buffer, raster timing, color padding |
| `tb/zbt_sram_model.sv` | behavioural ZBT SRAM (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_fb_system` end to end |

Parameters: `coord_to_addr` `WIDTH`/`HEIGHT` (800/600); `write_fifos`
`ADDR_W` (log2 of queue depth, 4); `video` `H_VIS`, `H_FP`, `H_SYNC`, `H_BP`,
`V_VIS`, `V_FP`, `V_SYNC`, `V_BP` (800/16/80/160/600/1/3/21) and `FIFO_AW`
(log2 of buffer depth, 4). The frame size in `fb_pkg` and the video
parameters must agree; the address generator derives its wrap point
(`H_VIS*V_VIS/2`) from the video parameters.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself (a
watchdog ends it with a failure if it hangs). With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fb_pkg.sv rtl/*.sv tb/zbt_sram_model.sv tb/tb_fb_system.sv \
  --top-module tb_fb_system -Mdir obj_fb_system
./obj_fb_system/Vtb_fb_system
```

Replace `tb_fb_system` by any other `tb/tb_*.sv` to run a single module's test.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_coord_to_addr` | every row start and end plus 20,000 random coordinates against `800*Y+X`; masks, data, range flag |
| `tb_fb_mmio` | region decode, coordinate and color extraction, stall only when a store meets a full queue |
| `tb_fb_arbiter` | all request combinations: priority, takes, request contents, discarding of out-of-frame writes |
| `tb_write_fifos` | three unrelated clocks; order and contents of 600 writes per queue; both queues fill up and stall their writers |
| `tb_sram_ctrl` | 4,000 cycles of random back-to-back reads and byte-masked writes against the SRAM model and a reference memory; 3-cycle read latency; no bus contention |
| `tb_video` | two full frames at the default timing: every pixel's color and order, line/frame sizes, sync widths and periods, sequential addresses with wrap, 400 reads per visible line period, none during vertical sync, exactly 240,000 reads per frame, no underflow |
| `tb_fb_system` | full size, all defaults: CPU and Line Engine fill the even and odd pixels of the whole frame (so both halves of every word are written by different queues in different orders), plus out-of-frame stores; then one displayed frame is compared pixel by pixel. It also requires at least one CPU stall, Line Engine wait, video-over-CPU and CPU-over-Line-Engine decision, even and odd byte mask, read/write turnaround in each direction, dropped write and address wrap. Runs in a few seconds. |

## How far to trust it, and where it departs

* All seven testbenches pass, and each one fails against a deliberately broken
  copy of its module. The SRAM is a behavioural model written to the usual
  pipelined-ZBT behaviour (2-cycle latency, byte writes, forwarding of a write
  to a read of the same word on the next cycle); the real device's setup/hold
  timing and the clock forwarding to the SRAM are not modelled.
* The blanking intervals are the standard VESA values for 800x600 @ 75 Hz, not
  values the specification states; it gives only the mode name and the
  49.5 MHz pixel clock.
* The DVI transmitter (Chrontel CH7301C) link is not implemented: the design
  stops at parallel 24-bit RGB with `hsync`, `vsync` and `de`.
* Queue and buffer depths (16), the even-pixel-in-low-half packing, the color
  in store bits 15:0, discarding out-of-frame writes and the start-up order of
  the video raster are choices of this design.
* The 16-to-24-bit padding is done inside `video`, so the video side of the
  framebuffer carries 16-bit pixels only.
* Priorities are strict, so the Line Engine can be starved by a CPU that
  writes continuously faster than about 75 M pixels/s.
