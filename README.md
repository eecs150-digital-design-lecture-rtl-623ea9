# MIPS150 I/O subsystem: frame buffer, line engine and Ethernet buffers

A small MIPS computer on an FPGA board needs a screen and a network port.
This RTL provides both, on the CPU's memory-mapped I/O bus:

* an **800 x 600 frame buffer** kept in one external single-port SRAM.
  The CPU writes any pixel at any time. A video interface reads the whole
  frame, in order, 75 times a second. Both share that one SRAM.
* a **line-drawing engine** (Bresenham's algorithm). The CPU gives it two
  end points and a colour. It then writes one pixel per clock into the
  frame buffer.
* the **CPU side of an Ethernet MAC**. It has receive packet buffers with
  address filtering, and a transmit buffer that builds the MAC header. The
  MAC itself is a hard block in the FPGA, and the PHY and transformer are
  on the board.

The hardest part of the design is the sharing of one SRAM port. It is
explained first.

## Sharing one SRAM between the display and the CPU

The SRAM runs at 99 MHz. The display needs about 49.5 Mpixel/s. Each 32-bit
SRAM word holds two 16-bit pixels, so the display needs one SRAM read every
four cycles. The SRAM port therefore runs a fixed four-cycle pattern
(`sram_scheduler`):

```
slot      0     1     2     3     0     1   ...
          RD    WR    WR    WR    RD    WR
```

* Slot 0 belongs to the video interface. If it asks for a word, the slot is
  a read.
* Slots 1 to 3 are writes taken from the store buffer.
* If the video interface asks for nothing, slot 0 also becomes a write. This
  happens during retrace, once its prefetch FIFO is full. Writes then get
  all four slots.

Writes therefore drain at 74 M/s during the visible part of a line, and at
99 M/s otherwise.

All SRAM pins are registered. Read data must come back `RD_LAT` (default 2)
clock edges after the address, as from a pipelined synchronous SRAM. The
scheduler passes it to the video interface one edge later. The data bus is
split into `sram_dq_o`, `sram_dq_oe` (high only in write cycles) and
`sram_dq_i`, for the FPGA's tri-state pad buffer.

The read rate exactly equals the display's consumption rate. The video
interface therefore cannot fall behind: it keeps an 8-word prefetch FIFO,
and asks for a read whenever the FIFO, counting reads in flight, has room.
The FIFO fills during horizontal blanking and stays level during a line.
After reset the raster starts in vertical blanking, so the FIFO is full
before the first visible pixel. `vid_underrun` counts visible pixels that
found no data. It stays 0 in every test.

## From a CPU store to an SRAM word

**CPU view.** The CPU sees a 1024 x 1024 grid of 32-bit words at
`0x8000_0000`. Pixel (X, Y) is at `0x8000_0000 + (Y << 12) + (X << 2)`, and
the colour is in bits [15:0] of the stored word. Only 800 x 600 of the grid
is visible.

**SRAM view.** The SRAM holds the visible pixels densely, in the order the
screen is scanned. The pixel number is PN = X + 800·Y, and the SRAM word is
PN / 2.

**Translation** (`fb_addr_xlate`):

* The multiply needs no multiplier, because 800 = 512 + 256 + 32. So
  800·Y = (Y<<9) + (Y<<8) + (Y<<5): two adders.
* An even pixel goes to bits [15:0] of its word, and an odd pixel to bits
  [31:16].
* The colour is copied into both halves. The byte write enables (`0011` or
  `1100`) pick the half that is written, so one pixel is written without
  reading the word first.

**Off-screen writes.** A store with X ≥ 800 or Y ≥ 600 is accepted and
thrown away. This is done in `fb_write_port`. Packed densely, such a pixel
would otherwise land in the next row. A simple clear loop over the full
1024-word rows depends on this.

## The write path and its two stalls

```
CPU store ──┐
            ├─ fb_write_port ─ store_buffer ══╪══ sram_scheduler ─ SRAM
line engine ┘   (CPU first)    (dual-clock)   │   (+ fb_addr_xlate)
                cpu_clk domain                │   sram_clk domain
```

* **The CPU has priority.** In a cycle where the CPU stores a pixel, the
  line engine's pixel is refused (`le_ready` low). The engine keeps it and
  offers it again.
* **The store buffer can fill.** The CPU (80 MHz in the reference system)
  can store faster than 74 M/s. When the buffer is full, `cpu_stall` goes
  high, combinationally from the full flag. The CPU must hold its store
  until `cpu_stall` falls. The line engine waits as well.
* `store_buffer` is a standard asynchronous FIFO. It has Gray-coded
  pointers and two-flop synchronisers, and is 16 entries deep by default
  (`SB_DEPTH`). Each entry is a `fb_write_t` {Y, X, colour}.
* The address translation happens on the SRAM side, after the FIFO.

A screen clear stores all 1024 x 600 words of the CPU window. In simulation
it takes 632,673 CPU cycles (7.9 ms at 80 MHz). That is about 0.6 of a
frame time. The limit is the SRAM write bandwidth, not the CPU.

## Line engine

`line_engine` implements Bresenham's integer line algorithm for every
octant.

**Set-up cycle.**

* If |dy| > |dx|, the line is steep: X and Y are swapped.
* If the line runs right to left, the end points are swapped.
* The engine then walks the major axis from its smaller end. It keeps an
  error term that starts at dx/2 and loses dy at each step. When the error
  goes negative, the minor axis steps (up or down) and dx is added back.

**Timing.** After the trigger write there is one set-up cycle, then one
pixel per cycle while the frame-buffer port takes them. A line has
|major| + 1 pixels.

**Registers** (in the `0x8040_0000` page; coordinates are 10 bits, colour
16 bits):

| offset | register | |
|---|---|---|
| 0x40 / 0x44 / 0x48 / 0x4C | X0, Y0, X1, Y1 | write only, no trigger |
| 0x50 / 0x54 / 0x58 / 0x5C | X0, Y0, X1, Y1 | write only, stores the value and starts the engine |
| 0x60 | colour | write only |
| 0x64 | ready (bit 0) | read only, 1 when idle |

* Any of the four trigger addresses starts a line. A polyline therefore
  needs only one new end point per segment.
* A trigger written while the engine is busy updates the register but does
  not restart the engine. Software polls `ready` first.

## Video scan-out

`video_interface` makes a raster with a pixel enable at half the SRAM
clock. With the default timing this gives 800 x 600 at 75 Hz:

* horizontal: 1056 pixels in total (16 front porch, 80 sync, 160 back
  porch);
* vertical: 625 lines in total (1, 3 and 21);
* both sync pulses are active high.

The outputs `vid_pix_en`, `vid_de`, `vid_hsync`, `vid_vsync` and the 16-bit
`vid_pixel` are registered. Converting the pixel for a DAC or a DVI
transmitter is left to the board-level logic.

## Ethernet buffers

Both buffers run on `cpu_clk`. They use a simple byte stream to and from
the MAC's client interface (`data`, `valid`, `last`, plus `bad` on receive
and `ready` on transmit). Words are big-endian: byte 0 of a frame is in
bits [31:24].

**Receive**, `eth_rx_buffer`, at `0x8050_0000`. It has `NBUF` = 2 slots of
2048 bytes, used as a ring. A frame is kept only if all of these hold:

* its destination is this node (`MAC_ADDR`) or broadcast;
* the MAC did not flag it bad (a CRC error);
* it is at least 14 bytes long and fits in a slot;
* a slot is free when it starts.

The CPU polls the receive buffer:

| offset | access | meaning |
|---|---|---|
| 0x000 | read | [31] a frame is waiting, [15:0] its length |
| 0x000 | write | release that frame |
| 0x004 | read | frames dropped (no room, bad, runt, too long) |
| 0x008 | read | frames filtered out by address |
| 0x800… | read | the waiting frame, 4 bytes per word |

**Transmit**, `eth_tx_buffer`, at `0x8050_1000`:

| offset | access | meaning |
|---|---|---|
| 0x000 | write | destination bytes 0–1 |
| 0x004 | write | destination bytes 2–5 |
| 0x008 | write | type (e.g. 0x0800 for IP) |
| 0x800… | write | payload |
| 0x00C | write | payload length, starts sending |
| 0x00C | read | bit 0 = busy |

The block sends destination, source (`MAC_ADDR`), type and payload. The MAC
adds the preamble and the CRC, and pads short frames.

## CPU bus of the top (`mips150_io`)

* One access per cycle: `cpu_we` or `cpu_re`, with `cpu_addr` and
  `cpu_wdata`.
* Read data appears on `cpu_rdata` on the next cycle.
* The frame buffer is write only.
* Reset is synchronous, with one reset per clock domain (`cpu_rst`,
  `sram_rst`).

## What is fixed by the reference design and what is chosen here

**Taken from the reference system:**

* 800 x 600 screen;
* frame buffer at 0x8000_0000, addressed by 10-bit Y and X;
* PN = X + 800·Y computed by shift-and-add;
* two pixels per SRAM word, with byte write enables for single pixels;
* 19-bit SRAM address;
* 99 MHz SRAM clock, 49.5 Mpixel/s, the RD/WR/WR/WR slot pattern, and all
  four slots to writes in retrace;
* a dual-clock store buffer that stalls the CPU;
* one frame-buffer write port with CPU priority;
* the line engine's register map, its any-octant algorithm and the
  one-pixel-per-cycle goal;
* the 14-byte MAC header layout;
* receive buffering with filtering and polling, and transmit header
  creation.

**Chosen here:**

* a 16-bit pixel. A 4-bit colour, as simple software uses, sits in the low
  bits.
* a 32-bit SRAM word, even pixel in the low half, and a read latency of 2;
* the store-buffer depth;
* the prefetch FIFO and the raster timing;
* the clipping of off-screen writes;
* the busy behaviour of the line engine;
* the Ethernet address map, register layout, slot count and stream
  handshake;
* the MAC address default;
* running the MAC client side on the CPU clock.

All of these are parameters or are local to one module.

**Not included:** the CPU, the SRAM chip, the pad buffers, the MAC hard
block, the PHY, the magnetics and the serial port. Their signals are ports
of `mips150_io`.

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. They use `tb/sram_model.sv`, a behavioural
SRAM. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/mips150_io_pkg.sv tb/tb_mips150_io.sv --top-module tb_mips150_io
./obj_dir/Vtb_mips150_io
```

Replace `tb_mips150_io` with any other testbench. Each one tests the module
of the same name:

* `tb_line_engine`: the worked example (1,1)→(11,5), special cases, and
  random lines against a software model. With and without back-pressure,
  it checks the latency and one pixel per cycle. It also checks that a
  trigger written while a line is being drawn does not restart it.
* `tb_fb_addr_xlate`, `tb_fb_write_port`: random checks against
  the formulas.
* `tb_store_buffer`: 80 MHz to 99 MHz, including a full FIFO.
* `tb_sram_scheduler`: reads only in slot 0 and writes in the other three,
  all four slots in retrace, read latency and data, and the final SRAM
  image.
* `tb_video_interface`: a small raster. It checks pixel order, sync pulse
  widths and counts, and that read requests stop in retrace.
* `tb_eth_rx_buffer`, `tb_eth_tx_buffer`: filtering, drop counters, ring
  order, header contents and back-pressure.
* `tb_mips150_io`: the whole design at full size, default parameters. It
  clears the screen, draws six lines while the CPU also stores pixels,
  compares one complete displayed frame with a computed image, and receives
  and sends Ethernet frames. It checks that the CPU stall, CPU-priority
  hold, off-screen discard and retrace write slot all happen. It runs in
  about 10 seconds.
