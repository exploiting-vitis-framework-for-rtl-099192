# Sobel edge detection as three memory-to-memory kernels

This accelerator finds the edges in an RGB frame. It does the work in three
hardware kernels that run one after another. They pass their results to each
other through the processing system's global (DDR) memory:

1. **grayconvert** reads the packed RGB frame and writes a gray frame, one byte
   per pixel: `gray = (19 R + 37 G + 7 B) >> 6`.
2. **imgscan** reads the gray frame in raster order and applies the 3x3 Sobel
   operator. It compares the gradient magnitude with a threshold `T` and writes
   0xFF (edge) or 0x00 (no edge) to the edge frame. It writes the interior only.
3. **borderscan** fills the one-pixel frame around the edge image, which
   imgscan's window cannot reach.

All three kernels share one wide memory port, the Zynq UltraScale+ HP0 port.
The bus word is `PACK_BITS` wide, 512 bits by default. The kernels gain speed
by moving many pixels per bus word ("data packing"): at 512 bits one word holds
16 RGB pixels or 64 gray pixels. The host starts each kernel and waits for it
to finish before starting the next, which is an in-order command queue.

The structure follows the design described in *Exploiting Vitis Framework for
Accelerating Sobel Algorithm* (a Vitis/HLS design on a ZCU102 board). That
design's main configuration is the "global memory only" transfer mode with
512-bit packing, and this RTL implements that configuration. The kernels, their
arguments and their roles come from that design. The micro-architecture inside
each kernel is this implementation's own (see "Where this RTL makes its own
choices").

## Block diagram

```
             host (ARM, not included): start / done / arguments per kernel
                 |                 |                  |
          +-------------+   +-------------+   +--------------+
          | grayconvert |   |   imgscan   |   |  borderscan  |
          |  16 conv.   |   | line bufs + |   |  border-word |
          |  in parallel|   |  3x3 window |   |  read/fix/wr |
          +------+------+   +------+------+   +------+-------+
                 | mem_if          | mem_if          | mem_if
                 +--------+--------+--------+--------+
                          |  hp0_interconnect  |   round-robin, in-order routing
                          +---------+----------+
                                    | HP0 port (top-level pins)
                              global memory (DDR, not included)
```

| file | contents |
|---|---|
| `rtl/sobel_pkg.sv` | pixel types, gray formula, Sobel magnitude, threshold |
| `rtl/mem_if.sv` | the memory-master bundle with handshake assertions |
| `rtl/mem_reader.sv` | prefetching read-stream helper used by two kernels |
| `rtl/grayconvert.sv`, `rtl/imgscan.sv`, `rtl/borderscan.sv` | the kernels |
| `rtl/hp0_interconnect.sv` | arbiter that merges the three masters onto HP0 |
| `rtl/sobel_accel_top.sv` | the top level |

## Frames in memory

Addresses are byte addresses (`ADDR_W` = 40 bits). Every buffer must start on
a bus-word boundary (`PACK_BITS/8` bytes).

* **RGB frame**: 32 bits per pixel in raster order. R is in bits 7:0, G in
  15:8 and B in 23:16; bits 31:24 are ignored. Pixel `i` is at bits
  `(i % (PACK_BITS/32))*32` of word `i / (PACK_BITS/32)`.
* **Gray frame** and **edge frame**: one byte per pixel in raster order, with
  byte `i % (PACK_BITS/8)` of word `i / (PACK_BITS/8)` holding pixel `i`.

A 512x512 frame takes 1 MiB of RGB data plus 256 KiB each for the gray and
edge frames.

Argument limits:

* `width` must be a multiple of `PACK_BITS/8`, so that rows start on word
  boundaries. That is 64 pixels at 512 bits and 16 at 128 bits.
* `width` must be at most `MAX_WIDTH` (512), the line-buffer size.
* `height` must be at least 3.
* grayconvert's `size` (the pixel count) must be a multiple of `PACK_BITS/32`.

Assertions in the kernels check these limits when a kernel starts.

## The memory port (`mem_if`) and HP0 sharing

Each kernel owns one `mem_if` master with separate read and write channels,
like AXI:

* **Read**: the request is `ar_valid/ar_ready/ar_addr`. Each request is answered
  by one `r_valid` cycle that carries a whole word. Answers come in request
  order, and the master cannot refuse them.
* **Write**: address, data and byte strobes travel in one beat
  (`aw_valid/aw_ready/aw_addr/w_data/w_strb`). Each write is acknowledged by one
  `b_valid` cycle, in order.

A request must hold its contents while it waits for `ready`. Assertions in
`mem_if` check this.

Read data cannot be refused, so a reader may only have as many reads in flight
as it has room to store. `mem_reader` keeps a `DEPTH`-entry buffer (16 words by
default). It issues a request only while words in flight plus words buffered
are fewer than `DEPTH`. With `DEPTH` at least the memory's round-trip latency,
it sustains one word per cycle.

`hp0_interconnect` arbitrates the read and write channels independently,
round-robin among the masters that are requesting. It passes the winner's
request through combinationally. When the port accepts a request, the
interconnect pushes the winner's index into an order FIFO. The port answers in
order, so the head of that FIFO names the owner of the next `r_valid` or
`b_valid`. A channel stops granting while its FIFO is full, which caps
outstanding requests at `ID_DEPTH` (16). The top brings the merged port out as
plain `hp_*` pins.

Each kernel counts write acknowledgements. It raises `done` only when every
write has been acknowledged, so the next kernel can never read stale data.

## grayconvert

The kernel converts all `PACK_BITS/32` pixels of an input word in the same
cycle: 16 converters at 512 bits, each with three small constant multiplies.
Four input words give one full gray word. The kernel gathers four slots in an
accumulator, then writes the word. If the pixel count ends inside a gray word,
the last word is written with byte strobes for the valid bytes only.

The input side never stalls on the output side unless a gray word is complete
and the previous write is still waiting. With a memory that never stalls, the
kernel takes one cycle per RGB word plus about 20 cycles of latency. For
example, 32 words take 52 cycles.

## imgscan: the streaming 3x3 window

This is the least obvious part of the design. The gray frame arrives as one
pixel per cycle in raster order, from `mem_reader` through an unpacker that
hands out the bytes of one word in turn. Call the arriving pixel's position
`(row, col)`.

* Two line buffers of `MAX_WIDTH` bytes hold the previous two rows. `lb0[col]`
  is the pixel of row `row-1` and `lb1[col]` the pixel of row `row-2`.
* Together with the arriving pixel, they form the newest window column,
  `col_c = {lb1[col], lb0[col], pixel}`.
* In the same cycle, `lb1[col]` takes `lb0[col]` and `lb0[col]` takes the new
  pixel. The read and the write use the same address, and the read returns the
  old contents.
* Two registers, `col_a` and `col_b`, hold the window columns for `col-2` and
  `col-1`.
* Once `row >= 2` and `col >= 2`, the columns `col_a`, `col_b` and `col_c` form
  the complete window centred on `(row-1, col-1)`. That centre's result is
  produced in the same cycle.

The window shifts across row boundaries without being cleared. This is
harmless, because no result is produced until `col >= 2` in the new row.

For each centre the kernel computes:

```
Gx = (l.top + 2 l.mid + l.bot) - (r.top + 2 r.mid + r.bot)   kernel [+1 0 -1; +2 0 -2; +1 0 -1]
Gy = (l.top + 2 m.top + r.top) - (l.bot + 2 m.bot + r.bot)   its transpose
edge = (|Gx| + |Gy| > T) ? 0xFF : 0x00                       |Gx|+|Gy| <= 2040
```

The results arrive in raster order for columns `1 .. width-2` of rows
`1 .. height-2`. A packer gathers them into a word and writes it with byte
strobes when either of these happens:

* the byte is the last one in its word;
* the pixel is the last interior pixel of its row.

Column 0 and column `width-1` are therefore never written. They belong to
borderscan. The packer stalls the pixel stream only when it must write a word
while the previous write is still waiting for the port.

Throughput is one pixel per cycle whatever the packing. A 512x512 frame takes
262,161 cycles, which is 17 cycles over the pixel count. This fits the
original design's observation that the packing width barely matters for this
kernel.

## borderscan

The edge frame's outer ring gets the value of the nearest interior pixel:

* column 0 copies column 1;
* column `width-1` copies column `width-2`;
* row 0 copies the corrected row 1, and row `height-1` copies the corrected row
  `height-2`;
* so each corner takes its diagonal neighbour.

The kernel reads only the words that contain border pixels:

* every word of rows 1 and `height-2`;
* the first and last word of every row between them.

For each such word it reads the word, then replaces byte 0 (first word) and/or
the last byte (last word) with the neighbouring byte. It writes the word back
with strobes on only the changed bytes. For rows 1 and `height-2` it also
writes the whole word into row 0 or row `height-1`.

The kernel handles one word at a time with one request outstanding. It is not
optimised, because it touches little data: 1,032 word reads for a 512x512
frame.

## Control and timing

Each kernel has `start` (a one-cycle pulse, taken when idle), `busy` and `done`
(a one-cycle pulse). It captures its arguments on `start`. The top's ports are
grouped by kernel:

| kernel | control | arguments |
|---|---|---|
| grayconvert | `gc_start`, `gc_busy`, `gc_done` | `gc_image`, `gc_gray_image`, `gc_size` |
| imgscan | `is_start`, `is_busy`, `is_done` | `is_gray_image`, `is_ee_image`, `is_width`, `is_height`, `is_t` |
| borderscan | `bs_start`, `bs_busy`, `bs_done` | `bs_ee_image`, `bs_width`, `bs_height` |

The host runs grayconvert, then imgscan, then borderscan, each started after
the previous one's `done`. Reset is asynchronous and active low.

Measured in simulation, with a memory model that refuses 10 to 20% of requests
and answers in 4 to 7 cycles:

| packing | grayconvert + imgscan | all three kernels (512x512) |
|---|---|---|
| 128 bits | 334,971 cycles | 346,000 cycles |
| 256 bits | 298,526 cycles | 309,287 cycles |
| 512 bits | 280,404 cycles | 290,964 cycles |

The ordering matches the original design's measurements in global-memory mode.
There, the two-kernel time falls from 10.60 ms to 9.68 ms to 9.24 ms as the
packing widens. Its clock frequency is not stated, so absolute times cannot be
compared.

## Where this RTL makes its own choices

The original design gives the kernels, their port names, the gray formula, the
horizontal Sobel kernel, the packing widths and the frame size. Everything
below is this implementation's choice:

* **Gradient and threshold.** The design uses both Gx and Gy with the
  `|Gx|+|Gy|` norm. The imgscan port `T` is used as a strict threshold that
  gives a binary 0xFF/0x00 output.
* **Border rule.** The original only says that borderscan corrects the
  boundary from sparse data near the border. Replicating the nearest interior
  pixel is an assumption.
* **Formats and widths.** The pixel format, the 40-bit byte addresses, the
  argument widths (16-bit width/height/T, 32-bit size) and the alignment rules
  are assumptions.
* **Control and memory interface.** The start/busy/done handshake, the
  in-order memory port with one-beat writes, the read prefetch depth and the
  round-robin interconnect stand in for what the HLS tools would generate.
* **imgscan throughput.** imgscan handles one pixel per cycle. The original
  does not give its throughput.

## Not included

* **The processing system and its DDR memory.** These are vendor parts, so the
  top brings out the kernels' control ports and the HP0 port instead.
  `tb/global_mem_model.sv` is a behavioural model of the memory, for
  simulation only.
* **The two alternative transfer modes** that the original compares against:
  * "all OpenCL stages", where kernels first copy buffers into on-chip memory;
  * "kernel-to-kernel stream", where grayconvert streams straight into imgscan.

  Only the global-memory mode is built.

## Simulating

Every testbench checks itself against an independent reference model
(`tb/sobel_ref_pkg.sv`, which works pixel by pixel on whole frames). Each one
prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv rtl/mem_if.sv rtl/mem_reader.sv \
  rtl/grayconvert.sv rtl/imgscan.sv rtl/borderscan.sv rtl/hp0_interconnect.sv \
  rtl/sobel_accel_top.sv tb/global_mem_model.sv tb/frame_runner.sv \
  tb/tb_sobel_accel_top.sv --top-module tb_sobel_accel_top
./obj_dir/Vtb_sobel_accel_top
```

To run another test, replace the last file and `--top-module` with one of these:

| testbench | what it checks |
|---|---|
| `tb_sobel_accel_top` | Default parameters. A full 512x512 frame plus a 64x8 frame; gray and edge images compared with the reference model byte for byte. Also requires port stalls, several reads in flight, partial-strobe writes, traffic from every kernel and both edge values to occur. About one second. |
| `tb_pack_widths` | The 512x512 frame at 128-, 256- and 512-bit packing, with the cycle counts above. |
| `tb_grayconvert` | Sizes that end in a partial word; no writes past the image; one word per cycle without stalls. |
| `tb_imgscan` | Several frame shapes and thresholds; the border is left untouched; one pixel per cycle. |
| `tb_borderscan` | Every border pixel replicated and the interior untouched; exactly the border words are read. |
| `tb_hp0_interconnect` | Three random traffic generators: reply routing, ordering, write completeness, contention and a full order FIFO. |

The memory model's `stall_pct` can be changed at run time to vary back-pressure.
