# DIPS image-processing peripherals

DIPS is a small FPGA image-processing system. A 32-bit soft processor gets
commands and images from a PC over a serial link. It keeps the images in an
external 256K x 32 SRAM and runs image operations on them:

- 3x3 mask filters: smoothing, high-pass, high-boost, Sobel, Prewitt;
- a max-difference edge detector;
- a forward and inverse LeGall 5/3 wavelet transform, the reversible wavelet
  of JPEG-2000, at one or two levels.

The processor could do all of this in software. Doing so is slow, so the
wavelet transform sits in a hardware core on the processor's peripheral bus.

This RTL is the hardware around that processor: the wavelet core, a second
core that does the filters and edge detection in hardware, and the bus that
joins them. The processor and the vendor peripherals are not included: local
block RAM, UART, GPIO, JTAG UART and the SRAM controller. They attach through
two plain bus ports of the top module.

```
              +-------------------------- dips_top ---------------------------+
 processor    |                                                               |
 data-side -->| opb_bus --+-- dwt_opb  (5/3 wavelet core)     0x4000_0000     |--> dwt_irq
 OPB master   |  decode   |     dwt53_core                                    |
              |  + OR     +-- img_opb  (filters, edges)       0x4001_0000     |
              |           |     img_engine: win3x3, filter3x3, edge3x3        |
              |           +-- ext_opb port                    0x8000_0000+    |--> UART, GPIO,
              +---------------------------------------------------------------+    JTAG UART,
                                                                                   SRAM controller
```

## Bus convention

All peripherals use a reduced On-chip Peripheral Bus (OPB). The types are in
`rtl/dips_pkg.sv`:

- Request `opb_m2s_t`: `select`, `rnw` (1 = read), `abus[31:0]`, `dbus[31:0]`.
  The master holds it until it sees `xfer_ack`.
- Response `opb_s2m_t`: `dbus[31:0]`, `xfer_ack`, `err_ack`. A slave drives
  all zeros unless it is acknowledging. This is why `opb_bus` can combine the
  responses with a plain OR.
- Slaves in this RTL acknowledge exactly one clock after `select`. A write
  takes effect at the clock edge that raises `xfer_ack`. The master must drop
  `select` after the acknowledge.
- `opb_bus` gives the request to the one slave whose window matches
  (`abus & MASK == BASE`). An address outside every window gets `xfer_ack`
  with `err_ack` one clock later, so the processor never hangs.
- Not modelled: arbitration (there is one master), retry, timeout-suppress
  and byte enables.

## The 5/3 wavelet core (`dwt53_core`, `dwt_opb`)

### What it computes

One image line X(0..N-1) is turned into low-pass values Y(2n) and high-pass
values Y(2n+1) by two integer lifting steps:

```
predict  Y(2n+1) = X(2n+1) - floor((X(2n)   + X(2n+2))     / 2)
update   Y(2n)   = X(2n)   + floor((Y(2n-1) + Y(2n+1) + 2) / 4)
```

The inverse runs the same steps backwards with the signs flipped. It first
restores the even samples, then the odd ones. Because both steps are integer
and exactly invertible, the transform is lossless.

At the ends of the line, samples are mirrored: X(N) = X(N-2) and
Y(-1) = Y(1). This is the symmetric extension of JPEG-2000.

### How the hardware does it

- The line sits in a register array of `MAXN` entries. The transform works in
  place, in interleaved order: even slots become low-pass values and odd
  slots become high-pass values.
- Pass 1 walks the odd slots and applies the predict step. Pass 2 walks the
  even slots and applies the update step. Each pass reads a slot's two
  neighbours, which were already final after the previous pass.
- The inverse does the update pass first (even slots), then the predict pass
  (odd slots).
- One slot is written per clock, so a line of N samples takes exactly N
  clocks. `done` pulses at the end.
- Samples are `DW` = 16-bit two's complement, and the sums inside the steps
  are kept at full width. For 8-bit pixels this holds two or more levels
  without loss.

### Host view (`dwt_opb`)

The processor sees the line in subband order on the transformed side:

- **Forward:** write N samples in natural order, start the core, then read
  N/2 low-pass values followed by N/2 high-pass values.
- **Inverse:** write low-pass then high-pass values, start the core, then
  read the samples back in natural order.

With this ordering, a 2-D transform is simple software: transform every row
in place, then every column, and the four subbands (LL, HL, LH, HH) end up in
the four quadrants of the image. For a second level, repeat on the LL
quadrant with half the line length. To invert, go in reverse: for the deepest
level, columns first and then rows.

| offset          | access | meaning |
|-----------------|--------|---------|
| `0x0000`        | W      | bit0 start (ignored while busy), bit1 inverse mode (write with bit0 = 0 to set the mode before loading data) |
| `0x0000`        | R      | bit0 busy, bit1 done (sticky, cleared by start), bit2 inverse mode |
| `0x0004`        | RW     | line length N: even, 4..MAXN, reset value MAXN |
| `0x1000 + 4*i`  | RW     | line entry i; sign-extended to 32 bits on read; writes ignored while busy |

`irq` is the sticky done bit. It can drive the processor's interrupt input.

## The 3x3 image engine (`img_engine`, `img_opb`)

### Streaming through a window

Pixels enter in raster order, one at a time, over a valid/ready handshake.
The image size (width x height) is set at run time, up to
`MAX_WIDTH` x `MAX_HEIGHT` = 512 x 512.

`win3x3` keeps two line buffers, one for each of the two previous rows. On
every accepted pixel it shifts the column {row r-2, row r-1, new pixel} into a
3x3 register window. After the push, the window is centred one row up and one
column left of the new pixel.

This gives the central timing rule: **the output for pixel k appears when
pixel k + width + 1 is accepted.** The engine therefore produces nothing for
the first width + 1 inputs. At the end of a frame, the last width + 1 outputs
are still owed.

All of those last outputs lie on the image border, which outputs 0. So after
the final input the engine emits them by itself (the drain), holding
`in_ready` low meanwhile. It is then ready for the next frame. Output pixels
leave in raster order, one per input, and `out_last` marks the final one.

With `out_ready` held high the engine takes one pixel per clock. A frame
takes width·height + width + 1 clocks from the first input to the last
output.

### Operators

Notation: c is the centre pixel and s8 the sum of its eight neighbours. The
windows are [row][col] with row 0 on top. Results are clipped to 0..255, and
division truncates.

| code | operator   | output |
|------|------------|--------|
| 0    | low-pass   | (c + s8) / 9 |
| 1    | high-pass  | (8c − s8) / 9 |
| 2    | high-boost | (w·c − s8) / 9, with w from the CTRL register |
| 3    | Sobel      | \|Ox\| + \|Oy\|, where Ox = [-1 -2 -1; 0 0 0; 1 2 1] and Oy is its transpose |
| 4    | Prewitt    | \|Ox\| + \|Oy\|, where Ox = [-1 -1 -1; 0 0 0; 1 1 1] and Oy is its transpose |
| 5    | edge       | m = largest absolute difference of the pairs facing each other across the centre (left/right, top/bottom, both diagonals); output m if m > threshold, else 0 |
| other| copy       | c |

Pixels in the first and last row and column are output as 0.

### Host view (`img_opb`)

| offset | access | meaning |
|--------|--------|---------|
| `0x00` | RW | [7:0] operator code, [15:8] edge threshold, [23:16] high-boost w; writing bit31 = 1 restarts the frame. Reset: low-pass, threshold 0, w = 9 |
| `0x04` | W  | next input pixel in [7:0] |
| `0x08` | R  | bit31 valid, bit30 last pixel of frame, [7:0] pixel; a valid read removes the pixel |
| `0x0C` | R  | bit0 engine can take a pixel, bit1 output waiting, bit2 overrun (cleared by this read) |
| `0x10` | RW | [15:0] width, [31:16] height (3..512 each; reset 512 x 512) |

The engine holds only one output pixel. Software should write one pixel,
read `0x08` until it stops returning valid, and repeat. After the last pixel
it keeps reading until bit30 appears. The drained border pixels usually show
up in the reads after the last write.

A write to `0x04` while the engine cannot take a pixel is still
acknowledged. The pixel is dropped and the overrun flag is set, so the bus
never stalls.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `dips_top` | `IMG_MAX_WIDTH`, `IMG_MAX_HEIGHT` | 512, 512 | largest image for the filter engine (line-buffer size) |
| `dips_top` | `DWT_MAXN` | 512 | longest wavelet line |
| `dips_top` | `DWT_DW` | 16 | wavelet sample/coefficient width |
| `opb_bus` | `NSLV`, `BASE`, `MASK` | 3, map above | slave windows |

At the defaults the design holds 16 Kbit of storage: 8 Kbit of wavelet line
and 2 x 4 Kbit of line buffers.

## Choices made here, and differences from the original system

What comes from the original system description:

- the operator set and its 3x3 masks, including the 1/9 scale of the
  high-pass and high-boost masks (the smoothing mask is taken here as the
  usual 1/9 all-ones average);
- the edge-detection rule;
- the 5/3 lifting equations;
- the wavelet transform as a bus peripheral of the processor;
- the bus structure and the 256K x 32 image SRAM.

Everything else is this design's own:

- **Filters in hardware.** The original runs the filters and edge detection
  as processor software. Here they are a second peripheral with the same
  arithmetic.
- **Exact wavelet reconstruction.** The original reports visible error after
  the inverse transform, caused by internal bit widths that were too narrow.
  Those widths are not known, so this core uses widths that make the
  transform exactly lossless.
- **Unstated details.** These were chosen here:
  - line-end extension;
  - the way Sobel and Prewitt combine their two directions (|Ox|+|Oy|);
  - rounding and clipping;
  - border pixels set to 0;
  - which pixel pairs the edge detector compares;
  - the operator codes;
  - register maps, address map and reset values;
  - the maximum sizes: 512 covers the common 512 x 512 test photograph and
    smaller test images.
- **Not included:** the processor itself and the vendor peripherals (UART,
  GPIO, JTAG UART, local block RAM, SRAM controller). Compression, which the
  original mentions only as future work, is not included either.

## Simulation

Each module has a self-checking testbench in `tb/`. Each testbench prints one
`TB_RESULT checks=N failures=M` line and stops itself with a watchdog. With
Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          --top-module tb_dips_top rtl/dips_pkg.sv tb/tb_dips_top.sv
./obj_dir/Vtb_dips_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_dwt53_core` | random lines of many lengths against the lifting equations; forward then inverse gives back the input; N clocks per line |
| `tb_dwt_opb` | the same over the bus, with subband ordering, LEN/STATUS registers, sticky done/irq, start ignored while busy |
| `tb_win3x3` | every window pixel against the stored image, several row lengths, idle gaps, restart |
| `tb_filter3x3`, `tb_edge3x3` | every operator on random and hand-made windows, including threshold edge cases |
| `tb_img_engine` | whole frames of several sizes with random stalls on both sides; full-rate frame timing (width·height + width + 1 clocks) |
| `tb_img_opb` | the software loop over the bus, SIZE/CTRL registers, overrun flag, restart |
| `tb_opb_bus` | routing to three model slaves with different latencies; error answer |
| `tb_dips_top` | the whole system at default sizes, about 30 s (described below) |

`tb_dips_top` runs the system at its default sizes. A bus-functional
processor works on images stored in a behavioural SRAM model
(`tb/sram_opb_model.sv`). It runs all six operators on a 512 x 512 image and
an edge pass on a 300 x 246 image. It then runs a two-level 2-D forward and
inverse wavelet transform of the 512 x 512 image, which must reconstruct
exactly. It also provokes an overrun and an unmapped access, and fails if any
of these mechanisms never occurred.

The reference models are in `tb/tb_ref_pkg.sv`. They are written from the
operator definitions, not from the RTL structure. The bus-functional
processor is `tb/opb_master_bfm.sv`.
