# JPEG decoding and VGA output for an on-screen-display FPGA system

This design turns compressed pictures into pixels for a screen. It has two
independent parts:

* **`jpeg_core`**, a baseline JPEG decoder. A JPEG file goes in as a 32-bit
  AXI stream. Decoded pixels come out as 24-bit RGB values, each with its X,Y
  position and the picture's width and height.
* **`vga_test`**, a 640x480 VGA timing generator (`vga_controller`) with a
  simple pixel source. Its 12-bit colour is set by switches, as on a Basys 3
  board.

`osd_top` places the two side by side. Each part has its own clock, reset and
ports. Nothing connects the decoder's pixels to the VGA output: no frame
buffer is part of this design. To show a decoded picture, a system would store
the decoder's pixels at (X,Y) and let the VGA side read them back.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The decoder has no
vendor primitives. Its tables and buffers are plain arrays, which synthesis
may map to distributed or block RAM.

## The decoding pipeline

```
 32-bit AXI stream
        |
  jpeg_input ---- DQT writes ----------------------> jpeg_dqt (tables)
  (markers, headers,  DHT writes --> jpeg_dht (Huffman lookup)
   byte unstuffing)                     ^  |
        | bytes                         |  v
  jpeg_bitbuffer --- 32-bit window --> jpeg_mcu_proc <-- jpeg_mcu_id
                                        | (k, value) tokens + block ID
                                     jpeg_dqt  (de-quantise, de-zigzag)
                                        | (position, value) tokens
                                     jpeg_idct (input buffer, IDCT-X,
                                        |       transpose buffer, IDCT-Y)
                                        | pixels + block ID
                                     jpeg_output (Y/Cb/Cr staging,
                                        |         ycbcr_to_rgb)
                               RGB + X,Y + width,height
```

Every step of the data path has a valid/ready handshake. A stall on
`outport_accept_i` therefore travels back through every stage until it
reaches `inport_accept_o`. No data is lost.

### Headers and tables (`jpeg_input`)

The input block takes the bytes of each 32-bit word in lane order: lane 0
(bits 7:0) first. Lanes whose `inport_strb` bit is low are skipped. It
handles one byte per cycle and follows the marker structure of the file:

| marker | what is done |
|--------|--------------|
| SOI | starts a picture |
| DQT | each 64-entry 8-bit table goes to `jpeg_dqt`, in the zigzag order of the file |
| DHT | code counts (lengths 1..16) and symbols go to `jpeg_dht`, for table {class, id} |
| SOF0 | picture height and width, number of components, Y sampling factors, quantisation table of each component |
| SOS | DC/AC Huffman table of each component; `scan_start` pulses and entropy-coded data follows |
| EOI | the block waits for the rest of the decoder to go idle before reading on |
| others (APPn, COM, ...) | skipped using their length field |

In the entropy-coded data, a stuffed `FF 00` pair is passed on as `FF`.
Restart markers are dropped.

The wait at EOI lets files follow each other directly on the stream. A
picture's tables and size stay in force until its last pixel has left.
During the wait the block offers 0xFF bytes to the bit buffer. A complete
scan never reads them. If a scan was cut short, the decoder runs into
all-ones bits, which match no Huffman code. Every remaining block then ends
at once, and the picture still finishes instead of stalling. The next scan
start empties the bit buffer of any fill bytes left over.

### Huffman decoding (`jpeg_bitbuffer`, `jpeg_dht`, `jpeg_mcu_proc`)

This is the part that limits speed in most JPEG decoders.

`jpeg_bitbuffer` is a 64-bit shift register. The MCU decoder always sees the
next 32 stream bits, MSB first, and the count of valid bits. A new byte is
taken whenever at most 56 bits would remain.

`jpeg_dht` finds the code at the head of the stream in one combinational step.
JPEG Huffman codes are canonical. For each length l, the codes of that length
are consecutive numbers starting at a first code. That first code follows from
the counts of the shorter lengths. The lookup takes the first l bits for every
l from 1 to 16 at once. It tests each against the range of length l and picks
the shortest length that hits. The symbol is then read from the table's
symbol list at (first symbol position of l) + (bits - first code).

`jpeg_mcu_proc` uses the code length and the symbol's size nibble to take
code and magnitude bits together, in one cycle. It only does this once the
bit buffer holds that many bits. For each 8x8 block it:

1. decodes the DC category, reads the magnitude and adds the difference to
   the component's DC predictor;
2. decodes AC run/size symbols:
   * size 0 with run 15 (ZRL) skips 16 zeros;
   * size 0 with any other run (EOB) ends the block;
   * any other symbol skips `run` zeros and gives one coefficient;
3. sends an end-of-block token carrying the block ID after EOB, or after
   coefficient 63 when the block has no EOB.

A block costs one cycle per non-zero coefficient plus a few cycles overhead.
A bit pattern that matches no code, seen with 16 bits available, ends the
block early. A corrupt file therefore cannot hang the decoder.

### Block identification (`jpeg_mcu_id`)

Blocks arrive in interleaved-scan order, so the decoder has to know which
component and which part of the picture each block belongs to. The MCU
layout is derived from the frame header:

| layout | Y sampling | MCU | blocks per MCU |
|--------|------------|-----|----------------|
| grayscale | (1 component) | 8x8 | Y |
| 4:4:4 | 1x1 | 8x8 | Y Cb Cr |
| 4:2:2 | 2x1 | 16x8 | Y0 Y1 Cb Cr |
| 4:2:0 | 2x2 | 16x16 | Y0 Y1 Y2 Y3 Cb Cr |

Cb and Cr must have 1x1 sampling. The generator steps through the blocks of
each MCU and through the MCUs in raster order. The number of MCUs is rounded
up from the picture size. Each block's ID (`jpeg_pkg::blk_id_t`) holds:

* the component;
* the index of the Y block within the MCU;
* the MCU column and row;
* flags for the last block of the MCU and the last block of the picture.

The ID travels with the block through DQT and IDCT to the output stage. There
it places the pixels.

### De-quantisation (`jpeg_dqt`)

Each coefficient is multiplied by its component's step, indexed by the
zigzag index. It leaves with its row-major position in the block. Products
saturate to 16 bits. The zigzag-to-natural mapping is computed by
`jpeg_pkg::zigzag_to_natural`, which walks the zigzag path. No table of
positions is stored.

### Inverse DCT (`jpeg_idct`, `idct_1d`)

The 2-D IDCT is split into two 1-D passes:

* **Input buffer.** 64 x 16-bit coefficients, all zero at the start of a
  block. Coefficients are written as they arrive. The end-of-block token
  marks the buffer full.
* **IDCT-X.** One row output per cycle, 64 cycles. The result is stored with
  three fractional bits (22-bit words) in the transpose buffer. The input
  buffer is then cleared and takes the next block.
* **IDCT-Y.** One pixel per cycle, 64 cycles. Each pixel is rounded, shifted
  by +128 and clamped to 0..255.

Each pass uses one `idct_1d`: eight multipliers by the constants
round(4096 C(u) cos((2x+1)uπ/16)). All 64 constants come from the eight
values 4096 cos(kπ/16) in `jpeg_pkg`. Against a floating-point IDCT, the
output differs by at most one level in the tests.

A block needs 128 cycles in the IDCT. The next block's coefficients can
arrive while the previous block is leaving.

### Output (`jpeg_output`, `ycbcr_to_rgb`)

Pixels of one MCU are collected in staging buffers: up to four Y blocks, one
Cb block and one Cr block. After the last pixel of the MCU's last block
arrives, the block drains the MCU row by row, one pixel per cycle. For 4:2:2
and 4:2:0, chroma is replicated over 2x1 or 2x2 pixels. Pixels beyond the
picture's right or bottom edge (MCU padding) are skipped and not presented.

The colour conversion uses the JFIF equations with 16-bit fractional
constants:

* R = Y + 1.402 (Cr-128)
* G = Y - 0.344136 (Cb-128) - 0.714136 (Cr-128)
* B = Y + 1.772 (Cb-128)

Grayscale pictures give R = G = B = Y.

There is a single set of staging buffers, so the IDCT waits while an MCU
drains. Pixels of a picture come out MCU by MCU, not in raster order.

### Timing and throughput

With no output stalls, a 640x480 4:2:0 picture (1200 MCUs) takes about
1.16 million clock cycles, file headers included. That is about 970 cycles
per MCU: six blocks through the IDCT plus 256 cycles of draining. At 100 MHz
this is about 12 ms per picture. The IDCT and the unshared staging buffer set
this rate. Huffman decoding is rarely the limit.

### Decoder ports (`jpeg_core`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_i`, `rst_i` | in | 1 | clock; asynchronous reset, active high |
| `inport_valid_i`, `inport_accept_o` | in/out | 1 | input handshake |
| `inport_data_i` | in | 32 | file bytes, lane 0 first |
| `inport_strb_i` | in | 4 | lanes holding bytes |
| `inport_last_i` | in | 1 | end of file (not needed; markers delimit pictures) |
| `outport_valid_o`, `outport_accept_i` | out/in | 1 | pixel handshake |
| `outport_width_o`, `outport_height_o` | out | 16 | picture size |
| `outport_pixel_x_o`, `outport_pixel_y_o` | out | 16 | pixel position |
| `outport_pixel_r_o/g_o/b_o` | out | 8 each | colour |
| `idle_o` | out | 1 | no picture in flight |

These ports total 132 bits.

### What the decoder does not handle

* progressive or lossless JPEG;
* 12-bit samples and 16-bit quantisation tables;
* restart intervals (DRI);
* sampling other than the four layouts above;
* scans whose component order differs from the frame header.

Such files are not detected. They decode to wrong pixels.

## The VGA test design

`vga_clk_div` makes a one-in-four clock enable from the 100 MHz board clock,
which gives the 25 MHz pixel rate. `vga_controller` counts pixels (x, 0..799)
and lines (y, 0..524) on that enable. It decodes three ranges:

| output | condition |
|--------|-----------|
| `video_on` | x < 640 and y < 480 |
| `hsync` | 640 <= x < 752 |
| `vsync` | 513 <= y < 815 |

Each output is high inside its range and registered, one board clock behind
the counters. Note how these ranges differ from the common 640x480@60 Hz
timing:

* hsync starts right at the end of the visible line, with no front porch;
* because the frame has 525 lines, vsync covers lines 513..524.

A monitor that needs the usual porches, or active-low sync, needs other
parameter values or an inverter. All the limits, and the line and frame
lengths, are parameters of `vga_controller`.

`vga_test` registers the 12 switches (4 bits per colour) every clock. It
drives them onto `rgb` while `video_on` is high and drives black otherwise.

## Where this design makes its own choices

The published description of this decoder gives its split into blocks, and
this design follows it:

* input stream processing;
* bit buffer, Huffman lookup, MCU decoder and MCU ID generator;
* DQT/de-zigzag;
* IDCT input buffer, IDCT-X, transpose buffer and IDCT-Y;
* YCbCr staging and YCbCr-to-RGB.

The 32-bit stream input and the output of RGB, X,Y and picture size also
come from that description. The following are this design's own choices, and each is also noted in the head
comment of its file:

* the handshakes;
* buffer sizes;
* fixed-point widths and rounding;
* one code decoded per cycle;
* the wait and fill at EOI;
* chroma replication;
* the single staging buffer.

On the VGA side, the description gives the split into `vga_test` and
`vga_controller`, the comparator limits and the 100/25 MHz clocks. These
are this implementation's choices:

* line and frame lengths of 800 and 525;
* sync polarity;
* registered outputs;
* the switch-driven colour source.

## Simulation

Each module has a self-checking testbench in `tb/`, except the helper
`idct_1d`, which is tested through `jpeg_idct`. Each prints
`TB_RESULT checks=N failures=M`.

* `jpeg_tb_pkg` builds test files without any image or encoder. It draws
  quantised coefficients at random, with these features included on purpose:
  * long zero runs;
  * blocks that end at coefficient 63;
  * large values that make pixels clamp;
  * data that needs byte stuffing.

  It Huffman-codes the coefficients with tables generated from a rule (see its
  head comment). It also decodes them independently in floating point, which
  gives the expected RGB values.
* `tb_jpeg_core` sends six such files back to back, with random byte lanes,
  gaps and output stalls. It covers every layout and sizes that are not MCU
  multiples. It checks every pixel within 2 levels (grayscale) or 4 per
  channel (colour), and checks that each position appears exactly once.
  One file is cut off halfway through its scan. Its pixels are not compared,
  but it must still finish, and the files after it must decode correctly.
* `tb_jpeg_quality` decodes pictures made at quality settings from 1 to 100.
  These scale the quantiser steps from 255 down to 1. At quality 1, almost
  every pixel clamps.
* `tb_osd_top` runs the whole design at its default parameters. It decodes a
  640x480 4:2:0 picture and three smaller ones. Next to that it runs one full
  VGA frame.
* The other testbenches check one block each against their own models.

With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/jpeg_pkg.sv tb/jpeg_tb_pkg.sv tb/tb_jpeg_core.sv --top-module tb_jpeg_core
./obj_dir/Vtb_jpeg_core
```

Testbenches that do not use the JPEG packages need only
`-y rtl tb/tb_<name>.sv`. The full-size `tb_osd_top` runs in a few seconds.

## Files

| file | content |
|------|---------|
| `rtl/jpeg_pkg.sv` | layouts, block ID, picture info, cosine constants, zigzag function |
| `rtl/jpeg_core.sv` | decoder top |
| `rtl/jpeg_input.sv` | stream bytes, marker and header parser |
| `rtl/jpeg_bitbuffer.sv` | bit buffer |
| `rtl/jpeg_dht.sv` | Huffman tables and lookup |
| `rtl/jpeg_mcu_id.sv` | block ID generator |
| `rtl/jpeg_mcu_proc.sv` | Huffman coefficient decoder |
| `rtl/jpeg_dqt.sv` | de-quantisation, de-zigzag |
| `rtl/jpeg_idct.sv`, `rtl/idct_1d.sv` | 2-D IDCT and its 1-D unit |
| `rtl/jpeg_output.sv`, `rtl/ycbcr_to_rgb.sv` | staging buffers and colour conversion |
| `rtl/vga_test.sv`, `rtl/vga_controller.sv`, `rtl/vga_clk_div.sv` | VGA test design |
| `rtl/osd_top.sv` | both designs side by side |
| `tb/jpeg_tb_pkg.sv` | test-file generator and reference decoder |
| `tb/tb_*.sv` | testbenches |
