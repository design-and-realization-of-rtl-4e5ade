# Image acquisition core for an Avalon-MM system

This core connects a CMOS image sensor with a Bayer colour filter (Micron
MT9M011 style: `FRAME_VALID`, `LINE_VALID`, 10-bit `DOUT` on `PIXCLK`) to an
Avalon-MM system (Nios II, SDRAM controller). On a command from the processor
it captures one whole frame, or consecutive frames, and turns each 2x2 Bayer
quad inside a programmable window into one YUV pixel. It then writes the
pixels as 32-bit words into SDRAM from a programmed head address. The image
is ready to compress without the processor touching a pixel. With the reset
window (640 x 480 sensor pixels) one capture gives a 320 x 240 (QVGA) YUV
image of 76 800 words.

```
            PIXCLK domain                               | bus clock domain (100 MHz)
 sensor -> cmos_capture -> bayer2rgb -> rgb2yuv -> [ dc_fifo | avalon_master_write ] -> SDRAM
              ^   |        (line_buffer)                    |        ^    |   (Avalon-MM master)
              |   '-- frame_done ---- pulse_sync ---------->|        |    | write_done, cur_addr
              '-- GO <--------------- pulse_sync <----------|        |    v
                                                            | avalon_slave_regs <-> processor
                                                            |   (Avalon-MM slave)
```

All RTL is in `rtl/`, one module per file; `img_cap_pkg` holds the register
map, the pixel structs and the colour coefficients.

## Pixel path

**Capture (`cmos_capture`).** A pixel is valid when `FRAME_VALID` and
`LINE_VALID` are both high. The module registers the sensor pins and counts
columns (`x`, from 0 at the first valid pixel of a line) and rows (`y`, lines
since `FRAME_VALID` rose). A GO command arms it. It then waits for the next
rising edge of `FRAME_VALID`, so it never starts in the middle of a frame.
Every valid pixel of that frame goes out with its `x`/`y`. The falling edge of
`FRAME_VALID` ends the frame and gives a `frame_done` pulse. If CONT is set at
that moment, the module re-arms and takes the next frame too. Latency is two
`PIXCLK` cycles.

**Demosaic (`bayer2rgb` + `line_buffer`).** The sensor pattern is:

| row \ column | even | odd |
|---|---|---|
| even | G | R |
| odd  | B | G |

A RAM-based shift register (`line_buffer`) holds the previous sensor line. It
has two taps, 1280 samples apart and 8 bits wide. It shifts only on valid
pixels, so `LINE_W` must equal the number of active pixels per line. When a
pixel with odd row and odd column arrives, its 2x2 quad is complete:

* R is the pixel above it, from tap 0 of the line buffer;
* B is the pixel to its left;
* G is the mean of the pixel itself and the one above-left, `(G0 + G1) >> 1`.

So there is one RGB pixel per quad, and the image is half the window size in
each direction. Only quads whose top-left corner lies inside the window
(`WIN_X`, `WIN_Y`, `WIN_W`, `WIN_H`, in sensor pixels, rounded down to even)
are passed on. The sensor's 10-bit word is cut to its 8 MSBs at this
module's input. The second tap of the line buffer is built but not read.
Output follows the quad's last pixel by two clocks.

**Colour conversion (`rgb2yuv`).** The coefficients are fixed point, scaled
by 128 and rounded to the nearest integer:

```
Y = ( 38 R + 75 G + 15 B) >>> 7
U = (-22 R - 42 G + 64 B) >>> 7
V = ( 64 R - 54 G - 10 B) >>> 7      each result clamped to 0..255
```

U and V carry **no +128 offset**. A negative colour difference therefore
clamps to 0, and U and V never exceed 127. The result is half-range
chroma, not the usual offset-binary YCbCr. To get offset-binary chroma, add
128 before the clamp in `clamp8` (and in the testbench reference). The stage
has two pipeline registers and takes one pixel per clock.

**Clock crossing (`dc_fifo`, inside the master).** This is a Gray-code dual-clock FIFO, 256 x 24
bits by default (`FIFO_AW`). Its read port is show-ahead. Writing into a full
FIFO drops the word and fires an assertion. At most one word is produced per
two `PIXCLK` cycles (odd rows only). The master drains one word per bus
clock. The FIFO fills only if the bus is stalled for a long time.

**Write master (`avalon_master_write`).** The master does single (non-burst)
Avalon writes, one pixel per write, packed as `{8'h00, Y, U, V}`. Byteenable
is always `4'hF`. The address starts at WRITE_ADDRESS on GO and steps by 4.
The master holds `write`, `address` and `writedata` while `waitrequest` is
high, and an assertion checks this. With no wait states it writes one word
per clock. It counts the words written. When the count has reached one frame
(`frame_len = (WIN_W/2)*(WIN_H/2)`) and the FIFO is empty, it pulses
`write_done` and subtracts one frame from the count. The address keeps
running, so consecutive frames lie back to back in memory. CURRENT_ADDRESS
is then the head address for the next frame.

## Registers (Avalon-MM slave, word offsets)

| offset | name | access | contents |
|---|---|---|---|
| 0 | CONTROL | RW | bit0 GO (write 1 to start, ignored while BUSY, reads 0); bit1 CONT (consecutive frames) |
| 1 | STATUS | R, write 0 clears | bit0 FRAME_DONE, bit1 WRITE_DONE, bit2 BUSY |
| 2 | WRITE_ADDRESS | RW | 32-bit byte address of the first pixel |
| 3 | CURRENT_ADDRESS | R | address of the next write (next frame's head) |
| 4..7 | WIN_X, WIN_Y, WIN_W, WIN_H | RW | capture window in sensor pixels; reset 0, 0, 640, 480 |

* FRAME_DONE is set when a captured frame ends at the sensor (`FRAME_VALID`
  falls).
* WRITE_DONE is set when that frame's pixels are all in memory.
* Reading STATUS never changes it. Writing 0 to it clears FRAME_DONE and
  WRITE_DONE; a non-zero write is ignored.
* BUSY is set by an accepted GO. It clears at a WRITE_DONE while CONT is low.
  Writing STATUS does not clear it.
* Reads have zero wait states: `readdata` is combinational during `read`.
* There is no interrupt line; software polls STATUS.

A single capture in software:

1. Wait until BUSY is 0.
2. Write WRITE_ADDRESS, then write 0 to STATUS.
3. Write GO.
4. Poll STATUS until WRITE_DONE (and FRAME_DONE if the sensor frame must
   have ended too) is set.
5. Read CURRENT_ADDRESS as the head address for the next frame.

With a window smaller than the sensor frame, WRITE_DONE can come **before**
FRAME_DONE. The window's last row is written while the sensor is still
sending the rest of the frame. At full size this happens with the reset
window: row 480 of 1024.

For consecutive frames, write `GO|CONT`. Each frame sets WRITE_DONE. Write
0 to CONTROL to stop after the frame in progress. The frames that were
written can be counted from CURRENT_ADDRESS.

## Clocks and reset

`pixclk` clocks everything from the sensor pins to the FIFO write port. `clk`
(the Avalon clock) clocks the FIFO read port, the master and the slave.

* GO and `frame_done` cross between the domains as toggle pulses
  (`pulse_sync`, 2-3 destination clocks).
* CONT is synchronised inside `cmos_capture`.
* The window registers go to the pixel domain **without** synchronisers.
  Change them only while BUSY is 0.

`rst_n` is one asynchronous active-low reset for both domains. Release it
synchronously to each clock in the system. The line-buffer and FIFO RAMs are
not cleared by reset, and nothing reads them before they are written.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `image_capture_top`, `bayer2rgb` | `LINE_W` | 1280 | active pixels per sensor line = row-buffer tap distance |
| `line_buffer` | `WIDTH`, `TAP_DIST`, `NUM_TAPS` | 8, 1280, 2 | row-buffer configuration |
| `image_capture_top` | `FIFO_AW` | 8 | FIFO depth 2^8 pixels |
| `avalon_slave_regs` | `DEF_WIN_W`, `DEF_WIN_H` | 640, 480 | reset window (gives QVGA) |
| `cmos_capture` | `DATA_W` | 10 | sensor data width |

Row and column counters are 11 bits (up to 2047), and the frame length is
20 bits. After coarse synthesis the core has 461 flip-flop bits and two RAMs
(1280 x 16 line buffer, 256 x 24 FIFO). The 8 constant MSBs of `writedata`
and the constant `byteenable` show up as idle outputs. For comparison, the
reference implementation on a Cyclone II (EP2C35) used 693 logic elements and
370 registers.

## What is this design's own choice

The following follow the source design: the module partition, the pixel
validity rule, the frame-end event, the Bayer layout, the row-buffer
configuration, the YUV formulas with their x128 coefficients and clamping,
the single-write master with its count-plus-FIFO-empty done rule, the GO /
FRAME_DONE / WRITE_DONE / BUSY bits with the write-0-clears rule, and the
32-bit write address.

The following were chosen here:

* BUSY at bit 2;
* the register offsets;
* CONT, CURRENT_ADDRESS and the window registers;
* the window rounding to even;
* one output pixel per 2x2 quad, with the greens averaged;
* dropping the sensor's 2 LSBs;
* word packing `{0,Y,U,V}`;
* FIFO size and structure;
* the synchronisers;
* the single reset;
* coefficient rounding.

The reference implementation names its top level a burst write controller,
but describes its master as issuing basic single writes. This design issues
single writes.

## Testbenches

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.
`tb_img_ref_pkg` holds the reference models: a hashed sensor image, the
quad-to-RGB rule and the YUV formulas evaluated in plain integer arithmetic.
`mt9m011_model` generates the sensor timing: vertical blanking, P cycles
before the first and after the last line, Q cycles between lines.
`avalon_mem_model` stands in for the SDRAM controller, with random
`waitrequest`.

| testbench | what it shows |
|---|---|
| `tb_cmos_capture` | idle until GO; mid-frame GO waits for the next frame; raster order, data, x/y, 2-cycle latency; one `frame_done` per frame; CONT |
| `tb_line_buffer` | tap 0 / tap 1 at 1x / 2x distance, hold when disabled (distance 9) |
| `tb_bayer2rgb` | every quad of a window, full frame and odd-valued window, R/G/B, 2-cycle latency (16-pixel lines) |
| `tb_rgb2yuv` | corners and 500 random colours against the integer formulas and within 2 of the real-valued ones; clamp at 0; latency 2 |
| `tb_dc_fifo` | full after exactly 16 words, order, empty, random concurrent traffic (two unrelated clocks) |
| `tb_avalon_master_write` | addresses, data, one write per clock, waitrequest hold, `write_done` per frame and only with the FIFO empty, surplus words carried to the next frame, back-to-back frames, restart |
| `tb_avalon_slave_regs` | reset values, all registers, GO ignored while BUSY, sticky status and write-0 clear, BUSY in both modes |
| `tb_image_capture_top` | end to end at 32 x 20 pixels: windowed single frame with mid-frame GO, GO while busy, status clear, two consecutive full frames; every stored word checked; counts stalls, clamps and each mode |
| `tb_image_capture_full` | default parameters: a 1280 x 1024 sensor frame, reset window, all 76 800 QVGA words checked (runs in seconds) |

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/img_cap_pkg.sv tb/tb_img_ref_pkg.sv \
          tb/tb_image_capture_top.sv --top tb_image_capture_top
./obj_dir/Vtb_image_capture_top
```

## Known limits

* The window registers are not synchronised into the pixel domain. Do not
  change them during a capture.
* There is no overflow status. If the bus stalls long enough to fill the
  FIFO, pixels are lost, and only the simulation assertion reports it.
* Chroma has no +128 offset (see the colour conversion above).
* There is no interrupt, burst transfer or byte-packed pixel format.
