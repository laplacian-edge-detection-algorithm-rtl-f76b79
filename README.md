# Laplacian edge detection of road images on a VGA display

This design finds the edges in a grey-level road image (lane markings, the outline of a
traffic sign) and shows the result live on a VGA monitor. It convolves the image with a
3x3 Laplacian mask, a discrete second derivative that responds where the intensity
changes abruptly, and then keeps only the strong responses with a threshold S. The result
is a black-and-white picture: white where there is an edge, black elsewhere.

The image, 200 x 200 pixels of 8 bits, sits in on-chip memory. No result frame is ever
stored. The filter works on the fly, at the speed of the display: the image is read just
ahead of the monitor's beam, filtered, thresholded and shown in the same pass. Every stage
takes one pixel per clock.

## The processing chain

```
 clk_in (100 MHz) ──► horloge_25mhz ──► pix_clk (25 MHz) for every block below

 synchro ──hcount,vcount──► read_mem ──raddr──► memoire ──rdata──┐
    │                          └────── tag (x, y, valid, pad) ────┤
    │                                                             ▼
    │                                                     laplacian_filter
    │                                                             │ px_t (x, y, pixel, I_M)
    │                                                             ▼
    │                                     threshold S ──►   binarize
    │                                                             │ px_t (+ I_B)
    │                                                             ▼
    │                                          show ────►   pixel_mux
    │                                                             │ grey, valid
    └── active, hsync_n, vsync_n ─────────────────────────► ecran_vga ──► R3 G3 B2, HS, VS
```

| module | role |
|---|---|
| `horloge_25mhz` | divides the 100 MHz board clock by 4 to get the 25 MHz pixel clock |
| `synchro` | beam position counters and sync pulses for 640x480 at 60 Hz |
| `read_mem` | turns the beam position into image addresses, one line and one pixel ahead |
| `memoire` | the 40,000 x 8-bit image memory, with a load port and a read port |
| `laplacian_filter` | two line buffers, a 3x3 window and the mask sum, clipped to 0..255 (I_M) |
| `binarize` | I_B = 1 where I_M >= S |
| `pixel_mux` | chooses what the screen shows: original, edges, Laplacian, or blank |
| `ecran_vga` | grey to 3-3-2 bit RGB, black outside the image, registered pins |
| `montage` | the top: wires the chain together and synchronises the reset |
| `lap_pkg` | shared sizes, VGA timing, the masks, the `px_t` stream record, stage latencies |

## The filter and the threshold

The four-neighbour Laplacian of the image f is

    I(x,y) = f(x+1,y) + f(x-1,y) + f(x,y+1) + f(x,y-1) - 4 f(x,y)

This is the mask

     0  1  0
     1 -4  1
     0  1  0

The sum is zero over a flat area and over a linear ramp. It is large next to an
abrupt step. Three other masks can be chosen with the `MASK` parameter of
`laplacian_filter` or `montage`: the negated mask (`LAP4_NEG`), an all-neighbour mask
(`LAP8_NEG`: -1 around a centre of -8) and a diagonal variant (`LAP_DIAG`: 1 -2 1 / -2 4 -2 /
1 -2 1). `LAP4` is the default, and the tests are written for it.

The signed sum (14 bits) becomes a grey image I_M. Negative values become 0 and values
above 255 become 255. So with `LAP4` the bright response falls on the darker side of
each step. The binary image is then

    I_B = 1  if I_M >= S,   else 0

S comes in on the `threshold` input. Pick it from the image's cumulative histogram:
with S just above the level of the texture and noise, only the marked edges remain.
Nothing in the design computes S.

Pixels on the image border have no full 3x3 neighbourhood. Their I_M is 0, so they
are never edges unless S = 0.

## Filtering in step with the beam

This is the least obvious part of the design. To show the result for pixel (x, y), the
filter must already have pixel (x+1, y+1), the bottom-right corner of the 3x3 window.
The pipeline between the memory address and the VGA pins is also `LEAD` = 6 cycles deep:

| stage | cycles (`lap_pkg`) |
|---|---|
| `read_mem` address register + `memoire` synchronous read | `RD_LAT` = 2 |
| `laplacian_filter` window update, then sum and clip | `FILT_LAT` = 2 |
| `binarize` | `BIN_LAT` = 1 |
| `pixel_mux` | `MUX_LAT` = 1 |

So while the beam is at screen position (h, v), `read_mem` requests image pixel

    xi = h + LEAD + 1 - X0,     yi = v + 1 - Y0

The image starts at `X0` = 220, `Y0` = 140, which centres it on the 640x480 screen.
Each screen line reads one image line. Line yi is read during screen line Y0 + yi - 1,
while line yi - 1 is on the screen. The two line buffers hold image lines yi-1 and yi-2,
indexed by x. When pixel (x, y) arrives, it completes one column of the window, and the
window is centred on (x-1, y-1). After the remaining 4 cycles, that centre pixel
reaches `ecran_vga` just as the beam reaches (X0 + x - 1, Y0 + y - 1).

`read_mem` sweeps xi over 0..W and yi over 0..H, one step beyond the image in each
direction. The extra column and the extra line are marked `pad`. They read nothing, and
the filter takes them as 0. These steps carry the window across the last column and
the last line. Each frame therefore streams (W+1)(H+1) = 40,401 pixels into the filter,
and W x H = 40,000 results come out. An assertion in `montage` checks that the pixel
leaving the threshold stage is always the one the beam is about to show.

`laplacian_filter` does not depend on the VGA timing. It takes any raster-ordered
stream with coordinates, in gaps or back to back, and produces one result per input
pixel, 2 cycles later.

## Using the top module `montage`

| port | dir | width | |
|---|---|---|---|
| `clk_in` | in | 1 | 100 MHz board clock |
| `rst` | in | 1 | active high; hold it for at least 8 `clk_in` cycles |
| `pix_clk` | out | 1 | 25 MHz; every port below is synchronous to it |
| `load_we`, `load_addr`, `load_data` | in | 1, 16, 8 | writes grey pixel (x, y) at address y*200 + x |
| `show` | in | 2 | 0 original, 1 edge image, 2 Laplacian grey image, 3 image area black |
| `threshold` | in | 8 | S |
| `vga_red`, `vga_green`, `vga_blue` | out | 3, 3, 2 | colour bits to the resistor DAC |
| `vga_hsync_n`, `vga_vsync_n` | out | 1, 1 | sync, active low |

The memory has no reset, and the image can be loaded at any time. Pixels written
during a frame appear on the screen as the beam passes them. A grey value g is shown
as red = g[7:5], green = g[7:5], blue = g[7:6]. Edge pixels are white (255), and all
other pixels are black. Outside the 200x200 window, and during blanking, the colour
bits are 0. The colour at the pins belongs to the screen pixel that `synchro`'s
counters showed one `pix_clk` cycle earlier. The sync levels at the pins belong to
that same pixel.

Timing (`synchro`): 800 clocks per line (640 visible, front porch 16, sync 96, back
porch 48) and 525 lines per frame (480, 10, 2, 33).

## Sizes and rates

* Image: 200 x 200 x 8 bits = 320,000 bits of memory. The line buffers add 2 x 201 x 8
  bits.
* Filter throughput: one pixel per clock. A 200x200 frame with its padding takes 40,401
  cycles, so a continuous stream at 25 MHz would give 618 frames/s, well above the
  400 frames/s aimed for at this image size. Inside `montage` the VGA scan sets the
  pace, so the result is shown at 60 frames/s.
* The image size (`IMG_W`, `IMG_H` in `lap_pkg`) and the screen timing (`synchro`'s
  parameters) can be changed. `read_mem` asserts that the image window leaves room for
  the read-ahead: X0 >= LEAD + 1 and Y0 >= 1.

## Choices made in this design

The algorithm, the 200x200 8-bit image, the 25 MHz pixel clock, the 3/3/2-bit colour
outputs and the set of blocks follow the design this RTL implements. The following
were chosen here:

* The 100 MHz board clock. The divider is a plain counter with no reset, where an FPGA
  build would normally use a clock manager.
* The 640x480 at 60 Hz VGA mode and its porch and sync numbers.
* The stored pixel is a grey level, used directly by the filter and by the display.
* The image is loaded through a write port. It is not built into the memory's
  initial contents.
* The signed Laplacian is clipped to 0..255 to form I_M. Border pixels are 0.
* The read-ahead scheme with padding, and the centred image position.
* The mux settings (original, edges, Laplacian, blank) and their encoding. White edges
  on black.
* Reset: synchronous, active high, synchronised into the pixel clock domain with two
  flip-flops.
* All stage latencies.

There is no zero-crossing detector. Edges are taken directly as I_M >= S. The
threshold S is an input, and no histogram is computed in hardware.

## Not included

* The board's external memories (cellular RAM, parallel and serial PCM) and a controller
  for them. The image fits in on-chip memory, so the chain does not need them.
* The analog side of the VGA output, the resistor network that turns the colour bits
  into 0.7 V video levels.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends any run that hangs.

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lap_pkg.sv tb/tb_montage.sv --top-module tb_montage -o sim
./obj_dir/sim
```

The same command runs any other testbench: replace `tb_montage` with its name.

| testbench | what it checks |
|---|---|
| `tb_montage` | the whole design at its default sizes. It draws a synthetic road scene (sky gradient, noisy asphalt, a slanted lane line, a square sign) and loads it. It then checks every pin sample of five frames (original, edges at S = 40, Laplacian, blank, edges at S = 0) against a reference computed from the image. It also counts edges, suppressed noise, negative and saturated Laplacian values, border pixels, surround, blanking and sync pulses. Runs in about 5 s. |
| `tb_laplacian_filter` | all four masks against explicit neighbour formulas, on a 200x200 image, once as a continuous stream and once with random gaps. Checks the 2-cycle latency and one result per cycle. |
| `tb_read_mem` | request order, padding flags, addresses, and timing relative to the beam over two frames |
| `tb_synchro` | counters, active area and sync pulses, every cycle for two frames |
| `tb_memoire` | random writes and reads against a reference array, including reads of the address being written |
| `tb_binarize`, `tb_pixel_mux`, `tb_ecran_vga`, `tb_horloge_25mhz` | each block's rule, on random inputs and corner cases |
