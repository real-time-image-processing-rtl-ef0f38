# Real-time image processing for a medical infrared camera

SystemVerilog model of the digital part of an uncooled infrared camera used for
medical thermography. The design follows an M.Sc. thesis, "Real Time Image
Processing for Medical Infrared Imaging". That thesis built the processing on an
FPGA and controlled it from a PC program over RS232.

The camera's detector gives a low-contrast 12-bit image. Its pixels also differ
in gain and offset. This design turns that raw stream into a display image:

1. **Non-uniformity correction (NUC).** Each pixel gets its own gain and offset
   (two-point correction, `Cp = Tp * Gp + Op`).
2. **5x5 filter.** The host can load any 5x5 kernel (impulse, Laplacian, LOG,
   Sobel, Prewitt, or a custom one).
3. **Histogram equalization.** The image is stretched from 12 to 8 bits. The
   mapping is rebuilt from every field's histogram.
4. **Symbology overlay.** A mouse cursor, drawn by an external microcontroller,
   is laid over the image.

Beside the video path, a serial link takes filter kernels, the mouse position
and temperature requests. The camera answers a request with the absolute
temperature of the pixel under the mouse.

## Top level: `ir_camera_top`

Video runs at one pixel per clock. A pixel is active when both blanking flags
of `sync_t` (`vblank`, `hblank`) are low. The display output follows the input
by **11 clocks**:

| Stage | Latency | Block |
|---|---|---|
| NUC | 2 | `nuc_correct` |
| Filter | 5 | `filter5x5` = `line_fifo_ctrl` (1) + `conv5x5` (4) |
| Equalization | 2 | `he_compress`, with `histogram_stats`, `he_coef_finder` and `he_gain_finder` |
| Overlay | 2 | `symbology_ctrl` |

The filter output is clipped to 0..4095 before the equalizer.

Ports:

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, active-low asynchronous reset |
| `in_pix[15:0]`, `in_sync` | in | detector pixel and its blanking flags |
| `out_pix[7:0]`, `out_sync` | out | display pixel and its blanking flags |
| `rxd`, `txd` | in/out | RS232, 8N1 |
| `cal_we`, `cal_addr`, `cal_gain[15:0]`, `cal_offset[15:0]` | in | load one pixel's NUC gain and offset |
| `pic_addr`, `pic_data[1:0]`, `pic_wr` | in | microcontroller writes to the symbology RAM |
| `mouse_x`, `mouse_y`, `mouse_upd` | out | mouse position from the host, for the microcontroller |
| `ready` | out | all memories initialised after reset |

Parameters and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `H_ACTIVE` | 320 | columns; the thesis's line counter goes up to 320 |
| `V_ACTIVE` | 240 | rows; assumed |
| `PIX_W` | 16 | pixel word |
| `LINE_DEPTH` | 512 | words per line memory |
| `HE_LEVELS` | 4096 | histogram bins (12 bits) |
| `BAUD_DIV` | 127 | 115200 baud at an assumed 14.7456 MHz clock |

### Timing requirements

- After reset, `ready` rises once every memory is initialised, about
  `H_ACTIVE*V_ACTIVE` clocks. The NUC memory is filled with unity gain, the
  symbology RAM with transparent codes, and the histogram RAM is cleared. The
  filter starts with the impulse kernel, so the image passes unfiltered.
- Vertical blanking must last at least about `HE_LEVELS + 60` clocks
  (about 4,160 at the defaults). The equalizer scans every histogram bin
  between fields.
- Lines may be at most `LINE_DEPTH` pixels long, and every line of a field must
  have the same length.

## The shared coefficient RAM

The filter and the equalizer share one 1024 x 18 dual-port RAM, as in the
thesis:

- **Words 0..24:** the filter kernel, row-major. Row 1 is the oldest line and
  column 1 the oldest pixel.
- **Words 32..1023:** the equalization table, one word per gray level. The
  table starts at the lowest level of the previous field. Levels below it give
  0, and levels more than 992 above it give 255. The thesis says a scene
  occupies 400 to 500 levels, so that fits.

Port A is read in two ways:

- The compression block reads it for every active pixel.
- The convolution block copies the kernel (26 clocks) once vertical blanking
  reaches the filter output. This is after the field's last table read, and an
  assertion checks that the two readers never overlap.

Port B is written by the coefficient finder while it rebuilds the table.
Otherwise it is written by the serial controller, which waits while the table
is rebuilt or the kernel is copied. A kernel received over RS232 takes effect
at the next vertical blanking after the write.

## Filter coefficients

Each coefficient is 18-bit sign-magnitude: bit 17 is the sign, bits 16:13 the
integer part and bits 12:0 the fraction, so 1.0 = `0x02000`.

- The exact sum (42 bits, 13 fraction bits) is rounded down to an integer and
  clipped to 0..65535. Negative responses, for example from edge operators,
  therefore show as 0.
- The window for an output uses the five lines above the current one. At the
  start of a line, the window still holds the last pixels of the previous
  line. Image borders get no special treatment, and the thesis does not
  specify any.

The convolution reproduces the thesis's worked example (Table 3-7): the
outputs 14522, 14484, 14605 and 14343, with the first result on the 8th clock
edge.

## Histogram equalization

For field *f* the statistics block counts every level. It also tracks the
lowest level, how many pixels sit on it (`n_low`) and the total `N`. In the
next vertical blanking:

```
gain   = ceil(255 * 2^16 / (N - n_low))          (0 if the field is flat)
map(v) = min(255, ((cdf(v) - n_low) * gain) >> 16)
```

`cdf(v)` is the number of pixels at or below `v`. The lowest level maps to 0
and the highest to 255. Crowded ranges of levels get more output levels. Field
*f + 1* is displayed with this table.

## NUC calibration

`cal_gain` is unsigned with 14 fraction bits (1.0 = 16384). `cal_offset` is a
signed number in pixel units. The result is `round(p*gain/2^14) + offset`,
clipped to 16 bits. The thesis computes the gains and offsets offline from
two uniform black-body scenes, so the design only provides the port to load
them (`cal_addr` = row * H_ACTIVE + column).

## Serial protocol

The link runs at 115200 baud, 8 data bits, no parity, 1 stop bit. A frame is:

```
0xAA, command, parameters..., checksum
```

The checksum is the 8-bit sum of the command and parameter bytes. The thesis
gives the frame layout; the byte values below are this design's own.

| Command | Parameters | Reply |
|---|---|---|
| `0x01` SET_FILTER | 75 bytes: 25 coefficients, 3 bytes each, MSB first, row-major | `AA 06 01 07` once all 25 words are in the RAM |
| `0x02` MOUSE_POS | x (2 bytes), y (2 bytes), MSB first | `AA 06 02 08`, and `mouse_upd` pulses |
| `0x03` MEASURE | none | `AA 83 Thi Tlo ck`, where T is kelvin x 16 |
| bad checksum or unknown command | | `AA 15 cmd (0x15+cmd)` |

## Temperature measurement

`temp_measure` counts columns and rows of the corrected video. On a MEASURE
command it takes the pixel at the mouse position in the next field; that level
is W''. `temp_convert` then inverts the calibration law
`W'' = A3 * T^4 + B3` by bisection, one result bit per clock (14 clocks). The
constants are `A3 = 2.70293408e-7` and `B3 = -308`. They come from the thesis's
black-body points W''(19 °C) = 1657 and W''(50 °C) = 2634, which read back as
292.0 K and 323.0 K.

## Symbology

The microcontroller is too slow to follow the video. It only sets `pic_addr`
and `pic_data` (one 2-bit code per display pixel) and pulses `pic_wr`. The
block synchronises the strobe and makes the RAM write cycle. Codes:

- 1 draws white (255);
- 2 draws black (0);
- 0 and 3 are transparent.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_dpram` | both ports against a model, read-before-write |
| `tb_nuc_correct` | random gains and offsets, rounding, clipping, 2-clock latency, reset fill |
| `tb_histogram_stats` | bins, lowest level and total, clearing on scan, bypass for repeated levels |
| `tb_he_gain_finder` | gain against the formula, including D = 0; done after 27 clocks |
| `tb_he_coef_finder` | table contents against the formula on random histograms |
| `tb_he_compress` | window limits and table lookup, 2-clock latency |
| `tb_line_fifo_ctrl` | five line taps against a model |
| `tb_conv5x5` | impulse, the thesis's Table 3-7 example with edge timing, random kernels |
| `tb_filter5x5` | random images and kernels end to end, kernel reload per field |
| `tb_uart` | loop-back, 10-bit frame length, framing error, glitch rejection |
| `tb_comm_controller` | impulse at reset, SET_FILTER, NAK cases, MOUSE_POS, MEASURE, waiting for the RAM grant |
| `tb_temp_measure` | capture position and value, valid/ack handshake |
| `tb_temp_convert` | bisection against a model, the two calibration points, 14-clock latency |
| `tb_symbology_ctrl` | slow strobe writes, white/black/transparent overlay, latency |
| `tb_ir_camera_top` | whole camera on a 16 x 12 picture |
| `tb_ir_camera_top_full` | the same test on the top at its default 320 x 240 size |

The two top-level tests share `tb_ir_camera_top_body.svh`. They run the whole
camera through one sequence:

1. Load a random calibration and draw an icon.
2. Send commands over the serial line: a kernel whose last byte arrives in
   active video, a bad checksum, an unknown command, a kernel whose last byte
   arrives in vertical blanking (so the write must wait for the equalizer),
   mouse moves, and two temperature readings.
3. Compare every display pixel against a reference model of NUC, filter,
   clipping, equalization and overlay, and check the 11-clock latency.

Each mechanism is counted, and one that never happens is a failure. The
counted mechanisms are: RAM wait, ACK, NAK, kernel change, table rebuild,
temperature reply, mouse update, white and black overlay, clipping at 0 and at
4095, levels above the table window, table-mapped levels and calibrated pixels.
The full-size run compares about 540,000 pixels in a few seconds.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ir_pkg.sv tb/tb_ir_camera_top.sv --top-module tb_ir_camera_top
./obj_dir/Vtb_ir_camera_top
```

## Not implemented

- **Detector, front-end electronics and ADC.** These are analog or bought-in
  parts. The top takes the digitised stream instead.
- **The microcontroller that draws the cursor.** Its firmware is not given. Its
  bus is brought out as ports.
- **Calibration capture hardware.** The thesis names it only as a goal; gains
  and offsets are computed off-line. The load port is provided.
- **Video encoder or monitor output.** The top delivers 8-bit pixels with
  blanking flags.
- **Storing 1000 images in 10 s for dynamic area telethermography.** This would
  need about 154 MB of frame storage, which is outside this design.

## Choices this design makes where the thesis is silent

- The frame height (240), the clock (14.7456 MHz) and the serial byte codes.
- The NUC number formats and the reset fill.
- The equalization formula's fixed-point details, its 992-level window, and
  saturating levels outside the window.
- The overlay codes.
- Rounding down and clipping of the filter output.
- Reloading the kernel only when blanking reaches the filter output.
- The temperature output unit (1/16 K).
- The sign of the offset B3. The thesis prints B3 = 308, but only -308
  reproduces its two calibration points.

## Known differences from the thesis

- **Filter alignment.** The thesis's filter holds back the blanking signals by
  five lines, so its filtered field is framed by its own blanking. Here the
  blanking flags are only delayed with the pipeline (5 clocks). Each output
  pixel is the window over the five previous lines. The filtered image
  therefore sits three lines and two columns away from the raw image's
  position: the first lines of a field use lines of the previous field, and
  the first four columns of a line use the end of the previous line.
- **Temperature input.** The temperature is taken from the corrected
  (non-uniformity corrected) level, before filtering and equalization. The
  thesis's text says only that the measuring block counts over the incoming
  video.
