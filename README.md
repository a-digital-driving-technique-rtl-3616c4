# Delta-sigma digital driver for a QVGA AMOLED panel

An AMOLED pixel made of two thin-film transistors and a capacitor (2T1C) is
hard to drive with analog gray levels: the drive transistor's threshold
drifts, and the OLED current drifts with it. If the drive transistor is used
only as a switch, fully on or fully off, the OLED current is set by the
supply voltage and hardly depends on the transistor. Gray levels then have
to come from time: how often a pixel is on.

Pulse-width modulation (PWM) does this with bit planes of different lengths
inside each video frame. That creates false contours in moving images,
because the eye integrates across frame boundaries at the wrong places.
This design uses pulse-density modulation (PDM) instead. A first-order
delta-sigma modulator per pixel and colour decides, every sub-field, whether
the pixel is on. Its error carries over from one sub-field to the next, so
the on-pulses have no frame boundary. The eye acts as a low-pass filter and
sees the average.

The RTL covers the digital part of the system:

- the FPGA driver: TMDS (DVI) video input, gamma tables, frame buffers, the
  three modulators and the panel timing;
- the panel's four source drivers (64-stage shift registers);
- a behavioural model of the panel's integrated 4-phase scan driver.

The panel is 240 columns x 3 colours (720 data lines) by 320 scan lines, with
8-bit gray levels per colour.

## The modulator: one adder per colour

Each colour of each pixel has two 8-bit numbers in the frame buffer: its
gray level `x` and its error `e`. Each time the pixel comes up:

```
{y, e_new} = x + e          // 9-bit sum of two 8-bit numbers
```

The carry `y` is the pixel's 1-bit output for this sub-field. The low 8 bits
are the new error, which is written back. That is the whole modulator
(`dsm_modulator`). Its quantiser is the carry, and its feedback is the
stored error.

Starting from `e = 0`, after `n` sub-fields at a constant level `x`, the sum
is `n*x`, and the pixel has been on `floor(n*x/256)` times. The average
light output is therefore `x/256` of full scale. The rounding error is
always less than one sub-field, whatever `n` is. This exact count is what
the testbenches check. After a reset of the panel side, the first sub-field
ignores the stored error (`first`), so every pixel starts from zero.

With a constant input, a delta-sigma modulator repeats a periodic pattern
(an idle tone). At low oversampling ratios that pattern can show as flicker
for some gray levels. More sub-fields per video frame push it down.

## Sub-field timing

There are no frames on the panel side. The driver walks over the panel in
raster order, one pixel (three colours) per clock, with no blanking:

- a line takes `COLS` = 240 clocks;
- a sub-field takes `ROWS*COLS` = 76 800 clocks;
- sub-fields follow each other without a gap.

The oversampling ratio is the number of sub-fields per video frame:

```
OSR = f_clk / (ROWS * COLS * frame_rate)
```

At 60 Hz this is 6.9 at 32 MHz and 17.4 at 80 MHz. `amoled_pkg::osr()`
computes it, rounded to the nearest integer: 7 and 17.

`drive_controller` runs a three-stage pipeline:

| stage | what happens |
|-------|--------------|
| 0 | read gray level and error of pixel `p` from the three frame buffers (`rd_en`, `rd_addr`) |
| 1 | the three adders form `y` and the new errors; the errors are written back to `p` (`wb_en`, `wb_addr`) |
| 2 | the three bits of `y` enter the source driver that owns the pixel's column (`sd_shift[k]`) |

A read and a write-back in the same clock always hit different addresses,
because consecutive pixels differ. So the frame buffer needs no bypass,
provided the panel has at least two pixels.

**Line hand-over.** At stage 2, on the first pixel of every line except the
very first, `sd_load` copies every source driver's shift register into its
output latch. A load in the same clock as a shift latches the register as it
was before the shift. So the last line is latched while the first pixel of
the next line enters, and there is no gap between lines. On the same clock
edge as the latch, the scan driver's phase clocks move on, so the row just
latched is selected. A row is shifted in during one line time and shown
during the next.

**Scan driver clocks.** The integrated scan driver is a chain of 320 stages.
Stage `i` is clocked by phase `i mod 4`. While row `r` is selected, phase
`r mod 4` is high and the other three are low. The start pulse `scan_stv` is
high while row 319 and row 0 are selected. It is therefore stable at the
rising edge of phase 0 that starts row 0, and low at the next one (row 4).
After a reset, no phase is high and `scan_stv` is already high. The first
load then selects row 0. `ROWS` must be a multiple of 4.

**Gate scan time.** Every scan line is selected for exactly one line time,
`COLS` clocks. That is 7.5 us at 32 MHz and 3 us at 80 MHz. Every sub-field
has the same length, so this is also the time for the shortest sub-field,
which is what limits the panel. PWM has to scan its shortest bit plane much
faster.

## Source drivers and data lines

There are four `source_driver`s, one per 60 columns. Each has 64 stages, and
each stage holds the three colour bits of one column. The last four stages
are unused at 240 columns. All four drivers share the serial input
`sd_din`. The controller enables one of them at a time, `sd_shift[k]` for
columns `60k .. 60k+59`.

Data enters at stage 0 and moves up, so after a line is shifted in, column
`60k + j` sits at stage `59 - j`. `amoled_system` undoes this reversal when
it wires the outputs to `data_line[col]`. `data_line[col]` is an `rgb1_t`
with fields `r`, `g`, `b`.

Each 2T1C pixel stores the level on its data line while its scan line is
selected. It keeps the OLED on or off until its row comes up again, one
sub-field later.

## Video input

The video source sends 24-bit RGB over a DVI link as three TMDS channels.
This RTL starts after the receiver front end, which deserialises each
channel, recovers the pixel clock and aligns the words. That front end is
specific to the FPGA and is not included.

- `tmds_decoder` (one per channel) decodes each 10-bit word by the DVI 1.0
  rules: bit 9 means the low byte was inverted, and bit 8 chooses XOR or
  XNOR coding. The four control tokens give data enable low and two control
  bits. The blue channel's control bits are hsync (C0) and vsync (C1).
- `gamma_lut` (one per colour) is a 256-entry table that maps each gray
  level before it is stored. It resets to the identity mapping. Entries are
  written through `gamma_we`/`gamma_sel`/`gamma_addr`/`gamma_data`, and
  `gamma_en = 0` bypasses the tables.
- `video_capture` counts pixels while data enable is high, and lines on its
  falling edge. vsync returns it to the top-left pixel. It writes pixel
  `(row, col)` to address `row*240 + col`, drops anything outside 320 x 240,
  and pulses `frame_done` with the last pixel.
- `frame_buffer` (one per colour) holds 76 800 words, each an 8-bit gray
  level and an 8-bit error. Port A (video clock) writes levels. Port B
  (panel clock) reads a level and an error, then writes back the error one
  clock later. Read data is valid one clock after `re_b`.

The video clock and the panel clock are unrelated. The frame buffers are the
only place where the two domains meet. There is no double buffering: a new
frame replaces gray levels pixel by pixel while the panel keeps running.
For one sub-field this can show part of the old frame and part of the new.
The modulator errors are never reset by new video, which is how the driver
avoids frame refreshes.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `ROWS` | 320 | scan lines (`amoled_pkg::PANEL_ROWS`) |
| `COLS` | 240 | pixel columns, x3 data lines (`PANEL_COLS`) |
| `NUM_SD` | 4 | source drivers (`SD_COUNT`) |
| `SD_STAGES` / `STAGES` | 64 | stages per source driver (`SD_DEPTH`) |
| `W` | 8 | gray-level width of the modulator, table and frame buffer |
| `VIDEO_FPS` | 60 | frame rate used for the OSR arithmetic |

`COLS` must be a multiple of `NUM_SD`, and `COLS/NUM_SD` must not exceed
the stage count. Elaboration-time assertions check both.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/amoled_pkg.sv` | package | sizes, `rgb1_t`/`rgb8_t`, TMDS tokens, `osr()` |
| `rtl/amoled_system.sv` | `amoled_system` | top: FPGA driver + 4 source drivers + scan driver |
| `rtl/amoled_driver_fpga.sv` | `amoled_driver_fpga` | the FPGA design |
| `rtl/tmds_decoder.sv` | `tmds_decoder` | 10b to 8b TMDS decoding |
| `rtl/gamma_lut.sv` | `gamma_lut` | programmable gray-level table |
| `rtl/video_capture.sv` | `video_capture` | raster write addresses |
| `rtl/frame_buffer.sv` | `frame_buffer` | gray level + error memory, two clocks |
| `rtl/dsm_modulator.sv` | `dsm_modulator` | one-adder first-order delta-sigma |
| `rtl/drive_controller.sv` | `drive_controller` | sub-field timing, source and scan driver control |
| `rtl/source_driver.sv` | `source_driver` | shift register + line latch |
| `rtl/scan_driver.sv` | `scan_driver` | behavioural model of the on-glass 4-phase scan driver |

Everything except `scan_driver` is synthesizable. The frame buffers are
plain arrays with one synchronous read port, which FPGA tools map to block
RAM: 3 x 76 800 x 16 bits, 3.7 Mbit in all. The gamma tables are registers,
so that they can reset to the identity.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog ends it with a failure if it hangs. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/amoled_pkg.sv tb/tmds_tb_pkg.sv tb/tb_amoled_system.sv --top-module tb_amoled_system
./obj_dir/Vtb_amoled_system
```

| testbench | what it checks |
|-----------|----------------|
| `tb_amoled_system` | Full size, default parameters. Two TMDS frames (gamma bypassed, then three programmed tables), 6 sub-fields each, through a model of the pixel array. Checks the exact on-count of all 230 400 pixel-colours, one scan line at a time, 240 clocks per selection, 76 800 clocks per sub-field, and OSR 7 / 17. Counts every mechanism (TMDS word kinds, sync tokens, gamma on/off, start pulse, all phases and drivers, zero start state). Runs in a few seconds. |
| `tb_still_image` | A live 60 Hz stream of a still image (all gray levels) at 32 MHz and at 80 MHz panel clock. Measures sub-fields per video frame (7; 17 or 18) and checks each pixel's on-count over OSR sub-fields. |
| `tb_gray_ramp` | 4x8 panel, 258 frames of a gray ramp (rising, falling, offset), one video frame = OSR sub-fields, OSR 7 and 17. Every window of OSR and 3*OSR consecutive samples, at every offset, must hold the window's summed levels / 256 on-samples to within one: the integration window needs no alignment with frames. |
| `tb_amoled_driver_fpga` | 4x8 panel. Every shifted-out bit against a reference modulator per pixel, driver selection, one sample per clock, one load per line, gamma mapping. |
| `tb_drive_controller` | 8x8 panel. Every output, cycle by cycle, against a closed-form reference. |
| `tb_dsm_modulator` | Adder arithmetic for random operands, and `floor(n*x/256)` pulse density. |
| `tb_tmds_decoder` | Decoding of an encoder with running disparity (`tb/tmds_tb_pkg.sv`), and all tokens. |
| `tb_gamma_lut`, `tb_video_capture`, `tb_frame_buffer`, `tb_source_driver`, `tb_scan_driver` | The block's contract, against reference models. |

The pixel-array model in the system testbenches integrates on-counts. It
does not model the eye's low-pass filter or idle tones.

## Design choices and limits

Taken from the published system:

- 8-bit gray levels, and a first-order modulator built from one 8-bit adder
  and one frame buffer per colour;
- TMDS video input;
- four source drivers of 64 stages;
- a 4-phase integrated scan driver;
- a 2.2-inch 320 x 240 x RGB panel;
- 32-80 MHz panel clocks for OSR 7-17.

Choices of this design, where the source leaves the details open:

- One pixel per clock with no blanking. This reproduces the stated
  clock-to-OSR relation at 60 Hz video.
- Each frame buffer word holds both the gray level and the error.
- The three-stage pipeline, the source-driver output latch, and the
  shift/load protocol.
- The phase and start-pulse waveforms of the scan driver.
- The start of the panel side: the error is taken as zero in the first
  sub-field after reset.
- The DVI decoding rules and hsync/vsync placement, which come from the DVI
  standard.
- Where the gamma table sits, its reset contents and its write port.
- Asynchronous active-low resets, one per clock domain.

Not included:

- The TMDS receiver front end (deserialisers, clock recovery, word
  alignment).
- The 2T1C pixel array and the OLEDs.
- DC-offset cancellation. At some OSRs the idle tones leave a small DC
  offset that such a stage would remove, but its method is not defined.
- The PWM driving that the design is compared against.

Known behaviour to be aware of:

- **Reset of the panel side in the middle of a sub-field.** The glass scan
  driver cannot be reset. Tokens left in its chain move on when the phases
  restart, and select a second scan line until they leave the last stage:
  at most one sub-field. The testbenches stop the panel while row 0 is
  selected, which leaves no stale token.
- **Two clock domains with no synchroniser.** Gray levels are crossed as
  memory contents, so a level may be read while it is being written. For
  one sub-field a pixel may show the old or the new level. No control
  signal crosses the domains.
- **`amoled_driver_fpga` leaves some decoder outputs unconnected.** The red
  and green data-enable and control outputs, and blue C0 (hsync), are not
  needed for the panel, because addressing uses data enable and vsync only.
  The lint warnings for them are expected.
- **No timing closure.** Meeting 80 MHz on a particular FPGA has not been
  checked. The critical path is an 8-bit addition between a block-RAM read
  and a block-RAM write.
