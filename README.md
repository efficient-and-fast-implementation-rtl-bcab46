# Time-of-flight depth camera datapath

A continuous-wave time-of-flight (ToF) camera lights the scene with near-infrared
light, amplitude-modulated at some tens of MHz. It measures how far the returning
modulation has shifted in phase. For every pixel the sensor integrates the received
light four times, with its demodulation shifted by 0, 90, 180 and 270 degrees. That
gives four "differential correction samples" DCS0..DCS3. From them:

    Im = DCS2 - DCS0          Re = DCS3 - DCS1
    phase     = atan2(Im, Re), moved into [0, 2*pi)
    distance  = phase / (2*pi) * du,   du = c / (2 * f_mod)   (6.25 m at 24 MHz)
    amplitude = sqrt(Re^2 + Im^2) / 2  (signal quality)

This RTL does that for every pixel of a 320x240 sensor at full frame rate, in an FPGA
between a ToF sensor with a 12-bit parallel pixel bus and a USB 3.0 controller. It
also buffers frames in external SDRAM, corrects the distance for calibration offset
and temperature, and can extend the range with a second modulation frequency. It
cleans the image with 3x3 filters and picks the next integration time from the
measured amplitude.

## Data flow

```
 sensor TCMI bus (DCLK, HSYNC, VSYNC, DATA[11:0])
   |
 tcmi_rx ........ samples the bus, dual-clock FIFO into the system clock
   |
 vdma  <======>  SDRAM (128-bit words): set 0 "A" = DCS0..3, set 1 "B" = DCS0..3
   |              write 4 frames of a set, then read them back word-interleaved
 BRAM1 (sync_fifo, pixel tuples: 4 DCS of A, 4 DCS of B)
   |
 Re/Im --> cordic_atan2 (A) --> phase_a, amplitude ---> auto_integration --> t_int
       \-> cordic_atan2 (B) --> phase_b
   |
 tof_distance (phase + offset + temperature term, wrap)  |  phase_unwrap (A, B)
   |                               temp_comp --^
   +--> roi_stats (mean, variance over the centre ROI) --> roi_* ports
   +--> dist_mm --> point_cloud (x, y, z per pixel) --> pc_* ports
   +--> amplitude --> gray_* ports (gray-scale image)
   |
 window3x3 (depth)  + median3x3   \
 window3x3 (valid) + morph3x3     -> depth or 0
   |
 BRAM2 (sync_fifo) --> fx3_slave_fifo --> USB 3.0 controller, 32-bit bus
 i2c_master --> sensor configuration (SCL, SDA)
```

`tof_top` wires all of this together. The external parts stay outside as ports: the
SDRAM and its controller, the USB controller, the sensor and the configuration
processor.

## Number formats

* Sensor pixel: 12-bit unsigned. Re and Im are 13-bit signed.
* Phase and distance: a 24-bit unsigned fraction of one turn. A distance of `d`
  is sent as `d/du * 2^24`. Because one turn is exactly `du`, the step "subtract
  whole multiples of du" is just the overflow of a 24-bit add. Offset and
  temperature corrections are signed numbers in the same units.
* Millimetres: `dist_mm = pixel * du_mm >> 24`. `du_mm` is a run-time input, 6250
  for 24 MHz. This value feeds the point cloud; the USB stream carries the 24-bit
  fraction.
* Amplitude: 12-bit, in sensor LSB.

## The CORDIC (`cordic_atan2`)

atan2 and the square root come from a vectoring CORDIC that uses only shifts and adds:

1. **Fold.** If Re < 0, the vector is negated (rotated by pi) and half a turn is
   preloaded into the angle. The rest then only has to cover -90..+90 degrees.
2. **Micro-rotations.** There are `ITER` = 24 of them. Stage k rotates the vector by
   ±atan(2^-k), toward the x axis, and adds or subtracts that angle. The angle table
   is computed at elaboration with `$atan`. Angles are accumulated with two guard
   bits (26 bits) and rounded to 24 bits at the end.
3. **Gain.** The x that remains is `K * sqrt(Re^2+Im^2)`, where K ≈ 1.6468. One
   constant multiply by 1/(2K) gives the amplitude.

The inputs are scaled up by `FRAC` = 10 bits so that the shifted terms keep their
precision. The CORDIC is fully pipelined: one pixel per clock, with the result 26
cycles (`ITER+2`) after the input. Against floating-point atan2, the phase error
stays within a few hundred LSB of 2^-24 turn, about 0.1 mm at du = 6.25 m. The
amplitude error is within 1.5 LSB.

## Frame buffer and stream control (`vdma`)

This is the part that needs the most care.

**Why SDRAM.** The four DCS of a pixel arrive a whole frame apart: DCS0 of every
pixel comes first, then all of DCS1, and so on. A depth value needs all four, so
three full frames must be held somewhere. The VDMA writes them to external SDRAM.
Pixels are packed eight to a 128-bit word, one 16-bit lane each. The word address
is `(set*4 + dcs) * FRAME_WORDS + word`, with `FRAME_WORDS = H_PIX*V_PIX/8`.

**Sets.** Four consecutive frames form a set. Sets alternate between area 0 ("A")
and area 1 ("B"). When the last word of a set has been written, the reader starts
on that set. For each word index it fetches that word from DCS0, DCS1, DCS2 and
DCS3, then emits the eight pixel tuples, one per clock. Meanwhile the writer fills
the other area with the next set. The first frame after reset is taken as DCS0.

**Sharing the port.** The SDRAM has one command port. A pending write always goes
first, so the sensor stream is never held up for more than a cycle or two; reads fill
the gaps. The read-back runs much faster than the sensor, at roughly 8 pixels per
~20 system clocks against 1 pixel per DCLK cycle. If a set ever completes while the
previous one is still being read, the sticky `vdma_overrun` flag is raised.

**Back-pressure without stall signals.** Nothing between BRAM1 and BRAM2 can stop:
the CORDIC, distance and filter stages are fixed-latency pipelines. Flow is instead
controlled at two points:

* The VDMA starts emitting a word's eight tuples only when BRAM1 has room for
  eight.
* BRAM1 is popped only while BRAM2 has more free entries than the pipeline can
  hold (`PIPE = ITER + 10`).

When the USB controller stops accepting data, BRAM2 fills, BRAM1 stops draining,
and the VDMA pauses its reads. Writes of the next set continue. An assertion checks
that BRAM2 is never written when full.

**SDRAM port protocol.** `mem_cmd_valid/ready` carry a command with `mem_cmd_we`,
`mem_cmd_addr` (word address) and `mem_cmd_wdata`. Read data comes back in order on
`mem_rsp_valid/mem_rsp_data` at any latency. A write command is held stable until
it is accepted, and an assertion checks this. A DDR3 controller's user port fits
this port with little glue.

## Two-frequency range extension (`phase_unwrap`)

One frequency is ambiguous beyond du. With two frequencies in ratio M_A : M_B
(coprime; 4 : 3 here, e.g. 24 and 18 MHz), the pair of phases fixes the distance
over M_A * du_A. For each pair of wrap counts, n_A < M_A and n_B < M_B, the block
scores

    y = |(M_B*phi_A - M_A*phi_B) + 2^24 * (M_B*n_A - M_A*n_B)|

All 12 candidates are scored in parallel and the smallest score wins. The output
`n_A*2^24 + phi_A` is the distance in units of du_A/2^24. Its top 24 bits are sent,
as a fraction of the extended range.

With `cfg.dual_freq` set, set A must be taken at f_A and set B at f_B. Only
completion of set B starts a read, and the reader then fetches eight words per
word index (both sets) and runs both CORDICs. Change `dual_freq` only between sets.
In this mode the offset and temperature terms are not applied. Targets within the
phase noise of either end of the extended range can come out at the wrong end.

## Preprocessing (`window3x3`, `median3x3`, `morph3x3`)

`window3x3` keeps the two previous rows in row buffers, so each pixel is read from
the stream only once. The window seen with input pixel (x, y) covers rows y-2..y and
columns x-2..x. Its centre is therefore (x-1, y-1).

The filtered image is the input image moved one pixel right and down. The first two
rows and columns, where the window would leave the image, are sent as 0.

Two windows run in lockstep:

* The **depth window** feeds a 3x3 median (`cfg.median_en`) or passes its centre.
  The median counts each element's rank (ties broken by position) and picks rank 4.
* The **valid window** carries one bit per pixel: amplitude >= `cfg.amp_min`.
  Erosion is the AND of the nine bits and dilation is their OR, selected by
  `cfg.morph_mode`; `MORPH_PASS` passes the centre bit. Pixels whose filtered valid
  bit is 0 are sent as 0.

## Exposure control (`auto_integration`)

Amplitude grows with integration time. A frame whose mean amplitude lies within
100..1200 LSB is taken as well exposed. The block sums the amplitude over the whole
frame. At the last pixel it compares the sum with `100*NPIX` and `1200*NPIX`.

* **Inside the band:** nothing changes.
* **Outside the band:** it computes `t_int * 650 * NPIX / sum`, which is the time
  that would bring the mean to 650. This uses a 48-cycle restoring divider. The
  result is clamped to 800..4000 us and announced with `t_update`, for the
  configuration processor to write to the sensor over I2C.

`auto_en` = 0 freezes `t_int` but still reports the verdict (`expo_status`: good,
weak, over). The rule assumes the frame was taken with the current `t_int`. Frames
already in flight when the time changes are judged against the new value.

## USB output (`fx3_slave_fifo`)

The FPGA acts as master of the USB controller's synchronous slave FIFO: 32-bit `DQ`,
`SLWR#`, `PKTEND#`, with the socket-ready flag on `FLAGA`. Pixels are 24 bits, and
four pixels are packed into three words, least significant byte first:

    w0 = {p1[7:0], p0}   w1 = {p2[15:0], p1[23:8]}   w2 = {p3, p2[23:16]}

The last word of a frame goes out with `PKTEND#` low, and a frame must hold a
multiple of four pixels. Data moves only while the registered flag is high, so the
controller must drop `FLAGA` while at least three more words still fit (a watermark
flag). The interface runs on the system clock. If the controller's interface clock
is limited to a lower rate (100 MHz for the common part), give this block its own
clock or run the system clock lower.

## Sensor capture and configuration

* **`tcmi_rx`** takes a pixel on every DCLK edge where HSYNC and VSYNC are both
  high. It marks the first pixel after VSYNC rises as start of frame. A 64-entry
  Gray-pointer FIFO carries the pixels into the system clock. A pixel arriving when
  the FIFO is full sets `tcmi_overflow`.
* **`i2c_master`** performs single-register writes (START, device+W, register,
  data, STOP) and reads (repeated START, one byte, NACK). It drives open-drain
  outputs (`*_oe` pulls low) with `I2C_DIV` clocks per quarter bit. It does not
  support clock stretching.
* **`temp_comp`** turns the four corner temperature readings into the correction
  `(k_temp * (mean - t_ref)) >>> 8`. They are loaded with `temp_update`.

## Point cloud (`point_cloud`)

Each pixel looks along its own ray through the lens. With that ray as a unit vector
`v`, the pixel's 3-D point is `dist_mm * v`. The vectors come from a lens calibration
that this design does not do. They are loaded, one pixel per write, into an on-chip
RAM of `H_PIX*V_PIX` entries through `vec_we/vec_addr/vec_data`; each entry is
`{vz, vy, vx}` as signed Q1.15. As distances stream past, a pixel counter (restarted
at start of frame) reads the matching vector. The point is `(d * v) >>> 15` per
axis: 17-bit signed mm, two clocks after the distance, on `pc_valid/pc_x/pc_y/pc_z`.
It always uses the single-frequency distance. In the two-frequency mode that means
the first frequency's distance, wrapped at du.

The gray-scale amplitude image comes out alongside on `gray_valid/gray_amp`. It is
unfiltered and arrives at the same time as the distance.

A full-size vector RAM is 76800 x 48 bits, about 3.7 Mbit. That is the largest
memory in the design, so on a small part it may be worth sharing one vector per
group of pixels.

## Centre-ROI statistics (`roi_stats`)

Range precision is judged on a small window in the middle of the image, away from
lens distortion and the border: 16x16 pixels by default (`ROI`). Per frame, the block
sums the ROI's distances (`S1`) and their squares (`S2`), then reports

    mean = floor(S1 / N)      var = floor((N*S2 - S1^2) / N^2),   N = ROI^2

Because N is a power of two, both divisions are shifts. The result appears on
`roi_valid/roi_mean/roi_var` two clocks after the last ROI pixel. The values are raw
single-frequency distances, before the 3x3 filters, in units of du/2^24.

For offset calibration, point the camera at a flat wall at a known distance with
`d_offset` = 0. Then set `d_offset` = reference − `roi_mean`. The statistic does not
handle the wrap at du: an ROI whose distances straddle du gives a meaningless
spread.

## Top-level interface (`tof_top`)

| group | ports |
|---|---|
| clocks/resets | `clk`/`rst_n` (system, SDRAM and USB side), `dclk`/`drst_n` (sensor bus); active-low asynchronous resets, released synchronously by the board |
| sensor | `tcmi_hsync`, `tcmi_vsync`, `tcmi_data[11:0]`; `scl_oe`, `sda_oe`, `scl_i`, `sda_i` |
| I2C commands | `i2c_cmd_valid/ready`, `i2c_cmd_rw`, `i2c_cmd_dev`, `i2c_cmd_reg`, `i2c_cmd_wdata`; `i2c_rsp_valid`, `i2c_rsp_rdata`, `i2c_rsp_nack` |
| SDRAM | `mem_cmd_*`, `mem_rsp_*` as above |
| USB | `fx3_slcs_n`, `fx3_slwr_n`, `fx3_sloe_n`, `fx3_slrd_n`, `fx3_pktend_n`, `fx3_fifoadr`, `fx3_dq`, `fx3_flaga` |
| configuration | `cfg` (`tof_pkg::tof_cfg_t`: dual_freq, median_en, morph_mode, amp_min, d_offset, du_mm, t_ref, k_temp), `auto_en`, `temp[4]`, `temp_update` |
| point cloud | `vec_we`, `vec_addr`, `vec_data[3]` in; `pc_valid`, `pc_x`, `pc_y`, `pc_z` out |
| gray image | `gray_valid`, `gray_amp[11:0]` |
| ROI statistics | `roi_valid`, `roi_mean[23:0]`, `roi_var[47:0]` |
| status | `t_int`, `t_update`, `expo_status`, `tcmi_overflow`, `vdma_overrun`, `sets_done`, `frames_sent` |

Parameters, with their defaults:

* Frame and arithmetic: `H_PIX`=320, `V_PIX`=240, `ITER`=24.
* Buffers: `BRAM1_DEPTH`=512, `BRAM2_DEPTH`=1024 (powers of two).
* Other: `I2C_DIV`=100, `M_A`=4, `M_B`=3, `ADDR_W`=24, `ROI`=16 (a power of two).

`H_PIX*V_PIX` must be a multiple of 8 (SDRAM words) and of 4 (USB packing).

## What follows the source design and what is added

Taken from the source design:

* The split into capture, SDRAM frame buffer, CORDIC atan2, USB slave-FIFO output
  and I2C configuration.
* The 320x240 12-bit sensor, the 128-bit SDRAM bus and the 24-bit phase and pixel.
* The DCS equations, the offset/temperature correction and wrap, and the amplitude.
* The two-frequency score and its exhaustive search.
* Erosion as an AND and dilation as an OR of nine pixels, the 3x3 median and row
  buffering.
* The 100..1200 LSB good-signal band and proportional adjustment of the
  integration time.
* Gray-scale amplitude and the point cloud as distance times a per-pixel vector.
* The 16x16 centre region of interest, with its mean and variance.

Choices of this design, where the source is silent:

* The bus sync polarity, the SDRAM word format, address map and port protocol, and
  write-over-read priority.
* The BRAM depths and the credit-style flow control.
* The CORDIC guard bits, iteration count and pipelining.
* The units of the offset and temperature terms, and the linear temperature model
  with its coefficient format.
* The 4:3 frequency ratio.
* Applying the median to the depth image rather than the gray-scale image.
* The border handling and one-pixel shift of the filters; using the amplitude mask
  as the binary image for morphology; sending masked pixels as 0.
* The target amplitude of 650 LSB and the 800..4000 us clamp.
* The USB pixel packing, socket and flag use.
* A hardware I2C master, where the source uses a soft processor for the bus.
* The point-cloud vector format, its RAM and load port.
* Computing the ROI statistics in hardware, and their formulas and placement.

Not built:

* The sensor, LED illumination, DDR3 SDRAM chip and its memory controller.
* The soft processor and its software (initialisation, register values, USB
  link-up), the USB controller chip and the host.
* The HDMI display output, which is named but not specified.
* The per-pixel SHUTTER and XSYNC_SAT lines, whose function is not given.
* Depth values are not written back to SDRAM; they go straight to the USB path.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/tof_pkg.sv tb/tb_tof_top.sv --top-module tb_tof_top
./obj_dir/Vtb_tof_top
```

| testbench | what it checks |
|---|---|
| `tb_tof_top` | End to end on a 16x8 frame with small buffers. The testbench plays the sensor from a synthetic scene (depth ramp, dark block, dark pixel) and drives back-to-back sets through a random-latency SDRAM model into a slow, sometimes blocked USB socket. Every output pixel is compared with a reference (phase + offset + temperature, median, eroded or dilated mask) over four single-frequency frames with different filter settings and two two-frequency frames. It checks the gray-scale amplitude, the ROI mean and spread (4x4 ROI), and each point (x, y, z) against the scene distance times random per-pixel vectors. It requires each mechanism to occur: write priority, BRAM1 full, BRAM2 throttle, USB flag stall, quadrant fold, over- and under-exposure, I2C transfer, two-frequency frames. |
| `tb_tof_top_full` | The same test at 320x240 with all top parameters at their defaults: one set in, one 76800-pixel depth frame out (about 10 s in Verilator). |
| `tb_tof_rate` | Frame rate at 320x240 with all defaults: 160 MHz system clock, 48 MHz sensor clock, three sets back to back into a USB socket that never fills. Each depth frame must leave within 1% of the sensor's set period and reach 131 frames/s; it measures 6.50 ms, 154 frames/s (under a minute in Verilator). |
| `tb_cordic_atan2` | 400 vectors against `$atan2`/`$sqrt`, and the 26-cycle latency. |
| `tb_vdma` | Four sets, single- and two-frequency read-back, all tuples, write priority. |
| `tb_tcmi_rx`, `tb_sync_fifo` | Clock crossing with blanking and back-pressure; FIFO against a queue model. |
| `tb_tof_distance`, `tb_temp_comp`, `tb_phase_unwrap` | Arithmetic against independent models. |
| `tb_window3x3`, `tb_median3x3`, `tb_morph3x3` | Window contents and flags; sort-based median; all 512 binary windows. |
| `tb_auto_integration` | Verdicts, proportional steps, clamping, hold when disabled, 50-cycle response. |
| `tb_roi_stats` | Two ROI sizes over four random frames with gaps, exact mean and variance, 2-cycle latency. |
| `tb_point_cloud` | Random vectors and distances over two frames with gaps, against exact integer products. |
| `tb_fx3_slave_fifo`, `tb_i2c_master` | Socket model with watermark flag; I2C slave model with a register file. |

`tb/sdram_model.sv` is a behavioural memory (random ready, fixed read latency) used
by the VDMA and top-level tests.

## How far to trust it

* Every block passes its own testbench.
* The full 320x240 configuration has been simulated end to end. With a free USB
  link it keeps pace with the sensor: 154 frames/s at a 48 MHz sensor clock. At
  40 MHz the sensor bus itself, with 5 clocks of line blanking, limits the rate to
  128 frames/s.
* Nothing has been run on hardware or timed for an FPGA. The deepest combinational
  paths are the 9-way median and the 12 parallel unwrap scores; both are single
  register stages and may need splitting for 160 MHz.
* The real sensor's bus timing, its DCS ordering and the USB controller's flag
  latency should be checked against those parts' data sheets before use.
