# Depth-to-color image registration in programmable logic

A depth camera and a color camera mounted side by side see a scene from two
slightly different points, through different lenses. A system that finds an
object or a face in the color image, and then needs to know how far away it
is, must first move every depth measurement into the color camera's view.
This is *depth-to-color registration*. Running it in software on an embedded
ARM core takes about a second per frame. The pipeline here does it in
programmable logic at one depth pixel per clock: a 640x480 frame takes
307,273 clocks, about 3 ms at 100 MHz.

The RTL implements the registration accelerator of an augmented-reality
"information fusion" system built on a Zynq UltraScale+ MPSoC. That system
overlays information on a transparent display, positioned along the line
from the viewer's eye to an exhibit behind the glass (see
*Research on Information Fusion System Implementation Based on ARM-Based
FPGA*, 2023). In that system the registration module sits in the PL next to
two Xilinx DPU neural-network engines, and the ARM cores run the rest of the
application. Only the registration module is logic designed for the system.
The DPUs, processors, GPU, USB and memory controllers are vendor blocks, and
they are not part of this RTL.

## The mapping, pixel by pixel

For each depth pixel at column `u`, row `v`, with raw 16-bit sample `d`:

1. **Deproject** (depth camera pinhole model, inverted). `fx, fy, px, py` are
   the depth camera's focal lengths and principal point:

       Z = d * depth_scale
       X = (u - px) * Z / fx
       Y = (v - py) * Z / fy

2. **Change frame** with the 3x4 depth-to-color extrinsics `e0..e11`, a row-major `[R | t]`:

       Xc = e0*X + e1*Y + e2*Z  + e3
       Yc = e4*X + e5*Y + e6*Z  + e7
       Zc = e8*X + e9*Y + e10*Z + e11

3. **Project** with the color intrinsics, truncating toward zero:

       uc = trunc(fx_c * Xc / Zc + px_c)
       vc = trunc(fy_c * Yc / Zc + py_c)

4. **Store**: if `0 <= uc < 640` and `0 <= vc < 480`, write `Z` (the
   *depth-camera* Z, not `Zc`) to `depth_of_color[vc*640 + uc]`.

Pixels are processed in raster order. When several depth pixels land on the
same color pixel (this happens at occlusion edges), the last one in raster
order wins. The output buffer is never cleared by the hardware: color pixels
that no depth pixel reaches keep whatever the host left there. Clear the
buffer before a frame if you need holes to read as zero.

## Pipeline

```
 s_depth ──► deproject_unit ──► rigid_transform ──► project_unit ──► m_addr/m_data
 (u,v from      35 stages           2 stages          35 stages
 regist_ctrl)   2 dividers                            2 dividers
                     ▲                  ▲                  ▲
                     └──── camera model from param_regs ───┘
```

| module            | work                                           | latency (clocks) |
|-------------------|------------------------------------------------|------------------|
| `deproject_unit`  | step 1: Z, then (u-px)*Z and (v-py)*Z, then /fx, /fy | 2 + 33 = 35 |
| `rigid_transform` | step 2: nine products, then three row sums     | 2                |
| `project_unit`    | step 3 and 4: fx*Xc, fy*Yc, then /Zc, then offset, truncation, range check, address | 1 + 33 + 1 = 35 |
| `pipe_divider`    | one restoring-division bit per stage, 32 stages plus sign | 33      |
| `regist_ctrl`     | raster counter, frame start/end, counts        | —                |
| `param_regs`      | camera model and control/status registers      | —                |

The four divisions use the same divider, `pipe_divider`. It unrolls
restoring division into one stage per quotient bit. Any needed value that
does not take part in a division (Z, a valid flag) travels in the divider's
payload field, so every stage stays aligned without extra delay lines.

**Flow control.** Each pixel moves one stage per enabled clock. There is a
single enable for the whole pipeline. It drops only when the last stage holds
a write that the memory side refuses (`m_valid && !m_ready`), and then the
input stalls as well (`s_ready` low). Pixels that miss the image leave the
pipeline without a handshake and never stall it. Input bubbles (`s_valid`
low) just travel down the pipeline as empty slots.

**Frame boundaries.** `regist_ctrl` counts accepted samples to generate `(u,v)`.
It stops taking samples after 640x480 of them. It ends the frame when the same
number of pixels has *retired*, that is, left the last stage, whether or not
they wrote. So `irq` fires exactly when the last write has been accepted.

**Timing of one frame.** With no back-pressure and a sample on every clock,
`irq` rises `IMG_W*IMG_H + 73` clock edges after the edge that writes the
start bit. That is one edge to leave IDLE, one per pixel, and 72 for the last
pixel to drain.

## Number formats

The reference algorithm uses single-precision floating point. This RTL uses
fixed point, which is its main departure from that algorithm:

| quantity                                 | format                  | range / step                |
|------------------------------------------|-------------------------|-----------------------------|
| intrinsics, extrinsics, X/Y/Z, Xc/Yc/Zc  | signed Q16.16 (32 bit)  | ±32768, step 1.5e-5         |
| depth scale                              | unsigned Q0.32          | 0 … 1, step 2.3e-10         |
| products before division                 | signed Q32.32 (64 bit)  |                             |
| quotients                                | signed Q16.16           |                             |

Q0.32 for the depth scale matters. A typical scale of 0.001 m per unit
would carry a 0.8% error in Q16.16. In Q0.32 it is exact to 1e-7.

The host converts each float to fixed point by multiplying by 2^16 (2^32 for
the scale) and rounding. Length units are whatever the depth scale and
translation use (metres for the usual 0.001 scale). The written depth is Q16.16
in those units.

Rounding: `Z` and the row sums of the transform drop fraction bits (toward
minus infinity). The divisions truncate toward zero, as does the final
conversion to a pixel index. On a realistic synthetic scene, 2 of about
120,000 writes land more than one pixel from a double-precision evaluation
of the same equations.

Cases that are undefined in floating point get explicit rules here:

* `Zc <= 0` (the point is at or behind the color camera) → pixel dropped. A
  depth hole (`d = 0`) gives `Z = 0`, hence `Zc = e11`. With the usual
  extrinsics `e11` is 0, so holes are dropped rather than written.
* A projection in (-1, 0) truncates to index 0, like the float-to-unsigned
  cast of the reference. At or below -1 it is off the image.
* A quotient that does not fit Q16.16, or a focal length <= 0 → pixel
  dropped.
* `depth_scale >= 0.5` saturates Z at the largest Q16.16 value.
* Transform results are not saturated. Points beyond ±32 km would wrap.

## Host interface

Register bus (`cfg_addr`, `cfg_wdata`, `cfg_we`, combinational `cfg_rdata`),
32-bit words at byte addresses:

| address      | register | access | content                                         |
|--------------|----------|--------|-------------------------------------------------|
| 0x00         | CTRL     | W      | bit 0 = 1 starts a frame (ignored while busy)   |
|              |          | R      | bit 0 busy, bit 1 done (sticky until next start)|
| 0x04         | WRITTEN  | R      | pixels written in the current/last frame        |
| 0x08         | DROPPED  | R      | pixels off the image or invalid                 |
| 0x10–0x1C    | color fx, fy, px, py | R/W | Q16.16                              |
| 0x20–0x2C    | depth fx, fy, px, py | R/W | Q16.16                              |
| 0x30–0x5C    | extrinsics e0…e11    | R/W | Q16.16, row-major [R \| t]          |
| 0x60         | depth scale          | R/W | unsigned Q0.32                      |

Camera-model writes are ignored while a frame is running, so the model cannot
change under pixels in flight. Everything resets to zero.

Streams:

* `s_valid / s_ready / s_depth[15:0]`: depth samples in raster order, row 0
  first, column 0 first; 307,200 per frame. A transfer happens when both
  valid and ready are high at a clock edge.
* `m_valid / m_ready / m_addr[18:0] / m_data[31:0]`: one write per pixel that
  lands in the image. `m_addr = vc*640 + uc` indexes a 640x480 buffer.
  Address and data hold while `m_ready` is low.
* `irq`: a one-clock pulse when a frame has fully retired.

In the original system, depth frames come from a USB camera through the ARM
cores, and the output buffer lives in DDR (the registration module has only
15 block RAMs). A DMA engine or an AXI master would sit on the two streams.
That adapter is not part of this RTL.

Typical use: write the 21 model registers, write 1 to CTRL, stream 307,200
samples, consume the writes, wait for `irq` (or poll CTRL bit 1), then read
WRITTEN/DROPPED.

## Where this departs from the reference algorithm

* Fixed point instead of float, with the rules for undefined cases above.
* The reference listing is an HLS C++ function. It gives no interface, so the
  register map, the streams, start/done and the flow control are this
  design's own.
* The reference source does not ask for pipelining explicitly, yet the PL is
  reported at about 3 ms per frame. That is one pixel per clock at roughly
  100 MHz, which is what this pipeline delivers.

## Resources

After generic synthesis the pipeline has about 1,600 flip-flop bits in
registers plus about 24,000 bits of divider stage storage. Synthesis keeps
those as memory arrays. They map to flip-flops on an FPGA, which puts the
total in the same range as the roughly 19,000 registers reported for the
original HLS module. The bulk is in the four 33-stage dividers. The
multipliers are 32x32 and 64-bit wide: 9 in the transform, 4 in the
divider-feeding stages and 1 for the depth scale. They map to DSP slices.

## Changing it

* **Image size**: `IMG_W`, `IMG_H` on `image_registration` (address and counter
  widths follow). The ports `s_depth` stay 16 bits.
* **Number formats**: `regist_pkg` holds `FRAC`, `FIX_W` and the types. The
  dividers are instantiated with 64-bit numerators and 32-bit quotients. If
  you change the formats, recheck the overflow rules in `pipe_divider` and
  the saturation in `deproject_unit`.
* **Divider latency**: `pipe_divider`'s `Q_W`. The controller needs no change,
  because it counts retiring pixels rather than clocks.

## Simulation

Each module has a self-checking testbench in `tb/`. It compares against
`tb/regist_model_pkg.sv`, an independent model built on 128-bit integer
arithmetic, plus a double-precision version of the same mapping.

| testbench               | what it covers                                                  |
|-------------------------|-----------------------------------------------------------------|
| `tb_image_registration` | full 640x480 frames at default parameters: a random-stall frame, a full-speed frame with exact clock count, a frame after reloading the model; every write checked; stalls, bubbles, off-image drops, hole drops, collisions, ignored start and ignored model write all exercised |
| `tb_pipe_divider`       | random and corner divisions, overflow, sign, latency, payload   |
| `tb_deproject_unit`     | several camera models, saturation, invalid focal lengths        |
| `tb_rigid_transform`    | random rotations/translations, payload, latency                 |
| `tb_project_unit`       | in-image, off each edge, (-1,0) truncation, Zc <= 0, invalid input |
| `tb_regist_ctrl`        | raster order, frame end, counts, start ignored while busy (7x5 frame) |
| `tb_param_regs`         | register map, struct mapping, start pulse, busy lockout         |

Each prints `TB_RESULT checks=N failures=M` and stops. Run one with Verilator
5 from the project root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_image_registration \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/regist_pkg.sv tb/regist_model_pkg.sv tb/tb_image_registration.sv \
    --Mdir obj_tb -o sim
./obj_tb/sim
```

The full-size testbench runs three 640x480 frames in a few seconds. The
design is two-state clean: every control flop resets, and data flops are only
read behind a valid bit.
