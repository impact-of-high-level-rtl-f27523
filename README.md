# Sigma-Delta motion detection with a reduced 3x3 morphological opening

This is synthesizable SystemVerilog for a small video motion detector. Each
grey-level pixel keeps two running estimates: a background value `M` and a
spread value `V`. A pixel is marked as moving when it is far from its
background compared with its spread. The binary mask is then cleaned by a 3x3
morphological opening (an erosion followed by a dilation), which removes
isolated false detections.

Memory traffic sets the speed of such a design. A plain 3x3 filter loads nine
pixels for each output. This design separates the square window into a
vertical and a horizontal pass, and keeps the vertical results in registers
that rotate. That cuts the loads to three per output pixel. With a dual-port
RAM those three loads fit in two cycles, so the filter produces one pixel
every two cycles. The background update itself runs at one pixel per cycle.

The repository also holds two smaller pieces that stand beside the detector
in the top level:

* custom-instruction logic for a 32-bit softcore processor (per-lane
  increment/decrement, min/max and word-alignment operations), which runs the
  same algorithm in software;
* a worked example of the initiation interval: `a+b+c+d` built with one, two
  or three adders.

## The Sigma-Delta estimator (`sigma_delta_pe`, `inc_dec`)

For every pixel `x` of frame `t`, with 8-bit values:

```
M_t = M_{t-1} + 1  if M_{t-1} < I_t,   - 1 if M_{t-1} > I_t,   else unchanged
O_t = |M_t - I_t|
V_t = V_{t-1} + 1  if V_{t-1} < N*O_t, - 1 if V_{t-1} > N*O_t, else unchanged
E_t = 0 if O_t < V_t, else 1
```

Both steps ("move one unit toward a target") are the same circuit, `inc_dec`.
The two comparisons run in parallel and only pick a step of +1, -1 or 0,
which is then added once. The step is written in that form because it was the
most energy-efficient of the forms of this double test that were compared.

Choices made here that a user may want to change:

* `N = 2` (the amplification factor; values from 1 to 4 are usual).
* `N*O` can exceed 255. It is clamped to 255 before the comparison, so `V`
  saturates instead of wrapping around.
* On the first frame after reset, `M` is loaded with the image, `V` with
  `V_INIT = 2`, and the mask is all zero.

## The reduced morphological operator (`morph3x3_red`)

Erosion takes the minimum of the 3x3 neighbourhood and dilation the maximum.
On 1-bit pixels these are AND and OR. The square window equals a vertical
1x3 window followed by a horizontal 3x1 window. So for each column `c` of row
`i` the unit:

1. loads `(i-1,c)`, `(i,c)` and `(i+1,c)`, and reduces them to one value `rc`;
2. combines `ra`, `rb` and `rc` (the reduced values of columns `c-2`, `c-1`
   and `c`) into output pixel `Y(i, c-1)`;
3. rotates `ra <- rb` and `rb <- rc`.

That is three loads and four two-input operations per output pixel.

**Schedule.** A column takes two cycles. The source RAM has two read ports
with a one-cycle latency:

| cycle of column c | port A loads | port B loads | data returning from the previous cycle |
|---|---|---|---|
| phase 0 | `(i-1, c)` | `(i, c)` | row `i+1` of column `c-1` → `rc`, write `Y(i, c-2)` |
| phase 1 | `(i+1, c)` | – | rows `i-1`, `i` of column `c` → partial reduction |

**Borders.** Pixels outside the image are never loaded. The neutral element of
the operator takes their place: all ones for erosion and 0 for dilation. The
result is the same as a one-pixel frame of that value around the image. Each
row runs `W+1` column steps. Column 0 only fills the rotation registers, and
the extra step at column `W` (outside the image) produces the last pixel of
the row.

**Timing.** One pass over an image takes `2*H*(W+1)` load cycles, counted from
the cycle after `start`. `done` pulses one cycle after the last load, in the
same cycle as the last write. For 352x288 this is 203,328 cycles for 101,376
pixels, or 2.006 cycles per pixel. Each pixel is written exactly once, in
raster order.

The parameter `II` (default 2, at least 2) stretches each column step to `II`
cycles, with the loads in the first two and idle cycles after them. This
reproduces what a synthesis run with a larger initiation interval would build;
a pass then takes `II*H*(W+1)` cycles. Two cycles is the lower limit, because
three loads must share two ports.

The pixel width `PW` is a parameter. It is 1 in the detector, but grey-level
erosion and dilation work unchanged (the testbench checks `PW = 8`).

## Frame sequencing (`md_asic`)

Four `dp_ram` planes of `W*H` words are used: `M` (8 bit), `V` (8 bit), `E`
(1 bit) and `T` (1 bit). A frame goes through three passes:

| pass | reads | writes | rate |
|---|---|---|---|
| SD | `M`, `V` on port A (address = pixel index) | `M`, `V` on port B; `E` on port A | 1 pixel/cycle |
| ERODE | `E` on ports A and B | `T` on port A | 1 pixel / 2 cycles |
| DILATE | `T` on ports A and B | `E` on port A, and the `mask_*` output | 1 pixel / 2 cycles |

A single `morph3x3_red` unit serves both morphological passes. It is switched
from erosion to dilation between them.

**Interfaces.**

* Pixels enter in raster order on `pix_valid` / `pix_data` / `pix_ready`.
* `pix_ready` is high only during the SD pass.
* The opened mask leaves on `mask_valid` / `mask_addr` / `mask_data` during
  the DILATE pass.
* `frame_done` marks the last mask pixel of a frame.

If the input never stalls, `frame_done` comes `W*H + 4*H*(W+1) + 4` cycles
after the first pixel of the frame is taken. That is about five cycles per
pixel for the whole chain at 352x288 (508,036 cycles per frame), because the
three passes run one after the other over shared RAM planes.

Inside the SD pass, `sigma_delta_stage` reads `M` and `V` in the cycle it
takes a pixel. It writes the results back one cycle later. Each address is
touched once per frame, so no hazard arises. After the last pixel, the stage
holds `pix_ready` low until that pixel's write-back is done.

## Custom instructions for a softcore (`nios_custom_logic`)

This block is combinational logic that sits beside a processor ALU. Its inputs
are the two register operands `a` and `b` and an operation select `n`. Its
`result` would join the ALU result multiplexer. With `LANES = 4`, each 32-bit
word holds four 8-bit pixels, pixel 0 in bits 7:0. `LANES = 1` is the 8-bit
variant: it works on bits 7:0 and returns 0 in the upper bits.

| `n` | name | per-lane result |
|---|---|---|
| 0 | `lt_inc` | `a + 1` if `a < b` else `a` |
| 1 | `gt_dec` | `a - 1` if `a > b` else `a` |
| 2 | `inc_dec` | one Sigma-Delta step of `a` toward `b` |
| 3 | `min` | `min(a, b)` |
| 4 | `max` | `max(a, b)` |
| 5 | `vec_left` | `{b[23:0], a[31:24]}`: for previous word `a` and current word `b`, the pixels one place to the left |
| 6 | `vec_right` | `{b[7:0], a[31:8]}`: for current word `a` and next word `b`, the pixels one place to the right |
| 7 | – | 0 |

The processor is not part of this RTL, so `md_top` brings these buses out as
ports. The opcode numbering and the exact definition of `vec_left` and
`vec_right` are this design's own.

## Initiation-interval example (`sum4_ii`)

`t = a + b + c + d` is computed as three one-cycle additions in sequence. A
new operand set is taken every `II` cycles. Additions that start in different
cycles modulo `II` can share one adder, so the unit builds `ceil(3/II)`
adders with operand multiplexers:

* `II = 3`: one adder;
* `II = 2`: two adders;
* `II = 1`: three adders, fully pipelined.

The result is valid three cycles after its operands are taken. An assertion
checks that no two additions ever claim the same adder. `md_top` instantiates
all three variants.

## Files

| file | contents |
|---|---|
| `rtl/sd_pkg.sv` | pixel type, morphological operation enum, custom-instruction opcodes |
| `rtl/inc_dec.sv` | three-way step toward a target |
| `rtl/sigma_delta_pe.sv` | one Sigma-Delta pixel update |
| `rtl/sigma_delta_stage.sv` | SD pass at one pixel per cycle over the `M`/`V` RAMs |
| `rtl/morph3x3_red.sv` | reduced 3x3 erosion/dilation, ii = `II` (default 2) |
| `rtl/dp_ram.sv` | dual-port RAM plane, registered reads |
| `rtl/md_asic.sv` | the motion detector: planes, passes, sequencing |
| `rtl/nios_custom_logic.sv` | softcore custom-instruction logic |
| `rtl/sum4_ii.sv` | initiation-interval example |
| `rtl/md_top.sv` | top level with the three parts side by side |
| `tb/md_ref_pkg.sv` | integer reference models used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Default parameters: `W = 352`, `H = 288` (CIF), `N = 2`, `V_INIT = 2`,
`LANES = 4`, `DW = 16`, and `II = 2` inside `morph3x3_red`. At the default size the four RAM planes hold
1,824,768 bits.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
after a fixed time if it hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sd_pkg.sv tb/md_ref_pkg.sv tb/tb_md_top.sv --top-module tb_md_top
./obj_dir/Vtb_md_top
```

Replace `tb_md_top` with any other testbench name. Verilator finds the RTL
modules through `-Irtl`.

What the testbenches cover:

* `tb_md_top` runs the whole top level at its default parameters:
  * four 352x288 frames, with every mask pixel compared with a reference
    model (Sigma-Delta step, then a direct 3x3 erosion and dilation);
  * the frame timing;
  * random input stalls and back-pressure;
  * the custom-instruction port, for every opcode;
  * the three adder variants.

  It also counts that each mechanism actually occurs: seeding, `M` and `V`
  moving both ways, `V` clamping, pixels removed by the erosion and pixels
  restored by the dilation. It takes a few seconds.
* `tb_md_asic` does the same for the detector alone, on six 16x12 frames.
* The unit testbenches check:
  * `inc_dec`: exhaustively;
  * `sigma_delta_pe`: corner cases and random values, for `N = 2` and `N = 4`;
  * `morph3x3_red`: binary and 8-bit images, the exact cycle count (at
    `II = 2` and `II = 8`, the ends of the range worth sweeping) and the number of loads;
  * `dp_ram`: random traffic on both ports;
  * `nios_custom_logic`: both lane counts;
  * `sum4_ii`: latency and acceptance rate.

## Where this RTL departs from the design it is based on, or goes beyond it

The algorithm and its main figures come from the design this RTL is based on:

* the Sigma-Delta equations and the form of the increment/decrement step;
* one pixel per cycle for the background update;
* the reduced operator with three loads per pixel at two cycles per pixel
  over a dual-port RAM;
* the list of custom instructions and the three-adder example.

That design was produced with a high-level synthesis tool and described at
the algorithm level. Everything below is therefore this RTL's own choice:

* the image size (352x288);
* `N`, the first-frame seeding and the saturation of `V`;
* border handling with a neutral element instead of a stored frame of
  border pixels;
* raster pixel order, the stream handshakes and the one-cycle RAM latency;
* chaining the detector and the filter through RAM planes in three passes
  per frame, with one filter unit reused for both operations;
* the opcode encoding and the definitions of `vec_left` and `vec_right`;
* asynchronous active-low reset of control state (RAM contents are not
  reset).

The 9-load and rotated-register forms of the filter are not built. The design
compares them but does not use them. Neither is a fully combinational
(`ii = 0`) filter. The processor, its cache and the software are not included.
Energy, area and frequency depend on the target library and cannot be checked
in simulation.
