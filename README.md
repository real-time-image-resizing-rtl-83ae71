# Online image-pyramid generator for object detection

Object detectors such as HOG pedestrian detection and Haar-cascade face
detection scan one fixed-size window over many downscaled copies of each
camera frame. On an embedded processor, producing those copies costs as much
as it does because every copy re-reads the frame from memory. This design does
the resizing *online*: while a frame streams from the camera towards main
memory, up to 12 hardware units each compute one bilinearly downscaled copy of
it in parallel and write it to its own memory region. When the frame has
arrived, the whole pyramid is already in memory for the detection software.

The RTL is the programmable-logic part of a processor + FPGA system. The host
processor writes a few configuration registers (frame size, feature-window
size, initial scale, number of scales, where each scaled image goes). The
multi-port memory controller and DRAM are outside the design; the top level
exposes one write port per scale for them.

```
 camera ──► controller ──(pixel stream, broadcast)──► SCU 0 ─┐
              │  ▲  row counter, line control, tail row      SCU 1 ─┤
              │  │                                           ...   ├─► mem_master ─► N write ports
              ▼  │                                           SCU 11┘    (base + index)   (memory controller)
        calc_factors  (scale factors, scaled sizes)
              ▲
 host ──► ctrl_regs (Scale, No_of_Scales, Image_/Win_ Width/Height, bases, enable, status)
```

## Number format and what a "scale" is

A scale is described by its factor `f = source size / scaled size`, always
`>= 1` (the design only shrinks). Factors are unsigned fixed point with 27
fractional bits and 5 integer bits (`resize_pkg::FRAC_BITS`, `FACT_W = 32`);
2^-27 is about 7.5e-9, i.e. about eight decimal digits. The host writes the
initial scale `s` in that format (1.05 is `round(1.05 * 2^27) = 140928614`).

Scale `k` (k = 0, 1, ...) uses `f_k = s^(k+1)`, computed as
`f_0 = s`, `f_k = FLOOR(f_(k-1) * s / 2^27)`. Its size is
`w_k = round(W / f_k)`, `h_k = round(H / f_k)`. With the reset configuration
(320x240, s = 1.05, 64x128 window) this gives 12 scales from 305x229 down to
178x134.

Each output pixel `(i, j)` of a scale is the bilinear interpolation at source
position `(f*j, f*i)`:

```
x = FLOOR(f*j)   y = FLOOR(f*i)   xd = f*j - x   yd = f*i - y
A = src[y][x]    B = src[y][x+1]  C = src[y+1][x]  D = src[y+1][x+1]
out = FLOOR( A(1-xd)(1-yd) + B xd(1-yd) + C yd(1-xd) + D xd yd )
```

Neighbours beyond the last column or row are replaced by the last column or
row (clamping). The products are kept at full precision (54 fractional bits),
so the only rounding is the final FLOOR; the testbenches compare against this
formula bit for bit.

## The Scale Computation Unit (`rtl/scu.sv`)

This is the heart of the design and the part that needs the most care. One
SCU produces one scale from the broadcast pixel stream, with two input row
buffers and no access to the frame in memory.

**Which rows are needed.** Output row `i` needs source rows `y_i = FLOOR(f*i)`
and `y_i + 1`. The SCU keeps the current *factor multiple* `f*i` in an
accumulator (the factor register plus an increment loop). At every row start
a comparator checks the incoming row number against `FLOOR(f*i)`:

| incoming row `r`              | action during the row                                            |
|-------------------------------|------------------------------------------------------------------|
| `r == FLOOR(f*i)`             | *accept*: write the row into the primary buffer                   |
| `r == FLOOR(f*i) + 1`         | *compute* output row `i`; if also `r == FLOOR(f*(i+1))`, accept it |
| other                         | ignore                                                            |

After a computed row, `f*i` advances by `f`. Because `f >= 1`, consecutive
output rows use different upper rows, so at most one output row is computed
per input row.

**Primary and secondary buffers.** Incoming accepted pixels always go into the
*primary* buffer. At the end of every accepted row the two buffers swap roles,
so the *secondary* buffer always holds the last accepted row, which is the
upper row `y_i` when row `y_i + 1` arrives. During a computed row, A and B
come from the secondary buffer (read at the incoming column) and C and D are
the incoming pixels themselves; the incoming row can be written into the
primary buffer in the same cycle. Each buffer is a RAM addressed by two
modulo-n counters (n = frame width) that step with every write or read, so no
column addresses are carried around (`rtl/row_buffer.sv`).

**Which columns fire.** Along a computed row a second accumulator holds
`f*j`. Output pixel `j` fires when the incoming column equals
`FLOOR(f*j) + 1`: at that moment the previous and current pixels of both rows
(A, B, C, D) are in registers. The fractional parts of the two accumulators
are `x_diff` and `y_diff`. Each input pixel yields at most one output pixel.

**Edges.** A pixel whose left neighbour is the last column (`FLOOR(f*j) = W-1`)
has no incoming column `W`; it fires in a *flush* cycle right after the
row's last pixel, with B = A and D = C. An output row whose upper row is the
last source row (`FLOOR(f*i) = H-1`) has no row `H`; for it the controller
appends a *tail row* (row number `H`, `W` valid cycles carrying no data) after
every frame, during which the SCU reads its stored last row as both the upper
and the lower row.

**Row 0 and late factors.** Every SCU accepts row 0 whatever its factor
(`FLOOR(f*0) = 0`), so factors can still be loaded while row 0 streams in; they
are first used at the start of row 1.

**Compute and output.** `rtl/scu_compute.sv` forms the four weights in one
stage and the weighted sum and FLOOR in a second. Results enter an output row
buffer (`rtl/out_fifo.sv`, one row deep, 320 entries) that absorbs stalls of
the memory port. If it is full, the pixel is dropped and `irq_overflow`
pulses.

**Timing.** An output pixel reaches the output row buffer 3 cycles after the
input pixel that completes it (4 for a flush pixel). Output row `i` is
produced while source row `y_i + 1` arrives, i.e. one row after its upper
row: the pipeline latency is one input row.

## Factor calculation and sequencing

`rtl/calc_factors.sv` walks the power series of the initial scale. Per scale it
spends one cycle on the multiply and 12 cycles on two restoring dividers
running in parallel (`round(W/f)`, `round(H/f)`), then one cycle to check. It
stops before the first scale smaller than the window in either direction, or
after `No_of_Scales` scales, or after 12 (the number of SCUs), or when the next
factor would not fit 5 integer bits. For the reference configuration it takes
169 cycles, less than one 320-pixel row.

`rtl/controller.sv` sequences everything:

* a host write to any configuration register marks the configuration dirty;
* at the next frame start it deactivates all SCUs (this also empties their
  output buffers) and starts the factor calculation if the enable bit is set;
* when the calculation ends, each SCU is loaded with its factor, scaled size
  and active bit. If row 1 of the frame has not started yet, this frame is
  resized; otherwise the status bit *late* is set, the frame is skipped and
  the factors are loaded at the next frame start;
* it registers the camera signals, counts rows (`rtl/row_counter.sv`, on
  hsync) and columns, passes on only pixels inside the configured frame and
  while enabled, appends the tail row, and broadcasts the stream to all SCUs.

## Memory layout

`rtl/mem_master.sv` gives each SCU its own write port. Scale `k` is written
byte by byte, row by row, to `base_addr[k] + i * w_k + j`; the host chooses
the bases so the regions do not overlap. A request (`mem_wr[k]`: valid,
32-bit address, 8-bit data) is held until `mem_ready[k]`; a port moves one
pixel per cycle when never refused.

## Interfaces

Camera (all synchronous to `clk`): `vid_vsync` pulse in a cycle of its own
before a frame, `vid_hsync` pulse in a cycle of its own before every row, then
one pixel per cycle with `vid_valid` high (gaps allowed). After the last row
of the frame the camera must stay idle for at least `Image_Width + 2` cycles
before the next `vid_vsync` (the tail row). Camera rows and columns beyond the
configured size are ignored.

Host register bus: `reg_wr`/`reg_rd` strobes, 6-bit word address, 32-bit data;
read data arrives one cycle after `reg_rd` with `reg_rvalid`.

| addr  | register       | reset        | meaning                                   |
|-------|----------------|--------------|-------------------------------------------|
| 0     | Scale          | 140928614    | initial scale, 27 fractional bits (1.05)  |
| 1     | No_of_Scales   | 12           | upper limit on the number of scales       |
| 2     | Image_Width    | 320          | frame width                               |
| 3     | Image_Height   | 240          | frame height                              |
| 4     | Win_Width      | 64           | feature-window width                      |
| 5     | Win_Height     | 128          | feature-window height                     |
| 6     | Control        | 0            | bit 0: enable                             |
| 7     | Status         | -            | [7:0] scales, [8] factors loaded, [9] calculating, [10] factors were late, [11] a pixel was dropped; a write clears [10] and [11] |
| 32+k  | Base k         | 0            | byte address of scale k                   |

Reset is asynchronous and active low throughout.

## Sizes

Defaults are in `resize_pkg`: 12 SCUs, frames up to 320 pixels wide (any
height up to 4095), 8-bit grey pixels. After coarse synthesis the top level is
about 2,800 word-level cells, 9,300 flip-flop bits and 96,000 memory bits
(per SCU: two 320x8 input row buffers and a 320x9 output row buffer). Wider
frames need a larger `MAX_W`; more scales need a larger `NUM_SCU` (register
map room for 32).

## Where the design goes beyond its description

The architecture (registers, controller, factor calculator, parallel SCUs with
a comparator, increment loop, two swapped row buffers, compute unit and output
buffer, and a memory master feeding a multi-port memory controller) and the
interpolation formula follow the published description. These parts are this
design's own choices, filling gaps in it:

* which rows an SCU pairs: the two adjacent rows `FLOOR(f*i)` and
  `FLOOR(f*i) + 1`, as the interpolation formula requires;
* scale `k` as the power `s^(k+1)` of the initial scale, scaled sizes rounded
  to nearest, and the exact stop rule;
* edge clamping, the flush cycle and the tail row;
* the skipped-frame fallback when factors are late;
* the register bus, enable bit, base-address registers and status word;
* one byte-wide memory port per scale with a valid/ready handshake, and the
  one-row output FIFO with drop-on-full;
* the camera signal format and 8-bit pixels.

Only bilinear resizing is built; a nearest-neighbour mode, which a Haar
detector could also use, is not part of the design.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference model
(`tb/tb_resize_ref_pkg.sv`) evaluates the formula above in 64-bit integers,
independently of the RTL.

* `tb_resize_top` runs the whole design at its default size: the reference
  HOG configuration (12 scales of a 320x240 frame, every pixel of every scale
  checked in memory), a Haar-style configuration (scale 1.02, 24x24 window,
  limited to 12 scales), back-pressure from a memory controller that refuses
  requests, a stalled memory that overflows the buffers, reconfiguration to a
  small frame that leaves SCUs idle, and a configuration whose factors arrive
  late. It fails if any of the row acceptance, buffer switch, flush pixel,
  tail row, refusal or overflow never happened. The memory controller is the
  behavioural model `tb/mpmc_model.sv` (fixed port priority, random refusals).
* `tb_scu` checks one SCU on many factors (1.0 to 3.7), frames with input
  gaps and output back-pressure, the 320x240 frame at 1.05^12 (178x134), an
  overflow, and that the last output follows the last input within 6 cycles.
* `tb_calc_factors` checks the reference case (12 scales, last 178x134, within
  320 cycles) and 300 random configurations.

To run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/resize_pkg.sv tb/tb_resize_ref_pkg.sv tb/tb_resize_top.sv --top-module tb_resize_top
./obj_dir/Vtb_resize_top
```

Replace `tb_resize_top` with any other testbench name. The full-size
end-to-end run takes about a second.

## Known limits

* Downscaling only (`f >= 1`); scales beyond 12 need a larger `NUM_SCU`.
* The factor calculation must finish within the first row for that frame to
  be resized (169 cycles for 12 scales); with very narrow frames the first
  frame after a change is skipped.
* A memory port that stalls for more than about one output row loses pixels
  (reported, not recovered).
* The tail row needs `Image_Width + 2` idle cycles after each frame.
