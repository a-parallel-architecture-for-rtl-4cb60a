# Real-time radial-distortion correction of stereo images, by table lookup on a reduced image

A stereo bench needs images free of lens distortion before it can match points
between the left and right views. Radial distortion moves every pixel along
the ray from the optical centre, by an amount that depends on the lens
calibration. Computing that per pixel is expensive. Instead, the mapping
from distorted to corrected pixels is worked out offline and stored in tables.
This RTL applies such tables to a live camera stream, at one pixel per clock,
with no frame buffer on the input side.

The tables are *direct*: they are indexed by the **distorted** pixel as it
arrives from the camera. Each distorted pixel may land on zero, one or
several pixels of the corrected image. That is the central difficulty. A
pixel arrives every clock, but a pixel with three destinations needs three
writes into one single-port image memory. The design resolves it in two ways:

* **It works on a reduced image.** Only one camera pixel in every 4 x 4
  window is kept, so each kept pixel has 16 clock cycles to itself. Within
  those 16 cycles the pipeline reads its tables, computes up to three
  destinations and writes them one after another. The whole treatment takes
  9 cycles.
* **Each distorted pixel has at most three destinations.** They sit at the
  same address in three separate table memories, so all three are read in
  one cycle.

The corrected image is therefore itself a reduced image: 164 x 123 pixels for
a 656 x 492 camera. Two identical channels, one per camera, form the stereo
top level.

## Picking one pixel per window without buffering: non-regular sampling

The simplest reduction would keep the top-left pixel of each window. Then one
camera line in four produces a kept pixel every 4 cycles, and the three other
lines produce none. That is a burst, followed by a long gap. The pipeline
instead needs exactly one kept pixel every 16 cycles.

To get that, number the pixels of a frame in stream order, `P = line * N_C + col`
(0-based). Keep the pixel when

    P mod 16 = 15        (P = 16a + 15)

In a continuous stream this fires exactly once every 16 cycles. It also takes
exactly one pixel from every 4 x 4 window, provided that `4 * N_C` is a
multiple of 16 and `N_C`, `2 * N_C` and `3 * N_C` are not. Put another way,
`N_C mod 16` is 4 or 12. The reason: moving down one line shifts the residue
of `P` by `N_C mod 16`. With a step of 4 or 12, the four lines of a window
together cover all 16 residues once. The default `N_C = 492` gives
492 mod 16 = 12.

The kept pixels do not come out in raster order of the windows. With 20
columns, the first four lines produce windows 4, 3, 2, 1, 5 of the first
reduced line, in that order. Lines 0 to 3 contribute P = 15, 31, 47, 63 and
79. The order is fixed for a given image width. It is the order of the
address table: the k-th kept pixel of a frame (k = 0, 1, 2, ...) owns word k.
The table builder must follow the same order. The pseudo-code in
"Building the tables" below does.

`sampling_pulse_gen` implements this with a multiplier and adder for `P` and
a remainder. The remainder is just the low four bits, because 16 is a power of
two. A pixels counter advances on each sampling impulse. The counter value
minus one is the 15-bit table index: the counter already holds k+1 when the
held values of pixel k appear. `reduced_coord_blocker` divides line and
column by 4 on every cycle. Its registers ("blockers") load the quotients and
the grey value only on the impulse, so `(u_red, v_red)` stay still for the 16
cycles in which the pipeline uses them.

`SAMPLE_PHASE` (default 15) selects which residue is kept. With 0, the first
pixel of the frame is kept and the first reduced line comes in the order
1, 5, 4, 3, 2.

## The two tables

Both tables are computed offline from the calibration. They are written into
the design through the load port before streaming.

**Address table**: one 16-bit word per kept pixel, 20172 words. The words are
held in two RAMs, `RAM_G` (16384 words) and `RAM_P` (4096 words). Bit 14 of
the 15-bit index selects the RAM.

| bits  | field       | meaning                                               |
|-------|-------------|-------------------------------------------------------|
| 15    | `active`    | 1: the pixel has correspondents; 0: passive, write nothing |
| 14    | spare       | ignored                                               |
| 13..0 | `corr_addr` | address of its correspondents in MEM1..MEM3           |

**Correspondents tables MEM1, MEM2, MEM3**: three 16384 x 16 memories read at
`corr_addr`. Each word holds one destination as a displacement from the kept
pixel's reduced position `(u_red, v_red)`:

| bits  | field     | coding                                            |
|-------|-----------|---------------------------------------------------|
| 15    | sign of du| 0 positive, 1 negative                            |
| 14..8 | \|du\|    | line displacement magnitude (0..127)              |
| 7     | sign of dv| 0 positive, 1 negative                            |
| 6..0  | \|dv\|    | column displacement magnitude (0..127)            |

The destination is `U = u_red ± |du|`, `V = v_red ± |dv|` (8 bits, modulo 256).
Its address in the corrected image is `U * 123 + V`. A pixel with fewer than
three distinct destinations repeats its last one in the remaining memories.
The repeated write is harmless.

### Building the tables

For each corrected pixel `(U, V)`, solve the distortion model
`x_d = x (1 + k1 r² + k2 r⁴ + k3 r⁶)` (the same for y) to find its distorted
reduced pixel. Then invert that relation. Every distorted pixel reached at
least once is active, and its first three corrected pixels become its
correspondents. Enumerate the kept pixels in stream order,
`for P in 0 .. N_L*N_C-1: if P mod 16 == 15: k++`, with
`u_red = (P / N_C) / 4` and `v_red = (P mod N_C) / 4`. Write word k of the
address table and hand out correspondents addresses sequentially. At most
16384 pixels can be active.

## Pipeline, cycle by cycle

All of it runs on one clock, the pixel clock (25 ns per pixel in the intended
system). Cycle 0 is the cycle in which the kept pixel is on the input. The
stage strobes come from `treatment_delay_chain`, a shift register of the
impulse. It plays the role of the "delay modules" that keep one stage from
starting before the previous one ends.

| cycle | what happens                                                                  | module |
|-------|-------------------------------------------------------------------------------|--------|
| 0     | sampling impulse; blockers load `u_red`, `v_red`, grey; pixels counter +1    | `window_detector` |
| 1     | address table read at the index (both RAMs); select bit delayed               | `address_table` |
| 2     | RAM_G / RAM_P multiplexer registered: `active`, `corr_addr`                   | `address_table` |
| 3     | MEM1..MEM3 read at `corr_addr`                                                | `correspondents_tables` |
| 4     | three decoupleurs register (du, dv)                                           | `decoupleur` x3 |
| 5     | three adders and address calculations; the three 15-bit addresses are fused into one 45-bit word | `correspondent_calc`, `memorization_address`, `address_shift_manager` |
| 6,7,8 | if active: write the grey value at the low 15 bits of the word, then rotate it by 15 bits | `writing_authorization`, `address_shift_manager`, `corrected_image_memory` |

The first write goes to destination 1. After one rotation destination 2 is at
the bottom, and after two rotations destination 3. Everything is over 9
cycles after the impulse, well before the next one at cycle 16. The held
values are not disturbed during that time. An assertion in
`correction_channel` checks it. Nothing else about a treatment cycle depends
on the previous one, so gaps in the camera stream (`pix_valid` low) only
delay the next impulse.

## Module map

```
stereo_correction_top            two channels, shared load and read ports
└── correction_channel           one camera
    ├── line_column_counter      line / column of the incoming pixel
    ├── window_detector          image reduction
    │   ├── sampling_pulse_gen   P, P mod 16, impulse, pixels counter - 1
    │   └── reduced_coord_blocker  /4 dividers and blockers
    ├── treatment_delay_chain    stage strobes
    ├── address_table            data decoder: RAM_G + RAM_P + multiplexer
    │   └── table_ram x2
    ├── correspondents_tables    MEM1..MEM3
    │   └── table_ram x3
    ├── decoupleur x3            word -> (du, dv)
    ├── correspondent_calc x3    (u_red, v_red) + (du, dv) -> (U, V)
    ├── memorization_address x3  (U, V) -> U*123 + V
    ├── address_shift_manager    45-bit fusion and rotation
    ├── writing_authorization    three write enables for an active pixel
    └── corrected_image_memory   164 x 123 x 8 image, write port + read port
```

`rectif_pkg` holds the sizes and the shared types: the address word, the
sign-magnitude displacement, the correspondent word, the held reduced pixel
and the load selector.

## Using it

Ports of `correction_channel`. The top has the same ports per camera, as
2-element arrays, except that `ld_sel`, `ld_addr`, `ld_data` and `img_raddr`
are shared. On the top, `ld_we[c]` picks the channel.

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst` | in | 1 | pixel clock; synchronous active-high reset |
| `frame_start` | in | 1 | high with the first pixel (0,0) of a frame |
| `pix_valid` | in | 1 | a pixel is on `grey` this cycle |
| `grey` | in | 8 | pixel value |
| `ld_we`, `ld_sel`, `ld_addr`, `ld_data` | in | 1, 2, 15, 16 | table write: `ld_sel` 0 = address table (15-bit address), 1..3 = MEM1..MEM3 (14-bit address) |
| `img_raddr` / `img_rdata` | in / out | 15 / 8 | corrected image read, one cycle latency |
| `sample` | out | 1 | sampling impulse |
| `wr_en`, `wr_addr`, `wr_data` | out | 1, 15, 8 | the corrected-image writes as they happen |

Load the tables while no frame is streaming: a load and a table read must not
share a cycle, and an assertion checks this. Stream the frame. The corrected
image is complete 9 cycles after the last kept pixel. Pixels that no kept
pixel maps to keep their previous value. The memories start cleared in
simulation.

Parameters: `NL` and `NC` (image lines and columns) on `correction_channel`
and on the top. `NC mod 16` must be 4 or 12. `NL / 4` and `NC / 4` must stay
below 256, and their product below 32768. The reduction factors, the table
sizes and the widths are in `rectif_pkg`.

### Simulating

Each testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`.
For example, the full-size end-to-end test (both channels, a 656 x 492 frame,
about 470,000 cycles, a few seconds):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/rectif_pkg.sv tb/tb_stereo_correction_top.sv --top-module tb_stereo_correction_top
./obj_dir/Vtb_stereo_correction_top
```

The same command works for every other `tb_<module>`.
`tb_correction_channel` (16 x 20 image) and `tb_workload_100x100` (100 x 100)
run one channel at small sizes. All testbenches use their own reference
arithmetic. They check every write's cycle (impulse + 6, 7, 8), address and
data, then read back the whole image. The end-to-end test also checks that
impulses are exactly 16 cycles apart and that each mechanism occurs: active
and passive pixels, address-table words in `RAM_P`, duplicate
correspondents, negative displacements.

## Sizes and resources

| memory | size | bits |
|--------|------|------|
| address table (RAM_G + RAM_P) | 20480 x 16 | 327,680 |
| correspondents MEM1..MEM3 | 3 x 16384 x 16 | 786,432 |
| corrected image | 20172 x 8 | 161,376 |
| one channel | | 1,275,488 |
| stereo top (two channels) | | 2,550,976 |

The stereo pair fits an FPGA with about 3 Mbit of block memory, such as the
Stratix EP1S40 the architecture was planned for. Logic is small: one multiplication
by the constant line length, a few 8- to 19-bit adders and about 220 flip-flops per channel.

## Where this RTL makes its own choices

The block structure follows the source architecture. Its ports and widths
follow it where they were stated: the 15-bit index, 16-bit table words, 8-bit
sign-magnitude displacements, 8-bit U/V, the 45-bit rotating address word, the
two RAMs of 16384 and 4096 words, and the 9-cycle treatment. The following
were not stated, or were decided here:

* **One clock with enables.** The source clocks the pixels counter, the
  blockers and the later stages from the sampling impulse and from shifted
  copies of it. Here everything runs on the pixel clock, and the impulse and
  its delayed copies are clock enables.
* **Image size 656 x 492.** The source gives the address table size, 20172
  words, but not the camera format. 656 x 492 / 16 = 20172, and 492 satisfies
  the column rule. A 492-wide by 656-high frame is therefore assumed.
* **Sampling phase.** The rule `P = 16a + 15` is used. An illustration of the
  same method lists the order of the first reduced line as 1, 5, 4, 3, 2,
  which is what phase 0 produces. Phase 15 gives 4, 3, 2, 1, 5. The phase is
  the `SAMPLE_PHASE` parameter.
* **Table word layouts.** The active bit is bit 15, and the correspondents
  address is bits 13..0. du is the upper byte, dv the lower.
* **Corrected-image layout.** Row-major, `U * 123 + V`. U is the line and V
  the column, following the pairing of line with u.
* **8-bit grey values** and a **synchronous active-high reset**.
* **Out-of-range arithmetic.** `U`, `V` wrap modulo 256. Image writes at or
  beyond 20172 are dropped. Correct tables never produce either.
* **Added ports.** The table load port, the second (read) port of the
  corrected-image memory, and the `frame_start` / `pix_valid` framing of the
  camera stream.
* **Pipeline placement.** The 9 cycles are split into stages as tabled above.
  The source's timing figure shows a selection signal, a rotation clock and a
  write clock, but the individual edges were not taken from it.

Not part of the RTL: the camera itself, and the offline computation of the
tables from the calibration, which is software. The testbenches generate a
pixel stream and random but valid tables in their place.
