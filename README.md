# Zoned 3D accelerator with a reconfigurable zone and a Gouraud triangle filler

A 3D renderer running on a soft processor spends most of its time in two
kinds of work. Geometry work computes a surface normal and a 4x4 matrix
transform for each triangle. Raster work fills each triangle with
interpolated colour. How much of each a frame needs depends on the scene.
A scene that moves a lot is geometry-heavy. A scene with large shaded
surfaces is raster-heavy.

This design has three hardware zones:

* **Z1** is a permanent geometry zone.
* **Z3** is a permanent raster zone.
* **Z2** can be switched between the geometry and the raster configuration
  while the system runs.

The processor watches the workload and points Z2 at whichever kind of work
is the bottleneck. This is the "data adaptation" idea behind the design.

At the centre of the raster side is the **Hline accelerator**. It is a
pipelined triangle filler built from a segment-extremity stage and a
pixel-filling stage, with a block RAM between them. Both stages use a small,
slow sequential divider instead of a large pipelined one. Raster speed comes
from running many of these small dividers in parallel.

Beside the zones, the top also holds the simpler **static configuration**
that came before them. It has four Hline accelerators working in parallel,
each on its own pair of links to the processor.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. Each
block has a self-checking testbench in `tb/`.

## System view

```
                 link 1 (FSL)              return 1
 processor ───────────────────► Z1 geometry ──────────► processor
            link 2             ┌──────────────────┐  return 2 (geometry cfg)
 processor ───────────────────►│ Z2 reconfigurable├──────────► processor
            z2_cfg_req ───────►│ geometry | raster├──┐
                               └──────────────────┘  │ raster cfg
            link 3                                   ▼
 processor ───────────────────► Z3 raster ──► fsl_merge ──► shared pixel FIFO ──► pix_* port
```

| Module | Role |
|---|---|
| `ar3d_top` | The three zones, the three input links (`fsl_fifo`, depth 16), two return links, the merge and the shared pixel FIFO (depth 64). |
| `geometry_zone` | One `normal_unit` and one `transform_unit` behind a command protocol. |
| `raster_zone` | An input FIFO followed by `hline_accel`. |
| `reconfig_zone` | Holds both configurations and switches between them. |
| `fsl_merge` | Round-robin merge of the Z2 and Z3 pixel streams. One source keeps the grant for a whole triangle. |
| `hline_array` | The static configuration: `N_HLINE` = 4 raster lanes. Each lane is a `raster_zone` plus a return FIFO, on its own `hl_*` link pair. It shares only clock and reset with the zones. |

These parts are outside the RTL:

* The processor.
* The second processor, bus and VGA controller that empty the shared pixel
  FIFO. The FIFO's read side (`pix_exists`, `pix_data`, `pix_last`,
  `pix_read`) is a port of the top.
* The barycentre step that would come before each triangle filler. Its
  computation is not specified. Vertex words written to links 2 and 3 go
  straight into the raster FIFOs.

## Word formats

All links are FSL-style FIFOs: 32 data bits and one control bit.

| Stream | Layout |
|---|---|
| Vertex word (raster input) | `{x[31:20], y[19:8], c[7:0]}`. Three words make one triangle. Screen coordinates are unsigned 12-bit. Colour is 8-bit. |
| Pixel word (raster output) | `{y[31:20], x[19:8], c[7:0]}`. The control bit is set on the last pixel of a triangle. |
| Geometry command | A header word with the control bit set. `data[1:0]` selects the command. Data words follow with the control bit clear. |

The geometry commands are:

| Code | Command | Data words | Answer |
|---|---|---|---|
| 0 | `LOAD_MATRIX` | 16 Q16.16 entries, row major | none |
| 1 | `TRANSFORM` | x, y, z in Q16.16 | x', y', z', w' |
| 2 | `NORMAL` | 9 signed 16-bit coordinates of A, B, C | nx, ny, nz in Q2.14 |

The last answer word has the control bit set. A data word that arrives when
no command is waiting for it is dropped and counted in `z1_bad_words`.

The shared types are in `ar3d_pkg`: `vertex_t`, `line_t`, `pixel_t`,
`geo_cmd_e` and `z2_cfg_e`.

## The Hline triangle filler (`hline_accel`)

```
FSL in ─► sed ─► segment BRAM (ring, 128) ─► spf ─► pixel BRAM (ring, 1024) ─► sender ─► FSL out
```

### Segment extremity determination (`sed`)

1. `sed` reads three vertices and sorts them by y. A is the top vertex, B
   the middle, C the bottom.
2. It starts six dividers together. They compute the per-line x step and the
   per-line colour step of sides AC, AB and BC, as `(d << 16) / dy` in
   Q16.16.
3. It walks down one screen line per clock. Side AC gives one end of the
   line. Side AB gives the other end above B, and side BC gives it from B
   down.
4. Both ends are advanced by adding their steps and rounded to the nearest
   pixel.
5. It writes one record `{last, y, xl, xr, cl, cr}` per line.

A triangle with a flat top (yA = yB) starts directly on side BC. A side with
dy = 0 gets step 0.

### Segment pixel filling (`spf`)

Each segment needs one division: the colour step along the line,
`((cr - cl) << 16) / (xr - xl)`. The step is 0 for a one-pixel segment.

`spf` has `N_DIV` = 10 lanes. Each lane is one divider plus the segment it
is working on.

* A **loader** reads segments from the segment BRAM into the lanes in turn
  and starts each division.
* A **filler** visits the lanes in the same order. It waits for that lane's
  quotient, then writes one pixel per clock with colour
  `round(cl + step * (x - xl))`.

A division takes 67 clocks. A short segment fills in a few clocks. With ten
lanes, the divisions of the next segments run while the current one fills,
so the stage produces close to one pixel per clock. Segments leave in the
order they arrived.

Measured on one accelerator, 32 random triangles of up to 80x80 pixels
(17795 pixels) take 20642 clocks, or 0.86 pixel per clock. That count
includes the start-up of each triangle.

### Back-pressure

Both BRAMs are used as ring buffers with occupancy counters. The three
stages run at the same time. A stage waits when the buffer after it is
full:

* `sed` waits for room in the segment BRAM (`seg_full_stall`).
* `spf` waits for room in the pixel BRAM (`pix_full_stall`).
* The sender waits on `m_full`.

Because of this, a triangle of any height passes through, even one taller
than the segment BRAM.

### Timing without back-pressure

| Event | Clock |
|---|---|
| First segment record | 69 clocks after the third vertex is taken |
| Remaining segment records | One per clock |
| First pixel of a segment | 67 + 2 clocks after the segment is read, unless its division was already overlapped |

## Four accelerators in parallel (`hline_array`)

The processor splits a frame's triangles over the four lanes and reads
pixels back from each return link. The lanes share nothing, so throughput
scales with the number of lanes when the work is balanced.

`tb_hline_array` measures this. It fills the same 32 random triangles twice:

* on one accelerator: 20642 clocks;
* on four accelerators, each triangle going to the lane with the fewest
  pixels assigned so far: 5850 clocks.

That is a 3.5x speed-up. Round-robin assignment without balancing gives
about 2.8x, because the largest triangles then decide the finish time.

## Sequential divider (`div_ip`)

This is a signed 32-bit restoring divider written as a five-state machine.

| State | Clocks | What it does |
|---|---|---|
| `IDLE` | 1 | Captures the operands on `start`. |
| `SIGCALCUL` | 1 | Records the result signs and takes absolute values. |
| `PRECALCUL` / `CALCUL` | 2 per bit, 32 bits | Shifts the next dividend bit into the partial remainder, then compares, subtracts and sets the quotient bit. |
| `ENDCALCUL` | 1 | Applies the signs. |

* `done` pulses on the 67th rising edge, counting the edge that samples
  `start`.
* The quotient truncates toward zero.
* The remainder has the sign of the dividend.
* Division by zero returns quotient 0 and remainder = dividend.

The unit is small, about the size of one 32-bit subtractor and a few
registers. This is why the filler can afford ten of them.

## Square root (`sqrt_ip`)

This is a 32-bit unsigned integer square root computed digit by digit. Each
iteration brings down two radicand bits and produces one root bit, for 16
iterations in total.

The states are `IDLE`, `NB_IT`, `PREP_COEF`, `DIFF_1`, `PREP_VAR`, `DIFF_2`
and `FIN`.

* The first iteration takes a short branch (`DIFF_1`, trial value 1).
* Iterations 2 to 16 use `PREP_VAR` to form the trial value
  `(root << 2) | 1`. `DIFF_2` then compares and subtracts.

`done` is high in `FIN`, 64 clocks after `start`. The outputs are
`root = floor(sqrt(radicand))` and `rem = radicand - root^2`.

## Geometry units

### `transform_unit`

This unit multiplies `(x, y, z, 1)` by a 4x4 Q16.16 matrix.

* The matrix is loaded one entry per clock, row major, through
  `load_en` / `load_data`.
* A transform uses one multiply-accumulate per clock: 16 clocks, with
  `done` on the 17th clock.
* Products are summed at full width and shifted right by 16.

### `normal_unit`

This unit computes the unit normal of triangle ABC, `n = N / |N|` with
`N = (B - A) x (C - A)`.

1. It forms the cross product of the 16-bit inputs in 40-bit arithmetic.
2. It shifts the three components right together until each fits in 15
   bits. This keeps the direction and lets the sum of squares fit the 32-bit
   square root.
3. `sqrt_ip` gives |N|.
4. Three `div_ip` divide `N_i << 14` by |N|.

The result is Q2.14, where 16384 = 1.0. It is exact to within a few LSB
after the shift. A degenerate triangle gives 0. A normal takes about 150
clocks.

## Reconfiguring Z2 (`reconfig_zone`)

Z2 keeps the same input link and the same output FIFO in both
configurations. The top routes the output FIFO according to `z2_cfg`:

* geometry configuration: to the return link;
* raster configuration: to the merge.

Partial reconfiguration is modelled at register-transfer level. Both
configurations are instantiated. The one that is not loaded is held in
reset.

When `z2_cfg_req` differs from `z2_cfg`:

1. The zone finishes the command or triangle it has started. It takes input
   only as long as the loaded configuration is in the middle of one.
2. It waits until the loaded configuration is idle and the output FIFO is
   empty.
3. It switches `z2_cfg` and pulses `z2_reconf_done`.
4. The newly loaded configuration starts from reset. `z2_reconfiguring` is
   high while a switch is pending.

**Processor rule:** stop writing work of the old kind to link 2 before
requesting a switch. Words for the new configuration may be queued at any
time. They wait in the link until the switch is done.

The reset of the unloaded configuration is driven from a registered signal
into the asynchronous reset pins. This mimics the region being cleared when
it is loaded. In a real partial-reconfiguration flow, the configuration
logic performs this reset instead.

## Where this design departs from the source description

* **Slope direction.** The source writes a triangle side as y = a x + b,
  with a = dy/dx, and steps along x. This design steps along y with dx/dy.
  It produces one horizontal segment per screen line and never divides by a
  zero dx.
* **Dividers.** The source compares its own sequential divider with a
  vendor divider. The vendor divider is fast for a single unit and is used
  for small polygons. Only the sequential divider is built here. It is used
  everywhere, with ten lanes in the filler.
* **Static configuration.** The source draws the static configuration with
  an interconnect between Geometry and Hline accelerators, but does not say
  what that interconnect does. Here each of the four Hline accelerators has
  its own link pair and no interconnect. In the zoned part, at most two
  fillers work at once: Z3, plus Z2 when it is in the raster configuration.
* **Designer's choices.** The source does not fix any of the following:
  * fixed-point formats;
  * vertex sorting;
  * rounding;
  * word layouts;
  * the geometry command protocol;
  * ring-buffer depths;
  * merge arbitration;
  * the rule for when to switch Z2.

  All of these were chosen for this design.
* **Blocks not built.** The barycentre step, the processors, the bus and the
  VGA controller are not built.

## Parameters (defaults)

| Parameter | Default | Meaning |
|---|---|---|
| `N_DIV` | 10 | Division lanes in `spf` |
| `LINE_DEPTH` | 128 | Segment BRAM entries (polygons of up to 120 lines fit whole) |
| `PIX_DEPTH` | 1024 | Pixel BRAM entries |
| `FSL_DEPTH` | 16 | Processor-to-zone link depth |
| `OUT_DEPTH` | 64 | Shared pixel FIFO depth |
| `N_HLINE` | 4 | Accelerators in the static configuration |

Synthesis of the whole top gives about 8k cells, 34k flip-flop bits and
254 kbit of RAM. The zoned part alone gives 3.5k cells, 14k flip-flop bits
and 87 kbit of RAM.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The reference models in `tb_ref_pkg` and `tb_geo_pkg` are written
independently of the RTL:

* `tb_ref_pkg` computes the segments and pixels of a triangle with the same
  fixed-point rules;
* `tb_geo_pkg` provides the matrix and normal arithmetic and the command
  encoders.

| Testbench | What it covers |
|---|---|
| `tb_div_ip`, `tb_sqrt_ip` | Random and corner operands, exact results, the 67-clock and 64-clock latencies. |
| `tb_dp_bram`, `tb_fsl_fifo` | Random traffic against a model, full and empty behaviour. |
| `tb_sed`, `tb_spf`, `tb_hline_accel` | Random triangles, including flat, degenerate and taller than the BRAM. Random output stalls. Every record and pixel is checked. Both stalls are forced. |
| `tb_transform_unit`, `tb_normal_unit`, `tb_geometry_zone` | Random matrices and triangles. Protocol and stray words. |
| `tb_raster_zone`, `tb_reconfig_zone` | Streams through a zone. Switches in both directions, including with traffic pending. |
| `tb_hline_array` | Four-accelerator workload: speed-up against one accelerator, and return links held so that the lanes stall. |
| `tb_ar3d_top` | End-to-end run with all parameters at their defaults. |

`tb_ar3d_top` checks the following end to end:

* geometry commands on Z1;
* triangles on Z3;
* Z2 switched between raster and geometry and back;
* every pixel in the shared FIFO, and every answer on the return links;
* 16 triangles on the four static accelerators, checked pixel by pixel.

It also counts each mechanism and fails if one never happens:

* link full;
* Z2 switches;
* merge hand-overs;
* segment and pixel BRAM stalls;
* stray words;
* all four static accelerators busy at once;
* a static accelerator waiting for pixel BRAM room.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/ar3d_pkg.sv tb/tb_ref_pkg.sv tb/tb_geo_pkg.sv tb/tb_ar3d_top.sv \
  --top-module tb_ar3d_top
./obj_dir/Vtb_ar3d_top
```

Replace the last file and the top module name to run another testbench.
The full end-to-end run takes well under a second.

## Changing the design

* **Division lanes.** `N_DIV` can be made smaller to save area, at the cost
  of filling speed on short segments. One lane is correct, only slower.
* **Segment BRAM.** `LINE_DEPTH` only needs to cover the overlap you want
  between `sed` and `spf`. Taller triangles still pass because of
  back-pressure.
* **Coordinate and colour widths.** These are in `ar3d_pkg`. The 32-bit
  vertex and pixel words are packed from them, so widening them needs a new
  word layout.
