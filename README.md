# PPMA: a tiled hardware matcher for binary shape descriptors

Partial Point Matching (PPMA) scores how well two square binary images match.
In shape recognition these are typically polar-coordinate contour descriptors,
where a rotation of the object becomes a cyclic horizontal shift of the
descriptor. PPMA absorbs that rotation by trying every shift. It absorbs
contour noise by first smearing the template vertically. For an image `N`
(being recognised) and a template `M`, both `IMG x IMG`:

1. Expand `M`: every object pixel (1) is copied into the `SIGMA` rows above
   and below it. Nothing wraps at the top or bottom edge.
2. For each `k = 0 .. IMG-1`, count the pixels that are 1 both in expanded
   `M` and in `N` cyclically shifted `k` pixels to the right. That count is the
   similarity at shift `k`.
3. The similarity degree is the largest of these `IMG` counts.

A database search repeats this for every template and keeps the best one.
Each comparison is `IMG` shifts of an `IMG x IMG` AND-and-count. That is
cheap per pixel but large in total, so this design spreads the work over an
array of small units.

Defaults: 64x64 images, noise tolerance `SIGMA = 2`, and 16 computation
units, each holding a 16x16 tile. A comparison takes 1586 clock cycles when
the image is new and 1346 when only the template changed. The result is
bit-exact with the whole-image algorithm above.

## Architecture

```
 host rows ──► ppma_ctrl ──── shared line bus (op, addr[8:0], data[15:0]) ────┐
              (N store,                                                        │
               M store,        ┌──────────┬──────────┬─── ... ───┐             │
               ppma_expand)    ▼          ▼          ▼           ▼             │
                            ppma_cu 0  ppma_cu 1  ppma_cu 2 ... ppma_cu 15  ◄──┘
                               │ count     │          │           │
                               └───────────┴────┬─────┴───────────┘
                                                ▼
                                           ppma_adder ──► similarity, best_shift, done
```

- **ppma_cu** (16 instances) holds a 16x16 tile of `N` and the same tile of
  the *already expanded* `M`. Unit `u` covers tile row `u / 4` and tile
  column `u % 4`. On a compute broadcast it ANDs the two tiles and counts the
  ones. By default the count is fully unrolled: all 256 pixels in one cycle.
- **ppma_ctrl** holds the host's copies of both images. It streams them to
  the units one 16-bit tile line per cycle and sequences the 64 steps. It
  also produces the pixels each unit is missing after a shift.
- **ppma_expand** is the combinational expansion. It works on the whole
  template inside the controller, so tile borders never cut the vertical
  smear.
- **ppma_adder** adds the 16 partial counts of one shift into that shift's
  similarity. It keeps the running maximum and the first shift that reached
  it.

### The bus

One operation per clock, driven only by the controller:

| `bus_op`      | `bus_addr[8]`          | `bus_addr[7:4]` | `bus_addr[3:0]` | `bus_data`             |
|---------------|------------------------|-----------------|-----------------|------------------------|
| `BUS_LINE`    | 0 = image, 1 = template | unit            | line in tile    | 16 pixels of that line |
| `BUS_COLUMN`  | 0                      | unit            | 0               | lacking column, bit l = line l |
| `BUS_COMPUTE` | –                      | –               | –               | – (broadcast)          |
| `BUS_IDLE`    | –                      | –               | –               | –                      |

Within a line, bit `j` is pixel column `16*tile_col + j`. "Right" means
towards higher column numbers.

## Shifting a tiled image

This is the least obvious part. Shifting `N` one pixel to the right moves
every tile's pixels one column right. The rightmost column of each tile must
enter the next tile to the right, and the rightmost column of the image wraps
around to column 0. The units are not connected to each other. Instead, each
unit shifts its own tile and drops the pixel that falls off. The controller
then supplies the column that should enter on the left, as one `BUS_COLUMN`
operation per unit. That is 16 cycles per shift.

The controller does not track the shifted image. After the `s`-th shift, the
column entering unit `(tr, tc)` is column `(16*tc - s) mod 64` of the original
image, so the controller reads it directly from its unshifted copy of `N`.

A comparison has 64 compute steps and 63 shifts between them. The units
therefore end with `N` shifted 63 pixels. To compare the same image with the
next template, the controller applies one more shift (the 64th, again 16
cycles). That returns `N` to its original position, and only the template
lines are then sent. Hence the two load lengths:

| situation                                  | load cycles              |
|--------------------------------------------|--------------------------|
| image written since it was last sent       | 256 image + 256 template = **512** |
| only the template changed                  | 16 restoring shift + 256 template = **272** |

The controller tracks this itself. Any host write to an image row forces the
512-cycle load at the next start.

## Timing

With `start` sampled at clock edge 0 and `L` the load length:

- the first compute broadcast is seen by the units at edge `L+1`;
- each later step follows 17 cycles after the previous one (1 compute + 16
  column cycles);
- the last compute is at edge `L+1072`, the adder pulses `done` at `L+1073`,
  and `busy` falls at `L+1074`.

So a comparison takes 1586 cycles for a new image and 1346 for each further
template. A plain sequential software loop needs on the order of 10^5
instructions for the same work. `step_sum`/`step_valid` show the similarity of
every shift as it is produced, one cycle after each compute.

### Partial unrolling (`LPC`)

A fully unrolled 256-pixel AND-and-count in every unit is large. Parameter
`LPC` (lines counted per cycle, default 16 = `TILE`) trades area for time:

- each count takes `TILE/LPC` cycles, summing `LPC` lines per cycle;
- the controller idles that long after each compute broadcast, so tiles are
  not shifted mid-count;
- a comparison then takes `L + IMG*(TILE/LPC + 16) - 14` cycles. At `LPC = 1`
  (16 times slower counting) that is `L + 2034`.

## Top-level interface (`ppma_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `host_we` | in | 1 | write one row (only while `!busy`) |
| `host_sel` | in | 1 | 0 = image `N`, 1 = template `M` |
| `host_row` | in | 6 | row number |
| `host_data` | in | 64 | the row; bit `c` = column `c`, 1 = object pixel |
| `start` | in | 1 | start one comparison (only while `!busy`) |
| `busy` | out | 1 | comparison in progress |
| `done` | out | 1 | one-cycle pulse; `similarity`, `best_shift` valid and held |
| `similarity` | out | 13 | similarity degree, 0..4096 |
| `best_shift` | out | 6 | right shift of `N` where the maximum first occurred |
| `step_sum`, `step_valid` | out | 13, 1 | similarity of each shift, in order |

Parameters: `IMG` (64), `TILE` (16), `SIGMA` (2), `LPC` (16). `IMG` must be a
multiple of `TILE` and `TILE` a multiple of `LPC`. There are `(IMG/TILE)^2`
units. The bus is `TILE` bits wide. A load sends `(IMG/TILE)^2 * TILE` lines
per image. A shift takes one column cycle per unit. For example,
`IMG = 128, TILE = 32` keeps 16 units and handles 128x128 descriptors.
Host writes and `start` while busy violate assertions in `ppma_ctrl`.

## Design choices and departures

The following are decisions of this implementation, not part of the algorithm
as usually stated:

- **Pixel polarity.** 1 is an object pixel and 0 is background. Some
  descriptions of PPMA use the opposite encoding. Only this one makes "count
  the ones of the AND" measure object overlap.
- **What is shifted.** `N` moves and the expanded template stays put, so `N`
  can stay in the units across templates. Some statements of the algorithm
  shift the template instead. Over a full cycle of shifts the maximum is the
  same. Only the meaning of `best_shift` changes: shifting `N` right by `k`
  is the same as shifting `M` left by `k`.
- **Number of steps.** All 64 shift positions are evaluated, including shift
  0. A loop written as "for i = 1 .. m-1" would evaluate one position fewer.
- **Expansion place.** The expansion is done once, in the controller, on the
  whole template as it is sent. It is not repeated in every step or inside
  each unit. This gives the same result without needing rows from
  neighbouring tiles in the units.
- **The 272-cycle load.** This is read as 256 template lines plus the
  16-cycle restoring shift described above.
- **Maximum and ties.** The maximum is kept in the adder as a running value
  rather than a stored vector of 64 sums. On a tie the first shift is kept.
- **Choices without guidance.** The host interface, the bus opcode/address
  layout below the select bit, reset behaviour and all latencies had to be
  chosen here.
- **Not in the RTL.** Choosing the best template over a database is left to
  the host. The clock and reset sources are ordinary top-level inputs.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The reference model `tb/ppma_ref_pkg.sv`
computes the algorithm pixel by pixel on whole 64x64 images, with no tiling.

| testbench | what it checks |
|-----------|----------------|
| `tb_ppma_expand` | every output bit against a per-pixel window search; edge rows do not wrap |
| `tb_ppma_cu` | random line writes (own and other units), shifts, computes; count value and 1-cycle latency |
| `tb_ppma_adder` | per-shift sums, maximum, first-shift tie rule, single `done` after 64 reports |
| `tb_ppma_ctrl` | decodes the bus into the units' view; at every step the image equals the original shifted by the step number and the template equals its expansion; 512/272 load lengths, 16 column cycles per shift, reload after an image row changes |
| `tb_ppma_top` | whole design at default parameters: five comparisons (new image, rotated template found at shift 37, all-zero template tie, sparse pair where the expansion changes the winner, template-only reload); all 64 sums, result, exact cycle counts; counts that every mechanism occurred |
| `tb_ppma_top_plu` | the same end to end with `LPC = 1`, including the `L + 2034` cycle count |
| `tb_ppma_top_128` | the array scaled to 128x128 images (`IMG = 128`, `TILE = 32`, still 16 units, 128 shifts) against a 128x128 reference, including a rotation found at shift 99 and the `L + 2162` cycle count (`L` = 1024 or 528) |

To run one, for example the full design:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ppma_pkg.sv tb/ppma_ref_pkg.sv tb/tb_ppma_top.sv --top-module tb_ppma_top
./obj_dir/Vtb_ppma_top
```

All testbenches finish in well under a second.

## Files

- `rtl/ppma_pkg.sv`: bus opcodes, select values, default sizes
- `rtl/ppma_top.sv`: top level: controller, unit array, adder
- `rtl/ppma_ctrl.sv`: image stores, load/shift/compute sequencer
- `rtl/ppma_expand.sv`: vertical noise-tolerance expansion
- `rtl/ppma_cu.sv`: computation unit (tile stores, shift, AND-and-count)
- `rtl/ppma_adder.sv`: partial-count adder and running maximum
- `tb/ppma_ref_pkg.sv`: whole-image reference model for the testbenches
- `tb/tb_*.sv`: testbenches listed above
