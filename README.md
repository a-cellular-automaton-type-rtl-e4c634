# Cellular-automaton region extractor

Given a binary image that marks region *boundaries*, this circuit pulls the
regions enclosed by those boundaries out one at a time and hands each one to
the next stage as a list of pixels. A conventional labelling pass visits every
pixel in turn, so its time grows with the pixel count M x N. Here every pixel
is a small cellular-automaton cell. A region is "lit" from one seed pixel, and
the lit state spreads to all neighbouring pixels at once on every clock. The
time to extract a region therefore grows with the region's diameter, on the
order of M + N, and not with its area.

The intended source of the boundary image is a coarse segmentation stage,
such as a resistive-fuse network that ignores small detail. That stage is not
part of this RTL: the boundary image is a plain input port.

The default configuration is a 30 x 30 pixel plane. The same RTL scales to any
`ROWS x COLS`.

## Pixel states

Each pixel is in one of three states:

| state     | meaning                                                     |
|-----------|-------------------------------------------------------------|
| unfired   | not yet assigned to any region                              |
| firing    | member of the region currently being grown                  |
| fired     | a boundary pixel, or a pixel of a region already delivered  |

Each pixel stores its state in three register bits (`ca_pixel`):

* `b0` = **fired**
* `b1` = **firing**
* `b2` = **prev**, a copy of `b1` taken one clock earlier

The exclusive-OR `bx = b1 ^ b2` is high for exactly one clock after the pixel
starts firing. It is also high for one clock after a firing pixel is cleared.

Four neighbour inputs act as the pixel's switches. They carry the `firing`
outputs of the north, east, south and west neighbours. While the plane is
told to expand, an unfired pixel that sees any firing neighbour becomes
firing. Connectivity is therefore 4-neighbour, and pixels outside the image
count as not firing.

## The extraction sequence

`ca_controller` steps through the algorithm. Every command acts on all pixels
at once, or on one selected pixel:

1. **INIT** (1 clock). Every pixel loads its boundary bit: a boundary pixel
   becomes fired and every other pixel becomes unfired.
2. **DETECT** (1 clock). `ca_start_detect` chooses the first unfired pixel in
   row-major order. That pixel becomes firing and is the *seed* of the region.
   If no unfired pixel is left, the sequence goes to **DONE**.
3. **EXPAND** (ecc + 2 clocks). While the change lines report that the
   previous clock changed some pixel, the plane expands by one pixel in every
   direction. The first clock that sees no change ends the phase and starts
   the readout.
4. **READ** (one clock per row the region covers). `ca_readout` sends the
   region one row per clock.
5. **CLEAR** (1 clock). Every firing pixel becomes fired. The sequence then
   returns to DETECT.

### Why the expansion ends where it does

No pixel knows on its own whether the region is complete. Completeness shows
only as the absence of change across the whole plane. That is why each pixel
keeps its previous `firing` value in `b2` and reports `bx`.

Each row ORs the `bx` of its pixels into a **change line**, and the
controller ORs the change lines together. The timing works like this:

* In the first EXPAND clock, the only change is the seed itself.
* Expansion step *k* fires the pixels at path distance *k* from the seed.
  The change lines show them in the clock that follows.
* Define ecc as the largest path distance from the seed to any pixel of the
  region. Then the clocks 1 … ecc + 1 of EXPAND see a change.
* Clock ecc + 2 sees none, and the region is known to be complete.

The last expansion clock fires nothing. It is the price of detecting "no more
change" without knowing the region's shape in advance.

### Row detection lines

`ca_pixel_array` ORs three flags across each row: any unfired pixel, any
firing pixel and any change. These lines keep the global decisions
row-parallel instead of pixel-serial:

* The start detector picks the first row whose unfired line is set, then the
  first unfired column inside that row.
* The readout takes its list of rows from the firing lines.
* The end-of-expansion test is the OR of the change lines.

## Readout format

When READ begins, `ca_readout` captures the firing row lines as a set of
pending rows. It also latches `ro_mode`.

On each following clock it presents the lowest pending row and then drops
that row from the set:

* `out_valid` is high.
* `out_row` is the row number.
* `out_bits` is a `COLS`-bit mask of the row.
* `out_last` marks the region's final row.

Rows that contain no firing pixel are never sent. `region_id` holds the
number of the region being read: 1 for the first region, counting up.

The two readout modes are:

* `RO_REGION`: every pixel of the region.
* `RO_BOUNDARY`: only the region's outline. An outline pixel is a firing
  pixel with at least one 4-neighbour that is not firing or lies outside the
  image.

There is no back-pressure. The receiver must accept one row per clock.

## Processing time

For an image whose regions have seed eccentricities ecc_i and cover rows_i
rows each, the total time in clocks is:

    T = 2 + sum_i (ecc_i + rows_i + 4)

Here ecc_i is measured along 4-connected paths inside region i, from the seed
pixel chosen as described above. The extractor reports T on `cycles` at
`done`, and every end-to-end testbench checks it exactly.

The sum is linear in region size, so for a fixed kind of scene T grows with
the side of the image. Measured on a scene of five regions (the image split
into quadrants by a horizontal and a vertical line, plus one closed
rectangle):

| image   | clocks | at 25 MHz |
|---------|--------|-----------|
| 8 x 8   | 57     | 2.3 µs    |
| 16 x 16 | 111    | 4.4 µs    |
| 24 x 24 | 165    | 6.6 µs    |
| 30 x 30 | 204    | 8.2 µs    |
| 40 x 40 | 273    | 10.9 µs   |

Extrapolated linearly, this scene at 100 x 100 would take about 680 clocks,
or about 27 µs at 25 MHz. Reference figures for this algorithm on a 25 MHz
FPGA are 5 regions of a 30 x 30 image in under 6 µs, and under 20 µs at
100 x 100. Those figures come from images not reproduced here. The readout
takes one clock per covered row, and it accounts for most of the gap. A wider
readout, such as several rows per clock or the whole firing plane at once,
would shorten READ.

## Interface of `ca_region_extractor`

| port                    | dir | width               | meaning                                          |
|-------------------------|-----|---------------------|--------------------------------------------------|
| `clk`, `rst_n`          | in  | 1                   | clock; synchronous active-low reset              |
| `start`                 | in  | 1                   | one-clock pulse to begin, from IDLE or DONE      |
| `ro_mode`               | in  | `ro_mode_t`         | whole region or outline; sampled per region      |
| `boundary`              | in  | `[ROWS][COLS]`      | boundary image, read in the clock after `start`  |
| `phase`                 | out | `phase_t`           | current step                                     |
| `busy`, `done`          | out | 1                   | running; finished (held until the next `start`)  |
| `region_id`             | out | clog2(ROWS·COLS+1)  | current region number; region count at `done`    |
| `cycles`                | out | `CYC_W` (24)        | clocks since `start`; total time at `done`       |
| `out_valid`, `out_last` | out | 1                   | readout row valid; last row of the region        |
| `out_row`, `out_bits`   | out | clog2(ROWS), `COLS` | row number and pixel mask                        |
| `seed_row`, `seed_col`  | out | clog2 widths        | pixel the start detector selects at this moment  |

`boundary[r][c] = 1` marks a boundary pixel. Row 0 is the top row and bit
`c` of a row is column `c`.

## Design choices beyond the algorithm

The algorithm fixes the three pixel states, the pixel register with its
previous-state bit and XOR, the four-neighbour spreading, row detection lines
and the step order. The following are choices of this implementation:

* **Bit roles.** `b0` is fired and `b1` is firing.
* **Neighbour switches.** They are closed only during expansion.
* **Command priority in a pixel.** load, then clear, then start or expand.
* **Image edge.** Pixels outside the image count as not firing.
* **Seed choice.** The seed is the first unfired pixel in row-major order.
* **Image loading.** The whole image is loaded in one clock through a
  `ROWS*COLS`-bit port.
* **Readout.** One row per clock. Empty rows are skipped. The outline is
  defined through 4-neighbours. There is no flow control.
* **Step timing.** INIT, DETECT and CLEAR take one clock each.
* **Handshake.** A start pulse begins the sequence, and `done` is held until
  the next start.
* **Counters.** A region counter and a cycle counter are provided.

## Files

| file                         | content                                                       |
|------------------------------|---------------------------------------------------------------|
| `rtl/ca_pkg.sv`              | default size, pixel state struct, `phase_t`, `ro_mode_t`      |
| `rtl/ca_pixel.sv`            | one pixel: three-bit register, XOR change output, switches    |
| `rtl/ca_pixel_array.sv`      | the pixel plane, neighbour wiring, row detection lines        |
| `rtl/ca_start_detect.sv`     | seed selection through the row lines                          |
| `rtl/ca_readout.sv`          | row-serial readout, region or outline                         |
| `rtl/ca_controller.sv`       | step sequencer and counters                                   |
| `rtl/ca_region_extractor.sv` | top level                                                     |
| `tb/ca_ref_pkg.sv`           | reference model (BFS flood fill, expected timing), image generators |
| `tb/ca_extract_bench.sv`     | end-to-end bench for one image size, used by the scaling test |
| `tb/tb_*.sv`                 | self-checking testbenches, one per module, plus the ones below |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_ca_pixel`: runs random command sequences against a behavioural model of
  the three state bits.
* `tb_ca_pixel_array`: uses 7 x 9 random images. After each expansion step it
  compares the firing plane with the set of pixels within BFS distance *k* of
  the seed. It also checks the change lines and the row lines.
* `tb_ca_start_detect`: compares the detector with a row-major scan on random
  planes, including planes with no unfired pixel.
* `tb_ca_readout`: checks the row stream in both modes, covering skipped rows
  and `out_last`.
* `tb_ca_controller`: checks the command outputs clock by clock against the
  step sequence, along with both counters.
* `tb_ca_region_extractor` (12 x 16) and `tb_ca_region_full` (default
  30 x 30, no parameter overrides): check every region's rows and bits
  against a flood-fill reference, in both modes. They also check the region
  count and the exact clock count. The images are the five-region scene, an
  all-boundary image with no regions, an empty image and random images. Each
  mechanism must occur at least once: several regions, outline readout,
  skipped rows, no regions, and restart from DONE.
* `tb_ca_scaling`: runs the full design at 8, 16, 24 and 40 pixels a side. It
  checks that the scene's processing time grows no faster than the side
  length.

To simulate with Verilator, for example the default-size test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ca_pkg.sv tb/ca_ref_pkg.sv tb/tb_ca_region_full.sv \
        --top-module tb_ca_region_full -o sim
    ./obj_dir/sim

The largest plane the testbenches exercise is 40 x 40. Much larger planes
(100 x 100 and up) give C++ models that take many minutes to compile.
