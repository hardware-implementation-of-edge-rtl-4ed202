# Hexagonal-grid CLAP edge detector

This is a small edge-detection engine for gray-level images. It works on a
*virtual hexagonal grid*. No hexagonal sensor is needed and nothing is
interpolated. The image is stored in the usual row-by-row order, and every odd
row is simply treated as if it sat half a pixel to the right of the even rows.
Each pixel then has six equidistant neighbours: two above, two beside and two
below.

Edges are found with the CLAP rule (Cellular Logic Array Processing). Several
small polygons of neighbours around the centre pixel, called *basis
structures*, are tested. A structure is *uniform* when the difference between
its largest and smallest gray value (the *gray distance* D) is at most a
threshold T. A pixel inside a uniform area is erased. A pixel whose
neighbourhood is uniform in no direction is kept as an edge. The engine
contains no multipliers, only comparators and subtractors. It produces one
edge bit every three clocks.

The same hardware can also treat the image as an ordinary rectangular lattice.
In that mode only the read addresses change (see *Lattice modes*).

## Data flow

```
            ld_*                                         rd_*
             |                                             ^
             v                                             |
 addr_gen -> input RAM -> demux_rblock -> s_block -> edge_detect -> output RAM
  (3 reads    (isys_mem)  (sel_counter,   (7-pixel   (C1..C5 and     (isys_mem,
  per step)               R1, R2, R3)     hex window) their AND)      1 bit/pixel)
                                                        border_clear -^
```

| module            | role |
|-------------------|------|
| `edge_hex`        | top: wires the pipeline, latches T and the lattice mode, runs the start/busy/done handshake, arbitrates the RAM ports |
| `isys_mem`        | single-port synchronous block RAM; one instance holds the input image, one holds the edge map |
| `addr_gen`        | scan sequencer; issues one read address per clock using right-edge or left-edge addressing |
| `sel_counter`     | modulo-3 selection counter (codes 00, 01, 10) |
| `demux_rblock`    | 1:3 demultiplexer into the column registers R1, R2, R3 |
| `s_block`         | hexagonal window registers S11, S12, S21, S22, S23, S31, S32 |
| `clap_comparator` | max, min, D = max − min and D > T for one basis structure |
| `edge_detect`     | the five comparators C1..C5 and their combination |
| `border_clear`    | writes 0 to the output pixels that no window is centred on |
| `hex_pkg`         | shared types: `lattice_e` (LAT_HEX / LAT_RECT) and `sel_e` (selection codes) |

## The hexagonal window and how it is read

This is the least obvious part of the design.

The window is held in seven registers arranged as three shift chains:

```
   top:        S11 -> S12
   middle:  S21 -> S22 -> S23
   bottom:     S31 -> S32
```

New pixels enter on the left of each chain, at S11, S21 and S31. They are the
newest and also the right-most pixels. S22 is the centre. Its neighbours are:

```
        S12   S11              (upper-left, upper-right)
     S23   S22   S21           (left, centre, right)
        S32   S31              (lower-left, lower-right)
```

The image is scanned in row bands. The band for centre row `r`
(r = 1 … H−2) reads rows r−1, r and r+1. A band has W steps. Step `s` reads
one pixel from each of the three rows, one per clock, in the order top,
middle, bottom. The three pixels are collected in R1, R2 and R3 and then moved
into the window together. After step `s` the window is centred on pixel
(r, s−1).

For the window to be a true hexagon, the two upper neighbours of the centre
must straddle it. Because odd rows are shifted right, the neighbours depend on
the parity of the centre row:

| centre row        | upper / lower neighbours of (r, x) | outer rows read in column | name |
|-------------------|------------------------------------|---------------------------|------|
| odd               | columns x and x+1                  | s (same as middle row)    | right-edge addressing |
| even              | columns x−1 and x                  | s−1 (one behind)          | left-edge addressing |

So the address generator alternates between the two patterns from one band to
the next. The middle row is always read in column `s`. On an even band the
outer rows lag one column. At step 0 of such a band the outer column would be
−1. That read is flagged `rd_pad` and its data is replaced by zero.

Example on an 8 × 8 image whose pixel values equal their addresses. The first
band has centre row 1, which is odd, so right-edge addressing is used. The
reads are 0, 8, 16, then 1, 9, 17, and so on. After the first two steps the
window holds:

```
after step 0:   S11=0  S12=0  | S21=8  S22=0  S23=0 | S31=16 S32=0
after step 1:   S11=1  S12=0  | S21=9  S22=8  S23=0 | S31=17 S32=16
```

The window is cleared at reset and again at the first step of every band. A
window at the left border therefore sees zeros outside the image.

## Basis structures and the edge decision

`edge_detect` tests five polygons of the window:

| comparator | pixels                | shape |
|------------|-----------------------|-------|
| C1         | S12, S21, S32         | triangle: upper-left, right, lower-left |
| C2         | S11, S31, S23         | triangle: upper-right, lower-right, left |
| C3         | S11, S21, S32, S23    | upper-right, right, lower-left, left |
| C4         | S12, S21, S31, S23    | upper-left, right, lower-right, left |
| C5         | S12, S11, S31, S32    | the four diagonal neighbours |

Each comparator outputs 1 when its gray distance is greater than T. The
centre is written as 1 (edge) only when all five give 1. CLAP erases the
centre as soon as any one structure is uniform, so this is an AND. The centre
pixel S22 is not in any of the polygons. Its own value does not affect the
result.

The edge map stores one bit per pixel. Three groups of output pixels are never
the centre of a window: row 0, row H−1 and column W−1. `border_clear` writes 0
to these `2W + H − 2` pixels. It uses the output RAM's idle clocks during the
scan, so it adds no run time.

## Lattice modes

`lattice = LAT_HEX` gives the alternating addressing described above.

`lattice = LAT_RECT` uses right-edge (column-aligned) reads for every band.
The image is then processed as an ordinary rectangular grid. The window, the
five polygons and the pipeline stay the same. In this mode the upper and lower
neighbours of (r, x) are always columns x and x+1.

## Timing

The pipeline has one stage per clock:

1. `addr_gen` drives the input RAM address.
2. The RAM word arrives and is steered into R1, R2 or R3.
3. When R3 has been written, the column moves into the S registers.
4. The comparators evaluate combinationally, and the bit is written into the
   output RAM.

One read is issued every clock and one result is written every three clocks.
`done` rises on the `3·W·(H−2) + 4`-th rising edge after the edge that
samples `start`. For the default 64 × 64 image this is 11,908 clocks. The
published implementation of this architecture ran at about 110 MHz on a
Cyclone II FPGA, which would make a frame about 109 µs. That clock rate is a
figure from that implementation and has not been measured for this RTL.

## Interface (`edge_hex`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse to scan the stored image once (ignored while busy) |
| `lattice` | in | `lattice_e` | LAT_HEX or LAT_RECT, sampled with `start` |
| `threshold` | in | PIX_W | T, sampled with `start` |
| `busy` | out | 1 | engine owns both RAMs |
| `done` | out | 1 | one-clock pulse when the edge map is complete |
| `ld_we`, `ld_addr`, `ld_data` | in | 1, AW, PIX_W | host writes input pixel `row*W + col` (ignored while busy) |
| `rd_addr` / `rd_data` | in / out | AW / 1 | host reads the edge map; data follows one clock later |

`AW = $clog2(IMG_W*IMG_H)`. To use the engine:

1. Load the image while `busy` is low.
2. Pulse `start`.
3. Wait for `done`.
4. Read the edge map back.

Two assertions in `edge_hex` check that the selection counter stays in step
with the address generator, and that results are only written while busy.

## Parameters

| parameter | default | notes |
|-----------|---------|-------|
| `IMG_W`, `IMG_H` | 64, 64 | the image size used on the FPGA in the original work; any size with IMG_H ≥ 4 works |
| `PIX_W` | 8 | gray-level width; a choice of this design |

At the defaults the input RAM is 4096 × 8 bits and the edge map is 4096 × 1
bit.

## What follows the original architecture, and what is chosen here

These parts follow the published architecture:

- the block structure: RAM, address generator, selection counter with a 1:3
  demultiplexer, R and S registers, and five comparators;
- the register names and the window shift order;
- the polygons of C1..C5;
- the D > T rule;
- the rate of three clocks per pixel;
- the 64 × 64 size;
- the right-edge and left-edge addressing by row parity;
- the 8 × 8 walk-through above.

These parts are choices made in this design:

- **AND of the five comparators.** The source draws a combining gate but does
  not name it. AND is the reading that matches the CLAP rule.
- **Two separate RAMs** for the input image and the edge map. With two RAMs a
  result can be written while the next column is read. The original reserved
  two halves of its block RAM for this purpose.
- **One bit per result pixel.**
- **Zero padding** outside the image.
- **Clearing the window** at the start of each band.
- **Border clearing** of the output RAM.
- **Pixel width** of 8 bits.
- **Handshake and host ports:** the start/busy/done handshake and the host
  load and read ports. The original loaded the image by other means and
  brought out only a few pins.
- **Rectangular mode reuses the five hexagonal polygons.** The original lists
  sixteen polygons for the rectangular lattice, but gives no comparator set for
  them.

Not included:

- a serial (RS232) or off-chip image loader;
- any display or resampling back to a rectangular screen;
- the other thirteen of the eighteen possible hexagonal basis structures (the
  hardware uses five).

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line.

- `edge_hex_tb` runs the default 64 × 64 engine end to end. It uses a
  synthetic image (ramp, disc, rectangle, diagonal band, noise) and a random
  image, on both lattices and with several thresholds. Every pixel of the edge
  map is compared with the reference model in `tb/edge_ref_pkg.sv`. That model
  works from pixel coordinates, not from register names.
- `edge_hex_tb` also checks the run length exactly. It checks that host writes
  and a second start during a run are ignored. It counts right-edge and
  left-edge bands, padded reads, border writes, edge and non-edge pixels, and
  fails if any of these never occurs.
- `edge_hex_fig_tb` replays the 8 × 8 walk-through. It checks both window
  states shown above, checks one window load every three clocks, and checks
  the full edge maps.
- The block testbenches (`addr_gen_tb`, `s_block_tb`, `edge_detect_tb`, …)
  check each unit against its own loop-nest or table model.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hex_pkg.sv tb/edge_ref_pkg.sv \
          tb/edge_hex_tb.sv --top-module edge_hex_tb
./obj_dir/Vedge_hex_tb
```

Replace `edge_hex_tb` with any other testbench name. The block testbenches do
not need `edge_ref_pkg.sv`, but including it is harmless. The 64 × 64 run
takes well under a second.
