# Raw-bank SuperPixel clustering engine

This engine finds clusters of hit pixels in the LHCb VELO pixel detector. It
works directly on the *raw banks* that the detector front end already produces,
without first unpacking them into a pixel map. The detector groups pixels into
**SuperPixels (SPs)** of 2 × 4 pixels, and a sensor has 192 × 128 SPs. A raw
bank lists each hit SP of one sensor as a 36-bit word.

Most clusters lie inside one SP that has no hit neighbour. The raw bank marks
such SPs with a *hint* bit, so the engine splits its work in two:

* **Isolated SPs** (`HINT = 0`). All clusters of the SP are inside its 8
  pixels. They are read in one cycle from a 256-entry table addressed by the
  pixel pattern.
* **Non-isolated SPs** (`HINT = 1`). These are buffered, then gathered into
  small *reading matrices* of 5 × 3 SPs (10 × 12 pixels). In each matrix the
  engine finds *seed* pixels. It builds a 3 × 3 *cluster candidate* from each
  seed and looks the candidate up in a 512-entry table.

Each cluster comes out with a centroid, a time stamp and a 3-bit topology
flag. The flag tells downstream software how far the cluster can be trusted.

```
             in_word ─► rb_dispatch ─┬─HINT=0─► isp_clusterer ─► isp_cl[2]   (flag Isolated)
              (36 b)                 │            └ isp_lut (256 entries)
                                     └─HINT=1─► sp_cache ─► matrix_pool ─► nsp_cl   (flags 000..011)
                                                 (FIFO)       │  sp_matrix × NMAT
                                                              │  cluster_builder └ cc_lut (512 entries)
                                                              └─ no free matrix ─► isp_clusterer ─► ovf_cl[2] (flag Overflow)
```

## Data formats (`sp_pkg`)

SP word, most significant bit first:

| bits    | field  | meaning                                   |
|---------|--------|-------------------------------------------|
| 35      | hint   | 0 = isolated SP, 1 = a neighbouring SP is hit |
| 34:23   | t      | 12-bit SP time                            |
| 22:15   | col    | SP column, 0..191                         |
| 14:8    | row    | SP row, 0..127                            |
| 7:0     | pix    | pixel pattern                             |

Pixel bit `i` of an SP is local column `i / 4` and local row `i % 4`:

```
  3 7
  2 6
  1 5
  0 4
```

The absolute pixel coordinates are `x = 2·col + i/4` (0..383) and
`y = 4·row + i%4` (0..511). The field widths, the sensor size and the pixel
numbering come from the format definition. Reading the 8-bit field as the
column is an inference: it needs 8 bits for 192 columns, and the row needs
7 bits for 128.

A cluster (`cluster_t`, 39 bits) has these fields:

* `x` and `y`: 12-bit centroids in pixel units, with 3 fractional bits,
  rounded to the nearest 1/8 pixel.
* `t`: the 12-bit time.
* `flag`: the 3-bit topology flag.

| flag | meaning                                     |
|------|---------------------------------------------|
| 101  | Isolated: from an isolated SP via the 8-bit table |
| 100  | Overflow: SP found no free matrix and was clustered alone |
| 011  | self-contained, touches the matrix edge     |
| 010  | self-contained, away from the edge          |
| 001  | not self-contained, touches the matrix edge |
| 000  | not self-contained, away from the edge      |

Pixels belong to the same cluster when they touch along a side or at a corner
(8-neighbourhood).

## The matrix path in detail

This is the part that needs the most explanation.

### Filling the matrices (`matrix_pool`, `sp_matrix`)

Non-isolated SPs leave the SP cache one per clock cycle. They travel on a
*distribution line* that passes every matrix. Each SP is handled by the first
rule that applies:

1. If one or more matrices hold a window that contains the SP, the SP is
   written into the lowest-numbered of them. Its pixels are ORed into that
   matrix's 10 × 12 pixel array.
2. Otherwise the lowest-numbered empty matrix opens a window around the SP.
   The window's lower-left SP is at (col − 2, row − 1), clamped so that the
   window stays on the sensor. This puts the SP in the middle of the window.
3. Otherwise the SP goes to a second `isp_clusterer`, which clusters it as if
   it were isolated. Its clusters are flagged **Overflow**.

Each 5 × 3 slot of a matrix keeps the time of the first SP written into it.

The raw bank ends with a cache entry marked `eoe`. The dispatcher writes that
entry on the bank's last word. If that word is isolated, the entry is a bare
marker with no SP in it.

### Seeds

Once the bank has ended, the pool stops reading the cache. It hands the used
matrices, one after another, to `cluster_builder`. The cache keeps accepting
the next bank during this readout, and the input stalls only when the cache is
full.

A pixel at (x, y) is a **seed** when both of these hold:

* the pixel is active;
* its five lower-left neighbours, (x−1, y+1), (x−1, y), (x−1, y−1), (x, y−1)
  and (x+1, y−1), are all empty.

This puts one seed at the lower-left end of every compact cluster.

A cluster that runs from upper-left to lower-right breaks this rule. Take a
pair at (x, y+1) and (x+1, y): each pixel has the other as a lower-left
neighbour, so neither is a seed. The **off-diagonal pattern** catches this
case. It makes the *empty* position (x, y) a seed when (x, y+1) and (x+1, y)
are active and the same five neighbours are empty. Pixels outside the matrix
count as empty. The output `nsp_diag` marks the clusters found this way.

### Candidate, table and flags

The cluster candidate is the 3 × 3 square whose lower-left pixel is the seed.
Its bits are numbered

```
  2 5 8
  1 4 7
  0 3 6
```

`cc_lut` maps the 9 bits to two things:

* a mask of the pixels of the seed's cluster inside the square (grown from
  bit 0, or from bit 1 for the off-diagonal pattern);
* the centroid of those pixels relative to the seed.

The builder then derives the two flag bits:

* **self-contained**: no active pixel in the ring just outside the square
  touches the cluster;
* **edge**: one of the cluster's pixels lies in the outermost pixel row or
  column of the matrix.

The cluster's time is the time of the SP that holds the seed pixel. For the
off-diagonal pattern it is the SP of the pixel above the seed.

Timing: `start` snapshots every seed of the matrix at once. The lowest-numbered
pending seed (number x·12 + y) becomes one registered cluster per clock cycle.
A matrix with n seeds therefore takes n + 1 cycles, plus two cycles of pool
sequencing. When every matrix has been read out, all of them are cleared and
`event_done` pulses.

### What the flags imply

A cluster that is not self-contained may be cut by the 3 × 3 candidate, and
the rest of it may have produced further seeds. A cluster at the edge may
continue into a neighbouring window. Overflow clusters are only correct when
the whole cluster lies inside one SP. On random test events, many clusters
are split in these ways. The testbenches print how many clusters of a full
flood-fill reconstruction are found with an identical centroid.

## Modules

| module | role | timing |
|---|---|---|
| `sp_pkg` | types, flag codes, constant functions that compute both tables | — |
| `rb_dispatch` | splits words by hint; `in_ready` drops only when a cache write is needed and the cache is full | combinational |
| `isp_lut` | 256-entry table: cluster count (≤ 2) and local centroids | combinational |
| `isp_clusterer` | one SP per cycle → up to two clusters; flag Isolated or Overflow | 1 cycle |
| `sp_cache` | FIFO with first-word fall-through, `DEPTH` entries of {eoe, has_sp, word} | 1 write + 1 read per cycle |
| `sp_matrix` | one reading window: hit test, allocation, pixel OR, slot times | 1 cycle per SP |
| `cc_lut` | 512-entry table: seed cluster mask and centroid | combinational |
| `cluster_builder` | seed search, candidate, flags, one cluster per cycle | see above |
| `matrix_pool` | distribution line, allocation and overflow, readout sequencing | 1 SP per cycle while filling |
| `rb_cluster_top` | the whole engine | — |

Both tables are built during elaboration. Each entry is a constant-function
call in `sp_pkg` (`isp_lut_entry`, `cc_lut_entry`) that flood-fills the
pattern. They are stored as `localparam`s, so synthesis infers a ROM and no
data file is needed.

Top-level parameters:

| parameter | default | origin |
|---|---|---|
| `MCOLS` × `MROWS` | 5 × 3 SPs | from the design |
| `NMAT` | 16 | own choice |
| `CACHE_DEPTH` | 512 | own choice |

The sensor size, the word layout and the table sizes (8 and 9 address bits)
are fixed by the design.

## Where this implementation makes its own choices

These parts follow the design description:

* the hint split;
* the table-based clustering of isolated SPs;
* the 5 × 3 matrices filled from a distribution line;
* the seed-plus-3 × 3-candidate method with a 9-bit table;
* the off-diagonal pattern and its later form, which includes the (x−1, y−1)
  corner;
* the flag codes.

These are this implementation's own choices:

* the centroid format and its rounding;
* the table contents, which are derived from 8-connectivity;
* the exact tests for self-contained and edge;
* where a new window is placed;
* the number of matrices and the cache depth;
* treating an SP with no free matrix as a lone SP flagged Overflow;
* the end-of-bank marker;
* the seed processing order;
* keeping the three output streams separate, without merging them.

Some things are not modelled:

* per-sensor pixel orientation (every sensor uses the layout above);
* the front end that builds raw banks and sets the hint bit;
* any merging of clusters across matrices.

The 12-bit SP time is carried through unchanged. The physics time range may
need only 10 bits.

## Simulation

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.
Build one with plain Verilator by listing the packages first and letting it
find the modules by name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/sp_pkg.sv tb/ref_pkg.sv tb/rb_model_pkg.sv tb/rb_cluster_top_tb.sv \
  --top-module rb_cluster_top_tb
./obj_dir/Vrb_cluster_top_tb
```

Testbenches that do not use the reference packages need only `rtl/sp_pkg.sv`
(and `tb/ref_pkg.sv` where they import it) before their own file.

| testbench | what it checks |
|---|---|
| `isp_lut_tb`, `cc_lut_tb` | all 256 / 512 table entries against a stack-based flood fill |
| `isp_clusterer_tb` | random SPs, absolute centroids, flags, one-cycle latency |
| `rb_dispatch_tb` | routing and ready by hint and last |
| `sp_cache_tb` | against a queue model, including full and empty |
| `sp_matrix_tb` | window hits, pixel placement, first-time per slot, clear |
| `cluster_builder_tb` | random matrices with planted off-diagonal pairs; seeds, clusters, flags, and the n + 1-cycle readout |
| `matrix_pool_tb` | random banks with 4 matrices; clusters, overflow, allocation and join counts |
| `rb_cluster_top_tb` | 80 back-to-back banks, cache 16, 4 matrices (see below) |
| `rb_cluster_top_full_tb` | default parameters, whole-sensor events of 150–400 pixel groups |

In `rb_cluster_top_tb` every mechanism must occur at least once:

* isolated SPs with one and with two clusters;
* allocation, join and overflow;
* the off-diagonal seed;
* each of the four matrix flags;
* cache-full stalls.

The end-to-end testbenches use `tb/rb_model_pkg.sv`. It is an event-level
behavioural reference that builds raw banks from random hit maps (hint = any
of the 8 neighbouring SPs hit). It predicts all three cluster streams in order
and runs a software flood-fill reconstruction for comparison.
