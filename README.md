# K-Best MIMO detector with on-demand expansion (4x4, 64-QAM)

This is synthesizable SystemVerilog for a hard-decision MIMO detector. It
recovers the symbol vector `s` sent from `NT` antennas from `y = H s + n`. It
uses a breadth-first (K-Best) tree search in the complex domain. The key idea
is *on-demand expansion*. A classic K-Best layer computes the distance of
every child of every surviving parent (K x M nodes for M-QAM) and sorts them
all. Here a layer computes only a few nodes per parent. It then grows its
candidate list one node at a time: a node's next sibling is visited only
after the node itself has been selected. This gives a fixed number of
cycles per layer whatever the SNR, and a short list to search, even for
high-order QAM.

Default configuration: 4 x 4 antennas, 64-QAM, K = 10 survivors per level,
RSE_NUM = 3 extra rows per parent in the inner layers. K and RSE_NUM are
this design's own choices; no values were available for them.

## The search, level by level

After QR decomposition `H = QR` the detector works on `z = Q^H y` and the
upper-triangular `R`. It decides the symbols from the last row of `R` (tree
level NT, the root) down to level 1. For a partial path `s_NT .. s_{i+1}`
(a *parent*), level i has the centre

    L_i = (z_i - sum_{j>i} r_ij s_j) / r_ii

and a child `s_i` costs a partial Euclidean distance (PED)

    PED_i = PED_{i+1} + |r_ii|^2 * |L_i - s_i|^2 .

The words below are used throughout the RTL:

* **FC (first child)**: the constellation point nearest to `L_i`, found by
  rounding each axis to the nearest odd integer and clipping to the grid.
* **Row**: the `sqrt(M)` points that share one imaginary coordinate. Inside
  a row the PED depends only on the real distance, so the best point of
  *any* row lies in the FC's column.
* **Level-2 nodes**: the best points of other rows, that is, the FC column in
  the rows nearest to `L_i`, taken in Schnorr-Euchner (SE) order across
  rows.
* **SE step**: the points of a row already visited always form a run
  `[lo, hi]` of odd coordinates around the slice of `L_i`. The next nearest
  one is `lo-2` or `hi+2`, whichever is closer and inside the grid
  (`se_next`).
* **List L**: the candidate register bank of a layer. Selecting a node from
  L (a *pop*) replaces it with its next sibling in its row, computed by one
  SE step and one PED.

The levels then work like this:

| Layer | Work per vector | Result |
|---|---|---|
| Layer NT (`layer_nt`) | L holds the FC of `z_NT` plus the best point of each of the other `sqrt(M)-1` rows; then K pops | the exact K best root nodes, sorted |
| Layers NT-1..2 (`layer_mid`) | for each of the K parents: `L_i`, FC, and RSE_NUM Level-2 nodes into L (`|L| = K(RSE_NUM+1)`); then K pops | the K best children among all points of the admitted rows, sorted |
| Layer 1 (`layer_one`) | FC and its PED for each of the K parents | the path with the lowest PED is the decision `s_hat` |

Each row's points come out of the SE steps in order of non-decreasing PED,
and every row's best unvisited point is always in L. So K pops return exactly
the K smallest PEDs of all points in the admitted rows, while visiting only
about K extra nodes. The root layer admits every row, so its K survivors are
exact. An inner layer admits RSE_NUM+1 rows per parent, and this is where the
search can lose the true solution. Raising RSE_NUM to `sqrt(M)-1` makes each
inner layer an exact K-best step, at the cost of a longer list.

The PED order does not depend on fixed-point truncation: the squared distance
and the product are each truncated, and both steps stay monotone in
`|L - s|`.

## Hardware structure

```
           z_bar, r_bar, e
                 |
           control_unit ---- start[l], row l of the vector in stage l
                 |
 layer_nt --> layer_mid(LVL=2) --> layer_mid(LVL=1) --> layer_one --> s_hat
 FC, NC,      Li calc, FC, NC,     Li calc, FC, NC,     Li calc, FC,
 list L,      list L, Sorter1,     list L, Sorter1,     PED calc,
 Sorter1,     Sorter2 & Shifter    Sorter2 & Shifter    Sorter1
 Sorter2 & Shifter
```

| Module | Role |
|---|---|
| `kbest_detector` | top; wires the control unit and NT layers (generated for any NT >= 3) |
| `control_unit` | frame counter, accept window, one stage of channel data per layer, start pulses |
| `layer_nt`, `layer_mid`, `layer_one` | the three kinds of layer above |
| `li_calc` | `L_i` of one parent; LVL sets how many products are used |
| `fc_block` | mapper (nearest odd integer) and limiter (clip) on each axis |
| `nc_block` | FC plus Level-2 nodes of one parent with their PEDs |
| `ped_calc` | one PED update, saturating |
| `node_list` | list L with pop-and-replace; contains `sorter1`, one `se_next` and one `ped_calc` |
| `sorter1` | lowest-PED valid entry; ties go to the lower index |
| `sorter2_shifter` | K-slot insertion sorter that holds a layer's output parents |
| `se_next` | one SE step along an axis |
| `kbest_pkg` | default sizes and width helper functions |

### Timing

All layers start together once per *frame* of `2K+2` cycles (22 at the
defaults), and each layer works on a different vector.

* `control_unit` raises `in_ready` in the last cycle of every frame. If
  `in_valid` is high then, it takes the vector and shifts every stage down
  one layer. In the next cycle it pulses `start` for each layer whose stage
  holds a valid vector.
* After the edge that samples `start`:
  * `layer_nt` loads L in 1 cycle and pops K times: done K+1 edges later.
  * `layer_mid` expands one parent per cycle through two stages (Li Calc.,
    then FC and NC into L), which takes K+1 cycles. It then pops K times:
    done 2K+1 edges later.
  * `layer_one` runs the same two stages (Li Calc., then FC and PED Calc.)
    and registers the minimum: `out_valid` K+2 edges later.
* A layer copies its upstream parents at its own `start` edge. That is the
  same edge at which the upstream layer clears itself for the next vector.

Throughput is one vector per frame. At a clock of f MHz that is
`f / 22` million vectors/s, or `f/22 * 4 * 6` Mbit/s for 4x4 64-QAM. The
result appears `(NT-1)*(2K+2) + K + 3 = 79` cycles after the accepting edge,
as a one-cycle `out_valid` pulse. There is no back-pressure on the output.
An idle frame (no `in_valid` in the accept window) travels down as a bubble.

## Interface and number format

The divider is kept out of the datapath by scaling the inputs. For row i:

* `z_re/z_im[i] = (Q^H y)_i / r_ii`
* `r_re/r_im[i][j] = r_ij / r_ii` for j > i; the diagonal and lower part are
  ignored
* `e[i] = r_ii^2`, where `r_ii` is real and positive as in the usual QR

All three are 16-bit words with 10 fractional bits (range +-32); `e` is
unsigned. Symbols are odd integers in `[-7, 7]`, as 4-bit signed values.
`s_hat_re/im[j]` is the symbol of tree level j+1, i.e. antenna j in the QR
order. `out_ped` is the squared distance of the decision, 32 bits with 10
fractional bits, and saturates at all ones. Reset is asynchronous and active
low. All module parameters have typed defaults taken from `kbest_pkg`.
`SQRT_M` selects the QAM order (`SQRT_M = 16` for 256-QAM). For that order,
widen `DW` as well, because the centres can exceed +-32.

After coarse synthesis with yosys the default top has about 4,050 word-level
cells and 13,000 flip-flop bits. Most of the flip-flops are the two inner
lists L: 40 entries, each holding its path, PED, parent PED and centre.

## Where this design departs from, or fills in, its source

The architecture (the layers, the block names and order, and Steps I-III
of the search) follows a published description of this detector. These
points are this design's own reading or choice:

* **Constellation.** The architecture was presented as a 4x4 64-QAM
  detector, and a 256-QAM version was also mentioned. 64-QAM is the default.
* **K, RSE_NUM, widths, rounding, saturation, reset**: not specified, so
  chosen here.
* **Level-2 nodes and siblings.** The Level-2 nodes are read as the FC
  column of other rows. Sibling visits are read as SE steps inside the
  selected node's row. The source's wording names both "row" and "column"
  enumeration.
* **Li Calc. and NC** were described as fully pipelined, with no stage
  count given. Here one register separates Li Calc. from the FC/NC (or
  FC/PED) stage, and a layer handles one parent per clock. Deeper
  pipelining would shorten the clock period and add a cycle per stage;
  the frame has no spare cycle for it in the inner layers.
* **Layer 1** finds only the minimum of the K first children. A full sort of
  them is described, but only its first element is used.
* **Control unit.** Only its name and its role of feeding `z` and `r` are
  given. The frame scheme is this design's own.
* `nc_block` is also used in the root layer, with all rows admitted.
* The `done`, `ev_clip` and `ev_sibling` outputs of the layers are
  observation points for verification. The top leaves them unconnected to
  its ports.

No clock rate, throughput, area or BER figures were available to check the
design against.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/kbest_ref_pkg.sv` is a bit-true
reference model built in a different way from the RTL. Each layer enumerates
*every* point of every admitted row of every parent and sorts all of them.
The on-demand hardware is therefore checked against the exhaustive set it
must match.

* `tb_kbest_detector` runs the top at its default parameters. It sends 120
  vectors with idle frames, low and high noise, and root centres far off the
  grid. It checks:
  * every `s_hat` and `out_ped` exactly against the reference;
  * that low-noise vectors return the transmitted symbols;
  * the latency of every result (79 cycles) and the accept window.

  It also requires each mechanism to occur at least once: a full pipeline,
  an idle frame, sibling visits in the root and inner layers, an exhausted
  row, and limiter clipping.
* `tb_kbest_detector_256qam` runs the same end-to-end test on 256-QAM
  (`SQRT_M = 16`, `DW = 18`).
* `tb_node_list` drains a loaded list completely. The pop sequence must
  equal the sorted list of all points in the admitted rows.
* The layer testbenches check the K outputs against the reference and the
  cycle at which `done` or `out_valid` arrives.
* The unit testbenches compare against direct computations: nearest-point
  search, PED formula, `L_i` with 64-bit integers, minimum scan, stable
  insertion sort, and the frame and stage behaviour of the control unit.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/kbest_pkg.sv tb/kbest_ref_pkg.sv tb/tb_kbest_detector.sv \
    --top-module tb_kbest_detector
./obj_dir/Vtb_kbest_detector
```

Replace `tb_kbest_detector` with any other testbench name. Each testbench
finishes in well under a second. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/kbest_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are the unused observation signals in the top,
unused high bits of an intermediate in `fc_block`, and `rst_n` being used
both as the asynchronous reset and in the `disable iff` of an assertion.
Linting `kbest_pkg` on its own also reports its default constants as unused.
