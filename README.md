# DBSCAN primary-vertex finder for a hardware trigger

At a hadron collider with 200 interactions per bunch crossing, the first
trigger level has to find the *primary vertex*, the point on the beam line
where the hard collision happened, within a few hundred nanoseconds. Each
reconstructed track reduces to two numbers for this purpose: `z0`, where it
crosses the beam line, and its transverse momentum `pT`. The primary vertex
is then the densest, hardest group of tracks along `z0`.

This RTL finds it with DBSCAN clustering in one dimension, with
`minPts = 2` and a cluster radius `eps` (nominally 0.15 cm). The whole event
is processed in parallel by a fully pipelined circuit. A new event of up to
232 tracks can enter every clock cycle. The sorted list of vertices leaves
52 cycles later, which is 520 ns at 100 MHz.

## The idea: with minPts = 2, clustering is sorting

General DBSCAN grows clusters from core points through repeated neighbour
searches. With `minPts = 2`, every track that has any neighbour within `eps`
is a core point. In one dimension this gives a simple rule:

* Sort the tracks by `z0`.
* A cluster is then a maximal run of consecutive sorted tracks in which each
  track lies within `eps` of the one before it.
* A track with no neighbour within `eps` is noise and belongs to no cluster.

Each run can be found by comparing neighbouring lanes only. The rest of the
work is bookkeeping that sorting networks and a prefix sum do in parallel:

1. **Sort tracks by z0** (`track_sorter`).
2. **Mark run ends** (`boundary_finder`). For each lane `i` of the sorted
   event it computes
   `linked[i] = (z0[i] - z0[i-1] <= eps)`, with both tracks valid.
   `linked[0]` and `linked[N]` are taken as 0. Lane `i` is a boundary when
   `linked[i] xor linked[i+1]`. Every cluster then has exactly two
   boundaries, its first and its last track. A lone track has none. Each
   boundary lane writes its own lane number; every other lane writes
   "infinity" (all ones).
3. **Pair the ends** (`boundary_sorter`). Sorting those indices pushes the
   infinities to the back and leaves the real boundaries in track order.
   Entries `2k` and `2k+1` are then the first and last track of cluster
   `k`. An event of N tracks has at most N/2 clusters.
4. **Running pT sum** (`prefix_sum`). This runs at the same time as steps 2
   and 3. It computes `psum[i] = pt[0] + ... + pt[i]` over the sorted
   tracks, so any cluster's pT is one subtraction.
5. **Vertex per cluster** (`vertex_calc`). There are N/2 identical units.
   For cluster `a..b` the tracks are already in `z0` order, so the median
   can be read directly. With `m = (a+b)/2` it is `z0[m]` for an odd track
   count, and the mean of `z0[m]` and `z0[m+1]` for an even count. The pT
   sum is `psum[b] - psum[a-1]`. The median is used rather than the mean
   because clusters often have a skewed tail.
6. **Rank vertices** (`vertex_sorter`). The vertices are sorted by
   decreasing pT sum. Entry 0 is the primary vertex.

### Worked example

Take `eps = 15`, which is 0.15 cm, and nine sorted tracks:

| lane            |  0   |  1   |  2   |  3  |  4  |  5  |  6  |  7  |  8  |
|-----------------|------|------|------|-----|-----|-----|-----|-----|-----|
| z0 (0.01 cm)    | -520 | -510 | -300 | 100 | 108 | 112 | 400 | 700 | 712 |
| linked          |  0   |  1   |  0   |  0  |  1  |  1  |  0  |  0  |  1  |
| boundary        |  1   |  1   |  0   |  1  |  0  |  1  |  0  |  1  |  1  |
| boundary index  |  0   |  1   |  inf |  3  | inf |  5  | inf |  7  |  8  |

The indices sort to `0 1 3 5 7 8 inf ...`. This gives three clusters:
0..1, 3..5 and 7..8. Tracks 2 and 6 are noise. The medians are -515, 108
and 706.

## Sorting networks

All three sorts use `bitonic_sorter`, a generic pipelined bitonic network.
Together these networks are most of the design's logic.

* A network of `N` inputs is built for `NP = 2**clog2(N)` inputs. It has
  `clog2(N)*(clog2(N)+1)/2` levels of `NP/2` compare-exchange cells.
* The spare inputs carry the all-ones key, so they settle at the top end.
  Only the lowest `N` outputs are used.
* The all-ones key is therefore reserved for "empty". Every caller's key
  encoding gives empty entries that key.
* Phase `p` merges blocks of `2**(p+1)` elements. It runs sub-levels at
  distances `2**p` down to 1. A cell at lane `i` orders its pair ascending
  when bit `p+1` of `i` is 0, and descending otherwise.
* Equal keys come out in no defined order.

Each caller sets its key so that an ascending sort gives the order it needs.
Only the other fields travel as payload:

| network            | size (padded) | levels | key                        | payload |
|--------------------|---------------|--------|----------------------------|---------|
| `track_sorter`     | 232 (256)     | 36     | `{~valid, z0 ^ sign bit}`  | pT      |
| `boundary_sorter`  | 232 (256)     | 36     | boundary index (inf = all ones) | boundary flag |
| `vertex_sorter`    | 116 (128)     | 28     | `~{valid, pt_sum}`         | z0      |

Inverting the sign bit makes two's-complement `z0` sort as an unsigned
number. A leading `~valid` bit puts empty lanes behind all real tracks.
Inverting the whole vertex key turns the ascending sort into "largest pT
first, empty last".

## Pipeline and timing

A register follows every `REG_EVERY` compare levels (default 2), and also
the last level. Every block accepts a new event each cycle. A `valid` flag
travels with each event; reset clears only these flags.

| stage            | cycles (defaults) | formula                       |
|------------------|-------------------|-------------------------------|
| track_sorter     | 18                | ceil(36 / REG_EVERY)          |
| boundary_finder  | 1                 |                               |
| boundary_sorter  | 18                | ceil(36 / REG_EVERY)          |
| vertex_calc      | 1                 |                               |
| vertex_sorter    | 14                | ceil(28 / REG_EVERY)          |
| **total**        | **52**            | 520 ns at 100 MHz             |

The `prefix_sum` takes 4 cycles, `ceil(clog2(N) / REG_EVERY)`. It starts
when the tracks leave `track_sorter`, and its result is then delayed 15
cycles so that it meets the boundary pairs of the same event. Two other
`pipe_delay` lines run beside the sorters:

* `eps`, delayed by the track sort latency;
* the sorted `z0` values, delayed by the boundary path latency.

An assertion in the top checks that the prefix sums and boundary pairs
arrive together.

A reference FPGA build of this algorithm, at 100 MHz with 232 tracks,
reports 0.73 µs per event, which is 73 cycles. This pipeline is inside that
figure. Setting `REG_EVERY = 1` doubles the register depth, to 102 cycles,
and gives a higher possible clock frequency.

## Number formats

Defined in `dbscan_pkg`. These formats are this design's choice. The method
itself fixes only `eps = 0.15 cm` and `minPts = 2`.

| field       | type                          | unit / range                    |
|-------------|-------------------------------|---------------------------------|
| `z0`        | 12-bit two's complement       | 0.01 cm, ±20.47 cm              |
| `pt`        | 16-bit unsigned               | any fixed unit                  |
| `pt_sum`    | 27-bit unsigned               | enough for 2048 full-scale tracks |
| `eps`       | 12-bit unsigned               | same unit as `z0`; 15 = 0.15 cm |

`track_t` is `{valid, z0, pt}`. `vertex_t` is `{valid, z0, pt_sum}`.

An even-count median is the mean of the two middle values, rounded towards
minus infinity.

## Top-level interface (`dbscan_pv_top`)

| port             | dir | type                       | meaning |
|------------------|-----|----------------------------|---------|
| `clk`, `rst_n`   | in  | logic                      | clock; asynchronous active-low reset |
| `in_valid`       | in  | logic                      | an event is present this cycle |
| `in_tracks`      | in  | `track_t [N_TRACKS]`       | tracks in any lane order; unused lanes `valid = 0` |
| `in_eps`         | in  | `logic [11:0]`             | cluster radius for this event |
| `out_valid`      | out | logic                      | a result is present |
| `out_vertices`   | out | `vertex_t [N_TRACKS/2]`    | vertices by decreasing pT sum, valid ones first |
| `out_primary`    | out | `vertex_t`                 | `out_vertices[0]`, the primary vertex |
| `out_n_vertices` | out | `logic [6:0]`              | number of valid vertices |

Parameters:

* `N_TRACKS` (default 232) sets the number of track lanes. There are half
  as many vertex slots.
* `REG_EVERY` (default 2) sets the pipeline depth.

Each sub-block can be used on its own. Its file header gives its ports and
latency.

## Size and limits

* **Resources.** The three networks hold about 4600 + 4600 + 1800
  compare-exchange cells. The sorter stage registers and the delay lines
  hold roughly 420 k flip-flop bits at the defaults.
* **More tracks.** A full-occupancy event of about 1665 tracks needs
  `N_TRACKS = 1665`. That means 2048-input networks of 66 levels each,
  which is well beyond one large FPGA. The parameter allows it, but it is
  not the intended use.
* **Batching.** Processing tracks in batches would need cluster merging
  across batches, and it is not implemented.
* **Equal pT sums.** Vertices with equal pT sums may appear in either
  order. The primary vertex is then one of them.
* **Track association.** The output is the vertex list. The design does
  not output which tracks belong to the primary vertex, although the
  boundary pairs and the sorted tracks inside the pipeline hold that
  information.
* **What is not included.** The transport that delivers tracks to the
  chip, such as a PCIe host link or optical trigger links, is not part of
  this RTL.

## Files

* `rtl/dbscan_pkg.sv`: formats, `track_t` and `vertex_t`, latency functions.
* `rtl/bitonic_sorter.sv`: generic pipelined sorting network.
* `rtl/track_sorter.sv`, `rtl/boundary_finder.sv`, `rtl/boundary_sorter.sv`,
  `rtl/prefix_sum.sv`, `rtl/vertex_calc.sv`, `rtl/vertex_sorter.sv`: the
  steps above.
* `rtl/pipe_delay.sv`: alignment delay lines.
* `rtl/dbscan_pv_top.sv`: the complete finder.
* `tb/dbscan_ref_pkg.sv`: a sequential reference model. It sorts, cuts the
  list at gaps larger than `eps`, takes medians and sums, and ranks. It
  shares no code with the RTL.
* `tb/tb_<block>.sv`: a self-checking testbench for each block.

## Verification

Each testbench compares its block with the reference model or with direct
calculations on random data. Each one also checks the latency in cycles and
ends by printing `TB_RESULT checks=<n> failures=<n>`.

* **Sorters.** The sorter tests use small or odd sizes (13, 16, 20, 10),
  many ties and empty entries.
* **Boundary finder.** It is tested with gaps of exactly `eps`.
* **Vertex calculation.** It is tested with clusters of odd and even size.
* **Prefix sum.** It is also run at the full 232 lanes.

`tb_dbscan_pv_top` runs the complete design at its default size, with 232
lanes. It feeds 80 pile-up-like events, back to back and with gaps, and
includes these special cases:

* a full event of 232 tracks;
* 116 two-track clusters, which fills every vertex slot;
* noise only;
* an empty event;
* several values of `eps`.

For each event it checks every vertex, the primary vertex, the count, and
the 52-cycle latency against the 73-cycle bound. It also counts how often
each of these cases occurred, and fails any that never did.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_dbscan_pv_top rtl/dbscan_pkg.sv tb/dbscan_ref_pkg.sv \
    tb/tb_dbscan_pv_top.sv
./obj_dir/Vtb_dbscan_pv_top
```

Use the same pattern for `tb_bitonic_sorter`, `tb_track_sorter` and the
other testbenches. The full-size top needs a few minutes to compile; the
simulation itself takes well under a second.
