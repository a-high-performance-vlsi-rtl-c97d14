# Histogram peak-climbing clustering processor

This is synthesizable SystemVerilog for a special-purpose processor that
clusters a video frame's feature vectors without supervision. It uses the
histogram peak-climbing method. Each of the J feature vectors has N
dimensions. The processor quantises every dimension into Q levels, which
places each vector in a cell ("bin") of an N-dimensional histogram. It then
counts how many vectors share each bin. Finally it labels every vector with
the coordinates of the densest bin that its neighbourhood leads to. Vectors
with the same label form one cluster, so reading the labels in raster order
gives the frame's segmentation map.

The architecture behind this RTL is the one published as *A High-Performance
VLSI Architecture for the Histogram Peak-Climbing Data Clustering Algorithm*.
Its main idea is to make the work grow linearly with J instead of with J².
The per-dimension steps run N-wide in parallel. The steps that compare every
vector with every other vector run J-wide: one reference vector is broadcast
per cycle to J processing elements. A frame therefore takes about 6·J + N
clock cycles. The default configuration is the DVD-resolution target:
702 × 576 pixels, 8 × 8 feature windows with a step of 4, which gives
JV = 143 rows by JH = 174 columns of windows, J = 24 882 vectors, and N = 22
feature dimensions.

## The five steps

| step | what runs | cycles | result goes to |
|---|---|---|---|
| Min-Max | N Min-Max elements, one per dimension: a minimum pass, then a maximum pass over the frame memory | 2J (+1 read latency) | bank B (min), bank C (max) |
| Cell size | one element, reused for each dimension: CS(k) = (max − min) · (1/Q) | N | bank C (CS overwrites max) |
| Index | N index elements: 3-bit bin index of each sample | J (+1 read latency) | bank D: coordinates, label |
| Density | J density elements + ones compressor, one reference vector per cycle | J | bank D: count, binned flag |
| Link / cluster | J link elements + J:1 maximum tree, one reference per cycle, in two passes | 2J − 1 | bank D: label, count |

The controller (`hpc_controller`) runs the steps strictly one after another.
With `done` included, `busy` stays high for **6J + N + 2** cycles:
149 316 cycles for the default frame. The architecture's own count is
6J + N − 1 steps. The three extra cycles are one read-latency cycle in each of
the two steps that read the synchronous frame memory, plus the `done` cycle.
At 30 frames/s the default frame needs a clock of at least
30 × 149 316 ≈ 4.48 MHz.

## Storage: register groups A to D

* **A**: N single-port synchronous memories of J × 32 bits (`feature_mem`),
  one per dimension. The frame is written into them while the processor is
  idle. The read data appears one clock after the address.
* **B and C**: two N × 32-bit register banks (`reg_bank_bc`). B holds the
  running minimum and then the final minimum. C holds the running maximum
  and is then reused for the cell sizes. The Min-Max elements have no
  registers of their own: they only decide when B or C takes the sample.
* **D**: J entries (`reg_bank_d`), each of 2·3·N + 1 + ⌈log2(J+1)⌉ bits.
  For the default that is 148 bits per entry, 3.68 Mbit in total. An entry
  holds the bin coordinates, the label (the "linkto" coordinates), the
  binned flag and the count. Every entry is visible in parallel, because the
  density and link steps read all J entries in every cycle.

## Number formats and the two cheap arithmetic steps

Samples are 32-bit two's complement numbers with one integer bit and 31
fraction bits, so they lie in [−1, +1). Q is restricted to 3..8. This
restriction lets both arithmetic steps avoid a full divider:

* **Cell size** (`cs_pe`): CS = (max − min) × floor(2^31 / Q) / 2^31. The
  reciprocals come from a six-entry table (`hpc_pkg::q_inverse`). The range
  max − min can reach almost 2, so it is formed on 33 bits. The result is
  below 2/3 and fits the 1.31 format again.
* **Index** (`index_pe`): the index is (f − min) / CS. A restoring divider
  with only three stages computes it, because an index of 0..7 needs only the
  three quotient bits of weight 4, 2 and 1. The sample equal to the maximum
  gives a quotient of Q, because CS is rounded down. It is placed in the top
  bin Q − 1, so every index fits 3 bits even for Q = 8. A quotient of 8 or
  more saturates the same way. A dimension whose samples are all equal
  (CS = 0) gives index 0.

## The density step

Every vector has a density element (`density_pe`). In cycle i, vector i's
coordinates and binned flag are broadcast to all elements. Each element
computes

    UPDATE = NOR(BINNED_ref, NOT (coord_own == coord_ref))

In words, an element updates when it is in the reference's bin and the
reference has not been binned yet. The ones compressor (`ones_compressor`)
counts the UPDATE bits. It starts with a layer of full adders over groups of
three bits, followed by a balanced tree of adders of growing width
(`sum_tree`). The count is written, together with the binned flag, into every
vector that raised UPDATE.

The first time a bin's member is the reference, the whole bin is counted and
marked in one cycle. Later references from the same bin find the flag set
and change nothing. After J cycles every vector holds the density of its own
bin, counting itself. The architecture draws a separate (J−1):1 multiplexer
inside each element. This RTL shares one J:1 multiplexer for the reference,
which gives the same values.

## The link step: how labels travel

This step is the hardest part to follow. At its start, every vector's label
is its own bin and its count is its bin's density. Then 2J − 1 reference
steps run: vectors 0, 1, …, J−2 (low to high), then J−1, …, 0 (high to low).
In each step, with reference s:

1. Every link element j (`link_pe`) tests whether bin(j) and bin(s) are
   **neighbours**: every coordinate differs by at most one. This bounds their
   distance by √N without computing it. A bin is its own neighbour.
2. The element compares the counts (`count(s) > count(j)`). It passes on the
   label and count of the larger, or its own on equal counts. The result is
   ANDed with the neighbour bit, so a non-neighbour offers count 0.
3. The J:1 tree of MAX elements (`cluster_max_tree` of `cluster_max_pe`)
   picks the candidate with the largest count. On equal counts the input
   with the higher index wins.
4. The winning label and count are written into the reference **and every
   neighbour** of it. The neighbour bit is the write enable.

Counts never decrease, so a label can only be replaced by one whose bin is
denser. In the first pass a dense label spreads towards higher indexes. The
second pass carries it back to vectors that were visited before the label
reached their neighbourhood. At the end each vector's label is the bin
coordinates of the densest bin its chain of neighbourhoods reached, and its
count is that bin's density. That bin is normally a mode
(local peak) of the histogram; the exceptions are listed below.

Two properties of this rule matter when using the results:

* It follows the hardware description: the maximum tree's winner becomes the
  label of all neighbouring vectors, and both the label and the count are
  overwritten. A pseudocode form of the algorithm differs from it. There,
  each vector links only to its densest neighbouring *bin*, comparing that
  bin's own density with the vector's current best. That form gives a
  one-hop link and keeps a separate "linkto count". Bank D has no field for
  such a count, so this RTL implements the propagating rule.
* Because labels propagate as a running maximum along chains of neighbouring
  bins, two touching hills of the histogram can end up with the label of the
  higher one. Two passes do not make every possible chain converge: a chain
  whose order alternates against both pass directions can stop part way. The
  testbenches compare with a model of exactly this rule, not with an ideal
  peak climb.

The neighbour test is the function `hpc_pkg::bins_are_neighbors`, written
inline in every link element. A separate sub-module per element is
avoided because it inflates the elaboration memory at J = 24 882.

## Interface and timing (`hpc_cluster_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of control state and banks B/C |
| `in_we`, `in_addr`, `in_data` | in | 1, ⌈log2 J⌉, N×32 | write vector `in_addr` (all N samples) into memory A; only while `busy` is low (an assertion flags violations) |
| `start`, `q` | in | 1, 4 | start a frame with Q levels; `q` is sampled at `start` and clamped to 3..8 |
| `busy`, `done`, `phase` | out | 1, 1, 3 | frame in progress; one-cycle pulse in its last cycle; current step |
| `rd_addr` | in | ⌈log2 J⌉ | vector to read back (combinational) |
| `rd_coord`, `rd_linkto`, `rd_count` | out | N×3, N×3, ⌈log2(J+1)⌉ | bin coordinates, cluster label, label's density |

Vector i is window (row i / JH, column i mod JH). The number of clusters is
the number of distinct labels, which whatever reads the labels can count.
Bank D is not reset. Each frame's index step writes every entry before it is
read.

Parameters of the top: `N` (22), `JV` (143), `JH` (174). J = JV·JH is derived.
The second configuration the architecture was built for is a 128 × 128 image:
JV = JH = 31, J = 961.

## Departures and own choices

* Memory A has a read latency of one cycle, which adds one cycle to Min-Max
  and one to Index.
* The bin index is 0-based and the top sample is held in bin Q − 1 (see
  above). The defining formula is 1-based and has no such limit.
* The reciprocal table holds floor(2^31/Q), and the cell-size product is
  truncated.
* `cell_count` is ⌈log2(J+1)⌉ bits wide. For the two configurations this is
  the same as ⌈log2 J⌉.
* The compressor is a balanced tree of the same depth as the published
  layer-by-layer structure, not a copy of its exact per-layer module counts.
* The MAX tree and the link elements break ties as described above; the
  architecture does not say how ties are broken.
* Everything runs on one clock. The option of giving each step its own clock
  is not built. Frames are not overlapped across the register-bank
  boundaries.
* The per-vector elements are generated in groups of 256 (`hpc_pkg::GROUP`).
  This has no effect on the logic.
* Not included: the feature extraction (done in software on DSPs in the
  original system) and the surrounding platform. Frame load and result read
  ports stand in their place.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | covers | how |
|---|---|---|
| `tb_feature_mem` | frame memory | random fill and read-back, one-cycle latency |
| `tb_minmax_pe` | Min-Max element | with B/C modelled; signed extremes −1 and 1−2⁻³¹ |
| `tb_reg_bank_bc` | banks B/C | both write ports, port priority, reset |
| `tb_cs_pe` | cell size, 1/Q table | all Q, full and empty ranges, 64-bit reference |
| `tb_index_pe` | index divider | bin boundaries, top-bin limit, CS = 0 |
| `tb_reg_bank_d` | bank D | three write ports against a model |
| `tb_density_unit` | density elements + compressor | per-cycle UPDATE/count; final densities counted directly |
| `tb_ones_compressor` | compressor | J = 37 and 961 against a bit count |
| `tb_cluster_max_tree` | MAX element and tree | maxima and tie rule |
| `tb_link_pe` | link element, N = 22 | neighbour test, selection, gating |
| `tb_link_unit` | link step | hand-made two-hill histogram with known labels; random histograms step by step |
| `tb_hpc_controller` | sequencer | every address/select sequence, step lengths, 6J+N+2 |
| `tb_hpc_cluster_top` | whole processor, N = 3, J = 12 | 12 frames, Q = 3..8, against an independent model |
| `tb_hpc_cluster_128` | whole processor, N = 22, J = 961 | three clustered frames, Q = 3, 5, 8 |

The end-to-end tests rebuild every step in a behavioural model inside the
testbench: min/max, cell size, index, densities counted directly, and the
link rule. They compare bin coordinates, labels and counts for every vector,
and check that each frame takes exactly 6J+N+2 cycles. `tb_hpc_cluster_top`
also requires each mechanism to occur at least once:

* the top-bin limit of the index step;
* an already-binned density reference;
* a non-neighbour pair;
* label changes in both link passes;
* a change of Q between frames.

The largest configuration simulated is the 128 × 128 one: N = 22, J = 961.
The DVD-size default (J = 24 882) passes lint and elaboration but has not
been simulated. Its link step alone evaluates about 24 882 × 24 882
neighbour tests per frame, beyond what a cycle-based simulation of the
flattened design can do in reasonable time.

To run a testbench with Verilator (package first):

    verilator --binary --timing --assert -Irtl rtl/hpc_pkg.sv \
        $(ls rtl/*.sv | grep -v hpc_pkg) tb/tb_hpc_cluster_top.sv \
        --top-module tb_hpc_cluster_top -o sim && obj_dir/sim

At the full size, expect Verilator's lint of the top to take about four minutes
and about 6 GB of memory. Most of that goes into the J link elements.
