# Parallel Potts-model clustering solver

This is synthesizable SystemVerilog for a clustering accelerator built on the Potts model.
Every data point is a node of a sparse K-nearest-neighbour graph. The node carries a label
`s_i` in `0..q-1`, called its spin. Clustering is done by lowering the energy

    H(s) = - sum_(i,j) J_ij * [s_i == s_j]  +  gamma * sum_k (n_k - N/q)^2

The first term rewards neighbours that share a label. `J_ij` is a Gaussian kernel of their
distance, quantised to an integer. The second term keeps the cluster sizes `n_k` balanced.

Simulated annealing would need random numbers and floating point. This solver instead uses a
greedy rule that is deterministic after initialisation:

- Every node in turn computes the energy change `dH` of moving to each other cluster.
- It moves to the best candidate if that change is negative.
- All arithmetic is on small integers.

Many nodes are processed in parallel. The run ends after the first full sweep over all nodes
(an *epoch*) in which no node moved.

The default configuration has N = 4096 nodes, P = 32 processing elements (PEs), K = 120
neighbours per node and q = 4 clusters. The balance strength gamma is set at run time; the
reference workload uses gamma = 20.

## How the work is split

- **Static partitioning.** PE *p* owns the N/P = 128 contiguous nodes `p*128 .. p*128+127`.
  N/P must be a power of two. The upper bits of a node ID then select the owning PE and bank,
  and the lower bits give the entry.
- **Write-private, read-shared spin banks.** Each PE has its own spin bank (`spin_bank`). Only
  that PE writes it, so two writers never meet and no locking is needed. Every PE reads every
  bank through the read interconnect (`spin_read_xbar`).
- **Graph memory per PE.** Each PE also has its own slice of the graph memory (`graph_rom`).
  One row holds a node's K neighbour IDs and K 8-bit weights. The host fills the rows before a
  run; during a run they are only read.
- **SIMD control.** The global controller broadcasts a single node index each cycle. All 32 PEs
  work on their own node with that local index at the same time.
- **Global cluster counts.** `cluster_counter` holds `n_c` for all clusters. Every PE can report
  one move per cycle: a loss for the old cluster and a gain for the new one. The counter applies
  all reports of the cycle together.

A consequence of gathering all K neighbours in one cycle: each PE makes K = 120 label reads per
cycle, so 3840 reads in all. A dual-port block RAM cannot supply that, so each bank is a register
file: 128 two-bit labels, 8192 bits over all banks. The interconnect is a wide combinational
multiplexer from these registers to the 3840 read ports. This is where most of the logic goes.

## The processing-element pipeline

`potts_pe` has four stages. A node issued in cycle *t* is written back at the clock edge that
ends cycle *t+3*. One new node enters every cycle.

| stage | work | registered at its end |
|---|---|---|
| 1 graph fetch | `graph_rom` reads the node's row | K neighbour IDs and K weights (inside the ROM) |
| 2 state retrieval | the IDs go through `spin_read_xbar`; the node's own label A is read from the PE's bank | K neighbour labels, weights, A |
| 3 energy accumulation | `energy_accum`: for each cluster c, an adder tree of the K weights whose neighbour has label c | `E_int(c)` for all q clusters |
| 4 update | `update_logic` chooses the cluster; the write-back and count report happen at the clock edge | bank write, count report, flip |

### The update rule

Moving the node from its cluster A to cluster c changes the energy by

    dH(A -> c) = E_int(A) - E_int(c)  +  2*gamma*(n_c - n_A + 1)

- `E_int(A) - E_int(c)` is the interaction energy the node gives up.
- The balance part is the exact difference of the squared-size penalty when one node moves. No
  squaring is needed, so the only multiplier is `gamma` times a small count difference.
- Staying in A counts as `dH = 0`.
- The lowest `dH` wins, with ties going to the lower cluster index. The node moves only if the
  winning value is below zero, so a move of zero cost is never taken.
- All values are 32-bit signed. The largest magnitude at the defaults is below 2^23.

### What a node sees: stale reads by design

No PE waits for another or forwards results. A node in stage 2 can read a neighbour that an
earlier node, still in stages 3–4, is about to change. That earlier node may belong to the same
PE or to any other PE. The same holds for the cluster counts used in stage 4, which can be up to
three cycles old.

This is the intended behaviour of the parallel update rule, not a fault, and it has two effects:

- The path of a run depends on the exact timing. It is not a sequential sweep.
- The final state is still exact. When an epoch ends with no move, every node was judged on
  labels and counts that no longer change. The result is therefore a true fixed point of the
  rule, and the end-to-end testbench checks this for every node.

## Run sequence and timing (`global_controller`)

1. **IDLE/DONE → INIT** on `start`. On the same clock edge the counts are cleared and every PE's
   16-bit LFSR is seeded with `seed` XOR a constant of its own.
2. **INIT**, 128 cycles. Each PE writes a pseudo-random label (LFSR value mod q) into node
   0..127 of its bank. The counter adds these labels up, which builds the initial counts.
3. **RUN**, 128 cycles. Indices 0..127 are broadcast, one per cycle.
4. **DRAIN**, 4 cycles. The last nodes leave the pipeline. By the last drain cycle the epoch's
   flip total, summed over all PEs, is complete:
   - zero flips: DONE with `converged = 1` (early exit);
   - otherwise, if `epoch_count` has reached `max_iter` (and `max_iter != 0`): DONE with
     `converged = 0`;
   - otherwise: the next RUN.

One epoch takes N/P + 4 = 132 cycles. A complete run takes 128 + 132·epochs cycles; the count
from the `start` edge to the first cycle with `done` high is that number plus one. On the
synthetic 4096-node workload below, this came to 44 epochs, or 5,936 cycles (59 µs at 100 MHz).

## Host link (`host_interface`)

- **Graph load.** Set `graph_we`, the node ID `graph_node`, and its K neighbour IDs and weights
  (`graph_nid`, `graph_w`). This writes one node per cycle. Fill unused neighbour slots with
  weight 0.
- **Writes during a run.** While `busy` is high, graph writes are ignored and `graph_dropped`
  is raised.
- **Run control.** `gamma`, `max_iter` (0 means no limit) and `seed` are plain inputs sampled
  while the solver runs, so hold them steady. `start` is a one-cycle pulse.
- **Status.** `busy`, `done`, `converged`, `phase` (controller state), `epoch_count`,
  `epoch_flips` (running total), `last_epoch_flips` and `cluster_size[q]` report progress and
  results.
- **Read-back.** Put a node ID on `rd_node`; its label appears on `rd_spin` one cycle later.

Building the K-NN graph and the quantised kernel weights is the host's job and is not part of
this RTL.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 4096 | nodes; N/P must be a power of two |
| `P` | 32 | PEs = spin banks = graph-memory slices |
| `K` | 120 | neighbour slots per node |
| `Q` | 4 | clusters |
| `WW` | 8 | edge-weight width (this design's choice) |
| `GW` | 8 | gamma width (this design's choice) |

The defaults are in `potts_pkg`.

## Files

| file | contents |
|---|---|
| `rtl/potts_pkg.sv` | default sizes, pipeline latency, `dh_t`, controller state enum |
| `rtl/potts_top.sv` | top level |
| `rtl/global_controller.sv` | INIT/RUN/DRAIN/DONE sequencer, flip total, early exit |
| `rtl/potts_pe.sv` | four-stage PE |
| `rtl/energy_accum.sv`, `rtl/adder_tree.sv` | stage 3 |
| `rtl/update_logic.sv` | stage 4 |
| `rtl/spin_init_rng.sv` | LFSR for the initial labels |
| `rtl/graph_rom.sv` | per-PE graph memory |
| `rtl/spin_bank.sv` | per-PE label register file |
| `rtl/spin_read_xbar.sv` | all-to-all label read interconnect |
| `rtl/cluster_counter.sv` | global `n_c` |
| `rtl/host_interface.sv` | graph load, label read-back |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/potts_tb_body.svh` | end-to-end test shared by `tb_potts_top`, `tb_potts_top_full` and `tb_potts_digits` |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog.

The block testbenches compare each module with an independent model in the testbench. Two go
further:

- `tb_update_logic` computes `dH` from the full squared balance penalty before and after the
  move, not from the simplified formula.
- `tb_global_controller` raises a flip at the latest cycle a PE could. This checks that the drain
  window is long enough.

The end-to-end testbenches build their own test data:

- 4 Gaussian blobs in the plane.
- Ground-truth labels in random order, so every cluster is spread over all PEs.
- A brute-force K-NN graph with weights `max(1, round(255*exp(-d^2/(2 sigma^2))))`.

They load the graph, run the solver and check:

- the run converges;
- the counts equal the histogram of the labels read back;
- no node has a move with negative `dH` (the fixed-point property);
- the cycle count matches the timing above;
- a second run with `max_iter = 1` stops after one epoch without converging;
- a graph write during a run is dropped;
- the adjusted Rand index (ARI) against the ground truth is at least a floor: 0.9, or 0.4 for `tb_potts_digits`.

| testbench | size | observed |
|---|---|---|
| `tb_potts_top` | N=512, P=8, K=48 | converged in 6 epochs, ARI 0.99 |
| `tb_potts_top_full` | defaults (4096/32/120/4), gamma 20 | converged in 44 epochs, ARI 0.98, about 5 s of simulation after a 30 s build |
| `tb_potts_digits` | N=2048, P=32, K=30, Q=10, gamma 10 | converged in 15 epochs, ARI about 0.5 (check floor 0.4) |

`tb_potts_digits` uses the settings of a ten-class handwritten-digit task on ten synthetic blobs.
It also exercises a cluster count that is not a power of two (4-bit labels).

### Clustering quality

The greedy rule can stop in a local minimum. In that case one blob keeps two labels, or two
blobs share labels. The outcome depends on the kernel width and on the size of the neighbourhood
relative to a blob:

| size | sigma | ARI |
|---|---|---|
| 4096 nodes, K=120 | 400 | 0.70 |
| 4096 nodes, K=120 | 150 | 0.98 |
| 512 nodes, K=24 | any sigma tried | at most 0.5 |

Every one of these runs reached a true fixed point, so the low scores come from the algorithm
and not from the hardware. The remaining errors at sigma 150 are points in the overlapping tails
of neighbouring blobs.

## Where this design departs from, or adds to, its source description

- **Register-file banks.** The spin banks are register files, not block RAMs. The source
  describes BRAM banks but also accumulates all 120 interactions of a node in one pass. Both
  cannot hold, and this design follows the one-pass reading.
- **Draining between epochs.** The pipeline drains for 4 cycles after each epoch, so the flip
  total is exact when the stop decision is made.
- **Run time.** The source reports 3.07 ms per solve at 100 MHz on a comparable workload. This
  design needs about 59 µs for a solve with 44 epochs, graph loading not included. The source
  does not say what its figure includes, so the two should not be compared directly.
- **Own choices.** The following are this design's own, not taken from the source: the weight
  and gamma widths, the tie-break, the LFSR, the host protocol, the `max_iter = 0` convention,
  and the reset behaviour (asynchronous, active low, banks cleared).
- **Number of clusters.** Q = 4 by default. A ten-class problem needs `Q = 10`. Q need not be a
  power of two. Q = 10 has been simulated end to end, on synthetic data only.
- **Multipliers.** Each PE has q small multipliers, each computing gamma times a count
  difference; 32 PEs with q = 4 give 128. The source reports 30 DSP blocks for its whole design,
  so its mapping must differ. This design does not model FPGA resource use.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/potts_pkg.sv tb/tb_potts_top.sv \
        --top-module tb_potts_top -Mdir obj_top
    ./obj_top/Vtb_potts_top

Any other testbench runs the same way. Use `tb_potts_top_full` for the full-size run.

To change the problem size, override the parameters of `potts_top`, as `tb_potts_top` does. Keep
N/P a power of two. The workload knobs in the end-to-end testbenches are `RADIUS`, `SPREAD`, `SIGMA`, `GAMMA` and `ARI_MIN`.
