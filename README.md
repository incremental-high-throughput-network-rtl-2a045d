# Incremental k-means network traffic classifier

Flow-feature classifiers trained once on a labeled data set go stale as
traffic changes: applications come and go, protocols change, and labeling new
flows by hand is slow. This design classifies flows in hardware at line rate
while it keeps learning. The model is a set of k-means clusters. Each flow is
given the class of the nearest cluster centroid. A flow that lies well inside
its cluster then updates that cluster's statistics. Labeled flows from a host
computer refine the model or add clusters. Clusters that have not been used
for a long time are aged out, so the model stays bounded.

The architecture is meant to replace the static classifier stage of a
NetFPGA-style packet switch, after a flow exporter and feature extractor. Those
surrounding parts are not part of this RTL. The classifier receives each flow
as a vector of features.

At 125 MHz the classifier handles about 1.2 million flows per second. It
learns from both labeled and unlabeled flows, and learning never stalls
classification.

## The model: Clustering Features

Each cluster is stored as a Clustering Feature `CF = <N, mu, R, U, T, y>`.
All sizes are per cluster, with D = 6 flow features:

| field | meaning | width | per feature |
|---|---|---|---|
| `y`  | class of the cluster | 5 | — |
| `mu` | centroid | 126 | 21 bits |
| `R`  | accumulated radius components | 192 | 32 bits |
| `U`  | direction weight | 72 | 12 bits |
| `T`  | timestamp (activity counter) | 11 | — |
| `N`  | number of instances absorbed | 11 | — |

The total is 417 bits per cluster. There is room for `K_MAX = 128` clusters.
After pruning, `K_D = 64` clusters remain.

**Number format (this design's choice).** Features and centroids are
unsigned fixed-point values with 16 fraction bits. A 21-bit value therefore
covers [0, 32). Radius components use the same scale in 32 bits. `U` is an
unsigned factor with 11 fraction bits, so 1.0 = 2048. Scale and offset the
flow features into this range before they enter the design. The fixed
boundary "2" below means 2.0 in these units.

## Classification path (`classification`)

The classifier handles one flow at a time and scans the whole model for it:

```
 memory A ──► compare_input ──► distance_calc_pipeline (D stages) ──► get_nearest ──► class
 (1 clk)       (1 clk)            stage j adds |x_j − mu_j|             (1 clk)
```

* The scan sequencer reads cluster memory A from address 0, one entry per
  clock. Every entry has a valid bit. Clusters are always kept packed from
  address 0, so the first invalid entry ends the scan.
* `compare_input` orders each (x_i, mu_i) pair into *greater* and *smaller*.
  The pipeline then only subtracts and never handles a sign.
* `distance_calc_pipeline` has one stage per feature. Each stage adds one
  absolute difference to the Manhattan distance. A new cluster enters every
  clock.
* `get_nearest` is a two-state machine. It takes the first valid distance as
  the current minimum. After that, only a strictly smaller distance replaces
  it, so on a tie the lower address wins. The entry marked *last* closes the
  scan.

**Timing.** With k clusters stored, the result appears **k + D + 4 clocks**
after the flow is accepted. The clocks are: 1 to issue the read, 1 for the
memory, 1 to compare, D for the pipeline, 1 for get_nearest. With k between 64
and 127 this is 74 to 137 clocks. The next flow is accepted in the same clock
the result appears. Throughput is therefore f_clk / (k + D + 4), about 1.2 M
classifications/s at 125 MHz with about 100 clusters. If all 128 addresses are
valid, no invalid entry ends the scan and the result comes one clock earlier.
This cannot happen in normal operation, because reaching 128 clusters starts
pruning.

`nearest_neighbor` has the same structure and the same timing. The learning
unit uses it to search for the nearest cluster of a labeled flow.

## Learning path (`incremental_learning`)

The learning unit is the only writer of the cluster memory. It runs in
parallel with the classifier and takes one instance at a time. Its inputs
are:

1. **Labeled flows from the host** (`lab_*`). These have priority and are not
   buffered. `nearest_neighbor` first finds their nearest cluster.
2. **Classified flows** from the classifier. These arrive with the nearest
   cluster address and distance the classifier found, and wait in a 16-entry
   FIFO. The classifier is never stalled. If the FIFO is full, that flow is
   classified but not learned (`ev_fifo_drop`).
3. **Complete cluster records** (`cf_*`). These are appended at the next free
   address and are used to load the initial model, which is trained offline.

For each instance, the controller reads the nearest cluster's full record and
runs the boundary check. It then picks one of three learning methods:

| instance | inside the boundary | outside the boundary |
|---|---|---|
| classified | **update** the nearest cluster | nothing (low confidence, `ev_low_conf`) |
| labeled, same class as the cluster | **update** | **new cluster** |
| labeled, other class (or no cluster yet) | **new cluster** | **new cluster** |

A classified flow whose nearest-cluster address is no longer in use is
skipped (`ev_stale`). This can happen when pruning has reshuffled the model
since the flow was classified.

Learning one classified flow takes 10 clocks from the FIFO pop when nothing
is written, and 40 clocks for an update.

### Boundary check (`boundary_check`)

This block decides whether the distance `D` lies inside the cluster:

* N > 1: a chain of three adders sums the six radius components, two per
  step. The sum is divided by N and compared: inside when `D <= sum(R)/N`.
  This takes 5 clocks.
* N = 1: a fresh cluster has no radius yet, so the fixed boundary 2.0 is
  used: inside when `D <= 2`. This takes 2 clocks.

### CF update (`cluster_update`)

For each feature the update computes:

```
q    = |x − mu| / N
mu'  = (mu·N + x) / (N + 1)
R'   = R + u·q + |x − mu'|
```

Once per cluster it sets `N' = N + 1` and `T' = T + 1`. To save hardware the
features are processed one after another. Each feature takes five clocked
steps:

1. `|x−mu|` and `mu·N`
2. `÷N` and `+x`
3. `·u` and `÷(N+1)`
4. `|x−mu'|`
5. the sum into `R'`

An update therefore takes **5·D + 1 = 31 clocks**. Injecting a new cluster
takes one clock. A new cluster gets N = 1, mu = x, R = 0, U = 1.0, T = 1 and
y = label. Divisions truncate. R saturates at 2^32−1, and N and T saturate
at 2047; when N is saturated the centroid divides by N rather than N+1.
`U` is read as a weight but never changed.

### Reconstruction (`reconstruction`)

When the cluster count reaches K_MAX the learning unit starts reconstruction.
It has three phases:

1. **Read (K_MAX+1 clocks).** Every valid cluster with `T != 0` is copied
   into a K_MAX-deep FIFO with `T − 1`. Clusters with `T = 0` are discarded.
2. **Prune (one clock per cluster).** While the FIFO holds more than K_D
   clusters, the head is popped. It is discarded if `T = 0`. Otherwise it is
   pushed back with `T − 1`. Each pass lowers T, so the loop always ends.
3. **Write (K_MAX clocks).** The survivors go to addresses 0, 1, … and every
   remaining address gets an empty (invalid) record.

In effect T counts how often a cluster was used, less the number of aging
passes it has survived. Pruning keeps the K_D most recently useful clusters.
If many clusters have T = 0, fewer than K_D may survive.

During reconstruction, host input waits (`lab_ready` low) and classified
flows collect in the FIFO. The classifier keeps running. A flow scanned
while the write-back runs may see a partly rewritten model and can be
misclassified. Reconstruction is rare, so this is accepted.

## Cluster memory (`cluster_memory`)

The 417-bit record is split into three units with this bit layout:

| unit | contents | bits | ports |
|---|---|---|---|
| A (`cluster_memory_a`) | valid (131), `y` (130:126), `mu` (125:0) | 132 | 1 write, 2 read: classifier and learning |
| B (`cluster_ram`) | `R` (191:0) | 192 | 1 write, 1 read (learning) |
| C (`cluster_ram`) | `U` (93:22), `N` (21:11), `T` (10:0) | 94 | 1 write, 1 read (learning) |

Feature i sits at bits `[w·i +: w]` of a vector. All reads are synchronous
with one clock of latency. A write updates all three units at one address.
Only the valid bits are reset; the data arrays map to block RAM.

## Top level and interfaces (`traffic_classifier`)

| port group | purpose |
|---|---|
| `flow_valid/ready, flow_x` | flow instance (6 × 21-bit features) |
| `pred_valid, pred_found, pred_class, pred_cluster, pred_distance` | one-clock result pulse |
| `lab_valid/ready, lab_x, lab_y` | labeled instance from the host |
| `cf_valid/ready, cf_in` | append a full cluster record (initial model) |
| `num_clusters, reconstructing` | status |
| `ev_update, ev_new, ev_low_conf, ev_recon, ev_fifo_drop, ev_stale` | one-clock event pulses |

The reset `rst_n` is active-low and asynchronous. Parameters: `K_MAX`
(≤ 256), `K_D` and `FIFO_DEPTH`. The feature count and field widths are in
`ntc_pkg`.

## Where this RTL departs from, or goes beyond, the reference architecture

The following follow the reference architecture:

* the block structure
* the sizes (D = 6, K_MAX = 128, K_D = 64)
* the field widths and the memory split and layout
* the k + D + 4 and 5·D + 1 cycle counts
* the boundary-check adder chain and fixed boundary
* the CF update equations
* the reconstruction algorithm

The reference leaves the following open, and this design fills them in:

* the fixed-point formats
* the handshakes and reset
* the tie rule
* the exact learning decision table above
* FIFO depth and full behaviour
* initial U and T of a new cluster
* not updating U
* saturation
* the cf_* preload port
* treating "inside the boundary" as "not greater than"

The reference also mentions *replacing* an existing cluster with a new one in
one clock but does not say when. That is not built: new clusters are always
appended, and reconstruction bounds their number.

## Verification

Each block has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. Reference arithmetic (distance, boundary
rule, CF update, new cluster) is in `tb/tb_ntc_pkg.sv`. It is written from the
equations above, not from the RTL's schedules. The testbenches also check the
cycle counts: k + D + 4, 5·D + 1, the boundary-check times, K_MAX write-back
clocks, and the time to learn one classified flow (observed: 10 to 40 clocks).

`tb_traffic_classifier` runs the whole design at its default sizes on
synthetic traffic of five classes. It first loads 64 initial clusters, then
runs two setups:

* **Interleave test-then-train** (1,200 flows, 10 % also sent labeled).
  Every prediction and its latency are compared with a reference model of the
  complete algorithm. The whole cluster memory is compared every 25 flows.
* **Simultaneous test-and-train** (1,500 back-to-back flows with labeled
  flows interleaved). Every flow must get one prediction. Throughput must stay
  within k + D + 4 clocks per flow. The model must stay packed.

The test counts every mechanism: update, new cluster, low confidence,
reconstruction, FIFO buffering, host held off, and both boundary kinds. A
mechanism that never occurs is a failure. A typical run reports about 104.5
clocks per flow, i.e. 1.2 M classifications/s at 125 MHz. These accuracy
numbers come from synthetic data; no real traffic traces are included.

`tb_workload_datasets` streams two long synthetic data sets through the
default-size design. They have the sizes of the two public traces the design
was sized for: 77,303 flows of 5 classes and 339,061 flows of 4 classes. The
class centres drift, and 10 % of the flows are also sent labeled. The test
checks that every flow gets one prediction, that the average time per flow
stays within K_D + D + 4 to K_MAX + D + 4 clocks, that at least 80 % of the
synthetic flows are classified correctly, and that learning and
reconstruction take place. Results:

| stream | clocks | clocks per flow | time at 125 MHz | reconstructions |
|---|---|---|---|---|
| 77,303 flows, 5 classes | 8,156,746 | 105.5 | 65.3 ms | 110 |
| 339,061 flows, 4 classes | 35,819,902 | 105.6 | 286.6 ms | 521 |

This run takes under a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_traffic_classifier \
          -y rtl -y tb rtl/ntc_pkg.sv tb/tb_ntc_pkg.sv tb/tb_traffic_classifier.sv
./obj_dir/Vtb_traffic_classifier
```

Replace the top-module name to run another testbench, for example
`tb_cluster_update` or `tb_reconstruction`. The full end-to-end run takes a
fraction of a second of simulation time after the build.

## Changing the design

* **Model size:** set `K_MAX` and `K_D` on `traffic_classifier`. Addresses are
  8 bits wide, so K_MAX can be at most 256. Classification time grows with
  the number of stored clusters.
* **Feature count or widths:** edit `ntc_pkg`. The distance pipeline gets one
  stage per feature, and the update takes 5 clocks per feature.
* **Fixed-point scale:** `FRAC_BITS` and `U_FRAC` in `ntc_pkg`. The fixed
  boundary follows `FRAC_BITS`.
* A faster variant could run several distance pipelines side by side over
  disjoint address ranges, each with its own get_nearest, and then merge
  their minima. Nothing here does this.
