# RACE: a redundancy-aware accelerator for dynamic GNN inference

A dynamic graph neural network (DGNN) processes a graph that changes over
time as a series of snapshots. For each snapshot it runs a few GNN layers
(aggregate over neighbours, multiply by a weight matrix, activation) for
every vertex. A recurrent step then merges each vertex's last GNN output
into its hidden state. Consecutive snapshots usually differ in only a few
edges and features. Most of the per-vertex GNN work of snapshot t+1 would
therefore repeat snapshot t exactly.

This RTL computes each new snapshot incrementally:

1. It finds the vertices whose neighbourhood did not change.
2. From those vertices it works out how many GNN layers of every vertex are
   still valid from the previous snapshot.
3. It recomputes only the rest, then runs the recurrent step for all
   vertices.

The results are bit-identical to recomputing the whole snapshot. The
end-to-end testbenches check exactly that.

The design also has a feature cache in front of the off-chip memory. The
cache keeps the input features that the changed part of the graph will read
most often. Those access counts are predicted while the changes are being
analysed.

## Terms

| term | meaning |
|---|---|
| snapshot t / t+1 | previous and current version of the graph partition |
| immune vertex | its input feature is the same in t and t+1 |
| unaffected vertex | immune, same neighbour list, and every neighbour immune |
| dependency level n (DQ) | layers 1..n of this vertex can be copied from snapshot t |
| RIU | redundancy identification unit = IU + TE |
| IU | identification unit: finds immune and unaffected vertices |
| TE | traversal engine: turns unaffected vertices into dependency levels |
| IPU | incremental processing unit: per layer, decides reuse or recompute per vertex |
| DSCU | dynamic state correction unit: recomputes the vertices the IPU rejects, then runs the recurrent step |
| MA | memory-access pipeline inside the DSCU (offsets, neighbours, features, aggregation) |
| IB, UVQ, IQ, DQ, FT | Immune_Bitmap, Unaffected_Vertex_Queue, Intermediate_Queue (per-vertex counters), Dependency_Queue, Frequency_Table |
| IF_Buffer | input-feature cache |
| GS_Buffer | on-chip graph structure (offsets and neighbour arrays) |

## How dependency levels are found (the part to understand first)

A vertex's layer-1 output depends on its own input feature and on its
neighbours' input features. Its layer-n output depends on the layer-(n-1)
outputs of itself and its neighbours. So:

* Level 0 means unaffected. The IU finds these vertices, and they seed the
  search.
* Level 1: the vertex and all its neighbours (in snapshot t+1) are level 0.
* Level n: the vertex and all its neighbours are at level n-1 or more.

The vertex itself is counted along with its neighbours. Without it, a
vertex that lost an edge could reach level 1 from its remaining (unaffected)
neighbours while its own aggregation changed. The IPU reuses layer n of
vertex v exactly when DQ[v] >= n.

Level 0 alone leads to no reuse. This is conservative: an unaffected
vertex's own layer-1 output is in fact unchanged. Such a vertex is
recomputed at layer 1 unless its neighbours are unaffected as well.

### IU

The IU works in two passes over the partition.

* **Features pass.** It reads each vertex's feature from both snapshots'
  feature regions in off-chip memory and compares them. The result is
  written into the IB bitmap. A vertex whose feature changed is also
  invalidated in the IF cache.
* **Topology pass.** Each immune vertex gets its {begin, end} offsets from
  both GS banks. Its neighbour IDs are compared pair by pair, and each
  neighbour's IB bit is checked. A vertex that passes every test is pushed
  into the UVQ.

Neighbour lists must be stored in the same order in both snapshots. A list
that is equal but reordered counts as changed, which is safe.

### TE

The TE does a level-synchronous breadth-first walk over snapshot t+1.

* The UVQ holds the current level's vertices.
* For each of them, the IQ counter of the vertex itself and of each
  neighbour is incremented.
* Then every vertex is scanned. A counter equal to degree+1 means the vertex
  reaches this level: its DQ entry is written, and it is appended to the UVQ
  as a seed for the next level.
* The IQ is cleared between levels.

The walk stops after level NLAYER or when a level adds no vertex.

While scanning level 1, the TE also writes each vertex's Frequency_Table
entry: the number of vertices in {v} ∪ N(v) that are not level 0, capped at
3. That is how many times the cache is likely to be asked for v's feature
while affected vertices are recomputed.

Two size limits are built in, and both are safe:

* **IQ saturation.** The IQ counters are 3 bits. A vertex with more than 6
  neighbours cannot reach degree+1 and is simply always recomputed.
* **UVQ overflow.** The UVQ holds 8192 IDs. A vertex that does not fit is
  still given its level, but it does not seed the next level. Its dependants
  stop one level lower.

Both events are counted and reported.

## Processing one snapshot

`race_top` runs one partition, from `start` to `done`:

1. **RIU.** The IU runs, then the TE, as described above.
2. **GNN layers n = 1..NLAYER.**
   * The IPU scans the DQ. Its comparator chain (one stage per layer value)
     tags each vertex reuse (DQ >= n) or recompute.
   * A reused vertex keeps its layer-n state in off-chip memory. Nothing is
     read or written for it.
   * For a recomputed vertex, the MA pipeline fetches its offsets, its
     neighbour IDs and the layer-(n-1) vectors of the vertex and its
     neighbours, and sums them. For n = 1 those vectors are input features
     and come through the IF cache; deeper layers read the stored layer
     states.
   * The sum goes to the lowest-numbered idle PE group, which multiplies it
     by the layer's 16x16 weight matrix and applies ReLU.
   * The result overwrites the vertex's layer-n state.
   * Layer n+1 starts only after every layer-n result has been written.
3. **Recurrent step** for every vertex: S' = alpha*S + beta*X. X is the
   last layer's state and S the stored hidden state. It runs on the same PE
   groups and is written back and sent out on `y_valid/y_vid/y_data`.

Inside a PE group, GNN mode walks the input vector element by element. Each
non-zero element j adds `W[:,j] * x[j]` into the 16 accumulators, and zero
elements are skipped: a task takes max(1, number of non-zero elements)
cycles. The recurrent step takes two cycles.

Each PE has:

* a multiplier and an adder;
* an operand multiplexer for GNN or RNN data;
* an adder-input multiplexer for the accumulator or an external value;
* an output multiplexer for the product or the sum.

GNN and RNN tasks share one pool of groups, so no group sits idle waiting
for the other kind of work.

## The IF_Buffer caching policy

The cache is direct-mapped, with one 16-element feature per line. Each line
stores its tag and the Frequency_Table value its feature had when it was
filled. Behind the lines is a histogram: the number of cached lines per
frequency value.

* Threshold TD is 0 while the cache still has empty lines. Once it is full,
  TD is the lowest frequency present.
* On a miss, the feature is read from off-chip memory. It is stored only if
  both conditions hold:
  * its frequency is at least TD;
  * the line it maps to is empty or holds a feature of equal or lower
    frequency.
* Otherwise it bypasses the cache.
* The IU invalidates lines whose feature changed.

Frequencies of lines filled in earlier snapshots are not refreshed.

## Top-level interface (`rtl/race_top.sv`)

All buses are plain signals or packed structs from `race_pkg`.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `cfg_num_vertices` | in | vertices in this partition (at most NV) |
| `cfg_first` | in | no usable previous snapshot: recompute everything |
| `cfg_cur_bank` | in | which GS bank / feature region is snapshot t+1 |
| `cfg_alpha`, `cfg_beta` | in | recurrent-step coefficients (Q7.8) |
| `start` / `busy` / `done` | in/out/out | one snapshot; `done` pulses for one cycle |
| `gs_we, gs_bank, gs_nbr, gs_addr, gs_wdata` | in | load the GS banks: `gs_nbr=0` writes offsets entry `{begin,end}` of vertex `gs_addr`; `gs_nbr=1` writes neighbour entry `gs_addr` |
| `w_we, w_layer, w_col, w_data` | in | load column `w_col` of layer `w_layer` (1..NLAYER) weights |
| `hbm_req_valid/ready, hbm_req` | out/in/out | off-chip requests `{we, addr, wdata}`, one 256-bit vector each |
| `hbm_rsp_valid, hbm_rsp_data` | in | read data, in request order, any latency |
| `y_valid, y_vid, y_data` | out | new hidden state of each vertex |
| `stats` | out | 18 event counters (see `race_pkg.sv`) |

Off-chip addresses are `{region[2:0], vertex[20:0]}`, with regions defined in
`race_pkg`:

* 0 and 1: input features of GS bank 0 and bank 1;
* 2 to 4: the states of layers 1 to 3;
* 7: the hidden state.

To process snapshots:

1. Load the weights once.
2. For each snapshot, load the new graph into the bank not used by the
   previous snapshot, put its features in the matching region, flip
   `cfg_cur_bank` and pulse `start`.
3. Drive the first snapshot with `cfg_first=1`.

Graphs must be undirected, with each edge stored in both vertices' lists.

## Sizes

| parameter | default | where it comes from |
|---|---|---|
| NV | 131072 | vertices per partition. The 16 KB Immune_Bitmap at one bit per vertex; larger graphs are split into partitions by the host |
| NE | 65536 | neighbour entries per snapshot, so two snapshots' structure fits about 1 MB of GS_Buffer |
| NLAYER | 3 | GNN layers |
| NGROUP | 256 | 256 groups x 16 PEs = 4096 MACs |
| UVQ_DEPTH | 8192 | 24 KB at 3-byte IDs |
| IQ_W / DQ_W / FT_W | 3 / 2 / 2 | 48 KB / 32 KB / 32 KB over 131072 vertices |
| IF_LINES | 65536 | 2 MB of 32-byte lines |
| DIM, DW | 16, 16 | vector length and Q7.8 elements (`race_pkg`) |

The on-chip buffer capacities follow the reference configuration.

The vector length (16), the number format and the aggregation by plain sum
are choices of this design. With a sum, any 1/(deg+1) scaling has to be
folded into the weights. Real feature widths are larger, which would widen
`vec_t` and the off-chip bus.

## Where this design is simpler than the reference architecture

* One IU and one TE, where the reference has eight of each. The TE has one
  traversal pipeline instead of several working on slices of the UVQ.
* One MA pipeline, which fetches one vector at a time. The reference has
  several overlapped pipelines. As a result, the top keeps at most one or
  two PE groups busy. The PE array itself dispatches to all idle groups
  (see `tb_pe_array`).
* The recurrent step is the parameter-less form S' = alpha*S + beta*X (as in
  TM-GCN's M-transform). The LSTM cells used by CD-GCN and GC-LSTM and
  CD-GCN's fully connected layer are not built.
* The IPU streams its <vertex, level, reuse> results to the scheduler. It
  has no hash table holding a copy of the reused state, because the state
  stays in off-chip memory.
* The IF cache is direct-mapped, and its replacement rule is the simple
  "evict only an equal-or-colder line".
* The weight buffer holds NLAYER 16x16 matrices in flip-flops. The
  reference reserves 1 MB.
* An unaffected vertex's layer 1 is reused only when it also reaches level
  1. Its own neighbourhood alone would already allow it.
* Units run one after another (IU, then TE, then layer by layer) rather
  than overlapped.
* The request arbiter gives round-robin access to the single off-chip port
  and returns read data in order.

## Files

`rtl/`:

* `race_pkg.sv`: types, the off-chip address map, fixed-point helpers,
  counters.
* `race_top.sv`: snapshot controller, GS_Buffer banks, wiring.
* `riu.sv`, `identification_unit.sv`, `traversal_engine.sv`.
* `ipu.sv`, `dscu.sv`, `ma_pipeline.sv`.
* `pe_array.sv`, `pe_group.sv`, `pe.sv`, `weight_buffer.sv`.
* `if_cache.sv`.
* `mem_req_arbiter.sv`.
* `sram_buffer.sv`: every on-chip SRAM.

`tb/`:

* One self-checking testbench per unit, `tb_<unit>.sv`.
* `tb_race_top.sv` and `tb_race_full.sv`, with their shared body
  `race_tb_body.svh`.
* Behavioural models `hbm_model.sv` (off-chip memory with latency and
  random back-pressure) and `gs_model.sv`.
* `iu_tb_common.svh`: snapshot generator shared by the IU and RIU tests.

## Simulating

Any testbench builds the same way with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_race_top rtl/race_pkg.sv tb/tb_race_top.sv -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_race_top` runs four snapshots of a 64-vertex graph:

* a first full snapshot;
* one with an edge moved and a feature changed;
* one with an edge deleted, an edge added, a degree-preserving edge swap and
  two features changed;
* one with no change.

After each snapshot it compares every stored layer state and every output
against a from-scratch fixed-point model. It also requires each mechanism
to occur at least once:

* reuse and recompute;
* the recurrent step;
* cache hit, miss, bypass, eviction and invalidation;
* zero skipping;
* off-chip back-pressure;
* UVQ overflow and IQ saturation;
* a level-3 dependency.

It uses small sizes (4 PE groups, 16 cache lines, a 160-entry UVQ) so that
the cache and queues actually fill.

`tb_race_full` runs the same scenario with every parameter at its default.
It builds in about 3.5 minutes (0.5 GB) and simulates in about 16 seconds.

In the unchanged snapshot at default sizes, 154 of the 192 layer states
(64 vertices x 3 layers) are reused. The rest belong to the hub vertex and
its surroundings: a vertex with more than 6 neighbours is always recomputed
because of the 3-bit counters.
