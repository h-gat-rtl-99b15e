# H-GAT: a streaming graph-attention layer in SystemVerilog

Each layer of a graph attention network (GAT) takes a very sparse node-feature matrix and a very
sparse adjacency matrix. From these it computes, for every node, a weighted average of its
neighbours' transformed features. The weights come from an attention score computed per edge.
This RTL runs one such layer, head after head:

```
h°       = h · W                          sparse × dense   (SPMM)
e_m      = a1 · h°_m,  e_n = a2 · h°_n    per node         (DMVM)
e_mn     = leakyrelu(e_m + e_n)           per edge         (AF unit)
α_mn     = 2^e_mn / Σ_k 2^e_mk            per edge         (AF unit, base-2 softmax)
h'_m     = relu( Σ_n α_mn · h°_n )        per node         (aggregator)
```

Two ideas keep the hardware small:

- **The attention vector is split.** `a` is cut into two halves, `a1` and `a2`. The expensive dot
  products are then done once per node, not once per edge. Each edge costs a single addition.
- **The powers are base 2.** The softmax uses powers of two instead of `e^x`. The exponential
  becomes a shift.

The aggregation uses `relu` instead of the usual `elu`.

The sparse product `h·W` runs on 16 independent Sparse-PEs. Each PE walks its own list of rows in
compressed form. Software balances the rows across the PEs beforehand, so all PEs finish at about
the same time.

Everything is 16-bit fixed point (Q8.8). The default build holds a whole Cora- or CiteSeer-sized
layer on chip. It is meant to run at 200 MHz.

## Files

| file | role |
|---|---|
| `rtl/hgat_pkg.sv` | widths, Q8.8 helpers, beat/tag structs, load-port selector codes |
| `rtl/hgat_top.sv` | the layer: buffers, controller, all stages |
| `rtl/data_loader.sv` | feature lanes, W buffer with column broadcast, a1/a2 registers |
| `rtl/h_lane_feeder.sv` | one lane of compressed feature rows, streamed to one Sparse-PE |
| `rtl/sp_pe.sv` | Sparse-PE: weight BRAM, multiplier, accumulator, row-length counter |
| `rtl/spmm.sv` | 16 Sparse-PEs and the result collector |
| `rtl/d_pe.sv` | Dense-PE: parallel multipliers and a pipelined adder tree |
| `rtl/dmvm.sv` | two Dense-PEs computing e_m and e_n |
| `rtl/adj_reader.sv` | adjacency buffer, e_m/e_n score buffers, edge walker |
| `rtl/leaky_relu.sv`, `rtl/softmax_unit.sv`, `rtl/af_unit.sv` | the per-edge activation path |
| `rtl/pipe_divider.sv`, `rtl/sync_fifo.sv` | helpers of the softmax |
| `rtl/aggregator.sv` | h° buffer and the α-weighted accumulation with relu |
| `rtl/memory_write.sv` | address generation for the result rows |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_hgat_top.sv` | full layer at default parameters, bit-exact against a reference model |
| `tb/tb_hgat_workloads.sv` | two-layer runs on Cora- and CiteSeer-sized random graphs |
| `tb/hgat_ref_pkg.sv` | the bit-exact reference arithmetic the testbenches share |

## Dataflow through one layer

The host first fills the on-chip buffers through the load port `ld_*` (format below). It then sets
`cfg_*` and pulses `start`. The controller in `hgat_top` runs these phases for each head:

1. **W column broadcast (`BCAST`).** For output column `c` of the head, the data loader copies
   `f_in` words of W column `head·f_head + c` into the weight BRAM of every Sparse-PE. It writes
   one word per cycle.
2. **Sparse product (`SPMM`).** Every lane streams its rows to its own PE, one non-zero per cycle.
   The PE works in a pipeline:
   - it reads `W[col]` from its BRAM;
   - it multiplies it by the value;
   - it accumulates the product.

   A counter loaded with the row-length decides when a row is finished. The PE then hands
   `(row id, sum)` to the collector, and takes the next row's first non-zero in the very next
   cycle. The collector serves the finished PEs round robin, one per cycle. It writes each result
   into column `c` of the h° buffer.

   Steps 1 and 2 repeat for the `f_head` columns.
3. **Attention halves (`DMVM`).** This step runs inside the SPMM of the last column. When the
   collector delivers a row's last element, that row of h° is complete. In the next cycle it is
   read back from the h° buffer, with the element just written taken directly from the
   collector. Two Dense-PEs then compute `e_m = a1·h°` and `e_n = a2·h°`. The adjacency reader
   stores both, by node id, in its score buffers. Rows can finish in any order. Every node
   therefore needs a row in some lane, even an empty one, because that row's result triggers the
   node's DMVM.
4. **Edge phase (`AGG`).** The adjacency reader walks every node's neighbour list in compressed
   form. For each edge it emits `(e_m[m], e_n[n])` with the tag `{m, n, last}`. The edge then
   passes through the following stages:
   - leakyrelu;
   - the base-2 softmax;
   - the aggregator, which reads `h°[n]`, multiplies it by `α`, and accumulates `HID` lanes.

   On the node's last edge the row is scaled, clipped by relu, and written out through
   `memory_write` at `out_base + m·(n_heads·f_head) + head·f_head`. Only the first `f_head` words
   are written (see `ddr_mask`).

Apart from the DMVM overlap, the phases of one head run back to back. h° is per head, so it is rebuilt for
each head. A two-layer network is two calls. Between the calls the host repacks layer 1's output
as the compressed features of layer 2.

### Cycle budget

Per head, the layer takes about:

- `f_head · (f_in + max(longest lane, n_nodes) + ~10)` cycles for BCAST + SPMM;
- about 10 cycles of Dense-PE drain for DMVM;
- `edges + ~30` cycles for AGG.

The `max(…, n_nodes)` term comes from the collector: it takes at most one result per cycle. Rows
with fewer than 16 non-zeros on average are therefore limited by the collector, not by the PEs.
`tb_hgat_top` checks the measured cycle count against this bound. `tb_hgat_workloads` adds 1/16 to
the SPMM part. When the longest lane and `n_nodes` are close, PEs wait behind the busy collector.

## Number format

Features, weights, `a`, scores and α are Q8.8 signed 16-bit words.

- **Products and sums.** Products are Q16.16. Sums run in 32-bit accumulators. A sum returns to
  Q8.8 by an arithmetic shift right of 8 bits (rounding toward −∞), followed by saturation. The
  Sparse-PE, the Dense-PE tree and the aggregator all work this way.
- **Edge score.** `e_m + e_n` is saturated. leakyrelu multiplies negatives by `51/256`, which is
  about 0.2, and shifts right by 8.
- **Powers of two.** `2^z` is built as `(256 + frac(z)) << (floor(z) + 8)`. This is an unsigned
  Q16.16 value in 32 bits, with `floor(z)` clamped to [−16, 14].
  - Negative shifts go right.
  - `2^frac` is approximated linearly by `1 + frac`.
  - There is no max subtraction: the clamp keeps every term and any neighbourhood sum of up to 256
    terms inside the 40-bit denominator.
- **Coefficients.** `α = (2^z << 8) / Σ`, a truncating unsigned divide. The result is in
  [0, 256], so α = 1.0 is representable.

`tb/hgat_ref_pkg.sv` implements exactly this arithmetic. Every testbench compares bit for bit.

## The softmax and its flow control

This is the part that is hardest to get right. A coefficient cannot be produced until the whole
neighbourhood has been summed, yet the edges should keep flowing at one per cycle.

`softmax_unit` splits the stream after the power-of-two stage:

- **Upper path.** A FIFO of depth `DEPTH` (256) parks every `2^z` together with its edge tag.
- **Lower path.** The `2^z` values of the current node are accumulated. On the node's `last` edge
  the finished sum is pushed into a sum queue, which is as deep as the FIFO.
- **Division.** When the node at the head of the FIFO has a sum in the queue, its entries leave
  one per cycle into a 9-stage pipelined restoring divider. The sum is popped with the node's last
  entry.

While node `k` is being divided, node `k+1` is being summed. This keeps the throughput at one edge
per cycle with a latency of about `degree + 11` cycles.

The FIFO must be able to hold a whole neighbourhood, otherwise it deadlocks. The unit therefore
gives the edge walker a credit instead of a plain ready: `in_ready = held < DEPTH − SLACK`. The
`SLACK` of 8 covers the edges that are already between the walker and the FIFO (2 in the walker,
1 in leakyrelu, 1 in the power stage). The consequences:

- The largest neighbourhood is `DEPTH − SLACK` = 248 edges, self-loop included. An assertion fires
  beyond that.
- Cora (largest degree 168) and CiteSeer (99) fit. The credit drops only when several large
  neighbourhoods arrive in a row.
- The divider output has no back-pressure. The aggregator always accepts one edge per cycle.

The aggregator needs the edges of a node to be contiguous. The walker guarantees this because it
emits node by node.

## Preparing the data (load-balanced lanes)

The Sparse-PEs only stay busy if the rows are dealt out well. This is done in software before
loading, and the testbenches do the same:

- Row `n` of `h` goes to lane `n mod 16`. Row density does not depend on the row number, so the
  lanes end up with similar non-zero counts.
- A lane's rows are stored back to back, so its PE starts the next row immediately after the
  previous one. A long row no longer holds up the other PEs, as it would if every PE waited for
  the slowest row of a round.
- Each lane is then padded with zero-valued entries, appended to its last row, until all lanes
  carry the same number of non-zeros.
- An empty row still costs one beat and produces a 0.
- Any other assignment, such as greedy to the least-loaded lane, works without hardware changes.

Load port: `ld_valid` plus `ld_sel`, `ld_lane`, `ld_addr` and `ld_data`.

| `ld_sel` | buffer | `ld_addr` | `ld_data` |
|---|---|---|---|
| `LD_H_NNZ` (0) | lane `ld_lane` non-zero | position in the lane | `col << 16 \| value` |
| `LD_H_DESC` (1) | lane row descriptor | row number in the lane | `row_id << 16 \| row_length` |
| `LD_H_ROWS` (2) | lane row count | – | rows in the lane |
| `LD_W` (3) | W | `column · MAX_FIN + k`, column = `head · f_head + c` | Q8.8 |
| `LD_A` (4) | a1 / a2 | `half · HEADS · HID + head · HID + j` (half 0 = a1) | Q8.8 |
| `LD_ADJ_LEN` (5) | adjacency row-length | node | neighbour count |
| `LD_ADJ_COL` (6) | adjacency col-index | edge position (rows back to back) | neighbour id |

The adjacency must include self-loops, as in a standard GAT. A node with no neighbours is skipped
and gets no output row.

## Parameters and sizes

| parameter (`hgat_top`) | default | bounds |
|---|---|---|
| `NUM_SP` | 16 | Sparse-PEs / feature lanes |
| `HID` | 8 | output features per head (datapath width of DMVM and aggregator) |
| `HEADS` | 2 | heads whose W and a can be stored |
| `MAX_FIN` | 4096 | input features (weight BRAM depth per PE) |
| `MAX_NODES` | 4096 | nodes |
| `MAX_EDGES` | 16384 | adjacency entries, self-loops included |
| `LANE_NNZ` | 8192 | non-zeros per lane (so 131,072 in total) |
| `LANE_ROWS` | 512 | rows per lane |
| `SM_DEPTH` | 256 | softmax FIFO; maximum degree `SM_DEPTH − 8` |

A hidden size of 8, 2 heads and 16-bit data are the sizes this architecture was published with. The
buffer depths were chosen so that Cora (2708 nodes, 1433 features, about 50k non-zeros, 13,264
edges with self-loops) and CiteSeer (3327 nodes, 3703 features, about 99k non-zeros, 12,431 edges)
fit entirely.

PubMed (19,717 nodes, about 1M non-zeros, 108k edges) does not fit. No tiling from external memory
is implemented. Its features alone would need about 33 Mbit of lane buffer. That is twice the
16 Mbit of block RAM on a Kintex-7 325T, the class of device this architecture targets. The default
build uses about 7.6 Mbit of memory bits.

Scaling the slice run linearly gives an estimate for full PubMed with larger buffers:

- about 16 × (500 + 65k) cycles of SPMM;
- about 2 × 110k cycles of edge work;
- roughly 6.5 ms in total.

## Where it departs from the original architecture, and its limits

- **Aggregation multipliers.** The original reuses the PE multipliers for the aggregation. Here the
  aggregator has its own `HID` multipliers, so the aggregation streams right behind the softmax.
- **Rows are fixed per PE.** The original architecture can also be read as a loader that hands the
  next row to whichever PE reports itself finished. Here every PE gets its own lane, filled in
  advance, and the finishing PE's address only steers the result collector. The zero padding of
  the lanes only makes sense with rows fixed per PE.
- **Little phase overlap.** Only DMVM overlaps the SPMM. The edge phase starts after the last score
  is written. Per head, W is broadcast once per output column, which costs `f_in` cycles each
  time.
- **Collector throughput.** The collector takes one result per cycle (see Cycle budget).
- **Unspecified details.** The original leaves these open; they are choices made here:
  - the leakyrelu slope (51/256);
  - the Q8.8 split;
  - the linear `2^frac`;
  - the exponent clamp;
  - the divider;
  - the number of PEs.
- **Result port.** It has no back-pressure: `ddr_we` is a one-cycle write strobe that the memory
  side must always accept. At most one row comes out per node, spaced at least one cycle apart.
- **Unchecked degree limit.** The maximum degree of 248 is not checked in hardware, only by an
  assertion.
- **Preprocessing stays in software.** Load balancing and the compressed format (MCSR) are built
  on the host.
- **Timing.** The 200 MHz target has not been checked in this repository by synthesis or timing.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hgat_pkg.sv tb/hgat_ref_pkg.sv \
    tb/tb_hgat_top.sv --top-module tb_hgat_top -o sim && obj_dir/sim
```

Unit testbenches are built the same way: swap the `tb_*.sv` file and the top module. The `-I`
paths let Verilator find the submodules.

| testbench | what it exercises |
|---|---|
| `tb_sp_pe` | back-to-back rows, empty rows, stalls, one beat per cycle |
| `tb_spmm` | 16 PEs with random lanes, collector conflicts |
| `tb_h_lane_feeder`, `tb_data_loader` | buffer load, streaming, column broadcast, a1/a2 |
| `tb_d_pe`, `tb_dmvm` | dot products, latency, saturation |
| `tb_adj_reader` | edge walk, empty rows, credit gating |
| `tb_leaky_relu`, `tb_softmax_unit`, `tb_af_unit` | base-2 softmax under random stalls and large neighbourhoods |
| `tb_aggregator`, `tb_memory_write` | aggregation with relu, DDR address and mask |
| `tb_hgat_top` | full layer at default parameters: 300 nodes, 40 features, 2 heads of 6, a hub of degree 248 |
| `tb_hgat_workloads` | two GAT layers on random graphs with Cora and CiteSeer sizes |

`tb_hgat_top` checks every written word against the reference. It also counts that each mechanism
was really exercised:

- back-to-back rows in a PE;
- empty rows;
- padding;
- collector conflicts;
- softmax credit stalls;
- negative leakyrelu inputs;
- relu clipping;
- W broadcasts;
- the second head.

It also compares the cycle count with the budget above.

`tb_hgat_workloads` generates random graphs with the node, edge, feature and density figures of
Cora and CiteSeer. It also generates a 2,200-node slice with PubMed's feature width, density and
average degree. The full PubMed graph does not fit. Each run goes through both layers of a 2-head,
hidden-8 GAT. The output layer has one head with 7, 6 or 3 classes. Measured at 200 MHz:

| graph | layer 1 | layer 2 | total |
|---|---|---|---|
| Cora-sized | 105,680 cycles (0.53 ms) | 32,874 cycles (0.16 ms) | 0.69 ms |
| CiteSeer-sized | 186,863 cycles (0.93 ms) | 33,262 cycles (0.17 ms) | 1.10 ms |
| PubMed-shaped, 2,200 of 19,717 nodes | 150,279 cycles (0.75 ms) | 18,964 cycles (0.09 ms) | 0.85 ms |

Layer 1 is dominated by the SPMM phase: 16 columns × (f_in broadcast + lane streaming). The
originally reported figures are 0.6 ms for Cora, 0.8 ms for CiteSeer and 5.7 ms for PubMed. The gap
comes mainly from the repeated W broadcasts and from the edge phase waiting for the SPMM.
