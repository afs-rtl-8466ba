# AFS error-decoding subsystem in SystemVerilog

This is RTL for the decoding side of a fault-tolerant quantum computer, as
described in "AFS: Accurate, Fast, and Scalable Error-Decoding for
Fault-Tolerant Quantum Computers". Every logical qubit is a surface code of
distance `D`. Each syndrome measurement round, every qubit sends its X and Z
syndrome bits. The subsystem compresses them for the link and expands them
again at the decoder. It then groups `D` rounds into one 3-D decoding problem
and decodes that with a hardware Union-Find decoder. The decoder is a
three-stage pipeline: Graph Generator, DFS Engine and Correction Engine. Two
logical qubits share one decoder block (the Conjoined-Decoder Architecture,
CDA). The result is a Pauli frame of X and Z corrections per qubit.

The default build is the main configuration of the design: distance 11,
1000 logical qubits, 2 qubits per decoder block, and a 350 ns timeout at a
4 GHz clock (1400 cycles).

## Source layout

| File | Contents |
|---|---|
| `rtl/afs_pkg.sv` | Shared types (`node_t`, `stm_word_t`, `edge_entry_t`, ...), lattice helper functions, compression sizes |
| `rtl/afs_stack.sv` | Generic LIFO stack used for the fusion, runtime and edge stacks |
| `rtl/afs_stm.sv` | Spanning Tree Memory with Zero Data Register |
| `rtl/afs_grgen.sv` | Graph Generator (cluster growth, Union/Find) |
| `rtl/afs_dfs.sv` | DFS Engine (spanning forest, two edge stacks) |
| `rtl/afs_corr.sv` | Correction Engine (peeling, Syndrome Hold Registers) |
| `rtl/afs_select.sv` | First-ready / round-robin select logic |
| `rtl/afs_decoder_block.sv` | CDA decoder block: N qubits, N Graph Generators, 2N STMs, one DFS and one Correction Engine |
| `rtl/afs_round_buffer.sv` | Turns D rounds into one 3-D syndrome of detection events |
| `rtl/afs_sc_dzc.sv`, `afs_sc_sparse.sv`, `afs_sc_geo.sv` | The three syndrome compression schemes |
| `rtl/afs_sc_compress.sv`, `afs_sc_decompress.sv` | Hybrid compressor (shortest packet wins) and its inverse |
| `rtl/afs_top.sv` | The whole subsystem for L qubits |
| `tb/` | One self-checking testbench per block, an end-to-end test and a distance-11 test |

## Decoding graph

All decoder stages share one concrete graph, defined in `afs_pkg`:

* There are `D` rounds (layers `t`). Each layer is a grid of `D` rows by
  `D-1` columns of ancillas of one error type.
* The node id is `(t*D + r)*(D-1) + c`. One extra node, `BND`
  (id `D*D*(D-1)`), stands for the whole open boundary.
* Every node owns up to four edges:
  * `DIR_E`: to `(r, c+1)`, or to the boundary in the last column.
  * `DIR_WB`: to the boundary, only in column 0.
  * `DIR_S`: to `(r+1, c)`.
  * `DIR_U`: to the same ancilla one round later.
* The first three are data-qubit errors; `DIR_U` is a measurement error.
* That gives `D*D + (D-1)*(D-1)` data qubits per error type. This is the
  width of each Pauli frame; `afs_pkg::data_index` gives the bit layout.
* A lattice row (the `D-1` nodes with the same `t` and `r`) is one row of
  the Spanning Tree Memory and one bit of the Zero Data Register.

The paper only says that `d` rounds are decoded together as a 3-D
matching problem. The node numbering, the single boundary node and the
ownership of edges are this design's choices.

## Data path

```
rnd_syn[q] -> afs_sc_compress -> link -> afs_sc_decompress
           -> afs_round_buffer -> afs_decoder_block (qubits 2b, 2b+1)
           -> frame_x[q], frame_z[q], dec_done[q]
```

* **Compression** (`afs_sc_compress`). All three encoders run in parallel on
  the `2*D*(D-1)` bits of a round (X bits first, then Z). The shortest packet
  is registered together with a 2-bit scheme header.
  * DZC: a zero-indicator bit per 8-bit block, then the non-zero blocks.
  * Sparse: an all-zero bit, then the 8-bit indices of the ones.
  * Geo-Comp: 2 x 2 ancilla tiles with their X and Z bits together (8 bits),
    a zero-indicator bit per tile, then the non-zero tiles.

  Ties go to DZC, then sparse. `link_bits` and `raw_bits` on the top count
  the bits sent and the bits a raw link would need.
* **Decompression** (`afs_sc_decompress`). This is the exact inverse, one
  cycle.
* **Round buffer** (`afs_round_buffer`). Each round is XORed with the
  previous one, so a node bit is a detection event. After `D` rounds the
  3-D syndromes of both types are offered to the decoder block
  (`out_valid`/`out_ready`). Logical cycles do not overlap. If the next
  cycle completes before the decoder took the previous one, the new cycle
  replaces it and `backlog` pulses.

## Decoder pipeline

**Spanning Tree Memory** (`afs_stm`)
* One word per node: the syndrome bit and a 2-bit growth state for each of
  the four edges the node owns (0 = untouched, 1 = half grown, 2 = full).
* Port A is the Graph Generator's read/write port. Port B is the DFS
  Engine's read-only port. Both read asynchronously; a write is seen the
  next cycle.
* Loading a syndrome clears all edges in one cycle and recomputes the Zero
  Data Register (ZDR), one bit per row. A row's bit is also set when one of
  its edges grows.

**Graph Generator** (`afs_grgen`)
* Every node starts as its own cluster, with a Root table, a Size table and
  a parity register per node. Growth rounds repeat until no odd cluster is
  left. The boundary cluster is never odd and is always a root.
* Pass 1 (grow) walks the rows in order. It skips a row when that row, the
  row above and the same row one round earlier all have a zero ZDR bit; a
  priority encoder finds the next row to visit, so a run of skipped rows
  costs one cycle. For
  each node, Find() gives its root. If the root is odd, each of the node's
  seven incident edges grows by half an edge, one edge per cycle. An edge
  that becomes full is pushed on the fusion (runtime) stack.
* Pass 2 (merge) pops that stack and merges the two clusters: union by size,
  and the parity of the merged cluster is the XOR of the two.
* Find() follows the Root table one step per cycle and stores the visited
  nodes in up to `TTR_DEPTH` tree traversal registers. It then writes the
  root into each of them (path compression), one write per cycle.
* If the fusion stack could overflow during pass 1, the merges are done
  early and pass 1 resumes at the same node.

**DFS Engine** (`afs_dfs`)
* It first traverses from the boundary node, finding the boundary's
  neighbours through the boundary edges of ZDR-marked rows. Every cluster
  that touches the boundary is therefore rooted at the boundary.
* It then scans only the ZDR-marked rows (a priority encoder jumps over
  unmarked runs in one cycle) for unvisited nodes that carry a
  syndrome bit or an own full edge; each one starts a new tree.
* The runtime stack holds nodes still to visit, together with the edge that
  reached them. A node's seven incident edges are examined one per cycle.
* Each tree edge is pushed on the current edge stack with the owner,
  direction, child and parent, and the syndrome bits of both ends.
* When a tree is complete, its stack is handed to the Correction Engine and
  the DFS Engine moves to the other stack (S0/S1). If that stack is still
  being peeled, the DFS Engine stalls and counts the stall cycles.
* After the last row, an empty stack marked `es_last` ends the syndrome.

**Correction Engine** (`afs_corr`)
* It pops a stack, so it visits leaves before roots. For an edge, the child's
  current syndrome is the stored bit XOR its Syndrome Hold Register bit.
* If that is 1, the edge is in the correction and the parent's hold bit
  toggles. Hold bits are cleared as nodes are finished, so nothing leaks
  into the next tree.
* A root other than the boundary that is left with a syndrome raises
  `peel_err`.
* It serves one edge per cycle, alternating S0 and S1 in hand-over order.

**Select logic** (`afs_select`)
* Memories holding grown clusters request the DFS Engine. They are queued in
  the order they became ready (first ready, first served).
* Memories that became ready in the same cycle join the queue in round-robin
  order, so none can be starved.
* The queue head drives the multiplexer of the DFS Engine's memory port.

**Decoder block** (`afs_decoder_block`)
* `N = 2` qubits share the block. Each qubit has one Graph Generator and two
  STMs (X and Z). The Graph Generator grows X first and then Z in the other
  STM, while the DFS Engine may already traverse X.
* Both qubits share one DFS Engine and one Correction Engine through the
  select logic. A syndrome tag (qubit, X/Z) travels with every stack and
  routes the corrections into the right Pauli frame. Measurement-error
  edges change no frame bit.
* A qubit accepts a new logical cycle when both of its STMs are free.
* `latency` reports the cycles from hand-over to `dec_done`. If a decode runs
  past `TIMEOUT_CYCLES`, `timeout` pulses. The decode still finishes; the
  flag marks the timeout failure.

## Interfaces and timing

* One clock and an active-low asynchronous reset (`rst_n`).
* The top's ports:

| Port | Direction, width | Meaning |
|---|---|---|
| `rnd_valid` | in, 1 | A round of every qubit is valid this cycle |
| `rnd_syn[L]` | in, `2*D*(D-1)` each | The qubit's round: X bits, then Z bits |
| `frame_x[L]`, `frame_z[L]` | out, `D*D+(D-1)*(D-1)` each | Pauli frames (accumulated corrections) |
| `dec_done[L]` | out | A qubit finished decoding a logical cycle |
| `timeout[L]` | out | A decode exceeded `TIMEOUT_CYCLES` |
| `backlog[L]` | out | A logical cycle was dropped because the decoder was busy |
| `err` | out | A stack overflowed, or peeling left a syndrome, in any block |
| `link_bits`, `raw_bits` | out, 40 | Compressed and raw bits sent so far |

* A round reaches the round buffer 2 cycles after `rnd_valid`: one cycle in
  the compressor and one in the decompressor. The link between them is the
  compressor's output register. The decoder sees a logical cycle 3 cycles
  after its last round.
* Decode time depends on the syndrome. At distance 11 with one X and one Z
  error per logical cycle a decode took 685 cycles on average and 930 at
  most (about 171 ns and 233 ns at 4 GHz). Phase 1 of the end-to-end test uses
  dense stress syndromes (tens of defects); there a decode took 2500 cycles
  on average and 5000 at most.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `D` | 11 | Code distance of the main configuration |
| `L` | 1000 | Logical qubits of the main configuration |
| `N` | 2 | Qubits per decoder block ("two Gr-Gen units share a DFS Engine and CORR Engine") |
| `TIMEOUT_CYCLES` | 1400 | 350 ns timeout at the 4 GHz clock |
| `SC_W` | 8 | DZC block width (own choice) |
| `SC_GH`, `SC_GW` | 2, 2 | Geo-Comp tile size (own choice) |
| `FUSE_DEPTH` | 64 | Fusion stack of the Graph Generator (own choice) |
| `RT_DEPTH`, `ES_DEPTH` | 32, 32 | Runtime and edge stacks of the DFS Engine (own choice) |

Node ids are 16 bits, which is enough for distances up to 25.

## Where the design departs from the paper

* **Memory timing.** The paper assumes 4-cycle memory accesses at 4 GHz.
  Here the STM and tables are register files, read asynchronously and written
  in one cycle.
* **Cycle counts.** The schedules are simple and sequential: one incident
  edge per cycle, and Find() one step per cycle. At distance 11 a single
  X and Z error take 685 cycles on average (171 ns at 4 GHz), against the
  paper's 42 ns average. At high defect densities decodes take thousands
  of cycles. Latency was not measured under the paper's noise model.
* **Table sharing.** Root and size tables belong to each Graph Generator.
  The paper's further option of sharing them between two Graph
  Generators is not built.
* **Storage.** The tables hold full 16-bit entries for every node. At the
  default size that is about 8 KB per qubit (the paper gives 8.95 KB for
  d=11). For 1000 qubits it is about 7.8 MB, against the paper's 2.8 MB
  with CDA.
* **Boundary.** The boundary is one node. Clusters that reach it stop
  growing.
* **Round differences.** Detection events are round-to-round differences
  made in the round buffer. Logical cycles of `D` rounds do not overlap.
* **Stack overflow.** It is reported on `err`, not prevented. The default
  depths suit sparse syndromes (physical error rate around 1e-3). Dense
  syndromes need deeper stacks, as the testbenches use.
* **Not built:** the physical qubits and the syndrome measurement circuit.
  They are analog/quantum parts; testbenches model their output.

## Verification

Each block has a self-checking testbench in `tb/` that compares its
outputs with values the testbench computes on its own:

| Testbench | What it checks |
|---|---|
| `tb_afs_stm` | Both read ports and the ZDR against a model, over random loads and writes |
| `tb_afs_grgen` | With an STM: every cluster even or touching the boundary, ZDR contents, half-grown edges only next to clusters, neighbouring pairs joined by exactly their edge; multi-round decodes and early merges occur |
| `tb_afs_dfs` | With an STM: each handed-over stack is one spanning tree of one whole cluster, listed parents-first; boundary clusters rooted at the boundary; syndrome bits in the entries; stalls occur |
| `tb_afs_corr` | Corrections equal the reference (an edge is in the correction when its subtree holds an odd syndrome count); `peel_err` exactly for odd trees |
| `tb_afs_select` | Every grant against a model of the first-ready / round-robin policy; no starvation |
| `tb_afs_decoder_block` | D=5, two qubits: corrections explain each syndrome, single errors are corrected exactly, stalls, competing requests, multi-round growth, early merges and timeouts occur |
| `tb_afs_round_buffer` | Detection events against a model; backlog exactly when a cycle is replaced |
| `tb_afs_sc_*` | Each encoder against a reference encoder; the hybrid choice; the decompressor restores every round |
| `tb_afs_top` | End to end, D=5, four qubits in two blocks (below) |
| `tb_afs_top_d11` | The top at distance 11, two qubits in one block (below) |

**End-to-end test (`tb_afs_top`).** Phenomenological noise: data errors
accumulate round by round, and some measurement outcomes are flipped.

* Phase 1 spaces the rounds out. Every logical cycle that the decoder
  accepts must equal the testbench's own round differences, and the
  corrections must explain it exactly.
* The link-bit count must equal the reference packet sizes.
* Phase 2 sends rounds back to back until the decoders fall behind.
* The test counts each mechanism and fails if one never happens: each
  compression scheme, backlog, timeout, DFS stall, a memory waiting at the
  select logic while the DFS Engine is busy, and early merge.

**Distance-11 test (`tb_afs_top_d11`).** The top with every default
except `L=2`: distance 11, two qubits sharing one decoder block, the
1400-cycle timeout and the default stack depths. Each logical cycle has one
data error of each type per qubit; the frame change must be exactly that
error, with no timeout, backlog or error flag.

**Largest size simulated.** The top at its full default size (1000 qubits,
500 decoder blocks) was not simulated: its model is too large to build. The
largest end-to-end runs are the distance-11 test above (all defaults except
the qubit count) and `tb_afs_top` (distance 5, four qubits).

**Fault tests.** Each testbench was also run against a copy of its module
with one deliberate bug, and it reported failures for every one.

**Synthesis.** The top at its default size (500 decoder blocks) compiles
in both checking tools. Synthesising it did not finish within a 10-minute
limit, so no gate count is given for the full size.
