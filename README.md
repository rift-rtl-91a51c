# RIFT accelerator RTL: one PE array, many dataflows

Multimodal inference mixes layers that want very different hardware:
dense GEMMs in CNN and MLP layers, attention that becomes sparse once
unimportant tokens are pruned, and irregular sparse reductions in graph
networks. The RIFT architecture does not build one engine per kind of
layer. It lowers every layer to one of three matrix kernels: dense-dense
(DDMM), sampled dense-dense (SDDMM) and sparse (SpMM). All three run on a
single PE array whose dataflow is chosen per block of work at run time.
The modes are weight- or output-stationary systolic, 1 x C_S SIMD,
element-wise SIMD, and a routable adder tree (RADT). Tokens are pruned as
the scores leave the array, by a top-k unit as wide as the array. The kept
token indices then decide which operands later kernels read. Several
reconfigurable processing units (RPUs) run independent kernels at the
same time, fed by a dispatcher that follows the kernels' dependency graph.
Changing mode only changes a few descriptor registers. Nothing is
reconfigured.

This repository holds synthesizable SystemVerilog for that architecture.
The default size is a 2 x 2 grid of RPUs, each with a 4 x 4 PE array.
All data are int8, with 32-bit partial sums. It also holds self-checking
testbenches for every block and for the whole accelerator.

## Structure

```
host bus ──► rift_host_if ──► buffers of every RPU
                     └──────► rift_dispatch (block table, dependency masks)
                                   │ one block queue per RPU
        ┌──────────────────────────┴───────────────┐
   RPU(0,0) ──inter-RPU buffer──► RPU(1,0) ──► dn stream 0
   RPU(0,1) ──inter-RPU buffer──► RPU(1,1) ──► dn stream 1
   (the top row reads the up_* stream ports)
```

Inside one RPU (`rift_rpu`):

```
 top buffer x2 (int8, CS lanes) ─► feed scheduler (skew) ─┐
 left buffer (int8, RS lanes) ──► feed scheduler (skew) ──┤
                                                          ▼
                                    rift_mse: RS x CS rift_pe array
                                                          │
                                 feed scheduler (de-skew, WS only)
                                                          │
              ┌───────── centre buffer (32-bit, CS lanes) ◄┤
              │                                           └► CS-wide sorter ─► k merge ─► SQB
              ▼                                                                        │
   rift_norm ─► rift_act ─► bottom buffer (int8) ─► downstream inter-RPU buffer         │
                                                                                       │
   SQB indices become read addresses of later SIMD1 / RADT blocks ◄────────────────────┘
```

`rift_idex` (the ID/EX unit) sequences all of this from the RPU's queue
of block descriptors.

## The mode-switchable engine (`rift_mse`, `rift_pe`)

Every PE has a west operand (passed east one cycle later), a north operand
(passed south), a partial-sum input from the PE above, and a side input
from a partner PE. It also holds one weight register and one partial-sum
register. The opcode of each PE for each cycle picks what it does: MAC,
ADD, PASS, load weight, multiply or add with the weight, or clear. Only the
operand muxes in front of the PEs and these opcodes depend on the mode:

| mode | dataflow | result leaves | latency after the operands reach the array |
|---|---|---|---|
| `M_LOADW` | north rows shift down into the weight registers | – | RS cycles for RS rows |
| `M_WS` | activations west to east, partial sums north to south, weights stay | bottom row, column j late by j | RS + j |
| `M_OS` | A west to east, B north to south, every PE accumulates its own output | after `CTL_DRAIN`, one row per cycle from the bottom, last row first | K + RS + CS − 2 cycles, then RS drain cycles |
| `M_SIMD1` | row 0: scalar `bcast_in` × north row, accumulated | row 0 | 1 |
| `M_SIMDE` | row 0: north row (× or +) weight row | row 0 | 1 |
| `M_RADT` | row 0 multiplies by the weights; rows 1…log2 CS form a binary tree | bottom row, root lanes only | RS |

**Routable adder tree.** Tree level l lives in PE row l. The node at lane j,
where j is a multiple of 2^l, either adds the partial sum of lane
j + 2^(l−1) (join bit set) or passes its own. Lanes switched off in the lane
mask contribute 0. `out_root` marks the lanes that still hold a sum, and the
other lanes read 0. At CS = 4, the descriptor's `aux` field holds the mask
in `aux[3:0]` and the join bits in `aux[11:4]`. Join bit (l−1)·CS + j
belongs to node j of level l.

| tree | mask | join bits (level 2 lane 0, level 1 lanes 2 and 0) | sums on |
|---|---|---|---|
| 4-1 | 1111 | 1, 1, 1 | lane 0 |
| 3-1 | 0111 | 1, 1, 1 | lane 0 |
| 2 × (2-1) | 1111 | 0, 1, 1 | lanes 0 and 2 |

The array needs RS > log2(CS).

## How one block runs (`rift_idex`)

A block descriptor (`rift_pkg::instr_t`, 128 bits) holds these fields:
mode ID, loop bound `len`, source and destination base addresses, flags
(`use_sqb`, `topk_en`, `fwd`, `tbank`, `len_sqb`, `to_left`), the top-k `k`,
the element-wise operation, the normalisation and activation selects, a
requantisation shift, and a 32-bit `aux` field whose meaning depends on the
mode. A block goes through these phases:

1. **CLR**: clear the array's partial sums. If the block prunes, clear the
   top-k list and the sparse queue buffer (SQB). If it reads through the
   SQB, rewind the SQB. With `len_sqb` set, replace `len` by the number of
   indices the last top-k pass kept. This completes a template for a layer
   whose size is known only at run time.
2. **ISSUE**: read one row per cycle. The address is `src + i`, or the next
   SQB index (`use_sqb`, SIMD1 and RADT), or `src + len − 1 − i` for weight
   loads, so that PE row r ends up holding source row r. A read waits
   (`stall`) while any of these holds:
   - the SQB is empty;
   - a RECV block finds the upstream inter-RPU buffer empty;
   - a forwarding POST block finds no room downstream for its rows in
     flight.
3. **WAIT**: a write-back pipeline carries each row's destination until its
   result is ready. The number of cycles is RS + CS in WS mode, RS + 1 in
   RADT, 2 in SIMDE and SIMD1, and 1 in POST. SIMD1 writes one row, after
   its last step.
4. **DRAIN**: OS only. RS result rows are shifted out of the array.
5. **TKWAIT/TOPK**: wait CS cycles for the sorter and the merge, then push
   the first k kept indices into the SQB.
6. **DONE**: return the block's tag to the dispatcher.

Results go to the centre buffer. Two more modes make the rest of the RPU
programmable by the same descriptors:

- **`M_POST`** reads centre-buffer rows through the norm and activation
  units into the bottom buffer. With `fwd` set, it also pushes them
  downstream.
- **`M_RECV`** writes rows from the upstream inter-RPU buffer into the top
  buffer, or into the left buffer if `to_left` is set.

The top buffer has two banks (`tbank`), so the host can fill one bank while
blocks use the other.

Measured at the default size: a SIMD1 block over k kept tokens keeps its
RPU in SIMD1 mode for k + 4 cycles. Each pruned token saves exactly one
cycle. Four heads of LOADW, WS (2 rows, 8 scores), SIMD1 over k kept tokens
and POST run on the four RPUs at once. They take 52 + 2k cycles, counted
from the start command to the first idle status read.

## In-stream top-k pruning and the sparse queue buffer

Every result row written to the centre buffer can also enter the top-k
unit in the same cycle. Lane j of result row r is the candidate for token
r·CS + j, and its 32-bit value is the score. In RADT mode only root lanes
are candidates. The unit works in two stages:

- **Sorter** (`rift_topk_sorter`): an odd-even transposition network, CS
  compare layers deep, each layer followed by a register. It takes one
  group per cycle and delivers it sorted CS cycles later.
- **Merge** (`rift_topk_merge`): merges each sorted group into a running
  list of the best KMAX candidates in one cycle.

Storage does not grow with the number of tokens. The sorter pipeline holds
CS groups of CS candidates, and the list holds KMAX.
Order: higher score first, and the lower token index first when scores are
equal. The first k entries of the list go into the SQB. A later SIMD1 block
with `use_sqb` then multiplies left-buffer lane 0 at each kept index by the
top-buffer row at the same index. This is an SpMM or attention-value
product restricted to the kept tokens. A RADT block can use the same
indices after a rewind.

The host can also fill the SQB itself, through region 4 of the address
map. This lets a SIMD1 block gather over an index list that does not come
from pruning, such as the neighbours of a graph node in a bounded-degree
GNN. Reading region 4 returns how many indices the last top-k pass kept,
which is the run-time field that completes a template.

## Dependency-aware dispatch (`rift_dispatch`)

The host writes up to NB = 16 table entries. Each entry holds a
descriptor, the RPU that runs it, and a dependency mask over other entries.
After a start command, every cycle the lowest-numbered entry is pushed into
its RPU's 4-deep block queue, if:

- it has not been issued yet;
- all its predecessors have completed;
- its queue has room;
- no lower-numbered entry for the same RPU is still waiting.

A full queue holds dispatch back. Blocks on different RPUs overlap and
overtake one another. Blocks on one RPU always run in table order, so a
chain of blocks on one RPU needs no dependency bits. Completion tags come
back from the RPUs and release the blocks that depend on them.

## Host address map (`rift_host_if`)

| address | meaning |
|---|---|
| `[31:28]` = RPU n, `[27:24]` = region, `[23:20]` = lane, `[15:0]` = word | write: `wdata[7:0]` into one lane; read: that lane, one cycle later |
| regions | 0 top (bank 1 = word + TBD), 1 left, 2 centre (32-bit), 3 bottom |
| region 4 (SQB) | write word 0: empty the SQB; write word 1: append index `wdata[15:0]`; read: indices written since the last clear |
| `F000_0000`…`_0003` | descriptor staging words, word 0 = bits 31:0 |
| `F000_0004` | `wdata[15:0]` dependency mask, `wdata[27:24]` RPU |
| `F000_0005` | store the staged entry at table index `wdata` |
| `F000_0006` | start entries 0 … `wdata − 1` |
| `F000_0008` (read) | bit 31 busy, low bits: completed entries |

A host write to the top or left buffer wins over a RECV write in the same
cycle. Do not write a buffer that a running block writes.

## Post-processing: norm and nonlinear units

All values are int8 read as fixed point with 4 fraction bits (16 = 1.0).

- **Batch norm** (`rift_norm`) is x·gamma + beta, with gamma and beta taken
  from `aux`.
- **Layer norm** normalises each row: (x − mean)·16·gamma / floor(sqrt(var))
  + beta. The standard deviation is at least 1.
- **Requantisation** (`rift_act`) is an arithmetic shift followed by int8
  saturation. One of these functions follows:

| function | approximation |
|---|---|
| ReLU | max(x, 0) |
| GELU | x·(x + 3)/6 between −3 and 3; 0 below, x above |
| ELU | three linear pieces through (0, 0), (−1, −0.625) and (−2, −0.8125), floor at −1 |
| softmax | over the CS lanes of a row: e_j = 2^−⌊(max − x_j)·23/256⌋, output 127·e_j/Σe |

## Parameters

| parameter | default | where the number comes from |
|---|---|---|
| `GR`, `GC` (grid) | 2, 2 | the 2 × 2 RPU grid of the RIFT architecture |
| `RS`, `CS` (PE rows, columns) | 4, 4 | the 4 × 4 PE array of the RIFT architecture |
| `TBD`, `LBD`, `CBD`, `BBD` (buffer words) | 64 | chosen here |
| `KMAX`, `SQBD`, `QD`, `IRBD`, `NB` | 8, 16, 4, 8, 16 | chosen here |

## What is this design's own, and what is missing

The architecture fixes these:

- the RPU grid with vertical inter-RPU buffers;
- the RPU's contents;
- the four engine modes and the three adder-tree shapes;
- the two-stage, array-wide top-k feeding a sparse queue buffer;
- a feed scheduler;
- an ID/EX unit driven by small control registers;
- a runtime controller that dispatches ready blocks from a dependency graph
  through queues.

In the RIFT architecture the merge stage sits after the centre buffer,
so sorted groups appear to pass through it. Here the sorter feeds the merge directly, and only
the results go to the centre buffer. This keeps sorted groups out of
buffer space and ports, and gives the same kept set.

This design chose the rest: word widths beyond int8, buffer depths, the
descriptor format and the POST/RECV modes, the host address map, the PE
opcode set, the tree encoding, the drain order, and every approximation in
the norm and activation units.

Not built:

- the host processor and the external memory (they sit beyond the host
  bus);
- a DMA engine;
- the compiler that lowers layers and picks modes;
- any hardware policy in the dispatcher that switches between SIMD1 and
  RADT when sparsity drifts. Here SIMD1 and RADT blocks need different
  operand layouts, so a switch needs alternative blocks prepared in
  advance. The host can read the kept-token count (SQB region) and rewrite
  table entries between runs. The run-time completion of a block's length
  from that count (`len_sqb`) is built.

With 64-word buffers, 8 KiB of on-chip storage in all, whole models do not
fit. TinyCLIP, MDETR and a DynamicViT backbone with ~197 tokens all need
megabytes of int8 weights. The host has to stream 4 × 4 tiles through the
buffers, and a pruning pass keeps at most KMAX = 8 tokens per block.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rift_pkg.sv tb/tb_rift_top.sv --top-module tb_rift_top
./obj_dir/Vtb_rift_top
```

The RTL raises no warning at Verilator's default settings. Some
testbenches mix integer widths in their reference arithmetic, and
`-Wno-fatal` keeps those messages as warnings. Replace `tb_rift_top` by
any other testbench in `tb/`:

- `tb_rift_pe`, `tb_rift_mse`, `tb_rift_feed_sched`;
- `tb_rift_topk_sorter`, `tb_rift_topk_merge`, `tb_rift_sqb`;
- `tb_rift_buf`, `tb_rift_fifo`;
- `tb_rift_norm`, `tb_rift_act`;
- `tb_rift_dispatch`, `tb_rift_host_if`;
- `tb_rift_rpu`, which also covers `rift_idex`.

`tb_rift_top` runs the whole accelerator at the default parameters, in
two phases:

- **Phase 1**, 16 blocks on four RPUs:
  - pruned attention on RPU0: WS scores, top-4, SIMD1 over the kept
    tokens, softmax;
  - a dense OS product with layer norm and GELU on RPU1, plus filler blocks
    that fill RPU1's block queue;
  - transfers to RPU2 and RPU3 through the inter-RPU buffers.
- **Phase 2**: a 2 × (2-1) adder-tree reduction on RPU3.

It checks every result against its own reference. It also counts each
mechanism and fails if one never happened:

- every mode ID, and mode switches;
- stalls on inter-RPU buffers;
- dispatcher backpressure;
- RPUs overlapping;
- top-k pushes and SQB-gated reads.

Phase 1 finishes in about 70 cycles.

`tb_rift_prune_sweep` runs a token-pruning sweep, also at the default
size:

- four attention heads run at once, one per RPU;
- each head computes 8 token scores, keeps the top k, and sums value rows
  over the kept tokens;
- the sweep drops 0, 10, 20 and 30 % of the tokens, so k = 8, 7, 6, 5.

It checks every score, sum and output. It also checks that the SQB
received k indices, and that the SIMD1 time shrank by exactly one cycle
per dropped token.

`tb_rift_mm_tiles` runs one tile of each kind of layer at the same time,
all in one dependency table:

- a two-layer ViT MLP: fc1 with layer norm and GELU on RPU0, forwarded
  through the inter-RPU buffer to fc2 on RPU2;
- a 3 × 3 convolution as an OS product, with batch norm and ReLU, on RPU1;
- GNN neighbour aggregation on RPU3: two different neighbour sets summed
  by 3-1 adder trees, and a SIMD1 gather over a neighbour list that the
  host pushed into the SQB.

The only tool warnings are unused bits and a note that `rst_n` feeds both
flip-flops and the `disable iff` of assertions. Neither points at a
circuit fault.
