# A dictionary machine on a hypercube

This is a pipelined hardware dictionary. It holds a set of records (a key plus a payload) and
executes five instructions: **Insert(k)**, **Delete(k)**, **Search(k)**, **Find Min** and
**Extract Min**. The machine is a hypercube of `N = 2**D` identical processors, and processor 0
is its only I/O port. Two systolic structures run on the same processors at the same time, and
they never use the same link:

* **The snake** is a sorted systolic priority queue. It passes through every processor exactly
  once. Insert, Delete, Extract Min and Find Min go into it at processor 0, which always holds the
  smallest record.
* **The broadcast net** takes each Search(k) from processor 0 to every processor in `D+1` steps,
  along a directed graph G1. It then collects the answer `<k, v, r>` back to processor 0 along G2,
  which is G1 with every edge reversed. Here `v` says whether the key was found and `r` is the
  record's payload.

Inserting a key that is already stored does nothing, and so does deleting a key that is absent.

The top module is `dict_machine`. Its default is `D = 7`: 128 processors, so 128 records.

## Operations and timing (D = 7)

| instruction | goes to | may follow the previous one of its kind after | answer |
|---|---|---|---|
| Insert, Delete, Extract Min | snake | 2 cycles | none |
| Find Min | head of the snake | 2 cycles after a snake instruction, else 1 | `fm_o`, 1 cycle after acceptance |
| Search | broadcast net | 1 cycle | `srch_o`, `2*D+4` = 18 cycles after acceptance, in order |

Two more ordering rules apply between Searches and updates (see "Searches and updates" below).
A Search waits 117 cycles after the last Insert, Delete or Extract Min. An update waits `D+7` = 14
cycles after the last Search. `in_ready` is held low until an instruction may go.

## The embedding

The processors are grouped into sub-hypercubes of 16. Bits 3..0 of a processor number select the
processor within its sub-hypercube, and bits `D-1..4` select the sub-hypercube. Dimension `b` is
the link between processors whose numbers differ only in bit `b`. The tables below are in
`dict_pkg`.

### Inside a sub-hypercube

Each processor has a fixed broadcast distance from the sub-hypercube's root `x..x0000`:

| distance | processors (bits 3..0) |
|---|---|
| 0 | 0000 (root) |
| 1 | 0100, 0010, 1000 |
| 2 | 1100, 1010, 1001 |
| 3 | 1110, 1101, 0001 |
| 4 | 0110, 0101, 0011, 1111 |
| 5 | 0111, 1011 (the two sinks of G1) |

The snake runs through the sub-hypercube from end **A** = 0000 to end **B** = 1110:

`0000 0001 0101 0100 0110 0010 0011 0111 1111 1101 1001 1011 1010 1000 1100 1110`

Two snake neighbours never differ by more than 3 in broadcast distance (Δ = 3). This is the only
such path from A to B that leaves enough of the other edges to reach every processor at its
distance. G1 is made of those other edges: every non-snake edge that joins distance `t` to
distance `t+1`. A processor with several G1 parents receives the same message from all of them in
the same cycle.

### Between sub-hypercubes

* **Broadcast.** The roots form a binomial tree. Processor 0 sends across dimension `D-1`. Then
  every root that has the message sends across `D-2`, and so on down to dimension 4. After `D-4`
  steps every root holds the message, and all sub-hypercubes start their local broadcast in the
  same cycle. Each root has a shift queue with positions 5..D (`bnet_queue`). The message at
  position `k` is sent across dimension `k-1`, then the queue shifts one place toward position 5.
  Because of this queue, Searches can follow each other every cycle.
* **Snake.** The sub-hypercube snakes are chained in reflected-Gray order of bits `D-1..4`, and
  their direction alternates. One join connects two B ends across bit 4. The next join connects
  two A ends across a higher bit, and so on. An A–A join never falls on an edge of the roots'
  broadcast tree, so the two embeddings stay edge-disjoint across the whole cube.
* **Answers.** The answers travel back up the same tree. Each root merges its own sub-hypercube's
  answer with the answers from its children (`v` is ORed), then sends the result across its
  lowest set bit at or above 4. Processor 0 ends up with the answer for the whole machine.

Snake position `s` maps to processor `snake_node(s)`. The snake's tail is at position `N-1`.

## The snake cell

Each processor's `snake_cell` holds one record. The occupied cells are always a sorted prefix of
the snake. Instructions enter at the head as tokens and move one cell per clock:

* **INS** stores its record in an empty cell and ends. At a cell with the same key it ends, so the
  duplicate is ignored. At a cell with a larger key it swaps and carries the larger record on.
* **DEL** turns the matching cell into a *hole* and continues as **SHIFT**. It ends at an empty
  cell or at a larger key, because the key is then absent.
* **XMIN** (Extract Min) is a DEL that matches whatever the head holds.
* **SHIFT** tells a cell that its predecessor is a hole. The predecessor copies this cell's record
  in the same cycle, and this cell becomes a hole in turn. At an empty cell the SHIFT ends.

Tokens enter at least two cycles apart. As a result, every hole has been refilled before the next
token reaches it (an assertion checks this). If an insertion arrives when every cell is full, the
largest record leaves the tail and is lost, and `overflow_o` pulses.

## The broadcast net, cycle by cycle

Take a Search accepted at clock edge `e`:

| edge | event |
|---|---|
| `e` | `io_ctrl` registers the message |
| `e+1` … `e+D-4` | the message moves through the global queue (none of this when D = 4) |
| `e+D-3+t` | the processor at distance `t` in every sub-hypercube registers the message |
| `e+D+2` | the sinks compare the key with their own record and register an answer |
| `e+D+8-t` | the processor at distance `t` merges its children's answers with its own comparison |
| `e+D+8` … `e+2D+4` | the roots' answers merge back to processor 0; `srch_o` is valid after `e+2D+4` |

A processor compares the key when the answer passes through it on the way back, so no processor
has to store a pending result.

## Searches and updates

A Search compares the key at different processors in different cycles, while snake tokens may be
moving records between those processors. The published design keeps a Search exact through this
with extra per-processor bookkeeping, whose size grows with Δ. That mechanism is not described in
enough detail to build, and this RTL does not have it. Instead, `io_ctrl` orders the two kinds of
instruction:

* **Search after an update.** A token changes the cell at snake position `s` at edge `s+1` after
  acceptance, or `s+2` when a hole is refilled. The processor at distance `t` compares using the
  state after edge `D+7-t` from the Search's acceptance. A Search therefore waits
  `SU_GAP = max over s of (s + t(s) - D - 5)` cycles after the last token. At the tail the bound is
  one less, because the tail empties instead of leaving a hole. For D = 7 this is 117 cycles.
* **Update after a Search.** The head cell compares last, at edge `e+D+7`. An update therefore
  waits `D+7` cycles after the last Search.

Both bounds are exact for this timing. If either wait is cut by one cycle, the D = 4 end-to-end
test reports wrong answers. Searches stay one cycle apart and updates two cycles apart, but a
Search right after an update has O(n) delay here instead of O(1).

## Interface of `dict_machine`

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | | clock; asynchronous reset, active low (empties the dictionary) |
| `in_valid`, `in_ready` | in/out | | handshake: an instruction is taken on a clock edge where both are 1 |
| `in_i` | in | `instr_t` | `op` (`OP_INSERT`, `OP_DELETE`, `OP_SEARCH`, `OP_FINDMIN`, `OP_XMIN`), `key`, `data` |
| `srch_o` | out | `rmsg_t` | Search answer: `valid`, `key`, `found` (v), `data` (r) |
| `fm_o` | out | `rmsg_t` | Find Min answer: `valid`, minimum `key` and `data`; `found = 0` if the dictionary is empty |
| `overflow_o` | out | | an insertion found the dictionary full |
| `cells_o` | out | `rec_t [2**D]` | the record at each snake position, for observation |

`in_ready` depends on `in_i.op`, because different kinds of instruction have different waits.
Keys and payloads are 16 bits each (`KEY_W`, `DATA_W` in `dict_pkg`).

## Parameters and size

| parameter | default | meaning |
|---|---|---|
| `D` | 7 | hypercube dimension, so `2**D` processors; must be at least 4 |
| `KEY_W`, `DATA_W` (package) | 16, 16 | record widths |

At D = 7 the design has about 13,000 flip-flops. Most of them are the 33-bit record and the token
register in each of the 128 cells, plus the broadcast registers.

## Files

| file | contents |
|---|---|
| `rtl/dict_pkg.sv` | types (`rec_t`, `tok_t`, `smsg_t`, `rmsg_t`, `link_t`, `instr_t`) and the embedding functions |
| `rtl/snake_cell.sv` | one cell of the systolic priority queue |
| `rtl/bnet_node.sv` | broadcast stage inside a sub-hypercube (G1 forward, G2 answer with comparison) |
| `rtl/bnet_queue.sv` | global Search queue and answer queue at each sub-hypercube root |
| `rtl/hc_pe.sv` | one processor: the three parts above wired to its D links |
| `rtl/io_ctrl.sv` | instruction handshake, token/Search issue, ordering rules, Find Min |
| `rtl/dict_machine.sv` | the hypercube: N processors, links, controller |

## Simulating

Each testbench checks itself and ends by printing `TB_RESULT checks=<n> failures=<n>`. Example:

```
verilator --binary --timing --assert -Irtl rtl/dict_pkg.sv rtl/snake_cell.sv rtl/bnet_node.sv \
  rtl/bnet_queue.sv rtl/hc_pe.sv rtl/io_ctrl.sv rtl/dict_machine.sv tb/tb_dict_machine.sv \
  --top-module tb_dict_machine -o tb && ./obj_dir/tb
```

| testbench | what it checks |
|---|---|
| `tb_dict_machine` | end to end at the default D = 7. It first checks the embedding: the snake visits every processor once along cube edges, and Δ = 3. During the run it checks that no link ever carries both snake and broadcast traffic. A reference model predicts every answer and its latency, and the final contents of the snake. It also drives a directed hazard phase (Search/update pairs on the head and tail keys). It counts duplicate inserts, absent deletes, overflow, shifting deletes, Extract Min, Find Min on an empty dictionary, hits and misses, back-to-back Searches, and each kind of stall, and fails if any of them never happened. |
| `tb_dict_table1` | steady streams of each instruction at D = 7, measuring delay and latency: Insert, Delete and Extract Min every 2 cycles; Search and Find Min every cycle; Search answer after 18 cycles; Find Min after 1 |
| `tb_dict_machine_d4`, `_d5` | the same test at D = 4 (one sub-hypercube, no global queue) and D = 5 |
| `tb_snake_cell` | a chain of 8 cells against a sorted list: displacement, holes, overflow |
| `tb_bnet_node` | 16 stages: arrival at each printed distance, answer timing, found/not found |
| `tb_bnet_queue` | the four roots of D = 6: simultaneous start, merged answer and its latency |
| `tb_hc_pe` | processor 0 with emulated neighbours: which dimension carries what, answer merge |
| `tb_io_ctrl` | issue timing and the exact wait of every ordering rule |

The full D = 7 end-to-end test compiles in about a minute and runs in under a second.

## Where this design departs from the published one, and what is its own

* The per-processor bookkeeping that would let Searches overlap updates is not built. It is
  replaced by the ordering rules above, so a Search right after an update is delayed by O(n)
  cycles.
* The published design names the snake only as "the well-known systolic priority queue". The
  token and hole protocol, its two-cycle period and the overflow behaviour are this design's own.
* The exact G1 edges inside a sub-hypercube are not fixed here edge by edge. Any non-snake edge
  from distance `t` to `t+1` is used. Timing and answers are the same as with a spanning tree.
* The order in which sub-hypercubes are chained into the snake (reflected Gray code) and the
  numbering of dimensions (bit `b` of the processor number) are this design's choices.
* A Search answer takes `2*D+4` cycles, two more than the `2*(D+1)` link hops of the two passes.
  One cycle is processor 0 moving the accepted instruction into its broadcast stage, and one is
  the sinks comparing the key before they answer.
* Each processor compares the key on the reverse pass, not the forward pass. The reverse
  broadcast between roots mirrors the forward queue.
* Record widths, reset, the handshake and Find Min reading the head one cycle after acceptance
  are this design's choices.
