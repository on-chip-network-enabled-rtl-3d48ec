# A 3-D network-on-chip accelerator for maximum-likelihood phylogeny kernels

Maximum-likelihood tree search (as done by RAxML) spends most of its time in three
likelihood kernels: newviewGTRCAT, coreGTRCAT and newviewGTRGAMMA. Each reduces to
many *sums of four products*, plus logarithms and antilogarithms. This design is a
coprocessor for those kernels:

- 64 nodes form a 4x4x4 folded torus.
- Each node holds four identical processing elements (PEs) behind a small crossbar.
- A central allocator (the MasterController) hands each kernel invocation a group
  of nodes (a *partition*) that lie close together.
- The kernels need 2, 3 or 6 nodes.

The architecture follows the published design "On-Chip Network-Enabled Multicore
Platforms Targeting Maximum Likelihood Phylogeny Reconstruction". That publication
describes the blocks and their policies, but not their bit-level details. Everything
marked *design choice* below was filled in for this RTL.

## The arithmetic core: products through the log domain

The core (`pe_core`) does a multiply by adding logarithms, so it needs no
multipliers. It is a six-stage pipeline:

| stage | work |
|---|---|
| 1 | leading-one detection and normalisation of the 8 operands `a1..a4`, `b1..b4` |
| 2 | piecewise-linear correction: mantissa `m` becomes `log2(1+m)`, giving `log2|x|` |
| 3 | four log-domain additions `log2|ai| + log2|bi|`; signs are XORed |
| 4 | piecewise-linear `2^f` of each fractional part |
| 5 | shift by the integer part, apply the sign (back to linear) |
| 6 | saturating sum of the four linear products |

Three operations share the pipeline:

| op | stages used | latency | outputs |
|---|---|---|---|
| SOP (sum of four products) | 1-6 | 6 clocks | 1 word |
| LOG | 1-2 | 2 clocks | 8 words, `log2` of each operand's magnitude |
| ALOG | 4-5 | 2 clocks | 4 words, `2^x` of each of four inputs |

An SOP and an ALOG issued three clocks apart would both need stage 4 in the same
clock. The core drops `in_ready` for one clock to hold the ALOG. This is the core's
only stall.

### Number formats (design choice)

The publication uses a 64-bit fixed-point hybrid format with 2^-52 resolution, but
does not define its layout. Here:

- A **data word** is 64-bit two's complement with 52 fraction bits (Q11.52, range
  ±2048).
- A **log-domain value** (`log_t` in `phylo_pkg`) is 34 bits:
  - a zero flag,
  - a sign,
  - `log2|x|` in signed Q8.26.
- LOG results and ALOG inputs are stored as ordinary Q11.52 words holding the
  base-2 logarithm.

The converters (`log_converter`, `antilog_converter`) use 32 linear segments. Their
knot values are computed at elaboration by constant functions in `phylo_pkg`, so the
tables become logic, not a ROM, as in the original.

Measured accuracy over the test ranges:

| quantity | error |
|---|---|
| log2 | about 1e-4 |
| antilog | about 1e-4 relative |
| sum of four products | a few 1e-4 relative per product |

This is far coarser than the 2^-52 resolution of the word. Use more segments
(`SEGS`) or a higher-order correction if that matters.

## The PE: instruction wrapper and memory

`pe` wraps the core with an instruction memory (`IMEM_DEPTH` 64-bit words) and a
data memory. The data memory is `MEM_WORDS` 64-bit words; the default of 65536 words
is 0.5 MB. The data memory is a register bank with:

- 8 read ports (operand fetch);
- 8 write ports (LOG write-back);
- a host port;
- a receive port from the crossbar.

The instruction set is a design choice. Every instruction is one 64-bit `instr_t`:

| opcode | effect |
|---|---|
| `SOP dst, a, b` | `mem[dst] = sum(mem[a+i]*mem[b+i], i=0..3)` |
| `LOG dst, a, b` | `mem[dst+i] = log2|mem[a+i]|`, `mem[dst+4+i] = log2|mem[b+i]|` |
| `ALOG dst, a` | `mem[dst+i] = 2^mem[a+i]` |
| `SEND dst, a, node, pe, bcast` | send `mem[a]` to word `dst` of another PE: same node, other node, or all PEs of the destination node (broadcast) |
| `WAIT n` | block until `n` words have arrived from the crossbar since the last WAIT |
| `HALT` | stop; `running` falls |
| `NOP` | nothing |

Issue is in order, one instruction per clock. An eight-entry scoreboard holds
instruction issue while an operand is still being computed by the core. This is a
read-after-write stall, seen on `hazard_stall`.

## The node: crossbar and network interface

A node (`noc_node`) contains:

- four PEs;
- `subnet_crossbar`, which joins the PEs to each other and to the network;
- `net_interface`;
- a seven-port switch (`noc_router`).

The crossbar handles three kinds of traffic:

- **loopback**: a PE writes a word into a PE of its own node, itself included;
- **broadcast**: a PE writes a word into the other three PEs of its node;
- **network**: a word goes to or comes from another node.

A broadcast arriving from another node is written into all four PEs.

The crossbar has five inputs: PE0-3 and the network. It serves them in round-robin
order. An input is granted only when every output it needs is free in that clock, so
a broadcast never goes out partly. The crossbar is combinational.

`net_interface` turns a message into three flits:

| flit | contents |
|---|---|
| head | destination node, destination PE, broadcast bit |
| body | word address |
| tail | data word |

Each flit is 64 bits of payload plus a 2-bit type tag that travels beside it (a
design choice).

A node is **busy** from the clock it is allocated until all four PEs have reached
HALT after `start`. It is **available** otherwise. The node's coordinates come in on
`my_node`, so that all 64 nodes are one design.

## The network: folded torus with wormhole switching

`noc_router` has seven ports:

| port | direction |
|---|---|
| 0 | local |
| 1 | X+ |
| 2 | X- |
| 3 | Y+ |
| 4 | Y- |
| 5 | Z+ |
| 6 | Z- |

Each input has a 2-flit buffer. Routing is XYZ dimension order, taking the shorter
way round each ring of the torus. When both ways are equal (two hops in a ring of
four), the packet goes the + way; this tie rule is a design choice.

Switching is wormhole: an output belongs to one packet from its head flit to its tail
flit.

When several heads want the same free output, the one with the **most remaining
hops** to its destination wins. This lets traffic that has further to go leave first.
Equal hop counts go to the lower-numbered input (design choice). The output is locked
only once the winning head actually moves, so a stalled output picks again in the
next clock.

A flit moves one hop per clock when nothing blocks it. There are no virtual channels:

- Dimension order alone does not rule out a deadlock around a torus ring under heavy
  wrap-round traffic.
- The short messages and the partition-local traffic this accelerator produces make
  that unlikely, but it is not excluded.

In `noc3d_top` the links are wired as `in[n][d] = out[neighbour(n,d)][d^1]`, with
wrap-round in all three dimensions. Nodes are numbered `z*16 + y*4 + x`.

## Allocation: a Hilbert curve over columns

The `master_controller` does the allocation:

- A 16-point Hilbert curve is laid over layer 0. Its order is 0, 4, 5, 1, 2, 3, 7, 6,
  10, 11, 15, 14, 13, 9, 8, 12.
- Each point of the curve names a column of four nodes, one per layer.
- For a request of `req_count` nodes (1 to 6), the controller waits until at least
  that many nodes are available.
- It then scans one column per clock, starting at the current head of the curve, and
  takes the free nodes of each column in vertical order.
- The vertical direction flips from column to column: downwards in one column, back
  upwards in the next. Consecutive picks are therefore vertically adjacent across the
  column boundary.
- The head stays on a column that still has free nodes. It moves on, and the
  direction flips, once the column is used up (a design choice).
- Nodes just granted stay marked as claimed until they report busy, so two quick
  requests cannot receive the same node.
- The grant (`grant_valid`, `grant_nodes`, `grant_count`) comes one clock after the
  last column scanned, that is 1 + (columns visited) clocks after the request.

## Top level and host interface

`noc3d_top` has these parameters:

| parameter | default | meaning |
|---|---|---|
| `NZ` | 4 | layers |
| `MEM_WORDS` | 65536 | data words per PE |
| `IMEM_DEPTH` | 1024 | instructions per PE |

It brings out:

- a host port that writes and reads any PE's data or instruction memory (read data
  one clock after `host_raddr`);
- `start_mask`, which starts the programs of chosen nodes;
- the allocator's request/grant handshake;
- `alloc_waiting`;
- the per-node `node_busy` vector.

The original system reaches the host CPU over PCI Express. That link is vendor IP and
is not part of this RTL: the plain host port stands in its place.

## Files

| file | contents |
|---|---|
| `rtl/phylo_pkg.sv` | types (words, log values, messages, flits, instructions) and the constant functions for the converter knots and torus distances |
| `rtl/log_converter.sv`, `rtl/antilog_converter.sv` | the two-stage converters |
| `rtl/pe_core.sv`, `rtl/pe.sv` | the core and its wrapper |
| `rtl/subnet_crossbar.sv`, `rtl/net_interface.sv`, `rtl/noc_router.sv`, `rtl/noc_node.sv` | the node |
| `rtl/master_controller.sv` | allocator |
| `rtl/noc3d_top.sv` | the 64-node system |
| `tb/tb_*.sv` | one self-checking bench per block |

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. Run one
with Verilator from the project root, for example:

```
verilator --binary --timing --assert --top-module tb_pe_core \
    rtl/phylo_pkg.sv rtl/*.sv tb/tb_pe_core.sv
./obj_dir/Vtb_pe_core
```

What each bench covers:

| bench | covers |
|---|---|
| `tb_log_converter`, `tb_antilog_converter` | sweeps against real arithmetic |
| `tb_pe_core` | random mix of the three operations: latency, results, the ALOG hold |
| `tb_pe` | a small program: the scoreboard stall count, SEND and WAIT |
| `tb_subnet_crossbar` | random traffic against a reference model |
| `tb_noc_router` | random packets with back-pressure: output port, ordering, no interleaving, the max-hop arbitration rule |
| `tb_master_controller` | allocation order, direction flips, waits and latency |
| `tb_noc_node` | loopback, broadcast and network traffic through one node |
| `tb_noc3d_top` | end to end |

`tb_noc3d_top` works as follows:

1. It allocates a 2-, a 3- and a 6-node partition.
2. It loads and runs programs shaped like the three kernels:
   - operand sums exchanged between nodes;
   - a broadcast of a product back to a node;
   - a gather into one node followed by a broadcast, LOG and ALOG;
   - pairwise exchange across the 6-node partition.
3. It fills the machine until a request has to wait.
4. It reads every result back and compares it with real arithmetic.
5. It counts each mechanism and fails if one never happened: allocation waits,
   column moves, crossbar broadcasts, scoreboard stalls, ALOG holds, link
   back-pressure, wrap-round hops and network packets.

**Simulated size.** Verilator generates about 3.4 MB of C++ per node, so the
end-to-end bench runs one 4x4 layer (16 nodes, 64 PEs) with 1024-word data memories
and 16-word instruction memories. That is the largest configuration simulated
end to end. The 64-node default passes lint and elaboration, but has not been simulated: its C++ model is several hundred MB. Every
other bench runs its block at the default sizes, except `tb_noc_node`, which uses
small memories.

## Departures and open points

These were filled in because the source gives no details:

- the word and log formats;
- the instruction set;
- the message and flit layout;
- the crossbar arbitration;
- the node busy bookkeeping;
- the allocator's behaviour when a column is partly used or too few nodes are free.

Other differences from the original:

- **Tie rule.** In the original, the arbitration tie rule prefers traffic that
  crosses partitions. That applies to its 2-D variants; here ties go to the
  lower-numbered input.
- **Other NoC variants not built.** The 2-D serial and parallel allocators and the
  stacked (bus between layers) torus were alternatives in the original study. Only
  the 3-D folded torus is built.
- **Accuracy.** Converter accuracy is set by the 32-segment linear tables (see
  above), not by the 52-bit word.
- **Deadlock.** There is no deadlock-avoidance mechanism (virtual channels or
  datelines) on the torus rings.
