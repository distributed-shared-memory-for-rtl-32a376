# Directory-coherent distributed L2 cache for a mesh MPSoC

This is the RTL for a multiprocessor system-on-chip in which every
processing element (PE) keeps a private L1 copy of the data blocks it works on.
The shared address space lives in several L2 cache banks spread over a 2-D mesh
network-on-chip. Each bank keeps a directory of who holds each of its blocks,
and it keeps the copies coherent with a state machine of four states: I, S, M and T.

The network itself does part of the work. The design leans on three of its features:

* **Multicast along a Hamiltonian path.** One packet can invalidate every sharer
  of a block, instead of the bank sending one packet per sharer.
* **Two physical channels.** Short control packets (requests, invalidations,
  grants) travel on one plane of routers. Long data packets (a whole 128-word
  block) travel on the other. A bank can therefore take a request while a
  write-back is still streaming in.
* **Priorities.** Control packets are marked high priority, and routers serve
  them first.

The default configuration is a 4x4 mesh, with one L2 bank at each corner
(nodes 0, 3, 12 and 15) and a PE slot at each of the other 12 nodes.

## The coherence protocol

Each L2 bank holds the following for every block:

* a state:
  * **I**: no L1 copy exists.
  * **S**: one or more clean copies exist.
  * **M**: exactly one PE owns a modified copy.
  * **T**: transient. An owner has been asked to write back, and the write-back has not yet arrived.
* a sharer vector, with one bit per mesh node;
* the owner's address.

| request at bank      | state | action                                                        | next |
|----------------------|-------|---------------------------------------------------------------|------|
| READ_REQUEST         | I, S  | send the block (READ_BLOCK)                                   | S    |
| READ_REQUEST         | M     | send WB_REQUEST to the owner, which names the reader           | T    |
| READ_REQUEST         | T     | forward to the owner (READ_FORWARD) or hold, see below          | T    |
| ASK_EXCLUSIVITY      | I, S  | multicast INVALIDATE_BLOCK to the other sharers, then GRANT    | M    |
| ASK_EXCLUSIVITY      | M     | send WB_EXCL_REQUEST to the old owner, who hands the block over | M    |
| ASK_EXCLUSIVITY      | T     | hold until the block leaves T                                  | -    |
| WRITE_BACK / FLUSH   | M, T  | store the block (owner only)                                   | I / S|

A GRANT_EXCLUSIVITY carries the block only when the requester did not
already hold a copy. Otherwise it is a 4-flit control packet.

When an owner answers WB_REQUEST, it sends one multicast data packet that goes
both to the bank and to the waiting reader. The reader therefore does not wait
for the bank to store and resend the block.

**The T-state choice.** A read that arrives while the block is in T can be served in two ways:

* It can be forwarded to the owner, who then sends the data straight to the reader.
* It can be held until the write-back arrives, after which the bank answers it itself.

`tstate_select` makes this choice from Manhattan distances on the mesh. It forwards when the owner is
strictly closer to the reader than the bank is. The `T_POLICY` parameter can
also fix the choice: 0 = always hold, 1 = always forward, 2 = decide by distance.

Only the bank's side of this protocol is hardware. On the PE side, the document
describes the work as microkernel software:
* filling the L1 after a miss;
* answering WB_REQUEST, WB_EXCL_REQUEST and READ_FORWARD;
* invalidating a line.

In this RTL, that work is exposed through the L1 kernel port and the NI word
streams. `tb/tb_dsm_mpsoc.sv` contains a behavioural model of it.

## Packets

Flits are 16 bits wide. A packet is laid out as follows:

```
header | [multicast mask flits] | size | service | source | block | spare | [256 data flits]
```

* **Header.** The fields are:
  * bit 15: multicast;
  * bit 14: high priority, which selects the control channel;
  * bit 13: multicast direction along the path;
  * bits 7..0: the target's X,Y address.
* **Size.** The size counts the flits after the size flit. It is 4 for control packets and 260 for packets that carry a block.
* **Multicast mask.** This is one bit per node label, in ceil(N/16) flits.
* **Source.** For a request the bank forwards on a reader's behalf, this holds the reader's address.
* **Data.** A 32-bit word travels as two flits, upper half first.

Service codes are listed in `rtl/dsm_pkg.sv`.

## Routing on the Hamiltonian path

Nodes are labelled in boustrophedon order: row 0 left to right, row 1 right to left, and so on.

* **Unicast.** A packet whose target has a higher label moves to the neighbour with the largest
  label that does not pass the target. A target with a lower label works the same way in reverse.
  This routing is deadlock-free and minimal enough on a mesh.
* **Multicast.** The mask is split into an ascending half and a descending half, and each half is sent as its own packet.
  * A router whose label is set in the mask copies the packet to its local port.
  * The same router also passes the packet on toward the next set label.
  * Both outputs advance in lock-step.

A header needs two cycles per hop. After that, body flits stream at one per cycle.

## Blocks

| file | what it is |
|------|-----------|
| `dsm_pkg.sv` | Flit, service, directory and port types; address/label helpers |
| `hermes_router.sv` | 5-port router: input FIFOs, Hamiltonian route and multicast fork, priority then round-robin arbitration |
| `hermes_noc.sv` | W x H mesh; one independent router plane per channel |
| `l2_cache.sv` | One L2 bank: `l2_ni` + `l2_mc` + `l2_mem_bank` |
| `l2_ni.sv` | One receive FIFO per channel, strips multicast masks, one interrupt per channel |
| `l2_mc.sv` | Memory controller. FSM1 serves the control channel (requests, invalidations, replies); FSM2 takes write-backs from the data channel into memory; both share the directory, FSM2 winning a same-cycle write |
| `l2_mem_bank.sv` | One-read one-write synchronous memory of BLOCKS x 128 words |
| `tstate_select.sv` | Manhattan-distance comparison for the T-state choice |
| `l1_cache.sv` | Direct-mapped L1: tag memory with valid/modified bits, hit/miss and victim reporting, a kernel port for fills, invalidations and line reads |
| `pe_ni.sv` | PE network interface: word streams to/from flits, channel chosen from the priority bit |
| `dsm_mpsoc.sv` | Top: the NoC, the L2 banks, and a `pe_ni` + `l1_cache` at each PE node |

The processor, the DMA engine, the PE's local memory and the microkernel are
not part of this RTL. The top brings out these ports at every PE node:

* `pe_tx_*` and `pe_rx_*`: the word streams;
* `pe_intr`: the receive interrupt;
* `l1_cpu_*`: the processor's cache port;
* `l1_k_*`: the kernel's cache port.

`bank_events` gives one pulse per protocol mechanism in each bank:
* inv_multicast
* wb_request
* wb_excl
* t_forward
* t_blocked
* wb_received

## Choices made here, where the document is silent

These choices are not given by the document:
* the header-flit layout and the service codes;
* the boustrophedon labelling;
* which packets travel on which channel;
* router buffer depth (8 flits);
* L2 NI FIFO depth (16 flits);
* bank size (64 blocks);
* L1 size (8 lines);
* bank placement, with block b living in bank b / 64;
* the tie rule of the T-state choice (a tie holds);
* the initial contents of each bank (word a = {bank id, a}), which stand in for a preloaded memory image.

The document sizes each block at 128 32-bit words and each flit at 16 bits, and this RTL follows it.

Known limits:
* The directory is held in registers, which is fine for 64 blocks per bank. A larger bank would want it in memory.
* A write-back from a node that is not the owner is dropped.
* A request for a block in T, other than a read that is forwarded, waits at the head of the request channel. This also holds up requests for other blocks behind it.

## Simulating

Every testbench is self-checking and ends with a line of the form `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dsm_pkg.sv \
          tb/tb_dsm_mpsoc.sv --top-module tb_dsm_mpsoc -o sim
./obj_dir/sim
```

`tb_dsm_mpsoc` runs the whole 4x4 system at its default parameters. It
drives the 12 PE slots with a kernel model, and walks one block through the following steps:
* several readers;
* an exclusivity request with multicast invalidation in both directions;
* a read of a modified block, answered by a multicast write-back;
* a T-state forward and a T-state hold;
* a grant without data;
* an ownership hand-over;
* a flush.

Alongside that walk, other PEs read blocks from other banks. The testbench counts
each mechanism, and it checks the data against the memory contents at every step.

The other testbenches, one per block, cover the following:
* **Router and NoC:** routing to every label, multicast, priority and latency.
* **L2 NI:** mask stripping and back-pressure.
* **L2 memory controller and L2 bank:** the full protocol walk.
* **L1 cache:** hits, misses, victims and the kernel operations.
* **PE NI:** framing on both channels.
* **T-state selection:** an exhaustive check of the distance rule.

`T_POLICY`, `W`, `H` and the bank addresses are parameters of `dsm_mpsoc`. A 5x5
system with a single bank, for example, needs `W=5`, `H=5`, `N_BANKS=1` and
a one-entry `BANK_ADDR`.
