# SYMNET / COSYM: a broadcast address network with token access and an owner-based snooping protocol

A snooping multiprocessor stays coherent only if every cache sees every
address request in the same order. On an electrical bus, that broadcast is
the bottleneck: arbitration, long wires and a slow system clock limit how
many requests per second the bus can carry. SYMNET replaces the bus with an
optical broadcast tree driven at the processor clock. The tree has two
halves:

* Y-couplers merge the leaves' transmitters towards a root.
* Y-splitters copy the root's signal back to every leaf.

Access is controlled by a token that visits one processor per clock, so a
new address can be inserted on every clock. Many requests are then in the
tree at once. A request is *inserted* by one processor and becomes
*visible* to all nodes in the same clock some cycles later. In between, the
nodes see other requests, which opens races that a bus never has. COSYM is
the coherence protocol that deals with them. It has three parts:

* a single owner per shared block, which alone answers the snoop;
* transient states that react to requests seen while one's own request is
  in flight;
* a chain of "next sharer" pointers, so that an owner or sharer can leave
  without losing track of the others.

This repository holds synthesizable SystemVerilog for:

* the address network: token ring, coupler/splitter tree and snoop line;
* the per-processor address port controller;
* the COSYM L2 cache controller;
* the memory-side controller;
* a top level that wires 32 processors and 8 memory modules together.

Block data travels on a separate data network, which is not part of this
design. Its ports are brought out of the top, and the testbenches include a
simple behavioural model of it.

## Timing of the address network

One clock equals one token slot and one tree stage. The delay element
between neighbouring processors is sized to one clock. With `L =
log2(N_LEAVES)`, the tree has:

* L levels of couplers, all registered;
* L levels of splitters, all registered except the last, which drives the
  leaves directly.

A request driven in cycle `t` therefore arrives at every leaf in cycle
`t+2L-1`. The snoop line is a 1-bit copy of the same tree. Several nodes may
drive it in the same clock; their answers OR together. For the four-leaf
example (L = 2) the sequence for one request is:

| cycle | event |
|---|---|
| 1 | processor 1 holds the token and drives its request (combinationally from the port controller) |
| 2, 3 | request climbs the couplers, then descends the splitters; processors 2 and 3 insert behind it |
| 4 | request reaches all nodes (*visible*); the port controller registers it |
| 5 | every cache controller snoops it; the owner, if any, decides to answer |
| 6 | the snoop answer is driven onto the snoop line |
| 9 | the snoop answer reaches every node |
| 10 | the requester's controller acts on it (`own_snoop_valid`) |

In general, for a request inserted at `t`:

* it is visible at `t+2L-1`;
* it is snooped at `t+2L`;
* the answer is driven at `t+2L+1`;
* the answer is received at `t+4L`.

The memory modules see the same broadcast. They read the snoop line through
a delay line of `2L` clocks matched to this schedule. With the defaults (32
processors and 8 memories on a 64-leaf tree, L = 6), an isolated read miss
completes `2L + 3 + D` clocks after it becomes visible, where `D` is the
data-network latency. The testbenches use D = 52 clocks, the time to send a
32-byte block at 5 Gb/s with a 1 GHz processor clock.

In any cycle in which a request is visible to it, a cache controller serves
the network before its processor: a processor request offered in that cycle
waits one clock.

## COSYM: who answers, and how the sharers are chained

### Stable states

The stable states are I, S, E, O and M, as in MOESI, with one change. An E
block read by another processor becomes **O**, not S. The first cache to
obtain a block is thus its owner, whether the block is clean or dirty, and
any valid block has exactly one owner or none.

* The owner raises the snoop line and supplies the data.
* If no cache owns the block, the snoop line stays low and the home memory
  supplies the data. Blocks are interleaved over the memories by block
  address modulo `NUM_MEM`.
* A read miss loads **E** if the snoop was low and **S** if it was high.
* A write miss loads **M**. All other copies are invalidated when the
  request is seen.
* A write hit on S or O issues an UPGRADE. If the copy is still valid
  when the upgrade becomes visible, the line turns M at once. The data
  that the owner or memory sends anyway is dropped. If the copy was
  invalidated on the way, the upgrade waits for that data like a write
  miss.

### Transient states

The transient states are named as in the protocol's state diagram. The
letters after the dash say what is still pending: **a** for address
visibility, **d** for data, **s** for the snoop.

| state | meaning | on another node's read of the same block | on another node's write |
|---|---|---|---|
| IE-ads | read issued, not yet visible | once inserted: becomes IS-ads (that reader is first and will own the block) | – |
| IS-ads | read in flight behind an earlier reader | – | – |
| IE-ds | visible, snoop pending | becomes IO-ds: this node is first; if its snoop comes back low it owns the block | II-d |
| IS-ds / IO-ds | visible, snoop pending | – (that reader already knows it loads S) | II-d |
| IE-d / IO-d / IM-d | data pending; the block will be E, O or M here | answers, becomes IO-d, and forwards the data when it arrives | II-d, answering and forwarding the data |
| IS-d | data pending, block will be S | – | II-d |
| IM-ad | write issued, not yet visible | – | – |
| S/O-M,a | upgrade of a valid S or O copy in flight | – | becomes IM-ad: the copy is lost and the upgrade ends like a write miss |
| II-d | data still due, block already invalidated | – | – |

When the data arrives, II-d completes the access and leaves the block
invalid. IS-ds becomes IS-d whatever the snoop says.

### Next-sharer chain

Each S or O line stores a next-sharer pointer. The first reader after the
owner is recorded by the owner. Each later reader is recorded by the
current tail of the chain: the holder that has no next sharer, or the
owner-to-be. The chain runs from the owner to the newest reader.

## Write-backs

A line leaves the cache in one of four ways, chosen by its state:

| evicted state | action |
|---|---|
| O with a next sharer | **Transfer write-back type 1.** Ownership passes to the next sharer, which turns its S copy into O. No data moves. |
| S | **Transfer write-back type 2.** The next-sharer pointer is handed to the previous sharer: the holder whose pointer names the evicting node. |
| M, or O with no sharer | **Ordinary write-back.** The data goes to memory over the data network. No address request is made. Until the data has been sent, the write-back entry keeps answering as the owner. |
| E | Dropped silently. Memory is still current. |

A transfer request carries the new pointer in its `arg` field. The node
that takes the transfer acknowledges it by raising the snoop line for it.
If the sender finds the snoop line low, it re-inserts the request. This can
happen when the target is itself leaving, or when the chain changed while
the request was in flight.

To keep a single answering node across an ownership transfer:

* the old owner keeps answering until it sees its acknowledgement;
* the new owner (hold-off) starts answering `2L+1` clocks after the
  transfer became visible.

The controller is blocking. It has one outstanding miss and one write-back
entry. The write-back entry goes first on the token.

## Modules

| file | role |
|---|---|
| `rtl/symnet_pkg.sv` | request kinds, stable and transient states, the address request and data message structs |
| `rtl/token_ring.sv` | one-hot token rotating over `NUM_PROC` processors, one step per clock |
| `rtl/y_coupler.sv`, `rtl/y_splitter.sv` | one tree stage each (OR-combine / copy), registered or not |
| `rtl/addr_subnet.sv` | binary coupler/splitter tree over `N_LEAVES` leaves, heap-indexed, with a collision flag |
| `rtl/addr_port_ctrl.sv` | token-slot insertion, registering of the visible request, driving the snoop answer, timers that return the snoop result of the node's own requests |
| `rtl/cosym_cache_ctrl.sv` | L2 tags, states and next-sharer pointers (`SETS` x `WAYS`, LRU), the miss and write-back engines, the snoop responder, and a data-message queue |
| `rtl/mem_ctrl.sv` | home-memory responder: matches each request with its snoop answer and queues a data reply when no cache owns the block |
| `rtl/sync_fifo.sv` | small show-ahead FIFO |
| `rtl/symnet_top.sv` | `NUM_PROC` port/cache controllers, `NUM_MEM` memory controllers, the address tree and the snoop tree |

The top's processor side is one port per processor:
`cpu_req_valid/we/addr` in, and `cpu_req_ready`, `cpu_resp_valid` and
`cpu_resp_hit` out. Addresses are block addresses of 27 bits. The data
network side has, per node:

* a `data_msg_t` output with a `dout_ready` handshake;
* a `data_msg_t` input, valid for one clock.

Node numbers are the processors `0..NUM_PROC-1`, then the memories. Each
controller reports 16 event pulses on `events_o`, in this bit order:

| bit | event |
|---|---|
| 0 | hit |
| 1 | miss |
| 2 | upgrade |
| 3 | snoop answered high |
| 4 | IS-ads race |
| 5 | owner-to-be |
| 6 | II-d |
| 7 | TWB1 issued |
| 8 | TWB2 issued |
| 9 | ordinary write-back |
| 10 | transfer re-issued |
| 11 | transfer accepted |
| 12 | data forwarded |
| 13 | processor stalled by a snoop |
| 14 | unwanted data dropped |
| 15 | silent E eviction |

Default sizes:

* 32 processors;
* 8 memory modules, one per board of four processors;
* per processor, a 64 KB 4-way L2 with 32-byte blocks, giving 512 sets.

The tree size is the next power of two above processors plus memories.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      --top-module tb_symnet_top -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/symnet_pkg.sv tb/tb_symnet_top.sv
    ./obj_dir/Vtb_symnet_top +verilator+rand+reset+2 +verilator+seed+1

Replace the top module name to run another testbench:

* `tb_token_ring`, `tb_y_coupler`, `tb_y_splitter`, `tb_addr_subnet`,
  `tb_addr_port_ctrl`, `tb_mem_ctrl` and `tb_cosym_cache_ctrl` test one
  block each.
* `tb_cosym_cache_ctrl` drives one controller through directed scenarios:
  a read from memory, a read served by an owner, the IS-ads and IO races, an
  invalidation in flight, TWB1 and TWB2 with acknowledgement and re-issue,
  an ordinary write-back, and an upgrade.
* `tb_symnet_top` runs 4 processors and 1 memory (small caches, 8-leaf
  tree), then:
  - checks the isolated miss latency, and that a second reader of the
    same block is served by the first (now O), not by memory;
  - runs 400 random reads and writes per processor over 10 shared blocks,
    then a private phase;
  - checks after every clock that each block has at most one owner, and
    that an E or M copy is the only copy;
  - counts each of the 16 events and the memory replies and write-backs,
    and fails if any never happened.

  `+trace` prints every broadcast.
* `tb_symnet_top_full` runs the top at its default size (32 processors, 8
  memories, 512 x 4 caches). Three processors go through read (memory
  supplies, E), read (owner supplies, E→O, S), and write (M, others
  invalidated). It checks the latency, the 32-clock token frame and the
  snoop-line timing.

`tb/data_subnet_model.sv` is the behavioural data network. It is
conflict-free, delivers each message after a fixed latency, and keeps a
queue per destination.

## Where this design departs from, or adds to, the protocol as described

The following are this design's own choices, made where the description is
silent:

* The request format. Each request carries the requester's node number and
  an argument field; TWB2 uses that field for the pointer.
* The acknowledgement of a transfer: it is the receiver's snoop answer, and
  a transfer with no acknowledgement is re-issued.
* The hold-off timing of a new owner.
* Silent eviction of E lines.
* UPGRADE always receives data, which is dropped if the line is still
  valid.
* Memory interleaving.
* LRU replacement.
* The blocking controller.

The following are not modelled:

* block contents;
* the L1 cache;
* the processor;
* the optical parts: lasers, VCSELs and photodetectors, whose digital
  function is to pass the bits on;
* wavelength conflicts in the data network.

The design has these known windows:

* An S line whose TWB2 is in flight does not record a newer reader as its
  next sharer.
* An ordinary write-back entry stops answering for its block once the data
  has been queued to the data network.
* Between a failed TWB1 and its re-issue, no node answers for that block.

The random end-to-end test over 16 seeds did not hit any of these with a
wrong outcome. Still, they are not proven closed, and a non-blocking or
larger-scale use should revisit them.

The largest system simulated with traffic is 4 processors and 1 memory. The
32-processor default is simulated for the single directed sharing sequence
described above.
