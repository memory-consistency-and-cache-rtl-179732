# Directory-based coherence for shared memory on a 2x2 network-on-chip

Four processing nodes sit on a 2x2 mesh network-on-chip. Each node keeps
a slice of a distributed shared memory. A block of shared data can have a
copy in several nodes at once, and a *local directory* in every node
records who else holds a copy and whether each copy is still valid. No
central directory or snooping bus exists. A node's *memory controller*
keeps the copies coherent by exchanging short protocol messages with the
other sharers over the network, using a small rule set:

* A node may read its copy while the copy is **Valid**. An **Invalid**
  copy is first fetched from a sharer whose copy is valid.
* A node may write a block only if its own copy is Valid. It must first
  collect one **token** from every other sharer, and a sharer that gives
  up its token invalidates its copy. When the last token arrives, the
  write is performed and everyone learns that only the writer is valid.

Reads never lock anything. Writes lock the block in the writer until all
tokens are back. The rest of this document is mostly about what happens
when these operations meet in flight. That part is the hard part.

## Structure

```
            coh_top  (2x2 mesh, node index = x*2 + y: 00->0, 01->1, 10->2, 11->3)
  +---------------------------------------------------------------+
  | coh_node[n]                                                   |
  |   PE port --> memory_controller <--> local_directory          |
  |                   |        ^     <--> shared_memory           |
  |                   v        |                                  |
  |                 ni_tx     ni_rx                               |
  +-------------------|--------^----------------------------------+
                 flit_out[n]  flit_in[n]   (to/from the mesh router)
```

| Module              | Role |
|---------------------|------|
| `coh_pkg`           | Shared constants, flit and message structs, directory row, PE request/response, event bits. |
| `coh_top`           | Four nodes. Every PE, router and initialisation port is brought out as an array indexed by node. |
| `coh_node`          | One node. Muxes give initialisation writes priority over the controller. |
| `memory_controller` | The coherence engine: one finite-state machine per node. |
| `local_directory`   | Table of `ENTRIES` rows with an associative lookup by global block ID (GID). |
| `shared_memory`     | Single-port synchronous RAM of 32-bit chunks (read-before-write). |
| `ni_tx`             | Turns one controller message into one packet of flits. |
| `ni_rx`             | Reassembles interleaved packets into messages and queues them, in order, for the controller. |

The mesh routers are **not** part of this RTL. The design expects a
wormhole network that:

* delivers the packets of one sender to one receiver in order,
* drops nothing,
* may interleave packets of different senders flit by flit.

The testbenches supply such a network as a behavioural model, `tb/noc_model.sv`.

## Directory row and memory layout

Each node holds one directory row per shared block it takes part in:

| Field      | Meaning |
|------------|---------|
| `gid`      | 17-bit global ID, the same in every node |
| `addr`     | First chunk of the local copy in `shared_memory` |
| `len`      | Block length in 32-bit chunks, 1..`MAX_WORDS` |
| `valid`    | Validity of this node's copy |
| `sh_*[3]`  | Up to three other sharers, each with its node index and a valid flag |

In the protocol's software model the directory is a linked list of linked
lists. Here it is a fixed table, and the lookup compares all rows in
parallel. The lowest matching row wins.

The order of the sharer slots matters. A node with an Invalid copy reads
from the **first** slot whose copy is valid.

Rows and memory contents are written through the initialisation ports
after reset and before any PE request. This is the "protocol
initialisation" phase: every node must agree on who shares what.

## Messages and packets

A message is exactly one packet. Flits are 40 bits.

| Flit | Bits |
|------|------|
| header | `TYP[39:36] ID[35:32] SX SY SZ DX DY DZ EX1 EX2` (4 bits each) |
| data body / tail | `TYP[39:36] ID[35:32] DATA[31:0]` |
| first data body (protocol word) | `P_TYPE[31:28] P_GID[27:11] P_EXT[10:0]` |

A message is laid out as follows:

* A header flit.
* One body flit carrying the protocol word.
* `len` body flits of block data, for READ_DATA only.
* A tail flit.

A protocol-only message therefore has 3 flits, and a data message has 4 to 7.

Other flit fields:

* `ID` carries the sender's node index. The receiver keeps one assembly buffer per ID, so interleaved packets do not mix.
* `SZ`, `DZ`, `EX1` and `EX2` are sent as zero.
* Flit types are encoded as header=1, body=2, tail=3.

| P_TYPE | Code | Sent by | Meaning |
|--------|------|---------|---------|
| TOKEN_REQ  | 1 | writer → every sharer | invalidate your copy and return your token |
| TOKEN_RESP | 2 | sharer → writer | the token |
| WRITE_OK   | 3 | writer → every sharer | write done; only the sender is valid now |
| READ_REQ   | 4 | reader → first valid sharer | send me the block |
| UPDATE     | 5 | reader → every sharer | read done; `P_EXT[0]=1`: I am valid again |
| READ_DATA  | 6 | responder → reader | protocol word followed by the block |
| READ_NACK  | 7 | responder → reader | cannot serve now; the reader cancels |

## Normal flows

**Read hit.** The copy is returned from local memory. Nothing is sent.

**Read miss.** The flow is READ_REQ → READ_DATA. The reader stores the data, marks itself valid, and sends UPDATE (ext=1) to all sharers. The sharers then set its valid flag.

**Write.** The steps are:

1. The writer takes the lock.
2. It sends TOKEN_REQ to all sharers.
3. Each sharer invalidates its copy and answers TOKEN_RESP.
4. After the last token, the writer writes memory and releases the lock.
5. It sends WRITE_OK. Every receiver clears all its flags except the writer's.

**Refused or cancelled operations.** The PE gets `ST_CANCEL` for:

* a write on an Invalid copy (it must read first),
* a repeat of a read or write on a block whose same operation is still pending,
* a read on a block whose write is in progress locally.

## Races, and how this design resolves them

The basic rules leave several windows open. The controller closes each
one with a small piece of per-row state: `lock`, `tok_cnt`, `rd_pend`,
`rd_poison`, `serving` and `owed`.

### Two writers at once

Suppose two sharers each lock the block and ask the other for a token. If
neither gives its token away, both wait forever.

The fix is node priority, where a **lower node index wins**. A locked
node that receives TOKEN_REQ acts as follows:

* **From a lower-priority writer:** it withholds the token and goes on
  collecting its own tokens.
* **From a higher-priority writer:** it gives up its own write (the PE
  sees `ST_CANCEL`), invalidates its copy and returns the token.

Both writers have sent TOKEN_REQ to each other. The loser therefore
always meets the second case and yields. The winner completes, and its
WRITE_OK leaves the loser Invalid. The token the loser asked for is never
sent. TOKEN_RESPs that other nodes had already sent for the abandoned
write are dropped as stale.

### A write overtaking data that is on its way to a reader

Node A sends READ_DATA to reader R. A writer W might then collect A's
token before R's UPDATE arrives. R would then mark itself valid with
old data after W's write. The responder guards against this:

* From sending READ_DATA until R's UPDATE arrives, the responder marks
  the row **serving**.
* While serving, its own PE writes are refused.
* A TOKEN_REQ that arrives while serving invalidates the copy at once.
  The TOKEN_RESP is **deferred** (`owed`) and sent when the UPDATE
  arrives.

W's write therefore cannot finish until R's UPDATE has reached A. W's own
TOKEN_REQ to R then invalidates R's new copy in the normal way.

### A read whose source is invalidated meanwhile

Reader R has a READ_REQ outstanding when a TOKEN_REQ or WRITE_OK for the
same block arrives. The data R is about to get is already stale. R then
**poisons** the pending read:

* When READ_DATA arrives, R does not store it and cancels the read.
* R sends UPDATE with ext=0. This releases the responder's serving
  state without claiming validity.
* A READ_NACK arriving for a poisoned read also just cancels it.

### Responder cannot serve

A sharer whose block is locked for its own write, or whose copy turned
Invalid, answers READ_NACK. The reader cancels the read.

### Message order

The receive queue hands messages to the controller in the order their
tails arrived. Messages from one sender stay in sending order, which the
network must guarantee. Incoming messages take precedence over new PE
requests, so remote progress never waits on a busy PE.

## Interfaces and timing

All logic runs on `clk`, with an asynchronous active-low reset `rst_n`.

**PE port.**

* A request `{op, gid, data[4]}` is taken when `pe_req_valid && pe_req_ready`.
* The controller handles one request or message at a time.
* The response `{op, gid, status, data[4]}` is a one-cycle `pe_rsp_valid` pulse.
* A read hit answers 2 + 2·len cycles after acceptance.
* A remote read or a write finishes when the network round trips are done.
* A PE may issue a new request before the previous one has finished. Each block has at most one pending read and one pending write per node.

**Router port.** `flit_out/flit_out_valid/flit_out_ready` and the `flit_in` equivalents move one flit per cycle.

* A packet with n data chunks leaves in n+3 cycles when the network does not stall.
* `flit_in_ready` falls only while the receive queue (`RX_DEPTH` messages) is full.

**Initialisation.**

* `init_node` selects the node to initialise.
* `init_ld_we/idx/entry` writes one directory row.
* `init_sm_we/addr/wdata` writes one memory chunk.

**Events.** `ev[n]` gives one-cycle pulses per node for each protocol event:

* hits and remote reads,
* served and refused reads,
* write start and done,
* the cancellation causes,
* invalidations,
* deferred and withheld tokens,
* yields and stale drops.

`rx_overflow` flags a packet with more data than a block can hold.

## Parameters

| Parameter | Default | Note |
|-----------|---------|------|
| `ENTRIES` (top, node, controller, directory) | 100 | Directory rows per node. 100 shared blocks is the largest configuration the protocol was evaluated with. |
| `SM_WORDS` | 512 | Shared-memory chunks per node. Enough for 100 blocks of the maximum 4 chunks. |
| `RX_DEPTH` | 8 | Messages in the receive queue. |
| `MAX_WORDS`, `ADDR_W` (package) | 4, 12 | Largest block size in chunks; chunk address width. |
| `N_X`, `N_Y`, `FLIT_W`, `GID_W`, `CHUNK_W` (package) | 2, 2, 40, 17, 32 | Mesh size and field widths, fixed by the protocol. |

At the defaults the whole design synthesises to about 13k cells, 86k
flip-flop bits and 64 kbit of memory. Most of the flip-flops are the
directory tables.

## What is this design's own

The following are this design's own choices:

* message codes and the READ_NACK message;
* the UPDATE validity bit;
* the serving, deferred-token and poisoning mechanisms;
* the lower-index-wins priority;
* the fixed-size directory table with parallel lookup;
* the block-size limit;
* the initialisation ports.

Of these, the protocol description fixes the rules but not the timing
details. It names priorities as the fix for simultaneous writes without
saying which node wins.

Two smaller departures from the software model:

* A directory row's sharer slots hold only the other nodes. The node's own validity is the row's `valid` flag.
* A packet shorter than three flits is not reported as an error. It reaches the controller as an unknown message type and is ignored.

Left out:

* the mesh routers and the 3-D coordinates (Z is always 0);
* a non-shared local memory and the PE itself;
* a smarter "nearest valid sharer" choice (the first valid sharer is used, as in the basic protocol);
* multicast.

## Limits worth knowing

* One controller serves one request or message at a time, so throughput
  per node is modest. A broadcast costs one message per sharer.
* If many nodes flood one node, its receive queue fills and `flit_in_ready`
  backpressures the network. The network must not deadlock under that
  backpressure: a node keeps accepting its own traffic only if its
  outgoing packets can drain.
* Directory rows must be consistent across nodes after initialisation.
  Nothing checks this in hardware.
* A block is at most `MAX_WORDS` chunks. Longer packets set `rx_overflow`.

## Simulating

Each file holds one module or package. Compile the package first:

```
verilator --binary --timing --assert rtl/coh_pkg.sv rtl/*.sv tb/noc_model.sv \
    tb/tb_coh_top.sv --top-module tb_coh_top -o sim
./obj_dir/sim
```

Use the same pattern for the unit testbenches. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it covers |
|-----------|----------------|
| `tb_shared_memory` | Random reads and writes against a model, read-before-write. |
| `tb_local_directory` | Lookup hits and misses, lowest-row priority, row rewrites, reset. |
| `tb_ni_tx` | Every flit field against the format above, and the n+3 cycle packet time under stalls. |
| `tb_ni_rx` | Interleaved packets from several senders, random backpressure, queue order. |
| `tb_memory_controller` | Directed scenarios for every flow and race above, including read-hit latency. |
| `tb_coh_node` | One node at flit level: serving a read, collecting interleaved tokens, broadcasts, invalidation, remote fetch. |
| `tb_coh_top` | Full design at default parameters with the network model. |

`tb_coh_top` runs through the following:

1. The reference 10-operation schedule (5 reads, 5 writes at fixed nanosecond times on a 2 ns clock) on blocks with 2, 3 and 4 sharers.
2. Simultaneous writes.
3. Reads racing writes.
4. A sweep of write-versus-served-read offsets.

After each phase it checks that all valid copies equal the last completed
write. It counts every protocol event and fails if any mechanism never
occurred. `+trace` prints per-node activity.

The 20-operation schedule then runs from a fresh initialisation. The
100-operation schedule needs no more storage than the others, but it is
not included.

## Compared with the reference experiment

The protocol was first evaluated as a software model on a 2x2 network.
It applied the 10- and 20-operation schedules below to one block shared
by 2, 3 or 4 nodes, with every copy valid at the start. This RTL runs the
same schedules, with a 2 ns clock and ideal single-cycle network links.

| Sharers | Ops (R+W) | Reference: reads done/cancelled, writes done/cancelled, last event | This RTL |
|---------|-----------|--------------------------------------------------------------------|----------|
| 2 | 5+5   | 5/0, 3/2, 823 ns  | 3/2, 3/2, 746 ns |
| 3 | 5+5   | 5/0, 2/3, 871 ns  | 3/2, 2/3, 746 ns |
| 4 | 5+5   | 5/0, 2/3, 883 ns  | 4/1, 2/3, 746 ns |
| 2 | 10+10 | 9/1, 5/5, 1391 ns | 7/3, 6/4, 1424 ns |
| 3 | 10+10 | 10/0, 4/6, 1391 ns | 7/3, 4/6, 1396 ns |
| 4 | 10+10 | 10/0, 3/7, 1455 ns | 7/3, 3/7, 1396 ns |

Write outcomes agree in five of six cases. This RTL cancels more reads.
Two rules in this design cause that:

* A read whose copy is being written, or whose responder is writing, is
  refused (READ_NACK).
* A read that meets an invalidation is poisoned.

Without those two rules, a read could return data that a concurrent write
has already made stale.
