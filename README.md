# DNUCA memory system: tiled L1/L2 with broadcast search, smart broadcast and block migration

This is synthesizable SystemVerilog for the memory side of a 16-core tiled chip
multiprocessor. The last-level cache (L2) is shared and split into 16 banks. It
is a *dynamic* NUCA: a block starts in its static home bank, but it can migrate
to a less congested bank. A miss in the home bank then starts a broadcast search
over the other banks. A per-set counter in the home bank (the smart broadcast)
lets a home miss skip the search when no block of that set has left. Coherence
is a MESI directory protocol kept by the L2 banks. It is extended with the
messages and transient states that migration needs.

The cores, the instruction caches and main memory are outside the design. Each
core is a load/store port on the top. The memory controller is a network port
on tile 0.

## Configuration (defaults)

| item | value |
|---|---|
| tiles / mesh | 16, 4 x 4 2D mesh, XY routing |
| virtual networks | 3: VNET0 requests, VNET1 responses, VNET2 forwards |
| L1 data cache | 32 kB, 4-way, 64 B lines (128 sets), one per tile |
| L2 bank | 256 kB, 8-way, 64 B lines (512 sets), one per tile, 4 MB total |
| main memory | 200-cycle latency (behavioural model in the testbenches) |
| migration level L | 1 (1, 2 or 3 selectable) |
| optional receiver condition | off (`USE_RX_COND`) |

Every size is a parameter of `dnuca_top`. The system testbench runs the same
RTL with 4-set caches so that conflicts happen quickly. The full-size
testbench uses the defaults.

## Files

| file | what it is |
|---|---|
| `rtl/dnuca_pkg.sv` | constants, message format `msg_t`, message types, helpers |
| `rtl/dnuca_top.sv` | 16 tiles plus the mesh; ports for cores and memory |
| `rtl/llc_bank.sv` | L2 bank with its directory, broadcast search, migration |
| `rtl/migration_policy.sv` | per-set congestion metric, mean/sigma, trigger and accept tests |
| `rtl/smart_bcast_table.sv` | per-set counters of blocks migrated away from home |
| `rtl/l1_cache.sv` | private L1 data cache, MESI, location bits, RETRY handling |
| `rtl/tile_ni.sv` | network interface: multicast expansion, per-class injection, ejection |
| `rtl/noc_router.sv` | 5-port router, buffer per port and virtual network |
| `rtl/mesh_noc.sv` | 4 x 4 mesh of routers |
| `rtl/vnet_fifo.sv` | valid/ready FIFO used as buffer of one message class |
| `tb/tb_*.sv` | one self-checking testbench per block, `tb_dnuca_top`, `tb_dnuca_full` |
| `tb/dnuca_tb_body.svh` | shared stimulus and checks of the two system testbenches |

## Address mapping and messages

A byte address is 32 bits; the block address is bits [31:6]. Block bits [3:0]
name the home bank. The next 9 bits name the L2 set. So a block has the same
set index in every bank, and migration moves it between the same set of two
banks. The L1 set is the low 7 block bits.

A message is one wide flit that carries the whole 64-byte line (`msg_t`, about
600 bits). Link width and flit splitting are not modelled. A controller gives
every message a 16-bit destination mask. The network interface sends one
unicast copy per set bit. This is how a bank sends a broadcast search,
invalidations and migration notifications. `dst_unit` picks L1, L2 or memory
at the destination tile.

Message classes:

* VNET0 (requests): `GETS`, `GETX`, `PUTX` (L1 to L2), `BCAST` (home to the
  other banks), `MIG_REQ` (sender bank to receiver bank), `MEM_RD`.
* VNET1 (responses): data to L1s (`DATA_S`, `DATA_E`), `WB_ACK`, `RETRY`,
  L1 answers (`INV_ACK`, `FWD_ACK`, `NTF_ACK`), broadcast answers (`BC_HIT`,
  `BC_NACK`, `BC_BUSY`), migration answers and data (`MIG_ACK`, `MIG_ABORT`,
  `MIG_DATA`, `MIG_DONE`), `MEM_DATA`, `SB_DEC`, and memory write-backs
  (`MEM_WB`).
* VNET2 (forwards): `INV`, `FWD_GETS`, `FWD_GETX`, `MIG_NTF`.

## The L2 bank (`llc_bank`)

### Directory and states

Each line holds a tag, a state, a dirty bit, a 16-bit sharer vector, an owner
and an LRU age. The states are:

* `NP`: not present.
* `SS`: the L1s named in the sharer vector hold read-only copies.
* `M`: valid here, no L1 copy.
* `MT`: one L1 owns the line (E or M there).
* `RSV`: the way is allocated and waits for data (memory fill or incoming
  migration).

Transactions are held in 8 miss registers (MSHRs). While an MSHR holds a
block, L1 requests for it get `RETRY` and broadcast searches get `BC_BUSY`. So
each block is in at most one transaction.

### Processing model

The bank handles one input message per *step*. All array reads for the step are
combinational. All updates, and up to four output messages, happen at the
clock edge. A step has one of four kinds, in this priority:

1. response (VNET1 input),
2. sending a deferred memory read,
3. request (VNET0 input),
4. starting a migration that the policy asked for.

There are three output queues, one per virtual network, 8 entries each. A step
starts only when every queue it may write has room for 4 messages.

**Why this is deadlock-free.** This is the most delicate part of the design.
A bank must always be able to consume responses, or a full response network
ends in a circular wait. Three rules guarantee it:

* A response step never emits on VNET0. The memory read that follows an
  all-NACK broadcast is therefore not sent at once. The MSHR is marked
  `pend`, and a later step sends it when VNET0 has room.
* A request step never waits for VNET0 room either. Requests from other banks
  (`BCAST`, `MIG_REQ`) and `PUTX` only produce VNET1/VNET2 messages. An L1
  miss that may need a broadcast while the VNET0 queue is full is answered
  with `RETRY`.
* The L1 has separate output registers for requests and for answers. The
  network interface has one holding register per class. So a blocked request
  never holds up an answer that a directory waits for.

Given these rules, every chain of messages ends at a sink within a few hops:

* L1s always take responses.
* Memory always takes its messages.
* `MIG_DONE`, `SB_DEC` and most broadcast answers produce nothing.

Mesh XY routing is deadlock-free within each class. An earlier version used a
single output path per bank. It deadlocked under load: banks sending
broadcasts blocked on VNET0 while the NACKs they needed waited behind them.

### L1 requests in the home bank

* Hit in `M`: exclusive data, line becomes `MT`.
* Hit in `SS`:
  * `GETS`: shared data, and the requester is added as a sharer.
  * `GETX`: `INV` to the other sharers, collect the acks, then exclusive
    data.
* Hit in `MT`: forward to the owner (`FWD_GETS`/`FWD_GETX`), take its answer,
  then data to the requester. A `GETS` leaves `SS` with both L1s as sharers.
* Miss: read the smart-broadcast counter of the set.
  * Counter zero: fetch from memory at once.
  * Otherwise: send one `BCAST` to all 15 other banks and count the answers.
    * Any `HIT`: the remote bank has already served the L1, and the
      transaction ends.
    * All `NACK`: memory fetch.
    * A `BUSY` and no `HIT`: the L1 gets `RETRY`.

A request that reaches a bank which is not the block's home and does not hold
it gets `RETRY`. This happens when the L1's location bits are stale.

### Replacement

A fill takes an `NP` way, else the least recently used `M` way (written back if
dirty). If only lines with L1 copies are left, the oldest one is evicted first
(`INV` to the sharers or `FWD_GETX` to the owner) and the requester retries. A
block that leaves the LLC while it is away from its home sends `SB_DEC` to the
home.

### Answering another bank's search

A bank that gets a `BCAST` and holds the block serves the original requester
the same way as a local hit, including forwards and invalidations. When the
requester has its data, the bank sends `BC_HIT` to the home. A bank without the
block answers `BC_NACK`. A bank where the block is in a transaction answers
`BC_BUSY`.

### Migration

On every L1 request, the bank tells the migration policy about the access. It
tells it about every replacement as well. When the policy says the request's
set is congested, the bank offers the LRU stable block of that set to a
receiver bank. The receiver is the tile of the requesting L1, or the next tile
when that is this bank. Only one migration per set runs at a time.

Sender:

* `MIG_REQ` carries the sender's metric; state `XmigD`.
* On `MIG_ACK`: if the block has sharers or an owner, `MIG_NTF` with the new
  location goes to them (`MigSh`). After every `NTF_ACK`, or at once if there
  are no L1 copies, the sender ships `MIG_DATA` with the line, its L2 state,
  dirty bit, sharer vector and owner, and frees the way (`MigI`).
* `MIG_DONE` ends the migration.
* `MIG_ABORT` cancels it.

Receiver:

* A receiver refuses the migration with `MIG_ABORT` when:
  * the set is already in a migration there,
  * the acceptance test fails (M_sender >= M_receiver, and optionally
    M_receiver < mu + sigma),
  * no way can be freed without invalidating L1 copies.
* Otherwise it reserves a way (`MigIS^D`), answers `MIG_ACK`, installs the
  block when `MIG_DATA` arrives, and answers `MIG_DONE`.

The home's smart-broadcast counter for the set goes up when a block migrates
away from home. It goes down when the block migrates back home or leaves the
LLC elsewhere (`SB_DEC`).

While a block migrates, both the sender and the receiver answer L1 requests for
it with `RETRY`. An L1 that has a notification acknowledged sends its next
request to the receiver.

## Migration policy (`migration_policy`)

For each set s, a bank keeps 16-bit counters of accesses and replacements.
From them it keeps the metric M_s = replacements / accesses as a fixed-point
fraction with 8 fractional bits. When a counter would overflow, both counters
are halved, which keeps their ratio. Running sums S1 = sum of M_s and
S2 = sum of M_s^2 are updated together with the changed set, so the mean and
variance over all 512 sets are available at once, without walking the sets.

Trigger: M_s >= mu + L*sigma (and M_s > 0). It is evaluated exactly in
integers. Let N be the number of sets, A = N*M_s - S1 and
V = N*S2 - S1^2. The test is A >= 0 and A^2 >= L^2 * V. There is no division
and no square root, so the test is one multiply-compare path.

The receiver-side tests use the same quantities. `q_rx_ok` is
M_sender >= M_s and, with `USE_RX_COND`, also M_s < mu + sigma.

## L1 data cache (`l1_cache`)

The L1 uses MESI states I/S/E/M and the transients IS, IM and SM. Each line
also has location bits: the bank that currently holds the block in the L2.

* Location bits are set from the sender of the data, so a block served by a
  remote bank after a search is located at once. `MIG_NTF` moves them.
* Upgrades (store to S) go to the bank in the location bits. Misses go to the
  home bank.
* E/M victims are written back with `PUTX` to the block's current bank. A
  one-line write-back buffer holds the line until `WB_ACK`. The buffer also
  answers forwards and invalidations that race with the write-back.
* On `RETRY`, the L1 resends the request after `RETRY_WAIT` cycles. A `PUTX`
  whose line was already taken by a forward is dropped instead.
* A notification that overtakes the data of the pending miss is remembered.
  This stops the data's sender from overwriting the newer location.

The cache is blocking: one miss at a time per core. It answers a core load with
the word, and a store with the old word.

## Network (`noc_router`, `mesh_noc`, `tile_ni`)

The router has five ports: local, N, E, S, W. Each input port has a 4-entry
buffer per virtual network. Routing is XY. Each output sends at most one
message per cycle, chosen round-robin among the 15 input buffers whose head
goes there and whose class has room downstream.

The network interface has three sides:

* Sources: it takes messages from the L1, the L2 and (on tile 0) the memory
  port. Each class has its own round-robin arbiter and holding register, and
  the interface sends one unicast copy per destination bit.
* Router: it injects one message per cycle, taking turns among the classes
  that have room.
* Ejection: it writes arriving messages into 8-entry buffers per unit and
  class.

## Top-level interface (`dnuca_top`)

| port | dir | meaning |
|---|---|---|
| `core_req_valid/ready/we/addr/wdata[16]` | in | one load/store per core |
| `core_resp_valid/rdata[16]` | out | load data / old word of a store, one pulse |
| `mem_in_valid/msg/ready` | out | `MEM_RD`, `MEM_WB` to the memory controller |
| `mem_out_valid/msg/ready` | in | `MEM_DATA` back (dst_mask = requesting bank, dst_unit = L2) |
| `ev_*[16]` | out | per-bank pulses: broadcast, migration start/done/abort, retry, memory fetch |

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_vnet_fifo` | order, full/empty flags against a queue model |
| `tb_smart_bcast_table` | counts and non-zero flag of every set against a model |
| `tb_migration_policy` | metric, trigger for L = 1 and 2, receiver tests, against real-number mean/sigma |
| `tb_noc_router` | XY output port, no loss or duplication, order per class, random back-pressure |
| `tb_mesh_noc` | end-to-end delivery on the 4x4 mesh, point-to-point order, no loss |
| `tb_tile_ni` | multicast expansion, one copy per destination, ejection per unit and class |
| `tb_l1_cache` | miss, RETRY, data from a remote bank, location bits, notification, forward, upgrade, invalidation, write-back |
| `tb_llc_bank` | memory fetch, forward, invalidations, RETRY, NACK, broadcast hit served remotely, write-back, dirty victim |
| `tb_dnuca_top` | 16 cores, small caches, random loads/stores to shared lines, then a full read-back |
| `tb_dnuca_full` | the same at full size, default parameters |

The two system tests work like this:

* Each core writes only its own word of each line. So every word read back
  has one known correct value, even though all cores share and write the same
  lines.
* Each mechanism is counted through the event outputs. A mechanism that never
  happens counts as a failure. The mechanisms are: memory fetch, write-back,
  RETRY, broadcast search, migration started, migration completed, and
  migration refused.
* The first cold miss must take the 200-cycle memory latency plus the network
  time.

Each block testbench was also run against a copy of its module with one deliberate bug, such as a misrouted east port, a wrong trigger threshold, or a RETRY that never resends. Every one of them failed.

## Where this design departs from the original description

* Broadcast searches get a third answer, `BC_BUSY`, besides `HIT` and
  `NACK`. A bank answers `BC_BUSY` when it holds the block in a transaction.
  The home then retries the L1 instead of fetching a second copy from memory.
* A request that meets any busy block gets `RETRY`. The original description
  uses `RETRY` for migrating blocks; here it also covers blocks in an ordinary
  transaction.
* Memory write-backs use VNET1. Memory reads are deferred when they are
  decided while handling a response. An L1 miss is retried when the request
  queue is full. All three serve the deadlock argument above.
* Which block migrates (the LRU stable block of the congested set) and which
  bank receives it (the requesting core's tile) are this design's choice.

## Not included

* The cores and the L1 instruction caches. The top brings out one load/store
  port per core instead.
* Main memory. The testbenches model it with the 200-cycle latency.
* Power and timing figures, and the workloads themselves. These are
  simulator-level results, not hardware.
* Area is not tuned. The L2 data arrays are plain register arrays inside the
  bank. A real implementation would use SRAM macros, with the single-step
  controller split into pipelined tag and data accesses.
