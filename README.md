# Directory coherence over a reordering interconnect

This is a shared-memory multiprocessor memory system kept coherent by a
write-invalidate, full-map directory protocol. The protocol works on an
interconnect that does not keep messages in order: two messages between the
same cache and the memory may arrive in either order. Messages are never lost.

Most directory protocols keep a directory entry locked until the requester
acknowledges that it has received its block. This protocol unlocks the entry as
soon as the reply has been sent, so no completion acknowledgement is needed.
The price is a set of races, where a later message overtakes an earlier one.
Each race is resolved by a dedicated transient state in the cache or in the
directory. Those states, and the reason for each one, are the hard part of the
design. Most of this file is about them.

## System structure

```
 processor 0 .. NPROC-1   (outside the design; ports of coh_system)
      |
  cache_ctrl  ----tx---> nonfifo_channel (sending)   ----+
      ^                                                  |
      +-----rx---- nonfifo_channel (receiving) <----+    v
                                                 dir_ctrl  (memory + full-map directory)
```

The top module, `coh_system`, holds `NPROC` "base machines" around one
`dir_ctrl`. A base machine is one `cache_ctrl` with its own sending channel and
its own receiving channel. Because every cache has its own channels, a message
never carries the cache's index: the channel it travels on identifies the
cache.

| file | what it is |
|---|---|
| `rtl/coh_pkg.sv` | message kinds, message struct, cache and directory state enums, sizes |
| `rtl/nonfifo_channel.sv` | a lossless channel that delivers its messages in pseudo-random order |
| `rtl/cache_repl.sv` | the replacement rule, used by the cache controller |
| `rtl/cache_ctrl.sv` | the cache controller of one processor |
| `rtl/dir_ctrl.sv` | main memory, directory and memory-controller FSM |
| `rtl/coh_system.sv` | the top: NPROC caches, 2×NPROC channels, the directory |

Sizes are set in `coh_pkg`: `NBLK = 4` blocks of `WORDS = 4` words of
`DATA_W = 32` bits. The module parameters are `NPROC = 5`, `FRAMES = 2`
(cache frames per processor) and `CH_DEPTH = 4*NBLK`. The protocol itself works for any number of processors.

## Messages

| from memory to cache | meaning |
|---|---|
| `Inv` | invalidate your copy |
| `InvO` | invalidate your copy and write it back (sent to the owner) |
| `UpdM` | write your copy back and keep it Shared (sent to the owner) |
| `O-ship` | ownership granted; your Shared copy becomes the Owner copy |
| `Data` | here is the block |
| `NAck` | the directory entry is locked; ask again |

| from cache to memory | meaning |
|---|---|
| `ReqSC` | I want a Shared copy |
| `ReqO` | I hold a Shared copy and want ownership |
| `ReqOC` | I want ownership and the block |
| `DxM` | owner's block, in answer to `UpdM` |
| `DOxMR` | owner's block, written back because the owner replaced it |
| `DOxMU` | owner's block, in answer to `InvO` |
| `IAck` | invalidation done |
| `SAck` | synchronisation: I am no longer the owner you think I am |

A write-back has two message kinds. `DOxMR` is used after a replacement and
`DOxMU` after an invalidation. The memory must be able to tell an answer to its
own forwarded request apart from a write-back that crossed that request.

## Cache frame states

Each cache is direct mapped: block `b` lives in frame `b % FRAMES`, which
holds a tag, a state and the data. A block that is not in its frame counts as
state I. A frame is in one of nine states:

* **I, S, O**: stable. Invalid, Shared (clean, possibly in other caches too) and
  Owner (modified; the only copy).
* **RMP, WMP, WHP**: this cache has a request outstanding. They stand for
  read-miss pending, write-miss pending, and write-hit pending. WHP means the
  cache holds a Shared copy and is waiting for ownership.
* **TxSI, TxOI, TxOS**: the outstanding request was overtaken. Memory has
  already granted the block. Then a later transaction of another cache sent an
  `Inv`, `InvO` or `UpdM`, and that message arrived before the grant. The
  cache cannot act on it yet, because it has nothing to give up. So it records
  what it owes and pays when the block arrives:
  * **TxSI** (RMP, then `Inv`): when `Data` arrives, the load completes. The
    copy is then dropped and an `IAck` is sent.
  * **TxOI** (WMP or WHP, then `InvO`): when `Data` or `O-ship` arrives, the
    pending store is performed. The block is written back with `DOxMU` and the
    frame goes to I.
  * **TxOS** (WMP or WHP, then `UpdM`): the same, but the block is written back
    with `DxM` and the frame is kept as S.

  If a transient frame gets `NAck` instead, its own request was rejected. It
  answers the message it has been holding (with `SAck`, or `IAck` for TxSI),
  then asks again. Here the cache sends two messages in one step.

The full table is in `cache_ctrl.sv`. A message that the table does not define
for the frame's state is an "unspecified reception". It raises `proto_err` for
one cycle and leaves the frame unchanged. In a correct system it never
happens, and the testbenches check that.

A miss whose frame holds another block first evicts that block. The frame is
then reserved for the missing block. When the evicted block was an Owner copy,
its `DOxMR` goes out in the same cycle as the new request. The processor can
also evict a block explicitly (`OP_REPL`).

Replacement (`cache_repl`) writes an Owner copy back with `DOxMR`. It drops a
Shared copy silently, and the directory's presence bit stays set. This saves a
message on every clean eviction. The cost is that later invalidations also go
to caches that may no longer hold the block. Such a cache answers from state I
with `IAck`, or with `SAck` if it was the presumed owner.

## Directory entry states

Each block has a presence bit per cache, a dirty bit, an entry state and the
index of the requester being served (`reqc`). With the dirty bit set, exactly
one presence bit is set, and it marks the owner. An assertion checks this.

* **Free**: unlocked. A read request is served from memory if the block is
  clean. Otherwise an `UpdM` goes to the owner and the entry enters **XData**.
  A write request is served at once if no other cache has a copy. Otherwise an
  `Inv` goes to every other sharer, or an `InvO` to the owner. The entry then
  enters **XOwn** (for `ReqO`) or **XOwnC** (for `ReqOC`).
* **XData, XOwn, XOwnC**: locked, waiting for the owner's data or for all
  `IAck`s. Each `IAck` clears its presence bit. When no bit other than the
  requester's is left, ownership (`O-ship`) or the block (`Data`) goes to the
  requester.
* **Synch1, Synch2**: an owner replaced its block, and its `DOxMR` crossed the
  forwarded `InvO` or `UpdM`. The memory now expects two messages from that
  cache: the `DOxMR`, and the `SAck` it sends when the forwarded request finds
  it without the block. The two can arrive in either order. The entry
  completes the request when the second one arrives. Synch1 (reached from
  XOwnC) makes the requester the owner. Synch2 (reached from XData) gives the
  requester a Shared copy.

Any request that reaches a locked entry gets `NAck`, and the cache retries it.

Two further rules close the remaining races:

* **Ghost ReqO.** Two sharers both ask to upgrade. The first one wins and
  invalidates the second. The second cache's `ReqO` is now wrong, because it no
  longer has the copy it wants to upgrade. The directory checks the sender's
  presence bit and rejects a `ReqO` when the bit is clear. The cache is then in
  WMP and retries with `ReqOC`.
* **The owner asks again.** An owner replaces its block, and `DOxMR` is on its
  way. Then the same cache misses on a write, and its `ReqOC` arrives first.
  An `InvO` would deadlock. The cache, now in WMP, would move to TxOI and wait
  for a block. The directory, once the `DOxMR` arrived, would wait in Synch1 for
  an `SAck` that the cache never sends. So when a `ReqOC` comes from the cache the directory records
  as owner, the entry goes straight to Synch1. The arriving `DOxMR` then
  updates memory and its data is returned to the same cache as the new owner.

## Timing and handshakes

* **Processor side** (`p_req_*`, `p_resp_*`): a request is held with
  `p_req_valid` and is taken on the edge where `p_req_ready` is high. Every
  taken request is answered by one `p_resp_valid` pulse, with `p_resp_rdata`
  for a load. The processor must wait for that pulse before its next request.
  Hits and replacements are answered one cycle after they are taken. Misses
  stall until the block or ownership arrives.
* **Cache controller**: one event per cycle. A received message has priority
  over a processor request. An event is taken only when the sending channel
  has two free slots.
* **Directory**: one message per cycle, with the sending channels served round
  robin. A message is taken only when every receiving channel has a free slot,
  because one step can send `Inv` to every sharer at once. Replies go out in
  the same cycle.
* **Channels**: up to two messages enter per cycle. One message at a time is
  offered at the output; a 16-bit LFSR picks which stored message it is, so any
  message can overtake any other. With `CH_HOLD = 1` the channel also holds
  back delivery about one cycle in four. The reordering is only a model of an
  unordered network. A real interconnect would take the channel's place, and
  the controllers do not depend on any delivery order.
* **Reset** (`rst_n`, asynchronous, active low): every frame goes to I, every
  channel is emptied, every entry becomes Free with no presence bits, and
  memory is cleared to zero.

## Where this design makes its own choices

The protocol fixes the states, the messages and every transition. Most of what
follows is not specified by it:

* The sizes (blocks, words, width, `NPROC = 5`, channel depth). The
  protocol tracks one abstract block for any number of processors.
* A direct-mapped cache, so the victim of a miss is the block in the missing
  block's frame. There is also an explicit evict operation (`OP_REPL`).
* The valid/ready handshakes, one event per cycle, and the priority of received
  messages in the cache.
* A `NAck` goes to the cache whose request was rejected.
* A `ReqO` from a cache with no presence bit is rejected, not treated as a
  `ReqOC`. The protocol allows either.
* Messages the protocol calls errors are flagged and ignored.
* The channel capacity. It is set above the number of messages the protocol
  can have in flight per cache and block. Assertions in `nonfifo_channel`
  would report an overflow.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the test hangs.

| testbench | what it checks |
|---|---|
| `tb_nonfifo_channel` | no loss and no duplication, room flags and count, that messages are reordered, delivery is held back at times, and the channel fills |
| `tb_cache_repl` | the replacement rule for every frame state |
| `tb_cache_ctrl` | 40 000 random cycles against a reference copy of the cache table. It offers every message kind in every state, including errors, plus processor requests, misses that evict another block from the frame, and back-pressure. It checks next state, replies, data, response timing and the error flag |
| `tb_dir_ctrl` | directed sequences through every directory state and both crossing orders of Synch1 and Synch2. Also the ghost `ReqO`, the owner's `ReqOC`, errors, back-pressure and round robin |
| `tb_coh_system` | the whole system at default size. Five processors run 12 000 random accesses each, concentrated on one block |
| `tb_coh_workloads` | the same test, through the helper `coh_sys_run`, on systems of 2, 3, 4 and 25 processors side by side |

`tb_coh_system` checks that every load returns a value that was the newest
value of its word at some moment while the load was outstanding. Each store
writes a unique value, so this is a strict check. At the end the system is
drained and every word is read back through two processors. The testbench also
counts each race mechanism and fails if one never occurred. The mechanisms are
TxOI, TxSI and TxOS, NAck retries, XData, XOwn, XOwnC, Synch1 and Synch2, the
ghost `ReqO`, the owner's `ReqOC`, invalidations of stale presence bits,
replacement write-backs, and misses that stalled. It runs in well under a
second.

At 25 processors on one hot block, the test passes, but most requests meet a
locked entry and are retried. NAcks outnumber the accesses by more than fifty
to one. That is the cost of rejecting and retrying requests at a locked entry,
and this design keeps that policy. Retrying is also unfair. With 25 processors
the slowest access waited about 8 700 cycles, against under 200 with five. No
access was starved for good, but nothing bounds the wait. Queuing requests at the memory would avoid
the retry traffic.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/coh_pkg.sv tb/tb_coh_system.sv --top-module tb_coh_system
./obj_dir/Vtb_coh_system
```

Block testbenches need their module files: for example, `tb_cache_ctrl` needs
`rtl/coh_pkg.sv rtl/cache_repl.sv rtl/cache_ctrl.sv tb/tb_cache_ctrl.sv`.

## How far to trust it

The protocol itself has been checked by exhaustive state exploration for any
number of processors. That guarantee covers the protocol's states and
transitions, and this RTL implements the same ones. The RTL itself is checked
only by the simulations above. These are a table-driven random test of the
cache controller, directed tests of the directory, and a random multiprocessor
test. The multiprocessor test reaches every race state, but only with the
seeds used. It has no formal proof. The processor model in the testbench is
blocking, with one access outstanding, as the protocol assumes. A processor
that pipelines accesses would need a different cache front end.
