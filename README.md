# Transactional memory for a bus-based multiprocessor

Lock-free data structures are hard to build from single-word primitives
(compare-and-swap, load-linked/store-conditional). *Transactional memory* lets a
program read and write several words tentatively and then make all of the
writes visible at once, or none of them. This RTL adds that to a snoopy-bus
multiprocessor. The hardware is the first-level cache and the coherence
protocol. No locks exist in hardware: a conflicting access simply makes one of
the two transactions fail, and software retries it with backoff.

Each processor gets six new instructions next to ordinary `LOAD`/`STORE`:

| instruction | meaning |
|---|---|
| `LT a`   | transactional load of word `a` |
| `LTX a`  | transactional load of `a`, asking for an exclusive copy (the word will be written) |
| `ST a,d` | tentative store of `d` to `a` |
| `VALIDATE` | returns 1 if the running transaction has not conflicted yet; if it has, it ends the transaction and returns 0 |
| `COMMIT` | makes all tentative stores visible and returns 1, or discards them and returns 0 |
| `ABORT`  | discards all tentative stores |

A typical use (shared counter):

```
loop: v = LTX(&c); ST(&c, v+1); if (COMMIT()) done; else back off, goto loop
```

## Building blocks

```
            core port (per processor)                         tm_system
  ┌────────────────────────────────────────┐
  │ tm_node                                │   x N_PROC
  │   tm_status   TACTIVE / TSTATUS         │
  │   reg_cache   2048 x 64 bit, direct mapped, LOAD/STORE
  │   tx_cache    64 x 64 bit, fully associative, LT/LTX/ST
  └───────────┬───────────────▲────────────┘
              │ request       │ snoop
        ┌─────▼───────────────┴─────┐
        │ snoop_bus (+ bus_arbiter) │──── main_memory (4-cycle latency)
        └───────────────────────────┘
```

| file | block |
|---|---|
| `rtl/tm_pkg.sv` | shared types: instructions, bus cycles, line states, transactional tags, event struct |
| `rtl/tm_status.sv` | the two status bits and the VALIDATE/COMMIT/ABORT rules |
| `rtl/tx_cache.sv` | transactional cache: entries, tags, victim choice, single-cycle commit/abort, snoop answers |
| `rtl/reg_cache.sv` | regular direct-mapped cache, four-state protocol |
| `rtl/tm_node.sv` | one processor's memory side: instruction sequencer joining the caches and the bus |
| `rtl/bus_arbiter.sv` | round-robin bus arbiter |
| `rtl/snoop_bus.sv` | atomic snoopy bus: grant, broadcast, BUSY, dirty-data supply, memory phase |
| `rtl/main_memory.sv` | shared word memory |
| `rtl/tm_system.sv` | top: N_PROC nodes, bus and memory |

The processors themselves are not part of the RTL. Their instruction ports are
the ports of `tm_system`. The testbenches drive those ports from behavioural
processor models.

## Data model

A cache line is one 64-bit word, so word address and line address are the
same. Addresses are `ADDR_W` = 16 bits wide (64 Ki words). Default sizes:

| parameter | default | meaning |
|---|---|---|
| `N_PROC` | 32 | processors |
| `RC_LINES` | 2048 | regular cache lines (16 KiB) |
| `TX_ENTRIES` | 64 | transactional cache entries (512 B) |
| `MEM_LAT` | 4 | memory latency in cycles |
| `ADDR_W` | 16 | word address bits (own choice) |

## Line states and bus cycles

Every cached line is in one of four states:

* **INVALID**: not present.
* **VALID**: clean, possibly shared.
* **DIRTY**: modified, exclusive, memory stale.
* **RESERVED**: exclusive and clean.

Bus cycles:

| cycle | issued for | effect on other caches |
|---|---|---|
| `READ`   | LOAD miss | copies drop to VALID; a DIRTY copy supplies the data |
| `RFO`    | STORE miss or STORE to a VALID line | copies are invalidated; a DIRTY copy supplies the data |
| `WRITE`  | write-back of a replaced DIRTY line | none |
| `T_READ` | LT miss | like READ, but a cache holding the line exclusively in a live transaction refuses with **BUSY** |
| `T_RFO`  | LTX/ST miss, or LTX/ST on a VALID line | like RFO, but may be refused with **BUSY** |

When no cache supplies the data, memory answers. When a cache supplies a DIRTY
copy, the bus writes that copy into memory in the same access, so memory is
current afterwards.

## The transactional cache

This is the core of the design. Each entry holds an address, a line state, a
64-bit word and a **tag**:

| tag | meaning |
|---|---|
| `EMPTY`   | unused |
| `NORMAL`  | an ordinary cached line that belongs to no transaction |
| `XCOMMIT` | the value to keep if the transaction **aborts** (the old value) |
| `XABORT`  | the value to keep if the transaction **commits** (the tentative value) |

A line touched by a transaction always occupies **two** entries: an XCOMMIT
copy of the old value and an XABORT copy that the transaction reads and writes.
`LT`, `LTX` and `ST` work like this:

* **XABORT hit.** LT/LTX return its data; ST writes it.
* **NORMAL hit.** The NORMAL entry is retagged XCOMMIT. A second entry is filled
  with the same data and tagged XABORT. If an exclusive copy is needed and the
  line is only VALID, a `T_RFO` first makes it exclusive.
* **Miss.** `T_READ` (for LT) or `T_RFO` (for LTX, ST) fetches the line. Both
  entries are then allocated from the reply.

Because of the two copies, commit and abort are whole-cache tag changes in a
single clock cycle, with no data movement:

| | XCOMMIT becomes | XABORT becomes |
|---|---|---|
| commit | EMPTY | NORMAL |
| abort  | NORMAL | EMPTY |

**Victim choice.** A new entry is taken in this order:

1. an entry of the same line;
2. an EMPTY entry;
3. a NORMAL entry;
4. an XCOMMIT entry.

A DIRTY victim is written back with `WRITE` first. XABORT entries are never
replaced. When no victim is left, the transaction has overflowed and is aborted.

**Snoops.** The transactional cache answers snooped cycles as follows:

* A `T_READ` or `T_RFO` hitting an exclusive (DIRTY/RESERVED) entry of a live
  transaction is refused with BUSY. The requester then aborts its own
  transaction.
* A `T_RFO` hitting a shared transactional line conflicts. So does a regular
  `RFO` hitting any transactional line, and a regular `READ` hitting an
  exclusive one. The local transaction aborts at once, and the cycle is
  answered from the restored NORMAL entry.
* A NORMAL entry otherwise behaves like a regular cache line.

## Status bits and orphans

`TACTIVE` is set by the first LT/LTX/ST of a transaction. `TSTATUS` is 1 while
no conflict has happened. A conflict, a BUSY refusal or an overflow clears
`TSTATUS`, and the transactional cache is aborted immediately.

A transaction with `TACTIVE=1, TSTATUS=0` is an **orphan**. It may keep
running, but it can no longer see or cause anything:

* LT/LTX return 0 with `resp_ok=0`;
* ST is dropped;
* no bus cycle is issued.

Its COMMIT returns 0. VALIDATE lets software stop an orphan early. Every
ending (commit, abort, failed validate) leaves `TACTIVE=0, TSTATUS=1`.

## Bus timing

The bus is atomic. A transaction goes through four phases:

1. **Arbitration.** The round-robin arbiter grants one request combinationally.
2. **Address/snoop cycle.** The granted cycle is broadcast. Every other cache
   answers in the same clock cycle. A BUSY answer ends the transaction here.
3. **Memory phase.** The bus is held until memory's `done`, MEM_LAT-1 cycles
   after the address cycle.
4. **Turnaround.** One idle cycle.

A node only does local cache work in cycles with no snooped address. The
turnaround cycle guarantees such cycles.

Latency seen by a processor:

* hit: 1 cycle;
* miss on an idle bus: 1 + MEM_LAT = 5 cycles.

The two caches of one node snoop each other's cycles. This keeps a line out of
both caches at once.

## Core interface (per processor)

| signal | dir | meaning |
|---|---|---|
| `req_valid`, `req_ready` | in/out | instruction handshake; accepted when both are high at a clock edge |
| `req_op`, `req_addr`, `req_wdata` | in | instruction (`tm_op_e`), word address, store data |
| `resp_valid` | out | one-cycle pulse per instruction |
| `resp_data`, `resp_ok` | out | loaded data; result of VALIDATE/COMMIT, 0 for a refused, overflowed or orphaned transactional access |
| `tactive`, `tstatus` | out | status bits |
| `ev` | out | one-cycle event pulses (hit, miss, write-back, BUSY refusal, conflict, overflow, commit ok/failed, validate failed, orphan access, ABORT) for performance counting |

`mem_init_*` writes memory directly, for loading a program's data before it
runs. Reset is synchronous and active low.

## Where this design departs from, or adds to, its source

* The status-bit wording in the source is contradictory. One sentence says
  TSTATUS is *set* on a conflict. Its table and flowcharts say TSTATUS is
  TRUE while there is *no* conflict. The table is followed.
* The source's snoop table refuses transactional cycles with BUSY for NORMAL
  entries too. Here a NORMAL entry refuses only while the node's own
  transaction is live. Since TSTATUS is 1 whenever no transaction runs, the
  literal rule would let an idle processor refuse its committed lines for
  ever.
* Regular READ/RFO cycles that hit transactional lines are not covered by the
  source, which calls mixing the two a programming error. They are treated as
  conflicting writers/readers: the transaction aborts.
* A DIRTY NORMAL victim is written back before replacement. The source shows a
  write-back only for XCOMMIT victims.
* Overflow aborts in hardware and raises no trap, because the processor is
  outside this RTL.
* The following are this design's own choices:
  * the bus protocol details: atomic bus, round-robin arbitration, turnaround
    cycle, dirty-copy write-through on reads;
  * the handshake;
  * one word per line;
  * the address width.
* Exponential backoff is software. It lives in the testbench processor models.
* The source also mentions a directory-based variant, optional L2/L3 caches and
  the processors. None of these is built.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a hung run.

```
verilator --binary --timing --assert -Irtl --top-module tb_tm_system \
    rtl/tm_pkg.sv rtl/*.sv tb/tb_tm_system.sv
./obj_dir/Vtb_tm_system
```

Replace the top module and testbench file to run another one:

| testbench | what it checks |
|---|---|
| `tb_tm_status` | random instruction sequences against a reference model of the status bits |
| `tb_bus_arbiter` | round-robin order and fairness against a model |
| `tb_main_memory` | latency, writes, dirty-copy merge |
| `tb_reg_cache` | random fills/snoops against a reference model |
| `tb_tx_cache` | allocation, commit/abort retagging, victim order, every snoop rule |
| `tb_snoop_bus` | grant, BUSY, supply and memory phases, turnaround |
| `tb_tm_node` | one node against a bus/memory model: latencies, LT/LTX/ST paths, upgrades, write-backs, orphans, overflow |
| `tb_tm_system` | 4 processors, small caches: directed coherence and transaction cases, then the counting benchmark; every mechanism is counted and must occur |
| `tb_tm_workloads` | 4 processors: producer/consumer on a bounded queue (every item consumed once, per-producer order kept) and a doubly-linked list that processes keep dequeuing from and re-enqueuing into (list integrity checked by walking it) |
| `tb_tm_system_full` | the top at its default sizes (32 processors) running the counting benchmark (128 increments) |

The full-size build takes about a minute to compile. It simulates in about a
second.
