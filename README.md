# Shared memory hierarchy for a multi-context ρ-VEX on a Zynq

Several ρ-VEX contexts need to share one large DRAM and synchronize with each
other. This RTL holds everything between the contexts' level-1 caches and the
Zynq DDR port:

- a **round-robin arbiter** that merges the four rVEX buses and stamps each
  request with its source;
- a **synchronization unit** that implements load-linked / store-conditional
  (LL/SC) on that merged bus, so threads on different contexts can build
  locks and atomic counters;
- an **address demuxer** that splits the bridge range from a second slave
  port for peripherals;
- a **one-cycle delay stage** that breaks the timing path into the bridge;
- an **rVEX-to-AXI4 bridge** with a 256 KiB, 4-way, 32-byte-line L2 cache.
  It reads whole lines with wrapping bursts, writes through a single-entry
  write buffer, and keeps the cache consistent with DRAM;
- **host registers**. Software on the ARM side uses them to tell the bridge
  where the reserved DRAM region starts, to flush the L2 and to reseed its
  random-replacement generator.

The cores and their L1 caches are not part of this RTL. The top module
`rvex_mem_system` has one rVEX bus port per L1 cache, an AXI4 master port
towards the DDR controller, a second rVEX bus port for peripherals and the
host register port.

```
 L1 ─┐
 L1 ─┤ bus_arbiter ─ sync_unit ─ bus_demuxer ─┬─ bus_halfstage ─ rvex_axi_bridge ─ AXI4 ─> DDR
 L1 ─┤  (source)     (LL/SC)     (address)    └─ periph_req/rsp
 L1 ─┘                                                    ▲
                               host ─ ctrl_regs ──────────┘ base, flush, reseed
```

## The rVEX bus used throughout

All bus ports carry two structs from `rvex_bus_pkg`:

| request (`bus_mst_t`) | response (`bus_slv_t`) |
|---|---|
| `address[31:0]`, `write_data[31:0]`, `write_mask[3:0]` | `read_data[31:0]` |
| `read_enable`, `write_enable` | `ack`, `busy`, `fault` |
| `flags.synchronize` (new: LL/SC marker) | |
| `source[31:0]` (new: requesting context) | |

The handshake works like this:

- A master raises `read_enable` or `write_enable` and holds the whole request
  stable until it sees `ack`.
- The cycle with `ack` completes the transfer, and `read_data` is valid in
  that cycle.
- `busy` means "not yet".
- `read_enable` and `write_enable` are never high together, and neither are
  `ack` and `busy`. Assertions in the arbiter and the sync unit check these
  rules.

A load with `synchronize` set is a load-linked; a store with it set is a
store-conditional.

## Load-linked / store-conditional

`sync_unit` sits where all contexts' requests are already merged in one
order, so it can decide atomicity without snooping the L1 caches.

- **One link register per source** (`NUM_SOURCES = 4`). It holds an address
  and a valid bit.
- **Granularity.** Addresses are compared with their low `GRANULARITY = 2`
  bits dropped, so a load-linked to byte 1 links word 0.
- **Load-linked.** It passes through with no extra delay. When the slave
  acks it without a fault, the unit stores the address in the source's link
  register. A new load-linked replaces the old link.
- **Store-conditional.** The unit spends one check cycle, with `busy`
  raised, comparing the request against the source's link.
  - If the link is valid and matches, the store is forwarded. In its ack
    cycle `read_data` is replaced by `SC_SUCCESS` (1). Every link register
    that holds the same address (under granularity) is then invalidated, in
    all sources.
  - Otherwise the store is not forwarded. The unit acks it itself in the
    next cycle with `read_data = SC_FAIL` (0) and no fault.
- **What breaks a link.** Only a successful store-conditional to the same
  address, or `link_flush[s]` for source `s` (which a context needs after an
  interrupt). An ordinary store, a failed store-conditional or a
  store-conditional to another address leaves every link alone. Programs
  must use only LL/SC on a shared synchronization word.
- **Faults.** A faulting load-linked sets no link. A faulting
  store-conditional returns its fault and invalidates nothing.
- Every other request passes through combinationally.

A store-conditional therefore costs exactly one cycle more than a store, and
a failing one costs 2 cycles.

## Arbiter, demuxer and delay stage

**`bus_arbiter`.** It picks, round-robin, the first requesting master after
the one granted last. The request is forwarded in the same cycle, so an
uncontended access costs no extra cycle. The grant is held until `ack`.

- `source` is set to the master's index.
- Waiting masters see `busy`.
- One transaction can wait at most for the three other masters' transactions
  ahead of it.

**`bus_demuxer`.** It compares the address against `SLV_BASE`/`SLV_SIZE`.
By default the bridge gets `0x0000_0000–0x7FFF_FFFF` and the peripheral port
gets `0x8000_0000–0xFFFF_FFFF`. An address that matches no slave is answered
with `ack` and `fault` at once.

**`bus_halfstage`.** It registers the request and passes the response back
unregistered. It clears its register in the ack cycle so a request is never
issued twice. It adds one cycle to every bridge access.

## The bridge

`rvex_axi_bridge` adds `base_addr` to the bus address. Because of that the
rVEX sees the reserved DRAM region starting at 0. The bridge then splits the
request between two nearly independent halves that share the L2.

### Read path: `read_manager` + `axi4_reader`

A read looks the line up in the L2. The lookup is registered, so the result
arrives one cycle later.

- **Hit.** The bridge acks in that cycle.
- **Miss.** The manager does four things:
  - it chooses a victim way;
  - it invalidates that way's line and writes the new tag;
  - it asks the PRNG for the next number;
  - it starts one AXI4 **WRAP** burst of `LINE_BYTES/8` 64-bit beats,
    beginning at the requested word.
- **Early ack.** The first beat is the requested word. The bus is acked
  with it at once, and the rest of the line is written into the L2 in the
  background. The line becomes valid after the last beat.
- **One fill at a time.**
  - A read of the line being filled waits only until its own word has
    arrived. The manager keeps a per-word arrival mask and then reads the
    word from the way being filled, as if it were a hit.
  - A read of another line that hits is served during the fill.
  - A read of another line that misses waits for the fill to end.
- **Mutex.** The reader holds back its AR request while the writer has an
  outstanding write to the same line. The Zynq only promises that a read
  returns the last *completed* write.

### Write path: `write_manager` + `axi4_writer`

The writer is a **write buffer of one entry**.

- **Miss.** A write is acked as soon as the writer accepts it. The AXI4
  write (one INCR beat with byte strobes) completes afterwards, and only the
  next write waits for it.
- **Word placement.** The 32-bit word is copied to both halves of the
  64-bit beat, and its 4-bit mask is shifted into the right half.
- **Coherence.** In parallel with starting the AXI write, the write manager
  asks the read manager whether the word is cached. If it is, the read
  manager writes the same bytes into the L2 way that holds it. The L2 stays
  write-through, so no line is ever dirty and eviction never writes back.
  This is why a write that hits costs one cycle more than one that misses.
- **Fill conflicts.**
  - A write to the line being filled does not start until the fill ends,
    so the fill cannot overwrite the new data.
  - A write that hits while another fill is running waits for the fill
    before updating the L2, because the L2 has one write port.

### L2 cache: `l2_cache`

The L2 has `NUM_BLOCKS` ways × `LINE_COUNT` lines × `LINE_BYTES` bytes, and
each dimension is a power of two.

- The default is 4 × 2048 × 32 B = 256 KiB, in 64-bit words.
- Tags and data are one memory array per way.
- The per-line valid flags are flip-flops, so `flush` clears the whole cache
  in one cycle. The read manager delays a flush until no fill is running.

**Replacement.** The victim is the lowest-numbered empty way of the set. Only
when the set is full does `rnd mod NUM_BLOCKS` choose.

**`xoroshiro128p`** is a xoroshiro128+ generator with 128 bits of state and
64-bit output `s0 + s1`, using the 24/16/37 rotation constants. It steps once
per miss. It can be reseeded from the host registers, and an all-zero seed
selects `DEFAULT_SEED` because the generator cannot leave the zero state.

## Timing

These are cycles from the first request cycle up to and including the ack
cycle, at a master port of the top. `D` is the AXI latency from the AR
handshake to the first R beat.

| operation | cycles |
|---|---|
| read, L2 hit | 3 |
| read, L2 miss, bridge idle | 3 + D |
| read of a word of the line being filled | 3 after its beat has arrived |
| read of a line whose write is still pending (mutex) | 3 + D + rest of that write |
| write, no L2 hit, write buffer free | 3 |
| write, L2 hit, no fill running | 4 |
| write with the write buffer still busy | 3 + rest of the previous write |
| store-conditional, success | one more than the same store |
| store-conditional, failure | 2 |

Without the delay stage, every bridge figure is one cycle less. The hit, miss,
fill, write and store-conditional rows are checked exactly in simulation. The
mutex row is checked only as a lower bound (more than 3 + D), and the
busy-buffer row is not timed.

## Host registers: `ctrl_regs`

The port is a simple strobe port: `reg_we`/`reg_re` with a byte address.
Read data is registered and appears one cycle after `reg_re`.

| offset | register |
|---|---|
| 0x00 | `BASE`: physical start of the reserved DRAM region, added to every bridge address (reset 0) |
| 0x04 | `CTRL`: write 1 to bit 0 to flush the L2, write 1 to bit 1 to load the seed into the PRNG (one-cycle pulses) |
| 0x08–0x14 | `SEED[31:0]` … `SEED[127:96]` |

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `rvex_mem_system` | `NUM_MASTERS` | 4 | L1 caches / contexts (two cores with two contexts each) |
| | `NUM_BLOCKS`, `LINE_COUNT`, `LINE_BYTES` | 4, 2048, 32 | L2 ways, lines per way, bytes per line (`LINE_BYTES` ≥ 8) |
| `sync_unit` | `GRANULARITY` | 2 | low address bits ignored when matching links |
| `bus_demuxer` | `SLV_BASE`, `SLV_SIZE` | see above | address map |
| `xoroshiro128p` | `DEFAULT_SEED` | fixed constant | reset state |

Other configurations are set through these parameters, for example a 1 KiB
direct-mapped L2 with 16–128 B lines, or 512 KiB as 16 × 1024 × 32 B. Only
the default configuration and small test configurations (2 ways × 8 lines)
have been simulated.

## Where this RTL departs from, or goes beyond, the original design

- **Design choices.** The internal state machines of the read and write
  managers are this implementation's own, as are the register map and the
  demuxer address map. So are the arbitration policy, and the encoding of
  the store-conditional result (1 = success, 0 = failure).
- **Link registers.** The original is described as having "one link
  register", yet it can flush links per context. Here there is one link
  register per source.
- **Write errors.** AXI write responses are not checked; a write is assumed
  to succeed.
- **Cache size in bytes.** The cache line size is a byte count, where the
  original configures it in bits.
- **Host port.** The host register port is a plain strobe port. On the
  board it would be behind an AXI-lite slave, which is not included.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- **Behavioural models.** `tb/axi4_mem_model.sv` is an AXI4 memory with a
  settable read and write latency. `tb/tb_bus_slave.sv` is an rVEX bus
  slave. `tb/tb_bus_tasks.svh` holds the bus-master tasks.
- **End-to-end test.** `tb_rvex_mem_system` runs the top at its default
  parameters against a 1 MiB memory model.
  - It checks the cycle counts above, the LL/SC rules, flush, random
    eviction, mutex waits, fill waits, reads of already-arrived words during
    a fill and peripheral routing.
  - It then runs four masters. Each increments one shared counter 40 times
    with LL/SC retry loops while also writing and reading back private data.
    The counter must end at exactly 160.
  - Each mechanism is counted, and the test fails if any of them never
    occurs.
- **Fault tests.** Each module has been checked against a deliberately
  broken copy. The changes were:
  - subtracting the base address;
  - fixed-priority arbitration;
  - a store-conditional that breaks no other context's links;
  - a missing ack clear in the delay stage;
  - wrong demux select, a wrong PRNG rotation, a sticky flush pulse, and
    always-random victims;
  - bursts that start at the line start, ignored write strobes, and a
    wrong half-word on a read hit;
  - no L2 update on a write hit, and unconnected link flushes.

  In each case the block's testbench reported failures.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  -Irtl -Itb rtl/rvex_bus_pkg.sv rtl/axi4_pkg.sv tb/tb_rvex_mem_system.sv \
  --top-module tb_rvex_mem_system -o sim && ./obj_dir/sim
```

Replace the last file and top module with any other `tb/tb_<module>.sv`.
