# Coherent, configurable L1 caches for an asymmetric multicore soft processor

This is the memory system of a PolyBlaze multicore. PolyBlaze builds a
multicore out of MicroBlaze soft-processor cores. Each core gets its own L1
instruction and data caches, and the size, line length and associativity of
every cache are separate parameters. Cores of one system can therefore have
differently shaped caches (an *asymmetric* system), so a program can be placed
on the core whose cache suits it. The data caches stay coherent through two
simple rules:

- **Write-through.** Every store is sent to memory right away.
- **Write-invalidate.** A single central arbiter sees every store and tells
  every other core to drop its copy of the line.

Atomic operations (load-exclusive `LWX` / store-conditional `SWX`) are settled
by a lock arbiter in that same central point. It holds one reservation per core.

The RTL is SystemVerilog-2017. It covers everything between the processors'
cache ports and the memory controller's native port. The processors and the
memory controller are outside the design and appear as ports of the top,
`polyblaze_mem_top`.

```
  core 0                                   core 1
  +---------+  +---------+                 +---------+  +---------+
  | I-cache |  | D-cache |                 | I-cache |  | D-cache |     clk_core
  +---------+  +---------+                 +---------+  +---------+
     2 links      4 links                     2 links      4 links
  +-----------------------+                +-----------------------+
  | L1 Arbiter (+prefetch)|                | L1 Arbiter (+prefetch)|    clk_arb
  +-----------------------+                +-----------------------+
            5 links                                  5 links
  +---------------------------------------------------------------+
  |  L2 Arbiter: round robin | invalidate broadcast | lock arbiter |    clk_arb
  +---------------------------------------------------------------+
                   3 links (command, write data, read data)
  +---------------------------------------------------------------+
  |  memory interface (native port, at most 4 reads outstanding)  |    clk_mem
  +---------------------------------------------------------------+
                                  |
                      memory controller (outside)
```

Every arrow in the picture is a *memory link*: a dual-clock FIFO
(`pbml_fifo`). Each block therefore runs on its own clock. The reference
system ran the cores and arbiters at 80 MHz and the memory port at 160 MHz.

## Coherence: what is guaranteed and when

This is the part that needs the most care when using or changing the design.

**A store's journey.** When the processor stores a word:

1. The data cache updates its own copy if the line is present; a miss does not
   allocate.
2. The cache sends one write packet (address, data, byte enables) down its
   request link and acknowledges the processor immediately. The processor does
   not wait for memory.
3. The L1 Arbiter splits the packet in two. The address part goes on the
   address-request link and the data word on the write-data link to the L2
   Arbiter.
4. When the round robin reaches the core, the L2 Arbiter executes the write in
   one clock cycle, and only if every link involved has room. In that cycle it
   does three things:
   - pushes the command and the data word towards memory;
   - pushes the word address onto the invalidation link of *every other* port;
   - updates the reservations.
5. In each other core, the L1 Arbiter forwards the address to the data cache.
   The data cache's coherency handler looks the address up and clears the
   valid bit of a matching line. Only the address's own set is looked up, and
   the tag must match.

**Ordering rules this gives.**

- The L2 Arbiter is the single point of serialisation. All cores see all
  stores in the same order, the order in which the L2 Arbiter executed them.
- Requests of one core keep their order from the data cache to memory: the
  links are FIFOs, the L1 Arbiter preserves the order, and the L2 Arbiter takes
  a port's requests in order. A load that misses after a store by the same core
  therefore always sees that store.
- A data cache handles a waiting invalidation before it serves the next
  processor request. A read hit can never return a word whose invalidation had
  already reached the cache.

**The window.** Between the cycle in which the L2 Arbiter executes a store and
the cycle in which another core's cache applies the invalidation, that core can
still hit on the old value. With equal core and arbiter clocks this takes about
6 to 8 cycles: two link crossings plus the L1 Arbiter. This is the normal
behaviour of a write-through invalidate protocol. Software that needs a stronger
guarantee uses `LWX`/`SWX`, which always go to the central arbiter.

**Atomic operations.**

- `LWX` always misses in the data cache. A present copy is invalidated first,
  so the request reaches the L2 Arbiter, and the lock arbiter records a
  reservation for that port: a valid bit plus the word address. Each port has
  its own reservation, so several cores can hold reservations at once.
- An `SWX` travels as a conditional write. The L2 Arbiter checks the port's
  reservation, with the address compared at word granularity:
  - If it matches, the write goes to memory like any other store, with its
    invalidation broadcast.
  - If it does not match, the write is dropped.
- Either way, a one-bit result goes back on the port's conditional-result link.
  The data cache holds the processor until the bit arrives. It reports the bit
  as `cond_ok`, and updates its copy only on success.
- Any store that reaches memory clears the reservations of the *other* ports
  on the same word. An `SWX` also clears its own port's reservation.

## The data cache (`dcache`)

The cache is made of separate sub-blocks:

- a tag bank (`tag_bank`);
- a data bank (`data_bank`);
- a separate valid-bit bank (`valid_bits`);
- a replacement policy (`lru_policy`);
- optional debug counters (`cache_debug`);
- a control state machine.

The valid bits are kept apart from the tags so that one small bank serves all
of its readers and writers: hit detection, line fills, `WDC`, the `LWX` forced
miss, coherency invalidations, and the replacement policy. They are flip-flops
cleared by reset.

**Timing (cache clock).**

| operation | cycles to `ack` |
|---|---|
| read hit, store, `WDC` | same cycle (combinational `ack`) |
| read miss | request packet, then the `LINE_WORDS` words of the line first-word-first, then `ack` one cycle after the last word |
| `SWX` | until the one-bit result arrives |

**States.** `S_IDLE` serves hits, stores and `WDC`, and takes invalidations.
`S_REQ` sends the read packet. `S_FILL` writes the returned words into the
victim way. `S_RESP` answers the processor. `S_SWX` waits for the
conditional result.

**`WDC`** invalidates every way of the addressed set. It ignores the tag, as
the instruction it models does.

**Replacement.** An empty way is filled first. Otherwise the least recently
used way is replaced, using true LRU with per-way ages. A direct-mapped cache
is simply `WAYS = 1`.

**Profiler strobes (`dc_events`).** One-cycle pulses for an external profiler:

- read request, read hit, read miss;
- write request, write hit, write miss;
- coherency packet received, coherency packet that dropped a line.

**Debug (`dc_dbg`, `USE_DEBUG`).** Three registers:

- the number of line requests;
- the cycles from the last line request to its first returned word;
- a running sum of all filled words.

With `USE_DEBUG = 0` the registers are removed.

## The instruction cache (`icache`)

The instruction cache has the same structure as the data cache, minus
everything to do with writes. It has no coherency handler, since code is never
written through the data path here. `WIC` invalidates every way of a set.

Fetch addresses may be physical or virtual. Besides `addr`, each request
(`mb_ireq_t`) carries three more fields:

- `virt` marks a virtual address;
- `pid` is the 8-bit process ID;
- `paddr` is the translated address, supplied by an MMU outside the cache.

Each tag holds three parts, and a hit needs all of them to match:

- the address-type bit;
- the process ID, or zero for a physical line;
- all address bits above the set index.

So the same virtual address in two processes gives two separate lines. A
physical line is shared by every process. On a miss, a virtual fetch requests
`paddr` and a physical fetch requests `addr`. The set index comes from `addr`.

## L1 Arbiter and stride-1 prefetch (`l1_arbiter`, `prefetch_unit`)

The L1 Arbiter joins a core's two caches onto one L2 Arbiter port. Requests
leave in one unified format, tagged with a source bit (`1` = data cache,
`0` = instruction cache) and the number of words to read. Returned words carry
the source bit back and are steered to the right cache. When both caches are
ready, they take turns. One line read is outstanding per core at a time.

The instruction path runs through a one-line stride-1 prefetcher:

- After each line read of line L it fetches line L+1 into a buffer.
- If the next instruction miss is for the buffered line, the buffer serves it
  without a memory access, and L+2 is prefetched.
- Any other request drops the buffer.

The prefetcher is on the instruction path only. A data-side buffer would also
have to snoop invalidations, and there is no rule for that.

## L2 Arbiter and memory interface (`l2_arbiter`, `lock_arbiter`, `npi_interface`)

**Round robin.** The L2 Arbiter scans its ports round robin from the port
whose turn it is, and takes the first port that has a request. An idle port
never wastes a cycle.

**Outcomes of a selected request.** It becomes one of three actions:

- a read: one command;
- a write: command, data word and invalidation broadcast, all in one cycle;
- a failed `SWX`: dropped, with a `0` result sent back.

If a needed link is full, the port keeps its turn until the request can go.

**Read tracking.** Reads come back from memory in order. A small queue records
the port, source bit and word count of each outstanding read (at most
`MAX_READS` = 4). The returned words are steered from that queue.

**Memory interface.** It issues commands to the memory controller's native
port in link order. It aligns read addresses to the line, so the words return
first word of the line first. It never has more than four reads outstanding.

The native-port handshake is this design's own:

| channel | signals |
|---|---|
| command | `npi_cmd_valid`/`npi_cmd_ready`, carrying `rnw`, `addr`, `nwords`, `be` and one `wdata` word per write |
| read data | `npi_rd_valid`/`npi_rd_ready`, with `npi_rd_last` on the last word of a read |

An adapter to a specific controller belongs on these ports.

## Link packets (`pb_pkg`)

| link | content |
|---|---|
| data cache -> L1 | `addr[32]`, `rnw` (1 = read), `wdata[32]`, `be[4]`, `cond` |
| L1 -> data cache | one 32-bit word per entry, first word of the line first |
| invalidation links | 32-bit word address |
| conditional-result links | 1 bit: `1` = `SWX` done, `0` = failed |
| instruction cache -> L1 | 32-bit fetch address |
| L1 -> L2 address request | `addr`, `rnw`, `be`, `cond`, `src`, `nwords[4]` |
| L1 -> L2 write data | 32-bit word |
| L2 -> L1 read data | `src`, 32-bit word |
| L2 -> memory interface command | `addr`, `rnw`, `be`, `nwords` |

Each core has the same 11 links as the original system (4 + 2 + 5). The L2
Arbiter reaches the memory interface over 3 links.

The links are Gray-pointer asynchronous FIFOs, 16 entries deep, with two-flop
synchronisers. An entry becomes visible to the reader two reading-clock edges
after it is written.

## Configuring a system (`polyblaze_mem_top`)

| parameter | default | meaning |
|---|---|---|
| `N_CORES` | 2 | number of cores (L2 Arbiter ports) |
| `D_BYTES`, `D_WAYS`, `D_LINE_WORDS` | `{8192, 4096}`, `{1, 4}`, `{4, 4}` | data cache of each core (entry *i* is core *i*, written highest core first) |
| `I_BYTES`, `I_WAYS`, `I_LINE_WORDS` | `{16384, 16384}`, `{4, 4}`, `{4, 4}` | instruction cache of each core |
| `PREFETCH` | 1 | stride-1 instruction prefetch |
| `USE_DEBUG` | 1 | debug counters in the caches |
| `MAX_READS` | 4 | outstanding reads at the memory port |

**Default configuration.** The defaults are the asymmetric dual core of the
application study:

- both cores: a 16 kB 4-way LRU instruction cache;
- core 0: a 4 kB 4-way LRU data cache;
- core 1: an 8 kB direct-mapped data cache;
- all lines 4 words.

**Allowed values.** Sizes, way counts and line lengths must be powers of two,
with at most 8 words per line.

**Clocks and reset.** The clocks `clk_core`, `clk_arb` and `clk_mem` may be
unrelated. `rst_n` is asynchronous and common to all domains.

The other cache shapes evaluated for the original system are all reachable by
these parameters:

- 4 to 32 kB;
- direct-mapped, 2-way and 4-way;
- quad core.

## Performance

The testbenches give the memory port a read latency of about 28 memory-clock
cycles. That is 14 core cycles, about what the original system's memory
controller showed.

With that latency, the best-case data-miss latency here is **34 core cycles**,
from request to data. The original system reported 27. The difference comes
from the links. Here every link crossing costs about three cycles of the
reading clock: write, then two synchroniser stages. The original spent about
4 cycles in total between cache and L1 Arbiter and 2 between the L1 and L2
Arbiters. A hit is answered in the request cycle, as in the original.

Quad-core read-miss latency, with 4 kB 4-way caches and random loads and
stores over private windows, from `tb_polyblaze_quad`:

| active cores | mean | max | misses at the minimum (34-35 cycles) |
|---|---|---|---|
| 1 | 38.3 | 77 | 76 % |
| 2 | 39.0 | 77 | 72 % |
| 4 | 39.3 | 88 | 57 % |

The latency grows only slowly with more cores. The memory port keeps up to four
reads in flight, and the test reaches that limit.

Data-cache shapes side by side, from `tb_polyblaze_dcache_sweep`. This is a
synthetic stream, not a real program:

- 75 % loads, 25 % stores;
- a 12 kB hot region, a 64 kB cold region, a one-line-stride scan and a 1 kB
  loop.

Read miss rate in %:

| | 4 kB | 8 kB | 16 kB | 32 kB |
|---|---|---|---|---|
| direct-mapped | 84.3 | 74.4 | 61.5 | 57.6 |
| 2-way LRU | 82.7 | 71.0 | 57.6 | 48.8 |
| 4-way LRU | 81.6 | 68.4 | 54.1 | 47.8 |

The scan misses on every new line, so the absolute rates say little. What
matters is the ordering: size matters more than associativity.

## Where this design departs from the original or fills gaps

- **Write policy.** The caches are write-through with no allocation on a write
  miss. The coherence scheme relies on write-through, and the allocation rule is
  that of the MicroBlaze write-through data cache.
- **Miss latency.** The memory links always use the asynchronous FIFO, even
  where both ends share a clock. This is why the miss latency is higher (see
  Performance).
- **L2 Arbiter to memory interface.** 3 links are used, where the original
  lists 4 without naming the fourth.
- **Cacheable range.** Every address is cacheable, and the data-cache tags hold
  all upper address bits. There is no cacheable-range setting that would let
  the tags drop the fixed high bits.
- **Instruction-cache tags.** The 8-bit process ID, the zero ID for physical
  lines, and the translated address arriving with the request are this
  design's choices.
- **Prefetch.** On the instruction path only.
- **Design choices where the original gives none.** The L1 Arbiter's
  alternating priority and one outstanding read per core, the read-tracking
  queue, and the one-cycle atomic write-and-broadcast.
- **WDC/WIC.** They clear all ways of the addressed set.
- **Interfaces.** The processor interfaces are plain request/acknowledge
  bundles (`mb_dreq_t`, `mb_dresp_t`, `mb_ireq_t`, `mb_iresp_t`), not the
  processor's own cache bus.
- **Core labels.** The source text labels the two data-cache configurations of
  the dual-core study inconsistently. Here "configuration A" is 4 kB 4-way LRU,
  on core 0, and "configuration B" is 8 kB direct-mapped, on core 1, as in its
  results table.
- **Not included.** The processors, the memory controller, the profiler that
  consumes the event strobes, and the logic analyser that would watch the debug
  signals.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pbml_fifo` | order and completeness across unrelated clocks, full/empty, latency |
| `tb_valid_bits`, `tb_tag_bank`, `tb_data_bank`, `tb_lru_policy` | random operations against a reference model |
| `tb_cache_debug` | counter, latency and check-sum values |
| `tb_lock_arbiter` | reservation set/clear rules, `SWX` outcome |
| `tb_dcache` | miss timing, same-cycle hits, write-through, invalidation, `LWX`/`SWX`, `WDC`, LRU; random loads against a memory model |
| `tb_icache` | misses, hits, `WIC`, replacement, virtual fetches of several processes, random fetches |
| `tb_prefetch_unit` | demand and prefetch sequence, buffer hits and drops |
| `tb_l1_arbiter` | packet split, source steering, forwarding, one outstanding read |
| `tb_l2_arbiter` | round robin with skipping, broadcast to other ports only, reservations, return steering, 4-read limit |
| `tb_npi_interface` | line alignment, in-order writes with byte enables, 4-read limit |
| `tb_polyblaze_mem_top` | default dual-core system end to end; see below |
| `tb_polyblaze_quad` | quad core, latency with 1/2/4 active cores, four reads in flight |
| `tb_polyblaze_dcache_sweep` | twelve single-core systems, 4-32 kB data caches x 1/2/4 ways, same access stream; every load checked, miss counts obey LRU inclusion |

**End-to-end test.** `tb_polyblaze_mem_top` runs the top at its default
parameters against a behavioural memory controller (`tb/mpmc_model.sv`). It
makes each of these happen at least once and counts them:

- instruction and data misses and hits;
- prefetch hits;
- write-through store hits and misses;
- an invalidation dropping another core's line;
- `SWX` success, and `SWX` failure after a foreign store;
- `WDC` and `WIC`;
- one virtual address fetched by two processes, each getting its own line;
- LRU and direct-mapped evictions;
- both cores' reads outstanding together.

It then runs 1500 random operations per core on both cores at once and checks
every load and fetch.

**Running a test with Verilator 5:**

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/pb_pkg.sv \
    tb/tb_polyblaze_mem_top.sv --top-module tb_polyblaze_mem_top -Mdir obj
./obj/Vtb_polyblaze_mem_top
```

For another test, replace both names with the other testbench's. Every test
finishes within about a minute.

**Assertions** cover the handshake rules:

- the processor holds its request until `ack`;
- the L1 Arbiter has at most one read outstanding;
- the L2 Arbiter takes one action per cycle;
- the memory interface has at most four reads outstanding.

**Simulation caveat.** Random tests use `$urandom` with the simulator's default
seed.

## Files

`rtl/`:

- `pb_pkg.sv`: packet and port types.
- `pbml_fifo.sv`: the memory link.
- Cache parts: `valid_bits.sv`, `tag_bank.sv`, `data_bank.sv`,
  `lru_policy.sv`, `cache_debug.sv`, `dcache.sv`, `icache.sv`.
- Arbiters and memory port: `prefetch_unit.sv`, `l1_arbiter.sv`,
  `lock_arbiter.sv`, `l2_arbiter.sv`, `npi_interface.sv`.
- `pb_core_node.sv`: one core's caches, L1 Arbiter and 11 links.
- `polyblaze_mem_top.sv`: the system.

`tb/`:

- the testbenches;
- `mpmc_model.sv`, the behavioural memory controller.
