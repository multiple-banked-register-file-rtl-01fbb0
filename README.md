# Register file cache: a two-level register file for wide out-of-order cores

A wide-issue, dynamically scheduled processor needs many physical registers,
about 128 for an 8-way machine, and many register ports. A monolithic register
file of that size cannot be read in one short cycle. Pipelining it over two
cycles has two costs: a longer branch-misprediction penalty, and a second level
of bypass network from every result bus to every functional-unit input.

Yet at any moment only a handful of those registers hold values that are about
to be read. This design exploits that with two banks that have different
organizations:

* an **upper level**: 16 registers, fully associative, with many ports. It is
  small enough for a single-cycle access, and it is the *only* bank that feeds
  the functional units. The bypass network therefore stays a single level, as
  with a one-cycle register file.
* a **lower level**: all 128 physical registers, with fewer ports. Every
  result is written here, so it always holds every value. Values move only
  upward, over a small number of **transfer buses**, and are never copied
  down.

Two policies decide what sits in the upper level:

* a **caching policy**, which decides which new results are also written
  upward;
* a **fetch policy**, which decides when values are brought up from below.

The default is *non-bypass caching* with *prefetch-first-pair*, the
combination that performed best in the original evaluation.

The organization, its policies and sizes follow the register file cache
proposed by J.-L. Cruz, A. González, M. Valero and N. P. Topham in
"Multiple-Banked Register File Architectures". The RTL, its timing and every
detail that publication leaves open are this implementation's own. They are
listed under "Design choices" below.

## Organization

```
                       results (WP per cycle, with a "bypassed" flag)
                              |
                        cache_policy ------------------------------+
                         |         \                               |
              every result          results chosen by the policy   |
                         v           v                             |
   lower_bank  128 x 64b            upper_bank  16 x 64b, fully associative,
   WP write ports                   tree pseudo-LRU, RP read ports --> operands
   NB read ports ---- NB buses ---> WP + NB write ports               (hit/miss)
        ^                                   |                           |
        |                          present (128 bits)               read miss
        +-------- fetch_unit <--------------+---------------------------+
                    ^   demand fetches first, then prefetches
                    |
        first_pair_table <-- renamed instructions; issuing destinations
```

| module | role |
|---|---|
| `rfc_pkg` | sizes, `preg_t`/`data_t`, the `result_t` and `renamed_t` structs, policy enums |
| `reg_file_cache` | top level, wires the blocks below |
| `upper_bank` | the 16-entry register cache: associative read ports, write/allocate, invalidate |
| `plru_tree` | tree pseudo-LRU that picks several distinct victims per cycle |
| `lower_bank` | the 128-register bank, its bus read ports and a `written` bit per register |
| `cache_policy` | routes results and bus values into the two banks |
| `first_pair_table` | per register: the other operand of its first consumer |
| `fetch_unit` | schedules the transfer buses, with a prefetch queue |

### Sizes and port counts

The defaults are the evaluated sizes: 128 registers below and 16 above, with
rename and issue widths of 8. The port counts are those of configuration C3
from the original evaluation. Every size is a parameter of `reg_file_cache`.
The evaluation compared four port configurations of roughly increasing area:

| config | upper read `RP` | upper result write `WP` | lower write (= `WP`) | buses `NB` | estimated area (10K λ²) | estimated cycle time |
|---|---|---|---|---|---|---|
| C1 | 3 | 2 | 2 | 2 | 10593 | 2.45 |
| C2 | 4 | 3 | 3 | 2 | 15487 | 2.55 |
| **C3 (default)** | 4 | 4 | 4 | 2 | 20529 | 2.61 |
| C4 | 4 | 4 | 4 | 3 | 25296 | 2.67 |

The last two columns are the published estimates for a 0.5 µm process. They
come from an analytical area and access-time model; they were not measured
on this RTL. For comparison, those estimates put a one-cycle monolithic
register file of similar area at a cycle time of 4.71 to 5.48.

Each bus costs one read port on the lower level and one extra write port on
the upper level. With the defaults, the upper bank therefore has 4 read ports
and 6 write ports, and the lower bank has 4 write ports and 2 read ports.
Data is 64 bits wide (`DATA_W` in `rfc_pkg`).

After coarse synthesis, the default top has about 8,800 word-level cells,
2,500 flip-flop bits (the upper bank's 16 x (64+7+1) bits and the prefetch
table's 128 x 9 bits dominate), and an 8 Kbit memory (the lower bank).

## What goes up: caching policies (`cache_policy`)

Most register values are read at most once, so ordinary temporal locality is
weak. The two policies use what the pipeline knows instead:

* **Non-bypass** (`CACHE_NON_BYPASS`, default). A result that some consumer
  already took from the bypass network is written only to the lower level.
  Other results are written to both levels. The reasoning: if a consumer
  picked the value off the bypass, its (probably only) read has already
  happened.
* **Ready** (`CACHE_READY`). A result is cached only if it is a source of an
  unissued instruction that now has all its operands ready. That consumer
  will need the value very soon, and it can no longer get it from the
  bypass.

The information comes with each result from the issue/bypass logic outside
this design, as the `bypassed` and `ready_consumer` fields of `result_t`. A
result that is not cached invalidates any older upper-level copy of the same
physical register. A value that arrives on a bus in the same cycle as a result
for the same register is dropped, because the result is newer.

## Bringing values up: fetch policies (`fetch_unit`, `first_pair_table`)

This is the part that needs the most care.

**Fetch-on-demand.** An instruction whose operands are all ready reads them
from the upper level. Each operand that misses becomes a demand request,
because the top feeds `rd_en & ~rd_hit` straight into `fetch_unit`. A demand
gets a bus only if one is free in that cycle. It is not queued: the instruction
stays ready and asks again.

Because the lower level is slower, the round trip is three steps:

1. read the lower level;
2. write the upper level;
3. read the upper level.

```
cycle t     read misses; fetch_unit grants a bus; lower_bank read port addressed
cycle t+1   lower_bank data on the bus; written into upper_bank at the clock edge
cycle t+2   the operand hits in upper_bank
```

**Prefetch-first-pair** (`FETCH_PREFETCH_FIRST`, default, in addition to
demand fetches). When an instruction issues, bring up the *other* source
operand of the *first* instruction that will consume its result. For the
renamed sequence

```
(1) p1 = p2 + p3
(2) p4 = p3 + p6
(3) p7 = p1 + p8
```

issuing (1) prefetches p8. The transfer then overlaps with the execution of
(1), so (3) is more likely to find both operands in the upper level.

Knowing "the first consumer" is the job of `first_pair_table`. It has one entry
per physical register p:

* `seen`: p's first consumer has been renamed;
* `has_other` and `other`: that consumer's other source register.

Rename fills the table in program order, instruction by instruction within a
group. For each source s whose entry is not yet `seen`, the table records the
other source. The instruction's destination entry is then cleared, because
the register now belongs to a new producer. A consumer with a single source,
or with both sources equal, gives no prefetch. At issue, the destinations of
up to 8 issuing instructions look their entries up combinationally, which
yields up to 8 prefetch candidates per cycle.

**Bus scheduling** (`fetch_unit`). Each cycle the unit serves, in order:

1. demands, in read-port order;
2. queued prefetches, oldest first;
3. new prefetches, which take a free bus at once or join the queue. The queue
   holds 8 entries; a prefetch that arrives when it is full is dropped, and
   `pf_drop_o` pulses.

A request is filtered out in any of these cases:

* its register is already in the upper level (`present`);
* it is already on a bus, or its data is returning this cycle;
* it is already queued;
* its value has not been written yet. The lower bank keeps a `written` bit per
  register for this. The bit is cleared when rename allocates the register and
  set by its result.

A queued prefetch whose register reached the upper level in the meantime is
discarded without using a bus. A prefetch that is granted at once follows the
same t / t+1 / t+2 timing as a demand.

## Replacement (`plru_tree`, `upper_bank`)

The upper bank is fully associative, with tree pseudo-LRU replacement:

* 15 node bits; a touch points every node on its path away from the touched
  way.
* In one cycle, up to 6 writes may each need a new entry. Victims are chosen
  in write-port order, and each one must be distinct:
  * an invalid entry is used first;
  * otherwise the tree is walked, and a node whose preferred half holds
    nothing selectable is passed the other way;
  * each chosen victim is immediately marked touched and excluded.
* Entries updated in place this cycle are excluded too.
* Read hits and in-place writes count as accesses, applied before the cycle's
  allocations.

The bank also supports:

* **In-place writes.** A write to a register already held updates that entry
  instead of allocating a second copy. An assertion flags two writes of the
  same register in one cycle, which would break the one-copy rule.
* **Invalidation.** An invalidate port drops a register's entry. It is used
  for results that are not cached, and when rename reallocates a physical
  register (whose old value is dead).

## Interface of `reg_file_cache`

| port | dir | meaning and timing |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (clears the upper level, the prefetch table, the `written` bits and the queue) |
| `ren_i[RW]` (`renamed_t`) | in | renamed instructions, program order. A valid destination is a register allocation. Sources feed the prefetch table |
| `rd_en_i[RP]`, `rd_preg_i[RP]` | in | operand reads from the upper level |
| `rd_hit_o[RP]`, `rd_data_o[RP]` | out | same-cycle hit and value. A miss on a written register starts a demand fetch |
| `iss_valid_i[IW]`, `iss_dst_i[IW]` | in | destinations of the instructions issued this cycle (prefetch trigger) |
| `result_i[WP]` (`result_t`) | in | results: register, data, `bypassed`, `ready_consumer`. Readable from the next cycle |
| `bus_en_o[NB]`, `bus_is_pf_o[NB]` | out | transfer-bus activity (demand or prefetch) |
| `pf_drop_o`, `pf_queue_o` | out | a prefetch was dropped; prefetches waiting |

Nothing stalls inside the design. The caller sees misses on `rd_hit_o` and
retries, which is how an issue stage would behave.

## Design choices beyond the original description

The published description fixes the organization, the sizes, the port and bus
counts, and the two caching and two fetch policies. The following are this
implementation's own:

* **Data width.** 64 bits.
* **Lower-level latency.** A synchronous one-cycle read, which gives the
  t / t+1 / t+2 fetch timing above. The upper level is read combinationally.
* **Main configuration.** C3 as the default port configuration. The
  evaluation reports a best configuration per architecture without naming it.
* **Pseudo-LRU.** The tree variant, invalid-first allocation, and the
  multi-victim walk.
* **Upper-bank writes.** In-place update on a write to a register already
  held. Invalidation on uncached results and on reallocation.
* **Filtering and priority.** The `written` bit per register and the filters
  built on it. Demand priority over prefetch, the 8-entry prefetch queue and
  dropping on overflow.
* **First-consumer tracking.** A per-register table filled at rename. A lookup
  in the very cycle the first consumer is renamed sees the old state and
  issues no prefetch.
* **Demands alongside prefetching.** Demand fetches stay on when
  prefetch-first-pair is selected. An operand that misses must still come up.
* **Outside information.** `bypassed` and `ready_consumer` are inputs, decided
  by the issue/bypass logic. Likewise the first consumer's identity is
  derived from the renamed instructions the caller supplies.
* **One file per register class.** One instance is one register file. The
  evaluated machine had separate integer and floating-point files of 128
  registers each, which would be two instances.

Not part of this RTL: the processor around the register file (fetch, rename,
issue queue, functional units, the bypass network itself, caches) and the
area/access-time model used to compare configurations. Their connections
appear as the top's ports.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_plru_tree` | invalid-first victims; true LRU after in-order touches; exclusion; 3,000 random cycles against a reference tree written as an explicit recursion |
| `tb_upper_bank` | 16 fills then an eviction of exactly the LRU entry; in-place update; invalidation; same-cycle read sees old data; random traffic against a reference map (hits return the latest value, written registers are held, never more than 16) |
| `tb_lower_bank` | random writes/reads against a reference array, one-cycle read latency, `written` bits |
| `tb_cache_policy` | both policies on random results, against expected routing worked out in the testbench |
| `tb_first_pair_table` | the three-instruction example above; random renamed programs against a search of the whole program for each register's first reader |
| `tb_fetch_unit` | directed priority, filtering, queueing, draining and dropping cases; fetch-on-demand ignoring prefetches; random-cycle rules |
| `tb_reg_file_cache` | end to end at the default parameters (below) |
| `tb_rfc_configs` | the same model on C1, C2 and C4, and on C3 with the three other policy combinations |

The end-to-end runs use `tb/rfc_cpu_model.sv`, a behavioural model of an
out-of-order core:

* 32 logical registers renamed onto the 128 physical registers;
* a 32-entry window, in-order commit, and reuse of freed registers;
* results that consumers catch on the bypass three times in four;
* operand reads that retry on a miss.

Every operand read is checked against the value the model computed. A demand
fetch must place its register in the upper level exactly two cycles after the
miss. All logical registers are read back at the end. `tb_reg_file_cache`
fails unless each mechanism happened at least once in the run:

* a cached result hit;
* a bypassed result;
* a demand fetch;
* a prefetch on a bus;
* a queued prefetch;
* a dropped prefetch;
* an eviction;
* a reallocation invalidation;
* a stall.

A typical default run commits 3,000 instructions in about 2,400 cycles. It
makes about 1,700 demand fetches and 80 prefetches, with 2,600 evictions.
`tb_rfc_configs` prints an IPC per configuration. Those numbers come from the
model's random instruction stream, not from real programs, and they are not
comparable with the published results (under this stream, for instance, ready
caching does better than non-bypass caching).

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rfc_pkg.sv tb/tb_reg_file_cache.sv --top-module tb_reg_file_cache
./obj_dir/Vtb_reg_file_cache
```

Substitute any other testbench name. Each run simulates in well under a
second; building `tb_rfc_configs`, with its six copies of the design, takes
the longest (under a minute). Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/rfc_pkg.sv rtl/<module>.sv`. The
one remaining lint note, SYNCASYNCNET on `rst_n`, comes from the assertion in
`upper_bank` being disabled during reset; it does not affect the logic.

## Changing it

* **Another port configuration:** set `RP`, `WP` and `NB` on
  `reg_file_cache`, for example `RP=3, WP=2` for C1 or `NB=3` for C4.
* **Another policy:** `CPOL = CACHE_READY` or `FPOL = FETCH_ON_DEMAND`.
* **Other sizes:** change `NUM_PREGS`, `NUM_CACHE` or `DATA_W` in `rfc_pkg`.
  `NUM_CACHE` must be a power of two for the tree.
* **Another queue depth:** `QD`. `pf_queue_o` is `$clog2(QD+1)` bits wide.
