# Security-aware data cache with index remapping (SecRAND)

A cache leaks information through timing: a process that shares a cache with
a victim can tell which cache sets the victim touched, because every memory
block can live in only one set and evicting it is observable. Cache timing
attacks on table-based AES are the classic example.

This design removes the fixed relation between address and cache line. The
index bits of an address select a line of a *virtual* cache that is 2^K
times larger than the physical one, and a small content-addressable memory,
one *line-number register* (LNReg) per physical line, says which physical
line currently holds that virtual line. New mappings are made to a
**random** physical line, and accesses that would let one process disturb
another's protected data are served without touching the cache, with a
random line evicted instead. To an attacker with another context, any cache
line is then equally likely to be evicted.

The RTL follows the FPGA organisation of the paper *Customizable
Security-Aware Cache for FPGA-Based Soft Processors* (a Leon 3 data cache),
where the remapping is done with flip-flops and comparators in front of the
block RAMs, and where several ways ("sets") share one LNReg to save
resources (the *L-associative* cache). It is an independent implementation:
the processor, its MMU and the bus are not included, and many details the
paper leaves open are choices made here (listed below).

## Blocks

| File | Role |
|---|---|
| `rtl/sa_dcache.sv` | top: the whole cache |
| `rtl/index_remap.sv` | LNReg CAM, encoder, registered write with bypass, random-line multiplexer |
| `rtl/secrand_ctrl.sv` | controller: access classification, SecRAND replacement, line fill, write-through |
| `rtl/valid_table.sv` | L valid bits per physical line (block-RAM or flip-flop variant) |
| `rtl/tag_array.sv` | one tag RAM per set |
| `rtl/data_array.sv` | one line-wide data RAM per set, byte enables |
| `rtl/lfsr_rng.sv` | 32-bit LFSR random number source |
| `rtl/sac_pkg.sv` | shared enums (access kind, controller state) |

```
 cpu_addr --index (N+K)--> index_remap --line (N)--+--> tag_array  (L sets)
          |                  ^  |  hit, ctx, prot  +--> data_array (L sets)
          |      lfsr_rng ---+  v                  +--> valid_table (L bits)
          +--tag-------> secrand_ctrl <-- tags, data, valid bits (1 cycle later)
                               |  \--> cpu_ack / cpu_rdata / cpu_kind
                               +-----> mem_req ... mem_ack (line fills, stores)
```

## Address split and geometry

With `CACHE_BYTES`, `LINE_BYTES` and `L` sets per line there are
2^N = CACHE_BYTES / (LINE_BYTES * L) physical lines. A 32-bit address is

```
 | tag (32 - log2(LINE_BYTES) - N - K) | virtual index (N + K) | word | byte |
```

The K extra index bits come out of the tag: a larger virtual cache has
shorter tags. With the defaults (8 kB, 32-byte lines, L = 2, K = 1): 128
physical lines, 8-bit virtual index, 19-bit tag, 128 LNRegs of
8 + 8 + 1 bits (index, context, protection). `L = 1` gives the single-set
cache, in which every line has its own LNReg.

## The remapping circuit (`index_remap`)

This is the part that makes the cache different, and its timing matters.

* **Lookup is combinational.** All LNRegs are compared with the incoming
  index in parallel; the match vector is encoded into a line number. The
  result addresses the tag, valid and data RAMs in the *same* cycle, so the
  cache keeps the read timing of an ordinary cache: the RAM outputs appear
  one cycle later, where the tags are compared.
* **On no match the random number is the line.** The random line number is
  passed out as the line to use, so the tags, data and the new mapping can
  all be written in one cycle on an index miss.
* **Writes are delayed by one cycle.** A write (`wr_i`) only stores the
  index, the line it used, the context and the protection bit in a write
  register. The LNReg chosen by that register is written at the next clock
  edge. This keeps the decoder off the lookup path.
* **Bypass.** While that write is pending, a lookup of the same index
  hits on the write register, which has precedence because it is newer
  (`bypass_o`). The LNReg being overwritten is masked out of the match for
  that cycle, so the index it is losing cannot hit.
* **Reset.** LNReg i holds index i after reset (identity mapping, owner
  context 0, unprotected). All stored indices are then distinct, so the
  encoder can be a plain OR-encoder (an assertion checks there is never
  more than one match) and no LNReg valid bit is needed. Virtual indices
  at or above 2^N start unmapped and take an index miss first.

## Access classes and replacement (`secrand_ctrl`)

Each LNReg also stores the context (process) that owns the line and
whether that owner asked for protection (`cpu_prot_i` on the filling
access). One access is classified as:

| Class | Condition | Action |
|---|---|---|
| hit | index mapped, same context, a valid set holds the tag | data returned |
| tag miss | index mapped, same context, no set holds the tag | line read from memory into a random set of the same physical line |
| tag miss (takeover) | index mapped, other context, neither side protected, or the line holds no valid set | as above, but the line changes owner and its other sets are invalidated |
| index miss | no LNReg holds the index | random physical line chosen, all its sets invalidated, LNReg remapped, one random set filled |
| context miss | index mapped to a line with valid data, other context, and the line or the request is protected | word read from memory and returned **without caching it**; a random physical line is evicted (its valid bits cleared) |

Why an empty line is free: a random eviction clears a line's valid bits
but leaves its LNReg in place, and after reset every LNReg maps an index
for context 0. If such an empty line still raised context misses, a
protected process could never use it. An empty line is therefore taken
over like a regular miss. A victim that keeps using its line refills it
after an eviction and keeps its protection.

All sets of a line belong to one context. This is the simpler of the two
variants the paper describes, and the one it implements. The per-set
variant, where each set has its own context, is not built.

A line fill reads the whole line word by word into a line buffer, then
writes tag, data, valid bits and the LNReg in one cycle, and acknowledges
the load in that cycle. Eviction never needs a write-back: the cache is
write-through with no allocation on stores, as in the Leon 3 data cache.
A store whose word is cached updates the cached copy, even when another
context owns the line, so no stale copy can survive. What is resident does
not change, so this adds no timing signal.

`stat_idx_miss_o` and `stat_ctx_miss_o` say whether the last completed
access was an index miss or a context miss. They stand for the two fields
the paper adds to the cache controller's control register.

## Valid table

All sets of a line share one LNReg. Remapping a line must therefore
invalidate every set of that line at once. The valid bits are kept as one
L-bit word per line, separate from the tags, and written in a single
cycle. `VALID_BRAM = 1` (default) keeps them in a RAM. A RAM cannot be
reset, so after reset it is cleared one line per cycle: `ready_o` is low
for 2^N cycles. `VALID_BRAM = 0` uses flip-flops that clear at reset. The
paper reports the RAM variant as faster and smaller on its FPGA.

## Interfaces and timing

Processor side: `cpu_req_i` with `cpu_we_i`, `cpu_addr_i` (byte address),
`cpu_wdata_i`, `cpu_be_i`, `cpu_ctx_i`, `cpu_prot_i`. Hold all of them
stable up to and including the cycle in which `cpu_ack_o` is high; a new
request may follow in the next cycle. `cpu_kind_o` (hit / tag / index /
context miss) and `cpu_rdata_o` are valid with the acknowledge. An
assertion in `sa_dcache` checks the hold rule.

Memory side: `mem_req_o` with `mem_we_o`, `mem_addr_o` (word aligned),
`mem_wdata_o`, `mem_be_o`, held until `mem_ack_i`. `mem_ack_i` is a
one-cycle pulse; for a read it carries `mem_rdata_i`.

Cycles from request to acknowledge, with W = LINE_BYTES/4 words and a
memory that acknowledges D cycles after a request is seen:

| Access | Cycles |
|---|---|
| load hit | 1 |
| load with line fill (tag or index miss) | 2 + W·(D+1) |
| load context miss (uncached) | 2 + D |
| store (hit or miss) | 2 + D |

A new access can start every other cycle on hits. This is a choice of this
simple request/acknowledge interface, not a limit of the remapping.

## Parameters (`sa_dcache`)

| Parameter | Default | Origin |
|---|---|---|
| `CACHE_BYTES` | 8192 | the paper's main FPGA comparison point (8 kB) |
| `L` | 2 | sets per line; the paper evaluates 1, 2, 4; 2 gave the best LUT use |
| `K` | 1 | index extension; the paper recommends 1 or 2 and evaluates 1 to 3 |
| `MMU` | 1 | context-aware replacement, as for the MMU-enabled processor the paper focuses on; 0 ignores contexts (remapping only, the paper's non-MMU variant) |
| `VALID_BRAM` | 1 | RAM valid table, the better variant in the paper |
| `LINE_BYTES` | 32 | own choice (8 words, as a common Leon 3 configuration) |
| `CTX_W` | 8 | own choice (width of a SPARC reference MMU context number) |
| `ADDR_W` | 32 | own choice (SPARC v8) |
| `SEED` | 0xACE12468 | own choice, any non-zero value |

`L` must be a power of two, and `CACHE_BYTES / (LINE_BYTES·L)` must be a
power of two of at least 2.

## Where this departs from, or goes beyond, the paper

* The paper's remapping figure gives the circuit structure. The reset
  state, the masking of the LNReg under rewrite, and the OR-encoder are
  choices made here.
* The random source is an LFSR, which is predictable to anyone who knows
  its seed and the cycle count. A deployment that relies on the security
  argument should feed `index_remap.rand_i` from a true random source.
* The paper's L-associative figure shows a context ("Id") field per set
  next to the tag. Here the context is kept once per line in the LNReg,
  which matches the one-context-per-line algorithm variant.
* Several rules are interpretations made here: an empty mapped line is
  free (no context miss), an unprotected context mismatch is a takeover,
  stores update cached copies of any owner, and a tag miss picks a random
  set.
* Not built: the Leon 3 processor and its MMU, the AMBA bus, cache flush,
  instruction cache, a store buffer, and the per-set-context algorithm
  variant.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sac_pkg.sv tb/tb_sa_dcache.sv --top-module tb_sa_dcache
./obj_dir/Vtb_sa_dcache
```

| Testbench | What it checks |
|---|---|
| `tb_sa_dcache` | whole cache at the default size; 20 000 random loads and stores from four contexts (one always protected, one sometimes) against a golden memory; 1-cycle hit latency; every mechanism must occur: hit, tag miss, index miss, context miss, random eviction, LNReg bypass, set invalidation on remap, store hit, store miss |
| `tb_secrand_ctrl` | directed sequence through every access class with exact cycle counts, status fields, byte stores, no-allocate stores, takeover |
| `tb_index_remap` | identity reset, registered write, bypass, masking; 3000 random operations against a model |
| `tb_valid_table` | both variants; clear time, read latency, random traffic |
| `tb_tag_array`, `tb_data_array` | RAM behaviour against models, byte enables |
| `tb_lfsr_rng` | sequence against a bit-level model; spread of the low bits |
| `tb_security_evict` | the security property: a protected victim and an unprotected attacker contend for one virtual index; every attacker access must be an uncached context miss, the lines evicted by those misses must be spread evenly over all physical lines, and index-miss placements must be even too |
| `tb_workload_aes` | AES-like T-table lookup stream (4 x 1 kB tables plus a data buffer) on 8 kB caches with L = 1, 2, 4 (K = 1) and L = 2 (K = 3, RAM and flip-flop valid table), and with an unprotected second process sweeping its own array, with and without `MMU`; checks data and where context misses occur, and prints miss rates |

`tb/mem_model.sv` is a behavioural memory with a fixed latency. Words
never written read as a fixed hash of their address. `tb/cache_driver.sv`
is the workload generator used by `tb_workload_aes`.

In the workload testbench the 4-set configuration has a much higher miss
rate than the 1- and 2-set ones on the table-lookup stream. This matches
the trend the paper reports for Rijndael: more sets per line means more
blocks are thrown out when a line is remapped. The miss rates come from a
synthetic access stream, so they are not comparable in value to the
paper's benchmark figures.
