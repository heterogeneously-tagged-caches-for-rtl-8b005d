# Heterogeneously tagged data cache

An embedded processor with virtual memory normally pays for a TLB lookup on
every data-cache access. In a physically tagged cache, the virtual address
must be translated before the tag can be compared. That lookup is one of the
larger energy costs of the memory pipeline.

This design removes almost all of those lookups. The idea is that each cache
line carries one of two kinds of tag:

- **Private data** (the large majority of accesses) is tagged with its
  *virtual* tag, extended with a process ID (PID). A hit needs no
  translation at all. The TLB is used only when the line has to go to or
  come from memory.
- **Data in buffers shared between processes** is tagged with its
  *physical* tag. This keeps synonyms consistent: two processes reaching the
  same physical word through different virtual addresses must find the same
  cache line.

A mode bit (V/P) in each line says which kind of tag it holds. It takes part
in the tag compare, so a virtual tag can never match a physical one by
accident.

Shared buffers are also translated cheaply. Up to eight of them are
described by a tiny *synonym offset table* (SOT). For these, the physical
page number and the physical "superset" index bits come from two adders, not
from the TLB.

The method is from the article *Heterogeneously Tagged Caches for Low-Power
Embedded Systems with Virtual Memory Support*. This RTL is an independent
implementation of it. Where the article leaves something open, the choice
is this design's, and it is listed under
[Departures and design choices](#departures-and-design-choices).

## Why shared data is the hard part

The cache is indexed with the virtual address. With 4 KB pages and a 32 KB
direct-mapped cache, the set index uses address bits [14:5]. Bits [14:12]
lie above the page offset, inside the virtual page number. These are the
**superset** (colour) bits. There are log2(cache size / (ways × page size))
of them: 3 for 32 KB direct-mapped, 1 for 32 KB 4-way, 2 for 16 KB
direct-mapped and 0 for 16 KB 4-way.

Suppose two processes map one physical page at virtual pages whose superset
bits differ. Indexing with the virtual bits would then place the same
physical line in two different sets. Classic virtually indexed, physically
tagged caches avoid this by making the OS "colour" its pages, so that
virtual and physical superset bits agree. That constrains physical memory
allocation, which hurts most on small embedded memories.

Here the OS may place a shared buffer anywhere in physical memory, provided
that:

- the buffer is contiguous in both virtual and physical memory, so one
  offset maps every page of it;
- the buffer is registered in an SOT row.

For an access to such a buffer, the superset adder replaces the virtual
superset bits with the physical ones before the cache is indexed. The VPN
adder produces the physical tag. Every synonym of the buffer therefore lands
in one set with one tag.

## Address map

The OS places data according to the top three bits of the virtual address.
The decode is two AND gates and one bit (`region_decode`):

| VA[31:30] | VA[29] | Region | Index | Tag | Translated by |
|---|---|---|---|---|---|
| not `11` | – | private | virtual | virtual tag + PID, V/P=0 | nothing on a hit; TLB on a miss or write-back |
| `11` | `1` | shared, SOT | virtual, superset bits from the adder | physical, V/P=1 | SOT row VA[28:26] + adders |
| `11` | `0` | shared, TLB | virtual (the OS must colour these pages) | physical, V/P=1 | TLB, at every access |

The TLB half of the shared area is for buffers beyond the eight SOT rows.
For those, the OS must align the pages as in a conventional cache.

## The synonym offset table and the two adders

An SOT row (`sot`) holds four fields:

- a valid bit;
- 2 access-control (AC) bits;
- a 20-bit VPN offset;
- an SS_W-bit superset offset.

The row is selected by VA[28:26], so each row owns a 64 MB window of
virtual space. The two adders (`offset_adder`) compute:

```
PPN               = VPN + vpn_offset                    (20 bits, wraps)
physical superset = VA[12 +: SS_W] + superset_offset    (SS_W bits, wraps)
```

The OS writes `vpn_offset = PPN_base - VPN_base` and sets `superset_offset`
to the low SS_W bits of that same value. The two results are then
consistent.

If a row is invalid, or its AC bits forbid the access, the access is
reported as an access fault. The whole path, from decode through the SOT
read to the adders, is combinational. It acts on the request address in the
cycle the request is accepted, so it costs no cycle.

## Tag entry and compare

For the default 32 KB direct-mapped cache with 32-byte lines, a tag entry
(`cache_arrays`) is 26 bits:

| valid | dirty | AC[1:0] | V/P | PID[3:0] | tag[16:0] |
|---|---|---|---|---|---|

`tag_compare` declares a hit when all of these hold:

- the line is valid;
- the V/P bits of line and request agree;
- the tags agree;
- for virtual lines, the PIDs agree.

The PID is ignored for physical lines, because any process may reach a
shared line. The AC bits come from the TLB or the SOT when the line is
filled. They are checked on every hit, because a hit on a private line never
consults the TLB.

## One access, cycle by cycle

`dcache_ctrl` handles one request at a time.

```
IDLE ──accept──▶ LOOKUP ──hit──▶ answer (resp_valid) ─▶ IDLE
                   │
                   └─miss─▶ XLATE ─▶ EVICT ─▶ WBCHK ─▶ REFILL ─▶ RWAIT ─▶ REISSUE ─▶ LOOKUP
```

- **IDLE.** A request is accepted when `req_valid && req_ready`. The arrays
  are read at the set chosen by the region. For the TLB region, the TLB is
  looked up in this same cycle.
- **LOOKUP.** All ways are compared. A hit answers here, the cycle after
  acceptance. A load returns data; a store writes the line.
- **XLATE.** Only a private miss needs the TLB here. Shared requests already
  carry their physical address. A TLB miss ends the request with
  `RESP_TLB_MISS`. The OS then writes a TLB entry, and the processor repeats
  the access.
- **EVICT.** A dirty victim goes into the write buffer at once:
  - a virtual line with its *virtual* address and the V bit set;
  - a physical line with its physical address.

  The victim is the first invalid way, otherwise the way named by a
  round-robin pointer.
- **WBCHK.** The controller waits while the missing line is still in the
  write buffer.
- **REFILL, RWAIT.** A line-wide read from memory. The line is written with
  its tag, V/P, PID and AC bits.
- **REISSUE.** The set is read again, and LOOKUP now hits.

Responses carry `resp_status`:

- `RESP_OK`;
- `RESP_TLB_MISS`: no translation was found, and nothing changed in the
  cache;
- `RESP_AC_FAULT`: the access rights forbid the access, or the SOT row is
  not programmed.

## Write-back: two translations on a dirty miss

A miss that evicts a dirty virtually tagged line needs two translations:

- the missing address, which is urgent;
- the evicted line, which is not.

The single TLB port gives the controller priority. The evicted line waits
in the `write_buffer`, still virtual. The buffer then translates its oldest
virtual entry in any cycle the controller leaves the TLB free (`xl_req` /
`xl_gnt`), and replaces its address with the physical one.

Entries leave the buffer in FIFO order, and only once they are physical. If
the TLB misses for a buffered entry, the top raises `wb_tlb_miss` with the
PID and page (`wb_miss_pid`, `wb_miss_vpn`). The OS writes the entry, and
the buffer retries.

The miss check compares each entry in its own form:

- virtual entries by (PID, virtual line address);
- physical entries by physical line address.

A later miss therefore never reads a stale line from memory.

The `bus_arbiter` lets the buffer write only while no refill is requested
or outstanding. Writes use the bus when processor reads do not need it.

## Write-through and the physical page latch

With `WRITE_THROUGH=1` no line is ever dirty. Every store that hits also
sends its word, with a byte mask, to the write buffer. Each store therefore
needs a physical address, private stores included. That would bring back
one TLB lookup per store.

The physical page latch (`ppl`) avoids most of them. It holds the
(PID, VPN) → PPN pair of the most recent translated private store. A store
to the same page takes its PPN from the latch, at the cost of one
comparator. A store to another page looks up the TLB and reloads the latch.

Shared stores take their physical address from the adders, or from the
TLB-region lookup already made for the access. The latch is cleared on
every TLB write, so it never outlives a mapping.

`USE_PPL=0` ignores the latch. Every write-through store then needs its own
translation, which gives the reference point for measuring the latch.

## Interface of `htag_dcache`

All signals are synchronous to `clk`. The reset `rst_n` is active low and
asynchronous.

After reset, the tag arrays are cleared by a sweep of all sets. `busy_init`
is high during the sweep, and `req_ready` stays low until it ends.

| Group | Signals | Notes |
|---|---|---|
| Processor | `pid`, `req_valid`, `req_ready`, `req_we`, `req_addr[31:0]`, `req_wdata[31:0]`, `req_be[3:0]` | word access with byte enables, one outstanding |
| Response | `resp_valid`, `resp_status`, `resp_rdata[31:0]` | one-cycle strobe |
| TLB refill (OS) | `tlb_we`, `tlb_wr_idx`, `tlb_wr_entry` {valid, pid, vpn, ppn, ac} | one write per cycle; the OS chooses the slot |
| SOT programming (OS) | `sot_we`, `sot_wr_idx[2:0]`, `sot_wr_valid`, `sot_wr_ac`, `sot_wr_vpn_off[19:0]`, `sot_wr_ss_off` | `sot_wr_ss_off` is max(SS_W,1) bits wide |
| Memory bus | `mem_req`, `mem_we`, `mem_addr`, `mem_wdata[255:0]`, `mem_wmask[31:0]`, `mem_ready`, `mem_rvalid`, `mem_rdata[255:0]` | see below |
| Write-buffer TLB miss | `wb_tlb_miss`, `wb_miss_pid`, `wb_miss_vpn` | the OS should write that translation |
| Status and events | `busy_init`, `wb_empty`, `ev_tlb_lookup`, `ev_sot_xlate`, `ev_ppl_hit`, `ev_wb_xlate`, `ev_hit`, `ev_miss`, `ev_evict`, `ev_wb_wait` | one-cycle strobes for counting |

The AC bits use bit 0 for read allowed and bit 1 for write allowed.

On the memory bus:

- A request is held until `mem_req && mem_ready` in one cycle.
- A write is complete once it is accepted.
- A read is answered later, with the whole line, by one cycle of
  `mem_rvalid`. Only one read is outstanding at a time.

Timing:

- A hit answers in the cycle after acceptance (two cycles, request to
  answer).
- A clean miss takes roughly seven cycles plus the memory read latency.
- Write-through store hits that find the write buffer full wait in the
  WTPUSH state.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `CACHE_BYTES` | 32768 | cache size |
| `WAYS` | 1 | associativity (power of two) |
| `LINE_BYTES` | 32 | line size; the bus is one line wide |
| `TLB_ENTRIES` | 32 | fully associative D-TLB entries |
| `SOT_ENTRIES` | 8 | SOT rows; also sets how many VA bits index the SOT |
| `WB_DEPTH` | 4 | write-buffer entries |
| `WRITE_THROUGH` | 0 | 0 = write-back, 1 = write-through |
| `USE_PPL` | 1 | write-through only: 0 ignores the physical page latch (for comparison) |

The defaults match an XScale-like data cache: 32 KB, a 32-entry TLB, and a
direct-mapped, write-back organisation.

The article also evaluates 32 KB 4-way, and 16 KB with a 64-entry TLB
(ARM920T-like), each direct-mapped or 4-way, and each write-back,
write-through, or write-through with the PPL. These are parameter settings
of the same RTL:

```
#(.WAYS(4))
#(.CACHE_BYTES(16384), .TLB_ENTRIES(64))
#(.CACHE_BYTES(16384), .WAYS(4), .TLB_ENTRIES(64))
#(.WRITE_THROUGH(1))                  // with the page latch
#(.WRITE_THROUGH(1), .USE_PPL(0))     // without it
```

When a way is no larger than a page there are no superset bits. The adder
result is then unused, and only the tag is translated.

## Files

Design, in `rtl/`, one module per file:

| File | Contents |
|---|---|
| `htag_pkg.sv` | widths (32-bit VA/PA, 4 KB pages, 4-bit PID, 2-bit AC), TLB entry struct, region and response enums |
| `region_decode.sv` | address-map decode and SOT index |
| `sot.sv` | synonym offset table (registers, one write port, combinational read) |
| `offset_adder.sv` | the adder used for the superset bits and for the VPN |
| `dtlb.sv` | fully associative, PID-tagged D-TLB, one lookup port, OS write port |
| `ppl.sv` | physical page latch |
| `tag_compare.sv` | heterogeneous tag compare for one way |
| `cache_arrays.sv` | tag and data memories per way, synchronous read, byte-masked write, reset sweep |
| `write_buffer.sv` | FIFO of line-wide writes with virtual entries and in-place translation |
| `bus_arbiter.sv` | read-priority memory bus arbiter |
| `dcache_ctrl.sv` | the controller described above |
| `htag_dcache.sv` | top: wires all of the above and arbitrates the TLB port |

Testbenches are in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- One unit testbench per block (`tb_<block>.sv`). Each compares the block
  with values computed independently in the testbench.
- `tb_htag_dcache.sv` runs the top at its default parameters, write-back.
- `tb_htag_dcache_wt.sv` runs it write-through.
- `tb_htag_dcache_16k4.sv` runs 16 KB, 4-way, with a 64-entry TLB.

All three end-to-end benches share the program `tb_htag_env.sv`, which acts
as processor, OS and memory (memory is modelled by `tb_mem_model.sv`). It
covers:

- synonyms of one buffer with different superset bits in two processes;
- one virtual address used by different PIDs;
- a read-only page and read-only SOT buffer, and an unprogrammed SOT row;
- TLB misses, both from requests and from the write buffer;
- a miss that must wait for the write buffer;
- 3000 random accesses, with every load checked against a reference
  memory.

It counts each mechanism through the event strobes, and fails if one never
happened.

`tb_htag_workload.sv` replays the access mix of seven media benchmarks on
24 configurations side by side (see below). It uses `tb_htag_wl_unit.sv`
and `tb_htag_wl_prog.sv`.

## Simulating

Any recent Verilator 5 will do. For example, the full-size end-to-end test:

```
verilator --binary --timing -j 0 --top-module tb_htag_dcache \
    rtl/htag_pkg.sv $(ls rtl/*.sv | grep -v htag_pkg) \
    tb/tb_mem_model.sv tb/tb_htag_env.sv tb/tb_htag_dcache.sv
./obj_dir/Vtb_htag_dcache
```

For a unit testbench, compile `rtl/htag_pkg.sv`, the block (plus
`rtl/offset_adder.sv` etc. if it uses them) and `tb/tb_<block>.sv`. Pass
`--top-module tb_<block>`.

For the workload bench, add `tb/tb_htag_wl_prog.sv` and
`tb/tb_htag_wl_unit.sv`. The package must come first on the command line.
The workload bench takes about 15 s to build and 6 s to run. Every other
test runs in under a second.

## Benchmark mixes: how many TLB lookups remain

The method was evaluated with seven media programs. For each, four counts
were reported: total accesses, shared accesses, writes, and private writes.
For example, adpcm makes 66 % of its accesses to shared buffers, and gsm
0.5 %.

`tb_htag_workload` draws 5000 accesses per program in those proportions:

- shared reads stream through a 4-page input buffer;
- shared writes stream through a 4-page output buffer;
- private accesses go 70 % to a 2-page stack and 30 % to a 4-page state
  area.

It replays them on 24 instances side by side:

- four sizes: 32 KB with a 32-entry TLB, or 16 KB with a 64-entry TLB, each
  direct-mapped or 4-way;
- three write policies: write-back, write-through without the latch
  (`USE_PPL=0`), and write-through with the latch;
- two placements of the shared buffers: in SOT rows, so the adders
  translate them, or in the TLB half on OS-coloured pages.

The bench counts cycles with a TLB lookup and compares them with a
physically tagged cache, which needs one lookup per access. It checks:

- every load value;
- in SOT mode, that each shared access was translated by the adders exactly
  once, and that lookups never exceed the number of private accesses;
- in TLB mode, that the adders were never used.

The locality is synthetic, so the absolute numbers say more about this
stream than about the real programs. One run gave the following reduction
in TLB lookups for the default 32 KB direct-mapped cache:

| Program | WB, shared via TLB | WB, via SOT | WT, via TLB | WT, via SOT | WT+PPL, via TLB | WT+PPL, via SOT |
|---|---|---|---|---|---|---|
| adpcm | 20 % | 88 % | 21 % | 88 % | 20 % | 87 % |
| g721  | 94 % | 95 % | 71 % | 70 % | 76 % | 78 % |
| gsm   | 99 % | 99 % | 76 % | 77 % | 83 % | 83 % |
| epic  | 73 % | 96 % | 66 % | 90 % | 68 % | 92 % |
| jpeg  | 97 % | 98 % | 70 % | 71 % | 76 % | 79 % |
| mpeg  | 72 % | 95 % | 64 % | 91 % | 67 % | 94 % |
| mp3   | 97 % | 98 % | 72 % | 74 % | 79 % | 80 % |

Averaged over the seven programs:

| Cache / TLB | WB, TLB | WB, SOT | WT, TLB | WT, SOT | WT+PPL, TLB | WT+PPL, SOT |
|---|---|---|---|---|---|---|
| 32 KB direct-mapped / 32 | 79 % | 96 % | 63 % | 80 % | 67 % | 85 % |
| 32 KB 4-way / 32         | 78 % | 96 % | 62 % | 80 % | 67 % | 85 % |
| 16 KB direct-mapped / 64 | 50 % | 68 % | 42 % | 60 % | 50 % | 68 % |
| 16 KB 4-way / 64         | 52 % | 70 % | 44 % | 62 % | 52 % | 70 % |

The trends are the ones the method predicts:

- Virtual tags alone remove the lookups of private hits. What remains is
  dominated by shared accesses; compare adpcm at 20 % with gsm at 99 %.
- The SOT adders remove the shared lookups as well.
- Write-through gives back part of the saving, because every store needs a
  physical address.
- The page latch recovers some of that loss. This stream's private stores
  jump between six pages, which limits what a one-page latch can do.
- The smaller cache misses more, and every private miss costs a lookup.

## Departures and design choices

These points follow from the method:

- the two tag kinds and the V/P bit;
- the PID and AC extension of the tag;
- the address map (AND of the two top bits; the third bit selects SOT or
  TLB);
- the SOT with its two adders and eight rows;
- controller priority on the single TLB port;
- virtual write-buffer entries translated when the TLB is free;
- buffer checks by virtual or physical tag;
- writes only while the bus is not serving reads;
- the physical page latch for write-through;
- the sizes of the evaluated configurations, including a 4-entry write
  buffer.

The following are this design's own choices or differ from the article:

- **Line size** is 32 bytes. The article does not give it.
- **SOT index bits.** The article says only that a few top bits index the
  SOT. Here VA[28:26] are used, directly below the SOT/TLB select bit.
- **SOT row width.** An SOT row has a valid bit, and the superset offset is
  3 bits for the default cache. A row is therefore 25 bits plus valid. The
  article's energy model assumes 24-bit rows, which corresponds to a 2-bit
  superset offset.
- **OS interface.** TLB misses are not walked in hardware. A request that
  misses returns `RESP_TLB_MISS`, a write-buffer entry that misses raises
  `wb_tlb_miss`, and the OS writes the entry. TLB entries carry the PID, so
  there is no flush on a process switch.
- **PPL tag.** The latch is tagged with the PID as well as the VPN, and it
  is cleared on any TLB write. The article compares only the VPN.
- **Write policy.** Both write policies allocate on a write miss.
- **Replacement** is the first invalid way, otherwise a single round-robin
  pointer.
- **Write-buffer hits.** A miss that matches a write-buffer entry waits for
  it to drain. There is no forwarding from the buffer.
- **Write-buffer entries** are a full line wide with a byte mask, so
  evictions and write-through stores share one buffer.
- **Timing.** The arrays have a one-cycle read. A hit answers in the second
  cycle.
- **When the SOT is read.** The region decode, the SOT read and both adders
  work on the request address in the cycle the request is accepted. A
  processor could instead start them earlier, from the top bits of the base
  register, so that they are off the critical path entirely. That
  pipeline-side option is not part of this RTL.
- **One request at a time.** The processor side is not pipelined.
- **Outside the design.** The processor, the OS and main memory are outside.
  The testbenches model them behaviourally.

Energy is not modelled; only event counts are provided. The absolute energy
figures in the article come from a circuit-level cache model that this RTL
does not replace.
