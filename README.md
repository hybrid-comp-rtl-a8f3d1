# Hybrid-Comp: a criticality-aware compressed last-level cache

Compressing the lines of a last-level cache (LLC) fits more of the working set on chip. The cost is that every hit must first be decompressed. Strong schemes shrink lines more but take longer to decompress; fast schemes do the reverse. This design treats **criticality** as a third factor, alongside compression ratio and decompression latency:

* A **critical** line is stored with **BDI** (Base-Delta-Immediate), which decompresses in 1 cycle. A line is critical when it lives in the bank of the core that asks for it (a *local* block), or when that core's predictor says the load tends to stall its reorder buffer (ROB).
* A **non-critical** line is stored in whichever of **BDI** and **FPC** (Frequent Pattern Compression) gives the smaller result. FPC takes 5 cycles to decompress. Remote lines are already slowed by the network, so extra latency hurts them less.
* For a remote FPC line, most of the decompression overlaps with the packet's trip through the mesh. The first three FPC stages need only the prefixes, which travel in the head flit. After the last flit arrives, only 2 cycles of decompression remain.

The RTL is a 16-tile, 4×4 mesh chip multiprocessor memory system with a 4 MB shared L2, split into one 256 KB bank per tile. The cores, their L1 caches and the DRAM are not part of it: their channels are ports of the top module.

## Structure

```
hybrid_comp_top                 4x4 mesh of tiles, per-node core / commit / memory ports
└── hc_tile (x16)
    ├── mesh_router             5-port wormhole router, XY routing, 2 VCs, 2 cycles/hop
    ├── hc_ni                   network interface: packets, local bypass, decompression
    │   ├── bdi_decompressor    1 cycle
    │   └── fpc_decompressor    5 stages; stages 1-3 can run from the head flit alone
    ├── llc_bank                256 KB compressed bank, doubled tags, 10-cycle hit
    │   ├── hybrid_compressor   BDI if critical, else the smaller of BDI and FPC
    │   │   ├── bdi_compressor  (six bdi_cfg_enc in parallel)
    │   │   └── fpc_compressor
    │   ├── bdi_decompressor    for dirty victims
    │   └── fpc_decompressor    for dirty victims
    └── cpt                     criticality predictor table
```

`hc_pkg` holds the shared constants, enums (`scheme_e`, `bdi_enc_e`, `fpc_pfx_e`) and structs (`cmeta_t`, `flit_t`, `pkt_hdr_t`, `bank_req_t`, `bank_rsp_t`).

## How a line is stored in a bank

Each bank has 512 sets. Each set has 8 *physical* ways of 64 bytes, and each way is split into eight 8-byte segments. The tag array is doubled: every physical way has **two tag slots**.

* Slot `2w` fills way `w` from segment 0 upward.
* Slot `2w+1` fills way `w` from segment 7 downward.
* Both lines fit as long as their segment counts add up to at most 8.

A bank therefore holds at most twice its uncompressed line count, which caps the compression ratio at 2.

Every tag slot keeps:

* valid and dirty bits;
* the one-bit scheme flag (BDI or FPC);
* the BDI encoding;
* the size in segments (1–8).

A line that neither scheme shrinks is stored as the BDI `RAW` encoding (8 segments).

**Placement.** The bank first looks for a free slot whose partner leaves enough room. If there is none, a round-robin pointer picks a victim way. Its even slot is evicted, and the odd slot too if the new line still does not fit. A dirty victim is decompressed inside the bank and written back to memory uncompressed. A write hit reuses its slot, evicting the partner only if the new size no longer fits beside it.

**When criticality is decided.** It is decided each time a line is written into the bank:

* **Fill after a miss:** the line is critical only if the requester is local. A newly fetched line is never ROB-critical.
* **Write from a core:** the line is critical if the requester is local, or if the requester's predictor flagged the access.

As a result, a change in a load's ROB criticality takes effect the next time its line is written.

## Compression formats

**BDI (`bdi_compressor`, `bdi_decompressor`).** The line is viewed as 8-, 4- or 2-byte elements. Each element is coded as a narrow delta from one of two bases:

* the implicit base zero;
* one explicit base: the first element that is not a small number.

A mask bit per element records which base was used. Payload layout, starting from the least significant bit: base, then deltas, then mask bits.

| encoding | element / delta bytes | segments |
|---|---|---|
| ZEROS | – | 1 |
| REP8 (one 8-byte value repeated) | 8 | 1 |
| B8D1, B4D1 | 8/1, 4/1 | 3 |
| B8D2 | 8/2 | 4 |
| B4D2, B2D1 | 4/2, 2/1 | 5 |
| B8D4 | 8/4 | 6 |
| RAW | – | 8 |

All configurations are tried in parallel, and the smallest valid one wins.

**FPC (`fpc_compressor`, `fpc_decompressor`).** Each 32-bit word gets a 3-bit prefix, and keeps only the data bits that the prefix needs:

| prefix | pattern | data bits |
|---|---|---|
| 000 | zero word | 0 |
| 001 | 4-bit sign-extended | 4 |
| 010 | 8-bit sign-extended | 8 |
| 011 | 16-bit sign-extended | 16 |
| 100 | upper halfword, lower halfword zero | 16 |
| 101 | two halfwords, each a sign-extended byte | 16 |
| 110 | one byte repeated | 8 |
| 111 | uncompressed | 32 |

The block is the 48 prefix bits followed by the data fields in word order. A block longer than 512 bits is not stored as FPC.

Unlike the classic FPC, a run of zero words is not coded as a run length. Each zero word has its own prefix, so every word's length depends on its prefix alone. That is what lets the prefixes in the head flit drive the first three pipeline stages on their own.

## The FPC decompression pipeline and the head-flit overlap

`fpc_decompressor` has five register stages:

1. Turn each prefix into a data length.
2. Compute running offsets inside groups of four words.
3. Add the group bases to get each word's start bit. The offsets are then held until the data arrives.
4. Cut each word's field out of the block.
5. Sign- or zero-extend each field to 32 bits.

Stages 1–3 start when `hdr_valid` brings the prefixes. Stage 4 runs once the offsets are ready and the data is present. The data may come through `data_valid` in the same cycle as the header or in any later cycle. Counting the sampling edge as the first cycle, as for the 1-cycle BDI decompressor:

* header and data together: result after **5 cycles**;
* data 3 or more cycles after the header: result **2 cycles** after the data;
* in between: the later of the two.

`hc_ni` uses this directly:

* A head flit of a remote FPC read response fires `hdr_valid`.
* The last data flit fires `data_valid`, with the reassembled payload.

A local FPC line (no network) pays the full 5 cycles. With 128-bit flits, a compressed line needs ceil(segments/2) data flits. An FPC response with more than two data flits therefore gets the full overlap.

## Criticality predictor (`cpt`)

`cpt` is a direct-mapped table indexed by load PC bits `[2 +: log2(ENTRIES)]`, with the rest of the PC kept as a tag. Each entry holds `numLoadCount` and `robBlockCount`.

On every load committed at the head of the ROB (the `commit_*` ports):

* **PC hits:** `numLoadCount` is incremented, and so is `robBlockCount` if the load stalled the ROB.
* **PC misses:** the entry is replaced, with counts starting from this commit.

A lookup with the PC of an L2 request answers *critical* when the PC hits and `robBlockCount >= THRESHOLD`. The answer travels with the request as the `crit` bit.

Defaults: 64 entries, 8-bit saturating counters, threshold 4. These are this design's choices, not given by the source.

## Network

**Router (`mesh_router`).**

* Each input port has one FIFO per virtual channel (VC).
* VC0 carries requests and VC1 carries responses, so responses can never be blocked behind requests.
* The head flit is routed XY (dimension-order): x first, then y.
* A packet keeps its VC and owns that output VC from its head flit to its tail flit (wormhole switching).
* Switch allocation is separable round-robin: each input picks one VC, then each output picks one input.
* Flow control uses credits.

A flit spends 2 cycles per hop: one to be written into the FIFO, one to cross the switch into the output register.

Node id = `y*4 + x`, with x growing to the East and y to the South. Lines are interleaved over the banks by the low 4 bits of the line address, so the home node of line address `a` is `a[3:0]`.

**Packets (`hc_ni`).** The head flit carries a `pkt_hdr_t`: type, source, destination, address, criticality bit, hit bit, compressed-line metadata and the 48 FPC prefix bits.

| packet | flits |
|---|---|
| read request | head only |
| write request | head + 4 data flits (uncompressed line) |
| read response | head + ceil(segments/2) data flits (compressed line) |
| write acknowledgement | head only |

A request whose home bank is the local one skips the router entirely. Each core has one request outstanding at a time.

## Timing summary (default parameters)

| event | cycles |
|---|---|
| bank hit, request accepted → response | 10 (`HIT_CYCLES`) |
| local BDI read hit, core request → core response | 14: 1 accept + 1 hand-off + 10 bank + 1 BDI + 1 response register |
| BDI decompression | 1 |
| FPC decompression, local | 5 |
| FPC decompression, remote, after last flit | 2 when the head flit is ≥3 cycles ahead |
| router hop | 2 |
| compression (on fills and writes) | 1 |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `SETS` | 512 | sets per bank (512 × 8 × 64 B = 256 KB, × 16 banks = 4 MB) |
| `PWAYS` | 8 | physical ways per set (tag slots = 16) |
| `HIT_CYCLES` | 10 | bank hit latency |
| `BUF_DEPTH` | 4 | flits per VC FIFO, in routers and at the ejection port |
| `CPT_ENTRIES`, `CPT_THRESHOLD` | 64, 4 | predictor size and criticality threshold |
| `PC_W` | 32 | PC width |

Fixed in `hc_pkg`:

* 40-bit physical address (34-bit line address);
* 128-bit flit data;
* 2 VCs;
* 4×4 mesh.

## Where this design departs from or adds to the source description

The source gives the following:

* the criticality rule (local, or ROB-critical → BDI; otherwise the better of BDI and FPC);
* the doubled tag array and the one scheme bit per tag;
* the 5-stage FPC pipeline and its head-flit overlap;
* the predictor's two counters and threshold test;
* the system sizes: 16 cores, 4×4 mesh, 4 MB / 64 B / 8-way L2, 10-cycle bank, XY routing, 2 cycles per hop.

Everything else is this design's own choice:

* **Code tables:** the exact BDI and FPC code tables follow the published schemes. FPC's zero-run code is replaced by per-word zero prefixes, as explained above.
* **Storage layout:** segment layout and pairing of tag slots.
* **Bank behaviour:** round-robin replacement, write-back of decompressed victims, and a compression latency of 1 cycle.
* **Network:** packet format, flit width, VC count, buffer depths and allocators.
* **Core interface:** one outstanding request per core.
* **Predictor:** size, organisation and threshold.

Not built:

* **The cores, their L1 caches and DRAM.** These are ports.
* **The snooping MESI coherence protocol.** It is named but not described by the source.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`.

**Unit testbenches.** These compare each unit against independent reference models in `tb/tb_ref_pkg.sv`:

* `tb_bdi_compressor`, `tb_bdi_decompressor`: BDI encoding, size, payload and round trip, every encoding exercised, 1-cycle latency.
* `tb_fpc_compressor`: FPC block, size and compressibility flag, including lines that mix every FPC word pattern with signed values.
* `tb_fpc_decompressor`: exact output line and the latency rule above, for header-to-data gaps of 0 to 7 cycles.
* `tb_hybrid_compressor`: the criticality rule, including critical lines that FPC would have compressed better.
* `tb_cpt`: the predictor against a reference table, with colliding PCs.
* `tb_llc_bank`: a small bank (4 sets, 2 physical ways) against a shadow memory and a behavioural DRAM. It checks read data, the exact 10-cycle hit latency, evictions, and the data of every write-back.

**End-to-end testbench.** `tb_hybrid_comp_top` runs the full-size design (all defaults) against a behavioural DRAM and a shadow copy of memory. It covers:

* local and remote reads and writes;
* the criticality predictor turning an FPC-friendly remote write into BDI;
* an overfilled set, with evictions and write-backs;
* all 16 cores at once.

It counts hits, misses, evictions, write-backs, BDI / FPC / raw stores, local and remote accesses, and overlapped FPC decompressions; any that never happen count as a failure. It also checks the 14-cycle local BDI hit.

The router, network interface and tile have no unit testbench of their own. They are verified through this end-to-end test.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_hybrid_comp_top rtl/hc_pkg.sv tb/tb_ref_pkg.sv tb/tb_hybrid_comp_top.sv
./obj_dir/Vtb_hybrid_comp_top
```

The full-size end-to-end run takes about a second of simulation after a build of a minute or two.
