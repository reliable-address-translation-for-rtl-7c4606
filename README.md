# Reliable instruction address translation with duplicated context frame registers

Every instruction fetch needs the physical frame number (PFN) of the page it
reads. That frame normally comes from the instruction TLB (iTLB), an SRAM
structure that a single particle strike can upset in several neighbouring
cells at once. A code strong enough to correct such spatial multi-bit upsets
costs a cycle on every iTLB read, and that cycle falls on every fetch.

This design avoids the extra cycle on almost every fetch. It keeps the
translation of the current code page twice, in two identical **context frame
registers** (CFR0 and CFR1). Each holds only a PFN and protection bits, with
no virtual page number. The compiler tells the hardware when the next
instruction leaves the current page. It does this with one **annotation bit
(A)** in every instruction. While execution stays in the page and the two CFRs
agree, the translation comes from the CFRs in one cycle. When the page
changes, or the CFRs disagree because one of them was upset, the coded iTLB is
read. It takes two cycles, corrects what it can, and reloads both CFRs. A
strike that flips the same bits in both CFRs within the short time a page is
in use is very unlikely, so comparing the two registers is enough to detect an
error.

The RTL covers the fetch front end: the translation-source controller, the
CFR pair, a coded iTLB, and the L1 instruction cache tagged by the translated
frame. The processor core, the page-table walk (operating-system software)
and the L2/memory are outside it. The top level brings out their interfaces.

## The annotation bit: a contract with the compiler

The A bit of an instruction describes **the instruction that follows it** in
program order:

| A | meaning | set by the compiler when |
|---|---------|--------------------------|
| 0 | take the next translation from the CFRs | the successor is on the same page: fall-through inside a page, or a branch whose target is known at compile time and lies on the same page |
| 1 | look the next translation up in the iTLB | the successor is on another page: the last instruction of a page (page boundary), a branch to another page, or a branch whose target cannot be analysed |

The hardware trusts the bit. If A = 0 is written where the page actually
changes, the fetch is translated with the old page's frame. Correctness
therefore rests on the annotation as well as on the hardware. The bit sits at
position `A_BIT_POS` (31) of a 32-bit instruction. That position is a
placeholder for whatever spare encoding slot an ISA offers.

Fetch is 4 instructions wide. A 64-byte cache block never straddles an 8 KB
page, so a fetch group always lies on one page. Inside a group every
instruction's successor is on the same page. The bit that matters for the next
fetch is therefore that of the **last instruction of the group**.

## How one fetch is translated (`xlat_ctrl`)

The controller takes a request (virtual address plus the A bit of the
preceding instruction) and decides as follows:

| A bit | CFR0 == CFR1 | source | translation latency | afterwards |
|-------|--------------|--------|---------------------|------------|
| 0 | yes | CFRs (`SRC_CFR`) | 1 cycle | nothing |
| 1 | any | iTLB (`SRC_ITLB`) | 2 cycles | both CFRs loaded with the iTLB result |
| 0 | no | iTLB (`SRC_ITLB_ERR`) | 2 cycles | both CFRs loaded: the upset is repaired |
| any | any, and the iTLB misses | iTLB after a refill | 2 cycles + walk + 2 cycles | `miss_o` until `fill_done_i`, then the lookup is repeated |

On the CFR path the physical address `{CFR0.pfn, va[12:0]}` is registered at
the end of the request cycle. The controller can take one such request per
cycle. On the iTLB path the lookup starts in the request cycle. The checked
result is registered one cycle later, and in the same clock edge both CFRs are
reloaded. Until then no new request is accepted. The choice between the CFR
frame and the iTLB frame is the 2:1 selector in front of the cache tag
comparison.

## The CFR pair (`cfr_pair`)

There are two registers of `{pfn, pb}` (31 + 4 bits) and one equality
comparator. Every iTLB translation writes both registers with the same value.
A mismatch is the only error signal. Once the registers mismatch, neither is
used, and the next fetch goes to the iTLB, which also repairs them.

The CFRs belong to the process context. `cfr0_o`/`cfr1_o` are read at a
context save, and `restore_i` writes each register back from its own saved
copy. A mismatch present at the save therefore survives the switch and is
still caught. `inj_cfr0_i`/`inj_cfr1_i` are XOR masks for injecting upsets.
Tie them to zero in a real system.

## The coded iTLB (`itlb`, `ecc_il_enc`, `ecc_il_dec`)

The iTLB has 16 sets × 4 ways with true LRU replacement (`lru_ctrl`). An entry
is `{valid, VPN tag (26), PFN (31), PB (4)}` = 62 bits. The whole entry,
including the valid bit, is stored encoded as 88 bits.

**The code.** The payload is dealt round-robin over 4 words. Payload bit i
goes to word i mod 4. Each word is an extended Hamming code: 16 data bits,
5 check bits and 1 overall parity bit, giving single-error correction and
double-error detection (SECDED). In the stored vector, bit j of word w sits at
position 4j + w, so neighbouring cells always belong to different words. As a
result:

* a burst of 1–4 adjacent upset cells is corrected, because each word loses at most one bit;
* a burst of 5–8 adjacent cells is always detected, because some word loses two bits.

Decoding a word works as follows. The syndrome is the XOR of the positions of
all set bits, and the parity is the XOR of all bits.

* Odd parity: a single error at the position the syndrome names. Syndrome 0 means the parity bit itself.
* Even parity with a nonzero syndrome, or a syndrome pointing past the word: uncorrectable.

The all-zero word encodes the all-zero (invalid) entry. Reset and `flush_i`
write that word.

**Two-cycle lookup.** In cycle T the set is read and its four code words are
registered. In cycle T+1 all four ways are decoded and corrected in parallel,
the corrected tags are compared, and the result is presented. This decode is
the extra cycle the code costs. Also in T+1:

* every way that needed a correction is written back corrected (scrubbing), so the iTLB again holds a clean translation, and the CFRs are reloaded from the corrected value;
* every way with an uncorrectable error is written back as invalid. The lookup then misses (unless another way hits), and the page-table walk refills the translation. Dropping the entry is always safe, because a TLB holds only copies of page-table entries;
* the hitting way is marked most recently used.

A fill writes the LRU way of the set in one cycle. A fill must not coincide
with a lookup in flight; an assertion checks this.

## The instruction cache (`icache`)

The cache is 64 KB, 4-way with true LRU, with 64-byte blocks: 256 sets. It
returns a group of four 32-bit instructions. It is a three-stage pipeline with
a 3-cycle hit latency and one access per cycle:

1. **S1** latches the request and its set address;
2. **S2** reads the tag, valid and data arrays for that set. For each way it latches the tag, the valid bit and the 16-byte fetch group selected by the block offset;
3. **S3** compares the four tags with the translated PFN and drives the hitting way's group out through the way multiplexer.

**Indexing.** Index plus block offset needs 14 address bits (8 + 6), one more
than the 13-bit page offset of an 8 KB page. The index is therefore taken from
virtual address bits [13:6], and the tag is the **whole** PFN, not just the
bits above the index. The hit test is thus exact for any virtual-to-physical
mapping. One physical block may sit in two sets if two virtual pages alias it.
That is harmless for a read-only instruction cache.

**Misses block.** When S3 misses, all three stages hold. The block is
requested once (`mem_req_valid_o`/`mem_req_ready_i`, block-aligned physical
address). When it returns, it is written into the set's LRU way and also into
S3, which then hits. Requests waiting in S1/S2 read the arrays only when they
advance, so they see the refilled block. A response that is not taken
(`rsp_ready_i` low) also holds the pipeline.

## Putting it together (`rat_ifetch`)

```
 req (va, A) ──► xlat_ctrl ──(va, pfn)──► icache S1 ─► S2 ─► S3 ──► rsp (4 instructions)
                 │   ▲   ▲                                      │
        lookup / │   │   │ match, CFR0                          │ last instruction's A bit
        result   ▼   │   │                                      ▼
                itlb  cfr_pair ◄── reload ──┘           previous-IR register
                 ▲ │
       fill ─────┘ └──► miss (to the page-table walk)
```

The **previous-IR register** keeps the A bit of the last instruction of the
last group delivered. It resets to 1, because after reset the CFRs hold
nothing. A request with `req_use_prev_i = 1` uses that bit. With
`req_use_prev_i = 0` the core supplies the bit itself in `req_abit_i`. It does
so when the instruction preceding the fetch is not the last one delivered, for
example a taken branch in the middle of a group, or an exception redirect,
where 1 is always safe.

**Latency, request to instruction group:** 4 cycles when the CFRs translate
(1 + 3), 5 cycles when the iTLB does (2 + 3), plus any iTLB walk or cache
refill. The A bit for a fetch comes from the instruction fetched just before.
A core that simply follows the stream therefore waits for each group before
asking for the next, as the testbench does. A core that predicts the next
fetch must also supply its A bit. `req_abit_i` = 1 is always correct; it only
costs the iTLB cycle.

Top-level ports:

* `req_*`, `rsp_*`: fetch request and fetch group, valid/ready.
* `xl_fire_o`, `xl_src_o`, `xl_pb_o`: one strobe per translation, with its source and protection bits.
* `tlb_miss_o`, `tlb_miss_vpn_o`, `tlb_fill_*`, `tlb_flush_i`: interface to the software page-table walk.
* `ctx_*`: CFR context save and restore.
* `cfr_inj*_i`, `tlb_fill_inj_i`: upset injection. Tie to zero in use.
* `mem_*`: refill from the next level, 512-bit blocks.
* `ev_*`: event strobes for counting CFR translations, A-bit lookups, mismatch lookups, CFR reloads, iTLB misses, corrected and uncorrectable iTLB reads, and cache misses.

## Parameters and sizes

| constant / parameter | value | origin |
|----------------------|-------|--------|
| page size `PG_BITS` (top parameter) | 8 KB (13) | configuration the scheme was evaluated with |
| L1 I-cache `IC_SETS`×`IC_WAYS`×`LINE_B` | 256 × 4 × 64 B = 64 KB, LRU, 3 stages | same |
| fetch width `FETCH_W` | 4 | same |
| virtual / physical address (`VA_W`, `PA_W`) | 43 / 44 bits | Alpha 21264 values; own choice |
| protection bits `PB_W` | 4 | own choice (carried, not interpreted) |
| iTLB `TLB_SETS`×`TLB_WAYS` | 16 × 4, LRU | common simulator default; own choice |
| code interleave `TLB_IL` | 4 (corrects bursts ≤ 4, detects ≤ 8) | own choice |
| A bit position `A_BIT_POS` | 31 | own choice |

The scheme was also studied with 16 KB pages. Set `PG_BITS = 14` on
`rat_ifetch` for that. The top passes it, or the widths derived from it, to
`xlat_ctrl`, `cfr_pair`, `itlb` and `icache`. The PFN and VPN widths, and
with them the CFR, fill and miss ports, shrink by one bit. With 16 KB pages the whole cache index lies inside the
page offset. `PAGE_BITS` in `rat_pkg` is only the default.

## What is this design's own

The decision rule, the one-cycle and two-cycle translation latencies, the
duplicated CFRs with their comparator, the CFR reload after every iTLB
translation, and the correction and write-back of iTLB errors all belong to
the scheme. The cache geometry and pipeline stages are those of the processor
it targets. The following are choices made here:

* the particular code (bit-interleaved SECDED). Double- or triple-error-correcting BCH codes would serve too; any code whose check fits in one cycle does;
* dropping an iTLB entry whose error cannot be corrected and refilling it;
* the iTLB geometry, address widths, protection-bit width and A-bit position;
* cache indexing with one virtual bit and a full-PFN tag;
* blocking cache misses and the refill port;
* valid/ready handshakes, the miss/fill protocol, the redirect input, separate save/restore of the two CFRs, the flush and upset-injection ports.

The page-table walk, the compiler pass that sets A bits, the L2/memory and the
core are not part of the RTL.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rat_pkg.sv tb/ecc_ref_pkg.sv \
          tb/tb_rat_ifetch.sv --top-module tb_rat_ifetch -Mdir obj && obj/Vtb_rat_ifetch
```

Replace `tb_rat_ifetch` with any testbench:

* `tb_ecc_il`: encoder against an independent reference encoder.
* `tb_ecc_il_dec`: every single-bit error and every burst of 2–8 adjacent bits, on random entries.
* `tb_cfr_pair`: random updates, restores and upsets against a register model.
* `tb_itlb`: hit, miss, LRU replacement, corrected and uncorrectable upsets, scrubbing, flush and the one-cycle result timing, against a reference model.
* `tb_xlat_ctrl`: source decision, CFR reload, miss and refill, 1- and 2-cycle latency, with behavioural CFRs and iTLB.
* `tb_icache`: data, hit and miss pattern against an LRU model, 3-cycle hit latency, back-to-back hits.
* `tb_rat_ifetch`: end to end at the default parameters.
* `tb_rat_workloads`: application-shaped streams with 8 KB and 16 KB pages (see below).

`tb_rat_ifetch` runs a synthetic annotated program over 80 pages for 6000
fetch groups. It checks every instruction group, the source of every
translation, and the 4- and 5-cycle latencies. It also requires each
mechanism to occur: CFR translations, A-bit lookups, CFR mismatches from
injected upsets, CFR reloads, iTLB misses and refills, corrected and
uncorrectable iTLB entries, cache misses, redirects, page-boundary crossings,
context switches and back-pressure. It prints the counts. In that run about
4% of fetches need the iTLB.

`tb_rat_workloads` feeds the front end with instruction streams whose
page-change rates follow those measured for eight SPEC CPU applications:
lucas 1.67%, apsi 1.05%, vpr 2.80%, crafty 3.87%, soplex 4.14%, tonto 3.07%,
mcf 3.48% and astar 5.62% (with 8 KB pages). Each program is 64 KB of code:
runs of consecutive groups chained in a shuffled order. The bench itself is
`tb/workload_bench.sv`, parameterised by the page size. It is instantiated
twice, with 8 KB and with 16 KB pages, on the same programs. For each
application the caches are warmed first, then 20000 groups are fetched. The
testbench checks these things:

* the iTLB is read exactly once per page change and never otherwise;
* every group is correct;
* the cycle count is exactly 5 per group plus 1 per page change;
* 16 KB pages never cost more page changes or cycles than 8 KB pages.

In this serial fetch loop a group takes 4 cycles from request to response. The
next request follows one cycle later, once the previous-IR register holds the
A bit. With 8 KB pages, 0.85–4.49% of fetches change page, and the extra
translation cycles come to 0.17–0.90% of the fetch time. With 16 KB pages the
figures are 0.76–3.83% and 0.15–0.77%. Reading the coded iTLB on every fetch
would cost 20%. The programs are synthetic, so their rates only approximate
the targets.
