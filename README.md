# Fault-tolerant controller for a 24-die NAND flash cube

This is the logic die of a radiation-tolerant solid-state drive built as a
stack of flash dies. Each of the 24 NAND dies in the stack has its own
connection to the controller, so the controller gives every die its own
low-level channel controller. All 24 dies run at the same time. On top of
those channels sits a memory system that moves the flash translation layer
(FTL) bookkeeping out of firmware and into hardware:

- a memory management unit (MMU) translates host logical page numbers (LBAs)
  into physical page addresses (PPAs) through a TLB and a page-table walker;
- a two-level cache holds the mapping tables: an SRAM L1 with SECDED on every
  word, backed by two mirrored MRAM dies;
- each die controller can merge a data block with its log block by itself;
- a hot/cold identifier tracks which logical pages are rewritten often;
- a SHA-256 engine checks boot code pages against a hash table.

Every structure that an upset can corrupt is protected, each in its own way:

| Structure | Protection |
|---|---|
| TLB entries | A parity bit |
| L1 words | SECDED (corrects one bit, detects two) |
| MRAM words | SECDED in two mirrored copies, the better copy selected on each read |
| NAND pages | A spare-area header carrying the page's own address and a CRC |
| Boot code | A SHA-256 digest per page |

At the defaults the design addresses 24 dies of 4096 blocks. Each block has
128 pages of 8192 data bytes plus 448 spare bytes, which is 96 GB in all.
The NAND bus runs at one byte per 3 clocks. At 100 MHz that is 33 MB/s per
die and 800 MB/s over the whole cube.

## Data path of a host request

```
host req ─► mmu ──► tlb            (hit: PPA at once)
             │  └─► ptw ─► l1_cache ─► mram_ctrl ─► 2 MRAM dies
             │  └─► ftl_* ports    (no mapping / write: firmware answers)
             ▼
        channel_mux ─► nand_ll_ctrl[0..23] ─► NAND pins of each die
host wr ─────┘  ▲      (queue, page buffer, scrambler, spare codec,
host rd/resp ◄──┘       block merger, NAND bus timing)
```

`ssd_controller` is the top.

**Write of one page.** `req_op = HOST_WRITE` with an LBA. The MMU asks the
FTL firmware port for a free page (`ftl_kind = FTL_ALLOC`). Mapping is
log-structured, so every update goes to a new page. The answer is installed
in the page table through the walker and in the TLB. The MMU then sends a
program command to the die that owns the PPA, and reports the LBA to the
hot/cold identifier. The host streams the page on `wr_*`, with `wr_die`
from the done response. The die controller scrambles the data and builds
the spare header. It then programs the die.

**Read of one page.** The TLB is looked up combinationally. On a miss, the
walker reads two levels of page table through the L1 cache. A level-1 entry
is selected by LBA[23:12] and points to a level-2 table. The level-2 entry,
selected by LBA[11:0], holds the PPA. Each entry is a 32-bit word: bit 31 is
valid, bits 23:0 are the payload. If no mapping is found, the firmware is
asked (`FTL_MISS`). It either provides the PPA or refuses, and a refusal
ends the request with `done_err`.

The die controller reads the page and checks its spare header. The CRC
must match, and the header's PPA and LBA must be the ones requested. It
then descrambles the data onto `rd_*` and ends with a response on
`resp_*`, which carries `fail`, `addr_err` and `crc_err` flags.

**Firmware commands.** Erase, merge and reset enter on `fw_cmd_*`. They go
straight to the channel mux whenever the MMU is not sending a command of
its own.

## Address formats

| Field | Bits |
|---|---|
| PPA (24 bits) | die [23:19], block [18:7], page [6:0] |
| NAND address of a command (42 bits) | `{2'b00, row[23:0], column[15:0]}` with row = `{5'b0, block, page}` |
| Merge command | data block [35:24], log block [23:12], target block [11:0] of the address field |

Command codes are in `ssd_pkg::nand_cmd_e`:

| Code | Command |
|---|---|
| 001 | Program |
| 010 | Read |
| 011 | Erase |
| 100 | Merge |
| 111 | Reset |

## The per-die controller (`nand_ll_ctrl`)

This is the largest block and the one to read first. It takes one command
at a time from a 4-deep queue (`sync_fifo`), so the mux can hand over
commands while the die is busy. Its page buffer holds one data page. A
*page engine* turns a page operation into a series of NAND bus cycles:

| Operation | Bus cycles |
|---|---|
| Program | 80h, 5 address bytes, data and spare bytes, 10h, then poll with 70h until ready |
| Read | 00h, 5 address bytes, 30h, poll with 70h, 00h, then read data and spare |
| Erase | 60h, 3 row bytes, D0h, then poll with 70h |
| Reset | FFh, then poll with 70h |

`nand_timing_ctrl` produces the pin waveforms for each bus cycle:

- Command, address and data-in cycles hold WE# low for `T_WP` clocks and
  high for `T_WH` clocks.
- Data-out cycles hold RE# low for `T_RP` clocks and sample IO on the last
  low clock.
- The next cycle is accepted on the last clock of the current one, so bytes
  follow each other without gaps.

**Scrambling.** Data is XORed with the key stream of a 32-bit LFSR
(`scrambler`). The LFSR is seeded from the LBA, not the PPA, so a page that
has been moved to another place still descrambles.

**Spare header.** `spare_codec` fills the first 52 bytes of the spare area:

| Bytes | Field |
|---|---|
| 0–11 | LBA |
| 12–23 | PPA |
| 24–31 | Timestamp |
| 32–35 | Bad-block marker |
| 36–39 | Index |
| 40–47 | P/E count |
| 48–51 | CRC-32 of bytes 0–47 |

The rest of the spare area stays erased (FFh). In the full 214-byte layout
those bytes hold the metadata ECC, the data hash and the BCH parity of the
data.

**Merge.** `block_merger` runs the page engine itself. For each page offset
p it reads page p of the log block. If that page's header is valid, the
page is programmed into the target block. Otherwise it reads page p of the
data block and copies that if it is valid. At the end it erases both source
blocks. The page data never leaves the die controller.

## Memory system

**TLB (`tlb`).** Fully associative, 16 entries, with one parity bit over
each entry's LBA and PPA. When an entry with bad parity matches, the lookup
reports `lookup_perr` instead of a hit. The entry is then dropped and the
MMU walks the page table as for a miss. Refill replaces an entry with the
same LBA first, then a free entry, then entries in round-robin order.

**L1 cache (`l1_cache`).**
- 4-way set-associative with 64 sets of one 32-bit word, and a 3-bit
  pseudo-tree LRU per set.
- Two ports: port 0 is the walker and port 1 is the firmware processor.
  They are served one request at a time, round-robin.
- Every word is stored as a 39-bit Hamming code word (`secded_pkg`).
- A single-bit upset is corrected on the read and written back (scrubbed).
- A double upset invalidates the line, and the word is fetched again from
  the MRAM. This is always safe because writes go through to the MRAM.

**MRAM controller (`mram_ctrl`).** Every word is written, SECDED-encoded, to
both MRAM dies. A read takes both copies and uses the first usable one in
this order:
1. a clean copy from die A;
2. a clean copy from die B;
3. a corrected copy from die A;
4. a corrected copy from die B.

If neither copy is usable, the read returns `rd_uncorrectable`. Whenever
either copy had an error, the chosen value is written back to both dies.

**Hot/cold identifier (`hot_cold`).** Two LRU lists of LBAs are kept:
- A hot list of 8 entries and a candidate list of 16 entries.
- A write to an LBA already in the hot list moves it to the head of the
  hot list.
- A write to an LBA in the candidate list promotes it to the hot list. If
  the hot list is full, its tail is demoted to the head of the candidate
  list.
- Any other write puts the LBA at the head of the candidate list.
- `hc_query_lba` returns whether an LBA is hot. Garbage collection uses this
  to avoid copying data that will soon be invalid.

**Boot check (`boot_verifier`, `sha256_core`).** Code pages are streamed in
as 32-bit words, together with the expected digest from the hash table. The
core hashes one 512-bit block in 66 clocks, one round per clock. After the
last block of the page it adds the standard padding block and compares the
digest. Pages that pass and pages that fail are counted.

## Statistics and upset injection

The top's `stats` output (`ssd_pkg::ssd_stats_t`) counts:
- TLB hits, misses and parity errors;
- FTL requests;
- L1 hits, misses, corrected words and uncorrectable words;
- MRAM corrections, mirror selections and uncorrectable reads;
- hot-list promotions and demotions;
- boot pages that passed and that failed.

The `err_*` inputs flip a chosen bit in a TLB entry or an L1 word so that
tests can exercise the protection. Tie them to 0 in use.

## Where this departs from the architecture it implements

- Not built:
  - the BCH code of the page data;
  - the GZIP/LZ77 compression engine;
  - RAID parity across dies;
  - the on-chip tag store of the MRAM page cache (the MRAM here holds
    controller metadata only).
- External parts are replaced:
  - The host link is a plain request/stream interface rather than Serial
    RapidIO.
  - The firmware processor is represented by the `ftl_*`, `fw_cmd_*` and
    `cpu_*` ports.
  - The MRAM dies are reached through a simple synchronous word port rather
    than a DDR4 PHY.
- The spare header protects itself with a CRC-32 in place of a separate
  metadata ECC.
- The L1 cache serves one request at a time; it is not a non-blocking cache.
- The TLB's parity error invalidates the entry, and a fresh walk then
  restores it. Restoring TLB contents from a copy in MRAM is left to
  firmware.
- The merge assumes an offset-aligned log block: page p of the log block
  replaces page p of the data block. The firmware chooses the target block.
- This design's own choices:
  - all sizes not fixed above (TLB 16, L1 64 sets, queue 4, hot 8 /
    candidate 16, bus pulse widths);
  - the page-table format;
  - the LFSR polynomial and seed (04C11DB7h, seed = LBA xor 9E3779B9h);
  - the CRC polynomial (reflected EDB88320h);
  - command codes other than 001 (program) and 111 (reset).

## Simulating

Every testbench in `tb/` is self-checking. It prints `TB_RESULT checks=N
failures=M` and stops itself with a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ssd_controller \
  -y rtl -y tb +libext+.sv rtl/secded_pkg.sv rtl/ssd_pkg.sv tb/tb_ssd_controller.sv
obj_dir/Vtb_ssd_controller
```

Main testbenches:
- `tb_ssd_controller` runs the whole controller at a reduced size: 4 dies,
  64-byte pages, 4 pages per block. It uses behavioural models of the dies
  (`nand_die_model`, `mram_die_model`) and a small FTL in the testbench. It
  goes through writes, TLB hits, page-table walks, FTL misses, concurrent
  programs on several dies, interleaved read returns, a merge, and upsets
  in the TLB, L1 and MRAM. It also corrupts a NAND page's spare header and
  checks one good and one bad boot page. It counts a failure for any of
  these mechanisms that never happened.
- `tb_ssd_full` runs the same path with every parameter at its default
  (24 dies, 8 KB pages): one write and one read-back of a full page, a
  check of the bus time against 3 clocks per byte, and one 8 KB boot page.
- Each block has its own testbench, named `tb_<module>`.

The NAND model keeps its pages in an associative array keyed by
`row * page_bytes + column`. It accepts the command bytes above. Its
`flip_bit` and `set_fail_next` tasks inject bit errors and status failures.
