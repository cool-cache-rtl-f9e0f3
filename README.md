# Cool-Cache: a tagless, compiler-managed data memory

Cool-Cache is a low-energy data memory for embedded and media processors.
It has no tag array and no cache controller. The compiler supplies the
information a hardware cache would work out at run time. This repository
holds synthesizable SystemVerilog for its hardware. The architecture comes
from the paper *Cool-Cache: A Compiler-Enabled Energy Efficient Data Caching
Framework for Embedded/Multimedia Processors*.

The idea rests on two observations about media programs:

* **Scalars are few but busy.** Spills and register-promoted variables take
  up little memory but make many of the accesses. The compiler marks these
  loads and stores with one extra instruction bit. They go to a 1 KB
  **scratchpad** that cannot miss and costs far less energy per access than
  a 64 KB array.
* **Array accesses are predictable.** Consider a loop that walks `A[i]`
  through 256-byte lines. It does one address translation and then reuses it
  for every other element of the line. The compiler gives each array (more
  exactly, each non-scalar variable name) one of eight **hotline
  registers**. The register's number is written into every load and store
  of that array. The register holds the last translation from a virtual
  cache line to a line of the **tagless SRAM**. If the access falls in that
  line, the SRAM is read or written directly: no tag lookup and no way
  multiplexer.

If the prediction is wrong, a 16-entry fully associative **cache TLB** is
searched. If the TLB also misses, the processor runs a **software handler**.
The handler is compiler-generated code that keeps the tag directory, picks
victims, moves lines to and from memory and returns the translation. Line
placement and associativity are therefore software decisions. The line size
is a run-time setting, so each program can use the line size that suits it.

## How one access is served

```
                 req_scalar=1 ───────────────────────────────► scratchpad (PAD_EN)
request ──┤
                 req_scalar=0
                     │ req_hot_idx
                     ▼
             hotline register ── vline equal? ── yes ─► hotline hit ─┐
                     │ no (Hotline Miss = Cache TLB_EN)              │
                     ▼                                               ├─ OR ─► SRAM_EN
               16-entry cache TLB ── hit ─► TLB hit ─────────────────┤   address =
                     │ miss (req_ready low, hdl_req high)            │   {SRAM line, word in line}
                     ▼                                               │
               software handler ── hdl_done + hdl_sline ─────────────┘
```

| Path | Condition | Cycle accepted | Side effect |
|---|---|---|---|
| scratchpad | `req_scalar` | cycle presented | none |
| hotline hit | register `req_hot_idx` valid and holds the access's virtual line | cycle presented | none |
| TLB hit | hotline miss, TLB holds the line | cycle presented | hotline register `req_hot_idx` reloaded from the TLB |
| handler | hotline and TLB miss | cycle `hdl_done` is high | translation written into the TLB (victim entry) and into hotline register `req_hot_idx`; every other entry holding the returned SRAM line is invalidated |

On every path, `rsp_valid` rises one clock after acceptance, for loads and
for stores alike. `rsp_rdata` then holds the loaded word. The hotline check,
the TLB search and the SRAM access all fit in the accepting cycle. So a
hotline misprediction that the TLB catches costs no extra cycle. A TLB miss
costs whatever the handler takes. In the simulation model that is 25 cycles
of handler overhead. When the line is not in the SRAM it adds one cycle per
word written back, then 100 cycles of memory latency, one cycle per word
filled and one cycle for the directory update.

The requester must hold a stalled request unchanged until it is accepted
(valid/ready). An assertion checks this.

### Address split

The line size is `2^cfg_line_log2` bytes, from 64 to 1024 (`cfg_line_log2` =
6 to 10). For a 32-bit virtual address `a` and 8-byte words:

* virtual line `= a >> cfg_line_log2`
* word in line `= (a >> 3) mod (line size / 8)`
* SRAM word address `= SRAM line * (line size / 8) + word in line`

Line numbers are stored at the widths needed for 64-byte lines: 26-bit
virtual lines and 10-bit SRAM lines (64 KB / 64 B = 1024 lines). Every line
size therefore uses the same registers. The scratchpad is indexed by
`(a >> 3) mod 128`; the compiler is expected to place scalars so that they
do not collide.

### Keeping translations coherent

The SRAM holds whatever lines software put there, so a translation is only
valid as long as software leaves that SRAM line alone. The hardware enforces
two rules:

* When the handler answers with SRAM line *s*, every hotline register and
  every TLB entry that maps another virtual line to *s* is invalidated in the
  same clock edge that installs the new translation. An old name for a
  reused line can never hit.
* `flush` clears all hotline registers and TLB entries. Software must pulse
  it whenever it changes `cfg_line_log2`, after writing back what it wants
  to keep. `flush` must not be raised while an access is stalled.

## The software handler contract

The handler runs on the processor, so it is not in the RTL. `cool_cache`
brings out what it needs:

* `hdl_req` is high while an access waits. `hdl_vline`, `hdl_addr` and
  `hdl_hot_idx` describe that access.
* The handler answers with a one-cycle `hdl_done` and the SRAM line number
  in `hdl_sline`. The access completes in that cycle.
* A direct SRAM port (`hsram_en/we/addr/wdata`, with read data on
  `hsram_rdata` one cycle later) lets the handler fill lines, write back
  victims and keep its tag directory in a part of the SRAM that it never
  hands out. The controller has priority on the SRAM. The port is always
  free while `hdl_owns_sram` is high (an access is waiting) and while no
  request is presented. The handler must not use it in the `hdl_done` cycle.
  An assertion checks that the two never collide.

The handler the architecture assumes manages the SRAM as a 4-way set
associative cache with random replacement. Its tag directory is organised
like an inverted page table and is stored in the SRAM itself.
`tb/cc_sw_handler_model.sv` is a behavioural model of such a handler,
together with a sparse main memory. Its directory works as follows:

* It has one word per SRAM line, `{valid, virtual line}`, and sits in the
  last `ceil(lines × word bytes / line bytes)` lines of the SRAM. Those lines
  are never handed out. For 64 KB and 256-byte lines, 8 of the 256 lines
  hold the directory and 248 lines (62 sets) hold data.
* A call reads the four directory words of the set `virtual line mod sets`
  and answers after 25 cycles if the line is present.
* On a miss it takes a free way, otherwise a random one. It writes the
  victim back, waits 100 cycles for memory, fills the line one word per
  cycle, writes the directory word and answers.
* The model keeps no dirty bits, so it writes back every valid victim.
* Before and after a line-size change the model writes back every line and
  clears the directory (at its old and then at its new place). A maintenance
  handshake, `flush_req`/`flush_ack`, triggers this.

## Blocks

| Module | Role | Size (default) |
|---|---|---|
| `cool_cache` | top: controller, scratchpad, SRAM, handler port multiplexer | — |
| `cc_access_ctrl` | path selection, SRAM_EN, address forming, stall, translation updates; contains the three blocks below | — |
| `cc_hotline_regfile` | hotline registers: valid, virtual line, SRAM line; combinational read | 8 entries |
| `cc_hotline_check` | static prediction check (hit/miss) | 26-bit compare |
| `cc_cache_tlb` | fully associative translation CAM; fills a free entry first, otherwise round-robin | 16 entries |
| `cc_tagless_sram` | data array, word addressed, byte strobes, registered read | 64 KB × 64-bit words |
| `cc_scratchpad` | scalar memory, word addressed, byte strobes, registered read | 1 KB |
| `cc_pkg` | shared sizes, width functions, translation-source enum | — |

Parameters of `cool_cache` (all have these defaults): `ADDR_W=32`,
`SRAM_BYTES=65536`, `WORD_BYTES=8`, `PAD_BYTES=1024`, `N_HOTLINES=8`,
`N_TLB=16`, `MIN_LINE_BYTES=64`, `MAX_LINE_BYTES=1024`. A 256-bit SRAM is
`WORD_BYTES=32`. Other SRAM sizes, such as 32 KB or 128 KB, set
`SRAM_BYTES`; the SRAM line number width follows. All memories are plain
arrays with one port and a registered read, ready to be mapped onto SRAM
macros.

Reset (`rst_n`, asynchronous, active low) clears all translations and the
controller state. The memories are not cleared. The scratchpad holds
whatever the program stores in it, and the SRAM holds only what the handler
has filled.

## What follows the source architecture, and what is this design's own

Taken from the architecture: the four ways an access is resolved and their
order, the scratchpad for compiler-marked scalars, one hotline index per
instruction, 8 hotline registers, the 16-entry fully associative cache TLB,
the TLB reloading the hotline register, the handler updating both, SRAM_EN
as the OR of the three translation sources, the tagless SRAM addressed by
SRAM line plus offset, and the sizes: 64 KB SRAM, 8- or 32-byte words, 1 KB
scratchpad, lines of 64 to 1024 bytes.

Chosen here, because the architecture leaves it open:

* the valid/ready request and one-cycle response protocol, and all
  translation work done in the accepting cycle;
* the valid bits, reset, `flush`, and invalidation of stale translations of
  a reused SRAM line;
* the TLB replacement order (free entry first, then round-robin);
* byte write strobes, the 32-bit virtual address, and a processor data port
  as wide as the SRAM word;
* active-high enables (the architecture's drawing shows inversion bubbles on
  PAD_EN, SRAM_EN and the TLB enable);
* the handler's direct SRAM port and its priority rule.

Not in the RTL: the processor, the handler code, main memory and the bus to
it, and the energy model. The architecture's energy results come from an
analytical simulator, not from this logic.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/cc_pkg.sv tb/tb_cool_cache.sv --top-module tb_cool_cache
./obj_dir/Vtb_cool_cache
```

Replace `tb_cool_cache` with any testbench name below.

| Testbench | What it shows |
|---|---|
| `tb_cool_cache` | the whole design at default size, with the handler/memory model, on a synthetic media-like access stream: scalar traffic, array sweeps, two-position loops on one hotline, random accesses, and arrays placed to conflict in the handler's sets. The line size is switched 256 → 1024 → 64 → 256 bytes on the way. Every load is checked against a reference memory; every response must come one cycle after acceptance; scratchpad, hotline and TLB paths must not stall; a handler resolution must stall for exactly the overhead, plus write-back, memory and fill time; a repeated access to the same line through the same hotline, with no handler call in between, must hit. Each mechanism (scratchpad, hotline hit, TLB hit, handler hit, fill, write-back, line-size switch) must occur. A final cold sweep of 1024 8-byte elements at 256-byte lines must take exactly 32 handler calls and 992 hotline hits, at one access per cycle plus the stalls. |
| `tb_cool_cache_configs` | the same stream on a 32 KB SRAM (1024-, 256-, 64-byte lines), a 64 KB SRAM with 256-bit words, and a 128 KB SRAM |
| `tb_cc_access_ctrl` | directed sequence: handler stall length, hotline and TLB hits, hotline reload, scratchpad routing, invalidation after SRAM line reuse, flush, address forming at 1024- and 64-byte lines, TLB replacement |
| `tb_cc_cache_tlb` | random installs, invalidations and flushes against a reference model, full lookup sweeps |
| `tb_cc_hotline_regfile` | random writes, invalidations and flushes against a reference model |
| `tb_cc_hotline_check` | random and single-bit-difference comparisons |
| `tb_cc_tagless_sram`, `tb_cc_scratchpad` | byte-masked writes, reads, latency and hold against a reference array |

All of these pass. The full-size run takes well under a second. The
synthetic stream is not a media benchmark. The prediction rates it prints
reflect how that stream was built, not real programs.
