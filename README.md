# Banked associative TLB

A translation lookaside buffer (TLB) caches recent virtual-to-physical page
translations so that most memory accesses skip the page table. A fully
associative TLB compares the virtual page number (VPN) with every stored
entry on every access. Most of its power goes into those comparisons, in the
content addressable memory (CAM).

This design splits the TLB into banks to save that power. Each bank is a
small fully associative TLB with its own CAM and SRAM. The low bits of the
VPN pick one bank, and only that bank's CAM searches. Those bank-select bits
are implied by the bank, so they are not stored. That shortens every CAM word
and saves area. Because a page always goes to the same bank, a banked TLB
misses like a set associative TLB with the same number of sets. The gain is
in power and area, not in miss rate.

The default build has 128 entries in 4 banks of 32 entries, with
least-recently-used (LRU) replacement. It takes 32-bit virtual and physical
addresses with 4 KiB pages, so VPN and physical page number (PPN) are 20 bits
each. Parameters also give the fully associative, set associative and
random-replacement forms of the same TLB.

## How an address is translated

```
 virtual address  [31 ............ 14 | 13 12 | 11 ...... 0]
                        tag (18 b)      bank    page offset
                                        (2 b)       |
        bank select (tlb_addec) --> enables 1 of 4  |
                                                    |
    bank k:  CAM (tag, valid) --match lines--> SRAM (PPN)
                     |                           |
    tlb_missdec:  hit / miss                    PPN ----> physical address
                                                          [PPN | page offset]
```

1. The bank field (`log2(BANKS)` low bits of the VPN) is decoded into a
   one-hot bank enable. Only the enabled bank gets `lookup_en`.
2. In that bank, every valid CAM word compares its tag with the rest of the
   VPN. A word that matches raises its match line.
3. The match lines are the SRAM word lines: the SRAM returns the PPN of the
   matching word. No binary index is decoded on the read path.
4. `tlb_missdec` takes the hit line and PPN of the enabled bank only. It
   raises `hit` or `miss`, and `pa` is the PPN joined to the page offset.

All of this is combinational. `hit`, `miss`, `ppn` and `pa` are valid in the
same cycle as `va`. The translation is meant to settle in the first half of
the cycle, so the critical path sets the clock period. Nothing in the lookup
path is registered.

Banks that are not enabled keep their match lines at 0. A bank's CAM
compares only while its `lookup_en` or `fill_en` is high. This is the
behaviour that saves power.

## Misses and refills

The TLB does not walk the page table. On a miss it raises `miss` for that
cycle, and the logic around it (a page table walker) finds the translation.
The walker then presents `refill_valid` with `refill_vpn` and `refill_ppn` for
one cycle. The entry is written on that clock edge, and a lookup in a later
cycle hits.

A refill goes to the bank chosen by the bank field of `refill_vpn`. Inside
that bank, the entry it writes is chosen in this order:

1. If the VPN is already present, its own entry is overwritten. A tag is
   therefore never stored twice, so match lines are always one-hot. An
   assertion in `tlb_bank` checks this.
2. Otherwise the lowest invalid entry is used. This is a compulsory miss: the
   entry's valid bit goes from 0 to 1, and `refill_compulsory` is high in the
   refill cycle.
3. Otherwise the replacement policy picks a valid entry to evict, and
   `refill_evict` is high.

A refill has priority over a lookup. If `refill_valid` and `lookup_valid` are
both high, the lookup is not performed and `hit` and `miss` both stay 0. The
processor side must repeat it.

## Replacement control

`tlb_cam_ctrl` holds the replacement state of one bank. `REPL` selects the
policy:

* **LRU** (`REPL_LRU`) is exact least-recently-used order. Each entry has an
  age of `log2(entries)` bits, and the ages of a bank are always a
  permutation of 0 .. entries-1. A lookup hit or a refill "touches" an entry:
  it gets age 0, and every entry that was younger than it ages by one. Older
  entries keep their age. The victim is the entry with the maximum age.
  After reset entry *i* has age *i*. While any entry is invalid, the
  invalid-first rule overrides the ages, so this start order does not matter.
  The cost is 5 bits per entry for 32-entry banks: 640 flip-flops at the
  default size, the largest block of state after the arrays.
* **Random** (`REPL_RANDOM`) takes the victim from a 16-bit LFSR
  (`tlb_lfsr`, polynomial x^16+x^14+x^13+x^11+1, seed 0xACE1). The LFSR
  steps every cycle, and the victim is its value modulo the bank size. All
  banks share one LFSR. With LRU the LFSR is still instantiated but unused,
  and synthesis removes it.

The policy state is per bank, so a bank replaces only among its own entries.
A page can only live in its own bank.

## Organisations

| parameter    | default    | meaning |
|--------------|------------|---------|
| `ENTRIES`    | 128        | total entries (64, 128 and 256 are the intended sizes) |
| `BANKS`      | 4          | banks; 1 gives a fully associative TLB |
| `REPL`       | `REPL_LRU` | `REPL_LRU` or `REPL_RANDOM` |
| `SEL_IN_TAG` | 0          | 1 keeps the bank bits in the CAM tag (set associative form) |
| `VA_W`, `PA_W`, `OFFSET_W` | 32, 32, 12 | address and page-offset widths |

`BANKS` and `ENTRIES/BANKS` must be powers of two. An elaboration-time
assertion checks this.

* **Fully associative**: `BANKS=1`. There is one CAM of `ENTRIES` words.
* **Set associative**: `BANKS>1, SEL_IN_TAG=1`. The banks are used as sets.
  Each CAM word still stores the full VPN.
* **Banked associative**: `BANKS>1, SEL_IN_TAG=0` (the default). Each CAM
  word is `log2(BANKS)` bits shorter. At the default size this removes 2 bits
  from each of the 128 CAM words.

## Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset, which empties the TLB (all valid bits cleared) |
| `lookup_valid`, `va` | in | 1, VA_W | translate `va` this cycle |
| `hit`, `miss` | out | 1 | result of this cycle's lookup (combinational) |
| `ppn`, `pa` | out | PPN_W, PA_W | physical page number and address on a hit (`ppn` is 0 otherwise) |
| `refill_valid`, `refill_vpn`, `refill_ppn` | in | 1, VPN_W, PPN_W | write one translation on this clock edge |
| `refill_compulsory`, `refill_evict` | out | 1 | refill fills an empty entry / replaces a valid one |
| `probe_bank`, `probe_idx` | in | log2 BANKS, log2 entries per bank | read one entry by address |
| `probe_valid`, `probe_vpn`, `probe_ppn` | out | 1, VPN_W, PPN_W | contents of that entry (combinational) |

The probe port reads the arrays like an ordinary memory, by address. It is
meant for debug and for tests. In the banked form, `probe_vpn` rebuilds the
full VPN from the stored tag and the bank number.

## Modules

| module | role |
|--------|------|
| `tlb_pkg` | replacement policy enum, index-width helper |
| `tlb_top` | bank split, bank-select decoders, banks, miss decoder, LFSR |
| `tlb_bank` | one fully associative bank: CAM + SRAM + address decoder + replacement control |
| `tlb_cam` | tag array with valid bits; match, write by one-hot select, read by address |
| `tlb_sram_cells` | PPN array; read by match lines (wired OR) or by address |
| `tlb_addec` | binary to one-hot decoder (CAM/SRAM write word select, bank enable) |
| `tlb_prienc` | lowest-index priority encoder (match lines to index, first invalid entry) |
| `tlb_cam_ctrl` | replacement choice: invalid first, then LRU or random |
| `tlb_missdec` | joins the enabled bank's hit and PPN into `hit`, `miss`, `ppn` |
| `tlb_lfsr` | 16-bit LFSR for random replacement |

At the default size, coarse synthesis gives about 3500 word-level cells, 768
flip-flops (128 valid bits + 640 LRU age bits) and 4864 array bits
(128 x 18-bit tags + 128 x 20-bit PPNs). The tags and PPNs are plain register
arrays. For a real implementation, replace `tlb_cam` and `tlb_sram_cells`
with CAM and SRAM macros that have the same ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_tlb_top` runs the default TLB, with no parameter overrides, through
  20 000 translations. The addresses come from a page pool three times the
  TLB size, with locality. `tlb_env` plays both the processor and the page
  table walker. Its walker answers a miss after 1 to 3 cycles with
  PPN = page_table(VPN), a fixed hash. `tlb_env` also holds a reference
  model: per-bank contents, the LRU order, and a copy of the LFSR. With it,
  the test checks:
  * every hit, miss and PPN, in the lookup cycle;
  * the compulsory and eviction flag of every refill;
  * the exact entry each refill replaces, by reading the whole TLB through
    the probe port every 64 operations.

  The run counts each mechanism and fails if one of them never happened:
  hits, misses, compulsory fills, evictions, refills of a page already
  present, refills that hold off a lookup, and use of every bank. A monitor
  also checks that each access activates exactly one bank's CAM.
* `tb_tlb_top_variants` runs the same checks on five other organisations:
  * 64 entries, fully associative, LRU;
  * 128 entries in 2 banks, random replacement;
  * 256 entries in 4 banks, random replacement;
  * 64 entries in 4 sets, set associative, LRU;
  * 256 entries in 2 banks, LRU.
* `tb_tlb_missrate` sends one page stream through six LRU TLBs:
  * fully associative, with 64, 128 and 256 entries;
  * 4 banks, with 64, 128 and 256 entries.

  LRU has an inclusion property: a larger LRU TLB always holds what a smaller
  one holds. The same is true bank by bank when the bank count is fixed. So
  the miss count may never grow with size, and the test checks this. It also
  prints the miss rates. Real program traces are not included. The stream is
  synthetic: three quarters of the accesses reuse 16 recent pages, and the
  rest draw from a pool of 768 pages.
* The block testbenches (`tb_tlb_bank`, `tb_tlb_cam`, `tb_tlb_sram_cells`,
  `tb_tlb_cam_ctrl`, `tb_tlb_addec`, `tb_tlb_prienc`, `tb_tlb_missdec`,
  `tb_tlb_lfsr`) compare each block with an independent model. The LFSR test
  checks the full period of 65535 steps.

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_tlb_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/tlb_pkg.sv tb/tb_tlb_top.sv
./obj_dir/Vtb_tlb_top
```

The testbenches need a two-state simulator. They use only `$urandom` for
random data. The default end-to-end run takes a few seconds.

## What is specified and what is chosen here

These points follow the low-power TLB study this design is based on:

* the CAM/SRAM split, with match lines as SRAM word lines;
* the four basic blocks: CAM, SRAM cells, address decoder and miss decoder;
* the replacement logic placed in the CAM control;
* bank selection by the VPN's low bits, which are not stored in the
  banked form;
* a single active bank per access;
* random and LRU replacement;
* 64, 128 and 256 entries with 1, 2 or 4 banks;
* the distinction between compulsory misses (an invalid entry becomes
  valid) and conflict misses (a valid entry is replaced).

These are this design's own choices:

* address widths and page size;
* the active-low asynchronous reset that only clears valid bits;
* the combinational lookup and single-cycle refill port;
* refill priority over a lookup in the same cycle;
* overwriting a page that is already present;
* lowest-index-first choice of invalid entries;
* the LRU age-counter scheme;
* the LFSR and its polynomial;
* the probe port;
* the absence of a flush or invalidate operation.

These are not included:

* the page table walker, the processor and memory, which connect through
  the refill, lookup and `pa` ports;
* the mask and I/O buffers of a general-purpose CAM chip, which a TLB does
  not need;
* any power or timing model. The design's purpose is low power, but
  measuring power needs a gate-level netlist, a cell library and switching
  activity from real address traces, none of which are part of this RTL.
