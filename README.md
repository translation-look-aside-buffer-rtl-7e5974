# A TLB that survives context switches

An operating system that switches tasks normally flushes the whole TLB, since
the translations belong to the task that was running. Each task then restarts
with a cold TLB, and the larger the TLB, the more of its contents the flush
throws away. This RTL implements the TLB organisation proposed in the thesis
*Translation Look-aside Buffer with Low Context Switch Penalty*. The TLB is
split in two parts:

* a **shared TLB**: a conventional fully associative small-page TLB. It is
  the only part flushed on a context switch.
* a set of **promotion banks**: small complete-subblock TLBs. Each holds the
  hottest 16 KB groups of one task. A task's bank is neither flushed nor used
  while other tasks run, and serves the task again when it resumes.

With the default sizes this comes to 128 shared entries of 4 KB pages plus
16 banks × 2 entries × 4 subblocks. That is 256 base-page slots, the same
storage as a conventional 256-entry TLB.

The thesis also describes an earlier, simpler organisation for large
(1 MB) pages: 32 banks of 8 entries, one bank per task, with no shared part.
It is included as a second, independent design (`orig_tlb`).

## Structure of the small-page TLB (`lcs_tlb`)

```
                 VPN (broadcast)
  req_vaddr ──┬───────────────────────────┬──────────────────────────────┐
              │                           │                              │
        ┌─────▼──────┐          ┌─────────▼─────────┐   ...   ┌──────────▼────────┐
        │ shared TLB │          │ promotion bank 0  │         │ promotion bank 15 │
        │ 128 x 4KB  │          │ 2 x 16KB groups   │         │ 2 x 16KB groups   │
        │  fa_tlb    │          │ subblock_bank     │         │ subblock_bank     │
        └─────┬──────┘          └─────────┬─────────┘         └──────────┬────────┘
              │                           └──────┬───────────────────────┘
              │                        ┌─────────▼─────────┐   current bits
              │                        │ bank mux / demux  │◄──────────────┐
              │                        │ bank_select_mux   │               │
              │                        └─────────┬─────────┘   ┌───────────┴─────────┐
              │                                  │             │ bank tag registers  │
        ┌─────▼──────────────────────────────────▼───┐         │ task tag, current,  │
        │              control logic                 ├────────►│ valid, LRU (x16)    │
        │              lcs_tlb_ctrl                  │         │ bank_tag_regs       │
        └──────┬─────────────────────────┬───────────┘         └─────────────────────┘
          response                 page-table walker port
```

* **Shared TLB (`fa_tlb`).** This is a 128-entry CAM of {VPN, valid} tags
  with a {PPN, attributes} data part and true-LRU replacement. For the
  looked-up VPN it also reports which of the four 4 KB pages of its aligned
  16 KB group it holds, with their PPNs. It can invalidate a chosen subset of
  that group in one cycle. Both of these exist for promotion.
* **Promotion bank (`subblock_bank`).** Each entry is one 16 KB group tag
  with a block-valid bit. Per 4 KB subblock it holds a valid bit, a PPN and
  attributes. The four PPNs are independent, so a promoted group does not need
  contiguous physical frames. A lookup reads out only the addressed
  subblock. The bank also shows its LRU entry, so the controller can save that
  entry before an insert overwrites it.
* **Bank tag registers (`bank_tag_regs`).** Each bank has a task tag, a
  *current* bit, a *valid* bit and LRU bits. At most one bank is current.
* **Bank multiplexer (`bank_select_mux`).** This is an AND-OR mux that passes
  the current bank's outputs, plus a demux that steers the lookup-used and
  insert strobes to the current bank only. All banks see the VPN, but only
  the current bank's comparators are enabled.
* **Control logic (`lcs_tlb_ctrl`).** A four-state controller (IDLE, WB,
  WAIT, FILL) that sequences everything below.

## What happens on a translation

A request's VPN goes to the shared TLB and the current bank in the same
cycle. A page is never in both places at once; an assertion checks this.

1. **Shared hit or bank hit.** The response (physical address = PPN ++ page
   offset, attributes, source) appears in the next cycle. The LRU state of
   the structure that hit is updated.
2. **Miss everywhere.** The VPN goes to the page-table walker. While the walk
   is outstanding, the controller checks whether the missing page completes a
   16 KB group, that is, whether the group's other three pages are all in
   the shared TLB:
   * **No.** When the walker answers, the page is filled into the shared TLB.
   * **Yes: promotion.** The three pages' PPNs are captured, and the pages
     are invalidated in the shared TLB in the miss cycle. When the walker
     answers, the whole group is inserted into the current bank as one entry.
     The new page takes its subblock and the three captured pages take the
     others.
   * **Promotion into a full bank: victim write-back.** The bank's LRU group
     is split into its four 4 KB translations. These are written back into
     the shared TLB, one per cycle, in the four cycles after the miss, while
     the walk is still running. The shared TLB therefore also acts as a victim
     buffer for the banks. The group is invalidated before the write-back so
     that the write-back can never evict the pages being promoted. It fills
     the three freed slots first.
3. **No bank is current.** This happens after a context switch, a clear or
   a reset. The walked translation is first used to find the task's bank:
   its task tag is compared with every valid bank's tag.
   * On a match, that bank becomes current again, with all the groups it
     held before the switch.
   * Otherwise a victim bank is chosen (an invalid bank first, else the least
     recently selected one). It is flushed, tagged with the new task and
     made current.

   In both cases the LRU bits of all banks are updated. On the next cycle the
   page is filled into the shared TLB, unless the reselected bank already
   maps it.

**Task tag.** By default (`TASK_FROM_PPN = 1`) the task tag is the PPN of
the first translation made for the task after a switch. With an instruction
TLB, that first translation is the resume address's page. So no PID needs to
reach the TLB, but a task is only recognised when it resumes on the same
page. With `TASK_FROM_PPN = 0`, the `pid_i` input presented with the request
is used instead.

**Operating-system operations** are taken between translations
(`os_ready_o`), ahead of a waiting request:

| operation | shared TLB | bank tag registers | bank contents |
|---|---|---|---|
| `ctx_switch_i` (context switch) | flushed | current bits cleared | kept |
| `clear_tlb_i` (page swapped out, frame released) | flushed | valid and current bits cleared | flushed when the bank is reallocated |

The OS therefore must assert the clear whenever a mapping that a bank may
hold becomes stale. A context switch alone never invalidates a bank.

## Interface and timing

All TLBs in `rtl/` share the same port scheme (widths shown for `lcs_tlb`'s
defaults):

| port | dir | width | meaning |
|---|---|---|---|
| `req_valid_i` / `req_ready_o` | in/out | 1/1 | request handshake; ready only in IDLE with no OS operation pending |
| `req_vaddr_i` | in | 32 | virtual address |
| `pid_i` | in | 20 | task id, used as task tag when `TASK_FROM_PPN = 0` |
| `resp_valid_o` | out | 1 | one-cycle pulse per request |
| `resp_paddr_o`, `resp_attr_o` | out | 32, 4 | translation |
| `resp_src_o` | out | 2 | `SRC_SHARED`, `SRC_BANK` or `SRC_WALK` (`tlb_pkg::resp_src_e`) |
| `ctx_switch_i`, `clear_tlb_i`, `os_ready_o` | in/in/out | 1 | OS operations, taken when `os_ready_o` is high |
| `walk_req_valid_o` / `walk_req_ready_i`, `walk_req_vpn_o` | out/in, out | 1/1, 20 | walker request, held until taken |
| `walk_resp_valid_i`, `walk_resp_ppn_i`, `walk_resp_attr_i` | in | 1, 20, 4 | walker answer: one pulse, at least one cycle after the request was taken |
| `bank_current_o`, `bank_valid_o` | out | 16, 16 | bank tag register state |
| `ev_o` | out | `tlb_events_t` | one-cycle pulses: hit_shared, hit_bank, miss, promote, victim_wb, bank_reuse, bank_alloc, ctx_switch, clear |

Latency:

* A hit responds in the cycle after the request.
* A miss responds two cycles after the walker's response pulse, or three when
  a bank must be selected first.
* The victim write-back takes four cycles but overlaps the walk. It adds
  nothing as long as the walk takes longer.
* One translation is in flight at a time. No request is accepted during miss
  handling.

## The large-page banked TLB (`orig_tlb`)

This design has 32 banks of 8 fully associative entries for 1 MB pages,
each bank an `fa_tlb`. The bank tag registers and the bank multiplexer are
the same as above. The bank tag registers behave the same way too:

* A context switch clears the current bits.
* The first miss afterwards selects or allocates the task's bank.
* Misses fill the current bank, with LRU replacement inside it.

There is no shared TLB and no promotion. It depends on large pages: with
8 entries per task, 4 KB pages cover far too little memory, which is the
weakness the small-page design addresses.

## Top level (`tlb_top`)

`tlb_top` instantiates both designs side by side with their default sizes.
Each has its own prefixed ports (`lcs_*`, `orig_*`); they share only clock
and reset. In a processor each would be instantiated twice, as the
instruction TLB and as the data TLB.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `lcs_tlb` | `SH_ENTRIES` | 128 | shared TLB entries |
| | `BANKS` | 16 | promotion banks |
| | `BANK_ENTRIES` | 2 | groups per bank |
| | `SUB_BITS` | 2 | 4 base pages per group (16 KB / 4 KB) |
| | `PAGE_BITS` | 12 | 4 KB base page; 13 and 14 give the 8 KB and 16 KB variants (both simulated in `tb_ctx_workload`) |
| `orig_tlb` | `BANKS`, `BANK_ENTRIES`, `PAGE_BITS` | 32, 8, 20 | 1 MB pages |
| both | `VA_W`, `PA_W`, `ATTR_W` | 32, 32, 4 | this implementation's choice |
| both | `TASK_FROM_PPN` | 1 | task tag = first translated PPN (1) or `pid_i` (0) |

## Where this implementation makes its own choices

The thesis describes the organisation and the behaviour in each situation
(hit, miss, promotion, write-back, no current bank, context switch, clear).
It leaves the following open, and these are this implementation's choices:

* 32-bit virtual and physical addresses and a 4-bit attribute field.
* True-LRU replacement (age counters) for the shared TLB, in the banks and
  across banks. Invalid ways are chosen first.
* All handshakes, the four-state controller, and the cycle timing above.
* **Promotion.** The walked page goes straight into the new bank entry, not
  through the shared TLB. Promotion needs a current bank.
* **Early invalidation.** The three shared pages of a promoted group are
  invalidated in the miss cycle rather than when the walk returns.
* **Reselected bank.** When no bank is current, the walked page is not
  filled into the shared TLB if the reselected bank already maps it. The
  thesis fills it unconditionally, which would leave the page in two places.
* **Clear TLB** also clears the current bits.
* **`orig_tlb` sequencing.** Its context-switch and miss sequencing are taken
  to be the same as the small-page design's, without the shared TLB.

Not built: the page-table walker and the OS miss handler, which belong to
the host system. The testbenches provide a behavioural walker. The thesis's
miss-rate results come from trace-driven simulation of SPEC2000 programs,
which cannot be reproduced here. The testbenches use synthetic multi-task
address streams.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_lru_age` | ages and victim against a recency list, random touches and valid masks |
| `tb_fa_tlb` | lookups, group report, fills, group invalidation and flush against a reference copy with its own LRU list |
| `tb_subblock_bank` | subblock hits, victim report, inserts and flush against a reference |
| `tb_bank_select_mux` | data and strobe steering for every selection |
| `tb_bank_tag_regs` | task match, victim-bank choice and flush, current/valid bits under switches and clears |
| `tb_lcs_tlb_ctrl` | directed sequence at default sizes: bank allocation, shared hit, promotion, write-back, survival across a context switch, bank reuse by task tag, clear; exact latencies |
| `tb_lcs_tlb` | 30 000 random requests of 6 tasks on a reduced TLB (16 shared entries, 4 banks) with PID task tags; every translation checked against the page table, every mechanism required to occur |
| `tb_orig_tlb` | the same for the large-page design (4 banks × 4 entries) |
| `tb_tlb_top` | both designs at full default size, 40 000 requests each, 20 and 40 tasks, PPN task tags; all mechanisms counted and required |
| `tb_ctx_workload` (with `tb_ws_lane`) | miss counts of both designs at several page sizes, best and worst situation, against a conventional 256-entry TLB; every translation checked |

`tb_ctx_workload` measures what the banks are for. One program runs with a
context switch every 2 000 requests (16 000 requests per run). Its address
stream resumes on the same address after every switch, then moves through a
128 KB window that drifts in 16 KB steps over the working set. Each design
runs it in two situations:
* **best:** a plain context switch, so the program's bank survives;
* **worst:** a clear-TLB at every switch, so the banks are lost.

The reference is a conventional 256-entry LRU TLB with the same page size,
flushed at every switch. Five lanes run at once, each at default sizes
except the page size: `lcs_tlb` with 4, 8 and 16 KB pages, and `orig_tlb`
with 1 MB and 4 KB pages. The improvement is conventional misses divided by
the design's misses (higher is better):

| design, page | 384 KB set: best | worst | 1.5 MB set: best | worst |
|---|---|---|---|---|
| `lcs_tlb` 4 KB | 1.07 | 1.00 | 0.70 | 0.70 |
| `lcs_tlb` 8 KB | 1.16 | 1.00 | 0.94 | 0.91 |
| `lcs_tlb` 16 KB | 1.39 | 1.00 | 1.08 | 1.00 |
| `orig_tlb` 1 MB | 1.00 | 1.00 | 1.77 | 1.00 |
| `orig_tlb` 4 KB | 0.06 | 0.06 | 0.22 | 0.21 |

How to read these:
* **Working set within reach.** When one bank plus the shared TLB can map
  the working set (136 pages at 4 KB), the surviving bank saves misses after
  every switch. The saving grows with the page size.
* **Working set beyond reach.** One program can use only 136 of the 256
  slots, so at small pages the design loses to the conventional TLB.
* **`orig_tlb`.** It does well with 1 MB pages and is useless with 4 KB
  pages, where each program has only eight entries.
* **Worst situation.** A clear-TLB at every switch brings the design down to
  about the conventional TLB.

These trends match the ones reported for this design. The streams are
synthetic, not program traces, so the numbers themselves are not comparable.

Two groups of output bits never change after synthesis, by design:
* In `orig_tlb`, the event bits for a shared-TLB hit, a promotion and a
  victim write-back stay 0, because that design has none of these.
* In `lcs_tlb_ctrl`, the bank insert valid mask is all ones, because a
  promotion always carries a complete subblock. The shared-TLB invalidate
  group is wired straight from the request address.

`tb/tb_walker.sv` is the behavioural walker. `tb/tb_pt_pkg.sv` is the page
table: the PPN is a hash of (task, VPN) with the task number in the top four
bits.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/tlb_pkg.sv tb/tb_tlb_top.sv --top-module tb_tlb_top -Mdir obj
./obj/Vtb_tlb_top
```

The full-size end-to-end test takes about 15 seconds. `tb_ctx_workload`
takes about a minute and a half.
