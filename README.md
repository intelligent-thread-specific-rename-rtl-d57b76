# Thread-specific rename register caps for an SMT core

In a simultaneous multi-threading (SMT) core, all threads rename into one
shared physical register file. A thread that misses often in the L2 cache
holds its registers for hundreds of cycles. Meanwhile it keeps renaming, so it
can end up holding most of the shared registers and stall threads that would
have used them well. This RTL implements a rename stage that gives **each
thread its own cap** on shared rename registers, and moves those caps every
2000 cycles. Threads with few L2 misses usually need many registers to reach
full speed, so their caps grow. Threads with many misses rarely gain from more
registers, so their caps shrink, but never below a floor that keeps them from
starving.

The design has two halves:

* a **cap controller** that counts L2 misses per thread, ranks the threads
  once per window and steps the caps up or down;
* a **rename datapath**: per-thread rename tables, a shared free list and
  per-thread occupancy counters, plus a gate that refuses a new destination
  register to any thread already at its cap.

The rest of the core is outside this RTL and appears only as ports: fetch,
decode, reorder buffer (ROB), issue queue, execution units and caches.

## Register file organisation

With `N` threads and `RA` architectural registers per thread, `N*RA` of the
`RT` physical registers are always mapped: each thread always holds a
mapping for every one of its architectural registers. Only the remainder is
really shared:

    RR = RT - N*RA            (shared rename registers)

A thread's **occupancy** is the number of registers it holds beyond its `RA`
mapped ones. Occupancy rises by one for each renamed instruction with a
destination. It falls by one when such an instruction commits, because commit
frees the register that the instruction's destination used to map to. The
sum of all occupancies plus the free-list count is always `RR`.

Only integer registers are modelled. Floating-point registers are less
contended and are not capped.

## The cap algorithm

Four constants bound the caps:

| symbol | meaning | formula | default (N=4, RT=160, RA=32) |
|---|---|---|---|
| `RR` | shared rename registers | `RT - N*RA` | 32 |
| `CM` | maximum sum of caps | `RR + 2N` | 40 |
| `CL` | lowest cap | 4 | 4 |
| `CH` | highest cap | `2*CM/N - CL` | 16 |
| - | starting cap of every thread | `CM/N` | 10 |

`CM` is a little larger than `RR` on purpose. A thread under its cap can
still be unable to rename for other reasons, and the headroom lets other
threads use the registers it leaves idle. `CH` is as far above the even share
`CM/N` as `CL` is below it.

At the end of each 2000-cycle window:

1. The threads are ranked by how many L2 misses they had in that window.
   Rank 0 has the fewest misses. Equal counts are ordered by thread number.
2. Every thread in the **high-miss half** (rank >= N/2) loses one from its
   cap, unless the cap is already `CL`.
3. Then each thread in the **low-miss half** gains one, in rank order and
   fewest misses first, unless its cap is already `CH` or the sum of caps
   already equals `CM`.

Increments come after decrements, so the update stays balanced. If a
high-miss thread is stuck at `CL`, the register it did not give up is not
handed to anyone, and the sum of caps never exceeds `CM`. Example with the
defaults: if threads 0 and 1 always miss less than threads 2 and 3, the caps
go 10/10/10/10, 11/11/9/9, and so on up to 16/16/4/4 after six windows. They
then stay there. `tb_regcap_top` checks exactly this sequence.

The cap is a **limit, not a reservation**. A thread below its cap competes
for free registers like any other thread. When a cap drops below a thread's
current occupancy, nothing is taken back. The thread simply cannot rename
another destination until commits bring it back under the cap.

## Rename datapath

`rename_unit` serves one thread per cycle, chosen round-robin among the
threads that can rename at least one instruction. It renames up to `W` (8)
of that thread's waiting instructions, in program order:

* Source operands read the thread's rename table. If an earlier instruction
  in the same group writes the same register, the source takes that
  instruction's new register instead (intra-group bypass).
* Each destination takes the next register from the free list. The register
  it replaces is reported as `old_pdst`. The ROB keeps it and returns it on
  the commit port when the instruction commits.
* The group ends at the first destination that would take the thread past
  `cap - occupancy` or find the free list empty. Later instructions wait for
  a later cycle.

`free_list` is a circular FIFO of `RR` register numbers. After reset it holds
registers `N*RA .. RT-1`, and each thread `t` starts with its architectural
register `a` mapped to physical register `t*RA + a`. Each cycle the FIFO can
give out up to `W` registers and take back up to `W`.

## Timing

* `ren_valid`, `ren_tid`, `ren_count` and `ren[]` are combinational in the
  cycle the instructions are offered. Decode removes `ren_count`
  instructions from the head of thread `ren_tid`'s queue at the clock edge.
* Rename tables, occupancy and the free list update at that edge. Commits in
  a cycle free their registers for use from the next cycle.
* `window_end` is high on the last cycle of each window. That same edge
  latches the miss counts. The caps change one cycle later (`cap_update`),
  so the first change becomes visible 2001 cycles after reset is released.
* Reset is synchronous and active high.

## Modules

| module | role |
|---|---|
| `regcap_pkg` | constants, the formulas above, instruction/commit record types |
| `window_timer` | 2000-cycle window counter, `window_end` pulse |
| `l2_miss_counter` | per-thread miss counts, latched per window |
| `miss_ranker` | combinational ranking and low-/high-miss halves |
| `cap_adjuster` | cap registers and the per-window update with `CL`/`CH`/`CM` |
| `free_list` | FIFO of free shared registers, `W` out / `W` in per cycle |
| `rename_unit` | rename tables, occupancy, cap gate, round-robin choice |
| `regcap_top` | all of the above, wired together |

### Top-level ports (`regcap_top`)

| port | dir | meaning |
|---|---|---|
| `l2_miss[N]` | in | L2 miss of thread t this cycle (at most one per thread per cycle) |
| `inst_count[N]`, `inst[N][W]` | in | decoded instructions waiting per thread (`dec_inst_t`: has_dest, dst, src1, src2) |
| `commit[W]` | in | commit slots (`commit_t`: valid, tid, has_dest, old_pdst) |
| `ren_valid`, `ren_tid`, `ren_count`, `ren[W]` | out | this cycle's renamed group (`ren_inst_t`: pdst, old_pdst, psrc1, psrc2) |
| `cap[N]`, `cap_sum`, `occ[N]`, `free_count` | out | current caps, their sum, occupancy, free registers |
| `window_misses[N]`, `window_end`, `cap_update` | out | last window's miss counts and window timing |
| `cap_inc`, `cap_dec`, `cap_at_low`, `cap_at_high`, `cap_sum_full` | out | what the last update did or was prevented from doing |
| `cap_block[N]`, `fl_block` | out | threads held back by their cap; rename held back by an empty free list |

## Parameters and configurations

`regcap_top` has the parameters `N` (4), `RT` (160), `RA` (32), `W` (8),
`WINDOW` (2000) and `CL` (4). `CM`, `CH` and the starting cap are derived
from them. The 4-thread, 160-register default is the configuration where
register competition is fiercest and capping gains the most. For 8 threads
use `N=8, RT=320`, which gives `RR = 64`, `CM = 80`, `CH = 16` and a
starting cap of 10. Physical register numbers are 9 bits wide
(`PREG_W` in `regcap_pkg`), so `RT` can be up to 511. `TID_W` = 3 allows up
to 8 threads.

## Design choices beyond the algorithm

These points were left open by the algorithm and are this design's own:

* **Sum limit.** The caps start with their sum equal to `CM`, and the
  settled example also sums to `CM`. So the sum may equal `CM`; the update
  only prevents it from going over.
* **Update order.** Decrements come first, then increments in rank order.
* **Ties.** Equal miss counts are ranked by thread number.
* **Register utilisation not used.** The algorithm's motivation also speaks
  of reassigning registers a thread is not using. No concrete rule for that
  is defined, so only the L2-miss ranking drives the caps.
* **Rename bandwidth.** The whole rename width goes to one thread per cycle,
  round-robin. A group is cut at the first destination that does not fit.
* **Miss reports.** At most one L2 miss is counted per thread per cycle.
  Counters are 11 bits and saturate.
* **Not modelled.** Branch-mispredict recovery of the rename tables is not
  included. A core that squashes instructions must restore the tables and
  the occupancy counters, and return squashed destinations to the free list.
* **Caps and the free list.** The caps bound occupancy, and the free list
  bounds the total. Both checks happen in the same cycle.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_window_timer` | pulse period 2000, pulse position, pause with `enable` low |
| `tb_l2_miss_counter` | random miss streams against counted totals, hold and clear per window |
| `tb_miss_ranker` | ranks against a sorting model, including many ties |
| `tb_cap_adjuster` | the 10 -> 16/16/4/4 example, then 3000 random rankings against a model; `CL`, `CH` and `CM` each block an update |
| `tb_free_list` | FIFO order and count against a queue model; drains empty and refills |
| `tb_rename_unit` | every renamed group against a one-instruction-at-a-time reference model: round-robin thread, group length, sources with bypass, old mappings, allocated registers, occupancy; caps change at random, also below occupancy |
| `tb_regcap_top` | full default size over 14 windows: miss counts, caps against a model (reaching 16/16/4/4), no register given out twice, no thread over its cap, register conservation; every mechanism (increment, decrement, each limit, cap stall, empty free list, group cut, thread switch, bypass) must occur |
| `tb_regcap_8thread` | the same at `N=8, RT=320`, reaching 16 (x4) and 4 (x4) |

To simulate one, for example the top:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/regcap_pkg.sv \
        tb/tb_regcap_top.sv --top-module tb_regcap_top -o sim
    ./obj_dir/sim

Every testbench runs in under a second once built. The
RTL is synthesizable. Concurrent assertions check that the cap sum never
exceeds `CM`, that the free list never overflows or underflows, and that no
occupancy goes out of range.

The testbenches use synthetic L2-miss and commit streams. Real program mixes
need the rest of the core, which is not part of this RTL. The tests show that
the mechanism behaves as specified. They do not show how much throughput it
gains.
