# Gracefully degradable TMR processor cluster

A cluster of processor modules (PMs) runs its programs in **triads**: three PMs
execute the same code in lock-step, and their results are compared by majority
vote before they reach memory. A wrong result from one PM is outvoted, so a
fault is masked. When a PM fails for good it is retired, and the survivors are
regrouped into as many triads as their number allows. The cluster loses
capacity one triad at a time instead of failing as a whole: it *degrades
gracefully*.

Four mechanisms make this work, and this RTL builds all four:

1. **A reconfiguration ring** (DRN, "dynamic reconfiguration network"). Its
   modules are DRNMs, one per three PMs. After a failure they regroup the
   surviving PMs into triads by passing a few messages between ring
   neighbours. Only a PM's neighbours can lend it a partner.
2. **An all-digital PLL (ADPLL) per DRNM.** It keeps the three free-running
   clocks of a triad in step by deleting or inserting single clock pulses
   whenever their skew exceeds two pulses.
3. **A bus that votes while it transmits** (MAT bus, "monitoring at
   transmission"). The three members of a triad drive the same word onto
   wired-AND lines at once, and each compares the bus with its own word. A
   mismatch pulls a wired-OR *invalidate* line; the memory drops the
   transfer and the triad retries.
4. **A pipelined voter (PV)** for a single triad. Each processor writes into its
   own buffer at its own pace. A word is voted as soon as all three buffers hold
   one, so skew between the clocks costs buffer space instead of stalls.

Two helpers complete the picture. An **interrupt synchronizer** gives an
external interrupt to all three members of a triad after the same number of
their own clock ticks, so that they stay in the same state. A memory-side
helper handles realignment. **Page update tags** record which
pages of main memory were written. After a fault only those pages need to be
re-voted (realigned). The default page count, 6320 pages for 4·10⁶ words, is
the optimum of the page-size analysis this design follows.

Processors, caches, main memory and the oscillators are not part of the RTL.
Their signals are ports of the top module, and the testbenches model them.

## Module map

| File | What it is |
|------|------------|
| `rtl/gd_pkg.sv` | Shared types: ring message enum, ring link struct, clock-source enum, ID width |
| `rtl/gd_cluster.sv` | Top: DRN ring, 15 MAT nodes, MAT bus, bus arbiter, page tags, stand-alone PV |
| `rtl/drn.sv` | Ring of `N_DRNM` DRNMs and the wired-OR error line |
| `rtl/drnm.sv` | One ring module: grouping controller, clock multiplexers, ADPLL, bypass |
| `rtl/adpll.sv` | Three-slice ADPLL: dividers, median skew, pulse deletion/insertion |
| `rtl/mat_node.sv` | Per-PM write queue and bus interface: drive, monitor, invalidate, retry |
| `rtl/mat_bus.sv` | Wired-AND data lines and wired-OR invalidate line |
| `rtl/bus_arbiter.sv` | Grants the bus to a triad whose three queues all hold a word |
| `rtl/pipelined_voter.sv` | Three channel buffers, vote enable, majority voter, watchdog |
| `rtl/pv_fifo.sv` | Channel buffer with ready bit (also the MAT write queue) |
| `rtl/majority_voter.sv` | Bit-wise 2-of-3 majority with per-channel disagreement flags |
| `rtl/vote_watchdog.sv` | Time-out when some channels are ready and one never becomes so |
| `rtl/irq_sync.sv` | Hands an external interrupt to the three members of a triad at the same logical step |
| `rtl/page_tag_scan.sv` | One update tag per memory page and the realignment scanner |

## Time base

Everything runs on a single **sampling clock** `clk`, with an asynchronous
active-low reset `rst_n`. A PM's clock is not a separate clock domain here. It
is a stream of one-cycle **ticks** on `pm_osc[i]` (raw oscillator) and
`pm_clk[i]` (the corrected clock handed back to the PM). The ADPLL deletes a
pulse by swallowing a tick and inserts one by emitting an extra tick in a
cycle with no raw tick. Insertion therefore needs the sampling clock to run
at least twice as fast as any PM clock.

The testbenches use the periods 164, 170 and 176 time units. These are three
clocks 7 % apart. Here they appear as a tick every 4.1, 4.25 and 4.4
sampling cycles.

## The reconfiguration ring

### Structure

Each DRNM has five ports. Ports R2–R4 connect its own three PMs. R1 faces the
next DRNM on the ring and R5 the previous one, so R1 of DRNM *i* is wired to
R5 of DRNM *i*+1. A ring link (`ring_link_t`) carries these fields:

* `msg`: a request going forward, or a reply going backward on the same link;
* `src_clk`: a lent PM's raw clock, travelling to the DRNM that hosts its
  triad;
* `ret_clk`, `host_valid`, `host_id`: the corrected clock and the host's
  identity, travelling back to the lent PM.

All link outputs are registered, so a message moves one DRNM per cycle. This
also holds through a bypassed DRNM, which keeps the ring free of
combinational loops.

A DRNM whose three PMs are all healthy (*f* = 3) or all retired (*f* = 0) takes
no part in regrouping. It closes its **bypass** and forwards ring traffic
unchanged. A 3-DRNM keeps its own triad throughout.

### Grouping after a failure

The processors' error handler retires a PM by raising `pm_fail[i]`. The DRNM
that sees this becomes the **initiator** and raises its `err_out`. The OR of
all these lines is the **error line** `err`. On the error line every DRNM with
one or two healthy PMs (a 1- or 2-DRNM) opens its bypass and drops its old
grouping. A walk around the ring then starts at the initiator. Each message
says what the sender still needs:

| Message | Meaning |
|---------|---------|
| `INVITE` | "I hold two PMs and need one more." |
| `JOIN` | "I have one PM left over that can join a triad downstream." |
| `DONE` | "Everything up to me is grouped." |
| `ACK` | Reply: the request is granted (a PM is lent, or a PM is accepted). |
| `REJECT` | Reply from the initiator: the walk has come round, nothing left. |

The initiator sends `INVITE` (*f* = 2), `JOIN` (*f* = 1) or `DONE`. A
participant that receives a request on R5 does the following:

| Request on R5 | Own *f* | Action |
|---------------|---------|--------|
| `INVITE` | 1 | `ACK` back, lend its PM upstream, send `DONE` on |
| `INVITE` | 2 | `ACK` back, lend one PM upstream, send `JOIN` on for the other; lend it downstream if that is granted |
| `JOIN` | 2 | `ACK` back, host a triad of its two PMs plus the upstream one, send `DONE` on |
| `JOIN` | 1 | Send `INVITE` on; when granted, host a triad of upstream, own and downstream PM, and `ACK` the upstream PM |
| `DONE` | 2 | Send `INVITE` on; when granted, host a triad with the downstream PM |
| `DONE` | 1 | Send `JOIN` on; when granted, lend its PM downstream |

The walk ends when a request comes back round to the initiator on R5. The
initiator answers a returning `INVITE` or `JOIN` with `REJECT`: that PM stays
unused. A grant to the initiator's own first request arrives on R1. It may
come after the walk has ended, because it travels back through bypassed
modules. So the initiator holds the error line for another `N_RING`+1 cycles
before releasing it. When the error line drops, every DRNM restarts its ADPLL
and the new triads run. A failure that arrives while a walk is in progress is
held until the error line drops and then starts a new walk.

The result: every 3-DRNM keeps its triad, and the PMs of the 1- and 2-DRNMs
form ⌊Σ*f*/3⌋ further triads, each from neighbouring DRNMs. A lent PM learns
its host from `host_id`, which comes back through the same registered hops.
It therefore sees its new tag a few cycles after the error line drops.

**Example (15 PMs).** Five DRNMs, numbered 0–4 here, start with five triads.
One PM of DRNM 1 fails, then all of DRNM 2, two of DRNM 4 and one of
DRNM 0. That leaves 2 healthy PMs on DRNM 0, 2 on DRNM 1, 3 on DRNM 3 and 1 on
DRNM 4. The result has two triads. DRNM 3 keeps its own. DRNM 0 borrows one
PM from DRNM 1. The leftover PMs of DRNM 1 and DRNM 4 stay idle, since two PMs
are not enough for a triad. The end-to-end testbench runs exactly this
sequence.

### Outputs per PM

* `pm_active[i]`: the PM is in a triad.
* `pm_tag[i]`: the number of the DRNM hosting its triad.
* `pm_clk[i]`: the PM's corrected clock.

An unused healthy PM gets no clock. The MAT bus and the arbiter identify a
triad by its tag.

## Keeping a triad in step: the ADPLL

Each DRNM holds one ADPLL with three slices. The slices take the clocks of the
(up to three) PMs the DRNM hosts, selected by multiplexers: own PMs, or R1/R5
for lent ones. Each slice divides its corrected clock by `DIV` = 16. The
divider's wrap is the **synchronisation clock**.

At its own wrap, a slice reads the positions of the other two dividers. From
them it computes its skew against each of them in corrected pulses, as a
signed value between −`DIV`/2 and `DIV`/2. It then takes the median of
{0, skew to j, skew to k}. The median follows the majority: one clock that
drifts away from the other two is pulled back to them, and the two good ones
are not pulled away. When the median exceeds `SKEW_MAX` = 2 pulses, the slice
deletes that many pulses (it is ahead) or inserts that many (it is behind),
at most one per raw tick. `locked` means every slice is within
`SKEW_MAX`+1 pulses. `restart` clears all dividers so that a new triad starts
in phase.

Deleting pulses slows a PM's clock; inserting pulses speeds it up. In the
testbenches the three clocks, 7 % apart, end up running at the middle clock's
rate. Each corrected clock stays within 4 pulses of the middle one.

## The MAT bus

Each PM writes into its own `mat_node`, an 8-word queue (`pm_wr_en`,
`pm_wr_data`, `pm_full`). `bus_arbiter` sees which PMs are active and ready,
and with which tag. A triad is eligible once all three of its members hold a
word. Eligible triads are granted round-robin for one cycle, followed by an
idle cycle, and only while `mem_ready` is high.

In the grant cycle the three members drive their head word. Every other node
drives all ones, so the wired-AND bus carries the AND of the three words. Each
member compares the bus with its own word:

* If all agree, the word is written to memory (`mem_wr_valid`, `mem_wr_data`)
  and every member pops its queue.
* If any member sees a difference, it raises `invalidate`, which is wired-OR
  into `inval_bus`. The memory ignores the cycle, nobody pops, and the triad
  is granted again later.

After `MAX_RETRY` = 3 invalidated attempts in a row, `pm_perm_fault` is raised
and the node stops requesting until `pm_clear_fault`. All members see the same
invalidate line, so all three raise `pm_perm_fault`. Choosing which PM to retire
is left to the processors' error handler. A node whose PM leaves its triad
flushes its queue, since a regrouped triad restarts from saved state.

The wired-AND only hides a *faulty one* behind a zero. So it is the
comparison that catches every disagreement: a member that wrote a one where
the others wrote a zero still sees its own bit differ from the bus.

## The pipelined voter

`pipelined_voter` is the voter for a triad in front of its own memory. It has
these parts:

* **Buffers.** Three `pv_fifo` channel buffers of `DEPTH` = 8 words. Each has a
  ready bit (not empty) and a `full` flag back to its processor.
* **Vote enable.** This is the AND of the three ready bits, gated by a free
  output register.
* **Voting.** The bit-wise majority of the three head words is registered
  towards memory (`mem_valid`, `mem_data`, `mem_ready`). If a channel
  disagreed, `fault_valid` pulses with `fault_mask` naming it; the word is
  still written correctly.
* **Watchdog.** `vote_watchdog` counts while some, but not all, channels are
  ready and no vote happens. After `TIMEOUT` = 64 cycles it pulses `timeout`,
  with `stalled` naming the missing channels.

Latency from the third channel's write to `mem_valid` is two cycles. The top
brings the voter's ports out separately (`pv_*`); it stands beside the MAT-bus
cluster, not inside it.

## Interrupts at an identical logical step

The members of a triad never see a common instant: their clocks are only
kept within a few pulses of each other. If an interrupt were taken "now",
one member might take it one instruction earlier than another, and their
states would diverge. `irq_sync` counts the ticks of every PM's own running
clock in synchronization cycles of `DIV` ticks, numbered modulo 4. The counts
restart while the PM is in no triad, so the members of a new triad start
together.

When `irq_req[h]` arrives for the triad hosted by DRNM *h*, the target is
the second-next cycle number of the leading member. Each member raises
`pm_irq` on the tick that ends its cycle before that target, which is a
multiple of `DIV` ticks. The members are never a whole cycle apart, so the
target is still ahead of all of them. All three take the interrupt after the
same number of their own ticks, within three synchronization cycles.

A request for a host without a complete triad, or while one is pending, is
dropped. A pending request is cancelled if the triad's membership changes.

## Memory realignment with page tags

`page_tag_scan` divides `MEM_WORDS` = 4 000 000 words into `K` = 6320 pages of
⌈W/K⌉ = 633 words; the last page is shorter. Every memory write sets its
page's tag. In the top, the address is taken from bits [31:8] of the bus word.

On `realign_start` the scanner looks at one tag per cycle. For a tagged page
it issues every word address on `rv_valid`/`rv_addr`, where an outside voter
reads, votes and rewrites the word, taking it with `rv_ready`. It clears the
tag after the page's last word. With the voter always ready, a scan of *F*
tagged pages takes exactly K + F·633 cycles. This is the realignment time
(K + F·W/K)·t_v with one vote per cycle; for the 10 faulty pages of the
optimisation example it is 12 650 cycles. A running count of tagged pages is
on `n_tagged`.

## Parameters of the top

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `N_DRNM` | 5 | DRN modules; `N_PM` = 3·`N_DRNM` processor modules |
| `W` | 32 | Bus word: 24-bit address, 8-bit data |
| `DEPTH` | 8 | Write queue and voter buffer depth |
| `MAX_RETRY` | 3 | Invalidated attempts before a permanent fault |
| `DIV` | 16 | ADPLL divider |
| `SKEW_MAX` | 2 | ADPLL correction threshold, in pulses |
| `TIMEOUT` | 64 | Voter watchdog, cycles |
| `MEM_WORDS` | 4 000 000 | Main memory size in words |
| `K_PAGES` | 6320 | Number of update-tagged pages |

The source design gives `N_DRNM`, `DEPTH`, `DIV`, `SKEW_MAX`, `MEM_WORDS` and
`K_PAGES`. The others are choices made here.

## Where this design makes its own choices

* **Clocking.** The single sampling clock with PM clocks as ticks is this
  design's choice. A real implementation would switch actual clock lines.
* **Ring wiring.** The source gives two ring wirings. One sentence pairs R5 of
  one module with R1 of the next. The message description and the algorithm
  send requests out on R1 and receive them on R5. The latter is followed.
* **Ring protocol details.** These are choices made here: the message
  encoding, one hop per cycle, registered links in bypass, replies travelling
  back on the same link, and the initiator's guard time. The control signals
  that travel with a lent PM's clock are reduced to the host identifier.
* **ADPLL phase detector.** Reading the other dividers' positions at the own
  wrap, the median rule and correcting the full skew are choices made here.
  The original prototype broadcast divided clocks between separate logic
  devices and adjusted the rate when the skew exceeded two pulses.
* **MAT bus.** These are choices made here: the polarity (data on wired-AND,
  invalidate on wired-OR), the retry limit, perm-fault on all three members,
  the round-robin arbiter with an idle cycle, and flushing on regrouping.
* **Voter.** The one-cycle vote, the output register and the watchdog length
  are choices made here. The source design's recovery sequence after a
  masked fault (interrupts, cache flush, write-back of registers) is software
  and is not built.
* **Interrupts.** The source design offers two ways to take external events at
  the same logical step: precise interrupts in the processors, or taking
  them at synchronization-cycle boundaries. Only the second is hardware
  outside the processor and is built. Its counting scheme is a choice made
  here.
* **Page tags.** Rounding the page size up and the voter handshake are choices
  made here.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/gd_pkg.sv tb/tb_gd_cluster.sv \
          --top-module tb_gd_cluster -o sim && ./obj_dir/sim
```

Replace `tb_gd_cluster` with any testbench below. The package file must come
first.

| Testbench | What it covers |
|-----------|----------------|
| `tb_gd_cluster` | Whole cluster at default size: five triads writing through the MAT bus; a corrupting PM caught by invalidation and permanent fault; the 15-PM retirement example, step by step; memory held busy until every queue is full; page realignment; the stand-alone voter with a corrupt and a stopped channel. Counts each mechanism (invite, join, done, grant, reject, bypass, pulse correction, invalidate, permanent fault, full queues, voter masking and time-out, realignment, interrupts) and fails if one never happened. |
| `tb_drn` | The 15-PM example plus 40 random failure sequences. Checks the triad count ⌊Σ*f*/3⌋ + number of 3-DRNMs, and that no triad has a member count other than three. |
| `tb_drnm` | One DRNM against the testbench acting as both neighbours: every message rule. |
| `tb_adpll` | Three clocks 7 % apart: lock, mean rate, skew bound, restart. |
| `tb_mat_node`, `tb_mat_bus`, `tb_bus_arbiter` | Queue, drive, compare, retry, permanent fault; bus logic; eligibility and fairness of grants. |
| `tb_pipelined_voter`, `tb_pv_fifo`, `tb_majority_voter`, `tb_vote_watchdog` | Voting with uneven channel pace, masking, two-cycle latency, back-pressure, time-out. |
| `tb_irq_sync` | Two triads with skewed lock-step ticks: every member gets each interrupt once, at the same tick count, on a cycle boundary, within three cycles; requests to an incomplete triad are dropped. |
| `tb_page_tag_scan` | Full-size tags: exact scan time K + F·633, words issued, tags cleared. |
| `tb_pv_workload` | The voter experiment: write ratios 10–50 %, clocks 164/170/176, vote in half or one and a half instruction times. With the fast vote no queue exceeds one word. With the slow vote queues grow to about three words, below the 8-word depth. A stuck-at-1 data line injected halfway is masked on every affected word; the latency to the first masking is printed and falls as the write ratio rises. |

`tb_gd_cluster` runs the top with no parameter overrides. It takes about a
second in Verilator.

## Limits

* Processors, caches, the interleaved main memory, the interconnect between
  clusters and the oscillators are outside the RTL.
* The memory-access-time comparison of write-back and write-through caches is
  an analytical model and has no hardware counterpart here.
* The realignment voter that reads and rewrites the memory copies is outside;
  `page_tag_scan` only drives it.
