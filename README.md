# 3DRR: a three-dimensional round-robin scheduler for a common-input-buffer cell switch

An input-queued cell switch avoids head-of-line blocking by keeping one
virtual output queue (VOQ) per output. It still loses throughput to *buffer
blocking*. A plain input buffer can send only one cell per slot, even when
several of its queues could each have used a free output. This design lets a
group of K input ports share one **common input buffer** with N VOQs and K
links into the switch fabric. A group can then send up to K cells per slot to K
different outputs. All K cells may even have come in on the same input port.

That makes scheduling harder. Every slot, a central scheduler must choose up to
N (buffer, link, output) triples out of M x N candidate queues. Each output may
be used once, each link once, and every buffer should get a fair share. The
**3DRR scheduler** in this repository makes that choice with many small
round-robin units working in parallel. It produces one full schedule every
max(K, M) clock cycles.

The default configuration is a 16 x 16 switch built from four 4 x 4 common
input buffers: N = 16, K = 4, M = N/K = 4.

## Switch organisation (`dcib_switch`)

```
 in 0..3   -> common_input_buffer 0 --links 0..3  --\
 in 4..7   -> common_input_buffer 1 --links 4..7  ---+--> space_division_switch --> out 0..15
 ...                                                  |          ^ configuration
 in 12..15 -> common_input_buffer 3 --links 12..15 --/           |
                 | req (which VOQs hold cells)                    |
                 +--------------> tdrr_scheduler -----------------+  grant per link
```

* `common_input_buffer` takes up to K cells per cycle, from its K input ports.
  It files each cell into the VOQ of its destination. The VOQs are N circular
  queues of `DEPTH` cells each. When a queue is full, the arriving cell is
  dropped and `drop` is raised for that input. On a grant, link p pops the
  head of queue `grant_o[p]`. The popped cell is on the link for one cycle.
* `space_division_switch` is an N x N crossbar. Switch input `j*K + p` is
  link p of buffer j. Its configuration is loaded on the same edge on which the
  buffers pop, so cells and configuration always match.
* `tdrr_scheduler` sees, for every buffer j and output n, whether VOQ (j, n)
  holds a cell that is not already being sent (`req_live`). It returns a
  grant for every link.

## The scheduling idea

### The request matrix and its atomic pieces

Requests form an M x N matrix. Column j holds the N queue flags of buffer j.
The rows are cut into K *atomic* M x M matrices. Atomic matrix k covers
outputs k*M .. k*M+M-1.

Inside an atomic matrix, diagonal d is the set of cells
(buffer j, local output (j + d) mod M), for j = 0..M-1. The M cells of a
diagonal never share a buffer or an output. M small processors can therefore
decide them all in the same cycle. This is classic two-dimensional
round-robin (2DRR):

* there is one diagonal per cycle, and the M diagonals take M cycles;
* a request is granted when neither its buffer nor its output was granted
  earlier in the sweep;
* the sweep's start diagonal rotates from slot to slot, so no request stays at
  the lowest priority.

The result of one sweep is a matching. Each buffer gets at most one output per
atomic matrix. `atomic_rr_scheduler` implements one sweep.

### First projection: K phase-shifted copies (`parallel_rr_processor`)

Running K atomic sweeps side by side, one per atomic matrix, gives each buffer
up to K outputs, one from each group of M outputs. That schedule is already
conflict-free. It is poor, though, when a buffer's traffic is concentrated.
For example, a buffer whose cells all go to outputs 0..3 could get only one of
them.

The scheduler therefore runs **K copies** of this set of K sweeps on the same
requests, each in a different phase:

* copy i serves diagonal `(diag_base + i + cycle) mod M`;
* each copy finds a different matching;
* the unit holds K x K x M processors, 64 at the default size.

### The screen: rotating onto virtual ports (`first_projection_screen`)

Each buffer has K physical links. Copy i's result from atomic matrix k goes to
virtual port `(k + i) mod K` of its buffer. After this rotation, every port of
every buffer holds K candidate outputs, one from each copy. A single copy never
puts two candidates for the same output on one buffer. Different copies can,
on different ports, and the second projection deals with that.

In the concentrated example above, copy i finds output `(base + i) mod 4` and
places it on port i. The buffer ends up with four different outputs on its
four ports.

### Second projection: picking the final N (`highest_priority_selector`, `conditional_rr_selector`, `second_projection_result`)

The second projection runs for P round-robin cycles. Each cycle has two steps.

1. **Highest priority selector.** There is one selector per (buffer, port).
   An unfilled port scans its K candidates in round-robin copy order and
   takes the first usable one. A candidate is usable when its output has not
   been granted earlier in the slot and its queue still holds a cell.
2. **Conditional round-robin selector.** There is one selector per output.
   It keeps at most one requesting port per buffer, using a rotating port
   order that is the same for every buffer. It then grants one buffer with an
   M-to-1 round-robin. The ports of one buffer can point at the same queue,
   and this step keeps only one of them.

`second_projection_result` records the grants. It feeds the filled ports and
taken outputs back to step 1, and at the end of the slot it delivers the
schedule. A port that lost in one cycle tries its next candidate in the
following cycle.

The final schedule has these properties:

* no output is used twice;
* no link is used twice;
* no queue is granted twice;
* every grant points at a non-empty queue.

With a full request matrix, all N outputs are served in the first cycle.

### Fairness: how the start addresses rotate

Two start addresses rotate from slot to slot:

* the start diagonal of the first projection, modulo M;
* the start copy of the second projection, modulo K.

When many queues are backlogged, the first cycle of the second projection
fills most ports, and it fills them from the start copy. The diagonals that
copy served first therefore decide who is served.

If both addresses advanced by one every slot, the pipeline offset between the
two projections would make the favoured diagonal always odd (for M = K = 4).
Half of the queues would then never be served. Instead, the start copy
advances only when the start diagonal wraps around. The pair then steps
through all M x K combinations. With every queue backlogged, no queue waits
more than 18 slots between grants at the default size.

## Timing

A slot is P = max(K, M) cycles long. `address_round_rover` counts the cycles
and rotates the start addresses once per slot. The two projections form a
two-stage pipeline:

| edge at end of slot | what happens |
|---|---|
| t | `request_matrix` snapshots `req_live` |
| t+1 | the first projection has run during slot t+1; the screen captures its rotated result |
| t+2 | the second projection has run during slot t+2; the schedule is loaded and `grant_valid` pulses for one cycle |

A new schedule of up to M x K = N grants appears every P cycles. Requests are
scheduled two slots after they are sampled.

In the switch, the buffers pop on the `grant_valid` cycle. Cells are on the
links in the next cycle, and at the switch outputs one cycle after that. A
cell that arrives in cycle a becomes a request in cycle a+1 and is sampled at
the end of that slot. It therefore reaches its output 2P + 4 to 3P + 3 cycles
after arrival when nothing competes for it.

A cell can also leave sooner, in as little as 4 cycles. This happens when it
arrives in a shared queue that a grant already in flight was made for,
because that grant's earlier cell has been sent in the meantime.

The snapshot can be one schedule older than the grants being made. A queue
holding a single cell could then be granted twice. For this reason the second
projection checks the live queue state. Each buffer's `req` already excludes
a queue that is being popped in the current cycle.

## Parameters

| parameter | default | where |
|---|---|---|
| `N` | 16 | switch size |
| `K` | 4 | ports and links per common input buffer; N must be a multiple of K |
| `M` | N/K | number of common input buffers (derived) |
| `DEPTH` | 8 | cells per VOQ (this design's choice) |
| `IDX_W`, `PAYLOAD_W` | 8, 32 | package `tdrr_pkg`: index width (N up to 256) and cell payload |

Cells are `tdrr_pkg::cell_t`, which holds `valid`, an 8-bit `dest` and a
32-bit `payload`.

## Where this design departs from, or fills in, the scheme it implements

* The atomic matrices are always M x M. K of them cover the N outputs, which
  also works when K != M (the slot is then max(K, M) cycles long). The
  variant with M x K asymmetric atomic matrices is not built.
* A single set of K atomic sweeps running in one phase (one copy) is the
  building block of `parallel_rr_processor`. It is not offered as a separate,
  simpler scheduling mode.
* The rover counts modulo M (diagonals) and modulo K (copies). It does not
  count modulo N.
* The highest priority selector uses round-robin priority only. The scheme
  also speaks of a "maximum cost", which is not defined, so no cost term is
  used.
* The following are this design's own choices:
  - the phase offset of copy i is exactly i diagonals;
  - the direction of the rotation is (k + i) mod K;
  - the grouping of outputs into atomic matrices (consecutive outputs);
  - the exact rotating priority sequences in the second projection.
* Pipelining the two projections is an implementation choice. So is
  re-checking the live queue state in the second projection.
* The conditional selector handles any pattern of duplicate projections. It
  does not rely on duplicates appearing only at fixed positions.
* Each common buffer is built as N separate circular queues, not a
  linked-list shared memory. Cells for a full queue are dropped.
* Throughput was measured only for the default size with `DEPTH = 8` under
  uniform random traffic at full load. The switch delivered 95.9 % of line
  rate over 3000 slots. It was not compared with an output-queued switch
  under other loads or traffic patterns.

## Files

`rtl/` has one module per file. The top is `dcib_switch`. The shared package
is `tdrr_pkg`.

| module | role |
|---|---|
| `address_round_rover` | slot cycle counter, rotating start diagonal and start copy |
| `request_matrix` | per-slot snapshot, atomic-matrix views |
| `atomic_rr_scheduler` | 2DRR sweep over one M x M matrix |
| `parallel_rr_processor` | K copies x K atomic sweeps, phase-shifted |
| `first_projection_screen` | rotation onto virtual ports, pipeline register |
| `highest_priority_selector` | per-port candidate choice |
| `conditional_rr_selector` | per-output arbitration, one port per buffer, M-to-1 round-robin |
| `second_projection_result` | grant accumulation, feedback, schedule register |
| `tdrr_scheduler` | the scheduler |
| `common_input_buffer` | K-in, K-out buffer with N VOQs |
| `space_division_switch` | N x N crossbar |
| `dcib_switch` | the whole switch |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<n>`. The notable ones are:

* `tb_tdrr_scheduler` compares every schedule with an independent model of the
  algorithm. It also checks for conflicts, the P-cycle period, a full request
  matrix (N grants) and a buffer whose requests all fall in one atomic matrix
  (it must receive K grants).
* `tb_tdrr_fairness` holds random patterns of permanently backlogged queues.
  It requires every such queue to be served at least once every 32 slots.
* `tb_tdrr_scheduler_k4m2` and `tb_tdrr_scheduler_k2m4` repeat those checks
  for 8-port switches with K > M (two buffers of four ports) and K < M (four
  buffers of two ports).
* `tb_dcib_switch` runs the full default switch end to end with three kinds of
  traffic: uniform load, saturation and a single overloaded queue. It checks
  that every accepted cell is delivered once, in order, to the right output.
  It also counts the design's mechanisms: drops, multi-cell slots, several cells from
  one input port in one slot, output conflicts, grants made by the feedback path, and
  slots with all N outputs busy. A last phase sends single cells into the
  empty switch and checks the 2P + 4 to 3P + 3 cycle latency.
* `tb_dcib_throughput` offers full uniform load to the default switch and
  requires at least 90 % of line rate to be delivered.

## Simulating

From the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/tdrr_pkg.sv tb/tb_dcib_switch.sv --top-module tb_dcib_switch -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/tdrr_pkg.sv rtl/<module>.sv`.
Verilator reports a few harmless warnings, hence `-Wno-fatal`:

* width truncation on array indices: indices are carried as 8 bits;
* reset used both asynchronously and inside assertion blocks.

To change the size, set `N`, `K` and `DEPTH` on `dcib_switch` or
`tdrr_scheduler`. The scheduler grows as K x K x M diagonal processors plus
N selectors of M x K inputs.
