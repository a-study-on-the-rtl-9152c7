# Input-queued cell switch with one schedule every K time slots

A cell switch with virtual output queues normally computes a new
input/output matching in every cell time slot. At very high link rates a
slot lasts only a few clock cycles, and a central scheduler for many ports
has trouble finishing in time. This switch computes **one matching every K
slots**. Each matched input then forwards up to **K cells** from the matched
queue, one per slot. The scheduler gets K times as much time for each
decision. It can therefore be built from about 1/K as many arbiters, which
are reused over K passes. Throughput stays the same. The cost is some extra
queueing delay and queue occupancy, which grows with K.

The RTL is parameterised. Its defaults are the reference configuration:
8 ports, 2048-cell queues, K = 2 and 12 clocks per time slot.

## Block structure

```
            +--------------------------- switch_top ---------------------------+
 in_* [0] ->| input_port 0 : demux -> N VOQs in voq_mem (dual port) --+         |
   ...      |   ...                                                   +-> crossbar -> out_* [0..N-1]
 in_* [N-1]>| input_port N-1                                        --+         |
            |        req[i][j] |              ^ matching (per window)           |
            |                  v              |                                 |
            |            islip_scheduler (N/K shared arbiter lanes)             |
            |            slot_timer (slots of CLK_PER_SLOT, windows of K slots) |
            +------------------------------------------------------------------+
```

| file | block |
|---|---|
| `rtl/switch_pkg.sv` | default sizes shared by all blocks |
| `rtl/switch_top.sv` | top level: wiring, matching register, timing checks |
| `rtl/slot_timer.sv` | slot and window time base |
| `rtl/input_port.sv` | one input with its N virtual output queues |
| `rtl/voq_mem.sv` | dual-port cell memory of one input |
| `rtl/islip_scheduler.sv` | central iSLIP arbiter with time-shared lanes |
| `rtl/rr_arbiter.sv` | round-robin arbiter used by the scheduler |
| `rtl/crossbar.sv` | N x N switch fabric |

## The pipeline: arrival, schedule, departure

Time is divided into slots of `CLK_PER_SLOT` clocks. K consecutive slots form
a **window**. A cell passes through three stages, each one window long:

| window | what happens to a cell |
|---|---|
| w | it arrives and is written into the queue for its destination |
| w+1 | at the first clock, every input's requests are sampled; the scheduler computes the matching during this window |
| w+2 | the matched queues send their cells, one per slot |

For K = 1 (the usual one-schedule-per-slot switch), a cell that arrives in
slot 0 leaves in slot 2. For K = 2 it leaves in slot 4 at the earliest.
Inside a slot, the departing cell is read from the queue memory at clock 1.
It reaches the crossbar at clock 2 and appears on `out_valid`/`out_cell` at
clock 3. Because the memory is dual ported, an arrival and a departure can
use the same queue in the same clock.

## Which cells a schedule covers

This is the least obvious part of the design (`input_port`).

- A schedule is computed from the queues **as they were when its requests
  were sampled**. Cells that arrive later are not covered by it. They wait
  for the next schedule, even if the matched queue has free departure slots.
  This keeps the three-stage pipeline exact: no cell leaves earlier than two
  windows after the window in which it arrived.
- Each input keeps `elig[j]`: the number of cells in queue j that were present
  at the last window start and have not left yet.
- When a window starts, the input receives **credit** for the queue that the
  just-finished schedule matched: `credit = min(K, elig[matched])`. Then
  `elig` is reloaded from the current occupancies. Each departure uses one
  unit of credit.
- At the same window start the input samples its **requests** for the next
  schedule. A queue requests if it holds cells that are not already promised
  to the coming window. For the queue that is about to receive credit, that
  means `occ > credit`; for every other queue, `occ > 0`.

With these rules a granted queue always has at least one covered cell. A
matched pair sends K cells when enough are waiting, and fewer otherwise.

## Scheduler: K slots of time, N/K arbiters

`islip_scheduler` runs iSLIP with `ITER` iterations (default 3 = log2 8).
Each iteration has two steps:

- **grant:** every unmatched output picks one requesting unmatched input,
  round-robin from its grant pointer;
- **accept:** every input that received grants picks one of them,
  round-robin from its accept pointer.

Pointers move to one position past the partner, and only for grants accepted
in the first iteration.

A fully parallel iSLIP needs N grant arbiters and N accept arbiters. This one
has `LANES` of each (default N/K = 4). Each step runs as N/LANES passes: in
pass p, lane l handles output (or input) p*LANES + l.

- The decisions of one step depend only on the state at the start of that
  step. The resulting matching is therefore identical to a parallel iSLIP's.
  The testbench checks this against a plain reference model, for 1, 4 and 8
  lanes.
- A schedule takes `1 + 2*ITER*N/LANES` clocks: 13 with the defaults, within
  the K*12 = 24 clocks of a window.
- `switch_top` refuses at elaboration any parameter set whose schedule does
  not fit into a window. An assertion also checks at run time that the
  scheduler is idle at every window start.

Size of the 8-port scheduler after generic gate-level synthesis with yosys
(`synth -flatten`, then `abc` to simple gates), 3 iterations:

| K | lanes | clocks per schedule | budget (K x 12) | logic gates | flip-flops |
|---|---|---|---|---|---|
| 1 | 8 | 7 | 12 | 2517 | 277 |
| 2 | 4 | 13 | 24 | 1457 | 278 |
| 4 | 2 | 25 | 48 | 1013 | 279 |
| 8 | 1 | 49 | 96 | 693 | 280 |

The logic shrinks with K, though by less than 1/K. The state does not shrink
at all: the per-port pointers, the latched requests and grants, and the
lane-selection multiplexers are needed for every K.

The matching becomes visible when the scheduler finishes, and it stays
unchanged until the next one. At the next window start `switch_top` copies it
into the matching register that drives the departures and the crossbar.

## Interface of `switch_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid[i]`, `in_dest[i]`, `in_cell[i]` | in | a cell arriving on input i, taken on the clock where `in_valid[i]` is 1; the link rate is one cell per input per slot |
| `in_drop[i]` | out | same clock: that cell was dropped because its queue was full |
| `out_valid[j]`, `out_cell[j]` | out | a departing cell, valid for one clock (clock 3 of a slot) |
| `slot_start`, `win_start` | out | clock 0 of every slot / of every window, for pacing the sources |

Parameters: `N` (ports, 8), `K` (slots per schedule, 2), `DEPTH` (cells per
queue, 2048, a power of two), `CELL_W` (cell bits, 424), `CLK_PER_SLOT` (12,
at least 3), `LANES` (N/K), `ITER` (3).

## How closely this follows the reference design

Taken from the reference design:

- the VOQ input-queued structure;
- one schedule per K slots, with up to K cells per match;
- the three-stage pipeline and its latencies (slot 2 for K = 1, slot 4 for
  K = 2);
- dual-port queue memory;
- iSLIP in a central arbiter;
- N = 8, 2048 cells per queue, 12 clocks per slot;
- the aim of a scheduler whose area shrinks as K grows (the reference
  expects about 1/K; the table above shows what this implementation gets).

This implementation's own choices are listed below. The reference describes
the switch at the architecture level and gives none of them.

- 424-bit (53-byte) cells, each written and read as one word.
- The credit and request rules above. In particular, cells that arrive after
  the sampling do not ride along with an existing match.
- The time-shared arbiter lanes, as the way of realising the 1/K area, and
  3 iSLIP iterations.
- Static partitioning of each input's memory into N queues of `DEPTH` cells.
- Dropping cells that arrive for a full queue.
- A registered crossbar, and reads at clock 1 of a slot.
- Asynchronous reset.

Not modelled: physical line interfaces, cell header processing, and QoS.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=.. failures=..`
line.

| testbench | what it checks |
|---|---|
| `tb_slot_timer` | phase, slot and window counters and strobes, against a cycle count |
| `tb_voq_mem` | random dual-port traffic against a shadow array |
| `tb_input_port` | clock-by-clock comparison with a queue model: occupancy, requests, credit, drops, cell order |
| `tb_islip_scheduler` | three lane counts against a parallel iSLIP model; done latency `2*ITER*N/LANES` |
| `tb_crossbar` | random partial permutations |
| `tb_switch_top` | reduced switch (4 ports, 16-cell queues). First-departure slot for K = 2 and K = 1. A hot-spot phase that overflows queues, then 95 % uniform load, then drain. It counts that each mechanism occurred: drops, K-cell runs, matched queues with fewer than K covered cells, output contention, held-back requests, and arrival plus departure on one queue in one slot. |
| `tb_switch_top_full` | default-size switch, hot spot then 90 % uniform load, full scoreboard |
| `tb_switch_uniform`, `tb_switch_bursty` | default-size switches with K = 1, 2, 4 and 8 at 90/94/98 % load, under uniform traffic and under on/off bursty traffic (mean burst 8); 3000 slots each |

The end-to-end scoreboard (`tb/switch_env.sv`) checks the following for
every cell and every window start:

- cell content and order per input/output pair;
- no loss except flagged drops;
- at most one cell per input and per output in each slot;
- in each window, every matched input sends 1 to K cells, all from its
  matched queue, and an unmatched input sends none;
- no departure before the second window after arrival;
- the requests, against the rules above.

The workload runs print the carried load, the mean delay and the mean
input-queue length. With runs of only 3000 slots the queues are still
filling, so these figures are indicative. They show the expected trend: delay
and queue length grow with K, and every offered cell is delivered. Mean delay
in slots (arrival to departure), from one run of each at 98 % load:

| traffic | K = 1 | K = 2 | K = 4 | K = 8 |
|---|---|---|---|---|
| uniform | 50 | 73 | 83 | 106 |
| bursty, mean burst 8 | 160 | 166 | 197 | 262 |

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/switch_pkg.sv tb/tb_switch_top.sv --top-module tb_switch_top -o sim
./obj_dir/sim
```

Replace `tb_switch_top` with any other testbench name. The default-size
simulations take about 15 s (`tb_switch_top_full`) and 1-2 min (each
workload testbench).
