# Serial input-buffer cell scheduler for an N x N crossbar

An input-buffered packet switch (for example the on-board switch of a
multibeam satellite) keeps, at every input port, one virtual output queue
(VOQ) per output port. Once per cell slot a scheduler must pick a set of
input/output pairs so that every input sends at most one cell and every
output receives at most one. Parallel iterative schedulers such as PIM or
iSLIP let all ports compete at once in request/grant/accept rounds. This
scheduler instead **visits the output ports one after another**, and it
visits them in a deliberate order: **the output port requested by the
fewest inputs goes first**, the most requested one last. An output with few
candidates has little choice, so serving it early keeps it from finding all
of its candidates already taken. Outputs with many candidates, served later,
are still likely to find a free one. Within an output port, fairness comes
from a round-robin pointer that belongs to that output.

The RTL is written for N = 16 ports. With one clock to take the requests
in and one clock per output port, a schedule takes N + 1 = 17 clocks.
At 50 MHz that is 340 ns, slightly less than the 341 ns a 64-byte cell
takes on a 1.5 Gbit/s port. In general the clock must satisfy
f >= (N + 1) * port_rate / 512.

## One schedule, clock by clock

Call the clock in which `req_sync` is sampled high while the scheduler is
idle clock 0.

* **Clock 0 (request intake).** The N x N request matrix `req` is
  registered; `req[i][j] = 1` means input i has at least one cell for
  output j. In the same clock the number of requesting inputs of each
  output (a column sum, 0..N) is registered, and the set of matched inputs
  is cleared. `busy` goes high.
* **Clocks 1 .. N (one output port per clock).** A minimum search over the
  output ports not yet visited picks the one with the smallest request
  count. The lowest port number wins a tie. That is the *polled output*
  (`cur_outport`). Its column of the request matrix, minus the inputs
  already matched, goes to the round-robin arbiter together with the
  output's pointer (`cur_pointer`). The arbiter scans inputs upward from
  the pointer, wrapping from N-1 to 0, and grants the first one it finds.
  On the clock edge:
  * the granted input is marked matched;
  * the grant is recorded for the output stage;
  * the output's pointer moves to one past the granted input.

  An output with no eligible input grants nothing and keeps its pointer.
  It still uses its clock, so a schedule always takes the same time.
* **End of clock N.** The collected matching is copied to `match`
  (`match[i]` is one-hot over outputs, all zero for an unmatched input),
  and `busy` drops.
* **Clock N + 1.** `sync_out` is high for this one clock. A new `req_sync`
  is accepted in the same clock, so back-to-back schedules run every
  N + 1 clocks. `match` holds until the next schedule ends.

The request counts are taken once, from the matrix as received. They do
not shrink as inputs become matched. The order of the outputs is therefore
fixed at clock 0 and only the arbitration results depend on what was
matched before.

Under full load (every VOQ non-empty) the arbitrated outputs always find a
free input, so every schedule is a complete matching. After the first such
slot the pointers are all different, and each output's pointer then steps
through the inputs one by one. So no head-of-line cell waits more than N
slots. The end-to-end testbench checks this property.

## Blocks

| module | role |
|---|---|
| `cell_scheduler` | top level: wires the five blocks below, checks with assertions that the matching is conflict-free |
| `sched_timing_gen` | starts a schedule on `req_sync`, counts the N arbitration clocks, picks the polled output (minimum request count among unvisited outputs) |
| `request_proc` | request matrix register, per-output request counts, matched-input mask, current requests of the polled output |
| `rr_pointer_gen` | one round-robin pointer per output port: combinational read, write-back on a match |
| `rr_arbiter` | combinational round-robin choice from the pointer, plus the updated pointer |
| `output_ctrl` | collects the grants per input port and delivers the matching with `sync_out` |
| `sched_pkg` | shared constants: default port count, cell size, clocks per schedule |

The data flow is a loop, closed each clock: `sched_timing_gen` sends the
polled output to `request_proc` and `rr_pointer_gen`. These two feed
`rr_arbiter`. Its grant goes back to `request_proc` (matched mask),
`rr_pointer_gen` (new pointer) and `output_ctrl` (result).
`sched_timing_gen` marks the output as visited. The critical path per
clock runs through the N-way minimum search over (CW = 5)-bit counts, the
column select and the N-input round-robin scan.

## Interface of `cell_scheduler`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | active-low synchronous reset |
| `req_sync` | in | 1 | take `req` and start a schedule (ignored while `busy`) |
| `req` | in | `[N-1:0]` x N | `req[i][j]`: input i has a cell for output j |
| `busy` | out | 1 | a schedule is in progress |
| `sync_out` | out | 1 | one-clock pulse: a new matching is on `match` |
| `match` | out | `[N-1:0]` x N | `match[i][j]`: input i sends to output j in the next slot |
| `cur_outport` | out | `$clog2(N)` | output port polled now (debug) |
| `cur_pointer` | out | `$clog2(N)` | its round-robin pointer (debug) |

The only parameter is `N` (default 16). Inputs and outputs are numbered
from 0, and pointers too. After reset, output j's pointer is j and `match`
is all zero.

## Design choices

The description this RTL follows gives the algorithm, the split into
blocks, the N + 1 clock schedule and the one-hot result format. The
following are this design's own choices:

* **Handshake.** `req_sync` sampled when idle, `sync_out` a one-clock
  pulse, and `busy` brought out. A `req_sync` during a schedule is dropped,
  not queued.
* **Tie rule.** Among outputs with equal request counts, the lower port
  number goes first.
* **Static counts.** As described above.
* **Pointer update.** One past the granted input, written at the
  arbitration clock. Each pointer is read only once per schedule, so
  writing all pointers at the end of the schedule would give the same
  result.
* **Reset pointers.** Output j starts at input j. There is no port for
  loading pointers, so a matching example that assumes particular pointer
  values cannot be replayed directly. Reproduce it by first running
  schedules that bring the pointers to those values.
* **Result delivery.** `match` is copied after the last arbitration, not
  built up in place, so it never shows a partial matching.

## Outside this RTL

The VOQ buffers that produce the requests and the crossbar that moves the
64-byte cells according to `match` are not included. The scheduler only
needs the "queue non-empty" bits from the buffers and only drives the
crossbar's configuration. `tb_traffic_workload` contains a behavioural
queue model, for simulation only.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sched_pkg.sv tb/sched_ref_pkg.sv tb/tb_cell_scheduler.sv \
    --top-module tb_cell_scheduler
./obj_dir/Vtb_cell_scheduler
```

Replace `tb_cell_scheduler` with any other testbench name. All of them
finish in well under a second.

* `tb_cell_scheduler`: end to end at the default N = 16, covering:
  * 1,500 schedules with random matrices from sparse to full;
  * each one compared with an independent reference model (`sched_ref_pkg`:
    a stable sort of the outputs, then a round-robin pass with its own copy
    of the pointers);
  * the polling order and the latency of exactly N + 1 clocks;
  * 64 full-load slots, checking for complete matchings and the wait bound
    of N slots.

  It counts how often each of these occurred and requires each at least
  once: back-to-back schedules, ignored `req_sync`, unmatched inputs,
  outputs without requests, tied counts, pointer wrap-around, and matrices
  where fewest-first polling gives a different matching than index order.
* `tb_traffic_workload`: the scheduler serving bursty on/off traffic
  through a behavioural VOQ model. It runs three settings:

  | load | mean burst | queue depth |
  |---|---|---|
  | 0.95 | 32 | unlimited |
  | 0.65 | 10 | 40 cells |
  | 0.95 | 10 | 40 cells |

  Each schedule is checked against the reference model, and cells are
  counted to confirm none is created or lost unaccounted. The mean delay
  and loss ratio are printed. The runs are only 4,000 slots long, so the
  figures show trends, not converged values. In one run the mean delay was
  about 18 slots at load 0.65 and 70 slots at load 0.95 (bursts of 10),
  with loss ratios of about 1e-3 and 2.5e-2.
* `tb_sched_timing_gen`, `tb_request_proc`, `tb_rr_pointer_gen`,
  `tb_rr_arbiter`, `tb_output_ctrl`: unit tests of each block against
  values worked out in the testbench.

## Changing the size

`N` can be changed on `cell_scheduler`, for example with `#(.N(8))` on
the instance or `-GN=8` when it is the Verilator top. All internal
widths follow from it. The
testbenches use `sched_pkg::N_PORTS`, and the reference model handles up
to 32 ports. The schedule length grows as N + 1 clocks, and the per-clock
logic (minimum search and round-robin scan) grows linearly in N, so the
achievable clock falls for large N. Check the rate budget above against
the target port rate.
