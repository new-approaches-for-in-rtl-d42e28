# Event-based trace buffers for debugging HLS-generated FPGA circuits

A circuit produced by high-level synthesis (HLS) is written as sequential C,
but once it runs at speed on an FPGA the only way to see what it did is to
trace it. A classic embedded logic analyser records a fixed set of netlist
signals into one wide buffer on every clock cycle. For an HLS circuit that
wastes most of the memory: the values a developer cares about (a branch
decision, a value written to a variable) are valid only in the few cycles in
which the corresponding operation completes, and all signals get the same
depth no matter how often they change.

This RTL records *events* instead of cycles:

* The traced circuit exposes **event observability ports** (EOPs). An EOP is
  an *event* bit that is high in the cycle a source-level operation completes
  and a *data* word, the result of that operation, which the event bit
  validates. In an HLS circuit these usually already exist: the clock enable
  of the register that keeps an operation's result is the event, and that
  register's input is the data.
* Each EOP is recorded by a small, independent **event observability buffer**
  (EOB). An EOB writes its data input only in cycles where its storage enable
  (the EOP's event bit) is high, so it holds nothing but valid results. Every
  EOB has its own width and depth, so an event that fires 32 times per
  occurrence of another one can get a buffer 32 times deeper.
* EOPs that never fire in the same cycle can **share** one buffer.
* Because every buffer fills at its own pace, the cross-buffer timing is
  lost. An extra **event reference trace** buffer records the vector of all
  event bits and lets the host put every recorded value back in order, and,
  if it records every cycle, back at its exact cycle.

## Structure

```
eob_trace_top
 ├─ trace_ctrl             arm / trigger on start / stop all buffers when one is full
 ├─ g_eob[b]  (NUM_EOB x)
 │   ├─ eob_share_mux      event-selected multiplexer + OR of member events
 │   └─ eob                the trace buffer (WIDTH x DEPTH block RAM)
 ├─ event_ref_trace        reference trace (an eob of NUM_EOP bits)
 └─ eob_readback_mux       one read-back port for all buffers
eob_pkg                    controller state type, sizing functions
```

All files are in `rtl/`, one module or package per file.

## Event observability ports

The design does not create EOPs; it takes them as the ports `eop_event`
(`NUM_EOP` bits) and `eop_data` (`NUM_EOP` words of `DATA_W` bits). The
instrumentation flow is expected to find, in the traced circuit, the guard
condition of each operation of interest (typically a register clock enable)
and the value that register loads, and to wire them out. Where synthesis has
optimised a needed signal away, it has to be preserved or regenerated before
it can be wired out; that is outside this RTL. Narrower EOPs are
zero-extended to `DATA_W` by whoever connects them. The traced circuit's start
signal goes to `dut_start`.

## Trace buffers and how to size them

`eob` is a simple dual-port memory with a fill counter. While the capture
window is open it writes `din` to entry `count` whenever `en` is high and the
buffer is not full. It fills linearly from entry 0 and then stops (it is not a
ring buffer): entry *k* is the *k*-th event recorded. The read port is
registered, so the whole buffer maps onto block RAM.

The depth of each buffer should follow the event's *relative assertion rate*:
its number of occurrences per run divided by that of the least frequent event
in the design. If a loop bound is computed once and the loop then runs up to
32 times, the loop-body event needs 32 entries for every entry of the bound
event; sized that way, both buffers fill at about the same rate and neither
wastes memory. `tb_eob_trace_top_split` runs exactly this: a 4 x 8 buffer for
the bound and a 128 x 16 buffer for the loop values. When the loop runs longer
than the estimate, the body buffer fills first and ends the trace early; the
test shows both cases.

Tying a buffer's enable high gives the behaviour of a classic logic analyser
(one entry per cycle). That mode is not offered by the top, which always uses
the event bits as enables.

## Sharing a buffer

Giving a rarely firing 8-bit event its own buffer can waste a whole block RAM.
If its event is never high in the same cycle as another EOP's event, both can
share one buffer. `eob_share_mux` gates each member's data word with its own
event bit and ORs the results (an AND-OR multiplexer whose selects are the
events), and ORs the member events into the storage enable. Any number of EOPs
can share one buffer. The rule that member events are mutually exclusive is
checked by an assertion. If the rule is broken, the stored word is the OR of
the colliding data words.

The mapping is set by `EOB_OF_EOP`: field *i* holds the number of the buffer
that EOP *i* is recorded in. The stored width `EOB_W[b]` keeps the low bits of
the data, so a shared buffer must be as wide as its widest member.

The multiplexer sits on the EOP data path and can lengthen the critical path.
Because an EOP's data is needed only in its event cycle, and events in HLS
schedules are often several cycles apart, these paths are candidates for
multi-cycle timing constraints. No constraints are supplied here.

## The event reference trace and recovering order and timing

This is the part of the scheme that needs the most care.

`event_ref_trace` is one more buffer. Its data input is the vector of all
event bits (bit *i* = `eop_event[i]`). Its enable is chosen at run time with
`ref_cycle_accurate`:

* `0`: the enable is the OR of the events. One sample is stored per cycle in
  which at least one event fired, so idle cycles cost nothing. This recovers
  the *order* of events.
* `1`: the enable is held high. One sample is stored per cycle of the capture
  window, so sample *k* is cycle *k* after the trigger. This recovers the
  exact *cycle* of every event, at the price of a buffer that fills on every
  cycle.

The host recovers the trace by walking backwards. Starting from the last
reference sample, for every bit that is set it takes the last not yet claimed
entry of that EOP's buffer and labels it with the sample number, then moves to
the previous sample. Example with two EOPs sharing buffer 0 and a
cycle-accurate reference trace of five samples:

```
sample      0   1   2   3   4
event 0     1   0   0   0   0
event 1     0   1   0   1   1      buffer 0 = [b, x1, x2, x3]
```

Sample 4 claims x3 (cycle 4), sample 3 claims x2 (cycle 3), sample 1 claims
x1 (cycle 1) and sample 0 claims b (cycle 0). Shared buffers pose no problem
because at most one of their members fires per sample.

The walk works only if every buffer covers exactly the same cycles. The design
guarantees this: all buffers are emptied together, the capture window opens
for all of them in the trigger cycle, and it closes for all of them in the
first cycle in which any buffer (the reference trace included) reports full.
The buffer that filled has all its entries; the others hold everything that
happened up to that cycle. The same guarantee is what a host needs if it
skips the reference trace and instead replays the circuit's state transition
graph, using the recorded branch outcomes to pick the path: every trace then
starts at the beginning of the circuit's operation. The recovery algorithm
itself is host software. A SystemVerilog version used by the tests is in
`tb/trace_recovery_pkg.sv`.

## Running an experiment

| step | host action | design behaviour |
|---|---|---|
| 1 | pulse `arm` for one cycle, set `ref_cycle_accurate` | all fill counters cleared, `armed`=1 |
| 2 | start the traced circuit | in the first cycle `dut_start`=1, `capturing` goes high (that cycle is recorded) |
| 3 | wait for `done` | `capturing` falls in the first cycle a `buf_full` bit is set; `done` follows one cycle later |
| 4 | for each buffer: set `rd_sel`, read `rd_count`, then step `rd_addr` from 0 | `rd_count` is combinational; `rd_data` is the entry at the address presented one clock earlier |

`rd_sel` values 0 to `NUM_EOB-1` select the data buffers and `NUM_EOB`
selects the reference trace. Events after the window has closed are ignored
until the next `arm`. `arm` may be pulsed at any time, which abandons a
running experiment. The link that carries the read-back data to a host (JTAG,
UART, a processor bus) is not part of this design.

`capturing` is combinational from `dut_start` and the buffers' registered full
flags. All state changes on the rising edge of `clk`. `rst_n` is a
synchronous active-low reset of the counters and the controller; the memory
arrays are not reset.

## Parameters of `eob_trace_top`

| parameter | default | meaning |
|---|---|---|
| `NUM_EOP` | 2 | number of EOPs |
| `DATA_W` | 16 | width of each `eop_data` word |
| `NUM_EOB` | 1 | number of data buffers |
| `EOB_OF_EOP` | `{32'd0, 32'd0}` | packed, 32 bits per EOP, field *i* = buffer of EOP *i* |
| `EOB_W` | `{32'd16}` | packed, 32 bits per buffer: stored width |
| `EOB_DEPTH` | `{32'd2048}` | packed, 32 bits per buffer: entries |
| `REF_DEPTH` | 16384 | samples in the reference trace |

Field 0 of a packed parameter is its least significant 32 bits, so the split
configuration is written `.EOB_OF_EOP({32'd1, 32'd0})`,
`.EOB_W({32'd16, 32'd8})`, `.EOB_DEPTH({32'd128, 32'd4})`. The per-buffer
lists are packed rather than unpacked arrays on purpose: Verilator 5 mis-sizes
unpacked array parameters whose length depends on another overridden
parameter.

The defaults trace the loop example: an 8-bit loop bound and a 16-bit
loop-body value that share one 16-bit buffer, plus a 2-bit reference trace.
The depths are chosen so that each buffer is one 36 Kb block RAM of a 7-series
FPGA: 2048 x 16 (the 2K x 18 shape) and 16384 x 2 (the 16K x 2 shape). The
total is 65,536 bits of memory and 32 flip-flops.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module with values the testbench computes itself and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_eob` | enable gating, capture window, stop when full, clear, read latency |
| `tb_eob_share_mux` | member mask, data selection, enable = OR of member events |
| `tb_event_ref_trace` | filtered and cycle-accurate modes, fill to full, contents |
| `tb_trace_ctrl` | cycle-by-cycle comparison with a reference state machine under random arm/start/full |
| `tb_eob_readback_mux` | count and (one cycle later) data of the selected buffer |
| `tb_eob_trace_top` | whole design at default size: three experiments, upload, event recovery |
| `tb_eob_trace_top_split` | one buffer per EOP sized 32:1, four experiments |

The two end-to-end tests drive the EOPs from `tb/hls_loop_model.sv`, a
behavioural model of the loop example. It computes a random loop bound, fires
the bound event one cycle before the first loop event, and puts random gaps
between loop iterations, so event regions can be made dense or sparse. Random
data is present on the EOP data lines in cycles without an event.
`tb/trace_scoreboard.sv` works out independently what every buffer must hold.
The tests then check the uploaded buffers word for word and run the backward
recovery on the uploads alone. Every recovered (sample, EOP, value) must match
the scoreboard's log, and in cycle-accurate mode the recovered sample must
equal the event's real cycle. They also count how often each mechanism
occurred and fail if one never did: the window closed by the reference trace
and by a data buffer (by each buffer, in the split test), both reference
modes, both EOPs in one shared buffer, waiting for the trigger, events dropped
after the window, idle cycles skipped, and re-arming after a finished
experiment. The default-size test runs in well under a second.

To run one test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/eob_pkg.sv tb/trace_recovery_pkg.sv tb/tb_eob_trace_top.sv \
    --top-module tb_eob_trace_top
./obj_dir/Vtb_eob_trace_top
```

The unit tests need only `rtl/eob_pkg.sv` and their own file on the command
line. Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/eob_pkg.sv
rtl/eob_trace_top.sv`.

## What follows the scheme and what is this design's own

Taken from the scheme: EOPs as event + data pairs; buffers that store only
when enabled, with per-buffer width and depth; sharing through an
event-selected multiplexer and an OR-ed enable; the reference trace with an
OR-of-events or constant enable and the backward recovery; triggering on the
traced circuit's start signal and ending when a buffer is full, with all
buffers stopping together; a multiplexer that selects one buffer for read-back.

This design's own choices: linear fill instead of a ring buffer; the `arm`
pulse and the four controller states; recording the trigger cycle itself;
closing the window in the very cycle a full flag is seen; the run-time choice
of reference-trace mode (the scheme treats it as a build-time choice); the
registered read-back port and its timing; the member-mask and packed-parameter
way of describing the configuration; all default depths.

Not included:

* The cycle-by-cycle logic-analyser strategies used only for comparison.
* The traced HLS circuits themselves.
* Preserving or regenerating EOP signals in a netlist.
* The host link and host software, apart from the recovery routine in the
  testbench package.
* Timing constraints.

There are no measurements of area or clock rate on an FPGA. The design has
only been simulated and linted.
