# Wire-speed sliding-window aggregation over out-of-order streams

This RTL computes a sliding-window aggregate over a stream of trade records,
one record per clock cycle, when the records do **not** arrive in timestamp
order. The query it is built for:

    SELECT Time, count(*) FROM Trades [RANGE 600 s, SLIDE 60 s, WATTR Time]
    WHERE Symbol = "UBSN"

Every 60 seconds of stream time it reports how many UBSN trades fell in the
past 600 seconds. Trades can arrive up to 60 seconds late (the *slack*).

A conventional windowing operator sorts the stream before it aggregates. This
design does not sort. It keeps one small hardware unit per window that may
still be open. Every arriving tuple is offered to all of these units in the
same cycle, and each unit counts the tuple if its timestamp lies in that
unit's window. Order of arrival does not matter, because counting is
commutative.

A window is closed by a *punctuation*. This is a special stream word that
carries a time P and promises that no later tuple will have a timestamp
below P. When a punctuation passes a window's end, that window's count is
final. The count is sent out, and the unit is reused for a window further
ahead in time. There are no buffers and no reordering. The result appears 4
cycles after the punctuation that closes the window.

## The stream word

Input and output use the same framing:

| field        | width | meaning |
|--------------|-------|---------|
| `punct`      | 1     | the word is a punctuation; `data.tstamp` is its time P |
| `valid`      | 1     | the word is a tuple |
| `data`       | 128   | input: `{symbol, price, volume, tstamp}`, 32 bits each |
|              | 64    | output: `{tstamp, number}` = window end and aggregate |

A word with neither flag set is an idle cycle. A word with both flags set is
illegal: an assertion in Stage 1 flags it, and the windows treat it as a
punctuation. `symbol` holds four ASCII characters, with the first character
in the most significant byte ("UBSN" = `32'h5542534E`). Times are unsigned
32-bit integers in the unit used for RANGE and SLIDE (seconds in this query).

The types are in `rtl/swa_pkg.sv`: `trade_t`, `trade_bus_t`, `result_t`,
`result_bus_t` and `agg_func_e`.

### What the stream source must guarantee

1. **Punctuation contract.** After a punctuation with time P, no tuple with
   `tstamp < P` is sent.
2. **No tuple too early.** No tuple is sent more than SLACK ahead of the
   latest punctuation. In other words, the disorder is bounded by SLACK.
3. **At most one window ends per punctuation.** Between two consecutive
   punctuation values, at most one window end may lie. The easy way to meet
   this is one punctuation per SLIDE boundary. If a punctuation closes
   several windows at once, only the lowest-numbered window's result reaches
   the output (see *Stage 4*).

The testbenches generate the stream as follows. Each tuple gets an arrival
key equal to `tstamp + rand(0..SLACK)`, and the tuples are sent in key order.
Punctuation `P = start + m*SLIDE` is sent when the key reaches `P + SLACK`.
This satisfies all three conditions.

## Window instances and how they are recycled

This is the central idea of the design.

Window *m* covers `[start + m*SLIDE, start + m*SLIDE + RANGE)`. Windows
overlap, so a tuple belongs to RANGE/SLIDE windows at once.

The design has `N_WIN` window instances. Instance *i* (1-based) starts out
holding window *i−1*:

    win_begin(i) = start + (i-1)*SLIDE
    win_end(i)   = win_begin(i) + RANGE

Both values are loaded while `rst` is high; `start` comes from the
`wattr_start` port. The instance reacts to each word as follows:

* **Tuple.** `eis` goes high when `win_begin ≤ tstamp < win_end`. The
  aggregate takes the tuple in.
* **Punctuation.** `eos` goes high when `P ≥ win_end`. On that clock edge,
  three things happen:
  * the aggregate value is copied to the instance's output register;
  * the aggregate resets;
  * `win_begin` and `win_end` both advance by `N_WIN*SLIDE`.

  The instance now holds the window N_WIN slides later, which is the first
  window not already held by another instance.

`eis` and `eos` are combinational, so each word is handled completely in one
cycle by every instance in parallel.

How many instances are needed? A tuple can arrive up to SLACK after the
punctuation that closed the windows before it. At that moment, the windows
held must reach from the oldest open window up to `tstamp`. That gives the
following bound, with x the smallest positive integer that meets it:

    N_WIN = ceil(RANGE/SLIDE) + x,   x ≥ (SLACK + RANGE)/SLIDE − ceil(RANGE/SLIDE)

`swa_pkg::n_win()` computes this. The results:

| RANGE    | SLIDE | SLACK | N_WIN |
|----------|-------|-------|-------|
| 10 min   | 60 s  | 60 s  | 11 (default) |
| 20 min   | 60 s  | 60 s  | 21 |
| 30 min   | 60 s  | 60 s  | 31 |
| 40 min   | 60 s  | 60 s  | 41 |
| 50 min   | 60 s  | 60 s  | 51 |
| 60 min   | 60 s  | 60 s  | 61 |

At the defaults the bound is tight: 11 × 60 = 660 = RANGE + SLACK. Nothing
flags a source that breaks its contract; the affected tuples are simply not
counted in some windows:

* A tuple sent with a timestamp below an earlier punctuation is missing from
  every window that punctuation already closed.
* A tuple sent more than SLACK ahead of the latest punctuation can find the
  instances for its newest windows still holding older windows. It is
  missing from those windows.

## Pipeline

One word enters per cycle; there is no back-pressure. Each stage is one
register stage.

| stage | module | work |
|-------|--------|------|
| 1 | `stage1_compare` | `is_equal = (symbol == SYMBOL_KEY)`; the whole word is registered |
| 2 | `stage2_filter`  | `valid &= is_equal`; punctuations pass unchanged |
| 3 | `window_agg` ×N_WIN | control (`win_control`) and aggregate (`win_aggregate`); registers `{punct, valid=eos, tstamp=win_end, number}` |
| 4 | `union_n`        | `binary_encoder` turns the N `valid` bits into a select; a multiplexer passes the selected window's result to the output register |

**Timing.** A punctuation applied to `in_bus` before clock edge *k* produces
its window result on `out_bus` after edge *k+3*. This is 4 edges, or 4
cycles of latency. The issue rate is one word per cycle. `out_bus.punct`
follows the input punctuations with the same 4-cycle delay, so downstream
operators also see them.

**Aggregates** (`win_aggregate`, `agg_op`). Each window holds four
incremental operators: COUNT, SUM, MIN and MAX. SUM, MIN and MAX work on
`price`. The `AGG_FUNC` parameter selects which one becomes `number`;
synthesis removes the other three. AVERAGE is not a separate unit; compute it
as SUM/COUNT from two instances. An operator updates on `eis` and returns to
its identity on `eos`:

| operator | identity |
|----------|----------|
| COUNT, SUM, MAX | 0 |
| MIN | all ones |

Values are unsigned. SUM and COUNT wrap at 2^32. The result reported for a
window is the value held just before `eos` clears it.

**Stage 4** uses a priority encoder: the lowest index wins. This is why
condition 3 above exists. The union has no queue, so simultaneous closures
lose all but one result.

## Parameters (`swa_q3_top`)

| parameter    | default     | meaning |
|--------------|-------------|---------|
| `RANGE`      | 600         | window length, in time units |
| `SLIDE`      | 60          | distance between window starts |
| `SLACK`      | 60          | largest lateness of a tuple; sizes N_WIN |
| `AGG_FUNC`   | `AGG_COUNT` | `AGG_COUNT`, `AGG_SUM`, `AGG_MIN` or `AGG_MAX` |
| `SYMBOL_KEY` | "UBSN"      | the WHERE-clause constant |

Ports: `clk`, `rst` (synchronous, active high), `wattr_start[31:0]` (the
query start time, sampled while `rst` is high), `in_bus` (`trade_bus_t`) and
`out_bus` (`result_bus_t`).

At the defaults, synthesis gives about 1.9k flip-flops: roughly 160 per
window, plus the two 130-bit selection stages. Logic grows linearly with
N_WIN.

## Design choices and limits

The overall structure comes from the published design:

* the four stages;
* the per-window control and aggregation split;
* the window update and `eis`/`eos` rules;
* the N_WIN formula;
* the 4-cycle latency and one-word-per-cycle rate.

The following are choices made here, because the source is silent on them:

* Synchronous active-high reset. The Algorithm-1 initial window bounds are
  loaded while reset is held.
* Unsigned times and values, with 32-bit results (SUM wraps).
* The reported `Time` is the **end** of the closed window.
* SUM, MIN and MAX aggregate `price`.
* The Stage 3 `valid` flag means "this window just closed". The Stage 3 and
  Stage 4 `punct` flags pass the punctuation on.
* The binary encoder gives priority to the lowest index. Only one result
  leaves per cycle.
* A word with both flags set is treated as a punctuation.
* The query is chosen at build time with `AGG_FUNC`, not at run time.

**Not included:**

* The network front end: UDP receive/transmit over Gigabit Ethernet.
* The operator that inserts punctuations into a raw stream. Its policy is
  left to the system; the testbenches insert punctuations themselves, as the
  stream source.

Timing closure has not been checked. The published implementation targets
157 MHz on a Virtex-6.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_stage1_compare`, `tb_stage2_filter` | per-word comparison and filtering against values computed in the bench |
| `tb_win_control` | `eis`/`eos` against a reference window, including the exact boundaries; window advance by N_WIN·SLIDE |
| `tb_agg_op`, `tb_win_aggregate` | all four functions against reference aggregates, with random window ends |
| `tb_window_agg` | in-window and out-of-window tuples; a punctuation one unit short of the end (no close); ten recycles |
| `tb_binary_encoder`, `tb_union_n` | one-hot, multi-hot and empty selections; flag merging |
| `tb_swa_q3_top` | see below |
| `tb_swa_workloads` | see below |

**`tb_swa_q3_top`** is the end-to-end test at default parameters. It runs an
hour of stream time: 4000 tuples, a quarter of them with other symbols, out
of order by up to 60 s, with idle gaps. Every one of the 61 window counts is
compared with a reference, at exactly 4 cycles after its punctuation. The
bench also requires each of the following to happen at least once:

* out-of-order tuples;
* filtered tuples;
* punctuations that close nothing;
* punctuations that close a window;
* recycled window instances;
* long runs at one word per cycle.

**`tb_swa_workloads`** runs nine configurations side by side: COUNT with
RANGE from 10 to 60 minutes (11 to 61 windows), and SUM, MIN and MAX at 10
minutes.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/swa_pkg.sv tb/tb_swa_q3_top.sv --top-module tb_swa_q3_top
    ./obj_dir/Vtb_swa_q3_top

Replace the file name and top module with those of any other testbench.
