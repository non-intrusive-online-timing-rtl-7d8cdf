# Online timing statistics from waypoint edge events

This RTL computes execution-time statistics of a program while the program runs. It works from
a stream of *waypoint edge events* (WPEs). The target CPU is not instrumented. Each WPE says
which edge of the program's waypoint graph (a control-flow graph reduced to the points that
matter for timing) was just taken, and how many clock cycles passed since the previous WPE. In a
full system a trace decoder produces these events from the CPU's hardware trace; that decoder is
not part of this RTL. From the WPEs the module builds, in one run of the program:

* for every analysed **function**, a histogram or min/max/sum/count of its runtime;
* for every analysed **loop**, the same for its iteration count (and optionally its runtime);
* for chosen **edges**, min/max/sum/count of the time spent on that edge. These are kept
  separately for edges taken in the first iteration of the innermost loop and edges taken in
  later iterations ("context-sensitive" edge statistics).

The main idea is the **scalable histogram**. Runtime histograms in hardware normally need the
value range to be known in advance. Here every histogram has a fixed number of bins, and it
starts with a bin width of one cycle. When a value lands beyond the last bin, the histogram is
*compressed*: neighbouring bins are added pairwise into the lower half, the upper half is
cleared, and the bin width doubles. This repeats until the value fits. The number of
compressions so far (the *level*) is stored with each histogram. The bin edges are then
`[b·2^level, (b+1)·2^level)`. No calibration run and no re-synthesis is needed, whatever the
range of the runtimes turns out to be.

## Data flow

```
            ┌───────────────── automata cluster (NUM_AUT × lf_automaton) ─────────────────┐
 WPE ──────►│ transition lookup ─► runtime FSM / iteration FSM / context FSM ─► buffer    │
            └─────┬──────────────────────────────────────────────────────────────┬────────┘
                  │ edge records (only the innermost automaton emits)           │ runtime / iteration records
                  ▼                                                             ▼
       edge_forwarding_tree                                         poll_tree (round robin)
                  ▼                                                             ▼
       edge_stats_controller                                        measurement_fifo
                  ▼                                                             ▼
       statistics_storage (edge runtimes)             hist_stats_controller (scalable histograms)
                  │                                                             ▼
                  │                                   statistics_storage (function runtimes / loop iterations)
                  └──────────────► storage_access_handler ◄─────────────────────┘
                                           ▲▼ host commands / responses
```

All automata see every WPE, one WPE per clock cycle. Two kinds of output leave the cluster:

* **Edge records** need no buffering. Only the innermost active loop or function emits one,
  so at most one arrives per cycle. They are merged by an OR tree and go straight to their
  storage.
* **Runtime and iteration records** can appear in several automata in the same cycle. For
  example, a loop that is left by the function's return edge ends both the loop and the
  function. Each automaton keeps them in a small buffer. A round-robin poll tree moves one
  record per cycle into a FIFO.

The histogram controller normally handles one record per cycle. Each compression costs one
more cycle, and the FIFO absorbs that stall. `fifo_max_level` reports the highest fill level
reached. For the benchmark that motivated the design, at most 9 entries were reported in use;
the default depth here is 16. If the FIFO overflows, `fifo_overflow` goes high and stays high.

## Loop and function automata (`lf_automaton`, `transition_lookup`)

This is the part that needs the most care when you configure it. One automaton follows one
loop or one function. It knows about the program only through its **transition lookup**, a RAM
with one entry per edge ID (4096 by default). Each entry is a `lookup_entry_t`:

| field         | meaning for this automaton                                                    |
|---------------|-------------------------------------------------------------------------------|
| `enter`       | the edge enters the loop/function (call edge, loop entry edge)                 |
| `leave`       | the edge leaves it (return edge, loop exit edge)                               |
| `back`        | loop back edge: the next iteration begins                                      |
| `child_enter` | the edge enters a loop or function directly nested inside this one             |
| `child_exit`  | the edge comes back from such a nested loop/function                           |
| `edge_stat`   | record this edge's cycles as an edge statistic if this automaton is innermost  |
| `slot`        | which of the automaton's edge statistics (8 bits)                              |

Edges that do not concern the automaton must hold an all-zero entry. **The lookups are RAMs
without reset**, so the configuration must first write zeros to every edge ID that the program
can emit. A broadcast write to all automata does that in one cycle per edge.

The lookup events drive three FSMs:

* **Runtime FSM** (`IDLE`→`RUN` on `enter`, back on `leave`). It sums the cycle fields of every
  WPE after the entry edge, up to and including the leaving edge. The cycles carried by the
  entry WPE itself belong to the code before the call, so they are not counted. Nested calls
  count towards the runtime.
* **Iteration FSM** (`IDLE`→`COUNT`). It starts at 1 on `enter`, adds 1 on every `back` and
  reports the count on `leave`.
* **Context FSM** (`OUT`, `INNER`, `CHILD`). `INNER` means this automaton is the innermost
  active loop or function. `child_enter` and `child_exit` move between `INNER` and `CHILD`.
  A separate bit notes whether a back edge has been seen since entry. An `edge_stat` edge that
  arrives while the automaton is `INNER` produces an edge record. The record holds the
  automaton's base row, the slot, the context (0 = first iteration, 1 = later) and the cycle
  count. The context is taken before the current edge's transition, so a back edge is counted
  in the iteration it closes.

Only the *direct* children of a loop/function need `child_enter`/`child_exit` entries. Edges
deeper down belong to the child's own automaton. A function called from several places has an
`enter` entry for each call edge and a `leave` entry for each return edge. Recursion is not
supported: an `enter` while the runtime FSM is running is ignored.

Three configuration registers tell the automaton where its results go:

* `CFG_FUNC` and `CFG_ITER` (`stat_cfg_t`): enable, kind (`K_HIST` or `K_SIMPLE`), storage row,
  4-cell group, and `hbins`. For a histogram, `hbins` = 0 means the whole row. Otherwise the
  histogram has 2^`hbins` bins.
* `CFG_EDGE` (`edge_cfg_t`): enable and base row in the edge storage.

A write to `CFG_RESET` returns all three FSMs to idle. Together with rewriting the lookup, this
lets one automaton be moved to another loop or function at run time.

Timing: a WPE at cycle *t* is looked up at *t*, updates the FSMs at *t+1*, and its records are
visible from *t+2*. The output buffer has one slot for runtime records and one for iteration
records. A record that finds its slot still occupied is lost, and `buf_overflow` goes high and
stays high.

### Meta-configuration port

| `cfg_addr[EDGE_W]` | `cfg_addr[EDGE_W-1:0]`       | `cfg_data`                   |
|--------------------|------------------------------|------------------------------|
| 0                  | edge ID                      | `lookup_entry_t` (14 bits)   |
| 1                  | 0 `CFG_FUNC`, 1 `CFG_ITER`, 2 `CFG_EDGE`, 3 `CFG_RESET` | `stat_cfg_t` / `edge_cfg_t` |

`cfg_aut` selects the automaton; `cfg_bcast` writes all automata at once.

## Statistics storage (`statistics_storage`)

A storage is a row of *cells*. Each cell has its own RAM (one read port and one write port),
its own address and its own mode, and all cells share one value bus. Every operation is a
two-stage read-modify-write:

1. the address, mode and value are registered, and the RAM word is read;
2. the new word is computed and written back.

A forwarding register replaces the RAM output with the word written in the previous cycle
when the addresses match. So the same row can be updated in every cycle, including several
compressions in a row.

| mode         | new word                                                                  |
|--------------|---------------------------------------------------------------------------|
| `M_CLEAR`    | the value bus                                                              |
| `M_MIN`      | the smaller of value and word; the value alone if the group's count is 0   |
| `M_MAX`      | the larger of value and word                                               |
| `M_SUM`      | word + value                                                               |
| `M_COUNT`    | word + 1 (also a histogram bin increment)                                  |
| `M_COMPRESS` | in an aligned group of 2^`cmp_log2` cells, cell *i* < half takes bin 2i + bin 2i+1; the upper half becomes 0 |
| `M_READ`     | unchanged; the word appears on `rd_data` one cycle later                   |

The cells work together in two ways, both through the stage-2 words of their neighbours:

* A compression needs the two source bins.
* `M_MIN` looks at the count cell (local cell 3) of its 4-cell group. So a group that has just
  been cleared to zero needs no special "infinity" value for its minimum.

Any aligned power-of-two group of cells can form a histogram. The rest of a row can hold simple
statistics groups (min, max, sum, count in local cells 0..3).

## Controllers

* `hist_stats_controller` serves the function/loop storage. A `K_SIMPLE` record updates one
  4-cell group in one cycle. A `K_HIST` record belongs to a histogram of n = 2^`hbins` bins
  (`hbins` = 0: n = `BINS`, the whole row). The histogram starts at cell 4·group, rounded down
  to a multiple of n. So one 64-cell row can hold, for example, a 2-bin histogram in cells 0..1,
  a 4-bin histogram in cells 4..7 and simple statistics in the groups from cell 8 on.
  The controller reads the histogram's level. If `value >> level` < n, it increments that bin.
  Otherwise it issues `M_COMPRESS` for the histogram's n cells, raises the level, and keeps the
  record at its input (`in_ready` low) for the next cycle. The levels live in a small RAM with
  one word per row, holding one level per 4-cell group; a histogram uses the slot of its first
  group. The RAM is read asynchronously and has no reset. The host reads the levels with the level
  command. Clearing the function/loop storage also clears the levels, one row per cycle.
* `edge_stats_controller` serves the edge storage. Each edge statistic owns two rows,
  `base + 2·slot + context`, and min/max/sum/count are kept in cells 0..3.

## Host access (`storage_access_handler`)

While `host_mode` is low, the handler connects the controllers to the storages. While it is
high, the histogram controller is held, and the host issues one command at a time over a
valid/ready handshake:

| `req_op`   | action                                                        | response            |
|------------|---------------------------------------------------------------|---------------------|
| 0 read     | word `req_cell` of row `req_row` of storage `req_sel` (0 edge, 1 function/loop) | `resp_valid` 2 cycles after acceptance |
| 1 level    | compression level of the histogram at row `req_row`, first cell `req_cell` | 1 cycle after acceptance |
| 2 clear    | zero every word of storage `req_sel`, one row per cycle (for `req_sel`=1 it also clears the levels of each row) | none; `req_ready` returns when done |

Records that arrive while the host holds the storages stay in the FIFO, and the FIFO can
overflow. Clear both storages before an analysis: their RAMs have no reset either.

## Configuring and running an analysis

1. Reset. Broadcast all-zero lookup entries for every edge ID the program can emit. Write
   `CFG_RESET` to every automaton.
2. For each analysed loop/function, write its lookup entries and its `CFG_FUNC` / `CFG_ITER` /
   `CFG_EDGE` registers. Give every full-row histogram its own row of the function/loop
   storage. Small histograms and simple statistics must not overlap within a row. Give every
   edge statistic two rows of the edge storage.
3. With `host_mode` high, clear both storages. Then drop `host_mode` and stream WPEs.
4. When the program is done and `busy` is low, raise `host_mode` and read the histograms, their
   levels and the simple statistics. Bin *b* of a histogram at level *L* counts values in
   `[b·2^L, (b+1)·2^L)`.

## Parameters

| parameter (top)  | default | meaning                                                           |
|------------------|---------|-------------------------------------------------------------------|
| `NUM_AUT`        | 240     | automata: one per analysed loop/function (68 loops + 172 functions in the reference benchmark) |
| `LOOKUP_DEPTH`   | 4096    | lookup entries per automaton (`2**EDGE_W`)                          |
| `H_CELLS`        | 64      | cells of the function/loop storage = bins per histogram            |
| `H_DEPTH`        | 256     | rows of the function/loop storage (≥ 240 histograms)               |
| `E_CELLS`        | 4       | cells of the edge storage                                          |
| `E_DEPTH`        | 1024    | rows of the edge storage                                           |
| `FIFO_DEPTH`     | 16      | measurement FIFO entries                                           |

Field widths are fixed in `tam_pkg`: 12-bit edge IDs, 32-bit cycle counts, 48-bit statistics
words, 10-bit rows, 6-bit levels. `H_CELLS` may be raised to 128 for 128-bin histograms.
`tb_tam_128_bins` runs the end-to-end test at that size, with 4 automata and 16 rows.

## Where this RTL comes from, and where it goes its own way

These parts follow the published design: the block structure, the division into automata,
forwarding tree, poll tree, FIFO, two controllers, two storages and an access handler, and the
three FSMs per automaton with a rewritable lookup. So do the scalable histogram algorithm (bin
size 1 at start, pairwise merging, one extra cycle per compression, a level per histogram) and
the cells, each with its own RAM, address and mode, computing min, max, sum, count and
histograms with forwarding for back-to-back updates. The default sizes (240 automata, 64 bins)
and the round-robin polling also follow it.

These parts are choices of this RTL, where the published description gives only the function:

* all field widths and encodings;
* the lookup event set and the runtime and iteration conventions described above;
* the two-slot automaton buffer and the flat round-robin arbiter;
* the FIFO depth, and dropping records (with a flag) when the FIFO is full;
* how rows and groups are laid out, and the rule that a count of zero makes a min cell empty;
* the host command set and `host_mode`;
* placing 2- and 4-bin histograms at 4-cell group boundaries, so at most one small histogram
  fits in each group.

The lookup is always a block-RAM-style synchronous RAM. The alternative of distributed RAM for
small functions is not provided.

Not included:

* the trace decoder that turns CoreSight trace packets into WPEs;
* the generator that derives the lookup contents from the program binary and the user's choice
  of loops and functions;
* the link that carries host commands off chip.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares the module against
an independent model, and prints `TB_RESULT checks=N failures=M`:

* `tb_hist_stats_controller` replays the published 8-bin example, the sequence
  5, 4, 11, 7, 54, 10. It must end with bins 3,2,0,0,0,0,1,0 at level 3, with one compression
  for 11, two for 54, and 1 + compressions cycles per value. It then runs random
  histogram/simple-statistics traffic against a model. Last, it puts 2- and 4-bin histograms
  and simple statistics into shared rows and checks bins, statistics and per-histogram levels.
* `tb_statistics_storage` checks all cell modes, compressions of 2/4/8-cell groups and
  back-to-back updates of one row against a model.
* `tb_timing_analysis_module` (reduced sizes) and `tb_tam_full_size` (all defaults) run a
  synthetic program on the whole module. The program is a function containing a loop, with
  nested calls. Both compare every histogram, level, simple statistic and edge statistic read
  through the host port with a software model. They also count that compressions, FIFO
  buffering, simultaneous records, both edge contexts, nested-call suppression and the FIFO
  overflow all occurred. One of the histograms in this program has 4 bins and shares its row
  with a simple statistic.
* `tb_tam_128_bins` runs the same test with 128-bin histograms.
* `tb_workload_240_histograms` runs the configuration of the reference benchmark at full size.
  It uses 240 automata (172 functions and 68 loops), each with its own 64-bin histogram, and
  2500 calls. It checks every bin and level against a model.

The real benchmark trace (about 70 million WPEs) is not available, so the FIFO occupancy
figures reported for it are not reproduced here.

Simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tam_pkg.sv tb/tb_timing_analysis_module.sv \
          --top-module tb_timing_analysis_module -o sim && obj_dir/sim
```

Replace the testbench name to run any other test. The full-size test compiles in about half a
minute and runs in under a second.
