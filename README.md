# Stall-driven frequency/voltage control for voltage/frequency islands

A chip built from voltage/frequency islands (VFIs) gives every processing
element (PE), or group of PEs, its own clock and its own supply. Islands talk
only through mixed-clock FIFOs. Most of the time most islands could run slower,
at a lower voltage, without lowering the output rate of the whole system. The
difficulty is knowing how much slower each island may go while the workload
changes.

This RTL makes that decision in hardware, per island, from counters alone.
A producer that is too fast keeps finding its output FIFO full. A consumer
that is too fast keeps finding its input FIFO empty. So each side of every
FIFO link counts the cycles it is really *stalled* in a sampling window:

- a producer stalls while it holds data to write and the FIFO is full;
- a consumer stalls while it wants data and the FIFO is empty.

Every island then rescales its clock from the counts of its links. There is
no software and no control-theory loop, only counters, a comparison and a
few multiplications per window.

## The scaling rule

Take one FIFO link in one window of `T_SAMPLE` cycles. `S_f` is the
producer's stall count and `S_e` the consumer's. The step factor is

    S = 1 - |S_e - S_f| / T_SAMPLE        (0 <= S <= 1)

A producer port applies the following rule:

| counts      | meaning                            | new producer frequency |
|-------------|------------------------------------|------------------------|
| `S_f > S_e` | producer waits on a full FIFO      | `f_curr * S` (slower)  |
| `S_e > S_f` | consumer waits on an empty FIFO    | `f_curr / S` (faster)  |
| equal       | balanced                           | `f_curr`               |

A consumer port applies the mirror image: it slows down when it is the side
that stalls, and speeds up when the producer stalls.

Using the difference of the two counts matters when traffic is bursty. A
producer may stall at the start of a window and the consumer at its end. Only
the net imbalance moves the clock.

Why a stall count and not the FIFO flags? A FIFO can sit full for a long time
while its producer has nothing to write. Slowing the producer on the full
flag alone would overestimate the slack and cost throughput. The stall signal
counts only the cycles in which the full flag actually blocks work.

### Discrete levels

An island runs at one of `NUM_LEVELS` (frequency, voltage) pairs. The ideal
frequency is rounded **up** to the slowest available pair that is not slower
than it, so rounding never costs throughput. The default table holds six
pairs for an SH3-class core:

| level | 0   | 1   | 2   | 3   | 4   | 5   |
|-------|-----|-----|-----|-----|-----|-----|
| MHz   | 23  | 31  | 38  | 45  | 52  | 60  |
| V     | 1.3 | 1.7 | 2.1 | 2.5 | 2.9 | 3.3 |

`vfi_pkg` also holds a second table, 54–133 MHz at 0.65–1.6 V, for an
ARM-class core. The comparisons are done without division: for example,
level `L` satisfies a slow-down request when
`F[L] * T_SAMPLE >= f_curr * (T_SAMPLE - d)`, where `d = |S_e - S_f|`.

Example: an island at 60 MHz with `S_f = 2000`, `S_e = 0` and
`T_SAMPLE = 5000` gets `S = 0.6`. Its ideal frequency is 36 MHz, which
rounds up to level 2 (38 MHz).

## Which island moves: constraint propagation

If both ends of every link were allowed to react, the two islands on one link
would chase each other. So every port of every link has a **scaling state**,
and the whole system is in one of two modes (`sink_constrained`):

- **Output-rate constrained** (`sink_constrained = 1`). The sink must deliver
  items at a required period `REQ_PERIOD_NS`.
  - Every producer port is `dvfs_en_prod`: it may move its island.
  - Every consumer port is `fixed`: it is ignored.
  - The required rate spreads from the sink back to the source. Each island
    matches the speed of the island it feeds.
- **Input-rate constrained** (`sink_constrained = 0`). The source must accept
  items at `REQ_PERIOD_NS`.
  - Every consumer port is `dvfs_en_cons`.
  - Every producer port is `fixed`.
  - Each island matches the speed of the island that feeds it.

The constrained end has no FIFO link on its outer side. There, a
**rate monitor** measures the item period `P` in the island's own cycles.
The observed period is `P / f_curr`, so the frequency that meets the
required period is `f_curr * (P/f_curr) / T_req = P / T_req`. The rate monitor
reports the larger of two values:

- the last item-to-item interval;
- the time since the last item.

A sink that has stopped producing is therefore seen as slow at once.

An island with several enabled ports (node 5 in the example system below,
which feeds two links) takes the **fastest** of their requests. No enabled
link then loses throughput. An island with no enabled port keeps its level.
After reset every island runs at its fastest level.

## Hardware structure

```
            island A (clk_A)                               island B (clk_B)
  +--------------------------------+                +--------------------------------+
  |  pe_model  --write/din-->  +---+-- fifo_link ---+-->  --read/dout-->  pe_model   |
  |     |  <------full-------  |   mixed_clock_fifo |   -------empty--->     |       |
  |     | stall                |                    |                  stall |       |
  |     v                      |                    |                        v       |
  |  stall_monitor (S_f) ------+-> count_synchronizer -------------> S_f (far)       |
  |      S_e (far) <-----------+-- count_synchronizer <------ stall_monitor (S_e)    |
  |     |                      |                    |                        |       |
  |  clock_control <- tsample  |                    |              tsample -> clock_control
  |   -> level/freq/voltage    |                    |        level/freq/voltage <-   |
  +--------------------------------+                +--------------------------------+
```

| module               | role |
|----------------------|------|
| `vfi_system`         | Top. Eight islands and nine links of the example graph below, built from an edge list. |
| `vfi_island`         | One island: `pe_model`, `clock_control` and `rate_monitor`. Sets the port states from the mode. |
| `fifo_link`          | One link: mixed-clock FIFO, the two stall monitors and the two count synchronizers. |
| `mixed_clock_fifo`   | Dual-clock FIFO with Gray-coded pointers. Full is on the write side, empty on the read side. |
| `stall_monitor`      | Counts stall cycles in each window. The count is registered and saturates. |
| `count_synchronizer` | Moves one count into the other clock domain with a toggle request/acknowledge handshake. |
| `clock_control`      | Window counter, per-port requests, maximum, rounding to a level, level register. |
| `rate_monitor`       | Item period at the constrained end. |
| `pe_model`           | Producer/consumer model of a task. It generates the stall signals. |
| `reset_sync`         | Per-island reset synchronizer. |
| `vfi_pkg`            | Level tables, port-state enum and `pick_level`. |

### Timing of one decision

1. `clock_control` pulses `tsample` on the last cycle of each window of
   `T_SAMPLE` island cycles (default 5000).
2. On that edge every stall monitor of the island latches its count. It then
   starts the far-side transfer. The transfer takes about three cycles of the
   other island's clock.
3. One cycle after `tsample`, the clock control evaluates all enabled ports.
   For each port it uses:
   - the island's own latched count;
   - the most recent far-side count that arrived since the last decision, or
     zero if none arrived. Each far-side count is used once.
4. One cycle later `level`, `freq_mhz` and `volt_mv` change, and `level_up` or
   `level_down` pulses.

The windows of two neighbouring islands are not aligned: each counts its own
cycles. Both counts are fractions of a window of the same length in cycles,
so they are comparable.

### The PE model

`pe_model` stands in for the real computation. It loops through three steps:

1. Read one item from every input.
2. Spend `WORK_CYCLES` cycles computing.
3. Write one item to every output.

With no stalls a node takes `WORK_CYCLES + 2` cycles per item. A source takes
`WORK_CYCLES + 1` and a sink `WORK_CYCLES + 2`.

Items are sequence numbers issued by the source. Each node forwards the
number it read on input 0. Where two paths meet, the items must carry the
same number, otherwise `join_err` latches. Inputs marked in `PRIMED_IN` are
feedback inputs: they are skipped in the first `PRIME_ITEMS` iterations
(default 1). That amounts to `PRIME_ITEMS` items already waiting on the loop,
and lets a loop of islands start.

## The example system (`vfi_system` defaults)

```
          +--> 2 --> 3 ----------+
  s --> 1 +                      +--> S
          +--> 4 --> 5 ----------+
               ^     |
               +- 6 <+
```

| node        | s  | 1  | 2  | 3  | 4 | 5 | 6 | S  |
|-------------|----|----|----|----|---|---|---|----|
| WORK_CYCLES | 20 | 20 | 10 | 10 | 8 | 8 | 4 | 20 |

The other defaults:

| parameter       | default                   |
|-----------------|---------------------------|
| `T_SAMPLE`      | 5000                      |
| `FIFO_DEPTH`    | 8                         |
| `WIDTH`         | 16                        |
| `REQ_PERIOD_NS` | 2000 (500 k items/s)      |
| level table     | six pairs, 23–60 MHz      |

The graph is a parameter, so other graphs can be built:

- `EDGE_SRC` / `EDGE_DST` list the edges, numbered from 0.
- `EDGE_PRIMED` marks the feedback edges; `PRIME_ITEMS` sets how many items
  each of them starts with.
- Node `n`'s k-th input is the k-th edge, in list order, whose destination is
  `n`. Outputs are numbered the same way.
- A node with no inputs is a source; a node with no outputs is a sink.
- Put the main path first: a node forwards the item on its input 0.

The islands' clocks are **inputs** (`clk[n]`), and their operating points are
**outputs**. The ring oscillator, its PLL and the supply regulator are analog
parts outside this RTL. The testbench models the oscillator with
`tb/island_clock_model.sv`, whose period follows `freq_mhz` at the next
edge, with no lock time.

Results of `tb_vfi_system` at the defaults:

- Output-constrained: the levels settle at `0 5 0 0 5 5 5 0` (s, 1..6, S).
  The sink stays within its 2 µs period.
- Input-constrained: the levels settle at `0 5 0 0 5 0 0 5`.
- The sum of f·V² over the run is about 46 % of running every island at the
  fastest level.

## Where this design makes its own choices

These points are not fixed by the method; each is this implementation's
choice.

- **FIFO.** The method assumes a mixed-clock, mixed-voltage FIFO with level
  conversion. This is a conventional Gray-pointer dual-clock FIFO, with no
  level shifting. Its depth (8) is a free choice.
- **Synchronizer.** A toggle handshake carries the whole count coherently. A
  count offered while a transfer is in flight is dropped. With windows of
  thousands of cycles this does not happen unless the two clocks differ by
  orders of magnitude.
- **Far-side counts are used once.** A window with no fresh far-side count
  treats the far side as 0.
- **Rate port direction.** The scaling factor at the constrained end is
  `S_S = T_observed / T_required`. Some statements of the method divide the
  frequency by `S_S`; that would slow down a sink that is already too slow.
  This design sets the frequency to `f * S_S`, which raises it when the
  observed period is too long.
- **Step factor.** `|S_e - S_f|` is clamped to `T_SAMPLE`. An infinite
  speed-up request (`S = 0`) selects the fastest level.
- **Configuration inputs.** `adapt_en` freezes all levels (the source is
  idle). `sink_constrained` selects the mode. Both, like `run`, are static
  inputs that pass through two flops in every island.
- **Feedback loops.** A loop is started with `PRIME_ITEMS` primed items on
  the links marked in `EDGE_PRIMED` (default one item). A loop whose round
  trip is longer than the required period needs more than one. The stall rule
  does not speed up a loop whose *latency* limits throughput. In such a loop
  every island waits on an empty FIFO, which the rule reads as "too fast".
  With larger work cycles on nodes 4/5/6 (30/20/10) the input-constrained
  phase settled with the loop islands at the slowest level, and the source
  missed its period by about 7 %. The default work cycles keep the loop short
  enough to avoid this.
- **Long tasks.** When one item takes much longer than `T_SAMPLE`, a window
  sees either a full stall or none. The step factor is then near 0 or 1, and
  an island swings between the slowest and the fastest level. The average
  rate is still met, as the software-radio run below shows, but the level
  does not settle.

## Not covered

- Analog parts: the ring oscillator with its digital PLL, the per-island
  regulators and the level shifters. The RTL outputs the requested frequency
  and voltage.
- A continuous ("infinite") set of operating points. Only a discrete table is
  built; a longer table can be put in `vfi_pkg` by changing `NUM_LEVELS`.
- Parallel instances of one task that share a stream. `pe_model` broadcasts
  each item to all of its outputs. So a pipeline in which several copies of a
  slow stage take turns cannot be built from it. The software-radio run below
  therefore models the ten equalizers as one island with a tenth of their
  total work.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_stall_monitor`      | Count per window against a reference counter, saturation, `count_valid` timing. |
| `tb_count_synchronizer` | Every accepted value arrives once, in order and intact, for fast-to-slow and slow-to-fast clocks; latency bound. |
| `tb_mixed_clock_fifo`   | Order and completeness across two clocks; full after exactly `DEPTH` writes; full and empty phases. |
| `tb_rate_monitor`       | Reported period against an independent model, including saturation. |
| `tb_clock_control`      | 300 random windows against a floating-point reference of the rule; window length; hold cases; pulses and the frequency/voltage outputs. |
| `tb_pe_model`           | Source, two-in/two-out node with a primed input, and sink. Checks order, exact stall conditions against an independent model, cycles per item, `run` low stopping the source, and `join_err`. |
| `tb_fifo_link`          | Own and far-side counts in both stall directions; stream integrity. |
| `tb_vfi_island`         | Level decisions in both modes use only the enabled ports; sink settles at the level its period needs; `adapt_en` freeze. |
| `tb_vfi_system`         | Whole system at the default parameters, output-constrained then input-constrained, described below. |
| `tb_workload_sdr`       | Software-radio chain, described below. |
| `tb_workload_mpeg`      | MPEG-2 encoder graph, described below. |

`tb_vfi_system` checks in-order and complete delivery, no join errors, and
the rate requirement in each mode. It also requires each of the following to
happen at least once:

- producer stalls and consumer stalls;
- full and empty FIFOs;
- level increases and decreases;
- items travelling around the feedback loop;
- a level change after the mode switch.

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert --top-module tb_vfi_system \
    -y rtl -y tb +libext+.sv rtl/vfi_pkg.sv tb/tb_vfi_system.sv -o sim
./obj_dir/sim
```

The full system testbench simulates about 11 ms of chip time in roughly ten
seconds.

### Benchmark-sized runs

Both runs build `vfi_system` with other parameters and check complete,
in-order delivery and the average output rate. The power figure is
`sum(f * V^2)` over the islands, relative to all islands at the fastest
level.

- `tb_workload_sdr`: source, two low-pass stages of 30,747 cycles each,
  demodulator 33,086, one equalizer island of 46,319 (the ten equalizers'
  463,193 divided by ten), sink 32,736 cycles per sample. The source sets
  the rate, so the run is input-constrained. The source's cost is an own
  choice of 40,000 cycles, so that the source paces itself (0.89 ms per
  sample at 45 MHz); with a cheap source only backpressure would slow it,
  and every downstream island would be pushed to the top level. One sample
  per 1 ms is required; levels 23-60 MHz. In 40 ms it delivered 55 samples.
  Final levels were 3 2 0 0 5 0 and the estimated power was 55 %. The
  islands swing between levels, as noted above.
- `tb_workload_mpeg`: source, motion estimation, prediction, DCT, VLC, IDCT and sink,
  with the IDCT feeding the DCT back through a link primed with two items
  (`PRIME_ITEMS = 2`). The DCT and IDCT together take 5.42 ms at 133 MHz, longer
  than the 2.886 ms macroblock period, so one item in the loop is not enough.
  All cycle counts and the period are divided by ten to shorten the run.
  Levels 54-133 MHz. It delivered 83 macroblocks in 80 periods. Final levels
  were 0 0 0 5 5 5 1 and the estimated power was 48 %. The DCT, which alone
  needs 2.78 ms of the 2.886 ms at 133 MHz, stays at the top level.
