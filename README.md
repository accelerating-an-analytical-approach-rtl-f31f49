# FIFO-based hardware for analytical CDO tranche pricing

A collateralized debt obligation (CDO) pools many credit instruments and
splits the pool's losses into tranches. A tranche with attachment point `A`
and size `S` absorbs the part of the pool loss that lies between `A` and
`A + S`. Analytical pricing first builds the probability distribution of the
total pool loss and then takes the expected loss of each tranche under it.
This is repeated for a handful of market scenarios, and the results are
weighted and summed.

The loss distribution is built by recursive convolution. Each instrument `k`
either survives, adding loss 0 with probability `1 - p_k`, or defaults,
adding its notional `N_k` with probability `p_k`:

    P_k[l] = P_{k-1}[l] * (1 - p_k)  +  P_{k-1}[l - N_k] * p_k

The obvious implementation keeps the distribution as a dense table indexed
by loss. That table has a cell for every loss up to the pool's total
notional, even though most losses cannot occur when the notionals are
uneven. This design instead keeps **only the losses that can occur**, as a
sorted list of `(loss, probability)` points in two FIFOs. Each convolution
step becomes a merge of two sorted streams. The step's cost depends on how
many points exist, not on the largest loss. Points whose probability has
fallen below the fixed-point resolution are thrown away as they are produced.

One accelerator holds `NUM_CORES` independent cores (default 10). Each core
prices one time step of one CDO over a set of scenarios.

```
 host ──► In FIFO ──► decoder ──► fifo_conv ──┬──► tranche 0 ──┐
                                              ├──► tranche 1 ──┤
                                              │      ...       ├──► accum ──► Out FIFO ──► host
                                              └──► tranche 5 ──┘
```

## The FIFO convolution (`fifo_conv`, `la_fifo`)

This is the heart of the design and the least obvious part.

### Data kept

The current distribution is a list of points in increasing loss order,
followed by an end marker. A point is 41 bits: a 16-bit loss and a 25-bit
probability. The end marker is the loss value `16'hFFFF`. Two identical
copies of the list are held:

* **FIFO 0** feeds the "instrument survives" path. It is paired with
  **register 0**, which holds `(0, 1 - p)`.
* **FIFO N** feeds the "instrument defaults" path. It is paired with
  **register N**, which holds `(N_k, p)`.

Each old point contributes to two new points, one on each path. Two copies
let both paths read the list at their own pace.

### One convolution step

An instrument arrives with `N_k`, `p_k` and a "last of the pool" flag. Every
cycle the core looks at the heads of both FIFOs and forms two candidate
losses:

    s0 = head0.loss + 0        sN = headN.loss + N_k

A comparator (the *switch*) picks the smaller candidate, and that becomes the
next output loss. There are three cases:

| case | condition | dequeue     | output probability                      |
|------|-----------|-------------|-----------------------------------------|
| A    | s0 < sN   | FIFO 0      | head0.prob × (1 − p)                    |
| C    | sN < s0   | FIFO N      | headN.prob × p                          |
| B    | s0 == sN  | both FIFOs  | head0.prob × (1 − p) + headN.prob × p   |

Both candidate streams are sorted, so the merged output is sorted too. The
output point is written to the back of **both** FIFOs, behind the end marker
of the old list. The old and new lists therefore share the same memory.

When FIFO 0's head is the end marker, its candidate is treated as larger
than every real loss. FIFO N keeps draining. When both heads are end
markers, both are popped and a fresh end marker is written behind the new
list. The step is then complete, and the FIFOs hold exactly the new
distribution.

A pool starts from the single point `(0, 1.0)` followed by the end marker.
Probabilities carry one integer bit so that 1.0 is exact.

### Dynamic point dropping

Products are rounded to nearest at 24 fractional bits. When an output
probability rounds to exactly zero (below 2^-25), the point is not written.
The far tails of the distribution hold many such points, especially for
large pools. Dropping them keeps both the FIFO size and the work per step
bounded. The tranche results lose nothing beyond the rounding already
present, because a zero-probability point contributes nothing.

Rounding rather than truncating matters here. A truncated product loses
half an LSB on average. Over a 100-instrument pool that is about 10^5
products, all biased the same way. In simulation the main tranche losses
came out 0.4–0.6 % low, and a tranche that the pool barely reaches came out
several percent low. With rounding the errors cancel: the largest error
measured against an unrounded double-precision computation is 0.03 %. The
price is that fewer points round to zero, so a pool takes about 11 % more
cycles and holds about 20 % more points than it would with truncation.
`FRAC_W` in `cdo_pkg` trades precision against speed and storage directly.

### The lookahead double buffer (`la_fifo`)

The FIFO memory has a registered read: data appears one edge after the
address. If the switch had to wait for that read after every pop, it could
decide only every other cycle. `la_fifo` therefore keeps the two oldest
entries in two registers, `buf[0]` and `buf[1]`, outside the memory. A `sel`
bit says which one is the head.

* A pop flips `sel`, so the other buffer becomes the head on the next edge.
* On the same edge, the buffer that was just emptied is reloaded from memory.

The comparator always sees a valid head, and it can pop every cycle. An
entry written into an empty FIFO reaches the head one edge after its write.
That matters here: during a step the write side follows the read side
closely. `level` counts entries in memory and in both buffers; with the
buffers, `DEPTH + 2` entries fit. Writing while full sets a sticky `overflow`
and trips an assertion.

### Pipeline and timing

| cycle | work |
|-------|------|
| 0 | add, compare and choose the case from the buffer registers; pop the chosen FIFO(s) |
| 1 | register the head probabilities and register values (operand stage) |
| 2 | register both products; then add them, test for zero, and write to both FIFOs on the edge closing the cycle |

The core makes one merge decision per clock. A step takes one decision per
distinct output loss, plus one for the end marker. For a list of `n` points
that is between `n + 2` and `2n + 1` decisions. Between steps the pipeline drains before the next instrument is taken, which costs
5 cycles per step.

For the last instrument of a pool, every kept output point is also sent on
`dist_valid/dist_point`, in loss order, to the tranche units. `dist_end`
pulses after the final point. The FIFOs are then cleared and reseeded for the
next pool. The output stream has no back-pressure, because the tranche units
accept one point per cycle.

If the next instrument has not arrived when a step ends, the convolution
waits (reported as `starved`). The host sends instruments one at a time, so
a core can start before the whole pool has been transferred.

### Sizing

`FIFO_DEPTH` (default 4096) sets the entries per FIFO. Two FIFOs of 4096 × 41
bits come to about 336 Kbit of block RAM per core. Peak occupancy measured in
simulation for 100-instrument pools:

| max notional | 20  | 50          | 75   | 100  | 150  | 200  | 250  | 300  | 400  |
|--------------|-----|-------------|------|------|------|------|------|------|------|
| peak points  | 497 | 1233–1359   | 1819 | 2368 | 3209 | 4466 | 5167 | 6398 | 8652 |

Maximum notionals up to 150 fit the default depth. A maximum of 200 needs
`FIFO_DEPTH = 8192`, and 400 needs 16384. Pool size matters much less,
because point dropping trims the tails of long pools: with notionals up to
50, pools of 25 to 250 instruments peak at 533 to 1874 points. The depth of
4096 lets ten cores fit the block RAM of a mid-size FPGA. The maximum loss
of a pool must stay below `16'hFFFF`, which an assertion checks.

## Tranche expected loss (`tranche`)

Each tranche unit receives the same stream of distribution points and
computes

    E[loss] = Σ  min(S, max(l − A, 0)) × P(l)

It is a five-stage pipeline:

1. subtract `A`;
2. clamp at zero;
3. clamp at `S`;
4. multiply by the probability, which is delayed three registers to line up
   with the loss;
5. accumulate.

`A` is sampled at the first stage. `S` travels down the pipeline with its
point, so the next scenario's tranche points may be loaded as soon as a
stream ends. The result (Q24.24, 48 bits) appears on `out_valid/out_loss`
five cycles after the stream's end, and the accumulator clears itself.

The loss fed to the subtractor is the point's own loss field, not a counter
stepping through every possible loss. A sparse distribution therefore needs
no table at all in the tranche units.

## Scenario accumulation (`accum`)

When all tranche units have finished a scenario, `accum` latches their
losses. It then multiplies each loss by the scenario weight (Q1.24) and adds
`loss × weight >> 24` into a 64-bit total per tranche. There is one shared
multiplier, one tranche per cycle, so a scenario costs `NUM_TRANCHES + 1`
cycles. The cores spend tens of thousands of cycles per scenario, so this
does not matter.

After the scenario flagged "last", it writes `2 × NUM_TRANCHES` words to the
Out FIFO: tranche 0 first, the high word of each total first. It then clears
the totals.

## Core, host words and top (`cdo_core`, `cdo_top`, `sync_fifo`, `cdo_pkg`)

A core receives 32-bit words through its In FIFO (a 16-deep
first-word-fall-through `sync_fifo` with a valid/ready handshake):

| [31:29] opcode | meaning | fields |
|---|---|---|
| 1 `OP_ATTACH`   | attachment point of a tranche | [28:24] tranche, [15:0] value |
| 2 `OP_SIZE`     | size of a tranche             | [28:24] tranche, [15:0] value |
| 3 `OP_WEIGHT`   | start of a scenario           | [28] last scenario of the step, [24:0] weight Q1.24 |
| 4 `OP_NOTIONAL` | notional of the next instrument | [15:0] |
| 5 `OP_PROB`     | default probability; hands the instrument to the convolution | [28] last instrument, [24:0] probability Q1.24 |

Tranche points are kept until they are overwritten. Each scenario carries its
own weight and its own default probabilities, so the pool is sent once per
scenario. After the last instrument of a scenario, the decoder holds back
further words until `accum` has absorbed that scenario's losses. This
guarantees that a weight or tranche point meant for the next scenario never
changes under the running one.

`cdo_top` replicates the core `NUM_CORES` times, with one input channel and
one output channel per core, all on one clock. The host is expected to deal
the cores their work round-robin, one instrument per turn. Each core also
brings out:

* an `events` struct of one-cycle pulses: starved, case A/B/C, dropped,
  scenario done, step done, overflow;
* its FIFO occupancy.

These are for monitoring.

## Numbers

| quantity | format |
|---|---|
| loss / notional | 16-bit unsigned integer; `FFFF` is reserved as the end marker |
| probability, weight | Q1.24 unsigned (25 bits) |
| products | rounded to nearest at 24 fractional bits |
| tranche loss per scenario | 48 bits (Q24.24) |
| weighted total per tranche | 64 bits (Q40.24), sent as two words |

On the default problem, all ten cores each price a 64-scenario step. Each
scenario is 100 instruments with notionals uniform in 1–50, default
probabilities uniform in 0–1, and 6 tranches. The run takes 4.82 M cycles,
which is 24.1 ms at a 200 MHz core clock. That is about 75 k cycles per
scenario, and the peak FIFO occupancy is 1359 points. Every tranche total is
within 0.01 % of a double-precision computation. The target is 0.5 %.

## Where this design departs from the reference architecture

* **Clocking and links.** The original cores run at 200 MHz behind
  asynchronous point-to-point FIFO links to a 100 MHz soft processor. Here
  everything runs on one clock. The link IP, the processor and its
  peripherals are not included; the per-core valid/ready channels are where
  they would connect.
* **Host word format.** The encoding above is this design's own.
* **Pipeline split.** The original places add and compare in one cycle and
  the dequeue in the next. Here, add, compare and the pop decision share
  cycle 0, working from the buffer registers. The memory read that refills a
  buffer completes on the following edge.
* **Product select.** The original picks the output probability with a mux
  after the product adder. Here the switch zeroes the unused product before
  the adder. The result is the same.
* **Step overhead.** Each convolution step costs 5 cycles of overhead. This
  figure is this design's own.
* **Tranche loss source.** The tranche unit takes losses from the point
  stream instead of a loss counter and a stored distribution table.
* **Accumulator internals.** These are not specified by the source and are
  the simplest form: one multiplier, serial over the tranches.
* **Sizes.** `FIFO_DEPTH` 4096 and In/Out FIFO depth 16 are chosen here.
  `NUM_TRANCHES` defaults to 6; the 5-bit tranche index allows up to 32, and
  20 is the intended maximum.
* **Rounding.** The source does not say how products are rounded. This
  design rounds to nearest, for the reason given under point dropping.

## Simulating

Everything is plain SystemVerilog for Verilator 5 (`--timing`). Example for
the full-size run:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cdo_full \
    -y rtl -y tb +libext+.sv -Irtl rtl/cdo_pkg.sv tb/cdo_ref_pkg.sv tb/tb_cdo_full.sv
./obj_dir/Vtb_cdo_full
```

Replace `tb_cdo_full` with any testbench below. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb/cdo_ref_pkg.sv` is the reference model the tests compare against. It
does the following:

* runs the convolution as a dense table with the same rounding;
* computes the tranche and weighting sums;
* counts the merge decisions a step must take;
* writes host programs and expected result words from a seeded xorshift
  generator;
* repeats the sums in double precision without rounding, so that tests can
  measure the numerical error.

The hardware must match it bit for bit.

| testbench | what it covers |
|---|---|
| `tb_la_fifo` | lookahead FIFO against a queue model: latency, full at DEPTH+2, back-to-back pops without bubbles, clear |
| `tb_sync_fifo` | In/Out FIFO against a queue model, full and simultaneous read/write |
| `tb_fifo_conv` | a 3-instrument textbook pool; a non-uniform pool (2, 3, 1000) that must hold exactly 8 points; random pools exact against the model; forced point drops; constant per-step overhead; all three cases and starvation seen |
| `tb_tranche` | random streams, back-to-back streams, 5-cycle latency |
| `tb_accum` | weighted sums over random scenarios, MAC cycle count, output back-pressure |
| `tb_cdo_core` | whole core over several steps with random host gaps; merge decisions equal the model's count |
| `tb_cdo_top` | ten cores, round-robin host, a flooded In FIFO and a stalled Out FIFO; counts every event type |
| `tb_cdo_full` | ten cores on the default 64-scenario, 100-instrument problem; exact results plus a 0.5 % precision check (about 25 s of simulation) |
| `tb_tranche_sweep` | one core built with 20 tranche units, exact results and precision |
| `tb_workload_sweep` | notional sweep 20–150 and pool sweep 25–250 on the full design; prints cycles, peak occupancy and precision |

To try a larger notional range, raise `FIFO_DEPTH` on `cdo_top`. The
testbenches size their `entries` ports for the default depth.
