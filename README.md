# Queue-model control of a multi-variant dataflow accelerator

A dataflow accelerator sits between FIFOs and has to keep up with an input
stream whose rate changes over time. Sized for the peak rate it idles most of
the time; sized for the average rate its input queue overflows during bursts.
This design gives the accelerator several *configurations* (variants). The
exact one is the slowest; each faster one gives up some accuracy. A small
controller picks the variant at run time. It looks at how many jobs wait in the
input queue and steps to a faster variant only when that many jobs would break
a response-time bound. When the queue drains, it steps back towards the exact
variant.

The thresholds come from a queueing model, not from evenly spaced fill
levels. Each variant k is treated as an M/D/1 station: Poisson arrivals,
deterministic service time τ_k, one server. From this model we get the highest
arrival rate, and so the largest number of waiting jobs, for which variant k
still meets the bound. These numbers form a small constant table. In hardware
the controller is a counter on the queue, a timer, a ROM and two comparators.

The accelerator used here is **AVE8**, a moving-average filter. Its variants
shrink the averaging window from 8 samples down to 3.

Everything is SystemVerilog-2017 in `rtl/`, with self-checking testbenches in
`tb/`.

## Structure

```
             +---------------------+   pop    +-----------+   push   +-------------+
 in_valid -->| smart_waiting_queue |--------->| ave8_acc  |--------->| output FIFO |--> out_valid
 in_ready <--|  FIFO + N_wait      |  sample  |  window   |  result  | (data, cfg) |<-- out_ready
 in_data  -->|  + snapshot         |          |  8-cfg    |  + cfg   +-------------+
             +---------------------+          +-----------+
               | sample ^  | N_wait, almost_full,  ^ cfg   | idle
               |        |  v empty (snapshot)      |       v
             +-------------------------------------------------+
             | md1_controller                                  |
             |  obs_timer -> threshold_lut -> symptom_detector |
             |                      -> planner                 |
             +-------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/dtq_pkg.sv` | types (`cfg_t`, `symptom_e`), M/D/1 threshold function, AVE8 window/latency/reciprocal functions |
| `rtl/smart_waiting_queue.sv` | input FIFO with occupancy counter N_wait, full / almost-full / empty flags, and a snapshot register |
| `rtl/obs_timer.sv` | one-cycle strobe every observation period |
| `rtl/threshold_lut.sv` | ROM of thresholds W_k, computed at elaboration |
| `rtl/symptom_detector.sv` | compares N_wait with W_k and W_(k-1): speed up, slow down or stay |
| `rtl/planner.sv` | steps the decided configuration and applies it only between iterations |
| `rtl/md1_controller.sv` | timer + LUT + detector + planner |
| `rtl/ave8_acc.sv` | multi-variant moving-average accelerator |
| `rtl/dyn_tunable_ave8.sv` | top: the four parts above wired together; the output FIFO is a second `smart_waiting_queue` |

## The threshold model

The variants are numbered 0 to K-1. Variant 0 is exact and slowest; a higher
index is faster and less accurate. All quantities are counted in clock cycles:

* ρ = λ·τ_k is the utilisation (λ is the arrival rate in jobs per cycle)
* N = ρ + ρ² / (2(1 − ρ)) is the mean number of jobs in the system (M/D/1)
* R = N / λ is the mean response time (Little's law)

Set R equal to the bound R_max and solve for λ:

    λ_max,k = 2 (R_max − τ_k) / (τ_k (2 R_max − τ_k))

The threshold of variant k is the number of arrivals expected in one
observation period T_obs:

    W_k = floor(λ_max,k · T_obs)        (W_k = 0 if τ_k ≥ R_max)

`dtq_pkg::md1_thresholds` computes this in integer arithmetic while the design
elaborates. `threshold_lut` holds the result as a ROM. A variant is admissible
only if W_k is smaller than the input queue depth. If any variant is not,
elaboration stops with an error, because the queue could never hold enough
jobs to show the condition.

With the default operating point the numbers are:

* 100 MHz clock
* R_max = 1.5 µs = 150 cycles
* T_obs = 1.28 µs = 128 cycles
* AVE8 service times τ = 10, 9, 8, 7, 6, 5 cycles

| variant k | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| window (samples) | 8 | 7 | 6 | 5 | 4 | 3 |
| τ_k (cycles) | 10 | 9 | 8 | 7 | 6 | 5 |
| W_k (jobs) | 12 | 13 | 15 | 17 | 20 | 25 |

The default queue depth of 256 follows from the observation period. The
128-cycle period is the shortest time in which the input queue can be half
filled, at one element per cycle.

## The decision rule and its hysteresis

Let the current configuration be k. At every observation the controller
applies these rules, with SPEED_UP taking priority:

* **SPEED_UP** to k+1 if N_wait > W_k, or if the queue was almost full.
* **SLOW_DOWN** to k−1 if k > 0 and either N_wait < W_(k−1) or the queue was
  empty.
* **STAY** in all other cases.

In configuration k the queue may therefore hold anything from W_(k−1) to W_k
jobs without a change. Each variant has its own band, and the bands overlap at
the edges. The thresholds grow with speed, so after a step up the new lower
bound is the old upper bound. A queue level that hovers near one threshold
cannot make the configuration flip back and forth on every observation.

Two more details:

* The empty rule lets the controller return to the exact variant even when
  W_0 = 0. That happens when the exact variant alone can never meet the bound.
* The almost-full rule makes the controller react to a queue that is about to
  overflow, whatever the table says. The almost-full level is DEPTH − 32.

The configuration moves by at most one step per observation and saturates at
0 and K−1.

## Timing of a decision

| cycle | event |
|---|---|
| t | `obs_timer` ticks: `sample` to the queue |
| t+1 | the queue's snapshot (count, almost_full, empty) is valid; the detector classifies it combinationally |
| t+2 | `planner.next_cfg` holds the decision |
| first cycle with `acc_idle` | `cfg` (the signal the accelerator uses) takes `next_cfg` |

The accelerator reads `cfg` during the whole iteration: the window length
while it sums, and the reciprocal when it outputs. So `cfg` may change only
while the accelerator is idle, between taking one sample and the next. A
decision made during an iteration waits in `next_cfg`. Assertions in `planner`
and `ave8_acc` check this rule.

## AVE8, the tunable accelerator

Each iteration does the following:

1. Take one sample from the queue (`in_ready` is high only when idle).
2. Shift the sample into an 8-entry history.
3. Add the newest 8−k samples, one per cycle.
4. Output floor(sum / (8−k)) with the configuration tag.

The division is exact. The sum is multiplied by ceil(2^S / w) with
S = DATA_W + 6 and shifted right by S. The rounding error of this reciprocal
stays below 1/w for any sum of eight DATA_W-bit samples, so the result equals
the floor of the true quotient.

With a ready consumer an iteration takes (8−k)+2 cycles:

* 1 cycle to load the sample
* 8−k cycles to accumulate
* 1 cycle to output

The history is cleared by reset, so the first outputs average in zeros.

## Interfaces and parameters of the top (`dyn_tunable_ave8`)

All streams use valid/ready handshakes. A transfer happens on a rising edge
where both are high. Reset (`rst_n`) is synchronous and active low. After
reset both queues are empty and the configuration is 0.

| port | dir | width | meaning |
|---|---|---|---|
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/DATA_W | sample stream; `in_ready` is low while the input queue is full |
| `out_valid`, `out_ready`, `out_data` | out/in/out | 1/1/DATA_W | moving averages, in input order |
| `out_cfg` | out | 3 | the variant that produced `out_data` |
| `cfg`, `next_cfg` | out | 3 | applied and decided configuration |
| `n_wait` | out | clog2(IN_DEPTH+1) | live input-queue occupancy |

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 16 | sample width |
| `IN_DEPTH`, `OUT_DEPTH` | 256 | queue depths (powers of two) |
| `AF_MARGIN` | 32 | almost-full when count ≥ IN_DEPTH − AF_MARGIN |
| `K` | 6 | number of variants (1..8) |
| `OBS_CYCLES` | 128 | observation period |
| `R_CYCLES` | 150 | response-time bound |

To use the controller with another accelerator, instantiate `md1_controller`
directly. Set `TAU` to that accelerator's per-variant service times in cycles
(a `dtq_pkg::kval_t` array), and drive `acc_idle` high whenever no iteration
is in progress.

## Where this departs from, or goes beyond, the published description

The queue counter, the observation-period sampling, the W_k look-up table, the
three-way symptom, the planner that applies changes only at iteration
boundaries, and the M/D/1 threshold formula all follow the original design.
The following are this implementation's own choices:

* **The accelerator.** The original design applies the controller to existing
  approximate accelerators: AVE8, FIR, Sobel and grey-scale. Their variants
  and timing are not published. The AVE8 variants here (window 8−k, one
  sample per cycle) are an illustrative choice. FIR, Sobel and grey-scale,
  and the GS→Sobel pipeline with two controllers, are not included.
* **Stay condition.** The original states the stay case as
  W_k < N_wait < W_(k−1), which contradicts its own speed-up and slow-down
  cases. Here the stay band is W_(k−1) ≤ N_wait ≤ W_k.
* **Almost-full and empty.** These flags take part in the decision as
  described above. The almost-full level and the reset values are choices of
  this design. The separate full flag is not used, because almost-full
  already covers it.
* **Thresholds at elaboration.** The original generates the table with an
  offline script. Here it is computed while the design elaborates.
* **Queue depth and handshake.** The queue depth is inferred from the
  observation period. The snapshot handshake and the valid/ready protocol
  are not given in the original.
* **Several input queues.** The original lets one controller watch several
  input FIFOs, and any almost-full one triggers a speed-up, but it does not
  say how the counts combine. `md1_controller` has a `NUM_Q` parameter.
  It takes the largest sampled count as N_wait, ORs the almost-full flags
  and treats the inputs as empty only when all of them are. The AVE8 top
  uses a single queue.
* **Variant order.** The original is inconsistent about the order of the
  variants. Here 0 is exact and slowest, matching its experiments.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert rtl/dtq_pkg.sv rtl/*.sv tb/tb_dyn_tunable_ave8.sv \
          --top-module tb_dyn_tunable_ave8 -Mdir obj && obj/Vtb_dyn_tunable_ave8
```

Replace the testbench name to run another one. `dtq_pkg.sv` must come first.

| testbench | what it shows |
|---|---|
| `tb_obs_timer` | tick period and first tick after reset |
| `tb_smart_waiting_queue` | FIFO order, counter, flags and snapshot against a reference queue (16 entries) |
| `tb_threshold_lut` | W_k against a direct search with the M/D/1 equations; a 4-variant table with a variant that can never meet the bound |
| `tb_symptom_detector` | the decision rule, at the thresholds and at random |
| `tb_planner` | one-step moves, saturation, deferral while busy |
| `tb_md1_controller` | decision timing, climb to the fastest variant, hysteresis band, almost-full and empty rules, return to 0; a two-queue controller where the more loaded queue decides |
| `tb_ave8_acc` | every average against a reference, and (8−k)+2 cycles per sample |
| `tb_dyn_tunable_ave8` | whole design at default size: three traffic scenarios of 1000 random samples. Checks every result and the one-step, between-iterations rule, and requires that each mechanism occurs (speed-up, slow-down, stay, almost-full, empty, a held decision, input backpressure, output stall, both ends of the range); mean response within the bound under congested traffic; mean configuration falling with the traffic level |
| `tb_ave8_preset_compare` | seven copies on the same traffic: one adaptive, six held at a fixed variant. Compares mean response time and error |

Traffic (arrival probability per cycle):

| scenario | arrival rate |
|---|---|
| highly congested | 0.30 |
| congested | 0.14 |
| uncongested | 0.03, with occasional 20-sample bursts |

The exact variant serves 0.1 samples per cycle and the fastest 0.2.

Typical output of `tb_ave8_preset_compare` gives the mean response time in
cycles and the MAPE against the exact 8-sample average:

| scenario | adaptive | exact (conf0) | conf3 | fastest (conf5) |
|---|---|---|---|---|
| highly congested | 1051 / 0.220 | 3333 / 0 | 1831 / 0.141 | 830 / 0.235 |
| congested | 119 / 0.118 | 1379 / 0 | 46 / 0.134 | 10 / 0.225 |
| uncongested | 105 / 0.061 | 141 / 0 | 66 / 0.144 | 36 / 0.244 |

Under congested traffic the adaptive stage meets the 150-cycle bound. Its
error is lower than that of every fixed variant that also meets the bound.
Under highly congested traffic no variant can keep up. The controller then
settles on the fastest variant and its error comes close to the fastest
variant's.
