# Queue-feedback DVFS for a network of voltage-frequency islands

A chip split into voltage-frequency islands (VFIs) gives each island its own
clock and supply. Data moves between islands only through mixed-clock
interface queues. The islands' speeds must match: if the island that fills a
queue runs faster than the island that drains it, the queue fills and the
writer stalls. If it runs slower, the reader starves. Nominal frequencies chosen
at design time drift away from a match because of process, voltage and
temperature variation and because the workload changes. This RTL closes the
loop. Once per control interval it measures how full each interface queue is,
and a state-feedback controller sets every island's clock frequency so that the
queues stay at chosen reference levels. Each island's supply voltage follows
its frequency, and the voltage and frequency change in an order that never lets
an island run faster than its voltage supports.

The default configuration is a three-island MPEG-2 encoder:

```
      island 0                  island 1                       island 2
  input buffer  --queue 0-->  motion est./comp., DCT,  --queue 1-->  variable-length
  (set from the               quantization, frame          coder
   frame rate)                buffer, routers
```

Island 0 runs at a frequency fixed by the required frame rate. The controller
adjusts islands 1 and 2 to the work in each macroblock, and those islands slow
down whenever the content allows it.

## The model the controller is built on

Let `q_i(k)` be the occupancy of queue *i* at the start of control interval
*k*, and `f_j(k)` the frequency of island *j* during that interval. The
interval lasts `T`. If the writer island puts `λ̄_i` words per cycle into
queue *i* and the reader takes `μ̄_i` per cycle, then

```
q_i(k) = q_i(k-1) + T * (λ̄_i * f_writer(k-1) - μ̄_i * f_reader(k-1))
```

With all queues stacked into a vector `Q` and all frequencies into `F`, this
becomes `Q(k) = Q(k-1) + T·B·F(k-1)`. `B` has one row per queue and one column
per island. A row holds `+λ̄` in the writer's column and `-μ̄` in the reader's
column. So `Q` is the state of a linear system and `F` is its input. The
controllability matrix of this system has the same rank as `B`. As a result, at
most as many queues as there are islands can be held at a reference, and they
can be held exactly when `B`, restricted to those queues, has full row rank. If
an island pair has several queues, control the busiest one.

The hardware implements two control laws (`state_feedback_controller`):

* **Regulation**, `F(k) = F_nom + K0·R(k) − K·Q(k)`. Every island is
  controlled around a nominal operating point chosen off-line. With `K0 = K`
  the queues settle at `R` when the nominal rates balance. The closed loop is
  `Q(k) = (I − T·B·K)·Q(k−1) + …`, and it is stable when the eigenvalues of
  `I − T·B·K` lie inside the unit circle. This is a proportional law: if the
  real rates differ from the nominal ones, the queues settle at a fixed offset
  from `R`.
* **Tracking**, `X(k) = X(k−1) + R(k) − Q(k)` and
  `F(k) = K1·X(k) − K·Q(k)`. Some islands (`indep`) run at frequencies set
  from outside, `D(k)`, such as an input island paced by the frame rate.
  These enter the model as `+T·C·D`. Without the integrator they would shift
  the steady-state occupancies. The integrator removes that shift, so the
  controlled islands follow the independent ones and the workload.

`K`, `K0` and `K1` are computed off-line, for example by pole placement on
`I − T·B·K` (regulation) or on the system augmented with the integrator states
(tracking), or by LQR. They are loaded as inputs. For a single queue with
service rate `μ`, the stability condition `0 < K < 2/(T·μ)` shows the margin
directly. A service rate may rise by up to `2/(T·K) − μ` before the loop goes
unstable. For robustness, choose `K` for the highest service rate expected.

Every computed frequency is then limited to `[f_min, f_max]`. `f_max` is where
a temperature-dependent maximum safe frequency enters.

## Blocks

| module | role |
|---|---|
| `vfi_dvfs_top` | islands, queues and the clock control logic, wired per `Q_SRC`/`Q_DST` |
| `mixed_clock_fifo` | interface queue: dual-clock FIFO, Gray-code pointers, 512 × 32 |
| `queue_occupancy_monitor` | brings both pointers of a queue into the controller clock and subtracts them |
| `control_interval_timer` | one tick every 2^12 controller cycles (128 µs at 32 MHz) |
| `state_feedback_controller` | regulation and tracking laws, integrator, limits |
| `dvfs_sequencer` | per island: voltage and frequency change order, frequency-to-voltage map |
| `island_clock_gen` | per island: phase-accumulator clock synthesizer from the common reference |
| `sync_2ff` | two-flop synchronizer |
| `dvfs_pkg` | number formats and the mode type |

Outside the RTL, and connected through ports: the reference clock source (a PLL
in the intended system), the per-island voltage regulators (driven by `v_set`),
the level shifters at island boundaries, whatever produces `f_max` from
temperature, and the processing cores of the islands.

## Number formats

| quantity | format |
|---|---|
| frequency | unsigned, 20 bits, kHz (100 MHz = 100000) |
| gain | signed, 24 bits, 8 fractional bits, kHz per queue entry |
| occupancy, reference | unsigned, `log2(DEPTH)+1` bits (10 for 512) |
| integrator | signed, 24 bits, saturating, entries × intervals |
| voltage | unsigned, 12 bits, mV |

To turn a gain designed in floating point into a register value, express
`B` in queue entries per interval per kHz and multiply the gain by 256. For
example, if an island reads 1/128 word per cycle, the reader's entry of `B` is
`0.128 µs·MHz·1000 / 128 = 0.001` entries per kHz for each 128 µs interval. A
gain placing that single-queue loop's pole at 0.09 is then
`0.91 / 0.001 = 910` kHz per entry, loaded as 232960. The sums are exact. The
result is shifted right by 8 bits, rounding toward minus infinity, before the
limit.

## One control interval

1. `control_interval_timer` pulses `tick` every 2^`INTERVAL_LOG2` cycles of
   `ctrl_clk`.
2. On the next cycle the controller captures the occupancies. In tracking mode
   it also updates the integrator. Each occupancy lags the queue pointers by
   three `ctrl_clk` cycles.
3. For NI·NQ cycles it accumulates one matrix entry (one product pair) per
   cycle. `f_valid` pulses NI·NQ + 2 cycles after the tick, which is 8 cycles
   for the default 3 × 2 configuration. A tick that arrives while an update is
   running is ignored.
4. Each island's `dvfs_sequencer` compares the request with the frequency in
   force:
   * **slower**: the new frequency word is applied at once, and the voltage is
     lowered `F_SETTLE` (4) cycles later;
   * **faster**: the voltage target is raised at once, and the frequency
     follows after `V_SETTLE` (320) cycles, 10 µs at 32 MHz, for the regulator
     to ramp.
   The voltage target is linear in frequency: 0.8 V at 0 Hz up to 1.2 V at
   200 MHz, capped at 1.2 V. An assertion checks that the frequency in force
   never needs more than the voltage in force.
5. The island's `island_clock_gen` takes the new word across from `ctrl_clk`
   to `ref_clk` with a toggle and a synchronizer. It applies the word two to
   three reference cycles later, without a phase jump.

## Clocks and crossings

The island clocks come from phase accumulators clocked by `ref_clk` (default
400 MHz). Each accumulator adds `f·2^32/400000` per reference cycle, and the
island clock is the accumulator's top bit. The average frequency is exact to
2^-32 of the reference. Each edge lands within one reference period (2.5 ns) of
its ideal time, and frequencies are limited to half the reference. An island
clock of 0 stops. The only paths between clock domains are:

* the queue pointers, Gray-coded and synchronized in the other island and in
  the controller;
* the frequency word, held stable and handed over by a synchronized toggle.

There is one asynchronous reset for all domains. The island clocks stand still
while it is held, so the queues reset on its falling edge. After reset every
island runs at `F_RESET_KHZ` (100 MHz) at the matching voltage.

## Simulating

Every file is plain SystemVerilog. Each module is in `rtl/<name>.sv`, and each
testbench is in `tb/<name>.sv`, self-checking, and ends with
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_vfi_dvfs_top -y rtl -y tb rtl/dvfs_pkg.sv \
    tb/tb_vfi_dvfs_top.sv -o sim && obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_mixed_clock_fifo` | exactly DEPTH entries accepted, order and data kept across changing clocks, Gray pointers move one bit at a time |
| `tb_queue_occupancy_monitor` | occupancy = writes − reads across wrap-around, full and empty; 3-cycle latency |
| `tb_control_interval_timer` | tick spacing of exactly 4096 cycles, first tick, count, enable |
| `tb_state_feedback_controller` | both laws against an integer model, integrator saturation and clearing, limits, 8-cycle latency |
| `tb_dvfs_sequencer` | voltage-first and frequency-first orderings cycle by cycle, voltage map |
| `tb_island_clock_gen` | edge counts over 20 µs for several words, hand-off timing, minimum pulse width |
| `tb_vfi_dvfs_top` | whole system at default parameters, 10 ms of simulated time, a few seconds of run time |
| `tb_regulator_networks` | two-, three- and four-island ring networks and a one-queue loop, each checked against the linear model (uses the helper `vfi_network_harness`) |

`tb_vfi_dvfs_top` runs the three-island encoder with behavioural cores. The
input island writes 1/64 word per cycle. The middle island spends a random time
around a mean `W1` per item. The coding island spends 41 cycles per item. The
test has three phases:

* **Open loop.** All islands run at 100 MHz: queue 0 fills and the writer
  stalls, while queue 1 runs dry.
* **Regulation.** Nominal frequencies are 50, 100 and 32 MHz and both poles are
  at 0.5. A 40-word burst written into queue 0, and later the queue drained by a
  burst read, are both pulled back to the references (10 and 8 entries).
* **Tracking.** Island 0 is fixed at 50 MHz and the poles are at 0.3. `W1` steps
  128 → 96 → 160. The middle island follows at 100, 75 and 125 MHz
  (781.25 kHz × W1). The coding island stays near 32 MHz. During the phase,
  a 90 MHz limit on the middle island holds for two intervals.

The test counts every mechanism and fails if one never happened: ticks,
updates, both sequencing orders, upper and lower limits, full and empty stalls,
bursts, the mode switch, the independent island and the integrator. It also
checks data order through both queues, that the voltage always covers the
frequency, and the middle island's clock edge count per interval. The gain
values in the test come from pole placement on the `B` matrix of these
workloads.

## Regulator networks and what can be controlled

`tb_regulator_networks` builds four other networks from the same top by
changing `NI`, `NQ`, `Q_SRC` and `Q_DST`. Every island is nominally at
100 MHz, and every queue end moves 1/128 word per cycle.

| network | queues (writer → reader) | rank of `B` |
|---|---|---|
| ring2 | 0→1, 1→0 | 1 |
| ring3 | 0→1, 2→0, 1→2 | 2 |
| ring4 | 0→1, 2→0, 1→3, 3→2 | 3 |
| single | 0→1, island 0 fixed | 1 |

In a ring, no choice of frequencies changes the total number of words in the
ring. Every frequency change moves words from one queue to the next. So `B`
has one rank fewer than the number of queues, and only the differences between
occupancies can be regulated. The gains, `K = 0.5·pinv(T·B)`, place every
controllable mode at 0.5 and leave the total alone. The test preloads the
rings with as many words as the references add up to, and every queue then
settles on its own reference. A burst written into one queue ends up spread
evenly over the ring, and the frequencies return to nominal. This is the
controllability limit in practice: the hardware holds the queues where the
model says, and the model says the total is not the controller's to set.

The single-queue loop shows the stability margin. Its gain gives
`T·μ·K = 0.5` at the nominal service rate. The test raises the service rate by
80 % and 200 % and then lowers it by 40 %. At +200 % the pole is −0.5, and the
response overshoots before it settles. The loop would become unstable only
beyond +300 %.

For each settling point, the test runs the linear model
`Q(k) = Q(k−1) + T·B·F(k−1)` from the measured occupancies. It then compares
the hardware's average over four intervals with the model's fixed point
(±3 entries, ±2 % in frequency).

Array parameters such as `Q_SRC` should be overridden with a named constant
(`localparam int unsigned SRC [3] = '{0, 2, 1};` and then `.Q_SRC(SRC)`),
not with a literal pattern. Verilator checks a literal against the default
size.

## Departures and limits

* The reference controller ran on a small soft processor. Here it is dedicated
  sequential logic with one multiplier pair. It finishes in 8 of the
  interval's 4096 cycles.
* The control interval is a power of two times the fixed controller clock.
  The reference scheme counts it in the slowest island clock, which here
  changes at run time.
* The interface queues are a generic Gray-pointer dual-clock FIFO, not a
  vendor FIFO macro. The island clocks come from phase accumulators, not from
  a few fixed clocks made by delay-locked loops.
* Nothing here measures power. The energy model of the voltage converters
  (efficiency and load capacitance) and the resulting savings figures belong
  to the evaluation and are not reproduced.
* The formats, the 512 × 32 queue size, the 400 MHz reference, the linear
  voltage map, the settle times, the 100 MHz reset point and the lower limit
  `f_min` are this design's choices.
* The integrator has no anti-windup. If an island is held at a limit for
  long, the integrator winds up, and the loop overshoots for several
  intervals after the limit lifts. A queue that runs empty also slows
  recovery, because its error can be no larger than its reference. Keep
  references a few entries above zero.
* Regulation is proportional. With real rates away from nominal, the queues
  settle at an offset from `R`. Tracking mode has no such offset.
* The voltage target goes to an external regulator. The sequencer does not
  wait for a "settled" signal. It waits a fixed `V_SETTLE`.
* The island topology is fixed by the parameters `NI`, `NQ`, `Q_SRC` and
  `Q_DST`. The defaults give the three-island encoder, and the ring networks
  above need other values. In the three- and four-island rings, the direction
  of the queue between islands 1 and 2 (1 and 3 in ring4) is this design's
  choice. It closes the ring.
* The rates, references and burst sizes in the network tests are this
  design's own. The rate variation of both islands of the two-island ring is
  not run: in a ring, rates that do not balance leave no operating point with constant
  queues at nonzero frequencies.
* Average occupancy over an interval is not used. The controller samples the
  occupancy at the start of each interval.
