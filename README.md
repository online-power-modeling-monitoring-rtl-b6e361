# Power capping for a multi-core processor, from switching activity to clock gating

This RTL keeps the average power of an NCPU-core processor at a budget set by
software, and shares that budget between the cores so that the throttled cores
get similar performance. It needs no power sensor. Each core's power is
estimated on chip from the switching activity of a few of its signals. Three
nested loops then act once per short control epoch:

1. A **power monitor** per core turns toggles counted over one window into mW.
2. A **local controller** per core compares that estimate with the core's set
   point. It decides how many clock cycles of the next epoch the core must
   lose. A **clock-gating actuator** takes those cycles away.
3. A **global controller** acts as an energy buffer. It integrates the gap
   between the global set point and the total power, and corrects the budget
   so the long-run average lands on the set point.
4. A **supervisor** splits the corrected budget into per-core set points, with
   weights `theta_i` that sum to one. Every dwell period it moves weight
   towards the throttled core with the lowest utility. Utility is a
   weighted count of committed instructions.

Software reads and writes all of this through a small register bank.

With the defaults there are 4 cores, a 100-cycle epoch (2 us at 50 MHz) and a
32-epoch dwell (64 us). The top is `pwr_mgmt_top`.

## Estimating power from toggles (`pwr_counter_svc`, `pwr_counter_hwc`, `pwr_adder`, `power_monitor`)

The power model is linear:

    P = CONST + sum_i (+/-) coeff_i * activity_i

Each term watches one signal. A **power counter** registers the signal every
cycle and XORs it with the previous sample. There are two counting modes:

* **SVC** (single variation count): the XOR bits are ORed together, so the
  activity grows by one in each cycle where any bit changed. This is cheap.
* **HWC** (Hamming weight count): the XOR bits are summed, so the activity
  grows by the number of bits that changed. This is more precise and costs
  an adder.

In the window's last cycle, the counter multiplies the accumulated activity by
its coefficient and clears the activity. The coefficient is unsigned fixed
point: `COEFF_W` = 24 bits, `COEFF_FRAC` = 16 of them fractional, in mW per
unit of activity. The counter saturates its result at 1023 mW, which is a
10-bit output.

The **power adder** adds or subtracts each contribution according to its sign
bit and adds the constant. It clamps the result to 0..4095 mW (12 bits) and
registers it.

`power_monitor` builds one counter per term from parameter arrays (`SIG_W`,
`SACM`, `COEFF`, `SIGN`, `CONST`). All counters share one window timer.
`model_rst` restarts the window, so that estimates can be aligned with an
external power trace.

The estimate is valid in cycle t+2 for a window whose last cycle is t: one
register stage in the counters and one in the adder.

The default monitor window is 2000 cycles (20 us at 100 MHz), for a monitor
used on its own. Inside `pwr_mgmt_top` the window is the control epoch, `TP`
= 100 cycles.

**The coefficients are placeholders.** In the top, each core is described by
three probes:

| Probe | Width | Mode | Coefficient |
|---|---|---|---|
| Data bus | 32 bits | HWC | 1/64 mW per bit toggle |
| Control field | 8 bits | SVC | 1/2 mW per changed cycle |
| Flag | 1 bit | SVC | 1/4 mW per changed cycle |

The constant is 10 mW. A real core needs a model fitted offline against
measured or simulated power, passed in through the same parameters.

## The per-core loop (`local_controller`, `dcg_actuator`, `clk_gate`)

Once per epoch, with estimate `P` and set point `SP`, both in mW:

    pf = p1*pf + (1-p1)*P            low-pass filter, pole p1 = 0.5
    e  = pf - SP
    C  = C + KC*(e - z0*e_prev)      PI: integrator pole 1, zero z0 = 0.32
    C  clamped to 0..TP-1

The arithmetic is Q8 fixed point. `C` is the number of cycles to mask in the
epoch. The loop gain `KC` = 0.4 cycles/mW is this design's choice; it
converges in a few tens of epochs on the test plant. A core with no
application (`active` low) has its state cleared and gets no throttling.

`dcg_actuator` masks the **last** `C` cycles of every epoch. `clk_en` is low
while the epoch counter is at or above `TP - C`. `clk_gate` is a latch that is
transparent while `clk` is low, followed by an AND, so `gclk` never glitches.
This is the one intended latch in the design.

The new action is stored in cycle 3 of an epoch. Masking at the end of the
epoch lets it apply to the same epoch. Cycles 0..3 still follow the previous
action. Whenever old and new actions are both below 97, exactly `C` cycles are
gated.

## The energy buffer (`global_controller`)

Each epoch, with global set point `SP` and total power `Ptot`:

    S = clamp(S + k0*(SP - Ptot), -2000, +2000) mW      k0 = 0.01 (655 in Q16)
    budget = clamp(SP + S, 0, 4000) mW

Running under the set point builds up positive `S`, which later allows short
bursts above it. Running over it draws `S` down. Because the loop integrates,
the average total power converges to `SP`. In the end-to-end test it averaged
199.9 mW over 300 epochs at a 200 mW set point. `k0` is small on purpose: the
buffer reacts over hundreds of epochs, much more slowly than the local loops.

## Sharing the budget (`budget_split`, `utility_calc`, `supervisor`)

`budget_split` registers the set points `SP_i = budget * theta_i`. `theta` is
Q10 (1024 = 1).

`utility_calc` sums the instructions a core commits in an epoch, weighted 1
(ALU and others), 8 (load/store) or 16 (FPU). It then filters the sum as
`u = (u + uCalc)/2`. The core reports one committed instruction class per
cycle, with 3 meaning none.

`supervisor` runs every `DWELL` epochs. It visits the cores one per cycle and
puts each in a class:

| Class | Condition |
|---|---|
| forced | Software imposes its theta. |
| idle | No application runs. |
| balanced | Running, but not gated at all: the application stays under its budget by itself, so more budget would not help. |
| unbalanced | Throttled. |

It then makes **one** transfer. The first rule that applies wins:

1. Move a forced core's theta to the imposed value. The difference comes from,
   or goes to, the unbalanced core of highest or lowest utility.
2. Give all of an idle core's theta to the lowest-utility unbalanced core.
3. If the utility gap among unbalanced cores exceeds `UTIL_TOL` (4), move
   `STEP` (16/1024) from the highest-utility to the lowest-utility one.
4. Move `STEP` from the balanced core holding the most theta to the
   lowest-utility unbalanced core.

Every transfer takes from one core and gives to another, so `sum(theta)`
stays exactly 1024. An assertion checks this. After reset every core holds
1024/NCPU.

The goal comes from the method this design follows: equal utility among the
throttled cores, with budget taken from cores that cannot use it and honoured
OS requests. The rules, their order, `STEP` and `UTIL_TOL` are this
implementation's own.

## Software interface (`pwr_regs`)

The bus is a simple request/acknowledge bus: `req`, `we`, `addr` (byte
address, word aligned), `wdata`. `rdata` and `ack` come one cycle after
`req`.

| Address | Register | Access | Contents |
|---|---|---|---|
| 0x00 | GLOBAL_SP | RW | [15:0] global set point, mW (reset 400) |
| 0x04 | TOTAL_POWER | RO | [15:0] total power of the last epoch |
| 0x08 | TOTAL_BUDGET | RO | [11:0] corrected budget |
| 0x0C | SLACK | RO | signed correction `S` |
| 0x10+16i | STATUS | RO | core i: [0] active, [5:4] class, [14:8] gated cycles |
| 0x14+16i | ACTUAL_POWER | RO | core i: [11:0] mW |
| 0x18+16i | POWER_BUDGET | RO | core i: [11:0] set point, mW |
| 0x1C+16i | THETA | RW | core i, see below |

THETA, on write: [31] force, [10:0] imposed theta. On read: [31] force,
[26:16] current theta, [10:0] imposed theta.

Other addresses read as zero.

## Timing of one epoch in `pwr_mgmt_top`

Take an epoch whose last cycle is t:

| Cycle | What happens |
|---|---|
| t+2 | Power estimates valid. |
| t+3 | Control actions and total power registered. |
| t+4 | Corrected budget. |
| t+5 | New set points. |

The actions gate the tail of the epoch that has just begun. The supervisor
visit takes NCPU+1 cycles after every `DWELL`-th epoch end.

## How well it caps

`tb_cap_sweep` runs two systems side by side: the default 4-core one and one
with `NCPU = 8`. It tries every combination of global set point and number of
busy cores; the remaining cores are idle. Each run settles for 400 epochs and
is then measured for 300. Two scores are computed:

* **Overflow**: how far the mean total power lies above the set point, in mW
  (0 if below).
* **Efficiency**: how much of the budget the cores leave unused although they
  could use it. Per core, the unused part is `min(SP_i - P, Pmax - P)`, where
  `Pmax = P*100/(100-A)` is what the core would draw ungated. Efficiency is
  100% minus the mean unused part as a share of `SP_i`.

| System | Set points | Busy cores | Worst overflow | Worst efficiency |
|---|---|---|---|---|
| 4 cores | 100, 200, 300, 400 mW | 1..4 | 5.5 mW | 97.6% |
| 8 cores | 200, 400, 600, 800 mW | 1, 2, 4, 8 | 3.1 mW | 97.2% |

The test fails a run above 10 mW overflow or below 85% efficiency.

When the busy cores need less than the set point, the mean power is simply
their demand. Idle cores still draw the model's 10 mW constant.

## Choosing the monitor window

`tb_monitor_resolution` runs six monitors side by side on the same bursty
probes. Their windows are 2000 to 50000 cycles, that is 20 to 500 us at
100 MHz. Each one's coefficients are scaled by 2000/T so that all report mW.

| Window | 20 us | 100 us | 200 us | 300 us | 400 us | 500 us |
|---|---|---|---|---|---|---|
| Std dev of estimates (mW) | 186 | 91 | 64 | 56 | 46 | 40 |

Every estimate matches a bit-exact reference, and the means agree (about
590 mW). The spread falls as the window grows, because longer windows average
out bursts.

The trade-off runs the other way for control. A short window lets the loops
above react quickly, but each estimate is noisier. All register widths are
derived from `T`, so changing the window is a parameter change only.

## What is not here

* **The processor cores.** The design only needs their probes, their commit
  stream and an "application running" flag.
* **Frequency scaling.** The alternative actuator reprograms a vendor clock
  manager. It is not included; `core_act` is brought out for it.
* **Fitted power models for particular designs.** The monitor is generic and
  takes a model as parameters.
* **The front end that lets a host drive an accelerator.** Its protocol is not
  specified.

## Sizes the defaults cover

The defaults hold:

* a 4-core system with set points of 100..400 mW;
* budgets up to 4 W, against about 1.6 W for a real platform;
* utilities up to 16 x 100.

An 8-core system is `NCPU = 8`; the register map still fits in 8 address
bits. Longer monitor windows (100..500 us) are `T` = 10000..50000; all widths
follow from `T`. Neither is the default.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -y rtl -y tb -Irtl \
        rtl/pwr_pkg.sv tb/tb_pwr_mgmt_top.sv --top-module tb_pwr_mgmt_top
    ./obj_dir/Vtb_pwr_mgmt_top

`tb_pwr_mgmt_top` runs the top at its default parameters with four
behavioural cores (`tb_core_model`). The cores are clocked by the gated
clocks, so throttling really removes activity. The test covers these phases:

* the reset budget, then a tight 200 mW set point;
* a core switching to a light, self-limiting application;
* an OS-forced theta;
* a core finishing its application;
* a set point high enough to saturate the correction and the budget;
* a `model_rst`;
* a low set point.

It checks the following against independent reference models:

* every power estimate and its latency;
* the gating mask and the gated clock;
* the global correction and budget;
* the set points and `sum(theta)`;
* register reads.

It counts each mechanism and fails if one never happened: gating, tracking,
positive, negative and saturated correction, budget clamp, utility balancing,
balanced class, reclaim, forced, idle, set point writes, `model_rst` and
register reads. It takes about 140 000 cycles and under a minute.

`tb_cap_sweep` (above) takes about 1.1 million cycles, a few seconds.

The unit testbenches use reduced sizes where that shortens them, for example
a 40-cycle window or a 3-epoch dwell.

## Changing it

* **A new core model.** Set `N_SIG`, `SIG_W`, `SACM`, `COEFF`, `SIGN`, `CONST`
  and `PROBE_W` on `pwr_mgmt_top`. `PROBE_W` must equal the sum of `SIG_W`; an
  assertion checks this. Probes are concatenated with term 0 in the low bits.
* **Loop tuning.** `KC`, `Z0` and `P1` on `local_controller` (Q8), and `K0`,
  `S_MAX` and `B_MAX` on `global_controller`.
* **Policy.** The supervisor's transfer rules are one `always_comb` block.
  `STEP`, `UTIL_TOL` and `DWELL` are parameters.
