# Quasi-continuous digital filters: a third-order leap-frog lowpass from counters and rate multipliers

A quasi-continuous digital filter (QCDF) is a digital filter that carries no
sampled words between its operators. Each state variable is a train of pulses.
Its value is the pulse rate, i.e. pulse frequency modulation (PFM). Two
operators are enough to build a whole all-pole filter:

* an **up-down counter (UDC)** counts the pulses arriving on its up and down
  inputs. Its count is the integral of the rate difference, so it is the
  filter's integrator and holds the state variable as a bit-parallel number;
* a **rate multiplier (RM)** turns that number back into pulses. It receives a
  coefficient pulse train of rate `f_k` and passes a fraction `CNT / 2^N` of
  those pulses. Its output rate is therefore `f_k * CNT / 2^N`. The
  coefficient is a pulse rate on a single wire, not a stored word.

Integrators and coefficient multipliers are exactly what the signal flowgraph
of an analog LC ladder needs. So a low-sensitivity ladder design carries over
to the digital domain one element at a time, as in RC-active and
switched-capacitor filters. The price is bandwidth. A counter of N bits
resolves its state only after about `2^N` pulses, so the signal bandwidth sits
roughly `2^N` below the mean pulse rate.

This repository holds synthesizable SystemVerilog for:

* the operators, built from **bit slices** like the integrated circuit they
  model: one UDC slice and one RM slice per bit, simply abutted. A counter
  and its multiplier form an **operator pair** (`udc_rm_pair`), the tile that
  the filters are built from;
* the **third-order Butterworth lowpass** (`qcdf_lp3`, 11-bit operators), the
  main design;
* the **first-order lowpass** (`qcdf_lp1`), the smallest QCDF;
* a top level `qcdf_top` that holds both filters side by side.

## The first-order filter

```
   fx ────────►(+) UDC ═══ CNT ═══► RM ──┬──► fy
          ┌───►(−)                  ▲    │
          │                         f1   │
          └──────────────────────────────┘
```

The counter counts fx pulses up and its own RM output down. In the mean:

    d CNT/dt = fx − f1·CNT/2^N,     fy = f1·CNT/2^N

This is a first-order lowpass with unity gain from fx to fy and a time
constant of `2^N / f1`, measured in the same time unit as the rates (clocks,
if f1 is given in pulses per clock). At rest the count is `2^N · fx / f1`. If
fx exceeds f1, that value does not fit in the counter and the counter
saturates at all-ones.

## The third-order leap-frog filter

The reference is a doubly terminated ladder: source resistor R, shunt C1,
series L2, shunt C3, load resistor R. For a Butterworth response with R = 1,
C1 = 1, L2 = 2 and C3 = 1. Its node equations are

    C1·dV1/dt = x − V1 − I2
    L2·dI2/dt = V1 − V3
    C3·dV3/dt = I2 − V3,       y = V3

Each reactive element becomes one operator pair (`udc_rm_pair`). The RM
outputs p1, p2 and p3 are the PFM forms of V1, I2 and V3. An *intermediate slice*
(`leapfrog_link`) between the pairs routes them to the neighbouring counters:

| counter | counts up on | counts down on | coefficient |
|---------|--------------|----------------|-------------|
| UDC1 (C1) | fx | p1, p2 | f1 (∝ 1/C1) |
| UDC2 (L2) | p1 | p3     | f2 (∝ 1/L2) |
| UDC3 (C3) | p2 | p3     | f3 (∝ 1/C3) |

With `p_k = f_k·CNT_k/2^N`, differentiating p_k gives back the ladder
equations, with `f_k/2^N` taking the place of `1/C` or `1/L`. Consequences:

* the coefficient ratio is **f1 : f2 : f3 = 1 : 1/2 : 1**;
* the response scales with the coefficient rates, not with the clock;
* the DC gain is that of the ladder, **fy = fx / 2**;
* at rest the counts are `CNT1 = CNT3 = 2^N·(fx/2)/f1` and `CNT2 = 2·CNT3`.
  UDC2 therefore fills first: with f2 = f1/2, the input must stay below about
  f1 for UDC2 to stay in range. The other counters fill at twice that input.

The output exists in two forms. `y` (UDC3) is bit-parallel. `fy` (p3) is PFM.

### Saturating unsigned arithmetic

All counters are unsigned. A step that would carry out of the most
significant slice (counting past all-ones, or below zero) is refused: that
carry out is the overflow flag OVF, and it is fed back so that every slice
holds its bit. Saturation instead of wraparound keeps the filter stable under
overload, much as the terminated ladder dissipates energy. `ovf` outputs
report each refused step.

### One step per clock, and the rule for coefficient pulses

Every pulse is one system-clock cycle wide, and every counter moves by at most
one step per clock. The intermediate slice reduces the pulses present in a
clock to a carry-in and a direction. An up pulse and a down pulse together
cancel. **Two down pulses in the same clock cannot both be counted.** Only
UDC1 has two down inputs (p1 and p2), and an RM can pulse only in a clock in
which its coefficient pulses. So the single rule is:

> **f1 and f2 must never pulse in the same clock.** f3 and fx are free.

`qcdf_lp3` checks the rule with an assertion. A convenient driver is a
three-clock frame: f1 and f3 in slots 0 and 1, f2 in slot 2. This gives rates
of 2/3, 1/3 and 2/3 of the clock, the Butterworth ratio at the fastest
setting that obeys the rule. With N = 11 that frame gives a time constant of
`2^11 / (2/3) = 3072` clocks. The original circuit is reported to reach a
cutoff corresponding to f1 at the full clock rate. That needs coefficient
pulses that coincide, which this design does not accept. At a given clock,
this design's fastest cutoff is therefore 2/3 of that figure.

## Inside the operators

### Up-down counter slice (`udc_slice`, `udc`)

Each slice holds one count bit and one stage of a ripple-carry
incrementer/decrementer:

    d  = q XOR ci
    co = ci AND (sub ? NOT q : q)

The carry enters the LSB slice as the "count this clock" signal `ci`. `sub`
is common to all slices. The carry out of the MSB slice is OVF. A slice loads
`d` on the clock edge unless OVF is set. An N-bit counter is N slices in a
row. The ripple path is the clock-period limit, as in the original static
ripple-through logic.

### Rate multiplier slice (`rm_slice`, `rm`)

The RM is the least obvious part. It has three parts:

1. a free-running N-bit counter. It advances on every coefficient pulse and
   counts nothing else;
2. that counter read **bit-reversed**, giving INT (counter LSB → INT MSB);
3. a comparator. In a cycle with a coefficient pulse it emits an output pulse
   if `CNT > INT`.

Over any 2^N consecutive coefficient pulses, INT takes every value from 0 to
`2^N−1` exactly once. Exactly CNT of those values are below CNT, so the RM
emits exactly CNT pulses per 2^N coefficient pulses. Bit reversal also spreads
those pulses evenly over the window, the way ordered dithering spreads dots.
Take CNT = 2^(N−1): the output alternates with the coefficient pulses. With a
plain counter it would instead give one burst per window, and the filter
would see a large low-frequency error.

In the slices, slice i carries bit i of CNT and holds counter bit N−1−i (that
is, INT bit i). The two carry chains therefore run in opposite directions:

* the comparator chain starts at the CNT LSB with carry-in 0 and ripples
  toward the MSB. There, its carry out is the RM output. Per stage:
  `gt_out = (cnt AND NOT int) OR ((cnt XNOR int) AND gt_in)`;
* the incrementer chain starts with carry-in 1 at the slice that holds the
  counter LSB (the CNT MSB slice) and ripples toward the CNT LSB slice.

`pulse_out` is the comparator result ANDed with the coefficient pulse. It is
combinational: it uses the counter value before that pulse advances it.
`int_val` brings INT out for observation.

## Interfaces and timing

All modules use a single rising-edge clock `clk` and a synchronous active-low
reset `rst_n`. The reset clears every counter and every RM counter. Parameter
`N` (default 11, package constant `qcdf_pkg::QCDF_BITS`) sets the operator
width.

| module | inputs | outputs | timing |
|--------|--------|---------|--------|
| `qcdf_lp3` | `fx f1 f2 f3` pulses | `fy` pulse, `y cnt1 cnt2 [N]`, `ovf[3]` | counts registered; `fy` combinational from `f3` and `y`; `ovf` combinational |
| `qcdf_lp1` | `fx f1` | `fy`, `y[N]`, `ovf` | same |
| `udc` | `ctl` (`udc_ctl_t {ci, sub}`) | `cnt[N]`, `ovf` | count updates on the edge after the request |
| `rm` | `coef`, `cnt[N]` | `pulse_out`, `int_val[N]` | output combinational; counter advances on the edge of a `coef` cycle |
| `udc_rm_pair` | `ctl`, `coef` | `cnt[N]`, `pulse_out`, `ovf` | as `udc` followed by `rm` |
| `leapfrog_link` | `plus minus_a minus_b` | `ctl` | combinational; `clk`/`rst_n` only feed the assertion |
| `qcdf_top` | `lp3_*`, `lp1_*` inputs | `lp3_*`, `lp1_*` outputs | the two filters share only clock and reset |

Each path goes from a register through an RM comparator and the intermediate
slice into the next counter's carry chain. There is no combinational loop.
The longest path is roughly two N-bit ripple chains in a row.

The whole top is 88 flip-flops at N = 11: 6 counters of 11 bits in the
third-order filter and 2 in the first-order filter.

## Where this design makes its own choices

* **Clocking.** The original registers use two non-overlapping clock phases,
  and the RM register is clocked by the coefficient pulse itself. Here every
  register is a rising-edge flip-flop. The coefficient pulse acts as a clock
  enable.
* **Pulse synchronisation.** Every pulse is one clock wide and synchronous to
  the system clock. Asynchronous external pulse trains need a synchroniser
  and edge detector in front of the filter. None is included.
* **RM output.** The comparator result is gated with the coefficient pulse,
  so the RM emits one pulse at most per coefficient pulse. The hardware
  reference describes only "a pulse when CNT > INT".
* **Intermediate slice.** Its logic is the simplest net-step reduction. It
  accepts only one down pulse per clock, hence the f1/f2 rule above.
* **Coefficient pulses** are inputs. They may come from the system clock
  (e.g. a slot frame as in the testbenches) or from outside. No generator is
  part of the RTL.
* **Reset** is synchronous and active low. The original behaviour is not
  known.
* **Not included:** the two-phase clock generator, a voltage-to-frequency
  converter for analog inputs, and the coefficient generator.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference models
are in `tb/qcdf_ref_pkg.sv`: a saturating integer counter and a rate
multiplier that compares with `bitrev(count)`. They are written at the
behavioural level, independently of the slices.

| testbench | what it checks |
|-----------|----------------|
| `udc_slice_tb`, `rm_slice_tb` | full truth tables of the slice stages and registers |
| `leapfrog_link_tb` | net step for every allowed pulse combination |
| `udc_tb` | 60 000 random steps at N = 4 and N = 11 against the model; both rails reached; `ovf` exactly when a step is refused |
| `rm_tb` | every value at N = 5, and edge and random values at N = 11: exactly CNT output pulses per 2^N coefficient pulses, pulses only with `coef`, INT equals the bit-reversed count, cycle-exact agreement |
| `udc_rm_pair_tb` | 100 000 clocks of random requests and coefficient pulses at N = 6 and N = 11, cycle-exact; saturation; exactly CNT pulses per 2^N coefficient pulses |
| `qcdf_lp1_tb` | N = 8: cycle-exact agreement; 63 % of the final value after one time constant; final value `2^N·fx/f1`; pulses in − pulses out = change of count; saturation |
| `qcdf_lp3_tb` | N = 8: cycle-exact agreement of counts, `fy` and `ovf`; output within 6 LSB of a numerical solution of the ladder equations; final value fx/2; 4–13 % overshoot; upper and lower saturation; cancellation; decay to zero |
| `qcdf_top_tb` | the top at default parameters (N = 11). All of the above for both filters, 310 000 clocks. The step to 35 % of the clock rate settles at 537 (expected 537.6) with a peak of 582 (8.3 %; the ideal third-order Butterworth overshoot is 8.15 %) and stays within 5 LSB of the ladder equations. Every mechanism is counted and must occur. |

Running one testbench with plain Verilator (from the repository root):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/qcdf_pkg.sv tb/qcdf_ref_pkg.sv rtl/*.sv tb/qcdf_top_tb.sv \
        --top-module qcdf_top_tb -o sim
    ./obj_dir/sim

The full-size top test runs in a few seconds. The testbenches use only two
signal states and initialise everything they read. Lint with
`verilator --lint-only -Wall -Irtl rtl/qcdf_pkg.sv rtl/qcdf_top.sv`. The only
warnings are the unconnected `int_val` observation ports.

## Files

* `rtl/qcdf_pkg.sv`: width default and the `udc_ctl_t` control type
* `rtl/udc_slice.sv`, `rtl/udc.sv`: up-down counter slice and counter
* `rtl/rm_slice.sv`, `rtl/rm.sv`: rate multiplier slice and multiplier
* `rtl/udc_rm_pair.sv`: operator pair (counter abutted to its multiplier)
* `rtl/leapfrog_link.sv`: intermediate slice
* `rtl/qcdf_lp1.sv`, `rtl/qcdf_lp3.sv`: first- and third-order filters
* `rtl/qcdf_top.sv`: both filters side by side
* `tb/*_tb.sv`, `tb/qcdf_ref_pkg.sv`: testbenches and reference models
