# Clock-error meter: sign-change counting between two clock domains

Two clocks that should tick together never quite do. The difference between
their i-th edges, the clock error Δt(i) = t2(i) − t1(i), has a static part
(the skew, its mean) and a dynamic part that changes from cycle to cycle.
For gigahertz clocks these errors are tens of picoseconds, too small to
measure off chip and costly to measure on chip with a time-to-digital
converter.

This design measures the *statistics* of the clock error instead of each
value, with a handful of flip-flops and one bit of work per cycle:

1. A toggle flip-flop in the clk1 domain sends `...1010...`.
2. A flip-flop chain in the clk2 domain receives it. If the clock error
   keeps its sign, the receiver sees a clean alternating sequence, whatever
   the skew. When the sign of the error changes from one cycle to the next,
   the receiver sees two equal bits in a row, and an error is counted.
3. A controllable delay D between the domains shifts the effective error
   to Δt − D. Sweeping D and recording the error rate ER(D) then maps out
   the error distribution:
   * ER peaks (at about 1/2) where D equals the skew;
   * ER is zero once D is below the smallest or above the largest clock
     error, so the two ends of the non-zero ER range are the minimum and
     maximum clock error.

Only an 8-bit error count leaves the chip, once every 255 cycles.

## Measurement theory in brief

Take the errors as independent from cycle to cycle, and let
a(D) = P(Δt < D). An error is the event "sign of (Δt − D) differs between
two successive cycles", so

    ER(D) = 2 · a(D) · (1 − a(D))

This is 0 when a is 0 or 1 and reaches its maximum of 1/2 at a = 1/2,
that is at D = the median error (the skew for a symmetric distribution).
Inverting it gives a = (1 ± sqrt(1 − 2·ER)) / 2, with the minus sign below
the skew and the plus sign above. Differentiating gives the probability
density of the error:

    PDF(D) = da/dD = (dER/dD) / sqrt(1 − 2·ER) · sign(S − D)

The hardware only produces ER(D). The peak, the ends of the range and the
PDF are computed off chip from the sweep.

## Negative delays: the differential delay pair

A physical delay is positive, but D must cross zero. This design uses two
identical voltage-controlled delays:

* td1 delays the test pattern (control voltage `vctrl1`);
* td2 delays clk2 before it clocks the receiver (control voltage `vctrl2`).

The effective delay is D = td1 − td2. A data edge launched at clk1 edge i
arrives at the receiver before the delayed clk2 edge i exactly when
Δt(i) > D. Each delay spans about 333.9 ps to 436.0 ps, so D covers roughly
±102 ps. D can be set to within a few ps of zero with no minimum delay
getting in the way.

Each delay is two cascaded delay elements. An element is a current-starved
inverter whose bias current is set by the control voltage, followed by a
restoring inverter; a higher voltage gives a shorter delay. To know the
delay without calibration, a replica of each delay is closed into a ring
oscillator (`td1_meas`, `td2_meas`). The ring oscillates with period 2·td,
so reading its frequency gives the delay in use.

The alternative (a single delay close to a full clock period,
D = ((T/2 + td) mod T) − T/2) is not part of the RTL. The digital part
works the same with it, and `tb/discrete_prototype_tb.sv` exercises that
mode at 500 kHz with an ideal delay.

## The receiver (processing unit)

```
 d2 ──► R2 ──► R3 ──► R4 ──► R5
       clk2↑  clk2↓  clk2↑  clk2↓
                │             │
                └───► XNOR ◄──┘ err_det ──► C1 (+1, clk2↑) ──► Rs ──► nerr
                                            C2 (1..255, clk2↑) ─overflow─┘
```

* **R2–R5** form a shift register whose stages alternate between the rising
  and the falling edge of clk2. R2 takes the possibly metastable sample.
  Each later stage gets half a cycle to settle.
* **XNOR(Q3, Q5).** R5 holds what R3 held one cycle earlier, so Q3 and Q5
  are two successive received bits. The XNOR is 1 when they are equal,
  which is an integrity error. It changes only after falling edges and is
  used on rising edges.
* **C1** counts the XNOR flags on the rising edge.
* **C2** runs 1, 2, …, 255, 1, … and raises `overflow` on 255. This gives
  one window every 2^8 − 1 = 255 cycles.
* **Rs** loads C1 at the overflow edge. In that same edge, C1 restarts with
  the flag of that edge, so each cycle's flag falls into exactly one window
  and a window holds at most 255 errors. `nerr` changes once per window.
  ER = nerr / 255.

**Latency.** Number the rising clk2 edges k. The flag counted at edge k
compares the bits captured at edges k−1 and k−2. Rs loads at edges
E = 255·w after reset. It then holds the flags counted at edges E−255 …
E−1.

**After reset.** During reset all four stages are 0, so the XNOR reads 1 and
the first counted flags are not real. The first window after reset is also
254 cycles long. Discard it. Discard as well any window in which a control
voltage changed.

## Files

| file | contents |
|---|---|
| `rtl/clk_err_pkg.sv` | default sizes (8-bit counters, 2 delay stages) and the delay-vs-voltage curve `vcdl_delay_ps()` |
| `rtl/pattern_gen.sv` | R1, the `...1010...` generator (synthesizable) |
| `rtl/sync_sampler.sv` | R2–R5 and the XNOR detector (synthesizable) |
| `rtl/error_counter.sv` | C1 (synthesizable) |
| `rtl/interval_counter.sv` | C2 (synthesizable) |
| `rtl/processing_unit.sv` | receiver: sampler, C1, C2 and Rs (synthesizable) |
| `rtl/vc_delay_element.sv` | behavioural model of one voltage-controlled delay element |
| `rtl/variable_delay.sv` | behavioural model: two elements in series |
| `rtl/delay_replica_osc.sv` | behavioural model: replica delay closed into a ring oscillator |
| `rtl/clock_error_meter.sv` | top level: generator, the two delays, receiver and two oscillators |

The digital part (`pattern_gen`, `processing_unit` and below) is plain
synthesizable SystemVerilog. It has 29 flip-flops, and two of the
receiver's four stages are clocked on the falling edge. The delays and
oscillators are analog on silicon. Here they are timing models using `real`
control voltages and transport delays. As a result the top level
`clock_error_meter` is for simulation only.

### Top-level ports

| port | dir | meaning |
|---|---|---|
| `clk1`, `clk2` | in | the two clocks under test |
| `rst_n` | in | asynchronous active-low reset of all flip-flops |
| `vctrl1`, `vctrl2` (`real`, volts) | in | control voltages of td1 (pattern path) and td2 (clk2 path) |
| `osc_en` | in | starts both replica ring oscillators |
| `err[7:0]` | out | errors in the last 255-cycle window (Rs) |
| `err_update` | out | high in the cycle at whose end `err` reloads (delayed-clk2 domain) |
| `td1_meas`, `td2_meas` | out | ring oscillator outputs; period 2·td1 and 2·td2 |

Parameters: `N_BITS` (default 8) sets the counter width and the window
length 2^N_BITS − 1. `NUM_STAGES` (default 2) sets the delay elements per
variable delay.

## The delay model

`clk_err_pkg::vcdl_delay_ps(v)` gives the delay of one two-element variable
delay. It is piecewise linear through these post-layout points of the 65 nm
circuit:

| Vctrl (V) | 0.85 | 0.86 | 0.87 | 0.875 | 0.88 | 0.885 | 0.89 | 0.90 |
|---|---|---|---|---|---|---|---|---|
| delay (ps) | 435.97 | 424.69 | 415.36 | 410.96 | 406.86 | 403.11 | 399.67 | 393.13 |

| Vctrl (V) | 0.91 | 0.92 | 0.93 | 0.94 | 0.945 | 0.95 | 0.955 | 1.20 |
|---|---|---|---|---|---|---|---|---|
| delay (ps) | 387.12 | 381.67 | 376.61 | 372.11 | 370.06 | 368.13 | 366.31 | 333.89 |

Outside 0.85 V to 1.2 V the delay is held at the end values. Below 0.85 V
the real element is slower and depends on the signal frequency, so do not
use the model there. Between 0.955 V and 1.2 V the real curve bends, and
the straight line is only a rough stand-in. Each element takes half of the
delay. Rising and falling edges are delayed equally.

## Using it

1. Reset. Start the clocks and set `osc_en`.
2. For each setting of (`vctrl1`, `vctrl2`): change the voltages, drop the
   next window, then average `err` over a few windows. Read the two
   oscillator periods to get td1 and td2, and compute D = td1 − td2.
3. Plot ER(D). The peak gives the skew. The first and last D with ER > 0
   bracket the minimum and maximum clock error. The resolution is the step
   of D.

Example: the end-to-end testbench at the default sizes. The clocks run at
1 GHz. The clock error is Gaussian with mean −20 ps and σ = 10 ps, truncated
to [−53.4, 19.6] ps. Each setting uses four 255-cycle windows:

```
   D (ps)   td1 (ps)  td2 (ps)  errors  ER      2a(1-a)
   -54.63    370.06    424.69      0    0.0000  0.0000
   -49.05    366.31    415.36      0    0.0000  0.0000
   -44.65    366.31    410.96     22    0.0216  0.0213
   -40.55    366.31    406.86     25    0.0245  0.0233
   -34.98    368.13    403.11    128    0.1255  0.1261
   -31.54    368.13    399.67    222    0.2176  0.2165
   -25.00    368.13    393.13    430    0.4216  0.4508
   -18.99    368.13    387.12    521    0.5108  0.4959
   -15.01    372.11    387.12    424    0.4157  0.4321
   -10.51    376.61    387.12    314    0.3078  0.3044
    -5.45    381.67    387.12    118    0.1157  0.1107
     0.00    387.12    387.12     30    0.0294  0.0290
     5.45    387.12    381.67     14    0.0137  0.0136
    10.51    387.12    376.61      0    0.0000  0.0000
    15.01    387.12    372.11      0    0.0000  0.0000
    20.81    387.12    366.31      0    0.0000  0.0000
```

The peak is at −18.99 ps (the true median is −19.9 ps). The minimum error
lies between −49.05 and −44.65 ps, and the maximum between 5.45 and
10.51 ps. In this run the actual extremes were −53.0 ps and 17.8 ps, but
samples that far out are rare and may not fall in a setting's four windows.
The bracket is only as good as the number of cycles measured per setting.

## Verification

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `pattern_gen_tb` | reset value, toggling, asynchronous reset in mid-sequence |
| `sync_sampler_tb` | XNOR flag after every falling edge against b[k] == b[k−1], for clean, sparse-error and random streams |
| `error_counter_tb` | count against a reference model with random events and restarts; a full 255-event window |
| `interval_counter_tb` | count sequence and overflow period 255 (and 7 for a 3-bit instance) |
| `processing_unit_tb` | every window value against an independent flag count; loads only at edges 255·w; 0-error and 255-error windows |
| `vc_delay_element_tb`, `variable_delay_tb` | delays at all curve points and one interpolated point; pulse train; the 20.81 ps differential case |
| `delay_replica_osc_tb` | no oscillation when disabled; period 2·td at several voltages; stops when disabled again |
| `clock_error_meter_tb` | full design at default sizes: the sweep above. It checks each window exactly against the sign changes of the generated errors, the 255-cycle window period, the oscillator periods, ER against 2a(1−a), and the ER peak at the skew. It also counts error-free windows on both sides, windows with errors, negative and positive D, and oscillator readings |
| `discrete_prototype_tb` | pattern generator and receiver at 500 kHz. A single ideal delay is swept over 0–2 µs, with ±100 ns dynamic error, at skew 0 and −40 ns. It checks each window exactly, ER zero far from the error range, the peak at the skew and the ends of the range |

`vcdl_ref_pkg.sv` holds the reference delay values that the delay
testbenches use. It is typed separately from the design's curve.

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    --top-module clock_error_meter_tb -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/clk_err_pkg.sv tb/clock_error_meter_tb.sv
./obj_dir/Vclock_error_meter_tb
```

Every testbench runs in a few seconds. The delay models use `real`
arithmetic and `fork … join_none` transport delays, so they need
`--timing`. Verilator reports them with a `ZERODLY` warning, because it
cannot prove the variable delay is non-zero. The warning is harmless.

## Choices made here, beyond the source circuit

* **Reset.** An asynchronous active-low reset was added to every
  flip-flop. R1 resets to 0, R2–R5 to 0, C1 and Rs to 0, and C2 to 1.
  Releasing the reset is not synchronised to either clock. Discard the
  first window instead.
* **C1 restart.** The source says only that C1 is stored into Rs when C2
  overflows. Here C1 restarts at that edge with the flag of that edge.
* **C2 period.** A window of 2^n − 1 cycles is obtained by counting
  1 … 2^n − 1.
* **Rs loading.** Rs loads C1 with C2's overflow used as a load enable on
  clk2. It is not clocked by the overflow signal itself, which would need a
  derived clock. The timing is the same.
* **Added ports.** `err_update` (the overflow, for reading `err`) and
  `osc_en` (to start the rings) are additions.
* **Delay model.** The model is a transport delay with a piecewise-linear
  delay-voltage curve, split equally between the two elements. The curve's
  ends are placed at 0.85 V and 1.2 V. Rise and fall delays are equal. The
  model does not capture the frequency dependence of the delay below
  0.85 V.
* **Ring oscillator.** The ring is closed by an ideal AND-with-inversion
  gate, so the period is exactly 2·td. A real ring adds its closing gate's
  delay, which has to be calibrated out or kept small against td.
* **No metastability.** The model has no setup/hold window and no
  metastability. A data edge and a clock edge at the same instant resolve
  by event order. With continuous random clock errors this does not happen
  in practice.

Not included: the board-level delay line and the jittered clock generator
of the low-frequency prototype, which are discrete analog circuits, and the
off-chip computation of ER, the skew, the error range and the PDF from the
sweep.
