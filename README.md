# Adaptive voltage over-scaling: ANT and AED-C on two audio filters

A circuit that only rarely uses its longest paths can run below the supply its
worst case needs. The price is an occasional late result at an end-point. This
RTL shows two opposite ways to keep that price acceptable, each applied to the
same two digital filters.

* **RPR-ANT** (Algorithmic Noise Tolerance with a Reduced-Precision Replica)
  works at the architecture level. A small copy of the filter sees only the top
  `B_r` input bits. Because it is short, it still meets timing at a supply where
  the main filter fails. When the outputs of the two differ by more than a
  threshold `E_th`, the replica's output is used. Errors are frequent but small,
  bounded by the replica's precision. Nothing stalls.
* **AED-C** (Approximate Error Detection-Correction) works at the circuit level,
  like Razor. The output end-points are timing sensors (TunED sensors). Each one
  compares the value sampled at the clock edge with the value at the end of a
  *tunable detection window* (TDW). A late change is corrected inside the sensor,
  and the circuit loses one clock cycle. Errors per monitoring period drive the
  supply down or up. Narrowing the window lets some late arrivals pass
  unreported, so the error rate looks lower and the supply falls further. The
  window is therefore a knob that trades quality for energy. Errors are rare but
  large, because they hit the slow MSB paths.

Everything is in SystemVerilog. The digital parts are synthesizable. The two
analog parts, the voltage-controlled delay lines and the supply-dependent gate
delays, are behavioural models.

## The benchmark filters (`fir_filter`, `iir_filter`)

| filter | structure | input → output | clock |
|---|---|---|---|
| FIR | 16th-order low-pass (17 taps), direct form, pipelined | 12 → 24 bit | 650 MHz (1538 ps) |
| IIR | 8th-order low-pass, direct form I, pipelined | 16 → 32 bit | 650 MHz |

No coefficients are published for these filters, so this design picks its own:

* **FIR:** a 17-tap Hamming-windowed sinc with cut-off fs/4, in 12-bit
  coefficients: `{0,-8,0,36,0,-117,0,474,771,474,0,-117,0,36,0,-8,0}`. The sum
  of |c| is below 2^11, so the 24-bit output cannot overflow.
* **IIR:** `H(z) = (1+z^-1)^8 / (1-0.5 z^-1)^8`. The feed-forward taps are
  binomial (1, 8, 28, …). The feedback taps are exact in 8 fractional bits. The
  DC gain is 2^16. The feedback sum is truncated by an arithmetic shift right
  and saturated to 32 bits.

Both modules stop *before* the output register. They export the combinational
result `y_next`, and the caller supplies the end-point register. That register
is a plain register under ANT and a bank of TunED sensors under AED-C. The IIR
takes its own registered output back on `y_q`. Latency: an input sampled at
edge k is visible after edge k+2, counting the caller's register.

The replica is the same module with a narrower input. It sees `x[IN_W-1 -: B_r]`
and keeps the full coefficients. Its output is shifted left by `IN_W-B_r` to
return to the main filter's scale.

## RPR-ANT (`rpr_ant`, `ant_detector`)

`ant_detector` registers both outputs and computes `|Ym - Yr|`. The output is
`Y = (|Ym - Yr| > E_th) ? Yr : Ym`, and `ant_err` marks each substitution.

`E_th` is a run-time input. It should be the largest gap between the fault-free
main output and the replica output over the expected inputs. The testbenches
compute it that way from their own input streams.

The replica is assumed fault-free, so only the main output passes through the
delay model. ANT runs at a fixed supply: the whole stream runs at one voltage.
The default is `B_r = 5` for both filters, the knee of the quality–energy curve
in the original study.

## AED-C timing, sensor by sensor (`tuned_sensor`, `delay_line`, `aedc`)

This is the part that needs care. Per clock cycle of the circuit clock `gclk`:

```
 gclk edge        + TDW                           next gclk edge
    |--------------|----------------------------------|
    main FF samples D
    shadow samples (D xor Q_FF) at clk_tdw = gclk delayed by TDW
       flag = 1  -> q = ~Q_FF   (logic masking: for one bit the late value)
                  -> err_any = OR of all flags
                  -> EMU withholds the next gclk edge (one lost cycle)
       flag is void from the next gclk edge on
```

* **Detection.** A bit is flagged when its input changes after the main
  flip-flop sampled it but before `clk_tdw` rises. A change later than the
  window is not seen. That is a *miss*: the wrong value goes on, unreported.
* **Short-path padding (TDL).** Without padding, a new value launched by the
  same edge on a fast path could reach D inside the window and raise a false
  error (the short-path race). So each monitored end-point has a tunable delay
  line in front of it: `TDL = TDW - AT_min + 20 ps margin`. Here `AT_min` is the
  fastest arrival after an edge, 150 ps in the delay model. A narrower window
  needs a shorter TDL. This is how AED-C avoids Razor's static padding buffers.
* **What the window really changes.** With `TDL = TDW - AT_min`, a path of
  arrival `AT` reaches D at `AT + TDW - AT_min`. It is caught iff that lies
  inside `(T, T + TDW)`, and it is missed iff `AT > T + AT_min` (minus the margin).
  So the *miss condition at a given supply does not depend on TDW*. What TDW
  changes is which late arrivals the sensors report. A narrow window reports
  fewer of them, so the error rate stays under threshold at lower supplies. The
  loop then settles lower, where more paths are beyond `T + AT_min`. Quality is
  lost through the supply the loop reaches, not directly through the window.
* **Correction and the halted cycle.** Logic masking is only correct if the
  corrected value has a whole cycle to propagate. The EMU (below) withholds
  exactly one `gclk` edge per error. The flag stays set during that halted cycle
  because no `gclk` edge arrives to clear it. The IIR feeds back the corrected
  sensor output `q`, so a detected error never enters the recursion.
* **Flag clearing.** The original shadow element is a latch with a reset pin,
  and when that reset is driven is not published. Here the shadow element is a
  register clocked by `clk_tdw`. Two phase bits void it: one toggles on `gclk`,
  the other is copied on `clk_tdw`, and the flag counts only while they are
  equal. A flag therefore never outlives the next `gclk` edge. Without this, a
  stale flag wrongly inverted the IIR feedback at low supply.
* **Input handshake.** `in_take` is high on each `ref_clk` edge the circuit
  sees. The source must hold `x` when it is low. Throughput (OPC, operations per
  cycle) is the fraction of edges with `in_take` high.
* **Delay lines.** `delay_line` is a behavioural inertial delay set in
  picoseconds (`delay_ps`). It stands for the voltage-controlled
  inverter/transmission-gate/inverter cell, whose voltage-to-delay curve is not
  given. It carries both TDW (on the clock) and TDL (on the data).

Every output bit carries a sensor. The original flow places sensors only on
end-points found critical at 0.60 V. In this arithmetic datapath that is close
to all of the MSB half, and the extra LSB sensors simply never fire.

## Error management and supply control (`emu`, `pmu`)

* **`emu`** has a latch-and-AND clock gate. The enable latch is transparent
  while `ref_clk` is low. `en = !(err_any && !halted)`, so after one withheld
  edge the next is always released. The latch is the intended storage element
  of the clock gate. The EMU also counts halted cycles over a monitoring period
  of N = 1000 reference cycles. At the end of the period it presents the count
  on `ne` with a one-cycle `ne_valid` strobe.
* **`pmu`** acts at each strobe. If `ne < ER_th·N` (ER_th = 2 %, so 20 errors)
  it lowers the target by 20 mV, otherwise it raises it. The target stays within
  0.60–1.10 V and starts at 1.10 V. `vdd_mv` is the request to the regulator.
  The regulator is not modelled: in simulation `vdd_mv` drives the delay models
  directly.

## Voltage over-scaling model (`vos_delay_model`)

Real timing would come from gate-level simulation with back-annotated delays at
each supply. That cannot be shipped as RTL. Instead, bit i of a W-bit result
arrives at

    AT_i = (150 + (880-150)·i/(W-1)) ps · s(V),
    s(V) = [V/(V-0.35)^1.3] / [1.10/(1.10-0.35)^1.3]     (alpha-power law)

after the launching edge. The delay is inertial, so a bit that does not toggle
produces no late event. Rarely toggling MSBs are exactly the rarely exercised
long paths. Every number here is a modelling assumption, not a library
property. Supplies outside 0.60–1.10 V are treated as the nearest end of that
range, so an unreset supply register at power-up does no harm. With these
numbers, nothing fails at 1.10 V. The MSBs start to miss a
1538 ps clock near 0.8 V, and misses past the detection limit
(`AT > T + AT_min`) begin only around 0.65 V. Results depend strongly on this
model. Treat quality figures as illustrations of the mechanisms, not as
predictions for silicon.

## The top (`avos_top`)

`avos_top` puts four instances side by side, each with its own ports:

* FIR under RPR-ANT and IIR under RPR-ANT. They share one fixed supply input,
  `ant_vdd_mv`.
* FIR under AED-C and IIR under AED-C. Each has its own loop and its own
  `*_tdw_ps` window input, and reports its own `*_vdd_mv`.

Every datapath output passes through a `vos_delay_model` driven by the supply
that applies to it. Constants shared by all modules are in `avos_pkg`: widths,
coefficients, the supply range and step, N, ER_th, and the clock period.

## Simulating

With Verilator 5 (`--timing` is needed for the delay models):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/avos_pkg.sv tb/tb_models_pkg.sv rtl/*.sv tb/tb_avos_top.sv \
  --top-module tb_avos_top -o sim && ./obj_dir/sim
```

Replace `tb_avos_top` with any other `tb_*` module to run one block's test.
The package must come first, and `rtl/*.sv` then lists it a second time; if
your Verilator objects to that, list the rtl files by name. Each testbench
prints `TB_RESULT checks=<n> failures=<n>` and stops. Each also has a watchdog
that counts a failure if the run hangs. All testbenches set every register
they read, so a random initial state (`+verilator+rand+reset+2`) makes no
difference. `tb_models_pkg` holds bit-exact reference models of both filters,
written from the transfer functions rather than from the RTL.

| testbench | what it establishes |
|---|---|
| `tb_fir_filter`, `tb_iir_filter` | bit-exact output and the k+2 latency against the reference models |
| `tb_ant_detector` | selection, strict threshold, registered outputs |
| `tb_rpr_ant` | exact output with no faults; replica substitution and the `E_th` bound under injected faults (FIR and IIR) |
| `tb_tuned_sensor` | flags for changes inside the window, misses after it, masking, flag cleared by the next edge |
| `tb_delay_line`, `tb_vos_delay_model` | delays, inertial filtering, supply scaling |
| `tb_emu`, `tb_pmu` | one withheld edge per error, forced release, counts per period; step down/up and clamping |
| `tb_aedc` | complete AED-C loop at N = 100: exact corrected outputs, supply falls and recovers |
| `tb_avos_top` | everything at the default parameters, 36 000 cycles |
| `tb_aedc_tdw_sweep` | workload: AED-C at windows of 15–50 % for both filters (16 loops), 24 000 cycles, about 3 minutes |
| `tb_ant_br_sweep` | workload: RPR-ANT with B_r = 4/5/6 (FIR) and 4/5/8 (IIR) at 1.10/0.82/0.78/0.68 V, 15 000 cycles |

Both workload testbenches drive a synthetic stream with three activity
profiles, because the original audio recordings are not available. The profiles
are quiet tone bursts with long still stretches, steady two-tone speech with low
noise, and a noisy random walk with abrupt jumps. The stream comes from
`make_audio` in `tb_models_pkg`.

`tb_avos_top` runs at full size, with no parameter overrides. It checks the
following:

* **ANT at 1.10 V:** exact output.
* **ANT at 0.64 V:** the output stays within `E_th` of the replica.
* **AED-C:** the supply falls and rises, and errors are corrected with one lost
  cycle each.
* **OPC:** at least 0.95.

Every mechanism must occur at least once. A typical run:

| instance | result |
|---|---|
| FIR ANT at 0.64 V | replica substituted 1476 times |
| IIR ANT at 0.64 V | replica substituted 23433 times |
| FIR AED-C, 25 % window | OPC 0.988, average supply 838 mV |
| IIR AED-C, 35 % window | OPC 0.987, average supply 878 mV |

With the delay model above, those AED-C loops settle above the miss region, so
their outputs match the reference exactly.

`tb_aedc_tdw_sweep` reproduces the trend the scheme is built for: a narrower
window gives a lower average supply. Over 24 000 cycles, including the descent
from 1.10 V:

| window | FIR Vdd avg / min | FIR OPC | IIR Vdd avg / min | IIR OPC |
|---|---|---|---|---|
| 15 % | 880 / 720 mV | 0.996 | 878 / 700 mV | 0.997 |
| 25 % | 897 / 780 mV | 0.995 | 890 / 760 mV | 0.993 |
| 35 % | 928 / 840 mV | 0.988 | 923 / 840 mV | 0.989 |
| 50 % | 1070 / 1040 mV | 0.976 | 1067 / 1040 mV | 0.983 |

No output error got through at any window. Under this delay model a change
escapes detection only below about 0.65 V, and runs of this length do not
reach that. So the quality cost of narrow windows is not demonstrated here,
only the supply gain.

`tb_ant_br_sweep` finds no error at 0.78 V and above. At 0.68 V the NRMSE
(RMS error over the output range) falls as the replica grows:

| filter | B_r | NRMSE at 0.68 V |
|---|---|---|
| FIR | 4 | 0.72 % |
| FIR | 5 | 0.36 % |
| FIR | 6 | 0.18 % |
| IIR | 4 | 3.3 % |
| IIR | 5 | 1.6 % |
| IIR | 8 | 0.19 % |

In both filters the error is frequent but bounded by the replica.

## How far to trust it, and where it departs from the original scheme

* **Not built:**
  * Razor, the reference the AED-C scheme is compared with. AED-C with a 50 %
    window is its nearest equivalent here.
  * the voltage regulator;
  * energy, area and power estimation.
* **Own choices:** the filter coefficients, the pipelining, the rounding and
  saturation, and the reset behaviour (asynchronous, to zero).
* **Timing:** the delay model replaces back-annotated gate-level timing, so
  error counts and supply levels are not comparable with silicon figures.
* **Sensor placement:** sensors sit on every output bit rather than only on
  end-points found critical by timing analysis.
* **Shadow element:** it is a window-end register with phase-bit clearing
  rather than a latch with a reset pin.
* **Replica:** it is assumed fault-free, and it is not given its own delay
  model.
* **Supply control:** the PMU makes one 20 mV step per period. The step size
  matches the simulation grid of the original evaluation; the control policy
  beyond "lower when under threshold, else raise" is not published.
* **Test coverage:** every block has a testbench. Each testbench was shown to
  fail against a deliberately broken copy of its module.
