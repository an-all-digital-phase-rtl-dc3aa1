# ADPLL clock recovery with frequency synthesizer and on-chip clock generator

This design recovers the bit clock of an NRZ data stream without an analog
loop. Everything runs on one fast clock. Periods and phases are whole numbers
of cycles of that clock. The recovered clock comes from a counter that can be
reloaded, and its phase and period can both change in a single cycle.

The key property is acquisition within one data transition. The first input
edge starts the local oscillator in phase with the data. The next edge gives
the phase error, and that error is the frequency error. The period is
corrected by the error, and the phase is set to match the data, in the same
cycle. No loop filter has to settle.

Two further parts are included:

- a multiple-frequency generator that derives a k-times-faster clock locked
  to the recovered clock;
- an all-digital clock generator that makes the fast clock from a slower
  reference. It tracks a digitally controlled ring oscillator with a binary
  search.

## The acquisition rule

Call the input bit period N and the current oscillator (DCO) period T, both
in fast-clock cycles. The DCO is a counter. Its edge is the cycle in which it
reads 0.

- **DCO too slow (T > N):** the input edge comes first. The time from the
  input edge to the next DCO edge is the error `in1 = T - N`. At that DCO
  edge the new period becomes `T - in1`. The DCO jumps to phase `in1`, which
  is where a DCO of the correct period would now be.
- **DCO too fast (T < N):** the DCO edge comes first. The time from the DCO
  edge to the input edge is the error `in2 = N - T`. At that input edge the
  new period becomes `T + in2`, and the DCO restarts at phase 0.
- **Error above T/2:** the measurement is rejected. The period is kept and
  the DCO is only realigned to phase 0 at the event that ended the
  measurement.

Rejection is what makes NRZ data work. A run of equal bits has no
transitions, so the DCO runs free over it. The error seen at the next edge is
then a mix of phase and frequency error, and it may span more than one bit.
The T/2 limit also bounds the initial period that locks in one transition:
an input period N is acquired when it lies roughly within (T0/2, 3·T0/2) of
the initial period T0.

After lock, every transition still produces an Up or Down measurement of a
cycle or two. The period therefore keeps tracking the data rate. When the bit
time is not a whole number of cycles, the period dithers between the two
nearest integers.

## Datapath of the clock recovery (`clock_recovery`)

```
din -> dfed -> in_pulse ----+--> jk_pd #1 (Up)   -> filter_counter #1 -> in1 --+
                            |                                                  v
            dco_pulse ------+--> jk_pd #2 (Down) -> filter_counter #2 -> in2 -> pf_estimator
                                                                                  |
               prog_dco <--------------- load / phase / period -------------------+
                 | rec_clk, rec_pulse
                 +--> output_delay (0..15 cycles)           -> delay_out
                 +--> mf_generator (k, T_new = floor((T+k/2+1)/k)) -> synth_clk
```

- **`dfed`** is a data-feature extraction and differentiation stage. It
  synchronises `din` with two flops. It emits one pulse for each transition
  and a separate pulse for the first transition after reset or `resync`.
- **Phase detectors.** There are two JK flip-flops, and clear wins over set.
  - PD #1 (Up) is set by an input edge and cleared by the DCO edge.
  - PD #2 (Down) is set by a DCO edge and cleared by an input edge.
  - Each is also inhibited while the other one is high. Without that
    inhibit, the DCO edge that ends an Up measurement would also start a
    spurious Down measurement.
  - At most one of Up and Down is ever high. An assertion in the estimator
    checks this.
- **Filter counters** count the cycles for which their detector output is
  high. This gives `in1` and `in2`.
- **`pf_estimator`** applies the rule above. It is combinational from the
  event cycle to the load of the DCO, which is the loop's critical path. It
  holds the period register and raises `up_evt`, `down_evt` and `reject`.
- **`prog_dco`**:
  - `start` emits an edge now.
  - `load` sets the phase and period, taking effect at the next clock.
  - `stop` halts the counter.
  - Corner case: if the DCO is realigned to phase 0 after it has passed half
    its period, the edge is emitted at once. Otherwise the bit ending a run
    of equal bits would get no clock edge.
- **`output_delay`** is a shift register with a selectable tap. It places
  the recovered clock at a programmable offset inside the bit.
- **`mf_generator`** computes the rounded period `T_new` of the
  k-times-faster clock. It runs a second `prog_dco` that is restarted at
  every recovered edge, so both clocks stay edge-aligned.

`resync` stops the DCO and re-arms the first-edge detector. The next
transition then starts a fresh acquisition.

Latency: an input transition reaches the estimator 3 cycles after it appears
on `din` (2 synchroniser flops and the differentiator). The recovered edges
therefore sit 2–3 fast-clock cycles after the data edges. Use
`output_delay` to move them to the bit centre.

## Clock generator (`clock_generator`)

The output frequency is f_out = f_ref · M / (N · L).

Two identical ring oscillators form a clock pair:

- oscillator #2 is the tracking clock and runs the control loop;
- oscillator #1 is the output. It is given only commands that were found to
  be locked.

`freq_tracking` counts tracking-clock cycles over 4 periods of reference/N
and compares the count C with 4·M. One settle period follows in which
nothing is measured. From the error e = C − 4M it decides as follows:

| error            | action |
|------------------|--------|
| \|e\| ≤ 1          | locked: keep the command, copy it to the output oscillator |
| 1 < \|e\| ≤ 8      | fine search: move the combined {coarse, fine} word by one fine step |
| \|e\| > 8          | coarse search: binary search on the coarse word, steps 8, 4, 2, 1 |

The search never stops, so slow drift is followed. `clock_controller` holds
the two command words and the locked flags. `clk_divider` gives the 1/N and
1/L dividers. A divisor of 0 or 1 passes the clock through.

`ring_osc` is a behavioural model and is not synthesizable. The coarse word
c selects 4 + c inverter pairs of 200 ps each. The fine word f selects one of
16 extra delay paths. Its delay grows in steps of 12.5 ps, which is 25 ps of
period. A fixed 1000 ps of ring overhead is added. So

period = 2·((4+c)·200 + 200 + 200·f/16) + 1000 ps

This covers about 63–333 MHz. Near 165 MHz, one fine step changes the
frequency by about 0.4%.
These delays are model values, not measured ones. Replace `ring_osc` with a
real cell-based oscillator for silicon.

## Top level (`adpll_crc_top`)

The clock generator makes `hs_clk`. The clock recovery runs on `hs_clk`. Its
reset is released through a two-flop synchroniser once the generator has
locked for the first time. The generator's internal state, the recovery
status and all clocks are brought out as ports.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| clock_recovery / top | `W` | 12 | period and phase width (periods up to 4095 cycles) |
| | `KW` | 4 | width of the multiplication factor k |
| | `DMAX` | 15 | longest output delay |
| clock_generator / top | `DIVW` | 10 | width of N, M, L |
| freq_tracking | `WIN`, `LOCK_TH`, `SEARCH_TH` | 4, 1, 8 | window length, lock and fine-search thresholds |
| crc_pkg | `CW`, `FW` | 5, 4 | coarse and fine command widths |

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Run from the
directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb rtl/crc_pkg.sv tb/tb_clock_recovery.sv \
    --top-module tb_clock_recovery -o sim
./obj_dir/sim
```

The package is given first, and the other modules are found through `-I`.
`-Wno-fatal` is needed for two expected warnings:

- the range clamp in `output_delay` is constant at the default `DMAX`;
- the ring oscillator model uses a computed delay.

Each testbench finishes within about a minute.

| testbench | what it covers |
|---|---|
| `tb_dfed`, `tb_jk_pd`, `tb_filter_counter`, `tb_pf_estimator`, `tb_prog_dco`, `tb_output_delay`, `tb_mf_generator` | each block against a cycle model |
| `tb_clock_recovery` | 14 cases with bit periods of 4–40 cycles and slow and fast initial DCO periods; edge positions, periods, synthesizer and delay |
| `tb_cr_workloads` | 41 Mbit/s at 165 MHz (f_clock/4, synthesizer at 165 MHz), and 12.5 and 9 Mbit/s at 125 MHz |
| `tb_clk_divider`, `tb_freq_tracking`, `tb_clock_controller`, `tb_ring_osc` | clock generator parts |
| `tb_clock_generator` | 33 MHz ×40/8 → 165 MHz, with L = 2, and 40 MHz ×24/8 → 120 MHz |
| `tb_adpll_crc_top` | the whole design at default parameters: the generator locks, then a 10.2 Mbit/s stream starting 31% off frequency is recovered. It counts coarse, fine and locked decisions, and Up, Down and rejected measurements |

## Departures and limitations

- **Pull-in range.** The initial period locks for an input period N with
  about 2N/3 < T0 < 2N. This follows from the T/2 rejection rule as
  specified. A DCO range quoted as "N/2 to 3N/2 of the input period" would
  suggest the opposite bound (T0 between N/2 and 3N/2), and this design does
  not reproduce that.
- **Bit rates near f_clock/4.** At 41 Mbit/s on 165 MHz (4.02 cycles per
  bit), the period alternates between 4 and 5. About 0.25% of recovered
  edges are lost when a realignment lands on an edge. Rates of 5 or more
  cycles per bit lose no edges in the tests.
- **Recovered edge position.** After a long run of equal bits, the recovered
  edge can drift by the accumulated rounding (fraction of a cycle × run
  length) until the next transition corrects it.
- **Alternative reset rule.** A simpler variant that stops the DCO when the
  error exceeds the input period is not built. The T/2 rule is used
  throughout.
- **Clock generator timing.** Windows, thresholds, step sizes and the lock
  tolerance are this design's choices. Lock takes about 8–17 µs with a
  33 MHz reference. Jitter, and mismatch within the clock pair, are analog
  properties that the behavioural model does not have.
- **Process-specific parts are not included:** clock tree, pads, and the
  cell-level oscillator layout.
