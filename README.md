# Gated-oscillator clock recovery for a nanowatt wake-up receiver

A wake-up receiver listens all the time, so its baseband must cost almost no
power while nothing is being sent, and still sample a 1 kbps OOK bit stream
correctly when a packet arrives. Crystal oscillators and PLLs cost too much
power, or need a long preamble to lock. Oversampling with a cheap ring
oscillator limits how long a packet can be. This design instead gets its bit
clock from a **gated oscillator** (GO) that the data itself restarts:

* every transition of the received data Din resets the oscillator for a
  short time τd;
* when the reset ends, the oscillator's first rising edge comes half a clock
  period later, which is close to the middle of the bit;
* between transitions the oscillator free-runs.

So the phase error is cleared at every data edge, and a frequency error α
between the oscillator and the bitrate limits only the longest run of equal
bits, not the packet length. A small calibration loop trims the oscillator
to a reference clock, so that long runs of ones or zeros can also be
received.

The RTL covers the whole baseband:

* the digital **control logic** (configuration register, correlator,
  timeout counter, sequential unit), which is synthesizable;
* the **calibration logic** (frequency detector, successive-approximation
  logic), which is synthesizable;
* **behavioural models** of the analog parts that close the loop in
  simulation: the gated oscillator, the delay block and the digitally
  controlled current source.

The analog front-end (envelope detector, comparator, PTAT bias) is not
modelled. Din is a port.

## Operating phases

**Phase 1 (rest).** The bias current of the GO-CDR is off, so there is no
clock. The only active flip-flop is clocked by Din itself
(`sequential_unit.start_tgl`). The first 0-to-1 edge of Din toggles it.

**Phase 2 (receive).** Phase 2 is `start_tgl XOR stop_tgl`. It raises
`enable`, which turns on the current source (`dccs`), so the oscillator and
the delay block run. The recovered clock clocks the control logic.

Phase 2 ends by toggling `stop_tgl` on a clock edge, in one of two cases:

* on the edge after a wake-up pulse;
* on the edge that completes the programmed timeout.

Each of the two toggle flip-flops only changes while the other is stable,
so no asynchronous path is needed between the Din domain and the clock
domain.

**Calibration.** The MCU raises `start_calib` and drives `clock_ref` at the
bitrate. `enable` is then also high (`start_calib && !end_calib`). Din must
stay still during calibration: with no data edges, Gate stays high and the
oscillator free-runs.

## Packet format and timing

```
Din:    1 | 0 0 | c15 c14 ... c0 | (optional data, up to 63 bits in total)
        start  SFD   16-bit codeword, MSB first
clock edge: 1   2 3   4 ...... 19    20
```

* **Edge 1** samples the start bit, i.e. the Din edge that opened Phase 2.
* **SFD search.** The sequential unit then waits for two consecutive zeros
  of DDin (the start frame delimiter). If a 1 comes in between, the count
  starts again.
* **Correlation.** After the SFD, `en_corr` is high. Each edge shifts DDin
  into a 16-bit sliding window (`correlator`).
* **Wake-up.** Once the window is full, `wake_up` is raised for one clock
  when the number of positions that match the codeword is **greater than**
  the 4-bit threshold. Threshold 15 means 16/16, 14 means 15/16, 13 means
  14/16.
* **Timing.** For a packet whose codeword follows the SFD directly,
  `wake_up` rises on edge 19, and Phase 2 closes on edge 20.
* **Timeout.** If no wake-up comes, Phase 2 lasts exactly `timeout`
  edges, at most 63 with the 6-bit field. This is also the longest packet
  that can be received in one Phase 2.
* **Configuration word.** 26 bits, shifted MSB first into `sipo_register`
  through `cfg_clk`/`cfg_en`/`cfg_data`: `{codeword[15:0], threshold[3:0],
  timeout[5:0]}` (`wurx_pkg::cfg_t`).

## The recovered clock and the limit on equal bits

This is the part that needs the most care when you change anything
(`go_cdr`, `gated_oscillator`, `delay_block`).

```
Din   ─┐_____________┌──────────   transition at t = 0
DDin  ───┐_____________┌────────   Din delayed by τd ≈ T_ck/6
Gate  ─┐_┌───────────┐_┌────────   Gate = Din XNOR DDin, low for τd
Clock ___________┌─┐___  ...       first rising edge at τd + T_ck/2
```

* **Delay block.** It is one oscillator stage plus an inverter, biased like
  the oscillator. So τd ≈ τp = T_ck/6 follows the oscillator over process
  and temperature, and always satisfies τ_reset < τd < T_b/2.
* **Edge-dependent delay.** The model uses the prototype's delays at the
  nominal 2 nA: 163 µs for rising edges and 146 µs for falling ones. Both
  scale with the bias like the period (`TD_RISE_NS`, `TD_FALL_NS` on
  `delay_block`). Setting both to 166 667 ns gives the ideal τd = τp.
* **Sampling points.** In a run of N equal bits the clock samples at
  τd + (k + ½)·T_ck for k = 0, 1, …, until the next Din transition forces
  Gate low. The bit is therefore received correctly when exactly N of
  these samples fall before N·T_b.
* **Limit from the models.** With T_ck = T_b/(1 ± α) and r = τd/T_ck:
  * a slow clock misses a bit once N > about (½ − r)/α;
  * a fast clock samples a bit twice once N > about (½ + r)/α.

  r is 0.163 for a run of ones, which starts on a rising edge, and 0.146
  for a run of zeros. That is roughly 1/(3α) and 2/(3α). At α = 0.5 % the
  limits are 67–70 and 129–133 bits, so packets of 63 equal bits are
  received either way. At α = 1 % a slow clock limits runs to about 34
  bits. `tb_workloads` at ±1.5 % first fails at 44 (fast) and 23 (slow).
* **Simpler estimate.** A first-order analysis that ignores τd and the
  reset by the next transition gives N_m < (1 − α)/(2α), which is 99 at
  0.5 % and 49 at 1 %. The models here reproduce the more exact count above
  (checked sample by sample in `tb_go_cdr`).
* **Not modelled.** The oscillator's reset time (340 ns), start-up time
  (7 µs) and jitter (1–3 µs rms) are each below 1 % of the 1 ms period.

## Calibration loop

`bias_calibration` = `frequency_detector` + `sa_logic` + `dccs`. Both
digital blocks run on `clock_ref`.

**Frequency detector.** A 2-bit Gray counter counts recovered-clock edges.
It is synchronized into the reference domain and differenced once per
reference period:

* 0 edges in a period gives **UP** (oscillator slow);
* 2 or more edges gives **DN** (oscillator fast).

Pulses therefore come at the beat frequency: at 0.5 % error, one every
~200 reference cycles. This is why the 255-cycle timeout is just long
enough to resolve ±0.5 %. The original detector circuit was taken from
earlier work and is not described; this detector is this design's own.

**SA logic.** It sets the 5 weighting bits MSB first:

* for each trial it ignores 4 reference cycles, so the synchronizer forgets
  the previous code;
* DN clears the trial bit, UP keeps it;
* after the LSB, `end_calib` rises;
* if no pulse comes within 255 reference cycles, the calibration ends with
  the current code (`cal_timed_out`), which avoids a stall when the
  frequencies are too close or too far apart;
* `end_calib` stays high until `start_calib` falls, and the code is kept.

**Current source (model).** `bias = I_bias · (44 + code)/60`:

* mid-scale 16 gives I_bias;
* the range trims initial errors from −20 % to +36 %;
* one LSB is 1/60 of the current (1.7 %).

**Result.** Over initial errors of −20 % … +20 %, the calibrated error is at
worst 1.4 % in simulation. The prototype was reported to reach ±0.5 % with
its analog current source. A linear 5-bit source that spans ±20 % cannot do
that over the whole range: the gap lies in the current-source model, not in
the digital search. The weights are parameters of `dccs`.

## How far to trust each part

| Part | Status |
|---|---|
| `control_logic`, `sipo_register`, `correlator`, `timeout_counter`, `sequential_unit` | synthesizable RTL; field widths (16/4/6), SFD `00`, threshold rule and timeout as in the original design; serial-port protocol, sliding window, one-clock wake-up pulse and reset are choices made here |
| `frequency_detector`, `sa_logic` | synthesizable RTL; 5 bits, 8-bit timeout and end conditions as in the original; the detector circuit, settle interval and handshake are choices made here |
| `gated_oscillator`, `delay_block`, `dccs`, `go_cdr`, `bias_calibration`, `wurx_baseband` | contain behavioural models with `real` currents and `#` delays; simulation only |
| envelope detector, comparator, PTAT bias, matching network, MCU | not modelled; Din, `clock_ref`, `start_calib`, `i_bias_na` and the configuration port are ports |

Other departures from the prototype:

* The two bias voltages `vbias_p`/`vbias_n` are carried as one real current
  `bias_na`, in nA.
* The codeword length is fixed at 16 bits. The configuration word has no
  length field, so a shorter codeword can only be approximated by lowering
  the threshold.
* The top has observation outputs (`phase2`, `en_corr`, `gate`, `fd_up`,
  `fd_dn`, `cal_code`) for testing.

## Files

* `rtl/wurx_pkg.sv`: widths, the `cfg_t` configuration struct, state enums
  and the nominal analog operating point (1 kHz, 2 nA).
* `rtl/wurx_baseband.sv`: top level, which wires `go_cdr`,
  `control_logic` and `bias_calibration`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_wurx_baseband.sv`: runs the top at its default sizes. It covers:
  * a calibration sweep over ±20 %, each followed by a wake-up packet;
  * wrong codewords, a noise pulse, and the 15/16 and 14/16 thresholds;
  * 63-bit packets with 20 consecutive ones, checked bit-exact on the
    recovered clock.

  It counts every mechanism: Phase-2 entries, SFDs, wake-ups, timeouts,
  UP/DN pulses, and calibrations ended by the LSB or by the timeout.
* `tb/tb_workloads.sv`: the packet campaigns at default sizes:
  * 10,000 wake-up packets, 100 ms apart, with each Din edge moved by a
    random ±30 µs, at 14/16 after calibration; every packet must wake the
    receiver exactly once;
  * 3174 63-bit packets, 100 ms apart, each with 20 consecutive ones at a
    random place and random bits elsewhere, edges moved by up to ±20 µs,
    after the same calibration (−1.07 % left); all 63 bits must come back;
  * 63-bit packets holding one run of N equal ones or zeros,
    N = 1 … 62 after the start bit, at +0.5 % and −0.5 % oscillator error,
    all checked bit by bit on the recovered clock.

## Simulating

All files use `timeunit 1ns`. The package must come first. Example for the
full receiver:

```
verilator --binary --timing --assert -Irtl rtl/wurx_pkg.sv tb/tb_wurx_baseband.sv \
          --top tb_wurx_baseband -Mdir obj_top -o sim && obj_top/sim
```

Any other testbench works the same way: replace the testbench file and the
top name. Verilator finds the other modules through `-Irtl`.

The models are event-driven: a whole calibration of up to 1.3 s of
simulated time runs in well under a second. The behavioural files lint
cleanly but are not meant for synthesis.

To experiment:

* set `i_bias_na` for a different initial oscillator error;
* use `PROC_GAIN` on `go_cdr` for a process spread that moves the delay
  block and the oscillator together;
* use `BASE_UNITS`/`NOM_UNITS` on `dccs` for a different trim range.
