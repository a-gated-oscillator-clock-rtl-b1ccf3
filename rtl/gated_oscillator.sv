// Behavioural model of the gated oscillator (GO). Analog block: the model is
// for simulation only.
//
// The real GO is a three-stage ring of current-starved inverters, each
// loaded by a capacitor and with two extra transistors that force the stage
// output to a fixed level while Gate is low; an output inverter squares the
// last stage into Clock. Its period is 2*N*tau_p (N = 3 stages), and tau_p
// is set by the charge/discharge current: at 2 nA and 1.1 pF the ring runs at
// 1 kHz. The model reproduces the behaviour the CDR relies on:
//   * Gate low, or no bias current: Clock is held low (the reset state);
//   * Gate rising: Clock rises half a period later, then toggles every
//     half period, so each Gate pulse restarts the phase;
//   * period T_ck = (1 / F_NOM_HZ) * (I_NOM_NA / bias_na) / PROC_GAIN, the
//     current being read at the start of every half period.
// PROC_GAIN stands for the process/voltage/temperature spread of the real
// ring (1.0 = nominal). The document's reset time (340 ns), start-up time
// (7 us) and jitter (1-3 us rms) are not modelled: all are below 1 % of the
// 1 ms period.
module gated_oscillator
  import wurx_pkg::*;
#(
  parameter real PROC_GAIN = 1.0
) (
  input  logic gate,
  input  real  bias_na,
  output logic clock
);
  timeunit 1ns; timeprecision 1ps;

  function automatic real half_period_ns(real i_na);
    return 0.5e9 / F_NOM_HZ * (I_NOM_NA / i_na) / PROC_GAIN;
  endfunction

  // Event-driven model: every scheduled half-period event carries a sequence
  // number, and only the most recently scheduled one (pend) may toggle the
  // clock, so a reset by Gate cancels the event that was pending.
  logic            run, run_q;
  longint unsigned seq, pend, tick;

  assign run = gate && (bias_na > 0.0);

  initial begin
    clock = 1'b0;
    run_q = 1'b0;
    seq   = 0;
    pend  = 0;
    tick  = 0;
  end

  always @(run or tick) begin
    if (run != run_q) begin
      // Gate or bias switched: restart from the reset state.
      run_q = run;
      clock = 1'b0;
      seq   = seq + 1;
      pend  = seq;
      if (run) tick <= #(half_period_ns(bias_na)) seq;
    end else if (run && tick == pend) begin
      clock = ~clock;
      seq   = seq + 1;
      pend  = seq;
      tick  <= #(half_period_ns(bias_na)) seq;
    end
  end
endmodule
