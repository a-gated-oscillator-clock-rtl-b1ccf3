// Behavioural model of the delay block (DB) of the GO-CDR. Analog block: the
// model is for simulation only.
//
// The real DB is one stage identical to a GO stage, biased by the same
// vbias_p / vbias_n (its reset transistors held off), followed by a
// squaring inverter. Its delay tau_d is therefore close to the GO stage
// delay tau_p = T_ck / 6 and tracks the oscillator over process, voltage and
// temperature, which keeps tau_d below half a bit time.
//
// Interface: din, the bias current bias_na (nA, real), ddin.
// Timing: a rising Din edge reaches DDin after TD_RISE_NS and a falling one
// after TD_FALL_NS, both given at the nominal I_NOM_NA and scaled by
// I_NOM_NA / bias_na / PROC_GAIN like the oscillator period. The defaults
// are the prototype's 163 us and 146 us (against T_ck/6 = 166.7 us);
// setting both to 1e9 / F_NOM_HZ / 6 gives the ideal tau_d = tau_p.
// Choices of this model: while the bias current is off the nominal current
// is used, so the first Din edge of a packet, which itself switches the bias
// on, is delayed by the nominal tau_d; and an output edge is never scheduled
// before the previous one, so a Din pulse shorter than the difference of the
// two delays cannot leave DDin stuck at the wrong level.
module delay_block
  import wurx_pkg::*;
#(
  parameter real PROC_GAIN  = 1.0,
  parameter real TD_RISE_NS = 163000.0,
  parameter real TD_FALL_NS = 146000.0
) (
  input  logic din,
  input  real  bias_na,
  output logic ddin
);
  timeunit 1ns; timeprecision 1ps;

  realtime t_last = 0.0;

  initial ddin = 1'b0;

  function automatic real tau_ns(logic rising, real i_na);
    return (rising ? TD_RISE_NS : TD_FALL_NS) * (I_NOM_NA / i_na) / PROC_GAIN;
  endfunction

  // delay of the edge to v, kept from landing before the previous edge
  function automatic real next_delay(logic v);
    real d;
    d = tau_ns(v, (bias_na > 0.0) ? bias_na : I_NOM_NA);
    if ($realtime + d < t_last) d = t_last - $realtime;
    t_last = $realtime + d;
    return d;
  endfunction

  always @(din) ddin <= #(next_delay(din)) din;
endmodule
