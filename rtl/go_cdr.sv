// Gated-oscillator clock and data recovery (GO-CDR). Contains behavioural
// models of analog blocks: for simulation only.
//
// Din from the analog front-end is delayed by the delay block into DDin. An
// exclusive-NOR of Din and DDin gives Gate, which drops for tau_d after every
// data transition. While Gate is low the gated oscillator is held in reset;
// when Gate returns high its first rising clock edge comes half a clock
// period later, i.e. about half a bit after the DDin transition, so every
// data transition removes the phase error accumulated so far. Between
// transitions the oscillator free-runs; the only limit a frequency error
// alpha sets is on the longest run of equal bits, N_m < (1 - alpha) /
// (2 alpha). The control logic samples DDin on the rising edges of Clock.
//
// Interface: din, bias_na (stands for the two bias voltages, in nA of
// charge current), outputs ddin, gate and clock.
module go_cdr
  import wurx_pkg::*;
#(
  parameter real PROC_GAIN = 1.0
) (
  input  logic din,
  input  real  bias_na,
  output logic ddin,
  output logic gate,
  output logic clock
);
  timeunit 1ns; timeprecision 1ps;

  delay_block #(.PROC_GAIN(PROC_GAIN)) u_db (.din, .bias_na, .ddin);

  // Edge detector: Gate is low while Din and DDin differ.
  assign gate = din ~^ ddin;

  gated_oscillator #(.PROC_GAIN(PROC_GAIN)) u_go (.gate, .bias_na, .clock);
endmodule
