// Behavioural model of the digitally controlled current source (DCCS).
// This is an analog block; the model is for simulation only.
//
// The real circuit mirrors an external reference current I_bias into
// binary-weighted branches selected by the SA logic's weighting bits and
// turns the sum into the two bias voltages vbias_p and vbias_n of the GO-CDR.
// Both bias voltages set the same charge and discharge current, so the model
// carries that current as one real value in nA (bias_na) in place of the two
// voltages. bias_na = enable * i_bias_na * (BASE_UNITS + code) / NOM_UNITS.
// With BASE_UNITS = 44 and NOM_UNITS = 60 the mid-scale code 16 gives exactly
// I_bias, code 0 gives 0.73 I_bias and code 31 gives 1.25 I_bias, so a
// free-running frequency error from -20 % to +36 % at mid-scale can be
// trimmed; one LSB is 1/60 of the nominal current (about 1.7 %).
// Enable low (Phase 1, no calibration) switches the current off, which stops
// the oscillator and the delay block.
//
// The five weighting bits and the external I_bias follow the document; the
// weight of the fixed part and of one LSB are this model's choice.
module dccs
  import wurx_pkg::*;
#(
  parameter int unsigned NBITS      = DCCS_BITS,
  parameter real         BASE_UNITS = 44.0,
  parameter real         NOM_UNITS  = 60.0
) (
  input  logic             enable,
  input  logic [NBITS-1:0] code,
  input  real              i_bias_na,   // external reference current
  output real              bias_na      // stands for vbias_p / vbias_n
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    if (enable) bias_na = i_bias_na * (BASE_UNITS + real'(code)) / NOM_UNITS;
    else        bias_na = 0.0;
  end
endmodule
