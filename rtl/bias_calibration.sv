// Bias and calibration (BC) circuit of the GO-CDR. Contains a behavioural
// model of an analog block (the current source): for simulation only.
//
// A frequency detector compares the recovered clock with Clock_ref, supplied
// by the MCU at the target bitrate, and gives UP/DN pulses; the
// successive-approximation logic uses them to set the five weighting bits of
// the digitally controlled current source, which biases the GO-CDR. The MCU
// raises start_calib (this also makes the control logic raise enable, so
// the oscillator runs); the calibration ends with end_calib when the LSB has
// been decided, or when 255 reference cycles pass without a detector pulse.
// The code is kept afterwards and sets the oscillator frequency in
// operation.
//
// Interface: clock (recovered), clock_ref, rst_n, start_calib, enable (from
// the control logic), i_bias_na (external reference current); bias_na out to
// the GO-CDR, end_calib out to the control logic and MCU, code for
// observation. The frequency detector and SA logic run on Clock_ref.
module bias_calibration
  import wurx_pkg::*;
(
  input  logic                 clock,
  input  logic                 clock_ref,
  input  logic                 rst_n,
  input  logic                 start_calib,
  input  logic                 enable,
  input  real                  i_bias_na,
  output real                  bias_na,
  output logic                 end_calib,
  output logic                 cal_timed_out,
  output logic [DCCS_BITS-1:0] code,
  output logic                 up,
  output logic                 dn
);
  timeunit 1ns; timeprecision 1ps;

  frequency_detector u_fd (
    .clk(clock), .clk_ref(clock_ref), .rst_n, .up, .dn
  );

  sa_logic #(.NBITS(DCCS_BITS), .TO_W(CAL_TO_W)) u_sa (
    .clk_ref(clock_ref), .rst_n, .start_calib, .up, .dn,
    .code, .end_calib, .timed_out(cal_timed_out)
  );

  dccs #(.NBITS(DCCS_BITS)) u_dccs (
    .enable, .code, .i_bias_na, .bias_na
  );
endmodule
