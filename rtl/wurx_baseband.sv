// Data-startable baseband logic of a nanowatt wake-up and data receiver.
// Contains behavioural models of the analog parts of the GO-CDR and of the
// current source: for simulation only.
//
// Three blocks: the gated-oscillator CDR, which recovers a bit clock from the
// transitions of the front-end output Din; the control logic, which wakes the
// baseband on the first rising edge of Din, samples the delayed data DDin
// with the recovered clock, finds the preamble 100 and correlates the
// following bits with a programmed 16-bit codeword; and the bias and
// calibration circuit, which trims the oscillator to a reference clock.
//
// Phase 1: no clock, bias current off, only the Din-clocked start flip-flop
// listens. Phase 2 (from the first Din rising edge): enable switches the
// bias on, the GO-CDR clocks the control logic until a wake-up pulse or the
// programmed timeout. Calibration: the MCU raises start_calib and drives
// clock_ref at the bitrate; Din must stay still meanwhile.
//
// Ports: din (comparator output of the front-end), the serial configuration
// port cfg_clk/cfg_en/cfg_data, clock_ref/start_calib from the MCU and
// i_bias_na, the external reference current of the current source. Outputs:
// wake_up, end_calib, and for observation the recovered clock, ddin, the
// phase, the calibration code and the detector pulses. The envelope detector, comparator and
// bias generator of the front-end are analog circuits outside this module.
module wurx_baseband
  import wurx_pkg::*;
(
  input  logic                 rst_n,
  input  logic                 din,
  input  logic                 cfg_clk,
  input  logic                 cfg_en,
  input  logic                 cfg_data,
  input  logic                 clock_ref,
  input  logic                 start_calib,
  input  real                  i_bias_na,
  output logic                 wake_up,
  output logic                 end_calib,
  output logic                 clock,
  output logic                 ddin,
  output logic                 phase2,
  output logic                 en_corr,
  output logic                 enable,
  output logic [DCCS_BITS-1:0] cal_code,
  output logic                 cal_timed_out,
  output logic                 gate,
  output logic                 fd_up,
  output logic                 fd_dn
);
  timeunit 1ns; timeprecision 1ps;

  real  bias_na;
  cfg_t cfg;

  go_cdr u_cdr (
    .din, .bias_na, .ddin, .gate, .clock
  );

  control_logic u_cl (
    .clk(clock), .rst_n, .din, .ddin, .cfg_clk, .cfg_en, .cfg_data,
    .start_calib, .end_calib, .enable, .wake_up, .phase2, .en_corr, .cfg
  );

  bias_calibration u_bc (
    .clock, .clock_ref, .rst_n, .start_calib, .enable, .i_bias_na,
    .bias_na, .end_calib, .cal_timed_out, .code(cal_code),
    .up(fd_up), .dn(fd_dn)
  );
endmodule
