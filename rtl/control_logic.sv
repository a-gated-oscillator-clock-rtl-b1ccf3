// Control logic with addressing capabilities (CL).
//
// Four blocks: the SIPO configuration register, the correlator, the Phase-2
// timeout counter and the sequential unit. The first 0-to-1 transition of
// Din puts the receiver in Phase 2 (Enable high, the GO-CDR starts); the
// recovered clock then samples DDin, the sequential unit finds the start
// frame delimiter (preamble 100) and enables the correlator, and a wake-up
// pulse one clock long is raised when the match count of the last 16 bits
// against the codeword is higher than the threshold. After the wake-up, or
// after timeout clock cycles, the receiver returns to Phase 1.
//
// Interface: din/ddin/clk from the GO-CDR; cfg_* serial programming port;
// start_calib from the MCU and end_calib from the calibration logic;
// enable out to the bias and calibration circuit; wake_up out.
// The blocks and their connections follow the block diagram of the CL; the
// run signal from the sequential unit to the counter is this design's own.
module control_logic
  import wurx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic ddin,
  input  logic cfg_clk,
  input  logic cfg_en,
  input  logic cfg_data,
  input  logic start_calib,
  input  logic end_calib,
  output logic enable,
  output logic wake_up,
  output logic phase2,
  output logic en_corr,
  output cfg_t cfg
);
  timeunit 1ns; timeprecision 1ps;

  logic time_out, run, hit;
  logic [TIMEOUT_W-1:0] count;

  sipo_register #(.WIDTH(CFG_W)) u_sipo (
    .cfg_clk, .rst_n, .cfg_en, .cfg_data, .q(cfg)
  );

  correlator #(.CW_W(CODEWORD_W), .THR_W(THRESHOLD_W)) u_corr (
    .clk, .rst_n, .en_corr, .ddin,
    .codeword(cfg.codeword), .threshold(cfg.threshold),
    .wake_up, .hit
  );

  timeout_counter #(.WIDTH(TIMEOUT_W)) u_tmo (
    .clk, .rst_n, .run, .timeout_value(cfg.timeout), .time_out, .count
  );

  sequential_unit #(.N_SFD(SFD_ZEROS)) u_su (
    .clk, .rst_n, .din, .ddin, .wake_up, .hit, .time_out,
    .start_calib, .end_calib, .enable, .phase2, .en_corr, .run
  );
endmodule
