// Shared constants and types of the wake-up receiver baseband.
//
// The field widths follow the prototype: a 16-bit codeword, a 4-bit
// correlator threshold and a 6-bit timeout make up the 26-bit configuration
// word; the calibration uses a 5-bit current-source code and an 8-bit
// calibration timeout. The order of the fields inside the configuration word
// is this design's choice: codeword in the top bits, then threshold, then
// timeout in the bottom bits (the last six bits shifted in).
package wurx_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CODEWORD_W  = 16;  // codeword length in bits
  localparam int unsigned THRESHOLD_W = 4;   // correlator threshold field
  localparam int unsigned TIMEOUT_W   = 6;   // Phase-2 timeout field
  localparam int unsigned CFG_W = CODEWORD_W + THRESHOLD_W + TIMEOUT_W;  // 26

  localparam int unsigned SFD_ZEROS   = 2;   // SFD: two zeros after the start bit

  localparam int unsigned DCCS_BITS   = 5;   // current-source weighting bits
  localparam int unsigned CAL_TO_W    = 8;   // calibration timeout counter width

  // Configuration word as it sits in the SIPO register.
  typedef struct packed {
    logic [CODEWORD_W-1:0]  codeword;   // first received bit is codeword[15]
    logic [THRESHOLD_W-1:0] threshold;  // wake up when matches > threshold
    logic [TIMEOUT_W-1:0]   timeout;    // Phase-2 length in clock cycles
  } cfg_t;

  // States of the sequential unit inside Phase 2.
  typedef enum logic [1:0] {
    SU_START = 2'd0,   // next clock edge samples the start bit
    SU_SFD   = 2'd1,   // looking for the two SFD zeros
    SU_CORR  = 2'd2    // correlator enabled
  } su_state_t;

  // States of the successive-approximation calibration logic.
  typedef enum logic [1:0] {
    SA_IDLE  = 2'd0,
    SA_TRIAL = 2'd1,   // a trial code is applied, waiting for UP or DN
    SA_DONE  = 2'd2
  } sa_state_t;

  // Nominal analog operating point used by the behavioural models.
  localparam real F_NOM_HZ   = 1000.0;  // target bitrate and GO frequency
  localparam real I_NOM_NA   = 2.0;     // nominal charge/discharge current
  localparam int unsigned GO_STAGES = 3;
endpackage
