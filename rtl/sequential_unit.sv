// Sequential unit (SU) of the control logic: Phase 1 / Phase 2 control.
//
// In Phase 1 the gated oscillator is off and no clock exists, so the first
// 0-to-1 transition of Din is caught by a flip-flop clocked by Din itself
// (start_tgl). Phase 2 is on while start_tgl and the clock-domain flip-flop
// stop_tgl differ; ending Phase 2 toggles stop_tgl on a recovered-clock edge.
// The toggle pair needs no asynchronous clear path between the two clock
// domains: each flip-flop only changes when the other is stable.
//
// Inside Phase 2, on the recovered clock: the first edge samples the start
// bit (the '1' that started the phase); then the SU waits for the start
// frame delimiter, SFD_ZEROS consecutive zeros of DDin (3-bit preamble 100),
// after which en_corr enables the correlator. Phase 2 ends on the edge after
// a wake-up pulse, or on the timeout edge when no codeword is detected on it.
//
// Enable powers the bias current of the GO-CDR. It is high in Phase 2 and
// also while a calibration runs (start_calib high, end_calib low), so that
// the MCU's start_calib makes the control logic start the oscillator.
//
// Timing: Phase 2 starts at the Din rising edge (asynchronous); everything
// else changes on rising edges of clk. The toggle-pair structure, the
// priority of a wake-up over a coincident timeout and the reset are this
// design's choices.
module sequential_unit
  import wurx_pkg::*;
#(
  parameter int unsigned N_SFD = SFD_ZEROS
) (
  input  logic clk,          // recovered clock
  input  logic rst_n,
  input  logic din,          // AFE output, starts Phase 2
  input  logic ddin,         // delayed data, sampled on clk
  input  logic wake_up,      // registered wake-up from the correlator
  input  logic hit,          // correlator window matches after this edge
  input  logic time_out,     // this edge is the last one of the timeout (valid in Phase 2)
  input  logic start_calib,  // from the MCU
  input  logic end_calib,    // from the SA logic
  output logic enable,       // to the bias and calibration circuit
  output logic phase2,
  output logic en_corr,
  output logic run           // keeps the timeout counter counting
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned ZC_W = $clog2(N_SFD + 1);

  logic      start_tgl, stop_tgl, stop;
  su_state_t state;
  logic [ZC_W-1:0] zeros;

  assign phase2  = start_tgl ^ stop_tgl;
  assign stop    = phase2 && (wake_up || (time_out && !(state == SU_CORR && hit)));
  assign run     = phase2 && !stop;
  assign en_corr = run && (state == SU_CORR);
  assign enable  = phase2 || (start_calib && !end_calib);

  // Din-clocked: the first 0-to-1 transition in Phase 1 opens Phase 2.
  always_ff @(posedge din or negedge rst_n) begin
    if (!rst_n)       start_tgl <= 1'b0;
    else if (!phase2) start_tgl <= ~start_tgl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_tgl <= 1'b0;
      state    <= SU_START;
      zeros    <= '0;
    end else if (stop) begin
      stop_tgl <= ~stop_tgl;
      state    <= SU_START;
      zeros    <= '0;
    end else if (phase2) begin
      unique case (state)
        SU_START: state <= SU_SFD;
        SU_SFD: begin
          if (ddin) zeros <= '0;
          else if (zeros == ZC_W'(N_SFD - 1)) begin
            zeros <= '0;
            state <= SU_CORR;
          end else zeros <= zeros + 1'b1;
        end
        SU_CORR: state <= SU_CORR;
        default: state <= SU_START;
      endcase
    end
  end
endmodule
