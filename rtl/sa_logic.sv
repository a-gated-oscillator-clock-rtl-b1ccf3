// Successive-approximation (SA) logic of the bias and calibration circuit.
//
// Sets the DCCS_BITS weighting bits of the digitally controlled current
// source one at a time, MSB first. For each bit the trial code (the bits
// decided so far, this bit set, lower bits clear) is applied and the logic
// waits for the frequency detector: DN (oscillator too fast) clears the
// bit, UP keeps it, and the next lower bit is tried. After the LSB is decided
// end_calib rises. A CAL_TO_W-bit counter (255 reference cycles at 8 bits)
// bounds each wait: if the detector gives no pulse in that time the
// oscillator is within the detector's resolution of the reference (or
// outside its range) and the calibration ends with the trial code, which
// avoids the stall the document warns about.
//
// The first SETTLE reference cycles after each new trial code are ignored,
// so that the detector's synchronizer holds no edge counts of the previous
// code (or of the oscillator start-up after Enable rises). They count
// toward the timeout.
//
// Interface: clk_ref, rst_n, start_calib (level, from the MCU), up/dn from
// the detector; code to the DCCS; end_calib stays high until start_calib
// falls, and code keeps its calibrated value afterwards. Timing: one
// decision per detector pulse, all on rising edges of clk_ref.
// The SA search, the 5 bits and the 8-bit timeout follow the document; the
// initial code, the settle interval and the handshake are this design's.
module sa_logic
  import wurx_pkg::*;
#(
  parameter int unsigned NBITS  = DCCS_BITS,
  parameter int unsigned TO_W   = CAL_TO_W,
  parameter int unsigned SETTLE = 4
) (
  input  logic             clk_ref,
  input  logic             rst_n,
  input  logic             start_calib,
  input  logic             up,
  input  logic             dn,
  output logic [NBITS-1:0] code,
  output logic             end_calib,
  output logic             timed_out   // last calibration ended by timeout
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned IDX_W = (NBITS > 1) ? $clog2(NBITS) : 1;

  sa_state_t        state;
  logic [IDX_W-1:0] idx;
  logic [TO_W-1:0]  wait_cnt;
  logic             settled, expired;

  assign settled   = wait_cnt >= TO_W'(SETTLE);
  assign expired   = &wait_cnt;               // 2**TO_W - 1 cycles waited
  assign end_calib = (state == SA_DONE);

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SA_IDLE;
      code      <= NBITS'(1) << (NBITS - 1);  // mid-scale until calibrated
      idx       <= IDX_W'(NBITS - 1);
      wait_cnt  <= '0;
      timed_out <= 1'b0;
    end else begin
      unique case (state)
        SA_IDLE: if (start_calib) begin
          state     <= SA_TRIAL;
          code      <= NBITS'(1) << (NBITS - 1);
          idx       <= IDX_W'(NBITS - 1);
          wait_cnt  <= '0;
          timed_out <= 1'b0;
        end
        SA_TRIAL: begin
          if (!start_calib) begin
            state <= SA_IDLE;
          end else if (settled && (up || dn)) begin
            if (dn) code[idx] <= 1'b0;
            if (idx == '0) begin
              state <= SA_DONE;
            end else begin
              code[idx - 1'b1] <= 1'b1;
              idx      <= idx - 1'b1;
              wait_cnt <= '0;
            end
          end else if (expired) begin
            state     <= SA_DONE;
            timed_out <= 1'b1;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        SA_DONE: if (!start_calib) state <= SA_IDLE;
        default: state <= SA_IDLE;
      endcase
    end
  end
endmodule
