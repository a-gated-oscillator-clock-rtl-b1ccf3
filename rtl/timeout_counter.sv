// Programmable Phase-2 timeout counter of the control logic.
//
// Counts rising edges of the recovered (gated-oscillator) clock while run is
// high. time_out (valid while run is high) marks the clock cycle whose rising edge is the
// timeout_value-th edge of the run, so the sequential unit can leave Phase 2
// on exactly that edge: Phase 2 then spans at most timeout_value clock
// cycles, which is what limits a packet to 63 bits at the prototype's 6-bit
// width. A timeout_value of 0 acts as 2**WIDTH.
//
// Interface: clk is the recovered clock; run is held high by the sequential
// unit during Phase 2 and low otherwise (low clears the count on the next
// edge); timeout_value comes from the configuration register. The run input
// and the edge-numbering convention are this design's choices.
module timeout_counter
  import wurx_pkg::*;
#(
  parameter int unsigned WIDTH = TIMEOUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [WIDTH-1:0] timeout_value,
  output logic             time_out,
  output logic [WIDTH-1:0] count
);
  timeunit 1ns; timeprecision 1ps;

  logic [WIDTH-1:0] count_inc;
  assign count_inc = count + 1'b1;

  // The edge that brings the count to timeout_value is the last of Phase 2.
  assign time_out = (count_inc == timeout_value);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (run) count <= count_inc;
    else          count <= '0;
  end
endmodule
