// Serial-in parallel-out configuration register of the control logic.
//
// The node MCU programs the receiver by shifting the 26-bit configuration
// word (16-bit codeword, 4-bit correlator threshold, 6-bit timeout) into
// this register, MSB first. Whatever was shifted in last is held and driven
// in parallel to the correlator and the timeout counter.
//
// Interface: cfg_clk / cfg_en / cfg_data form the serial port; while cfg_en
// is high, each rising edge of cfg_clk shifts cfg_data in at the LSB.
// rst_n clears the register asynchronously. The register width follows the
// prototype; the serial port itself (clock, enable, bit order, reset) is this
// design's choice.
module sipo_register
  import wurx_pkg::*;
#(
  parameter int unsigned WIDTH = CFG_W
) (
  input  logic             cfg_clk,
  input  logic             rst_n,
  input  logic             cfg_en,
  input  logic             cfg_data,
  output logic [WIDTH-1:0] q
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (cfg_en) q <= {q[WIDTH-2:0], cfg_data};
  end
endmodule
