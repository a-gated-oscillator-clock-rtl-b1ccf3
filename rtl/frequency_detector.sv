// Frequency detector (FD) of the bias and calibration circuit.
//
// Compares the recovered clock with the reference clock Clock_ref by
// counting clock edges between consecutive Clock_ref edges. A 2-bit Gray
// counter advances on every rising edge of clk; it is brought into the
// Clock_ref domain by a two-flip-flop synchronizer and differenced against
// its value one reference period earlier. A period with no clock edge means
// the oscillator is slower than the reference (UP pulse: more current); a
// period with two or more edges means it is faster (DN pulse: less current).
// These slips come at a rate equal to the frequency difference, so a 0.5 %
// error gives one pulse roughly every 200 reference cycles, and a clock at
// exactly the reference rate gives none.
//
// Interface: clk (recovered clock), clk_ref, rst_n; up and dn are one
// clk_ref cycle wide and change on rising edges of clk_ref, delayed by the
// synchronizer (two to three reference cycles). The document uses a
// detector taken from earlier work and does not give its insides; this
// edge-counting detector is this design's own.
module frequency_detector (
  input  logic clk,
  input  logic clk_ref,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  timeunit 1ns; timeprecision 1ps;

  // Clock domain: Gray-coded edge counter.
  logic [1:0] gray_ck;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gray_ck <= 2'b00;
    else        gray_ck <= {gray_ck[0], ~gray_ck[1]};  // 00 01 11 10 00 ...
  end

  // Reference domain: synchronize, decode, difference.
  logic [1:0] sync1, sync2, bin_prev, bin_now, delta;
  assign bin_now = {sync2[1], sync2[1] ^ sync2[0]};
  assign delta   = bin_now - bin_prev;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      sync1    <= 2'b00;
      sync2    <= 2'b00;
      bin_prev <= 2'b00;
      up       <= 1'b0;
      dn       <= 1'b0;
    end else begin
      sync1    <= gray_ck;
      sync2    <= sync1;
      bin_prev <= bin_now;
      up       <= (delta == 2'd0);
      dn       <= (delta >= 2'd2);
    end
  end
endmodule
