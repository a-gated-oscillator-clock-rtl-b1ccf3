// Correlator with programmable codeword and threshold.
//
// While en_corr is high, every rising edge of the recovered clock shifts the
// sampled bit DDin into a window as long as the codeword. Once the window
// holds a full codeword's worth of bits, the number of positions where window
// and codeword agree is compared with the threshold; when it is higher, the
// wake-up output is raised for one clock cycle, starting at the edge that
// sampled the last codeword bit. Threshold 15 therefore demands 16/16
// matching bits, 14 allows one error (15/16), 13 two errors (14/16).
// The window slides, so a codeword that starts later in the packet is found
// as long as Phase 2 lasts. en_corr low empties the window.
//
// Interface: clk, rst_n, en_corr from the sequential unit, ddin (delayed
// data), codeword and threshold from the configuration register; wake_up out.
// hit tells the sequential unit, ahead of the edge, that this edge raises
// wake_up if the correlator is enabled.
// The sliding window and the one-cycle pulse are this design's choices.
module correlator
  import wurx_pkg::*;
#(
  parameter int unsigned CW_W  = CODEWORD_W,
  parameter int unsigned THR_W = THRESHOLD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_corr,
  input  logic             ddin,
  input  logic [CW_W-1:0]  codeword,
  input  logic [THR_W-1:0] threshold,
  output logic             wake_up,
  output logic             hit       // combinational: the window after this edge matches
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CNT_W = $clog2(CW_W + 1);

  logic [CW_W-1:0]  window, window_next;
  logic [CNT_W-1:0] filled, filled_next;
  logic [CNT_W-1:0] n_match;

  assign window_next = {window[CW_W-2:0], ddin};
  assign filled_next = (filled == CNT_W'(CW_W)) ? filled : filled + 1'b1;

  always_comb begin
    n_match = '0;
    for (int i = 0; i < CW_W; i++)
      if (window_next[i] == codeword[i]) n_match = n_match + 1'b1;
  end

  assign hit = (filled_next == CNT_W'(CW_W)) && (n_match > CNT_W'(threshold));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      window  <= '0;
      filled  <= '0;
      wake_up <= 1'b0;
    end else if (en_corr) begin
      window  <= window_next;
      filled  <= filled_next;
      wake_up <= hit;
    end else begin
      window  <= '0;
      filled  <= '0;
      wake_up <= 1'b0;
    end
  end
endmodule
