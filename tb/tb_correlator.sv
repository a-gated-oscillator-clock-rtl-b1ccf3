// Testbench of the correlator: random codewords and thresholds, a random
// bit stream with the codeword (with a chosen number of bit errors) embedded
// in it. A reference model in the testbench keeps the bits sampled since
// en_corr rose and computes the match count of the last 16 of them; wake_up
// must follow (matches > threshold) one edge later, and en_corr low must
// clear the window.
module tb_correlator;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  int checks = 0, failures = 0, wakes = 0;
  logic clk = 0, rst_n = 1, en_corr = 0, ddin = 0, wake_up, hit;
  logic [CODEWORD_W-1:0]  codeword;
  logic [THRESHOLD_W-1:0] threshold;

  correlator dut (.clk, .rst_n, .en_corr, .ddin, .codeword, .threshold, .wake_up, .hit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist[$];
    bit expect_wu;
    #0.5 rst_n = 0;
    #3 rst_n = 1;
    for (int pkt = 0; pkt < 60; pkt++) begin
      int nerr, pos, len;
      bit stream[$];
      logic [CODEWORD_W-1:0] cw_err;
      stream.delete();
      codeword  = CODEWORD_W'($urandom);
      threshold = THRESHOLD_W'(12 + $urandom_range(0, 3));  // 16/16 .. 13/16
      nerr      = $urandom_range(0, 4);
      cw_err    = codeword;
      for (int e = 0; e < nerr; e++) cw_err[$urandom_range(0, CODEWORD_W-1)] ^= 1'b1;
      len = 40;
      pos = $urandom_range(0, 20);
      for (int i = 0; i < len; i++) stream.push_back($urandom_range(0, 1));
      for (int i = 0; i < CODEWORD_W; i++) stream[pos + i] = cw_err[CODEWORD_W - 1 - i];
      hist.delete();
      en_corr = 1;
      expect_wu = 0;
      foreach (stream[i]) begin
        ddin = stream[i];
        #5 clk = 1; #1;
        hist.push_back(stream[i]);
        // reference: match count of the last 16 sampled bits
        expect_wu = 0;
        if (hist.size() >= CODEWORD_W) begin
          int m;
          m = 0;
          for (int k = 0; k < CODEWORD_W; k++)
            if (hist[hist.size() - CODEWORD_W + k] == codeword[CODEWORD_W - 1 - k]) m++;
          expect_wu = (m > int'(threshold));
        end
        check(wake_up == expect_wu, $sformatf("pkt %0d bit %0d wake_up=%0b want %0b", pkt, i, wake_up, expect_wu));
        #4 clk = 0;
      end
      en_corr = 0;
      #5 clk = 1; #1;
      check(wake_up == 0, "en_corr low clears wake_up");
      #4 clk = 0;
    end
    check(wakes > 10, $sformatf("only %0d wake-ups seen", wakes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge wake_up) wakes++;
endmodule
