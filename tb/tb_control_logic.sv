// Testbench of the control logic. It plays the MCU (programs the SIPO
// register) and an ideal clock recovery: Din changes every T_B, DDin is Din
// delayed by T_B/10, and while Enable is high one clock rising edge comes in
// the middle of every DDin bit. Checked: Phase 2 starts at the first Din
// rising edge, the wake-up pulse rises on the edge that samples the last
// codeword bit and lasts one clock, Enable drops on the following edge; a
// wrong codeword ends Phase 2 after exactly `timeout` clock cycles; the
// thresholds 16/16, 15/16 and 14/16 accept 0, 1 and 2 bit errors and reject
// one more; a packet whose SFD is not 00 gets no wake-up; start_calib raises
// Enable without entering Phase 2.
module tb_control_logic;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  localparam time T_B = 1000;
  localparam logic [15:0] CW = 16'b1011101101010011;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, din = 0, ddin = 0;
  logic cfg_clk = 0, cfg_en = 0, cfg_data = 0, start_calib = 0, end_calib = 0;
  logic enable, wake_up, phase2, en_corr;
  cfg_t cfg;

  control_logic dut (.clk, .rst_n, .din, .ddin, .cfg_clk, .cfg_en, .cfg_data,
                     .start_calib, .end_calib, .enable, .wake_up, .phase2, .en_corr, .cfg);

  always @(din) ddin <= #(T_B / 10) din;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic program_cfg(input logic [15:0] cw, input logic [3:0] thr, input logic [5:0] tmo);
    logic [CFG_W-1:0] w;
    w = {cw, thr, tmo};
    for (int i = CFG_W - 1; i >= 0; i--) begin
      cfg_data = w[i]; cfg_en = 1;
      #5 cfg_clk = 1; #5 cfg_clk = 0;
    end
    cfg_en = 0;
  endtask

  // Sends bits[] (then zeros) and clocks the CL while Enable is high.
  // Returns the 1-based edge numbers of the wake-up rise and of the last edge.
  task automatic send(input bit bits[$], output int wu_edge, output int n_edges);
    int i;
    wu_edge = 0; n_edges = 0; i = 0;
    din = bits[0];
    #1;
    check(enable && phase2, "Phase 2 starts on the first Din rising edge");
    while (enable && i < 200) begin
      // bit i occupies [i*T_B, (i+1)*T_B) on Din, shifted by T_B/10 on DDin
      #(T_B / 2 + T_B / 10 - 1) clk = 1;
      n_edges++;
      #1;
      if (wake_up && wu_edge == 0) wu_edge = n_edges;
      #(T_B / 4) clk = 0;
      #(T_B - T_B / 2 - T_B / 10 - T_B / 4);
      i++;
      din = (i < bits.size()) ? bits[i] : 1'b0;
    end
    din = 0;
    #(2 * T_B);
  endtask

  function automatic void packet(output bit q[$], input logic [15:0] cw, input bit [1:0] sfd);
    q.delete();
    q.push_back(1'b1);
    q.push_back(sfd[1]);
    q.push_back(sfd[0]);
    for (int k = 15; k >= 0; k--) q.push_back(cw[k]);
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wu_pulse_len, wu_rises;
  always @(posedge clk) if (wake_up) wu_pulse_len++;
  always @(posedge wake_up) wu_rises++;

  initial begin
    bit q[$];
    int wu_edge, n_edges;
    #0.5 rst_n = 0;
    #3 rst_n = 1;
    program_cfg(CW, 4'd15, 6'd63);
    check(cfg.codeword == CW && cfg.threshold == 15 && cfg.timeout == 63, "SIPO fields");
    check(!enable && !phase2, "Phase 1 after reset");

    // 1. correct packet, 16/16
    packet(q, CW, 2'b00);
    wu_pulse_len = 0; wu_rises = 0;
    send(q, wu_edge, n_edges);
    check(wu_edge == 19, $sformatf("wake-up on edge 19 (got %0d)", wu_edge));
    check(n_edges == 20, $sformatf("Phase 2 ends on the edge after wake-up (%0d edges)", n_edges));
    check(wu_rises == 1 && wu_pulse_len == 1, $sformatf("one wake-up pulse of one clock (%0d, %0d)", wu_rises, wu_pulse_len));
    check(!enable && !wake_up && !phase2, "back in Phase 1");

    // 2. wrong codeword: timeout after 63 edges
    packet(q, ~CW, 2'b00);
    send(q, wu_edge, n_edges);
    check(wu_edge == 0, "no wake-up on a wrong codeword");
    check(n_edges == 63, $sformatf("timeout after 63 edges (got %0d)", n_edges));

    // 3. shorter timeout
    program_cfg(CW, 4'd15, 6'd10);
    packet(q, CW, 2'b00);
    send(q, wu_edge, n_edges);
    check(wu_edge == 0 && n_edges == 10, $sformatf("timeout 10 cuts the packet (%0d, %0d)", wu_edge, n_edges));

    // 4. thresholds: thr = 16 - k - 1 accepts k errors, rejects k + 1
    for (int k = 0; k <= 2; k++) begin
      logic [15:0] bad;
      program_cfg(CW, 4'(15 - k), 6'd63);
      bad = CW;
      for (int e = 0; e < k; e++) bad[3 * e + 1] ^= 1'b1;
      packet(q, bad, 2'b00);
      send(q, wu_edge, n_edges);
      check(wu_edge == 19, $sformatf("threshold %0d/16 accepts %0d errors", 16 - k, k));
      bad[14] ^= 1'b1;
      packet(q, bad, 2'b00);
      send(q, wu_edge, n_edges);
      check(wu_edge == 0 && n_edges == 63, $sformatf("threshold %0d/16 rejects %0d errors", 16 - k, k + 1));
    end

    // 5. SFD 01 followed by the codeword: correlator never enabled at the
    //    right place, so no wake-up at edge 19
    program_cfg(CW, 4'd15, 6'd63);
    packet(q, CW, 2'b01);
    send(q, wu_edge, n_edges);
    check(wu_edge != 19, "bad SFD: no wake-up at the codeword position");

    // 6. calibration request raises Enable only
    start_calib = 1; #10;
    check(enable && !phase2, "start_calib raises Enable without Phase 2");
    end_calib = 1; #10;
    check(!enable, "end_calib drops Enable");
    start_calib = 0; end_calib = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
