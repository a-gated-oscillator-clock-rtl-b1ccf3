// End-to-end testbench of the wake-up receiver baseband at its default
// sizes. The testbench plays the node MCU (programs the configuration word,
// drives the 1 kHz Clock_ref and start_calib), the external current source
// I_bias and an ideal analog front-end (Din = the transmitted OOK bits at
// 1 kbps). It
//   1. calibrates the oscillator from initial errors of -20 % .. +20 %
//      (I_bias sweep) and, after each calibration, sends the 19-bit packet
//      100 + codeword 1011101101010011 and expects one wake-up, raised on
//      the 19th recovered clock edge of Phase 2;
//   2. sends a wrong codeword (timeout after 63 edges, no wake-up), a lone
//      noise pulse on Din (timeout, no wake-up), codewords with 1 and 2 bit
//      errors at thresholds 15/16 and 14/16;
//   3. sends 63-bit packets containing 20 consecutive ones and checks, as
//      the MCU did in the measurements, that DDin sampled on the recovered
//      clock gives back all 63 bits;
//   4. counts each mechanism (Phase-2 entry, SFD detection, wake-up,
//      timeout, UP and DN pulses, calibration ended by the LSB and by the
//      timeout) and fails if one never happened.
module tb_wurx_baseband;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  localparam realtime T_B = 1.0ms;
  localparam logic [15:0] CW = 16'b1011101101010011;

  int checks = 0, failures = 0;
  logic rst_n = 1, din = 0, cfg_clk = 0, cfg_en = 0, cfg_data = 0;
  logic clock_ref = 0, start_calib = 0;
  real  i_bias_na = 2.0;
  logic wake_up, end_calib, clock, ddin, phase2, en_corr, enable, cal_timed_out;
  logic gate, fd_up, fd_dn;
  logic [DCCS_BITS-1:0] cal_code;

  wurx_baseband dut (
    .rst_n, .din, .cfg_clk, .cfg_en, .cfg_data, .clock_ref, .start_calib, .i_bias_na,
    .wake_up, .end_calib, .clock, .ddin, .phase2, .en_corr, .enable, .cal_code,
    .cal_timed_out, .gate, .fd_up, .fd_dn
  );

  // mechanism counters
  int n_phase2 = 0, n_sfd = 0, n_wake = 0, n_timeout = 0, n_up = 0, n_dn = 0;
  int n_cal_lsb = 0, n_cal_to = 0;
  int edges_in_phase2 = 0, wake_edge = 0;
  bit samples[$];

  always @(posedge phase2)  begin n_phase2++; edges_in_phase2 = 0; wake_edge = 0; samples.delete(); end
  always @(posedge en_corr) n_sfd++;
  always @(posedge wake_up) n_wake++;
  always @(posedge clock) if (phase2) begin
    edges_in_phase2++;
    samples.push_back(ddin);
    #1 if (wake_up && wake_edge == 0) wake_edge = edges_in_phase2;
  end
  always @(posedge clock_ref) begin
    if (fd_up) n_up++;
    if (fd_dn) n_dn++;
  end

  always #0.5ms clock_ref = ~clock_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic program_cfg(input logic [15:0] cw, input logic [3:0] thr, input logic [5:0] tmo);
    logic [CFG_W-1:0] w;
    w = {cw, thr, tmo};
    for (int i = CFG_W - 1; i >= 0; i--) begin
      cfg_data = w[i]; cfg_en = 1;
      #1us cfg_clk = 1; #1us cfg_clk = 0;
    end
    cfg_en = 0;
  endtask

  task automatic calibrate(input real e0, output real alpha);
    int cycles;
    i_bias_na = 2.0 * (1.0 + e0);
    @(negedge clock_ref) start_calib = 1;
    cycles = 0;
    while (!end_calib && cycles < 3000) begin @(negedge clock_ref); cycles++; end
    check(end_calib && cycles <= 5 * 256, $sformatf("calibration from %f ended in %0d cycles", e0, cycles));
    if (cal_timed_out) n_cal_to++; else n_cal_lsb++;
    @(negedge clock_ref) start_calib = 0;
    // free-running frequency error implied by the current-source law
    alpha = (1.0 + e0) * (44.0 + real'(cal_code)) / 60.0 - 1.0;
  endtask

  // Transmits bits on Din and waits until the receiver is back in Phase 1.
  task automatic transmit(input bit bits[$]);
    foreach (bits[i]) begin din = bits[i]; #(T_B); end
    din = 0;
    wait (!phase2);
    #(5 * T_B);
  endtask

  function automatic void wake_packet(output bit q[$], input logic [15:0] cw);
    q.delete();
    q.push_back(1); q.push_back(0); q.push_back(0);
    for (int k = 15; k >= 0; k--) q.push_back(cw[k]);
  endfunction

  initial begin
    #120s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q[$];
    real alpha, worst;
    int w0;
    #0.5 rst_n = 0;
    #1.2ms rst_n = 1;
    program_cfg(CW, 4'd15, 6'd63);
    check(!enable && !phase2 && !wake_up, "Phase 1 after reset");

    // 1. calibration sweep, each followed by a wake-up packet
    worst = 0.0;
    for (int k = -5; k <= 5; k++) begin
      calibrate(0.04 * real'(k), alpha);
      if ((alpha < 0 ? -alpha : alpha) > worst) worst = (alpha < 0 ? -alpha : alpha);
      check((alpha < 0 ? -alpha : alpha) < 1.0 / 60.0 * 1.2,
            $sformatf("residual error %f within one LSB", alpha));
      w0 = n_wake;
      wake_packet(q, CW);
      transmit(q);
      check(n_wake == w0 + 1 && wake_edge == 19,
            $sformatf("alpha %f: wake-up on edge %0d (%0d pulses)", alpha, wake_edge, n_wake - w0));
      check(edges_in_phase2 == 20, $sformatf("Phase 2 closed on edge 20 (%0d)", edges_in_phase2));
    end
    $display("worst residual frequency error after calibration: %f", worst);

    // 2. wrong codeword, noise pulse, bit errors against thresholds
    w0 = n_wake;
    wake_packet(q, CW ^ 16'h0100);
    transmit(q);
    check(n_wake == w0 && edges_in_phase2 == 63, $sformatf("1 error at 16/16: timeout after %0d edges", edges_in_phase2));
    n_timeout += (edges_in_phase2 == 63);
    din = 1; #(0.3ms); din = 0;              // a short noise pulse
    wait (!phase2); #(5 * T_B);
    check(n_wake == w0 && edges_in_phase2 == 63, "noise pulse: timeout, no wake-up");
    n_timeout += (edges_in_phase2 == 63);
    program_cfg(CW, 4'd14, 6'd63);
    wake_packet(q, CW ^ 16'h0100);
    transmit(q);
    check(n_wake == w0 + 1, "1 error at 15/16: wake-up");
    wake_packet(q, CW ^ 16'h0101);
    transmit(q);
    check(n_wake == w0 + 1, "2 errors at 15/16: no wake-up");
    n_timeout += (edges_in_phase2 == 63);
    program_cfg(CW, 4'd13, 6'd63);
    transmit(q);
    check(n_wake == w0 + 2, "2 errors at 14/16: wake-up");

    // 3. 63-bit data packets with 20 consecutive ones, sampled on the
    //    recovered clock; the codeword is absent so Phase 2 lasts 63 edges
    program_cfg(CW, 4'd15, 6'd63);
    for (int p = 0; p < 4; p++) begin
      bit ok;
      int start;
      q.delete();
      q.push_back(1); q.push_back(0); q.push_back(0);
      start = 3 + $urandom_range(0, 38);
      for (int i = 3; i < 63; i++)
        q.push_back((i >= start && i < start + 20) ? 1'b1 : ((i == start - 1 || i == start + 20) ? 1'b0 : 1'($urandom_range(0, 1))));
      w0 = n_wake;
      transmit(q);
      ok = (samples.size() == 63);
      if (ok) foreach (q[i]) if (samples[i] != q[i]) ok = 0;
      check(ok, $sformatf("63-bit packet %0d received bit-exact (%0d samples)", p, samples.size()));
      n_timeout += (edges_in_phase2 == 63);
    end

    // 4. every mechanism happened
    check(n_phase2 > 0, "Phase-2 entries");
    check(n_sfd > 0, "SFD detections");
    check(n_wake > 0, "wake-ups");
    check(n_timeout > 0, "timeouts");
    check(n_up > 0, "UP pulses");
    check(n_dn > 0, "DN pulses");
    check(n_cal_lsb > 0, "calibrations ended by the LSB");
    check(n_cal_to > 0, "calibrations ended by the timeout");
    $display("phase2=%0d sfd=%0d wake=%0d timeout=%0d up=%0d dn=%0d cal_lsb=%0d cal_timeout=%0d",
             n_phase2, n_sfd, n_wake, n_timeout, n_up, n_dn, n_cal_lsb, n_cal_to);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
