// Workload testbench of the wake-up receiver baseband at its default sizes,
// reproducing the packet campaigns used to characterize the receiver:
//   A. 10,000 wake-up packets (100 + 16-bit codeword, 19 bits) sent 100 ms
//      apart, every Din edge shifted by a random -30..+30 us (3 % of a bit)
//      to stand for front-end timing noise, correlator at 14/16, after a
//      calibration from a +12 % initial error: every packet must wake the
//      receiver exactly once, and the 100 ms gaps must give no wake-up;
//   B. the equal-bit sweep: 63-bit packets holding one run of N equal bits
//      (ones or zeros), N = 1 .. 62, with the oscillator set to +0.5 % and
//      -0.5 % error (uncalibrated, I_bias chosen for it); DDin sampled on the
//      recovered clock must give back all 63 bits every time;
//   C. 3174 63-bit packets 100 ms apart, each holding 20 consecutive ones at
//      a random place and random bits elsewhere, edges displaced by up to
//      +/-20 us, on the calibration of A: all 63 bits of every packet must be
//      recovered (the 63/63 case).
// Packet counts, spacing and packet contents follow the measurement campaign
// described for the receiver; the edge jitter and the +12 % starting error
// are choices here.
module tb_workloads;
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

  int n_wake = 0;
  bit samples[$];
  always @(posedge phase2) samples.delete();
  always @(posedge clock) if (phase2) samples.push_back(ddin);
  always @(posedge wake_up) n_wake++;
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

  // Sends bits with each transition displaced by up to +/-jitter_us.
  task automatic transmit(input bit bits[$], input int jitter_us);
    realtime t_next;
    foreach (bits[i]) begin
      int j;
      j = (jitter_us > 0) ? $urandom_range(0, 2 * jitter_us) - jitter_us : 0;
      if (i == 0 || bits[i] != bits[i-1]) begin
        #(T_B / 2.0 + real'(j) * 1.0us);
        din = bits[i];
        #(T_B / 2.0 - real'(j) * 1.0us);
      end else #(T_B);
    end
    #(T_B / 2.0);
    din = 0;
  endtask

  initial begin
    #20000s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q[$];
    int missed = 0, extra = 0, bad_runs = 0, bad_pkts = 0;
    #0.5 rst_n = 0;
    #1.2ms rst_n = 1;

    // A. calibrate, then 10,000 packets
    i_bias_na = 2.0 * 1.12;
    @(negedge clock_ref) start_calib = 1;
    wait (end_calib);
    @(negedge clock_ref) start_calib = 0;
    program_cfg(CW, 4'd13, 6'd63);
    q.delete();
    q.push_back(1); q.push_back(0); q.push_back(0);
    for (int k = 15; k >= 0; k--) q.push_back(CW[k]);
    for (int p = 0; p < 10000; p++) begin
      int w0;
      w0 = n_wake;
      transmit(q, 30);
      wait (!phase2);
      if (n_wake != w0 + 1) begin
        if (n_wake == w0) missed++; else extra++;
      end
      #100ms;
    end
    check(missed == 0 && extra == 0,
          $sformatf("10000 packets: %0d missed, %0d extra wake-ups", missed, extra));

    // C. 3174 63-bit data packets, each with 20 consecutive ones at a random
    //    place and random bits elsewhere, 100 ms apart, same calibration
    $display("calibrated code %0d, error %f %%", cal_code,
             100.0 * (1.12 * (44.0 + real'(cal_code)) / 60.0 - 1.0));
    program_cfg(CW, 4'd15, 6'd63);
    for (int p = 0; p < 3174; p++) begin
      int start;
      bit ok;
      bit has_cw;
      // random data that happens to hold the codeword would end Phase 2 by
      // a wake-up, so such packets are drawn again
      do begin
        start = $urandom_range(2, 41);
        q.delete();
        q.push_back(1);
        for (int i = 1; i < 63; i++) begin
          if (i >= start && i < start + 20)      q.push_back(1);
          else if (i == start - 1 || i == start + 20) q.push_back(0);
          else                                   q.push_back(1'($urandom_range(0, 1)));
        end
        has_cw = 0;
        for (int i = 0; i + 16 <= 63; i++) begin
          logic [15:0] w;
          for (int k = 0; k < 16; k++) w[15-k] = q[i+k];
          if (w == CW) has_cw = 1;
        end
      end while (has_cw);
      transmit(q, 20);
      wait (!phase2);
      ok = (samples.size() == 63);
      if (ok) foreach (q[i]) if (samples[i] != q[i]) ok = 0;
      if (!ok) begin
        bad_pkts++;
        $display("packet %0d: run at %0d, %0d samples", p, start, samples.size());
        foreach (q[i]) $write("%0b", q[i]); $write("\n");
        foreach (samples[i]) $write("%0b", samples[i]); $write("\n");
      end
      #100ms;
    end
    check(bad_pkts == 0, $sformatf("3174 63-bit packets: %0d received wrong", bad_pkts));

    // B. equal-bit runs at +/-0.5 % (uncalibrated: mid-scale code, I_bias set)
    rst_n = 0; #1us; rst_n = 1;               // back to the mid-scale code
    program_cfg(CW, 4'd15, 6'd63);
    for (int s = 0; s < 2; s++) begin
      i_bias_na = 2.0 * ((s == 0) ? 1.005 : 0.995);
      for (int n = 1; n <= 62; n++) begin
        for (int v = 0; v < 2; v++) begin
          bit ok;
          int start;
          q.delete();
          q.push_back(1);
          start = 1 + ((n < 61) ? $urandom_range(0, 61 - n) : 0);
          for (int i = 1; i < 63; i++) begin
            if (i >= start && i < start + n) q.push_back(1'(v));
            else if (i == start - 1 && i > 0) q.push_back(1'(~v));
            else if (i == start + n)            q.push_back(1'(~v));
            else                                q.push_back(1'(i % 2));
          end
          q[0] = 1;
          transmit(q, 0);
          wait (!phase2);
          ok = (samples.size() == 63);
          if (ok) foreach (q[i]) if (samples[i] != q[i]) ok = 0;
          if (!ok) begin
            bad_runs++;
            $display("run %0d of %0b at %s: %0d samples", n, v, (s == 0) ? "+0.5%" : "-0.5%", samples.size());
          end
          #10ms;
        end
      end
    end
    check(bad_runs == 0, $sformatf("equal-bit sweep: %0d of 248 packets wrong", bad_runs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
