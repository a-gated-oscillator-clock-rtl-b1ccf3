// Testbench of the bias and calibration circuit in a loop with the GO-CDR
// model (Din held low, so the oscillator free-runs whenever it is biased).
// The testbench plays the MCU (1 kHz Clock_ref, start_calib) and the
// control logic (enable = start_calib and not end_calib). I_bias is swept to
// give initial frequency errors from -20 % to +20 % at the mid-scale code;
// after each calibration the clock period is measured over 20 periods and
// the error must be within one current-source LSB (1/60 of the current),
// and the calibration must end within 5 x 256 reference cycles.
module tb_bias_calibration;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  int checks = 0, failures = 0;
  logic clock_ref = 0, rst_n = 1, start_calib = 0, measure = 0;
  logic enable, end_calib, cal_timed_out, up, dn;
  logic [DCCS_BITS-1:0] code;
  real i_bias_na = 2.0, bias_na;
  logic ddin, gate, clock;
  int n_up = 0, n_dn = 0, n_timeout = 0, n_lsb = 0;
  real worst = 0.0;

  assign enable = (start_calib && !end_calib) || measure;

  bias_calibration dut (.clock, .clock_ref, .rst_n, .start_calib, .enable, .i_bias_na,
                        .bias_na, .end_calib, .cal_timed_out, .code, .up, .dn);
  go_cdr u_cdr (.din(1'b0), .bias_na, .ddin, .gate, .clock);

  always #0.5ms clock_ref = ~clock_ref;
  always @(posedge clock_ref) begin
    if (up) n_up++;
    if (dn) n_dn++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #60s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #0.5 rst_n = 0;
    #1.2ms rst_n = 1;
    for (int k = -5; k <= 5; k++) begin
      real e0, err;
      realtime t0;
      int cycles;
      e0 = 0.04 * real'(k);
      i_bias_na = 2.0 * (1.0 + e0);
      @(negedge clock_ref) start_calib = 1;
      cycles = 0;
      while (!end_calib && cycles < 3000) begin @(negedge clock_ref); cycles++; end
      check(end_calib && cycles <= 5 * 256, $sformatf("e0 %f: ended after %0d cycles", e0, cycles));
      if (cal_timed_out) n_timeout++; else n_lsb++;
      // measure the calibrated free-running frequency
      measure = 1;
      @(posedge clock);
      t0 = $realtime;
      repeat (20) @(posedge clock);
      err = 20.0e6 / ($realtime - t0) - 1.0;  // f / 1 kHz - 1, time in ns
      measure = 0;
      if ((err < 0 ? -err : err) > worst) worst = (err < 0 ? -err : err);
      check((err < 0 ? -err : err) <= (1.0 + e0) / 60.0 + 1.0e-6,
            $sformatf("e0 %f: code %0d, error after calibration %f", e0, code, err));
      @(negedge clock_ref) start_calib = 0;
      @(negedge clock_ref);
    end
    check(n_up > 0 && n_dn > 0, $sformatf("detector gave %0d UP and %0d DN", n_up, n_dn));
    $display("calibrations ended by LSB %0d, by timeout %0d, worst error %f", n_lsb, n_timeout, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
