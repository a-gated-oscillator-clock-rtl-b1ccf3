// Testbench of the successive-approximation logic. The testbench models the
// oscillator and the frequency detector in one line: the oscillator runs at
// f(code) = g * (44 + code) / 60 times the reference, and each reference
// cycle adds f(code) - 1 to a phase account; whenever the account passes +1
// (a clock edge too many) a DN pulse is given, past -1 an UP pulse. For a
// sweep of gains g (initial errors -20 % .. +20 %) the final code must be
// within one LSB of the best code, end_calib must rise within 5 x 256
// reference cycles and the code must be kept after start_calib falls. With a
// silent detector the calibration must end by timeout after 255 cycles.
module tb_sa_logic;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  int checks = 0, failures = 0;
  logic clk_ref = 0, rst_n = 1, start_calib = 0, up = 0, dn = 0;
  logic [DCCS_BITS-1:0] code;
  logic end_calib, timed_out;
  real g = 1.0, acc = 0.0;
  bit  silent = 0;

  sa_logic dut (.clk_ref, .rst_n, .start_calib, .up, .dn, .code, .end_calib, .timed_out);

  always #500 clk_ref = ~clk_ref;

  function automatic real rel(input int c);
    return g * (44.0 + real'(c)) / 60.0;
  endfunction

  // detector model, outputs change after the reference edge like the RTL
  always @(posedge clk_ref) begin
    acc = acc + rel(int'(code)) - 1.0;
    up <= 1'b0; dn <= 1'b0;
    if (!silent && acc >= 1.0)  begin acc = acc - 1.0; dn <= 1'b1; end
    if (!silent && acc <= -1.0) begin acc = acc + 1.0; up <= 1'b1; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #0.5 rst_n = 0;
    #1200 rst_n = 1;
    check(code == 5'd16, "mid-scale code after reset");
    for (int k = -10; k <= 10; k++) begin
      int cycles, best;
      real e_best, e_fin;
      g = 1.0 + 0.02 * real'(k);
      acc = 0.0;
      @(negedge clk_ref) start_calib = 1;
      cycles = 0;
      while (!end_calib && cycles < 2000) begin @(negedge clk_ref); cycles++; end
      check(end_calib, $sformatf("g=%f: end_calib", g));
      check(cycles <= 5 * 256, $sformatf("g=%f: %0d cycles", g, cycles));
      best = 0; e_best = 1.0e9;
      for (int c = 0; c < 32; c++)
        if ((rel(c) - 1.0) ** 2 < e_best) begin e_best = (rel(c) - 1.0) ** 2; best = c; end
      e_fin = rel(int'(code)) - 1.0;
      check((e_fin < 0.0 ? -e_fin : e_fin) <= g / 60.0 + 1.0e-9,
            $sformatf("g=%f: code %0d (best %0d), error %f", g, code, best, e_fin));
      @(negedge clk_ref) start_calib = 0;
      @(negedge clk_ref);
      check(!end_calib, "end_calib falls with start_calib");
      check(rel(int'(code)) - 1.0 == e_fin, "code kept after calibration");
    end
    // silent detector: end by timeout
    silent = 1;
    @(negedge clk_ref) start_calib = 1;
    begin
      int cycles = 0;
      while (!end_calib && cycles < 2000) begin @(negedge clk_ref); cycles++; end
      check(timed_out && cycles >= 255 && cycles <= 257, $sformatf("timeout after %0d cycles", cycles));
      check(code == 5'd16, "timeout keeps the trial code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
