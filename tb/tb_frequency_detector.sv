// Testbench of the frequency detector: a 1 us reference and a clock whose
// period differs by a set fraction. Over 2000 reference cycles the number
// of UP (clock slower) or DN (clock faster) pulses must equal the number of
// cycle slips, 2000 * |1 - T_ref / T_ck|, within two; the other output must
// stay silent. Equal periods give no pulse at all.
module tb_frequency_detector;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, clk_ref = 0, rst_n = 1, up, dn;
  real t_ck = 1000.0;
  int n_up, n_dn;

  frequency_detector dut (.clk, .clk_ref, .rst_n, .up, .dn);

  always #500 clk_ref = ~clk_ref;
  always #(t_ck / 2.0) clk = ~clk;

  always @(posedge clk_ref) begin
    if (up) n_up++;
    if (dn) n_dn++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ratios[] = '{1.10, 1.02, 1.005, 0.995, 0.98, 0.90, 0.75, 1.0};
    #0.5 rst_n = 0;
    #1.3 rst_n = 1;
    foreach (ratios[k]) begin
      real slips;
      t_ck = 1000.0 * ratios[k];
      repeat (20) @(posedge clk_ref);     // let the synchronizer settle
      n_up = 0; n_dn = 0;
      repeat (2000) @(posedge clk_ref);
      slips = 2000.0 * ((ratios[k] > 1.0) ? (1.0 - 1.0 / ratios[k]) : (1.0 / ratios[k] - 1.0));
      if (ratios[k] > 1.0) begin
        check(n_dn == 0, $sformatf("ratio %f: no DN (%0d)", ratios[k], n_dn));
        check(n_up >= int'(slips) - 2 && n_up <= int'(slips) + 2,
              $sformatf("ratio %f: %0d UP, expected %f", ratios[k], n_up, slips));
      end else if (ratios[k] < 1.0) begin
        check(n_up == 0, $sformatf("ratio %f: no UP (%0d)", ratios[k], n_up));
        check(n_dn >= int'(slips) - 2 && n_dn <= int'(slips) + 2,
              $sformatf("ratio %f: %0d DN, expected %f", ratios[k], n_dn, slips));
      end else begin
        check(n_up == 0 && n_dn == 0, $sformatf("equal frequency: %0d UP %0d DN", n_up, n_dn));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
