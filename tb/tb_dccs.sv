// Testbench of the current-source model: every code with enable high must
// give i_bias * (44 + code) / 60, mid-scale must give i_bias, and enable low
// must switch the current off.
module tb_dccs;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  int checks = 0, failures = 0;
  logic enable = 0;
  logic [DCCS_BITS-1:0] code = '0;
  real i_bias_na = 2.0, bias_na;

  dccs dut (.enable, .code, .i_bias_na, .bias_na);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b) ** 2 < 1.0e-12;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    check(bias_na == 0.0, "disabled: no current");
    enable = 1;
    for (int c = 0; c < 32; c++) begin
      code = 5'(c); #1;
      check(near(bias_na, 2.0 * (44.0 + c) / 60.0), $sformatf("code %0d: %f nA", c, bias_na));
    end
    code = 5'd16; i_bias_na = 1.7; #1;
    check(near(bias_na, 1.7), "mid-scale equals I_bias");
    enable = 0; #1;
    check(bias_na == 0.0, "enable low: no current");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
