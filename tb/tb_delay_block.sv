// Testbench of the delay-block model: a rising Din edge must reach DDin
// after 163 us and a falling one after 146 us at the nominal 2 nA, both
// scaled by 2 nA / bias (148.2 / 132.7 us at 2.2 nA); a zero bias current
// must fall back to the nominal delays; a Din pulse of 5 us, shorter than
// the difference of the delays, must still leave DDin at the final level.
module tb_delay_block;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic din = 0, ddin;
  real bias_na = 2.0;
  realtime t_in, t_out;

  delay_block dut (.din, .bias_na, .ddin);

  always @(posedge ddin or negedge ddin) t_out = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real biases[] = '{2.0, 2.2, 1.8, 0.0};
    #1us;
    foreach (biases[k]) begin
      real tau;
      bias_na = biases[k];
      for (int n = 0; n < 4; n++) begin
        tau = (din ? 146.0e3 : 163.0e3) * 2.0 / ((biases[k] > 0.0) ? biases[k] : 2.0);
        t_in = $realtime; din = ~din;
        #(tau - 1.0);
        check(ddin != din, "DDin not yet changed");
        #2;
        check(ddin == din && near(t_out - t_in, tau, 1.0),
              $sformatf("bias %f: delay %f want %f", biases[k], t_out - t_in, tau));
        #1ms;
      end
    end
    // glitch: up, down 5 us later; DDin must end low and stay low
    bias_na = 2.0;
    din = 1; #5us; din = 0;
    #200us;
    check(ddin == 1'b0, "DDin low after a 5 us pulse");
    #1ms;
    check(ddin == 1'b0, "DDin still low after a 5 us pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
