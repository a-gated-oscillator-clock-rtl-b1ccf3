// Testbench of the gated-oscillator model: with Gate high the first rising
// edge must come T_ck/2 after Gate rises and the period must be
// T_ck = 1 ms * (2 nA / bias); Gate low must force Clock low at once and a
// new Gate pulse must restart the phase; no bias current means no clock.
module tb_gated_oscillator;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic gate = 0, clock;
  real bias_na = 0.0;
  realtime t_rise[$];

  gated_oscillator dut (.gate, .bias_na, .clock);

  always @(posedge clock) t_rise.push_back($realtime);

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
    realtime t0;
    gate = 1; #2ms;
    check(t_rise.size() == 0 && clock == 0, "no bias: no clock");
    // bias on at nominal 2 nA: T = 1 ms
    bias_na = 2.0;
    gate = 0; #10us;
    t_rise.delete();
    t0 = $realtime; gate = 1;
    #5.2ms;
    check(t_rise.size() == 5, $sformatf("5 edges in 5.2 ms (%0d)", t_rise.size()));
    check(near(t_rise[0] - t0, 0.5e6, 1.0), $sformatf("first edge at T/2: %f", t_rise[0] - t0));
    for (int i = 1; i < t_rise.size(); i++)
      check(near(t_rise[i] - t_rise[i-1], 1.0e6, 1.0), "period 1 ms");
    // Gate low forces the reset state, a new pulse restarts the phase
    #0.1ms; gate = 0; #1;
    check(clock == 0, "Gate low holds Clock low");
    #100us; t_rise.delete(); t0 = $realtime; gate = 1;
    #0.7ms;
    check(t_rise.size() == 1 && near(t_rise[0] - t0, 0.5e6, 1.0), "phase restarted by Gate");
    // a faster bias: 2.2 nA gives T = 1/1.1 ms
    bias_na = 2.2;
    gate = 0; #10us; t_rise.delete(); t0 = $realtime; gate = 1;
    #3ms;
    check(near(t_rise[0] - t0, 0.5e6 / 1.1, 1.0), "first edge scales with bias");
    check(near(t_rise[1] - t_rise[0], 1.0e6 / 1.1, 1.0), "period scales with bias");
    // bias off stops the clock
    bias_na = 0.0; t_rise.delete(); #3ms;
    check(t_rise.size() == 0 && clock == 0, "bias off stops the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
