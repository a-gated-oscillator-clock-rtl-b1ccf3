// Testbench of the sequential unit, driven directly: a Din rising edge opens
// Phase 2 without any clock; the first clock edge takes the start bit, two
// zeros of DDin then raise en_corr (a 1 in between restarts the count); a
// registered wake-up, or time_out without a coincident hit, closes Phase 2
// on that edge; a hit coincident with time_out delays the close by one edge;
// Din edges inside Phase 2 are ignored; start_calib raises Enable only.
module tb_sequential_unit;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, din = 0, ddin = 0, wake_up = 0, hit = 0, time_out = 0;
  logic start_calib = 0, end_calib = 0;
  logic enable, phase2, en_corr, run;

  sequential_unit dut (.clk, .rst_n, .din, .ddin, .wake_up, .hit, .time_out,
                       .start_calib, .end_calib, .enable, .phase2, .en_corr, .run);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic edge_with(input bit d);
    ddin = d;
    #5 clk = 1; #5 clk = 0; #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #0.5 rst_n = 0;
    #3 rst_n = 1; #10;
    check(!phase2 && !enable && !en_corr && !run, "idle after reset");
    din = 1; #1;
    check(phase2 && enable && run, "Din rising edge opens Phase 2");
    edge_with(1);                        // start bit
    check(!en_corr, "no en_corr after start bit");
    edge_with(0);
    check(!en_corr, "one zero is not an SFD");
    edge_with(1);                        // breaks the zero run
    edge_with(0);
    check(!en_corr, "zero count restarted");
    din = 0; #5 din = 1; #1;             // Din edges in Phase 2 are ignored
    check(phase2, "Din edge inside Phase 2 keeps Phase 2");
    edge_with(0);
    check(en_corr, "two zeros raise en_corr");
    edge_with(1);
    check(en_corr && phase2, "en_corr stays on");
    wake_up = 1; #1;
    check(!run && !en_corr, "stop condition drops run and en_corr before the edge");
    edge_with(1);
    wake_up = 0; #1;
    check(!phase2 && !enable, "wake-up closes Phase 2");

    // timeout without a hit
    din = 0; #5 din = 1; #1;
    check(phase2, "second packet opens Phase 2");
    edge_with(1); edge_with(0); edge_with(0);
    check(en_corr, "SFD found again");
    time_out = 1; hit = 1; #1;
    check(run, "hit coincident with time_out keeps running");
    edge_with(1);
    hit = 0; #1;
    check(phase2 && !run, "time_out without hit stops");
    edge_with(1);
    time_out = 0; #1;
    check(!phase2, "timeout closes Phase 2");

    // calibration enable
    din = 0;
    start_calib = 1; #1;
    check(enable && !phase2, "start_calib raises Enable");
    end_calib = 1; #1;
    check(!enable, "end_calib drops Enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
