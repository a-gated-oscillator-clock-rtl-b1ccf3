// Testbench of the Phase-2 timeout counter: for several timeout values it
// runs the counter and checks that time_out is high exactly before the
// timeout_value-th rising edge of the run, that count follows the number of
// edges, and that dropping run clears it.
module tb_timeout_counter;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, run = 0, time_out;
  logic [TIMEOUT_W-1:0] timeout_value = '0, count;

  timeout_counter dut (.clk, .rst_n, .run, .timeout_value, .time_out, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(); #5 clk = 1; #5 clk = 0; endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals[] = '{1, 2, 5, 19, 62, 63};
    #0.5 rst_n = 0;
    #3 rst_n = 1;
    foreach (vals[k]) begin
      int edges_to_out;
      timeout_value = TIMEOUT_W'(vals[k]);
      run = 1;
      edges_to_out = 0;
      // edge number e (1-based) is the last one when time_out is high before it
      for (int e = 1; e <= vals[k]; e++) begin
        #1;
        check(time_out == (e == vals[k]), $sformatf("tv=%0d edge %0d time_out=%0b", vals[k], e, time_out));
        check(count == TIMEOUT_W'(e - 1), $sformatf("tv=%0d count %0d", vals[k], count));
        tick();
      end
      run = 0;
      tick();
      check(count == '0, "run low clears the count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
