// Testbench of the configuration shift register: shifts random 26-bit words
// in MSB first and checks the parallel output against the word, that cfg_en
// low holds the contents, and that reset clears them.
module tb_sipo_register;
  timeunit 1ns; timeprecision 1ps;
  import wurx_pkg::*;

  int checks = 0, failures = 0;
  logic cfg_clk = 0, rst_n = 1, cfg_en = 0, cfg_data = 0;
  logic [CFG_W-1:0] q;

  sipo_register dut (.cfg_clk, .rst_n, .cfg_en, .cfg_data, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic shift_word(input logic [CFG_W-1:0] w);
    for (int i = CFG_W - 1; i >= 0; i--) begin
      cfg_data = w[i]; cfg_en = 1;
      #5 cfg_clk = 1; #5 cfg_clk = 0;
    end
    cfg_en = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CFG_W-1:0] w;
    #0.5 rst_n = 0;
    #3 rst_n = 1;
    check(q == '0, "reset value");
    for (int n = 0; n < 20; n++) begin
      w = CFG_W'({$urandom, $urandom});
      shift_word(w);
      check(q == w, $sformatf("word %0d: got %h want %h", n, q, w));
      // clocks with cfg_en low keep the word
      cfg_data = ~cfg_data;
      repeat (3) begin #5 cfg_clk = 1; #5 cfg_clk = 0; end
      check(q == w, "hold with cfg_en low");
    end
    rst_n = 0; #1;
    check(q == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
