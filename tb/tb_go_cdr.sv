// Testbench of the GO-CDR: bit streams at 1 kbps on Din, the oscillator
// biased for a free-running error alpha, DDin sampled on every rising Clock
// edge and compared with the bits sent. With |alpha| = 0.5 % every 63-bit
// packet must be received exactly: random data, all ones, alternating bits
// and runs of 20 ones. With |alpha| = 1 % the number of samples taken in a
// long run of equal bits must match the count worked out from the timing
// (first edge tau_d + T_ck/2 after the Din transition, tau_d = 163 us
// scaled with the bias for the rising edge that opens a run of ones, the next transition
// resets the oscillator): a fast clock samples a bit twice once the run is
// longer than about 2 / (3 alpha), a slow one misses one beyond 1 / (3 alpha). Each Clock rising edge must come T_ck/2
// after the end of the Gate pulse that precedes it, when there is one.
module tb_go_cdr;
  timeunit 1ns; timeprecision 1ps;

  localparam realtime T_B = 1.0ms;

  int checks = 0, failures = 0;
  logic din = 0, ddin, gate, clock;
  real bias_na = 2.0;
  bit samples[$];
  bit sampling = 0;
  realtime t_gate_rise = 0.0;
  int phase_errs = 0, phase_checked = 0;

  go_cdr dut (.din, .bias_na, .ddin, .gate, .clock);

  always @(posedge clock) if (sampling) samples.push_back(ddin);

  // phase alignment: an edge within T_ck of a Gate rise must sit at T_ck/2
  always @(posedge gate) t_gate_rise = $realtime;
  always @(posedge clock) begin
    real tck, dt;
    tck = 1.0e6 * 2.0 / bias_na;
    dt  = $realtime - t_gate_rise;
    if (sampling && dt < tck) begin
      phase_checked++;
      if (dt - tck / 2.0 > 1.0 || tck / 2.0 - dt > 1.0) phase_errs++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Sends bits (first must be 1), returns the number of samples taken
  // before Din stops changing plus the sample of the last bit.
  task automatic send(input bit bits[$], input real alpha, output bit ok, output int n_samp);
    bias_na = 2.0 * (1.0 + alpha);
    din = 0; #5ms;
    samples.delete();
    sampling = 1;
    foreach (bits[i]) begin din = bits[i]; #(T_B); end
    din = ~bits[bits.size() - 1];     // a final transition closes the last run
    #(T_B / 4);
    sampling = 0;
    n_samp = samples.size();
    ok = (samples.size() == bits.size());
    if (ok) foreach (bits[i]) if (samples[i] != bits[i]) ok = 0;
    din = 0; #5ms;
  endtask

  function automatic void run_packet(output bit q[$], input int run_len, input int total);
    q.delete();
    q.push_back(1'b1);
    for (int i = 1; i < total; i++) q.push_back((i < run_len) ? 1'b1 : 1'(i % 2));
  endfunction

  // expected samples in a run of run_len bits, worked out from the timing
  function automatic int expected_samples(input real alpha, input int run_len);
    real tck, tau;
    int k;
    tck = 1.0e6 / (1.0 + alpha);
    tau = tck * 0.163;             // runs of ones start on a rising edge: 163 us at 1 kHz
    k = 0;
    while (tau + (real'(k) + 0.5) * tck < real'(run_len) * 1.0e6) k++;
    return k;
  endfunction

  task automatic check_run(input real alpha, input int run_len);
    bit q[$];
    bit ok;
    int n, want;
    run_packet(q, run_len, run_len + 5);
    send(q, alpha, ok, n);
    want = expected_samples(alpha, run_len) + 5;
    check(n == want && (ok == (want == run_len + 5)),
          $sformatf("alpha %f run %0d: %0d samples, want %0d", alpha, run_len, n, want));
  endtask

  initial begin
    #2s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q[$];
    bit ok;
    int n;
    real alphas[] = '{0.005, -0.005};
    foreach (alphas[a]) begin
      // random 63-bit packets
      repeat (4) begin
        q.delete(); q.push_back(1'b1);
        for (int i = 1; i < 63; i++) q.push_back(1'($urandom_range(0, 1)));
        send(q, alphas[a], ok, n);
        check(ok, $sformatf("alpha %f random packet (%0d samples)", alphas[a], n));
      end
      run_packet(q, 63, 63); send(q, alphas[a], ok, n);
      check(ok, $sformatf("alpha %f all ones (%0d samples)", alphas[a], n));
      run_packet(q, 1, 63); send(q, alphas[a], ok, n);
      check(ok, $sformatf("alpha %f alternating", alphas[a]));
      run_packet(q, 20, 63); send(q, alphas[a], ok, n);
      check(ok, $sformatf("alpha %f 20 ones", alphas[a]));
    end
    // 1 %: the exact count of samples in a run of N bits is the number of
    // k >= 0 with tau_d + (k + 1/2) T_ck < N T_b, tau_d = 0.163 T_ck (rising)
    check_run(0.01, 60);   // 60 samples: received
    check_run(0.01, 70);   // 71 samples: one bit sampled twice
    check_run(-0.01, 30);  // 30 samples: received
    check_run(-0.01, 40);  // 39 samples: one bit missed
    check(phase_checked > 100 && phase_errs == 0,
          $sformatf("first edge T_ck/2 after Gate: %0d checked, %0d off", phase_checked, phase_errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
