// Self-checking testbench for the ring-oscillator model.
//
// Two rings are simulated: the default one (23 inverters, 24 latches) and an
// all-inverter ring of 47 stages. The expected period is computed here from
// the stage delays: twice the sum of gate, inverter and latch delays, scaled
// by (1 + 767 ppm/C above 46 C - 600 ppm/mV above 1000 mV). The bench checks
// that a disabled ring is quiet, that the period matches at 46 C, at 100 C
// and at a raised core voltage, that a hotter ring is slower, and that the
// ring stops soon after enable falls.
`timescale 1ns / 1ps
module tb_ring_oscillator;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic en_a = 1'b0, en_b = 1'b0;
  logic q_a, q_b;

  ring_oscillator dut_a (.enable(en_a), .q(q_a));
  ring_oscillator #(.N_INV(47), .N_LATCH(0)) dut_b (.enable(en_b), .q(q_b));

  // Expected period in ns.
  function automatic real exp_period(int n_inv, int n_latch, real temp_c, real vcc_mv);
    real base_ps;
    base_ps = 2226.0 + n_inv * 256.0 + n_latch * 100.0;
    return 2.0 * base_ps * (1.0 + 767.0e-6 * (temp_c - 46.0) - 600.0e-6 * (vcc_mv - 1000.0)) / 1000.0;
  endfunction

  int edges_a = 0, edges_b = 0, edges_stop;
  realtime last_a, period_a, last_b, period_b;
  always @(posedge q_a) begin edges_a++; period_a = $realtime - last_a; last_a = $realtime; end
  always @(posedge q_b) begin edges_b++; period_b = $realtime - last_b; last_b = $realtime; end

  // Measure the steady period of ring a after it has run a while.
  task automatic measure(input string what, input real expected);
    repeat (20) @(posedge q_a);
    check(period_a > expected - 0.002 && period_a < expected + 0.002,
          $sformatf("%s: period %0.4f ns, expected %0.4f ns", what, period_a, expected));
  endtask

  initial begin
    // Disabled: no oscillation (the model settles to its rest state at 0).
    #1;
    edges_a = 0; edges_b = 0;
    #500;
    check(edges_a == 0 && edges_b == 0, "disabled ring oscillates");

    en_a = 1'b1; en_b = 1'b1;
    measure("23 inv + 24 latch at 46 C", exp_period(23, 24, 46.0, 1000.0));
    repeat (20) @(posedge q_b);
    check(period_b > exp_period(47, 0, 46.0, 1000.0) - 0.002 &&
          period_b < exp_period(47, 0, 46.0, 1000.0) + 0.002,
          $sformatf("47 inv: period %0.4f ns, expected %0.4f ns", period_b, exp_period(47, 0, 46.0, 1000.0)));

    dut_a.temp_mc = 100_000;
    repeat (3) @(posedge q_a);
    measure("23 inv + 24 latch at 100 C", exp_period(23, 24, 100.0, 1000.0));
    check(period_a > exp_period(23, 24, 46.0, 1000.0) + 0.5, "hotter ring is not slower");

    dut_a.temp_mc = 46_000;
    dut_a.vcc_mv  = 1_010;
    repeat (3) @(posedge q_a);
    measure("23 inv + 24 latch at 1010 mV", exp_period(23, 24, 46.0, 1010.0));
    dut_a.vcc_mv  = 1_000;

    // Stop: no rising edge later than one period after enable falls.
    en_a = 1'b0;
    #(exp_period(23, 24, 46.0, 1000.0));
    edges_stop = edges_a;
    #1000;
    check(edges_a == edges_stop, "ring keeps running after enable fell");
    check(q_a == 1'b1, "stopped ring does not rest at 1");

    // Restart.
    en_a = 1'b1;
    #200;
    check(edges_a > 0 && $realtime - last_a < 30.0, "ring does not restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
