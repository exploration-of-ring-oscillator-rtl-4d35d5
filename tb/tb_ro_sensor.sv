// Self-checking testbench for one complete sensor (ring, capture, counter).
//
// Runs the measurement sequence by hand at a 100 MHz clock: enable, settle
// for 512 cycles, clear, count for a window, disable. The expected count is
// worked out here from the ring's stage delays: window time divided by two
// ring periods (the counter sees the ring halved), within +-2. Checks are
// made at 46 C and 100 C (the hotter count must be lower), for two window
// lengths, and that the count holds still once the ring is disabled.
`timescale 1ns / 1ps
module tb_ro_sensor;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic clk = 1'b0;
  logic enable = 1'b0, rst = 1'b0;
  logic [15:0] S;

  always #5 clk = ~clk;

  ro_sensor dut (.enable(enable), .clk(clk), .rst(rst), .S(S));

  // Ring period in ns for 23 inverters and 24 latches.
  function automatic real ring_period(real temp_c);
    return 2.0 * (2.226 + 23 * 0.256 + 24 * 0.100) * (1.0 + 767.0e-6 * (temp_c - 46.0));
  endfunction

  task automatic measure(input int window, input real temp_c, output int s);
    real expected;
    dut.u_ro.temp_mc = int'(temp_c * 1000.0);
    @(posedge clk); #1;
    enable = 1'b1;
    repeat (512) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    repeat (window - 1) @(posedge clk);
    #1 enable = 1'b0;
    repeat (6) @(posedge clk);
    #1;
    s = int'(S);
    expected = (window * 10.0) / (2.0 * ring_period(temp_c));
    check(real'(s) > expected - 2.0 && real'(s) < expected + 2.0,
          $sformatf("window %0d at %0.1f C: S=%0d, expected %0.1f", window, temp_c, s, expected));
    repeat (200) @(posedge clk);
    #1;
    check(int'(S) == s, "count changed after the ring was disabled");
  endtask

  int s_cold, s_hot, s_long;

  initial begin
    measure(4096, 46.0, s_cold);
    measure(4096, 100.0, s_hot);
    check(s_hot < s_cold, $sformatf("hot count %0d not below cold count %0d", s_hot, s_cold));
    measure(16384, 46.0, s_long);
    check(s_long > 3 * s_cold, "longer window does not give a larger count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
