// Full-size testbench: one complete measurement of the sensor array with
// every parameter at its default (16 sensors, 2^12 settle cycles, a 2^16
// cycle window at 100 MHz, 16-bit counts, 115200 baud).
//
// The sixteen rings are given die temperatures from 40 C to 100 C in 4 C
// steps. After one measurement the 37-byte frame is decoded by a behavioural
// UART receiver and checked: header, system-monitor codes, and every count
// against window time / (2 * ring period) computed here from the stage
// delays (within +-2). It also checks the run-to-load latency, that the
// counts fall monotonically with temperature, and that the frame takes 37
// byte times.
`timescale 1ns / 1ps
module tb_ro_temp_sensor_system_full;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int NS = 16, TM = 65536, SETTLE = 4096, CPB = 100_000_000 / 115_200;
  localparam int NBYTES = 5 + 2 * NS;

  logic clk = 1'b0;
  logic rst = 1'b1, run = 1'b0;
  logic [9:0] sysmon_temp = 10'h2C3, sysmon_vccint = 10'h154;
  logic uart_txd, busy, window, frame_done;

  always #5 clk = ~clk;

  ro_temp_sensor_system dut (
    .clk(clk), .rst(rst), .run(run), .sysmon_temp(sysmon_temp), .sysmon_vccint(sysmon_vccint),
    .uart_txd(uart_txd), .busy(busy), .window(window), .frame_done(frame_done)
  );

  uart_rx_model #(.CLKS_PER_BIT(CPB)) rx (.clk(clk), .rxd(uart_txd));

  for (genvar g = 0; g < NS; g++) begin : g_env
    initial dut.g_sensor[g].u_sensor.u_ro.temp_mc = 40_000 + 4_000 * g;
  end

  function automatic real expected_count(int t_mc);
    real period_ns;
    period_ns = 2.0 * (2.226 + 23 * 0.256 + 24 * 0.100) * (1.0 + 767.0e-6 * (t_mc - 46000) / 1000.0);
    return TM * 10.0 / (2.0 * period_ns);
  endfunction

  int cyc = 0, run_cyc = 0, load_cyc = 0, done_cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.load) load_cyc = cyc;
    if (frame_done) done_cyc = cyc;
  end

  initial begin
    int s [NS];
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    load_cyc = 0;
    done_cyc = 0;
    #1 run = 1'b1;
    run_cyc = cyc;
    wait (load_cyc != 0);
    #1 run = 1'b0;
    check(load_cyc - run_cyc == 2 + SETTLE + TM + 4, $sformatf("run to load took %0d cycles", load_cyc - run_cyc));
    wait (done_cyc != 0);
    check(done_cyc - load_cyc > NBYTES * 10 * CPB && done_cyc - load_cyc < (NBYTES + 1) * 10 * CPB,
          $sformatf("frame took %0d cycles", done_cyc - load_cyc));
    repeat (CPB) @(posedge clk);
    check(rx.n_bytes == NBYTES && rx.n_errors == 0,
          $sformatf("%0d bytes, %0d framing errors", rx.n_bytes, rx.n_errors));
    if (rx.n_bytes == NBYTES) begin
      check(rx.bytes[0] == 8'hA5, "header");
      check({rx.bytes[1], rx.bytes[2]} == 16'(sysmon_temp), "temperature code");
      check({rx.bytes[3], rx.bytes[4]} == 16'(sysmon_vccint), "voltage code");
      for (int i = 0; i < NS; i++) begin
        real e;
        s[i] = {rx.bytes[5 + 2 * i], rx.bytes[6 + 2 * i]};
        e = expected_count(40_000 + 4_000 * i);
        check(real'(s[i]) > e - 2.0 && real'(s[i]) < e + 2.0,
              $sformatf("sensor %0d: count %0d, expected %0.1f", i, s[i], e));
        if (i > 0) check(s[i] < s[i - 1], $sformatf("sensor %0d hotter but not lower", i));
      end
      $display("counts: sensor 0 (40 C) = %0d, sensor 15 (100 C) = %0d", s[0], s[NS - 1]);
    end
    check(!busy, "a second measurement started with run low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
