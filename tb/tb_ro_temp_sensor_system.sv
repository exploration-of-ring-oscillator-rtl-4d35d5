// End-to-end testbench of the sensor array at reduced size.
//
// Four sensors, a 64-cycle settle time, a 1024-cycle window and a 16-cycle
// UART bit keep the run short; everything else is the real design. Each
// ring is given its own die temperature (in the second measurement three rings
// are 15 C hotter and the fourth sees a 50 mV higher core voltage). A behavioural UART receiver decodes the
// frames. Expected counts are computed here from the ring stage delays:
// window time / (2 * ring period), within +-2. The bench checks the frame
// layout, the system-monitor codes, every count, the order of the counts
// (hotter is lower, higher voltage is higher), the time from run to the
// load, and that measurements follow each other while run stays high.
// It counts how often each mechanism happened: ring settle, counter clear,
// counting window, ring stop, chain load, chain shift, UART byte, frame,
// temperature step and voltage step; one that never happened is a failure.
`timescale 1ns / 1ps
module tb_ro_temp_sensor_system;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int NS = 4, TM = 1024, SETTLE = 64, CPB = 16;

  logic clk = 1'b0;
  logic rst = 1'b1, run = 1'b0;
  logic [9:0] sysmon_temp = 10'h2A7, sysmon_vccint = 10'h155;
  logic uart_txd, busy, window, frame_done;

  always #5 clk = ~clk;

  ro_temp_sensor_system #(
    .N_SENSORS(NS), .T_M(TM), .SETTLE_CYCLES(SETTLE), .CLK_HZ(100_000_000), .BAUD(6_250_000)
  ) dut (
    .clk(clk), .rst(rst), .run(run), .sysmon_temp(sysmon_temp), .sysmon_vccint(sysmon_vccint),
    .uart_txd(uart_txd), .busy(busy), .window(window), .frame_done(frame_done)
  );

  uart_rx_model #(.CLKS_PER_BIT(CPB)) rx (.clk(clk), .rxd(uart_txd));

  // Die conditions of every ring.
  int temp_mc [NS];
  int vcc_mv  [NS];
  for (genvar g = 0; g < NS; g++) begin : g_env
    always_comb begin
      dut.g_sensor[g].u_sensor.u_ro.temp_mc = temp_mc[g];
      dut.g_sensor[g].u_sensor.u_ro.vcc_mv  = vcc_mv[g];
    end
  end

  function automatic real expected_count(int t_mc, int v_mv);
    real period_ns;
    period_ns = 2.0 * (2.226 + 23 * 0.256 + 24 * 0.100)
              * (1.0 + 767.0e-6 * (t_mc - 46000) / 1000.0 - 600.0e-6 * (v_mv - 1000));
    return TM * 10.0 / (2.0 * period_ns);
  endfunction

  // Mechanism counters, from the controller's outputs and the frame.
  int n_settle = 0, n_clear = 0, n_window = 0, n_stop = 0, n_load = 0, n_shift = 0;
  int n_frames = 0, n_temp_step = 0, n_volt_step = 0;
  int cyc = 0, run_cyc, load_cyc;
  logic prev_en = 1'b0, prev_win = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (dut.ro_enable && !prev_en) n_settle++;
    if (!dut.ro_enable && prev_en) n_stop++;
    if (dut.cnt_clr) n_clear++;
    if (window && !prev_win) n_window++;
    if (dut.load) begin n_load++; load_cyc = cyc; end
    if (dut.chain_shift) n_shift++;
    if (frame_done) n_frames++;
    prev_en  <= dut.ro_enable;
    prev_win <= window;
  end

  // Check one received frame against the conditions it was measured under.
  task automatic check_frame(input int f, input int t [NS], input int v [NS], output int s [NS]);
    int base;
    base = f * (5 + 2 * NS);
    check(rx.n_bytes >= base + 5 + 2 * NS, $sformatf("frame %0d incomplete: %0d bytes", f, rx.n_bytes));
    if (rx.n_bytes < base + 5 + 2 * NS) return;
    check(rx.bytes[base] == 8'hA5, $sformatf("frame %0d header %02x", f, rx.bytes[base]));
    check({rx.bytes[base + 1], rx.bytes[base + 2]} == 16'(sysmon_temp), "temperature code");
    check({rx.bytes[base + 3], rx.bytes[base + 4]} == 16'(sysmon_vccint), "voltage code");
    for (int i = 0; i < NS; i++) begin
      real e;
      s[i] = {rx.bytes[base + 5 + 2 * i], rx.bytes[base + 6 + 2 * i]};
      e = expected_count(t[i], v[i]);
      check(real'(s[i]) > e - 2.0 && real'(s[i]) < e + 2.0,
            $sformatf("frame %0d sensor %0d: count %0d, expected %0.1f", f, i, s[i], e));
    end
  endtask

  initial begin
    int t1 [NS], v1 [NS], t2 [NS], v2 [NS], s1 [NS], s2 [NS];
    for (int i = 0; i < NS; i++) begin
      t1[i] = 40_000 + 20_000 * i;  v1[i] = 1000;
      t2[i] = (i == 0) ? t1[i] : t1[i] + 15_000;
      v2[i] = (i == 0) ? 1050 : 1000;
      temp_mc[i] = t1[i]; vcc_mv[i] = v1[i];
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    #1 run = 1'b1;
    run_cyc = cyc;
    // Second measurement runs under new conditions: apply them once the
    // first one's rings have stopped.
    wait (n_load == 1);
    // run is first sampled one edge after run_cyc
    check(load_cyc - run_cyc == 2 + SETTLE + TM + 4, $sformatf("run to load took %0d cycles", load_cyc - run_cyc));
    for (int i = 0; i < NS; i++) begin temp_mc[i] = t2[i]; vcc_mv[i] = v2[i]; end
    wait (n_frames == 1);
    repeat (CPB) @(posedge clk);
    check_frame(0, t1, v1, s1);
    for (int i = 1; i < NS; i++)
      check(s1[i] < s1[i - 1], $sformatf("sensor %0d hotter but not lower", i));
    wait (n_frames == 2);
    #1 run = 1'b0;
    repeat (CPB) @(posedge clk);
    check_frame(1, t2, v2, s2);
    for (int i = 1; i < NS; i++)
      if (s2[i] < s1[i]) n_temp_step++;
    if (s2[0] > s1[0]) n_volt_step++;   // same temperature, 50 mV higher
    repeat (4 * SETTLE) @(posedge clk);
    check(!busy && n_load == 2, "measurement started with run low");
    check(rx.n_errors == 0, $sformatf("%0d UART framing errors", rx.n_errors));
    check(rx.n_bytes == 2 * (5 + 2 * NS), $sformatf("%0d bytes received", rx.n_bytes));

    $display("mechanisms: settle=%0d clear=%0d window=%0d stop=%0d load=%0d shift=%0d bytes=%0d frames=%0d temp_step=%0d volt_step=%0d",
             n_settle, n_clear, n_window, n_stop, n_load, n_shift, rx.n_bytes, n_frames, n_temp_step, n_volt_step);
    check(n_settle > 0, "ring settle never happened");
    check(n_clear > 0, "counter clear never happened");
    check(n_window > 0, "counting window never happened");
    check(n_stop > 0, "ring stop never happened");
    check(n_load > 0, "chain load never happened");
    check(n_shift == 2 * NS * 16, $sformatf("chain shifted %0d times", n_shift));
    check(rx.n_bytes > 0, "no UART byte");
    check(n_frames == 2, "frames");
    check(n_temp_step == NS - 1, "temperature step not seen in the counts");
    check(n_volt_step == 1, "voltage step not seen in the counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
