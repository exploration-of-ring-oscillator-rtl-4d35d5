// Self-checking testbench for the timebase controller.
//
// Uses SETTLE_CYCLES = 16 and T_M = 64 and counts cycles on its own: the
// rings must stay enabled for exactly SETTLE_CYCLES + T_M cycles, the clear
// must come on the last settle cycle, the window must last T_M cycles and
// start right after the clear, load must come DRAIN_CYCLES + 1 cycles after
// the rings stop, and the controller must stay busy until readout_done. It
// also checks that nothing starts while run is low and that two measurements
// run back to back while run stays high.
`timescale 1ns / 1ps
module tb_measure_ctrl;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int SETTLE = 16, TM = 64, DRAIN = 4;

  logic clk = 1'b0;
  logic rst = 1'b1, run = 1'b0, readout_done = 1'b0;
  logic ro_enable, cnt_clr, load, busy, window;

  always #5 clk = ~clk;

  measure_ctrl #(.SETTLE_CYCLES(SETTLE), .T_M(TM)) dut (
    .clk(clk), .rst(rst), .run(run), .readout_done(readout_done),
    .ro_enable(ro_enable), .cnt_clr(cnt_clr), .load(load), .busy(busy), .window(window)
  );

  // Cycle-by-cycle trace of one measurement, recorded on the clock.
  int cyc, en_first, en_cycles, clr_cyc, win_first, win_cycles, load_cyc, n_loads, n_clr;
  always @(posedge clk) begin
    cyc++;
    if (ro_enable) begin
      if (en_cycles == 0) en_first = cyc;
      en_cycles++;
    end
    if (cnt_clr) begin clr_cyc = cyc; n_clr++; end
    if (window) begin
      if (win_cycles == 0) win_first = cyc;
      win_cycles++;
    end
    if (load) begin load_cyc = cyc; n_loads++; end
  end

  task automatic clear_trace();
    en_cycles = 0; win_cycles = 0; n_loads = 0; n_clr = 0;
  endtask

  task automatic one_measurement(input string tag);
    clear_trace();
    wait (load);
    @(posedge clk); #1;
    check(en_cycles == SETTLE + TM, $sformatf("%s: rings enabled %0d cycles", tag, en_cycles));
    check(n_clr == 1 && clr_cyc == en_first + SETTLE - 1, $sformatf("%s: clear at wrong cycle", tag));
    check(win_cycles == TM && win_first == clr_cyc + 1, $sformatf("%s: window %0d cycles", tag, win_cycles));
    check(load_cyc == en_first + SETTLE + TM + DRAIN, $sformatf("%s: load at cycle %0d", tag, load_cyc - en_first));
    check(n_loads == 1, $sformatf("%s: %0d loads", tag, n_loads));
    // Readout takes a while: controller must stay busy and idle the rings.
    repeat (37) begin
      @(posedge clk); #1;
      check(busy && !ro_enable && !load, $sformatf("%s: not waiting for readout", tag));
    end
    readout_done = 1'b1;
    @(posedge clk); #1;
    readout_done = 1'b0;
  endtask

  initial begin
    cyc = 0;
    clear_trace();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    clear_trace();
    repeat (20) @(posedge clk);
    #1;
    check(!busy && !ro_enable && en_cycles == 0, "started without run");
    run = 1'b1;
    one_measurement("first");
    one_measurement("second (back to back)");
    fork
      begin
        wait (ro_enable);
        #1 run = 1'b0;
      end
    join_none
    one_measurement("third (run dropped during it)");
    repeat (50) @(posedge clk);
    #1;
    check(!busy && !ro_enable, "started again with run low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
