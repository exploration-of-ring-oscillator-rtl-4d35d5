// Self-checking testbench for the capture stage (divide by two and edge
// detection).
//
// The ring output is replaced by a stimulus clock whose period is changed
// between runs (37.3 ns, 23.1 ns and 61.7 ns against a 10 ns system clock).
// The bench counts rising edges of that input itself and checks that q_div
// toggles on every one of them, that every count_en pulse lasts one cycle,
// and that the number of pulses over a window equals half the input edges
// (within one).
`timescale 1ns / 1ps
module tb_ro_capture;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic clk = 1'b0;
  logic q = 1'b0;
  logic q_div, count_en;
  realtime half_q = 18.65;
  bit q_run = 1'b0;

  always #5 clk = ~clk;
  always begin
    if (q_run) begin
      #(half_q) q = ~q;
    end else begin
      #1;
    end
  end

  ro_capture dut (.clk(clk), .q(q), .q_div(q_div), .count_en(count_en));

  int q_edges = 0, pulses = 0;
  logic prev_div;
  logic prev_en = 1'b0;
  always @(posedge q) begin
    prev_div = q_div;
    #0.1;
    q_edges++;
    check(q_div == ~prev_div, "q_div did not toggle on a ring edge");
  end
  always @(posedge clk) begin
    if (count_en) pulses++;
    if (count_en && prev_en) check(1'b0, "count_en high for two cycles");
    prev_en <= count_en;
  end

  task automatic run_window(input realtime half, input int cycles);
    half_q = half;
    q_run  = 1'b1;
    repeat (10) @(posedge clk);
    q_edges = 0;
    pulses  = 0;
    repeat (cycles) @(posedge clk);
    q_run = 1'b0;
    repeat (10) @(posedge clk);
    check(pulses >= q_edges / 2 - 1 && pulses <= q_edges / 2 + 1,
          $sformatf("half period %0.2f: %0d pulses for %0d ring edges", half, pulses, q_edges));
    check(pulses > 0, "no count pulses");
  endtask

  initial begin
    run_window(18.65, 2000);
    run_window(11.55, 3000);
    run_window(30.85, 1500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
