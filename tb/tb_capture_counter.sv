// Self-checking testbench for the capture counter.
//
// Drives random enable and clear patterns into an 8-bit instance (so that
// wrap-around is reached) and a 16-bit instance, and compares the output
// every cycle with a count kept here: clear wins over enable, enable adds
// one, the 8-bit counter wraps from 255 to 0.
`timescale 1ns / 1ps
module tb_capture_counter;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic clk = 1'b0;
  logic rst, en;
  logic [7:0]  out8;
  logic [15:0] out16;
  int unsigned model;
  int wraps = 0;

  always #5 clk = ~clk;

  capture_counter #(.N_COUNTER(8)) dut8  (.clk(clk), .rst(rst), .enable(en), .out(out8));
  capture_counter                  dut16 (.clk(clk), .rst(rst), .enable(en), .out(out16));

  initial begin
    rst = 1'b1; en = 1'b0; model = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      rst = ($urandom_range(0, 999) == 0);
      en  = ($urandom_range(0, 9) < 8);
      @(posedge clk);
      if (rst) model = 0;
      else if (en) begin
        model++;
        if (model % 256 == 0) wraps++;
      end
      #1;
      check(out8 == 8'(model), $sformatf("8-bit: got %0d expected %0d", out8, model % 256));
      check(out16 == 16'(model), $sformatf("16-bit: got %0d expected %0d", out16, model));
    end
    check(wraps > 0, "8-bit counter never wrapped");
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
