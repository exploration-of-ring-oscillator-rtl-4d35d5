// Self-checking testbench for the UART transmitter.
//
// Uses 16 clock cycles per bit. Sends 40 random bytes with random gaps
// between them, decodes the line with a behavioural receiver and compares
// the bytes. It also checks the frame length directly: the line must go low
// for the start bit right after a byte is accepted, ready must stay low for
// exactly 10 bit times, and the line must idle high in between.
`timescale 1ns / 1ps
module tb_uart_tx;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int CPB = 16;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [7:0] data = '0;
  logic valid = 1'b0;
  logic ready, txd;

  always #5 clk = ~clk;

  uart_tx #(.CLK_HZ(1_600_000), .BAUD(100_000)) dut (
    .clk(clk), .rst(rst), .data(data), .valid(valid), .ready(ready), .txd(txd)
  );
  uart_rx_model #(.CLKS_PER_BIT(CPB)) rx (.clk(clk), .rxd(txd));

  byte unsigned sent [$];

  initial begin
    int busy_cycles;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    check(txd == 1'b1 && ready, "line not idle after reset");
    for (int i = 0; i < 40; i++) begin
      data  = 8'($urandom);
      valid = 1'b1;
      do @(posedge clk); while (!ready);
      sent.push_back(data);
      #1 valid = 1'b0;
      data = 8'($urandom);  // may change once taken
      check(txd == 1'b0, "no start bit after accept");
      busy_cycles = 0;
      while (!ready) begin
        @(posedge clk); #1;
        busy_cycles++;
      end
      check(busy_cycles == 10 * CPB, $sformatf("byte took %0d cycles", busy_cycles));
      check(txd == 1'b1, "line not high after stop bit");
      repeat ($urandom_range(0, 20)) @(posedge clk);
      #1;
    end
    repeat (2 * CPB) @(posedge clk);
    check(rx.n_bytes == 40 && rx.n_errors == 0,
          $sformatf("received %0d bytes, %0d framing errors", rx.n_bytes, rx.n_errors));
    for (int i = 0; i < 40 && i < rx.n_bytes; i++)
      check(rx.bytes[i] == sent[i], $sformatf("byte %0d: got %02x sent %02x", i, rx.bytes[i], sent[i]));
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
