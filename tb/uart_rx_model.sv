// Behavioural UART receiver used by the testbenches (8N1, LSB first).
//
// Waits for a falling edge of rxd, checks the line again half a bit later,
// samples the eight data bits in the middle of each bit time and checks the
// stop bit. Every received byte is stored in `bytes` (index n_bytes-1 is the
// newest) and counted; framing errors are counted in n_errors. The bit time
// is CLKS_PER_BIT periods of clk. The time from the start edge to the end of
// the stop bit's sample is recorded for the last byte in last_len_clks.
`timescale 1ns / 1ps
module uart_rx_model #(
  parameter int CLKS_PER_BIT = 868
) (
  input logic clk,
  input logic rxd
);
  byte unsigned bytes [$];
  int n_bytes = 0;
  int n_errors = 0;

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge rxd);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      if (rxd != 1'b0) begin
        n_errors++;
        continue;
      end
      for (int i = 0; i < 8; i++) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        b[i] = rxd;
      end
      repeat (CLKS_PER_BIT) @(posedge clk);
      if (rxd != 1'b1) n_errors++;
      bytes.push_back(b);
      n_bytes++;
    end
  end
endmodule
