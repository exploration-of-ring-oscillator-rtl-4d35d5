// UART transmitter, 8 data bits, no parity, one stop bit (8N1).
//
// A byte is accepted when valid and ready are both high; the transmitter then
// sends a start bit (0), the eight data bits least significant first and a
// stop bit (1), each CLK_HZ/BAUD clock cycles long, and raises ready again
// after the stop bit. The line idles high.
//
// The serial link to the logging PC is part of the described system; its
// format and rate (115200 baud) are this design's choice.
//
// Interface: clk, rst (synchronous), data, valid in; ready, txd out. Timing:
// one byte takes 10 * (CLK_HZ/BAUD) cycles; txd is registered.
`timescale 1ns / 1ps
module uart_tx #(
  parameter int unsigned CLK_HZ = ro_sensor_pkg::CLK_HZ,
  parameter int unsigned BAUD   = ro_sensor_pkg::BAUD
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;

  logic [8:0]  frame;    // remaining bits: data then stop, LSB sent next
  logic [3:0]  bits_left;
  logic [31:0] baud_cnt;

  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      txd       <= 1'b1;
      frame     <= '1;
      bits_left <= '0;
      baud_cnt  <= '0;
    end else if (ready) begin
      if (valid) begin
        txd       <= 1'b0;                 // start bit
        frame     <= {1'b1, data};
        bits_left <= 4'd10;
        baud_cnt  <= '0;
      end
    end else if (baud_cnt == 32'(CLKS_PER_BIT - 1)) begin
      baud_cnt  <= '0;
      bits_left <= bits_left - 1'b1;
      if (bits_left != 4'd1) begin
        txd   <= frame[0];
        frame <= {1'b1, frame[8:1]};
      end
    end else begin
      baud_cnt <= baud_cnt + 1'b1;
    end
  end

  // A byte offered but not yet taken must stay offered and unchanged.
  a_hold_data: assert property (@(posedge clk) disable iff (rst)
    valid && !ready |=> valid && $stable(data));

endmodule
