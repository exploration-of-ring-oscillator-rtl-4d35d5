// Capture counter of one ring-oscillator sensor.
//
// Counts the cycles in which `enable` is high; a high `rst` clears it
// synchronously and takes priority. Its value `out` is the sensor reading S:
// the number of divided ring periods seen since the last clear. It wraps at
// 2^N_COUNTER; with the default measurement period of 2^16 cycles the count
// cannot exceed 2^15, so 16 bits never wrap.
//
// The counter with enable, clock, reset and an n_counter-bit output follows
// the sensor schematic; the synchronous clear and the 16-bit default width
// are this design's choices.
//
// Interface: clk, rst, enable in; out (N_COUNTER bits) out, registered.
`timescale 1ns / 1ps
module capture_counter #(
  parameter int unsigned N_COUNTER = ro_sensor_pkg::N_COUNTER
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  output logic [N_COUNTER-1:0] out
);

  always_ff @(posedge clk) begin
    if (rst)         out <= '0;
    else if (enable) out <= out + 1'b1;
  end

endmodule
