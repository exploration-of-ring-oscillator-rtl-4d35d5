// One ring-oscillator temperature sensor.
//
// A gated ring oscillator runs while `enable` is high. Its output is halved by
// a toggle flip-flop, brought into the system-clock domain and counted: every
// rising edge of the halved signal adds one to the capture counter, which
// `rst` clears. The count S taken over a fixed number of clock cycles falls as
// the die gets hotter, because every ring stage slows down; a linear fit
// against a reference thermometer turns S into a temperature.
//
// The structure and the four pins (enable, clk, rst, S) follow the sensor
// schematic. The ring composition defaults to 23 inverters and 24 held-open
// latches, the best combination measured. The counter width is this design's
// choice.
//
// Timing: the caller enables the ring, waits for it to settle, pulses rst,
// waits the measurement period and drops enable; S then holds the count until
// the next rst.
`timescale 1ns / 1ps
module ro_sensor #(
  parameter int unsigned N_INV     = ro_sensor_pkg::N_INV,
  parameter int unsigned N_LATCH   = ro_sensor_pkg::N_LATCH,
  parameter int unsigned N_COUNTER = ro_sensor_pkg::N_COUNTER
) (
  input  logic                 enable,
  input  logic                 clk,
  input  logic                 rst,
  output logic [N_COUNTER-1:0] S
);

  logic q, count_en;

  ring_oscillator #(.N_INV(N_INV), .N_LATCH(N_LATCH)) u_ro (
    .enable (enable),
    .q      (q)
  );

  ro_capture u_capture (
    .clk      (clk),
    .q        (q),
    .q_div    (),
    .count_en (count_en)
  );

  capture_counter #(.N_COUNTER(N_COUNTER)) u_counter (
    .clk    (clk),
    .rst    (rst),
    .enable (count_en),
    .out    (S)
  );

endmodule
