// Capture stage between a ring oscillator and its counter.
//
// The ring output q clocks a toggle flip-flop whose output q_div (Q') runs at
// half the ring frequency, so the fast ring never has to meet system-clock
// timing and q_div has a 50 % duty cycle. A second flip-flop, clocked by the
// system clock, holds the previous sample of q_div ("a"); the count enable is
// q_div high while that previous sample was low ("b and not a"), one pulse for
// each rising edge of q_div. The counter therefore counts half-rate ring
// periods, which is correct as long as q_div is slower than clk/2.
//
// The two flip-flops, the feedback on the first one and the gate feeding the
// counter enable follow the sensor schematic. Reading the gate as "b AND NOT
// a" (a rising-edge detector) is this design's interpretation. Neither
// flip-flop has a reset, as in the schematic: a stale first pulse is cleared
// by the counter clear that starts every measurement window.
//
// Interface: clk, q in; q_div, count_en out. Timing: count_en is combinational
// from q_div and the registered sample, high for one clk cycle per edge.
`timescale 1ns / 1ps
module ro_capture (
  input  logic clk,
  input  logic q,
  output logic q_div,
  output logic count_en
);

  logic a;  // q_div sampled by the system clock

  always_ff @(posedge q)
    q_div <= ~q_div;

  always_ff @(posedge clk)
    a <= q_div;

  assign count_en = q_div & ~a;

endmodule
