// One cell of the sensor readout daisy chain.
//
// Every sensor owns one cell. On `load` the cell copies the sensor count d
// into its shift register; on `shift` it moves every bit one place towards
// the most significant end, taking the serial input sin from the next cell
// of the chain. The chain output of a cell, sout, is its most significant
// bit, so the cells wired sout -> sin form one long shift register and the
// counts leave the chain most significant bit first, the first cell's count
// first. Load has priority over shift.
//
// Reading the sensors through a daisy chain follows the design description;
// the cell itself (parallel load, MSB-first shift) is this design's own.
//
// Interface: clk, rst (synchronous), load, shift, d, sin in; sout out.
// Timing: one bit per cycle with shift high; sout is registered.
`timescale 1ns / 1ps
module daisy_chain_cell #(
  parameter int unsigned N_COUNTER = ro_sensor_pkg::N_COUNTER
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic                 shift,
  input  logic [N_COUNTER-1:0] d,
  input  logic                 sin,
  output logic                 sout
);

  logic [N_COUNTER-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)        sr <= '0;
    else if (load)  sr <= d;
    else if (shift) sr <= {sr[N_COUNTER-2:0], sin};
  end

  assign sout = sr[N_COUNTER-1];

endmodule
