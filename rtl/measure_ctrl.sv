// Timebase controller: sequences one temperature measurement of all sensors.
//
// A measurement runs through these steps, all counted in system-clock cycles:
//   SETTLE : the rings are enabled and left running for SETTLE_CYCLES so that
//            their frequency becomes steady; on the last settle cycle the
//            capture counters are cleared (cnt_clr).
//   WINDOW : the counters count for exactly T_M cycles (the measurement
//            period t_m); window is high.
//   DRAIN  : the rings are disabled; DRAIN_CYCLES let the last edge already
//            on its way through the capture flip-flops reach the counter.
//   LOAD   : one-cycle load pulse copies every count into the readout chain.
//   READOUT: waits for readout_done, then returns to IDLE.
// From IDLE a new measurement starts whenever `run` is high, so with run held
// high the sensors are measured back to back, each measurement followed by
// its readout. ro_enable is a register, so the ring enables never glitch.
//
// From the design description: enable the rings, wait 2^12 cycles, count for
// t_m cycles, disable, read out. This design's own choices: the clear pulse
// that starts the window, the drain time, the default t_m of 2^16 cycles and
// the handshake with the readout.
//
// Interface: clk, rst (synchronous, active high), run, readout_done in;
// ro_enable, cnt_clr, load, busy, window out. Latency from run to load is
// 1 + SETTLE_CYCLES + T_M + DRAIN_CYCLES cycles.
`timescale 1ns / 1ps
module measure_ctrl #(
  parameter int unsigned SETTLE_CYCLES = ro_sensor_pkg::SETTLE_CYCLES,
  parameter int unsigned T_M           = ro_sensor_pkg::T_M,
  parameter int unsigned DRAIN_CYCLES  = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic run,
  input  logic readout_done,
  output logic ro_enable,
  output logic cnt_clr,
  output logic load,
  output logic busy,
  output logic window
);

  typedef enum logic [2:0] {
    S_IDLE, S_SETTLE, S_WINDOW, S_DRAIN, S_LOAD, S_READOUT
  } state_t;

  state_t      state;
  logic [31:0] timer;  // cycles spent in the current state

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      timer     <= '0;
      ro_enable <= 1'b0;
    end else begin
      timer <= timer + 1'b1;
      unique case (state)
        S_IDLE:
          if (run) begin
            state     <= S_SETTLE;
            timer     <= '0;
            ro_enable <= 1'b1;
          end
        S_SETTLE:
          if (timer == 32'(SETTLE_CYCLES - 1)) begin
            state <= S_WINDOW;
            timer <= '0;
          end
        S_WINDOW:
          if (timer == 32'(T_M - 1)) begin
            state     <= S_DRAIN;
            timer     <= '0;
            ro_enable <= 1'b0;
          end
        S_DRAIN:
          if (timer == 32'(DRAIN_CYCLES - 1)) state <= S_LOAD;
        S_LOAD:
          state <= S_READOUT;
        S_READOUT:
          if (readout_done) state <= S_IDLE;
        default:
          state <= S_IDLE;
      endcase
    end
  end

  assign cnt_clr = (state == S_SETTLE) && (timer == 32'(SETTLE_CYCLES - 1));
  assign load    = (state == S_LOAD);
  assign busy    = (state != S_IDLE);
  assign window  = (state == S_WINDOW);

  // The counters may only be cleared while the rings run, and the rings run
  // exactly during settle and window.
  a_clr_while_running: assert property (@(posedge clk) disable iff (rst)
    cnt_clr |-> ro_enable);
  a_enable_in_phase: assert property (@(posedge clk) disable iff (rst)
    ro_enable == (state == S_SETTLE || state == S_WINDOW));

endmodule
