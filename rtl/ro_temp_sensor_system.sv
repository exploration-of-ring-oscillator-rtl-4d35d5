// Ring-oscillator temperature sensor array with serial readout.
//
// N_SENSORS identical ring-oscillator sensors (placed as a 4x4 grid on the
// device) are measured at the same time by one timebase controller: their
// rings are enabled together, settle, are counted over the same window of
// T_M clock cycles and are stopped together. The controller then loads every
// count into that sensor's cell of a daisy chain, and the readout controller
// shifts the chain out and sends a frame over a UART to a logging PC: a
// header, the on-chip system monitor's temperature and core-voltage codes,
// and the counts of sensors 0 to N_SENSORS-1. The PC converts counts to
// temperatures with a per-sensor linear calibration against the system
// monitor and removes the supply-voltage dependence of the counts; neither
// step is part of this hardware. The system monitor itself is a hard block of
// the FPGA: its two readings enter here as ports.
//
// From the design description: the sensor structure, the ring composition
// (23 inverters, 24 latches), 16 sensors, the 2^12-cycle settle time, the
// 100 MHz clock, daisy-chain readout and the UART link. This design's own
// choices: one shared timebase for all sensors, t_m = 2^16 cycles, 16-bit
// counts, the frame format and the 115200-baud rate.
//
// Interface: clk, rst (synchronous, active high), run (measure continuously
// while high), sysmon_temp, sysmon_vccint in; uart_txd, busy, window (the
// counting window is open), frame_done out. ro_enable drives the rings as an
// asynchronous signal, which the linter notes; that is the intent.
// Timing: with run high, one measurement takes 1 + SETTLE_CYCLES + T_M + 4
// cycles, followed by the frame of 5 + 2*N_SENSORS bytes at 10 bit times each.
`timescale 1ns / 1ps
module ro_temp_sensor_system #(
  parameter int unsigned N_SENSORS     = ro_sensor_pkg::N_SENSORS,
  parameter int unsigned N_INV         = ro_sensor_pkg::N_INV,
  parameter int unsigned N_LATCH       = ro_sensor_pkg::N_LATCH,
  parameter int unsigned N_COUNTER     = ro_sensor_pkg::N_COUNTER,
  parameter int unsigned T_M           = ro_sensor_pkg::T_M,
  parameter int unsigned SETTLE_CYCLES = ro_sensor_pkg::SETTLE_CYCLES,
  parameter int unsigned CLK_HZ        = ro_sensor_pkg::CLK_HZ,
  parameter int unsigned BAUD          = ro_sensor_pkg::BAUD
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               run,
  input  logic [ro_sensor_pkg::SYSMON_W-1:0] sysmon_temp,
  input  logic [ro_sensor_pkg::SYSMON_W-1:0] sysmon_vccint,
  output logic                               uart_txd,
  output logic                               busy,
  output logic                               window,
  output logic                               frame_done
);

  logic ro_enable, cnt_clr, load;
  logic chain_shift;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready;

  // chain[i] is the serial output of cell i; cell i takes cell i+1's output,
  // the last cell takes zeros, and cell 0 drives the readout.
  logic [N_SENSORS:0] chain;
  assign chain[N_SENSORS] = 1'b0;

  measure_ctrl #(
    .SETTLE_CYCLES (SETTLE_CYCLES),
    .T_M           (T_M)
  ) u_ctrl (
    .clk          (clk),
    .rst          (rst),
    .run          (run),
    .readout_done (frame_done),
    .ro_enable    (ro_enable),
    .cnt_clr      (cnt_clr),
    .load         (load),
    .busy         (busy),
    .window       (window)
  );

  for (genvar i = 0; i < N_SENSORS; i++) begin : g_sensor
    logic [N_COUNTER-1:0] s;

    ro_sensor #(
      .N_INV     (N_INV),
      .N_LATCH   (N_LATCH),
      .N_COUNTER (N_COUNTER)
    ) u_sensor (
      .enable (ro_enable),
      .clk    (clk),
      .rst    (cnt_clr),
      .S      (s)
    );

    daisy_chain_cell #(.N_COUNTER(N_COUNTER)) u_cell (
      .clk   (clk),
      .rst   (rst),
      .load  (load),
      .shift (chain_shift),
      .d     (s),
      .sin   (chain[i+1]),
      .sout  (chain[i])
    );
  end

  readout_ctrl #(
    .N_SENSORS (N_SENSORS),
    .N_COUNTER (N_COUNTER)
  ) u_readout (
    .clk           (clk),
    .rst           (rst),
    .start         (load),
    .sysmon_temp   (sysmon_temp),
    .sysmon_vccint (sysmon_vccint),
    .chain_out     (chain[0]),
    .chain_shift   (chain_shift),
    .tx_data       (tx_data),
    .tx_valid      (tx_valid),
    .tx_ready      (tx_ready),
    .done          (frame_done)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk   (clk),
    .rst   (rst),
    .data  (tx_data),
    .valid (tx_valid),
    .ready (tx_ready),
    .txd   (uart_txd)
  );

endmodule
