// Shared constants of the ring-oscillator temperature-sensor system.
//
// The sensor array measures on-chip temperature with ring oscillators: each
// ring runs for a fixed number of system-clock cycles and the number of its
// oscillations is counted. These constants fix that measurement and the
// readout. Values taken from the design description: the 100 MHz clock, the
// 2^12-cycle settling wait, 16 sensors, and a ring of 23 inverters plus 24
// latches (the best-performing combination that was measured). Values that
// are this design's own choice: the measurement period of 2^16 cycles (the
// longest period that still lowered the noise; longer periods were not
// advisable), the 16-bit counter, the UART rate and the frame header byte.
`timescale 1ns / 1ps
package ro_sensor_pkg;

  // System clock frequency in Hz.
  localparam int unsigned CLK_HZ        = 100_000_000;
  // Cycles the ring runs before counting starts, so its frequency settles.
  localparam int unsigned SETTLE_CYCLES = 4096;
  // Measurement period t_m in system-clock cycles (655.36 us at 100 MHz).
  localparam int unsigned T_M           = 65536;
  // Width of the capture counter. At most T_M/2 edges of the divided ring
  // output can be seen in T_M cycles, so log2(T_M) bits never overflow.
  localparam int unsigned N_COUNTER     = 16;
  // Number of sensors (placed as a 4x4 grid on the device).
  localparam int unsigned N_SENSORS     = 16;
  // Ring composition.
  localparam int unsigned N_INV         = 23;
  localparam int unsigned N_LATCH       = 24;
  // Serial link to the logging PC.
  localparam int unsigned BAUD          = 115_200;
  // First byte of every readout frame.
  localparam logic [7:0]  FRAME_HEADER  = 8'hA5;
  // Width of the system-monitor ADC codes.
  localparam int unsigned SYSMON_W      = 10;

endpackage
