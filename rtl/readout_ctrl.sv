// Readout controller: turns one measurement into one frame on the serial link.
//
// On `start` it captures the two system-monitor codes and sends, byte by byte
// through a valid/ready byte interface:
//   byte 0      FRAME_HEADER (0xA5)
//   bytes 1-2   system-monitor temperature code, high byte first
//   bytes 3-4   system-monitor core-voltage code, high byte first
//   then        N_SENSORS*N_COUNTER bits taken from the daisy chain, eight at
//               a time, first bit received is the byte's most significant
//               bit; with 16-bit counts this is each sensor's count, high byte
//               first, sensor 0 first. A last partial byte is padded with the
//               zeros that enter the end of the chain.
// For a chain byte it first pulses chain_shift for eight cycles, sampling
// chain_out before each shift, then offers the byte. After the last byte has
// been accepted and the transmitter has gone idle again it pulses `done`.
//
// Sending sensor counts together with the system-monitor temperature and
// voltage to a PC follows the design description (the PC uses them for
// calibration and voltage correction); the frame layout is this design's own.
//
// Interface: clk, rst (synchronous), start, sysmon_temp, sysmon_vccint,
// chain_out, tx_ready in; chain_shift, tx_data, tx_valid, done out.
`timescale 1ns / 1ps
module readout_ctrl #(
  parameter int unsigned N_SENSORS = ro_sensor_pkg::N_SENSORS,
  parameter int unsigned N_COUNTER = ro_sensor_pkg::N_COUNTER,
  parameter int unsigned SYSMON_W  = ro_sensor_pkg::SYSMON_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [SYSMON_W-1:0] sysmon_temp,
  input  logic [SYSMON_W-1:0] sysmon_vccint,
  input  logic                chain_out,
  output logic                chain_shift,
  output logic [7:0]          tx_data,
  output logic                tx_valid,
  input  logic                tx_ready,
  output logic                done
);

  localparam int unsigned HDR_BYTES   = 5;
  localparam int unsigned CHAIN_BYTES = (N_SENSORS * N_COUNTER + 7) / 8;
  localparam int unsigned N_BYTES     = HDR_BYTES + CHAIN_BYTES;

  typedef enum logic [2:0] {R_IDLE, R_NEXT, R_SHIFT, R_SEND, R_FLUSH} rstate_t;

  rstate_t     state;
  logic [15:0] temp_q, vcc_q;
  logic [15:0] byte_idx;
  logic [2:0]  bit_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= R_IDLE;
      temp_q   <= '0;
      vcc_q    <= '0;
      byte_idx <= '0;
      bit_cnt  <= '0;
      tx_data  <= '0;
    end else begin
      unique case (state)
        R_IDLE:
          if (start) begin
            temp_q   <= 16'(sysmon_temp);
            vcc_q    <= 16'(sysmon_vccint);
            byte_idx <= '0;
            state    <= R_NEXT;
          end
        R_NEXT: begin
          unique case (byte_idx)
            16'd0:   tx_data <= ro_sensor_pkg::FRAME_HEADER;
            16'd1:   tx_data <= temp_q[15:8];
            16'd2:   tx_data <= temp_q[7:0];
            16'd3:   tx_data <= vcc_q[15:8];
            16'd4:   tx_data <= vcc_q[7:0];
            default: tx_data <= tx_data;
          endcase
          bit_cnt <= '0;
          state   <= (byte_idx < 16'(HDR_BYTES)) ? R_SEND : R_SHIFT;
        end
        R_SHIFT: begin
          tx_data <= {tx_data[6:0], chain_out};
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == 3'd7) state <= R_SEND;
        end
        R_SEND:
          if (tx_ready) begin
            byte_idx <= byte_idx + 1'b1;
            state    <= (byte_idx == 16'(N_BYTES - 1)) ? R_FLUSH : R_NEXT;
          end
        R_FLUSH:
          // wait until the transmitter has taken the last byte and finished it
          if (tx_ready) state <= R_IDLE;
        default:
          state <= R_IDLE;
      endcase
    end
  end

  assign chain_shift = (state == R_SHIFT);
  assign tx_valid    = (state == R_SEND);
  assign done        = (state == R_FLUSH) && tx_ready;

endmodule
