// Behavioural model of a gated ring oscillator (not synthesizable logic: on
// the FPGA the ring is built from directly instantiated LUT and latch
// primitives with placement constraints, and its frequency is set by the
// silicon and routing delays that this model only imitates).
//
// The ring is an enable gate followed by a chain of N_INV inverters and
// N_LATCH latches that are held permanently open, so each latch only adds
// delay. N_INV must be odd so that the loop inverts. While `enable` is high
// the output q toggles every loop delay; while it is low the gate holds its
// output at 0 and the ring comes to rest with q high. The period is
//   2 * (GATE_DELAY + N_INV*INV_DELAY + N_LATCH*LATCH_DELAY) * scale
// where scale models the physics: every stage gets slower as temperature
// rises (TEMP_PPM_PER_C per degree above 46 C) and faster as the core
// voltage rises (VOLT_PPM_PER_MV per mV above 1000 mV). A testbench sets the
// die conditions by writing the variables temp_mc (milli-degC) and vcc_mv.
//
// The element chain is modelled as one transport delay equal to the sum of
// its element delays, with the inversion of its N_INV inverters. Transport
// delays in series add up, so q behaves exactly as with one process per
// element (including the wave that is still travelling when enable falls),
// at a small fraction of the simulation events. For the same reason the
// order of inverters and latches in the ring does not matter here.
//
// From the design description: the enable gate in front of an odd ring of
// inverters, the option of held-open latches as extra delay elements, and the
// default composition of 23 inverters and 24 latches. This model's own
// choices: the element delays, chosen so that rings of different length give
// counts of the same order as the measured ones for t_m = 2^16 cycles; the
// temperature coefficient (0.0767 %/C, the resolution of the measured
// 47-inverter ring divided by its count); and the voltage coefficient.
//
// Interface: enable in, q out. Timing: q starts toggling one loop delay after
// enable rises and stops within one loop delay after it falls. All delays are
// transport delays in femtoseconds.
`timescale 1ps / 1fs
module ring_oscillator #(
  parameter int unsigned N_INV          = 23,
  parameter int unsigned N_LATCH        = 24,
  parameter longint unsigned GATE_DELAY_FS  = 2_226_000,
  parameter longint unsigned INV_DELAY_FS   = 256_000,
  parameter longint unsigned LATCH_DELAY_FS = 100_000,
  parameter longint unsigned TEMP_PPM_PER_C  = 767,
  parameter longint unsigned VOLT_PPM_PER_MV = 600
) (
  input  logic enable,
  output logic q
);

  // Die conditions seen by this ring.
  int unsigned temp_mc = 46_000;
  int unsigned vcc_mv  = 1_000;

  // Stage delay scaled by temperature and voltage, in fs.
  function automatic longint unsigned scaled(longint unsigned base_fs);
    longint signed ppm;
    ppm = 64'sd1_000_000
        + (longint'(TEMP_PPM_PER_C) * (longint'(temp_mc) - 64'sd46_000)) / 64'sd1000
        - longint'(VOLT_PPM_PER_MV) * (longint'(vcc_mv) - 64'sd1_000);
    return (base_fs * longint'(unsigned'(ppm))) / 64'd1_000_000;
  endfunction

  // Total delay of the element chain behind the gate, before scaling.
  localparam longint unsigned CHAIN_DELAY_FS =
    longint'(N_INV) * INV_DELAY_FS + longint'(N_LATCH) * LATCH_DELAY_FS;
  // An odd number of inverters makes the chain inverting.
  localparam bit CHAIN_INVERTS = N_INV[0];

  logic gate_out;  // output of the enable gate, input of the chain

  // Start from the rest state of a disabled ring.
  initial begin
    gate_out = 1'b0;
    q        = CHAIN_INVERTS;
  end

  always @(enable or q)
    gate_out <= #(scaled(GATE_DELAY_FS) * 1fs) enable & q;

  always @(gate_out)
    q <= #(scaled(CHAIN_DELAY_FS) * 1fs) gate_out ^ CHAIN_INVERTS;

endmodule
