// Shared constants of the pulsed-latch shift register.
//
// The register is organised as NUM_SUB sub shift registers of SUB_WIDTH data
// latches each; every sub shift register adds one temporary latch, so one
// shared pulse generator has to produce SUB_WIDTH + 1 pulses per clock.
// Sizes (4 x 4 = 16 bits, 5 pulses, 20 latches) follow the published
// architecture. The delay values are this design's own choice: the source
// circuit is a transistor-level design whose delay element has no printed
// value, so 100 ps of delay and 10 ps per inverter are used as placeholders
// that keep the pulses non-overlapping inside a 1 ns clock period.
package shift_reg_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Data latches per sub shift register (word length of a sub register).
  localparam int unsigned SUB_WIDTH = 4;
  // Number of sub shift registers.
  localparam int unsigned NUM_SUB = 4;
  // Total data bits.
  localparam int unsigned TOTAL_BITS = SUB_WIDTH * NUM_SUB;
  // Pulses produced by the delayed clock pulse generator (CP1..CP4 and T).
  localparam int unsigned NUM_PULSES = SUB_WIDTH + 1;

  // Delay element inside one clock pulse circuit, in ps (assumed).
  localparam int unsigned DELAY_PS = 100;
  // Propagation delay of one inverter / buffer, in ps (assumed).
  localparam int unsigned INV_PS = 10;
endpackage
