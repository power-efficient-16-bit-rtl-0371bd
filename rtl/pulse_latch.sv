// Pulsed latch with differential data inputs.
//
// A level-sensitive storage cell: while clk (a short pulse from the delayed
// clock pulse generator) is high, the stored bit follows the differential data
// pair d / d_b; while clk is low the bit is held. q and q_b are the two
// complementary nodes of the storage loop.
//
// The transistor-level cell this models is two cross-coupled inverters
// written through two NMOS pass transistors gated by clk, one carrying d and
// one carrying d_b. That structure follows the published latch. How the cell
// behaves when d and d_b are not complementary is this design's own
// reading: a pair of equal values cannot flip the loop through two pass
// transistors in a defined way, so the cell keeps its bit and only a valid
// pair (d != d_b) writes. There is no reset: the circuit has none, and a
// register is initialised by shifting data through it.
//
// Timing: transparent for the whole high phase of clk; the bit seen on d at
// the falling edge of clk is the one kept.
//
// The storage element is a latch on purpose: the whole design is a pulsed
// latch shift register, so the latch inferred here is the intended circuit.
module pulse_latch (
  input  logic clk,   // write pulse, active high
  input  logic d,     // true data input
  input  logic d_b,   // complementary data input
  output logic q,     // stored bit
  output logic q_b    // complement of the stored bit
);
  timeunit 1ps;
  timeprecision 1ps;

  logic state;

  always_latch begin
    if (clk && (d != d_b)) state = d;
  end

  assign q   = state;
  assign q_b = ~state;
endmodule
