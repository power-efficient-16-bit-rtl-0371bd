// Behavioural model of one clock pulse circuit (analog delay element).
//
// One stage of the delayed clock pulse generator. The incoming clock is passed
// through a delay element and an inverter; a GDI AND gate combines the
// incoming clock with that delayed, inverted copy, so on every rising edge of
// clk_in it produces a pulse DELAY_PS + INV_PS wide, driven out through a
// buffer. A second inverter restores the polarity of the delayed clock and
// hands it to the next stage as clk_out, DELAY_PS + 2*INV_PS later than
// clk_in. Because each pulse is one inverter delay shorter than the stage to
// stage delay, pulses of neighbouring stages never overlap.
//
// This is a behavioural model, not synthesizable logic: the delay element is
// an analog part whose length sets the pulse width. The structure (delay,
// inverters, GDI AND, output buffer) follows the published circuit; the
// delay values are this design's own placeholders, and the buffer is treated
// as having no delay of its own.
//
// Timing: pulse rises with clk_in and falls DELAY_PS + INV_PS later. The clock
// high and low phases must both be longer than DELAY_PS + INV_PS.
module clock_pulse_circuit #(
  parameter int unsigned DELAY_PS = shift_reg_pkg::DELAY_PS,  // delay element
  parameter int unsigned INV_PS   = shift_reg_pkg::INV_PS     // one inverter
) (
  input  logic clk_in,   // clock from the previous stage (or the system clock)
  output logic pulse,    // buffered clock pulse for a column of latches
  output logic clk_out   // delayed clock for the next stage
);
  timeunit 1ps;
  timeprecision 1ps;

  logic delayed;      // output of the delay element
  logic delayed_n;    // after the first inverter
  logic restored;     // after the second inverter

  initial begin
    delayed   = 1'b0;
    delayed_n = 1'b1;
    restored  = 1'b0;
  end

  always @(clk_in)    delayed   <= #(DELAY_PS) clk_in;
  always @(delayed)   delayed_n <= #(INV_PS) ~delayed;
  always @(delayed_n) restored  <= #(INV_PS) ~delayed_n;

  // GDI AND gate followed by the output buffer.
  assign pulse   = clk_in & delayed_n;
  assign clk_out = restored;
endmodule
