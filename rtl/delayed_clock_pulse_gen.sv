// Behavioural model of the delayed clock pulse generator.
//
// A chain of NUM_PULSES clock pulse circuits. The system clock enters the
// first stage; each stage hands a delayed copy of the clock to the next, so
// every rising clock edge yields NUM_PULSES short, non-overlapping pulses one
// after another. For a 4-bit sub shift register these are five pulses: first
// T (for the temporary latch), then CP4, CP3, CP2 and last CP1. Firing the
// latch nearest the output first is what lets each latch copy its
// neighbour's old value before that neighbour is overwritten.
//
// The five-stage chain, the signal names and the clock entering at the stage
// that drives T follow the published generator. It is a behavioural model
// because each stage contains an analog delay element.
//
// Interface: cp[k] drives latch k of every sub shift register, t drives the
// temporary latches. Timing: t rises with clk; cp[SUB_WIDTH+1-k] rises
// k * (DELAY_PS + 2*INV_PS) later, for k = 1 .. SUB_WIDTH; each pulse is
// DELAY_PS + INV_PS wide.
module delayed_clock_pulse_gen #(
  parameter int unsigned SUB_WIDTH = shift_reg_pkg::SUB_WIDTH,
  parameter int unsigned DELAY_PS  = shift_reg_pkg::DELAY_PS,
  parameter int unsigned INV_PS    = shift_reg_pkg::INV_PS
) (
  input  logic                 clk,  // system clock
  output logic [SUB_WIDTH:1]   cp,   // data latch pulses CP1..CP<SUB_WIDTH>
  output logic                 t     // temporary latch pulse T
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NUM_PULSES = SUB_WIDTH + 1;

  // chain[0] is the system clock, chain[k] the clock after k stages.
  logic [NUM_PULSES:0]   chain;
  // pulses[0] fires first, pulses[NUM_PULSES-1] last.
  logic [NUM_PULSES-1:0] pulses;

  assign chain[0] = clk;

  for (genvar k = 0; k < NUM_PULSES; k++) begin : g_stage
    clock_pulse_circuit #(
      .DELAY_PS (DELAY_PS),
      .INV_PS   (INV_PS)
    ) u_stage (
      .clk_in  (chain[k]),
      .pulse   (pulses[k]),
      .clk_out (chain[k+1])
    );
  end

  // Stage 0 drives T; stage k (k >= 1) drives CP<SUB_WIDTH+1-k>.
  assign t = pulses[0];
  for (genvar k = 1; k <= SUB_WIDTH; k++) begin : g_map
    assign cp[SUB_WIDTH+1-k] = pulses[k];
  end
endmodule
