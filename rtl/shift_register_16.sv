// 16-bit pulsed-latch shift register.
//
// A serial-in, parallel-out right shift register made of latches instead of
// flip-flops. It is split into NUM_SUB sub shift registers of SUB_WIDTH bits;
// each has one extra temporary latch, and all of them share one delayed clock
// pulse generator. On each rising clk edge the generator fires SUB_WIDTH + 1
// non-overlapping pulses, T first and CP1 last, so every latch copies its left
// neighbour before that neighbour changes. The temporary latch of sub register
// m keeps the old last bit of m and feeds the first latch of sub register m+1.
// Splitting the register this way needs only five pulses for any length,
// instead of one pulse per bit.
//
// The organisation (4 x 4 bits, 20 latches, five pulses, input inverter making
// the complementary data pair) follows the published design. The delay values
// and the absence of a reset are this design's own choices; the latch and
// generator files describe their parts.
//
// Interface: in is sampled while CP1 is high, i.e. between
// SUB_WIDTH * (DELAY_PS + 2*INV_PS) and that plus DELAY_PS + INV_PS after the
// rising clk edge, and must be stable then. After rising edge n, q[1] holds the
// input of edge n, q[j] the input of edge n-j+1, and tmp[m] (T1..T4) the old
// value of the last bit of sub register m; tmp[NUM_SUB] is the bit that
// leaves the register.
//
// Contains the behavioural pulse generator, so it simulates with delays and
// is not synthesizable as a whole; the latch array itself is.
module shift_register_16 #(
  parameter int unsigned SUB_WIDTH = shift_reg_pkg::SUB_WIDTH,
  parameter int unsigned NUM_SUB   = shift_reg_pkg::NUM_SUB,
  parameter int unsigned DELAY_PS  = shift_reg_pkg::DELAY_PS,
  parameter int unsigned INV_PS    = shift_reg_pkg::INV_PS
) (
  input  logic                         clk,  // system clock
  input  logic                         in,   // serial data input
  output logic [SUB_WIDTH*NUM_SUB:1]   q,    // Q1..Q16
  output logic [NUM_SUB:1]             tmp   // temporary bits T1..T4
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [SUB_WIDTH:1] cp;
  logic               t;

  // Serial data pair entering each sub register; index 0 is the input.
  logic [NUM_SUB:0]   link;
  logic [NUM_SUB:0]   link_b;

  delayed_clock_pulse_gen #(
    .SUB_WIDTH (SUB_WIDTH),
    .DELAY_PS  (DELAY_PS),
    .INV_PS    (INV_PS)
  ) u_pulse_gen (
    .clk (clk),
    .cp  (cp),
    .t   (t)
  );

  // Input inverter producing the complementary data rail.
  assign link[0]   = in;
  assign link_b[0] = ~in;

  for (genvar m = 1; m <= NUM_SUB; m++) begin : g_sub
    sub_shift_register #(
      .WIDTH (SUB_WIDTH)
    ) u_sub (
      .d     (link[m-1]),
      .d_b   (link_b[m-1]),
      .cp    (cp),
      .t     (t),
      .q     (q[(m-1)*SUB_WIDTH+1 +: SUB_WIDTH]),
      .tmp   (link[m]),
      .tmp_b (link_b[m])
    );
  end

  assign tmp = link[NUM_SUB:1];
endmodule
