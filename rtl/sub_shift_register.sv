// Sub shift register: SUB_WIDTH data latches and one temporary latch.
//
// Latch k (k = 1 .. WIDTH) stores data bit q[k] and is written by pulse cp[k];
// latch 1 takes the serial input d / d_b, latch k takes latch k-1. A last,
// temporary latch, written by pulse t, stores the old value of q[WIDTH] so the
// next sub shift register can still pick it up after q[WIDTH] has been
// overwritten. Data move one place to the right per clock.
//
// Latches pass their data as a complementary pair (q, q_b), as the
// differential latch needs. Structure and pulse names follow the published
// architecture.
//
// Timing: the pulses must arrive in the order t, cp[WIDTH], ..., cp[1] and must
// not overlap; the serial input must be stable while cp[1] is high. After one
// such sequence q[1] = d, q[k] = old q[k-1], tmp = old q[WIDTH].
module sub_shift_register #(
  parameter int unsigned WIDTH = shift_reg_pkg::SUB_WIDTH
) (
  input  logic           d,      // serial data in
  input  logic           d_b,    // complement of serial data in
  input  logic [WIDTH:1] cp,     // data latch pulses
  input  logic           t,      // temporary latch pulse
  output logic [WIDTH:1] q,      // stored data bits
  output logic           tmp,    // temporary bit, serial out to the next sub register
  output logic           tmp_b   // complement of tmp
);
  timeunit 1ps;
  timeprecision 1ps;

  // Data pairs between latches: index 0 is the input, index k is latch k.
  logic [WIDTH:0] s;
  logic [WIDTH:0] s_b;

  assign s[0]   = d;
  assign s_b[0] = d_b;

  for (genvar k = 1; k <= WIDTH; k++) begin : g_latch
    pulse_latch u_latch (
      .clk (cp[k]),
      .d   (s[k-1]),
      .d_b (s_b[k-1]),
      .q   (s[k]),
      .q_b (s_b[k])
    );
  end

  pulse_latch u_tmp (
    .clk (t),
    .d   (s[WIDTH]),
    .d_b (s_b[WIDTH]),
    .q   (tmp),
    .q_b (tmp_b)
  );

  assign q = s[WIDTH:1];
endmodule
