// End-to-end testbench for shift_register_16 at its default size.
//
// Clocks the 16-bit register with a 1 ns clock and a random serial input
// (changed 800 ps after each rising edge, once CP1 has closed). A reference
// model of a 16-bit right shift register plus the four temporary bits is
// compared with q and tmp after every clock. It also watches the shared
// pulses and counts what the design is built around:
//   - pulse order: every edge fires T, CP4, CP3, CP2, CP1 in that order;
//   - non-overlap: no two pulses are ever high together;
//   - temporary hand-off: a sub register boundary where the last bit of the
//     lower sub register changed in the same clock, so the next sub register
//     could only get the right bit through its temporary latch;
//   - end-to-end transit: a bit that entered at in and left through T4
//     16 clocks after the clock that sampled it.
// A mechanism that never happens counts as a failure.
module tb_shift_register_16;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SUB_WIDTH = shift_reg_pkg::SUB_WIDTH;
  localparam int unsigned NUM_SUB   = shift_reg_pkg::NUM_SUB;
  localparam int unsigned BITS      = shift_reg_pkg::TOTAL_BITS;
  localparam int unsigned PERIOD    = 1000;
  localparam int unsigned CYCLES    = 400;

  logic clk = 0;
  logic in  = 0;
  logic [BITS:1]    q;
  logic [NUM_SUB:1] tmp;

  logic [BITS:1]    model_q;
  logic [NUM_SUB:1] model_t;
  // History of inputs to follow bits end to end.
  logic [BITS+1:0]  hist;
  int checks = 0, failures = 0;
  int n_shift = 0, n_order = 0, n_handoff = 0, n_transit = 0, n_overlap_checks = 0;
  int pulse_idx = 0;

  shift_register_16 dut (.clk(clk), .in(in), .q(q), .tmp(tmp));

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  // Pulses in expected firing order: T first, CP1 last.
  logic [SUB_WIDTH:0] all;
  always_comb begin
    all[0] = dut.t;
    for (int k = 1; k <= SUB_WIDTH; k++) all[k] = dut.cp[SUB_WIDTH+1-k];
  end

  always @(all) if ($time > 0) begin
    n_overlap_checks++;
    if (!$onehot0(all)) fail($sformatf("overlapping pulses %b", all));
  end

  always @(posedge clk) pulse_idx = 0;
  for (genvar k = 0; k <= SUB_WIDTH; k++) begin : g_order
    always @(posedge all[k]) if ($time > 0) begin
      if (pulse_idx != k) fail($sformatf("pulse %0d fired as number %0d", k, pulse_idx));
      pulse_idx++;
      if (k == SUB_WIDTH) n_order++;
    end
  end

  initial begin
    #(PERIOD * (CYCLES + 200));
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BITS:1] old_q;
    model_q = '0; model_t = '0; hist = '0;
    // Flush with zeros: BITS + NUM_SUB shifts make every latch known.
    #(PERIOD);
    in = 0;
    repeat (BITS + NUM_SUB) begin
      clk = 1; #(PERIOD / 2); clk = 0; #(PERIOD / 2);
    end
    for (int i = 0; i < CYCLES; i++) begin
      logic b;
      b = (i < 20) ? 1'(i % 3 == 0) : 1'($urandom);
      in = b;
      #(PERIOD / 5);
      // Rising edge; the new input is sampled by CP1 in this period.
      clk = 1;
      #(PERIOD / 2);
      clk = 0;
      #(PERIOD * 3 / 10);
      // 0.8 * PERIOD after the edge all pulses are over (CP1 ends
      // SUB_WIDTH * (DELAY_PS + 2*INV_PS) + DELAY_PS + INV_PS after it);
      // compare, then the next input is applied.
      old_q = model_q;
      for (int m = 1; m <= NUM_SUB; m++) model_t[m] = model_q[m*SUB_WIDTH];
      model_q = {model_q[BITS-1:1], b};
      hist = {hist[BITS:0], b};
      n_shift++;
      checks++;
      if (q !== model_q || tmp !== model_t)
        fail($sformatf("cycle %0d: q=%h tmp=%b expected q=%h tmp=%b", i, q, tmp, model_q, model_t));
      for (int m = 1; m < NUM_SUB; m++)
        if (old_q[m*SUB_WIDTH] != model_q[m*SUB_WIDTH] && q[m*SUB_WIDTH+1] == old_q[m*SUB_WIDTH])
          n_handoff++;
      if (i > BITS + 1) begin
        checks++;
        if (tmp[NUM_SUB] !== hist[BITS]) fail("bit leaving T4 is not the input sampled 16 clocks earlier");
        else if (hist[BITS]) n_transit++;
      end
    end
    #(PERIOD);
    $display("shifts=%0d ordered_sequences=%0d handoffs=%0d transits=%0d overlap_checks=%0d",
             n_shift, n_order, n_handoff, n_transit, n_overlap_checks);
    checks++; if (n_shift == 0) fail("no shift");
    checks++; if (n_order < CYCLES) fail("pulse sequence not seen on every clock");
    checks++; if (n_handoff == 0) fail("no temporary-latch hand-off");
    checks++; if (n_transit == 0) fail("no end-to-end transit");
    checks++; if (n_overlap_checks == 0) fail("pulses never observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
