// Self-checking testbench for clock_pulse_circuit.
//
// Applies a 1 ns clock (and some irregular high/low phases) and checks that
// each rising edge of clk_in gives exactly one pulse, DELAY_PS + INV_PS wide,
// that falling edges give none, and that clk_out is clk_in delayed by
// DELAY_PS + 2*INV_PS.
module tb_clock_pulse_circuit;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DELAY_PS = 100;
  localparam int unsigned INV_PS   = 10;
  localparam int unsigned WIDTH    = DELAY_PS + INV_PS;
  localparam int unsigned LAG      = DELAY_PS + 2 * INV_PS;

  logic clk_in = 0, pulse, clk_out;
  int checks = 0, failures = 0;
  int rises_in = 0, pulses_seen = 0;
  time t_in_rise, t_in_fall, t_p_rise;

  clock_pulse_circuit #(.DELAY_PS(DELAY_PS), .INV_PS(INV_PS)) dut (
    .clk_in(clk_in), .pulse(pulse), .clk_out(clk_out));

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  always @(posedge clk_in) begin rises_in++; t_in_rise = $time; end
  always @(negedge clk_in) t_in_fall = $time;

  always @(posedge pulse) if ($time > 0) begin
    pulses_seen++;
    t_p_rise = $time;
    checks++;
    if ($time != t_in_rise) fail("pulse does not start at clock rise");
  end
  always @(negedge pulse) if ($time > 0) begin
    checks++;
    if ($time - t_p_rise != WIDTH) fail($sformatf("pulse width %0t", $time - t_p_rise));
  end
  always @(posedge clk_out) if ($time > 0) begin
    checks++;
    if ($time - t_in_rise != LAG) fail("clk_out rise lag");
  end
  always @(negedge clk_out) if ($time > 0) begin
    checks++;
    if ($time - t_in_fall != LAG) fail("clk_out fall lag");
  end

  initial begin
    #10000000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int i = 0; i < 100; i++) begin
      int hi, lo;
      hi = (i % 4 == 0) ? 500 : 200 + 2 * int'($urandom_range(0, 200));
      lo = (i % 4 == 1) ? 500 : 200 + 2 * int'($urandom_range(0, 200));
      clk_in = 1; #(hi);
      clk_in = 0; #(lo);
    end
    #1000;
    checks++;
    if (pulses_seen != rises_in) fail($sformatf("%0d pulses for %0d rises", pulses_seen, rises_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
