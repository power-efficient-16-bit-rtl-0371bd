// Self-checking testbench for delayed_clock_pulse_gen.
//
// Runs a 1 ns clock and checks for every rising edge: exactly one pulse on
// each output, in the order T, CP4, CP3, CP2, CP1, each starting
// k * (DELAY_PS + 2*INV_PS) after the clock edge, DELAY_PS + INV_PS wide, and
// never two pulses high at the same time.
module tb_delayed_clock_pulse_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SUB_WIDTH = 4;
  localparam int unsigned DELAY_PS  = 100;
  localparam int unsigned INV_PS    = 10;
  localparam int unsigned STEP      = DELAY_PS + 2 * INV_PS;
  localparam int unsigned WIDTH     = DELAY_PS + INV_PS;
  localparam int unsigned PERIOD    = 1000;
  localparam int unsigned CYCLES    = 100;

  logic clk = 0;
  logic [SUB_WIDTH:1] cp;
  logic t;
  int checks = 0, failures = 0;
  time t_clk_rise;
  // all[0] = T, all[k] = CP<SUB_WIDTH+1-k>: the expected firing order.
  logic [SUB_WIDTH:0] all;
  int count [SUB_WIDTH+1];
  time rise_at [SUB_WIDTH+1];

  delayed_clock_pulse_gen #(.SUB_WIDTH(SUB_WIDTH), .DELAY_PS(DELAY_PS), .INV_PS(INV_PS)) dut (
    .clk(clk), .cp(cp), .t(t));

  always_comb begin
    all[0] = t;
    for (int k = 1; k <= SUB_WIDTH; k++) all[k] = cp[SUB_WIDTH+1-k];
  end

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  always @(posedge clk) t_clk_rise = $time;

  for (genvar k = 0; k <= SUB_WIDTH; k++) begin : g_mon
    always @(posedge all[k]) if ($time > 0) begin
      count[k]++;
      rise_at[k] = $time;
      checks++;
      if ($time - t_clk_rise != k * STEP) fail($sformatf("pulse %0d starts %0t after clock", k, $time - t_clk_rise));
    end
    always @(negedge all[k]) if ($time > 0) begin
      checks++;
      if ($time - rise_at[k] != time'(WIDTH)) fail($sformatf("pulse %0d width", k));
    end
  end

  // Overlap monitor, evaluated on every change of any pulse.
  always @(all) if ($time > 0) begin
    checks++;
    if (!$onehot0(all)) fail($sformatf("overlapping pulses %b", all));
  end

  initial begin
    #(PERIOD * (CYCLES + 100));
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= SUB_WIDTH; k++) count[k] = 0;
    #(PERIOD);
    repeat (CYCLES) begin
      clk = 1; #(PERIOD / 2);
      clk = 0; #(PERIOD / 2);
    end
    #(PERIOD);
    for (int k = 0; k <= SUB_WIDTH; k++) begin
      checks++;
      if (count[k] != CYCLES) fail($sformatf("pulse %0d fired %0d times", k, count[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
