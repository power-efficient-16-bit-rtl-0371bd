// Self-checking testbench for pulse_latch.
//
// Drives the write pulse and the differential data pair and checks, against
// the expected latch behaviour, that the bit follows d while clk is high, is
// held while clk is low whatever d does, is held for a non-complementary pair,
// and that q_b is always the complement of q.
module tb_pulse_latch;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk, d, d_b, q, q_b;
  int checks = 0, failures = 0;
  logic expected;

  pulse_latch dut (.clk(clk), .d(d), .d_b(d_b), .q(q), .q_b(q_b));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp || q_b !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%b q_b=%b expected %b", what, q, q_b, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; d = 0; d_b = 1;
    #10 clk = 1; #10 clk = 0; #10;
    expected = 0;
    check(expected, "initial write 0");
    for (int i = 0; i < 200; i++) begin
      logic nd;
      nd = 1'($urandom);
      // Change data while closed: must hold.
      d = nd; d_b = ~nd; #10;
      check(expected, "hold while clk low");
      // Open: must follow.
      clk = 1; #10;
      expected = nd;
      check(expected, "transparent while clk high");
      // Still open: follow a second change.
      if (i % 3 == 0) begin
        d = ~nd; d_b = nd; #10;
        expected = ~nd;
        check(expected, "follow change during pulse");
      end
      clk = 0; #10;
      // Data change after close: hold.
      d = ~d; d_b = ~d_b; #10;
      check(expected, "hold after pulse");
      // Non-complementary pair while open: hold.
      if (i % 5 == 0) begin
        d = 1'($urandom); d_b = d; clk = 1; #10;
        check(expected, "equal pair does not write");
        clk = 0; #10;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
