// Self-checking testbench for sub_shift_register.
//
// Plays the pulse generator: for each shift it fires t, then cp[4] .. cp[1],
// each as a separate, non-overlapping pulse, with a new random serial bit on
// d / d_b. A reference model shifts the same bits; after every sequence q and
// tmp must match it (q[1] = new input, q[k] = old q[k-1], tmp = old q[4]).
module tb_sub_shift_register;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 4;

  logic d = 0;
  logic d_b;
  logic [WIDTH:1] cp = '0;
  logic t = 0;
  logic [WIDTH:1] q;
  logic tmp, tmp_b;
  logic [WIDTH:1] model_q;
  logic model_t;
  int checks = 0, failures = 0;

  assign d_b = ~d;

  sub_shift_register #(.WIDTH(WIDTH)) dut (
    .d(d), .d_b(d_b), .cp(cp), .t(t), .q(q), .tmp(tmp), .tmp_b(tmp_b));

  task automatic shift(input logic bit_in);
    d = bit_in; #20;
    t = 1; #50; t = 0; #10;
    for (int k = WIDTH; k >= 1; k--) begin
      cp[k] = 1; #50; cp[k] = 0; #10;
    end
    model_t = model_q[WIDTH];
    model_q = {model_q[WIDTH-1:1], bit_in};
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_q = '0; model_t = 0;
    // Flush: WIDTH + 1 shifts of zero make the contents known.
    repeat (WIDTH + 1) shift(1'b0);
    for (int i = 0; i < 300; i++) begin
      shift(1'($urandom));
      checks++;
      if (q !== model_q || tmp !== model_t || tmp_b !== ~model_t) begin
        failures++;
        $display("FAIL shift %0d: q=%b tmp=%b expected q=%b tmp=%b", i, q, tmp, model_q, model_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
