// Self-checking testbench of vedic_addsub (16 bits).
//
// Drives the reference example 54 - 22 = 32, corner cases and random
// operands in both modes, and compares result and carry-out with a + b or
// a - b computed by the simulator. For subtraction cout must be 1 exactly
// when a >= b. A time-based watchdog ends a hung run with a failure.
module tb_vedic_addsub;

  int checks   = 0;
  int failures = 0;

  logic [15:0] a, b, r;
  logic        sub, cout;

  vedic_addsub #(.N(16)) dut (.a(a), .b(b), .sub(sub), .result(r), .cout(cout));

  task automatic check(input logic [15:0] x, input logic [15:0] y, input logic s);
    logic [16:0] exp;
    a = x; b = y; sub = s;
    #1;
    if (s) exp = {(x >= y), 16'(x - y)};
    else   exp = {1'b0, x} + {1'b0, y};
    checks++;
    if ({cout, r} !== exp) begin
      failures++;
      $display("FAIL %h %s %h: got %b_%h exp %h", x, s ? "-" : "+", y, cout, r, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd54, 16'd22, 1'b1);     // 54 - 22 = 32
    check(16'd54, 16'd22, 1'b0);
    check(16'd22, 16'd54, 1'b1);     // negative result wraps
    check(16'd0,  16'd1,  1'b1);
    check(16'hFFFF, 16'h0001, 1'b0); // carry out
    check(16'h1234, 16'h1234, 1'b1);
    for (int i = 0; i < 20000; i++) begin
      check(16'($urandom), 16'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
