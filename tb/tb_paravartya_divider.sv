// Self-checking testbench of paravartya_divider.
//
// A 16-bit instance gets the reference example 1345 / 112 (quotient 12,
// remainder 1), 12 / 8, corner cases, division by zero and random
// operands, including small divisors so that large quotients occur. A
// 6-bit instance is checked exhaustively. Expected values come from the
// simulator's '/' and '%'; division by zero must give an all-ones quotient
// and the dividend as remainder. A time-based watchdog ends a hung run with
// a failure.
module tb_paravartya_divider;

  int checks   = 0;
  int failures = 0;

  logic [15:0] n16, d16, q16, r16;
  logic [5:0]  n6, d6, q6, r6;

  paravartya_divider #(.N(16)) dut16 (.dividend(n16), .divisor(d16), .quotient(q16), .remainder(r16));
  paravartya_divider #(.N(6))  dut6  (.dividend(n6),  .divisor(d6),  .quotient(q6),  .remainder(r6));

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] eq, er;
    n16 = x; d16 = y;
    #1;
    if (y == 0) begin eq = '1; er = x; end
    else begin eq = x / y; er = x % y; end
    checks++;
    if (q16 !== eq || r16 !== er) begin
      failures++;
      $display("FAIL16 %0d / %0d: got q=%0d r=%0d exp q=%0d r=%0d", x, y, q16, r16, eq, er);
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
    check16(16'd1345, 16'd112);
    check16(16'd12, 16'd8);
    check16(16'hFFFF, 16'd1);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'd7, 16'd9);
    check16(16'h8000, 16'd3);
    check16(16'd100, 16'd0);
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] y;
      y = 16'($urandom);
      if (i % 2 == 0) y = y >> ($urandom % 16);
      check16(16'($urandom), y);
    end
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        logic [5:0] eq, er;
        n6 = 6'(x); d6 = 6'(y);
        #1;
        if (y == 0) begin eq = '1; er = 6'(x); end
        else begin eq = 6'(x / y); er = 6'(x % y); end
        checks++;
        if (q6 !== eq || r6 !== er) begin
          failures++;
          $display("FAIL6 %0d / %0d: got q=%0d r=%0d", x, y, q6, r6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
