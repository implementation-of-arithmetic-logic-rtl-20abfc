// Self-checking testbench of vilokanam_adder.
//
// A 16-bit instance gets corner cases and random operands; a 6-bit instance
// is checked exhaustively (all a, b and carry-in). The expected sum and
// carry come from the simulator's own '+' on wider vectors. A time-based
// watchdog ends the run with a failure if the stimulus ever hangs.
module tb_vilokanam_adder;

  int checks   = 0;
  int failures = 0;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [5:0]  a6, b6, s6;
  logic        ci6, co6;

  vilokanam_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  vilokanam_adder #(.N(6))  dut6  (.a(a6),  .b(b6),  .cin(ci6),  .sum(s6),  .cout(co6));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] exp;
    a16 = x; b16 = y; ci16 = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      $display("FAIL16 %h + %h + %b: got %b_%h exp %h", x, y, c, co16, s16, exp);
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
    // Corner cases: full carry chain, no carries, alternating patterns.
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h5555, 16'hAAAA, 1'b1);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'd24,   16'd7,    1'b0);
    for (int i = 0; i < 20000; i++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    end
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        for (int c = 0; c < 2; c++) begin
          a6 = 6'(x); b6 = 6'(y); ci6 = 1'(c);
          #1;
          checks++;
          if ({co6, s6} !== 7'(x + y + c)) begin
            failures++;
            $display("FAIL6 %0d + %0d + %0d: got %0d", x, y, c, {co6, s6});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
