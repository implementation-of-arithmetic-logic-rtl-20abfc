// Self-checking testbench of urdhva_multiplier.
//
// A 16 x 16 instance gets corner cases (largest operands, single bits) and
// random operands; a 5 x 5 instance is checked exhaustively. The expected
// product is the simulator's own '*' on 32-bit values. A time-based
// watchdog ends a hung run with a failure.
module tb_urdhva_multiplier;

  int checks   = 0;
  int failures = 0;

  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;

  urdhva_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  urdhva_multiplier #(.N(5))  dut5  (.a(a5),  .b(b5),  .p(p5));

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] exp;
    a16 = x; b16 = y;
    #1;
    exp = 32'(x) * 32'(y);
    checks++;
    if (p16 !== exp) begin
      failures++;
      $display("FAIL16 %0d * %0d: got %0d exp %0d", x, y, p16, exp);
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
    check16(16'd12, 16'd8);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h8000, 16'h8000);
    check16(16'h0000, 16'hFFFF);
    check16(16'd1, 16'hABCD);
    for (int i = 0; i < 20000; i++) begin
      check16(16'($urandom), 16'($urandom));
    end
    for (int x = 0; x < 32; x++) begin
      for (int y = 0; y < 32; y++) begin
        a5 = 5'(x); b5 = 5'(y);
        #1;
        checks++;
        if (p5 !== 10'(x * y)) begin
          failures++;
          $display("FAIL5 %0d * %0d: got %0d", x, y, p5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
