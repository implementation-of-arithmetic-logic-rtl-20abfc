// End-to-end, self-checking testbench of vedic_alu at its default width.
//
// First the reference example: data1 = 12, data2 = 8 must give 20, 4, 96
// and quotient 1 (remainder 4) for control codes 00, 01, 10 and 11. Then
// random operands and control codes, with operand shapes chosen so that
// every mechanism of the unit occurs: each of the four operations, a sum
// that wraps past 2^16, a subtraction with a negative (wrapped) result, a
// product truncated to 16 bits, a division by zero and a division with a
// non-zero remainder. Each is counted, and one that never occurred counts
// as a failure. Expected values are computed with the simulator's own
// operators. The unit is combinational, so each check waits 1 time unit;
// a time-based watchdog ends a hung run with a failure.
module tb_vedic_alu;
  import vedic_alu_pkg::*;

  localparam int unsigned W = ALU_WIDTH;

  int checks   = 0;
  int failures = 0;

  // How often each mechanism occurred.
  int n_op [4];
  int n_add_wrap, n_sub_neg, n_mul_trunc, n_div_zero, n_div_rem;

  logic [W-1:0] data1, data2, alu_out, rem_out;
  alu_op_e      control;

  vedic_alu dut (
    .data1  (data1),
    .data2  (data2),
    .control(control),
    .alu_out(alu_out),
    .rem_out(rem_out)
  );

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input alu_op_e op);
    logic [W-1:0]   exp_out, exp_rem;
    logic [2*W-1:0] full;
    data1 = x; data2 = y; control = op;
    #1;
    exp_rem = '0;
    full    = '0;
    case (op)
      OP_ADD: begin
        full    = (2*W)'(x) + (2*W)'(y);
        exp_out = full[W-1:0];
        if (full[W]) n_add_wrap++;
      end
      OP_SUB: begin
        exp_out = x - y;
        if (x < y) n_sub_neg++;
      end
      OP_MUL: begin
        full    = (2*W)'(x) * (2*W)'(y);
        exp_out = full[W-1:0];
        if (full[2*W-1:W] != 0) n_mul_trunc++;
      end
      default: begin
        if (y == 0) begin
          exp_out = '1;
          exp_rem = x;
          n_div_zero++;
        end else begin
          exp_out = x / y;
          exp_rem = x % y;
          if (exp_rem != 0) n_div_rem++;
        end
      end
    endcase
    n_op[op]++;
    checks++;
    if (alu_out !== exp_out || rem_out !== exp_rem) begin
      failures++;
      $display("FAIL op=%s %0d,%0d: got %0d/%0d exp %0d/%0d",
               op.name(), x, y, alu_out, rem_out, exp_out, exp_rem);
    end
  endtask

  task automatic need(input string what, input int count);
    $display("%-24s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
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
    n_op = '{default: 0};
    n_add_wrap = 0; n_sub_neg = 0; n_mul_trunc = 0; n_div_zero = 0; n_div_rem = 0;

    // Reference example.
    apply(W'(12), W'(8), OP_ADD);
    apply(W'(12), W'(8), OP_SUB);
    apply(W'(12), W'(8), OP_MUL);
    apply(W'(12), W'(8), OP_DIV);
    apply(W'(1345), W'(112), OP_DIV);
    apply(W'(54), W'(22), OP_SUB);
    apply(W'(100), W'(0), OP_DIV);

    for (int i = 0; i < 40000; i++) begin
      logic [W-1:0] x, y;
      x = W'($urandom);
      y = W'($urandom);
      case (i % 4)
        1: y = y >> ($urandom % W);     // small divisors, big quotients
        2: x = x >> ($urandom % W);     // small operands
        3: if ($urandom % 64 == 0) y = '0;
        default: ;
      endcase
      apply(x, y, alu_op_e'($urandom % 4));
    end

    need("addition", n_op[OP_ADD]);
    need("subtraction", n_op[OP_SUB]);
    need("multiplication", n_op[OP_MUL]);
    need("division", n_op[OP_DIV]);
    need("sum wrapped", n_add_wrap);
    need("negative difference", n_sub_neg);
    need("product truncated", n_mul_trunc);
    need("division by zero", n_div_zero);
    need("non-zero remainder", n_div_rem);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
