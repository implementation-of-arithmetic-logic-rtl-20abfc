// vedic_addsub: N-bit adder/subtractor built around the Vilokanam adder.
//
// With sub = 0 the operands are added. With sub = 1 the adder receives the
// one's complement of b and a carry-in of 1, which adds the two's
// complement of b and so computes a - b modulo 2^N. This is the
// XOR-controlled adder/subtractor of the reference design, whose control
// bit C(0) selects addition (0) or subtraction (1).
//
// Interface: a, b, sub in; result, cout out. For subtraction cout = 1 means
// a >= b (no borrow). Purely combinational.
module vedic_addsub #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] result,
  output logic         cout
);

  logic [N-1:0] b_eff;

  always_comb b_eff = b ^ {N{sub}};

  vilokanam_adder #(.N(N)) u_adder (
    .a   (a),
    .b   (b_eff),
    .cin (sub),
    .sum (result),
    .cout(cout)
  );

endmodule
