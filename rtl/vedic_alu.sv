// vedic_alu: W-bit combinational arithmetic unit whose four operations are
// each built on a Vedic mathematics method.
//
//   control  operation       unit
//   00       data1 + data2   vedic_addsub (Vilokanam adder), sub = 0
//   01       data1 - data2   vedic_addsub, sub = 1 (two's complement)
//   10       data1 * data2   urdhva_multiplier, low W bits of the product
//   11       data1 / data2   paravartya_divider, quotient
//
// All units see the same operands and work in parallel; the control code
// selects which result drives alu_out. The operation set, the control code
// and the 16-bit width follow the reference design. The separate remainder
// output rem_out (zero unless control = 11) is this design's own addition;
// the reference design shows a remainder only in its division example.
// Operands are unsigned. The result of a multiplication is truncated to W
// bits, like the reference design's single W-bit output.
//
// The carry out of the adder/subtractor and the upper W product bits are
// left unused, because the output port is W bits wide and carries no flags.
//
// Interface: data1, data2, control in; alu_out, rem_out out. There is no
// clock: the result is valid one combinational delay after the inputs.
module vedic_alu
  import vedic_alu_pkg::*;
#(
  parameter int unsigned W = ALU_WIDTH
) (
  input  logic [W-1:0] data1,
  input  logic [W-1:0] data2,
  input  alu_op_e      control,
  output logic [W-1:0] alu_out,
  output logic [W-1:0] rem_out
);

  logic [W-1:0]   addsub_res;
  logic           addsub_cout;
  logic [2*W-1:0] product;
  logic [W-1:0]   quotient;
  logic [W-1:0]   remainder;

  vedic_addsub #(.N(W)) u_addsub (
    .a     (data1),
    .b     (data2),
    .sub   (control == OP_SUB),
    .result(addsub_res),
    .cout  (addsub_cout)
  );

  urdhva_multiplier #(.N(W)) u_mult (
    .a(data1),
    .b(data2),
    .p(product)
  );

  paravartya_divider #(.N(W)) u_div (
    .dividend (data1),
    .divisor  (data2),
    .quotient (quotient),
    .remainder(remainder)
  );

  always_comb begin
    rem_out = '0;
    unique case (control)
      OP_ADD, OP_SUB: alu_out = addsub_res;
      OP_MUL:         alu_out = product[W-1:0];
      OP_DIV: begin
        alu_out = quotient;
        rem_out = remainder;
      end
      default:        alu_out = '0;
    endcase
  end

endmodule
