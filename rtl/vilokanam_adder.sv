// vilokanam_adder: N-bit binary adder following the Vilokanam ("by mere
// observation") rules of Vedic addition.
//
// The decimal rules are: add column by column, keep only the end (units)
// digit of each column, and decide by looking at the columns to the right
// whether a carry arrives, instead of waiting for it to ripple. In binary
// every column's end digit is p = a ^ b and its own carry condition
// (sum >= base) is g = a & b. The carry into each column is then found by
// observation of all columns to its right at once, using a log2(N)-level
// Kogge-Stone prefix network of (g, p) pairs, so no carry ripples. The last
// step adds each column's incoming carry to its end digit.
//
// The rules come from the reference design; the binary reading as a
// parallel-prefix lookahead is this design's own choice.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module vilokanam_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // The prefix network spans N+1 positions (carry-in included).
  localparam int unsigned LEVELS = $clog2(N + 1);

  // Column signals; column 0 of the prefix arrays is the carry-in, so a
  // column i of the operands is column i+1 of the prefix network.
  logic [N-1:0] end_digit;            // a ^ b: end digit before the carry
  logic [N:0]   g_lvl [LEVELS+1];     // group carry-generate per level
  logic [N:0]   p_lvl [LEVELS+1];     // group carry-propagate per level

  always_comb begin
    end_digit  = a ^ b;
    g_lvl[0]   = {a & b, cin};
    p_lvl[0]   = {a ^ b, 1'b0};
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i <= N; i++) begin
        if (i >= (1 << l)) begin
          g_lvl[l+1][i] = g_lvl[l][i] | (p_lvl[l][i] & g_lvl[l][i-(1<<l)]);
          p_lvl[l+1][i] = p_lvl[l][i] & p_lvl[l][i-(1<<l)];
        end else begin
          g_lvl[l+1][i] = g_lvl[l][i];
          p_lvl[l+1][i] = p_lvl[l][i];
        end
      end
    end
    // g_lvl[LEVELS][i] is the carry out of prefix column i, i.e. the carry
    // into operand column i.
    sum  = end_digit ^ g_lvl[LEVELS][N-1:0];
    cout = g_lvl[LEVELS][N];
  end

endmodule
