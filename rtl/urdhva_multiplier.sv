// urdhva_multiplier: N x N unsigned multiplier using the Urdhva-Tiryakbhyam
// ("vertically and crosswise") method.
//
// In the decimal method for two 2-digit numbers, the units digits are
// multiplied (vertical), the two crosswise products are added, and the tens
// digits are multiplied (vertical); each result is placed one column to the
// left of the previous one, and anything above one digit is carried left.
// Generalised to N binary digits, column k collects every crosswise bit
// product a[i] & b[k-i]. All 2N-1 column sums are formed at the same time,
// independently of each other. A final pass places each column: the column
// sum plus the carry from the column to its right gives one product bit
// (the end digit) and a carry into the next column.
//
// The vertical-and-crosswise column structure follows the reference
// design; the generalisation to N bits and the single carry-placement pass
// are this design's own choices.
//
// Interface: a, b in; p (2N bits, full product) out. Purely combinational.
module urdhva_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // A column sum is at most N, the carry into a column at most N-1, so the
  // column total fits in CW bits.
  localparam int unsigned CW = $clog2(2 * N + 1);

  logic [CW-1:0] col_sum [2*N-1];   // crosswise sum of column k
  logic [CW-1:0] carry   [2*N];     // carry into column k
  logic [CW-1:0] total;

  // Vertical and crosswise products of every column, all in parallel.
  always_comb begin
    for (int k = 0; k < 2 * N - 1; k++) begin
      col_sum[k] = '0;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N) begin
          col_sum[k] = col_sum[k] + CW'(a[i] & b[k-i]);
        end
      end
    end
  end

  // Place each column's end digit and pass the rest on to the left.
  always_comb begin
    carry[0] = '0;
    total    = '0;
    for (int k = 0; k < 2 * N - 1; k++) begin
      total      = col_sum[k] + carry[k];
      p[k]       = total[0];
      carry[k+1] = total >> 1;
    end
    p[2*N-1] = carry[2*N-1][0];
  end

  // The carry out of the last column is the top product bit: it can never
  // exceed 1, since the product fits in 2N bits.
  always_comb begin
    assert (carry[2*N-1] <= CW'(1))
      else $error("final column carry %0d exceeds one bit", carry[2*N-1]);
  end

endmodule
