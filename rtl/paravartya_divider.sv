// paravartya_divider: N-bit unsigned divider after the Paravartya Yojayet
// ("transpose and apply") method.
//
// In the decimal method the leading digit of the divisor is set aside, the
// remaining digits are transposed (negated), and each quotient digit, read
// off the leading column of the running dividend, is multiplied by the
// transposed digits and added to the columns to its right. Quotient digits
// may become negative, and the result is corrected at the end.
//
// In binary this is done one quotient digit per stage, with the running
// remainder kept as a signed number so that the digits stay bounded:
//   * each stage brings down the next dividend bit, then, read off the sign
//     (leading digit) of the running remainder, applies the transposed
//     divisor (its two's complement) when the remainder is non-negative or
//     the divisor itself when it is negative;
//   * the quotient digit of a stage is 1 when the remainder it leaves is
//     non-negative; a negative remainder is carried on unrestored and the
//     next stage makes up for it by applying the divisor instead;
//   * after the last stage one correction step adds the divisor back to a
//     negative remainder.
// This binary form (which coincides with non-restoring division) is this
// design's own choice; the reference design gives the method only as a
// decimal example. Division by zero, which the reference design does not
// cover, returns an all-ones quotient and the dividend as remainder.
//
// Interface: dividend, divisor in; quotient, remainder out. Purely
// combinational: N add/subtract stages plus one correction adder.
module paravartya_divider #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic [N-1:0] quotient,
  output logic [N-1:0] remainder
);

  // The running remainder stays within (-divisor, divisor) at every stage,
  // so N+1 bits plus sign are enough.
  localparam int unsigned RW = N + 2;

  logic signed [RW-1:0] rem_stage [N+1];  // running (partial) remainder
  logic signed [RW-1:0] dvs;              // divisor, sign-extended
  logic        [N-1:0]  digit_pos;        // quotient digit of each stage
  logic        [N-1:0]  rem_fix;          // corrected remainder, < divisor

  always_comb begin
    dvs          = signed'(RW'(divisor));
    rem_stage[0] = '0;
    for (int s = 0; s < N; s++) begin
      // Bring down the next dividend digit (right shift of the divisor
      // relative to the dividend), then apply the transposed divisor or
      // the divisor depending on the sign of the running remainder.
      logic signed [RW-1:0] brought;
      brought = (rem_stage[s] <<< 1) | RW'(dividend[N-1-s]);
      if (rem_stage[s] >= 0) begin
        rem_stage[s+1] = brought + (-dvs);
      end else begin
        rem_stage[s+1] = brought + dvs;
      end
      digit_pos[N-1-s] = (rem_stage[s+1] >= 0);
    end
    // Final correction: a negative remainder gets the divisor added back.
    // The quotient digits need no correction in this form.
    rem_fix = N'(rem_stage[N]);
    if (rem_stage[N] < 0) begin
      rem_fix = N'(rem_stage[N] + dvs);
    end
    if (divisor == '0) begin
      quotient  = '1;
      remainder = dividend;
    end else begin
      quotient  = digit_pos;
      remainder = rem_fix;
    end
  end

  // After the correction step the remainder must be below the divisor.
  always_comb begin
    if (divisor != '0) begin
      assert (rem_fix < divisor)
        else $error("remainder %0d not below divisor %0d", rem_fix, divisor);
    end
  end

endmodule
