// exp_diff: exponent difference unit. Subtracts the two (effective) biased
// exponents with one EW+1 bit subtraction. The sign of the difference (sign_d,
// 1 when exp_a < exp_b) steers the swap multiplexer; the magnitude, saturated
// to the SW-bit range of the alignment shifter, is the shift amount. big_num
// flags a difference larger than the shifter can express, in which case the
// smaller operand only contributes to the sticky bit. Combinational.
// The 8-bit subtraction and the 5-bit shift amount follow the document; the
// saturation and the meaning of big_num are this design's choice.
module exp_diff #(
  parameter int unsigned EW = 8,
  parameter int unsigned SW = 5
) (
  input  logic [EW-1:0] exp_a,
  input  logic [EW-1:0] exp_b,
  output logic [SW-1:0] shift_amt,
  output logic          sign_d,
  output logic          big_num
);

  logic [EW:0]   diff;
  logic [EW-1:0] mag;

  always_comb begin
    diff      = {1'b0, exp_a} - {1'b0, exp_b};
    sign_d    = diff[EW];
    mag       = sign_d ? (exp_b - exp_a) : diff[EW-1:0];
    big_num   = (mag > EW'((1 << SW) - 1));
    shift_amt = big_num ? '1 : mag[SW-1:0];
  end

endmodule
