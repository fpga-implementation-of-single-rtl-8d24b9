// comp_add: two's complement adder. Computes x + y + seff over W+2 bits.
// For an effective addition y is the aligned operand and seff = 0; for an
// effective subtraction y is its one's complement and seff = 1 supplies the
// +1, so the adder forms x - y. A negative difference (only possible when the
// exponents are equal, so no bits were shifted out) is inverted and
// incremented to its magnitude and reported on neg. s is the W+1 bit
// magnitude; its top bit is the carry of an addition. Combinational.
// The two's complement add and the negation of a negative result follow the
// document; the carry-in use of seff is this design's reading of its ports.
module comp_add #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         seff,
  output logic [W:0]   s,
  output logic         neg
);

  logic [W+1:0] raw;   // sign, carry, W data bits

  always_comb begin
    // In a subtraction y is inverted: sign-extend it with ones.
    raw = {2'b00, x} + {{2{seff}}, y} + (W+2)'(seff);
    neg = seff & raw[W+1];
    s   = neg ? W'(0) - raw[W:0] : raw[W:0];
  end

endmodule
