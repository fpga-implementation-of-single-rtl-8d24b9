// man_sum: significand select and rounding. lod_sel picks the near-path
// (left barrel shifter) or far-path (normalizer) significand, both 27 bits
// with the leading one at bit 26 and guard, round, sticky at bits 2..0.
// Round to nearest, ties to even: add 1 at the LSB when the guard bit is set
// and the round bit, sticky bit or LSB is set. A carry out of this rounding
// adder means the significand became 10.00...0: the fraction is then all
// zeros and rnd_carry tells the exponent path to add one. inexact reports
// any non-zero g, r, s. Combinational.
// The selection and rounding to nearest even follow the document; the
// placement of rounding in this block is this design's choice.
module man_sum
  import fpa_pkg::*;
(
  input  logic [EXT_W-1:0]  man_far,
  input  logic [EXT_W-1:0]  man_near,
  input  logic              lod_sel,
  output logic [FRAC_W-1:0] frac,
  output logic              hidden,
  output logic              rnd_carry,
  output logic              inexact
);

  logic [EXT_W-1:0]  m;
  logic              up;
  logic [MANT_W:0]   rounded;

  always_comb begin
    m         = lod_sel ? man_near : man_far;
    up        = m[2] & (m[1] | m[0] | m[3]);
    rounded   = {1'b0, m[EXT_W-1:3]} + (MANT_W+1)'(up);
    rnd_carry = rounded[MANT_W];
    hidden    = rounded[MANT_W] | rounded[MANT_W-1];
    frac      = rounded[FRAC_W-1:0];
    inexact   = |m[2:0];
  end

endmodule
