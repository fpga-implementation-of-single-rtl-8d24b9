// fp_special: classifies one binary32 operand and unpacks it for the adder.
// The exponent and fraction fields are tested for all-zeros / all-ones and
// the operand is labelled zero, denormal, normal, infinity or NaN. A denormal
// (or zero) gets hidden bit 0 and an effective exponent of 1, so that it lines
// up with the smallest normal exponent; a normal number gets hidden bit 1.
// Purely combinational.
// Setting the implicit bit from the denormal test and extending the fraction
// to 24 bits follow the algorithm; the effective exponent of 1 for denormals
// is this design's choice.
module fp_special
  import fpa_pkg::*;
(
  input  fp32_t               x,
  output fp_class_t           cls,
  output logic [MANT_W-1:0]   mant,     // hidden bit & fraction
  output logic [EXP_W-1:0]    exp_eff   // biased exponent, 1 for zero/denormal
);

  always_comb begin
    cls.exp_zero  = (x.exp == '0);
    cls.exp_ones  = (x.exp == EXP_MAX);
    cls.frac_zero = (x.frac == '0);
    cls.is_zero   = cls.exp_zero &  cls.frac_zero;
    cls.is_denorm = cls.exp_zero & ~cls.frac_zero;
    cls.is_norm   = ~cls.exp_zero & ~cls.exp_ones;
    cls.is_inf    = cls.exp_ones &  cls.frac_zero;
    cls.is_nan    = cls.exp_ones & ~cls.frac_zero;
    mant          = {~cls.exp_zero, x.frac};
    exp_eff       = cls.exp_zero ? EXP_W'(1) : x.exp;
  end

endmodule
