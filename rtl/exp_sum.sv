// exp_sum: exponent select and adjust. lod_sel picks the near-path or
// far-path exponent; the carry out of rounding adds one. A result whose
// rounded significand has no leading one (denormal or zero) gets exponent
// field 0. An exponent of 255 or more is an overflow: the field saturates
// to 255 and the caller forces the fraction to zero (infinity, as round to
// nearest even requires). Combinational.
// Exponent adjustment and the overflow check follow the document; the
// encoding details are IEEE 754.
module exp_sum
  import fpa_pkg::*;
(
  input  logic [XEXP_W-1:0] exp_far,
  input  logic [XEXP_W-1:0] exp_near,
  input  logic              lod_sel,
  input  logic              rnd_carry,
  input  logic              hidden,
  output logic [EXP_W-1:0]  exp_out,
  output logic              overflow
);

  logic [XEXP_W-1:0] e;

  always_comb begin
    e        = (lod_sel ? exp_near : exp_far) + XEXP_W'(rnd_carry);
    overflow = (e >= XEXP_W'(EXP_MAX));
    if (overflow)    exp_out = EXP_MAX;
    else if (hidden) exp_out = e[EXP_W-1:0];
    else             exp_out = '0;
  end

endmodule
