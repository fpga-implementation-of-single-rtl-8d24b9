// normaliser: far-path normalization and path selection. On the far path
// (effective addition, or exponent difference of two or more) the adder
// result is at most one position away from normal form, with the leading one
// expected at bit EXT_W-1 (bit 26):
//   - carry out (bit 27 set): shift right by one, keep the lost bit in the
//     sticky bit, exponent + 1;
//   - bit 26 set: already normal;
//   - otherwise, in a subtraction: shift left by one, exponent - 1;
//     in an addition of two denormals the value stays as it is (a denormal
//     or zero result, encoded later with exponent field 0).
// lod_sel = s_eff & ~far_sel chooses the near path, where the leading one
// detector and left barrel shifter normalize instead. Combinational.
// The one-bit right shift and the block's ports follow the document; the
// near/far split and the rule for lod_sel are this design's choice.
module normaliser
  import fpa_pkg::*;
(
  input  logic [EXP_W-1:0]  exp_grt,
  input  logic [EXT_W:0]    s,
  input  logic              far_sel,
  input  logic              s_eff,
  output logic [XEXP_W-1:0] exp_sum,
  output logic [EXT_W-1:0]  man_sum,
  output logic              lod_sel
);

  always_comb begin
    lod_sel = s_eff & ~far_sel;
    if (s[EXT_W]) begin
      man_sum = {s[EXT_W:2], s[1] | s[0]};
      exp_sum = XEXP_W'(exp_grt) + 1'b1;
    end else if (s[EXT_W-1] || !s_eff) begin
      man_sum = s[EXT_W-1:0];
      exp_sum = XEXP_W'(exp_grt);
    end else begin
      man_sum = {s[EXT_W-2:0], 1'b0};
      exp_sum = XEXP_W'(exp_grt) - 1'b1;
    end
  end

endmodule
