// frac_comp_eff_op: effective operation and adder operand forming. The
// effective operation is a subtraction (s_eff = 1) when the sign of a, the
// sign of b and the operation select SOP together say the magnitudes must be
// subtracted: s_eff = s_a ^ s_b ^ sop. The significand in front is extended
// with three zero bits; the aligned significand is extended with its guard,
// round and sticky bits, giving two EXT_W-bit adder operands. Combinational.
// The inputs, outputs and the effective-operation rule follow the document;
// the operand extension is this design's choice.
module frac_comp_eff_op
  import fpa_pkg::*;
(
  input  logic [MANT_W-1:0] frac_a,   // significand of the larger operand
  input  logic [MANT_W-1:0] frac_b,   // aligned smaller significand
  input  logic [2:0]        grs_b,    // its guard, round, sticky bits
  input  logic              sop,      // 0: a + b, 1: a - b
  input  logic              s_a,
  input  logic              s_b,
  output logic [EXT_W-1:0]  frac_a1,
  output logic [EXT_W-1:0]  frac_b1,
  output logic              s_eff
);

  always_comb begin
    s_eff   = s_a ^ s_b ^ sop;
    frac_a1 = {frac_a, 3'b000};
    frac_b1 = {frac_b, grs_b};
  end

endmodule
