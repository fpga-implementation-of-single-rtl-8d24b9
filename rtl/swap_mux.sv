// swap_mux: operand swap. When sign_d says exp_a < exp_b the operands are
// exchanged, so that exp_grt / man_grt always belong to the operand with the
// larger exponent and man_less to the one that must be aligned. With equal
// exponents operand a stays in front; a negative difference is corrected
// after the adder. The sign of the operand in front (sign_grt) is passed on
// for the result sign. Combinational.
// The swap on the exponent comparison follows the document; the sign output
// is this design's addition.
module swap_mux
  import fpa_pkg::*;
(
  input  logic [EXP_W-1:0]  exp_a,
  input  logic [EXP_W-1:0]  exp_b,
  input  logic [MANT_W-1:0] man_a,
  input  logic [MANT_W-1:0] man_b,
  input  logic              sign_a,
  input  logic              sign_b,   // sign of b after the operation select
  input  logic              sign_d,
  output logic [EXP_W-1:0]  exp_grt,
  output logic [MANT_W-1:0] man_grt,
  output logic [MANT_W-1:0] man_less,
  output logic              sign_grt
);

  always_comb begin
    if (sign_d) begin
      exp_grt  = exp_b;
      man_grt  = man_b;
      man_less = man_a;
      sign_grt = sign_b;
    end else begin
      exp_grt  = exp_a;
      man_grt  = man_a;
      man_less = man_b;
      sign_grt = sign_a;
    end
  end

endmodule
