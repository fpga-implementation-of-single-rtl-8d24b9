// barrel_shifter_left: near-path normalization. Shifts the adder result left
// by the leading zero count (shift_amt) so that its leading one lands at bit
// EXT_W-1, and lowers the exponent of the larger operand by the same amount.
// The shift is limited to exp_grt - 1 so that the exponent never drops below
// the denormal exponent 1: a result too small for a normal number comes out
// as a denormal (leading bit 0), which is exact. Shifting is done in log2
// stages. Combinational.
// Left shift by the detector count and the exponent adjustment follow the
// document; the limit for denormal results is this design's choice.
module barrel_shifter_left
  import fpa_pkg::*;
(
  input  logic [EXP_W-1:0]   exp_grt,
  input  logic [EXT_W-1:0]   din,
  input  logic [SHAMT_W-1:0] shift_amt,
  output logic [XEXP_W-1:0]  exp_sum,
  output logic [EXT_W-1:0]   man_sft
);

  logic [EXP_W-1:0]   room;   // largest shift that keeps the exponent >= 1
  logic [SHAMT_W-1:0] sh;

  always_comb begin
    room = exp_grt - 1'b1;
    sh   = (EXP_W'(shift_amt) > room) ? room[SHAMT_W-1:0] : shift_amt;
    man_sft = din;
    for (int k = 0; k < SHAMT_W; k++) begin
      if (sh[k]) man_sft = man_sft << (1 << k);
    end
    exp_sum = XEXP_W'(exp_grt) - XEXP_W'(sh);
  end

endmodule
