// inverter: conditional one's complement of the aligned operand. When the
// effective operation is a subtraction every bit of din is inverted; the +1
// that completes the two's complement enters the adder as its carry in.
// Otherwise din passes unchanged. Combinational.
// Inverting the smaller operand for a subtraction follows the document.
module inverter #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] din,
  input  logic         s_eff,
  output logic [W-1:0] dout
);

  always_comb dout = din ^ {W{s_eff}};

endmodule
