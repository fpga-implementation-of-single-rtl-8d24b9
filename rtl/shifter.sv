// shifter: path decoder on the alignment shift amount. far_sel is 1 when the
// exponents differ by more than one. In that case the sum or difference of
// the aligned significands is off by at most one bit position from normal,
// and the normalizer needs no leading one detection. With a difference of 0
// or 1 an effective subtraction may cancel many leading bits and the leading
// one detector path is taken. Combinational: far_sel = (shift_amt[SW-1:1] != 0).
// The block's name and its only input follow the document; the decode itself
// is this design's reading of it.
module shifter #(
  parameter int unsigned SW = 5
) (
  input  logic [SW-1:0] shift_amt,
  output logic          far_sel
);

  always_comb far_sel = |shift_amt[SW-1:1];

endmodule
