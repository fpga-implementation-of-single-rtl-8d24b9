// lod: leading one detector / leading zero counter. Counts the zeros in
// front of the most significant 1 of fss (scanned from bit W-1 down). The
// count drives the left barrel shifter on the near path. With lod_sel low or
// an all-zero input the count is 0 (a zero result needs no shift).
// Combinational priority scan.
// The detector's role and its 5-bit count follow the document; the W-bit
// scan width (the data-carrying part of a 32-bit detector) is this design's.
module lod #(
  parameter int unsigned W  = 27,
  parameter int unsigned DW = 5
) (
  input  logic [W-1:0]  fss,
  input  logic          lod_sel,
  output logic [DW-1:0] d
);

  always_comb begin
    d = '0;
    if (lod_sel) begin
      for (int i = 0; i < W; i++) begin
        if (fss[i]) d = DW'(W - 1 - i);
      end
    end
  end

endmodule
