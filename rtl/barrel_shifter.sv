// barrel_shifter: alignment right shifter for the smaller significand. din is
// shifted right by shift_amt in log2 stages (1, 2, 4, 8, 16 positions). The
// first two bits shifted out below the LSB are the guard (g) and round (r)
// bits; every bit below them is ORed into the sticky bit (s), so the rounding
// step later sees whether anything non-zero was lost. Combinational.
// Shift by the exponent difference and the g / r outputs follow the document;
// the sticky output is this design's addition, needed for exact rounding.
module barrel_shifter #(
  parameter int unsigned W  = 24,
  parameter int unsigned SW = 5
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] shift_amt,
  output logic [W-1:0]  dout,
  output logic          g,
  output logic          r,
  output logic          s
);

  // Working word: data, then guard and round positions, then sticky.
  logic [W+2:0] stage [SW+1];
  logic [W+2:0] lost;   // mask of the bits a stage shifts out

  always_comb begin
    stage[0] = {din, 3'b000};
    for (int k = 0; k < SW; k++) begin
      lost = ((1 << k) >= W + 3) ? '1 : (((W+3)'(1) << (1 << k)) - 1'b1);
      if (shift_amt[k]) begin
        stage[k+1]    = stage[k] >> (1 << k);
        stage[k+1][0] = stage[k+1][0] | (|(stage[k] & lost));
      end else begin
        stage[k+1] = stage[k];
      end
    end
    dout = stage[SW][W+2:3];
    g    = stage[SW][2];
    r    = stage[SW][1];
    s    = stage[SW][0];
  end

endmodule
