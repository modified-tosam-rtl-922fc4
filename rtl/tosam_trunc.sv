// tosam_trunc: truncation unit.
//
// Produces (Y)t, the T bits immediately below the leading one of the
// operand: the fraction of the mantissa X = 1.Y, truncated to T bits. Output
// bit m (weight 2^(m-T)) is the OR over all positions j of
// onehot[j] & i[j+m-T]; input bits below bit 0 read as zero. The one-hot
// leading-one vector therefore acts as the select of a T-bit wide
// multiplexer, with no encoded shift amount needed.
//
// Interface: i (W bits), onehot (W bits, from tosam_lod) -> yt (T bits).
// Timing: purely combinational.
module tosam_trunc #(
  parameter int unsigned W = 15,
  parameter int unsigned T = 7
) (
  input  logic [W-1:0] i,
  input  logic [W-1:0] onehot,
  output logic [T-1:0] yt
);

  always_comb begin
    yt = '0;
    for (int m = 0; m < T; m++)
      for (int j = 0; j < W; j++)
        if (j + m >= T) yt[m] = yt[m] | (onehot[j] & i[j+m-T]);
  end

endmodule
