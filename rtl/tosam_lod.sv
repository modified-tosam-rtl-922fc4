// tosam_lod: leading-one detector unit.
//
// Bit i of the one-hot output is set when input bit i is one and every bit
// above it is zero:  onehot[i] = i[i] & ~|i[W-1:i+1].  At most one bit of
// onehot is set. The binary position k of that bit, the exponent of the
// operand, is then obtained with an OR-based one-hot-to-binary encoder (the
// published design uses a lookup table here and does not give it). For an
// all-zero input onehot is zero and k is 0.
//
// Interface: i (W bits) -> onehot (W bits), k ($clog2(W) bits).
// Timing: purely combinational.
module tosam_lod #(
  parameter int unsigned W  = 15,
  localparam int unsigned KW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  i,
  output logic [W-1:0]  onehot,
  output logic [KW-1:0] k
);

  // above[j]: some bit above position j is set
  logic [W-1:0] above;

  always_comb begin
    above[W-1] = 1'b0;
    for (int j = W - 2; j >= 0; j--) above[j] = above[j+1] | i[j+1];
    onehot = i & ~above;
  end

  // Encoder: bit b of k is the OR of the one-hot bits whose index has bit b set.
  always_comb begin
    k = '0;
    for (int j = 0; j < W; j++)
      for (int b = 0; b < KW; b++)
        if (((j >> b) & 1) == 1) k[b] = k[b] | onehot[j];
  end

endmodule
