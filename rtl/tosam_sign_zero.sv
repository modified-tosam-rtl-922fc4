// tosam_sign_zero: sign and zero detector unit.
//
// The product is forced to zero when either operand is exactly zero (the
// datapath cannot represent zero, since it always assumes a leading one).
// For SIGNED = 1 the unsigned product is negated when the operand signs
// differ; the exact two's complement negation used here is this
// implementation's choice, the published design only states that the sign
// is set from the operand signs. With SIGNED = 0 the unit reduces to the
// zero detector of the unsigned multiplier.
//
// Interface: a, b (N-bit operands), pmag (PW-bit unsigned product)
//            -> p (2N bits, two's complement when SIGNED).
// Timing: purely combinational.
module tosam_sign_zero #(
  parameter int unsigned N      = 16,
  parameter int unsigned PW     = 30,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [PW-1:0]  pmag,
  output logic [2*N-1:0] p
);

  logic zero, neg;

  always_comb begin
    zero = (a == '0) || (b == '0);
    neg  = SIGNED && (a[N-1] ^ b[N-1]);
    if (zero)     p = '0;
    else if (neg) p = -(2*N)'(pmag);
    else          p = (2*N)'(pmag);
  end

endmodule
