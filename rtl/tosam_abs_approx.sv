// tosam_abs_approx: approximate absolute value unit of the signed TOSAM
// multiplier.
//
// A negative two's complement operand has all its bits inverted (its one's
// complement, which is |a| - 1); a positive operand passes unchanged. This
// avoids the carry chain of an exact negation at the cost of an error of one
// unit for negative inputs, as the published design does. The sign bit is
// split off, so the magnitude is N-1 bits wide; the sign itself is used by
// the sign and zero unit.
//
// Interface: a (N-bit signed operand) -> mag (N-1 bits).
// Timing: purely combinational.
module tosam_abs_approx #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  output logic [N-2:0] mag
);

  assign mag = a[N-2:0] ^ {(N-1){a[N-1]}};

endmodule
