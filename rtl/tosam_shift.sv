// tosam_shift: shift unit.
//
// Scales the mantissa M (F fraction bits) by 2^(ka+kb) and drops the
// fraction, giving the integer approximate product 2^(ka+kb) * M. Fraction
// bits that remain below the binary point after the shift are truncated.
//
// Interface: m (MW bits), ka, kb (KW bits) -> p (PW bits, unsigned).
// Timing: purely combinational; a barrel shifter of MW+2^(KW+1) bits.
// Lint reports the low F bits of the internal shifted value as unused: they
// are the fraction that the unit discards by design.
module tosam_shift #(
  parameter int unsigned MW = 10,
  parameter int unsigned F  = 8,
  parameter int unsigned KW = 4,
  parameter int unsigned PW = 30
) (
  input  logic [MW-1:0] m,
  input  logic [KW-1:0] ka,
  input  logic [KW-1:0] kb,
  output logic [PW-1:0] p
);

  localparam int unsigned XW = PW + F;   // wide enough for the unscaled value

  logic [KW:0]   s;
  logic [XW-1:0] wide;

  always_comb begin
    s    = {1'b0, ka} + {1'b0, kb};
    wide = XW'(m) << s;
    p    = wide[XW-1:F];
  end

endmodule
