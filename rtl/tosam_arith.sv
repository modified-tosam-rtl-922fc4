// tosam_arith: arithmetic unit of TOSAM(H,T).
//
// Computes the mantissa of the approximate product
//     M = 1 + (YA)t + (YB)t + (YA)APX * (YB)APX
// where (Y)t are the T truncated fraction bits of each operand and (Y)APX is
// formed by keeping the H most significant bits of (Y)t and appending a 1.
// Appending the 1 rounds each operand to the middle of its 1/2^H segment,
// which centres the error around zero. (Y)APX needs no logic: it is wiring
// plus a constant one. Only the small (H+1)x(H+1) product is a real
// multiplier; the two T-bit terms are plain addends.
//
// The result is fixed point with 2 integer bits and F = max(T, 2H+2)
// fraction bits; the APX product is kept to full precision. The reduction
// tree is left to synthesis.
//
// Interface: ya, yb (T bits, MSB weight 1/2) -> m (F+2 bits).
// Timing: purely combinational. Requires H <= T.
module tosam_arith #(
  parameter int unsigned T = 7,
  parameter int unsigned H = 3,
  localparam int unsigned F  = (T > 2*H+2) ? T : 2*H+2,
  localparam int unsigned MW = F + 2
) (
  input  logic [T-1:0]  ya,
  input  logic [T-1:0]  yb,
  output logic [MW-1:0] m
);

  logic [H:0]      apx_a, apx_b;   // (Y)APX, H+1 bits, MSB weight 1/2
  logic [2*H+1:0]  prod;           // 2H+2 fraction bits

  if (H == 0) begin : g_h0
    assign apx_a = 1'b1;
    assign apx_b = 1'b1;
  end else begin : g_h
    assign apx_a = {ya[T-1 -: H], 1'b1};
    assign apx_b = {yb[T-1 -: H], 1'b1};
  end

  always_comb begin
    prod = apx_a * apx_b;
    m    = (MW'(1) << F)
         + (MW'(ya) << (F - T))
         + (MW'(yb) << (F - T))
         + (MW'(prod) << (F - 2*H - 2));
  end

  initial assert (H <= T) else $error("tosam_arith: H must not exceed T");

endmodule
