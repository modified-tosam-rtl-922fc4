// tosam_mult: TOSAM(H,T) truncation-and-rounding approximate multiplier.
//
// Every non-zero magnitude is written as 2^k * (1 + Y) with k the position
// of its leading one and 0 <= Y < 1. The product is approximated as
//     A*B ~ 2^(kA+kB) * (1 + (YA)t + (YB)t + (YA)APX * (YB)APX)
// with (Y)t the T bits below the leading one and (Y)APX the top H of those
// bits with a 1 appended (rounding to the segment centre). Only an
// (H+1)x(H+1) multiplier is needed whatever the operand width N, which is
// what makes the scheme scale.
//
// Datapath (one unit per stage, as in the published block diagram):
//   approximate absolute value (signed only) -> leading-one detector ->
//   truncation -> arithmetic unit -> shift by kA+kB -> sign and zero.
// With SIGNED = 0 the absolute units are omitted and the last stage only
// zeroes the result for a zero operand.
//
// Defaults N = 16, H = 3, T = 7 are the published main example; for instance
// 11761 * 2482 gives 28901376 (exact 29190802). Port p is 2N bits, two's
// complement when SIGNED. Timing: purely combinational, no clock.
module tosam_mult #(
  parameter int unsigned N      = 16,
  parameter int unsigned H      = 3,
  parameter int unsigned T      = 7,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned W  = SIGNED ? N - 1 : N;      // magnitude width
  localparam int unsigned KW = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned F  = (T > 2*H+2) ? T : 2*H+2;
  localparam int unsigned MW = F + 2;
  localparam int unsigned PW = 2*W;

  logic [W-1:0]  mag_a, mag_b;
  logic [W-1:0]  oh_a, oh_b;
  logic [KW-1:0] k_a, k_b;
  logic [T-1:0]  yt_a, yt_b;
  logic [MW-1:0] m;
  logic [PW-1:0] pmag;

  if (SIGNED) begin : g_abs
      tosam_abs_approx #(.N(N)) u_abs_a (.a(a), .mag(mag_a));
    tosam_abs_approx #(.N(N)) u_abs_b (.a(b), .mag(mag_b));
  end else begin : g_noabs
    assign mag_a = a;
    assign mag_b = b;
  end

  tosam_lod #(.W(W)) u_lod_a (.i(mag_a), .onehot(oh_a), .k(k_a));
  tosam_lod #(.W(W)) u_lod_b (.i(mag_b), .onehot(oh_b), .k(k_b));

  tosam_trunc #(.W(W), .T(T)) u_trunc_a (.i(mag_a), .onehot(oh_a), .yt(yt_a));
  tosam_trunc #(.W(W), .T(T)) u_trunc_b (.i(mag_b), .onehot(oh_b), .yt(yt_b));

  tosam_arith #(.T(T), .H(H)) u_arith (.ya(yt_a), .yb(yt_b), .m(m));

  tosam_shift #(.MW(MW), .F(F), .KW(KW), .PW(PW)) u_shift (
    .m(m), .ka(k_a), .kb(k_b), .p(pmag)
  );

  tosam_sign_zero #(.N(N), .PW(PW), .SIGNED(SIGNED)) u_sz (
    .a(a), .b(b), .pmag(pmag), .p(p)
  );

endmodule
