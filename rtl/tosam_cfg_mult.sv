// tosam_cfg_mult: signed accuracy-configurable TOSAM multiplier.
//
// The same datapath as tosam_mult (approximate absolute value, leading-one
// detector, truncation, arithmetic, shift, sign and zero), with the
// truncation and shift units sized for the largest mode, t = 9 and h = 5,
// and the arithmetic unit replaced by tosam_cfg_arith. The mode input picks
// TOSAM(0,2), TOSAM(2,6) or TOSAM(5,9) per operation, trading accuracy for
// switching energy. The modes and the sizing follow the published design;
// the operand width N = 16 is this implementation's choice, as none is given
// for the configurable structure.
//
// Interface: a, b (N-bit signed), mode -> p (2N-bit signed).
// Timing: purely combinational; mode may change with every operand pair.
module tosam_cfg_mult
  import tosam_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  tosam_mode_e    mode,
  output logic [2*N-1:0] p
);

  localparam int unsigned W  = N - 1;
  localparam int unsigned KW = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned MW = CFG_F + 2;
  localparam int unsigned PW = 2*W;

  logic [W-1:0]         mag_a, mag_b;
  logic [W-1:0]         oh_a, oh_b;
  logic [KW-1:0]        k_a, k_b;
  logic [CFG_T_MAX-1:0] yt_a, yt_b;
  logic [MW-1:0]        m;
  logic [PW-1:0]        pmag;

  tosam_abs_approx #(.N(N)) u_abs_a (.a(a), .mag(mag_a));
  tosam_abs_approx #(.N(N)) u_abs_b (.a(b), .mag(mag_b));

  tosam_lod #(.W(W)) u_lod_a (.i(mag_a), .onehot(oh_a), .k(k_a));
  tosam_lod #(.W(W)) u_lod_b (.i(mag_b), .onehot(oh_b), .k(k_b));

  tosam_trunc #(.W(W), .T(CFG_T_MAX)) u_trunc_a (.i(mag_a), .onehot(oh_a), .yt(yt_a));
  tosam_trunc #(.W(W), .T(CFG_T_MAX)) u_trunc_b (.i(mag_b), .onehot(oh_b), .yt(yt_b));

  tosam_cfg_arith u_arith (.mode(mode), .ya(yt_a), .yb(yt_b), .m(m));

  tosam_shift #(.MW(MW), .F(CFG_F), .KW(KW), .PW(PW)) u_shift (
    .m(m), .ka(k_a), .kb(k_b), .p(pmag)
  );

  tosam_sign_zero #(.N(N), .PW(PW), .SIGNED(1'b1)) u_sz (
    .a(a), .b(b), .pmag(pmag), .p(p)
  );

endmodule
