// tosam_top: the two TOSAM multipliers side by side.
//
// u_fixed is the signed TOSAM(H,T) multiplier of the main configuration
// (16-bit, h = 3, t = 7). u_cfg is the signed accuracy-configurable multiplier
// with run-time modes T2, T6 and T9. They share no signals; each has its own
// operand, mode and product ports. Both are purely combinational.
module tosam_top
  import tosam_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned H     = 3,
  parameter int unsigned T     = 7,
  parameter int unsigned CFG_N = 16
) (
  input  logic [N-1:0]       a,
  input  logic [N-1:0]       b,
  output logic [2*N-1:0]     p,
  input  logic [CFG_N-1:0]   cfg_a,
  input  logic [CFG_N-1:0]   cfg_b,
  input  tosam_mode_e        cfg_mode,
  output logic [2*CFG_N-1:0] cfg_p
);

  tosam_mult #(.N(N), .H(H), .T(T), .SIGNED(1'b1)) u_fixed (
    .a(a), .b(b), .p(p)
  );

  tosam_cfg_mult #(.N(CFG_N)) u_cfg (
    .a(cfg_a), .b(cfg_b), .mode(cfg_mode), .p(cfg_p)
  );

endmodule
