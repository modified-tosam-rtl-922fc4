// tosam_cfg_arith: arithmetic unit of the accuracy-configurable TOSAM.
//
// One unit, built for the largest mode (t = 9, h = 5), evaluates
//     M = 1 + (YA)t + (YB)t + (YA)APX * (YB)APX
// for the mode selected at run time:
//   MODE_T2 = TOSAM(0,2): 2 fraction bits of each operand, (Y)APX = 0.1
//   MODE_T6 = TOSAM(2,6): 6 fraction bits, (Y)APX = top 2 bits then a 1
//   MODE_T9 = TOSAM(5,9): 9 fraction bits, (Y)APX = top 5 bits then a 1
// Operand bits a mode does not use are forced to zero (in silicon these
// inputs are isolated and the adders behind them power-gated). The rounding
// bit of (Y)APX sits at a mode-dependent position and is set by OR-ing that
// bit with its mode signal. As in the published design, the 10 (T2) or 6
// (T6) least significant result bits are forced to zero. The encoding 2'd3
// is not a defined mode and behaves as MODE_T9 (this implementation's
// choice). The published reduction levels and the 9-bit final adder are
// left to synthesis: the sum below is their functional equivalent.
//
// Interface: mode, ya, yb (9 bits, MSB weight 1/2) -> m (14 bits:
// 2 integer bits, 12 fraction bits). Timing: purely combinational.
module tosam_cfg_arith
  import tosam_pkg::*;
(
  input  tosam_mode_e          mode,
  input  logic [CFG_T_MAX-1:0] ya,
  input  logic [CFG_T_MAX-1:0] yb,
  output logic [CFG_F+1:0]     m
);

  localparam int unsigned MW = CFG_F + 2;
  localparam int unsigned AW = CFG_H_MAX + 1;     // width of (Y)APX

  logic [CFG_T_MAX-1:0] tmask;    // (Y)t bits kept
  logic [AW-1:0]        hmask;    // (Y)APX bits taken from (Y)t
  logic [AW-1:0]        rbit;     // rounding one of (Y)APX
  logic [MW-1:0]        lsb_keep; // result bits not forced to zero
  logic [CFG_T_MAX-1:0] ya_t, yb_t;
  logic [AW-1:0]        apx_a, apx_b;
  logic [2*AW-1:0]      prod;
  logic [MW-1:0]        sum;

  always_comb begin
    unique case (mode)
      MODE_T2: begin
        tmask    = 9'b110_000_000;
        hmask    = 6'b000_000;
        rbit     = 6'b100_000;
        lsb_keep = {{(MW-10){1'b1}}, 10'b0};
      end
      MODE_T6: begin
        tmask    = 9'b111_111_000;
        hmask    = 6'b110_000;
        rbit     = 6'b001_000;
        lsb_keep = {{(MW-6){1'b1}}, 6'b0};
      end
      default: begin
        tmask    = 9'b111_111_111;
        hmask    = 6'b111_110;
        rbit     = 6'b000_001;
        lsb_keep = '1;
      end
    endcase
  end

  always_comb begin
    ya_t  = ya & tmask;
    yb_t  = yb & tmask;
    apx_a = ({ya[CFG_T_MAX-1 -: CFG_H_MAX], 1'b0} & hmask) | rbit;
    apx_b = ({yb[CFG_T_MAX-1 -: CFG_H_MAX], 1'b0} & hmask) | rbit;
    prod  = apx_a * apx_b;
    sum   = (MW'(1) << CFG_F)
          + (MW'(ya_t) << (CFG_F - CFG_T_MAX))
          + (MW'(yb_t) << (CFG_F - CFG_T_MAX))
          + (MW'(prod) << (CFG_F - 2*AW));
    m     = sum & lsb_keep;
  end

endmodule
