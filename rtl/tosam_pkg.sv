// tosam_pkg: types and constants shared by the TOSAM approximate multipliers.
//
// The accuracy-configurable multiplier runs in one of three modes, each an
// instance of TOSAM(h,t): T2 = TOSAM(0,2), T6 = TOSAM(2,6), T9 = TOSAM(5,9).
// Its truncation and shift hardware is sized for the largest mode, t = 9 and
// h = 5. The mode table follows the published design; the two-bit encoding
// of the enum is this implementation's choice.
package tosam_pkg;

  typedef enum logic [1:0] {
    MODE_T2 = 2'd0,   // TOSAM(0,2)
    MODE_T6 = 2'd1,   // TOSAM(2,6)
    MODE_T9 = 2'd2    // TOSAM(5,9)
  } tosam_mode_e;

  // Largest truncation width and rounding width of the configurable unit.
  localparam int unsigned CFG_T_MAX = 9;
  localparam int unsigned CFG_H_MAX = 5;
  // Fraction bits of the configurable arithmetic result: max(t, 2h+2).
  localparam int unsigned CFG_F     = (CFG_T_MAX > 2*CFG_H_MAX+2) ? CFG_T_MAX : 2*CFG_H_MAX+2;

endpackage
