// tb_tosam_cfg_arith: checks the configurable arithmetic unit exhaustively
// over all 9-bit operand pairs in each mode. The expected mantissa is
// TOSAM(h,t) of the operands truncated to the mode's t bits, evaluated in
// floating point: T2 = (0,2), T6 = (2,6), T9 = (5,9). Also checks that the
// 10 (T2) or 6 (T6) least significant result bits are zero.
module tb_tosam_cfg_arith;
  import tosam_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tosam_mode_e mode;
  logic [8:0]  ya, yb;
  logic [13:0] m;
  tosam_cfg_arith dut (.mode(mode), .ya(ya), .yb(yb), .m(m));

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mant(int ya9, int yb9, int t, int h);
    real fa = real'(ya9 >> (9 - t)) / real'(1 << t);
    real fb = real'(yb9 >> (9 - t)) / real'(1 << t);
    real pa = ($floor(fa * real'(1 << h)) + 0.5) / real'(1 << h);
    real pb = ($floor(fb * real'(1 << h)) + 0.5) / real'(1 << h);
    return 1.0 + fa + fb + pa * pb;
  endfunction

  initial begin
    int t, h, zl;
    tosam_mode_e modes [3] = '{MODE_T2, MODE_T6, MODE_T9};
    foreach (modes[q]) begin
      case (modes[q])
        MODE_T2: begin t = 2; h = 0; zl = 10; end
        MODE_T6: begin t = 6; h = 2; zl = 6;  end
        default: begin t = 9; h = 5; zl = 0;  end
      endcase
      for (int x = 0; x < 512; x++)
        for (int y = 0; y < 512; y++) begin
          @(negedge clk);
          mode = modes[q]; ya = 9'(x); yb = 9'(y);
          @(posedge clk);
          checks++;
          if (real'(m) / 4096.0 != mant(x, y, t, h) ||
              (zl > 0 && (m & 14'((1 << zl) - 1)) != 0)) begin
            failures++;
            if (failures < 10)
              $display("FAIL mode=%s ya=%h yb=%h m=%h exp=%f", mode.name(), ya, yb, m, mant(x, y, t, h));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
