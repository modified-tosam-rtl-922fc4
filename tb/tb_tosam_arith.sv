// tb_tosam_arith: checks the arithmetic unit for TOSAM(3,7) exhaustively,
// and TOSAM(0,2) and TOSAM(5,9) with all / random operand pairs. The
// expected mantissa is evaluated in floating point (exact at these widths)
// from 1 + ya + yb + apx_a * apx_b, apx = (floor(y * 2^h) + 1/2) / 2^h.
// Includes the published worked example: (YA)t = 0.0110111,
// (YB)t = 0.0011011 give 441/256.
module tb_tosam_arith;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0]  ya7, yb7;   logic [9:0]  m7;    // T=7 H=3: F=8
  logic [1:0]  ya2, yb2;   logic [3:0]  m2;    // T=2 H=0: F=2
  logic [8:0]  ya9, yb9;   logic [13:0] m9;    // T=9 H=5: F=12
  tosam_arith #(.T(7), .H(3)) dut7 (.ya(ya7), .yb(yb7), .m(m7));
  tosam_arith #(.T(2), .H(0)) dut2 (.ya(ya2), .yb(yb2), .m(m2));
  tosam_arith #(.T(9), .H(5)) dut9 (.ya(ya9), .yb(yb9), .m(m9));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mant(int ya, int yb, int t, int h);
    real fa = real'(ya) / real'(1 << t);
    real fb = real'(yb) / real'(1 << t);
    real pa = ($floor(fa * real'(1 << h)) + 0.5) / real'(1 << h);
    real pb = ($floor(fb * real'(1 << h)) + 0.5) / real'(1 << h);
    return 1.0 + fa + fb + pa * pb;
  endfunction

  task automatic check(string tag, real got, real expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%f exp=%f", tag, got, expv);
    end
  endtask

  initial begin
    for (int a = 0; a < 128; a++)
      for (int b = 0; b < 128; b++) begin
        @(negedge clk);
        ya7 = 7'(a); yb7 = 7'(b);
        ya2 = 2'(a); yb2 = 2'(b);
        ya9 = 9'($urandom); yb9 = 9'($urandom);
        @(posedge clk);
        check("t7h3", real'(m7) / 256.0, mant(a, b, 7, 3));
        if (a < 4 && b < 4) check("t2h0", real'(m2) / 4.0, mant(a, b, 2, 0));
        check("t9h5", real'(m9) / 4096.0, mant(int'(ya9), int'(yb9), 9, 5));
      end
    @(negedge clk);
    ya7 = 7'b0110111; yb7 = 7'b0011011;
    @(posedge clk);
    checks++;
    if (m7 != 10'd441) begin
      failures++;
      $display("FAIL worked example m=%0d exp=441", m7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
