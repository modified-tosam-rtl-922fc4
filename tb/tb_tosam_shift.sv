// tb_tosam_shift: checks the shift unit with random mantissas and all
// exponent pairs: p must equal floor(m * 2^(ka+kb) / 2^F).
module tb_tosam_shift;
  localparam int MW = 10, F = 8, KW = 4, PW = 30;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [MW-1:0] m;
  logic [KW-1:0] ka, kb;
  logic [PW-1:0] p;
  tosam_shift #(.MW(MW), .F(F), .KW(KW), .PW(PW)) dut (.m(m), .ka(ka), .kb(kb), .p(p));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    for (int x = 0; x < 15; x++)
      for (int y = 0; y < 15; y++)
        for (int r = 0; r < 40; r++) begin
          @(negedge clk);
          ka = KW'(x); kb = KW'(y);
          // mantissa of the form 1.xx..x up to 3.99 as produced upstream
          m  = MW'(256 + ($urandom % 768));
          if (r == 0) m = MW'(256);
          if (r == 1) m = MW'(1023);
          @(posedge clk);
          expv = (longint'(m) * (longint'(1) << (x + y))) / 256;
          checks++;
          if (longint'(p) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d ka=%0d kb=%0d p=%0d exp=%0d", m, ka, kb, p, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
