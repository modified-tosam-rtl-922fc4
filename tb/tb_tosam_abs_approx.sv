// tb_tosam_abs_approx: checks the approximate absolute value unit against
// |a| for positive and |a| - 1 for negative operands, exhaustively over all
// 16-bit inputs.
module tb_tosam_abs_approx;
  localparam int N = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] a;
  logic [N-2:0] mag;
  tosam_abs_approx #(.N(N)) dut (.a(a), .mag(mag));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, expv;
    for (int i = 0; i < (1 << N); i++) begin
      @(negedge clk);
      a = N'(i);
      @(posedge clk);
      v    = int'($signed(a));
      expv = (v < 0) ? -v - 1 : v;
      checks++;
      if (int'(mag) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d mag=%0d exp=%0d", v, mag, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
