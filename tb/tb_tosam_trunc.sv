// tb_tosam_trunc: checks the truncation unit exhaustively for a 15-bit
// input with t = 7 and, with random inputs, for t = 9. The one-hot input is
// computed here; the expected output is floor(frac(i / 2^k) * 2^t).
module tb_tosam_trunc;
  localparam int W = 15;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] i, onehot;
  logic [6:0]   yt7;
  logic [8:0]   yt9;
  tosam_trunc #(.W(W), .T(7)) dut7 (.i(i), .onehot(onehot), .yt(yt7));
  tosam_trunc #(.W(W), .T(9)) dut9 (.i(i), .onehot(onehot), .yt(yt9));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_y(int v, int t);
    int k = 0;
    longint rest;
    if (v == 0) return 0;
    for (int b = 0; b < W; b++) if (((v >> b) & 1) == 1) k = b;
    rest = longint'(v - (1 << k));
    return int'((rest << t) >> k);
  endfunction

  initial begin
    int k;
    for (int v = 0; v < (1 << W); v++) begin
      @(negedge clk);
      i = W'(v);
      k = 0;
      for (int b = 0; b < W; b++) if (((v >> b) & 1) == 1) k = b;
      onehot = (v == 0) ? '0 : W'(1) << k;
      @(posedge clk);
      checks++;
      if (int'(yt7) != expect_y(v, 7)) begin
        failures++;
        if (failures < 10) $display("FAIL t=7 i=%h yt=%h exp=%h", i, yt7, expect_y(v, 7));
      end
      checks++;
      if (int'(yt9) != expect_y(v, 9)) begin
        failures++;
        if (failures < 10) $display("FAIL t=9 i=%h yt=%h exp=%h", i, yt9, expect_y(v, 9));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
