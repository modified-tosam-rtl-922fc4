// tb_tosam_lod: checks the leading-one detector exhaustively for a 15-bit
// input: the one-hot output must equal 1 << pos and the encoded k must equal
// pos, where pos is the index of the highest set bit (zero input: both 0).
module tb_tosam_lod;
  localparam int W  = 15;
  localparam int KW = $clog2(W);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0]  i, onehot;
  logic [KW-1:0] k;
  tosam_lod #(.W(W)) dut (.i(i), .onehot(onehot), .k(k));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos;
    logic [W-1:0] exp_oh;
    for (int v = 0; v < (1 << W); v++) begin
      @(negedge clk);
      i = W'(v);
      @(posedge clk);
      pos = 0;
      exp_oh = '0;
      for (int b = 0; b < W; b++) if (((v >> b) & 1) == 1) pos = b;
      if (v != 0) exp_oh = W'(1) << pos;
      checks++;
      if (onehot !== exp_oh || int'(k) != pos) begin
        failures++;
        if (failures < 10) $display("FAIL i=%h onehot=%h exp=%h k=%0d exp=%0d", i, onehot, exp_oh, k, pos);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
