// tb_tosam_cfg_mult: checks the signed accuracy-configurable multiplier
// against the TOSAM(h,t) reference for each mode, on corner and random
// operands, with the mode changing between consecutive operations. Reports
// the mean and largest relative error per mode: accuracy must improve from
// T2 to T6 to T9.
module tb_tosam_cfg_mult;
  import tosam_pkg::*;
  import tosam_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b;
  tosam_mode_e mode;
  logic [31:0] p;
  tosam_cfg_mult dut (.a(a), .b(b), .mode(mode), .p(p));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, t, n_rel [3];
    real rel, sum_abs [3], max_rel [3];
    u128_t expv;
    logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h1234};
    for (int q = 0; q < 3; q++) begin sum_abs[q] = 0.0; max_rel[q] = 0.0; n_rel[q] = 0; end
    for (int r = 0; r < 60000; r++) begin
      @(negedge clk);
      mode = tosam_mode_e'(r % 3);
      if (r < 36 * 3) begin
        a = corners[(r / 3) % 6]; b = corners[(r / 18) % 6];
      end else begin
        a = 16'($urandom); b = 16'($urandom);
      end
      @(posedge clk);
      case (mode)
        MODE_T2: begin h = 0; t = 2; end
        MODE_T6: begin h = 2; t = 6; end
        default: begin h = 5; t = 9; end
      endcase
      expv = tosam(u128_t'(a), u128_t'(b), 16, h, t, 1'b1);
      checks++;
      if (p != expv[31:0]) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%s a=%h b=%h p=%h exp=%h", mode.name(), a, b, p, expv[31:0]);
      end
      if (!a[15] && !b[15] && a > 255 && b > 255) begin
        rel = (real'(p) - real'(a) * real'(b)) / (real'(a) * real'(b));
        if (rel < 0) rel = -rel;
        sum_abs[r % 3] += rel;
        n_rel[r % 3]++;
        if (rel > max_rel[r % 3]) max_rel[r % 3] = rel;
      end
    end
    for (int q = 0; q < 3; q++)
      $display("mode %s: mean |relative error| %f %%, max %f %%", tosam_mode_e'(q),
               100.0 * sum_abs[q] / n_rel[q], 100.0 * max_rel[q]);
    checks++;
    if (!(sum_abs[0] / n_rel[0] > sum_abs[1] / n_rel[1] && sum_abs[1] / n_rel[1] > sum_abs[2] / n_rel[2]))
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
