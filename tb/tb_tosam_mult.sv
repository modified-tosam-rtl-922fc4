// tb_tosam_mult: checks the complete TOSAM multiplier.
//   * the published worked example 11761 * 2482 -> 28901376 (16-bit, h=3, t=7)
//   * random and corner operands against the reference model, for the
//     signed 16-bit default, the unsigned 16-bit variant and a signed
//     32-bit instance
//   * error statistics of the default against the exact product: the mean
//     relative error must stay near zero (rounding centres the error) and the
//     largest relative error for positive operands must stay below 5 %.
module tb_tosam_mult;
  import tosam_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16;
  logic [31:0] ps16, pu16;
  logic [31:0] a32, b32;
  logic [63:0] ps32;
  tosam_mult dut (.a(a16), .b(b16), .p(ps16));
  tosam_mult #(.N(16), .H(3), .T(7), .SIGNED(1'b0)) dut_u (.a(a16), .b(b16), .p(pu16));
  tosam_mult #(.N(32), .H(3), .T(7), .SIGNED(1'b1)) dut_32 (.a(a32), .b(b32), .p(ps32));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string tag, u128_t got, u128_t expv, u128_t a, u128_t b);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h exp=%h", tag, a, b, got, expv);
    end
  endtask

  initial begin
    real rel, sum_rel, sum_abs, max_rel;
    int  n_rel;
    logic [15:0] corners [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                 16'h7FFF, 16'h0002, 16'hFFFE, 16'h00FF};
    // worked example
    @(negedge clk);
    a16 = 16'd11761; b16 = 16'd2482;
    @(posedge clk);
    checks++;
    if (ps16 != 32'd28901376) begin
      failures++;
      $display("FAIL worked example p=%0d exp=28901376", ps16);
    end
    // corners
    foreach (corners[i]) foreach (corners[j]) begin
      @(negedge clk);
      a16 = corners[i]; b16 = corners[j];
      @(posedge clk);
      cmp("s16c", u128_t'(ps16), tosam(u128_t'(a16), u128_t'(b16), 16, 3, 7, 1'b1), u128_t'(a16), u128_t'(b16));
      cmp("u16c", u128_t'(pu16), tosam(u128_t'(a16), u128_t'(b16), 16, 3, 7, 1'b0), u128_t'(a16), u128_t'(b16));
    end
    // random
    sum_rel = 0.0; sum_abs = 0.0; max_rel = 0.0; n_rel = 0;
    for (int r = 0; r < 30000; r++) begin
      @(negedge clk);
      a16 = 16'($urandom); b16 = 16'($urandom);
      a32 = $urandom >> ($urandom % 32); b32 = $urandom >> ($urandom % 32);
      @(posedge clk);
      cmp("s16", u128_t'(ps16), tosam(u128_t'(a16), u128_t'(b16), 16, 3, 7, 1'b1), u128_t'(a16), u128_t'(b16));
      cmp("u16", u128_t'(pu16), tosam(u128_t'(a16), u128_t'(b16), 16, 3, 7, 1'b0), u128_t'(a16), u128_t'(b16));
      cmp("s32", u128_t'(ps32), tosam(u128_t'(a32), u128_t'(b32), 32, 3, 7, 1'b1), u128_t'(a32), u128_t'(b32));
      if (!a16[15] && !b16[15] && a16 > 255 && b16 > 255) begin
        rel = (real'(ps16) - real'(a16) * real'(b16)) / (real'(a16) * real'(b16));
        sum_rel += rel;
        n_rel++;
        if (rel < 0) rel = -rel;
        sum_abs += rel;
        if (rel > max_rel) max_rel = rel;
      end
    end
    $display("TOSAM(3,7) 16-bit: mean relative error %f %%, mean |relative error| %f %%, max |relative error| %f %% over %0d pairs",
             100.0 * sum_rel / n_rel, 100.0 * sum_abs / n_rel, 100.0 * max_rel, n_rel);
    checks++;
    if (sum_rel / n_rel > 0.005 || sum_rel / n_rel < -0.005 || max_rel > 0.05) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
