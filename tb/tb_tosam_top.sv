// tb_tosam_top: end-to-end test of tosam_top at its default parameters
// (16-bit TOSAM(3,7) beside the 16-bit configurable multiplier).
// Both multipliers are driven with the published worked example, corner
// operands and random operands, and compared with the reference model. It
// counts how often each mechanism of the datapath is exercised and fails if
// one never is: zero detection, negative result, approximate absolute value
// of a negative operand, truncation that discards bits (k > t), operands
// shorter than t bits (k < t), each of the modes T2, T6, T9, and a mode
// change between consecutive operations.
module tb_tosam_top;
  import tosam_pkg::*;
  import tosam_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b, cfg_a, cfg_b;
  logic [31:0] p, cfg_p;
  tosam_mode_e cfg_mode, last_mode;
  tosam_top dut (.a(a), .b(b), .p(p), .cfg_a(cfg_a), .cfg_b(cfg_b), .cfg_mode(cfg_mode), .cfg_p(cfg_p));

  int n_zero, n_neg, n_negop, n_trunc, n_short, n_mode [3], n_switch;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int klead(logic [15:0] x);
    logic [14:0] m = x[15] ? ~x[14:0] : x[14:0];
    int k = 0;
    for (int i = 0; i < 15; i++) if (m[i]) k = i;
    return k;
  endfunction

  task automatic count(logic [15:0] x, logic [15:0] y);
    if (x == 0 || y == 0) n_zero++;
    else if (x[15] ^ y[15]) n_neg++;
    if (x[15] || y[15]) n_negop++;
    if (klead(x) > 7 || klead(y) > 7) n_trunc++;
    if (klead(x) < 7 || klead(y) < 7) n_short++;
  endtask

  task automatic apply(logic [15:0] x, logic [15:0] y, logic [15:0] cx, logic [15:0] cy, tosam_mode_e md);
    u128_t e1, e2;
    int h, t;
    @(negedge clk);
    a = x; b = y; cfg_a = cx; cfg_b = cy; last_mode = cfg_mode; cfg_mode = md;
    @(posedge clk);
    case (md)
      MODE_T2: begin h = 0; t = 2; end
      MODE_T6: begin h = 2; t = 6; end
      default: begin h = 5; t = 9; end
    endcase
    e1 = tosam(u128_t'(x), u128_t'(y), 16, 3, 7, 1'b1);
    e2 = tosam(u128_t'(cx), u128_t'(cy), 16, h, t, 1'b1);
    checks += 2;
    if (p != e1[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL fixed a=%h b=%h p=%h exp=%h", x, y, p, e1[31:0]);
    end
    if (cfg_p != e2[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL cfg mode=%s a=%h b=%h p=%h exp=%h", md.name(), cx, cy, cfg_p, e2[31:0]);
    end
    count(x, y);
    count(cx, cy);
    n_mode[int'(md)]++;
    if (md != last_mode) n_switch++;
  endtask

  initial begin
    logic [15:0] xa, xb;
    n_zero = 0; n_neg = 0; n_negop = 0; n_trunc = 0; n_short = 0; n_switch = 0;
    n_mode = '{0, 0, 0};
    cfg_mode = MODE_T9;
    // worked example: 11761 * 2482 ~ 28901376 with TOSAM(3,7)
    apply(16'd11761, 16'd2482, 16'd11761, 16'd2482, MODE_T9);
    checks++;
    if (p != 32'd28901376) begin
      failures++;
      $display("FAIL worked example p=%0d", p);
    end
    // signs and zero
    apply(-16'sd11761, 16'd2482, 16'd0, 16'd5, MODE_T2);
    apply(16'd0, -16'sd3, -16'sd100, -16'sd7, MODE_T6);
    for (int r = 0; r < 5000; r++) begin
      xa = 16'($urandom) >> ($urandom % 16);
      xb = 16'($urandom) >> ($urandom % 16);
      if ($urandom % 2 == 1) xa = -xa;
      apply(xa, xb, xb, xa, tosam_mode_e'($urandom % 3));
    end
    $display("zero=%0d negative=%0d negative_operand=%0d truncating=%0d short=%0d T2=%0d T6=%0d T9=%0d mode_changes=%0d",
             n_zero, n_neg, n_negop, n_trunc, n_short, n_mode[0], n_mode[1], n_mode[2], n_switch);
    foreach (n_mode[q]) begin checks++; if (n_mode[q] == 0) failures++; end
    checks += 6;
    if (n_zero == 0)   failures++;
    if (n_neg == 0)    failures++;
    if (n_negop == 0)  failures++;
    if (n_trunc == 0)  failures++;
    if (n_short == 0)  failures++;
    if (n_switch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
