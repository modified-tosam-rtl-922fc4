// tb_tosam_sign_zero: checks the sign and zero detector (SIGNED = 1) and the
// zero detector (SIGNED = 0) with random operands, forcing zero operands and
// all sign combinations.
module tb_tosam_sign_zero;
  localparam int N = 16, PW = 30;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0]   a, b;
  logic [PW-1:0]  pmag;
  logic [2*N-1:0] ps, pu;
  logic [PW+1:0]  pmag_u;
  tosam_sign_zero #(.N(N), .PW(PW), .SIGNED(1'b1)) dut_s (.a(a), .b(b), .pmag(pmag), .p(ps));
  tosam_sign_zero #(.N(N), .PW(PW + 2), .SIGNED(1'b0)) dut_u (.a(a), .b(b), .pmag(pmag_u), .p(pu));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint es, eu;
    for (int r = 0; r < 20000; r++) begin
      @(negedge clk);
      a = N'($urandom); b = N'($urandom);
      case (r % 8)
        0: a = '0;
        1: b = '0;
        2: begin a = '0; b = '0; end
        default: ;
      endcase
      pmag   = PW'($urandom) + 1;
      pmag_u = (PW + 2)'({$urandom, $urandom});
      @(posedge clk);
      if (a == 0 || b == 0) begin es = 0; eu = 0; end
      else begin
        es = (a[N-1] ^ b[N-1]) ? -longint'(pmag) : longint'(pmag);
        eu = longint'(pmag_u);
      end
      checks++;
      if (longint'($signed(ps)) != es) begin
        failures++;
        if (failures < 10) $display("FAIL signed a=%h b=%h pmag=%0d p=%0d exp=%0d", a, b, pmag, $signed(ps), es);
      end
      checks++;
      if (longint'(pu) != eu) begin
        failures++;
        if (failures < 10) $display("FAIL unsigned a=%h b=%h p=%0d exp=%0d", a, b, pu, eu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
