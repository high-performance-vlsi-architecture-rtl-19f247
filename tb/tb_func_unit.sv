// tb_func_unit - function unit: random bit patterns on the bit lines of the
// default unit (30 lines, 6 circuits of 5) and of a small one (7 lines,
// slices of 3, the last one partial, negated coefficients); every partial
// sum is compared with the sum of the coefficients of its slice whose line
// is set.
module tb_func_unit;
  import cfir_pkg::*;
  localparam int PW = 23;
  logic [29:0] bits_a;
  logic [6:0]  bits_b;
  logic signed [PW-1:0] phi_a [6];
  logic signed [PW-1:0] phi_b [3];
  int checks = 0, failures = 0;

  func_unit dut_a (.bits(bits_a), .phi(phi_a));
  func_unit #(.LINES(7), .M(3), .PW(PW), .NEG(1'b1), .COEF(COEF_IM_DEF))
    dut_b (.bits(bits_b), .phi(phi_b));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      bits_a = 30'($urandom);
      bits_b = 7'($urandom);
      if (n == 0) begin bits_a = '1; bits_b = '1; end
      #1;
      for (int q = 0; q < 6; q++) begin
        int e;
        e = 0;
        for (int j = 0; j < 5; j++) if (bits_a[5*q+j]) e += int'(COEF_RE_DEF[5*q+j]);
        checks++;
        if (int'(phi_a[q]) != e) begin failures++; if (failures < 10) $display("FAIL a q=%0d %0d exp %0d", q, phi_a[q], e); end
      end
      for (int q = 0; q < 3; q++) begin
        int e;
        e = 0;
        for (int j = 0; j < 3; j++) if (3*q+j < 7 && bits_b[3*q+j]) e -= int'(COEF_IM_DEF[3*q+j]);
        checks++;
        if (int'(phi_b[q]) != e) begin failures++; if (failures < 10) $display("FAIL b q=%0d %0d exp %0d", q, phi_b[q], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
