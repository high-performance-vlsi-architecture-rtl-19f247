// tb_ofc - optimum function circuit: every address of two instances is
// compared with the sum of the selected coefficients, computed here from
// the coefficient set. Instance 0 has the default settings (5 lines, first
// slice, real coefficients); instance 1 is the partial last slice of a
// 28-line unit (3 of 5 lines used) with negated imaginary coefficients.
module tb_ofc;
  import cfir_pkg::*;
  localparam int M = OFC_IN_DEF, PW = 23;
  logic [M-1:0] addr;
  logic signed [PW-1:0] phi0, phi1;
  int checks = 0, failures = 0;

  ofc dut0 (.addr(addr), .phi(phi0));
  ofc #(.M(M), .PW(PW), .BASE(25), .LINES(28), .NEG(1'b1), .COEF(COEF_IM_DEF))
    dut1 (.addr(addr), .phi(phi1));

  initial begin
    for (int v = 0; v < 2**M; v++) begin
      int e0, e1;
      e0 = 0; e1 = 0;
      addr = M'(v);
      for (int j = 0; j < M; j++) if (v[j]) begin
        e0 += int'(COEF_RE_DEF[j]);
        if (25 + j < 28) e1 -= int'(COEF_IM_DEF[25 + j]);
      end
      #1;
      checks += 2;
      if (int'(phi0) != e0) begin failures++; $display("FAIL0 addr=%b %0d exp %0d", addr, phi0, e0); end
      if (int'(phi1) != e1) begin failures++; $display("FAIL1 addr=%b %0d exp %0d", addr, phi1, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
