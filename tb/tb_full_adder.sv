// tb_full_adder - exhaustive test of the one-bit full adder: for all eight
// input combinations, 2*co + s must equal a + b + c.
module tb_full_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> co=%b s=%b", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
