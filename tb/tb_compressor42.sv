// tb_compressor42 - exhaustive test of the 4-2 adder bit cell: for all 32
// input combinations, s + 2*(c + cout) must equal the number of ones among
// x[3:0] and cin, and cout must not depend on cin.
module tb_compressor42;
  logic [3:0] x;
  logic cin, s, c, cout;
  int checks = 0, failures = 0;

  compressor42 dut (.*);

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        x = 4'(v); cin = 1'(ci);
        #1;
        checks++;
        if (int'(s) + 2 * (int'(c) + int'(cout)) != $countones(x) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%b -> s=%b c=%b cout=%b", x, cin, s, c, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
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
