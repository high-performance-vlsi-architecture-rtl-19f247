// tb_adder42 - random and corner-value test of the word 4-2 adder at its
// default width: s + cy must equal a + b + c + d modulo 2^W.
module tb_adder42;
  localparam int W = 23;
  logic [W-1:0] a, b, c, d, s, cy;
  int checks = 0, failures = 0;

  adder42 #(.W(W)) dut (.*);

  function automatic logic [W-1:0] rnd();
    case ($urandom_range(0, 4))
      0: return '1;
      1: return '0;
      2: return {1'b0, {(W-1){1'b1}}};
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      a = rnd(); b = rnd(); c = rnd(); d = rnd();
      #1;
      checks++;
      if (W'(s + cy) != W'(a + b + c + d)) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h %h -> %h + %h", a, b, c, d, s, cy);
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
