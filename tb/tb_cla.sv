// tb_cla - test of the carry look-ahead adder at its default width (24, a
// multiple of the group size) and at width 23 (last group partial): random
// and corner operands, both carry-in values, compared with a + b + cin.
module tb_cla;
  logic [23:0] a24, b24, s24;
  logic [22:0] a23, b23, s23;
  logic        cin;
  int checks = 0, failures = 0;

  cla             dut24 (.a(a24), .b(b24), .cin(cin), .s(s24));
  cla #(.W(23))   dut23 (.a(a23), .b(b23), .cin(cin), .s(s23));

  initial begin
    for (int n = 0; n < 4000; n++) begin
      case (n % 5)
        0: begin a24 = '1; b24 = 24'($urandom_range(0, 1)); end
        1: begin a24 = 24'h555555; b24 = 24'haaaaaa; end
        default: begin a24 = 24'($urandom); b24 = 24'($urandom); end
      endcase
      a23 = a24[22:0] ^ 23'($urandom); b23 = b24[22:0];
      cin = 1'($urandom);
      #1;
      checks += 2;
      if (s24 != 24'(a24 + b24 + 24'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL24 %h+%h+%b -> %h", a24, b24, cin, s24);
      end
      if (s23 != 23'(a23 + b23 + 23'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL23 %h+%h+%b -> %h", a23, b23, cin, s23);
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
