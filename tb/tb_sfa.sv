// tb_sfa - serial full adder: random B-bit pairs within -0.5 <= v < 0.5 are
// fed LSB first, one bit per cycle, with the carry cleared before each
// word; the collected sum bits must form a + b. Words follow one another
// without gaps (clear in the cycle of the previous word's last bit).
module tb_sfa;
  localparam int B = 16;
  logic clk = 0, clr = 0, en = 0, a = 0, b = 0, s;
  int checks = 0, failures = 0;

  sfa dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic signed [B-1:0] va, vb, got;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int n = 0; n < 500; n++) begin
      va = B'($signed($urandom_range(0, (1 << (B-1)) - 1)) - (1 << (B-2)));
      vb = B'($signed($urandom_range(0, (1 << (B-1)) - 1)) - (1 << (B-2)));
      if (n % 7 == 0) begin va = -(1 <<< (B-2)); vb = -(1 <<< (B-2)); end
      for (int k = 0; k < B; k++) begin
        en = 1; a = va[k]; b = vb[k]; clr = (k == B - 1);
        #1 got[k] = s;
        @(negedge clk);
      end
      checks++;
      if (got != B'(va + vb)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d -> %0d", va, vb, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
