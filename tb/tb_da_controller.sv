// tb_da_controller - bit-cycle sequencer with B = 16: x_valid is driven at
// random (and held high for stretches); a reference frame counter written
// here predicts x_ready, load, bit_valid, bit_first and bit_sign every
// cycle. With x_valid held high loads must come exactly B cycles apart.
module tb_da_controller;
  localparam int B = 16;
  logic clk = 0, rst_n = 0, x_valid = 0;
  logic x_ready, load, bit_valid, bit_first, bit_sign;
  int checks = 0, failures = 0;

  da_controller #(.B(B)) dut (.*);
  always #5 clk = ~clk;

  int ref_k = -1;             // -1 idle, else bit index being presented
  int last_load = -100, cyc = 0, n_b2b = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 5000; cyc++) begin
      bit ready_e;
      x_valid = (cyc < 1000) ? 1'b1 : ($urandom_range(0, 3) == 0);
      #1;
      ready_e = (ref_k == -1) || (ref_k == B - 1);
      checks += 5;
      if (x_ready   != ready_e)                        begin failures++; $display("FAIL ready @%0d", cyc); end
      if (load      != (ready_e && x_valid))           begin failures++; $display("FAIL load @%0d", cyc); end
      if (bit_valid != (ref_k >= 0))                   begin failures++; $display("FAIL valid @%0d", cyc); end
      if (bit_first != (ref_k == 0))                   begin failures++; $display("FAIL first @%0d", cyc); end
      if (bit_sign  != (ref_k == B - 1))               begin failures++; $display("FAIL sign @%0d", cyc); end
      if (load) begin
        if (ref_k == B - 1) begin
          n_b2b++;
          checks++;
          if (cyc - last_load != B) begin failures++; $display("FAIL interval %0d", cyc - last_load); end
        end
        last_load = cyc;
      end
      // reference next state
      if (ready_e && x_valid) ref_k = 0;
      else if (ref_k == B - 1) ref_k = -1;
      else if (ref_k >= 0) ref_k++;
      @(negedge clk);
    end
    checks++;
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back loads"); end
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
