// tb_input_unit - tap delay line at its default size (60 taps, 16 bits).
// Samples are loaded, sometimes on the last rotation of the previous sample
// and sometimes after idle cycles; during the 16 rotation cycles after
// each load, bits[i] must equal bit k (LSB first) of the sample loaded i
// samples earlier. Only taps holding loaded samples are checked.
module tb_input_unit;
  localparam int N = 60, B = 16;
  logic clk = 0, load = 0, rotate = 0;
  logic [B-1:0] x_in = '0;
  logic [N-1:0] bits;
  int checks = 0, failures = 0;

  input_unit dut (.*);
  always #5 clk = ~clk;

  logic [B-1:0] hist [N];
  int loaded = 0, n_back = 0, n_idle = 0;

  initial begin
    @(negedge clk);
    for (int s = 0; s < 150; s++) begin
      // load cycle (rotate stays as the last cycle left it)
      x_in = B'($urandom);
      load = 1;
      if (rotate) n_back++; else n_idle++;
      @(negedge clk);
      load = 0;
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = x_in;
      loaded++;
      for (int k = 0; k < B; k++) begin
        rotate = 1;
        #1;
        for (int i = 0; i < N && i < loaded; i++) begin
          checks++;
          if (bits[i] != hist[i][k]) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d k=%0d tap=%0d", s, k, i);
          end
        end
        if (k == B - 1 && ($urandom_range(0, 2) != 0)) begin
          // next load coincides with this last rotation
          load = 1; x_in = B'($urandom); n_back++;
          @(negedge clk);
          load = 0;
          for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
          hist[0] = x_in;
          loaded++;
          k = -1;                 // start the next sample's bits
          s++;
          continue;
        end
        @(negedge clk);
      end
      rotate = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    checks++;
    if (n_back == 0 || n_idle == 0) begin failures++; $display("FAIL load cases not covered"); end
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
