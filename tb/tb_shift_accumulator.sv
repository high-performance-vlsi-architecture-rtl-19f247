// tb_shift_accumulator - shift-and-add accumulator with PW = 23, B = 16.
// Frames of 16 random partial sums (extremes included) are fed one per
// cycle, LSB slice first, with random idle cycles between and inside
// frames. Expected result: sum_{j<15} phi_j 2^j - phi_15 2^15, latched with
// y_valid in the cycle after the sign slice.
module tb_shift_accumulator;
  localparam int PW = 23, B = 16;
  logic clk = 0, rst_n = 0, en = 0, first = 0, sign = 0;
  logic signed [PW-1:0] phi = '0;
  logic y_valid;
  logic signed [PW+B-1:0] y_full;
  int checks = 0, failures = 0;

  shift_accumulator #(.PW(PW), .B(B)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic signed [PW-1:0] rnd();
    case ($urandom_range(0, 5))
      0: return {1'b1, {(PW-2){1'b0}}, 1'b0};      // large negative
      1: return {2'b00, {(PW-2){1'b1}}};            // large positive
      default: return PW'($urandom);
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      longint e;
      e = 0;
      for (int j = 0; j < B; j++) begin
        while ($urandom_range(0, 5) == 0) begin en = 0; @(negedge clk); end
        en = 1; first = (j == 0); sign = (j == B - 1); phi = rnd();
        e += (sign ? -longint'(phi) : longint'(phi)) <<< j;
        @(negedge clk);
        en = 0; first = 0; sign = 0;
        checks++;
        if (y_valid != (j == B - 1)) begin failures++; $display("FAIL y_valid timing f=%0d j=%0d", f, j); end
      end
      checks++;
      if (longint'(y_full) != e) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d: %0d expected %0d", f, y_full, e);
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
