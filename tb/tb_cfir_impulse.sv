// tb_cfir_impulse - impulse response of the default 60-tap filter.
//
// After 60 zero samples have cleared the delay line, a real impulse of 0.25
// and, later, an imaginary impulse of 0.25j are applied, each followed by
// zeros. The response to the real impulse must be 0.25 * a(n), and to the
// imaginary one 0.25j * a(n) = 0.25 (-a_I(n) + j a_R(n)), for n = 0..59,
// with a(n) the full coefficient set rebuilt from the stored half by the
// linear-phase symmetry (a_R even, a_I odd about the centre), and zero
// afterwards. This checks the tap-pair folding and the assignment of
// coefficients to the four units tap by tap.
module tb_cfir_impulse;
  import cfir_pkg::*;

  localparam int N  = N_TAPS_DEF;
  localparam int B  = B_DEF;
  localparam int CW = CW_DEF;
  localparam int PW = CW + $clog2(N) + 1;
  localparam int YW = PW + B;
  localparam longint AMP = 1 << (B - 3);           // 0.25

  logic clk = 0, rst_n = 0;
  logic x_valid = 0, x_ready;
  logic signed [B-1:0] x_re = '0, x_im = '0;
  logic y_valid;
  logic signed [YW-1:0] y_re_full, y_im_full;
  logic signed [B-1:0] y_re, y_im;

  cfir_da_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint ar [N], ai [N];
  longint exp_re_q [$], exp_im_q [$];
  bit     chk_q [$];

  initial
    for (int i = 0; i < N / 2; i++) begin
      ar[i] = longint'(COEF_RE_DEF[i]);  ar[N-1-i] = ar[i];
      ai[i] = longint'(COEF_IM_DEF[i]);  ai[N-1-i] = -ai[i];
    end

  always @(posedge clk) if (rst_n && y_valid) begin
    longint er, ei; bit c;
    er = exp_re_q.pop_front(); ei = exp_im_q.pop_front(); c = chk_q.pop_front();
    if (c) begin
      checks += 2;
      if (longint'(y_re_full) != er || longint'(y_im_full) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d, %0d) expected (%0d, %0d)", y_re_full, y_im_full, er, ei);
      end
    end
  end

  task automatic send(input logic signed [B-1:0] re, input logic signed [B-1:0] im,
                      input bit chk, input longint er, input longint ei);
    x_valid <= 1; x_re <= re; x_im <= im;
    exp_re_q.push_back(er); exp_im_q.push_back(ei); chk_q.push_back(chk);
    @(posedge clk);
    while (!x_ready) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < N; n++) send('0, '0, 0, 0, 0);
    // real impulse
    send(B'(AMP), '0, 1, ar[0] * AMP, ai[0] * AMP);
    for (int n = 1; n < N + 4; n++)
      send('0, '0, 1, (n < N) ? ar[n] * AMP : 0, (n < N) ? ai[n] * AMP : 0);
    // imaginary impulse
    send('0, B'(AMP), 1, -ai[0] * AMP, ar[0] * AMP);
    for (int n = 1; n < N + 4; n++)
      send('0, '0, 1, (n < N) ? -ai[n] * AMP : 0, (n < N) ? ar[n] * AMP : 0);
    x_valid <= 0;
    repeat (40) @(posedge clk);
    checks++;
    if (exp_re_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
