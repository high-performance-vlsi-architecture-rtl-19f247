// tb_cfir_da_top - end-to-end test of the complex DA FIR filter at its
// default sizes (60 taps, B = 16).
//
// Streams complex samples into the filter, partly back to back (a new
// sample on the cycle the previous one presents its sign bit) and partly
// with idle gaps and a held x_valid while the filter is busy. A direct-form
// reference, sum of a(i) * v(t-i) over all 60 taps with the full coefficient
// set rebuilt from the half set by symmetry, gives the exact expected
// output. Checks: exact real and imaginary results, the truncated B-bit
// outputs, latency B + 5 cycles from acceptance to y_valid, one output per
// sample, and a sample interval of B cycles when streaming. It also counts
// the mechanisms of the design (carry and borrow in the serial units,
// negative inputs through the sign-bit subtraction, streaming, idle start,
// stalled x_valid, extreme inputs) and fails if one never occurred.
module tb_cfir_da_top;
  import cfir_pkg::*;

  localparam int N  = N_TAPS_DEF;
  localparam int B  = B_DEF;
  localparam int CW = CW_DEF;
  localparam int PW = CW + $clog2(N) + 1;
  localparam int YW = PW + B;
  localparam int LAT = B + 5;
  localparam int NSAMP = 600;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0, x_ready;
  logic signed [B-1:0] x_re = '0, x_im = '0;
  logic y_valid;
  logic signed [YW-1:0] y_re_full, y_im_full;
  logic signed [B-1:0] y_re, y_im;

  cfir_da_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // full coefficient set
  longint ar [N], ai [N];
  initial
    for (int i = 0; i < N / 2; i++) begin
      ar[i] = longint'(COEF_RE_DEF[i]);  ar[N-1-i] = ar[i];
      ai[i] = longint'(COEF_IM_DEF[i]);  ai[N-1-i] = -ai[i];
    end

  // history of accepted samples, newest first
  longint hre [N], him [N];
  longint exp_re_q [$], exp_im_q [$], acc_cycle_q [$];
  int accepted = 0, outputs = 0;
  int n_stream = 0, n_idle = 0, n_stall = 0, n_neg = 0, n_extreme = 0;
  int n_carry = 0, n_borrow = 0, n_interval_ok = 0;
  longint last_acc = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // reference on acceptance
  always @(posedge clk) if (rst_n && x_valid && x_ready) begin
    longint sr, si;
    for (int i = N - 1; i > 0; i--) begin hre[i] = hre[i-1]; him[i] = him[i-1]; end
    hre[0] = longint'(x_re); him[0] = longint'(x_im);
    sr = 0; si = 0;
    for (int i = 0; i < N; i++) begin
      sr += ar[i] * hre[i] - ai[i] * him[i];
      si += ai[i] * hre[i] + ar[i] * him[i];
    end
    accepted++;
    if (accepted > N) begin        // all taps hold real samples
      exp_re_q.push_back(sr); exp_im_q.push_back(si);
    end else begin
      exp_re_q.push_back(64'h7fff_ffff_ffff_ffff); exp_im_q.push_back(0);
    end
    acc_cycle_q.push_back(cycle);
    if (dut.u_ctrl.busy) n_stream++; else n_idle++;
    if (last_acc >= 0 && dut.u_ctrl.busy) begin
      check(cycle - last_acc == longint'(B), "sample interval when streaming");
      n_interval_ok++;
    end
    last_acc = cycle;
    if (x_re < 0 || x_im < 0) n_neg++;
  end

  // output check
  always @(posedge clk) if (rst_n && y_valid) begin
    longint er, ei, ac;
    outputs++;
    check(exp_re_q.size() > 0, "output without a sample");
    if (exp_re_q.size() > 0) begin
      er = exp_re_q.pop_front(); ei = exp_im_q.pop_front(); ac = acc_cycle_q.pop_front();
      check(cycle - ac == longint'(LAT), $sformatf("latency %0d, expected %0d", cycle - ac, LAT));
      if (er != 64'h7fff_ffff_ffff_ffff) begin
        check(longint'(y_re_full) == er, $sformatf("y_re_full %0d, expected %0d", y_re_full, er));
        check(longint'(y_im_full) == ei, $sformatf("y_im_full %0d, expected %0d", y_im_full, ei));
        check(y_re == B'(er >>> (CW - 1)), "y_re truncation");
        check(y_im == B'(ei >>> (CW - 1)), "y_im truncation");
      end
    end
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.g_pair[3].u_sfa_re.carry || dut.g_pair[7].u_sfa_im.carry) n_carry++;
    if (dut.g_pair[3].u_sfs_re.borrow || dut.g_pair[7].u_sfs_im.borrow) n_borrow++;
    if (x_valid && !x_ready) n_stall++;
  end

  function automatic logic signed [B-1:0] rnd_in();
    int m;
    logic signed [B-1:0] v;
    m = $urandom_range(0, 9);
    if (m == 0)      v = -(1 <<< (B - 2));            // -0.5
    else if (m == 1) v = (1 <<< (B - 2)) - 1;         // just below 0.5
    else             v = B'($signed($urandom_range(0, (1 << (B-1)) - 1)) - (1 << (B-2)));
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < NSAMP; ) begin
      // phase: 0..299 streaming, then random gaps
      if (s >= 300 && $urandom_range(0, 2) == 0) begin
        x_valid <= 0;
        repeat ($urandom_range(1, 20)) @(posedge clk);
      end
      x_valid <= 1;
      x_re <= rnd_in();
      x_im <= rnd_in();
      @(posedge clk);
      while (!x_ready) @(posedge clk);
      // x_valid & x_ready seen at this edge
      if (x_re == -(1 <<< (B - 2)) || x_im == (1 <<< (B - 2)) - 1) n_extreme++;
      s++;
    end
    x_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    check(outputs == accepted, $sformatf("outputs %0d, samples %0d", outputs, accepted));
    $display("mechanisms: stream=%0d idle_start=%0d stall_cycles=%0d negative=%0d extreme=%0d carry=%0d borrow=%0d intervals=%0d",
             n_stream, n_idle, n_stall, n_neg, n_extreme, n_carry, n_borrow, n_interval_ok);
    check(n_stream > 0, "streaming never happened");
    check(n_idle > 0, "idle start never happened");
    check(n_stall > 0, "stall never happened");
    check(n_neg > 0, "negative input never happened");
    check(n_extreme > 0, "extreme input never happened");
    check(n_carry > 0, "serial carry never happened");
    check(n_borrow > 0, "serial borrow never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
