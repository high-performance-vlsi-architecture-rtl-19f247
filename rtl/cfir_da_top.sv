// cfir_da_top - N-tap linear-phase complex FIR filter in bit-serial
// distributed arithmetic.
//
//   y = sum_i (a_R(i) + j a_I(i)) (v_R(i) + j v_I(i))
//
// Instead of multipliers, each bit cycle k forms, for every output part, the
// inner product of the coefficients with bit k of all tap words, and an
// accumulator adds these partial sums with weights 2^-k. A sample therefore
// takes B cycles whatever the number of taps.
//
// Linear phase (a_R symmetric, a_I antisymmetric) lets tap i and tap N+1-i
// share a coefficient. Serial full adders (sfa) and subtractors (sfs) first
// combine each tap pair bit by bit, halving the number of bit lines:
//   y_R = sum_{i<=N/2}  a_R(i) (v_R(i) + v_R(N+1-i))   Real Unit 1
//       - sum_{i<=N/2}  a_I(i) (v_I(i) - v_I(N+1-i))   Real Unit 2
//   y_I = sum_{i<=N/2}  a_I(i) (v_R(i) - v_R(N+1-i))   Imaginary Unit 1
//       + sum_{i<=N/2}  a_R(i) (v_I(i) + v_I(N+1-i))   Imaginary Unit 2
// Each unit is a bank of optimum function circuits (logic replacing ROM
// tables); the partial sums of the two units of a part go through a 4-2
// adder tree, a CLA and the shift accumulator (addition_unit).
//
// Interface: x_valid/x_ready take one complex sample (x_re, x_im: B-bit
// Q1.(B-1), to be kept within -0.5 <= x < 0.5 so the tap-pair sums cannot
// overflow). With x_valid held high a sample is taken every B cycles. For
// each sample y_valid pulses once; y_re_full/y_im_full hold the exact
// result in units of 2^-((CW-1)+(B-1)), y_re/y_im the result truncated to
// B-bit Q1.(B-1) (wrapping if |y| >= 1). The output for the sample taken in
// cycle t (x_valid & x_ready) appears in cycle t + B + LEVELS + 2, i.e.
// B + 5 cycles for the default sizes.
//
// Following the source design: the structure of input unit, serial
// adders/subtractors, four function units, 4-2 adder trees, CLA and shift
// accumulator; 60 taps. This implementation's choices: B = 16, CW = 16,
// OFC_IN = 5 lines per function circuit, the coefficient values, the
// handshake, reset and pipeline registers, and the exact full-width output.
module cfir_da_top
  import cfir_pkg::*;
#(
  parameter int         N_TAPS  = N_TAPS_DEF,
  parameter int         B       = B_DEF,
  parameter int         CW      = CW_DEF,
  parameter int         OFC_IN  = OFC_IN_DEF,
  parameter coef_half_t COEF_RE = COEF_RE_DEF,
  parameter coef_half_t COEF_IM = COEF_IM_DEF,
  localparam int        HALF    = N_TAPS / 2,
  localparam int        PW      = CW + $clog2(N_TAPS) + 1,
  localparam int        YW      = PW + B
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic signed [B-1:0]  x_re,
  input  logic signed [B-1:0]  x_im,
  output logic                 y_valid,
  output logic signed [YW-1:0] y_re_full,
  output logic signed [YW-1:0] y_im_full,
  output logic signed [B-1:0]  y_re,
  output logic signed [B-1:0]  y_im
);
  localparam int NOFC = (HALF + OFC_IN - 1) / OFC_IN;

  // synthesis-time checks of the configuration
  if (N_TAPS % 2 != 0) begin : g_odd
    $error("cfir_da_top: N_TAPS must be even");
  end
  if (CW != CW_DEF) begin : g_cw
    $error("cfir_da_top: CW is fixed by cfir_pkg::coef_t");
  end
  if (HALF > HALF_MAX) begin : g_big
    $error("cfir_da_top: N_TAPS/2 exceeds cfir_pkg::HALF_MAX");
  end

  // ---------------- control ----------------
  logic load, bit_valid, bit_first, bit_sign;

  da_controller #(.B(B)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready),
    .load(load), .bit_valid(bit_valid), .bit_first(bit_first), .bit_sign(bit_sign)
  );

  // ---------------- input unit ----------------
  logic [N_TAPS-1:0] bits_re, bits_im;

  input_unit #(.N_TAPS(N_TAPS), .B(B)) u_in_re (
    .clk(clk), .load(load), .rotate(bit_valid), .x_in(x_re), .bits(bits_re));
  input_unit #(.N_TAPS(N_TAPS), .B(B)) u_in_im (
    .clk(clk), .load(load), .rotate(bit_valid), .x_in(x_im), .bits(bits_im));

  // ---------------- serial adders / subtractors ----------------
  logic [HALF-1:0] re_sum, re_dif, im_sum, im_dif;

  for (genvar i = 0; i < HALF; i++) begin : g_pair
    sfa u_sfa_re (.clk(clk), .clr(load), .en(bit_valid),
                  .a(bits_re[i]), .b(bits_re[N_TAPS-1-i]), .s(re_sum[i]));
    sfs u_sfs_re (.clk(clk), .clr(load), .en(bit_valid),
                  .a(bits_re[i]), .b(bits_re[N_TAPS-1-i]), .d(re_dif[i]));
    sfs u_sfs_im (.clk(clk), .clr(load), .en(bit_valid),
                  .a(bits_im[i]), .b(bits_im[N_TAPS-1-i]), .d(im_dif[i]));
    sfa u_sfa_im (.clk(clk), .clr(load), .en(bit_valid),
                  .a(bits_im[i]), .b(bits_im[N_TAPS-1-i]), .s(im_sum[i]));
  end

  // ---------------- functional generation unit ----------------
  logic signed [PW-1:0] phi_ru1 [NOFC], phi_ru2 [NOFC];
  logic signed [PW-1:0] phi_iu1 [NOFC], phi_iu2 [NOFC];

  func_unit #(.LINES(HALF), .M(OFC_IN), .PW(PW), .NEG(1'b0), .COEF(COEF_RE))
    u_real1 (.bits(re_sum), .phi(phi_ru1));
  func_unit #(.LINES(HALF), .M(OFC_IN), .PW(PW), .NEG(1'b1), .COEF(COEF_IM))
    u_real2 (.bits(im_dif), .phi(phi_ru2));
  func_unit #(.LINES(HALF), .M(OFC_IN), .PW(PW), .NEG(1'b0), .COEF(COEF_IM))
    u_imag1 (.bits(re_dif), .phi(phi_iu1));
  func_unit #(.LINES(HALF), .M(OFC_IN), .PW(PW), .NEG(1'b0), .COEF(COEF_RE))
    u_imag2 (.bits(im_sum), .phi(phi_iu2));

  // ---------------- functional addition unit ----------------
  logic signed [PW-1:0] phi_re [2*NOFC], phi_im [2*NOFC];

  for (genvar q = 0; q < NOFC; q++) begin : g_cat
    assign phi_re[q]        = phi_ru1[q];
    assign phi_re[NOFC + q] = phi_ru2[q];
    assign phi_im[q]        = phi_iu1[q];
    assign phi_im[NOFC + q] = phi_iu2[q];
  end

  logic y_valid_re, y_valid_im;

  addition_unit #(.K(2*NOFC), .PW(PW), .B(B)) u_add_re (
    .clk(clk), .rst_n(rst_n), .in_valid(bit_valid), .in_first(bit_first),
    .in_sign(bit_sign), .phi(phi_re), .y_valid(y_valid_re), .y_full(y_re_full));
  addition_unit #(.K(2*NOFC), .PW(PW), .B(B)) u_add_im (
    .clk(clk), .rst_n(rst_n), .in_valid(bit_valid), .in_first(bit_first),
    .in_sign(bit_sign), .phi(phi_im), .y_valid(y_valid_im), .y_full(y_im_full));

  assign y_valid = y_valid_re;
  assign y_re    = y_re_full[CW-1 +: B];
  assign y_im    = y_im_full[CW-1 +: B];

  // both parts run in lock step
  always_ff @(posedge clk)
    if (rst_n) assert (y_valid_re == y_valid_im)
      else $error("cfir_da_top: real and imaginary parts out of step");
endmodule
