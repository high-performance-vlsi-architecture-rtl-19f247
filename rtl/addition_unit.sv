// addition_unit - functional addition unit of one output part (real or
// imaginary).
//
// Takes the K partial sums of Phi produced in a bit cycle by the function
// circuits of the two units of this part and adds them in a tree of word
// 4-2 adders: each level turns every four words into two (a leftover group
// of three is padded with zero, a leftover of one or two passes through),
// until two words remain; a register follows every level. A CLA then adds
// the last two words into Phi (registered), and the shift accumulator forms
// the weighted sum over the B bit cycles. The stage count is
// LEVELS + 2, LEVELS = number of 4-2 levels (3 for K = 12), the same count
// as a tree of two-input CLAs over K/2 words, with half as many adders.
// The valid / first-bit / sign-bit flags travel alongside the data.
//
// Timing: the slice presented in cycle t reaches the accumulator in cycle
// t + LEVELS + 1; y_valid rises LEVELS + 2 cycles after the sign-bit slice
// was presented. A new slice may enter every cycle.
// The 4-2 tree followed by a CLA and an accumulating CLA follows the source
// design; the pipeline register placement is this implementation's choice.
module addition_unit #(
  parameter int  K  = 12,
  parameter int  PW = 23,
  parameter int  B  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_first,
  input  logic                   in_sign,
  input  logic signed [PW-1:0]   phi [K],
  output logic                   y_valid,
  output logic signed [PW+B-1:0] y_full
);
  // number of words after l levels of 4-2 reduction
  function automatic int words_after(input int l);
    int n, grp, rem;
    n = (K < 2) ? 2 : K;
    for (int i = 0; i < l; i++) begin
      if (n > 2) begin
        grp = n / 4;
        rem = n % 4;
        if (rem == 3) begin grp++; rem = 0; end
        n = 2 * grp + rem;
      end
    end
    return n;
  endfunction

  function automatic int count_levels();
    int l;
    l = 0;
    while (words_after(l) > 2) l++;
    return l;
  endfunction

  localparam int LEVELS = count_levels();
  localparam int KP     = (K < 2) ? 2 : K;
  localparam int D      = LEVELS + 1;      // registers before the accumulator

  typedef logic [PW-1:0] word_t;

  word_t lv   [LEVELS+1][KP];   // lv[0] = inputs, lv[l] = registered level l
  word_t comb [LEVELS+1][KP];   // combinational result of each level

  for (genvar j = 0; j < KP; j++) begin : g_in
    if (j < K) begin : g_used
      assign lv[0][j] = phi[j];
    end else begin : g_pad
      assign lv[0][j] = '0;
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int NIN  = words_after(l);
    localparam int NGRP = (NIN % 4 == 3) ? NIN / 4 + 1 : NIN / 4;
    localparam int NREM = (NIN % 4 == 3) ? 0 : NIN % 4;
    localparam int NOUT = 2 * NGRP + NREM;
    for (genvar g = 0; g < NGRP; g++) begin : g_add
      adder42 #(.W(PW)) u_add (
        .a (lv[l][4*g]),
        .b (lv[l][4*g+1]),
        .c (lv[l][4*g+2]),
        .d ((4*g+3 < NIN) ? lv[l][4*g+3] : word_t'('0)),
        .s (comb[l][2*g]),
        .cy(comb[l][2*g+1])
      );
    end
    for (genvar r = 0; r < NREM; r++) begin : g_pass
      assign comb[l][2*NGRP + r] = lv[l][4*NGRP + r];
    end
    for (genvar z = NOUT; z < KP; z++) begin : g_zero
      assign comb[l][z] = '0;
    end
  end
  for (genvar z = 0; z < KP; z++) begin : g_last_zero
    assign comb[LEVELS][z] = '0;
  end

  always_ff @(posedge clk)
    for (int l = 0; l < LEVELS; l++)
      for (int j = 0; j < KP; j++)
        lv[l+1][j] <= comb[l][j];

  // final carry-propagate addition of the two remaining words
  word_t phi_sum_c;
  logic signed [PW-1:0] phi_sum;
  cla #(.W(PW)) u_cla (.a(lv[LEVELS][0]), .b(lv[LEVELS][1]), .cin(1'b0), .s(phi_sum_c));

  always_ff @(posedge clk) phi_sum <= phi_sum_c;

  // flags delayed by D cycles
  logic [D-1:0] v_d, f_d, s_d;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d <= '0;
      f_d <= '0;
      s_d <= '0;
    end else begin
      v_d <= D'({v_d, in_valid});
      f_d <= D'({f_d, in_first});
      s_d <= D'({s_d, in_sign});
    end
  end

  shift_accumulator #(.PW(PW), .B(B)) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (v_d[D-1]),
    .first  (f_d[D-1]),
    .sign   (s_d[D-1]),
    .phi    (phi_sum),
    .y_valid(y_valid),
    .y_full (y_full)
  );
endmodule
