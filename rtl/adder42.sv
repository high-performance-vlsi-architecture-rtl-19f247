// adder42 - word-level 4-2 adder (carry-save reduction of four words to two).
//
// A row of W compressor42 cells. Bit i's cout feeds bit i+1's cin; the
// carry output c of bit i has weight 2^(i+1) and is placed in cy[i+1].
// Result: s + cy == a + b + c + d (mod 2^W), with two's-complement words
// sign-extended to W bits beforehand by the user. Purely combinational.
module adder42 #(
  parameter int W = 23
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W:0]   chain;   // chain[i] = cin of bit i
  logic [W-1:0] cbit;

  assign chain[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    compressor42 u_cell (
      .x   ({d[i], c[i], b[i], a[i]}),
      .cin (chain[i]),
      .s   (s[i]),
      .c   (cbit[i]),
      .cout(chain[i+1])
    );
  end

  // The top cell's carries fall outside the word (modulo 2^W).
  assign cy = {cbit[W-2:0], 1'b0};

  logic unused_top;
  assign unused_top = cbit[W-1] ^ chain[W];
endmodule
