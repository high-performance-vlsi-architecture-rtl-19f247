// cla - carry look-ahead adder, s = a + b + cin (mod 2^W).
//
// Bits are grouped by four. Inside a group every carry is formed directly
// from the generate (g = a & b) and propagate (p = a ^ b) signals and the
// group's carry-in; each group also forms a group generate and propagate,
// and the group carries are chained through those (block carry look-ahead).
// Purely combinational. The source design only names its CLAs; the group
// size is this implementation's choice.
module cla #(
  parameter int W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);
  localparam int NG = (W + 3) / 4;

  logic [4*NG-1:0] g, p, c;
  logic [NG:0]     gc;     // carry into each group

  // operands zero-extended to whole groups
  assign g = (4*NG)'(a & b);
  assign p = (4*NG)'(a ^ b);

  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    // carries inside group k, each a two-level expression of g, p, gc[k]
    assign c[4*k]   = gc[k];
    assign c[4*k+1] = g[4*k]   | (p[4*k]   & gc[k]);
    assign c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & gc[k]);
    assign c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
                    | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    // carry out of the group from its group generate / propagate
    assign gc[k+1]  = g[4*k+3] | (p[4*k+3] & g[4*k+2]) | (p[4*k+3] & p[4*k+2] & g[4*k+1])
                    | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k])
                    | (p[4*k+3] & p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
  end

  assign s = p[W-1:0] ^ c[W-1:0];

  logic unused_top;
  assign unused_top = gc[NG] ^ c[4*NG-1];
endmodule
