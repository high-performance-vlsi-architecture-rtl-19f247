// compressor42 - one bit of a 4-2 adder.
//
// Two full adders in cascade, as in the source design: the first adds
// x[0], x[1], x[2] and produces the outgoing carry cout (weight 2, to the
// next higher bit's cin); the second adds the first one's sum, x[3] and the
// incoming carry cin and produces s (weight 1) and c (weight 2). cout does
// not depend on cin, so a row of these cells has no rippling carry.
// Invariant: x[0]+x[1]+x[2]+x[3]+cin = s + 2*(c + cout).
// The second adder takes cin on its late input, which is where the source
// design places its "Type 2" full adder. Which inputs enter which adder is
// this implementation's choice.
module compressor42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       s,
  output logic       c,
  output logic       cout
);
  logic s1;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .c(x[2]), .s(s1), .co(cout));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .c(cin),  .s(s),  .co(c));
endmodule
