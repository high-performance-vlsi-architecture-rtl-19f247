// full_adder - one-bit full adder, the building block of the 4-2 adder.
//
// s = a ^ b ^ c, co = majority(a, b, c). The source design distinguishes a
// "Type 1" full adder with a fast carry path and a smaller "Type 2" full
// adder that tolerates one late input (arriving a half-adder delay after the
// other two). Both have this same logic function; the difference lies in the
// gate netlist, which is left to synthesis here. Input c is the one allowed
// to arrive late: s is written as (a ^ b) ^ c so that a and b meet first.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  logic ab;
  assign ab = a ^ b;
  assign s  = ab ^ c;
  assign co = (a & b) | (ab & c);
endmodule
