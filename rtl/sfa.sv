// sfa - serial full adder.
//
// Adds two bit-serial two's-complement words, least significant bit first.
// The sum bit leaves combinationally in the same cycle; the carry is kept in
// a one-bit register and enters the addition of the next higher bit, as in
// the serial adder of the source design. Because the filter inputs are
// limited to -0.5 <= v < 0.5, the B-bit sum of two of them never overflows,
// so the carry out of the sign bit is simply dropped.
//
// Interface: a, b  input bits of the current weight
//            en    advance (store the new carry)
//            clr   synchronous clear of the carry, given in the cycle before
//                  the first (LSB) bit of a new word; it wins over en
//            s     sum bit
// Clearing the carry at every word boundary is this implementation's choice.
module sfa (
  input  logic clk,
  input  logic clr,
  input  logic en,
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry;

  assign s = a ^ b ^ carry;

  always_ff @(posedge clk) begin
    if (clr)     carry <= 1'b0;
    else if (en) carry <= (a & b) | (a & carry) | (b & carry);
  end
endmodule
