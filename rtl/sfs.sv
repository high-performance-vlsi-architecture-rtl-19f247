// sfs - serial full subtractor.
//
// Forms a - b on two bit-serial two's-complement words, least significant
// bit first. The difference bit leaves combinationally; the borrow is kept
// in a one-bit register and enters the subtraction of the next higher bit,
// as in the serial subtractor of the source design. With inputs limited to
// -0.5 <= v < 0.5 the B-bit difference never overflows.
//
// Interface: a, b  input bits of the current weight (result is a - b)
//            en    advance (store the new borrow)
//            clr   synchronous clear of the borrow before a new word; wins over en
//            d     difference bit
// Clearing the borrow at every word boundary is this implementation's choice.
module sfs (
  input  logic clk,
  input  logic clr,
  input  logic en,
  input  logic a,
  input  logic b,
  output logic d
);
  logic borrow;

  assign d = a ^ b ^ borrow;

  always_ff @(posedge clk) begin
    if (clr)     borrow <= 1'b0;
    else if (en) borrow <= (~a & b) | (~a & borrow) | (b & borrow);
  end
endmodule
