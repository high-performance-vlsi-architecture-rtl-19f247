// shift_accumulator - the accumulating CLA of the functional addition unit,
// with its one-bit shift feedback and output latch.
//
// Distributed arithmetic forms y = -Phi(0) + sum_{k>=1} 2^-k Phi(k), where
// Phi(k) is the partial sum for bit k of the inputs (k = 0 is the sign bit).
// The words arrive least significant bit first, so each cycle the previous
// value is shifted right by one and the new partial sum is added:
//     acc <= (first ? 0 : acc >>> 1) + (sign ? -phi : phi)
// The subtraction on the sign-bit cycle uses the same CLA with phi inverted
// and a carry-in of 1. The bit that each shift pushes out of acc is kept in
// a B-1 bit register, so after the sign-bit cycle {acc, low bits} is the
// exact result; it is latched into y_full and y_valid pulses for one cycle
// in the following cycle. y_full counts in units of 2^-(B-1) of the phi
// scale. Keeping the shifted-out bits, and the reset, are this
// implementation's choices; the shift-and-add loop and the output latch
// follow the source design.
module shift_accumulator #(
  parameter int PW = 23,
  parameter int B  = 16,
  localparam int AW = PW + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   first,
  input  logic                   sign,
  input  logic signed [PW-1:0]   phi,
  output logic                   y_valid,
  output logic signed [PW+B-1:0] y_full
);
  logic signed [AW-1:0] acc, acc_half, shifted, operand, sum;
  logic [B-2:0]         lo, lo_next;

  // kept apart from the mux so the shift stays arithmetic (signed context)
  assign acc_half = acc >>> 1;
  assign shifted  = first ? AW'(0) : acc_half;
  assign operand = sign ? ~AW'(phi) : AW'(phi);
  assign lo_next = first ? lo : {acc[0], lo[B-2:1]};

  cla #(.W(AW)) u_cla (.a(shifted), .b(operand), .cin(sign), .s(sum));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_full  <= '0;
      acc     <= '0;
      lo      <= '0;
    end else begin
      y_valid <= en && sign;
      if (en) begin
        acc <= sum;
        lo  <= lo_next;
        if (sign) y_full <= {sum, lo_next};
      end
    end
  end
endmodule
