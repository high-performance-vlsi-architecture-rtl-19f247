// da_controller - bit-cycle sequencer of the distributed-arithmetic filter.
//
// One sample takes B bit cycles, independent of the number of taps. The
// controller counts them and takes a new sample when the previous one is
// presenting its last bit (or when idle): x_ready marks that cycle and
// load = x_valid & x_ready. In the B cycles after a load, bit_valid is high
// and bit k of every tap word is on the bit lines in cycle k (k = 0 is the
// least significant bit); bit_first marks k = 0 and bit_sign marks k = B-1,
// the sign bit, whose partial sum the accumulator subtracts. With x_valid
// held high the filter accepts one sample every B cycles.
// The handshake, the synchronous active-low reset and the counter are this
// implementation's choices; the source design gives no controller.
module da_controller #(
  parameter int B = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x_valid,
  output logic x_ready,
  output logic load,
  output logic bit_valid,
  output logic bit_first,
  output logic bit_sign
);
  localparam int CBW = (B > 1) ? $clog2(B) : 1;

  logic           busy;
  logic [CBW-1:0] cnt;
  logic           last;

  assign last      = busy && (cnt == CBW'(B - 1));
  assign x_ready   = !busy || last;
  assign load      = x_valid && x_ready;
  assign bit_valid = busy;
  assign bit_first = busy && (cnt == '0);
  assign bit_sign  = last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (last) begin
      busy <= 1'b0;
    end else if (busy) begin
      cnt  <= cnt + 1'b1;
    end
  end
endmodule
