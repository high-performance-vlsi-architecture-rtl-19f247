// input_unit - tap delay line of one part (real or imaginary) of the input.
//
// N_TAPS circulating shift registers SR_1..SR_N of B bits. While a sample
// is processed (rotate = 1) every register rotates right by one bit per
// cycle, so bits[i] = bit k of tap word i in bit cycle k, least significant
// bit first; after B rotations each word is back in place. At a sample
// boundary (load = 1) the new word enters SR_1 and every SR_i takes the
// re-aligned word of SR_(i-1): the chain advances by one tap. load may
// coincide with the last rotation of the previous sample.
// The circulating registers chained word to word follow the source design;
// the LSB-first order is required by the serial adders that follow.
module input_unit #(
  parameter int N_TAPS = 60,
  parameter int B      = 16
) (
  input  logic              clk,
  input  logic              load,
  input  logic              rotate,
  input  logic [B-1:0]      x_in,
  output logic [N_TAPS-1:0] bits
);
  logic [B-1:0] sr      [N_TAPS];
  logic [B-1:0] aligned [N_TAPS];

  always_comb
    for (int i = 0; i < N_TAPS; i++)
      aligned[i] = rotate ? {sr[i][0], sr[i][B-1:1]} : sr[i];

  always_ff @(posedge clk) begin
    if (load) begin
      sr[0] <= x_in;
      for (int i = 1; i < N_TAPS; i++) sr[i] <= aligned[i-1];
    end else begin
      for (int i = 0; i < N_TAPS; i++) sr[i] <= aligned[i];
    end
  end

  always_comb
    for (int i = 0; i < N_TAPS; i++) bits[i] = sr[i][0];
endmodule
