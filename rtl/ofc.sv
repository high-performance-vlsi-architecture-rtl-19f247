// ofc - optimum function circuit: one slice of the distributed-arithmetic
// function Phi, built from logic instead of a ROM.
//
// For M address lines the circuit returns
//     phi(addr) = sign * sum_{j : addr[j] = 1} COEF[BASE + j]
// i.e. the inner product of the M coefficients of this slice with the
// current bit of each of the M input words. In a ROM-based design this is
// a 2^M-word table; here the same truth table is computed at elaboration
// and expressed as a constant lookup, which synthesis turns into gates. The
// source design reduces the gate count by merging identical rows and
// columns of the table; that minimisation is left to the logic synthesis
// tool. Lines at or beyond LINES (when the last slice of a unit is not full)
// carry a zero coefficient. NEG = 1 negates every entry (used for the
// -a_I term of the real output). Sums are sign-extended to PW bits.
// Purely combinational.
module ofc
  import cfir_pkg::*;
#(
  parameter int         M     = OFC_IN_DEF,
  parameter int         PW    = 23,
  parameter int         BASE  = 0,
  parameter int         LINES = N_TAPS_DEF / 2,
  parameter bit         NEG   = 1'b0,
  parameter coef_half_t COEF  = COEF_RE_DEF
) (
  input  logic [M-1:0]         addr,
  output logic signed [PW-1:0] phi
);
  typedef logic signed [PW-1:0] phi_t;
  typedef phi_t table_t [2**M];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < 2**M; a++) begin
      phi_t acc;
      acc = '0;
      for (int j = 0; j < M; j++)
        if (a[j] && (BASE + j < LINES))
          acc = acc + phi_t'(COEF[BASE + j]);
      t[a] = NEG ? -acc : acc;
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign phi = TABLE[addr];
endmodule
