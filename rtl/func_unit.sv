// func_unit - one unit of the functional generation unit (Real Unit 1/2 or
// Imaginary Unit 1/2).
//
// The LINES bit lines (one per coefficient pair, i.e. N/2 for an N-tap
// filter, coming from the serial adders or subtractors) are divided into
// NOFC = ceil(LINES/M) groups of M lines; each group drives its own
// optimum function circuit (ofc), so the unit delivers NOFC partial sums of
// Phi per bit cycle. Their addition happens in the functional addition
// unit. The split of Phi into equal slices follows the source design's
// division of the function; the slice width M is this implementation's
// choice. Purely combinational.
module func_unit
  import cfir_pkg::*;
#(
  parameter int         LINES = N_TAPS_DEF / 2,
  parameter int         M     = OFC_IN_DEF,
  parameter int         PW    = 23,
  parameter bit         NEG   = 1'b0,
  parameter coef_half_t COEF  = COEF_RE_DEF,
  localparam int        NOFC  = (LINES + M - 1) / M
) (
  input  logic [LINES-1:0]     bits,
  output logic signed [PW-1:0] phi [NOFC]
);
  logic [NOFC*M-1:0] lines;
  assign lines = (NOFC*M)'(bits);   // unused lines of the last slice read 0

  for (genvar q = 0; q < NOFC; q++) begin : g_ofc
    ofc #(
      .M(M), .PW(PW), .BASE(q*M), .LINES(LINES), .NEG(NEG), .COEF(COEF)
    ) u_ofc (
      .addr(lines[q*M +: M]),
      .phi (phi[q])
    );
  end
endmodule
