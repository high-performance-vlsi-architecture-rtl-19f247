// cfir_pkg - shared types and constants of the distributed-arithmetic
// complex FIR filter.
//
// The filter has linear phase: the real coefficients are symmetric and the
// imaginary coefficients antisymmetric about the centre, so only the first
// half, a(1..N/2), is stored (a_R(N+1-i) = a_R(i), a_I(N+1-i) = -a_I(i)).
// Coefficients are CW-bit two's-complement fractions (Q1.(CW-1)).
//
// The default coefficient set is an example of this form: a Hamming-windowed
// sinc low-pass with cutoff 0.135 cycles/sample, shifted up in frequency by
// 0.135 cycles/sample to make it complex, scaled by 1/2. The 60-tap length
// and the symmetry follow the source design; the coefficient values and the
// word lengths are this implementation's choice.
package cfir_pkg;

  localparam int N_TAPS_DEF = 60;   // taps
  localparam int B_DEF      = 16;   // input word length, bits
  localparam int CW_DEF     = 16;   // coefficient word length, bits
  localparam int OFC_IN_DEF = 5;    // address lines per function circuit
  localparam int HALF_MAX   = 64;   // largest N/2 the coefficient arrays hold

  typedef logic signed [CW_DEF-1:0] coef_t;
  typedef coef_t coef_half_t [HALF_MAX];

  localparam real PI = 3.14159265358979323846;

  // Example complex linear-phase coefficient, tap i = 0..N-1, real or imaginary part.
  function automatic coef_t example_coef(input int n_taps, input int i, input bit imag);
    real t, h, w, x, fc, f0;
    fc = 0.135;
    f0 = 0.135;
    t  = real'(i) - real'(n_taps - 1) / 2.0;
    h  = (t == 0.0) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t);
    w  = 0.54 - 0.46 * $cos(2.0 * PI * real'(i) / real'(n_taps - 1));
    x  = 0.5 * h * w * (imag ? $sin(2.0 * PI * f0 * t) : $cos(2.0 * PI * f0 * t));
    return coef_t'($rtoi(x * real'(1 << (CW_DEF - 1))));
  endfunction

  // First half of the example set (taps 1..N/2), zero beyond.
  function automatic coef_half_t example_half(input int n_taps, input bit imag);
    coef_half_t c;
    for (int i = 0; i < HALF_MAX; i++)
      c[i] = (i < n_taps / 2) ? example_coef(n_taps, i, imag) : '0;
    return c;
  endfunction

  localparam coef_half_t COEF_RE_DEF = example_half(N_TAPS_DEF, 1'b0);
  localparam coef_half_t COEF_IM_DEF = example_half(N_TAPS_DEF, 1'b1);

endpackage
