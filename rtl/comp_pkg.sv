// comp_pkg: constants and types shared by the audio level compressor.
//
// Every audio sample, gain and smoothing coefficient is a two's complement
// fraction x0.x1...x(N-1) with value range [-1, 1) (N bits, N-1 fraction
// bits), as in the number format of the compressor. The default word length
// is the 16-bit compressor; 24 and 32 bits are the other two sizes the
// design was sized for. The polynomial coefficients b1..bm use a wider
// word with the same number of fraction bits plus DEF_CB_INT extra integer
// bits, because interpolated coefficients of a degree-7 fit have magnitudes
// of up to about 8 (this extra range is a choice of this design).
package comp_pkg;

  // Default word length of samples and gains (16-bit compressor).
  localparam int unsigned DEF_N      = 16;
  // Default degree m of the gain polynomial f_m(x).
  localparam int unsigned DEF_M      = 7;
  // Extra integer bits of polynomial coefficients and of the Horner accumulator.
  localparam int unsigned DEF_CB_INT = 4;

  // Which coefficient pair the attack/release smoother uses for a sample.
  typedef enum logic {
    AR_RELEASE = 1'b0,   // gain rising or steady: (r0, r1)
    AR_ATTACK  = 1'b1    // gain falling: (h0, h1)
  } ar_mode_e;

endpackage
