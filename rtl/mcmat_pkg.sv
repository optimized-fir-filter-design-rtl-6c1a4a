// mcmat_pkg: word sizes and filter constants shared by the MCMAT truncated
// multiplier, the 5:2 Wallace tree compressor and the 5-tap FIR filter.
//
// The 8-bit effective word length and the 5 taps are the filter's own
// specification. The coefficient values are this design's choice: a symmetric
// (linear-phase) 8-bit low-pass set whose sum is close to 256, i.e. unity DC
// gain with the coefficients read as fractions of 256.
package mcmat_pkg;

  // Effective word length of samples, coefficients and the filter output.
  localparam int unsigned EWL  = 8;
  // Number of taps (filter length M).
  localparam int unsigned TAPS = 5;

  typedef logic [EWL-1:0] word_t;
  typedef word_t taps_t [TAPS];

  // Default coefficients h(0), h(1), ..., h(4); element k is h(k).
  localparam taps_t DEFAULT_COEFFS = '{
    word_t'(8'd16), word_t'(8'd63), word_t'(8'd93), word_t'(8'd63), word_t'(8'd16)
  };

endpackage
