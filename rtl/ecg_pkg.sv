// ecg_pkg: types and constants shared by the ECG feature extractor.
//
// The whole design is set by two numbers, the system clock rate and the
// ECG sampling rate; every timing constant (1 s windows, 30 ms / 20 ms pulses,
// the 200 ms refractory limit, the 1 ms tick of the RR counter) is derived from
// them with the helper functions below.  Wavelet coefficients are 12-bit
// two's-complement values, as in the document (D_i(n)[11..0]).
package ecg_pkg;

  localparam int unsigned COEF_W = 12;           // width of A_i, D_i and samples
  localparam int unsigned LEVELS = 3;            // decomposition levels used

  typedef logic signed [COEF_W-1:0] coef_t;      // one wavelet coefficient
  typedef logic [COEF_W-1:0]        sample_t;    // one unsigned A/D code

  // Clock cycles in a span given in milliseconds.
  function automatic int unsigned ms_to_cycles(int unsigned clk_hz, int unsigned ms);
    return int'((longint'(clk_hz) * longint'(ms)) / 64'd1000);
  endfunction

  // Number of bits needed to count 0..n-1 (at least 1).
  function automatic int unsigned cnt_w(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
