// cr_pkg - shared sizes, types and fixed-point helpers of the command
// recogniser.
//
// Default sizes follow the DFT/SDFT block diagrams: 128-point transform,
// 12-bit input samples, 16-bit cos/sin tables and 16-bit coefficient storage.
// Twiddle factors are signed Q1.15: scaled by 2^15 and rounded, with +1.0
// clamped to 32767.  Because the
// 128-term sum of 12-bit samples needs 19 bits plus sign, the coefficient
// stores hold X(k) / 2^COEF_SHIFT with COEF_SHIFT = 12 + 7 - 16 = 3, so a
// full-scale input just fits in 16 bits.  That scaling is a choice of this
// design; the diagrams only print the 16-bit width.
package cr_pkg;

  localparam int unsigned N_DFT     = 128;  // microsegment length (16 ms at 8 kHz)
  localparam int unsigned SAMPLE_W  = 12;   // x(n) width
  localparam int unsigned TW_W      = 16;   // cos/sin table width
  localparam int unsigned COEF_W    = 16;   // ReX(k)/ImX(k) storage width

  // Right shift that keeps an N-term sum of SAMPLE_W-bit samples inside COEF_W.
  function automatic int unsigned coef_shift(int unsigned sample_w, int unsigned n,
                                             int unsigned coef_w);
    int s;
    s = int'(sample_w) + int'($clog2(n)) - int'(coef_w);
    return (s < 0) ? 0 : int'(s);
  endfunction

  function automatic int clamp_tw(int v, int unsigned w);
    int hi;
    hi = (1 << (w - 1)) - 1;
    return (v > hi) ? hi : v;
  endfunction

  // Fixed-point cosine/sine of 2*pi*i/n, scaled by 2^(w-1), rounded to
  // nearest and clamped to the largest positive code.  Elaboration time only.
  function automatic int twiddle_cos(int unsigned i, int unsigned n, int unsigned w);
    real v;
    v = $cos(2.0 * 3.141592653589793 * real'(i) / real'(n)) * real'(1 << (w - 1));
    return clamp_tw($rtoi($floor(v + 0.5)), w);
  endfunction

  function automatic int twiddle_sin(int unsigned i, int unsigned n, int unsigned w);
    real v;
    v = $sin(2.0 * 3.141592653589793 * real'(i) / real'(n)) * real'(1 << (w - 1));
    return clamp_tw($rtoi($floor(v + 0.5)), w);
  endfunction

endpackage
