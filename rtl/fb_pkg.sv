// fb_pkg: shared constants, sample types and coefficient tables of the
// twice-oversampled analysis filter bank.
//
// The filter bank splits a complex baseband stream into M = 16 frequency
// slices and decimates each by D = M/2 = 8, so every slice comes out twice
// oversampled. The polyphase array is derived from a 48-tap low-pass
// prototype, giving 3 taps per polyphase output. Input samples are 5-bit
// I/Q (the ADC resolution), the filter datapath keeps 16 bits, and the
// sub-band outputs are 10-bit I/Q. Those numbers follow the design
// description; the fractional scaling between the stages (FIR_SHIFT,
// OUT_SHIFT) and the prototype's window are this design's own choices.
//
// Prototype: h[n] = w[n] * sinc((n - 23.5) / 16), n = 0..47, with the
// Hamming window w[n] = 0.54 - 0.46 cos(2 pi n / 47), scaled so the peak
// tap is close to 32767 (Q1.15) and rounded to the nearest integer. Its
// cut-off is pi/16 rad/sample, half the spacing of the 16 channels.
//
// Twiddles: W16^e = cos(2 pi e / 16) - j sin(2 pi e / 16) in Q2.16
// (65536 = 1.0), rounded to the nearest integer.
package fb_pkg;

  // ---- filter bank geometry ----
  localparam int unsigned M       = 16;          // channels (DFT size)
  localparam int unsigned D       = M / 2;       // decimation = SIDO branches
  localparam int unsigned NTAPS   = 48;          // prototype length
  localparam int unsigned TAPS    = NTAPS / M;   // taps per polyphase output
  localparam int unsigned WIN     = 2 * TAPS;    // branch delay-line length

  // ---- word widths ----
  localparam int unsigned IN_W    = 5;           // ADC I/Q resolution
  localparam int unsigned COEF_W  = 16;          // prototype coefficients
  localparam int unsigned FIR_W   = 16;          // polyphase filter outputs
  localparam int unsigned DFT_W   = FIR_W + 5;   // DFT result (log2(16)+1 growth)
  localparam int unsigned OUT_W   = 10;          // sub-band output I/Q
  localparam int unsigned TW_W    = 18;          // twiddle constants, Q2.16
  localparam int unsigned TW_FRAC = 16;

  // ---- scaling between stages ----
  localparam int unsigned FIR_SHIFT = 8;  // MAC sum (Q.15) -> FIR output (Q.7)
  localparam int unsigned OUT_SHIFT = 5;  // DFT result -> 10-bit output

  // ---- sample types ----
  typedef struct packed {
    logic signed [IN_W-1:0] re;
    logic signed [IN_W-1:0] im;
  } in_smp_t;

  typedef struct packed {
    logic signed [FIR_W-1:0] re;
    logic signed [FIR_W-1:0] im;
  } fir_smp_t;

  typedef struct packed {
    logic signed [DFT_W-1:0] re;
    logic signed [DFT_W-1:0] im;
  } dft_smp_t;

  typedef struct packed {
    logic signed [OUT_W-1:0] re;
    logic signed [OUT_W-1:0] im;
  } out_smp_t;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [NTAPS-1:0][COEF_W-1:0] proto_t;

  // 48-tap Hamming-windowed sinc prototype, see the header.
  function automatic proto_t proto_coefs();
    proto_t r;
    real pi, a, s, w, v;
    pi = 3.14159265358979323846;
    for (int n = 0; n < int'(NTAPS); n++) begin
      a = (real'(n) - real'(NTAPS - 1) / 2.0) / real'(M);
      s = $sin(pi * a) / (pi * a);
      w = 0.54 - 0.46 * $cos(2.0 * pi * real'(n) / real'(NTAPS - 1));
      v = s * w * 32767.0;
      r[n] = COEF_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return r;
  endfunction

  localparam proto_t PROTO = proto_coefs();

  // Real and imaginary part magnitudes of W16^e in Q2.16.
  function automatic logic signed [TW_W-1:0] tw_cos(int e);
    real pi, v;
    pi = 3.14159265358979323846;
    v = $cos(2.0 * pi * real'(e) / real'(M)) * real'(1 << TW_FRAC);
    return TW_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

  function automatic logic signed [TW_W-1:0] tw_sin(int e);
    real pi, v;
    pi = 3.14159265358979323846;
    v = $sin(2.0 * pi * real'(e) / real'(M)) * real'(1 << TW_FRAC);
    return TW_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

  // Tables of W16^e for the exponents e = n2 k1 = 0..9 used by the DFT.
  typedef logic [9:0][TW_W-1:0] tw_tab_t;

  function automatic tw_tab_t tw_cos_tab();
    tw_tab_t t;
    for (int e = 0; e < 10; e++) t[e] = tw_cos(e);
    return t;
  endfunction

  function automatic tw_tab_t tw_sin_tab();
    tw_tab_t t;
    for (int e = 0; e < 10; e++) t[e] = tw_sin(e);
    return t;
  endfunction

  localparam tw_tab_t TW_COS = tw_cos_tab();
  localparam tw_tab_t TW_SIN = tw_sin_tab();

endpackage
