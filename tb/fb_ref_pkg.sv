// fb_ref_pkg: reference model of the 16-channel, twice-oversampled
// analysis filter bank, for the testbenches.
//
// It works straight from the filter bank's definition, not from the
// hardware's structure (no branches, no radix-4 split, no parallel banks):
//
//   u[q][m] = round(sum_{l=0..2} h[q + 16 l] x[8 m + 7 - q - 16 l] / 2^FIR_SHIFT)
//   v[k][m] = round(sum_{q} u[q][m] exp(-j 2 pi k q / 16) / 2^OUT_SHIFT)
//
// with the DFT done in floating point and v saturated to OUT_W bits.
// Samples before the start of the stream (negative index) are zero.
// The stream lives in the package's arrays xr[], xi[].
package fb_ref_pkg;
  import fb_pkg::*;

  int xr[], xi[];

  function automatic int sample_re(longint n);
    return (n < 0 || n >= xr.size()) ? 0 : xr[n];
  endfunction
  function automatic int sample_im(longint n);
    return (n < 0 || n >= xi.size()) ? 0 : xi[n];
  endfunction

  function automatic longint rshift_round(longint a, int sh);
    return (a + (longint'(1) << (sh - 1))) >>> sh;
  endfunction

  function automatic longint sat(longint a, int w);
    longint mx, mn;
    mx = (longint'(1) << (w - 1)) - 1;
    mn = -(longint'(1) << (w - 1));
    return a > mx ? mx : (a < mn ? mn : a);
  endfunction

  // Polyphase component q at decimated time m (FIR_W-bit integer).
  function automatic void ref_u(longint m, int q, output longint ur, output longint ui);
    longint ar, ai, h;
    ar = 0; ai = 0;
    for (int l = 0; l < int'(TAPS); l++) begin
      h  = longint'($signed(PROTO[q + int'(M) * l]));
      ar += h * sample_re(8 * m + 7 - q - 16 * l);
      ai += h * sample_im(8 * m + 7 - q - 16 * l);
    end
    ur = sat(rshift_round(ar, FIR_SHIFT), FIR_W);
    ui = sat(rshift_round(ai, FIR_SHIFT), FIR_W);
  endfunction

  // Sub-band k at decimated time m, before rounding (real) and after.
  function automatic void ref_v(longint m, int k, output int vr, output int vi,
                                output real fr, output real fi);
    longint ur, ui;
    real c, s, pi;
    pi = 3.14159265358979323846;
    fr = 0.0; fi = 0.0;
    for (int q = 0; q < int'(M); q++) begin
      ref_u(m, q, ur, ui);
      c = $cos(2.0 * pi * k * q / 16.0);
      s = $sin(2.0 * pi * k * q / 16.0);
      fr += real'(ur) * c + real'(ui) * s;
      fi += real'(ui) * c - real'(ur) * s;
    end
    fr = fr / real'(1 << OUT_SHIFT);
    fi = fi / real'(1 << OUT_SHIFT);
    vr = int'(sat(longint'($floor(fr + 0.5)), OUT_W));
    vi = int'(sat(longint'($floor(fi + 0.5)), OUT_W));
  endfunction

  // Does the hardware's output (hr, hi) match sub-band k at time m?
  // One LSB of slack covers the twiddle rounding inside the DFT.
  function automatic bit match_v(longint m, int k, int hr, int hi);
    int vr, vi;
    real fr, fi;
    ref_v(m, k, vr, vi, fr, fi);
    return (hr - vr <= 1) && (vr - hr <= 1) && (hi - vi <= 1) && (vi - hi <= 1);
  endfunction

  // Would sub-band k at time m clip?
  function automatic bit clips(longint m, int k);
    int vr, vi;
    real fr, fi;
    ref_v(m, k, vr, vi, fr, fi);
    return (fr > real'((1 << (OUT_W-1)) - 1) + 0.5) || (fr < -real'(1 << (OUT_W-1)) - 0.5) ||
           (fi > real'((1 << (OUT_W-1)) - 1) + 0.5) || (fi < -real'(1 << (OUT_W-1)) - 0.5);
  endfunction

  // Fill the stream with n random full-scale IN_W-bit samples.
  function automatic void fill_random(int n);
    xr = new[n]; xi = new[n];
    for (int i = 0; i < n; i++) begin
      xr[i] = int'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W - 1));
      xi[i] = int'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W - 1));
    end
  endfunction

  // Fill the stream with a tone at the centre of sub-band k, which is the
  // frequency -k/16 of the sample rate (the forward DFT picks exp(-j...)).
  function automatic void fill_tone(int n, int k, real amp);
    real pi;
    pi = 3.14159265358979323846;
    xr = new[n]; xi = new[n];
    for (int i = 0; i < n; i++) begin
      xr[i] = int'(sat(longint'($floor(amp * $cos(2.0 * pi * k * i / 16.0) + 0.5)), IN_W));
      xi[i] = int'(sat(longint'($floor(-amp * $sin(2.0 * pi * k * i / 16.0) + 0.5)), IN_W));
    end
  endfunction

endpackage
